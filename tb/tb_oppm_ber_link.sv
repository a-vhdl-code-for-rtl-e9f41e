// tb_oppm_ber_link: end-to-end test of the OPPM bit-error test link.
//  1. Direct link, no errors: the checker locks on the PRBS start, counts one bit
//     per 4 clocks, and counts no errors; the decoded stream must equal the
//     reference PRBS (15 ones, then s[n] = s[n-15] ^ s[n-14]) bit for bit.
//  2. Isolated external error pulses (one slot per pulse, far apart): each must
//     cost 1 or 2 bit errors (a flipped slot always changes its 3-bit word, and
//     changes at most the sign bit or the two position bits).
//  3. PRBS errors with a 7-bit mask through the external return path: errors
//     must be counted, at most 2 per hit slot, and OPPM violations must occur.
//  4. Counter clear.
//  5. Sync mode: the coder waits for the 15 ones and the checker then only locks
//     at the next all-ones run, one PRBS period (32767 bits) later.
module tb_oppm_ber_link;
  logic clk = 0, rst = 1;
  logic sync_i = 0, ext_sel_i = 0, return_i, err_i = 0, cnt_clr_i = 0;
  logic [6:0] err_mask_i = 0;
  logic coder_out_o, prbs_bit_o, dataout_o, errcode_o, locked_o, synced_o;
  logic output_prbs_o, slot_err_o, viol_o;
  logic [15:0] err_count_o, bit_count_o;
  int ec, bc;                      // the counters as integers
  assign ec = int'(err_count_o);
  assign bc = int'(bit_count_o);
  int checks = 0, failures = 0;

  oppm_ber_link dut (.*);
  always #5 clk = ~clk;
  assign return_i = coder_out_o;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // reference comparison of the decoded stream (phase 1)
  bit refbits [];
  int rx_n = 0, rx_bad = 0;
  bit cmp_on = 0;
  initial begin
    refbits = new[40000];
    for (int i = 0; i < 40000; i++) refbits[i] = (i < 15) ? 1'b1 : (refbits[i-15] ^ refbits[i-14]);
  end
  always @(posedge clk) if (!rst && cmp_on && dut.en3 && dut.dec_valid) begin
    if (dut.dec_bit !== refbits[rx_n]) rx_bad++;
    rx_n++;
  end

  int nslot_err = 0, nviol = 0;
  always @(posedge clk) if (!rst && dut.en4 && slot_err_o) nslot_err++;
  always @(posedge clk) if (!rst && viol_o && dut.en3) nviol++;

  initial begin
    int e0, b0, t0;
    repeat (3) @(posedge clk);
    rst = 0; cmp_on = 1;
    // 1. clean
    repeat (4000) @(posedge clk);
    check(locked_o, "locked");
    check(err_count_o == 0, $sformatf("clean errors %0d", err_count_o));
    check(bit_count_o > 960 && bit_count_o < 1000, $sformatf("bit count %0d", bit_count_o));
    check(rx_n > 990 && rx_bad == 0, $sformatf("decoded stream %0d bad of %0d", rx_bad, rx_n));
    cmp_on = 0;
    b0 = bc; t0 = 0;
    // 2. isolated external errors
    e0 = ec;
    nslot_err = 0;
    for (int i = 0; i < 40; i++) begin
      repeat ($urandom_range(40, 80)) @(posedge clk);
      @(posedge clk); while (!dut.en4) @(posedge clk);
      @(negedge clk); err_i = 1;
      @(posedge clk); while (!dut.en4) @(posedge clk);
      @(negedge clk); err_i = 0;
    end
    repeat (100) @(posedge clk);
    check(nslot_err == 40, $sformatf("slot errors %0d", nslot_err));
    check(ec - e0 >= 40 && ec - e0 <= 80,
          $sformatf("bit errors %0d for 40 slot errors", ec - e0));
    // 3. PRBS errors via the return path
    e0 = ec; nslot_err = 0; nviol = 0;
    ext_sel_i = 1; err_mask_i = 7'b0011111;
    repeat (20000) @(posedge clk);
    err_mask_i = 0;
    repeat (100) @(posedge clk);
    check(nslot_err > 0 && ec > e0, "PRBS errors counted");
    check(ec - e0 <= 2 * nslot_err, $sformatf("%0d bit errors for %0d slots", ec - e0, nslot_err));
    check(nviol > 0, "OPPM violations seen");
    ext_sel_i = 0;
    // 4. clear
    @(negedge clk); cnt_clr_i = 1; @(negedge clk); cnt_clr_i = 0;
    check(err_count_o == 0 && bit_count_o == 0, "counter clear");
    // 5. sync mode
    rst = 1; sync_i = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (200) @(posedge clk);
    check(synced_o, "coder synchronised");
    check(!locked_o, "checker waits for the next all-ones run");
    repeat (32767 * 4 + 200) @(posedge clk);
    check(locked_o, "checker locked after one period");
    check(err_count_o == 0, "no errors in sync mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
