// tb_oppm_channel: checks the channel's three paths and its error source against a
// reference model: the direct loop (slot_o = slot_i), the external return path,
// external error injection, and PRBS errors, which must occur exactly on the slots
// where the masked bits of the reference x^7 + x^6 + 1 register are all ones. With
// a one-bit mask about half the slots and with a 3-bit mask about 1/8 must be hit.
module tb_oppm_channel;
  logic clk = 0, rst = 1;
  logic en3, en4, frame;
  logic slot_i = 0, ext_sel_i = 0, return_i = 0, err_i = 0;
  logic [6:0] err_mask_i = 0;
  logic coder_out_o, slot_o, err_o;
  int checks = 0, failures = 0;

  oppm_clkgen u_clk (.clk, .rst, .en3_o(en3), .en4_o(en4), .frame_o(frame));
  oppm_channel dut (.clk, .rst, .en4_i(en4), .slot_i, .ext_sel_i, .return_i, .err_i,
                    .err_mask_i, .coder_out_o, .slot_o, .err_o);
  always #5 clk = ~clk;

  logic [6:0] ref7;
  logic       ref_err;
  int nerr, nslots;

  // run n slots; check at the middle of each slot (negedge after the strobe)
  task automatic run(int n, logic [6:0] mask, bit ext, bit ext_err);
    nerr = 0; nslots = 0;
    err_mask_i = mask; ext_sel_i = ext;
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      while (!en4) @(posedge clk);
      // reference update at this strobe
      ref_err = err_i | ((mask != 0) && ((ref7 & mask) == mask));
      ref7 = {ref7[5:0], ref7[6] ^ ref7[5]};
      @(negedge clk);
      checks += 3;
      if (err_o !== ref_err) begin failures++; $display("FAIL err_o slot %0d", i); end
      if (slot_o !== ((ext ? return_i : slot_i) ^ ref_err)) begin failures++; $display("FAIL slot_o"); end
      if (coder_out_o !== slot_i) begin failures++; $display("FAIL coder_out"); end
      if (ref_err) nerr++;
      nslots++;
      slot_i   = 1'($urandom_range(0, 1));
      return_i = 1'($urandom_range(0, 1));
      err_i    = ext_err && ($urandom_range(0, 9) == 0);
    end
  endtask

  initial begin
    ref7 = '1;
    repeat (2) @(negedge clk);
    rst = 0;
    run(200, 7'b0, 0, 0);
    checks++; if (nerr != 0) begin failures++; $display("FAIL errors with zero mask"); end
    run(200, 7'b0, 1, 0);
    run(200, 7'b0, 0, 1);
    checks++; if (nerr == 0) begin failures++; $display("FAIL no external errors"); end
    run(1270, 7'b0000100, 0, 0);
    checks++; if (nerr < 500 || nerr > 770) begin failures++; $display("FAIL 1-bit mask rate %0d", nerr); end
    run(1270, 7'b1010001, 1, 0);
    checks++; if (nerr < 100 || nerr > 220) begin failures++; $display("FAIL 3-bit mask rate %0d", nerr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
