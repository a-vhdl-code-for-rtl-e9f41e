// tb_rx_prbs_checker: feeds the reference PRBS sequence (15 leading ones, then
// s[n] = s[n-15] ^ s[n-14]) preceded by some zeros into rx_prbs_checker on the
// 3-bit strobe, flips chosen bits after lock, and checks that the checker locks
// after the 15 ones, flags exactly the flipped bits, and counts every checked bit.
module tb_rx_prbs_checker;
  logic clk = 0, rst = 1;
  logic en3, en4, frame;
  logic bit_i = 0, valid_i = 0;
  logic dataout_o, prbs_o, err_o, bit_o, locked_o;
  int checks = 0, failures = 0;

  oppm_clkgen u_clk (.clk, .rst, .en3_o(en3), .en4_o(en4), .frame_o(frame));
  rx_prbs_checker dut (.clk, .rst, .en3_i(en3), .bit_i, .valid_i,
                       .dataout_o, .prbs_o, .err_o, .bit_o, .locked_o);
  always #5 clk = ~clk;

  localparam int LEAD = 10, LEN = 3000;
  bit seq [];
  bit flip [];
  int idx = 0, nflips = 0, nerr = 0, nbit = 0, bad_flag = 0;

  initial begin
    seq = new[LEN]; flip = new[LEN];
    for (int i = 0; i < LEN; i++) begin
      if (i < LEAD) seq[i] = 0;
      else if (i < LEAD + 15) seq[i] = 1;
      else seq[i] = seq[i-15] ^ seq[i-14];
      flip[i] = (i > LEAD + 20) && ($urandom_range(0, 49) == 0);
      if (flip[i]) nflips++;
    end
  end

  int cur = 0, taken = 0;
  always @(posedge clk) if (!rst && en3) begin
    if (valid_i) taken <= cur;              // the checker takes bit 'cur' now
    if (idx < LEN && $urandom_range(0, 7) != 0) begin
      bit_i   <= seq[idx] ^ flip[idx];
      valid_i <= 1;
      cur     <= idx;
      idx     <= idx + 1;
    end else valid_i <= 0;
  end
  always @(posedge clk) if (!rst) begin
    if (err_o) nerr++;
    if (bit_o) begin
      nbit++;
      checks++;
      if (err_o !== flip[taken]) begin bad_flag++; failures++; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (idx == LEAD + 17);
    repeat (12) @(posedge clk);
    checks++;
    if (locked_o !== 1'b1) begin failures++; $display("FAIL not locked"); end
    wait (idx == LEN);
    repeat (40) @(posedge clk);
    checks += 2;
    if (nerr != nflips) begin failures++; $display("FAIL errors %0d flips %0d", nerr, nflips); end
    if (bad_flag != 0) $display("FAIL %0d misplaced flags", bad_flag);
    if (nbit != LEN - LEAD - 15) begin failures++; $display("FAIL bits %0d", nbit); end
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
