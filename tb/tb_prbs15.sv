// tb_prbs15: checks the 15-bit PRBS against a reference built from the recurrence
// s[n] = s[n-15] ^ s[n-14] with 15 leading ones: the serial output bit by bit, the
// 5-bit symbol output (which must carry the same sequence 5 bits per step), and
// the period of 32767 (the state returns to all ones and not earlier).
module tb_prbs15;
  logic clk = 0, rst = 1;
  logic bit_step_i = 0, sym_step_i = 0;
  logic bit_o;
  logic [4:0] sym_o;
  logic [14:0] state_o;
  int checks = 0, failures = 0;
  prbs15 dut (.*);
  always #5 clk = ~clk;
  bit ref_s [];
  initial begin
    int n, first_ones;
    ref_s = new[40000];
    for (int i = 0; i < 15; i++) ref_s[i] = 1;
    for (int i = 15; i < 40000; i++) ref_s[i] = ref_s[i-15] ^ ref_s[i-14];
    repeat (2) @(negedge clk);
    rst = 0;
    first_ones = -1;
    for (n = 0; n < 32800; n++) begin
      @(negedge clk);
      checks++;
      if (bit_o !== ref_s[n]) begin failures++; if (failures < 5) $display("FAIL bit %0d", n); end
      if (n > 0 && state_o == '1 && first_ones < 0) first_ones = n;
      bit_step_i = 1;
    end
    bit_step_i = 0;
    checks++;
    if (first_ones != 32767) begin failures++; $display("FAIL period %0d", first_ones); end
    // symbol mode from reset
    rst = 1; @(negedge clk); rst = 0;
    for (n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (sym_o !== {ref_s[5*n], ref_s[5*n+1], ref_s[5*n+2], ref_s[5*n+3], ref_s[5*n+4]}) begin
        failures++; if (failures < 5) $display("FAIL sym %0d", n);
      end
      sym_step_i = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
