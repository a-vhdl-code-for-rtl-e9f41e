// tb_sync_counter: counts random increments against a software count, checks the
// clear input and saturation (with a 4-bit instance).
module tb_sync_counter;
  logic clk = 0, rst = 1, clr_i = 0, inc_i = 0;
  logic [15:0] count_o;
  logic [3:0]  small_count;
  int checks = 0, failures = 0;
  sync_counter dut (.*);
  sync_counter #(.WIDTH(4)) dut4 (.clk, .rst, .clr_i, .inc_i, .count_o(small_count));
  always #5 clk = ~clk;
  initial begin
    int ref_c;
    repeat (2) @(negedge clk);
    rst = 0;
    ref_c = 0;
    for (int i = 0; i < 500; i++) begin
      inc_i = 1'($urandom_range(0, 1));
      clr_i = (i == 250);
      @(negedge clk);
      if (clr_i) ref_c = 0; else if (inc_i) ref_c++;
      checks += 2;
      if (count_o != 16'(ref_c)) begin failures++; $display("FAIL %0d: %0d vs %0d", i, count_o, ref_c); end
      if (small_count != 4'((ref_c > 15) ? 15 : ref_c)) begin failures++; $display("FAIL sat %0d", small_count); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
