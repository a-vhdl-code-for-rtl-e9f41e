// tb_oppm_clkgen: checks that the timing generator gives 3 bit strobes and 4 slot
// strobes in every 12-clock frame, evenly spaced (every 4th / 3rd clock), with the
// frame strobe exactly where both coincide.
module tb_oppm_clkgen;
  logic clk = 0, rst = 1;
  logic en3_o, en4_o, frame_o;
  int checks = 0, failures = 0;
  oppm_clkgen dut (.*);
  always #5 clk = ~clk;
  initial begin
    int n3, n4, last3, last4, lastf, c;
    repeat (2) @(negedge clk);
    rst = 0;
    n3 = 0; n4 = 0; last3 = -1; last4 = -1; lastf = -1;
    for (c = 0; c < 120; c++) begin
      @(negedge clk);
      checks++;
      if (frame_o !== (en3_o & en4_o)) begin failures++; $display("FAIL frame at %0d", c); end
      if (en3_o) begin
        n3++;
        if (last3 >= 0) begin checks++; if (c - last3 != 4) begin failures++; $display("FAIL en3 spacing"); end end
        last3 = c;
      end
      if (en4_o) begin
        n4++;
        if (last4 >= 0) begin checks++; if (c - last4 != 3) begin failures++; $display("FAIL en4 spacing"); end end
        last4 = c;
      end
      if (frame_o) begin
        if (lastf >= 0) begin checks++; if (c - lastf != 12) begin failures++; $display("FAIL frame spacing"); end end
        lastf = c;
      end
    end
    checks += 2;
    if (n3 != 30) begin failures++; $display("FAIL n3=%0d", n3); end
    if (n4 != 40) begin failures++; $display("FAIL n4=%0d", n4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
