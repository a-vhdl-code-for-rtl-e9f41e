// tb_oppm_enc_logic: exhaustive check of the 3-bit PCM to 4-slot OPPM mapping
// against the code table (sign slot = MSB, one pulse in E/F/G for 11/10/01).
module tb_oppm_enc_logic;
  logic [2:0] pcm_i;
  logic [3:0] oppm_o;
  int checks = 0, failures = 0;
  oppm_enc_logic dut (.*);
  // expected codewords for PCM 000..111, written out from the code table
  logic [3:0] table_t [8] = '{4'b0000, 4'b0001, 4'b0010, 4'b0100,
                              4'b1000, 4'b1001, 4'b1010, 4'b1100};
  initial begin
    for (int v = 0; v < 8; v++) begin
      pcm_i = 3'(v);
      #1;
      checks++;
      if (oppm_o !== table_t[v]) begin
        failures++; $display("FAIL pcm %b -> %b exp %b", pcm_i, oppm_o, table_t[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
