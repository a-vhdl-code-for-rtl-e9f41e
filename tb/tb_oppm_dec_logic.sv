// tb_oppm_dec_logic: exhaustive check of the OPPM decoder over all 16 slot patterns.
// The 8 legal codewords must return their PCM word with viol_o low; patterns with
// two or more pulses among E F G must raise viol_o and decode to {D,0,0}.
module tb_oppm_dec_logic;
  logic [3:0] oppm_i;
  logic [2:0] pcm_o;
  logic       viol_o;
  int checks = 0, failures = 0;
  oppm_dec_logic dut (.*);
  logic [3:0] table_t [8] = '{4'b0000, 4'b0001, 4'b0010, 4'b0100,
                              4'b1000, 4'b1001, 4'b1010, 4'b1100};
  initial begin
    int legal;
    for (int w = 0; w < 16; w++) begin
      oppm_i = 4'(w);
      #1;
      legal = -1;
      for (int v = 0; v < 8; v++) if (table_t[v] == 4'(w)) legal = v;
      checks += 2;
      if (legal >= 0) begin
        if (pcm_o !== 3'(legal) || viol_o !== 1'b0) begin
          failures++; $display("FAIL %b -> %b viol %b", oppm_i, pcm_o, viol_o);
        end
      end else begin
        if (viol_o !== 1'b1 || pcm_o !== {oppm_i[3], 2'b00}) begin
          failures++; $display("FAIL illegal %b -> %b viol %b", oppm_i, pcm_o, viol_o);
        end
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
