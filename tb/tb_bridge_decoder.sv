// tb_bridge_decoder: drives serial codewords (31 random symbols MSB first plus one
// pad bit, sop on the first bit) into bridge_decoder on the 3-bit strobe, with idle
// bit times between and inside codewords, stray bits before the first sop, and
// random OPPM violation flags. Each output symbol must equal the sent one, sop must
// mark symbol 0 of each codeword, out_era must be set exactly when one of the
// symbol's bits carried a violation, and pad bits must produce no symbol.
module tb_bridge_decoder;
  localparam int N = 31;
  logic clk = 0, rst = 1;
  logic en3, en4, frame;
  logic bit_i = 0, valid_i = 0, sop_i = 0, viol_i = 0;
  logic out_valid, out_sop, out_era;
  logic [4:0] out_data;
  int checks = 0, failures = 0;

  oppm_clkgen u_clk (.clk, .rst, .en3_o(en3), .en4_o(en4), .frame_o(frame));
  bridge_decoder dut (.clk, .rst, .en3_i(en3), .bit_i, .valid_i, .sop_i, .viol_i,
                      .out_valid, .out_sop, .out_data, .out_era);
  always #5 clk = ~clk;

  // bit-level stimulus queue
  bit  qb [$];
  bit  qv [$];
  bit  qs [$];
  bit  qe [$];
  int  exps [$];
  bit  expe [$];
  bit  expsop [$];
  int  nsym = 0, nera = 0;

  task automatic add_bit(bit b, bit v, bit s, bit e);
    qb.push_back(b); qv.push_back(v); qs.push_back(s); qe.push_back(e);
  endtask

  initial begin
    // stray bits before the first codeword
    for (int i = 0; i < 7; i++) add_bit(1, 1, 0, 0);
    for (int c = 0; c < 12; c++) begin
      for (int j = 0; j < N; j++) begin
        logic [4:0] d;
        bit era;
        d = 5'($urandom_range(0, 31));
        era = 0;
        for (int i = 4; i >= 0; i--) begin
          bit e;
          e = ($urandom_range(0, 29) == 0);
          era |= e;
          if ($urandom_range(0, 9) == 0) add_bit(0, 0, 0, 0);   // idle bit time
          add_bit(d[i], 1, (j == 0 && i == 4), e);
        end
        exps.push_back(int'(d)); expe.push_back(era); expsop.push_back(j == 0);
        if (era) nera++;
      end
      add_bit(1, 1, 0, 1);                                     // pad bit
      if (c % 3 == 0) for (int i = 0; i < 3; i++) add_bit(0, 0, 0, 0);
    end
  end

  always @(posedge clk) if (!rst && en3) begin
    if (qb.size() > 0) begin
      bit_i <= qb.pop_front(); valid_i <= qv.pop_front();
      sop_i <= qs.pop_front(); viol_i <= qe.pop_front();
    end else begin
      valid_i <= 0; sop_i <= 0; viol_i <= 0;
    end
  end

  always @(posedge clk) if (!rst && out_valid) begin
    checks++;
    nsym++;
    if (exps.size() == 0) begin failures++; $display("FAIL unexpected symbol"); end
    else begin
      if (out_data !== 5'(exps[0]) || out_era !== expe[0] || out_sop !== expsop[0]) begin
        failures++;
        $display("FAIL sym %0d got %0d/%b/%b exp %0d/%b/%b", nsym, out_data, out_era, out_sop, exps[0], expe[0], expsop[0]);
      end
      void'(exps.pop_front()); void'(expe.pop_front()); void'(expsop.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (qb.size() == 0);
    repeat (40) @(posedge clk);
    checks += 2;
    if (exps.size() != 0) begin failures++; $display("FAIL %0d symbols missing", exps.size()); end
    if (nera == 0) begin failures++; $display("FAIL no erasures exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
