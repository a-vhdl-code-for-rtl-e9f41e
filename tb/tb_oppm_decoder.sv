// tb_oppm_decoder: sends OPPM codewords to oppm_decoder slot by slot on the 4-bit
// strobe (mostly legal codewords, some with two or three pulses among E F G, some
// empty frames) and reads the PCM bits on the 3-bit strobe. The valid bits must be
// the testbench's own decoding of each legal codeword, in order; illegal codewords
// must come out as {D,0,0} with viol_o on all three bits; sop_o must mark the
// first bit of a frame sent with frame_sop.
module tb_oppm_decoder;
  logic clk = 0, rst = 1;
  logic en3, en4, frame;
  logic slot_i = 0, frame_valid_i = 0, frame_sop_i = 0;
  logic bit_o, valid_o, sop_o, viol_o;
  int checks = 0, failures = 0;

  oppm_clkgen u_clk (.clk, .rst, .en3_o(en3), .en4_o(en4), .frame_o(frame));
  oppm_decoder dut (.clk, .rst, .en3_i(en3), .en4_i(en4), .frame_i(frame), .slot_i,
                    .frame_valid_i, .frame_sop_i, .bit_o, .valid_o, .sop_o, .viol_o);
  always #5 clk = ~clk;

  logic [3:0] legal [8] = '{4'b0000, 4'b0001, 4'b0010, 4'b0100,
                            4'b1000, 4'b1001, 4'b1010, 4'b1100};
  logic [3:0] cw;
  int slot_k = 0, nframes = 0, nillegal = 0, nsop = 0;
  bit  expb [$];
  bit  expv [$];
  bit  exps [$];

  // stimulus: a new codeword at each frame strobe, its slots at each en4 strobe
  always @(posedge clk) if (!rst && en4) begin
    if (frame) begin
      logic v, s;
      logic [2:0] w;
      if (nframes < 300) begin
        v = ($urandom_range(0, 9) != 0);
        s = v && ($urandom_range(0, 7) == 0);
        if ($urandom_range(0, 5) == 0) begin
          cw = {1'($urandom_range(0, 1)), 3'(($urandom_range(0, 3) == 0) ? 7 : 3 << $urandom_range(0, 1))};
          if (cw[2:0] == 3'b110 && $urandom_range(0, 1) != 0) cw[2:0] = 3'b101;
          w = {cw[3], 2'b00};
          if (v) begin
            nillegal++;
            for (int i = 2; i >= 0; i--) begin expb.push_back(w[i]); expv.push_back(1); exps.push_back(s && i == 2); end
          end
        end else begin
          w = 3'($urandom_range(0, 7));
          cw = legal[w];
          if (v) for (int i = 2; i >= 0; i--) begin expb.push_back(w[i]); expv.push_back(0); exps.push_back(s && i == 2); end
        end
        if (s) nsop++;
        nframes++;
      end else begin
        v = 0; s = 0; cw = 4'b0000;
      end
      slot_i        <= cw[3];
      frame_valid_i <= v;
      frame_sop_i   <= s;
      slot_k = 1;
    end else begin
      slot_i <= cw[3 - slot_k];
      slot_k++;
    end
  end

  // monitor: sample the output held since the previous 3-bit strobe
  always @(posedge clk) if (!rst && en3 && valid_o) begin
    checks++;
    if (expb.size() == 0) begin failures++; $display("FAIL unexpected bit"); end
    else begin
      if (bit_o !== expb[0] || viol_o !== expv[0] || sop_o !== exps[0]) begin
        failures++;
        $display("FAIL bit got %b/%b/%b exp %b/%b/%b", bit_o, viol_o, sop_o, expb[0], expv[0], exps[0]);
      end
      void'(expb.pop_front()); void'(expv.pop_front()); void'(exps.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nframes == 300);
    repeat (48) @(posedge clk);
    checks += 2;
    if (expb.size() != 0) begin failures++; $display("FAIL %0d bits missing", expb.size()); end
    if (nillegal == 0 || nsop == 0) begin failures++; $display("FAIL cases not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
