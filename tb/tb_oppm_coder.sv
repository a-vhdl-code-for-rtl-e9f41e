// tb_oppm_coder: drives random PCM bits into oppm_coder on the 3-bit strobe and
// rebuilds the slot stream on the 4-bit strobe, one 4-slot codeword per frame. Each
// received codeword must be the table codeword of the next 3-bit input word, in
// order, with frame_valid set, and frame_sop on the word that began with sop.
// Words must follow each other in consecutive frames (rate 3 bits per 12 clocks)
// and a word must go out at most 2 frames after its last bit.
// A second phase checks sync mode (5 zeros, 15 ones, a zero, random bits): nothing
// is sent until 15 ones have been seen,
// and the first word sent is the 3 bits after them.
module tb_oppm_coder;
  logic clk = 0, rst = 1;
  logic en3, en4, frame;
  logic sync_i = 0, bit_i = 0, valid_i = 0, sop_i = 0;
  logic slot_o, frame_valid_o, frame_sop_o, synced_o;
  int checks = 0, failures = 0;

  oppm_clkgen u_clk (.clk, .rst, .en3_o(en3), .en4_o(en4), .frame_o(frame));
  oppm_coder dut (.clk, .rst, .en3_i(en3), .en4_i(en4), .frame_i(frame), .sync_i,
                  .bit_i, .valid_i, .sop_i, .slot_o, .frame_valid_o, .frame_sop_o, .synced_o);
  always #5 clk = ~clk;

  function automatic logic [3:0] enc(logic [2:0] w);
    case (w)
      3'b000: return 4'b0000; 3'b001: return 4'b0001;
      3'b010: return 4'b0010; 3'b011: return 4'b0100;
      3'b100: return 4'b1000; 3'b101: return 4'b1001;
      3'b110: return 4'b1010; default: return 4'b1100;
    endcase
  endfunction

  logic [3:0] expq [$];
  bit         sopq [$];
  int         tq   [$];
  int nbits = 0, cyc = 0, phase = 0, nfr = 0, last_fr = -1, maxlat = 0;
  logic [2:0] w;
  logic [2:0] cap;
  int skip_bits = 0;        // sync phase: bits before the word stream starts
  int total_bits = 600;

  always @(posedge clk) cyc++;

  // stimulus: a new bit at every en3 strobe
  always @(posedge clk) if (!rst && en3) begin
    logic b;
    b = 1'($urandom_range(0, 1));
    if (phase == 1 && nbits <= 20) b = (nbits >= 5 && nbits < 20);
    if (nbits < total_bits) begin
      bit_i   <= b;
      valid_i <= 1'b1;
      sop_i   <= (phase == 0 && nbits == 0);
      if (nbits >= skip_bits) begin
        w = {w[1:0], b};
        if ((nbits - skip_bits) % 3 == 2) begin
          expq.push_back(enc(w));
          sopq.push_back(phase == 0 && nbits == 2);
          tq.push_back(cyc);
        end
      end
      nbits++;
    end else begin
      valid_i <= 1'b0;
      sop_i   <= 1'b0;
    end
  end

  // monitor
  always @(posedge clk) if (!rst) begin
    if (en4 && !frame) cap <= {cap[1:0], slot_o};
    if (frame && frame_valid_o) begin
      logic [3:0] got;
      got = {cap, slot_o};
      nfr++;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected word"); end
      else begin
        if (got !== expq[0]) begin failures++; $display("FAIL word %0d got %b exp %b", nfr, got, expq[0]); end
        checks++;
        if (frame_sop_o !== sopq[0]) begin failures++; $display("FAIL sop word %0d", nfr); end
        if (cyc - tq[0] > maxlat) maxlat = cyc - tq[0];
        void'(expq.pop_front()); void'(sopq.pop_front()); void'(tq.pop_front());
      end
      if (last_fr >= 0) begin
        checks++;
        if (cyc - last_fr != 12) begin failures++; $display("FAIL gap between words %0d", cyc - last_fr); end
      end
      last_fr = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nbits == total_bits);
    repeat (60) @(posedge clk);
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words not sent", expq.size()); end
    if (maxlat > 24 + 12) begin failures++; $display("FAIL latency %0d", maxlat); end
    // phase 1: sync mode, 5 random bits, 15 ones, a zero, then random bits
    phase = 1; nbits = 0; skip_bits = 20; last_fr = -1; total_bits = 200;
    rst = 1; sync_i = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nbits == 21);
    @(posedge clk);
    checks++;
    if (synced_o !== 1'b1) begin failures++; $display("FAIL not synced after 15 ones"); end
    wait (nbits == total_bits);
    repeat (60) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL sync: %0d words not sent", expq.size()); end
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
