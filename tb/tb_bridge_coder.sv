// tb_bridge_coder: feeds random 5-bit symbols to bridge_coder and reads the serial
// stream on the 3-bit strobe. Every codeword must come out as 31 symbols MSB first
// followed by one zero pad bit (156 bits), with sop on its first bit only. In the
// first part the source always has a symbol ready and the stream must have no
// gaps (one bit per strobe); in the second the source is sometimes empty and only
// the order of valid bits is checked.
module tb_bridge_coder;
  localparam int N = 31;
  logic clk = 0, rst = 1;
  logic en3, en4, frame;
  logic in_valid, in_ready, bit_o, valid_o, sop_o;
  logic [4:0] in_data;
  int checks = 0, failures = 0;

  oppm_clkgen u_clk (.clk, .rst, .en3_o(en3), .en4_o(en4), .frame_o(frame));
  bridge_coder dut (.clk, .rst, .en3_i(en3), .in_valid, .in_ready, .in_data,
                    .bit_o, .valid_o, .sop_o);
  always #5 clk = ~clk;

  bit  expb [$];
  bit  exps [$];
  int  nsym = 0, nbits_seen = 0, gaps = 0, part = 0;
  logic [4:0] cur;
  logic       avail = 1;
  bit         stop = 0;

  assign in_valid = avail && !rst;
  assign in_data  = cur;

  always @(posedge clk) begin
    if (!rst && in_valid && in_ready) begin
      for (int i = 4; i >= 0; i--) begin
        expb.push_back(cur[i]);
        exps.push_back((nsym % N == 0) && i == 4);
      end
      if (nsym % N == N - 1) begin expb.push_back(0); exps.push_back(0); end
      nsym++;
      cur <= 5'($urandom_range(0, 31));
    end
    if (!rst && en3) avail <= !stop && ((part == 0) || ($urandom_range(0, 4) != 0));
  end

  always @(posedge clk) if (!rst && en3 && nsym > 0) begin
    if (valid_o) begin
      checks++;
      nbits_seen++;
      if (expb.size() == 0) begin failures++; $display("FAIL unexpected bit"); end
      else begin
        if (bit_o !== expb[0] || sop_o !== exps[0]) begin
          failures++; $display("FAIL bit %0d got %b/%b exp %b/%b", nbits_seen, bit_o, sop_o, expb[0], exps[0]);
        end
        void'(expb.pop_front()); void'(exps.pop_front());
      end
    end else if (part == 0) gaps++;
  end

  initial begin
    cur = 5'd17;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nsym == 3 * N);
    repeat (4 * 40) @(posedge clk);
    checks++;
    if (gaps > 1) begin failures++; $display("FAIL %0d gaps with a full source", gaps); end
    part = 1;
    wait (nsym == 8 * N - 1);
    stop = 1;
    repeat (4 * 200) @(posedge clk);
    checks++;
    if (expb.size() != 0) begin failures++; $display("FAIL %0d bits missing", expb.size()); end
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
