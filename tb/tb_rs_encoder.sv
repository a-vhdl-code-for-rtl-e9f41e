// tb_rs_encoder: self-checking test of rs_encoder (RS(31,23)).
// Random messages are streamed in with random output backpressure. Each output
// codeword must start with the message (systematic), have zero syndromes at
// a^1..a^8, equal the reference long-division codeword, and carry sop/eop on
// symbols 0 and 30. The parity phase must hold in_ready low for 8 symbols, and
// in_last must mark the 23rd message symbol.
module tb_rs_encoder;
  import tb_gf_pkg::*;
  localparam int N = 31, K = 23, NCW = 20;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_sop, out_eop;
  logic [4:0] in_data, out_data;
  int checks = 0, failures = 0;

  rs_encoder dut (.*);
  always #5 clk = ~clk;

  int msgs[NCW][K];
  int mi, mj, oi, oj, cyc;
  int cw[];
  int got[N];
  int m[];

  initial begin
    for (int c = 0; c < NCW; c++) for (int j = 0; j < K; j++) msgs[c][j] = $urandom_range(0, 31);
    for (int j = 0; j < K; j++) msgs[0][j] = 0;          // all-zero message
    for (int j = 0; j < K; j++) msgs[1][j] = 31;
  end

  assign in_valid = (mi < NCW);
  assign in_data  = (mi < NCW) ? 5'(msgs[mi][mj]) : 5'd0;

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin
      checks++;
      if (in_last != (mj == K - 1)) begin failures++; $display("FAIL in_last at %0d", mj); end
      if (mj == K - 1) begin mj <= 0; mi <= mi + 1; end else mj <= mj + 1;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_sop != (oj == 0) || out_eop != (oj == N - 1)) begin
        failures++; $display("FAIL sop/eop at cw %0d sym %0d", oi, oj);
      end
      if (oj >= K) begin
        checks++;
        if (in_ready) begin failures++; $display("FAIL in_ready during parity"); end
      end
      got[oj] = int'(out_data);
      if (oj == N - 1) begin
        m = new[K];
        for (int j = 0; j < K; j++) m[j] = msgs[oi][j];
        encode(m, N - K, cw);
        for (int j = 0; j < N; j++) begin
          checks++;
          if (got[j] != cw[j]) begin failures++; $display("FAIL cw %0d sym %0d got %0d exp %0d", oi, j, got[j], cw[j]); end
        end
        begin
          int w[];
          w = new[N];
          foreach (w[j]) w[j] = got[j];
          for (int i = 1; i <= N - K; i++) begin
            checks++;
            if (syndrome(w, i) != 0) begin failures++; $display("FAIL syndrome %0d cw %0d", i, oi); end
          end
        end
        oj <= 0; oi <= oi + 1;
      end else oj <= oj + 1;
    end
  end

  initial begin
    mi = 0; mj = 0; oi = 0; oj = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (oi == NCW);
    repeat (2) @(posedge clk);
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
