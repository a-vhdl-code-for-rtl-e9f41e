// tb_rs_decoder: self-checking test of rs_decoder (RS(31,23), t = 4).
// Reference codewords come from the testbench's own encoder. Each trial picks s
// errors and r erasures at distinct random positions:
//  * 2s + r <= 8: the output must equal the sent codeword, out_raw the received
//    word, err_num = s + r, era_num = r and fail = 0;
//  * r > 8: fail must be set and the output must be the received word;
//  * other over-capacity cases: if fail is clear the output must still be a
//    codeword (zero syndromes), otherwise it must be the received word.
// Symbols arrive with random gaps, sometimes back to back; the output burst must
// begin at most 42 clocks after the last symbol and last exactly 31 cycles.
module tb_rs_decoder;
  import tb_gf_pkg::*;
  localparam int N = 31, K = 23, NTRIAL = 400;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_sop = 0, in_era = 0;
  logic [4:0] in_data = 0;
  logic out_valid, out_sop, out_eop, fail_o, busy_o;
  logic [4:0] out_data, out_raw, err_num_o, era_num_o;
  int checks = 0, failures = 0;
  int n_corr = 0, n_era = 0, n_fail = 0;

  rs_decoder dut (.*);
  always #5 clk = ~clk;

  int cw[];
  int rx[N];
  bit era[N];
  int sent_cw[N];
  int exp_s, exp_r, kind;
  int got[N], gotraw[N];
  int oj;
  int t_last, t_first;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // collect one output burst
  task automatic collect();
    oj = 0;
    while (!(out_valid && out_sop)) @(posedge clk);
    t_first = cyc;
    while (1) begin
      check(out_valid, "burst continuous");
      got[oj] = int'(out_data); gotraw[oj] = int'(out_raw);
      if (out_eop) break;
      oj++;
      @(posedge clk);
    end
    check(oj == N - 1, "burst length");
  endtask

  initial begin
    int m[];
    int pos[$];
    int p, s, r;
    bit ok;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    for (int trial = 0; trial < NTRIAL; trial++) begin
      m = new[K];
      foreach (m[j]) m[j] = $urandom_range(0, 31);
      encode(m, N - K, cw);
      kind = trial % 10;
      if (kind < 7) begin                        // within capacity
        s = $urandom_range(0, 4);
        r = $urandom_range(0, 8 - 2 * s);
      end else if (kind < 8) begin               // too many erasures
        s = 0; r = $urandom_range(9, 12);
      end else begin                             // too many errors
        s = $urandom_range(5, 8); r = $urandom_range(0, 2);
      end
      for (int j = 0; j < N; j++) begin rx[j] = cw[j]; era[j] = 0; sent_cw[j] = cw[j]; end
      pos.delete();
      while (pos.size() < s + r) begin
        p = $urandom_range(0, N - 1);
        ok = 1;
        foreach (pos[i]) if (pos[i] == p) ok = 0;
        if (ok) pos.push_back(p);
      end
      for (int i = 0; i < s; i++) rx[pos[i]] = cw[pos[i]] ^ $urandom_range(1, 31);
      for (int i = s; i < s + r; i++) begin
        era[pos[i]] = 1;
        if ($urandom_range(0, 1) != 0) rx[pos[i]] = cw[pos[i]] ^ $urandom_range(1, 31);
      end
      // send
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        in_valid = 1; in_sop = (j == 0); in_data = 5'(rx[j]); in_era = era[j];
        if (trial % 3 != 0) begin
          repeat ($urandom_range(0, 2)) begin
            @(negedge clk);
            in_valid = 0; in_sop = 0; in_era = 0;
          end
        end
      end
      @(negedge clk);
      in_valid = 0; in_sop = 0; in_era = 0;
      t_last = cyc;
      collect();
      check(t_first - t_last <= 42, $sformatf("latency %0d", t_first - t_last));
      for (int j = 0; j < N; j++) check(gotraw[j] == rx[j], "raw output");
      if (2 * s + r <= 8) begin
        for (int j = 0; j < N; j++) check(got[j] == sent_cw[j], $sformatf("trial %0d s=%0d r=%0d sym %0d", trial, s, r, j));
        check(fail_o == 0, "fail within capacity");
        check(err_num_o == 5'(s + r), $sformatf("err_num %0d exp %0d", err_num_o, s + r));
        check(era_num_o == 5'(r), "era_num");
        if (s + r > 0) n_corr++;
        if (r > 0) n_era++;
      end else if (r > 8) begin
        check(fail_o == 1, "fail on r > 2t");
        for (int j = 0; j < N; j++) check(got[j] == rx[j], "uncorrected on fail");
        n_fail++;
      end else begin
        if (fail_o) begin
          for (int j = 0; j < N; j++) check(got[j] == rx[j], "uncorrected on fail");
          n_fail++;
        end else begin
          int w[];
          w = new[N];
          foreach (w[j]) w[j] = got[j];
          for (int i = 1; i <= 8; i++) check(syndrome(w, i) == 0, "miscorrection is a codeword");
        end
      end
      @(posedge clk);
    end
    check(n_corr > 0 && n_era > 0 && n_fail > 0, "all cases exercised");
    $display("corrected=%0d with_erasures=%0d failed=%0d", n_corr, n_era, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
