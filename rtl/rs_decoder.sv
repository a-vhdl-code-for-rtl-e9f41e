// rs_decoder: Reed-Solomon RS(N,K) errors-and-erasures decoder over GF(2^5),
// default RS(31,23), t = (N-K)/2 = 4. It corrects s symbol errors and r erasures
// (symbols whose position is flagged unreliable) whenever 2s + r <= N-K, and reports
// a failure when the received word cannot be decoded.
// How it works, in three stages:
//  1. Receive: while the N symbols of a codeword arrive (highest degree first), the
//     2t syndromes S_i = r(a^i), i = 1..2t, are accumulated by Horner's rule, the
//     symbols are stored, and for every flagged symbol the erasure locator
//     G(x) = prod(1 + X x) is extended by its locator X = a^(position).
//  2. Solve: after the last symbol the results are copied to a second register set
//     (so the next codeword can be received meanwhile) and the Berlekamp-Massey
//     algorithm, started from G(x) with length r, runs for the remaining 2t - r
//     iterations, one per clock, giving the errata locator L(x). The evaluator
//     W(x) = S(x) L(x) mod x^2t is then formed in one clock.
//  3. Search and correct: a Chien search visits the N positions, one per clock, in
//     order of arrival; at each root of L(x) the Forney formula gives the error value
//     W(X^-1) / L'(X^-1). A first pass only counts the roots; decoding fails if their
//     number differs from the degree of L(x) or if r > 2t. A second pass streams the
//     N symbols out, corrected unless decoding failed (then as received).
// The design gives the code size, the erasure input and the outputs (data, number
// of errors, failure flag); the algorithms above are this design's choice. The code
// roots a^1..a^2t match rs_encoder.
// Interface: symbol stream in (in_valid, in_sop marks symbol 0, in_data, in_era);
// no backpressure. Out: out_valid for N consecutive cycles with out_sop on the first
// and out_eop on the last symbol; out_raw is the symbol as received; err_num_o
// (located errata, errors plus erasures; 0 on failure), era_num_o (erasures) and
// fail_o are valid with out_eop.
// Timing: the output burst starts 2t - r + 2 + N + 1 clocks after the last input
// symbol (at most 42 for RS(31,23)); a codeword may arrive as fast as one symbol per
// clock as long as each codeword takes at least that long to arrive.
module rs_decoder
  import gf32_pkg::*;
#(
  parameter int unsigned N = 31,
  parameter int unsigned K = 23
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_sop,
  input  gf_t  in_data,
  input  logic in_era,
  output logic out_valid,
  output logic out_sop,
  output logic out_eop,
  output gf_t  out_data,
  output gf_t  out_raw,
  output gf_t  err_num_o,
  output gf_t  era_num_o,
  output logic fail_o,
  output logic busy_o
);
  localparam int unsigned T2 = N - K;               // 2t
  localparam int unsigned CW = $clog2(N + 1);
  localparam logic [CW-1:0] LAST_C = CW'(N - 1);

  typedef gf_t poly_t [T2+1];                        // degree <= 2t
  typedef gf_t syn_t  [T2];                          // S_1..S_2t at [0..2t-1]

  // ---------------- receive stage ----------------
  gf_t             rbuf [N];
  syn_t            rsyn;
  poly_t           rgam;
  logic [CW-1:0]   rcnt;
  logic [CW-1:0]   rera;                             // erasures in this codeword
  logic            ractive;

  syn_t            syn_n;
  poly_t           gam_n;
  logic [CW-1:0]   era_n;
  gf_t             xloc;
  logic [CW-1:0]   idx;
  logic            last_sym;

  assign idx      = in_sop ? '0 : rcnt;
  assign last_sym = in_valid && (in_sop || ractive) && (idx == LAST_C);
  // locator of the symbol at arrival index idx: a^(N-1-idx)
  assign xloc     = gf_alpha_pow(N - 1 - int'(idx));

  always_comb begin
    for (int i = 0; i < int'(T2); i++)
      syn_n[i] = (in_sop ? gf_t'(0) : gf_mul(rsyn[i], gf_alpha_pow(i + 1))) ^ in_data;
    for (int i = 0; i <= int'(T2); i++)
      gam_n[i] = in_sop ? ((i == 0) ? gf_t'(1) : gf_t'(0)) : rgam[i];
    era_n = in_sop ? '0 : rera;
    if (in_era) begin
      if (era_n <= CW'(T2)) begin
        for (int i = int'(T2); i >= 1; i--) gam_n[i] = gam_n[i] ^ gf_mul(xloc, gam_n[i-1]);
      end
      era_n = era_n + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rcnt    <= '0;
      rera    <= '0;
      ractive <= 1'b0;
      for (int i = 0; i < int'(T2); i++) rsyn[i] <= '0;
      for (int i = 0; i <= int'(T2); i++) rgam[i] <= '0;
    end else if (in_valid && (in_sop || ractive)) begin
      rbuf[idx] <= in_data;
      rsyn      <= syn_n;
      rgam      <= gam_n;
      rera      <= era_n;
      rcnt      <= idx + 1'b1;
      ractive   <= !last_sym;
    end
  end

  // ---------------- solve and correct stages ----------------
  typedef enum logic [2:0] {S_IDLE, S_BM, S_OMEGA, S_COUNT, S_OUT} state_t;
  state_t          state;

  gf_t             wbuf [N];
  syn_t            S;
  poly_t           lam, bpol, omg;
  logic [CW-1:0]   r_w;                              // erasures
  logic [CW-1:0]   L;                                // register length
  logic [CW-1:0]   k;                                // BM step (1-based)
  logic [CW-1:0]   j;                                // Chien index (arrival order)
  gf_t             xcur;                             // a^-(N-1-j)
  logic [CW-1:0]   nroots;
  logic            fail_w;

  // BM step
  gf_t             delta;
  gf_t             dinv;
  poly_t           lam_t, bpol_t;
  logic [CW-1:0]   L_t;
  logic            lengthen;

  always_comb begin
    delta = '0;
    for (int i = 0; i <= int'(T2); i++)
      if ((int'(k) - i >= 1) && (int'(k) - i <= int'(T2)))
        delta = delta ^ gf_mul(lam[i], S[int'(k) - i - 1]);
    dinv     = gf_inv(delta);
    lengthen = (delta != '0) && (2 * int'(L) <= int'(k) - 1 + int'(r_w));
    for (int i = 0; i <= int'(T2); i++)
      lam_t[i] = lam[i] ^ ((i == 0) ? gf_t'(0) : gf_mul(delta, bpol[i-1]));
    for (int i = 0; i <= int'(T2); i++) begin
      if (lengthen) bpol_t[i] = gf_mul(dinv, lam[i]);
      else          bpol_t[i] = (i == 0) ? gf_t'(0) : bpol[i-1];
    end
    L_t = lengthen ? (k + r_w - L) : L;
  end

  // error evaluator W(x) = S(x) L(x) mod x^2t, S(x) = S_1 + S_2 x + ...
  poly_t omg_n;
  always_comb begin
    for (int m = 0; m <= int'(T2); m++) begin
      omg_n[m] = '0;
      if (m < int'(T2))
        for (int i = 0; i <= m; i++) omg_n[m] = omg_n[m] ^ gf_mul(lam[i], S[m - i]);
    end
  end

  // Chien / Forney evaluation at x = xcur
  gf_t lam_x, dlam_x, omg_x, evalue, xpow;
  logic is_root;
  always_comb begin
    lam_x  = '0;
    dlam_x = '0;
    omg_x  = '0;
    xpow   = gf_t'(1);
    for (int i = 0; i <= int'(T2); i++) begin
      lam_x = lam_x ^ gf_mul(lam[i], xpow);
      omg_x = omg_x ^ gf_mul(omg[i], xpow);
      // derivative in characteristic 2: only odd terms, L'(x) = sum L_i x^(i-1)
      if ((i % 2) == 0 && i < int'(T2)) dlam_x = dlam_x ^ gf_mul(lam[i+1], xpow);
      xpow = gf_mul(xpow, xcur);
    end
    is_root = (lam_x == '0);
    evalue  = gf_mul(omg_x, gf_inv(dlam_x));
  end

  localparam gf_t XSTART = gf_alpha_pow((NFULL - (N - 1)) % NFULL);  // a^-(N-1)

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= '0;
      out_raw   <= '0;
      err_num_o <= '0;
      era_num_o <= '0;
      fail_o    <= 1'b0;
      k         <= '0;
      j         <= '0;
      L         <= '0;
      r_w       <= '0;
      nroots    <= '0;
      fail_w    <= 1'b0;
      xcur      <= XSTART;
      for (int i = 0; i < int'(T2); i++) S[i] <= '0;
      for (int i = 0; i <= int'(T2); i++) begin
        lam[i] <= '0; bpol[i] <= '0; omg[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      // a completed codeword always starts a new decode
      if (last_sym) begin
        for (int i = 0; i < int'(N) - 1; i++) wbuf[i] <= rbuf[i];
        wbuf[N-1] <= in_data;
        S      <= syn_n;
        lam    <= gam_n;
        bpol   <= gam_n;
        r_w    <= era_n;
        L      <= era_n;
        k      <= era_n + 1'b1;
        fail_w <= (era_n > CW'(T2));
        state  <= S_BM;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_BM: begin
            if (int'(k) > int'(T2)) begin
              state <= S_OMEGA;
            end else begin
              lam  <= lam_t;
              bpol <= bpol_t;
              L    <= L_t;
              k    <= k + 1'b1;
            end
          end
          S_OMEGA: begin
            omg    <= omg_n;
            j      <= '0;
            xcur   <= XSTART;
            nroots <= '0;
            state  <= S_COUNT;
          end
          S_COUNT: begin
            if (is_root) nroots <= nroots + 1'b1;
            xcur <= gf_mul_alpha(xcur);
            if (j == LAST_C) begin
              j     <= '0;
              xcur  <= XSTART;
              state <= S_OUT;
            end else begin
              j <= j + 1'b1;
            end
          end
          S_OUT: begin
            out_valid <= 1'b1;
            out_sop   <= (j == '0);
            out_raw   <= wbuf[j];
            out_data  <= (is_root && !(fail_w || nroots != L)) ? (wbuf[j] ^ evalue) : wbuf[j];
            xcur      <= gf_mul_alpha(xcur);
            if (j == LAST_C) begin
              out_eop   <= 1'b1;
              fail_o    <= fail_w || (nroots != L);
              err_num_o <= (fail_w || (nroots != L)) ? '0 : gf_t'(nroots);
              era_num_o <= gf_t'(r_w);
              state     <= S_IDLE;
            end else begin
              j <= j + 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy_o = (state != S_IDLE);
endmodule
