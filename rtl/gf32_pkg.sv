// gf32_pkg: arithmetic in GF(2^5) for the RS(31,23) encoder and decoder.
// Symbols are 5 bits wide, as in the 5-bit RS coder output of the design.
// The field is generated by the primitive polynomial x^5 + x^2 + 1 and alpha = 2;
// this polynomial, and the code roots alpha^1..alpha^8 used by the codec, are
// this design's own choice (the standard narrow-sense RS(31,23) construction).
// All functions are purely combinational and synthesizable.
package gf32_pkg;

  localparam int unsigned M     = 5;            // bits per symbol
  localparam int unsigned NFULL = 31;           // 2^M - 1
  localparam logic [M:0]  PRIM  = 6'b100101;    // x^5 + x^2 + 1

  typedef logic [M-1:0] gf_t;

  // Multiply by alpha (one LFSR step).
  function automatic gf_t gf_mul_alpha(gf_t a);
    gf_t r;
    r = {a[M-2:0], 1'b0};
    if (a[M-1]) r = r ^ PRIM[M-1:0];
    return r;
  endfunction

  // General multiply: shift-and-add over the bits of b.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t acc;
    gf_t sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = gf_mul_alpha(sh);
    end
    return acc;
  endfunction

  // alpha^k for 0 <= k < 31 (k is reduced modulo 31 first).
  function automatic gf_t gf_alpha_pow(int unsigned k);
    gf_t r;
    int unsigned e;
    e = k % NFULL;
    r = gf_t'(1);
    for (int i = 0; i < NFULL; i++)
      if (i < int'(e)) r = gf_mul_alpha(r);
    return r;
  endfunction

  // Multiplicative inverse a^-1 = a^30 (returns 0 for a = 0).
  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    gf_t sq;
    // 30 = 0b11110: a^2 * a^4 * a^8 * a^16
    sq = gf_mul(a, a);
    r  = sq;
    for (int i = 0; i < 3; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

endpackage
