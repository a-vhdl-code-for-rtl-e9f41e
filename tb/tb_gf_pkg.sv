// tb_gf_pkg: reference GF(2^5) and RS(31,23) arithmetic for the testbenches.
// It works from exponent/logarithm tables of the field x^5 + x^2 + 1 (built once
// at time zero) and so does not share code with the RTL's bitwise multiplier.
// rs_ref_encode builds a systematic codeword by polynomial long division by
// g(x) = prod_{i=1..8} (x + a^i); rs_syndrome evaluates a word at a^i.
package tb_gf_pkg;
  int exp_t [62];
  int log_t [32];
  bit built = 0;

  function automatic void build();
    int v;
    v = 1;
    for (int i = 0; i < 31; i++) begin
      exp_t[i] = v; exp_t[i+31] = v; log_t[v] = i;
      v = v << 1;
      if ((v & 32) != 0) v = v ^ 37;
    end
    built = 1;
  endfunction

  function automatic int mul(int a, int b);
    if (!built) build();
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int apow(int k);
    if (!built) build();
    return exp_t[((k % 31) + 31) % 31];
  endfunction

  // word[0] is the first symbol sent (coefficient of x^(n-1)).
  function automatic int syndrome(int word[], int i);
    int s = 0;
    for (int j = 0; j < word.size(); j++) s = mul(s, apow(i)) ^ word[j];
    return s;
  endfunction

  function automatic void encode(int msg[], int nk, ref int cw[]);
    int g[];
    int rem[];
    int fb;
    g = new[nk + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;                        // g[i] is the coefficient of x^i
    for (int r = 1; r <= nk; r++)
      for (int i = nk; i >= 0; i--)
        g[i] = mul(g[i], apow(r)) ^ ((i > 0) ? g[i-1] : 0);
    rem = new[nk];
    foreach (rem[i]) rem[i] = 0;     // rem[i]: coefficient of x^i
    foreach (msg[j]) begin
      fb = msg[j] ^ rem[nk-1];
      for (int i = nk - 1; i > 0; i--) rem[i] = rem[i-1] ^ mul(fb, g[i]);
      rem[0] = mul(fb, g[0]);
    end
    cw = new[msg.size() + nk];
    foreach (msg[j]) cw[j] = msg[j];
    for (int i = 0; i < nk; i++) cw[msg.size() + i] = rem[nk-1-i];
  endfunction
endpackage
