// oppm_enc_logic: combinational 3-bit PCM to 4-slot offset-PPM encoder.
// The MSB of the PCM word is sent unchanged as the sign slot D; the two LSBs select
// at most one pulse in the remaining three slots E F G (00 -> none, 01 -> G,
// 10 -> F, 11 -> E). This is the reduced gate network of the design: D = A,
// E = B.C, F = B.~C, G = ~B.C (three 2-input AND gates and two inverters).
// Interface: pcm_i = {A,B,C}, oppm_o = {D,E,F,G}. No clock, no latency.
module oppm_enc_logic (
  input  logic [2:0] pcm_i,    // {A, B, C}, A is the MSB
  output logic [3:0] oppm_o    // {D, E, F, G}, D is sent first
);
  logic a, b, c;
  assign {a, b, c} = pcm_i;
  assign oppm_o = {a, b & c, b & ~c, ~b & c};
endmodule
