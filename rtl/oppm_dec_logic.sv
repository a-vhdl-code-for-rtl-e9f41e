// oppm_dec_logic: combinational 4-slot offset-PPM to 3-bit PCM decoder.
// It inverts the encoder table: A = D, and the position of the single pulse among
// E F G gives B and C (E -> 11, F -> 10, G -> 01, none -> 00). A codeword with two
// or more pulses among E F G cannot have been sent; such a word sets viol_o, which
// is the built-in error check of OPPM, and decodes to {D,0,0}. Each output is a
// sum of 3-input AND terms, in the spirit of the design's decoder gate network;
// the handling of invalid words is this design's choice.
// Interface: oppm_i = {D,E,F,G}, pcm_o = {A,B,C}. No clock, no latency.
module oppm_dec_logic (
  input  logic [3:0] oppm_i,   // {D, E, F, G}
  output logic [2:0] pcm_o,    // {A, B, C}
  output logic       viol_o    // more than one pulse among E, F, G
);
  logic d, e, f, g;
  assign {d, e, f, g} = oppm_i;
  assign pcm_o[2] = d;
  assign pcm_o[1] = (e & ~f & ~g) | (~e & f & ~g);
  assign pcm_o[0] = (e & ~f & ~g) | (~e & ~f & g);
  assign viol_o   = (e & f) | (e & g) | (f & g);
endmodule
