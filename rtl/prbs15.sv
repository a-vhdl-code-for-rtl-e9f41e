// prbs15: 15-bit pseudo-random binary sequence generator (PRBS source of the link).
// The 15-bit register shifts left each step (bit 14 oldest, bit 0 newest); the new
// bit entering at bit 0 is the XOR of bits 14 and 13, s[n] = s[n-15] ^ s[n-14]
// (polynomial x^15 + x^14 + 1, a maximal-length sequence of period 32767). The
// serial output is bit 14, the bit about to leave, so the all-ones start state is
// sent first as 15 ones and then the sequence follows. The register starts at all
// ones and shifts left as in the design's PRBS drawing; the tap pair is this
// design's choice.
// Two outputs are provided: a serial bit (bit_o, advanced by bit_step_i) and a
// SYM_W-bit symbol for the RS encoder (sym_o = the SYM_W oldest bits, advanced by
// sym_step_i, which shifts SYM_W bits at once; the earliest bit is the MSB), so the
// symbol stream carries the same bit sequence as the serial output.
// Timing: outputs are registered; the step inputs take effect at the next edge.
module prbs15 #(
  parameter int unsigned WIDTH = 15,
  parameter int unsigned SYM_W = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bit_step_i,   // advance one bit
  input  logic             sym_step_i,   // advance SYM_W bits
  output logic             bit_o,        // current serial bit
  output logic [SYM_W-1:0] sym_o,        // current symbol, earliest bit in MSB
  output logic [WIDTH-1:0] state_o
);
  logic [WIDTH-1:0] sr;
  logic [WIDTH-1:0] nxt_bit;
  logic [WIDTH-1:0] nxt_sym;

  function automatic logic [WIDTH-1:0] step(logic [WIDTH-1:0] s);
    return {s[WIDTH-2:0], s[WIDTH-1] ^ s[WIDTH-2]};
  endfunction

  always_comb begin
    nxt_bit = step(sr);
    nxt_sym = sr;
    for (int i = 0; i < int'(SYM_W); i++) nxt_sym = step(nxt_sym);
  end

  always_ff @(posedge clk) begin
    if (rst)             sr <= '1;
    else if (sym_step_i) sr <= nxt_sym;
    else if (bit_step_i) sr <= nxt_bit;
  end

  assign bit_o   = sr[WIDTH-1];
  assign sym_o   = sr[WIDTH-1 -: SYM_W];
  assign state_o = sr;
endmodule
