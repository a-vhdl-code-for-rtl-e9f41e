// oppm_clkgen: timing generator for the offset-PPM link.
// Three PCM bits (one OPPM data word) and four OPPM slots (one OPPM codeword)
// must take the same time. The master clock runs at 12x a common base rate; a
// 4-stage one-hot ring gives the 3-bit clock enable (3 pulses per 12 cycles) and a
// 3-stage one-hot ring gives the 4-bit clock enable (4 pulses per 12 cycles), as in
// the clock generator of the design. Here they are clock enables for the single
// master clock rather than separate derived clocks (this design's choice, keeping
// every register on one positive-edge clock). frame_o marks the cycle where both
// rings are at their origin: the start of a 12-cycle frame, at which one 3-bit word
// and one 4-slot codeword start together.
// Timing: after reset en3_o, en4_o and frame_o are high in the first cycle, then
// en3_o every 4th cycle, en4_o every 3rd cycle, frame_o every 12th cycle.
module oppm_clkgen (
  input  logic clk,
  input  logic rst,      // synchronous, active high
  output logic en3_o,    // PCM bit strobe: 3 per frame
  output logic en4_o,    // OPPM slot strobe: 4 per frame
  output logic frame_o   // frame start (en3_o & en4_o)
);
  logic [3:0] ring4;     // 4-stage shift register -> 3-bit clock
  logic [2:0] ring3;     // 3-stage shift register -> 4-bit clock

  always_ff @(posedge clk) begin
    if (rst) begin
      ring4 <= 4'b0001;
      ring3 <= 3'b001;
    end else begin
      ring4 <= {ring4[2:0], ring4[3]};
      ring3 <= {ring3[1:0], ring3[2]};
    end
  end

  assign en3_o   = ring4[0];
  assign en4_o   = ring3[0];
  assign frame_o = ring4[0] & ring3[0];
endmodule
