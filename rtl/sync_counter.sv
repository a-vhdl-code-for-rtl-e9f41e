// sync_counter: synchronous event counter, used as the error counter and the clock
// (bit) counter of the OPPM bit-error test link. It adds one in every clock where
// inc_i is high, clears on clr_i, and saturates at its maximum instead of wrapping.
// The width (16 bits) and the saturation are this design's choice.
// Timing: count_o is registered and shows an event one clock after it.
module sync_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr_i,
  input  logic             inc_i,
  output logic [WIDTH-1:0] count_o
);
  always_ff @(posedge clk) begin
    if (rst || clr_i)                 count_o <= '0;
    else if (inc_i && !(&count_o))    count_o <= count_o + 1'b1;
  end
endmodule
