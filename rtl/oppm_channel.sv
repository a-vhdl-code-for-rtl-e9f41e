// oppm_channel: the optical channel between OPPM coder and decoder, with noise.
// The coder's slot stream is brought out (coder_out_o) and either looped straight
// back (ext_sel_i = 0) or taken from an external return path (return_i, for real
// optical hardware). A bit error is injected by XOR when the external error input
// is high or when the selected bits of a free-running 7-bit PRBS are all ones:
// err_mask_i selects the bits, and the fewer bits are selected, the more often
// errors occur (about 2^-popcount(mask) of the slots). A zero mask disables the
// PRBS errors. This follows the design's 7-bit PRBS / EXOR error source; the PRBS
// polynomial x^7 + x^6 + 1 and the all-ones seed are this design's choice.
// Timing: the error decision is registered and changes on the slot strobe (en4_i),
// so each slot is either wholly correct or wholly flipped; the data path itself is
// combinational, so the channel adds no delay and the side signals pass unchanged.
module oppm_channel (
  input  logic       clk,
  input  logic       rst,
  input  logic       en4_i,
  input  logic       slot_i,
  input  logic       ext_sel_i,   // 0: direct loop, 1: use return_i
  input  logic       return_i,    // external return of coder_out_o
  input  logic       err_i,       // external error input
  input  logic [6:0] err_mask_i,  // PRBS bits that must all be 1 for an error
  output logic       coder_out_o,
  output logic       slot_o,
  output logic       err_o        // error applied to the current slot
);
  logic [6:0] prbs7;
  logic       err_q;
  logic       prbs_hit;

  assign prbs_hit = (err_mask_i != '0) && ((prbs7 & err_mask_i) == err_mask_i);

  always_ff @(posedge clk) begin
    if (rst) begin
      prbs7 <= '1;
      err_q <= 1'b0;
    end else if (en4_i) begin
      prbs7 <= {prbs7[5:0], prbs7[6] ^ prbs7[5]};
      err_q <= err_i | prbs_hit;
    end
  end

  assign coder_out_o = slot_i;
  assign slot_o      = (ext_sel_i ? return_i : slot_i) ^ err_q;
  assign err_o       = err_q;
endmodule
