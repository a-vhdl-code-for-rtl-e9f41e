// rx_prbs_checker: receive-side PRBS checker of the OPPM bit-error test link.
// Received bits are shifted into a 15-bit register (compregister). While not locked,
// the checker waits until compregister holds all ones, the start pattern of the
// transmitter's PRBS, and then loads its own 15-bit PRBS register (PR) with all ones.
// From then on PR runs the same recurrence as the transmitter (new bit = PR[14] ^
// PR[13]) and predicts every received bit; a received bit that differs is flagged
// on err_o, which drives the error counter. This follows the design's RXregMOD.
// Interface: bit stream in (bit_i with valid_i, sampled on en3_i); out: dataout_o
// (the received bit), err_o and bit_o (one-cycle pulses per checked bit), locked_o,
// and the local sequence bit prbs_o.
// Timing: err_o / bit_o are registered, one clock after the strobe.
module rx_prbs_checker (
  input  logic clk,
  input  logic rst,
  input  logic en3_i,
  input  logic bit_i,
  input  logic valid_i,
  output logic dataout_o,
  output logic prbs_o,
  output logic err_o,
  output logic bit_o,
  output logic locked_o
);
  logic [14:0] comp;
  logic [14:0] comp_n;
  logic [14:0] pr;
  logic        expected;

  assign comp_n   = {comp[13:0], bit_i};
  assign expected = pr[14] ^ pr[13];

  always_ff @(posedge clk) begin
    if (rst) begin
      comp      <= '0;
      pr        <= '0;
      locked_o  <= 1'b0;
      err_o     <= 1'b0;
      bit_o     <= 1'b0;
      dataout_o <= 1'b0;
      prbs_o    <= 1'b0;
    end else begin
      err_o <= 1'b0;
      bit_o <= 1'b0;
      if (en3_i && valid_i) begin
        comp      <= comp_n;
        dataout_o <= bit_i;
        if (!locked_o) begin
          if (&comp_n) begin
            pr       <= '1;
            locked_o <= 1'b1;
          end
        end else begin
          pr     <= {pr[13:0], expected};
          prbs_o <= expected;
          bit_o  <= 1'b1;
          err_o  <= (bit_i != expected);
        end
      end
    end
  end
endmodule
