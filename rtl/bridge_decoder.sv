// bridge_decoder: serial-to-parallel bridge between the OPPM decoder and the RS decoder.
// Bits arriving on the 3-bit strobe (en3_i, when valid_i) are gathered MSB first into
// 5-bit symbols. A bit flagged sop_i starts a new codeword; after N symbols the
// padding bits that the bridge coder added (up to a multiple of 3) are dropped.
// Each symbol also carries an erasure flag: the OR of the OPPM decoder's violation
// flags over its bits, so a symbol touched by an impossible OPPM codeword is handed to
// the RS decoder as an erasure (its position is known to be unreliable). Using the
// OPPM check this way is this design's choice.
// Interface: bit stream in; symbol stream out (out_valid for one cycle per symbol,
// out_sop on symbol 0, out_data, out_era). No backpressure.
// Timing: a symbol leaves the cycle after the en3_i strobe that took its last bit.
module bridge_decoder #(
  parameter int unsigned N     = 31,
  parameter int unsigned SYM_W = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en3_i,
  input  logic             bit_i,
  input  logic             valid_i,
  input  logic             sop_i,
  input  logic             viol_i,
  output logic             out_valid,
  output logic             out_sop,
  output logic [SYM_W-1:0] out_data,
  output logic             out_era
);
  localparam int unsigned NB  = N * SYM_W;
  localparam int unsigned BW  = $clog2(NB + 1);
  localparam logic [BW-1:0] NB_C = BW'(NB);
  localparam int unsigned SW  = $clog2(SYM_W);
  localparam logic [SW-1:0] SLAST = SW'(SYM_W - 1);

  logic [BW-1:0]    bidx;     // data bits taken in this codeword
  logic [SW-1:0]    sbit;
  logic [SYM_W-2:0] acc;
  logic             era_acc;
  logic             first;    // current symbol is symbol 0
  logic             take;
  logic [BW-1:0]    bidx_c;
  logic [SW-1:0]    sbit_c;
  logic             era_c;

  // a sop bit restarts the codeword
  assign take   = en3_i && valid_i && (sop_i || bidx < NB_C);
  assign bidx_c = sop_i ? '0 : bidx;
  assign sbit_c = sop_i ? '0 : sbit;
  assign era_c  = (sbit_c == '0) ? viol_i : (era_acc | viol_i);

  always_ff @(posedge clk) begin
    if (rst) begin
      bidx      <= NB_C;     // wait for a codeword start
      sbit      <= '0;
      acc       <= '0;
      era_acc   <= 1'b0;
      first     <= 1'b0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '0;
      out_era   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      if (take) begin
        bidx    <= bidx_c + 1'b1;
        era_acc <= era_c;
        if (sop_i) first <= 1'b1;
        if (sbit_c == SLAST) begin
          sbit      <= '0;
          out_valid <= 1'b1;
          out_sop   <= sop_i || first;
          out_data  <= {acc, bit_i};
          out_era   <= era_c;
          first     <= 1'b0;
        end else begin
          sbit <= sbit_c + 1'b1;
          acc  <= {acc[SYM_W-3:0], bit_i};
        end
      end
    end
  end
endmodule
