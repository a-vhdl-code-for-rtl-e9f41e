// bridge_coder: parallel-to-serial bridge between the RS encoder and the OPPM coder.
// Each 5-bit RS symbol is sent MSB first, one bit per 3-bit strobe (en3_i). A codeword
// of N symbols is N*5 bits; since the OPPM coder takes 3-bit words, the codeword is
// padded with zero bits up to the next multiple of 3 (155 -> 156 bits, 52 OPPM
// words for RS(31,23)), so every codeword starts on a word boundary. The first bit of
// a codeword is flagged with sop_o. The padding is this design's choice; the design
// only states that the bridge converts the parallel RS output to serial form.
// Interface: symbol stream in (in_valid/in_ready, in_data); in_ready is high only in
// an en3_i cycle in which a symbol is taken. Bit stream out (bit_o, valid_o, sop_o),
// updated on en3_i. If no symbol is offered when one is due, valid_o drops for that
// bit time and the bridge waits.
// Timing: one bit per en3_i; symbol taken in the same cycle its MSB is registered.
module bridge_coder #(
  parameter int unsigned N     = 31,   // symbols per codeword
  parameter int unsigned SYM_W = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en3_i,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [SYM_W-1:0] in_data,
  output logic             bit_o,
  output logic             valid_o,
  output logic             sop_o
);
  localparam int unsigned NB    = N * SYM_W;                 // data bits
  localparam int unsigned TOTAL = ((NB + 2) / 3) * 3;        // padded to 3
  localparam int unsigned BW    = $clog2(TOTAL + 1);
  localparam logic [BW-1:0] NB_C    = BW'(NB);
  localparam logic [BW-1:0] TOTAL_C = BW'(TOTAL);
  localparam int unsigned SW    = $clog2(SYM_W);
  localparam logic [SW-1:0] SLAST = SW'(SYM_W - 1);

  logic             active;
  logic [BW-1:0]    bidx;      // next bit index within the codeword
  logic [SW-1:0]    sbit;      // next bit index within the symbol
  logic [SYM_W-1:0] sh;
  logic             new_cw;
  logic             need_sym;

  assign new_cw   = !active || (bidx == TOTAL_C);
  assign need_sym = new_cw || ((bidx < NB_C) && (sbit == '0));
  assign in_ready = en3_i && need_sym;

  always_ff @(posedge clk) begin
    if (rst) begin
      active  <= 1'b0;
      bidx    <= '0;
      sbit    <= '0;
      sh      <= '0;
      bit_o   <= 1'b0;
      valid_o <= 1'b0;
      sop_o   <= 1'b0;
    end else if (en3_i) begin
      sop_o <= 1'b0;
      if (need_sym) begin
        if (in_valid) begin
          bit_o   <= in_data[SYM_W-1];
          sh      <= {in_data[SYM_W-2:0], 1'b0};
          valid_o <= 1'b1;
          sbit    <= (SYM_W > 1) ? SW'(1) : '0;
          if (new_cw) begin
            active <= 1'b1;
            bidx   <= BW'(1);
            sop_o  <= 1'b1;
          end else begin
            bidx <= bidx + 1'b1;
          end
        end else begin
          valid_o <= 1'b0;
          if (new_cw) active <= 1'b0;
        end
      end else if (bidx < NB_C) begin
        bit_o   <= sh[SYM_W-1];
        sh      <= {sh[SYM_W-2:0], 1'b0};
        valid_o <= 1'b1;
        sbit    <= (sbit == SLAST) ? '0 : sbit + 1'b1;
        bidx    <= bidx + 1'b1;
      end else begin
        bit_o   <= 1'b0;           // padding bit
        valid_o <= 1'b1;
        bidx    <= bidx + 1'b1;
      end
    end
  end
endmodule
