// oppm_ber_link: offset-PPM bit-error test link.
// A 15-bit PRBS supplies the PCM bit stream, one bit per 3-bit strobe. The OPPM
// coder turns each 3 bits into a 4-slot codeword; the channel loops the slots back
// (or through an external path) and can flip slots from its 7-bit PRBS error source
// or an external error input; the OPPM decoder recovers the PCM bits; the receive
// checker locks a local PRBS to the received stream and flags every wrong bit. Two
// synchronous counters count the wrong bits and the checked bits. All parts share one
// 12x master clock and one timing generator, as in the design's coder/decoder test
// arrangement; the three link options (direct link, PRBS/EXOR errors, external
// optical path) are selected by ports instead of by changing links.
// Interface: see the ports. err_count_o / bit_count_o give the bit error ratio.
// Timing: the received stream lags the transmitted one by about two OPPM frames
// (24 clocks); the checker locks once it has seen the 15 leading ones.
module oppm_ber_link #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sync_i,        // coder waits for the PRBS start pattern
  input  logic             ext_sel_i,     // use return_i instead of the direct link
  input  logic             return_i,
  input  logic             err_i,         // external error input
  input  logic [6:0]       err_mask_i,    // 7-bit PRBS error rate select
  input  logic             cnt_clr_i,
  output logic             coder_out_o,   // OPPM slot stream to the outside
  output logic             prbs_bit_o,    // transmitted PRBS bit
  output logic             dataout_o,     // decoded bit
  output logic             errcode_o,     // one pulse per wrong bit
  output logic             locked_o,
  output logic             synced_o,      // coder has seen the start pattern
  output logic             output_prbs_o, // checker's local sequence bit
  output logic             slot_err_o,    // channel flips the current slot
  output logic             viol_o,        // decoded word was an impossible codeword
  output logic [CNT_W-1:0] err_count_o,
  output logic [CNT_W-1:0] bit_count_o
);
  logic en3, en4, frame;
  logic tx_bit;
  logic slot_tx, fval_tx, fsop_tx, synced;
  logic slot_rx;
  logic dec_bit, dec_valid, dec_viol;
  logic dec_sop;             // no codeword framing on this link
  logic chk_err, chk_bit, chk_prbs;
  logic ch_err;
  logic [14:0] prbs_state;   // only the serial output of the PRBS is used here
  logic [4:0]  prbs_sym;

  oppm_clkgen u_clk (.clk, .rst, .en3_o(en3), .en4_o(en4), .frame_o(frame));

  prbs15 u_prbs (
    .clk, .rst, .bit_step_i(en3), .sym_step_i(1'b0),
    .bit_o(tx_bit), .sym_o(prbs_sym), .state_o(prbs_state)
  );

  oppm_coder u_coder (
    .clk, .rst, .en3_i(en3), .en4_i(en4), .frame_i(frame), .sync_i,
    .bit_i(tx_bit), .valid_i(1'b1), .sop_i(1'b0),
    .slot_o(slot_tx), .frame_valid_o(fval_tx), .frame_sop_o(fsop_tx), .synced_o(synced)
  );

  oppm_channel u_chan (
    .clk, .rst, .en4_i(en4), .slot_i(slot_tx), .ext_sel_i, .return_i,
    .err_i, .err_mask_i, .coder_out_o, .slot_o(slot_rx), .err_o(ch_err)
  );

  oppm_decoder u_dec (
    .clk, .rst, .en3_i(en3), .en4_i(en4), .frame_i(frame), .slot_i(slot_rx),
    .frame_valid_i(fval_tx), .frame_sop_i(fsop_tx),
    .bit_o(dec_bit), .valid_o(dec_valid), .sop_o(dec_sop), .viol_o(dec_viol)
  );

  rx_prbs_checker u_chk (
    .clk, .rst, .en3_i(en3), .bit_i(dec_bit), .valid_i(dec_valid),
    .dataout_o, .prbs_o(chk_prbs), .err_o(chk_err), .bit_o(chk_bit), .locked_o
  );

  sync_counter #(.WIDTH(CNT_W)) u_errcnt (
    .clk, .rst, .clr_i(cnt_clr_i), .inc_i(chk_err), .count_o(err_count_o));
  sync_counter #(.WIDTH(CNT_W)) u_bitcnt (
    .clk, .rst, .clr_i(cnt_clr_i), .inc_i(chk_bit), .count_o(bit_count_o));

  assign prbs_bit_o = tx_bit;
  assign errcode_o     = chk_err;
  assign synced_o      = synced;
  assign output_prbs_o = chk_prbs;
  assign slot_err_o    = ch_err;
  assign viol_o        = dec_viol & dec_valid;
endmodule
