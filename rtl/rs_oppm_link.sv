// rs_oppm_link: the Reed-Solomon protected offset-PPM link.
// Transmit side: a 15-bit PRBS supplies 5-bit PCM symbols; the RS(31,23) encoder
// takes 23 of them and appends 8 parity symbols; the bridge coder serialises the
// 31-symbol codeword (155 bits, padded to 156) into PCM bits; the OPPM coder sends
// each 3 bits as a 4-slot offset-PPM codeword. The channel may flip slots (7-bit PRBS
// error source or external error input) or route them through an external path.
// Receive side: the OPPM decoder returns the PCM bits, the bridge decoder rebuilds
// 5-bit symbols, and the RS(31,23) decoder corrects the codeword. A received symbol
// is decoded as an erasure when the external erasure input is high as it arrives,
// or when any of its bits came from an impossible OPPM codeword.
// The source runs in one of two modes, as in the design's simulations: while
// run_i is high codewords follow each other without a gap (multi-codeword mode);
// with run_i low each start_i pulse sends exactly one codeword (single-codeword
// mode). When run_i falls inside a message, the source still finishes that
// message, so codewords are never left half sent. A start_i pulse is ignored
// while run_i is high or a codeword is still being fed to the encoder.
// Codeword framing travels beside the slot stream (frame valid and codeword-start
// signals), like the enable and start pulse that accompany the channel data.
// Timing: one PCM bit per 4 clocks, one codeword per 156 bits = 624 clocks; the
// decoded codeword appears roughly 190 clocks after its last transmitted slot.
module rs_oppm_link #(
  parameter int unsigned N = 31,
  parameter int unsigned K = 23
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       run_i,        // multi-codeword mode: source runs while high
  input  logic       start_i,      // single-codeword mode: one codeword per pulse
  input  logic       ext_sel_i,
  input  logic       return_i,
  input  logic       err_i,
  input  logic [6:0] err_mask_i,
  input  logic       era_i,        // external erasure flag for arriving symbols
  // transmit observation
  output logic [4:0] enc_data_o,   // RS encoder output symbol
  output logic       enc_valid_o,  // symbol taken by the bridge this cycle
  output logic       enc_sop_o,
  output logic       bridge_bit_o,
  output logic       bridge_sop_o,
  output logic       coder_out_o,  // OPPM slots towards the channel
  output logic       chan_slot_o,  // slots after the channel
  output logic       chan_err_o,
  // receive
  output logic       oppm_bit_o,
  output logic       oppm_viol_o,
  output logic [4:0] bdec_data_o,
  output logic       bdec_valid_o,
  output logic       bdec_sop_o,
  output logic       bdec_era_o,
  output logic       dec_valid_o,
  output logic       dec_sop_o,
  output logic       dec_eop_o,
  output logic [4:0] dec_data_o,
  output logic [4:0] dec_raw_o,
  output logic [4:0] dec_err_num_o,
  output logic [4:0] dec_era_num_o,
  output logic       dec_fail_o
);
  logic en3, en4, frame;
  logic [4:0] src_sym;
  logic [14:0] src_state;      // source state, not needed outside
  logic src_bit;               // serial PRBS output, unused on this link
  logic enc_in_ready, enc_in_last;
  logic enc_out_valid, enc_out_ready, enc_sop, enc_eop;
  logic [4:0] enc_data;
  logic br_bit, br_valid, br_sop;
  logic slot_tx, fval, fsop, synced;
  logic slot_rx;
  logic ob_bit, ob_valid, ob_sop, ob_viol;
  logic bd_valid, bd_sop, bd_era;
  logic [4:0] bd_data;
  logic dec_busy;
  logic src_en;                // source may hand a message symbol to the encoder
  logic single;                // a single-codeword request is being served
  logic mid_msg;               // a message is partly handed to the encoder

  oppm_clkgen u_clk (.clk, .rst, .en3_o(en3), .en4_o(en4), .frame_o(frame));

  // Source gating: continuous while run_i is high; after a start_i pulse the
  // source runs until the encoder has its message complete (one codeword).
  // mid_msg is high between the first and last message symbol of a codeword.
  assign src_en = run_i | single | mid_msg;

  always_ff @(posedge clk) begin
    if (rst) begin
      single  <= 1'b0;
      mid_msg <= 1'b0;
    end else begin
      if (!single && !mid_msg && start_i && !run_i)         single <= 1'b1;
      else if (single && enc_in_ready && enc_in_last && !run_i) single <= 1'b0;
      if (src_en && enc_in_ready) mid_msg <= !enc_in_last;
    end
  end

  prbs15 u_src (
    .clk, .rst, .bit_step_i(1'b0), .sym_step_i(src_en & enc_in_ready),
    .bit_o(src_bit), .sym_o(src_sym), .state_o(src_state)
  );

  rs_encoder #(.N(N), .K(K)) u_enc (
    .clk, .rst, .in_valid(src_en), .in_ready(enc_in_ready), .in_data(src_sym), .in_last(enc_in_last),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_data(enc_data),
    .out_sop(enc_sop), .out_eop(enc_eop)
  );

  bridge_coder #(.N(N)) u_bcod (
    .clk, .rst, .en3_i(en3), .in_valid(enc_out_valid), .in_ready(enc_out_ready),
    .in_data(enc_data), .bit_o(br_bit), .valid_o(br_valid), .sop_o(br_sop)
  );

  oppm_coder u_ocod (
    .clk, .rst, .en3_i(en3), .en4_i(en4), .frame_i(frame), .sync_i(1'b0),
    .bit_i(br_bit), .valid_i(br_valid), .sop_i(br_sop),
    .slot_o(slot_tx), .frame_valid_o(fval), .frame_sop_o(fsop), .synced_o(synced)
  );

  oppm_channel u_chan (
    .clk, .rst, .en4_i(en4), .slot_i(slot_tx), .ext_sel_i, .return_i, .err_i,
    .err_mask_i, .coder_out_o, .slot_o(slot_rx), .err_o(chan_err_o)
  );

  oppm_decoder u_odec (
    .clk, .rst, .en3_i(en3), .en4_i(en4), .frame_i(frame), .slot_i(slot_rx),
    .frame_valid_i(fval), .frame_sop_i(fsop),
    .bit_o(ob_bit), .valid_o(ob_valid), .sop_o(ob_sop), .viol_o(ob_viol)
  );

  bridge_decoder #(.N(N)) u_bdec (
    .clk, .rst, .en3_i(en3), .bit_i(ob_bit), .valid_i(ob_valid), .sop_i(ob_sop),
    .viol_i(ob_viol), .out_valid(bd_valid), .out_sop(bd_sop), .out_data(bd_data),
    .out_era(bd_era)
  );

  rs_decoder #(.N(N), .K(K)) u_rsdec (
    .clk, .rst, .in_valid(bd_valid), .in_sop(bd_sop), .in_data(bd_data),
    .in_era(bd_era | era_i),
    .out_valid(dec_valid_o), .out_sop(dec_sop_o), .out_eop(dec_eop_o),
    .out_data(dec_data_o), .out_raw(dec_raw_o), .err_num_o(dec_err_num_o),
    .era_num_o(dec_era_num_o), .fail_o(dec_fail_o), .busy_o(dec_busy)
  );

  assign enc_data_o   = enc_data;
  assign enc_valid_o  = enc_out_valid & enc_out_ready;
  assign enc_sop_o    = enc_sop;
  assign bridge_bit_o = br_bit;
  assign bridge_sop_o = br_sop;
  assign chan_slot_o  = slot_rx;
  assign oppm_bit_o   = ob_bit;
  assign oppm_viol_o  = ob_viol;
  assign bdec_data_o  = bd_data;
  assign bdec_valid_o = bd_valid;
  assign bdec_sop_o   = bd_sop;
  assign bdec_era_o   = bd_era | era_i;
endmodule
