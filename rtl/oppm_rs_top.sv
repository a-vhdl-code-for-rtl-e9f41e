// oppm_rs_top: top level of the offset-PPM / Reed-Solomon design.
// It holds two links that share one 12x master clock and reset but are otherwise
// independent, each with its own timing generator:
//  * u_rs  (rs_oppm_link): PRBS symbols -> RS(31,23) encoder -> bridge coder ->
//    OPPM coder -> channel -> OPPM decoder -> bridge decoder -> RS(31,23) decoder,
//    the error-protected system;
//  * u_ber (oppm_ber_link): PRBS bits -> OPPM coder -> channel -> OPPM decoder ->
//    PRBS checker with error and bit counters, the bare OPPM bit-error test link.
// Ports prefixed rs_ belong to the first link, ber_ to the second; every control
// input of a link (source enable, channel routing, error injection, erasure flag)
// and its observation points are brought out.
// Timing: see the two links; both run from reset without further configuration.
module oppm_rs_top #(
  parameter int unsigned N     = 31,
  parameter int unsigned K     = 23,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  // RS-protected link
  input  logic             rs_run_i,
  input  logic             rs_start_i,
  input  logic             rs_ext_sel_i,
  input  logic             rs_return_i,
  input  logic             rs_err_i,
  input  logic [6:0]       rs_err_mask_i,
  input  logic             rs_era_i,
  output logic [4:0]       rs_enc_data_o,
  output logic             rs_enc_valid_o,
  output logic             rs_enc_sop_o,
  output logic             rs_bridge_bit_o,
  output logic             rs_bridge_sop_o,
  output logic             rs_coder_out_o,
  output logic             rs_chan_slot_o,
  output logic             rs_chan_err_o,
  output logic             rs_oppm_bit_o,
  output logic             rs_oppm_viol_o,
  output logic [4:0]       rs_bdec_data_o,
  output logic             rs_bdec_valid_o,
  output logic             rs_bdec_sop_o,
  output logic             rs_bdec_era_o,
  output logic             rs_dec_valid_o,
  output logic             rs_dec_sop_o,
  output logic             rs_dec_eop_o,
  output logic [4:0]       rs_dec_data_o,
  output logic [4:0]       rs_dec_raw_o,
  output logic [4:0]       rs_dec_err_num_o,
  output logic [4:0]       rs_dec_era_num_o,
  output logic             rs_dec_fail_o,
  // OPPM bit-error test link
  input  logic             ber_sync_i,
  input  logic             ber_ext_sel_i,
  input  logic             ber_return_i,
  input  logic             ber_err_i,
  input  logic [6:0]       ber_err_mask_i,
  input  logic             ber_cnt_clr_i,
  output logic             ber_coder_out_o,
  output logic             ber_prbs_bit_o,
  output logic             ber_dataout_o,
  output logic             ber_errcode_o,
  output logic             ber_locked_o,
  output logic             ber_synced_o,
  output logic             ber_output_prbs_o,
  output logic             ber_slot_err_o,
  output logic             ber_viol_o,
  output logic [CNT_W-1:0] ber_err_count_o,
  output logic [CNT_W-1:0] ber_bit_count_o
);
  rs_oppm_link #(.N(N), .K(K)) u_rs (
    .clk, .rst,
    .run_i(rs_run_i), .start_i(rs_start_i), .ext_sel_i(rs_ext_sel_i), .return_i(rs_return_i),
    .err_i(rs_err_i), .err_mask_i(rs_err_mask_i), .era_i(rs_era_i),
    .enc_data_o(rs_enc_data_o), .enc_valid_o(rs_enc_valid_o), .enc_sop_o(rs_enc_sop_o),
    .bridge_bit_o(rs_bridge_bit_o), .bridge_sop_o(rs_bridge_sop_o),
    .coder_out_o(rs_coder_out_o), .chan_slot_o(rs_chan_slot_o), .chan_err_o(rs_chan_err_o),
    .oppm_bit_o(rs_oppm_bit_o), .oppm_viol_o(rs_oppm_viol_o),
    .bdec_data_o(rs_bdec_data_o), .bdec_valid_o(rs_bdec_valid_o),
    .bdec_sop_o(rs_bdec_sop_o), .bdec_era_o(rs_bdec_era_o),
    .dec_valid_o(rs_dec_valid_o), .dec_sop_o(rs_dec_sop_o), .dec_eop_o(rs_dec_eop_o),
    .dec_data_o(rs_dec_data_o), .dec_raw_o(rs_dec_raw_o),
    .dec_err_num_o(rs_dec_err_num_o), .dec_era_num_o(rs_dec_era_num_o),
    .dec_fail_o(rs_dec_fail_o)
  );

  oppm_ber_link #(.CNT_W(CNT_W)) u_ber (
    .clk, .rst,
    .sync_i(ber_sync_i), .ext_sel_i(ber_ext_sel_i), .return_i(ber_return_i),
    .err_i(ber_err_i), .err_mask_i(ber_err_mask_i), .cnt_clr_i(ber_cnt_clr_i),
    .coder_out_o(ber_coder_out_o), .prbs_bit_o(ber_prbs_bit_o),
    .dataout_o(ber_dataout_o), .errcode_o(ber_errcode_o), .locked_o(ber_locked_o),
    .synced_o(ber_synced_o), .output_prbs_o(ber_output_prbs_o),
    .slot_err_o(ber_slot_err_o), .viol_o(ber_viol_o),
    .err_count_o(ber_err_count_o), .bit_count_o(ber_bit_count_o)
  );
endmodule
