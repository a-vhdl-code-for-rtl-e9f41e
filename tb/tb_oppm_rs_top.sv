// tb_oppm_rs_top: end-to-end test of the whole design at its default parameters
// (RS(31,23), 16-bit counters). Both links run at the same time.
// OPPM bit-error test link (ber_ ports): it runs clean for the first 5000 clocks
// (it must lock and count no errors) and then with PRBS slot errors (errors must be
// counted, at most 2 per hit slot, and the error counter must stay below the bit
// counter).
// RS-protected link (rs_ ports):
// The testbench rebuilds the source independently (PRBS with 15 leading ones and
// s[n] = s[n-15] ^ s[n-14], cut into 5-bit symbols, 23 per codeword) and encodes
// each message with its own RS encoder. Codewords run through five channel modes,
// chosen per transmitted codeword:
//   clean, light noise (PRBS errors on ~1/127 of the slots), external return path,
//   external erasure flags on three symbols per codeword, heavy noise (~1/4 of the
//   slots, beyond the code's reach), then clean again. The first 30 codewords are
//   sent in multi-codeword mode (run high); then run drops and three start pulses
//   must each deliver exactly one more codeword (single-codeword mode).
// Checks: every codeword the decoder does not flag as failed must equal the sent
// codeword; clean codewords away from a mode change must report no errors; heavy
// noise must produce decoding failures; each mechanism (symbol correction, erasure
// decoding from OPPM violations, external erasures, decode failure, external
// return path) must occur at least once. Received codewords must follow each other
// every 156 bits x 4 clocks = 624 clocks, the link's fixed rate; decoded ones within
// +-10 clocks of that (the decoder's latency depends on the number of erasures).
module tb_oppm_rs_top;
  import tb_gf_pkg::*;
  localparam int N = 31, K = 23, NCW = 33, NMULTI = 30;
  logic clk = 0, rst = 1;
  logic run_i = 0, start_i = 0, ext_sel_i = 0, return_i, err_i = 0, era_i;
  logic [6:0] err_mask_i = 0;
  logic [4:0] enc_data_o, bdec_data_o, dec_data_o, dec_raw_o, dec_err_num_o, dec_era_num_o;
  logic enc_valid_o, enc_sop_o, bridge_bit_o, bridge_sop_o, coder_out_o, chan_slot_o, chan_err_o;
  logic oppm_bit_o, oppm_viol_o, bdec_valid_o, bdec_sop_o, bdec_era_o;
  logic dec_valid_o, dec_sop_o, dec_eop_o, dec_fail_o;
  int checks = 0, failures = 0;
  // OPPM bit-error test link
  logic ber_ext_sel = 0, ber_return, ber_err = 0, ber_clr = 0;
  logic [6:0] ber_mask = 0;
  logic ber_coder_out, ber_prbs_bit, ber_dataout, ber_errcode, ber_locked, ber_synced;
  logic ber_output_prbs, ber_slot_err, ber_viol;
  logic [15:0] ber_err_count, ber_bit_count;

  oppm_rs_top dut (
    .clk, .rst,
    .rs_run_i(run_i), .rs_start_i(start_i), .rs_ext_sel_i(ext_sel_i), .rs_return_i(return_i), .rs_err_i(err_i),
    .rs_err_mask_i(err_mask_i), .rs_era_i(era_i),
    .rs_enc_data_o(enc_data_o), .rs_enc_valid_o(enc_valid_o), .rs_enc_sop_o(enc_sop_o),
    .rs_bridge_bit_o(bridge_bit_o), .rs_bridge_sop_o(bridge_sop_o),
    .rs_coder_out_o(coder_out_o), .rs_chan_slot_o(chan_slot_o), .rs_chan_err_o(chan_err_o),
    .rs_oppm_bit_o(oppm_bit_o), .rs_oppm_viol_o(oppm_viol_o),
    .rs_bdec_data_o(bdec_data_o), .rs_bdec_valid_o(bdec_valid_o), .rs_bdec_sop_o(bdec_sop_o),
    .rs_bdec_era_o(bdec_era_o), .rs_dec_valid_o(dec_valid_o), .rs_dec_sop_o(dec_sop_o),
    .rs_dec_eop_o(dec_eop_o), .rs_dec_data_o(dec_data_o), .rs_dec_raw_o(dec_raw_o),
    .rs_dec_err_num_o(dec_err_num_o), .rs_dec_era_num_o(dec_era_num_o), .rs_dec_fail_o(dec_fail_o),
    .ber_sync_i(1'b0), .ber_ext_sel_i(ber_ext_sel), .ber_return_i(ber_return), .ber_err_i(ber_err),
    .ber_err_mask_i(ber_mask), .ber_cnt_clr_i(ber_clr),
    .ber_coder_out_o(ber_coder_out), .ber_prbs_bit_o(ber_prbs_bit), .ber_dataout_o(ber_dataout),
    .ber_errcode_o(ber_errcode), .ber_locked_o(ber_locked), .ber_synced_o(ber_synced),
    .ber_output_prbs_o(ber_output_prbs), .ber_slot_err_o(ber_slot_err), .ber_viol_o(ber_viol),
    .ber_err_count_o(ber_err_count), .ber_bit_count_o(ber_bit_count)
  );
  always #5 clk = ~clk;
  assign return_i   = coder_out_o;      // external path modelled as a wire
  assign ber_return = ber_coder_out;

  int ber_slots = 0, ber_viols = 0;
  always @(posedge clk) if (!rst && dut.u_ber.en4 && ber_slot_err) ber_slots++;
  always @(posedge clk) if (!rst && dut.u_ber.en3 && ber_viol) ber_viols++;
  initial begin
    wait (!rst);
    repeat (5000) @(posedge clk);
    checks += 3;
    if (!ber_locked) begin failures++; $display("FAIL ber link not locked"); end
    if (ber_err_count != 0) begin failures++; $display("FAIL ber clean errors %0d", ber_err_count); end
    if (ber_bit_count < 1200) begin failures++; $display("FAIL ber bit count %0d", ber_bit_count); end
    ber_mask = 7'b0001111;
    ber_ext_sel = 1;
  end

  // ---- reference source ----
  bit refbits [];
  function automatic int ref_sym(int i);
    return {27'b0, refbits[5*i], refbits[5*i+1], refbits[5*i+2], refbits[5*i+3], refbits[5*i+4]};
  endfunction
  initial begin
    refbits = new[5 * K * (NCW + 4)];
    for (int i = 0; i < refbits.size(); i++)
      refbits[i] = (i < 15) ? 1'b1 : (refbits[i-15] ^ refbits[i-14]);
  end

  // ---- per-codeword channel mode ----
  typedef enum int {CLEAN, LIGHT, EXTRET, EXTERA, HEAVY} mode_t;
  function automatic mode_t mode_of(int c);
    if (c < 4)  return CLEAN;
    if (c < 12) return LIGHT;
    if (c < 16) return EXTRET;
    if (c < 20) return EXTERA;
    if (c < 24) return HEAVY;
    return CLEAN;
  endfunction

  int tx_cw = -1;
  // the mode switches when the bridge starts a new codeword
  logic br_sop_q = 0;
  always @(posedge clk) begin
    br_sop_q <= bridge_sop_o;
    if (!rst && bridge_sop_o && !br_sop_q) begin
      tx_cw <= tx_cw + 1;
      case (mode_of(tx_cw + 1))
        LIGHT:   begin err_mask_i <= 7'h7F;      ext_sel_i <= 0; end
        EXTRET:  begin err_mask_i <= 7'h00;      ext_sel_i <= 1; end
        HEAVY:   begin err_mask_i <= 7'b0000011; ext_sel_i <= 0; end
        default: begin err_mask_i <= 7'h00;      ext_sel_i <= 0; end
      endcase
    end
  end

  // ---- external erasures on the receive side ----
  int rx_sym = 0, rx_cw = -1;
  int cur_idx, cur_cw;
  assign cur_idx = bdec_sop_o ? 0 : rx_sym;
  assign cur_cw  = bdec_sop_o ? rx_cw + 1 : rx_cw;
  assign era_i   = bdec_valid_o && (mode_of(cur_cw) == EXTERA) &&
                   (cur_idx == 2 || cur_idx == 9 || cur_idx == 20);
  always @(posedge clk) if (!rst && bdec_valid_o) begin
    rx_sym <= cur_idx + 1;
    rx_cw  <= cur_cw;
  end

  // ---- decoder output check ----
  int dc = 0, dj = 0, last_sop = -1, cyc = 0;
  int n_corr = 0, n_era = 0, n_extera = 0, n_fail = 0, n_ext = 0, n_viol = 0, n_miscorr = 0;
  int got [N];
  bit cw_bad;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (!rst && oppm_viol_o && dut.u_rs.en3) n_viol++;
  // received codewords arrive at the fixed link rate
  int last_rx = -1;
  always @(posedge clk) if (!rst && bdec_valid_o && bdec_sop_o) begin
    if (last_rx >= 0 && rx_cw < NMULTI - 2) begin
      checks++;
      if (cyc - last_rx != 624) begin failures++; $display("FAIL received codeword interval %0d", cyc - last_rx); end
    end
    last_rx = cyc;
  end

  always @(posedge clk) if (!rst && dec_valid_o) begin
    if (dec_sop_o) begin
      dj = 0;
      if (last_sop >= 0 && dc < NMULTI - 1) begin
        checks++;
        if (cyc - last_sop < 614 || cyc - last_sop > 634) begin
          failures++; $display("FAIL decoded codeword interval %0d", cyc - last_sop);
        end
      end
      last_sop = cyc;
    end
    got[dj] = int'(dec_data_o);
    if (dec_eop_o) begin
      int m[];
      int cw[];
      mode_t md;
      m = new[K];
      foreach (m[j]) m[j] = ref_sym(dc * K + j);
      encode(m, N - K, cw);
      md = mode_of(dc);
      cw_bad = 0;
      for (int j = 0; j < N; j++) if (got[j] != cw[j]) cw_bad = 1;
      checks++;
      if (!dec_fail_o && cw_bad) begin
        if (md == HEAVY) n_miscorr++;
        else begin failures++; $display("FAIL codeword %0d (mode %s) wrong", dc, md.name()); end
      end
      if (md != HEAVY) begin
        checks++;
        if (dec_fail_o) begin failures++; $display("FAIL codeword %0d (mode %s) failed", dc, md.name()); end
      end
      if (md == CLEAN && dc > 0 && mode_of(dc - 1) == CLEAN) begin
        checks++;
        if (dec_err_num_o != 0) begin failures++; $display("FAIL clean codeword %0d errors %0d", dc, dec_err_num_o); end
      end
      if (md == EXTERA) begin
        checks++;
        if (dec_era_num_o < 3) begin failures++; $display("FAIL codeword %0d erasures %0d", dc, dec_era_num_o); end
        if (!dec_fail_o && !cw_bad) n_extera++;
      end
      if (!dec_fail_o && !cw_bad && dec_err_num_o > dec_era_num_o) n_corr++;
      if (!dec_fail_o && !cw_bad && dec_era_num_o > 0 && md != EXTERA) n_era++;
      if (md == EXTRET && !dec_fail_o && !cw_bad) n_ext++;
      if (dec_fail_o) n_fail++;
      $display("codeword %0d mode %s: errors %0d erasures %0d fail %b %s", dc, md.name(),
               dec_err_num_o, dec_era_num_o, dec_fail_o, cw_bad ? "differs" : "ok");
      dc++;
    end
    dj++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    run_i = 1;
    // multi-codeword mode up to codeword NMULTI-1, then single-codeword mode
    wait (tx_cw == NMULTI - 1);
    @(negedge clk); run_i = 0;
    for (int i = 0; i < NCW - NMULTI; i++) begin
      repeat (2500) @(negedge clk);
      checks++;
      if (dc != NMULTI + i) begin failures++; $display("FAIL %0d codewords before start pulse %0d", dc, i); end
      start_i = 1; @(negedge clk); start_i = 0;
    end
    wait (dc == NCW);
    repeat (3000) @(posedge clk);
    checks++;
    if (dc != NCW) begin failures++; $display("FAIL %0d codewords, expected %0d", dc, NCW); end
    checks += 9;
    if (ber_slots == 0 || ber_err_count == 0) begin failures++; $display("FAIL ber errors not counted"); end
    if (int'(ber_err_count) > 2 * ber_slots || ber_err_count >= ber_bit_count) begin
      failures++; $display("FAIL ber count %0d for %0d slots", ber_err_count, ber_slots);
    end
    if (ber_viols == 0) begin failures++; $display("FAIL ber link saw no violations"); end
    $display("ber link: bits=%0d errors=%0d hit_slots=%0d", ber_bit_count, ber_err_count, ber_slots);
    if (n_corr == 0)   begin failures++; $display("FAIL no symbol corrections"); end
    if (n_era == 0)    begin failures++; $display("FAIL no erasure decoding from OPPM violations"); end
    if (n_extera == 0) begin failures++; $display("FAIL no external erasure decoding"); end
    if (n_fail == 0)   begin failures++; $display("FAIL no decoding failure"); end
    if (n_ext == 0)    begin failures++; $display("FAIL external path unused"); end
    if (n_viol == 0)   begin failures++; $display("FAIL no OPPM violations"); end
    $display("corrected=%0d oppm_erasures=%0d ext_erasures=%0d failed=%0d ext_path=%0d viol_bits=%0d miscorrected=%0d",
             n_corr, n_era, n_extera, n_fail, n_ext, n_viol, n_miscorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (624 * (NCW + 4) + 20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
