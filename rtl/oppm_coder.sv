// oppm_coder: serial PCM to serial offset-PPM coder.
// Input bits are taken on the 3-bit strobe (en3_i) into a serial-in register (sipo);
// every third bit completes a PCM word that is held in reg1. At the next frame start
// the word is encoded by oppm_enc_logic (Table 1 mapping) and loaded into a 4-bit
// parallel-in/serial-out register (piso), which sends slot D first, one slot per
// 4-bit strobe (en4_i). So three PCM bits and four OPPM slots take the same
// 12-cycle frame, as in the design's coder (SIPO, reg1, encoder, PISO).
// Word boundaries: a bit flagged sop_i starts a new word. With sync_i high the coder
// also waits, after reset, until its 15-bit sipo holds all ones (the PRBS start
// pattern) before forming words, like the design's initflag synchronisation; with
// sync_i low it starts at once. The 15-bit length follows the design's sipo.
// Interface: bit stream (bit_i, valid_i, sop_i) sampled on en3_i; slot stream
// (slot_o) updated on en4_i, with frame_valid_o / frame_sop_o held for the frame
// that carries a word / the word holding a codeword start. A frame with no word
// sends four empty slots.
// Timing: a word whose third bit arrives in frame f is sent in frame f+1 (its slot D
// appears right after the frame strobe of f+1), except that a word completed at the
// frame strobe itself is sent in that same frame.
module oppm_coder
(
  input  logic clk,
  input  logic rst,
  input  logic en3_i,
  input  logic en4_i,
  input  logic frame_i,
  input  logic sync_i,        // 1: wait for 15 ones before the first word
  input  logic bit_i,
  input  logic valid_i,
  input  logic sop_i,
  output logic slot_o,
  output logic frame_valid_o,
  output logic frame_sop_o,
  output logic synced_o       // initflag
);
  logic [14:0] sipo;          // only its all-ones state is used
  logic [14:0] sipo_n;
  logic        initflag;
  logic [2:0]  control1;      // one-hot word position, bit 0 = first bit
  logic [1:0]  wpart;         // first two bits of the current word
  logic        wsop;          // current word started with sop
  logic [2:0]  reg1;
  logic        pend, pend_sop;
  logic [3:0]  piso;
  logic        take;
  logic [2:0]  pos;
  logic        done_now;
  logic [2:0]  word_now;
  logic        wsop_now;
  logic [3:0]  code;
  logic [2:0]  code_src;

  assign take   = en3_i & valid_i & (initflag | ~sync_i);
  assign sipo_n = {sipo[13:0], bit_i};
  // position of the bit being taken (a sop bit always starts a word)
  assign pos      = sop_i ? 3'b001 : control1;
  assign done_now = take & pos[2];
  assign word_now = {wpart, bit_i};
  assign wsop_now = wsop;
  assign code_src = done_now ? word_now : reg1;

  oppm_enc_logic u_enc (.pcm_i(code_src), .oppm_o(code));

  always_ff @(posedge clk) begin
    if (rst) begin
      sipo          <= '0;
      initflag      <= 1'b0;
      control1      <= 3'b001;
      wpart         <= '0;
      wsop          <= 1'b0;
      reg1          <= '0;
      pend          <= 1'b0;
      pend_sop      <= 1'b0;
      piso          <= '0;
      slot_o        <= 1'b0;
      frame_valid_o <= 1'b0;
      frame_sop_o   <= 1'b0;
    end else begin
      if (en3_i & valid_i) begin
        sipo <= sipo_n;
        if (sync_i && !initflag && (&sipo_n)) initflag <= 1'b1;
      end
      if (take) begin
        control1 <= {pos[1:0], pos[2]};
        if (pos[0]) begin
          wpart <= {1'b0, bit_i};
          wsop  <= sop_i;
        end else if (pos[1]) begin
          wpart <= {wpart[0], bit_i};
        end
        if (pos[2] && !frame_i) begin
          reg1     <= word_now;
          pend     <= 1'b1;
          pend_sop <= wsop_now;
        end
      end
      if (frame_i) begin
        if (done_now || pend) begin
          slot_o        <= code[3];
          piso          <= {code[2:0], 1'b0};
          frame_valid_o <= 1'b1;
          frame_sop_o   <= done_now ? wsop_now : pend_sop;
        end else begin
          slot_o        <= 1'b0;
          piso          <= '0;
          frame_valid_o <= 1'b0;
          frame_sop_o   <= 1'b0;
        end
        pend <= 1'b0;
      end else if (en4_i) begin
        slot_o <= piso[3];
        piso   <= {piso[2:0], 1'b0};
      end
    end
  end

  assign synced_o = initflag;

  // Words must not arrive faster than one per frame.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    (done_now && !frame_i) |-> !pend);
endmodule
