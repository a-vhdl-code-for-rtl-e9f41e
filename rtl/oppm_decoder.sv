// oppm_decoder: serial offset-PPM to serial PCM decoder.
// Slots are sampled on the 4-slot strobe (en4_i) into a 4-bit shift register (D1).
// The slot sampled at a frame strobe is the last slot of the previous frame, so at
// each frame strobe the four slots {D1[2:0], slot_i} form one codeword. It is
// decoded by oppm_dec_logic and its three PCM bits are sent, MSB first, one per
// 3-bit strobe (en3_i) from a 3-bit parallel-in/serial-out register (piso_D), as in
// the design's decoder (D1, decoder logic, piso_D).
// The frame's side signals (frame_valid_i, frame_sop_i) are sampled at the same
// frame strobe. viol_o flags the three bits of a codeword that no PCM word maps to
// (two or more pulses among E F G).
// Interface: slot stream in (sampled on en4_i); bit stream out (bit_o, valid_o,
// sop_o, viol_o), updated on en3_i.
// Timing: the bits of a codeword sent in frame f leave during frame f+1; with
// oppm_coder the PCM stream is delayed by one to two frames in total.
module oppm_decoder (
  input  logic clk,
  input  logic rst,
  input  logic en3_i,
  input  logic en4_i,
  input  logic frame_i,
  input  logic slot_i,
  input  logic frame_valid_i,
  input  logic frame_sop_i,
  output logic bit_o,
  output logic valid_o,
  output logic sop_o,
  output logic viol_o
);
  logic [2:0] d1;          // first three slots of the current codeword
  logic [3:0] word;
  logic [2:0] pcm;
  logic       viol;
  logic [1:0] piso_d;      // remaining two bits of the decoded word

  assign word = {d1, slot_i};

  oppm_dec_logic u_dec (.oppm_i(word), .pcm_o(pcm), .viol_o(viol));

  always_ff @(posedge clk) begin
    if (rst) begin
      d1      <= '0;
      piso_d  <= '0;
      bit_o   <= 1'b0;
      valid_o <= 1'b0;
      sop_o   <= 1'b0;
      viol_o  <= 1'b0;
    end else begin
      if (en4_i) d1 <= {d1[1:0], slot_i};
      if (frame_i) begin
        bit_o   <= pcm[2];
        piso_d  <= pcm[1:0];
        valid_o <= frame_valid_i;
        sop_o   <= frame_sop_i;
        viol_o  <= viol & frame_valid_i;
      end else if (en3_i) begin
        bit_o  <= piso_d[1];
        piso_d <= {piso_d[0], 1'b0};
        sop_o  <= 1'b0;
      end
    end
  end
endmodule
