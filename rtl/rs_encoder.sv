// rs_encoder: systematic Reed-Solomon RS(N,K) encoder over GF(2^5), default RS(31,23).
// The K message symbols pass straight to the output while they are divided by the
// generator polynomial g(x) = (x+a^1)(x+a^2)...(x+a^(N-K)) in an N-K stage LFSR;
// the N-K remainder (parity) symbols then follow, highest-degree first. The code
// size and the LFSR structure follow the design; the code roots a^1..a^(N-K) and
// the field polynomial (see gf32_pkg) are this design's choice.
// Interface: valid/ready streams of 5-bit symbols on both sides. The encoder counts
// symbols itself: it accepts K input symbols, then emits N-K parity symbols while
// in_ready is low. out_sop marks codeword symbol 0, out_eop symbol N-1; in_last
// marks that the next message symbol accepted completes the message.
// Timing: zero latency on message symbols (combinational path in->out), one symbol
// per cycle at most; parity symbols come from registers.
module rs_encoder
  import gf32_pkg::*;
#(
  parameter int unsigned N = 31,
  parameter int unsigned K = 23
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  gf_t  in_data,
  output logic in_last,     // the next message symbol taken is the last (K-1)
  output logic out_valid,
  input  logic out_ready,
  output gf_t  out_data,
  output logic out_sop,
  output logic out_eop
);
  localparam int unsigned NK = N - K;

  typedef gf_t poly_t [NK+1];

  // Coefficients g[0..NK] of the generator polynomial (g[NK] = 1).
  function automatic poly_t gen_poly();
    poly_t g;
    gf_t   root;
    for (int i = 0; i <= int'(NK); i++) g[i] = '0;
    g[0] = gf_t'(1);
    for (int r = 1; r <= int'(NK); r++) begin
      root = gf_alpha_pow(r);
      // g(x) <- g(x) * (x + root)
      for (int i = int'(NK); i >= 1; i--) g[i] = g[i-1] ^ gf_mul(g[i], root);
      g[0] = gf_mul(g[0], root);
    end
    return g;
  endfunction

  localparam poly_t G = gen_poly();

  localparam int unsigned CW = $clog2(N);
  localparam logic [CW-1:0] K_C    = CW'(K);
  localparam logic [CW-1:0] LAST_C = CW'(N - 1);
  localparam logic [CW-1:0] KL_C   = CW'(K - 1);

  logic [CW-1:0]        cnt;
  gf_t                  par [NK];
  logic                 in_msg;
  logic                 fire;
  gf_t                  fb;

  assign in_msg    = (cnt < K_C);
  assign in_ready  = in_msg & out_ready;
  assign out_valid = in_msg ? in_valid : 1'b1;
  assign out_data  = in_msg ? in_data : par[NK-1];
  assign in_last   = (cnt == KL_C);
  assign out_sop   = (cnt == 0);
  assign out_eop   = (cnt == LAST_C);
  assign fire      = out_valid & out_ready;
  assign fb        = in_data ^ par[NK-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      for (int i = 0; i < int'(NK); i++) par[i] <= '0;
    end else if (fire) begin
      cnt <= (cnt == LAST_C) ? '0 : cnt + 1'b1;
      if (in_msg) begin
        par[0] <= gf_mul(G[0], fb);
        for (int i = 1; i < int'(NK); i++) par[i] <= par[i-1] ^ gf_mul(G[i], fb);
      end else begin
        par[0] <= '0;
        for (int i = 1; i < int'(NK); i++) par[i] <= par[i-1];
      end
    end
  end
endmodule
