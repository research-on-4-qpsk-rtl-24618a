// Systematic Reed-Solomon encoder, RS(N,K) over GF(2^8), default RS(32,16).
//
// The encoder is the classic division-type linear feedback shift register: NPAR = N-K
// parity registers b[0..NPAR-1], each fed by a constant GF multiplier g[i] from the
// feedback symbol fb = m ^ b[NPAR-1], with g(x) = (x - a^R)(x - a^(R+1))...(x - a^(R+NPAR-1)),
// R = FIRST_ROOT. While the K message symbols pass through (feedback switch closed),
// each is copied to the output and divided into the registers. For the next NPAR steps
// the feedback is cut and the registers shift out the remainder, highest first, so
// the codeword is the message followed by its parity.
//
// Interface: every cycle with 'en' high is one codeword position. While 'msg_phase' is
// high the position is a message position and 'datain' is consumed in that cycle.
// 'dataout' is registered: the symbol for a position appears the cycle after its 'en'
// and holds until the next 'en'. 'code_end' is a one-cycle pulse, registered together
// with the last parity symbol. A synchronous 'rst' clears the registers and returns
// the encoder to the first codeword position.
//
// RS(32,16) with 16-byte input and 32-byte output, the one-cycle output delay, the
// LFSR structure and g(x) starting at a^1 follow the design description. The field
// polynomial x^8+x^4+x^3+x^2+1 (0x11D) and the enable/strobe interface are choices
// of this implementation.
module rs_encoder #(
  parameter int unsigned N          = 32,
  parameter int unsigned K          = 16,
  parameter logic [8:0]  PRIM_POLY  = 9'h11D,
  parameter int unsigned FIRST_ROOT = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] datain,
  output logic       msg_phase,
  output logic [7:0] dataout,
  output logic       code_end
);
  import qpsk_pkg::*;

  localparam int unsigned NPAR  = N - K;
  localparam int unsigned POS_W = $clog2(N);

  typedef logic [7:0] gpoly_t [NPAR+1];

  // Coefficients of the monic generator polynomial, gp[i] multiplies x^i, gp[NPAR] = 1.
  function automatic gpoly_t make_gen();
    gpoly_t g;
    logic [7:0] root;
    for (int i = 0; i <= NPAR; i++) g[i] = '0;
    g[0] = 8'd1;
    for (int r = 0; r < NPAR; r++) begin
      root = gf_pow_alpha(FIRST_ROOT + r, PRIM_POLY);
      // multiply g(x) by (x + root); subtraction equals addition in GF(2^m)
      for (int i = NPAR; i > 0; i--) g[i] = g[i-1] ^ gf_mul(g[i], root, PRIM_POLY);
      g[0] = gf_mul(g[0], root, PRIM_POLY);
    end
    return g;
  endfunction

  localparam gpoly_t GEN = make_gen();

  logic [POS_W-1:0] pos;
  logic [7:0]       par [NPAR];
  logic [7:0]       fb;

  assign msg_phase = (pos < POS_W'(K));
  assign fb        = datain ^ par[NPAR-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      pos      <= '0;
      dataout  <= '0;
      code_end <= 1'b0;
      for (int i = 0; i < NPAR; i++) par[i] <= '0;
    end else begin
      code_end <= 1'b0;
      if (en) begin
        if (msg_phase) begin
          dataout <= datain;
          par[0]  <= gf_mul(fb, GEN[0], PRIM_POLY);
          for (int i = 1; i < NPAR; i++) par[i] <= par[i-1] ^ gf_mul(fb, GEN[i], PRIM_POLY);
        end else begin
          dataout <= par[NPAR-1];
          par[0]  <= '0;
          for (int i = 1; i < NPAR; i++) par[i] <= par[i-1];
        end
        if (pos == POS_W'(N - 1)) begin
          pos      <= '0;
          code_end <= 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

endmodule
