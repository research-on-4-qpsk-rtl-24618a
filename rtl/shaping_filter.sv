// Pulse shaping filter for the I and Q symbol streams: a square-root raised cosine
// interpolating FIR that turns one symbol per SPS clocks into one sample per clock.
//
// It computes exactly what a NTAPS = SPAN*SPS+1 tap FIR would produce on the symbol
// stream with SPS-1 zeros inserted after every symbol, but in polyphase form: it keeps
// the last SPAN+1 symbols and, at output phase p (0 .. SPS-1 clocks after the newest
// symbol), sums hist[k] * h[p + k*SPS]. That needs SPAN+1 multipliers per rail instead of
// NTAPS. The taps h[j] = round(srrc((j - SPAN*SPS/2)/SPS) * SCALE) are computed at
// elaboration, with srrc() the unit-energy square-root raised cosine of roll-off BETA,
// SCALE chosen so that the centre tap is 2^(COEF_W-1)-1.
//
// Words: 8-bit symbols times 16-bit taps are summed in an ACC_W (26) bit accumulator
// and the output is accumulator bits [ACC_W-1:OUT_LSB], [25:10] by default, as the
// design's FIR output word. With the default taps the largest possible sum is about
// 5.5e6, well inside 26 bits, so the truncation to ACC_W cannot wrap.
//
// Timing: a symbol is taken in the cycle 'in_valid' is high; its phase-0 output sample
// appears two cycles later, and one sample follows every cycle. When no symbol comes
// SPS cycles after the previous one, a zero symbol is shifted in, as in a zero-stuffed
// FIR. Reset clears the history.
//
// Shaping the differentially encoded I/Q before the mixers, and the 16-bit output
// bits [25:10], follow the design description. The filter type, roll-off, span,
// oversampling and tap width are choices of this implementation.
module shaping_filter #(
  parameter int unsigned SPS     = 8,
  parameter int unsigned SPAN    = 8,
  parameter real         BETA    = 0.35,
  parameter int unsigned COEF_W  = 16,
  parameter int unsigned ACC_W   = 26,
  parameter int unsigned OUT_LSB = 10
) (
  input  logic           clk,
  input  logic           rst,
  input  qpsk_pkg::sym_t i_in,
  input  qpsk_pkg::sym_t q_in,
  input  logic           in_valid,
  output qpsk_pkg::bb_t  i_out,
  output qpsk_pkg::bb_t  q_out
);
  import qpsk_pkg::*;

  localparam int unsigned NTAPS = SPAN * SPS + 1;
  localparam int unsigned NHIST = SPAN + 1;
  localparam int unsigned PH_W  = (SPS > 1) ? $clog2(SPS) : 1;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t taps_t [NTAPS];

  function automatic taps_t make_taps();
    taps_t t;
    real   scale;
    scale = real'((1 << (COEF_W - 1)) - 1) / srrc(0.0, BETA);
    for (int j = 0; j < NTAPS; j++)
      t[j] = coef_t'(round_int(scale * srrc((real'(j) - real'(NTAPS - 1) / 2.0) / real'(SPS), BETA)));
    return t;
  endfunction

  localparam taps_t TAPS = make_taps();

  // tap used by history slot k at phase p, zero past the end of the response
  function automatic coef_t tap_at(input int unsigned p, input int unsigned k);
    int unsigned j;
    j = p + k * SPS;
    return (j < NTAPS) ? TAPS[j] : coef_t'(0);
  endfunction

  sym_t            hist_i [NHIST];
  sym_t            hist_q [NHIST];
  logic [PH_W-1:0] ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= '0;
      for (int k = 0; k < NHIST; k++) begin
        hist_i[k] <= '0;
        hist_q[k] <= '0;
      end
    end else if (in_valid || (ph == PH_W'(SPS - 1))) begin
      ph        <= '0;
      hist_i[0] <= in_valid ? i_in : sym_t'(0);
      hist_q[0] <= in_valid ? q_in : sym_t'(0);
      for (int k = 1; k < NHIST; k++) begin
        hist_i[k] <= hist_i[k-1];
        hist_q[k] <= hist_q[k-1];
      end
    end else begin
      ph <= ph + 1'b1;
    end
  end

  logic signed [ACC_W-1:0] acc_i, acc_q;

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int k = 0; k < NHIST; k++) begin
      acc_i = acc_i + ACC_W'(hist_i[k] * tap_at(32'(ph), k));
      acc_q = acc_q + ACC_W'(hist_q[k] * tap_at(32'(ph), k));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= acc_i[OUT_LSB +: BB_W];
      q_out <= acc_q[OUT_LSB +: BB_W];
    end
  end

endmodule
