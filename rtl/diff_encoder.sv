// pi/4 QPSK differential encoder.
//
// Each (I, Q) bit pair selects a phase step of +pi/4, +3pi/4, -3pi/4 or -pi/4, which is
// added to the carrier phase held from the previous symbol. Because every step is an
// odd multiple of pi/4, the phase alternates between the set {0, pi/2, pi, -pi/2} and
// the set {pi/4, 3pi/4, -3pi/4, -pi/4}, and no step is larger than 3pi/4. The phase is
// kept as a 3-bit count of pi/4 and turned into the symbol (Xk, Yk) = A*(cos, sin) by
// an 8-entry table with A = AMP (127, so the diagonal points are +-90).
//
// Step table (Gray coded):  I Q = 0 0 -> +pi/4,  0 1 -> +3pi/4,  1 1 -> -3pi/4,
// 1 0 -> -pi/4.
//
// Interface: one symbol per cycle with 'sym_valid'; 'xk', 'yk', 'phase' and the
// one-cycle 'out_valid' are registered and appear the following cycle. Reset sets the
// phase to 0 (output (AMP, 0)).
//
// The eight phase states, the two alternating QPSK sets and the 8-bit Xk/Yk words
// with +-90 diagonal values follow the design description. The step table and the
// starting phase are choices of this implementation.
module diff_encoder #(
  parameter int AMP = 127
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              i_bit,
  input  logic              q_bit,
  input  logic              sym_valid,
  output qpsk_pkg::sym_t    xk,
  output qpsk_pkg::sym_t    yk,
  output qpsk_pkg::phase_t  phase,
  output logic              out_valid
);
  import qpsk_pkg::*;

  typedef sym_t lut_t [8];

  function automatic lut_t make_cos(input real shift);
    lut_t t;
    for (int p = 0; p < 8; p++) t[p] = sym_t'(round_int(real'(AMP) * $cos(PI * p / 4.0 - shift)));
    return t;
  endfunction

  localparam lut_t COS_LUT = make_cos(0.0);
  localparam lut_t SIN_LUT = make_cos(PI / 2.0);   // sin(x) = cos(x - pi/2)

  phase_t step;
  phase_t next_phase;

  always_comb begin
    unique case ({i_bit, q_bit})
      2'b00:   step = 3'd1;   // +pi/4
      2'b01:   step = 3'd3;   // +3pi/4
      2'b11:   step = 3'd5;   // -3pi/4
      default: step = 3'd7;   // -pi/4
    endcase
    next_phase = phase + step;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      xk        <= COS_LUT[0];
      yk        <= SIN_LUT[0];
      out_valid <= 1'b0;
    end else begin
      out_valid <= sym_valid;
      if (sym_valid) begin
        phase <= next_phase;
        xk    <= COS_LUT[next_phase];
        yk    <= SIN_LUT[next_phase];
      end
    end
  end

endmodule
