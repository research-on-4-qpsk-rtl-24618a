// Quadrature up-converter: multiplies the shaped baseband by the carrier and combines
// the two rails into the real passband signal s = I*cos - Q*sin.
//
// x_band = I * cos and y_band = Q * sin are registered 16 x 8 = 24-bit products;
// 'rf_out' = x_band - y_band is formed combinationally from those registers, so all
// three words refer to the same sample, one cycle after the inputs. Since
// |cos| + |sin| <= 180 for the carrier words, |rf_out| < 5.9e6 fits the 24-bit word.
//
// The 24-bit x_band, y_band and output words and the output as x_band minus y_band
// follow the design's modulator simulation; the register placement is a choice of
// this implementation.
module upconverter (
  input  logic           clk,
  input  logic           rst,
  input  qpsk_pkg::bb_t  i_in,
  input  qpsk_pkg::bb_t  q_in,
  input  qpsk_pkg::car_t cos_in,
  input  qpsk_pkg::car_t sin_in,
  output qpsk_pkg::rf_t  x_band,
  output qpsk_pkg::rf_t  y_band,
  output qpsk_pkg::rf_t  rf_out
);
  import qpsk_pkg::*;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_band <= '0;
      y_band <= '0;
    end else begin
      x_band <= i_in * cos_in;
      y_band <= q_in * sin_in;
    end
  end

  assign rf_out = x_band - y_band;

endmodule
