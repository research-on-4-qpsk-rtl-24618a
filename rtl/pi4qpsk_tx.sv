// pi/4 QPSK transmitter: RS(32,16) coding, framing, serial-to-parallel conversion,
// pi/4 differential encoding, pulse shaping and up-conversion to a 25 MHz carrier,
// producing the real 24-bit sample stream for a DAC.
//
// All blocks run on one sample clock 'clk' (100 MHz assumed for the 25 MHz carrier).
// A symbol timer counts SPS clocks per symbol and strobes the framer twice per symbol,
// so the bit rate is 2/SPS of the clock (25 Mbit/s, 12.5 Msymbol/s with the defaults).
// Every stage after the framer has a fixed latency and passes one item per strobe, so
// symbols reach the shaping filter exactly SPS clocks apart.
//
// Data source interface: 'din' must hold the next message byte at all times (a
// first-word-fall-through FIFO read port); 'din_rd' is high for one cycle when it is
// taken, and the source then advances. Sixteen bytes are read per frame, at the byte
// rate of the framer. 'start' requests a frame (pulse, or hold high for back-to-back
// frames); between frames the modulator keeps running on zero bits.
//
// Outputs: 'rf_out' is the modulated passband sample for the DAC (which, with the RF
// stage after it, lies outside this design). The intermediate signals of the chain are
// brought out for observation under the names used in the design's simulations.
//
// The order of the chain, the RS(32,16) code, the 25 MHz carrier and the word widths
// follow the design description. The clock and symbol rates, the data source handshake,
// the frame request and the idle fill are choices of this implementation. An assertion
// checks that symbols reach the shaping filter exactly SPS clocks apart.
module pi4qpsk_tx #(
  parameter int unsigned SPS = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [7:0]              din,
  output logic                    din_rd,
  // framed bitstream
  output logic                    data_bit,
  output logic                    bit_valid,
  output qpsk_pkg::field_e        field,
  output logic                    frame_start,
  output logic                    frame_done,
  output logic                    code_end,
  // differential symbols
  output qpsk_pkg::sym_t          xk,
  output qpsk_pkg::sym_t          yk,
  output qpsk_pkg::phase_t        phase,
  output logic                    sym_valid,
  // shaped baseband, carrier and passband
  output qpsk_pkg::bb_t           i_shaped,
  output qpsk_pkg::bb_t           q_shaped,
  output qpsk_pkg::car_t          car_cos,
  output qpsk_pkg::car_t          car_sin,
  output qpsk_pkg::rf_t           x_band,
  output qpsk_pkg::rf_t           y_band,
  output qpsk_pkg::rf_t           rf_out
);
  import qpsk_pkg::*;

  localparam int unsigned TW = (SPS > 1) ? $clog2(SPS) : 1;

  // ---- symbol timer: two bit strobes per symbol period ----
  logic [TW-1:0] tcnt;
  logic          bit_ce;

  always_ff @(posedge clk) begin
    if (rst || (tcnt == TW'(SPS - 1))) tcnt <= '0;
    else                               tcnt <= tcnt + 1'b1;
  end

  assign bit_ce = (tcnt == '0) || (tcnt == TW'(SPS / 2));

  // ---- RS encoder and framer ----
  logic       en_rs, msg_phase;
  logic [7:0] rs_data;

  assign din_rd = en_rs && msg_phase;

  rs_encoder u_rs (
    .clk, .rst,
    .en        (en_rs),
    .datain    (din),
    .msg_phase (msg_phase),
    .dataout   (rs_data),
    .code_end  (code_end)
  );

  framer u_framer (
    .clk, .rst,
    .start,
    .bit_ce,
    .en_rs,
    .rs_data,
    .data_bit,
    .bit_valid,
    .field,
    .frame_start,
    .frame_done
  );

  // ---- serial-to-parallel and differential encoding ----
  logic i_bit, q_bit, pair_valid;

  serial_to_parallel u_s2p (
    .clk, .rst,
    .bit_in    (data_bit),
    .bit_valid (bit_valid),
    .i_bit, .q_bit,
    .sym_valid (pair_valid)
  );

  diff_encoder u_diff (
    .clk, .rst,
    .i_bit, .q_bit,
    .sym_valid (pair_valid),
    .xk, .yk, .phase,
    .out_valid (sym_valid)
  );

  // ---- shaping, carrier and up-conversion ----
  shaping_filter #(.SPS(SPS)) u_shape (
    .clk, .rst,
    .i_in     (xk),
    .q_in     (yk),
    .in_valid (sym_valid),
    .i_out    (i_shaped),
    .q_out    (q_shaped)
  );

  dds u_dds (
    .clk, .rst,
    .cos_out (car_cos),
    .sin_out (car_sin)
  );

  upconverter u_up (
    .clk, .rst,
    .i_in   (i_shaped),
    .q_in   (q_shaped),
    .cos_in (car_cos),
    .sin_in (car_sin),
    .x_band, .y_band, .rf_out
  );

  // symbols must reach the shaping filter exactly SPS clocks apart
  logic [TW:0] since_sym;
  logic        seen_sym;
  always_ff @(posedge clk) begin
    if (rst) begin
      since_sym <= '0;
      seen_sym  <= 1'b0;
    end else if (sym_valid) begin
      since_sym <= '0;
      seen_sym  <= 1'b1;
    end else if (since_sym != '1) begin
      since_sym <= since_sym + 1'b1;
    end
  end
  a_sym_spacing: assert property (@(posedge clk) disable iff (rst)
    (sym_valid && seen_sym) |-> (since_sym == (TW+1)'(SPS - 1)));

endmodule
