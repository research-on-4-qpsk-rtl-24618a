// Direct digital synthesiser for the carrier: a PHASE_W-bit phase accumulator that
// advances by FTW every clock, and a full-wave sine table addressed by its top LUT_AW
// bits. The cosine is read from the same table a quarter turn ahead.
//
// f_carrier = FTW / 2^PHASE_W * f_clk. The default FTW = 2^30 gives 25 MHz at a
// 100 MHz sample clock. The table entries are round(AMP * sin(2*pi*n/2^LUT_AW)), built at
// elaboration. 'cos_out' and 'sin_out' are registered; reset starts the phase at 0, so
// the first outputs after reset are cos = AMP, sin = 0.
//
// The 25 MHz carrier and the use of a DDS follow the design description. The sample
// clock, accumulator and table sizes and the 8-bit output words are choices of this
// implementation (the 8-bit word matches the 24-bit mixer products of the design).
module dds #(
  parameter int unsigned PHASE_W = 32,
  parameter logic [31:0] FTW     = 32'h4000_0000,
  parameter int unsigned LUT_AW  = 10,
  parameter int          AMP     = 127
) (
  input  logic           clk,
  input  logic           rst,
  output qpsk_pkg::car_t cos_out,
  output qpsk_pkg::car_t sin_out
);
  import qpsk_pkg::*;

  localparam int unsigned LUT_N = 1 << LUT_AW;

  typedef car_t lut_t [LUT_N];

  function automatic lut_t make_sine();
    lut_t t;
    for (int n = 0; n < LUT_N; n++)
      t[n] = car_t'(round_int(real'(AMP) * $sin(2.0 * PI * real'(n) / real'(LUT_N))));
    return t;
  endfunction

  localparam lut_t SINE = make_sine();

  logic [PHASE_W-1:0] acc;
  logic [LUT_AW-1:0]  addr_s, addr_c;

  assign addr_s = acc[PHASE_W-1 -: LUT_AW];
  assign addr_c = addr_s + LUT_AW'(LUT_N / 4);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      cos_out <= '0;
      sin_out <= '0;
    end else begin
      acc     <= acc + PHASE_W'(FTW);
      cos_out <= SINE[addr_c];
      sin_out <= SINE[addr_s];
    end
  end

endmodule
