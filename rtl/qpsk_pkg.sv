// Shared types, constants and elaboration-time helpers of the pi/4 QPSK transmitter.
//
// Holds the GF(2^8) arithmetic used by the Reed-Solomon encoder, the word widths of
// the modulator datapath (8-bit differential symbols, 16-bit shaped baseband, 8-bit
// carrier, 24-bit passband as in the simulation figures of the design), the phase
// type of the differential encoder, and the constant functions that build the
// carrier sine table and the pulse shaping coefficients at elaboration time.
package qpsk_pkg;

  // ---------------- word widths ----------------
  localparam int unsigned SYM_W  = 8;   // Xk / Yk differential symbol words
  localparam int unsigned BB_W   = 16;  // shaped baseband I/Q (filter output bits [25:10])
  localparam int unsigned CAR_W  = 8;   // DDS cos / sin words
  localparam int unsigned RF_W   = BB_W + CAR_W; // x_band, y_band, modulated output (24)

  typedef logic signed [SYM_W-1:0] sym_t;
  typedef logic signed [BB_W-1:0]  bb_t;
  typedef logic signed [CAR_W-1:0] car_t;
  typedef logic signed [RF_W-1:0]  rf_t;

  // Carrier phase of the differential encoder in units of pi/4 (0 .. 7 = 0 .. 7pi/4).
  typedef logic [2:0] phase_t;

  // Frame field that the framer is currently sending.
  typedef enum logic [1:0] {FLD_IDLE = 2'd0, FLD_SYNC = 2'd1, FLD_HDR = 2'd2, FLD_DATA = 2'd3} field_e;

  // ---------------- GF(2^8) ----------------
  // Multiply two field elements, reducing by the primitive polynomial 'poly' (with x^8 bit).
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b,
                                        input logic [8:0] poly);
    logic [7:0] r;
    logic [8:0] aa;
    r  = '0;
    aa = {1'b0, a};
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r = r ^ aa[7:0];
      aa = {aa[7:0], 1'b0};
      if (aa[8]) aa = aa ^ poly;
    end
    return r;
  endfunction

  // alpha^e, alpha = x.
  function automatic logic [7:0] gf_pow_alpha(input int e, input logic [8:0] poly);
    logic [7:0] r;
    r = 8'd1;
    for (int i = 0; i < e; i++) r = gf_mul(r, 8'h02, poly);
    return r;
  endfunction

  // ---------------- pulse shaping ----------------
  localparam real PI = 3.14159265358979323846;

  // Square-root raised cosine impulse response, t in symbol periods, roll-off beta.
  function automatic real srrc(input real t, input real beta);
    real num, den, at;
    at = (t < 0.0) ? -t : t;
    if (at < 1.0e-9)
      return 1.0 - beta + 4.0 * beta / PI;
    if ((beta > 0.0) && ((at - 1.0 / (4.0 * beta)) < 1.0e-9) && ((at - 1.0 / (4.0 * beta)) > -1.0e-9))
      return (beta / $sqrt(2.0)) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * beta)) +
                                    (1.0 - 2.0 / PI) * $cos(PI / (4.0 * beta)));
    num = $sin(PI * t * (1.0 - beta)) + 4.0 * beta * t * $cos(PI * t * (1.0 + beta));
    den = PI * t * (1.0 - 16.0 * beta * beta * t * t);
    return num / den;
  endfunction

  // Round a real to the nearest integer (halves away from zero).
  function automatic int round_int(input real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

endpackage
