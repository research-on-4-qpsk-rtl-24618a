// Self-checking testbench of shaping_filter (SPS 8, span 8 symbols, roll-off 0.35).
//
// The reference is a direct-form 65-tap FIR run on the zero-stuffed symbol stream,
// with its own square-root raised cosine taps scaled to a centre tap of 32767; its
// sum is shifted right by 10 and compared with the filter's output two cycles after
// each input sample. Symbols come every 8 cycles with about one in eight left out,
// which the filter must treat as a zero symbol. Extreme symbol values (+-127) are
// included, and the impulse response of a single symbol is checked to be symmetric.
module tb_shaping_filter;
  localparam real PI    = 3.14159265358979323846;
  localparam int  SPS   = 8;
  localparam int  NTAPS = 65;
  localparam real BETA  = 0.35;

  logic clk = 1'b0;
  logic rst, in_valid;
  qpsk_pkg::sym_t i_in, q_in;
  qpsk_pkg::bb_t  i_out, q_out;
  int checks = 0, failures = 0;

  shaping_filter dut (.clk, .rst, .i_in, .q_in, .in_valid, .i_out, .q_out);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real rc_sqrt(real t);
    real b = BETA;
    real d;
    d = ((t < 0.0) ? -t : t) - 1.0 / (4.0 * b);
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    if (d < 1.0e-9 && d > -1.0e-9)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) /
           (PI * t * (1.0 - (4.0 * b * t) * (4.0 * b * t)));
  endfunction

  int h [NTAPS];
  int ui [$];   // zero-stuffed input as seen by the filter, newest last
  int uq [$];

  function automatic int fir(ref int u [$]);
    int s = 0;
    int n = u.size();
    for (int j = 0; j < NTAPS; j++) if (n - 1 - j >= 0) s += h[j] * u[n - 1 - j];
    return s;
  endfunction

  initial begin
    real scale;
    int  ei, eq, pend_i, pend_q;
    int  resp [NTAPS];
    scale = 32767.0 / rc_sqrt(0.0);
    for (int j = 0; j < NTAPS; j++) begin
      real v;
      v = scale * rc_sqrt(real'(j - 32) / real'(SPS));
      h[j] = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    end
    rst = 1'b1; in_valid = 1'b0; i_in = '0; q_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // impulse: one symbol of +127 on I only, then zeros
    for (int c = 0; c < NTAPS + 2 + SPS; c++) begin
      in_valid = (c == 0);
      i_in = (c == 0) ? 8'sd127 : 8'sd0;
      q_in = '0;
      @(posedge clk); #1;
      if (c >= 1 && c - 1 < NTAPS) resp[c - 1] = int'(i_out);
      if (c >= 1) check(q_out == 0, "Q rail leaks from I");
    end
    for (int j = 0; j < NTAPS; j++)
      check(resp[j] == resp[NTAPS - 1 - j], $sformatf("impulse response not symmetric at %0d", j));
    for (int j = 0; j < NTAPS; j++)
      check(resp[j] == ((127 * h[j]) >>> 10), $sformatf("impulse tap %0d: %0d expected %0d",
                                                        j, resp[j], (127 * h[j]) >>> 10));
    // align the reference with the filter state: it now holds only zeros
    repeat (NTAPS) begin
      ui.push_back(0);
      uq.push_back(0);
    end
    // random symbol stream, every SPS cycles, some symbols left out
    for (int c = 0; c < 8000; c++) begin
      if (c % SPS == 0 && $urandom_range(0, 7) != 0) begin
        in_valid = 1'b1;
        ei = (c < 200) ? (((c / SPS) % 2) != 0 ? 127 : -127) : $urandom_range(0, 254) - 127;
        eq = (c < 200) ? (((c / SPS) % 3) != 0 ? -127 : 127) : $urandom_range(0, 254) - 127;
      end else begin
        in_valid = 1'b0;
        ei = $urandom_range(0, 254) - 127;   // ignored while in_valid is low
        eq = $urandom_range(0, 254) - 127;
      end
      i_in = 8'(ei);
      q_in = 8'(eq);
      pend_i = in_valid ? ei : 0;
      pend_q = in_valid ? eq : 0;
      @(posedge clk); #1;
      // the output visible now was computed from the stream up to the previous cycle
      check(int'(i_out) == (fir(ui) >>> 10) && int'(q_out) == (fir(uq) >>> 10),
            $sformatf("cycle %0d: (%0d,%0d) expected (%0d,%0d)", c, i_out, q_out,
                      fir(ui) >>> 10, fir(uq) >>> 10));
      ui.push_back(pend_i);
      uq.push_back(pend_q);
      void'(ui.pop_front());
      void'(uq.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
