// End-to-end testbench of pi4qpsk_tx at its default parameters.
//
// A first-word-fall-through source supplies random message bytes. The testbench sends
// one frame from a start pulse, leaves an idle gap, then sends back-to-back frames
// with 'start' held high. It checks every stage against its own models:
//   * bitstream: each frame rebuilt from 'data_bit' must be sync 1ACFFC1D, header 5AA5,
//     the 16 message bytes and their RS(32,16) parity (reference long division over
//     GF(2^8)/0x11D); bits between frames must be zero; a frame lasts 304 bits of 4
//     clocks; 16 bytes are read per frame;
//   * symbols: bits are paired from reset (first bit to I) and a real phasor rotated
//     by +-pi/4, +-3pi/4 gives the expected (Xk, Yk);
//   * baseband: a direct-form 65-tap SRRC FIR on the zero-stuffed Xk/Yk stream;
//   * carrier: round(127 cos/sin(2 pi n/4)) for the 25 MHz carrier at 100 MHz;
//   * passband: x_band, y_band and rf_out from the previous cycle's baseband and carrier.
// It counts each mechanism of the chain (frames from a pulse and back to back, idle
// fill, sync/header/data fields, parity output, all four phase steps, both phase sets,
// zero-stuffed filter phases, non-zero passband) and fails any that never happened.
module tb_pi4qpsk_tx;
  import qpsk_pkg::*;

  localparam real PI    = 3.14159265358979323846;
  localparam int  SPS   = 8;
  localparam int  NTAPS = 65;
  localparam int  FRAME_BITS = 38 * 8;

  logic clk = 1'b0;
  logic rst, start, din_rd;
  logic [7:0] din;
  logic data_bit, bit_valid, frame_start, frame_done, code_end, sym_valid;
  field_e field;
  sym_t   xk, yk;
  phase_t phase;
  bb_t    i_shaped, q_shaped;
  car_t   car_cos, car_sin;
  rf_t    x_band, y_band, rf_out;

  int checks = 0, failures = 0;

  pi4qpsk_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200_000;   // 20000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  // ------------------------------------------------------------ RS reference
  int gexp [512];
  int glog [256];
  int gen  [17];

  function automatic int rmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  task automatic build_gf();
    int x = 1;
    int ng [17];
    for (int i = 0; i < 255; i++) begin
      gexp[i] = x;
      glog[x] = i;
      x = x << 1;
      if ((x & 'h100) != 0) x = x ^ 'h11D;
    end
    for (int i = 255; i < 512; i++) gexp[i] = gexp[i-255];
    foreach (gen[i]) gen[i] = 0;
    gen[0] = 1;
    for (int r = 1; r <= 16; r++) begin
      foreach (ng[i]) ng[i] = 0;
      for (int i = 0; i < r; i++) begin
        ng[i]   ^= gen[i];
        ng[i+1] ^= rmul(gen[i], gexp[r]);
      end
      gen = ng;
    end
  endtask

  // ------------------------------------------------------------ data source
  int msg [$];         // every byte handed out, in order
  always_ff @(posedge clk) begin
    if (rst) begin
      din <= 8'($urandom);
    end else if (din_rd) begin
      msg.push_back(int'(din));
      din <= 8'($urandom);
    end
  end

  // ------------------------------------------------------------ bitstream check
  int   in_frame = -1;
  int   frames = 0, idle_bits = 0, nbits = 0, fstart_cycle = 0, cyc = 0;
  logic [FRAME_BITS-1:0] fbits;
  int   field_cnt [4];
  int   code_ends = 0, rd_count = 0;
  bit   bits_q [$];    // all bits, for the symbol model

  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check_frame(input int f);
    int cw [32];
    int work [32];
    int q;
    for (int i = 0; i < 16; i++) cw[i] = msg[16*f + i];
    for (int i = 0; i < 32; i++) work[i] = (i < 16) ? cw[i] : 0;
    for (int i = 0; i < 16; i++) begin
      q = work[i];
      for (int j = 0; j <= 16; j++) work[i+j] ^= rmul(gen[j], q);
    end
    for (int i = 16; i < 32; i++) cw[i] = work[i];
    check(fbits[FRAME_BITS-1 -: 32] == 32'h1ACF_FC1D, $sformatf("frame %0d sync", f));
    check(fbits[FRAME_BITS-33 -: 16] == 16'h5AA5, $sformatf("frame %0d header", f));
    for (int b = 0; b < 32; b++)
      check(int'(fbits[FRAME_BITS - 49 - 8*b -: 8]) == cw[b],
            $sformatf("frame %0d codeword byte %0d: %02h expected %02h", f, b,
                      fbits[FRAME_BITS - 49 - 8*b -: 8], cw[b]));
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (din_rd) rd_count++;
      if (code_end) code_ends++;
      if (bit_valid) begin
        bits_q.push_back(data_bit);
        nbits++;
        if (frame_start) begin
          in_frame = 0;
          fstart_cycle = cyc;
        end
        if (in_frame >= 0) begin
          fbits[FRAME_BITS - 1 - in_frame] = data_bit;
          in_frame++;
          if (in_frame == FRAME_BITS) begin
            check(frame_done, "frame_done with the last bit");
            check(cyc - fstart_cycle == (FRAME_BITS - 1) * SPS / 2,
                  $sformatf("frame took %0d cycles", cyc - fstart_cycle));
            check_frame(frames);
            frames++;
            in_frame = -1;
          end
        end else begin
          idle_bits++;
          check(data_bit == 1'b0, "idle bit not zero");
        end
      end
    end
  end

  always @(posedge clk) if (!rst) field_cnt[int'(field)]++;

  // ------------------------------------------------------------ symbol check
  real  ang = 0.0;
  int   nsym = 0;
  int   step_cnt [4];
  int   set_cnt [2];
  int   sym_xk [$], sym_yk [$];

  always @(posedge clk) begin
    if (!rst && sym_valid) begin
      bit ib, qb;
      real d;
      check(bits_q.size() >= 2 * nsym + 2, "symbol before its bits");
      ib = bits_q[2*nsym];
      qb = bits_q[2*nsym + 1];
      case ({ib, qb})
        2'b00:   d =  PI / 4.0;
        2'b01:   d =  3.0 * PI / 4.0;
        2'b11:   d = -3.0 * PI / 4.0;
        default: d = -PI / 4.0;
      endcase
      step_cnt[{ib, qb}]++;
      ang += d;
      check(int'(xk) == rnd(127.0 * $cos(ang)) && int'(yk) == rnd(127.0 * $sin(ang)),
            $sformatf("symbol %0d: (%0d,%0d)", nsym, xk, yk));
      set_cnt[phase[0]]++;
      nsym++;
    end
  end

  // ------------------------------------------------------------ baseband, carrier, passband
  localparam real BETA = 0.35;
  int h [NTAPS];
  int ui [$], uq [$];
  int n_car = 0, nonzero_rf = 0, zero_stuffed = 0;
  int prev_i, prev_q, prev_c, prev_s;
  int exp_i, exp_q;
  bit started = 0;

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

  function automatic int fir(ref int u [$]);
    int s = 0;
    int n = u.size();
    for (int j = 0; j < NTAPS; j++) s += h[j] * u[n - 1 - j];
    return s;
  endfunction

  // sampled just after each rising edge
  always @(posedge clk) begin
    if (!rst) begin
      #1;
      // baseband
      // (the filter takes what is seen now at the next edge and shows its sum one edge later)
      if (started)
        check(int'(i_shaped) == exp_i && int'(q_shaped) == exp_q,
              $sformatf("cycle %0d baseband (%0d,%0d) expected (%0d,%0d)", cyc, i_shaped,
                        q_shaped, exp_i, exp_q));
      exp_i = fir(ui) >>> 10;
      exp_q = fir(uq) >>> 10;
      ui.push_back(sym_valid ? int'(xk) : 0);
      uq.push_back(sym_valid ? int'(yk) : 0);
      void'(ui.pop_front());
      void'(uq.pop_front());
      if (!sym_valid && nsym > 0) zero_stuffed++;
      // carrier sample n_car
      check(int'(car_cos) == rnd(127.0 * $cos(2.0 * PI * n_car / 4.0)) &&
            int'(car_sin) == rnd(127.0 * $sin(2.0 * PI * n_car / 4.0)),
            $sformatf("carrier sample %0d", n_car));
      n_car++;
      if (started) begin
        check(int'(x_band) == prev_i * prev_c && int'(y_band) == prev_q * prev_s &&
              int'(rf_out) == prev_i * prev_c - prev_q * prev_s,
              $sformatf("cycle %0d passband", cyc));
      end
      if (rf_out != 0) nonzero_rf++;
      prev_i = int'(i_shaped); prev_q = int'(q_shaped);
      prev_c = int'(car_cos);  prev_s = int'(car_sin);
      started = 1;
    end
  end

  task automatic mechanism(input string name, input int count);
    $display("mechanism %-28s %0d", name, count);
    check(count > 0, $sformatf("mechanism '%s' never happened", name));
  endtask

  initial begin
    real scale;
    int  f_single;
    build_gf();
    scale = 32767.0 / rc_sqrt(0.0);
    for (int j = 0; j < NTAPS; j++) h[j] = rnd(scale * rc_sqrt(real'(j - 32) / real'(SPS)));
    repeat (NTAPS) begin
      ui.push_back(0);
      uq.push_back(0);
    end
    rst = 1'b1; start = 1'b0;
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    repeat (200) @(posedge clk);
    // one frame from a pulse
    #2 start = 1'b1;
    @(posedge clk); #2 start = 1'b0;
    wait (frames == 1);
    f_single = frames;
    repeat (600) @(posedge clk);
    check(frames == 1 && in_frame < 0, "no frame without a request");
    // back-to-back frames
    #2 start = 1'b1;
    wait (frames == 3);
    #2 start = 1'b0;
    // start was still high at the boundary after frame 3, so that request is
    // remembered and exactly one more frame follows
    wait (frames == 5);
    repeat (1500) @(posedge clk);
    check(frames == 5 && in_frame < 0, $sformatf("frames sent: %0d", frames));
    check(rd_count == 16 * frames, $sformatf("bytes read %0d for %0d frames", rd_count, frames));
    check(code_ends == frames, $sformatf("code_end pulses %0d", code_ends));
    check(nsym == nbits / 2, $sformatf("symbols %0d for %0d bits", nsym, nbits));

    mechanism("single frame from a pulse", f_single);
    mechanism("back-to-back frames", frames - f_single);
    mechanism("idle fill bits", idle_bits);
    mechanism("sync field", field_cnt[FLD_SYNC]);
    mechanism("header field", field_cnt[FLD_HDR]);
    mechanism("codeword field", field_cnt[FLD_DATA]);
    mechanism("RS codewords completed", code_ends);
    mechanism("step +pi/4 (00)", step_cnt[0]);
    mechanism("step +3pi/4 (01)", step_cnt[1]);
    mechanism("step -pi/4 (10)", step_cnt[2]);
    mechanism("step -3pi/4 (11)", step_cnt[3]);
    mechanism("axis phase set", set_cnt[0]);
    mechanism("diagonal phase set", set_cnt[1]);
    mechanism("zero-stuffed filter phases", zero_stuffed);
    mechanism("non-zero passband samples", nonzero_rf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
