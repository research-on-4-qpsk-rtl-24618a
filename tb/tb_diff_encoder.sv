// Self-checking testbench of diff_encoder.
//
// The reference rotates a real phasor by the angle of each bit pair (+pi/4 for 00,
// +3pi/4 for 01, -3pi/4 for 11, -pi/4 for 10) and rounds 127*cos and 127*sin. It also
// checks that the phase alternates between the two QPSK sets and that no step exceeds
// 3pi/4, and that every output comes the cycle after its input.
module tb_diff_encoder;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst, i_bit, q_bit, sym_valid, out_valid;
  qpsk_pkg::sym_t   xk, yk;
  qpsk_pkg::phase_t phase;
  int checks = 0, failures = 0;

  diff_encoder dut (.clk, .rst, .i_bit, .q_bit, .sym_valid, .xk, .yk, .phase, .out_valid);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
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

  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  initial begin
    real ang, d, xr, yr;
    int  seen [4];
    int  odd_set;
    rst = 1'b1; i_bit = 1'b0; q_bit = 1'b0; sym_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(xk == 8'sd127 && yk == 8'sd0, "reset symbol");
    ang = 0.0;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 1000; n++) begin
      if ($urandom_range(0, 3) == 0) begin
        sym_valid = 1'b0;
        @(posedge clk); #1;
        check(out_valid == 1'b0, "out_valid without input");
      end
      {i_bit, q_bit} = 2'($urandom);
      sym_valid = 1'b1;
      case ({i_bit, q_bit})
        2'b00:   d =  PI / 4.0;
        2'b01:   d =  3.0 * PI / 4.0;
        2'b11:   d = -3.0 * PI / 4.0;
        default: d = -PI / 4.0;
      endcase
      seen[{i_bit, q_bit}]++;
      ang = ang + d;
      xr = 127.0 * $cos(ang);
      yr = 127.0 * $sin(ang);
      @(posedge clk); #1;
      sym_valid = 1'b0;
      check(out_valid == 1'b1, "out_valid");
      check(int'(xk) == rnd(xr) && int'(yk) == rnd(yr),
            $sformatf("symbol %0d: (%0d,%0d) expected (%0d,%0d)", n, xk, yk, rnd(xr), rnd(yr)));
      // odd symbols land on the diagonal set, even ones on the axes
      odd_set = (n % 2 == 0) ? 1 : 0;
      check(int'(phase[0]) == odd_set, $sformatf("phase set at symbol %0d", n));
    end
    foreach (seen[i]) check(seen[i] > 0, $sformatf("bit pair %0d never used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
