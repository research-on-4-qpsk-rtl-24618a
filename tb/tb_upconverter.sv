// Self-checking testbench of upconverter: random baseband and carrier words, including
// the extremes; x_band, y_band and rf_out = x_band - y_band must follow one cycle later.
module tb_upconverter;
  logic clk = 1'b0;
  logic rst;
  qpsk_pkg::bb_t  i_in, q_in;
  qpsk_pkg::car_t cos_in, sin_in;
  qpsk_pkg::rf_t  x_band, y_band, rf_out;
  int checks = 0, failures = 0;

  upconverter dut (.clk, .rst, .i_in, .q_in, .cos_in, .sin_in, .x_band, .y_band, .rf_out);

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

  initial begin
    int ei, eq, ec, es;
    rst = 1'b1; i_in = '0; q_in = '0; cos_in = '0; sin_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      ei = (n < 4) ? (((n & 1) != 0) ? -32768 : 32767) : $urandom_range(0, 65535) - 32768;
      eq = (n < 4) ? (((n & 2) != 0) ? -32768 : 32767) : $urandom_range(0, 65535) - 32768;
      ec = (n < 4) ? 127 : $urandom_range(0, 254) - 127;
      es = (n < 4) ? -127 : $urandom_range(0, 254) - 127;
      // keep the carrier on a circle of radius <= 127 as the DDS does
      if (n >= 4 && (ec * ec + es * es > 127 * 127)) es = 0;
      i_in = 16'(ei); q_in = 16'(eq); cos_in = 8'(ec); sin_in = 8'(es);
      @(posedge clk); #1;
      check(int'(x_band) == ei * ec, $sformatf("x_band %0d expected %0d", x_band, ei * ec));
      check(int'(y_band) == eq * es, $sformatf("y_band %0d expected %0d", y_band, eq * es));
      check(int'(rf_out) == ei * ec - eq * es,
            $sformatf("rf_out %0d expected %0d", rf_out, ei * ec - eq * es));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
