// Self-checking testbench of dds.
//
// The default instance must produce the 25 MHz carrier of a 100 MHz clock: a period of
// four samples, cos = 127, 0, -127, 0 and sin a quarter period behind. A second
// instance with an irregular tuning word is compared sample by sample with
// round(127*sin/cos(2*pi*addr/1024)) of a model phase accumulator.
module tb_dds;
  localparam real         PI   = 3.14159265358979323846;
  localparam logic [31:0] FTW2 = 32'h0123_4567;

  logic clk = 1'b0;
  logic rst;
  qpsk_pkg::car_t c1, s1, c2, s2;
  int checks = 0, failures = 0;

  dds                   dut1 (.clk, .rst, .cos_out(c1), .sin_out(s1));
  dds #(.FTW(FTW2))     dut2 (.clk, .rst, .cos_out(c2), .sin_out(s2));

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
    logic [31:0] acc;
    int          a;
    automatic int ec [4] = '{127, 0, -127, 0};
    automatic int es [4] = '{0, 127, 0, -127};
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    acc = '0;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk); #1;
      // output n was read from accumulator value n*FTW
      check(int'(c1) == ec[n % 4] && int'(s1) == es[n % 4],
            $sformatf("25 MHz carrier sample %0d: (%0d,%0d)", n, c1, s1));
      a = int'(acc[31:22]);
      check(int'(s2) == rnd(127.0 * $sin(2.0 * PI * a / 1024.0)) &&
            int'(c2) == rnd(127.0 * $cos(2.0 * PI * a / 1024.0)),
            $sformatf("sample %0d addr %0d: (%0d,%0d)", n, a, c2, s2));
      acc = acc + FTW2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
