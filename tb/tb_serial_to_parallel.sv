// Self-checking testbench of serial_to_parallel: random bits at random spacing; every
// second bit must produce one symbol, the cycle after it, with the earlier bit on I.
module tb_serial_to_parallel;
  logic clk = 1'b0;
  logic rst, bit_in, bit_valid, i_bit, q_bit, sym_valid;
  int checks = 0, failures = 0;

  serial_to_parallel dut (.clk, .rst, .bit_in, .bit_valid, .i_bit, .q_bit, .sym_valid);

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
    logic first;
    int   n;
    rst = 1'b1; bit_in = 1'b0; bit_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    n = 0;
    repeat (2000) begin
      repeat ($urandom_range(0, 2)) begin
        bit_valid = 1'b0;
        bit_in    = 1'($urandom);
        @(posedge clk); #1;
        check(sym_valid == 1'b0, "symbol without a bit");
      end
      bit_valid = 1'b1;
      bit_in    = 1'($urandom);
      if (n[0] == 1'b0) first = bit_in;
      @(posedge clk); #1;
      check(sym_valid == n[0], $sformatf("sym_valid after bit %0d", n));
      if (n[0]) check({i_bit, q_bit} == {first, bit_in}, $sformatf("pair at bit %0d", n));
      bit_valid = 1'b0;
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
