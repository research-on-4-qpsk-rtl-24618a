// Self-checking testbench of rs_encoder (RS(32,16), GF(2^8) with x^8+x^4+x^3+x^2+1).
//
// The reference builds its own exp/log tables, forms the generator polynomial and
// divides the message polynomial by long division on arrays. Every codeword is also
// checked to have zero syndromes at alpha^1 .. alpha^16. Codewords are fed both with
// 'en' in every cycle and with random gaps; the test checks that each output symbol
// appears the cycle after its 'en', that 'msg_phase' covers exactly the first 16
// positions and that 'code_end' comes with the last parity symbol only.
module tb_rs_encoder;
  localparam int N = 32, K = 16, NPAR = N - K;

  logic       clk = 1'b0;
  logic       rst;
  logic       en;
  logic [7:0] datain;
  logic       msg_phase;
  logic [7:0] dataout;
  logic       code_end;

  int checks = 0, failures = 0;

  rs_encoder dut (.clk, .rst, .en, .datain, .msg_phase, .dataout, .code_end);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference GF(2^8) via tables ----
  int gexp [512];
  int glog [256];

  function automatic int rmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  int gen [NPAR+1];   // gen[0] = x^NPAR coefficient (=1) ... gen[NPAR] = constant

  task automatic build_ref();
    int x;
    int ng [NPAR+1];
    x = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i] = x;
      glog[x] = i;
      x = x << 1;
      if ((x & 'h100) != 0) x = x ^ 'h11D;
    end
    for (int i = 255; i < 512; i++) gexp[i] = gexp[i-255];
    // gen(x) = prod (x + a^i), stored highest power first
    for (int i = 0; i <= NPAR; i++) gen[i] = 0;
    gen[0] = 1;
    for (int r = 1; r <= NPAR; r++) begin
      for (int i = 0; i <= NPAR; i++) ng[i] = 0;
      for (int i = 0; i < r; i++) begin
        ng[i]   = ng[i] ^ gen[i];
        ng[i+1] = ng[i+1] ^ rmul(gen[i], gexp[r]);
      end
      for (int i = 0; i <= NPAR; i++) gen[i] = ng[i];
    end
  endtask

  // remainder of msg(x) * x^NPAR divided by gen(x), highest power first
  task automatic ref_parity(input int msg [K], output int par [NPAR]);
    int work [N];
    int q;
    for (int i = 0; i < N; i++) work[i] = (i < K) ? msg[i] : 0;
    for (int i = 0; i < K; i++) begin
      q = work[i];
      if (q != 0)
        for (int j = 0; j <= NPAR; j++) work[i+j] = work[i+j] ^ rmul(gen[j], q);
    end
    for (int i = 0; i < NPAR; i++) par[i] = work[K+i];
  endtask

  function automatic int syndrome(input int cw [N], input int r);
    int s;
    s = 0;
    for (int i = 0; i < N; i++) s = rmul(s, gexp[r]) ^ cw[i];
    return s;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // send one codeword; gaps = random idle cycles between positions
  task automatic run_codeword(input int msg [K], input bit gaps);
    int par [NPAR];
    int cw  [N];
    int got [N];
    ref_parity(msg, par);
    for (int i = 0; i < N; i++) cw[i] = (i < K) ? msg[i] : par[i-K];
    for (int pos = 0; pos < N; pos++) begin
      if (gaps) begin
        repeat ($urandom_range(0, 3)) begin
          en = 1'b0;
          datain = 8'($urandom);
          @(posedge clk); #1;
          check(code_end == 1'b0, "code_end outside last position");
        end
      end
      check(msg_phase == (pos < K), $sformatf("msg_phase at position %0d", pos));
      en = 1'b1;
      datain = (pos < K) ? 8'(msg[pos]) : 8'($urandom);  // ignored in parity phase
      @(posedge clk); #1;
      en = 1'b0;
      got[pos] = int'(dataout);
      check(dataout == 8'(cw[pos]),
            $sformatf("position %0d: got %02h expected %02h", pos, dataout, cw[pos]));
      check(code_end == (pos == N - 1), $sformatf("code_end at position %0d", pos));
    end
    for (int r = 1; r <= NPAR; r++)
      check(syndrome(got, r) == 0, $sformatf("syndrome %0d not zero", r));
  endtask

  initial begin
    int msg [K];
    build_ref();
    rst = 1'b1; en = 1'b0; datain = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // the message pattern of the design's encoder simulation
    msg = '{'h00, 'h11, 'h22, 'h33, 'h44, 'h55, 'h66, 'h77,
            'h88, 'h99, 'hAA, 'hBB, 'hCC, 'hDD, 'hEE, 'h55};
    run_codeword(msg, 1'b0);
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < K; i++) msg[i] = $urandom_range(0, 255);
      run_codeword(msg, n[0]);
    end
    // all-zero message gives all-zero parity
    for (int i = 0; i < K; i++) msg[i] = 0;
    run_codeword(msg, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
