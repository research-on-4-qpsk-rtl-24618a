// Self-checking testbench of framer.
//
// A model of the RS encoder answers each 'en_rs' with the next byte of a counting
// sequence one cycle later. The bit strobe comes every cycle in one phase of the test
// and at random intervals in another. Every frame is rebuilt from the bitstream and
// compared with sync word 1ACFFC1D, header 5AA5 and the 32 bytes the model supplied,
// MSB first; bits outside frames must be zero, each frame must fetch exactly 32 bytes,
// and 'frame_start'/'frame_done' must mark its first and last bit.
module tb_framer;
  localparam int FRAME_BITS = 38 * 8;

  logic clk = 1'b0;
  logic rst, start, bit_ce, en_rs, data_bit, bit_valid, frame_start, frame_done;
  logic [7:0] rs_data;
  qpsk_pkg::field_e field;

  int checks = 0, failures = 0;

  framer dut (.clk, .rst, .start, .bit_ce, .en_rs, .rs_data, .data_bit, .bit_valid,
              .field, .frame_start, .frame_done);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
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

  // RS encoder model: registered output, next byte per en_rs
  logic [7:0] src_cnt;
  int         fetched;
  always_ff @(posedge clk) begin
    if (rst) begin
      rs_data <= '0;
      src_cnt <= 8'h00;
      fetched <= 0;
    end else if (en_rs) begin
      rs_data <= src_cnt;
      src_cnt <= src_cnt + 8'd7;
      fetched <= fetched + 1;
    end
  end

  // bit strobe: every cycle or random
  bit random_ce;
  always_ff @(posedge clk) bit_ce <= random_ce ? ($urandom_range(0, 3) == 0) : 1'b1;

  // receiver side: rebuild frames
  logic [7:0] expect_src;
  int         in_frame;       // bits collected of the current frame, -1 outside
  logic [FRAME_BITS-1:0] fbits;
  int frames = 0;
  int fetched_at_start;

  always @(posedge clk) begin
    if (!rst && bit_valid) begin
      if (frame_start) begin
        check(in_frame < 0, "frame_start inside a frame");
        in_frame = 0;
        fetched_at_start = fetched;
      end
      if (in_frame >= 0) begin
        fbits[FRAME_BITS - 1 - in_frame] = data_bit;
        in_frame++;
        check(frame_done == (in_frame == FRAME_BITS), "frame_done position");
        if (in_frame == FRAME_BITS) begin
          check(fbits[FRAME_BITS-1 -: 32] == 32'h1ACF_FC1D, "sync word");
          check(fbits[FRAME_BITS-33 -: 16] == 16'h5AA5, "header word");
          for (int b = 0; b < 32; b++) begin
            check(fbits[FRAME_BITS - 49 - 8*b -: 8] == expect_src,
                  $sformatf("frame %0d data byte %0d: %02h expected %02h", frames, b,
                            fbits[FRAME_BITS - 49 - 8*b -: 8], expect_src));
            expect_src = expect_src + 8'd7;
          end
          frames++;
          in_frame = -1;
        end
      end else begin
        check(data_bit == 1'b0, "idle bit not zero");
        check(frame_done == 1'b0, "frame_done outside a frame");
      end
    end
  end

  initial begin
    int f0;
    rst = 1'b1; start = 1'b0; random_ce = 1'b0; in_frame = -1; expect_src = 8'h00;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (50) @(posedge clk);
    // one frame from a start pulse, strobe every cycle
    #1 start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    wait (frames == 1);
    check(fetched == 32, $sformatf("bytes fetched for one frame: %0d", fetched));
    repeat (100) @(posedge clk);
    check(frames == 1, "frame without a start");
    // back-to-back frames with start held, random strobes
    random_ce = 1'b1;
    f0 = fetched;
    #1 start = 1'b1;
    wait (frames == 4);
    #1 start = 1'b0;
    wait (in_frame < 0);
    repeat (10000) @(posedge clk);
    check(frames >= 5 && frames <= 6, $sformatf("frames sent: %0d", frames));
    check(fetched == 32 * frames, $sformatf("bytes fetched %0d for %0d frames", fetched, frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
