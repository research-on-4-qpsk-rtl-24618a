// Framer: wraps each RS codeword in a synchronisation frame and a frame header and
// sends the result as a serial bitstream.
//
// A frame is FRAME_BYTES = SYNC_BYTES + HDR_BYTES + CODE_BYTES bytes (4 + 2 + 32 = 38
// by default): the sync word, the header word, then the RS codeword, every byte sent
// most significant bit first. One bit leaves per 'bit_ce' pulse; 'data_bit' and the
// one-cycle 'bit_valid' are registered, so a bit appears the cycle after its 'bit_ce'.
// Between frames the framer sends zero bytes (field FLD_IDLE); a 'start' pulse, or a
// level held high, is remembered and a frame begins at the next byte boundary. Frames
// follow each other with no gap while 'start' stays high. 'frame_start' and
// 'frame_done' are one-cycle pulses that come with the first and the last bit of a
// frame, and 'field' names the part of the frame the next bit is taken from.
//
// RS symbols are fetched ahead: on the 'bit_ce' that sends the last bit of a byte, and
// when the next byte is a codeword byte, 'en_rs' pulses for one cycle so that the RS
// encoder's registered output is ready before the first bit of that byte is due. The
// encoder output is valid one cycle after 'en_rs', which is the earliest possible next
// 'bit_ce', so 'bit_ce' may be high in every cycle.
//
// The order sync, header, data, the byte-wide encoder interface ('en_RS' in the design's
// framing simulation) and a 38-byte frame count follow the design description. The sync
// and header values, the MSB-first bit order and zero idle fill are choices of this
// implementation.
module framer #(
  parameter int unsigned  SYNC_BYTES = 4,
  parameter logic [31:0]  SYNC_WORD  = 32'h1ACF_FC1D,
  parameter int unsigned  HDR_BYTES  = 2,
  parameter logic [15:0]  HDR_WORD   = 16'h5AA5,
  parameter int unsigned  CODE_BYTES = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic            bit_ce,
  output logic            en_rs,
  input  logic [7:0]      rs_data,
  output logic            data_bit,
  output logic            bit_valid,
  output qpsk_pkg::field_e field,
  output logic            frame_start,
  output logic            frame_done
);
  import qpsk_pkg::*;

  localparam int unsigned FRAME_BYTES = SYNC_BYTES + HDR_BYTES + CODE_BYTES;
  localparam int unsigned BYTE_W      = $clog2(FRAME_BYTES);

  logic              active;      // current byte belongs to a frame
  logic [BYTE_W-1:0] byte_idx;    // position of the current byte in the frame
  logic [2:0]        bit_idx;     // next bit of the current byte, 0 = MSB
  logic              start_pend;
  logic [7:0]        cur_byte;

  logic              last_bit;
  logic              next_active;
  logic [BYTE_W-1:0] next_idx;

  function automatic field_e field_of(input logic act, input logic [BYTE_W-1:0] idx);
    if (!act)                                  return FLD_IDLE;
    if (idx < BYTE_W'(SYNC_BYTES))             return FLD_SYNC;
    if (idx < BYTE_W'(SYNC_BYTES + HDR_BYTES)) return FLD_HDR;
    return FLD_DATA;
  endfunction

  // byte sent at the current position
  always_comb begin
    unique case (field_of(active, byte_idx))
      FLD_SYNC: cur_byte = SYNC_WORD[8*(SYNC_BYTES - 1 - int'(byte_idx)) +: 8];
      FLD_HDR:  cur_byte = HDR_WORD[8*(SYNC_BYTES + HDR_BYTES - 1 - int'(byte_idx)) +: 8];
      FLD_DATA: cur_byte = rs_data;
      default:  cur_byte = 8'h00;
    endcase
  end

  // position of the byte after the current one
  always_comb begin
    last_bit = (bit_idx == 3'd7);
    if (active && (byte_idx != BYTE_W'(FRAME_BYTES - 1))) begin
      next_active = 1'b1;
      next_idx    = byte_idx + 1'b1;
    end else begin
      next_active = start_pend || start;
      next_idx    = '0;
    end
  end

  assign field = field_of(active, byte_idx);
  assign en_rs = bit_ce && last_bit && (field_of(next_active, next_idx) == FLD_DATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      active      <= 1'b0;
      byte_idx    <= '0;
      bit_idx     <= '0;
      start_pend  <= 1'b0;
      data_bit    <= 1'b0;
      bit_valid   <= 1'b0;
      frame_start <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      bit_valid   <= bit_ce;
      frame_start <= 1'b0;
      frame_done  <= 1'b0;
      if (start) start_pend <= 1'b1;
      if (bit_ce) begin
        data_bit <= cur_byte[3'd7 - bit_idx];
        bit_idx  <= bit_idx + 1'b1;
        if (active && (byte_idx == '0) && (bit_idx == '0)) frame_start <= 1'b1;
        if (last_bit) begin
          if (active && (byte_idx == BYTE_W'(FRAME_BYTES - 1))) frame_done <= 1'b1;
          if (next_active && (next_idx == '0)) start_pend <= 1'b0;
          active   <= next_active;
          byte_idx <= next_idx;
        end
      end
    end
  end

endmodule
