// Serial-to-parallel converter: groups the framed bitstream into (I, Q) bit pairs.
//
// The first bit of each pair goes to I, the second to Q. Bits arrive with a one-cycle
// 'bit_valid'; after every second bit the pair is presented on 'i_bit'/'q_bit' with a
// one-cycle 'sym_valid', registered, so a symbol appears the cycle after its Q bit.
// Pairing starts with the first bit after reset.
//
// Mapping the bitstream onto I and Q follows the design description; the order (first
// bit to I) is a choice of this implementation.
module serial_to_parallel (
  input  logic clk,
  input  logic rst,
  input  logic bit_in,
  input  logic bit_valid,
  output logic i_bit,
  output logic q_bit,
  output logic sym_valid
);
  logic have_i;
  logic i_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_i    <= 1'b0;
      i_hold    <= 1'b0;
      i_bit     <= 1'b0;
      q_bit     <= 1'b0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (bit_valid) begin
        if (!have_i) begin
          i_hold <= bit_in;
          have_i <= 1'b1;
        end else begin
          i_bit     <= i_hold;
          q_bit     <= bit_in;
          sym_valid <= 1'b1;
          have_i    <= 1'b0;
        end
      end
    end
  end

endmodule
