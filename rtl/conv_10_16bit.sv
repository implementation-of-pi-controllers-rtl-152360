// conv_10_16bit: turns an IN_W-bit A/D code into an OUT_W-bit two's
// complement sample.
//
// The A/D is taken to be bipolar with offset-binary output (code 0 = most
// negative, 2^(IN_W-1) = zero); inverting the MSB gives two's complement,
// which is then sign-extended. With OFFSET_BINARY = 0 the code is taken as
// two's complement already. The 10-bit value is placed in the top bits of
// the 16-bit word (multiplied by 2^(OUT_W-IN_W) = 64, low bits zero), so all
// three signals span the full 16-bit range and the products and sums of the
// PI controller keep six more bits of resolution than the A/D has. The
// 10-to-16-bit conversion itself follows the original design; the input
// coding and the left-justified placement are this design's choices.
//
// Purely combinational.
module conv_10_16bit #(
  parameter int unsigned IN_W          = 10,
  parameter int unsigned OUT_W         = 16,
  parameter bit          OFFSET_BINARY = 1'b1
) (
  input  logic [IN_W-1:0]         ad,
  output logic signed [OUT_W-1:0] x
);

  logic signed [IN_W-1:0] tc;  // two's complement view of the code

  always_comb begin
    tc = ad;
    if (OFFSET_BINARY) tc[IN_W-1] = ~ad[IN_W-1];
    x = OUT_W'(tc) <<< (OUT_W - IN_W);  // sign-extend, then left-justify
  end

endmodule
