// mul16bit: signed W x W multiplier with a W-bit fixed-point result.
//
// a is a coefficient (gain) with FRAC fraction bits, b a sample. The full
// 2W-bit product is rounded to the nearest multiple of 2^FRAC (halves
// upward), shifted right arithmetically by FRAC and clipped to W bits; sat
// flags a clip. Rounding rather than truncating keeps small negative
// errors from adding a steady -1 LSB to the PI integrator. With the default
// FRAC = 12 a gain covers -8 .. +8 - 2^-12 in steps of 2^-12 = 0.000244.
// The 16-bit multiplier with a 16-bit result is the original design's; the
// gain format, rounding and saturation are this design's choices.
//
// Purely combinational.
module mul16bit #(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 12
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y,
  output logic                sat
);

  logic signed [2*W-1:0] p;  // full product
  logic signed [2*W-1:0] r;  // product scaled back by FRAC bits

  // Half an output LSB, added before the shift to round to nearest.
  localparam logic signed [2*W-1:0] HALF = (FRAC > 0) ? (2*W)'(1) <<< (FRAC - 1) : '0;

  always_comb begin
    // |a*b| <= 2^(2W-2), so adding HALF cannot overflow 2W bits.
    p   = (2*W)'(a) * (2*W)'(b);
    r   = (p + HALF) >>> FRAC;
    // In range when the bits above W-1 are all copies of the sign bit.
    sat = (r[2*W-1:W-1] != {(W+1){r[W-1]}});
    if (!sat)           y = r[W-1:0];
    else if (r[2*W-1])  y = {1'b1, {(W-1){1'b0}}};
    else                y = {1'b0, {(W-1){1'b1}}};
  end

endmodule
