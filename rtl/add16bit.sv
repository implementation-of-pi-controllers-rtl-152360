// add16bit: signed W-bit adder with saturation.
//
// Adds two two's complement words. The sum is formed one bit wider and, if
// it does not fit in W bits, clipped to the largest or smallest W-bit value;
// sat flags that this happened. The adder itself is the original design's;
// saturating instead of wrapping is this design's choice, so that the PI
// integrator clamps at full scale instead of flipping sign.
//
// Purely combinational.
module add16bit #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y,
  output logic                sat
);

  logic signed [W:0] s;

  always_comb begin
    s   = (W+1)'(a) + (W+1)'(b);
    sat = (s[W] != s[W-1]);  // the two top bits differ: out of range
    if (!sat)     y = s[W-1:0];
    else if (s[W]) y = {1'b1, {(W-1){1'b0}}};  // most negative
    else           y = {1'b0, {(W-1){1'b1}}};  // most positive
  end

endmodule
