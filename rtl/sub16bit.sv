// sub16bit: signed W-bit subtractor with saturation; the speed comparison.
//
// Forms the speed error e = w* - w that feeds the PI speed controller. The
// difference is taken one bit wider and clipped to the W-bit range (sat
// flags a clip). With full-scale samples of opposite sign the difference
// does not fit in 16 bits; the error then stays at full scale. The
// comparison is the original design's; the saturation is this design's
// choice.
//
// Purely combinational.
module sub16bit #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y,
  output logic                sat
);

  logic signed [W:0] d;

  always_comb begin
    d   = (W+1)'(a) - (W+1)'(b);
    sat = (d[W] != d[W-1]);
    if (!sat)      y = d[W-1:0];
    else if (d[W]) y = {1'b1, {(W-1){1'b0}}};
    else           y = {1'b0, {(W-1){1'b1}}};
  end

endmodule
