// pi_parallel: PI speed controller in parallel structure.
//
// Implements the bilinear (Tustin) discretisation of Kp + Ki/s kept as two
// parallel branches:
//   x[n]  = ki * e[n]                     (ki = K_I*T/2)
//   I[n]  = I[n-1] + x[n-1] + x[n]        (trapezoidal integrator)
//   i*[n] = kp * e[n] + I[n]
// Datapath as in the original design: two mul16bit, three add16bit and two
// dff16bit (one holding x[n-1], one holding I[n-1]). The registers load on
// the 40 kHz sample strobe en; i_ref is combinational from e and the two
// registers, so it is valid in the cycle where en is high and is used there
// by the current controller. All words are signed 16-bit; gains have FRAC
// fraction bits (this design's choice). Every stage saturates; sat reports
// that one of them clipped for the present inputs. Reset (synchronous, high)
// clears both registers.
module pi_parallel #(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] kp,
  input  logic signed [W-1:0] ki,
  input  logic signed [W-1:0] e,
  output logic signed [W-1:0] i_ref,
  output logic                sat
);

  logic signed [W-1:0] p_term;   // kp * e[n]
  logic signed [W-1:0] x;        // ki * e[n]
  logic signed [W-1:0] x_d;      // x[n-1]
  logic signed [W-1:0] integ_d;  // I[n-1]
  logic signed [W-1:0] part;     // I[n-1] + x[n-1]
  logic signed [W-1:0] integ;    // I[n]
  logic [4:0]          s;

  mul16bit #(.W(W), .FRAC(FRAC)) u_mul_p (.a(kp), .b(e), .y(p_term), .sat(s[0]));
  mul16bit #(.W(W), .FRAC(FRAC)) u_mul_i (.a(ki), .b(e), .y(x),      .sat(s[1]));

  dff16bit #(.W(W)) u_dff_x (.clk, .rst, .en, .d(x),     .q(x_d));
  dff16bit #(.W(W)) u_dff_i (.clk, .rst, .en, .d(integ), .q(integ_d));

  add16bit #(.W(W)) u_add_old (.a(x_d),    .b(integ_d), .y(part),  .sat(s[2]));
  add16bit #(.W(W)) u_add_new (.a(x),      .b(part),    .y(integ), .sat(s[3]));
  add16bit #(.W(W)) u_add_out (.a(p_term), .b(integ),   .y(i_ref), .sat(s[4]));

  assign sat = |s;

endmodule
