// pi_direct_form1: PI speed controller as a direct form I filter.
//
// The same Tustin-discretised PI written as one transfer function
//   G(z) = (b0 z + b1) / (z - 1),  b0 = K_I*T/2 + Kp,  b1 = K_I*T/2 - Kp
// which gives the difference equation
//   i*[n] = b0 * e[n] + b1 * e[n-1] + i*[n-1].
// Datapath as in the original design: two mul16bit, two add16bit and two
// dff16bit (one holding e[n-1], one holding i*[n-1]). The registers load on
// the 40 kHz sample strobe en; i_ref is combinational from e and the two
// registers and is used in the cycle where en is high. Coefficients are
// signed 16-bit with FRAC fraction bits (this design's choice); every stage
// saturates and sat reports a clip for the present inputs. Reset
// (synchronous, high) clears both registers.
module pi_direct_form1 #(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] b0,
  input  logic signed [W-1:0] b1,
  input  logic signed [W-1:0] e,
  output logic signed [W-1:0] i_ref,
  output logic                sat
);

  logic signed [W-1:0] e_d;    // e[n-1]
  logic signed [W-1:0] y_d;    // i*[n-1]
  logic signed [W-1:0] m0;     // b0 * e[n]
  logic signed [W-1:0] m1;     // b1 * e[n-1]
  logic signed [W-1:0] part;   // b1 * e[n-1] + i*[n-1]
  logic [3:0]          s;

  dff16bit #(.W(W)) u_dff_e (.clk, .rst, .en, .d(e),     .q(e_d));
  dff16bit #(.W(W)) u_dff_y (.clk, .rst, .en, .d(i_ref), .q(y_d));

  mul16bit #(.W(W), .FRAC(FRAC)) u_mul_b0 (.a(b0), .b(e),   .y(m0), .sat(s[0]));
  mul16bit #(.W(W), .FRAC(FRAC)) u_mul_b1 (.a(b1), .b(e_d), .y(m1), .sat(s[1]));

  add16bit #(.W(W)) u_add_old (.a(m1), .b(y_d),  .y(part),  .sat(s[2]));
  add16bit #(.W(W)) u_add_out (.a(m0), .b(part), .y(i_ref), .sat(s[3]));

  assign sat = |s;

endmodule
