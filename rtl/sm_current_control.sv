// sm_current_control: sliding-mode current controller and H-bridge driver.
//
// The switching function is s = i* - i and the control law u = u0*sign(s):
// when the current is below its reference the full link voltage +u0 is
// applied, otherwise -u0. A signed W-bit comparator decides i* > i; a D
// flip-flop loaded on the 40 kHz strobe en holds the decision, which fixes
// the switching instants to the sample grid (at most one change per 25 us,
// so a switching frequency of at most 20 kHz). The flip-flop output is +PWM
// and drives SW1 and SW4 (motor sees +u0); its inverse is -PWM and drives
// SW2 and SW3 (motor sees -u0). sw[0..3] are SW1..SW4.
//
// Comparator, flip-flop, inverter and switch assignment follow the original
// design. This design adds one thing: after reset, until the first decision
// has been taken, all four switches are off (the control law has no off
// state). No dead time is inserted between the two switch pairs. i* = i
// counts as s <= 0 and gives -u0.
module sm_current_control #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] i_ref,
  input  logic signed [W-1:0] i,
  output logic                pwm_pos,
  output logic                pwm_neg,
  output logic [3:0]          sw
);

  logic agb;     // comparator: i* > i, i.e. s > 0
  logic q;       // registered sign decision
  logic active;  // a decision has been taken since reset

  assign agb = (i_ref > i);

  always_ff @(posedge clk) begin
    if (rst) begin
      q      <= 1'b0;
      active <= 1'b0;
    end else if (en) begin
      q      <= agb;
      active <= 1'b1;
    end
  end

  assign pwm_pos = active &  q;
  assign pwm_neg = active & ~q;
  assign sw      = {pwm_pos, pwm_neg, pwm_neg, pwm_pos};  // SW4 SW3 SW2 SW1

  // The two diagonals of the bridge are never on together.
  a_no_shoot_through: assert property (@(posedge clk) !(pwm_pos && pwm_neg));

endmodule
