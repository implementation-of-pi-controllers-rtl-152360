// dc_motor_model: behavioural model (not synthesizable) of everything
// outside the logic: the H-bridge, the permanent-magnet DC motor, the
// 8-channel analog multiplexer and the 10-bit A/D converter.
//
// Motor: L di/dt = u - R i - lambda0 w and J dw/dt = kt i - B w, with
// L = 4.01 mH, R = 1.51 Ohm, J = 4.73e-5 kg m^2, kt = 0.0832 Nm/A,
// lambda0 = 0.0833 V s/rad, B = 2.69e-5 Nm s/rad, link voltage u0 = 40 V.
// Integrated with forward Euler, SUBSTEPS steps per clock period T_CLK, on
// the falling clock edge so that the switch state is stable.
// H-bridge: sw = {SW4,SW3,SW2,SW1}; 1001 applies +u0, 0110 applies -u0,
// 0000 (all off) lets the current freewheel through the diodes against the
// link voltage until it reaches zero. Any other pattern shorts the supply
// and is counted in shoot_through.
// Mux and A/D: address {a2,a1,a0} = 1 selects w*, 3 selects w, 5 selects i;
// other addresses and a disabled mux read 0 V. The A/D is ideal and
// instantaneous, offset binary: code = 512 + round(v), clipped to 0..1023,
// with v = rpm / 4 for w* and w (+-2048 rpm full scale) and v = 51.2 * amps
// for i (+-10 A full scale).
module dc_motor_model #(
  parameter real T_CLK    = 6.25e-6,
  parameter int  SUBSTEPS = 5
) (
  input  logic       clk,
  input  logic [3:0] sw,
  input  logic       a2,
  input  logic       a1,
  input  logic       a0,
  input  logic       en,
  input  int         w_ref_rpm,
  output logic [9:0] ad_data
);
  localparam real L    = 4.01e-3;
  localparam real R    = 1.51;
  localparam real J    = 4.73e-5;
  localparam real KT   = 0.0832;
  localparam real LAM  = 0.0833;
  localparam real B    = 2.69e-5;
  localparam real U0   = 40.0;
  localparam real PI_C = 3.14159265358979;

  real omega   = 0.0;  // rad/s
  real current = 0.0;  // A
  int  shoot_through = 0;

  function automatic real rpm();
    return omega * 60.0 / (2.0 * PI_C);
  endfunction

  function automatic logic [9:0] quantise(input real v);
    int c = 512 + int'(v);  // int'() of a real rounds to nearest
    if (c < 0)    c = 0;
    if (c > 1023) c = 1023;
    return 10'(c);
  endfunction

  localparam real H = T_CLK / SUBSTEPS;  // integration step

  always @(negedge clk) begin
    real u;
    for (int k = 0; k < SUBSTEPS; k++) begin
      real di;
      case (sw)
        4'b1001: u = U0;
        4'b0110: u = -U0;
        4'b0000: u = (current > 0.0) ? -U0 : (current < 0.0) ? U0 : 0.0;
        default: begin u = 0.0; shoot_through++; end
      endcase
      di = (u - R * current - LAM * omega) / L * H;
      if (sw == 4'b0000 && ((current > 0.0 && current + di < 0.0) ||
                            (current < 0.0 && current + di > 0.0)))
        di = -current;  // the diodes stop conducting at zero current
      omega   = omega + (KT * current - B * omega) / J * H;
      current = current + di;
    end
  end

  always_comb begin
    ad_data = 10'd512;
    if (en) begin
      case ({a2, a1, a0})
        3'd1:    ad_data = quantise(real'(w_ref_rpm) / 4.0);
        3'd3:    ad_data = quantise(omega * 60.0 / (2.0 * PI_C) / 4.0);
        3'd5:    ad_data = quantise(current * 51.2);
        default: ad_data = 10'd512;
      endcase
    end
  end
endmodule
