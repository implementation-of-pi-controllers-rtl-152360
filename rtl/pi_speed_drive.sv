// pi_speed_drive: digital cascaded speed drive for a permanent-magnet DC
// motor.
//
// Outer loop: a PI speed controller turns the speed error w* - w into a
// current reference i*. Inner loop: a sliding-mode controller compares i*
// with the measured current i and switches an H-bridge between +u0 and -u0.
// Both loops run at 40 kHz on 16-bit two's complement data.
//
// Data path:
//   mux_control  - walks an external analog mux (MAX310 type) over w*, w, i
//                  and an idle slot; max_a2 = bit1, max_a1 = bit0, max_a0 and
//                  max_en tied high as in the original wiring.
//   adc_demux    - latches the 10-bit A/D word per channel and converts it to
//                  16 bits.
//   sub16bit     - speed comparison e = w* - w.
//   pi_parallel / pi_direct_form1 - the two PI structures, both running on
//                  the same e; pi_sel picks which one drives i* (0 parallel,
//                  1 direct form I).
//   sm_current_control - sign of i* - i, registered at 40 kHz, to SW1..SW4;
//                  pwm_pos (+u0: SW1, SW4) and pwm_neg (-u0: SW2, SW3) are
//                  also brought out.
//
// Timing: one clock per mux slot by default (SLOT_CYCLES = 1), four slots per
// frame, so clk = 160 kHz gives the 40 kHz sample rate. In slot k the mux
// address is k and the A/D word present at the last cycle of the slot is
// latched. In the idle slot (frame = 1) the PI registers and the current
// decision are updated from the w*, w, i of the frame; the new switch state
// appears one clock later. sat reports that the speed comparison or a stage
// of the selected PI controller is clipping in the present cycle. The structure and widths follow the original
// design; slot order, gain format (GAIN_FRAC fraction bits), saturation,
// the single clock with enables and the switches-off state after reset are
// this design's choices. Running both PI structures side by side with a
// select is also this design's way of offering both.
module pi_speed_drive
  import pi_drive_pkg::*;
#(
  parameter int unsigned SLOT_CYCLES = 1,
  parameter int unsigned GAIN_FRAC   = 12
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ADC_W-1:0] ad_data,
  input  logic             pi_sel,
  input  sample_t          kp,
  input  sample_t          ki,
  input  sample_t          b0,
  input  sample_t          b1,
  output logic             max_a2,
  output logic             max_a1,
  output logic             max_a0,
  output logic             max_en,
  output logic [3:0]       sw,
  output logic             pwm_pos,
  output logic             pwm_neg,
  output sample_t          w_ref,
  output sample_t          w_meas,
  output sample_t          i_meas,
  output sample_t          i_ref,
  output logic             frame,
  output logic             sat
);

  logic [1:0] sel;
  logic [3:0] tap;
  sample_t    e;
  sample_t    i_ref_par, i_ref_df1;
  logic       e_sat, par_sat, df1_sat;

  mux_control #(.SLOT_CYCLES(SLOT_CYCLES), .N_SLOTS(4)) u_mux_ctrl (
    .clk, .rst, .sel, .tap
  );

  assign frame = tap[3];  // idle slot: w*, w, i of this frame all latched

  assign max_a2 = sel[1];
  assign max_a1 = sel[0];
  assign max_a0 = 1'b1;
  assign max_en = 1'b1;

  adc_demux u_demux (
    .clk, .rst, .ad_data, .tap(tap[2:0]), .w_ref, .w(w_meas), .i(i_meas)
  );

  sub16bit #(.W(DATA_W)) u_speed_cmp (.a(w_ref), .b(w_meas), .y(e), .sat(e_sat));

  pi_parallel #(.W(DATA_W), .FRAC(GAIN_FRAC)) u_pi_par (
    .clk, .rst, .en(frame), .kp, .ki, .e, .i_ref(i_ref_par), .sat(par_sat)
  );

  pi_direct_form1 #(.W(DATA_W), .FRAC(GAIN_FRAC)) u_pi_df1 (
    .clk, .rst, .en(frame), .b0, .b1, .e, .i_ref(i_ref_df1), .sat(df1_sat)
  );

  assign i_ref = pi_sel ? i_ref_df1 : i_ref_par;
  assign sat   = e_sat | (pi_sel ? df1_sat : par_sat);

  sm_current_control #(.W(DATA_W)) u_cur_ctrl (
    .clk, .rst, .en(frame), .i_ref, .i(i_meas), .pwm_pos, .pwm_neg, .sw
  );

endmodule
