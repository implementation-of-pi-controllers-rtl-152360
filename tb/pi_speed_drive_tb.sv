// pi_speed_drive_tb: closed-loop test of the whole drive at its default
// parameters (one clock per mux slot, 160 kHz clock, 40 kHz control rate)
// against the behavioural motor, H-bridge, mux and A/D of dc_motor_model.
//
// The speed reference is a square wave of +-1000 rpm, first with the
// parallel PI, then switched (without reset) to the direct form I PI with
// the equivalent coefficients b0 = ki + kp, b1 = ki - kp, and finally a
// step to +2040 rpm from -1000 rpm that overdrives the speed comparison.
// Each phase lasts PHASE_MS milliseconds of simulated time.
//
// Checked:
//  - the frame strobe comes every 4 clocks (40 kHz at 160 kHz);
//  - the received w* equals the A/D code of the commanded reference,
//    left-justified, once the reference has been held for a frame;
//  - the bridge is never shorted, its switches change only in the clock
//    after a frame strobe, and after the first decision it always applies
//    +u0 or -u0;
//  - in the last 20 ms of each phase the mean speed is within 150 rpm of
//    the reference and the mean |i* - i| is below 0.3 A. The speed bound
//    follows from the 16-bit integrator: with ki = 1 LSB the integrator
//    input ki*e rounds to zero for errors below 32 A/D codes (128 rpm), so
//    the integrator can rest anywhere within that band;
//  - the armature current never exceeds 15 A. The measuring range is
//    +-10 A; with the doubled gains the reference briefly asks for more and
//    the current overshoots the range, but control must not be lost (the
//    stall current u0/R would be 26 A).
// Counted, with a failure for any that never happens: captures of each of
// the three channels, +u0 and -u0 decisions, frames run with each PI
// structure, switches between the structures, and saturation (sat).
module pi_speed_drive_tb;
  localparam int PHASE_MS       = 120;
  localparam int FRAMES_PER_MS  = 40;
  localparam int CLK_PER_FRAME  = 4;
  localparam int SETTLE_FRAMES  = 20 * FRAMES_PER_MS;   // last 20 ms
  localparam int N_PHASES       = 7;
  localparam int OVERDRIVE_RPM  = 1300;
  localparam int WATCHDOG       = (N_PHASES * PHASE_MS + 5) * FRAMES_PER_MS * CLK_PER_FRAME;

  localparam real SPEED_TOL_RPM = 150.0;

  // gains, 12 fraction bits; set per phase
  logic signed [15:0] kp = 16'sd2048, ki = 16'sd1;

  logic               clk = 0, rst = 1, pi_sel = 0;
  logic [9:0]         ad_data;
  logic               max_a2, max_a1, max_a0, max_en, frame, sat;
  logic [3:0]         sw;
  logic               pwm_pos, pwm_neg;
  logic signed [15:0] w_ref, w_meas, i_meas, i_ref;
  int                 w_ref_rpm = 0;

  int checks = 0, failures = 0;
  int n_cap [3];
  int n_pos = 0, n_neg = 0, n_frames_par = 0, n_frames_df1 = 0, n_mode_sw = 0, n_sat = 0;
  int cyc = 0, last_frame_cyc = -1, frame_gap_bad = 0, sw_bad = 0, range_bad = 0;
  int wref_bad = 0, wref_checked = 0;
  logic       frame_q = 0, pi_sel_q = 0;
  logic [3:0] sw_q = '0;

  pi_speed_drive dut (
    .clk, .rst, .ad_data, .pi_sel,
    .kp, .ki, .b0(ki + kp), .b1(ki - kp),
    .max_a2, .max_a1, .max_a0, .max_en, .sw, .pwm_pos, .pwm_neg,
    .w_ref, .w_meas, .i_meas, .i_ref, .frame, .sat
  );

  dc_motor_model plant (
    .clk, .sw, .a2(max_a2), .a1(max_a1), .a0(max_a0), .en(max_en),
    .w_ref_rpm, .ad_data
  );

  always #3125 clk = ~clk;  // 6.25 us period: 160 kHz

  function automatic int ref_code(input int rpm);
    int c = 512 + int'(real'(rpm) / 4.0);
    if (c < 0)    c = 0;
    if (c > 1023) c = 1023;
    return c;
  endfunction

  // Per-cycle monitors.
  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      if (dut.tap[0]) n_cap[0]++;
      if (dut.tap[1]) n_cap[1]++;
      if (dut.tap[2]) n_cap[2]++;
      if (frame) begin
        if (last_frame_cyc >= 0 && cyc - last_frame_cyc != CLK_PER_FRAME) frame_gap_bad++;
        last_frame_cyc = cyc;
        if (pi_sel) n_frames_df1++; else n_frames_par++;
        if (sat) n_sat++;
        if (i_ref > i_meas) n_pos++; else n_neg++;
      end
      // switches: change only right after a frame, never shorted, never
      // off once running
      if (sw != sw_q && !frame_q) sw_bad++;
      if (sw != {pwm_pos, pwm_neg, pwm_neg, pwm_pos}) sw_bad++;
      if (sw != 4'b1001 && sw != 4'b0110 && !(sw == 4'b0000 && n_pos + n_neg <= 1)) sw_bad++;
      if (plant.current > 15.0 || plant.current < -15.0) range_bad++;
      if (pi_sel != pi_sel_q) n_mode_sw++;
      frame_q  <= frame;
      sw_q     <= sw;
      pi_sel_q <= pi_sel;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(input int rpm, input bit sel, input logic signed [15:0] g_p,
                           input logic signed [15:0] g_i, input bit check_settle, input string name);
    real sum_w = 0.0, sum_err = 0.0, mean_w, mean_err, peak = -1.0e9, low = 1.0e9, i_pk = 0.0;
    int  nframes = PHASE_MS * FRAMES_PER_MS;
    w_ref_rpm = rpm;
    pi_sel    = sel;
    kp        = g_p;
    ki        = g_i;
    for (int f = 0; f < nframes; f++) begin
      @(posedge clk iff frame);
      if (f >= 2) begin
        wref_checked++;
        if (int'(w_ref) != (ref_code(rpm) - 512) * 64) wref_bad++;
      end
      if (plant.rpm() > peak) peak = plant.rpm();
      if (plant.rpm() < low)  low  = plant.rpm();
      if (plant.current > i_pk)  i_pk = plant.current;
      if (-plant.current > i_pk) i_pk = -plant.current;
      if (f >= nframes - SETTLE_FRAMES) begin
        sum_w   += plant.rpm();
        sum_err += (i_ref > i_meas ? real'(i_ref - i_meas) : real'(i_meas - i_ref)) / 64.0 / 51.2;
      end
    end
    mean_w   = sum_w / SETTLE_FRAMES;
    mean_err = sum_err / SETTLE_FRAMES;
    $display("%s: reference %0d rpm, settled %.1f rpm, range %.0f .. %.0f rpm, peak |i| %.2f A, mean |i*-i| %.3f A",
             name, rpm, mean_w, low, peak, i_pk, mean_err);
    if (!check_settle) return;
    checks += 2;
    if (mean_w > rpm + SPEED_TOL_RPM || mean_w < rpm - SPEED_TOL_RPM) begin
      failures++;
      $display("FAIL %s: speed %.1f rpm, reference %0d rpm", name, mean_w, rpm);
    end
    if (mean_err > 0.3) begin
      failures++;
      $display("FAIL %s: current tracking error %.3f A", name, mean_err);
    end
  endtask

  task automatic expect_count(input string what, input int n);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  task automatic expect_zero(input string what, input int n);
    checks++;
    if (n != 0) begin failures++; $display("FAIL %s: %0d", what, n); end
  endtask

  initial begin
    n_cap[0] = 0; n_cap[1] = 0; n_cap[2] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // gains of the first experiment: kp = 0.5, ki = kp / 2048
    run_phase( 1000, 1'b0, 16'sd2048, 16'sd1, 1'b1, "parallel PI,   gains A, +1000 rpm");
    run_phase(-1000, 1'b0, 16'sd2048, 16'sd1, 1'b1, "parallel PI,   gains A, -1000 rpm");
    run_phase( 1000, 1'b1, 16'sd2048, 16'sd1, 1'b1, "direct form I, gains A, +1000 rpm");
    run_phase(-1000, 1'b1, 16'sd2048, 16'sd1, 1'b1, "direct form I, gains A, -1000 rpm");
    // both gains doubled, as in the second experiment
    run_phase( 1000, 1'b0, 16'sd4096, 16'sd2, 1'b1, "parallel PI,   gains B, +1000 rpm");
    run_phase(-1000, 1'b1, 16'sd4096, 16'sd2, 1'b1, "direct form I, gains B, -1000 rpm");
    // overdrive: the speed error exceeds 16 bits and saturates
    run_phase(OVERDRIVE_RPM, 1'b1, 16'sd2048, 16'sd1, 1'b1, "direct form I, gains A, overdrive");
    expect_zero("frame spacing not 4 clocks", frame_gap_bad);
    expect_zero("received w* differs from A/D code", wref_bad);
    expect_zero("illegal or off-grid switch state", sw_bad);
    expect_zero("H-bridge shoot-through", plant.shoot_through);
    expect_zero("current beyond +-15 A", range_bad);
    checks++;
    if (wref_checked == 0) begin failures++; $display("FAIL w* never checked"); end
    $display("mechanisms:");
    expect_count("w* captures", n_cap[0]);
    expect_count("w captures", n_cap[1]);
    expect_count("i captures", n_cap[2]);
    expect_count("+u0 decisions (SW1, SW4)", n_pos);
    expect_count("-u0 decisions (SW2, SW3)", n_neg);
    expect_count("frames with parallel PI", n_frames_par);
    expect_count("frames with direct form I PI", n_frames_df1);
    expect_count("PI structure switches", n_mode_sw);
    expect_count("frames with saturation", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
