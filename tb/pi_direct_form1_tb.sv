// pi_direct_form1_tb: tests the direct form I PI controller.
//  1. Step response: with a constant error E, i*[n] = M0 + n*(M0 + M1),
//     M0 = round(b0*E/4096), M1 = round(b1*E/4096).
//  2. Random errors and coefficients, strobe on about half of the cycles,
//     against a model of y[n] = b0 e[n] + b1 e[n-1] + y[n-1] with 16-bit
//     saturation at each stage; the state must hold without the strobe.
//  3. Agreement with the parallel form: for b0 = ki + kp and b1 = ki - kp
//     both forms describe the same controller; on a slowly varying error
//     the two outputs, from separate instances, must stay within a few LSB.
//  4. Saturation: a negative runaway clamps at -32768 and raises sat.
module pi_direct_form1_tb;
  logic               clk = 0, rst = 1, en = 0;
  logic signed [15:0] b0 = '0, b1 = '0, e = '0, i_ref;
  logic signed [15:0] kp = '0, ki = '0, i_ref_par;
  logic               sat, sat_par;
  int checks = 0, failures = 0;
  longint m_ed, m_yd;

  pi_direct_form1 dut (.clk, .rst, .en, .b0, .b1, .e, .i_ref, .sat);
  pi_parallel     ref_par (.clk, .rst, .en, .kp, .ki, .e, .i_ref(i_ref_par), .sat(sat_par));

  always #5 clk = ~clk;

  function automatic longint clip(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  // floor(n / d) for d > 0
  function automatic longint fdiv(input longint n, input longint d);
    longint q = n / d;
    if ((n % d != 0) && (n < 0)) q -= 1;
    return q;
  endfunction
  // gain * sample, rounded to nearest (halves up) at 12 fraction bits
  function automatic longint fmul(input longint g, input longint x);
    return clip(fdiv(g * x + 2048, 4096));
  endfunction

  task automatic do_reset();
    rst = 1; en = 0;
    @(posedge clk);
    #1 rst = 0;
    m_ed = 0; m_yd = 0;
  endtask

  task automatic step(input logic signed [15:0] te, input bit ten, output longint got);
    longint y;
    e = te; en = ten;
    #1;
    y   = clip(fmul(b0, te) + clip(fmul(b1, m_ed) + m_yd));
    got = longint'(i_ref);
    checks++;
    if (got != y) begin
      failures++;
      $display("FAIL e=%0d b0=%0d b1=%0d: i_ref=%0d expected %0d", te, b0, b1, i_ref, y);
    end
    @(posedge clk);
    if (ten) begin m_ed = te; m_yd = y; end
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint got, M0, M1;
    int     worst;
    // 1. step response
    b0 = 16'sd5037; b1 = -16'sd4963;
    do_reset();
    M0 = fdiv(5037 * 300 + 2048, 4096);
    M1 = fdiv(-4963 * 300 + 2048, 4096);
    for (int n = 0; n < 40; n++) begin
      step(16'sd300, 1'b1, got);
      checks++;
      if (got != M0 + n * (M0 + M1)) begin
        failures++;
        $display("FAIL step n=%0d: %0d expected %0d", n, got, M0 + n * (M0 + M1));
      end
    end
    // 2. random
    for (int r = 0; r < 20; r++) begin
      b0 = 16'(int'($urandom_range(0, 16000)) - 8000);
      b1 = 16'(int'($urandom_range(0, 16000)) - 8000);
      do_reset();
      for (int n = 0; n < 100; n++)
        step(16'(int'($urandom_range(0, 2046)) - 1023), 1'($urandom_range(0, 1)), got);
    end
    // 3. agreement with the parallel form on a slow ramp-and-hold error
    kp = 16'sd4096; ki = 16'sd64;
    b0 = ki + kp;   b1 = ki - kp;
    do_reset();
    worst = 0;
    for (int n = 0; n < 200; n++) begin
      automatic logic signed [15:0] te = (n < 100) ? 16'(n * 2) : 16'sd200;
      step(te, 1'b1, got);
      if (int'(i_ref - i_ref_par) > worst)  worst = int'(i_ref - i_ref_par);
      if (int'(i_ref_par - i_ref) > worst)  worst = int'(i_ref_par - i_ref);
    end
    $display("parallel and direct form I differ by at most %0d LSB (final %0d vs %0d)", worst, i_ref, i_ref_par);
    checks++;
    if (worst > 4) begin failures++; $display("FAIL forms differ by %0d LSB", worst); end
    // 4. saturation
    b0 = 16'sd4096; b1 = 16'sd4096;
    do_reset();
    for (int n = 0; n < 40; n++) step(-16'sd1000, 1'b1, got);
    checks += 2;
    if (i_ref != -16'sd32768) begin failures++; $display("FAIL clamp: %0d", i_ref); end
    if (!sat)                begin failures++; $display("FAIL clamp: sat not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
