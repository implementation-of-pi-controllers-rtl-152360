// pi_parallel_tb: tests the parallel-structure PI controller.
//  1. Step response: with a constant error E the output must follow the
//     closed form i*[n] = P + (2n+1)*X, P = round(kp*E/4096),
//     X = round(ki*E/4096) (trapezoidal integration of a step).
//  2. Random errors and gains, strobe on about half of the cycles, against
//     a stage-by-stage model with 16-bit saturation in 64-bit integers;
//     without the strobe the state must not move.
//  3. Windup: a large error drives the integrator into the positive limit,
//     i_ref clamps at 32767 and sat is raised.
module pi_parallel_tb;
  logic               clk = 0, rst = 1, en = 0;
  logic signed [15:0] kp = '0, ki = '0, e = '0, i_ref;
  logic               sat;
  int checks = 0, failures = 0;
  longint m_xd, m_int;  // model state: x[n-1], I[n-1]

  pi_parallel dut (.clk, .rst, .en, .kp, .ki, .e, .i_ref, .sat);

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
    m_xd = 0; m_int = 0;
  endtask

  // One cycle: apply inputs, compare the combinational output, clock.
  task automatic step(input logic signed [15:0] te, input bit ten, output longint got);
    longint x, integ, y;
    e = te; en = ten;
    #1;
    x     = fmul(ki, te);
    integ = clip(x + clip(m_xd + m_int));
    y     = clip(fmul(kp, te) + integ);
    got   = longint'(i_ref);
    checks++;
    if (got != y) begin
      failures++;
      $display("FAIL e=%0d kp=%0d ki=%0d: i_ref=%0d expected %0d", te, kp, ki, i_ref, y);
    end
    @(posedge clk);
    if (ten) begin m_xd = x; m_int = integ; end
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
    longint got, P, X;
    // 1. step response against the closed form
    kp = 16'sd5000; ki = 16'sd37;
    do_reset();
    P = fdiv(5000 * 300 + 2048, 4096);
    X = fdiv(37 * 300 + 2048, 4096);
    for (int n = 0; n < 40; n++) begin
      step(16'sd300, 1'b1, got);
      checks++;
      if (got != P + (2 * n + 1) * X) begin
        failures++;
        $display("FAIL step n=%0d: %0d expected %0d", n, got, P + (2 * n + 1) * X);
      end
    end
    // 2. random
    for (int r = 0; r < 20; r++) begin
      kp = 16'(int'($urandom_range(0, 16000)) - 8000);
      ki = 16'(int'($urandom_range(0, 400)) - 200);
      do_reset();
      for (int n = 0; n < 100; n++)
        step(16'(int'($urandom_range(0, 2046)) - 1023), 1'($urandom_range(0, 1)), got);
    end
    // 3. windup into the positive limit
    kp = 16'sd4096; ki = 16'sd4096;
    do_reset();
    for (int n = 0; n < 40; n++) step(16'sd1000, 1'b1, got);
    checks += 2;
    if (i_ref != 16'sd32767) begin failures++; $display("FAIL windup: %0d", i_ref); end
    if (!sat)               begin failures++; $display("FAIL windup: sat not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
