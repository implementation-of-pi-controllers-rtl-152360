// mul16bit_tb: checks the signed fixed-point multiplier. The expected value
// is the exact product divided by 2^FRAC and rounded to the nearest integer
// (halves upward), then clipped to 16 bits, all computed in 64-bit integers.
// Random operands, small gains on large samples, and products that
// overflow in either direction. Runs the default FRAC = 12 and FRAC = 0.
module mul16bit_tb;
  logic signed [15:0] a, b, y12, y0;
  logic               sat12, sat0;
  int checks = 0, failures = 0;

  mul16bit #(.W(16))            dut12 (.a, .b, .y(y12), .sat(sat12));
  mul16bit #(.W(16), .FRAC(0))  dut0  (.a, .b, .y(y0),  .sat(sat0));

  // round(n / 2^frac), halves upward, with plain integer division
  function automatic longint round_div(input longint n, input int frac);
    longint d = longint'(1) << frac;
    longint m = 2 * n + d;          // 2n/d + 1 = 2(n/d + 1/2)
    longint q = m / (2 * d);        // rounds toward zero
    if ((m % (2 * d) != 0) && (m < 0)) q = q - 1;
    return q;
  endfunction

  task automatic cmp(input string tag, input longint got, input bit got_sat,
                     input longint prod, input int frac);
    longint q = round_div(prod, frac);
    longint e = (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
    bit     es = (q > 32767) || (q < -32768);
    checks++;
    if (got != e || got_sat != es) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: y=%0d sat=%0b expected %0d %0b", tag, a, b, got, got_sat, e, es);
    end
  endtask

  task automatic check(input logic signed [15:0] ta, input logic signed [15:0] tb_);
    longint prod;
    a = ta; b = tb_;
    #1;
    prod = longint'(ta) * longint'(tb_);
    cmp("FRAC12", longint'(y12), sat12, prod, 12);
    cmp("FRAC0",  longint'(y0),  sat0,  prod, 0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'sd4096, 16'sd1234);      // gain 1.0
    check(16'sd1, 16'sd2047);         // just below one half: 0
    check(16'sd1, 16'sd2048);         // exactly one half: rounds up to 1
    check(16'sd1, -16'sd2048);        // minus one half: rounds up to 0
    check(16'sd1, -16'sd2049);        // just past minus one half: -1
    check(-16'sd32768, -16'sd32768);  // largest positive product
    check(16'sd32767, -16'sd32768);
    check(16'sd2, 16'sd511);
    for (int n = 0; n < 2000; n++) check(16'($urandom), 16'($urandom));
    for (int n = 0; n < 1000; n++) check(16'(int'($urandom_range(0, 200)) - 100), 16'(int'($urandom_range(0, 1023)) - 512));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
