// sub16bit_tb: checks the saturating 16-bit subtractor (speed comparison) against a wide integer
// reference: random operands, the four range corners and differences just past
// either limit. Combinational block, so the test steps in time only to
// let the outputs settle.
module sub16bit_tb;
  logic signed [15:0] a, b, y;
  logic               sat;
  int checks = 0, failures = 0;

  sub16bit #(.W(16)) dut (.a, .b, .y, .sat);

  task automatic check(input logic signed [15:0] ta, input logic signed [15:0] tb_);
    longint ref_sum, exp_y;
    bit     exp_sat;
    a = ta; b = tb_;
    #1;
    ref_sum = longint'(ta) - longint'(tb_);
    exp_sat = (ref_sum > 32767) || (ref_sum < -32768);
    exp_y   = (ref_sum > 32767) ? 32767 : (ref_sum < -32768) ? -32768 : ref_sum;
    checks++;
    if (longint'(y) != exp_y || sat != exp_sat) begin
      failures++;
      $display("FAIL %0d - %0d: y=%0d sat=%0b expected %0d %0b", ta, tb_, y, sat, exp_y, exp_sat);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'sd32767, -16'sd1);
    check(-16'sd32768, 16'sd1);
    check(16'sd32767, 16'sd1);
    check(-16'sd32768, -16'sd1);
    check(16'sd32767, -16'sd32768);
    check(16'sd16384, 16'sd16383);
    check(16'sd16384, 16'sd16384);
    check(-16'sd16384, -16'sd16384);
    check(-16'sd16384, -16'sd16385);
    check(16'sd0, 16'sd0);
    for (int n = 0; n < 2000; n++) check(16'($urandom), 16'($urandom));
    for (int n = 0; n < 500; n++)  check(16'(int'($urandom_range(0, 2000)) - 1000), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
