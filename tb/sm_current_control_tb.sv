// sm_current_control_tb: tests the sliding-mode current controller.
// After reset all switches must be off until the first 40 kHz strobe. Then
// random i* and i are applied with a strobe every fourth cycle (as in the
// drive); after each strobe the switches must show +u0 (SW1, SW4 on) when
// i* > i and -u0 (SW2, SW3 on) otherwise, and they must not change between
// strobes. Both polarities and the i* = i case must occur.
module sm_current_control_tb;
  logic               clk = 0, rst = 1, en = 0;
  logic signed [15:0] i_ref = '0, i = '0;
  logic               pwm_pos, pwm_neg;
  logic [3:0]         sw;
  int checks = 0, failures = 0;
  int npos = 0, nneg = 0, nequal = 0;
  logic [3:0] expected;

  sm_current_control dut (.clk, .rst, .en, .i_ref, .i, .pwm_pos, .pwm_neg, .sw);

  always #5 clk = ~clk;

  task automatic check_sw(input logic [3:0] exp_sw, input string tag);
    checks++;
    if (sw != exp_sw || pwm_pos != exp_sw[0] || pwm_neg != exp_sw[1]) begin
      failures++;
      $display("FAIL %s: sw=%b pwm=%b%b expected %b", tag, sw, pwm_pos, pwm_neg, exp_sw);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 6; n++) begin
      i_ref = 16'($urandom); i = 16'($urandom);
      @(posedge clk);
      #1 check_sw(4'b0000, "before first decision");
    end
    expected = 4'b0000;
    for (int n = 0; n < 4000; n++) begin
      automatic bit strobe = (n % 4 == 3);
      automatic int pick = $urandom_range(0, 9);
      i_ref = 16'(int'($urandom_range(0, 1000)) - 500);
      i     = (pick == 0) ? i_ref : 16'(int'($urandom_range(0, 1000)) - 500);
      en    = strobe;
      #1;
      if (strobe) begin
        if (i_ref > i) begin expected = 4'b1001; npos++; end
        else begin
          expected = 4'b0110; nneg++;
          if (i_ref == i) nequal++;
        end
      end
      @(posedge clk);
      #1 check_sw(expected, strobe ? "after strobe" : "hold");
    end
    checks += 3;
    if (npos == 0)   begin failures++; $display("FAIL no +u0 decision"); end
    if (nneg == 0)   begin failures++; $display("FAIL no -u0 decision"); end
    if (nequal == 0) begin failures++; $display("FAIL i* = i never tested"); end
    // reset turns the bridge off again
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    check_sw(4'b0000, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
