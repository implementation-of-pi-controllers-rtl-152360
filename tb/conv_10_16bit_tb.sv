// conv_10_16bit_tb: applies every 10-bit code to the converter, in the
// default offset-binary coding and in two's complement coding, and compares
// with the value the code stands for (code - 512, or the 10-bit signed
// value) placed in the top ten bits of the 16-bit word, i.e. times 64.
module conv_10_16bit_tb;
  logic [9:0]         ad;
  logic signed [15:0] x_ob, x_tc;
  int checks = 0, failures = 0;

  conv_10_16bit                           dut_ob (.ad, .x(x_ob));
  conv_10_16bit #(.OFFSET_BINARY(1'b0))   dut_tc (.ad, .x(x_tc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1024; c++) begin
      int exp_ob, exp_tc;
      ad = 10'(c);
      #1;
      exp_ob = (c - 512) * 64;
      exp_tc = ((c >= 512) ? c - 1024 : c) * 64;
      checks += 2;
      if (int'(x_ob) != exp_ob) begin
        failures++;
        $display("FAIL offset binary code %0d: %0d expected %0d", c, x_ob, exp_ob);
      end
      if (int'(x_tc) != exp_tc) begin
        failures++;
        $display("FAIL two's complement code %0d: %0d expected %0d", c, x_tc, exp_tc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
