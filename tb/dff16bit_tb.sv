// dff16bit_tb: drives the enabled register with random data, enable and
// occasional reset, and compares q after each clock edge with a register
// kept in the testbench.
module dff16bit_tb;
  logic        clk = 0, rst = 1, en = 0;
  logic [15:0] d = '0, q, model;
  int checks = 0, failures = 0;

  dff16bit #(.W(16)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      rst = ($urandom_range(0, 99) == 0);
      en  = $urandom_range(0, 1);
      d   = 16'($urandom);
      @(posedge clk);
      if (rst) model = '0;
      else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
