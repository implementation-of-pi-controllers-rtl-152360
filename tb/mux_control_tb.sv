// mux_control_tb: runs the A/D sequencer with one clock per slot (the
// default, 160 kHz clock for 40 kHz per channel) and with three clocks per
// slot. Every cycle the mux address and the strobes are compared with the
// cycle count: address = (cycle / SLOT_CYCLES) mod 4, strobe k only in the
// last cycle of slot k. The number of strobes per channel is checked
// against the expected rate of one per 4*SLOT_CYCLES cycles, and a reset
// in mid-frame must restart at slot 0.
module mux_control_tb;
  logic       clk = 0, rst = 1;
  logic [1:0] sel1, sel3;
  logic [3:0] tap1, tap3;
  int checks = 0, failures = 0;
  int cyc = 0;
  int ntap1 [4], ntap3 [4];

  mux_control                    dut1 (.clk, .rst, .sel(sel1), .tap(tap1));
  mux_control #(.SLOT_CYCLES(3)) dut3 (.clk, .rst, .sel(sel3), .tap(tap3));

  always #5 clk = ~clk;

  task automatic expect_state(input int c, input int sc, input logic [1:0] sel,
                              input logic [3:0] tap, input string tag);
    int          slot = (c / sc) % 4;
    logic [3:0]  etap = ((c % sc) == sc - 1) ? (4'b1 << slot) : 4'b0;
    checks++;
    if (sel != 2'(slot) || tap != etap) begin
      failures++;
      $display("FAIL %s cycle %0d: sel=%0d tap=%b expected %0d %b", tag, c, sel, tap, slot, etap);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ntap1[k]) begin ntap1[k] = 0; ntap3[k] = 0; end
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (cyc = 0; cyc < 1200; cyc++) begin
      #1;
      expect_state(cyc, 1, sel1, tap1, "SC1");
      expect_state(cyc, 3, sel3, tap3, "SC3");
      for (int k = 0; k < 4; k++) begin
        ntap1[k] += int'(tap1[k]);
        ntap3[k] += int'(tap3[k]);
      end
      @(posedge clk);
    end
    for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (ntap1[k] != 1200 / 4)  begin failures++; $display("FAIL SC1 rate ch%0d: %0d", k, ntap1[k]); end
      if (ntap3[k] != 1200 / 12) begin failures++; $display("FAIL SC3 rate ch%0d: %0d", k, ntap3[k]); end
    end
    // reset in mid-frame
    repeat (5) @(posedge clk);
    #1 rst = 1;
    @(posedge clk);
    #1 rst = 0;
    for (cyc = 0; cyc < 40; cyc++) begin
      expect_state(cyc, 1, sel1, tap1, "SC1 after reset");
      expect_state(cyc, 3, sel3, tap3, "SC3 after reset");
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
