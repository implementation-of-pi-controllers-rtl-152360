// adc_demux_tb: feeds random A/D codes and random capture strobes (none or
// one of tap0..tap2 per cycle, plus a few cycles with all three) to the
// de-multiplexer. A model keeps the last code latched per channel; after
// every clock edge w*, w and i must equal that code minus 512 (offset
// binary), left-justified in 16 bits (times 64). Channels must hold between their strobes.
module adc_demux_tb;
  logic               clk = 0, rst = 1;
  logic [9:0]         ad_data = '0;
  logic [2:0]         tap = '0;
  logic signed [15:0] w_ref, w, i;
  int checks = 0, failures = 0;
  int held [3];

  adc_demux dut (.clk, .rst, .ad_data, .tap, .w_ref, .w, .i);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (held[k]) held[k] = 0;
    @(posedge clk);
    #1;
    rst = 0;
    // after reset every register holds code 0, i.e. -512 * 64
    checks += 3;
    if (w_ref != -16'sd32768 || w != -16'sd32768 || i != -16'sd32768) begin
      failures++;
      $display("FAIL after reset: %0d %0d %0d", w_ref, w, i);
    end
    for (int n = 0; n < 3000; n++) begin
      automatic int pick = $urandom_range(0, 4);
      ad_data = 10'($urandom);
      tap = (pick < 3) ? 3'(1 << pick) : (pick == 3 ? 3'b000 : 3'b111);
      @(posedge clk);
      for (int k = 0; k < 3; k++) if (tap[k]) held[k] = int'(ad_data);
      #1;
      checks += 3;
      if (int'(w_ref) != (held[0] - 512) * 64 || int'(w) != (held[1] - 512) * 64 ||
          int'(i) != (held[2] - 512) * 64) begin
        failures++;
        $display("FAIL cycle %0d: %0d %0d %0d expected %0d %0d %0d", n, w_ref, w, i,
                 (held[0] - 512) * 64, (held[1] - 512) * 64, (held[2] - 512) * 64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
