// dff16bit: W-bit register with load enable and synchronous reset.
//
// The drive uses it in two roles: as the three capture latches of the A/D
// de-multiplexer (W=10, loaded by the slot strobes tap0..tap2) and as the
// one-sample delay elements of both PI controllers (W=16, loaded by the
// 40 kHz frame strobe). Where the original circuit clocks each register
// from a derived strobe, this version keeps one clock and uses the strobe as
// a load enable.
//
// Timing: q takes d at the rising clock edge where en is high; reset (high,
// synchronous) clears q to zero.
module dff16bit #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
