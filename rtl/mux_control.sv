// mux_control: sequencer of the shared A/D converter.
//
// One A/D converter serves the three analog signals w* (speed reference),
// w (speed) and i (armature current) through an external analog
// multiplexer. A frame has N_SLOTS = 4 slots: w*, w, i and one idle slot.
// Each slot lasts SLOT_CYCLES clock cycles. During slot k the mux address
// sel = {bit1, bit0} equals k, and in the last cycle of slot k the strobe
// tap[k] is high for one cycle so that the de-multiplexer can latch the A/D
// word. tap[N_SLOTS-1] (the idle slot) marks the end of a frame, when
// fresh w*, w and i are all held: it is the 40 kHz strobe for the control
// logic. With SLOT_CYCLES = 1 the clock is 4 x 40 kHz = 160 kHz.
//
// The outputs tap0..tap3, bit1, bit0 follow the original controller block;
// the slot counter inside, the slot order and the use of tap3 as frame
// strobe are this design's choices. Reset (synchronous, high) restarts at
// slot 0, cycle 0.
module mux_control #(
  parameter int unsigned SLOT_CYCLES = 1,
  parameter int unsigned N_SLOTS     = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  output logic [$clog2(N_SLOTS)-1:0] sel,
  output logic [N_SLOTS-1:0]         tap
);

  localparam int unsigned CW = (SLOT_CYCLES > 1) ? $clog2(SLOT_CYCLES) : 1;

  logic [CW-1:0] cyc;
  logic          slot_end;

  assign slot_end = (cyc == CW'(SLOT_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc <= '0;
      sel <= '0;
    end else if (slot_end) begin
      cyc <= '0;
      sel <= (sel == $bits(sel)'(N_SLOTS - 1)) ? '0 : sel + 1'b1;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

  always_comb begin
    tap = '0;
    if (slot_end) tap[sel] = 1'b1;
  end

endmodule
