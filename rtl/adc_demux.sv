// adc_demux: de-multiplexer of the shared A/D converter.
//
// The A/D output ad_data carries w*, w and i one after the other. Three
// 10-bit capture registers (dff16bit) latch it on the slot strobes
// tap[0] (w*), tap[1] (w) and tap[2] (i) from mux_control; each register is
// followed by conv_10_16bit, which makes a 16-bit two's complement sample.
// The outputs therefore change one clock after their strobe and hold until
// the same slot of the next frame. Structure as in the original design;
// the slot order is this design's choice. Reset clears the registers (the
// outputs then show the conversion of code 0).
module adc_demux
  import pi_drive_pkg::*;
#(
  parameter bit OFFSET_BINARY = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ADC_W-1:0] ad_data,
  input  logic [2:0]       tap,
  output sample_t          w_ref,
  output sample_t          w,
  output sample_t          i
);

  logic [ADC_W-1:0] raw [3];
  sample_t          conv [3];

  for (genvar k = 0; k < 3; k++) begin : g_ch
    dff16bit #(.W(ADC_W)) u_latch (
      .clk, .rst, .en(tap[k]), .d(ad_data), .q(raw[k])
    );
    conv_10_16bit #(.IN_W(ADC_W), .OUT_W(DATA_W), .OFFSET_BINARY(OFFSET_BINARY)) u_conv (
      .ad(raw[k]), .x(conv[k])
    );
  end

  assign w_ref = conv[SLOT_W_REF];
  assign w     = conv[SLOT_W];
  assign i     = conv[SLOT_I];

endmodule
