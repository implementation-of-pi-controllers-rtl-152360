// pi_drive_pkg: widths, sample type and slot numbering shared by the
// DC-motor speed drive.
//
// All control arithmetic runs on 16-bit two's complement words, as the
// design's data format prescribes; the A/D delivers 10-bit codes. The
// adders, subtractor and multipliers saturate rather than wrap round; that
// choice is this design's own.
package pi_drive_pkg;

  localparam int unsigned DATA_W = 16;  // processing word width
  localparam int unsigned ADC_W  = 10;  // A/D converter resolution

  typedef logic signed [DATA_W-1:0] sample_t;

  // Multiplexer slots of one 40 kHz frame, in the order the mux visits them.
  typedef enum logic [1:0] {
    SLOT_W_REF = 2'd0,  // speed reference w*
    SLOT_W     = 2'd1,  // measured speed w
    SLOT_I     = 2'd2,  // armature current i
    SLOT_IDLE  = 2'd3   // unused channel; its strobe closes the frame
  } slot_e;


endpackage
