// adc_pkg: types and constants shared by the SAR ADC blocks.
//
// The conversion sequencer walks through four states: IDLE (waiting for
// Start), SAMPLE (the sample & hold tracks the input for one clock), CONV
// (one bit decision per clock, MSB first) and DONE (the finished code is
// copied into the output register). The serial interface frames every
// result with a fixed two-bit header; the header value is this design's own
// choice, used by a receiver to find the start of a frame.
package adc_pkg;

  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,
    ST_SAMPLE = 2'd1,
    ST_CONV   = 2'd2,
    ST_DONE   = 2'd3
  } sar_state_t;

  localparam int unsigned FRAME_HDR_W = 2;
  localparam logic [FRAME_HDR_W-1:0] FRAME_HDR = 2'b10;

endpackage
