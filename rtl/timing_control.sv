// timing_control: conversion sequencer ("control logic") of the SAR ADC.
//
// A Moore state machine that turns a Start request into the control signals
// of one conversion:
//   SAMPLE  one clock: SAH high, the sample & hold loads the input and the
//           SAR register is cleared;
//   CONV    RES clocks: CONV high, one bit decision per clock, bit_idx
//           counting from RES-1 (MSB) down to 0 (LSB);
//   DONE    one clock: LOAD high, the finished code enters the output
//           register;
// EOC is a registered one-clock pulse in the cycle after DONE, the cycle in
// which the output register shows the new result. If Start is still high in
// DONE the next conversion begins straight away, so back-to-back conversions
// take RES+2 clocks each; otherwise the machine returns to IDLE. Start is
// ignored while a conversion runs. One bit per clock follows the converter's
// description; the single sample and done cycles, the back-to-back rule, the
// active-high polarities and the asynchronous active-low reset are this
// design's choices.
module timing_control
  import adc_pkg::*;
#(
  parameter int unsigned RES = 8,
  localparam int unsigned IW = (RES > 1) ? $clog2(RES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          sah,
  output logic          sar_clear,
  output logic          conv,
  output logic [IW-1:0] bit_idx,
  output logic          load,
  output logic          eoc
);

  localparam logic [IW-1:0] MSB_IDX = IW'(RES - 1);

  sar_state_t state, state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      ST_IDLE:   if (start) state_nx = ST_SAMPLE;
      ST_SAMPLE: state_nx = ST_CONV;
      ST_CONV:   if (bit_idx == '0) state_nx = ST_DONE;
      ST_DONE:   state_nx = start ? ST_SAMPLE : ST_IDLE;
      default:   state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      bit_idx <= MSB_IDX;
      eoc     <= 1'b0;
    end else begin
      state <= state_nx;
      eoc   <= (state == ST_DONE);
      if (state == ST_SAMPLE)                      bit_idx <= MSB_IDX;
      else if (state == ST_CONV && bit_idx != '0)  bit_idx <= bit_idx - 1'b1;
    end
  end

  always_comb begin
    sah       = (state == ST_SAMPLE);
    sar_clear = (state == ST_SAMPLE);
    conv      = (state == ST_CONV);
    load      = (state == ST_DONE);
  end

  // A conversion ends at most once every RES+2 clocks, so EOC never lasts
  // two cycles, and the bit index stays inside the code.
  a_eoc_pulse: assert property (@(posedge clk) disable iff (!rst_n) eoc |=> !eoc);
  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n) conv |-> bit_idx <= MSB_IDX);

endmodule
