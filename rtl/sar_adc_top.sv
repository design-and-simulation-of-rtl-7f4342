// sar_adc_top: SAR analog-to-digital converter with a serial output lane.
//
// The input voltage (an unsigned AW-bit number, 1 mV per unit by default,
// full scale VREF) is converted to a RES-bit code by binary search:
//   sample_hold     captures vin while SAH is high and holds it;
//   sar_register    offers a trial code with the bit under test set;
//   sar_dac         turns the trial code into V_DAC = code*VREF/2^RES;
//   comparator      keeps the bit if vhold >= V_DAC, else it is reset;
//   timing_control  runs SAMPLE (1 clock), CONV (RES clocks, MSB first) and
//                   DONE (1 clock), then pulses EOC;
//   output_register holds the finished code on dout;
//   jesd_tx         frames each result as {2'b10, code} and shifts it out,
//                   MSB first, on ser_data.
// Timing: with Start high in an idle cycle, SAH follows in the next cycle,
// CONV for RES cycles after it, and EOC with the new dout RES+3 cycles after
// that idle cycle. Holding Start high converts back to back every RES+2
// clocks; a frame is also RES+2 bits long, so the lane carries one frame per
// conversion without gaps and never overruns. The result is the largest code
// whose DAC voltage does not exceed the sampled input. The block structure
// and the one-bit-per-clock search follow the converter's description; the
// number formats, resolution, reference, frame header and cycle-level timing
// are this design's choices.
module sar_adc_top #(
  parameter int unsigned RES  = 8,
  parameter int unsigned AW   = 12,
  parameter int unsigned VREF = 3300
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [AW-1:0]  vin,
  output logic           sah,
  output logic           conv,
  output logic [AW-1:0]  vdac,
  output logic [RES-1:0] dout,
  output logic           eoc,
  output logic           ser_data,
  output logic           ser_valid,
  output logic           ser_sof,
  output logic           ser_overrun
);

  localparam int unsigned IW = (RES > 1) ? $clog2(RES) : 1;

  logic [AW-1:0]  vhold;
  logic [RES-1:0] trial, code;
  logic [IW-1:0]  bit_idx;
  logic           keep, sar_clear, load, ser_ready;

  timing_control #(.RES(RES)) u_ctrl (
    .clk, .rst_n, .start,
    .sah, .sar_clear, .conv, .bit_idx, .load, .eoc
  );

  sample_hold #(.AW(AW)) u_sh (
    .clk, .rst_n, .sah, .vin, .vhold
  );

  sar_register #(.RES(RES)) u_sar (
    .clk, .rst_n, .clear(sar_clear), .decide(conv), .bit_idx, .keep,
    .trial, .code
  );

  sar_dac #(.RES(RES), .AW(AW), .VREF(VREF)) u_dac (
    .code(trial), .vdac
  );

  comparator #(.AW(AW)) u_cmp (
    .vin(vhold), .vdac, .keep
  );

  output_register #(.RES(RES)) u_out (
    .clk, .rst_n, .load, .d(code), .q(dout)
  );

  jesd_tx #(.DW(RES)) u_tx (
    .clk, .rst_n, .load(eoc), .data(dout),
    .ser_data, .ser_valid, .ser_sof, .ready(ser_ready), .overrun(ser_overrun)
  );

  // Results arrive no faster than one frame time, so the lane is always free.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) eoc |-> ser_ready);

endmodule
