// sar_dac: ideal binary-weighted DAC of the SAR loop.
//
// Turns the RES-bit trial code into the voltage it stands for,
//   vdac = floor(code * VREF / 2^RES),
// in the same AW-bit units as the input (VREF is the reference voltage in
// those units, 3300 = 3.3 V at 1 mV per unit by default). Bit k of the code
// therefore weighs VREF / 2^(RES-k): the MSB alone gives Vref/2, the next
// bit Vref/4, and so on, which produces the staircase of DAC levels that
// converges on the input during a conversion. The reference value and the
// truncation to whole units are this design's choices. Combinational.
module sar_dac #(
  parameter int unsigned RES  = 8,
  parameter int unsigned AW   = 12,
  parameter int unsigned VREF = 3300
) (
  input  logic [RES-1:0] code,
  output logic [AW-1:0]  vdac
);

  localparam logic [AW-1:0] VREF_L = AW'(VREF);

  // Full-width product, then drop the RES fraction bits.
  always_comb vdac = AW'(((RES+AW)'(code) * (RES+AW)'(VREF_L)) >> RES);

endmodule
