// comparator: decision element of the SAR ADC.
//
// Compares the held input voltage with the DAC output for the current trial
// code, both as unsigned AW-bit numbers in the same units. `keep` is high
// when the input is at least the DAC voltage, telling the SAR register to
// retain the bit under test; low means the trial overshot and the bit is
// reset. A tie keeps the bit (this design's choice), so the final code is the
// largest one whose DAC voltage does not exceed the input. Purely
// combinational; the result is used in the same clock cycle.
module comparator #(
  parameter int unsigned AW = 12
) (
  input  logic [AW-1:0] vin,
  input  logic [AW-1:0] vdac,
  output logic          keep
);

  always_comb keep = (vin >= vdac);

endmodule
