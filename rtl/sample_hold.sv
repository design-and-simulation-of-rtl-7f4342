// sample_hold: sample & hold stage of the SAR ADC.
//
// The analog input is carried as an unsigned AW-bit number (one unit per
// millivolt by default). While `sah` is high the stage tracks `vin`, loading
// it on every rising clock edge; while `sah` is low `vhold` stays constant,
// so the input seen by the comparator cannot move during the bit decisions.
// The held value after the last SAH cycle is the value of `vin` at that
// clock edge. Modelling the stage as a loaded register is this design's
// choice; the behaviour (capture, then hold through the conversion) is the
// one the converter needs. Reset (asynchronous, active low) clears it to 0.
module sample_hold #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sah,
  input  logic [AW-1:0] vin,
  output logic [AW-1:0] vhold
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   vhold <= '0;
    else if (sah) vhold <= vin;
  end

endmodule
