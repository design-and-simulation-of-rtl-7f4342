// sar_register: successive approximation register.
//
// Holds the bits already decided in `code` and presents to the DAC the
// trial code `trial`: the decided bits with the bit under test (`bit_idx`)
// forced to 1. On a clock edge with `decide` high the bit under test takes
// the comparator's verdict `keep` (retained when 1, reset when 0); the
// controller steps `bit_idx` from RES-1 (MSB) down to 0 (LSB), one bit per
// clock, so after RES decisions `code` is the conversion result. `clear`
// (ahead of a conversion) zeroes all bits. The trial bit is formed
// combinationally from the index rather than stored; that is this design's
// choice. Reset is asynchronous, active low.
module sar_register #(
  parameter int unsigned RES = 8,
  localparam int unsigned IW = (RES > 1) ? $clog2(RES) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           decide,
  input  logic [IW-1:0]  bit_idx,
  input  logic           keep,
  output logic [RES-1:0] trial,
  output logic [RES-1:0] code
);

  logic [RES-1:0] test_bit;

  always_comb begin
    test_bit = '0;
    test_bit[bit_idx] = 1'b1;
    trial = code | test_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      code <= '0;
    else if (clear)  code <= '0;
    else if (decide) code[bit_idx] <= keep;
  end

endmodule
