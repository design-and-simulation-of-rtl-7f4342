// output_register: parallel result register of the SAR ADC.
//
// Copies the finished SAR code `d` into `q` on a clock edge with `load`
// high and holds it there until the next conversion completes, so the
// binary digital output stays stable while the SAR register is already
// working on the next sample. Reset (asynchronous, active low) clears it.
module output_register #(
  parameter int unsigned RES = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [RES-1:0] d,
  output logic [RES-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
