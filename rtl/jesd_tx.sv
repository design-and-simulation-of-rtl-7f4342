// jesd_tx: simplified JESD204B-style serial transmitter.
//
// Carries each parallel conversion result off the converter on one serial
// lane instead of DW parallel wires. A frame is a fixed HDR_W-bit header
// (default 2'b10) followed by the DW data bits, MSB first, one bit per clock:
//   frame = {HDR, data}, FL = HDR_W + DW bits.
// `ser_valid` is high while frame bits are on `ser_data` (which is 0
// otherwise) and `ser_sof` marks the first header bit. `ready` is high when
// the lane is idle or on the last bit of a frame; a `load` then starts the
// next frame on the following clock with no gap. A `load` while a frame is
// still in progress is dropped and flagged on `overrun` in the same cycle.
// Framing with a fixed header and plain serialisation is all the interface
// does: code-group synchronisation, 8b/10b coding, scrambling and multi-lane
// alignment of the full standard are left out, in line with the reduced
// control overhead the converter aims for. Header value, lane count and a
// bit clock equal to the conversion clock are this design's choices.
module jesd_tx
  import adc_pkg::*;
#(
  parameter int unsigned DW = 8,
  parameter int unsigned HDR_W = FRAME_HDR_W,
  parameter logic [HDR_W-1:0] HDR = FRAME_HDR,
  localparam int unsigned FL = HDR_W + DW,
  localparam int unsigned CW = $clog2(FL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [DW-1:0] data,
  output logic          ser_data,
  output logic          ser_valid,
  output logic          ser_sof,
  output logic          ready,
  output logic          overrun
);

  localparam logic [CW-1:0] LAST = CW'(FL - 1);

  logic [FL-1:0] sreg;
  logic [CW-1:0] cnt;
  logic          active;

  always_comb begin
    ready     = !active || (cnt == LAST);
    overrun   = load && !ready;
    ser_valid = active;
    ser_data  = active && sreg[FL-1];
    ser_sof   = active && (cnt == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg   <= '0;
      cnt    <= '0;
      active <= 1'b0;
    end else if (load && ready) begin
      sreg   <= {HDR, data};
      cnt    <= '0;
      active <= 1'b1;
    end else if (active) begin
      sreg <= sreg << 1;
      if (cnt == LAST) active <= 1'b0;
      else             cnt    <= cnt + 1'b1;
    end
  end

endmodule
