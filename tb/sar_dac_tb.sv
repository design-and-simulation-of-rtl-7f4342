// sar_dac_tb: self-checking test of the DAC.
// For every code at the default 8 bits and VREF = 3300 the output must equal
// the sum of the binary bit weights VREF/2^(RES-k), truncated, worked out
// here with 64-bit integer arithmetic; the output must rise monotonically,
// and the codes for 1/4, 1/2 and 3/4 of full scale must give 825, 1650 and
// 2475. A second instance with RES = 4 checks the 16-level staircase.
module sar_dac_tb;
  localparam int unsigned RES = 8, AW = 12, VREF = 3300;
  int checks = 0, failures = 0;
  logic [RES-1:0] code;
  logic [AW-1:0]  vdac;
  logic [3:0]     code4;
  logic [AW-1:0]  vdac4;
  longint         acc, prev;

  sar_dac dut (.code, .vdac);
  sar_dac #(.RES(4), .AW(AW), .VREF(VREF)) dut4 (.code(code4), .vdac(vdac4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = -1;
    for (int c = 0; c < (1 << RES); c++) begin
      code = RES'(c); #1;
      // Scaled sum of bit weights: VREF * 2^k, then divide by 2^RES.
      acc = 0;
      for (int k = 0; k < RES; k++) if (c[k]) acc += longint'(VREF) << k;
      acc = acc / (longint'(1) << RES);
      checks++;
      if (longint'(vdac) != acc) begin failures++; $display("code %0d: vdac %0d expected %0d", c, vdac, acc); end
      checks++;
      if (longint'(vdac) < prev) begin failures++; $display("code %0d: not monotonic", c); end
      prev = longint'(vdac);
    end
    code = 8'd64;  #1; checks++; if (vdac != 825)  begin failures++; $display("1/4 Vref: %0d", vdac); end
    code = 8'd128; #1; checks++; if (vdac != 1650) begin failures++; $display("1/2 Vref: %0d", vdac); end
    code = 8'd192; #1; checks++; if (vdac != 2475) begin failures++; $display("3/4 Vref: %0d", vdac); end
    for (int c = 0; c < 16; c++) begin
      code4 = 4'(c); #1;
      checks++;
      if (longint'(vdac4) != (longint'(c) * VREF) / 16) begin
        failures++; $display("4-bit code %0d: vdac %0d", c, vdac4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
