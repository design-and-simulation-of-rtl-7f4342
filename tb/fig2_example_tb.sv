// fig2_example_tb: the 4-bit textbook conversion run on the whole converter.
//
// With RES = 4 and an input between a quarter and a half of Vref (1100 mV
// of 3300 mV), the binary search must try the MSB (V_DAC = Vref/2 = 1650,
// reset: bit 3 = 0), then bit 2 (825, kept: 1), bit 1 (1237, reset: 0) and
// bit 0 (1031, kept: 1), ending at 0101. The test checks that V_DAC
// staircase cycle by cycle, the code on dout at EOC, the conversion time of
// one clock per bit, and the serial frame {2'b10, 0101}. It then repeats the
// check for every input level from 0 to 3400 against the 16 DAC thresholds.
module fig2_example_tb;
  localparam int unsigned RES = 4, AW = 12, VREF = 3300;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW-1:0] vin = '0, vdac;
  logic [RES-1:0] dout;
  logic sah, conv, eoc, ser_data, ser_valid, ser_sof, ser_overrun;
  int checks = 0, failures = 0;

  sar_adc_top #(.RES(RES), .AW(AW), .VREF(VREF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input int v, output int code, output int stairs[RES], output int ncycles);
    int k;
    @(negedge clk) start = 1'b1; vin = AW'(v);
    @(negedge clk) start = 1'b0;
    k = 0; ncycles = 0;
    while (!eoc) begin
      @(negedge clk);
      if (conv) begin
        if (k < RES) stairs[k] = int'(vdac);
        k++;
        ncycles++;
      end
    end
    code = int'(dout);
  endtask

  initial begin
    int code, n, stairs[RES];
    int exp_stairs[RES] = '{1650, 825, 1237, 1031};
    logic [RES+1:0] frame;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      convert(1100, code, stairs, n);
      begin
        @(posedge ser_sof);
        for (int i = 0; i < RES + 2; i++) begin
          @(negedge clk);
          frame = {frame[RES:0], ser_data};
        end
      end
    join
    for (int i = 0; i < RES; i++) begin
      checks++;
      if (stairs[i] != exp_stairs[i]) begin failures++; $display("step %0d: V_DAC %0d expected %0d", i, stairs[i], exp_stairs[i]); end
    end
    checks++; if (code != 4'b0101) begin failures++; $display("code %b expected 0101", code); end
    checks++; if (n != RES) begin failures++; $display("%0d CONV cycles, expected %0d", n, RES); end
    checks++; if (frame !== 6'b10_0101) begin failures++; $display("frame %b", frame); end
    for (int v = 0; v <= 3400; v += 7) begin
      int e;
      e = 0;
      for (int c = 1; c < 16; c++) if ((c * VREF) / 16 <= v) e = c;
      convert(v, code, stairs, n);
      checks++;
      if (code != e) begin failures++; $display("vin %0d: code %0d expected %0d", v, code, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
