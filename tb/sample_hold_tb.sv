// sample_hold_tb: self-checking test of the sample & hold stage.
// Drives random input values with SAH randomly high or low for 2000 clocks
// and checks that the held value follows the input only on clocks where SAH
// was high and otherwise stays constant. Also checks the reset value.
module sample_hold_tb;
  localparam int unsigned AW = 12;
  logic clk = 1'b0, rst_n = 1'b0, sah = 1'b0;
  logic [AW-1:0] vin = '0, vhold;
  int checks = 0, failures = 0;
  logic [AW-1:0] expected;

  sample_hold #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (vhold !== '0) begin failures++; $display("reset value %0d", vhold); end
    expected = '0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sah = ($urandom_range(0, 3) == 0);
      vin = AW'($urandom);
      if (sah) expected = vin;
      @(posedge clk); #1;
      checks++;
      if (vhold !== expected) begin
        failures++;
        $display("cycle %0d: sah=%0b vhold=%0d expected %0d", i, sah, vhold, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
