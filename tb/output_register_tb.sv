// output_register_tb: self-checking test of the output register. Applies
// random data with load randomly high or low for 2000 clocks and checks that
// q changes only after a clock with load high, to the value then on d.
module output_register_tb;
  localparam int unsigned RES = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [RES-1:0] d = '0, q, expected;
  int checks = 0, failures = 0;

  output_register #(.RES(RES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (q !== '0) begin failures++; $display("reset value %0h", q); end
    expected = '0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 4) == 0);
      d = RES'($urandom);
      if (load) expected = d;
      @(posedge clk); #1;
      checks++;
      if (q !== expected) begin failures++; $display("cycle %0d: q=%0h expected %0h", i, q, expected); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
