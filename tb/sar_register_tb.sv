// sar_register_tb: self-checking test of the successive approximation
// register. Runs 500 random conversions: clear, then RES decisions from the
// MSB down with random comparator results, checking before each decision that
// the trial code is the decided bits with the bit under test set, and after
// the last that the code holds exactly the kept bits. Idle cycles with
// neither clear nor decide must leave the code alone.
module sar_register_tb;
  localparam int unsigned RES = 8, IW = 3;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, decide = 1'b0, keep = 1'b0;
  logic [IW-1:0]  bit_idx = '0;
  logic [RES-1:0] trial, code;
  logic [RES-1:0] model;
  int checks = 0, failures = 0;

  sar_register #(.RES(RES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++; if (code !== '0) begin failures++; $display("reset code %0h", code); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk) clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      model = '0;
      checks++; if (code !== '0) begin failures++; $display("clear failed: %0h", code); end
      for (int b = RES - 1; b >= 0; b--) begin
        bit_idx = IW'(b);
        decide  = 1'b1;
        keep    = 1'($urandom);
        #1;
        checks++;
        if (trial !== (model | (RES'(1) << b))) begin
          failures++; $display("trial %0h expected %0h", trial, model | (RES'(1) << b));
        end
        if (keep) model = model | (RES'(1) << b);
        @(negedge clk);
      end
      decide = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      checks++;
      if (code !== model) begin failures++; $display("final code %0h expected %0h", code, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
