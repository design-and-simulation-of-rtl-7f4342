// timing_control_tb: self-checking test of the conversion sequencer.
// Checks, clock by clock, the control sequence after a single Start pulse:
// one SAH cycle, RES CONV cycles with bit_idx counting down from the MSB,
// one LOAD cycle and then EOC RES+3 cycles after the Start cycle, with a
// return to idle. A Start pulse in the middle of a conversion must not
// disturb it. With Start held high, conversions must follow each other every
// RES+2 clocks. Run at RES = 8 and RES = 4.
module timing_control_tb;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic start8 = 1'b0, start4 = 1'b0;
  logic sah8, clr8, conv8, load8, eoc8; logic [2:0] idx8;
  logic sah4, clr4, conv4, load4, eoc4; logic [1:0] idx4;

  timing_control #(.RES(8)) dut8 (.clk, .rst_n, .start(start8), .sah(sah8), .sar_clear(clr8),
                                  .conv(conv8), .bit_idx(idx8), .load(load8), .eoc(eoc8));
  timing_control #(.RES(4)) dut4 (.clk, .rst_n, .start(start4), .sah(sah4), .sar_clear(clr4),
                                  .conv(conv4), .bit_idx(idx4), .load(load4), .eoc(eoc4));

  // Expected outputs for cycle k after the Start cycle (k = 1 is SAMPLE).
  task automatic expect_cycle(input int res, input int k, input logic sah, input logic clr,
                              input logic conv, input int idx, input logic load, input logic eoc);
    logic e_sah, e_conv, e_load, e_eoc;
    int e_idx;
    e_sah  = (k == 1);
    e_conv = (k >= 2 && k <= res + 1);
    e_idx  = res + 1 - k;
    e_load = (k == res + 2);
    e_eoc  = (k == res + 3);
    checks++;
    if (sah !== e_sah || clr !== e_sah || conv !== e_conv || load !== e_load || eoc !== e_eoc
        || (e_conv && idx != e_idx)) begin
      failures++;
      $display("RES=%0d k=%0d: sah=%0b clr=%0b conv=%0b idx=%0d load=%0b eoc=%0b", res, k,
               sah, clr, conv, idx, load, eoc);
    end
  endtask

  task automatic single8(input bit poke_mid);
    @(negedge clk) start8 = 1'b1;
    for (int k = 1; k <= 8 + 6; k++) begin
      @(negedge clk);
      start8 = poke_mid && (k == 4);
      expect_cycle(8, k, sah8, clr8, conv8, int'(idx8), load8, eoc8);
    end
  endtask

  task automatic single4();
    @(negedge clk) start4 = 1'b1;
    for (int k = 1; k <= 4 + 6; k++) begin
      @(negedge clk);
      start4 = 1'b0;
      expect_cycle(4, k, sah4, clr4, conv4, int'(idx4), load4, eoc4);
    end
  endtask

  initial begin
    int last, n;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (sah8 || conv8 || load8 || eoc8) begin failures++; $display("not idle after reset"); end
    end
    single8(1'b0);
    single8(1'b1);
    single4();
    // Back to back: Start held high.
    @(negedge clk) start8 = 1'b1; start4 = 1'b1;
    last = -1; n = 0;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      if (eoc8) begin
        if (last >= 0) begin
          checks++;
          if (c - last != 10) begin failures++; $display("RES=8 period %0d", c - last); end
          n++;
        end
        last = c;
      end
    end
    checks++; if (n < 10) begin failures++; $display("too few back-to-back EOCs: %0d", n); end
    @(negedge clk) start8 = 1'b0; start4 = 1'b0;
    repeat (20) @(negedge clk);
    checks++; if (sah8 || conv8 || sah4 || conv4) begin failures++; $display("did not return to idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // RES = 4 back-to-back period, counted alongside.
  int last4 = -1, cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (eoc4 && start4) begin
      if (last4 >= 0 && cyc - last4 < 20) begin
        checks++;
        if (cyc - last4 != 6) begin failures++; $display("RES=4 period %0d", cyc - last4); end
      end
      last4 = cyc;
    end
  end
endmodule
