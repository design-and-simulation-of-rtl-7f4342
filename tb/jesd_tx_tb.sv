// jesd_tx_tb: self-checking test of the serial transmitter.
// A reference counter of the bits left in the current frame predicts ready,
// overrun and ser_valid every cycle; a receiver built here collects each
// frame from ser_sof, checks the 2'b10 header and compares the data with the
// words the reference accepted, in order. Scenarios: one isolated word,
// words loaded on the last bit of the previous frame (no gap allowed), a
// load in mid-frame (must be dropped with overrun), and 3000 cycles of
// random loads. Also checks that ser_data is 0 between frames.
module jesd_tx_tb;
  localparam int unsigned DW = 8, FL = DW + 2;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [DW-1:0] data = '0;
  logic ser_data, ser_valid, ser_sof, ready, overrun;
  int checks = 0, failures = 0;

  jesd_tx #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference and receiver.
  logic [DW-1:0] sent_q[$];
  int left = 0;
  int rx_n = -1;
  logic [FL-1:0] rx;
  int frames = 0, overruns = 0, seamless = 0;
  logic prev_valid = 1'b0;

  // Evaluate the cycle whose inputs were set at the last negedge.
  task automatic cycle();
    #1;
    checks++;
    if (ready !== (left <= 1) || overrun !== (load && left > 1) || ser_valid !== (left > 0)
        || ser_sof !== (left == FL)) begin
      failures++;
      $display("%0t: left=%0d ready=%0b overrun=%0b valid=%0b sof=%0b", $time, left, ready,
               overrun, ser_valid, ser_sof);
    end
    if (!ser_valid) begin
      checks++;
      if (ser_data !== 1'b0) begin failures++; $display("%0t: data while idle", $time); end
    end
    if (ser_valid) begin
      if (ser_sof) begin
        rx_n = 0;
        if (prev_valid) seamless++;
      end
      if (rx_n >= 0) begin
        rx = {rx[FL-2:0], ser_data};
        rx_n++;
        if (rx_n == FL) begin
          checks++;
          frames++;
          if (sent_q.size() == 0) begin failures++; $display("unexpected frame %0h", rx); end
          else begin
            logic [DW-1:0] w;
            w = sent_q.pop_front();
            if (rx !== {2'b10, w}) begin failures++; $display("frame %0h expected %0h", rx, {2'b10, w}); end
          end
          rx_n = -1;
        end
      end
    end
    prev_valid = ser_valid;
    if (load && left <= 1) begin
      sent_q.push_back(data);
      left = FL;
    end else begin
      if (load) overruns++;
      if (left > 0) left--;
    end
  endtask

  task automatic step(input logic l, input logic [DW-1:0] d);
    @(negedge clk);
    load = l; data = d;
    cycle();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    step(1'b0, '0); step(1'b0, '0);
    // Isolated word.
    step(1'b1, 8'hA5);
    repeat (15) step(1'b0, '0);
    // Three words loaded on the last bit of the previous frame.
    step(1'b1, 8'h3C);
    repeat (FL - 1) step(1'b0, '0);
    step(1'b1, 8'hFF);
    repeat (FL - 1) step(1'b0, '0);
    step(1'b1, 8'h00);
    // Mid-frame load: dropped.
    repeat (3) step(1'b0, '0);
    step(1'b1, 8'h77);
    repeat (15) step(1'b0, '0);
    // Random.
    for (int i = 0; i < 3000; i++) step(($urandom_range(0, 5) == 0), DW'($urandom));
    repeat (2 * FL) step(1'b0, '0);
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("%0d frames never arrived", sent_q.size()); end
    checks++;
    if (frames < 100 || overruns == 0 || seamless < 2) begin
      failures++; $display("coverage: frames=%0d overruns=%0d seamless=%0d", frames, overruns, seamless);
    end
    $display("frames=%0d overruns=%0d seamless=%0d", frames, overruns, seamless);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
