// sar_adc_top_tb: end-to-end test of the converter at its default size
// (RES = 8, AW = 12, VREF = 3300).
//
// The expected code of an input v is found here by plain search, as the
// largest code c with floor(c*VREF/2^RES) <= v, independently of the binary
// search in the design. A monitor watches the top's ports: the input value in
// each SAH cycle is the sample, EOC must follow it RES+2 cycles later with the
// expected code on dout, every CONV cycle's V_DAC is compared with the sample
// to count kept and reset bits (EOC of one conversion and SAH of the next
// share a cycle when Start is held, so EOC is handled first), and a serial receiver rebuilds each frame
// from ser_sof, checks the 2'b10 header and compares the data with the
// results in order. Stimulus: single Start pulses on edge values (zero, full
// scale, exact DAC levels, values above Vref) with the input moving during
// the conversion, then 600 back-to-back conversions of a sampled sine wave
// and random levels with Start held high. Each mechanism (single and
// back-to-back conversion, kept and reset bit, gap-free frames, zero and full
// scale codes, input moving while held) must occur at least once.
module sar_adc_top_tb;
  localparam int unsigned RES = 8, AW = 12, VREF = 3300;
  localparam int unsigned FL = RES + 2;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW-1:0] vin = '0, vdac;
  logic [RES-1:0] dout;
  logic sah, conv, eoc, ser_data, ser_valid, ser_sof, ser_overrun;
  int checks = 0, failures = 0;

  sar_adc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(input int v);
    int c;
    c = 0;
    for (int k = 0; k < (1 << RES); k++)
      if ((longint'(k) * VREF) / (longint'(1) << RES) <= longint'(v)) c = k;
    return c;
  endfunction

  // Monitor.
  int cyc = 0, sah_cyc = 0, held = 0;
  int exp_q[$];
  logic [RES-1:0] frame_q[$];
  int rx_n = -1;
  logic [FL-1:0] rx;
  logic prev_valid = 1'b0, prev_eoc_in_run = 1'b0;
  int n_single = 0, n_b2b = 0, n_kept = 0, n_reset = 0, n_frames = 0, n_seamless = 0;
  int n_zero = 0, n_full = 0, n_moved = 0, n_conv = 0;
  int conv_gap = 0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    checks++;
    if (ser_overrun) begin failures++; $display("%0d: serial overrun", cyc); end
    if (conv) begin
      if (int'(vin) != held) n_moved++;
      if (held >= int'(vdac)) n_kept++; else n_reset++;
    end
    if (eoc) begin
      int e;
      n_conv++;
      checks++;
      if (cyc - sah_cyc != RES + 2) begin
        failures++; $display("%0d: EOC %0d cycles after SAH, expected %0d", cyc, cyc - sah_cyc, RES + 2);
      end
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("%0d: EOC without a sample", cyc); end
      else begin
        e = exp_q.pop_front();
        if (int'(dout) != e) begin failures++; $display("%0d: dout %0d expected %0d (vin %0d)", cyc, dout, e, held); end
        if (e == 0) n_zero++;
        if (e == (1 << RES) - 1) n_full++;
      end
      frame_q.push_back(dout);
    end
    if (sah) begin
      if (cyc - sah_cyc == FL && n_conv > 0) n_b2b++; else n_single++;
      sah_cyc = cyc;
      held = int'(vin);
      exp_q.push_back(ref_code(int'(vin)));
    end
    if (ser_valid) begin
      if (ser_sof) begin
        rx_n = 0;
        if (prev_valid) n_seamless++;
      end
      if (rx_n >= 0) begin
        rx = {rx[FL-2:0], ser_data};
        rx_n++;
        if (rx_n == FL) begin
          n_frames++;
          checks++;
          if (frame_q.size() == 0) begin failures++; $display("%0d: unexpected frame", cyc); end
          else begin
            logic [RES-1:0] w;
            w = frame_q.pop_front();
            if (rx !== {2'b10, w}) begin failures++; $display("%0d: frame %0h expected %0h", cyc, rx, {2'b10, w}); end
          end
          rx_n = -1;
        end
      end
    end
    prev_valid = ser_valid;
  end

  task automatic single(input int v);
    @(negedge clk) start = 1'b1; vin = AW'(v);
    @(negedge clk) start = 1'b0;
    // vin is now being sampled; move it around afterwards.
    repeat (RES + 6) begin
      @(negedge clk);
      vin = AW'($urandom);
    end
  endtask

  initial begin
    int levels[$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    levels = '{0, 1, 12, 13, 1649, 1650, 1651, 825, 2475, 3286, 3287, 3299, 3300, 4000, 4095};
    foreach (levels[i]) single(levels[i]);
    // Back to back, Start held: sine wave, then random levels.
    @(negedge clk) start = 1'b1;
    for (int n = 0; n < 400 * FL; n++) begin
      vin = AW'(int'($floor(real'(VREF) / 2.0 + (real'(VREF) / 2.0 + 40.0) * $sin(2.0 * PI * real'(n) / 640.0))) < 0 ? 0 :
                int'($floor(real'(VREF) / 2.0 + (real'(VREF) / 2.0 + 40.0) * $sin(2.0 * PI * real'(n) / 640.0))));
      @(negedge clk);
    end
    for (int n = 0; n < 200 * FL; n++) begin
      vin = AW'($urandom_range(0, 4095));
      @(negedge clk);
    end
    start = 1'b0;
    repeat (4 * FL) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || frame_q.size() != 0) begin
      failures++; $display("left over: %0d results, %0d frames", exp_q.size(), frame_q.size());
    end
    $display("conversions=%0d single=%0d back_to_back=%0d kept=%0d reset=%0d frames=%0d gapless=%0d zero=%0d full=%0d moved=%0d",
             n_conv, n_single, n_b2b, n_kept, n_reset, n_frames, n_seamless, n_zero, n_full, n_moved);
    checks++;
    if (n_single == 0 || n_b2b == 0 || n_kept == 0 || n_reset == 0 || n_frames == 0 || n_seamless == 0
        || n_zero == 0 || n_full == 0 || n_moved == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    checks++;
    if (n_frames != n_conv) begin failures++; $display("frames %0d != conversions %0d", n_frames, n_conv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
