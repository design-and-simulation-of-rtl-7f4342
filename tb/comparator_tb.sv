// comparator_tb: self-checking test of the comparator.
// Checks keep == (vin >= vdac) for every pair of a reduced 6-bit width
// exhaustively, then for random and boundary pairs at the default 12 bits.
module comparator_tb;
  int checks = 0, failures = 0;
  logic [5:0]  a6, b6;
  logic        k6;
  logic [11:0] a12, b12;
  logic        k12;

  comparator #(.AW(6))  dut6  (.vin(a6),  .vdac(b6),  .keep(k6));
  comparator            dut12 (.vin(a12), .vdac(b12), .keep(k12));

  task automatic check12(input int a, input int b);
    a12 = 12'(a); b12 = 12'(b); #1;
    checks++;
    if (k12 !== (a >= b)) begin failures++; $display("12b: %0d vs %0d keep=%0b", a, b, k12); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        a6 = 6'(a); b6 = 6'(b); #1;
        checks++;
        if (k6 !== (a >= b)) begin failures++; $display("6b: %0d vs %0d keep=%0b", a, b, k6); end
      end
    check12(0, 0); check12(4095, 4095); check12(4095, 0); check12(0, 4095);
    check12(2048, 2047); check12(2047, 2048);
    for (int i = 0; i < 5000; i++) begin
      int a, b;
      a = int'($urandom_range(0, 4095));
      check12(a, int'($urandom_range(0, 4095)));
      // Neighbours of a: the decision edge.
      b = a + int'($urandom_range(0, 2)) - 1;
      if (b < 0) b = 0;
      if (b > 4095) b = 4095;
      check12(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
