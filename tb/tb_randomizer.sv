// tb_randomizer: self-checking test of the noise-inserting XOR.
//
// Exhaustive check of the four input combinations (a 1 on r flips d), then a
// random bit-stream is perturbed by a stream of weight 0.25 and the measured
// flip rate over 40000 bits must lie within 0.23 .. 0.27.
module tb_randomizer;
  logic d, r, y;
  int checks = 0, failures = 0;

  randomizer dut (.d(d), .r(r), .y(y));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int flips = 0;
    for (int v = 0; v < 4; v++) begin
      {d, r} = 2'(v);
      #1;
      check(y == (r ? !d : d), $sformatf("d=%0b r=%0b y=%0b", d, r, y));
    end
    for (int n = 0; n < 40000; n++) begin
      d = 1'($urandom);
      r = ($urandom_range(0, 3) == 0);
      #1;
      if (y != d) flips++;
    end
    check(flips > 9200 && flips < 10800, $sformatf("flip rate %0d/40000", flips));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
