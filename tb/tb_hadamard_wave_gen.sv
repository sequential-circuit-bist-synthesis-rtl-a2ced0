// tb_hadamard_wave_gen: self-checking test of the Walsh function generator.
//
// Two instances: order 4 (default) and order 3. Every cycle each output is
// compared with a reference parity computed here from an independent count of
// enable pulses. Over one full period every row but row 0 must be balanced.
// The order-3 instance is also used to take the Hadamard transform of the
// 8-bit example stream 1,0,1,1,1,0,1,0 (1 = +1); its spectrum must be
// 2, 6, -2, 2, 2, -2, -2, 2 with row 1 the prominent component.
module tb_hadamard_wave_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adv = 1'b0;
  logic [15:0] wal4;
  logic [7:0]  wal3;
  int checks = 0, failures = 0;
  int unsigned t_ref = 0;

  hadamard_wave_gen dut4 (.clk(clk), .rst_n(rst_n), .adv(adv), .wal(wal4));
  hadamard_wave_gen #(.N(3)) dut3 (.clk(clk), .rst_n(rst_n), .adv(adv), .wal(wal3));

  always #5 clk = ~clk;

  function automatic logic ref_bit(int unsigned r, int unsigned t);
    int unsigned x = r & t;
    logic p = 1'b0;
    while (x != 0) begin p ^= x[0]; x >>= 1; end
    return p;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (t=%0d)", what, t_ref);
    end
  endtask

  task automatic compare_all();
    for (int r = 0; r < 16; r++)
      check(wal4[r] == ref_bit(r, t_ref % 16), $sformatf("order-4 row %0d", r));
    for (int r = 0; r < 8; r++)
      check(wal3[r] == ref_bit(r, t_ref % 8), $sformatf("order-3 row %0d", r));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones [16];
    int stream [8] = '{1, -1, 1, 1, 1, -1, 1, -1};
    int expect_c [8] = '{2, 6, -2, 2, 2, -2, -2, 2};
    int c [8];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Random enable pattern over many periods.
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      compare_all();
      adv = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (adv) t_ref++;
    end
    // Balance over one full period of 16 columns.
    @(negedge clk);
    adv = 1'b1;
    foreach (ones[r]) ones[r] = 0;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      for (int r = 0; r < 16; r++) ones[r] += wal4[r];
      @(posedge clk);
      t_ref++;
    end
    check(ones[0] == 0, "row 0 constant 0");
    for (int r = 1; r < 16; r++) check(ones[r] == 8, $sformatf("row %0d balanced", r));
    // Spectrum of the 8-bit example with the order-3 rows (0 -> +1).
    adv = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    t_ref = 0;
    adv = 1'b1;
    foreach (c[r]) c[r] = 0;
    for (int k = 0; k < 8; k++) begin
      #1;
      for (int r = 0; r < 8; r++) c[r] += stream[k] * (wal3[r] ? -1 : 1);
      @(negedge clk);
      t_ref++;
    end
    for (int r = 0; r < 8; r++)
      check(c[r] == expect_c[r], $sformatf("spectrum row %0d = %0d", r, c[r]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
