// tb_clock_divider: self-checking test of the clock divider.
//
// Two instances, D = 4 / H_L = 2 (default) and D = 16 / H_L = 4. Each output
// is compared every cycle with the expected square wave counted from reset:
// derived clock 1 is high in the second half of each H_L-cycle period,
// derived clock 2 in the second half of each 2*D-cycle period. The number of
// rising edges seen over 20 periods of 2*D must match the division ratios.
module tb_clock_divider;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic hl_a, d2_a, hl_b, d2_b;
  int checks = 0, failures = 0;

  clock_divider dut_a (.clk(clk), .rst_n(rst_n), .div_hl(hl_a), .div_2d(d2_a));
  clock_divider #(.D(16), .H_L(4)) dut_b (.clk(clk), .rst_n(rst_n), .div_hl(hl_b), .div_2d(d2_b));

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rises_hl_b = 0, rises_d2_b = 0;
    logic prev_hl_b = 1'b0, prev_d2_b = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20 * 32; c++) begin
      check(hl_a == ((c % 2) >= 1), $sformatf("A derived clock 1 at %0d", c));
      check(d2_a == ((c % 8) >= 4), $sformatf("A derived clock 2 at %0d", c));
      check(hl_b == ((c % 4) >= 2), $sformatf("B derived clock 1 at %0d", c));
      check(d2_b == ((c % 32) >= 16), $sformatf("B derived clock 2 at %0d", c));
      if (hl_b && !prev_hl_b) rises_hl_b++;
      if (d2_b && !prev_d2_b) rises_d2_b++;
      prev_hl_b = hl_b;
      prev_d2_b = d2_b;
      @(negedge clk);
    end
    check(rises_hl_b == 160, $sformatf("B derived clock 1 rises %0d", rises_hl_b));
    check(rises_d2_b == 20, $sformatf("B derived clock 2 rises %0d", rises_d2_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
