// tb_holder: self-checking test of the vector-holding multiplexer.
//
// The two derived clocks are generated here from a counter (H_L = 4,
// D = 16, so a period of 32 system clocks). The BIST clock enable must be 1
// in every cycle of the first D cycles and, in the next D, only in the cycle
// where derived clock 1 has just risen. Per period that is D + D/H_L = 20
// BIST clocks, and during holding consecutive BIST clocks are H_L apart.
module tb_holder;
  localparam int D = 16;
  localparam int HL = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic div_hl = 1'b0, div_2d = 1'b0;
  logic bist_adv, hold_phase;
  int checks = 0, failures = 0;

  holder dut (.clk(clk), .rst_n(rst_n), .div_hl(div_hl), .div_2d(div_2d),
              .bist_adv(bist_adv), .hold_phase(hold_phase));

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
    int per_period = 0, last_adv = -1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 10 * 2 * D; c++) begin
      automatic int ph = c % (2 * D);
      div_hl = (ph % HL) >= HL / 2;
      div_2d = ph >= D;
      #1;
      check(hold_phase == div_2d, "hold_phase follows derived clock 2");
      if (ph < D) check(bist_adv == 1'b1, $sformatf("full-rate BIST clock at %0d", c));
      else        check(bist_adv == ((ph % HL) == HL / 2), $sformatf("held BIST clock at %0d", c));
      if (bist_adv) begin
        if (ph > D + HL / 2) check(c - last_adv == HL, "held vectors last H_L cycles");
        last_adv = c;
        per_period++;
      end
      if (ph == 2 * D - 1) begin
        check(per_period == D + D / HL, $sformatf("BIST clocks per period %0d", per_period));
        per_period = 0;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
