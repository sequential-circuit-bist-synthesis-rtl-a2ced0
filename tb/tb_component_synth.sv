// tb_component_synth: self-checking test of the spectral component synthesizer.
//
// Exhaustive truth-table check of the three-input chain (default) and of a
// four-input chain against an independently written priority rule: the
// highest stage whose select is 1 passes its new component, otherwise sc[0].
// Then the three-input mixer is fed one-hot marker components and selects of
// weight 0.5, and the share of each component in 40000 samples must be
// 0.25 / 0.25 / 0.5 within 0.02.
module tb_component_synth;
  logic [2:0] sc3;
  logic [1:0] sel3;
  logic       y3;
  logic [3:0] sc4;
  logic [2:0] sel4;
  logic       y4;
  int checks = 0, failures = 0;

  component_synth dut3 (.sc(sc3), .sel(sel3), .y(y3));
  component_synth #(.MS(4)) dut4 (.sc(sc4), .sel(sel4), .y(y4));

  function automatic logic ref_mix(logic [3:0] sc, logic [2:0] sel, int ms);
    for (int k = ms - 2; k >= 0; k--)
      if (sel[k]) return sc[k+1];
    return sc[0];
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
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
    int hits [3];
    for (int v = 0; v < 32; v++) begin
      {sel3, sc3} = 5'(v);
      #1;
      check(y3 == ref_mix({1'b0, sc3}, {1'b0, sel3}, 3), $sformatf("MS=3 v=%0d", v));
    end
    for (int v = 0; v < 128; v++) begin
      {sel4, sc4} = 7'(v);
      #1;
      check(y4 == ref_mix(sc4, sel4, 4), $sformatf("MS=4 v=%0d", v));
    end
    hits = '{0, 0, 0};
    for (int n = 0; n < 40000; n++) begin
      sel3 = 2'($urandom_range(0, 3));   // each select bit has weight 0.5
      for (int k = 0; k < 3; k++) begin
        sc3 = 3'(1 << k);
        #1;
        if (y3) hits[k]++;
      end
    end
    check(hits[0] + hits[1] + hits[2] == 40000, "exactly one component per sample");
    check(hits[0] > 9200 && hits[0] < 10800, $sformatf("SC1 share %0d/40000", hits[0]));
    check(hits[1] > 9200 && hits[1] < 10800, $sformatf("SC2 share %0d/40000", hits[1]));
    check(hits[2] > 19200 && hits[2] < 20800, $sformatf("SC3 share %0d/40000", hits[2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
