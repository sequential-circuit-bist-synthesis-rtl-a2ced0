// tb_xor_chain_obs: self-checking test of the observability XOR chain.
//
// With the default 49 taps: random tap vectors are compared with a parity
// computed bit by bit here, and from a random base vector flipping any single
// tap must flip the output (every tap is observable).
module tb_xor_chain_obs;
  logic [48:0] taps;
  logic obs;
  int checks = 0, failures = 0;

  xor_chain_obs dut (.taps(taps), .obs(obs));

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
    for (int n = 0; n < 2000; n++) begin
      logic p;
      p = 1'b0;
      taps = {$urandom, $urandom};
      for (int i = 0; i < 49; i++) p ^= taps[i];
      #1;
      check(obs == p, $sformatf("parity of %h", taps));
    end
    taps = {$urandom, $urandom};
    #1;
    for (int i = 0; i < 49; i++) begin
      logic prev_obs;
      prev_obs = obs;
      taps[i] = ~taps[i];
      #1;
      check(obs != prev_obs, $sformatf("tap %0d observable", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
