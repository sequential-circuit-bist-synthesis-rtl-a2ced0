// tb_weighted_prbg: self-checking test of the weighted pseudo-random
// bit-stream generator.
//
// Six streams with weights 0, 4/16, 8/16, 15/16, 2^-6 and 2^-8. A reference
// cellular automaton written here (rule 150 where the rule vector bit is 1,
// rule 90 elsewhere, zero beyond both ends) is stepped alongside the block;
// the CA register and every stream are compared each cycle. A weight-i/16
// stream must equal (~b < i) for its four cells b (b[3] most significant),
// a 2^-6 / 2^-8 stream the AND of its cells. Over one full period of
// 65535 steps the CA must return to its seed for the first time, and the
// stream one-counts must be exact: i*4096, 1024 and 256.
module tb_weighted_prbg;
  import sbist_pkg::*;

  localparam int NS = 6;
  localparam weight_t [NS-1:0] WS = {
      weight_t'{kind: W_2M8,  num: 4'd0},
      weight_t'{kind: W_2M6,  num: 4'd0},
      weight_t'{kind: W_FRAC, num: 4'd15},
      weight_t'{kind: W_FRAC, num: 4'd8},
      weight_t'{kind: W_FRAC, num: 4'd4},
      weight_t'{kind: W_FRAC, num: 4'd0}};
  localparam logic [15:0] RULE_REF = 16'hA11D;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adv = 1'b0;
  logic [NS-1:0] stream;
  logic [15:0] ca_state;
  logic [15:0] ref_ca;
  int checks = 0, failures = 0;

  weighted_prbg #(.NS(NS), .WEIGHTS(WS)) dut (
    .clk(clk), .rst_n(rst_n), .adv(adv), .stream(stream), .ca_state(ca_state));

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_step(logic [15:0] s);
    logic [15:0] n;
    for (int i = 0; i < 16; i++) begin
      logic left  = (i == 15) ? 1'b0 : s[i+1];
      logic right = (i == 0)  ? 1'b0 : s[i-1];
      n[i] = RULE_REF[i] ? (left ^ s[i] ^ right) : (left ^ right);
    end
    return n;
  endfunction

  function automatic logic ref_stream(int s, logic [15:0] ca);
    logic [7:0] b;
    for (int k = 0; k < 8; k++) b[k] = ca[(3 * s + k) % 16];
    case (s)
      0: return 1'b0;
      1: return (~b[3:0]) < 4'd4;
      2: return (~b[3:0]) < 4'd8;
      3: return (~b[3:0]) < 4'd15;
      4: return &b[5:0];
      default: return &b[7:0];
    endcase
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones [NS];
    int first_return = 0;
    foreach (ones[s]) ones[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    ref_ca = 16'h0001;
    // A few cycles with the enable low: nothing may move.
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      check(ca_state == ref_ca, "CA holds while adv = 0");
    end
    adv = 1'b1;
    for (int step = 1; step <= 65535; step++) begin
      #1;
      check(ca_state == ref_ca, $sformatf("CA state step %0d", step));
      for (int s = 0; s < NS; s++) begin
        check(stream[s] == ref_stream(s, ref_ca), $sformatf("stream %0d step %0d", s, step));
        ones[s] += stream[s];
      end
      @(negedge clk);
      ref_ca = ref_step(ref_ca);
      if (ref_ca == 16'h0001 && first_return == 0) first_return = step;
    end
    check(first_return == 65535, $sformatf("CA period %0d", first_return));
    check(ones[0] == 0, $sformatf("weight 0: %0d ones", ones[0]));
    check(ones[1] == 4 * 4096, $sformatf("weight 4/16: %0d ones", ones[1]));
    check(ones[2] == 8 * 4096, $sformatf("weight 8/16: %0d ones", ones[2]));
    check(ones[3] == 15 * 4096, $sformatf("weight 15/16: %0d ones", ones[3]));
    check(ones[4] == 1024, $sformatf("weight 2^-6: %0d ones", ones[4]));
    check(ones[5] == 256, $sformatf("weight 2^-8: %0d ones", ones[5]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
