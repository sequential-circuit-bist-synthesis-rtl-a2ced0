// holder: vector-holding multiplexer that forms the BIST clock.
//
// The method's holder is a two-input multiplexer of clocks: the system clock
// and derived clock 1 (period H_L), selected by derived clock 2 (period 2*D).
// While derived clock 2 is low every system clock is a BIST clock, so D
// vectors are applied one per cycle; while it is high only the rising edges of
// derived clock 1 are, so D/H_L vectors are applied, each held for H_L cycles.
//
// This design keeps a single clock and produces the multiplexer's output as a
// clock enable, bist_adv, one system cycle wide: 1 in every cycle while
// div_2d is low, and in the cycle after each rising edge of div_hl while
// div_2d is high. The pattern generators step at a clock edge where bist_adv
// is 1. hold_phase is div_2d passed on for observers. Rising edges of div_hl
// are found with one flip-flop (reset to 0).
module holder (
  input  logic clk,
  input  logic rst_n,
  input  logic div_hl,      // derived clock 1, period H_L
  input  logic div_2d,      // derived clock 2, period 2*D: the mux select
  output logic bist_adv,    // BIST clock, as a clock enable
  output logic hold_phase
);

  logic div_hl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_hl_q <= 1'b0;
    else        div_hl_q <= div_hl;
  end

  // Multiplexer: input 0 = every system clock, input 1 = derived clock 1.
  assign bist_adv   = div_2d ? (div_hl & ~div_hl_q) : 1'b1;
  assign hold_phase = div_2d;

endmodule
