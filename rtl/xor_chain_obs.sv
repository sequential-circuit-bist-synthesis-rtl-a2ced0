// xor_chain_obs: observability XOR chain added to the circuit under test.
//
// Design-for-test addition: the nets whose faults a testability analysis
// finds unobservable (flip-flop outputs at the boundary of the combinational
// logic) are folded into one extra primary output by a linear chain of
// two-input XOR gates, so a fault effect on any one of them reaches obs.
// NTAPS is 49, the number of flip-flop outputs made observable in the
// s5378 example. Combinational, no clock. The chain structure follows the
// method; the tap order is the order of the taps vector.
module xor_chain_obs #(
  parameter int unsigned NTAPS = 49
) (
  input  logic [NTAPS-1:0] taps,
  output logic             obs
);

  logic [NTAPS-1:0] chain;

  assign chain[0] = taps[0];
  for (genvar i = 1; i < NTAPS; i++) begin : g_xor
    assign chain[i] = chain[i-1] ^ taps[i];
  end
  assign obs = chain[NTAPS-1];

endmodule
