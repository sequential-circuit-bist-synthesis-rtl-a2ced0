// weighted_prbg: weighted pseudo-random bit-stream generator.
//
// One 16-cell hybrid rule-90/150 cellular automaton (CA) register, shared by
// the whole BIST, supplies roughly unbiased random bits; small AND/OR networks
// turn them into NS bit-streams of chosen probabilities. The weights are
// quantised to i/16 (i = 0..15) plus 2^-6 and 2^-8 for the randomizers.
//
// Weight i/16: with four CA bits b0..b3 the stream is built as
//   y = 0;  for k = 0..3: y = i[k] ? (b[k] | y) : (b[k] & y)
// which gives P(y = 1) = i/16 for independent unbiased bits. Weight 2^-6 is
// the AND of six CA bits and 2^-8 the AND of eight. Stream s takes its bits
// from cells (STRIDE*s + k) mod 16, so different streams use different cells
// where the register allows it.
//
// Interface: clk, active-low asynchronous reset rst_n (the CA is loaded with
// SEED, which must be nonzero), adv = BIST clock enable (the CA steps once at
// a rising edge of clk where adv is 1). The streams are combinational from
// the CA state. The 16-bit CA, the weight set and the use of AND/OR gates
// follow the method; the CA rule, seed, cell assignment and gate network are
// this design's choices.
module weighted_prbg
  import sbist_pkg::*;
#(
  parameter int unsigned              NS      = 4,
  parameter weight_t [NS-1:0]         WEIGHTS = {NS{weight_t'{kind: W_FRAC, num: 4'd8}}},
  parameter int unsigned              STRIDE  = 3,
  parameter logic [CA_LEN-1:0]        RULE    = CA_RULE,
  parameter logic [CA_LEN-1:0]        SEED    = CA_SEED
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          adv,
  output logic [NS-1:0] stream,
  output logic [CA_LEN-1:0] ca_state   // raw CA register, for observation
);

  logic [CA_LEN-1:0] ca, ca_next;

  // Null boundary: the cells beyond both ends read as 0.
  always_comb begin
    for (int i = 0; i < CA_LEN; i++) begin
      logic l, r;
      l = (i + 1 < CA_LEN) ? ca[(i + 1) % CA_LEN] : 1'b0;
      r = (i > 0)          ? ca[(i + CA_LEN - 1) % CA_LEN] : 1'b0;
      ca_next[i] = l ^ r ^ (RULE[i] & ca[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ca <= SEED;
    else if (adv) ca <= ca_next;
  end

  assign ca_state = ca;

  for (genvar s = 0; s < NS; s++) begin : g_stream
    localparam weight_t W = WEIGHTS[s];
    localparam int unsigned NB = (W.kind == W_2M6) ? 6 : (W.kind == W_2M8) ? 8 : WFRAC;
    logic [NB-1:0] b;
    for (genvar k = 0; k < NB; k++) begin : g_tap
      assign b[k] = ca[(STRIDE * s + k) % CA_LEN];
    end
    if (W.kind == W_2M6) begin : g_w6
      assign stream[s] = &b;
    end else if (W.kind == W_2M8) begin : g_w8
      assign stream[s] = &b;
    end else begin : g_frac
      logic [WFRAC:0] y;
      assign y[0] = 1'b0;
      for (genvar k = 0; k < WFRAC; k++) begin : g_bit
        if (W.num[k]) begin : g_or
          assign y[k+1] = b[k] | y[k];
        end else begin : g_and
          assign y[k+1] = b[k] & y[k];
        end
      end
      assign stream[s] = y[WFRAC];
    end
  end

  initial begin
    assert (SEED != '0) else $error("weighted_prbg: the CA seed must be nonzero");
  end

endmodule
