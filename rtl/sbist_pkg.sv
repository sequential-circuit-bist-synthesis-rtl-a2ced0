// sbist_pkg: types and constants shared by the spectral BIST pattern generator.
//
// The generator is configured when it is synthesised: for every primary input
// (PI) of the circuit under test a pi_cfg_t says which Hadamard (Walsh) rows
// feed it, with which sign, in which proportions they are mixed and how much
// noise is added. A weight_t names one of the quantised probabilities the
// weighted pseudo-random bit-stream generator can produce: i/16 for i = 0..15
// (w = 4 fractional bits) plus the two extra small weights 2^-6 and 2^-8 that
// are reserved for the randomizer. The weight set, w = 4 and the limit of four
// mixed components per input follow the method; the field encodings, the
// cellular-automaton rule and seed and the example configuration are this
// design's own choices.
package sbist_pkg;

  // Largest number of spectral components mixed into one PI (M).
  localparam int unsigned MAX_COMP = 4;
  // Width of a Hadamard row index: enough for order 8, the upper bound on N.
  localparam int unsigned ROW_W = 8;
  // Fractional bits of the quantised weights (w) and the CA register length.
  localparam int unsigned WFRAC = 4;
  localparam int unsigned CA_LEN = 16;
  // Rule vector of the 16-cell null-boundary hybrid cellular automaton:
  // bit i set means cell i follows rule 150 (left ^ self ^ right), clear means
  // rule 90 (left ^ right). This vector gives the maximal period 2^16 - 1.
  localparam logic [CA_LEN-1:0] CA_RULE = 16'hA11D;
  localparam logic [CA_LEN-1:0] CA_SEED = 16'h0001;

  typedef enum logic [1:0] {
    W_FRAC = 2'd0,  // probability num / 16
    W_2M6  = 2'd1,  // probability 1/64
    W_2M8  = 2'd2   // probability 1/256
  } wkind_e;

  typedef struct packed {
    wkind_e           kind;
    logic [WFRAC-1:0] num;
  } weight_t;

  typedef struct packed {
    logic [2:0]                     ms;        // selected components, 0..MAX_COMP
    logic [MAX_COMP-1:0][ROW_W-1:0] row;       // Hadamard row of component k
    logic [MAX_COMP-1:0]            neg;       // 1: component k enters inverted
    weight_t [MAX_COMP-2:0]         mix;       // select weight of mux stage k
    logic                           noise_en;  // add a randomizer (ms >= 1)
    weight_t                        noise;     // flip weight, or the PI's own
                                               // weight when ms == 0
  } pi_cfg_t;

  localparam weight_t W_ZERO = '{kind: W_FRAC, num: 4'd0};

  function automatic weight_t wfrac(input logic [WFRAC-1:0] sixteenths);
    return '{kind: W_FRAC, num: sixteenths};
  endfunction

  // Example configuration for a three-input circuit:
  //  PI0 mixes three rows in proportions 0.25 / 0.25 / 0.5 (two mux stages of
  //      weight 0.5 each), PI1 carries one row with 25 % of its bits flipped,
  //  PI2 is a plain random stream of weight 0.5.
  // The row numbers and signs are examples.
  localparam pi_cfg_t CFG_PI0 = '{
      ms: 3'd3, row: {8'd0, 8'd6, 8'd3, 8'd1}, neg: 4'b0100,
      mix: {W_ZERO, wfrac(8), wfrac(8)}, noise_en: 1'b0, noise: W_ZERO};
  localparam pi_cfg_t CFG_PI1 = '{
      ms: 3'd1, row: {8'd0, 8'd0, 8'd0, 8'd5}, neg: 4'b0000,
      mix: {W_ZERO, W_ZERO, W_ZERO}, noise_en: 1'b1, noise: wfrac(4)};
  localparam pi_cfg_t CFG_PI2 = '{
      ms: 3'd0, row: '0, neg: 4'b0000,
      mix: {W_ZERO, W_ZERO, W_ZERO}, noise_en: 1'b0, noise: wfrac(8)};

  localparam pi_cfg_t [2:0] EXAMPLE_CFG = {CFG_PI2, CFG_PI1, CFG_PI0};

endpackage
