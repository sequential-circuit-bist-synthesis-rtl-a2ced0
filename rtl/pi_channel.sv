// pi_channel: the per-input part of the spectral BIST for one primary input.
//
// Depending on the input's configuration CFG (see sbist_pkg::pi_cfg_t):
//  * ms = 0: the input gets the weighted random stream rnd directly;
//  * ms = 1: the one selected Hadamard row drives the input, through a
//            randomizer when noise_en is set;
//  * ms > 1: the ms selected rows are mixed by a component synthesizer whose
//            selects are mix_sel[ms-2:0], then optionally randomized.
// A selected row enters inverted or not according to its sign. The Hadamard
// generator gives 0 for +1; the input uses 1 for +1, as the spectral analysis
// does, so a positive component is the inverted generator output.
//
// Interface: wal is the full Hadamard generator bus, mix_sel the weighted
// selects for the synthesizer (only the first ms-1 are used), rnd the weighted
// stream for the randomizer or the random input. Purely combinational. An
// input with fewer than four components leaves the upper mix_sel bits unused,
// one without a randomizer leaves rnd unused and a purely random input leaves
// wal unused; lint reports these and synthesis removes the logic feeding them.
module pi_channel
  import sbist_pkg::*;
#(
  parameter int unsigned ROWS = 16,
  parameter pi_cfg_t     CFG  = CFG_PI0
) (
  input  logic [ROWS-1:0]     wal,
  input  logic [MAX_COMP-2:0] mix_sel,
  input  logic                rnd,
  output logic                pi
);

  localparam int unsigned MS = int'(CFG.ms);
  localparam int unsigned RW = $clog2(ROWS);

  if (MS == 0) begin : g_random
    assign pi = rnd;
  end else begin : g_spectral
    logic [MS-1:0] sc;
    logic          mixed;

    for (genvar k = 0; k < MS; k++) begin : g_comp
      assign sc[k] = wal[CFG.row[k][RW-1:0]] ^ ~CFG.neg[k];
    end

    if (MS == 1) begin : g_single
      assign mixed = sc[0];
    end else begin : g_synth
      component_synth #(.MS(MS)) u_synth (
        .sc (sc),
        .sel(mix_sel[MS-2:0]),
        .y  (mixed)
      );
    end

    if (CFG.noise_en) begin : g_noise
      randomizer u_rand (.d(mixed), .r(rnd), .y(pi));
    end else begin : g_clean
      assign pi = mixed;
    end
  end

  initial begin
    assert (MS <= MAX_COMP) else $error("pi_channel: at most %0d components", MAX_COMP);
  end

endmodule
