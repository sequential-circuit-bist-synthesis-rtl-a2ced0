// spectral_bist_top: sequential-circuit BIST pattern generator built from
// Hadamard spectral components and noise.
//
// The generator imitates the statistics of a set of ATPG vectors: each primary
// input (PI) of the circuit under test receives a mix of a few Walsh functions
// (Hadamard rows) in the proportions and phases found by a spectral analysis
// of the ATPG vectors, plus a set amount of random bit flips. Shared by all
// inputs are
//   * hadamard_wave_gen  - all 2^N Walsh functions from an N-bit counter,
//   * weighted_prbg      - a 16-bit cellular automaton and AND/OR weighting
//                          giving every weighted random stream needed,
//   * clock_divider      - derived clocks of period H_L and 2*D,
//   * holder             - forms the BIST clock: D vectors at full rate, then
//                          D/H_L vectors each held for H_L system clocks.
// Per input, pi_channel holds the component synthesizer (a mux chain) and
// the randomizer (an XOR) as the input's configuration asks.
// xor_chain_obs, the observability XOR chain of the design-for-test
// extension, stands beside the generator: its taps come from the circuit
// under test and its output is an extra primary output of that circuit.
//
// Timing: one clock, clk, which is also the system clock of the circuit
// under test. bist_adv is the BIST clock as an enable; the vector on cut_pi
// changes after each rising edge of clk at which bist_adv was 1. After reset
// (active-low, asynchronous) the first vector is column 0 of the Hadamard
// rows and the CA seed. The architecture follows the method; the single-clock
// enable form, the stream-to-input assignment and the default configuration
// (three inputs as in the method's example, N = 4, D = 4, H_L = 2) are this
// design's choices. The CA observation output of weighted_prbg is left
// unconnected here on purpose.
module spectral_bist_top
  import sbist_pkg::*;
#(
  parameter int unsigned          N        = 4,
  parameter int unsigned          NUM_PI   = 3,
  parameter pi_cfg_t [NUM_PI-1:0] CFG      = EXAMPLE_CFG,
  parameter int unsigned          D        = 4,
  parameter int unsigned          H_L      = 2,
  parameter int unsigned          OBS_TAPS = 49
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [NUM_PI-1:0]   cut_pi,      // test vector to the CUT inputs
  output logic                bist_adv,    // BIST clock enable
  output logic                hold_phase,  // 1 while vectors are being held
  input  logic [OBS_TAPS-1:0] obs_taps,    // unobservable CUT nets
  output logic                obs_po       // extra CUT primary output
);

  localparam int unsigned ROWS = 1 << N;
  // Four weighted streams per input: three mux selects and one noise stream.
  localparam int unsigned SPP = MAX_COMP;
  localparam int unsigned NS  = NUM_PI * SPP;

  function automatic weight_t [NS-1:0] stream_weights(input pi_cfg_t [NUM_PI-1:0] c);
    weight_t [NS-1:0] w;
    for (int j = 0; j < NUM_PI; j++) begin
      for (int k = 0; k < SPP - 1; k++)
        w[j*SPP + k] = (k + 1 < int'(c[j].ms)) ? c[j].mix[k] : W_ZERO;
      w[j*SPP + SPP - 1] = (c[j].noise_en || c[j].ms == 0) ? c[j].noise : W_ZERO;
    end
    return w;
  endfunction

  localparam weight_t [NS-1:0] WEIGHTS = stream_weights(CFG);

  logic              div_hl, div_2d;
  logic [ROWS-1:0]   wal;
  logic [NS-1:0]     stream;

  clock_divider #(.D(D), .H_L(H_L)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .div_hl(div_hl),
    .div_2d(div_2d)
  );

  holder u_hold (
    .clk       (clk),
    .rst_n     (rst_n),
    .div_hl    (div_hl),
    .div_2d    (div_2d),
    .bist_adv  (bist_adv),
    .hold_phase(hold_phase)
  );

  hadamard_wave_gen #(.N(N)) u_hwg (
    .clk  (clk),
    .rst_n(rst_n),
    .adv  (bist_adv),
    .wal  (wal)
  );

  weighted_prbg #(.NS(NS), .WEIGHTS(WEIGHTS)) u_prbg (
    .clk     (clk),
    .rst_n   (rst_n),
    .adv     (bist_adv),
    .stream  (stream),
    .ca_state()
  );

  for (genvar j = 0; j < NUM_PI; j++) begin : g_pi
    pi_channel #(.ROWS(ROWS), .CFG(CFG[j])) u_ch (
      .wal    (wal),
      .mix_sel(stream[j*SPP +: SPP-1]),
      .rnd    (stream[j*SPP + SPP - 1]),
      .pi     (cut_pi[j])
    );
  end

  xor_chain_obs #(.NTAPS(OBS_TAPS)) u_obs (
    .taps(obs_taps),
    .obs (obs_po)
  );

  initial begin
    for (int j = 0; j < NUM_PI; j++)
      for (int k = 0; k < int'(CFG[j].ms); k++)
        assert (int'(CFG[j].row[k]) < ROWS)
          else $error("spectral_bist_top: PI %0d uses row %0d beyond order %0d", j, CFG[j].row[k], N);
  end

endmodule
