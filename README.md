# Spectral BIST pattern generator for non-scan sequential circuits

Sequential ATPG vectors for a circuit without scan are good at finding faults,
but storing and replaying them on chip is expensive. This generator does not
replay them. Instead it reproduces their *statistics* in hardware. Each input
bit-stream of a test set is described by a few Walsh functions (rows of a
Hadamard matrix) with their signs and relative strengths, plus a level of
random noise. The hardware synthesises new streams with the same spectrum:

* one **Hadamard wave generator** produces every Walsh function of order N;
* one **weighted pseudo-random bit-stream generator** produces all the random
  streams, each with its own probability of being 1;
* per primary input, a **component synthesizer** (a multiplexer chain with
  weighted random selects) mixes that input's Walsh functions in the right
  proportions, and a **randomizer** (an XOR) flips a chosen fraction of its
  bits;
* a **clock divider** and a **holder** form the BIST clock. The generator
  alternates between D vectors at full rate and D/H_L vectors that are each
  held for H_L clocks, so that state deep in the circuit gets time to reach
  the outputs.

The configuration (which rows, signs, weights and noise for each input) is
fixed when the generator is synthesised. It is the result of an off-line
spectral analysis of the ATPG vectors, which is not part of this RTL.

The design follows the architecture of *Sequential Circuit BIST Synthesis
using Spectrum and Noise from ATPG Patterns*. Sizes and encodings that the
method leaves open are this implementation's choices. They are listed in
[Where this RTL departs from or adds to the method](#where-this-rtl-departs-from-or-adds-to-the-method).

## Signal path

```
            clk ─┬──────────────────────────────┐
                 ▼                              ▼
          clock_divider ── div_hl, div_2d ──► holder ──► bist_adv (BIST clock enable)
                                                 │
                         ┌───────────────────────┴──────────────┐
                         ▼                                      ▼
               hadamard_wave_gen (N)                   weighted_prbg (16-cell CA)
                 wal[2^N-1:0]                            stream[4*NUM_PI-1:0]
                         │                                      │
        ┌────────────────┼──────────────────────┬───────────────┤
        ▼                ▼                      ▼               ▼
   pi_channel 0     pi_channel 1   ...     pi_channel j  (4 streams each)
   synth + rand     row + rand             random only
        │                │                      │
     cut_pi[0]        cut_pi[1]              cut_pi[j]          ──► circuit under test

   obs_taps (nets inside the CUT) ──► xor_chain_obs ──► obs_po (extra CUT output)
```

All flip-flops run on `clk`, which is also the system clock of the circuit
under test. The BIST clock is a one-cycle enable, `bist_adv`. The Walsh counter
and the CA register step only at clock edges where it is 1, so a vector
stays on `cut_pi` until the edge after the next `bist_adv`.

## Walsh rows: order, polarity and sign

`hadamard_wave_gen` is an N-bit counter `t` and 2^N − N − 1 two-input XOR
gates. Output `wal[r]` is `parity(r & t)`:

* `wal[0]` is constant 0;
* `wal[2^k]` is counter bit k;
* every other row is the XOR of two rows already built: `r` without its lowest
  set bit, and that bit alone.

This puts the rows in the **natural (Sylvester) order** of the recursion
H(n) = [[H(n−1), H(n−1)], [H(n−1), −H(n−1)]]. Row r, column t of H(N) is
+1 when `parity(r & t)` is 0. That is the order in which the spectral analysis
numbers its components, so a component index from the analysis is the row
number.

There are two polarity conventions, and they are easy to confuse:

| where | logic 1 means | logic 0 means |
|---|---|---|
| `wal[]` out of the generator | −1 | +1 (so row 0 is constant 0) |
| test vectors on `cut_pi` (and the analysis) | +1 | −1 |

`pi_channel` bridges the two. A component with a positive coefficient enters as
`~wal[row]` and a negative one as `wal[row]`, which is
`wal[row] ^ ~neg`. Example: the 8-bit stream 1,0,1,1,1,0,1,0 has the order-3
spectrum (2, 6, −2, 2, 2, −2, −2, 2). Its dominant component is row 1 with
coefficient +6, so that stream is best approximated by `~wal[1]`. The
generator's testbench recomputes this spectrum from the hardware's rows.

## Mixing components

For an input with `ms` ≥ 2 selected components, `component_synth` is a chain
of `ms`−1 two-input multiplexers. Stage k passes the new component
`sc[k+1]` when its select is 1, and the mix of `sc[0..k]` otherwise. Its select
is a random stream of weight

    w_k = p(k+1) / (p0 + p1 + ... + p(k+1))

where p are the wanted proportions, taken from the power spectrum. So three
components in proportions 0.25 / 0.25 / 0.5 need two stages, each of weight
0.5. The output then equals each component, on average, for the wanted share
of the time. The random switching between components also adds some noise,
so inputs with several components often need no randomizer.

The weights are quantised to the generator's weight set (below), so the
proportions are only approximate. At most four components per input are
supported (`sbist_pkg::MAX_COMP`).

## Noise

`randomizer` is `y = d ^ r`. A stream `r` of weight W flips a fraction W of
the bits. The intended flip rate for an input with a single component is
the reciprocal of the mean run length of that input's ATPG stream. The
average excludes the shortest 5 % of runs. The weights 2^-6 and 2^-8 exist
for these small flip rates.

## Weighted random streams

`weighted_prbg` holds one 16-cell hybrid cellular automaton (CA) with null
boundaries. Cell i computes `left ^ right` (rule 90), or `left ^ self ^ right`
(rule 150) where bit i of `RULE` = 16'hA11D is set. This rule vector has the
maximal period 2^16 − 1. The seed after reset is 16'h0001.

Stream s takes cells `(STRIDE*s + k) mod 16`, k = 0, 1, 2, ... (STRIDE = 3).
Its weight is a `weight_t`:

* `W_FRAC`, `num` = i: probability i/16, built from four cells b0..b3 with
  `y = 0; for k in 0..3: y = i[k] ? (b[k] | y) : (b[k] & y)`.
  This is the same as `(~b[3:0]) < i`, so weight 8/16 is a single cell and
  weight 0 is the constant 0.
* `W_2M6`: AND of six cells (1/64). `W_2M8`: AND of eight cells (1/256).

Over one full CA period, a weight-i/16 stream is 1 exactly i·4096 times, 2^-6
exactly 1024 times and 2^-8 exactly 256 times. The testbench checks these
counts. With 16 cells, streams for many inputs necessarily share cells and are
correlated. This is the price of a single small register.

In `spectral_bist_top` each input owns four stream slots: `4j+0..4j+2` for
its mux selects and `4j+3` for noise (or for the input itself when it has no
components). The top computes the slot weights from the configuration. Unused
slots get weight 0 and synthesis removes them.

## Holding vectors: the BIST clock

`clock_divider` is a ⌈log2(2D)⌉-bit counter. `div_hl` is its bit log2(H_L)−1
(a square wave of period H_L). `div_2d` is its top bit (period 2D, low for the
first D cycles).

`holder` is the multiplexer of the two clocks, written as an enable:

    bist_adv = div_2d ? (div_hl rose in this cycle) : 1

With D = 4, H_L = 2 (the defaults), one 8-cycle period looks like this:

```
cycle       0  1  2  3 | 4  5  6  7
div_2d      0  0  0  0 | 1  1  1  1      (hold_phase)
div_hl      0  1  0  1 | 0  1  0  1
bist_adv    1  1  1  1 | 0  1  0  1
vector      v0 v1 v2 v3| v4 v4 v5 v5     -> D = 4 single vectors, then D/H_L = 2 held ones
```

Every period of 2D clocks applies D + D/H_L vectors. D and H_L must be powers
of two with 2 ≤ H_L ≤ D. The method derives both from the circuit:

* H_L is an upper bound on the circuit's sequential depth, rounded to a power
  of two;
* D is the ATPG vector count / 50, rounded to a power of two.

If the surrounding test logic already has a pattern counter, its bits can
replace `clock_divider`.

## Configuring for a circuit

The configuration is a parameter, `CFG`: a packed array of
`sbist_pkg::pi_cfg_t`, one per primary input, index 0 = `cut_pi[0]`.

| field | meaning |
|---|---|
| `ms` | number of components 0..4. 0: the input is the random stream `noise` itself |
| `row[k]` | Hadamard row of component k (k < ms) |
| `neg[k]` | 1 if component k has a negative coefficient |
| `mix[k]` | select weight of mux stage k (k < ms−1), see the formula above |
| `noise_en` | put a randomizer after the component(s) |
| `noise` | flip weight of the randomizer, or the weight of the input if `ms` = 0 |

Other top-level parameters are `N` (Hadamard order; 4 to 8 are the intended
range), `NUM_PI`, `D`, `H_L` and `OBS_TAPS`.

The default, `sbist_pkg::EXAMPLE_CFG`, is a three-input example:

* input 0 mixes rows 1, 3 and −6 in proportions 0.25 / 0.25 / 0.5;
* input 1 is row 5 with 25 % of its bits flipped;
* input 2 is a random stream of weight 0.5.

The default order is N = 4. The row numbers and signs are illustrative.

## Observability XOR chain

`xor_chain_obs` is a design-for-test addition to the circuit under test,
not to the generator. Nets whose faults cannot be observed (flip-flop outputs
found by a testability analysis) are folded by a linear chain of XOR gates
into one extra primary output. Any single fault effect on a tap therefore
flips the output. The default, 49 taps, matches the example of making 49
flip-flops of s5378 observable. In the top the chain simply stands beside the
generator: `obs_taps` comes from the circuit and `obs_po` goes back to the
tester.

## Files

| file | contents |
|---|---|
| `rtl/sbist_pkg.sv` | `weight_t`, `pi_cfg_t`, CA rule and seed, example configuration |
| `rtl/hadamard_wave_gen.sv` | counter + XOR Walsh generator |
| `rtl/weighted_prbg.sv` | CA register and weighting networks |
| `rtl/component_synth.sv` | multiplexer chain |
| `rtl/randomizer.sv` | noise XOR |
| `rtl/pi_channel.sv` | per-input selection, sign, synthesizer, randomizer |
| `rtl/clock_divider.sv`, `rtl/holder.sv` | BIST clock |
| `rtl/xor_chain_obs.sv` | observability chain |
| `rtl/spectral_bist_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and stops
itself. A watchdog counts a failure if a test hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/sbist_pkg.sv tb/tb_spectral_bist_top.sv --top-module tb_spectral_bist_top
./obj_dir/Vtb_spectral_bist_top
```

Replace the testbench name to run another one. What they check:

* `tb_spectral_bist_top` runs the top at its default parameters for a
  64,000-vector session (85,332 clocks, under a second). A reference model
  written independently of the RTL predicts every vector, `bist_adv` and
  `hold_phase` in every cycle. The test counts full-rate and held vectors,
  each synthesizer input being chosen, randomizer flips, both values of the
  random input and Walsh counter wrap-around, and fails if any of them never
  happens. It checks the rate of D + D/H_L vectors per 2D clocks. It then
  measures the Hadamard spectrum of the generated vectors: averaged over
  aligned 16-vector windows, input 0 shows +4, +4 and −8 on rows 1, 3 and 6,
  input 1 shows +8 on row 5, and nothing else exceeds ±1.5.
* `tb_spectral_bist_workload` runs a large configuration: 28 inputs, order 8,
  D = 1024, H_L = 8, all component counts 0–4, all weight kinds. It runs
  64,000 vectors against the same kind of reference model.
* The block testbenches check:
  * every Walsh row against `parity(r & t)` for orders 4 and 3, plus the
    order-3 spectrum example;
  * the multiplexer chain exhaustively, and the measured 0.25/0.25/0.5 shares;
  * the exact CA sequence, its period of 65,535 and the exact one-counts of
    every weight;
  * the divider waveforms;
  * the holder's enable pattern;
  * the parity and single-tap sensitivity of the XOR chain.

## Where this RTL departs from or adds to the method

* **One clock.** The method forms the BIST clock with a multiplexer of
  clocks and builds the divider as a ripple counter. Here everything is
  synchronous to `clk`, and the multiplexer output is a clock enable. The
  sequence of vectors is the same. Held vectors advance one clock after
  `div_hl` rises, because of the edge detector.
* **Counter style.** The Walsh generator uses a synchronous binary counter
  with an enable. It has the same N flip-flops and 2^N − N − 1 XOR gates as
  the counter-based generator the method adopts.
* **Own choices:**
  * the CA rule (16'hA11D) and seed;
  * the mapping of CA cells to streams, and the network that realises each
    weight;
  * which multiplexer input a select of 1 picks;
  * the four-slot stream layout per input;
  * the asynchronous active-low reset of the generator;
  * the example configuration and the defaults D = 4, H_L = 2.

  D = 4 is what the D rule gives for a 153-vector ATPG set. No sequential depth
  was available to set H_L.
* **Not included:**
  * the spectral analysis that chooses rows, signs, weights and noise levels
    (an off-line computation);
  * the circuit under test;
  * the optional reuse of an existing pattern counter in place of
    `clock_divider`.

  The generator runs freely from reset. It has no start/stop control and no
  response compaction, because the method describes neither.
* **Weight range.** The largest available weight is 15/16. A configuration
  that needs weight 1 must use the complementary mux ordering instead.
