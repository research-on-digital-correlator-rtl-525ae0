# Word-parallel cross-correlator for long sequences

This design computes the complete cross-correlation

    R(tau) = sum_n x(n) * y(n - tau),   tau = -(N-1) .. N-1

of two sampled sequences that are too long for one multiplier per lag
(N = 8000 signed 12-bit samples in the reference configuration, 15 999 lags).
The samples sit in on-chip RAM. A plain serial correlator reads one sample per
clock and needs about N² clocks. Here every RAM word holds **eight** consecutive
samples. Each clock, one word of each sequence feeds **64 multipliers**, arranged
as eight groups of eight. Every group works on a different lag, so each clock
adds eight products to each of eight lags. The full correlation takes
1000 × 1001 clocks: 10.01 ms at 100 MHz, against about 640 ms for one sample per
read. That is 64 times faster.

The hard part is the sliding. When Y is moved by a number of samples that is not
a multiple of eight, the eight Y samples a group needs span two RAM words. The
design does not use unaligned reads or extra read ports. It keeps the previous Y
word in a small register, **C**, and each group takes its operands from the
16-sample window {C, current Y word}.

## Data layout

Acquisition packs the samples in sampling order. Word `a` of each RAM holds
samples `8a .. 8a+7`, with sample `8a+n` in bits `[12n+11 : 12n]` (lane n).
RAM1 holds X and RAM2 holds Y. Each RAM is 1000 words × 96 bits.

## How one clock covers eight lags

A correlation *cycle* `k` computes the lags `8k .. 8k+7` in one pass over the
RAMs. In beat `a` (one beat per clock) the datapath reads:

* X word `a + k` (the leading sequence),
* Y word `a` (the sliding sequence),
* and uses C, which holds Y word `a - 1`. C is zero in the first beat of the
  cycle; this zero stands for the samples `y[-1] .. y[-8]`.

Group `g` (g = 0..7) computes lag `8k + g`. Its multiplier `i` multiplies `x[i]`
by the sliding sequence shifted `g` places right:

    operand(i) = y[i - g]        if i >= g
               = C[8 + i - g]    otherwise   (the sample that slid in from the previous word)

For example, with g = 1: `x[0]·C[7]`, `x[1]·y[0]`, … `x[7]·y[6]`. With g = 2:
`x[0]·C[6]`, `x[1]·C[7]`, `x[2]·y[0]`, …. The eight products are added, and the
sum goes into the group's accumulator. When the beat with `a = 999 - k` is done,
the eight accumulators hold `R(8k) .. R(8k+7)`. X words `0 .. k-1` would only
meet the zero extension of Y, so the pass skips them. Cycle `k` therefore takes
`1000 - k` beats.

The pass over all cycles `k = 0 .. 999` gives tau ≥ 0 and takes
1000·1001/2 beats. Negative lags use the identity `R_xy(-t) = R_yx(t)`: the same
schedule runs a second time with the roles of the two RAMs swapped, so Y leads
and X slides. The whole run takes 1000·1001 = 1 001 000 beats. `tau = 0` comes
out of both passes.

## Blocks

| module | role |
|---|---|
| `corr_pkg` | reference sizes (8 lanes, 12 bits, 8000 samples, 1000 words, 37-bit accumulator), `slide_dir_e` |
| `sample_packer` | packs 8 X and 8 Y samples per word and writes both RAMs during acquisition |
| `seq_ram` | 1000 × 96 simple dual-port RAM with synchronous read; instantiated as RAM1 and RAM2 |
| `corr_controller` | generates the beat schedule: addresses `a+k` / `a`, first/last beat of each cycle, direction |
| `c_register` | register C: loads the sliding word after each beat, clears at every cycle boundary |
| `mac_group` | 8 multipliers, the adder of their products and one accumulator, for a fixed slide `SHIFT` |
| `mac_array` | 8 `mac_group`s with `SHIFT` = 0..7; carries a tag that labels each cycle's results |
| `correlator_top` | wires everything together; swaps RAM roles for the left slide; labels results with their lags |

## Interface and timing (`correlator_top`)

* `clk` is the 100 MHz system clock. On an FPGA it comes from a PLL that doubles
  a 50 MHz board clock; the PLL is not part of this RTL. `rst_n` is an
  asynchronous active-low reset.
* **Acquisition.** Pulse `acq_start`. Then present `N_SAMPLES` sample pairs on
  `smp_x`/`smp_y`, each with `smp_valid`. Gaps between samples are allowed.
  These inputs are meant for a dual A/D converter, which is outside this RTL.
  `acq_busy` is high while samples are being taken.
* **Correlation** starts by itself once the last word has been written. `busy`
  is high until the last results have come out. While `busy` is high,
  `acq_start` is ignored.
* **Results.** At the end of each cycle, `res_valid` is high for one clock.
  `res_data[g]` is then `R(res_tau[g])`. `res_dir` is `SLIDE_RIGHT` for
  tau ≥ 0 and `SLIDE_LEFT` for tau ≤ 0. There is no back-pressure. Near the end
  of each pass the cycles are only one beat long, so results come out in
  consecutive clocks. Keep them, or drop the ones you do not need, at that rate.
* **Latency.** After `busy` rises, `done` rises after `W·(W+1) + 5` clocks,
  where `W = N_SAMPLES / LANES`. That is one beat per clock, plus one clock each
  for the RAM read, the product registers, the sum register, the accumulator
  and the `done` register. At the reference size this is 1 001 005 clocks.
  `done` stays high until the next `acq_start`.

The datapath is pipelined so that cycles run back to back. The first beat of a
cycle loads its accumulator instead of adding to it. C is cleared on the clock
edge after the last beat of a cycle. Because of these two rules, no beat is
lost between cycles.

## Parameters and widths

`correlator_top` has three parameters: `LANES` (samples per word = number of
groups = multipliers per group), `SAMPLE_W` and `N_SAMPLES`. `N_SAMPLES` must be
a multiple of `LANES`. The accumulator width is derived as
`2·SAMPLE_W + clog2(N_SAMPLES)`, which is 37 bits at the defaults. That is
enough for `N_SAMPLES` products of two full-scale samples, so no overflow is
possible. Lags are `clog2(N_SAMPLES)+1` bits, signed.

Raising `LANES` to L uses L² multipliers and L accumulators. The run then takes
about `(N/L)²` clocks, so L trades chip area for speed. The design works for any
`LANES` ≥ 2. It has been simulated at 8 lanes and at 4 lanes.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with values that the testbench computes on its own, and each
ends by printing `TB_RESULT checks=… failures=…`.

* `tb_correlator_full`: the reference size with default parameters. Y is two
  periods of a full-scale sine, sampled at 1 MHz (2000 samples per period) in
  the first 4 ms of an 8 ms record. X is the same signal 2000 samples later.
  All 15 999 lags are checked against a direct evaluation of the sum. The test
  also checks that the maximum is at tau = +2000 and that the run takes
  1 001 005 clocks. In verilator it runs in about a second.
* `tb_correlator_top`: 96 samples, two back-to-back acquisitions. One uses
  random data and one uses only ±full-scale data. Every lag is checked against
  the definition, and so is the clock count. The test also counts the design's
  mechanisms and fails if any of them never happened: gaps in the sample stream,
  C cleared at a cycle boundary, cycles in each direction, a one-beat cycle,
  results in consecutive clocks, and an `acq_start` ignored during a run.
* `tb_correlator_lanes4`: the same test with 4 lanes.
* Unit tests: `tb_sample_packer`, `tb_seq_ram`, `tb_c_register`,
  `tb_mac_group` (slides 0, 1, 2 and 7, irregular beat spacing, latency),
  `tb_mac_array` (a short correlation checked against the definition) and
  `tb_corr_controller` (the exact beat schedule).

To simulate with verilator, for example:

    verilator --binary --timing --assert -Irtl rtl/corr_pkg.sv tb/tb_correlator_full.sv \
        --top-module tb_correlator_full
    ./obj_dir/Vtb_correlator_full

## Choices made in this implementation

These points are not fixed by the algorithm. They were chosen here:

* **Negative lags.** The only requirement is that Y also slides left. This
  design meets it by swapping the RAMs and running the same schedule again.
  The cost is that tau = 0 is computed twice, and the total time then equals
  two full passes.
* **Which word pairs with which.** In cycle k, X word `a+k` is paired with Y
  word `a`, which follows directly from the definition of R(tau) with Y sliding
  right. Pairing X word `a` with Y word `a+k` instead would give the negative
  lags.
* **Interfaces and handshakes.** The valid/start/done handshakes, the bit order
  inside a word, the one-clock RAM read, the pipeline depth, the reset style and
  the result port (eight lags in parallel, no buffer) are all choices of this
  implementation. The schedule's clock count matches the one the algorithm
  predicts.
* **Results are not stored.** They go out on `res_*` as they are produced. If
  all 15 999 values are needed after the run, a result memory (about 16 000
  words of 37 bits) has to be added outside.
* **Not included:** the A/D converters, the PLL, and any off-chip memory. The
  same scheme could use external DDR memory for sequences longer than the
  on-chip RAM holds.
