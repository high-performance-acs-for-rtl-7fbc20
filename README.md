# Reconfigurable K = 7 Viterbi decoder with a pipelined T-algorithm ACS

Decoding a high-rate convolutional code with the Viterbi algorithm is
expensive. The rate-3/4, constraint-length-7 code has 64 states, and every
state has 8 incoming branches, so each trellis step needs 512 additions and
64 eight-way comparisons. The **T-algorithm** cuts the work, and the
switching activity with it, by discarding every state whose path metric is
more than a threshold `T` worse than the best metric of that step. The
difficulty is the best metric itself. Searching it among the 64 freshly
computed metrics puts a 64-input minimum in the add-compare-select (ACS)
feedback loop, and that loop sets the clock rate.

This design **precomputes** the best metric instead. It is derived from the
metrics two trellis steps earlier, so it can be computed in a pipeline
outside the ACS loop. The pipeline has three stages and stores only four
cluster minima, not a delayed copy of all 64 metrics. The same hardware
decodes rates 3/4, 2/3 and 1/2 at K = 7, chosen by a 2-bit mode input.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It lints clean
of errors under Verilator 5, and a Yosys/slang flow synthesizes it.

## The trellis and why the best metric can be precomputed

A state is 6 bits, split into halves `s = {H, L}`. With `k` information bits
per step (k = 3, 2, 1 for rates 3/4, 2/3, 1/2), the next state is

    ns = {L, H[2-k:0], u}           (the H part is empty at k = 3)

so a state has 2^k predecessors, `pred_j(ns) = {j, ns[2:k], ns[5:3]}`. The
k+1 code bits of a branch are `{u ^ h(s), ^H}`. Two properties follow:

* **One parity per state.** All branches leaving a state carry code words of
  the same parity, `^H`, and between them they cover every code word of that
  parity. The cheapest branch out of a state is therefore the minimum over
  the even code words (`evenBM`) or over the odd ones (`oddBM`).
* **The next parity is known in advance.** A successor's H is the present L,
  so one step later the parity is `^L` whatever input was taken.

So the states fall into four **clusters** of 16, `cluster(s) = {^H, ^L}`.
The cheapest two-step extension of a cluster is its minimum metric plus one
even/odd minimum per step:

    PMopt(t-1) = min over c of  minPM_c(t-3) + grp[c[1]](t-2) + grp[c[0]](t-1)

Here `grp[0]` is evenBM and `grp[1]` is oddBM. The generator `h(s)` and the
state ordering belong to this design; the functions are in
`rtl/viterbi_pkg.sv`. Its free distance is 4 at rates 3/4 and 2/3, and 6 at
rate 1/2.

## The three-stage precomputation pipeline (`tpre_unit`, `cluster_min`)

In trellis step `t`, the ACS reads `PM(t-1)` from the path metric register.
Before use, those metrics are purged against `PMopt(t-1) + T`. That
threshold comes out of a three-stage pipeline that started two steps
earlier:

| step | stage | work | registers after it |
|------|-------|------|--------------------|
| t-2 | 1 | cluster minima of the register, now `PM(t-3)`: two levels of 4-input minimum (16 → 4 → 1) | 4 cluster minima |
| t-1 | 2 | add the first-step group minimum `grp[c[1]](t-2)` | 4 partial sums |
| t | 3 | add `grp[c[0]](t-1)`, take the minimum of the 4 clusters, add `T`; then one 2-input compare per state (`purge_unit`) | – |

A straightforward two-stage version would keep a second copy of all 64
metrics for a cycle and take the cluster minima behind it. This design moves
the minimum finder in front of that delay, so only four minima are stored,
and the cluster search gets a stage of its own. The even/odd minima of each
step are registered once (`eo_q`): stage 2 reads that register one step
after it was written, and stage 3 reads the next value.

Two caveats:

* **PMopt is a lower bound.** It ignores purging inside the two-step window.
  It equals the best metric the purged trellis reaches unless a purged state
  lies on the best two-step path. A lower estimate only lowers the
  threshold, so in that corner a few more states are purged.
* **Timing.** Stage 3 shares its cycle with the ACS: the purge compare
  feeds the ACS inputs directly. The precomputation removes the 64-way search
  from the loop, but the loop still holds an adder, a 4-way minimum and a
  compare, ahead of the ACS adder and its 8-way minimum.

The pipeline is empty for the first two steps after reset. During those
steps `thr.valid` is 0 and nothing is purged.

## The reconfigurable ACS cell (`acs_unit`) and the ACSU (`acsu`)

Each of the 64 cells has eight adders, `PM(pred_j) + BM(branch j)`. A select
stage enables them by mode:

| mode | rate | adders used |
|------|------|-------------|
| `00` | 3/4 | 0..7 |
| `01` | 2/3 | 0..3 |
| `10` | 1/2 | 0..1 |

A disabled adder offers an invalid candidate. A tree of 2-input comparators
(two 4-input minima, then one 2-input) selects the result. On a tie the
lower branch index wins. The index `j` is the cell's decision, sent to the
survivor memory.

`acsu` wraps the 64 cells. It holds the purge unit in front of them, the
per-mode trellis wiring (`pred_state`, `codeword`) and the path metric
register. After reset only state 0 is valid, with metric 0.

**Path metrics** are 10 bits (`PM_W`), kept modulo 2^10, with a valid bit.
Comparisons use the sign of the difference, so metrics never need
rescaling, as long as the live metrics span less than 512. A state that was
never reached, or was purged, is invalid and never wins a comparison.

## Branch metrics and their group minima (`bmu`, `min_bmg_unit`)

`bmu` takes a 4-bit hard-decision word per step (3 or 2 bits at the lower
rates). For each of the 16 code words it produces the Hamming distance,
0..4.

`min_bmg_unit` reduces these metrics to the values the precomputation needs.
Branch-metric group `g` holds the code words with index `g` modulo 4: four
words at rate 3/4, two at rate 2/3, one at rate 1/2. The reduction works as
follows:

* At rate 3/4, a group takes two levels of 2-input comparators; at rate 2/3
  it takes one.
* An input-select stage between the two levels feeds the second level the
  raw rate-2/3 metrics.
* A second input select passes the single rate-1/2 metric straight through.
* Then `evenBM = min(minBMG0, minBMG2)` and `oddBM = min(minBMG1, minBMG3)`.

## Survivor memory (`smu`)

The survivor memory uses register exchange. Each state keeps the last
`DEPTH = 32` information symbols of its survivor path. Every step, each
state copies the register of the predecessor its decision selects, shifted
by one symbol. The output is the oldest symbol of the state with the best
stored metric. Each state is a separate generate block with an 8-way
select, which keeps synthesis time linear in `DEPTH`.

## Top level (`viterbi_decoder`)

    in_word ─► bmu ─► BM register ─► acsu (purge · 64 ACS · PM register) ─► smu ─► out_sym
                         │                 │
                         ▼                 ▼
                  min_bmg_unit ───► tpre_unit ──► threshold back to the purge

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `mode` | in | 2 | `00` rate 3/4, `01` rate 2/3, `10` rate 1/2. Change it only during reset |
| `threshold` | in | 8 | T-algorithm threshold `T` |
| `in_valid`, `in_word` | in | 1, 4 | one code word per step, hard decisions in the low 4/3/2 bits |
| `out_valid`, `out_sym` | out | 1, 3 | decoded symbols in order, in the low 3/2/1 bits |
| `step_valid` | out | 1 | a trellis step is computed this cycle |
| `opt_valid`, `pm_opt` | out | 1, 10 | the precomputed best metric of the step being purged |
| `purged_count` | out | 7 | states discarded in this step |

Throughput is one trellis step per clock. A gap in `in_valid` stalls every
register. Without stalls, a decoded symbol appears `DEPTH + 2` cycles after
its code word: one cycle in the input register, `DEPTH` trellis steps, and
one cycle in the output register. The first `DEPTH` steps produce no output,
so flush the end of a message with `DEPTH` further code words.

## What follows the reference architecture and what is this design's own

These parts follow the reference architecture:

* 64 states, 8 incoming paths per state, and reconfiguration to rates 2/3
  and 1/2 at K = 7.
* The 8-adder cell with mode-enabled adders and mode codes 00/01/10.
* Four 16-state clusters and the even/odd branch-metric minima.
* The minBMG unit with two input-select stages.
* The three-stage precomputation, with the cluster minimum finder moved in
  front of the delay and only four values stored.
* The purge rule "metric − optimum > T".

These parts are this design's own:

* The code generator, and therefore the cluster, group and parity
  definitions.
* Hard-decision Hamming metrics.
* 10-bit modular metrics with valid bits.
* The reset state.
* Putting the threshold addition in stage 3 and the purge directly in front
  of the ACS.
* The `in_valid` stall handshake.
* Register-exchange survivor memory with `DEPTH = 32` and best-state output.
* The 8-bit threshold.

Only the reconfigurable decoder is built. In mode `00` it is the fixed
rate-3/4 decoder, with the extra selection logic. The earlier two-stage
precomputation architecture, which stores all 64 metrics for a second
cycle, is not included.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Each was also run
against a deliberately broken copy of its module, and every one reported
failures.

| testbench | what it checks |
|-----------|----------------|
| `tb_bmu` | all modes × all 16 received words × all 16 metrics |
| `tb_min_bmg_unit` | random metrics; group, even and odd minima per mode |
| `tb_acs_unit` | random and tied inputs, invalid inputs, modular wrap-around; value and decision |
| `tb_purge_unit` | threshold boundary (equal is kept), invalid threshold |
| `tb_cluster_min` | cluster minima, enable/hold, reset |
| `tb_tpre_unit` | precomputed optimum lags the metrics by exactly two steps, stays invalid for two steps after reset, holds during idle cycles |
| `tb_acsu` | 150 steps per mode against a forward trellis model: purge flags, decisions, all 64 metrics |
| `tb_smu` | a planted true path is read out in order after `DEPTH + 1` steps, in all modes |
| `tb_viterbi_decoder` | full-size end to end, all three rates. Error-free channel: exact decoding, latency `DEPTH + 2`, precomputed optimum 0. Channel with isolated bit errors and random input gaps: every error corrected. It also counts purges, stalls, optimum-valid steps, corrected errors and modes run |

`tb/conv_encoder_model.sv` is a behavioural encoder for this design's code.
It is written directly from the shift-and-XOR rules, not from the decoder's
package, so it checks the trellis tables independently.

To run a testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal --top-module tb_viterbi_decoder \
      -Irtl -y rtl -y tb rtl/viterbi_pkg.sv tb/tb_viterbi_decoder.sv -o sim
    ./obj_dir/sim

The full-size end-to-end test runs in well under a second.

## Changing it

* Survivor depth: the `DEPTH` parameter of `viterbi_decoder` and `smu`.
* Metric and threshold widths: `PM_W` and `TH_W` in `viterbi_pkg`. Keep the
  metric spread, roughly `T` plus a few branch metrics, below 2^(PM_W-1).
* A different code: rewrite `next_state`, `pred_state`, `sym_of`,
  `codeword` and `cluster_member` in `viterbi_pkg`, and update the encoder
  model. The precomputation stays exact only if every state's branches
  cover one whole parity group, and its successors' parity depends on the
  state alone.
