# CoMix-D: an RNG-free decorrelator for stochastic computing

In stochastic computing (SC) a value in [0, 1] is carried as the fraction of
1s in a bit stream: `x/n` is a stream of `n` bits with `x` ones. Multiplying
two such numbers takes a single AND gate, but only if the two streams are
*uncorrelated*. Streams that come from the same source, or have passed
through the same logic, are often strongly correlated, and the AND then
computes `min(x, y)/n` or something in between instead of `x*y/n^2`. The
amount of correlation is measured by the SC correlation (SCC): +1 for
maximal overlap of the 1s, -1 for minimal overlap, 0 for independent-looking
streams.

The usual fix is to convert both streams back to binary and regenerate them
with fresh random number generators (RNGs). That costs counters, RNGs and a
full stream of latency. This RTL implements a decorrelator that uses no RNG,
has no latency and holds only a few bits of state:

* **Two cheap FSMs make two versions of the input pair.** LiteSync pushes
  the pair toward SCC = +1. LiteDesync pushes it toward SCC = -1. Both keep
  the values `x/n` and `y/n`.
* **A perfectly uncorrelated pair lies between them.** It has exactly
  `x*y/n` positions where both bits are 1 ("11 pairs"). The SCC = +1 version
  has `a_max = min(x, y)` such pairs. The SCC = -1 version has
  `a_min = max(x + y - n, 0)`.
* **A multiplexer mixes the two versions.** It takes each output bit pair
  from LiteDesync with probability `p` and from LiteSync otherwise. `p` is
  chosen so that the expected number of 11 pairs is `x*y/n`.
* **The select stream is built from the same FSM outputs** and then regrouped
  by a BitAggregator, so that it does not follow the data bit by bit.

```
            +-----------+  xs, ys (SCC ~ +1)  +---------+
 x_in ──┬──>| lite_sync |───────┬────────────>|         |
 y_in ─┬┼──>|           |       │             | mix_mux |──> x_out, y_out
       ││   +-----------+       │     sel     |  0: xs,ys
       ││   +-------------+     │   ┌────────>|  1: xd,yd
       │└──>| lite_desync |─────┼───┼────────>|         |
       └───>|             | xd, yd (SCC ~ -1) +---------+
            +-------------+     │   │
                     │          v   │
                     │   +--------------+  sp_raw  +----------------+
                     └──>| sp_generator |─────────>| bit_aggregator |── sel
                         | (xs&ys) |    |          | flag + L-bit   |
                         |  ~(xd^yd)    |          | counter        |
                         +--------------+          +----------------+
```

## The mixing ratio

For the mixed pair to have `x*y/n` 11 pairs, `p` must satisfy

    p * a_min + (1 - p) * a_max = x*y/n

Solving this for the four input cases gives:

| case                 | p         |
|----------------------|-----------|
| x + y >= n, x < y    | x/n       |
| x + y >= n, x >= y   | y/n       |
| x + y < n,  x < y    | 1 - y/n   |
| x + y < n,  x >= y   | 1 - x/n   |

A stream with a density of exactly this `p` comes out of two gates on the
FSM outputs (`sp_generator`):

* **AND of the LiteSync pair.** Its ones count is `min(x, y)`, because the
  pair overlaps maximally.
* **XNOR of the LiteDesync pair.** The pair overlaps minimally, so it has
  either no 11 pairs or no 00 pairs. The XNOR therefore counts `x + y - n`
  ones when `x + y >= n`, and `n - x - y` ones otherwise.
* **OR of the two.** When `x + y >= n`, the XNOR ones fall inside the AND
  ones, so the OR counts `min(x, y)`. When `x + y < n`, they are disjoint,
  so the OR counts `min(x, y) + n - x - y = n - max(x, y)`. Both match the
  table.

These counts are exact only if the FSMs reach SCC = +1 and -1. With D = 1
they do not always get there. Over all value pairs, the density of `sp_raw`
differs from the ideal `p` by 0.008 on average (N = 8) and by up to 0.03
(N = 6, D = 4); see `tb_comix_d_fig5`.

## Why the select stream is regrouped (BitAggregator)

`sp_raw` is made from the same bits the MUX is selecting between. Used
directly, it would tend to pick LiteSync exactly where LiteSync holds a 1,
and the equation above would no longer hold. `bit_aggregator` breaks this
bit-level dependence while keeping the density of the stream:

* The output is a flag register, not the input bit.
* Each input bit that differs from the flag is counted in an L-bit counter.
  The bit itself is emitted as the flag value, so it is deferred rather than
  lost.
* On the 2^L-th differing bit the flag toggles and the counter wraps to 0.
* While the flag is 1, 2^L input 0s are emitted as 1s. While it is 0, 2^L
  input 1s are emitted as 0s. A full flag cycle therefore emits the same
  number of 1s it received.
* The output comes in runs of at least 2^L cycles.

Example with L = 2 and the flag starting at 1 (this example and the
L = 1 one in `tb_bit_aggregator` are reproduced exactly):

    in  110100110110011
    out 111111111000000

The output never drifts from the input's count of 1s by more than 2^L. The
testbench checks this.

## LiteSync and LiteDesync

Both FSMs pass X through unchanged and edit only Y. Each edit is paid back
later, so Y keeps its number of 1s up to the at most D bits still owed. The
state is that number of owed 1s, 0..D.

| FSM         | pair X,Y | condition        | output X',Y' | owed |
|-------------|----------|------------------|--------------|------|
| lite_sync   | 1,0      | owed < D         | 1,1          | +1   |
| lite_sync   | 0,1      | owed > 0         | 0,0          | -1   |
| lite_desync | 0,0      | owed < D         | 0,1          | +1   |
| lite_desync | 1,1      | owed > 0         | 1,0          | -1   |
| both        | other    |                  | X,Y          | =    |

With D = 1 these are two-state machines (S0 = nothing owed, S1 = one owed),
which is the published form. A larger D allows more edits of the same kind
in a row before the first one must be repaid.

## Timing and interface

`comix_d` ports: `clk`, `rst_n`, `x_in`, `y_in`, `x_out`, `y_out`.

* **Timing.** Each rising edge of `clk` consumes one bit pair. `x_out`/`y_out`
  belong to the `x_in`/`y_in` of the same cycle: there are no latency cycles
  and the rate is one bit pair per clock.
* **Registers.** The only state is two FSM registers of `ceil(log2(D+1))`
  bits each, plus the BitAggregator flag and its L-bit counter. With the
  defaults that is 7 flip-flops.
* **Combinational path.** `sel` comes straight from the flag register, so
  the path from input to output is the FSM logic followed by a 2:1 MUX.
* **Reset.** `rst_n` is asynchronous and active low. It sets both FSMs to
  their `*_INIT` state, the flag to `FLAG_INIT` and the counter to 0.
  Restart the circuit with a reset at the start of each new pair of streams.
  The accuracy figures below assume this. There is no valid/enable signal;
  to pause, gate the clock.
* **`x_out` equals `x_in`.** Neither FSM edits X. The X multiplexer is kept
  so that both outputs are built the same way, and synthesis removes it.

| parameter     | default | meaning                                          |
|---------------|---------|--------------------------------------------------|
| `D`           | 1       | FSM depth: edits that may be owed at once         |
| `L`           | 4       | BitAggregator counter width; flag toggles every 2^L deferred bits |
| `SYNC_INIT`   | 0       | LiteSync reset state (0..D)                       |
| `DESYNC_INIT` | 0       | LiteDesync reset state (0..D)                     |
| `FLAG_INIT`   | 1       | BitAggregator flag after reset                    |

## Accuracy

`tb_comix_d_fig5` feeds every value pair `x, y` in `0..2^N-1` as fully
correlated low-discrepancy streams (SCC = +1). Both streams come from the
first Sobol dimension, i.e. the bit-reversed index compared with the value.
The table shows the mean absolute error of the AND product of the outputs
against `x*y/n^2`, and the mean |SCC| of the output pair. L = 4 throughout.

| N (n = 2^N) | D=1 MAE / MASCC | D=2           | D=3           | D=4           |
|-------------|-----------------|---------------|---------------|---------------|
| 6           | 0.0093 / 0.273  | 0.0094 / 0.288| 0.0102 / 0.305| 0.0113 / 0.321|
| 7           | 0.0068 / 0.201  | 0.0063 / 0.209| 0.0065 / 0.219| 0.0068 / 0.227|
| 8           | 0.0055 / 0.165  | 0.0050 / 0.167| 0.0048 / 0.171| 0.0048 / 0.174|

Without decorrelation these inputs multiply to `min(x, y)/n`, an MAE of
about 0.08. The results of this RTL are in line with the accuracy published
for the design, though they are not a bit-for-bit reproduction: the stream
generator and the averaging details behind the published figures are not
fully known.

## How far to trust it, and where it is this design's own

Taken from the published design:

* the block structure;
* the D = 1 FSM transitions and outputs;
* the gate functions that build the select;
* which MUX input gets which FSM;
* the BitAggregator rule;
* the defaults D = 1 and L = 4.

The published bit-level example is reproduced end to end: x = 01111101,
y = 10101001 gives LiteSync Y' 01101001, LiteDesync Y' 10101010,
select 01101001 → 11110000, and y' = 10101001.

Choices made here:

* **Initial states.** The FSMs may start in any state. The published
  example starts LiteSync in S1 and uses L = 1, while the default reset state
  is S0. The testbenches cover both.
* **FSMs for D > 1.** They are built as saturating counters of owed bits.
  Only the D = 1 machines are specified in detail.
* **BitAggregator threshold.** "Reaching 2^L" is implemented as the wrap of
  the L-bit counter. The reset values of the flag and counter are chosen so
  that the published examples come out.
* **LiteSync/LiteDesync output SCC.** It was not matched against the published
  single-block figures (about ±0.99 at D = 1), because the input set behind
  them is not known. With uncorrelated Sobol inputs (dimensions 1 and 2,
  N = 8), these FSMs give about +0.94 and -0.87 on average.
* **Area and power.** The published numbers are 45 nm post-synthesis
  results and are not reproduced. The circuit is tiny: 41 word-level cells
  and 7 flip-flops at the defaults.

## Files

| file | contents |
|------|----------|
| `rtl/comix_d.sv`        | top: the two FSMs, select generation, BitAggregator, MUXes |
| `rtl/lite_sync.sv`      | LiteSync FSM |
| `rtl/lite_desync.sv`    | LiteDesync FSM |
| `rtl/sp_generator.sv`   | AND / XNOR / OR select generation |
| `rtl/bit_aggregator.sv` | flag + L-bit counter regrouping |
| `rtl/mix_mux.sv`        | the two 2:1 multiplexers |
| `tb/comix_ref_pkg.sv`   | cycle-accurate reference model, SCC function, mechanism counters |
| `tb/ld_sng.sv`          | low-discrepancy stream generator model (comparator + bit-reversed index) |
| `tb/tb_*.sv`            | self-checking testbenches, one per block plus the system tests |

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        tb/tb_comix_d.sv --top-module tb_comix_d
    ./obj_dir/Vtb_comix_d

Replace `tb_comix_d` with any testbench name. Each one prints
`TB_RESULT checks=<n> failures=<m>` at the end and has a watchdog.

* `tb_lite_sync`, `tb_lite_desync`: the published example, then random
  streams through D = 1..4, compared with an owed-count model.
* `tb_sp_generator`, `tb_mix_mux`: exhaustive truth tables and the published
  example streams.
* `tb_bit_aggregator`: both published examples, then random bursts through
  L = 1..4. It checks density preservation and run lengths, and that the
  flag toggles both ways.
* `tb_comix_d`: the published example, then all 64x64 value pairs at the
  defaults, bit-exact against `comix_ref_pkg`. It checks the one-pair-per-clock
  rate and accuracy bounds. It also counts each mechanism and fails if one
  never fires: both edits and saturation in each FSM, flag toggles both ways,
  both MUX inputs, and both branches of `p`.
* `tb_comix_d_full`: default parameters, all 256x256 value pairs plus random
  streams (about 17 M cycles, roughly 15 s).
* `tb_comix_d_fig5`: the accuracy table above, D = 1..4 and N = 6, 7, 8
  (about 20 s).

To try another configuration, override the parameters on the instance,
e.g. `comix_d #(.D(2), .L(3)) u (...)`. `comix_ref` in the testbench package
takes the same D and L.
