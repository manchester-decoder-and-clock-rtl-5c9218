# Manchester decoder and clock recovery

A small, purely digital receiver for a Manchester-coded line. A free-running
clock (`CLK`), many times faster than the bit rate, samples the line. The
receiver measures the time between successive line edges and works out the
code's half-cycle length from it. With that it rebuilds two clocks from the
line and decodes the data:

| port         | dir | meaning |
|--------------|-----|---------|
| `CLK`        | in  | free-running sampling clock |
| `RST`        | in  | synchronous, active-high reset |
| `MANCH`      | in  | Manchester-coded line, asynchronous to `CLK` |
| `SYNC`       | out | recovered clock at the bit rate; rises just after each mid-bit edge |
| `DBL_BSB`    | out | recovered clock at twice the bit rate |
| `SERIALDATA` | out | decoded bits, one per `SYNC` period; take each on the falling edge of `SYNC` |

There is no PLL and no fixed oversampling ratio. The decoder learns the bit
rate from the first two edges and keeps tracking it. The default convention
is G. E. Thomas (rising mid-bit edge = 0, falling = 1). IEEE 802.3
(falling = 0, rising = 1) is a parameter.

## The idea: two counters and which edges matter

Every Manchester bit has one transition in its middle: the *significant*
edge. Between two equal bits the line also has to change at the bit
boundary. Between two different bits it does not. So the time between two
consecutive edges is always either one half-cycle or two.

Two counters measure that time:

* `pos_cnt` is cleared by every rising edge of the line.
* `neg_cnt` is cleared by every falling edge.

At a rising edge, `neg_cnt` therefore holds the length of the interval that
just ended, and at a falling edge `pos_cnt` does. The smaller counter always
belongs to the most recent edge.

## Half-cycle estimate (`halfcycle_estimator`)

Two estimates are kept. `hc1` is refreshed on rising edges and `hc2` on
falling edges. Each is checked against the other, with a margin
`jitter = hc/8` that is recomputed on every edge. For an interval `m`:

| condition (other = the other estimate)            | action |
|---------------------------------------------------|--------|
| `other - jitter <= m <= other + jitter`           | store `m` (one half-cycle) |
| `2(other - jitter) <= m <= 2(other + jitter)`     | store `m/2` (two half-cycles: a missing boundary edge) |
| neither                                           | keep the old value |

Start-up works like this:

* The first edge after reset only arms the estimator.
* The interval between the first and second edges is stored unchecked, as
  one half-cycle. This is correct only if **the first two data bits are
  equal**.
* Each estimate gets a valid flag from its first update on.

## Rebuilding the clocks (`clock_recovery`)

This is the least obvious part. `SYNC` and `DBL_BSB` are not produced by a
counter that divides `CLK`. They are *inverted* whenever one of these events
occurs:

1. **A line edge** (a counter reads 0): invert both.
2. **A missing boundary edge**: take the counter of the most recent edge,
   with its estimate (`pos_cnt` with `hc1` after a rising edge, `neg_cnt`
   with `hc2` after a falling one). When it reaches `hc + jitter` and no edge
   has come, the bit boundary has passed, so invert both.
3. **A quarter point**: when that counter reaches `hc/2` or `3hc/2`, a
   quarter or three quarters of a bit period, invert only `DBL_BSB`.

Rules 2 and 3 wait until the estimate they use is valid. Rule 1 works from
the very first edge. The first edge is taken as a significant one. The result
is that `SYNC` rises right after every mid-bit edge and falls at every bit
boundary. `DBL_BSB` toggles four times per bit.

Thomas code, bits 0 0 1 1 (one character is an eighth of a bit; the
half-cycle is 4 characters and `jitter` one):

```
bit            0       0       1       1
MANCH       ____----____--------____----____
SYNC        ____----____-----___----____----
DBL_BSB     ____----__--__---_--__--__--__--
```

Both outputs reset to 0. `DBL_BSB` rises at the first edge and stays high
for that whole half-cycle, because no estimate exists yet. From the second
edge on it falls at every edge and bit boundary and rises a quarter bit
later. Where no boundary edge exists (between the second and third bit),
both outputs are inverted `jitter` cycles late. Their high pulses before
that point are therefore wider than normal.
Every edge of `SYNC` and `DBL_BSB` is a data-dependent event: treat them as
strobes for logic in the same system, not as clean clocks.

The diagram leaves out the fixed latency given under Timing.

## Decoding (`bit_decoder`)

Just after a rising edge of `SYNC` the line holds the second half of the
current bit. Under Thomas the bit is the inverse of the line. Under IEEE
802.3 it is the line itself. The bit is registered when the rising edge of
`SYNC` is seen and held for a whole bit period. A downstream receiver takes
it on the next falling edge of `SYNC`. The first bit is decoded from the
first edge on.

## Timing

Let `P` be the `CLK` edge that first samples a line transition. Then:

* `P+1`: the synchronised line changes, and `pos_edge`/`neg_edge` is high
  for one cycle.
* `P+2`: the counter of that polarity is cleared, and a new `hc1`/`hc2`
  appears.
* `P+3`: `SYNC` and `DBL_BSB` are inverted.
* `P+4`: `SERIALDATA` is updated, after a mid-bit edge.

For the missing-boundary and quarter rules, times are counted from the
counter clear at `P+2`. A missing boundary is declared `hc + jitter + 1`
cycles after `P+2`.

## Operating limits

* The line must idle at the level of the first half of bit 0, so that the
  first edge is a mid-bit edge. The first two bits must be equal.
* The half-cycle must be at least 8 `CLK` cycles, so that `jitter` is not 0.
  It must also be below `2^CNT_W - 1` cycles (65534 at the default
  `CNT_W = 16`).
* Edge timing error is tolerated up to about `hc/8` cycles. That budget
  covers both the displacement of the current edge and the error it left in
  the estimate, because each estimate is simply the last interval accepted.
  In simulation, ±1 cycle works at `hc = 25` and ±2 at `hc = 64`. At
  `hc = 16` only jitter-free input is reliable.
* A glitch or a spurious edge inverts `SYNC` like any real edge. No recovery
  logic exists beyond resetting. A long silence saturates the counters. The
  next interval is then ignored, but the estimates kept from before are
  still used.

## Design choices beyond the original description

The counter, estimate, clock and decode rules above follow the original
module. The following are choices of this implementation:

* **One clock domain.** `MANCH` passes a two-flip-flop synchroniser
  (`SYNC_STAGES`). Edges are found by comparing consecutive samples. The
  decoder detects the rising edge of `SYNC` instead of using it as a clock.
* **Interval = counter + 1.** A counter reads 0 in the cycle after its edge.
  Counters saturate and reset to all ones, which means "no edge yet".
* **The two-half-cycle window** is read as `[2(hc - jitter), 2(hc + jitter)]`.
* **Holding on a bad interval.** An interval outside both windows, or one
  that saturated its counter, leaves the estimate unchanged.
* **Valid flags** gate rules 2 and 3 until an estimate exists.
* **`jitter` is truncated**: `hc >> 3`. One register is shared by both
  polarities and written on every edge.
* The other start-up mode, for streams whose first two bits are known to
  differ (halve the first interval), is not implemented.

## Files

| file | contents |
|------|----------|
| `rtl/manch_pkg.sv` | convention enum, estimator update kinds, default widths |
| `rtl/edge_counters.sv` | synchroniser, edge strobes, `pos_cnt`/`neg_cnt` |
| `rtl/halfcycle_estimator.sv` | `hc1`, `hc2`, `jitter`, valid flags |
| `rtl/clock_recovery.sv` | `SYNC` and `DBL_BSB` |
| `rtl/bit_decoder.sv` | `SERIALDATA` |
| `rtl/mydecoder.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mydecoder_ieee` |

Parameters of `mydecoder`:

* `CNT_W` (16): width of the counters and estimates.
* `SYNC_STAGES` (2, minimum 2): depth of the synchroniser.
* `CONVENTION`: `manch_pkg::CONV_THOMAS` (the default) or
  `manch_pkg::CONV_IEEE8023`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/manch_pkg.sv tb/tb_mydecoder.sv --top-module tb_mydecoder
./obj_dir/Vtb_mydecoder
```

To run another test, substitute its name for `tb_mydecoder`.

What the tests cover:

* `tb_mydecoder` drives the design at its default parameters. It first
  sends the bit sequence `00110101010000000111` at a half-cycle of 25
  cycles, then random 62-bit
  streams with half-cycles of 16, 25, 40 and 64 cycles and random edge
  displacement. It checks:
  * every decoded bit, taken at the falling edge of `SYNC`;
  * one `SYNC` rise per bit, at the fixed latency given above;
  * two `DBL_BSB` rises per bit, and a `DBL_BSB` fall at each `SYNC` rise;
  * convergence of `hc1`/`hc2`.
  It also counts the start-up estimate, in-range updates, halving, edge
  inversions, missing-boundary inversions and quarter inversions, and fails
  if any of them never occurred.
* `tb_mydecoder_ieee` runs the same test with the IEEE 802.3 convention.
* The block testbenches compare each module with reference values worked
  out independently. They check:
  * `edge_counters`: counter values derived from the record of line
    samples;
  * `halfcycle_estimator`: hand-worked cases and an integer model;
  * `clock_recovery`: toggle times computed from an edge list;
  * `bit_decoder`: both conventions.
