# Scaling by a constant in the residue number system

A residue number system (RNS) represents an integer `0 <= X < M` by its
remainders `x_i = X mod m_i` with respect to N pairwise coprime moduli, with
`M = m_1 * m_2 * ... * m_N`. Addition, subtraction and multiplication run on
all channels in parallel without carries. Dividing by a constant and rounding
down (*scaling*, `Y = floor(X/K)`) has no such parallel form. Without it, a
chain of multiplications grows until it overflows `M`.

This RTL scales by any constant `K` that is coprime to every modulus. It needs
a single base extension for the whole operand:

1. **Base extension.** Compute `<X>_K = X mod K` from all N residues.
2. **Per-channel scaling.** `X - <X>_K` is an exact multiple of `K`. `K` has an
   inverse modulo every `m_i`, so each channel finishes on its own:

   ```
   y_i = < <x_i - <X>_K>_{m_i} * <K^-1>_{m_i} >_{m_i}
   ```

Step 2 needs only two inputs per channel, `x_i` and `<X>_K`. In a
lookup-table implementation it is one table per channel. The hardware
therefore grows linearly with N. The usual approach takes K as a product of
some of the moduli and needs one base extension per channel, which grows as N².

## Worked example (the default configuration)

Moduli `{23, 25, 27, 29, 31}` (M = 13,956,975), `K = 1039`:

| | value |
|---|---|
| X | 578321 = {9, 21, 8, 3, 16} |
| `<K^-1>_{m_i}` | {6, 9, 25, 23, 2} |
| `<X>_K` | 637 |
| Y | {4, 6, 16, 5, 29} = 556 = floor(578321 / 1039) |

The full testbench checks every row of this table literally.

## Cost model: lookup cycles and r-input tables

The scheme is costed as a network of lookup tables (LUTs). Each LUT is
addressed by at most `r` residues. With `2^a`-word tables and `w`-bit
residues, `r = floor(a / w)`. For example, 64K-word tables and 5-bit residues
give `r = 3`. Time is counted in lookup cycles. Summing N terms with r-input
tables takes a tree of

* `T_r(N) = ceil(log_r N)` lookup cycles, and
* `S_r(N) = ceil((N-1)/(r-1))` tables.

The complete scaler takes `T_r(N) + 3` lookup cycles: `T_r(N) + 2` for the
base extension and 1 for the scaling step.

Counting each lookup stage of this RTL as one table gives `2N + S_r(N) + 1`:

* N per-channel base-extension stages;
* `S_r(N)` tree nodes;
* 1 mod-K stage;
* N channel lookups.

The published count for the scheme is `2S_r(N) + N + 4`. It rests on a
different base extension.

| N, r | this RTL | published |
|---|---|---|
| 5, 3 | 13 | 13 |
| 6, 3 | 16 | 16 |
| 8, 2 | 24 | 26 |
| 12, 2 | 36 | 38 |

This RTL's tree nodes and mod-K stage work on `log2 M`-bit words, so they are
not small tables (see below).

K is limited by the size of the channel table. A channel lookup with two
inputs fits one r-input table when K is at most `(r-1)·W` bits wide. The
default example uses an 11-bit K with a table one address bit larger:
`2^(11+5)` words. With `CHANNEL_TABLES = 1`, the table grows as `2^(ceil(log2 K) + W)`.
With `CHANNEL_TABLES = 0`, K has no width limit beyond `K < 2^32`.

In this RTL every lookup cycle ends in a register. The latency in clocks
therefore equals the lookup-cycle count: 5 clocks by default. The pipeline
accepts one operand per clock.

## Blocks

```
 x[0..N-1] --+-----------------------------------------------+
             |                                               |
             v                                               v
 +-- rns_base_extension ----------------------------+   delay line
 | cycle 1       v_i = <x_i <M_i^-1>>_{m_i} * M_i   |   (T_r(N)+2 clocks)
 | rns_lut_tree  sum of v_i mod M  (T_r(N) cycles)  |        |
 | last cycle    X mod K                            |        |
 +------------------------+-------------------------+        |
                          | <X>_K                            | x_i
                          v                                  v
        rns_scale_channel (one per channel, 1 clock) -> y[i]
```

| module | role |
|---|---|
| `rns_scaler` | top. Base extension, residue delay line, N channel lookups, valid pipeline |
| `rns_base_extension` | `<X>_K` from the residues, exact, `T_r(N)+2` clocks |
| `rns_lut_tree` | r-ary tree that combines N operands in `T_r(N)` clocks with `S_r(N)` nodes |
| `rns_scale_channel` | the formula of step 2 for one channel, 1 clock |
| `rns_pkg` | elaboration-time helpers: tree shape, modular inverse, gcd |

### Base extension: a choice of this implementation

Any exact base extension serves the scheme. This RTL uses the simplest exact
one, Chinese-remainder reconstruction, laid out as a lookup network:

* **Cycle 1.** One "table" per channel maps `x_i` to
  `v_i = <x_i · <M_i^-1>_{m_i}>_{m_i} · M_i`, where `M_i = M/m_i`. Each `v_i`
  is below `M`.
* **Cycles 2 to T_r(N)+1.** `rns_lut_tree` adds the `v_i` modulo `M`. The
  result is `X` itself in binary.
* **Last cycle.** `X mod K`.

This matches the `T_r(N)+2` lookup cycles of the base extension the scheme
was costed with. It needs no redundant channel, and its latency is fixed for
every X. Its table count is `N + S_r(N) + 1`.

Between tree levels it carries full `ceil(log2 M)`-bit words rather than
channel-width residues. In hardware, these tree nodes are therefore adders,
not small ROMs. That is the main place where this RTL departs from a pure
r-input-LUT realisation.

### The tree (`rns_lut_tree`)

Operands are grouped `r` at a time in order. A straightforward tree has
`ceil(N/r^l)` nodes in level `l`. This one has the same depth but combines, at
each level, only as many items as the remaining levels could not absorb.
Leftover items pass through a register. Every node but at most one per level
is then fully used. The total is exactly `S_r(N) = ceil((N-1)/(r-1))` nodes,
reported as the localparam `NUM_TABLES`.

Example: N = 5, r = 3.

* Level 1 adds x1..x3 and delays x4 and x5.
* Level 2 adds the three items left.

This uses 2 nodes. A straightforward tree uses 3. `rns_pkg::tree_tables`
gives the schedule.

Each node adds its inputs and subtracts the modulus up to `r-1` times.

### Channel lookup (`rns_scale_channel`)

By default each channel is a real table. It is a ROM of `2^(ceil(log2 K) + W)`
words addressed by `{<X>_K, x_i}`, and it is filled when the design is loaded.
For the default `K = 1039` (11 bits) and 5-bit residues, that is 64K words of
5 bits per channel. For each of the three larger configurations below it is
32K words.

With `STORED_TABLE = 0` (`CHANNEL_TABLES = 0` on the top), the same function
is built as arithmetic:

1. Reduce `<X>_K` modulo `m`, since it can exceed `m`.
2. Subtract, and add `m` back on borrow.
3. Multiply by the constant `<K^-1>_m` and reduce.

The table is filled incrementally. Each `<X>_K` row starts at the
arithmetic form's value for `x = 0`, and each further step of `x` adds
`<K^-1>_m` modulo `m`. This keeps the fill within the constant-evaluation
limits of synthesis front ends. The inverse `<K^-1>_m` is found by exhaustive
search while the design is elaborated. The channel testbench compares both
forms over every input pair.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 5 | number of channels (at most 16) |
| `MODULI` | `'{0:23, 1:25, 2:27, 3:29, 4:31, default:0}` | 16-entry list; the first N entries are the moduli |
| `K` | 1039 | scale factor; must be coprime to every modulus |
| `R` | 3 | inputs per table, sets the tree shape and latency |
| `W` | 5 | residue (channel) width in bits; every modulus must be at most `2^W` |
| `CHANNEL_TABLES` | 1 | channel lookups as stored tables (1) or as modular arithmetic (0) |

Elaboration stops with an error in any of these cases:

* two moduli share a factor;
* `K` is not coprime to a modulus;
* a modulus does not fit in `W` bits;
* `N` is out of range.

`M` must be below 2^128. Other configurations that have been simulated:

| moduli | W | R | K | channel lookups | latency (clocks) |
|---|---|---|---|---|---|
| {17,19,23,27,29,31} | 5 | 3 | 1021 | 32K-word tables | 5 |
| {37,41,43,47,53,59,61,63} | 6 | 2 | 509 | arithmetic | 6 |
| {67,71,73,79,83,89,97,101,103,107,109,113} | 7 | 2 | 251 | 32K-word tables | 7 |

The cost model sizes these for 32K-word tables, with K at most `15 - W` bits.
The K values are primes of that largest width.

## Interface and timing (`rns_scaler`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | |
| `rst_n` | in | 1 | asynchronous, active low; clears the valid pipeline only |
| `in_valid` | in | 1 | an operand is present |
| `x` | in | `[N-1:0][W-1:0]` | `x[i] = X mod MODULI[i]`, must be `< MODULI[i]` (asserted) |
| `out_valid` | out | 1 | a result is present |
| `y` | out | `[N-1:0][W-1:0]` | `y[i] = floor(X/K) mod MODULI[i]` |

* `out_valid` and `y` follow `in_valid` and `x` by exactly `T_R(N) + 3` clocks.
* There is no back-pressure. Operands may arrive on every clock or with gaps.
* Data registers are not reset. Only valid bits are.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a watchdog limit.

| testbench | what it checks |
|---|---|
| `tb_rns_scaler` | default configuration, 3000 operands with random gaps, 5-clock latency per operand, worked example, and the inverses `{6,9,25,23,2}` |
| `tb_rns_scaler_table1` | the three larger configurations above, 1500 operands each, latencies 5/6/7 |
| `tb_rns_base_extension` | `<X>_K` against `X mod K`, 4-clock latency, example value 637 |
| `tb_rns_lut_tree` | four tree shapes: sums, latencies and table counts |
| `tb_rns_scale_channel` | every `(x, <X>_K)` pair for moduli 23 and 32, in table and arithmetic form; the reference solves `y·K ≡ x − <X>_K` by search |

The scaler tests compare against `floor(X/K)` computed in binary. They also
count how often each of the following happens, and fail if one never does:

* a channel subtraction wraps;
* `<X>_K` exceeds every modulus;
* the CRT sum exceeds `M`, so the modular reduction in the tree matters;
* operands arrive back to back;
* idle cycles occur.

`tb/rns_scaler_checker.sv` holds the shared stimulus and scoreboard.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rns_pkg.sv \
    tb/tb_rns_scaler.sv tb/rns_scaler_checker.sv rtl/rns_scaler.sv \
    rtl/rns_base_extension.sv rtl/rns_lut_tree.sv rtl/rns_scale_channel.sv \
    --top-module tb_rns_scaler
./obj_dir/Vtb_rns_scaler
```

## Departures from the published scheme

* **Base extension.** The scheme leaves the method open. CRT reconstruction
  with wide adders is used here, as described above.
* **Tables written as logic.** The tree nodes, the mod-K step and the first
  base-extension stage are arithmetic on constants, not stored tables. Only
  the channel lookups are real tables, and only by default. The input/output
  behaviour equals that of the tables replaced, but gate count and timing
  differ from a pure ROM network.
* **Pipelining.** One register per lookup cycle, a valid bit, and
  asynchronous reset are this implementation's choices.
* **Tree shape.** The tree is packed to use `S_r(N)` nodes in total, not the
  `ceil(N/r^l)` nodes per level of a plain drawing. The depth is the same.
* **Baselines not built.** Schemes that scale with one base extension per
  channel, or with a full LUT tree per output channel, are only points of
  comparison. They are not built.

## Lint notes

* Verilator reports `rst_n` as used both synchronously and asynchronously.
  The synchronous use is only the `disable iff` of the input-range assertion.
* Verilator reports the localparam `NUM_TABLES` of `rns_lut_tree` as unused.
  It is there for users and testbenches.
