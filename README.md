# Totally self-checking Berger-code checkers for k = 2^(r-1) information bits

A Berger code protects k information bits with r = ⌈log2(k+1)⌉ check bits that
hold, in binary, the number of zeros among the information bits. It detects
every unidirectional error: any set of 1→0 flips, or any set of 0→1 flips,
across the whole word. A checker recomputes the zero count from the
information bits and compares it with the received check bits. It should be
*totally self-checking*. That means two things:

* a fault inside the checker never turns a bad word into a "good" answer;
* the normal stream of valid words exposes any single stuck-at fault in the
  checker.

The textbook checker inverts the recomputed count and compares it bit by bit
with the check bits through a tree of two-rail checkers. Its weak spot is the
most common word size, k = 2^(r-1) (8, 16, 32, … bits). There, the top count
bit y_{r-1} is 1 for only one word, the all-zero word. The rest of the time it
is 0. The comparison tree therefore never sees enough different inputs to
test itself.

This RTL builds two fixes. Both keep the textbook counter and tree for the
lower r-1 bits and change only the last comparison stage:

* **BC1** closes the tree with **M-TRC**, a chain of two two-rail checkers. The
  first one mixes in an extra complementary pair (fi, gi) that toggles on its
  own, for example the output of another self-checking checker elsewhere in
  the system. Because of that pair, both cells receive all four two-rail
  patterns, although the top bit pair almost never changes. The output is a
  two-rail pair (z1, z2).
* **BC2** closes the tree with **M-TRC\***, four XOR gates and a
  transistor-level gate, **CMOS-GATE\***. They fold a periodic signal s, such
  as the system clock, into both pairs. While the word is valid and the
  checker is healthy, the single output Z is the complement of s, so Z
  toggles. A bad word or a stuck-at fault makes Z stop following ~s in at
  least one phase.

The top module `berger_tsc_checkers` holds one BC1 and one BC2 side by side on
the same code word. Each has its own counter and tree.

## Signalling conventions

| checker | healthy, valid word | error |
|---|---|---|
| BC1 `(bc1_z1, bc1_z2)` | `01` or `10` | `00` or `11` |
| BC2 `bc2_z` | equals `~s` in both phases of `s` | differs from `~s` in at least one phase |

BC1 also flags a non-complementary external pair (fi = gi). The value of a
correct BC1 output (01 or 10) depends on the word and on fi, so an observer
checks only that the two rails differ. BC2 needs an observer that compares Z
with ~s, or checks that Z toggles in step with s. That observer is not part of
this RTL. Both checkers are combinational from the code word to the output.
The one exception is the output node of CMOS-GATE\*, which holds its value
(see below).

## Structure

```
 x[K-1:0] ──► 0's counter ──► y[R-1:0] ──► invert ──► ~y
                                                    │
 c[R-2:0], ~y[R-2:0] ──► TRC-TREE (R-1 pairs) ──► (tf, tg)
 c[R-1],   ~y[R-1]   ─────────────────────────────┐
                                                  ▼
             BC1:  M-TRC (fi, gi)  ──► (z1, z2)
             BC2:  M-TRC* (s)      ──► Z
```

Each bit position forms a pair (~y_i, c_i). For a valid word every pair is
complementary.

### 0's counter (`zeros_counter`)

The counter is a network of adders, not a behavioural popcount, because the
self-checking argument needs a circuit with no redundant logic.

* **First level.** Complementary cells read the raw bits, so no inverters are
  needed.
  * **C-FA:** `2C+S` = number of zeros among three inputs.
  * **C-HA:** `2C+S` = number of zeros among two inputs.
  * C-FAs take x[2:0], x[5:3], and so on. The last two bits go to a C-HA. If
    four bits are left, they go to two C-HAs.
* **Column compression.** The weight-1 bits are reduced first, then weight 2,
  and so on. A column is a first-in, first-out list of bits:
  * while three or more bits are left, a full adder takes the three oldest
    bits and appends its sum to the list;
  * when exactly two bits are left, a half adder takes them;
  * every carry joins the next column after that column's own first-level
    bits.

For K = 8 this is exactly the published BC(12,8) network:

* C-FA(x2..x0), C-FA(x5..x3), C-HA(x7,x6);
* an FA on the three weight-1 sums gives y0;
* an FA on the three weight-2 carries, then an HA with the carry from the y0
  adder, gives y1;
* a last HA gives y2 and y3.

The schedule (cells per column, wiring) is computed at elaboration time by
functions in `berger_pkg`.

### TRC and TRC-TREE (`trc`, `trc_tree`)

The two-rail checker forms:

* `f = ai·bj + bi·aj`
* `g = ai·aj + bi·bj`

With complementary inputs, f = ai XOR aj and g = ~f. If either pair is 00 or
11, the output pair is 00 or 11. The tree is recursive:

* sub-tree TT-1 takes the upper ⌊N/2⌋ pairs;
* sub-tree TT-2 takes the lower ⌈N/2⌉ pairs;
* one TRC compares the two sub-tree outputs.

The recursion is unrolled at elaboration time. Cells are numbered in
post-order, and a constant function finds each cell's two children, so no
module instantiates itself. For K = 8 (three pairs) this gives two TRC
cells. The lower one merges pair 2 with the output of the upper one, which
merges pairs 1 and 0.

### Why BC1 self-tests (`m_trc`)

Over all valid words:

* the low r-1 counter bits take all 2^(r-1) values, so the tree sees every
  two-rail code word;
* the top pair a1b1 = (c_{r-1}, ~y_{r-1}) is almost always `01`;
* the tree output a2b2 alternates.

For BC(12,8), M-TRC's inputs a1b1a2b2 take exactly three values: `0110`,
`0101`, and `1010` (the all-zero word). With fi/gi toggling, TRC 1 and TRC 2
each still receive all four patterns 0101, 0110, 1001, 1010. The testbenches
check this coverage explicitly.

### BC2's output stage (`m_trc_star`, `cmos_gate_star`)

The four XOR gates compute:

* `g1 = b1^s`, `t1 = a1^g1`
* `g2 = b2^s`, `t2 = a2^g2`

For complementary pairs, t1 = t2 = ~s.

CMOS-GATE\* has two series transistors from Z to ground and two from Z to the
supply. When t1 = t2, one stack conducts and Z = t1. When t1 ≠ t2, neither
stack conducts and Z floats. Here the floating node is modelled as holding its
last value, an intentional latch (`always_latch`). Charge leakage is not
modelled.

A non-code pair makes t1 ≠ t2 in both phases, so Z freezes. If both pairs are
non-code, t1 = t2 = s and Z runs in the wrong phase. Either way, Z ≠ ~s in at
least one phase.

## Parameters and sizes

`K` (default 8) is the number of information bits. It must be a power of two
≥ 2; other values stop elaboration. `R = log2(K)+1` is derived. All modules
elaborate at K = 2 … 128. The published cost analysis counts gate inputs with
these per-cell costs:

* FA or C-FA: 10
* HA or C-HA: 4
* TRC: 12
* M-TRC\*: 10

With those costs, the networks built here cost:

| k | r | full adders (k−r) | half adders | gate inputs BC1 / BC2 | published |
|---|---|---|---|---|---|
| 8 | 4 | 4 | 3 | 100 / 86 | 100 / 86 |
| 16 | 5 | 11 | 5 | 190 / 176 | 186 / 172 |
| 32 | 6 | 26 | 5 | 352 / 338 | 352 / 338 |
| 64 | 7 | 57 | 7 | 682 / 668 | 678 / 664 |
| 128 | 8 | 120 | 7 | 1324 / 1310 | 1324 / 1310 |

For k = 16 and 64 (k mod 3 = 1), the first level needs two C-HA cells, so the
counter uses one half adder more than the published r−1. The published
structure is given only for k = 8, and the general grouping rule is this
design's own. The published gate-delay comparison is not reproduced, because
the RTL carries no delays.

## Where this RTL departs from, or adds to, the published design

* **Counter structure for k ≠ 8.** This is the design's own rule (see above).
  For k = 8 it matches the published network exactly.
* **Cell internals.** C-FA, C-HA, FA and HA are written from their functions
  (inverted parity/majority, standard adders), not as a copy of a specific
  gate network.
* **Rail assignment.** Which tree rail drives M-TRC's a2 input is this
  design's choice: the f rail.
* **M-TRC truth table.** The published partial truth table of M-TRC lists
  (t1,t2) and (z1,z2) equal to (fi,gi) in every row. No pair of two-rail
  checkers does that, so this RTL follows the gate-level two-rail checker.
  The reachable input set it produces for BC(12,8) is {0110, 0101, 1010}.
* **CMOS-GATE\* polarity.** Z = t1 = t2 = ~s, as the M-TRC\* truth table and
  the intended output waveform state. The floating state is modelled as a
  hold.
* **Top module.** Putting BC1 and BC2 in one top is a convenience. The two
  checkers are alternatives, and either can be used alone.

## Files

`rtl/` (one module or package per file):

* `berger_pkg.sv`: check-bit width and the counter's elaboration-time
  schedule.
* `c_fa.sv`, `c_ha.sv`, `full_adder.sv`, `half_adder.sv`: counter cells.
* `zeros_counter.sv`: the 0's counter.
* `trc.sv`, `trc_tree.sv`: two-rail checker and tree.
* `m_trc.sv`: BC1's closing stage.
* `m_trc_star.sv`, `cmos_gate_star.sv`: BC2's closing stage.
* `bc1_checker.sv`, `bc2_checker.sv`: the two checkers.
* `berger_tsc_checkers.sv`: top, with both checkers.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_berger_tsc_checkers.sv`: end to end at the default size.
  * Source: 3000 encoded words (random, all-zero and all-one).
  * Channel: single-bit, unidirectional 1→0 and 0→1 errors, and bad external
    pairs.
  * It counts every detection mechanism and fails if one never occurs.
* `tb_stuck_at.sv`: stuck-at fault grading of both checkers at K = 8 (see
  below).
* `tb_workloads.sv` (with helper `workload_runner.sv`): k = 8, 16, 32, 64,
  128 with random words and errors. It also checks the adder and gate-input
  counts above.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/berger_pkg.sv tb/tb_berger_tsc_checkers.sv --top-module tb_berger_tsc_checkers
./obj_dir/Vtb_berger_tsc_checkers
```

Replace the testbench name to run any other. Lint a module the same way with
`--lint-only -Wall`. To build a checker for another size, set `K`, for example
`berger_tsc_checkers #(.K(32))`.

## How far it has been checked

* **Exhaustive tests:**
  * every cell;
  * the K = 8 and K = 16 counters;
  * the trees for 1, 2, 3, 4 and 7 pairs, over all rail combinations;
  * BC1 over all 8192 combinations of information word, check symbol and
    external pair;
  * BC2 over all 4096 word/check combinations, each for a full period of s.
* **Random tests:** the larger sizes, on random words with injected errors.
* **Testbench strength:** each module's testbench fails on a deliberately
  broken version of that module.
* **Stuck-at grading (`tb_stuck_at.sv`, K = 8):** each of the following nets
  is stuck at 0 and at 1 in turn, and the checker is run over all 256 valid
  words:
  * every net between cells of BC1 and BC2;
  * the four product terms inside every two-rail checker cell.

  Results:
  * All 84 BC1 faults and all 56 BC2 faults reach the output for some valid
    word (self-testing).
  * No BC1 fault ever turns a valid word into the wrong complementary
    output (fault-secure).
  * With the external pair held constant, 3 of the 84 BC1 faults escape:
    two product terms of M-TRC's first cell stuck at 0, and one of its
    second cell. Catching them is the reason the toggling pair exists.
* **Not modelled:** faults inside the adder cells and CMOS-GATE\* (for
  example stuck-open transistors) and faults on fan-out branches.
