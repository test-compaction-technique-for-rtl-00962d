# MDSC: space and time compaction of test responses for built-in self-test

A built-in self-test applies many vectors to a circuit, and someone has to
judge the responses. Storing every response bit on chip costs too much. This
design reduces the responses in two steps:

1. **Space compaction.** A tree of two-input AND, OR and EXOR gates merges
   the circuit's *m* output lines into a single line.
2. **Time compaction.** A syndrome counter counts the ones on that line over
   the whole test.

The final count is the circuit's *syndrome*. One small comparator then
checks it against a single stored number. The scheme is called Modified
Dynamic Space Compression (MDSC):

- *Dynamic*: the operator of each tree node is chosen per circuit, from that
  circuit's structure and fault-free responses.
- *Modified*: before it is counted, the compacted stream is XORed with a
  fixed modifier sequence. This moves its ones count away from the point
  where counting hides the most errors.

Compaction always loses some information. A faulty circuit can give the
same count as a good one; the fault is then *masked*. Everything in the
method aims to keep masking rare.

The RTL contains:

- the self-test hardware: pattern generator, compaction tree, modifier,
  syndrome counter and equality checker;
- the small example circuits that the method is illustrated and evaluated
  on;
- a top that runs a self-test on each example circuit.

## Data path of one self-test

```
 test_pattern_gen --> circuit under test --m--> compaction_tree --Q--> output_modifier --Q'--> syndrome_counter --> equality_checker --> done / fault
   (start, last)                                  (AND/OR/EXOR)          Q' = Q xor S            (ones count)       ^ ref_syndrome
```

`mdsc_bist` wires this chain around an external circuit under test (CUT),
which connects through `cut_pattern` and `cut_response`. A one-cycle `start`
does three things: it clears the counter and the verdict, and it reloads the
modifier sequence. The generator then sends one vector per clock. The CUT,
the tree and the XOR are combinational, so each vector's bit is counted on
the clock edge that ends its cycle. The compaction therefore adds no clock
cycle to the test. `done` and `fault` rise on the (LEN+1)th clock edge after
the start edge, and they hold until the next start. A `start` that arrives
while a test is running is ignored.

## Choosing the tree: the detectable-error estimate

The hardware tree is fixed. The judgement behind it is made off-line, and
you need it to build a tree for a new circuit. The procedure works stage by
stage. Within a stage it pairs adjacent lines (1 with 2, 3 with 4, ...). For
each pair it takes the operator with the highest estimate

    E = S1 * R1 / (2L) + S2 * R2 / L

where the terms are:

- **L** is the test length.
- **R1** is how many of the 2L possible single-line flips (one flip per line
  per vector) change the gate's output. For an EXOR this is always 2L. For
  AND and OR it depends on the two lines' fault-free values.
- **R2** is how many of the L double flips (both lines at once) change the
  output. For an EXOR this is always 0.
- **S1 and S2** estimate how likely a fault is to corrupt one line of the
  pair or both. They come from the circuit's structure:
  - L1 and L2 are the numbers of lines that only the first or only the
    second output depends on.
  - L12 is the number of lines that both outputs depend on.
  - Then alpha = L1 + L2 + L12 and beta = L12 / 2.
  - S1 = alpha / (alpha + beta) and S2 = beta / (alpha + beta).

Some consequences:

- EXOR catches every single-line error but no double-line error.
- AND and OR catch some double errors, and they win when the two outputs
  share many lines.
- At the last stage, a tie between operators goes to the one whose output
  ones count is furthest from L/2, where the counter aliases most.

The trees in this RTL:

| Circuit | Tree | Where it comes from |
|---|---|---|
| Decimal-to-BCD converter (O1..O4) | O5 = O1 ^ O2, O6 = O3 ^ O4, out = O5 ^ O6 | the procedure's result for this circuit |
| 4-output demultiplexer | O12 = O1 \| O2, O34 = O3 \| O4, out = O12 \| O34 | the procedure's result for this circuit |
| alpha/beta example (`fig5_cut`) | one OR | this design applied the rule, E = 0.90 vs 0.84 (EXOR) and 0.22 (AND), with S1 = 16/19 |
| Boolean-difference example (`fig6_cut`) | one EXOR | this design applied the rule, E = 0.94 vs 0.71 (OR) and 0.30 (AND), with S1 = 16/17 |

To use another circuit, run the procedure and pass the result as the `GATES`
parameter of `compaction_tree` / `mdsc_bist`. It holds one 2-bit
`mdsc_pkg::gate_e` code per node. Node *k* is in `GATES[2k+1:2k]`, and nodes
are numbered stage by stage. An odd line left over in a stage passes on to
the next stage unchanged; that rule is this design's own.

## Why modify before counting

Take a stream of n bits with W ones. A counter cannot tell it from any other
stream with W ones: C(n, W) − 1 error patterns are hidden. That number is
largest at W = n/2. XORing the stream with a known sequence S before counting
changes W, and so it changes the number of hidden patterns by the factor
C(n, W') / C(n, W).

The modifier holds S in a 16-bit ring register, which reloads on `start` and
rotates once per vector. The default S is `1111_1010_0000_0101`, repeated. It
is the sequence that maps the 32-bit example stream D385_96C1h (15 ones) onto
2980_6CC4h (11 ones). That cuts the hidden patterns to C(32,11)/C(32,15) ≈
0.23 of before. `tb_output_modifier` reproduces this stream bit for bit.

The method does not say how S should be generated for a given circuit. This
design uses the one known S for every circuit, and `mod_en` switches the
modification on or off. For the example circuits this S does not help:

- It leaves the BCD converter's miss count unchanged.
- It makes the demultiplexer worse (see the table below).

The reference syndrome must be the one for the chosen `mod_en` setting.

## The syndrome and its blind spots

The counter's signature is the number of ones, so it cannot see the order of
the vectors. It catches every fault that only adds ones or only removes ones.
It misses errors that turn as many 0s into 1s as 1s into 0s. Reconvergent
fan-out causes exactly this. Two single-output circuits in the RTL show it:

- `fig13_cut`, F = x1 x2' x3' + x1' x2 x3, has a syndrome of 2 out of 8. With
  x1 stuck at 1 the circuit computes x2' x3', which also has 2 ones out of 8.
  The fault is masked.
- `fig14_cut`, F = x1 x2' x3' + x4' x5 x6, has no fan-out. Its syndrome is 15
  out of 64. With x1 stuck at 1 it rises to 22, so the fault is detected.

## The example circuits

Every CUT module has a `fault` input of type `mdsc_pkg::stuck_fault_t`
(enable, stuck value, line number). It places one stuck-at fault on a
numbered line. It exists so that test benches can measure fault coverage;
tie it to `NO_FAULT` in use.

| Module | Function | Fault lines |
|---|---|---|
| `bcd_encoder_cut` | 9 decimal lines → BCD: O1 = X1+X3+X5+X7+X9, O2 = X2+X3+X6+X7, O3 = X4+X5+X6+X7, O4 = X8+X9 | 29 lines, 58 faults |
| `demux4_cut` | O(k) = X1' X2 · (X3 X4 = k), so only X1X2 = 01 selects an output | 31 lines, 62 faults |
| `fig5_cut` | lines 6 = 1·2, 7 = 2·3, 8 = 4·5, O1 = 6·7, O2 = 7·8 | 1–10 |
| `fig6_cut` | 6 = 1·2, 7 = (2+3)', 8 = 4·5, O1 = 6+7, O2 = 7·8 | 1–10 |
| `fig13_cut`, `fig14_cut` | as above | inputs, then the output |

All six are gate-level models. Where a line fans out to several gates, each
branch is a fault site of its own: a fault on the stem reaches every branch,
and a fault on a branch reaches one gate input. Reconvergent fan-out of this
kind is what makes faults hide from a ones count.

### The BCD converter as gates

The converter is a two-level NOR–NAND network. Its lines 1–19 are numbered
as in the circuit's published drawing. That numbering does not follow the X
order: input lines 1–9 carry X1, X3, X5, X7, X2, X6, X4, X8, X9. This is the
only assignment under which the drawn gates produce the BCD truth table.

| Line | Gate |
|---|---|
| 10, 11, 12 | NOR(1, 9), NOR(2, 4), NOR(3, 4) |
| 13, 14, 15 | NOR(5, 6), NOR(7, 6), NOR(8, 9) |
| 16 = O1 | NAND(10, 11, 12) |
| 17 = O2, 18 = O3 | NAND(11, 13), NAND(12, 14) |
| 19 = O4 | NOT(15) |

Lines 4, 6, 9, 11 and 12 each feed two gates. Their ten branches are lines
20–29; the RTL's opening comment lists which is which. 29 lines give 58
single stuck-at faults, the number used in published results for this
circuit. That agreement supports this reading of the drawing.

A second check supports it too. Fault injection on this network finds, for
the pair O1/O2:

- L1 = 10 lines reach only O1;
- L2 = 6 lines reach only O2;
- L12 = 4 lines reach both.

So S1 = 20/22 ≈ 0.91 and S2 ≈ 0.09. These are the values the tree selection
for this circuit was published with, and `tb_bcd_encoder_cut` checks them.
For O3/O4 the network gives L1 = 10, L2 = 5 and L12 = 0, so S1 = 1. The
published figure is 0.95. Both lead to the same EXOR choice.

### The demultiplexer as gates

An inverter on X1 gives X1'. Two inverters in a chain on X3 give X3' and X3
again, and the same for X4. Four 4-input ANDs each take X1', X2 and one
polarity of X3 and X4. The drawing numbers no lines, so the numbering (1–31,
listed in the RTL) is this design's own. Published results for this circuit
use 56 faults, six fewer than the 62 here. Which lines they leave out is not
known.

For the pair O1/O2 the network's line counts give beta = 3.5, the published
value. They give alpha = 19 where the published value is 8. With either
value, OR beats EXOR for this pair (E = 0.93 against 0.84 here), so the tree
is the same.

In `fig5_cut`, fault injection finds the line counts L1 = 2, L2 = 3 and
L12 = 3, so alpha = 8 and beta = 3/2. `tb_fig5_cut` checks these numbers.

For `fig6_cut`, the hand analysis this design is based on gives L1 = 4,
L2 = 3 and L12 = 1. The RTL follows the circuit's equations instead. In them,
lines 2 and 3 reach both outputs through line 7, so a fault simulation gives
L1 = 2 and L12 = 3.

## Top level: `mdsc_bist_top`

Six independent self-tests share `clk`, `rst_n`, `start` and `mod_en`. The
array ports are indexed by `mdsc_pkg::CUT_*`:

- `ref_syndrome[i]`: reference syndrome, low bits used.
- `fault[i]`: stuck-at fault to inject into CUT i.
- `syndrome[i]`: 10 bits, zero-extended.
- `busy`, `done`, `fault_ind`: status and verdict of each test.
- `compacted`, `mod_seq`, `modified`: Q, S and Q' in each test cycle.

| Index | Circuit | Vectors | Fault-free syndrome (mod off) |
|---|---|---|---|
| CUT_BCD | BCD converter, EXOR tree | 10 decimal codes (all-zero, then X1..X9) | 5 |
| CUT_DMX | demultiplexer, OR tree | 16, binary count | 4 |
| CUT_F5 | `fig5_cut`, OR | 32 | 5 |
| CUT_F6 | `fig6_cut`, EXOR | 32 | 14 |
| CUT_F13 | `fig13_cut`, no tree | 8 | 2 |
| CUT_F14 | `fig14_cut`, no tree | 64 | 15 |

Two parameters control the BCD self-test:

- `BCD_LEN` (default 10) sets its length.
- `BCD_MODE` (default `PAT_DECIMAL`) sets the vector order. Set it to
  `PAT_EXHAUSTIVE` for a binary count. With `BCD_LEN = 512` this gives the
  full exhaustive test.

In the binary count, X(1) is the most significant bit, and pattern bit *i*
drives X(*i*+1).

## Measured fault coverage

`tb_fault_coverage` injects every fault on every line of the two gate-level
circuits, stuck at 0 and stuck at 1. The BCD converter runs the first 2, 4,
64 and all 512 vectors of the binary count; the demultiplexer runs all 16.
The bench reports the faults missed in two ways:

- **Per-output count:** a separate ones count on every CUT output, with no
  space compaction. A fault is missed if all the counts match.
- **MDSC:** the compacted syndrome, checked by the RTL.

| Circuit, vectors | Faults | Missed, per-output count | Missed, MDSC | Missed, MDSC + modification |
|---|---|---|---|---|
| BCD, first 2 | 58 | 22 | 25 | 25 |
| BCD, first 4 | 58 | 21 | 29 | 29 |
| BCD, first 64 | 58 | 4 | 11 | 11 |
| BCD, all 512 | 58 | 0 | 9 | 9 |
| demultiplexer, 16 | 62 | 0 | 20 | 31 |

Longer tests miss fewer faults, as the method expects. The losses from
compaction are larger than published figures for these circuits:

- BCD converter: 6 missed before and 7 after.
- Decoder: 0 before and 4 after.
- BCD losses of 6.9 %, 3.45 % and 1.72 % for 2, 4 and 64 vectors.

Those figures do not say which vectors were applied, in which order, or
exactly how the uncompacted responses were compared. So treat the table above
as what this RTL does, not as a reproduction. Much of the MDSC loss comes
from the ones count itself. In the demultiplexer, for example, a stuck-at-1
branch into one AND often switches on a second output in the same cycle as
the right one. The OR tree then still gives 1, so the count does not change.

## Limits

- The third evaluation circuit, a carry look-ahead generator, is not
  included. Its structure is not specified.
- The tree-selection procedure and the fault simulator are off-line software,
  not hardware. Only their results appear here, as the `GATES` parameters.
- The modifier sequence is a fixed parameter; nothing computes a good S for
  a circuit.
- The published fault-coverage numbers are not reproduced (see above), and
  the demultiplexer's fault list has 62 faults where published work has 56.
- The reference syndromes come in on ports. Where they are stored (ROM,
  fuses, tester) is left to the user.

## Files and simulation

`rtl/`:

- `mdsc_pkg.sv`: types, CUT indices and helper functions.
- `test_pattern_gen.sv`, `compaction_tree.sv`, `output_modifier.sv`,
  `syndrome_counter.sv`, `equality_checker.sv`: the self-test blocks.
- `mdsc_bist.sv`: one complete self-test.
- `*_cut.sv`: the example circuits.
- `mdsc_bist_top.sv`: the top.

`tb/` has one self-checking bench per module, plus `tb_fault_coverage.sv`.
`bcd_gate_ref.svh` and `demux_gate_ref.svh` hold net-list reference models
of the two gate-level circuits, which the benches include.
Each bench prints `TB_RESULT checks=N failures=M`. `tb_mdsc_bist_top` runs
the top at its default parameters through every fault and both modification
settings. To run a bench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/mdsc_pkg.sv tb/tb_mdsc_bist_top.sv \
          --top-module tb_mdsc_bist_top -o sim && ./obj_dir/sim
```

Replace the bench name to run any other.
