# Self-checking ripple-carry adder

A full adder that checks itself. Every variable travels on two wires that must
carry opposite values (double rail). The adder passes its three inputs through two
codes: first one LOW wire out of eight, then two HIGH wires out of four. It also derives
ten fault signals from those codes. A small clocking scheme tests the fault signals in three ways
in every cycle of operation. Any single gate stuck at 0 or at 1 then raises a
fault flag, and so does a non-complementary input pair. A result that comes with no
fault signal is known to be correct.

The RTL here builds the full-adder cell gate by gate. It chains cells into a
ripple-carry word and adds the clock generator and the fault-signalization
block that collect the checks of every cell on the chip.

## The adder cell (`sca_full_adder`)

Inputs are `x`, `y`, `c` (carry-in), each a `dual_rail_t` with `h` = the variable and
`l` = its complement. Outputs are `z` (sum) and `g` (carry-out) in the same form, plus the
fault wires. The cell is combinational and has four layers:

| layer | module | gates | what it does |
|---|---|---|---|
| input gates | `sca_input_gates` | X'_1 X'_0 Y'_1 Y'_0 C'_1 C'_0, X_1 X_0 Y_1 Y_0 C_1 C_0 | `X'_k = T & input`, `X_k = X'_k \| T*` |
| first level | `sca_first_level` | S_0 .. S_7 | S_i LOW iff the X, Y, C rails selected by the bits of i are all HIGH |
| second level | `sca_second_level` | Z_1 Z_0 G_1 G_0 | HIGH iff some S in its set is LOW |
| fault gates | `sca_fault_gates` | A_1..A_4, B_1..B_6 | code-violation detectors |

State i = 4C + 2Y + X. With valid inputs and T = 1, exactly S_i is LOW. The
second-level sets are:

| wire | meaning | S set |
|---|---|---|
| Z_1 | sum = 1 | S_1 S_2 S_4 S_7 |
| Z_0 | sum = 0 | S_0 S_3 S_5 S_6 |
| G_1 | carry = 1 | S_3 S_5 S_6 S_7 |
| G_0 | carry = 0 | S_0 S_1 S_2 S_4 |

One LOW S therefore raises exactly one wire of each output pair.

Fault wires:

| wire | condition | group |
|---|---|---|
| A_1 | Z_1 = Z_0 = 0 | first |
| A_2 | G_1 = G_0 = 0 | first |
| A_3 | G_1 = G_0 = 1 | second |
| A_4 | Z_1 = Z_0 = 1 | second |
| B_1..B_6 | both S of a pair LOW: (1,4) (1,2) (2,4) (3,6) (3,5) (5,6) | second |

## Why three checks are enough

The cell is made to take three distinct states, and each state is checked.

| state | T | T* | faultless signals | check |
|---|---|---|---|---|
| passive | 0 | 0 | all rails 0, all S 1, outputs 0 | first group (A_1, A_2) all HIGH |
| fault injection | 0 | 1 | all rails 1, all S 0, outputs 1 | second group (A_3, A_4, B_k) all HIGH |
| active | 1 | 0 | one S LOW, complementary outputs | every fault wire LOW |

- **Passive check.** A_1 = A_2 = 1 proves three things. Neither A gate is stuck at
  0. No S gate is stuck at 0. No output gate is stuck at 1. Any of these would put a HIGH
  on an output wire.
- **Injection check.** Forcing every rail HIGH drives every S LOW and every output HIGH. So
  A_3 = A_4 = B_k = 1 proves that none of these gates is stuck at 0, and that no S gate is
  stuck at 1.
- **Active check.** The fault gates have just been shown able to go HIGH. So all of them LOW
  means both output pairs are complementary.

Complementary outputs alone are not proof of a correct sum. Two or three LOW S
signals among {S_1, S_2, S_4}, or among {S_3, S_5, S_6}, still give a complementary
output. The B gates catch exactly these six pairs. No other multi-LOW pattern gives a
valid output. Once the S pattern is known to hold a single LOW, only the eight valid
input patterns remain possible, so the sum is right.

A non-complementary input pair is caught too. With both rails LOW no S goes LOW, so
A_1 fires. With both rails HIGH, two S signals go LOW whose states differ in one bit.
Their sums then have opposite parity, so Z_1 and Z_0 are both HIGH and A_4 fires.

The B gates buy multiple-fault coverage. A single fault is still always caught
without them.

The checks are not one-to-one with the faults. For example, an input-rail gate stuck
at 1 does not show in the passive state. A single HIGH rail cannot pull any S gate LOW.
It shows in the active state, as soon as the operand drives the other rail of that
pair HIGH. `USE_B_GATES = 0` builds that cheaper variant, with a second group of
only A_3 and A_4.

## Chip level (`sca_chip`)

`WIDTH` cells form a ripple-carry chain. The double-rail carry-out (G_1, G_0) of bit i
is the carry-in of bit i+1. During the passive interval the input gates block that
carry. During injection they override it. So the checks of each cell do not depend on
its neighbours.

### Check clock (`check_clock_gen`)

A period is `4 + ACT_CYCLES` cycles of `clk`:

```
cycle   0    1    2    3    4    5    6    7        (ACT_CYCLES = 4)
P       #
T*                #
T                          #########################  only if data_valid was HIGH in cycle 3
Q                                         #
```

P and T* fire in every period. T is withheld when the operands are not meaningful
(`data_valid` LOW), and the active check is then skipped. All four outputs come
straight from flip-flops.

### Fault signalization (`fault_signalizer`)

The first-group wires of all cells are gathered, and so are the second-group wires.
Three set terms drive the flag F:

- `P & NAND(first group)`
- `T* & NAND(second group)`
- `T & Q & OR(both groups)`

F sets on the rising `clk` edge that ends a failing cycle. It then stays set, and only
the power-on reset `rst_n` clears it. `nf`, `ns` and `fs` are brought out for
diagnosis.

### Using it

Drive `x`, `y` and `cin` as double-rail pairs. Raise `data_valid` for a period whose
operands matter, and hold the operands stable while `t` is HIGH. The sum is valid while
`t` is HIGH and certainly settled when `q` is HIGH. A result read in a period that ends
with `f` LOW is correct. In the passive interval every output rail is LOW, and while
`t_star` is HIGH every output rail is HIGH. Treat `sum` as data only while `t` is HIGH.

## Where this departs from, or adds to, the original description

- The original is asynchronous gate logic with an R-S flip-flop. Here, the
  three check pulses and F are clocked by a free-running `clk`. The adder cells remain
  purely combinational.
- Gate functions of the input, first- and second-level gates are derived from the
  published tables of signal values. Only A_1 is named there as a NOR.
- The assignment of the B gates to S pairs was reconstructed from the table of
  multi-LOW S patterns. Which of A_3 and A_4 watches Z and which watches G is a
  reading of the text. Neither choice changes what is detected.
- The second check is gated by T* (the published figure). One sentence of the text
  says T there, which would make that check impossible.
- The pulse widths, their spacing, the active-interval length and the `data_valid`
  rule for letting T through are choices made here. The original gives only the
  order of the pulses.
- The word width (`WIDTH = 4`) is a choice made here; the original designs a single
  full adder for ripple-carry use. The chip takes double-rail operands, as they would
  come from other checked blocks. No single-to-double-rail converter is included.

## Files

| file | content |
|---|---|
| `rtl/sca_pkg.sv` | `dual_rail_t`, `rails_t`, group sizes |
| `rtl/sca_input_gates.sv`, `sca_first_level.sv`, `sca_second_level.sv`, `sca_fault_gates.sv` | the four layers of the cell |
| `rtl/sca_full_adder.sv` | the cell |
| `rtl/check_clock_gen.sv` | T, P, T*, Q generator |
| `rtl/fault_signalizer.sv` | NF / NS / FS tests and flag F |
| `rtl/sca_chip.sv` | top: ripple chain, clock generator, signalizer |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sca_chip_no_b` for the variant without B gates |

## Verification

Every testbench checks against values worked out independently of the RTL. Each one
ends with a `TB_RESULT checks=N failures=M` line.

- Layer testbenches run exhaustively: all rail, S and output patterns. The fault-gate
  testbench also proves the B-gate property over all 256 S patterns.
- `tb_sca_full_adder` covers all 64 input patterns in all three clock states. It then
  forces each of the 34 gates of the cell to 0 and to 1. Every one of the 68 single
  faults fails at least one of the three checks. The same campaign on a cell built
  without B gates (28 gates, 56 faults) catches every fault as well. Finally it
  reproduces a double fault that escapes the checks. X'_0 stuck at 0 together with an input pair
  X_L = X_H = 1 looks like a valid X = 1 and raises nothing. The stuck gate is then
  caught as soon as an operand with X = 0 arrives.
- `tb_check_clock_gen` checks the pulse schedule cycle by cycle. It runs at two
  active-interval lengths, with random `data_valid`.
- `tb_fault_signalizer` checks the flag against a reference R-S model under random
  groups and pulses. It includes repeated power-on resets.
- `tb_sca_chip` runs the top at its default parameters. It runs about 300 checked
  additions, with full-width carry ripple and periods with T withheld. It then applies
  input-pair faults, and a stuck-at campaign on every gate of cell 1 with a reset
  before each fault. Each fault must raise F, and any period with a wrong sum must end
  with F set. It counts which of the three checks caught each fault first; all three
  occur. `tb_sca_chip_no_b` repeats all of this for the chip built without B gates.

Running one with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sca_pkg.sv tb/tb_sca_chip.sv --top tb_sca_chip
./obj_dir/Vtb_sca_chip
```

Stuck-at faults are injected from the testbenches with `force` on the internal gate
signals (`primed`, `injected`, `s`, `zg`, `a`, `b`). The RTL has no test hooks of its own.

Not covered: multiple faults are not tested systematically, and the clocked
rendering says nothing about glitches or settling times of a real asynchronous
implementation.
