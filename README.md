# Sign detection for binary signed-digit numbers

A binary signed-digit (BSD) number is a string of digits d_k in {-1, 0, +1}
with value sum d_k * 2^k. Adders built on this redundant form are carry-free,
but they make it harder to tell whether a number is negative, zero or
positive. That question comes up in branches, division, square root, CORDIC,
rounding and normalisation. The number is not two's complement, so no single
bit holds the sign.

One property makes the sign easy to find: **the most significant non-zero
digit decides the sign**. The digits below position k together add up to at
most 2^k - 1 in magnitude, so they can never outweigh a non-zero digit at
position k. A zero number is always all zeros. Finding the sign therefore
means finding the leftmost non-zero digit. This design does that with a
balanced binary tree of two-input nodes, log2(N) levels deep.

## Digit encoding

Each digit travels on two wires, `{s, v}` (type `bsd_digit_t` in `bsd_pkg`):

| digit | s | v |
|-------|---|---|
|  -1   | 1 | 1 |
|   0   | 0 | 0 |
|  +1   | 0 | 1 |

The code `10` is never used. The logic treats it as don't care, so do not
drive it. `v` says "non-zero" and `s` says "negative".

## The tree

Every node reports two flags for the group of digits it covers (type
`bsd_flags_t`): `sign` (the group is negative) and `zero` (the group is
zero). The pair `sign=1, zero=1` cannot occur.

**Level 1: primary units** (`bsd_primary_unit`). Each unit takes two adjacent
digits, `hi = z[2p+1]` and `lo = z[2p]`:

    sign = hi.s | (lo.s & ~hi.v)     -- hi is -1, or hi is 0 and lo is -1
    zero = ~hi.v & ~lo.v             -- both digits are 0

**Levels 2 .. log2(N): secondary units** (`bsd_secondary_unit`). Each unit
merges two adjacent groups from the level below, `hi` (more significant) and
`lo`:

    sign = hi.sign | (lo.sign & hi.zero)   -- hi decides, unless hi is zero
    zero = hi.zero & lo.zero               -- zero only if both halves are

The root's flags are the outputs `sign` and `zero` of `bsd_sign_detector`.
A positive number gives `sign=0, zero=0`.

### Why the zero flag is an AND

The published form of this technique merged the zero flags with an OR. That
is wrong. A group is zero only when *both* halves are zero. With an OR, any
number that has a zero half reports itself as zero. For example, 1,-1,0,0
(value +4) comes out as zero. The error also spreads to the sign. A wrong
zero flag makes the next level up take its sign from the lower half. So
1,1,0,0,-1,0,-1,0 (value +182) comes out as negative *and* zero. This design
uses the corrected AND.

The sign equation of the primary unit also has a longer published form,
`hi.s&hi.v | lo.s&lo.v&~hi.v`. It is equivalent here, because `s=1` only
occurs together with `v=1`. The shorter form above is the one used.

## Modules

| file | contents |
|------|----------|
| `rtl/bsd_pkg.sv` | `bsd_digit_t`, `bsd_flags_t`, digit constants `BSD_ZERO`, `BSD_POS`, `BSD_NEG` |
| `rtl/bsd_primary_unit.sv` | level-1 node: two digits to flags |
| `rtl/bsd_secondary_unit.sv` | level-2+ node: two flag pairs to one |
| `rtl/bsd_sign_detector.sv` | the whole tree, top module |

`bsd_sign_detector` has one parameter, `N_DIGITS`, with a default of 64. It
must be a power of two and at least 2; any other value stops elaboration
with an error. Its ports:

| port | dir | type | meaning |
|------|-----|------|---------|
| `z` | in | `bsd_digit_t [N_DIGITS-1:0]` | the number, `z[N_DIGITS-1]` most significant |
| `sign` | out | `logic` | 1 when the number is negative |
| `zero` | out | `logic` | 1 when the number is zero |

The module is purely combinational: no clock, no reset, no latency. The
critical path runs through one primary unit and log2(N_DIGITS) - 1 secondary
units, each two gate levels deep. If you need to time it, put registers
around the module. A number shorter than `N_DIGITS` can be checked by
driving its unused high digits with 0, which leaves its value unchanged.

## Cost

Each unit maps onto a few two-input NAND gates and inverters:

* A primary unit takes 20 transistors. `sign` needs two inverters and two
  NANDs. `zero` needs one more inverter, a NAND and an output inverter.
* A secondary unit takes 16 transistors. `sign` needs an inverter and two
  NANDs. `zero` needs a NAND and an inverter.

An N-digit detector has N/2 primary and N/2 - 1 secondary units, so it costs
20*N/2 + 16*(N/2 - 1) transistors:

| digits | transistors | units (primary + secondary) |
|--------|-------------|-----------------------------|
| 4  | 56   | 2 + 1 |
| 8  | 128  | 4 + 3 |
| 16 | 272  | 8 + 7 |
| 32 | 560  | 16 + 15 |
| 64 | 1136 | 32 + 31 |

The RTL is written as equations, not as a NAND netlist. Gate mapping is left
to synthesis. A generic synthesis of the 64-digit default gives 126 AND, 63
OR and 64 NOT cells. The delay of the tree, about 3.4 to 8.7 FO4 inverter
delays for 4 to 64 digits, depends on transistor sizing. It is a circuit
estimate and cannot be checked from this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.

* `tb_bsd_primary_unit`: all 9 legal digit pairs. Each result is checked
  against the sign of the integer 2*hi + lo.
* `tb_bsd_secondary_unit`: all 81 x 81 pairs of 4-digit groups. The
  groups' flags are fed in, and the merged flags are checked against the
  integer value of the 8-digit number.
* `tb_bsd_sign_detector`: the end-to-end test. One stimulus drives detectors
  of 2, 4, 8, 16, 32 and 64 digits, the last at its default size. Each
  result is checked against the integer value of the digits, computed in a
  72-bit signed variable. The stimulus consists of:
  * the two worked examples above (1,-1,0,0 and 1,1,0,0,-1,0,-1,0, both
    positive);
  * zero;
  * all 6561 patterns of the low 8 digits, with the high digits zero and
    then random;
  * random numbers whose leading non-zero digit sweeps all 64 positions.

  The test also counts what it covered and fails if any count is zero:
  negative, zero and positive results; a leading digit at every position;
  both examples; and vectors on which an OR-merging tree would answer
  wrongly. Nearly all of the roughly 15,700 vectors are such vectors.
  There are about 94,000 checks in all, and the run takes well under a
  second.
* `tb_bsd_sign_detector_full`: the same stimulus and coverage counts on a
  single detector with every parameter at its default (64 digits).

To run a testbench with Verilator:

    verilator --binary --timing --assert --top-module tb_bsd_sign_detector \
        rtl/bsd_pkg.sv rtl/bsd_primary_unit.sv rtl/bsd_secondary_unit.sv \
        rtl/bsd_sign_detector.sv tb/tb_bsd_sign_detector.sv
    ./obj_dir/Vtb_bsd_sign_detector

The other two testbenches build the same way, with their own top module and
file. `bsd_pkg.sv` must come first.

## Limits and choices

* Only power-of-two sizes are supported. Pad other lengths with zero digits.
* The code `10` on a digit is not detected. It gives an arbitrary result.
* The flags come out as two separate bits. Their meaning (negative, zero)
  and the digit encoding follow the technique. The port types, the package
  and the size check are this implementation's own.
* Nothing is registered. Pipelining, if wanted, is up to the user.
