# Reversible-gate BCD adder and subtractor

Decimal (BCD) arithmetic built entirely from reversible logic gates: gates
with as many outputs as inputs, where each input pattern maps to its own
output pattern, so no information is lost in the gate. Three 32-bit (eight
decimal digit) units are built from a small gate library:

| unit | module | gates | what it computes |
|---|---|---|---|
| BCD adder | `bcd_adder` | Peres, Feynman, Fredkin | `a + b`, carry of every digit |
| BCD subtractor | `bcd_subtractor` | TR, Peres, Feynman, Fredkin | `|a - b|` and a sign, nine's complement method |
| BCD adder/subtractor | `dkg_addsub` | DKG (programmable), Feynman, Peres, Fredkin | `a + b` or `a - b` chosen by a mode input |

All three are purely combinational. The top module `bcd_reversible_top`
places them side by side with separate ports, and also brings out the two
4x4 gates of the library (HNG and PAOG) that none of the units uses.

The gates are written as ordinary SystemVerilog modules. The RTL therefore
shows the reversible gate structure, but a synthesis tool for a normal
(irreversible) technology will flatten it into ordinary logic. Unused gate
outputs are the "garbage outputs" of reversible design. They are declared
as `g_*` signals and left unread, so the linter reports them as unused
signals. That is expected.

## The gate library

Inputs are A, B, C, D and outputs P, Q, R, S (`'` is complement, `^` is xor).

| gate | module | outputs | role here |
|---|---|---|---|
| Feynman | `feynman_gate` | P=A, Q=A^B | with B=0, copies a signal (fan-out) |
| Fredkin | `fredkin_gate` | P=A, Q=A'B^AC, R=A'C^AB | swaps B/C when A=1, so Q is a 2:1 mux |
| Peres | `peres_gate` | P=A, Q=A^B, R=AB^C | half adder when C=0; two make a full adder |
| TR | `tr_gate` | P=A, Q=A^B, R=AB'^C | half subtractor B-A when C=0; two make a full subtractor |
| HNG | `hng_gate` | P=A, Q=B, R=A^B^C, S=(A^B)C^(AB^D) | full adder when D=0 (standalone) |
| PAOG | `paog_gate` | P=A, Q=A^B, R=AB^C, S=(A^B^D)^(AB^C) | standalone |
| DKG | `dkg_gate` | P=B, Q=A'C+AD', R=(A^B)(C^D)^CD, S=B^C^D | A=0: full adder of B+C+D; A=1: full subtractor of B-C-D |

The DKG gate is the design's programmable gate. With A=0, R is the majority
of B, C and D, which is the carry. With A=1, R equals B'(C^D)^CD, which is
the borrow of B-C-D. S is the sum or difference bit in both modes. One
control bit therefore turns a ripple of DKG gates from an adder into a
subtractor.

The two helper cells are `peres_full_adder` and `tr_full_subtractor`:

* Peres full adder: Peres(x, y, 0) gives x^y and xy. Then Peres(x^y, cin, xy)
  gives the sum x^y^cin and the carry (x^y)cin ^ xy.
* TR full subtractor for x-y-bin: TR(y, x, 0) gives x^y and x'y. Then
  TR(bin, x^y, x'y) gives the difference and the borrow bin(x^y)' ^ x'y.

## One decimal digit: add, test, correct

`bcd_adder_digit` is the core of everything. It works in three steps:

1. `rev_adder4` adds the two digits and the carry in, giving a 5-bit binary
   sum `{c4, s}` in the range 0..19. It is four chained Peres full adders.
2. `bcd_correction` tests whether that sum is above 9:
   `K = c4 | s3·(s2 | s1)`. In reversible form this is:
   * Peres(s1, s2, 0) gives s1^s2 and s1s2.
   * A Feynman gate xors the two, which gives s1|s2.
   * Peres(s3, s1|s2, c4) gives `s3(s2|s1) ^ c4`. An xor can stand for the
     OR here: c4 is set only for sums 16..19, and those have s3 = 0.
3. A second `rev_adder4` always forms `s + 0110`. Four Fredkin gates,
   controlled by K, then pass either `s` (K=0) or `s + 0110` (K=1). The
   sum's binary carry is dropped. K is handed from one Fredkin gate to the
   next through the gates' P output. After the last gate it becomes the
   digit's decimal carry.

Adding 6 skips the six unused codes 1010..1111. For example, 7 + 8 = 15 =
0 1111. That is above 9, so the digit becomes 1111 + 0110 = 0101 and the
decimal carry is 1: the result is 15 in decimal.

The sum bits feed both the test and the correction adder. A reversible
circuit may not branch a wire, so each sum bit is first copied with a
Feynman gate. One digit uses 18 Peres, 5 Feynman and 4 Fredkin gates. The
operands must be valid BCD: digit sums above 19 are outside the test's range.

## Eight digits: `bcd_adder`

The 8-digit adder (parameter `DIGITS`, default 8, 32-bit operands) is a
cascade of eight digit adders. Digit i adds bits `[4i+3:4i]` and the carry
of digit i-1. Digit 0 has no carry in. Every digit's carry is brought out on
`cout[i]`. The top bit, `cout[DIGITS-1]`, is the carry of the whole sum.
The carry ripples through all digits, so the delay grows linearly with
`DIGITS`.

## Subtraction by nine's complement: `bcd_subtractor`

The nine's complement of a digit is 9 minus the digit.
`nines_complement4` computes it as 1001 - b in a four-stage TR-gate ripple
subtractor. `bcd_sub_digit` feeds that complement into a BCD digit adder. The
stage-1 chain of eight such digits therefore forms `r = a + nines(b)`, with
an end carry `c`. Its digit carries come out on `cout`.

The textbook nine's complement method adds the end carry back into the
lowest digit (the "end-around carry"). Wired literally, that would be a
feedback loop, and reversible circuits allow none. Stage 2 applies the rule
without a loop:

* `c = 1` means a > b. The result is `r + 1`. A second chain of BCD digit
  adders adds it: the b inputs are 0, and the first carry in is `c`. The
  sign output `neg` is 0.
* `c = 0` means a <= b. The result is `nines(r)`, from one nine's complement
  unit per digit. `neg` is 1.

One Fredkin gate per bit selects between the two results, controlled by `c`.
For example, with four digits, 0042 - 0017: nines(0017) = 9982, and
0042 + 9982 = 1 0024. The end carry is 1, so the result is 0024 + 1 = 0025.
Reversed, 0017 - 0042: 0017 + 9957 = 0 9974. There is no end carry, so the
magnitude is nines(9974) = 0025 and `neg` = 1.

When a = b, r is all nines and c = 0. The output is then `diff = 0` with
`neg = 1`: the "negative zero" that every nine's complement subtractor has.
It is not suppressed.

The path runs through two digit-carry ripples: stage 1, then the increment
chain.

## The programmable unit: `dkg_addsub`

`dkg_addsub_digit` uses the DKG gate's control input as the mode
(`bcd_pkg::addsub_mode_e`: `MODE_ADD = 0`, `MODE_SUB = 1`). The same gates
are used in both modes:

* **Stage 1.** Four DKG gates form `a + b + cin` or `a - b - bin` in binary.
* **Correction.** A correction K is needed in two cases:
  * Adding: the sum exceeds 9. This is the same test as above.
  * Subtracting: the difference borrowed. A 4-bit result of a borrowing
    digit lies in 6..15, which is 6 too large.

  The >9 term is built from Peres and Feynman gates. A Fredkin gate forces
  it to 0 in subtract mode. A Feynman gate xors it with the stage-1
  carry/borrow, which gives K.
* **Stage 2.** Four more DKG gates, in the same mode, add or subtract
  `{0,K,K,0}` modulo 16. K is the digit's decimal carry or borrow.

Example: 3 - 5 gives 1110 with a borrow. Subtracting 0110 gives 1000 = 8,
with a borrow out. This is the ten's-complement digit of -2.

A DKG gate does not pass its control input through. The mode is therefore
copied by a chain of nine Feynman gates per digit, one copy for each DKG gate
plus one for the Fredkin gate of the test.

The 8-digit `dkg_addsub` chains the digits like the adder. In subtract mode
it returns `(a - b) mod 10^8`. If a < b, the final borrow `cout[7]` is set
and `s` is the ten's complement of b - a. Unlike `bcd_subtractor`, this unit
does not convert the result to sign and magnitude.

## Top level and interface

`bcd_reversible_top #(DIGITS = 8)`. All operands are packed BCD, with
digit i in bits `[4i+3:4i]`.

| ports | unit |
|---|---|
| `add_a`, `add_b` → `add_s`, `add_cout[DIGITS-1:0]` | BCD adder |
| `sub_a`, `sub_b` → `sub_diff`, `sub_neg`, `sub_cout[DIGITS-1:0]` | BCD subtractor |
| `as_mode`, `as_a`, `as_b` → `as_s`, `as_cout[DIGITS-1:0]` | DKG adder/subtractor (`as_mode` 0 adds) |
| `hng_in[3:0]` → `hng_out[3:0]`, `paog_in[3:0]` → `paog_out[3:0]` | standalone gates, `{D,C,B,A}` in, `{S,R,Q,P}` out |

There is no clock and no reset. The outputs are valid once the inputs have
propagated through the gates. A design that needs a registered interface
should put flip-flops around the top. The gates' pass-through outputs
(P and Q of HNG, P of PAOG) are wired straight from inputs by design.

`DIGITS` may be set to any positive value. 1 gives the 4-bit units and 16
gives 64-bit units. The testbench helpers handle up to 16 digits.

## How far it follows the original design, and where it departs

These points follow the original design:

* The gate equations.
* The digit adder's flow: binary add, test above 9, add 0110, carry out.
* The 8-digit cascade, with one carry output per digit.
* A Peres-gate adder, a TR-gate subtractor based on the nine's complement,
  and a DKG-gate adder/subtractor.
* The 32-bit default size.

These are this implementation's own choices:

* **Carries between digits.** The original block diagrams show a carry
  output per digit and no connection between digits. Its reported delays
  are the same at 4, 32 and 64 bits, which suggests that the digits were
  in fact independent. Here the digits are chained, because a multi-digit
  BCD sum needs the carry. The digit modules therefore have a carry input,
  which the original 4-bit units lack.
* **Gate-level form of the parts described only by function.** This covers
  the >9 test, the choice between s and s+0110 (done with Fredkin gates),
  where the TR gates sit in the subtractor, and the whole internal
  structure of the DKG adder/subtractor. The original description names a
  4x1 multiplexer made of Toffoli and TNOR gates for the correction, URG
  gates for the carry-propagate adder and a COG gate for the subtractor's
  output correction, but gives none of their equations.
* **The loop-free end-around carry.** Stage 2 of the subtractor and its
  sign-and-magnitude output are this design's. So is the choice to keep the
  negative zero.
* **Direct subtraction in the DKG unit.** It subtracts directly (borrow,
  then -0110), not by nine's complement.
* **The TR gate's equations.** They are the gate's published definition.
* **PAOG's S output.** It follows the gate's diagram,
  S = (A^B^D)^(AB^C). A written variant, (AB^C)C^(A^B^D), disagrees with it.
* **No pipelining.** Pipelining is mentioned in passing, but no stages are
  described, so the units are combinational.

The following are not reproduced:

* The original's resource figures: LUT counts, critical path and garbage
  output totals. Gate counts here, for 8 digits:
  * Adder: 144 Peres, 40 Feynman, 32 Fredkin.
  * Subtractor: 128 TR, 288 Peres, 80 Feynman, 96 Fredkin.
  * DKG unit: 64 DKG, 88 Feynman, 16 Peres, 8 Fredkin.
* A 16-bit reversible ALU, which is mentioned in one sentence with no
  details.

## Simulating

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops. Expected values come from integer
arithmetic in `tb/tb_bcd_util_pkg.sv`, not from the RTL. To run one with
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/bcd_pkg.sv tb/tb_bcd_util_pkg.sv tb/tb_bcd_reversible_top.sv \
  --top-module tb_bcd_reversible_top -o sim
./obj_dir/sim
```

The same command runs any other testbench: replace the file and module
name.

* **Gates** (`tb_*_gate`): exhaustive truth tables, plus a check that each
  gate maps inputs one-to-one to outputs.
* **Digit-level units**: every valid input. For example, all 200
  combinations of two BCD digits and a carry.
* **`tb_bcd_adder`, `tb_bcd_subtractor`, `tb_dkg_addsub`**: directed corner
  cases (all nines + 1, equal operands, 0 - 1), then 5000 random operand
  pairs, checking every digit carry.
* **`tb_bcd_reversible_top`**: the whole design at its default size, with
  20000 random pairs. It counts how often each mechanism was needed and
  fails if any was never exercised:
  * digit correction, a carry rippling through all eight digits, and the
    final carry;
  * the end-around-carry path, the nine's-complement path, and the negative
    zero;
  * the DKG unit's add and subtract corrections and its final borrow;
  * the HNG gate as a full adder.
* **`tb_table1_sizes`**: builds the design at 1, 8 and 16 digits (4-, 32-
  and 64-bit operands) and checks all three units at each size.

All of them finish in well under a second.

## Files

* `rtl/bcd_pkg.sv`: digit type, the 0110 and 1001 constants, default digit
  count, mode enum.
* `rtl/*_gate.sv`: the gate library.
* `rtl/peres_full_adder.sv`, `rtl/tr_full_subtractor.sv`: two-gate
  arithmetic cells.
* `rtl/rev_adder4.sv`, `rtl/bcd_correction.sv`, `rtl/bcd_adder_digit.sv`,
  `rtl/bcd_adder.sv`: the adder.
* `rtl/nines_complement4.sv`, `rtl/bcd_sub_digit.sv`,
  `rtl/bcd_subtractor.sv`: the subtractor.
* `rtl/dkg_addsub_digit.sv`, `rtl/dkg_addsub.sv`: the programmable unit.
* `rtl/bcd_reversible_top.sv`: the top.
* `tb/`: one testbench per module above, the reference package, and the
  size test with its checker `tb_size_check`.
