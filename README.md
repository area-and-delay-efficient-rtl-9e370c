# Parallel prefix multiplier (PPM)

A 32 x 32 -> 64-bit integer multiplier. Every addition in it is done by a
parallel prefix adder instead of a ripple-carry adder. A prefix adder finds all
carries with a tree of small "prefix cells". Its delay therefore grows with
log2 of the width instead of linearly. The multiplier adds its 32 shifted
partial products in a chain of 64-bit prefix adders. Beside it sits an 8-bit
prefix adder for the exponent fields of a floating-point multiplier
organisation. Only that exponent adder of the floating-point organisation is
given here; the rest of it is not specified well enough to build.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). The defaults are the
published sizes: 16-bit adder, 32-bit multiplier operands, 8-bit exponents.

## The parallel prefix adder (`ppa`)

`ppa` computes `sum = a + b + cin` in three stages. Each stage is its own module.

1. **Pre-processing** (`ppa_preprocess`). For every bit it forms
   `P_i = a_i ^ b_i` (propagate) and `G_i = a_i & b_i` (generate). The
   carry-in gets a position of its own, below bit 0, with `G = cin` and
   `P = 0`. From then on the carry-in is just another generate. No later
   stage needs special carry-in logic.
2. **Carry generation** (`ppa_carry_tree`). A prefix network runs over the
   WIDTH+1 positions. Level `l` combines each position `i` with position
   `i - 2^l` (Kogge-Stone wiring). After `ceil(log2(WIDTH+1))` levels,
   position `i` holds the generate of everything from the carry-in up to bit
   `i-1`. That is the carry out of that bit. Two cells do the combining:
   * `black_cell` gives `G = G_hi | (P_hi & G_lo)` and `P = P_hi & P_lo`,
     using three gates. It is used while a group does not yet reach the
     carry-in, because a later level still needs its propagate.
   * `gray_cell` gives only `G = G_hi | (P_hi & G_lo)`, using two gates. It is
     used where the lower group already starts at the carry-in, so the result
     is a finished carry. The propagate of such a group is 0 anyway, because
     the carry-in slot has `P = 0`. Every carry therefore ends in exactly one
     gray cell, the last cell on its path.
3. **Post-processing** (`ppa_postprocess`). `S_i = P_i ^ C_(i-1)`. The top
   carry is `cout`.

The 16-bit default has 17 positions and 5 levels. At the multiplier's 64 bits
there are 65 positions and 7 levels. The shared `(g, p)` pair type is
`ppa_pkg::pg_t`.

Position index convention (used on every internal bus of the adder):

| index        | `pg[]` (pre-processing out) | `carry[]` (tree out)          |
|--------------|-----------------------------|-------------------------------|
| 0            | carry-in slot (`g=cin,p=0`) | `cin`                         |
| i+1 (bit i)  | `(a_i & b_i, a_i ^ b_i)`    | carry out of bit i            |
| WIDTH        | top bit                     | carry-out of the adder        |

## The multiplier (`ppm`)

### Row chain

Operand `a` selects the rows and operand `b` is shifted into them. Row `k` is
`b << k`, extended to 64 bits, if `a[k]` is 1, and zero otherwise. The rows
are added in a linear chain of 31 prefix adders:

```
s[0] = row 0
s[k] = s[k-1] + row k      (k = 1 .. 31, one 64-bit ppa each)
c    = s[31]
```

So `s[k]` is the sum of rows 0..k. For example, with `a = 16` (only bit 4
set) and `b = 15`, `s[1..3]` are 0 and `s[4]` onward are 240. The chain is
purely combinational: 31 adders deep, each about 7 cell levels plus the
XOR/AND of the pre- and post-processing stages.

### Signed operands: `sa`, `sb`

* `sb = 1`: `b` is sign-extended to 64 bits instead of zero-extended.
* `sa = 1`: bit `a[31]` weighs `-2^31`. The last row is therefore subtracted.
  The last adder gets the inverted row and a carry-in of 1, which is the
  two's-complement negation. This is the only adder in the chain whose
  carry-in is used.

All four combinations of `sa` and `sb` give the exact product in 64 bits.

### `cout`

`cout` is the carry out of the last adder of the chain. For unsigned operands
it is always 0, because the product fits in 64 bits. In the signed modes it is
the carry of the two's-complement addition or subtraction. It is not part of
the product value. It is brought out because the block has such an output;
treat it as a status bit.

### Timing

`c` and `cout` are captured on the rising edge of `clk`. Operands applied
before an edge appear at the outputs right after that edge: one cycle of
latency, and a new product every cycle. There is no reset, so the outputs are
valid from the first edge after the operands are applied.

## Top level (`ppm_top`)

| port     | dir | width | meaning                                           |
|----------|-----|-------|---------------------------------------------------|
| `clk`    | in  | 1     | clock of the product register                     |
| `sa`     | in  | 1     | `a` is two's complement                           |
| `sb`     | in  | 1     | `b` is two's complement                           |
| `a`, `b` | in  | 32    | operands                                          |
| `c`      | out | 64    | product, one cycle after the operands             |
| `cout`   | out | 1     | carry of the last accumulation adder              |
| `eb`,`ew`| in  | 8     | exponent fields                                   |
| `e_sum`  | out | 8     | `eb + ew` (combinational, no bias removed)        |
| `e_cout` | out | 1     | carry out of the exponent sum                     |

Parameters: `N` (operand width, default 32) and `EW` (exponent width,
default 8). `ppa` has `WIDTH` (default 16), and `ppm` has `N`.

The exponent adder is a `ppa` instance with `WIDTH = 8` and `cin = 0`. In the
floating-point organisation, its sum would go to a final-product stage. That
stage also takes a redundant significand product, built from 13
partial-product generators (24-bit significand times a digit pair),
partial-product reduction and a three-operand adder. None of those parts is
specified beyond its name and bus widths, so `e_sum` and `e_cout` are simply
outputs.

## Where this RTL makes its own choices

These points are not fixed by the published description. They are design
decisions here:

* **Prefix network.** Kogge-Stone wiring. The source asks only for black
  cells plus gray cells at the last stage. A sparser network (Brent-Kung,
  Sklansky) would fit that description too. Such a network can be swapped in
  by changing only the generate loop of `ppa_carry_tree`.
* **Carry-in** enters in the pre-processing stage as an extra generate
  position.
* **Multiplier structure** is a linear chain of row adders, not a tree. Its
  delay is therefore 31 adders deep.
* **`sa`/`sb` meaning, `cout` meaning and the output register** (one cycle,
  no reset) are this design's interpretation of the block's published ports.
* **No conditional-sum logic.** A conditional-sum adder is also mentioned in
  passing. The three-stage prefix adder is the one built.
* **Exponent bias** is not handled.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench             | what it checks                                                    |
|-----------------------|-------------------------------------------------------------------|
| `tb_black_cell`       | all 16 input combinations                                         |
| `tb_gray_cell`        | all 8 input combinations                                          |
| `tb_ppa_preprocess`   | random operands, per-bit P/G and the carry-in slot                |
| `tb_ppa_carry_tree`   | widths 5, 16 and 64 against a ripple evaluation, long carry chains|
| `tb_ppa_postprocess`  | random P and carry vectors                                        |
| `tb_ppa`              | 16 and 64 bits against `a+b+cin`, including full carry ripple     |
| `tb_exponent_adder`   | the 8-bit instance, all 65536 operand pairs                       |
| `tb_ppm`              | 16 x 15 = 240, sign corner cases, 4000 random products in all modes; the output must not move before the edge and must be right after it |
| `tb_ppm_top`          | 20000 back-to-back products plus exponent sums at the default sizes; counts each mode (unsigned, a signed, b signed, both signed, subtracted last row, `cout` = 1, `e_cout` = 1) and fails if one never happened |

`tb/ppm_ref_pkg.sv` holds the reference model. It uses the simulator's own
`*` and `+` on extended operands. It computes `cout` separately, from
`a[30:0] * b` plus the last row.

To run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/ppa_pkg.sv tb/ppm_ref_pkg.sv tb/tb_ppm_top.sv --top-module tb_ppm_top \
    -Mdir obj_tb_ppm_top -o sim
./obj_tb_ppm_top/sim
```

Substitute any other testbench name. `tb_ppm_top` runs the full-size design
in about 15 seconds of wall-clock time. Verilator's lint (`--lint-only -Wall`)
is clean on every file in `rtl/`.

Synthesis size, from a generic coarse synthesis: the full design is about
31,500 word- and bit-level cells. Nearly all of them sit in the 31 64-bit
adders. It has 65 flip-flops (the product and `cout`).
