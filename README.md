# Modulo 2^n ± 1 adder/subtractors and a modulo 2^n − 1 Booth multiplier

Residue number systems split a large integer into small residues and work on
each residue independently. The moduli 2^n − 1 and 2^n + 1 are popular because
their reductions are cheap. With modulo 2^n − 1, the carry out of the top bit
is simply added back at bit 0 (end-around carry). With modulo 2^n + 1, it is
added back *inverted*, because 2^n ≡ −1. DSP algorithms need many additions
and subtractions, so this RTL provides modulo 2^n + 1 subtractors and a
combined adder/subtractor that switches between the two with a mode bit. It
covers both common operand formats, and each unit can be built on any of four
carry networks. A modulo 2^n − 1 modified-Booth multiplier shows the
end-around-carry adders at work.

Every circuit here is combinational. There is no clock and no reset, and
outputs settle directly from the inputs. The default width is n = 8, so the
moduli are 257 and 255. Every unit also works at n = 4, and the test benches
check both sizes.

## Operand formats

* **Normal representation (modulo 2^n + 1).** A value in [0, 2^n] is held in
  n + 1 bits, A = a_n … a_0. When a_n = 1, the value is exactly 2^n and the
  low bits are zero. Inputs above 2^n are outside the format, and the units
  give unspecified results for them.
* **Diminished-one representation (modulo 2^n + 1).** A nonzero value X is
  held as X* = X − 1 in n bits, plus a zero flag X_z. When X_z = 1, X* is
  ignored.
* **Modulo 2^n − 1.** n-bit values. All-ones (2^n − 1) is a second code for
  zero, and the multiplier can produce it. Compare results modulo 2^n − 1, not
  bit for bit.

## The IEAC adder (`ieac_adder`): the core of every modulo 2^n + 1 unit

For n-bit X and Z, the inverted-end-around-carry adder returns
|X + Z + 1| mod (2^n + 1) as an (n + 1)-bit number {msb, s}:

* If X + Z ≥ 2^n, the carry out is 1 and s = (X + Z) mod 2^n, which equals
  X + Z + 1 − (2^n + 1).
* Otherwise the inverted carry (1) enters bit 0 and s = X + Z + 1.
* If X and Z are bitwise complementary, X + Z = 2^n − 1 and the true result
  is 2^n, which does not fit in n bits. Then s = 0 and `msb` is set. `msb`
  is simply the all-propagate signal P[n−1:0].

The same adder is the diminished-one adder. There, `msb` = 1 means the
result is zero.

Internally there are three stages:

1. g = x & z and p = x ^ z.
2. A carry network (`carry_net`, chosen by the `ADDER` parameter) forms the
   group terms G[i:0] and P[i:0].
3. Post-processing adds the inverted carry in carry-increment form:
   `cin = ~G[n-1:0]`, `c[i] = G[i-1:0] | P[i-1:0] & cin`, `s = p ^ c`.

Feeding the carry out back literally would form a combinational loop. The
form above has the same function and no loop. `eac_adder` is the modulo
2^n − 1 counterpart, with `cin = G[n-1:0]`, not inverted.

## Combined adder/subtractor, normal representation (`modp1_addsub`)

Inputs are `a` and `b` ((n + 1) bits) and the mode `m` (0 = add,
1 = subtract). The output `d` = |A ± B| mod (2^n + 1), in [0, 2^n].

Subtraction is turned into addition. With ~B the (n + 1)-bit complement,
A − B ≡ A + ~B + 3, because 2^(n+1) − 1 = 2(2^n + 1) − 3. Let Y = B xor m.
Both operations are then A + Y + K, with K = 0 or 3.

The top bits have weight 2^n ≡ −1, so they are folded into an n-bit
correction vector W. One row of full adders (carry-save) reduces A_low,
Y_low and W to a sum vector S and a carry vector C. The carry of bit n − 1
also has weight 2^n ≡ −1, so it re-enters bit 0 inverted. The IEAC adder
then adds S, the shifted carries and its built-in +1. W makes the total
exact:

| mode | W | bits n−1..2 | bit 1 | bit 0 |
|---|---|---|---|---|
| add (m = 0) | 2^n − 1 − (a_n + b_n) | 1 | ~(a_n & b_n) | ~(a_n ^ b_n) |
| subtract (m = 1) | 1 − a_n − ~b_n | 0 | 0 | ~a_n & b_n |

So the upper bits of W are just ~m, and only the two low "cells" look at
a_n and b_n.

One case breaks this: subtracting with A = 2^n and B < 2^n would need W = −1.
For that case (`special = m & a_n & ~b_n`), a gate clears every carry into the
IEAC adder, including the inverted end-around one. W is already 0, so the
adder sees ~B_low and 0 and returns ~B_low + 1 = 2^n − B, which is the right
answer.

`ADDER` defaults to ripple carry. The carry look-ahead form is the same
module with `ADDER = ADD_CLA`.

## Subtractor with multiplexers (`modp1_sub_mux`)

This is the subtract-only version of the unit above, so it has no mode input.
Its correction vector is all zeros except bit 0, which is ~a_n & b_n. It
handles the A = 2^n, B < 2^n case with two multiplexers in front of the IEAC
adder instead of the carry-clearing gates. In that case the multiplexers
pass A_low (which is zero) and ~B_low in place of the sum and carry vectors.
The IEAC adder's MSB still marks a result of 2^n. The default carry network
is Brent-Kung.

## Diminished-one subtractor (`modp1_sub_dim1`, `zero_handling`)

Inputs are A*, A_z, B* and B_z. Outputs are D* and D_z, where
D = |A − B| mod (2^n + 1).

For nonzero operands, D − 1 = A* − B* − 1 = A* + ~B* − 2^n ≡ A* + ~B* + 1.
That is exactly one pass through the IEAC adder, here on a Kogge-Stone or
Brent-Kung network. A multiplexer and the zero-handling unit cover the
zero cases:

| A_z | B_z | D* | D_z |
|---|---|---|---|
| 1 | 1 | 0…0 | 1 |
| 0 | 1 | A* (D = A) | 0 |
| 1 | 0 | ~B* (D = −B, and −B − 1 = ~B*) | 0 |
| 0 | 0 | adder sum | all-propagate (A* = B*) |

D* has no meaning when D_z = 1. The B* port takes B* as it is; the unit forms
~B* itself.

## Carry networks (`rca_carry`, `cla_carry`, `ks_prefix`, `bk_prefix`)

All four have the same interface: per-bit g and p in, G[i:0] and P[i:0] out.
`carry_net` instantiates the one selected by `modarith_pkg::adder_e`.

| network | structure | depth for n = 8 |
|---|---|---|
| `ADD_RCA` | each group term built from the one below it | 8 cells in a chain |
| `ADD_CLA` | every G[i:0] written out as a flat sum of products | 2 logic levels (wide gates) |
| `ADD_KSA` | Kogge-Stone: level k combines bit i with bit i − 2^k | log2 n = 3 levels |
| `ADD_BKA` | Brent-Kung: up-sweep over 2-, 4-, 8-bit groups, then down-sweep | 2·log2 n − 1 = 5 levels |

The prefix trees need n to be a power of two, and they stop elaboration with
an error otherwise. The carry look-ahead form is not split into blocks, so it
is meant for the small widths used here.

## Modulo 2^n − 1 modified Booth multiplier (`modm1_booth_mult`)

This unit computes P = |A · B| mod (2^n − 1) for unsigned n-bit A and B
(n even).

* **Encoders (`booth_encoder`).** n/2 encoders recode B into digits in
  {−2 … 2}, each given as the signals one, two and neg. Because 2^n ≡ 1, the
  lowest encoder reads b_{n−1} where an ordinary Booth multiplier reads 0.
  This folds B's top weight back in.
* **Selector rows (`booth_selector_row`).** Row i rotates A left by 2i bits,
  which multiplies it by 4^i modulo 2^n − 1. A digit of ±2 rotates one bit
  more, and a negative digit complements the row, because −X ≡ ~X. Each
  partial product is therefore n bits, with no sign extension or correction
  constant.
* **Carry-save rows (`eac_csa_row`).** Rows of full adders with end-around
  carry reduce the partial products to two vectors. For n = 8, rows 0–2 go
  into the first row of full adders, and its result plus row 3 go into the
  second.
* **Final adder.** `eac_adder` (Kogge-Stone by default) produces P.

## Top level (`modulo_arith_top`)

The top level places the units side by side.

| instance | unit | carry network | outputs |
|---|---|---|---|
| `u_addsub_rca` | adder/subtractor | ripple carry | `d_addsub_rca` |
| `u_addsub_cla` | adder/subtractor | carry look-ahead | `d_addsub_cla` |
| `u_sub_mux` | subtractor with multiplexers | Brent-Kung | `d_sub_mux` |
| `u_dim_ks` | diminished-one subtractor | Kogge-Stone | `d_dim_ks`, `dz_dim_ks` |
| `u_dim_bk` | diminished-one subtractor | Brent-Kung | `d_dim_bk`, `dz_dim_bk` |
| `u_mult` | modulo 2^n − 1 multiplier | Kogge-Stone | `prod` |

* The three normal-representation units share `a`, `b` and `m`. The
  subtractor ignores `m`.
* The diminished-one units share `a_dim`, `a_z`, `b_dim` and `b_z`.
* The multiplier takes `mul_a` and `mul_b`.

The only parameter is `N` (default 8).

## Where this RTL makes its own choices

The published description gives the block structure of each unit. The
following are worked out here, and each is checked exhaustively by the
testbenches:

* the exact correction vector W and the function of the carry-clearing gate;
* the multiplexer selection and the zero-handling equation of the
  diminished-one subtractor;
* the loop-free form of the end-around carries;
* the one/two/neg encoding;
* the modulus of the multiplier. It is taken as 2^n − 1 from its wiring:
  the top multiplier bit feeds the first encoder, and the multiplicand bits
  are rotated.

Other departures:

* The multiplier is described as "radix-2" but recodes two bits per digit,
  which is the radix-4 modified Booth scheme. That scheme is what is built.
* Which carry network each top-level instance uses is a choice made here.
  Every unit accepts all four.
* Published results for LUT count, I/O and logic and net delay on an Artix-7
  FPGA are not reproduced. Only the function is verified.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares
against integer arithmetic, checks operand pairs exhaustively (random
vectors for the 16-bit networks and the carry-save row), and ends with
`TB_RESULT checks=… failures=…`:

* `tb_modulo_arith_top`: the whole top at its default size, n = 8. It runs
  every A, B in [0, 256] in both modes through all units. It also counts each
  mechanism and fails if one never happens: add, subtract, the A = 2^n
  subtract case, a result of 2^n, each zero-operand case, a zero difference,
  negative and double Booth digits, folded products, and the all-ones zero
  code.
* `tb_workload_4bit`: the same test with the top built for n = 4 (moduli 17
  and 15).
* Unit tests: `tb_modp1_addsub`, `tb_modp1_sub_mux`, `tb_modp1_sub_dim1`,
  `tb_zero_handling`, `tb_ieac_adder`, `tb_eac_adder`, `tb_carry_networks`
  (all four networks at n = 4, 8 and 16), `tb_booth_encoder`,
  `tb_booth_selector_row`, `tb_eac_csa_row` and `tb_modm1_booth_mult` (n = 4,
  6 and 8).

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/modarith_pkg.sv \
    tb/tb_modulo_arith_top.sv --top-module tb_modulo_arith_top -Mdir obj
./obj/Vtb_modulo_arith_top
```

Each test finishes in a few seconds.

To change the width, set `N` on the top or on any unit. The prefix networks
need a power of two, and the multiplier needs an even N. To swap a carry
network, set a unit's `ADDER` to `ADD_RCA`, `ADD_CLA`, `ADD_KSA` or
`ADD_BKA`.
