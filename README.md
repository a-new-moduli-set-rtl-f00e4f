# Ternary residue number system over {3^n−2, 3^n−1, 3^n}

A residue number system (RNS) does not hold an integer X as one long number. It
holds X as its remainders modulo a few pairwise coprime moduli. Addition then
splits into independent narrow additions, with no carry passing between the
channels. This design uses the moduli

    m1 = 3^n − 2,   m2 = 3^n − 1,   m3 = 3^n

and ternary (radix-3) digits throughout. The three moduli are pairwise coprime,
so every integer below M = (3^n−2)(3^n−1)3^n has a unique residue triple. Each
residue fits in n ternary digits ("trits"). The moduli sit just below a power of
3, so the correction needed when a result passes a modulus is a tiny constant:
0, 1 or 2. The complement of each modulus is 3^n − m:

| channel | modulus | 3^n mod m | correction constant |
|---|---|---|---|
| x1 | 3^n − 2 | 2 | +2 (or +4 for two moduli) |
| x2 | 3^n − 1 | 1 | +1 (or +2 for two moduli) |
| x3 | 3^n     | 0 | none, the carry is dropped |

A ternary adder accepts a carry-in of 2 as easily as 1, so each correction is
just the carry into digit 0 of an ordinary adder.

With the default n = 3 the moduli are {25, 26, 27} and M = 17550. Operands are
9-trit numbers.

## Datapath

`rns_tvl_top` takes two 3n-trit operands X and Y. It converts each to residues,
adds the residues channel by channel, and converts the sum back:

```
 X ─► tvl_to_rns ─┬─ x1 ─► rns_add_3n_2 ─ z1 ─┐
                  ├─ x2 ─► rns_add_3n_1 ─ z2 ─┼─► rns_to_tvl ─► Z = (X+Y) mod M
                  └─ x3 ─► rns_add_3n   ─ z3 ─┘
 Y ─► tvl_to_rns ─── (y1, y2, y3 into the same adders)
```

All nine residues are brought out as well. The whole path is combinational:
there is no clock, reset or state. Delay is counted in ternary full-adder cell
delays (t_FA3).

### Trit encoding

Each trit is two wires: `00` = 0, `01` = 1, `10` = 2. The code `11` never appears
on a legal net. A number is a packed array of `trit_t` (defined in `tvl_pkg`)
with index 0 as the least significant digit. The arithmetic is meant for real
three-level circuits; binary-coded ternary is how a two-valued HDL stands in for
them.

### The n-digit adder (`tadd_n`, `fa3`)

Every arithmetic block is built from one ripple-carry adder of N `fa3` cells.
Each cell computes a + b + c = 3·carry + sum. The carry into digit 0 is a
3-bit port that takes a constant from 0 to 6. The modular blocks inject their
correction constant there, so "+2" or "+4" costs no extra adder. The carries
between digits never exceed 2. No carry acceleration is used.

### Modular adders

* `rns_add_3n`: a + b, with the top carry dropped. Delay: N·t_FA3.
* `rns_add_3n_1` and `rns_add_3n_2`: two adders run side by side. One forms
  a + b; the other forms a + b + k, with k = 1 or 2. The second adder's carry out
  is 1 exactly when a + b ≥ 3^n − k. That carry drives a 2:1 multiplexer, which
  picks the corrected sum (its low N digits are a + b − m) or the plain one.
  Delay: N·t_FA3 + t_MUX.

Operands must be legal residues, meaning below their modulus.

### Forward conversion: ternary to residues

This is the least obvious part of the design. Split a 2n-trit number into a low
half A1 and a high half A2, so X = A2·3^n + A1.

* **mod 3^n**: 3^n ≡ 0, so the residue is A1. Only wiring is needed.
* **mod 3^n − 1** (`conv_3n_1`): 3^n ≡ 1, so reduce S = A1 + A2, where
  0 ≤ S ≤ 2(3^n−1). Three adders form S, S+1 and S+2 in parallel. A three-way
  multiplexer picks S+2 when that adder carries 2 (S = 2m), otherwise S+1 when
  that adder carries (S ≥ m), otherwise S.
* **mod 3^n − 2**: 3^n ≡ 2, so the high half counts twice: reduce A1 + 2·A2.
  Each reduction step (`red_3n_2`) has three adders, V, V+2 and V+4, and a
  three-way multiplexer. It picks V+4 when that adder carries 2 (V ≥ 2m),
  otherwise V+2 when that adder carries (V ≥ m), otherwise V.
  * `conv_3n_2_ser` (serial) uses two such steps in a row: d = (A2 + A2) mod m,
    then r = (A1 + d) mod m.
  * `conv_3n_2_par` (parallel) needs only one carry-propagate step. A row of
    `fa3` cells works as a ternary carry-save adder over A1, A2 and A2, giving a
    sum vector and a carry vector. The carry vector moves up one digit. Its top
    carry has weight 3^n ≡ 2, so it is fed back twice: into the empty digit 0 of
    the carry vector, and as the carry-in of the final step. The sum of these
    terms is at most 2·3^n, so one three-adder step finishes the reduction.

`tvl_to_rns` converts 3n trits, X = A3·3^2n + A2·3^n + A1. It chains the 2n-trit
converters by Horner's rule:

* mod 3^n − 1: `conv_3n_1(A1, conv_3n_1(A2, A3))`, i.e. A1 + A2 + A3.
* mod 3^n − 2: `conv_3n_2_par(A1, conv_3n_2_ser(A2, A3))`, i.e. A1 + 2A2 + 4A3.

Every residue leaves fully reduced.

### Reverse conversion: Chinese Remainder Theorem (`rns_to_tvl`)

    X = < Σ <x_i·N_i>_{m_i} · M_i >_M,   M_i = M/m_i,   N_i = M_i^{-1} mod m_i

For this moduli set the constants have closed forms:

* M_1 = 3^2n − 3^n
* M_2 = 3^2n − 2·3^n
* M_3 = 3^2n − 3^(n+1) + 2
* N_1 = (3^n−1)/2, N_2 = 3^n−2, N_3 = (3^n+1)/2

For n = 3 these are M_i = 702, 675, 650 and N_i = 13, 25, 14.

The converter is ternary arithmetic from end to end, built from the same
N-digit adder:

1. **Multiply by N_i.** Each residue is multiplied by its N_i with shift and
   add (`tmul_const`). For every ternary digit d of the constant, the operand
   shifted by that digit's position is added d times. A shift costs only
   wiring.
2. **Reduce in the channel.** Each product (at most 2n digits) is reduced by
   the forward-conversion circuits above. The 3^n channel keeps only the low n
   digits of its product.
3. **Scale by M_i.** Each reduced term is multiplied by its M_i, again with
   shift and add. Each product is below M.
4. **Add the three terms.** A ternary carry-save row (one `fa3` per digit) and
   a (3n+1)-digit adder form the sum, which is below 3M.
5. **Reduce mod M.** Two adders run in parallel and add the complements
   3^(3n+1) − M and 3^(3n+1) − 2M. Their carries show whether the sum reached M
   or 2M, and a multiplexer picks sum, sum − M or sum − 2M.

## How far to trust it, and where it departs from the published scheme

What the tests show:

* Every block is checked against integer arithmetic. The modular adders,
  converters and reverse converter are checked exhaustively at n = 3 (and at
  n = 2 where listed), and with random cases at n = 4 to 6.
* The end-to-end test reproduces the published worked example digit for digit:
  * X = (1012121)₃ = 880 → residues (012, 211, 121)
  * Y = (0111021)₃ = 358 → (022, 202, 021)
  * sum → (111, 121, 212) → Z = 1238

Choices this design makes where the published circuits are silent, ambiguous
or not exact:

* **Multiplexer selects.** The drawings of the three-adder converters show a
  single carry line steering the multiplexer. One carry cannot separate all
  three cases, so the select uses the carries of both corrected adders. For the
  parallel converter this replaces a drawn OR of the carry-save carry and the
  +4 adder's carry.
* **Parallel converter operands.** The drawing labels the carry-save adder's
  inputs A1, A2, A3. This design reads it as the parallel form of the serial
  2n-digit converter, with inputs A1, A2 and A2. Handling the top carry exactly
  (fed back twice) is this design's own construction.
* **3n-digit conversion.** The published converters take 2n digits. Chaining
  them, with the serial converter on the inner step and the parallel one on the
  outer step, is this design's choice. The worked example does reduce 3n-digit
  numbers this way.
* **CRT converter structure.** The published description gives the CRT
  formula, a block symbol and a few hints: a conventional multiplier followed
  by the conversion algorithm, shift-and-add scaling, three-input radix-3
  adders, and reduction with the complement of M. The circuits for steps 1–5
  above are this design's own. They are plain ripple structures, not
  optimised.
* **Carry-in width.** The "+4" adders, and the parallel converter's +4 plus a
  fed-back carry, need a digit-0 carry-in of up to 6. `fa3` therefore takes a
  3-bit carry.
* **Only addition.** Subtraction and multiplication in RNS are mentioned, not
  designed, and are not built.
* **No timing.** Nothing is registered; add pipeline registers around the
  blocks if needed. The delays quoted in cell delays (t_FA3) follow from the
  structure; the simulations check function only, not delay.

## Files and parameters

The datapath modules have one parameter, `N` (n, the digits per residue,
default 3). `fa3` has none. `tmul_const` takes the operand width `NI`, the
product width `NO` and the constant `K`, which the reverse converter sets. The
constants of the reverse converter are computed with 64-bit integers, so N up
to 12 is safe (3^(3N+1) must fit). The testbench helpers in `tvl_pkg` handle up
to 20 trits per vector.

| file | role |
|---|---|
| `rtl/tvl_pkg.sv` | `trit_t`, `pow3`, trit/integer conversion helpers |
| `rtl/fa3.sv` | ternary full-adder cell |
| `rtl/tadd_n.sv` | N-digit ternary ripple adder with 0..6 carry-in |
| `rtl/rns_add_3n.sv`, `rns_add_3n_1.sv`, `rns_add_3n_2.sv` | channel adders |
| `rtl/conv_3n_1.sv` | 2n-digit → mod 3^n−1 |
| `rtl/red_3n_2.sv` | three-adder reduction step mod 3^n−2 |
| `rtl/conv_3n_2_ser.sv`, `conv_3n_2_par.sv` | 2n-digit → mod 3^n−2, serial and parallel |
| `rtl/tvl_to_rns.sv` | 3n-digit → three residues |
| `rtl/tmul_const.sv` | ternary multiplication by a constant (shift and add) |
| `rtl/rns_to_tvl.sv` | three residues → 3n digits (CRT) |
| `rtl/rns_tvl_top.sv` | complete adder, ternary in and out |
| `tb/tb_<module>.sv` | self-checking testbench for each block |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. The
end-to-end test `tb_rns_tvl_top` runs the top at its defaults. It checks the
worked example, corner cases and 20000 random operand pairs. It also counts how
often each mechanism occurred: corrected versus plain sums in each channel
adder, the three converter cases, zero, one or two subtractions of M in the
CRT, and operands of M or more. Any mechanism that never occurs counts as a
failure.

```
verilator --binary --timing --assert -Irtl rtl/tvl_pkg.sv tb/tb_rns_tvl_top.sv \
          --top-module tb_rns_tvl_top -o sim
./obj_dir/sim
```

Any other block works the same way: replace the testbench name. All tests run
in well under a second.
