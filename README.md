# Adder and multiplier over GF(P^m) built from T-gates

This is synthesizable SystemVerilog for an adder and a multiplier over the
extension field GF(P^m), for any prime P and degree m. An element is a vector
of m digits over GF(P): the coefficients of 1, α, …, α^(m-1) in the standard
basis. The whole datapath is built from one primitive, the **T-gate**, a
P-way selector driven by a GF(P) digit:

* adding two digits means selecting, by the second digit, among the P cyclic
  shifts of the first digit;
* multiplying two digits means selecting, by the second digit, among the P
  constant multiples of the first digit.

From these two digit cells come a carry-free adder (one cell per digit) and a
multiplier in three stages:

1. a square array of multiply-accumulate cells forms the 2m-1 digits of the
   unreduced polynomial product;
2. a control-signal generator folds the m-1 high digits back into the range
   of the standard basis, modulo the field polynomial;
3. the adder adds the folded digits to the m low digits.

Stage 2 comes in two versions. The combinational one is hard-wired to one
polynomial. The "universal" one takes the polynomial as an input at run time
and needs m-1 clocks. Both are built and both are instantiated in the top
level.

Default size: **P = 3, m = 6**, so the field has 729 elements and each digit
is 2 bits. Every module is parameterized by `P` and `M`.

## Digits and encoding

A GF(P) digit is an unsigned binary number 0…P-1 in `W = max(1, clog2(P))`
bits (`gf_pkg::digit_width`). The cells are meant for P-valued logic. Here
each P-valued wire is a W-bit bus and each P-way T-gate is a multiplexer.
Codes P…2^W-1 never occur inside the design. Inputs must stay in 0…P-1: an
out-of-range control digit makes a T-gate select input 0, and an
out-of-range data digit makes a lookup gate give 0.

Vectors are packed arrays `logic [M-1:0][W-1:0]`. Index v holds the
coefficient of α^v.

## The digit cells

| Module | Function | Construction |
|---|---|---|
| `gf_tgate` | `z = i_in[cs]` | P-input selector |
| `gf_cyclic_gate` | `z = (i_in + C) mod P`, C a parameter | lookup over the P legal input values |
| `gf_acell` (A-cell) | `s = (a + b) mod P` | P cyclic gates (C = 0…P-1) on `a` feed a T-gate controlled by `b` |
| `gf_mul_gate` | `p = (a · b) mod P` | T-gate input c carries `(a · c) mod P`, control `b` |
| `gf_mcell` (M-cell) | `r_out = (r_in + a · b) mod P` | multiplication gate, then an A-cell. `a` and `b` pass straight through to `a_out`/`b_out` so that cells abut in an array |

All of them are combinational.

## Adder (`gf_adder_module`)

GF(P^m) addition has no carries. Digit v of the sum is `(f[v] + g[v]) mod P`,
one A-cell per digit. The same module also does the last step of both
multipliers.

## Multiplier

### Stage 1: unreduced product (`gf_alpha_r_gen`)

An m × m array of M-cells. Cell (i, j) sits in column i, which carries f's
digit a_i down the array, and in row j, which carries g's digit b_j across
it. The cell adds a_i·b_j into the running sum of its diagonal r = i + j. A
diagonal sum starts at 0 in its cell with the smallest j and ends in its
cell with the largest j. So the output is

    R_r = Σ_{i+j=r} a_i·b_j  (mod P),   r = 0 … 2m-2.

R_0…R_(m-1) are already coefficients of the standard basis. R_m…R_(2m-2)
stand for powers α^m…α^(2m-2), which must be reduced. The longest
combinational path passes through m cells.

### Stage 2: reduction into control digits CS_t

Let the field polynomial be F(X) = X^m + f_(m-1)X^(m-1) + … + f_0. Then
α^m = −(f_(m-1)α^(m-1) + … + f_0). Every power α^w has a fixed m-digit code,
the "basic control digit code" BCD_w = α^w mod F(X). The control digits are

    CS_t = Σ_{w=m}^{2m-2} R_w · BCD_w[t]   (mod P),   t = 0 … m-1,

and the product is M_t = (R_t + CS_t) mod P.

**Combinational generator (`gf_cst_comb`).** The polynomial is fixed to
F(X) = X^m + (P−1)X^(m−1) + … + (P−1)X + (P−1). For this polynomial
α^m = 1 + α + … + α^(m−1), which makes the codes easy to generate. The
function `bcd_digit` computes them at elaboration. It starts from α^0; each
step shifts the digits up one place and adds the digit that leaves the top
to every place. For P = 3, m = 6:

    α^6 = 1 + α + α² + α³ + α⁴ + α⁵            BCD_6 = 111111
    α^7 = 1 + 2α + 2α² + 2α³ + 2α⁴ + 2α⁵        BCD_7 = 222221 (digit 5 first)

Each product term R_w · BCD_w[t] is a multiplication gate with a constant
input. The terms of one output digit are chained through A-cells. The circuit
has no clock.

This polynomial is not always irreducible: it makes a field only for some
(P, m). For P = 3 and m = 6 it is irreducible and primitive: α has order
3^6 − 1 = 728. This is why the default size is P = 3, m = 6. Among P ≤ 7 and
2 ≤ m ≤ 6, it is primitive only for (2, 2), (3, 2) and (3, 6). For any
other size, `gf_mult_comb` still computes the product correctly modulo this
polynomial, but the result is a field product only where the polynomial is
irreducible.

**Universal generator (`gf_cst_univ`).** The polynomial's low coefficients
f_0…f_(m−1) come in on the `poly` port, so one circuit serves every
polynomial. It has three register sets:

* an **R shift register**, loaded with R_m…R_(2m−2). It presents one R_w per
  clock, R_m first;
* a **coefficient shift register** `code`, loaded with α^m = −f (negated
  digit by digit). Every clock it is multiplied by α: each stage takes the
  stage below it, plus the digit leaving the top stage times −f_t. One M-cell
  per stage does this; −f is held in its own register;
* **m accumulators** C_t. Every clock each one adds R_w · code_t through one
  M-cell.

After the m−1 terms, C_t = CS_t.

Timing of the universal generator:

| edge | action |
|---|---|
| 0 (`start` = 1) | load R_m…R_(2m−2), −f and α^m; clear C; `busy` ← 1 |
| 1 … m−2 | accumulate the term for R_m … R_(2m−3) |
| m−1 | accumulate the term for R_(2m−2); `busy` ← 0, `done` ← 1 for one cycle |

`cst` is valid from `done` until the next `start`. A `start` while busy
restarts the operation. `rst_n` is asynchronous and active low. Two
assertions check that `done` is a one-cycle pulse and never overlaps `busy`.

### Stage 3 and the two multipliers

* `gf_mult_comb`: product array → `gf_cst_comb` → adder. Purely
  combinational.
* `gf_mult_univ`: product array → `gf_cst_univ` → adder. On `start` it
  captures R_0…R_(m−1) in a register, together with what the generator
  loads, so `f`, `g` and `poly` may change after the start edge. `m_out` is
  valid from `done` until the next `start`. The result is F·G mod F(X) for
  any monic F(X); it is a field product when F(X) is irreducible.

## Top level (`gf_arith_top`)

Operands `f` and `g` feed all three units side by side:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock and asynchronous active-low reset (universal multiplier only) |
| `f`, `g` | in | M×W | operands |
| `sum` | out | M×W | f + g (combinational) |
| `prod_comb` | out | M×W | f·g mod X^m + (P−1)(X^(m−1)+…+1) (combinational) |
| `poly` | in | M×W | f_0…f_(m−1) of the run-time polynomial |
| `start` | in | 1 | start a universal multiplication |
| `busy`, `done` | out | 1 | universal multiplier status; `done` is a one-cycle pulse |
| `prod_univ` | out | M×W | f·g mod the run-time polynomial, m−1 clocks after `start` |

At the defaults the top synthesizes to about 1,200 word-level cells and 63
flip-flop bits. All but the universal generator and the low-digit register
are combinational.

## What follows the source design and what is this design's own choice

Taken from the source design:

* the T-gate, cyclic-gate and multiplication-gate cells, and how they are
  built;
* the A-cell and M-cell construction;
* the per-digit adder;
* the m × m M-cell array, with its column/row operand flow and its diagonal
  sums;
* the split of the product into a low part and a high part;
* the fixed polynomial type of the combinational method and its
  "multiply, then sum mod P" control digits;
* the register arrangement of the universal generator (polynomial
  coefficients in a shift register that is shifted once per power of α, one
  R digit per step, one multiply-accumulate cell and accumulator per output
  digit);
* the final addition of the control digits to the low part.

This design's own choices:

* binary encoding of the digits;
* P = 3, m = 6 as the default (the source gives no numbers);
* the order of cells in a diagonal chain;
* which operand controls the T-gate in the multiplication gate;
* the universal generator's exact feedback, its input convention (`poly`
  holds F(X)'s coefficients, negated inside), its timing and handshake;
* capturing the low digits at start in `gf_mult_univ`;
* placing the adder and both multipliers side by side in one top level.

The source's comparison counts "m−1 control signals". Here the generator
takes m−1 high digits and produces m control digits CS_0…CS_(m−1): the
multiplier needs one control digit per result digit. Its AND/OR gate counts
refer to multi-valued gates and do not carry over to this binary encoding.

Not built: subtraction, division and a combined arithmetic unit. These are
only named as future work.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. The
reference arithmetic is in `tb/gf_ref_pkg.sv`. It multiplies by the
schoolbook method and reduces by polynomial long division, a different method
from the hardware's code accumulation.

* Digit cells: exhaustive for P = 2, 3, 5, 7 (T-gate and cyclic gate for
  P = 3, 5).
* Adder: every element of GF(3^6) against random elements, itself and its
  negation; random pairs at P = 5, m = 4.
* Product array: single-digit operands (each cell lands on diagonal i+j) and
  random pairs, at both sizes.
* Combinational generator and multiplier: random inputs and every single
  R_w = 1 (exposes each code BCD_w), at both sizes. Also x·1, 0·x,
  commutativity, and the order of α being exactly 728 for GF(3^6).
* Universal generator and multiplier: random and fixed polynomials, plus the
  irreducible X^6 + 2X + 2. The tests check that `done` comes exactly m−1
  clocks after `start`, that `busy` is high in between, that the result
  holds afterwards, that restarts work, and that inputs scrambled after the
  start edge do not matter.
* `tb_gf_arith_top`: the whole system at default parameters. It covers all
  729 values of `f`, six random `g` each, and 729 universal multiplications,
  29 of them restarted while busy. With the fixed polynomial it also checks
  that `prod_univ` equals `prod_comb`. It counts digit-sum wraps, products
  that need reduction, polynomial changes and restarts, and fails if any of
  these never happened.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/tb_gf_arith_top.sv \
        --top-module tb_gf_arith_top -o sim
    ./obj_dir/sim

Use any other `tb/tb_*.sv` the same way. Verilator finds the modules in
`rtl/` through `-Irtl`. The full-size top-level test runs in well under a
second.

## Changing the size

Set `P` (a prime) and `M` (≥ 2) on `gf_arith_top` or on any module.

* Both multipliers are correct modulo their polynomials for any P and M.
* `prod_univ` is a field product whenever `poly` describes an irreducible
  polynomial.
* `prod_comb` is a field product only where the fixed polynomial is
  irreducible (see Stage 2 above).
* The reduction codes of `gf_cst_comb` are computed at elaboration, so they
  need no tables.
* The product array grows as M²; its combinational depth grows as M.
