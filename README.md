# Prime-field arithmetic with Gaussian integers

A prime p with p ≡ 1 (mod 4) can always be written as p = a² + b². For such a
prime the field Z_p, the integers mod p, is isomorphic to Z[i]/⟨a+bi⟩, the
Gaussian integers c + di taken modulo a + bi. An element of Z_p can therefore
be held as a small complex number with two short binary components instead of
one ⌈log₂ p⌉-bit number. This changes the shape of the adders and multipliers.
The RTL here builds bit-parallel, purely combinational units for both
representations so that they can be compared directly:

| unit | field | representation | module |
|---|---|---|---|
| adder | Z_p | binary 0 … p−1 | `zp_adder` |
| multiplier | Z_p | binary 0 … p−1 | `zp_multiplier` |
| adder | Z[i]/⟨a+(a−1)i⟩ | "positive" (non-negative components) | `gauss_adder` |
| multiplier | Z[i]/⟨a+bi⟩ | least norm (signed components) | `gauss_multiplier` |

`gf_arith_top` puts all four side by side for one prime, by default
p = 13 = 3² + 2², i.e. modulus 3+2i. That is the one small prime that all four
architectures support: the Gaussian adder needs b = a−1, and the Gaussian
multiplier is meant for a few small primes.

There are no clocks, registers or resets anywhere. Every block is
combinational logic from its input ports to its output ports. Operands are
assumed to be already reduced (below p, or inside the representative set).
Nothing checks that.

## The isomorphism

For p = a² + b², let k = −b⁻¹·a mod p. Then k² ≡ −1 (mod p), and

    φ(c + di) = c + k·d  mod p

is a ring homomorphism from Z[i] onto Z_p whose kernel is exactly the
multiples of a+bi. For 3+2i, k = 5, so φ(1+i) = 6 and φ(2i) = 10. `gf_pkg`
computes k at elaboration (extended Euclid). The testbenches find k
independently, by searching for the residue with a + k·b ≡ 0.

Two sets of representatives are used:

* **Positive representation** (used for addition). All components are
  non-negative. With b = a−1, the rows Im = 0 … a−2 hold Re = 0 … 2a−2, and
  the top row Im = a−1 holds Re = 0 … a−1. That gives an a×a square plus an
  (a−1)-wide strip to its right: exactly p points. For 3+2i these are
  Re 0…4 on rows 0 and 1 and Re 0…2 on row 2. The real part takes
  NRE = ⌈log₂(2a−1)⌉ bits and the imaginary part NIM = ⌈log₂ a⌉ bits.
* **Least-norm representation** (used for multiplication). Each class is held
  by its element of smallest c² + d², in two's complement. For 3+2i the set is
  0, ±1, ±i, ±1±i, ±2, ±2i.

## Z_p adder (`zp_adder`)

c + d ≤ 2p − 2, so one conditional subtraction of p is enough. The adder has
four parts:

* a ripple-carry adder: a half adder at bit 0, then full adders;
* a ripple-borrow subtractor with the constant p as its second input;
* a constant comparator, sum ≥ p, on the full N+1-bit sum;
* a row of 2:1 multiplexers.

The subtractor is only N bits wide. When the sum overflows into bit N, the
low N bits of sum − p are still the right answer, because the result is
below p < 2^N.

## Gaussian adder (`gauss_adder`): three reductions

This is the least obvious block. Adding two positive-representation elements
gives Re ≤ 4a−4 and Im ≤ 2a−2. Three conditional corrections, each a multiple
of the modulus a + (a−1)i, move every such sum back into the set:

1. **Re ≥ 2a−1**: add 1 − 2a + i. This works because 2a − 1 ≡ i. No sum
   with Re ≥ 2a−1 has Im above 2a−3, so the added i keeps Im ≤ 2a−2, and
   afterwards Re ≤ 2a−2.
2. **Re ≥ a and Im ≥ a−1**: subtract a + (a−1)i.
3. **Im ≥ a**: add (a−1) − ai. Such elements already have Re ≤ a−1, so they
   land in the strip: Re in a−1 … 2a−2, Im in 0 … a−2.

The +i of step 1 costs nothing. The real parts are added first and compared
with 2a−1, and that compare bit is the carry in of the imaginary adder. That
adder has a full adder at bit 0 for this reason (`ripple_adder` with
`HAS_CIN = 1`). Steps 2 and 3 are each a constant compare, a constant
add/subtract on each component and a multiplexer. The internal values are one
bit wider than the outputs; the top bit is always zero at the end.

For 3+2i (p = 13): 4+1i + 4+1i = 8+2i. Step 1 (8 ≥ 5) gives 3+3i. Step 2
(3 ≥ 3, 3 ≥ 2) gives 0+1i. Check: φ(4+i) = 9, and 9+9 = 18 ≡ 5 = φ(i). ✓

Only moduli of the form a + (a−1)i are supported (p = 5, 13, 41, 61, 113,
181, 313, 421, 2113, 3121, 4513, 525313, …). For other splittings, such as
17 = 4² + 1², the reductions are different and are not implemented.

## Z_p multiplier (`zp_multiplier`)

An `array_multiplier` forms the full 2N-bit product. It works like long
multiplication by hand: AND gates make the partial products, and each row is
a ripple adder (half adder + full adders) that adds x[i]·y to the upper bits
of the previous row. Since x, y ≤ p−1 < 2^N, the product is below 2^N·p. N
reduction steps follow, for i = N−1 down to 0. Each one compares with the
constant 2^i·p and subtracts it when the value is not smaller. This is
restoring division by p with the quotient thrown away; after step 0 the value
is below p. The steps are applied from the largest multiple down. That is
this design's choice: it is the order in which N steps are always enough.

For some primes the top step can never fire, because (p−1)² < 2^(N−1)·p;
p = 5 and p = 17 are examples. Synthesis can remove it, but the RTL keeps
it for uniformity.

## Gaussian multiplier (`gauss_multiplier`)

The product (c+di)(e+fi) = (ce − df) + (cf + de)i is formed with four signed
multipliers, a subtractor and an adder. Components are W-bit two's
complement; W = 3 holds every representative for p = 5, 13 and 17. The
unreduced product usually lies outside the representative set.

**The reduction here is this design's own construction.** The product is
mapped to Z_p with φ, and a constant table of p entries returns the
least-norm representative of that class. The table is computed from the
definition when parameters are evaluated: scan all W-bit pairs and keep the
first of least norm, scanning the real part and then the imaginary part
upward from the most negative value. For 2+i, 3+2i and 4+i no class has two
elements of least norm, so the tie-break never applies there. A hand-optimised
design would compare against each case individually: 8 cases for 3+2i, and
5 groups of 4 for 4+i. That gives the same function with different logic;
the exact cases are not known here.

For p = 5 (2+i) the representatives are 0, ±1, ±i. Their products never
leave that set, so the table path only ever maps an element to itself.

## Top level (`gf_arith_top`)

The single parameter `A` sets the modulus a + (a−1)i and p = a² + (a−1)². The
four units share no signals; each has its own ports:

| ports | width (A = 3) | meaning |
|---|---|---|
| `zp_c`, `zp_d` → `zp_sum`, `zp_prod` | 4 | Z_p operands, sum and product |
| `gp_x_re/_im`, `gp_y_re/_im` → `gp_sum_re/_im` | 3 / 2 | Gaussian sum, positive representation |
| `gm_x_re/_im`, `gm_y_re/_im` → `gm_prod_re/_im` | 3 signed | Gaussian product, least-norm representation |

The Z_p adder and multiplier share the operand ports `zp_c`/`zp_d`.

## Building blocks

`half_adder`, `full_adder`, `half_subtractor` and `full_subtractor` are the
one-bit cells. `ripple_adder` and `ripple_subtractor` chain them: a half cell
at bit 0, or a full adder when a carry in is wanted, then full cells.
`mux2` is a W-bit 2:1 multiplexer, with sel = 1 selecting `d1`.
`ripple_adder` defaults to 3 bits, which is the classic HA–FA–FA three-bit
adder. `gf_pkg` holds only elaboration-time functions (modular inverse, k).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`, has a watchdog, and checks results against
values computed independently with integer arithmetic:

* The one-bit cells, the mux, the ripple adder/subtractor and the array
  multiplier are checked exhaustively (7×7 multiplier: randomly).
* `tb_zp_adder` and `tb_zp_multiplier` are exhaustive for three primes each.
* `tb_gauss_adder` is exhaustive for a = 2, 3 and 5. It checks that each
  result lies in the residue set and that φ(result) = φ(x) + φ(y). It
  requires each of the three reductions to occur, and it compares their
  counts with the design's internal reduction flags.
* `tb_gauss_multiplier` is exhaustive for 2+i, 3+2i and 4+i. It checks
  φ(result) = φ(x)·φ(y) and that the result has the least norm in its class.
* `tb_gf_arith_top` runs the top at its default size. It covers every Z_p
  operand pair, then every Gaussian pair, and feeds φ of the Gaussian operands
  to the Z_p units at the same time, so the two representations must agree.
  It counts and requires these events: the Z_p adder with and without the
  subtraction, each Z_p reduction step, each Gaussian-adder reduction, and
  Gaussian products with and without reduction.
* `tb_workloads` runs every prime for which results are tabulated for these
  architectures. That is the Z_p adder for the 16 primes 5 … 525313, the
  Gaussian adder for the 12 moduli 2+i … 513+512i, the Z_p multiplier for
  the 10 primes 5 … 97 and the Gaussian multiplier for 2+i, 3+2i and 4+i.
  Primes below 200 are tested exhaustively; larger ones get 2000 random pairs
  plus corner cases.

The `chk_*` modules in `tb/` are reusable checkers: each one drives one
instance of a unit for a given prime and reports counts.

To simulate with Verilator, for example the top-level test:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/gf_pkg.sv tb/tb_gf_arith_top.sv --top-module tb_gf_arith_top
    ./obj_dir/Vtb_gf_arith_top

`gf_pkg.sv` must be read first, because `gauss_multiplier` imports from it.
The same pattern works for every `tb_*.sv`.

## Limits and departures

* Only the b = a−1 family is implemented for Gaussian addition.
* The Gaussian multiplier's reduction (a map to Z_p, then a table) replaces
  a case-by-case reduction whose cases are not known. For large p the table
  grows as p entries and the signed widths must be raised by hand (`W`).
  The multiplier is intended for small p only.
* The comparators and the constant adders in `gauss_adder` and in the
  reduction steps are written as word-level `>=`, `+` and `-`, not as
  gate-level cells. A synthesis tool reduces them to a few gates per bit
  because one input is constant.
* No conversion between the two representations is provided in hardware;
  φ is used only in the testbenches (and internally by the multiplier).
* The gate counts that motivate the comparison come from a particular logic
  minimisation flow with a NAND/NOR/inverter library. This RTL neither
  reproduces nor depends on them.
* A few signals are left unused on purpose. The subtractor borrow in
  `zp_adder` and `zp_multiplier` is not needed because a separate compare
  decides, and the always-zero top bits of the internal Gaussian sums are
  dropped. Lint reports these as unused.
