# Parallel BCD multiplier with XS-3 partial products and an ODDS reduction tree

This is a combinational multiplier for decimal (BCD) integers, such as the
significands of IEEE 754-2008 decimal floating-point numbers. It multiplies
two d-digit BCD operands and returns the 2d-digit BCD product. All partial
products are formed at once. The default is d = 16 (Decimal64). Setting
d = 34 gives the Decimal128 size.

Decimal multipliers are usually slow because BCD digits do not add like
binary numbers. This design works around that with two redundant 4-bit
digit codes:

* **Excess-3 (XS-3).** A 4-bit code whose value is the binary value minus 3,
  so one code word holds a digit in [-3, 12]. It is *self-complementing*:
  inverting the four bits of a digit gives the XS-3 code of its nine's
  complement. A negative partial product therefore costs only an inversion.
* **Overloaded decimal (ODDS).** A digit in [0, 15], stored as plain 4-bit
  binary. Inside a digit, binary adders work unchanged. Only a carry that
  leaves a digit needs a decimal correction.

Moving from XS-3 to ODDS is simple: subtract 3 from every digit. One
constant row added to the partial-product array does this for all digits
at once.

## Datapath

```
 y (BCD) --> sd_recoder ---- mag/sign per digit ----+
                                                    v
 x (BCD) --> xs3_multiples -- 1X..5X (XS-3) --> pp_select x (d+1)
                                                    | PP[k] (XS-3), hot one
                                                    v
                                dec_pprt: array + XS-3->ODDS constant
                                   dec_csa_tree   (binary 3:2 per digit column)
                                   carry_count_x6 (per column)
                                   dec_digit_32   (per column)
                                                    | A (excess-6), B (BCD)
                                                    v
                                bcd_qt_adder (prefix carries + carry-select)
                                                    |
                                                    v  p (2d BCD digits)
```

Every file is one module (or the package `bcd_mult_pkg`). The top is
`bcd_mult` with parameter `NDIG` (d). The ports are packed arrays of
digits, digit 0 least significant: `x`, `y` are `[NDIG-1:0][3:0]` and `p` is
`[2*NDIG-1:0][3:0]`. There is no clock and no reset. The product settles one
combinational delay after the inputs change. Any pipeline registers belong
to the surrounding design.

### Multiplier recoding (`sd_recoder`)

Each multiplier digit y_i becomes a signed digit in [-5, 5] with no carry
chain:

    yc_i = (y_i >= 5)
    Yb_i = y_i - 10*yc_i + yc_(i-1)

The transfer out of the top digit adds one more digit, so there are d+1
partial products. Each recoded digit is sent out as a one-hot magnitude
(1..5; all zero means 0) and a sign. A zero digit is never negative.

### Multiplicand multiples (`xs3_multiples`)

The module computes 1X to 5X, each as d+1 XS-3 digits, with no carry
propagation. For the multiple nX, each digit product is split as
n·x_i = 10·T_i + D_i, with T_i = floor(n·x_i / 10). The output digit is
D_i + T_(i-1). That digit is at most 11, so it always fits the XS-3 range.
This T/D split is one of several valid choices. It is the simplest one.

### Partial-product selection (`pp_select`)

An and-or multiplexer picks the multiple named by the one-hot magnitude.
0X is the code 0011 in every digit. For a negative digit every bit is
inverted, which gives the nine's complement. The missing +1 of the ten's
complement leaves the module as a separate "hot one" bit.

### Reduction tree (`dec_pprt`)

This is the hardest part of the design.

**The array.** Row k is PP[k], placed at columns k..k+d. Each column also
holds exactly one single-bit entry:

* **Hot ones.** The hot one s_k belongs in column k (columns 0..d).
* **Sign extension.** A negative row needs sign extension. The term
  -s·10^m is rewritten as (1-s)·10^m - 10^m, with m = k+d+1. The bit
  (1-s_k) stays at column k+d+1 (columns d+1 and up), and every -10^m goes
  into a constant.

The constant holds two things, reduced modulo 10^(2d):

* -3 for every partial-product digit. This is the XS-3 to ODDS step.
* The sign-extension terms.

Its BCD digits C are computed during elaboration by
`bcd_mult_pkg::odds_const_digit`. Each column's single bit is merged with
its constant digit into one word: C + s_c, or C + 1 - s_k. That word is at
most 10 and is only a choice between two constants, so the merge needs no
adder. Columns at and above 2d are dropped, because X·Y < 10^(2d). The
tallest column, column d, holds d+2 words: d+1 partial-product digits and
the constant word.

**1. Binary carry-save tree (`dec_csa_tree`, `csa_4b`).** Each column is
reduced by levels of 4-bit 3:2 compressors until two words are left: a sum
S and a carry word H. Each compressor is four full adders. Its carry word
is shifted left inside the digit. Its carry out of bit 3 (weight 16) leaves
the column, and that bit is the only decimal effect. For every column:

    sum of the column's words = S + H + 16 · (number of carries out)

Carries do not re-enter the neighbouring tree, so all columns are reduced
side by side. The depth is set by the tallest column: 6 levels for d = 16
and 8 for d = 34. The helper functions in `bcd_mult_pkg` compute the shape
of each level during elaboration.

**2. Sum correction (`carry_count_x6`).** A carry out of column c is worth
10 in column c+1. So column c lost 6 for each of its own carries and gained
1 for each carry from column c-1. The block counts both groups of carries.
It forms L = 6·own + prev, with ×6 done as 4n + 2n, and sends L out as
BCD digits. Digit j of L belongs to column c+j.

**3. Decimal digit 3:2 compressor (`dec_digit_32`).** Each column adds
S + H and all correction digits that land on it, giving z ≤ 56 for
d ≤ 34. It then splits z = 10·q + r. The pair for the final adder is:

* B_c = r, a BCD digit.
* A_c = q_(c-1) + 6, in excess-6.

A_c - 6 + B_c ≤ 18, so at most one decimal carry moves into each digit.
An elaboration-time check stops the build if the correction grows past
what a one-digit transfer can hold.

The array identity (value of the array = Σ 10^c (S + H + 6·own + prev))
and the modular constant are what make the product exact. `tb_dec_pprt`
checks the identity directly.

### Final adder (`bcd_qt_adder`)

A is stored with the +6 decimal correction already added. The 5-bit binary
sum t = A_i + B_i of each digit therefore gives the decimal signals
directly:

* generate = (t ≥ 16)
* propagate = (t = 15)

A Kogge-Stone prefix tree over the digits computes the carry into every
digit. Each digit also computes both of its possible results ahead of time,
one for carry-in 0 and one for carry-in 1. A result u becomes u-16 when
u ≥ 16 and u-6 otherwise. The carry picks between the two.

## How far it can be trusted

* Exact products were checked against a schoolbook reference: 3025 operand
  pairs at 16×16 digits and 1025 at 34×34. The pairs include corners (zero,
  all nines, all fives, every repeated digit) and random values.
* The end-to-end tests count how often each mechanism happens and fail if
  one never happens. The mechanisms are: each multiple 0X..5X, negative
  partial products, recoding transfers, carries leaving the CSA tree, and
  carries rippling through propagate digits of the final adder.
* Each block has its own self-checking testbench against an independent
  arithmetic model. `csa_4b` is tested exhaustively.

## Where this design departs from, or goes beyond, its description

The structure follows the published architecture: SD radix-10 recoding
into [-5, 5], carry-free XS-3 multiples, negation by inversion, XS-3 to
ODDS by a constant, a three-part reduction tree ending in excess-6/BCD
digits, and a prefix/carry-select final adder. The following are this
design's own:

* **Gate-level forms.** The multiples, the carry counter, the ×6 module and
  the decimal 3:2 compressor use small additions and divisions by 10, not
  hand-optimised logic. Their functions match; their delays will differ.
* **Compressors.** The CSA tree uses only 3:2 compressors in plain levels.
  The original also uses 4:2 and larger compressors and balances the
  full-adder path delays.
* **Array height.** The tallest column has d+2 words (18 for d = 16, 36
  for d = 34). The merged constant word is not folded into a
  partial-product digit. The original reaches d+1 (35 for d = 34).
* **Prefix tree.** The final adder computes one carry per 4-bit digit and
  selects between precomputed digit sums, as a quaternary-tree adder does.
  Its prefix network is plain Kogge-Stone. The original picked its
  topology to match when the reduction-tree outputs arrive, for minimum
  area at minimum delay.
* **Registers.** There are no pipeline registers, clock or reset.
* **Sign extension.** The scheme described above, with its constant, is this
  design's own.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Example with Verilator:

    verilator --binary --timing --assert -Irtl rtl/bcd_mult_pkg.sv \
        tb/tb_bcd_mult.sv --top tb_bcd_mult
    ./obj_dir/Vtb_bcd_mult

Testbenches:

| testbench | what it checks |
| --- | --- |
| `tb_bcd_mult` | full design at the default d = 16 |
| `tb_bcd_mult_dec128` | full design at d = 34 |
| `tb_sd_recoder`, `tb_xs3_multiples`, `tb_pp_select`, `tb_csa_4b` | front-end blocks |
| `tb_dec_csa_tree`, `tb_carry_count_x6`, `tb_dec_digit_32`, `tb_dec_pprt` | reduction tree at d = 8 |
| `tb_bcd_qt_adder` | final adder at 32 digits |

Swap `tb_bcd_mult` for any of them. Modules are found through `-Irtl`; the
package must be listed first. Building the 16-digit top takes about half a
minute and the 34-digit one about a minute. Each simulation runs in well
under a second.

To change the operand length, set `NDIG` on `bcd_mult`. The tree shape,
the constant row and the correction width all follow from it during
elaboration.
