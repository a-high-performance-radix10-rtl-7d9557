# Parallel BCD multiplier built on redundant decimal digit codes

This is a fully combinational decimal multiplier: two D-digit BCD numbers in,
their 2D-digit BCD product out, with no clock and no iteration. The default
size, D = 16, is the coefficient of an IEEE 754-2008 Decimal64 number; D = 34
(Decimal128) is also supported and tested.

The main idea is to keep decimal digits in 4-bit codes that plain binary
hardware can add, and to postpone all decimal correction:

* the multiplier is recoded into signed digits in [-5, 5], so only the
  multiples 1X..5X are needed, and a negative multiple is a bit inversion;
* the multiples are produced in **excess-3 (XS-3)** with a redundant digit
  range, which makes even 3X carry-free;
* the partial products are treated as **ODDS** digits (any 4-bit value
  0..15 is a legal digit of weight 1) so they can be summed by an ordinary
  binary carry-save tree; each carry that crosses a 4-bit digit boundary is
  worth 16 instead of 10, and the missing 6s are counted and added back in
  parallel;
* the tree ends in two words A and B whose digit sums never exceed 18, so
  one fast BCD carry-propagate adder finishes the job.

The only carry chain in the design is in that final adder, and it is a
parallel-prefix one.

## Digit codes

| code | digit value | 4-bit pattern | where it is used |
|---|---|---|---|
| BCD | 0..9 | value | operands X, Y; product P; word B |
| XS-3 | -3..12 | value + 3 | multiples 1X..5X, partial products |
| ODDS | 0..15 | value | every digit of the partial-product array |
| excess-6 | 0..9 | value + 6 | word A at the input of the final adder |

In XS-3 the nine's complement of a digit is the bitwise inverse of its code
(15 - (v + 3) = (9 - v) + 3), also for the redundant values -3..12. That is
why negating a partial product costs four XOR gates per digit.

## Stage 1: partial-product generation (`dec_ppg`)

### Recoding the multiplier (`sd_recoder`)
Digit k of Y passes a transfer t(k+1) = (Y_k >= 5) upward and becomes
Yb_k = Y_k + t(k) - 10 t(k+1), a value in [-5, 5]. The transfer depends on
one digit only, so every recoded digit is a function of two neighbouring BCD
digits. A top digit Yb_D = t(D) in {0, 1} appears above the D recoded ones.
Each digit is sent to the selectors as a hot-one magnitude (yh, five wires)
and a sign ys; ys is 1 only for a strictly negative digit.

### The multiples (`xs3_multiples`)
For N = 1..5 every multiplicand digit is mapped, on its own, to a transfer
T_i and a digit D_i with N X_i + 3 = 10 T_i + D_i, using this table:

| X_i | 1X (T,D) | 2X (T,D) | 3X (T,D) | 4X (T,D) | 5X (T,D) |
|---|---|---|---|---|---|
| 0 | 0,3 | 0,3 | 0,3 | 0,3 | 0,3 |
| 1 | 0,4 | 0,5 | 0,6 | 0,7 | 0,8 |
| 2 | 0,5 | 0,7 | 0,9 | 1,1 | 1,3 |
| 3 | 0,6 | 0,9 | 0,12 | 1,5 | 1,8 |
| 4 | 0,7 | 1,1 | 1,5 | 1,9 | 2,3 |
| 5 | 0,8 | 1,3 | 1,8 | 2,3 | 2,8 |
| 6 | 0,9 | 1,5 | 2,1 | 2,7 | 3,3 |
| 7 | 0,10 | 1,7 | 2,4 | 2,11 | 3,8 |
| 8 | 0,11 | 1,9 | 2,7 | 3,5 | 4,3 |
| 9 | 0,12 | 1,11 | 2,10 | 3,9 | 4,8 |

Digit i of NX is then the 4-bit sum D_i + T_(i-1). The table is chosen so
that this sum never exceeds 15: no carry leaves a digit, and NX is a D+1
digit XS-3 number with digit values in [-3, 12].

### Selecting and signing (`pp_selector`)
For each recoded digit a 5:1 hot-one multiplexer picks the multiple; XOR
gates invert bits 3..2 when ys = 1 and bits 1..0 when ys = 1 or no multiple
was selected. So a negative digit gives the nine's complement of the
multiple and a zero digit gives 0011, the XS-3 code of zero.

### Laying out the array, and the correction constant
This is the least obvious part of the design. The D rows (row k is the
partial product of Yb_k, shifted by k digits) are used with their XS-3 codes
read directly as ODDS digits. For row k that is wrong by a known amount:

    row value as ODDS  = Yb_k X + 3 R               (Yb_k >= 0)
    row value as ODDS  = Yb_k X + 3 R - 1 + 10^(D+1)  (Yb_k < 0)

where R = 11...1 (D+1 ones). The errors are removed as follows, all without
any carry propagation:

* **H digits.** The missing +1 of each negative row (ten's complement =
  nine's complement + 1) is added at the row's least significant position,
  position k, as the digit H_k = Ys_k + Kc_k.
* **Sign digits.** The -10^(D+1) of a negative row is rewritten as
  (1 - Ys_k) 10^(D+1) - 10^(D+1). The digit S_k = (1 - Ys_k) + Kc_(k+D+1)
  is placed at position k+D+1, just above the row; the constant part goes
  into Kc. Row D-1 needs no sign digit, its weight is 10^(2D).
* **Correction constant.** Everything that does not depend on the operands
  is collected in one 2D-digit constant
  `Kc = -(3 R (1 + 10 + ... + 10^(D-1)) + sum_{k=0}^{D-2} 10^(D+1+k)) mod 10^(2D)`.
  It is computed at elaboration time (`dec_mult_pkg::corr_const`) and its
  digits are added digit-wise into digits that already exist. For D = 16 it
  is 5185185185185186 7037037037037037: the low half consists only of 0, 3
  and 7, so H_k stays in [0, 8].
* **Top row.** The row of Yb_D is X (plain BCD, no bias) or 0, at positions
  D..2D-1. Its digit at position D also carries Kc_D (6 for D = 16 and 34),
  the higher digits of Kc ride on the sign digits in the same columns.

The result is an array whose sum modulo 10^(2D) is X*Y. Column i holds
i+2 digits for i < D, D+1 digits at i = D and 2D-i+2 digits above: at most
D+1 (17 for D = 16). `pp_cols[i][n]` carries digit n of column i; unused
slots above the column height are 0.

## Stage 2: reduction tree (`dec_ppr_tree`, `ppr_column`)

The tree is 2D columns, one per decimal position. Each column adds its
digits with binary hardware and exchanges a fixed number of signals with its
neighbours, so the depth does not grow with D beyond the height of the
tallest column.

A column (`ppr_column`) does, in order:

1. **Binary CSA tree** (`ppr_csa_tree`). The H digits and the carry bits from
   the column below are one binary dot diagram with four bit positions.
   Full adders are placed level by level (floor(n/3) on a position holding n
   bits) until at most two bits remain per position: the words S and C.
   Carries out of bit 3 (weight 16) leave as `co` and enter the next column
   as plain weight-1 bits. The tree shape is computed from H and the number
   of incoming carries; the tallest D = 16 column (17 digits, 14 carries in)
   has 7 levels and emits 15 carries.
2. **Correction** (`ppr_correction`). A carry of weight 16 that became a 1 in
   the next column accounts for 10 only, so 6 per carry must be put back
   here. The carries are counted (Wm) and W = 6 Wm is split into decimal
   digits: wr = W mod 10 stays; the tens digit wq goes to column i+1; the
   hundreds (0 or 1, only when more than 16 carries exist, i.e. D > 16) goes
   to column i+2. The count runs alongside the upper levels of the CSA tree.
3. **Binary 3:2 CSA** (`ppr_bin_csa32`) of S, C and the tens digit from
   column i-1, giving Z and G. The carry out of bit 3, g, again goes up as a
   weight-1 bit (bit 0 of the next column's G), and its extra 6 is added to
   Wz = wr + 6 g + hundreds-from-column-i-2, which is at most 15.
4. **Decimal 3:2 digit compressor** (`dec_compressor32`). The upper bit pairs
   (weights 8, 4) of Wz, G and Z plus a 2-bit decimal carry from below give a
   value in [0, 39]: its units digit is A_i (sent in excess-6), its tens digit
   (0..3) goes up. The lower bit pairs (weights 2, 1) give at most 9: that is
   B_i. Hence A_i + B_i <= 18.

Every signal leaving a column is worth exactly ten units of the column it
enters (one hundred for the hundreds digit), so value is conserved; what
leaves the top column is a multiple of 10^(2D) and is dropped.

## Stage 3: final BCD adder (`bcd_qt_adder`)

With A in excess-6, the 4-bit binary carry of A_i + B_i is the decimal carry.
Per digit the adder forms generate (A_i + B_i >= 10) and propagate
(A_i + B_i = 9); a Kogge-Stone prefix network gives the carry into every
digit. In parallel, two candidate digit sums (carry-in 0 and 1) are formed,
each reduced by 6 when that digit produces no carry, and a 2:1 multiplexer
per digit picks one.

## Hierarchy and parameters

    dec_mult                 D = 16
      dec_ppg                D
        sd_recoder           D
        xs3_multiples        D
        pp_selector  x D     D
      dec_ppr_tree           D
        ppr_column  x 2D     H, NCIN (from dec_mult_pkg)
          ppr_csa_tree       H, NCIN
          ppr_correction     NC
          ppr_bin_csa32
          dec_compressor32
      bcd_qt_adder           N = 2D
    dec_mult_pkg             elaboration-time functions (column heights,
                             correction constant, CSA tree shape)

Ports of the top: `x`, `y` (`logic [D-1:0][3:0]`, digit 0 least
significant) and `p` (`logic [2*D-1:0][3:0]`). Inputs must be valid BCD.
D may be set anywhere from 1 to 34. Above 34 a column would have to absorb
more than 33 CSA carries, for which the correction block has no digit; it
stops elaboration with an error. D = 1 and D = 2 were checked exhaustively,
D = 16 and D = 34 with random operands.

Sizes at the two standard widths:

| | D = 16 | D = 34 |
|---|---|---|
| partial-product rows | 17 | 35 |
| tallest column | 17 digits | 35 digits |
| most CSA carries out of one column | 15 | 33 |
| correction digits moving up | tens | tens and hundreds |
| product digits | 32 | 68 |

## Timing

The unit is one combinational path from x, y to p. Placed between registers
it delivers one product per clock cycle with a latency of one cycle; no
pipeline registers are built in. The critical path runs through the
recoder, the selection multiplexers, the CSA tree of the tallest column, the
3:2 stage and compressor, and the log2(2D) prefix levels of the final adder.

## Where this RTL departs from, or fills in, the published architecture

* The recoding rule (transfer when Y_k >= 5) is the usual one for this
  kind of recoder; the source only describes its outputs.
* The correction constant, the sign-digit encoding and the placement of the
  constant's digits are derived here. The published scheme adds the whole
  upper half of the constant to the top row; here only its lowest digit goes
  there and the rest rides on the sign digits, because digits of 7 or 8
  added to a BCD digit would overflow a 4-bit ODDS digit. Column heights are
  the same (D+1).
* The CSA tree uses 3:2 counters only, placed Wallace-style; the published
  tree mixes 4:2 and 3:2 levels. Its number of outgoing carries for the
  tallest D = 16 column (15) matches.
* How 6 x (carry count) is split into digits and where the pieces enter
  (tens into the 3:2 CSA of the next column, hundreds into Wz two columns up)
  is this design's choice.
* The final adder uses a Kogge-Stone prefix over single digits instead of the
  unspecified quaternary-tree topology. The source states the 6-subtraction
  condition the other way round; the RTL subtracts 6 when a digit produces
  no decimal carry, which is what excess-6 arithmetic needs.
* Functions such as the XS-3 digit mapping and the compressor blocks are
  written as small arithmetic expressions and tables, not as the gate-level
  netlists of the original.
* No pipelining, although the architecture is meant to allow it.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
compares against values computed independently (integer arithmetic or
schoolbook multiplication) and ends with a line
`TB_RESULT checks=N failures=M`:

* `tb_dec_mult` - 16 x 16 digits at default parameters: corner cases, 4000
  random products with digit mixes that favour negative and zero signed
  digits, and three fixed plus 500 random products of 8-digit operands. It also counts that every
  mechanism occurs (negative and zero signed digits, the top partial
  product, CSA carries between columns, 3:2 CSA carries, decimal carries of
  2 or 3, long carry chains in the final adder).
* `tb_dec_mult_d34` - 34 x 34 digits, 1500 random products, and checks that
  the hundreds digit of the correction is exercised.
* Stage and cell tests: value conservation of the array (`tb_dec_ppg`), of
  the whole tree (`tb_dec_ppr_tree`) and of one column (`tb_ppr_column`);
  exhaustive tests of `ppr_bin_csa32` and `dec_compressor32`; random tests of
  the recoder, the multiples, the selector, the CSA tree, the correction
  block and the final adder.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl rtl/dec_mult_pkg.sv \
        tb/tb_dec_mult.sv --top-module tb_dec_mult -o sim
    ./obj_dir/sim

All testbenches finish in well under a second of simulation time.
