// dec_mult: parallel (combinational) BCD multiplier, P = X * Y, for D-digit
// BCD operands and a 2D-digit BCD product. D = 16 is the IEEE 754-2008
// Decimal64 coefficient size; D = 34 (Decimal128) is also supported.
//
// Three stages, none with a carry chain except the last:
//  1. dec_ppg      - recodes Y to signed digits in [-5, 5], builds 1X..5X in
//                    excess-3, selects and signs D+1 partial products and lays
//                    them out, with sign digits and a correction constant,
//                    as an array of 2D columns of 4-bit ODDS digits.
//  2. dec_ppr_tree - per column, a binary CSA tree plus carry counting and a
//                    x6 decimal correction, then a decimal 3:2 compressor;
//                    yields A (excess-6) and B (BCD) with A_i + B_i <= 18.
//  3. bcd_qt_adder - prefix / carry-select BCD adder forming P = A + B.
// The whole unit is one combinational path from x, y to p (a product per
// cycle when it is placed between registers); it has no clock or reset.
// Inputs are assumed to be valid BCD (each digit 0..9).
module dec_mult #(
  parameter int unsigned D = 16
) (
  input  logic [D-1:0][3:0]   x,   // multiplicand, BCD
  input  logic [D-1:0][3:0]   y,   // multiplier, BCD
  output logic [2*D-1:0][3:0] p    // product, BCD
);

  logic [2*D-1:0][D:0][3:0] pp_cols;
  logic [2*D-1:0][3:0]      a_xs6, b;
  logic                     cout_unused;

  dec_ppg #(.D(D)) u_ppg (.x(x), .y(y), .pp_cols(pp_cols));

  dec_ppr_tree #(.D(D)) u_ppr (.pp_cols(pp_cols), .a_xs6(a_xs6), .b(b));

  // The carry out of the final adder is a multiple of 10^(2D) and is dropped.
  bcd_qt_adder #(.N(2*D)) u_add (.a_xs6(a_xs6), .b(b), .p(p), .cout(cout_unused));

endmodule
