// dec_ppg: decimal partial-product generation stage. Turns the BCD operands
// X (multiplicand) and Y (multiplier) into the array of digits, column by
// column, whose sum modulo 10^(2D) is X*Y.
//
// Parts:
//  * sd_recoder    - Y to D signed digits Yb_k in [-5, 5] plus Yb_D in {0,1}.
//  * xs3_multiples - 1X..5X in XS-3, carry-free.
//  * pp_selector   - one per signed digit: row k = Yb_k * X, D+1 XS-3 digits.
//  * array assembly (here): rows k = 0..D-1 are placed at positions
//    k..k+D. The XS-3 codes are used unchanged as ODDS digits (plain 4-bit
//    binary digits in [0, 15]); the bias of 3 per digit is removed by the
//    correction constant Kc of dec_mult_pkg. Three kinds of extra digits are
//    added, all digit-wise and free of carries:
//      H_i = Kc_i + Ys_i at position i < D, the +1 of the ten's complement of
//            a negative row together with a low digit of Kc (Kc_i is 0, 3 or
//            7, so H_i is in [0, 8]);
//      S_k = (1 - Ys_k) + Kc_(k+D+1) at position k+D+1 for k = 0..D-2, the
//            sign of row k encoded in its most significant digit, carrying
//            one high digit of Kc;
//      F_j = Yb_D*X_j (+ Kc_D for j = 0) at position D+j, the top row.
//    A column so holds at most D+1 digits (17 for D = 16).
// Output: pp_cols[i][n] is digit n of column i (weight 10^i); only the first
// dec_mult_pkg::col_height(D, i) entries of a column are used, the rest are 0.
//
// The recoding, the XS-3 multiples, the selection, the per-row H digit and
// the sign digit follow the published architecture. The exact correction constant and
// which digits carry which of its digits are this design's own derivation,
// since the published architecture does not spell them out. Combinational.
module dec_ppg
  import dec_mult_pkg::*;
#(
  parameter int unsigned D = 16,
  localparam int unsigned HMAX = D + 1
) (
  input  logic [D-1:0][3:0]            x,
  input  logic [D-1:0][3:0]            y,
  output logic [2*D-1:0][HMAX-1:0][3:0] pp_cols
);

  // Correction constant Kc, one BCD digit per position.
  localparam logic [MAXDIG-1:0][3:0] KC = corr_const(D);

  logic [D-1:0][4:0]     yh;
  logic [D-1:0]          ys;
  logic                  ymsd;
  logic [4:0][D:0][3:0]  nx;
  logic [D-1:0][D:0][3:0] pp;

  sd_recoder #(.D(D)) u_rec (.y(y), .yh(yh), .ys(ys), .ymsd(ymsd));

  xs3_multiples #(.D(D)) u_mul (.x(x), .nx(nx));

  for (genvar k = 0; k < D; k++) begin : g_row
    pp_selector #(.D(D)) u_sel (.nx(nx), .yh(yh[k]), .ys(ys[k]), .pp(pp[k]));
  end

  // The top row F absorbs Kc_D digit-wise, which needs Kc_D + 9 <= 15.
  if (KC[D] > 4'd6) begin : g_bad_kc
    $error("dec_ppg: correction digit Kc_D=%0d does not fit the top row", KC[D]);
  end

  always_comb begin
    for (int i = 0; i < 2*D; i++) begin
      int n;
      for (int j = 0; j < int'(HMAX); j++) pp_cols[i][j] = 4'd0;
      n = 0;
      for (int k = 0; k < D; k++) begin
        if (i >= k && i <= k + D) begin
          pp_cols[i][n] = pp[k][i-k];
          n++;
        end
      end
      if (i < D) begin
        pp_cols[i][n] = KC[i] + {3'd0, ys[i]};
        n++;
      end
      if (i > D) begin
        pp_cols[i][n] = KC[i] + {3'd0, ~ys[i-D-1]};
        n++;
      end
      if (i >= D) begin
        pp_cols[i][n] = (ymsd ? x[i-D] : 4'd0) + ((i == D) ? KC[D] : 4'd0);
        n++;
      end
    end
  end

endmodule
