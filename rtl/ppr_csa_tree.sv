// ppr_csa_tree: binary carry-save tree of one 4-bit digit column of the
// partial-product reduction (PPR) tree.
//
// The column adds H ODDS digits (4-bit binary digits in [0, 15]) and NCIN
// carry bits of weight 1 that arrive from the column below. All bits are
// treated as a plain binary dot diagram with four bit positions (weights
// 1, 2, 4, 8). Every level places floor(n/3) full adders (3:2 counters) on
// each position holding n bits; sums stay, carries move one position up.
// Carries out of position 3 have weight 16 and leave the column on cout:
// each is worth 10 in the next column (it enters there as a weight-1 bit)
// plus 6 in this column, which ppr_correction adds back later. Levels are
// added until no position holds more than two bits; those two bits form the
// carry-save pair (s, c), so the column value is
//   sum(dig) + sum(cin) = s + c + 16 * sum(cout).
// The shape of the tree is computed at elaboration by dec_mult_pkg. For
// H = 17 and NCIN = 14 (the tallest column at D = 16) it has 7 levels and
// 15 carry outputs.
//
// The published architecture gives the principle (a binary h:2 CSA tree per digit column
// whose inter-column carries are counted for a later +6 correction); the
// Wallace-style placement of the 3:2 counters is this design's choice.
// Combinational.
module ppr_csa_tree
  import dec_mult_pkg::*;
#(
  parameter int unsigned H    = 17,
  parameter int unsigned NCIN = 14,
  localparam int unsigned NCOUT = csa_couts(H, NCIN),
  localparam int unsigned NCIW  = (NCIN  > 0) ? NCIN  : 1,
  localparam int unsigned NCOW  = (NCOUT > 0) ? NCOUT : 1
) (
  input  logic [H-1:0][3:0] dig,    // ODDS digits
  input  logic [NCIW-1:0]   cin,    // carries from the column below (unused if NCIN = 0)
  output logic [NCOW-1:0]   cout,   // carries of weight 16 to the column above
  output logic [3:0]        s,      // carry-save sum word
  output logic [3:0]        c       // carry-save second word (same weights as s)
);

  localparam int unsigned NL   = csa_levels(H, NCIN);
  localparam int unsigned MAXB = H + NCIN + 3;

  // lv[l][j] holds the bits of weight 2^j at level l.
  logic [NL:0][3:0][MAXB-1:0] lv;

  // ---- level 0 --------------------------------------------------------
  for (genvar j = 0; j < 4; j++) begin : g_l0
    for (genvar b = 0; b < MAXB; b++) begin : g_b
      if (j == 0 && b < NCIN) begin : g_cin
        assign lv[0][0][b] = cin[b];
      end else if (j == 0 && b < NCIN + H) begin : g_d0
        assign lv[0][0][b] = dig[b-NCIN][0];
      end else if (j > 0 && b < H) begin : g_dj
        assign lv[0][j][b] = dig[b][j];
      end else begin : g_zero
        assign lv[0][j][b] = 1'b0;
      end
    end
  end

  // ---- reduction levels ----------------------------------------------------
  for (genvar l = 0; l < NL; l++) begin : g_lvl
    for (genvar j = 0; j < 4; j++) begin : g_pos
      localparam int unsigned N  = csa_cnt(H, NCIN, l, j);
      localparam int unsigned F  = N / 3;
      localparam int unsigned FP = (j > 0) ? csa_cnt(H, NCIN, l, j - 1) / 3 : 0;
      localparam int unsigned NN = N - 2*F + FP;
      for (genvar b = 0; b < MAXB; b++) begin : g_b
        if (b < F) begin : g_sum
          assign lv[l+1][j][b] = lv[l][j][3*b] ^ lv[l][j][3*b+1] ^ lv[l][j][3*b+2];
        end else if (b < N - 2*F) begin : g_pass
          assign lv[l+1][j][b] = lv[l][j][b + 2*F];
        end else if (b < NN) begin : g_carry
          localparam int unsigned F0 = b - (N - 2*F);
          assign lv[l+1][j][b] = (lv[l][j-1][3*F0]   & lv[l][j-1][3*F0+1]) |
                                 (lv[l][j-1][3*F0]   & lv[l][j-1][3*F0+2]) |
                                 (lv[l][j-1][3*F0+1] & lv[l][j-1][3*F0+2]);
        end else begin : g_zero
          assign lv[l+1][j][b] = 1'b0;
        end
      end
      if (j == 3) begin : g_cout
        for (genvar f = 0; f < F; f++) begin : g_f
          assign cout[csa_cout_before(H, NCIN, l) + f] =
              (lv[l][3][3*f]   & lv[l][3][3*f+1]) |
              (lv[l][3][3*f]   & lv[l][3][3*f+2]) |
              (lv[l][3][3*f+1] & lv[l][3][3*f+2]);
        end
      end
    end
  end

  if (NCOUT == 0) begin : g_no_cout
    assign cout = 1'b0;
  end

  // ---- final carry-save pair ---------------------------------------------
  for (genvar j = 0; j < 4; j++) begin : g_out
    localparam int unsigned NF = csa_cnt(H, NCIN, NL, j);
    assign s[j] = (NF >= 1) ? lv[NL][j][0] : 1'b0;
    assign c[j] = (NF >= 2) ? lv[NL][j][1] : 1'b0;
  end

endmodule
