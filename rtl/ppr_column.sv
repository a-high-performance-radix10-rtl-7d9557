// ppr_column: one decimal digit column (weight 10^i) of the partial-product
// reduction tree. Reduces H ODDS digits to the pair (A_i in excess-6, B_i in
// BCD) with A_i + B_i <= 18, exchanging only a fixed number of transfer
// signals with the neighbouring columns, so the whole tree is free of
// carry propagation.
//
// Datapath:
//  1. ppr_csa_tree: binary h:2 CSA tree on the H digits and the carry bits
//     ci from column i-1, giving (S, C) and the carry bits co of weight 16.
//  2. ppr_correction: counts the carries in co and forms 6*Wm as the digit
//     wr kept here and the transfers wq (to i+1) and wq2 (to i+2).
//  3. ppr_bin_csa32: 4-bit 3:2 CSA of S, C and wq_in (from column i-1),
//     with carry gin/gout between columns, giving Z and G.
//  4. Wz = wr + 6*gout + wq2_in (at most 8 + 6 + 1 = 15).
//  5. dec_compressor32: Wz, G, Z and the decimal carry wh_in to A, B, wh_out.
// Every transfer that leaves the column (co, wq_out, gout, wh_out) is worth
// exactly ten units of the column above it (wq2_out: of column i+2), and
// every incoming one is added here at the matching weight, so the sum over
// all columns of (A_i + B_i) * 10^i equals the sum of the array.
// The structure (CSA tree, carry counter with x6 correction, binary 3:2 CSA,
// decimal 3:2 compressor) is the published architecture's; how the x6 correction is split
// into digits and where each piece enters is this design's choice.
// Combinational.
module ppr_column
  import dec_mult_pkg::*;
#(
  parameter int unsigned H    = 17,
  parameter int unsigned NCIN = 14,
  localparam int unsigned NCOUT = csa_couts(H, NCIN),
  localparam int unsigned NCIW  = (NCIN  > 0) ? NCIN  : 1,
  localparam int unsigned NCOW  = (NCOUT > 0) ? NCOUT : 1
) (
  input  logic [H-1:0][3:0] dig,
  input  logic [NCIW-1:0]   ci,       // CSA carries from column i-1
  input  logic [3:0]        wq_in,    // correction tens digit from column i-1
  input  logic              wq2_in,   // correction hundreds from column i-2
  input  logic              gin,      // 3:2 CSA carry from column i-1
  input  logic [1:0]        wh_in,    // decimal compressor carry from column i-1
  output logic [NCOW-1:0]   co,
  output logic [3:0]        wq_out,
  output logic              wq2_out,
  output logic              gout,
  output logic [1:0]        wh_out,
  output logic [3:0]        a_xs6,
  output logic [3:0]        b
);

  logic [3:0] s, c, wr, z, g, wz;

  ppr_csa_tree #(.H(H), .NCIN(NCIN)) u_csa (
    .dig(dig), .cin(ci), .cout(co), .s(s), .c(c));

  ppr_correction #(.NC(NCOUT)) u_corr (
    .cnt_in(co), .wr(wr), .wq(wq_out), .wq2(wq2_out));

  ppr_bin_csa32 u_c32 (
    .s(s), .c(c), .w(wq_in), .gin(gin), .z(z), .g(g), .gout(gout));

  assign wz = wr + (gout ? 4'd6 : 4'd0) + {3'd0, wq2_in};

  dec_compressor32 u_dc (
    .wz(wz), .gd(g), .zd(z), .wh_in(wh_in), .a_xs6(a_xs6), .b(b), .wh_out(wh_out));

endmodule
