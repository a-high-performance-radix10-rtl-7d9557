// dec_ppr_tree: decimal partial-product reduction tree. Reduces the
// partial-product array produced by dec_ppg (2D columns, at most D+1 ODDS
// digits each) to two 2D-digit words: A in excess-6 BCD and B in BCD, with
// A_i + B_i <= 18 in every position, and A + B = sum of the array modulo
// 10^(2D).
//
// It is a row of 2D ppr_column instances, one per decimal position. The
// height of column i and the number of CSA carry bits it receives are
// elaboration-time functions of D (dec_mult_pkg). Between neighbouring
// columns run only fixed-width transfers (CSA carries, the x6 correction
// digits, the 3:2 CSA carry and the 2-bit decimal carry), so the delay of
// the tree does not grow with the word length. Transfers leaving column
// 2D-1 are multiples of 10^(2D) and are dropped.
// Combinational.
module dec_ppr_tree
  import dec_mult_pkg::*;
#(
  parameter int unsigned D = 16,
  localparam int unsigned HMAX = D + 1
) (
  input  logic [2*D-1:0][HMAX-1:0][3:0] pp_cols,
  output logic [2*D-1:0][3:0]           a_xs6,
  output logic [2*D-1:0][3:0]           b
);

  localparam int unsigned NCMAX = (max_couts(D) > 0) ? max_couts(D) : 1;

  logic [2*D-1:0][NCMAX-1:0] co;     // CSA carries leaving each column
  logic [2*D-1:0][3:0]       wq;
  logic [2*D-1:0]            wq2;
  logic [2*D-1:0]            gc;
  logic [2*D-1:0][1:0]       wh;

  for (genvar i = 0; i < 2*D; i++) begin : g_col
    localparam int unsigned H     = col_height(D, i);
    localparam int unsigned NCIN  = col_cins(D, i);
    localparam int unsigned NCOUT = csa_couts(H, NCIN);
    localparam int unsigned NCIW  = (NCIN  > 0) ? NCIN  : 1;
    localparam int unsigned NCOW  = (NCOUT > 0) ? NCOUT : 1;

    logic [NCIW-1:0] ci;
    logic [NCOW-1:0] cov;
    logic [3:0]      wq_in;
    logic            wq2_in, gin;
    logic [1:0]      wh_in;

    if (i == 0) begin : g_first
      assign ci = '0;
      assign wq_in = '0;
      assign gin = 1'b0;
      assign wh_in = '0;
    end else begin : g_rest
      assign ci    = co[i-1][NCIW-1:0];
      assign wq_in = wq[i-1];
      assign gin   = gc[i-1];
      assign wh_in = wh[i-1];
    end
    if (i < 2) begin : g_no_wq2
      assign wq2_in = 1'b0;
    end else begin : g_wq2
      assign wq2_in = wq2[i-2];
    end

    ppr_column #(.H(H), .NCIN(NCIN)) u_col (
      .dig    (pp_cols[i][H-1:0]),
      .ci     (ci),
      .wq_in  (wq_in),
      .wq2_in (wq2_in),
      .gin    (gin),
      .wh_in  (wh_in),
      .co     (cov),
      .wq_out (wq[i]),
      .wq2_out(wq2[i]),
      .gout   (gc[i]),
      .wh_out (wh[i]),
      .a_xs6  (a_xs6[i]),
      .b      (b[i]));

    always_comb begin
      co[i] = '0;
      co[i][NCOW-1:0] = cov;
    end
  end

endmodule
