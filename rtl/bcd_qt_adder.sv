// bcd_qt_adder: final carry-propagate BCD adder, P = A + B, with A given in
// excess-6 (a_xs6 = A + 6 per digit) and B in BCD, N digits each.
//
// Because A_i + B_i <= 18, at most one decimal carry enters and leaves each
// digit. Adding the digits in excess-6 makes the 4-bit binary carry equal to
// the decimal carry: a_xs6 + b >= 16 exactly when A_i + B_i >= 10. Per digit:
//   generate  gen_i = (a_xs6 + b >= 16)        (A_i + B_i >= 10)
//   propagate prp_i = (a_xs6 + b == 15)        (A_i + B_i == 9)
// A parallel prefix tree (Kogge-Stone, log2(N) levels of (g, p) operators)
// computes the decimal carry into every digit. Off the critical path, two
// conditional digit sums are formed for carry-in 0 and 1; in each, when the
// digit produces no decimal carry, 6 is subtracted to leave the excess-6
// form. A final row of 2:1 multiplexers picks the sum for the actual carry.
// Hybrid prefix / carry-select structure after the published architecture; the specific
// prefix network (Kogge-Stone over single digits) is this design's choice.
// Combinational.
module bcd_qt_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0][3:0] a_xs6,
  input  logic [N-1:0][3:0] b,
  output logic [N-1:0][3:0] p,
  output logic              cout
);

  localparam int unsigned NLEV = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] gen, prp;
  logic [N-1:0][3:0] sum0, sum1;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [4:0] t0, t1;
      t0 = {1'b0, a_xs6[i]} + {1'b0, b[i]};
      t1 = t0 + 5'd1;
      gen[i]  = t0[4];
      prp[i]  = (t0 == 5'd15);
      sum0[i] = t0[4] ? t0[3:0] : (t0[3:0] - 4'd6);
      sum1[i] = t1[4] ? t1[3:0] : (t1[3:0] - 4'd6);
    end
  end

  // Kogge-Stone prefix: after the last level gg[NLEV][i] is the carry out of
  // digits i..0 (carry into the adder is 0).
  logic [NLEV:0][N-1:0] gg, pp;

  assign gg[0] = gen;
  assign pp[0] = prp;

  for (genvar l = 0; l < NLEV; l++) begin : g_pfx
    for (genvar i = 0; i < N; i++) begin : g_i
      if (i >= (1 << l)) begin : g_op
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i - (1 << l)]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i - (1 << l)];
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic cin;
      cin  = (i == 0) ? 1'b0 : gg[NLEV][(i == 0) ? 0 : i - 1];
      p[i] = cin ? sum1[i] : sum0[i];
    end
  end

  assign cout = gg[NLEV][N-1];

endmodule
