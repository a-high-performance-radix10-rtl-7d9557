// sd_recoder: recodes the BCD multiplier Y into signed radix-10 digits in
// [-5, 5], one digit per BCD digit plus a most-significant digit in {0, 1}.
//
// Digit k sends a transfer tr(k+1) = (Y_k >= 5) to digit k+1 and becomes
//   Yb_k = Y_k + tr(k) - 10*tr(k+1).
// The transfer depends on Y_k alone, so there is no carry chain: every digit
// is a small independent function of Y_k and Y_(k-1). Each recoded digit is
// delivered as a hot-one magnitude code yh[k] (bit m-1 set for |Yb_k| = m,
// all zero for Yb_k = 0) and a sign bit ys[k], set only for a strictly
// negative digit. The top digit Yb_D = tr(D) is ymsd; it selects 0 or 1X for
// the most significant partial product.
//
// The hot-one code and sign follow the published architecture's description of the
// selection signals; the transfer rule (Y_k >= 5) is this design's choice of
// the usual recoding, since the published architecture takes the recoder from earlier work.
// ys is kept 0 for a zero digit (Y_k = 9 with an incoming transfer), which
// the partial-product selector relies on. Purely combinational.
module sd_recoder #(
  parameter int unsigned D = 16
) (
  input  logic [D-1:0][3:0] y,      // multiplier, BCD, digit 0 least significant
  output logic [D-1:0][4:0] yh,     // hot-one |Yb_k|: bit 0 = 1, ..., bit 4 = 5
  output logic [D-1:0]      ys,     // sign of Yb_k (1 = negative)
  output logic              ymsd    // Yb_D, in {0, 1}
);

  logic [D:0] tr;   // tr[k] is the transfer into digit k

  assign tr[0] = 1'b0;

  always_comb begin
    for (int k = 0; k < D; k++) begin
      logic [3:0] v;      // Y_k + tr(k), 0..10
      logic [3:0] mag;
      tr[k+1] = (y[k] >= 4'd5);
      v       = y[k] + {3'd0, tr[k]};
      mag     = tr[k+1] ? (4'd10 - v) : v;
      ys[k]   = tr[k+1] && (v != 4'd10);
      yh[k]   = '0;
      if (mag != 4'd0) yh[k][mag-1] = 1'b1;
    end
  end

  assign ymsd = tr[D];

endmodule
