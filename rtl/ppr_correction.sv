// ppr_correction: sum-correction block of one column of the PPR tree.
//
// Every carry of weight 16 that the column's CSA tree sent upward was
// counted there as 10; the 6 that is left over must be added back to this
// column. A binary counter gives Wm, the number of such carries that are 1,
// and the correction W = 6*Wm is split into decimal digits:
//   wr  = W mod 10           (stays in this column, always even, <= 8)
//   wq  = (W div 10) mod 10  (goes to column i+1)
//   wq2 = W div 100          (goes to column i+2; only needed once a column
//                             has more than 16 carries, i.e. for D > 16).
// Because the counter works on the carries while the CSA tree is still
// reducing the upper bit positions, the correction is off the critical path.
// The counter and the multiplication by 6 are the published architecture's; the decimal
// split of W is this design's choice. Combinational. NC must stay <= 33 so
// that W < 200.
module ppr_correction #(
  parameter int unsigned NC = 15,
  localparam int unsigned NCW = (NC > 0) ? NC : 1
) (
  input  logic [NCW-1:0] cnt_in,   // carry bits of weight 16 leaving the column
  output logic [3:0]     wr,
  output logic [3:0]     wq,
  output logic           wq2
);

  if (NC > 33) begin : g_bad_nc
    $error("ppr_correction: NC=%0d exceeds 33", NC);
  end

  logic [5:0] wm;   // carry count, 0..33
  logic [7:0] w;    // 6 * wm, 0..198

  always_comb begin
    wm = '0;
    for (int b = 0; b < int'(NC); b++) wm += {5'd0, cnt_in[b]};
    w   = {wm, 2'b00} + {1'b0, wm, 1'b0};    // 4*wm + 2*wm
    wr  = 4'(w % 8'd10);
    wq  = 4'((w / 8'd10) % 8'd10);
    wq2 = (w >= 8'd100);
  end

endmodule
