// pp_selector: forms one partial product, Yb_k * X, as D+1 digits from the
// precomputed XS-3 multiples.
//
// A 5:1 hot-one multiplexer picks 1X..5X according to yh; a zero digit
// selects nothing and gives 0000. The XOR stage then applies the sign: bits
// 3 and 2 are inverted when ys = 1, bits 1 and 0 when ys = 1 or when yh is
// all zero. A negative digit so yields the nine's complement of the multiple
// (in XS-3 the nine's complement is a bit inversion) and a zero digit yields
// 0011, the XS-3 code of zero. The +1 that completes the ten's complement is
// added elsewhere, in the H digit of the partial-product array.
// This is the selection scheme the published architecture describes. Combinational.
module pp_selector #(
  parameter int unsigned D = 16
) (
  input  logic [4:0][D:0][3:0] nx,   // 1X..5X in XS-3
  input  logic [4:0]           yh,   // hot-one magnitude of Yb_k
  input  logic                 ys,   // sign of Yb_k
  output logic [D:0][3:0]      pp    // partial product digits, XS-3
);

  logic       yzero;
  logic [3:0] mask;

  assign yzero = (yh == 5'd0);
  assign mask  = {ys, ys, ys | yzero, ys | yzero};

  always_comb begin
    for (int i = 0; i <= D; i++) begin
      logic [3:0] sel;
      sel = '0;
      for (int n = 0; n < 5; n++) sel |= nx[n][i] & {4{yh[n]}};
      pp[i] = sel ^ mask;
    end
  end

endmodule
