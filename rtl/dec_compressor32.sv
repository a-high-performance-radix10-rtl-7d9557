// dec_compressor32: decimal 3:2 digit compressor, the last step of a PPR
// column. Reduces three ODDS digits (Wz, G, Z, each in [0, 15]) to a digit
// pair (A, B) with A + B in [0, 18], so that one BCD carry-propagate
// addition finishes the product.
//
// Block A adds the two upper bits (weights 8 and 4) of the three digits and
// the 2-bit decimal carry wh_in from the column below: 4*(0..9) + (0..3)
// lies in [0, 39]. Its units digit is A, given in excess-6 (a_xs6 = A + 6,
// in [6, 15]), and its tens digit, 0..3, is the decimal carry wh_out to the
// column above.
// Block B adds the two lower bits (weights 2 and 1) of the three digits:
// the result is at most 9, so B is a plain BCD digit with no carry.
// The split into blocks A and B, the ranges and the excess-6 output are the
// document's; the blocks are written here as small arithmetic expressions
// rather than as gate netlists. Combinational.
module dec_compressor32 (
  input  logic [3:0] wz,
  input  logic [3:0] gd,
  input  logic [3:0] zd,
  input  logic [1:0] wh_in,
  output logic [3:0] a_xs6,   // A + 6
  output logic [3:0] b,       // B, BCD
  output logic [1:0] wh_out
);

  logic [3:0] hs;  // sum of the upper bit pairs, 0..9
  logic [5:0] u;   // block A sum, 0..39

  always_comb begin
    hs     = {2'd0, wz[3:2]} + {2'd0, gd[3:2]} + {2'd0, zd[3:2]};
    u      = {hs, 2'b00} + {4'd0, wh_in};
    wh_out = 2'(u / 6'd10);
    a_xs6  = 4'(u % 6'd10) + 4'd6;
    b      = {2'd0, wz[1:0]} + {2'd0, gd[1:0]} + {2'd0, zd[1:0]};
  end

endmodule
