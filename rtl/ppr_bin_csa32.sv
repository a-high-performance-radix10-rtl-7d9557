// ppr_bin_csa32: 4-bit binary 3:2 carry-save adder of one PPR column.
//
// Adds the column's carry-save pair (s, c) and the correction digit w that
// arrives from the column below. z is the bitwise sum; g takes the majority
// carries of bits 0..2 shifted up one place, and in its bit 0 the carry gin
// that the column below produced out of its bit 3. The carry out of bit 3
// (weight 16) leaves as gout: it is worth 10 in the next column and 6 here,
// which the column adds to its Wz digit. So
//   s + c + w + gin = z + g + 16*gout.
// As in the published architecture. Combinational.
module ppr_bin_csa32 (
  input  logic [3:0] s,
  input  logic [3:0] c,
  input  logic [3:0] w,
  input  logic       gin,
  output logic [3:0] z,
  output logic [3:0] g,
  output logic       gout
);

  logic [3:0] maj;

  assign z    = s ^ c ^ w;
  assign maj  = (s & c) | (s & w) | (c & w);
  assign g    = {maj[2:0], gin};
  assign gout = maj[3];

endmodule
