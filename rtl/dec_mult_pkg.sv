// dec_mult_pkg: shared constants and elaboration-time helper functions of the
// parallel radix-10 multiplier.
//
// The multiplier is sized by D, the number of BCD digits of each operand.
// Everything that depends only on D is worked out here at elaboration time:
//  * the height of every digit column of the partial-product array,
//  * the decimal correction constant that absorbs the excess-3 bias of the
//    partial-product digits and the sign handling of the negative rows,
//  * the shape of the bit-level 3:2 (full adder) tree inside one 4-bit digit
//    column of the reduction tree, and how many carry bits of weight 16 it
//    hands to the next column.
// None of these functions is used on a signal; they only size ports and
// select wiring.
package dec_mult_pkg;

  // Upper bound on the number of decimal digits handled by the constant
  // arithmetic below (2*D must not exceed it).
  localparam int unsigned MAXDIG = 160;

  function automatic int unsigned imax(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Number of digits in column i (weight 10^i) of the partial-product array.
  // Rows 0..D-1 hold D+1 digits each at positions k..k+D; every column below D
  // also holds one H digit, every column above D one sign digit S, and every
  // column from D upward one digit of the top row F.
  function automatic int unsigned col_height(input int unsigned d, input int unsigned i);
    if (i < d)       return i + 2;
    else if (i == d) return d + 1;
    else             return 2*d - i + 2;
  endfunction

  function automatic int unsigned max_height(input int unsigned d);
    int unsigned m;
    m = 0;
    for (int unsigned i = 0; i < 2*d; i++) m = imax(m, col_height(d, i));
    return m;
  endfunction

  // Digit i of the correction constant
  //   Kc = -( 3 * sum_{k=0}^{D-1} R * 10^k  +  sum_{k=0}^{D-2} 10^(D+1+k) )  mod 10^(2D)
  // with R = 11...1 (D+1 ones). The first sum removes the excess-3 bias of the
  // D rows of D+1 digits; the second removes the 1 that every sign digit S_k
  // adds at position D+1+k (S_k = 1 - Ys_k).
  function automatic logic [MAXDIG-1:0][3:0] corr_const(input int unsigned d);
    int unsigned v [MAXDIG];
    logic [MAXDIG-1:0][3:0] r;
    int unsigned cy, t;
    for (int unsigned j = 0; j < MAXDIG; j++) v[j] = 0;
    // 3 * (ones at positions k..k+D for k = 0..D-1)
    for (int unsigned k = 0; k < d; k++)
      for (int unsigned j = k; j <= k + d; j++) v[j] += 3;
    for (int unsigned k = 0; k + 1 < d; k++) v[d + 1 + k] += 1;
    // carry-normalise to decimal digits
    cy = 0;
    for (int unsigned j = 0; j < 2*d; j++) begin
      t = v[j] + cy; v[j] = t % 10; cy = t / 10;
    end
    // ten's complement modulo 10^(2D): nine's complement of each digit, plus 1
    cy = 1;
    for (int unsigned j = 0; j < 2*d; j++) begin
      t = 9 - v[j] + cy; v[j] = t % 10; cy = t / 10;
    end
    r = '0;
    for (int unsigned j = 0; j < 2*d; j++) r[j] = 4'(v[j]);
    return r;
  endfunction

  function automatic int unsigned corr_digit(input int unsigned d, input int unsigned i);
    logic [MAXDIG-1:0][3:0] r;
    r = corr_const(d);
    return int'(r[i]);
  endfunction

  // ---- shape of the bit-level CSA tree of one 4-bit digit column -----------
  // Level 0 holds, at bit position 0, the NCIN incoming carry bits and the
  // H digit LSBs, and at positions 1..3 the H digit bits. Each level puts
  // floor(n/3) full adders on each position with n bits; the carries of
  // position 3 (weight 16) leave the column. Levels are added until no
  // position holds more than two bits.

  // Bits at position j of level lv.
  function automatic int unsigned csa_cnt(input int unsigned h, input int unsigned ncin,
                                          input int unsigned lv, input int unsigned j);
    int unsigned c [4];
    int unsigned n [4];
    c[0] = h + ncin; c[1] = h; c[2] = h; c[3] = h;
    for (int unsigned l = 0; l < lv; l++) begin
      for (int unsigned p = 0; p < 4; p++)
        n[p] = c[p] - 2*(c[p]/3) + ((p > 0) ? c[p-1]/3 : 0);
      for (int unsigned p = 0; p < 4; p++) c[p] = n[p];
    end
    return c[j];
  endfunction

  function automatic int unsigned csa_levels(input int unsigned h, input int unsigned ncin);
    int unsigned l;
    l = 0;
    while (csa_cnt(h, ncin, l, 0) > 2 || csa_cnt(h, ncin, l, 1) > 2 ||
           csa_cnt(h, ncin, l, 2) > 2 || csa_cnt(h, ncin, l, 3) > 2)
      l++;
    return l;
  endfunction

  // Carry bits of weight 16 produced in levels 0..lv-1.
  function automatic int unsigned csa_cout_before(input int unsigned h, input int unsigned ncin,
                                                  input int unsigned lv);
    int unsigned s;
    s = 0;
    for (int unsigned l = 0; l < lv; l++) s += csa_cnt(h, ncin, l, 3) / 3;
    return s;
  endfunction

  function automatic int unsigned csa_couts(input int unsigned h, input int unsigned ncin);
    return csa_cout_before(h, ncin, csa_levels(h, ncin));
  endfunction

  // Carry bits that column i of the reduction tree sends to column i+1.
  function automatic int unsigned col_couts(input int unsigned d, input int unsigned i);
    int unsigned nc;
    nc = 0;
    for (int unsigned c = 0; c <= i; c++) nc = csa_couts(col_height(d, c), nc);
    return nc;
  endfunction

  // Carry bits that column i receives (0 for column 0).
  function automatic int unsigned col_cins(input int unsigned d, input int unsigned i);
    return (i == 0) ? 0 : col_couts(d, i - 1);
  endfunction

  function automatic int unsigned max_couts(input int unsigned d);
    int unsigned m;
    m = 0;
    for (int unsigned i = 0; i < 2*d; i++) m = imax(m, col_couts(d, i));
    return m;
  endfunction

endpackage
