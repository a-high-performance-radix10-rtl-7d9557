// xs3_multiples: generates the multiplicand multiples 1X, 2X, 3X, 4X and 5X
// as D+1 digit numbers in excess-3 (XS-3) code with digits in [-3, 12].
//
// Step 1 (digit mapping): every BCD digit X_i is mapped on its own to a
// transfer T_i and a digit D_i with N*X_i + 3 = 10*T_i + D_i, using the
// preferred mapping table of the design (for 3X, X_i = 3 maps to T = 0,
// D = 12 and X_i = 9 to T = 2, D = 10 rather than the plain quotient and
// remainder).
// Step 2 (carry assimilation): digit i of NX is the 4-bit sum D_i + T_(i-1),
// which never exceeds 15, so no carry leaves the digit. The value of
// digit i is that code minus 3. Digit D is 3 + T_(D-1).
// So every multiple costs one small table and one 4-bit add per digit, with
// no carry propagation. The mapping table is the published architecture's; writing step 2
// as a 4-bit adder per digit is this design's choice. Combinational.
module xs3_multiples #(
  parameter int unsigned D = 16
) (
  input  logic [D-1:0][3:0]      x,    // multiplicand, BCD
  output logic [4:0][D:0][3:0]   nx    // nx[N-1] = N*X in XS-3, N = 1..5
);

  // {T[2:0], D[3:0]} of N*x + 3 under the preferred mapping.
  function automatic logic [6:0] dmap(input int unsigned n, input logic [3:0] xd);
    logic [2:0] t;
    logic [3:0] dd;
    t = 3'd0; dd = 4'd3;
    unique case (n)
      1: begin t = 3'd0; dd = xd + 4'd3; end
      2: case (xd)
           4'd0: begin t = 0; dd = 3;  end  4'd1: begin t = 0; dd = 5;  end
           4'd2: begin t = 0; dd = 7;  end  4'd3: begin t = 0; dd = 9;  end
           4'd4: begin t = 1; dd = 1;  end  4'd5: begin t = 1; dd = 3;  end
           4'd6: begin t = 1; dd = 5;  end  4'd7: begin t = 1; dd = 7;  end
           4'd8: begin t = 1; dd = 9;  end  default: begin t = 1; dd = 11; end
         endcase
      3: case (xd)
           4'd0: begin t = 0; dd = 3;  end  4'd1: begin t = 0; dd = 6;  end
           4'd2: begin t = 0; dd = 9;  end  4'd3: begin t = 0; dd = 12; end
           4'd4: begin t = 1; dd = 5;  end  4'd5: begin t = 1; dd = 8;  end
           4'd6: begin t = 2; dd = 1;  end  4'd7: begin t = 2; dd = 4;  end
           4'd8: begin t = 2; dd = 7;  end  default: begin t = 2; dd = 10; end
         endcase
      4: case (xd)
           4'd0: begin t = 0; dd = 3;  end  4'd1: begin t = 0; dd = 7;  end
           4'd2: begin t = 1; dd = 1;  end  4'd3: begin t = 1; dd = 5;  end
           4'd4: begin t = 1; dd = 9;  end  4'd5: begin t = 2; dd = 3;  end
           4'd6: begin t = 2; dd = 7;  end  4'd7: begin t = 2; dd = 11; end
           4'd8: begin t = 3; dd = 5;  end  default: begin t = 3; dd = 9;  end
         endcase
      default: begin  // 5X: T = floor(X/2), D = 3 or 8
           t  = xd[3:1];
           dd = xd[0] ? 4'd8 : 4'd3;
         end
    endcase
    return {t, dd};
  endfunction

  always_comb begin
    for (int n = 1; n <= 5; n++) begin
      logic [2:0] tprev;
      tprev = 3'd0;
      for (int i = 0; i < D; i++) begin
        logic [6:0] td;
        td = dmap(n, x[i]);
        nx[n-1][i] = td[3:0] + {1'b0, tprev};
        tprev = td[6:4];
      end
      nx[n-1][D] = 4'd3 + {1'b0, tprev};
    end
  end

endmodule
