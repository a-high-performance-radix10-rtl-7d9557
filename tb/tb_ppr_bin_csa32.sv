// tb_ppr_bin_csa32: exhaustive check of the 4-bit binary 3:2 CSA over all
// 2^13 input combinations: s + c + w + gin = z + g + 16*gout, z is the
// bitwise XOR of the three words and bit 0 of g is gin. Combinational.
module tb_ppr_bin_csa32;
  logic [3:0] s, c, w, z, g;
  logic       gin, gout;
  int checks = 0, failures = 0;

  ppr_bin_csa32 dut (.s(s), .c(c), .w(w), .gin(gin), .z(z), .g(g), .gout(gout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      {gin, w, c, s} = 13'(v);
      #1;
      checks++;
      if (int'(s) + int'(c) + int'(w) + int'(gin) != int'(z) + int'(g) + 16 * int'(gout) ||
          z != (s ^ c ^ w) || g[0] != gin) begin
        failures++;
        if (failures < 5) $display("MISMATCH s=%0d c=%0d w=%0d gin=%0d", s, c, w, gin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
