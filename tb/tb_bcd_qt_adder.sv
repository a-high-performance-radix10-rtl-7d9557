// tb_bcd_qt_adder: checks the final BCD adder for N = 32 digits. A is given
// in excess-6. Operands are random digit pairs, pairs that sum to 9 (carry
// propagation through all digits) and all-9s, and the result is compared
// with the sum computed with 128-bit integers, including the carry out.
// Combinational: 1 ns per vector.
module tb_bcd_qt_adder;
  localparam int unsigned N = 32;
  logic [N-1:0][3:0] a_xs6, b, p;
  logic              cout;
  int checks = 0, failures = 0;

  bcd_qt_adder #(.N(N)) dut (.a_xs6(a_xs6), .b(b), .p(p), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [127:0] av, bv, pv, sv, pw;
      av = 0; bv = 0; pv = 0; pw = 1;
      for (int i = 0; i < N; i++) begin
        int ad, bd;
        ad = $urandom_range(0, 9);
        case (n % 3)
          0: bd = $urandom_range(0, 9);
          1: bd = (i == 0 || $urandom_range(0, 7) != 0) ? 9 - ad : $urandom_range(0, 9);
          default: begin ad = 9; bd = (n % 2 != 0) ? 9 : 0; end
        endcase
        if (i == 0 && n % 3 == 1) bd = 9;   // start a chain at the bottom
        a_xs6[i] = 4'(ad + 6); b[i] = 4'(bd);
        av += 128'(ad) * pw; bv += 128'(bd) * pw;
        pw *= 10;
      end
      #1;
      sv = av + bv;
      pw = 1;
      for (int i = 0; i < N; i++) begin pv += 128'(p[i]) * pw; pw *= 10; end
      pv += 128'(cout) * pw;
      checks++;
      if (pv != sv) begin
        failures++;
        if (failures < 5) $display("MISMATCH vector %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
