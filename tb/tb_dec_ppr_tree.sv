// tb_dec_ppr_tree: checks the whole reduction tree for D = 16. Each column
// is filled up to its height (dec_mult_pkg::col_height) with random ODDS
// digits, all 15s or all 0s. The result must satisfy
//   sum((A_i - 6 + B_i) * 10^i) = sum(array digits * 10^column)  mod 10^(2D)
// with A_i + B_i <= 18 in every position. Values use 128-bit integers.
// Combinational: 1 ns per vector.
module tb_dec_ppr_tree;
  import dec_mult_pkg::*;
  localparam int unsigned D = 16;
  logic [2*D-1:0][D:0][3:0] pp_cols;
  logic [2*D-1:0][3:0]      a_xs6, b;
  int checks = 0, failures = 0;

  dec_ppr_tree #(.D(D)) dut (.pp_cols(pp_cols), .a_xs6(a_xs6), .b(b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [127:0] insum, outsum, pw;
      pp_cols = '0;
      for (int i = 0; i < 2*D; i++)
        for (int k = 0; k < col_height(D, i); k++)
          pp_cols[i][k] = (n == 0) ? 4'd15 : (n == 1) ? 4'd0 : 4'($urandom_range(0, 15));
      #1;
      insum = 0; outsum = 0; pw = 1;
      for (int i = 0; i < 2*D; i++) begin
        for (int k = 0; k <= D; k++) insum += 128'(pp_cols[i][k]) * pw;
        outsum += (128'(a_xs6[i]) - 6 + 128'(b[i])) * pw;
        if (a_xs6[i] < 4'd6 || b[i] > 4'd9) failures++;
        pw *= 10;
      end
      checks++;
      if (insum % pw != outsum % pw) begin
        failures++;
        if (failures < 5) $display("MISMATCH vector %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
