// tb_dec_ppg: checks the partial-product generation stage for D = 16. For
// random and corner-case operands the sum of all array digits, each weighted
// by 10^column, modulo 10^(2D), must equal X*Y (computed with 128-bit
// integers). It also checks that no column holds more than
// dec_mult_pkg::col_height digits (entries above are 0) and that the
// tallest column is D+1 digits high. Combinational: 1 ns per vector.
module tb_dec_ppg;
  import dec_mult_pkg::*;
  localparam int unsigned D = 16;
  logic [D-1:0][3:0]             x, y;
  logic [2*D-1:0][D:0][3:0]      pp_cols;
  int checks = 0, failures = 0;

  dec_ppg #(.D(D)) dut (.x(x), .y(y), .pp_cols(pp_cols));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [D-1:0][3:0] xv, input logic [D-1:0][3:0] yv);
    logic [127:0] xval, yval, sum, pw, modv;
    x = xv; y = yv;
    #1;
    xval = 0; yval = 0; pw = 1;
    for (int i = 0; i < D; i++) begin
      xval += 128'(xv[i]) * pw; yval += 128'(yv[i]) * pw; pw *= 10;
    end
    modv = pw * pw;
    sum = 0; pw = 1;
    for (int i = 0; i < 2*D; i++) begin
      for (int n = 0; n <= D; n++) begin
        sum += 128'(pp_cols[i][n]) * pw;
        if (n >= col_height(D, i) && pp_cols[i][n] != 4'd0) begin
          failures++;
          $display("digit above column height at column %0d", i);
        end
      end
      pw *= 10;
    end
    checks++;
    if (sum % modv != xval * yval) begin
      failures++;
      $display("MISMATCH x=%h y=%h", xv, yv);
    end
  endtask

  initial begin
    logic [D-1:0][3:0] a, b;
    checks++;
    if (max_height(D) != D + 1) failures++;
    for (int d = 0; d < 10; d++) begin
      for (int i = 0; i < D; i++) begin a[i] = 4'(d); b[i] = 4'(9 - d); end
      check_one(a, b);
      check_one(b, a);
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < D; i++) begin
        a[i] = 4'($urandom_range(0, 9)); b[i] = 4'($urandom_range(0, 9));
      end
      check_one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
