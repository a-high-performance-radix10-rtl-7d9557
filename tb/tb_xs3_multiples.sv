// tb_xs3_multiples: checks the carry-free generation of 1X..5X in XS-3 for
// D = 16. For each multiple it evaluates sum((code_i - 3) * 10^i) with
// 128-bit integers and compares it with N*X; it also checks that every
// digit value stays in [-3, 12]. Uses all-equal-digit corner cases and
// random operands. Combinational: 1 ns per vector.
module tb_xs3_multiples;
  localparam int unsigned D = 16;
  logic [D-1:0][3:0]    x;
  logic [4:0][D:0][3:0] nx;
  int checks = 0, failures = 0;

  xs3_multiples #(.D(D)) dut (.x(x), .nx(nx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [D-1:0][3:0] xv);
    logic signed [127:0] xval, val, pw;
    x = xv;
    #1;
    xval = 0; pw = 1;
    for (int i = 0; i < D; i++) begin xval += 128'(xv[i]) * pw; pw *= 10; end
    for (int n = 1; n <= 5; n++) begin
      val = 0; pw = 1;
      for (int i = 0; i <= D; i++) begin
        val += (128'(nx[n-1][i]) - 3) * pw;
        pw *= 10;
        if (i == int'(D) && nx[n-1][i] > 4'd7) failures++;  // top digit is 3 + T, T <= 4
      end
      checks++;
      if (val != xval * n) begin
        failures++;
        $display("MISMATCH %0dX x=%h", n, xv);
      end
    end
  endtask

  initial begin
    logic [D-1:0][3:0] v;
    for (int d = 0; d < 10; d++) begin
      for (int i = 0; i < D; i++) v[i] = 4'(d);
      check_one(v);
      for (int i = 0; i < D; i++) v[i] = 4'((i + d) % 10);
      check_one(v);
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < D; i++) v[i] = 4'($urandom_range(0, 9));
      check_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
