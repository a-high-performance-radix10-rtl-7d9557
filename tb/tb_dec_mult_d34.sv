// tb_dec_mult_d34: runs the multiplier in its Decimal128 size, D = 34
// (34 x 34 digits, 68-digit product). The reference product is formed by
// schoolbook digit multiplication with integer arrays in the testbench.
// Corner cases (all nines, zero, one) and random operands are checked, and
// the hundreds digit of the x6 correction, needed only at this size, must
// occur.
// Combinational: 1 ns per vector; a watchdog ends a stuck run.
module tb_dec_mult_d34;
  localparam int unsigned D = 34;
  logic [D-1:0][3:0]   x, y;
  logic [2*D-1:0][3:0] p;
  int checks = 0, failures = 0, n_wq2 = 0;

  dec_mult #(.D(D)) dut (.x(x), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [D-1:0][3:0] xv, input logic [D-1:0][3:0] yv);
    int acc [2*D+1];
    x = xv; y = yv;
    #1;
    foreach (acc[i]) acc[i] = 0;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) acc[i+j] += int'(xv[i]) * int'(yv[j]);
    for (int i = 0; i < 2*D; i++) begin
      acc[i+1] += acc[i] / 10;
      acc[i]    = acc[i] % 10;
    end
    if (dut.u_ppr.wq2 != '0) n_wq2++;
    checks++;
    for (int i = 0; i < 2*D; i++) begin
      if (int'(p[i]) != acc[i]) begin
        failures++;
        if (failures < 5) $display("MISMATCH x=%h y=%h digit %0d", xv, yv, i);
        break;
      end
    end
  endtask

  initial begin
    logic [D-1:0][3:0] a, b;
    a = '0; b = '0;
    check_one(a, b);
    for (int i = 0; i < D; i++) begin a[i] = 4'd9; b[i] = 4'd9; end
    check_one(a, b);
    b = '0; b[0] = 4'd1;
    check_one(a, b);
    check_one(b, a);
    for (int n = 0; n < 1500; n++) begin
      for (int i = 0; i < D; i++) begin
        a[i] = (n % 3 == 1) ? 4'($urandom_range(5, 9)) : 4'($urandom_range(0, 9));
        b[i] = (n % 3 == 2) ? 4'($urandom_range(5, 9)) : 4'($urandom_range(0, 9));
      end
      check_one(a, b);
    end
    // Columns with more than 16 CSA carries must have needed the hundreds
    // digit of the x6 correction at least once.
    checks++;
    if (n_wq2 == 0) begin failures++; $display("never: correction hundreds digit"); end
    $display("correction hundreds digit used in %0d vectors", n_wq2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
