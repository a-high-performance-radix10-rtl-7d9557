// tb_pp_selector: checks one partial-product selector for D = 16. The
// multiples come from an xs3_multiples instance; the selector is driven with
// every signed digit -5..5. The row is valid when its value satisfies
//   sum(code_i * 10^i) - 3*R + Ys*(1 - 10^(D+1)) = Yb * X,   R = 11..1 (D+1),
// i.e. the XS-3 row, with the +1 and the sign weight that the array adds
// for a negative row, equals the signed multiple. A zero digit must give
// 0011 in every position. Combinational: 1 ns per vector.
module tb_pp_selector;
  localparam int unsigned D = 16;
  logic [D-1:0][3:0]    x;
  logic [4:0][D:0][3:0] nx;
  logic [4:0]           yh;
  logic                 ys;
  logic [D:0][3:0]      pp;
  int checks = 0, failures = 0;

  xs3_multiples #(.D(D)) u_mul (.x(x), .nx(nx));
  pp_selector #(.D(D)) dut (.nx(nx), .yh(yh), .ys(ys), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [D-1:0][3:0] xv, input int yb);
    logic signed [127:0] xval, val, pw, rr;
    x  = xv;
    ys = (yb < 0);
    yh = (yb == 0) ? 5'd0 : 5'(1 << ((yb < 0 ? -yb : yb) - 1));
    #1;
    xval = 0; pw = 1;
    for (int i = 0; i < D; i++) begin xval += 128'(xv[i]) * pw; pw *= 10; end
    val = 0; pw = 1; rr = 0;
    for (int i = 0; i <= D; i++) begin
      val += 128'(pp[i]) * pw;
      rr  += pw;
      pw  *= 10;
    end
    val = val - 3 * rr + (ys ? (1 - pw) : 0);
    checks++;
    if (val != xval * yb) begin
      failures++;
      $display("MISMATCH yb=%0d x=%h pp=%h", yb, xv, pp);
    end
    if (yb == 0) begin
      checks++;
      for (int i = 0; i <= D; i++)
        if (pp[i] != 4'd3) begin failures++; break; end
    end
  endtask

  initial begin
    logic [D-1:0][3:0] v;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < D; i++) v[i] = (n == 0) ? 4'd9 : 4'($urandom_range(0, 9));
      for (int yb = -5; yb <= 5; yb++) check_one(v, yb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
