// tb_sd_recoder: checks the signed-digit recoder for D = 16. For random and
// corner-case multipliers it rebuilds the value sum(Yb_k * 10^k) + Yb_D*10^D
// from the hot-one magnitudes and signs and compares it with Y, and checks
// that every digit lies in [-5, 5], that yh is hot-one or zero and that a
// zero digit never carries a negative sign. Combinational: 1 ns per vector.
module tb_sd_recoder;
  localparam int unsigned D = 16;
  logic [D-1:0][3:0] y;
  logic [D-1:0][4:0] yh;
  logic [D-1:0]      ys;
  logic              ymsd;
  int checks = 0, failures = 0;

  sd_recoder #(.D(D)) dut (.y(y), .yh(yh), .ys(ys), .ymsd(ymsd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [D-1:0][3:0] yv);
    longint signed val, ref_val, pw;
    y = yv;
    #1;
    val = 0; ref_val = 0; pw = 1;
    for (int k = 0; k < D; k++) begin
      int m;
      m = 0;
      case (yh[k])
        5'b00000: m = 0;
        5'b00001: m = 1;
        5'b00010: m = 2;
        5'b00100: m = 3;
        5'b01000: m = 4;
        5'b10000: m = 5;
        default: begin
          m = 99;
          failures++;
          $display("yh not hot-one at digit %0d: %b", k, yh[k]);
        end
      endcase
      if (m == 0 && ys[k]) begin
        failures++;
        $display("negative zero at digit %0d", k);
      end
      val += (ys[k] ? -longint'(m) : longint'(m)) * pw;
      ref_val += longint'(yv[k]) * pw;
      pw *= 10;
    end
    val += longint'(ymsd) * pw;
    checks++;
    if (val != ref_val) begin
      failures++;
      $display("MISMATCH y=%h value=%0d", yv, val);
    end
  endtask

  initial begin
    logic [D-1:0][3:0] v;
    for (int d = 0; d < 10; d++) begin
      for (int i = 0; i < D; i++) v[i] = 4'(d);
      check_one(v);
    end
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < D; i++) v[i] = 4'($urandom_range(0, 9));
      check_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
