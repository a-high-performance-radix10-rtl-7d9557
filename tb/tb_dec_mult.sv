// tb_dec_mult: end-to-end test of the D-digit BCD multiplier at its default
// size (D = 16). Drives corner cases, random 16-digit BCD operands and
// random 8-digit operands (upper digits zero), and compares
// the product with a reference computed by converting the operands to
// binary, multiplying with 128-bit integer arithmetic and converting back.
// It also counts how often the internal mechanisms of the design are used:
// negative and zero signed digits, the top partial product Yb_D = 1, CSA
// carries between columns (and the x6 correction they trigger), the 3:2
// CSA carry, decimal compressor carries of 2 or 3, and long carry chains in
// the final adder. A mechanism never seen counts as a failure.
// The multiplier is combinational: each vector is applied, given 1 ns, and
// checked. A watchdog ends the run after a fixed simulated time.
module tb_dec_mult;

  localparam int unsigned D = 16;
  localparam int NRAND = 4000;

  typedef logic [D-1:0][3:0] bcd_t;

  logic [D-1:0][3:0]   x, y;
  logic [2*D-1:0][3:0] p;

  int checks = 0, failures = 0;
  int n_neg = 0, n_zero = 0, n_msd = 0, n_csa_co = 0, n_gout = 0, n_wh2 = 0, n_chain = 0;

  dec_mult dut (.x(x), .y(y), .p(p));

  function automatic logic [127:0] bcd2bin(input logic [2*D-1:0][3:0] v, input int nd);
    logic [127:0] r;
    r = 0;
    for (int i = nd - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction

  function automatic logic [2*D-1:0][3:0] bin2bcd(input logic [127:0] v);
    logic [2*D-1:0][3:0] r;
    for (int i = 0; i < 2*D; i++) begin
      r[i] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [D-1:0][3:0] rand_bcd(input int mode);
    logic [D-1:0][3:0] r;
    for (int i = 0; i < D; i++) begin
      case (mode)
        0: r[i] = 4'($urandom_range(0, 9));
        1: r[i] = 4'($urandom_range(5, 9));    // many negative signed digits
        2: r[i] = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(0, 9)) : 4'd9;
        default: r[i] = ($urandom_range(0, 1) == 0) ? 4'd0 : 4'($urandom_range(0, 9));
      endcase
    end
    return r;
  endfunction

  task automatic observe();
    for (int k = 0; k < D; k++) begin
      if (dut.u_ppg.ys[k]) n_neg++;
      if (dut.u_ppg.yh[k] == 5'd0) n_zero++;
    end
    if (dut.u_ppg.ymsd) n_msd++;
    for (int i = 0; i < 2*D; i++) begin
      if (dut.u_ppr.co[i] != '0) n_csa_co++;
      if (dut.u_ppr.gc[i]) n_gout++;
      if (dut.u_ppr.wh[i] >= 2'd2) n_wh2++;
    end
    begin
      int run = 0;
      for (int i = 0; i < 2*D; i++) begin
        if (dut.u_add.prp[i]) run++;
        else run = 0;
        if (run >= 4 && i + 1 < 2*D && i >= 4 && dut.u_add.gg[dut.u_add.NLEV][i]) begin
          n_chain++;
          break;
        end
      end
    end
  endtask

  task automatic apply(input logic [D-1:0][3:0] xa, input logic [D-1:0][3:0] ya);
    logic [2*D-1:0][3:0] xe, ye, exp_p;
    x = xa; y = ya;
    #1;
    xe = '0; ye = '0;
    xe[D-1:0] = xa; ye[D-1:0] = ya;
    exp_p = bin2bcd(bcd2bin(xe, D) * bcd2bin(ye, D));
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures <= 5) $display("MISMATCH x=%h y=%h p=%h exp=%h", xa, ya, p, exp_p);
    end
    observe();
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0][3:0] all9, one;
    all9 = '0; one = '0;
    for (int i = 0; i < D; i++) all9[i] = 4'd9;
    one[0] = 4'd1;
    apply('0, '0);
    apply(all9, all9);
    apply(one, all9);
    apply(all9, one);
    apply(all9, '0);
    for (int v = 0; v < 10; v++) begin
      logic [D-1:0][3:0] a, c;
      for (int i = 0; i < D; i++) begin a[i] = 4'(v); c[i] = 4'((i + v) % 10); end
      apply(a, c);
      apply(c, a);
    end
    for (int n = 0; n < NRAND; n++) apply(rand_bcd(n % 4), rand_bcd((n / 4) % 4));
    // 8-digit operands (upper digits zero), as in a 32-bit x 32-bit BCD unit:
    // three fixed pairs, then random ones
    apply(bcd_t'(32'h0006_0006), bcd_t'(32'h0005_0005));
    apply(bcd_t'(32'h9999_9999), bcd_t'(32'h9999_9999));
    apply(bcd_t'(32'h5678_5678), bcd_t'(32'h9901_9901));
    for (int n = 0; n < 500; n++) begin
      logic [D-1:0][3:0] a, c;
      a = rand_bcd(0); c = rand_bcd(n % 4);
      for (int i = 8; i < D; i++) begin a[i] = 4'd0; c[i] = 4'd0; end
      apply(a, c);
    end
    $display("mechanisms: neg_digits=%0d zero_digits=%0d top_pp=%0d csa_carry_cols=%0d csa32_carry=%0d wh_ge2=%0d long_chains=%0d",
             n_neg, n_zero, n_msd, n_csa_co, n_gout, n_wh2, n_chain);
    if (n_neg == 0)    begin failures++; $display("never: negative signed digit"); end
    if (n_zero == 0)   begin failures++; $display("never: zero signed digit"); end
    if (n_msd == 0)    begin failures++; $display("never: top partial product"); end
    if (n_csa_co == 0) begin failures++; $display("never: CSA carry / x6 correction"); end
    if (n_gout == 0)   begin failures++; $display("never: 3:2 CSA carry"); end
    if (n_wh2 == 0)    begin failures++; $display("never: decimal compressor carry >= 2"); end
    if (n_chain == 0)  begin failures++; $display("never: long final-adder carry chain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
