// tb_ppr_column: checks one PPR column of the tallest shape at D = 16
// (17 digits, 14 CSA carries in) with random inputs in their legal ranges.
// Weighted by the column they belong to, inputs and outputs must balance:
//   sum(dig) + ones(ci) + wq_in + wq2_in + gin + wh_in
//     = (a_xs6 - 6) + b + 10*(ones(co) + wq_out + gout + wh_out) + 100*wq2_out
// and the outputs must respect a_xs6 in [6, 15], b <= 9. Combinational.
module tb_ppr_column;
  import dec_mult_pkg::*;
  localparam int unsigned H = 17, NCIN = 14;
  localparam int unsigned NCOUT = csa_couts(H, NCIN);
  logic [H-1:0][3:0] dig;
  logic [NCIN-1:0]   ci;
  logic [NCOUT-1:0]  co;
  logic [3:0]        wq_in, wq_out, a_xs6, b;
  logic              wq2_in, wq2_out, gin, gout;
  logic [1:0]        wh_in, wh_out;
  int checks = 0, failures = 0, n_gout = 0, n_co = 0;

  ppr_column #(.H(H), .NCIN(NCIN)) dut (
    .dig(dig), .ci(ci), .wq_in(wq_in), .wq2_in(wq2_in), .gin(gin), .wh_in(wh_in),
    .co(co), .wq_out(wq_out), .wq2_out(wq2_out), .gout(gout), .wh_out(wh_out),
    .a_xs6(a_xs6), .b(b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int lhs, rhs;
      for (int k = 0; k < H; k++) dig[k] = (n < 2) ? (n == 0 ? 4'd0 : 4'd15) : 4'($urandom_range(0, 15));
      ci     = (n < 2) ? (n == 0 ? '0 : '1) : NCIN'($urandom);
      wq_in  = (n == 1) ? 4'd9 : 4'($urandom_range(0, 9));
      wq2_in = 1'($urandom);
      gin    = 1'($urandom);
      wh_in  = 2'($urandom);
      #1;
      lhs = $countones(ci) + int'(wq_in) + int'(wq2_in) + int'(gin) + int'(wh_in);
      for (int k = 0; k < H; k++) lhs += int'(dig[k]);
      rhs = int'(a_xs6) - 6 + int'(b) +
            10 * ($countones(co) + int'(wq_out) + int'(gout) + int'(wh_out)) + 100 * int'(wq2_out);
      checks++;
      if (lhs != rhs || a_xs6 < 4'd6 || b > 4'd9) begin
        failures++;
        if (failures < 5) $display("MISMATCH lhs=%0d rhs=%0d", lhs, rhs);
      end
      if (gout) n_gout++;
      if (co != '0) n_co++;
    end
    checks++;
    if (n_gout == 0 || n_co == 0) begin failures++; $display("carries never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
