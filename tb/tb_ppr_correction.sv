// tb_ppr_correction: checks the carry counter and x6 correction for 15 and
// for 33 carry inputs (D = 16 and D = 34 column sizes). For random carry
// patterns, including all ones, wr + 10*wq + 100*wq2 must equal 6 times the
// number of ones, with wr and wq decimal digits. Combinational.
module tb_ppr_correction;
  logic [14:0] ci15;
  logic [32:0] ci33;
  logic [3:0]  wr15, wq15, wr33, wq33;
  logic        wh15, wh33;
  int checks = 0, failures = 0;

  ppr_correction #(.NC(15)) dut15 (.cnt_in(ci15), .wr(wr15), .wq(wq15), .wq2(wh15));
  ppr_correction #(.NC(33)) dut33 (.cnt_in(ci33), .wr(wr33), .wq(wq33), .wq2(wh33));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    checks++;
    if (int'(wr15) + 10 * int'(wq15) + 100 * int'(wh15) != 6 * $countones(ci15) || wr15 > 9 || wq15 > 9) begin
      failures++;
      $display("MISMATCH 15: ones=%0d wr=%0d wq=%0d wq2=%0d", $countones(ci15), wr15, wq15, wh15);
    end
    checks++;
    if (int'(wr33) + 10 * int'(wq33) + 100 * int'(wh33) != 6 * $countones(ci33) || wr33 > 9 || wq33 > 9) begin
      failures++;
      $display("MISMATCH 33: ones=%0d wr=%0d wq=%0d wq2=%0d", $countones(ci33), wr33, wq33, wh33);
    end
  endtask

  initial begin
    ci15 = '0; ci33 = '0; check_one();
    ci15 = '1; ci33 = '1; check_one();
    for (int k = 0; k <= 33; k++) begin
      ci33 = (k == 0) ? '0 : 33'((34'd1 << k) - 1);
      ci15 = 15'(ci33);
      check_one();
    end
    for (int n = 0; n < 2000; n++) begin
      ci15 = 15'($urandom); ci33 = {1'($urandom), $urandom};
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
