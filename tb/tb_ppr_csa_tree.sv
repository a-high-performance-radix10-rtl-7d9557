// tb_ppr_csa_tree: checks the binary CSA tree of the tallest column at
// D = 16 (17 digits, 14 carries in). For random inputs, including all-ones
// and all-zero patterns, it checks
//   sum(dig) + popcount(cin) = s + c + 16 * popcount(cout)
// and that the tree has 15 carry outputs. Combinational: 1 ns per vector.
module tb_ppr_csa_tree;
  import dec_mult_pkg::*;
  localparam int unsigned H = 17, NCIN = 14;
  localparam int unsigned NCOUT = csa_couts(H, NCIN);
  logic [H-1:0][3:0] dig;
  logic [NCIN-1:0]   cin;
  logic [NCOUT-1:0]  cout;
  logic [3:0]        s, c;
  int checks = 0, failures = 0;

  ppr_csa_tree #(.H(H), .NCIN(NCIN)) dut (.dig(dig), .cin(cin), .cout(cout), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int in_sum, out_sum;
    #1;
    in_sum = $countones(cin);
    for (int k = 0; k < H; k++) in_sum += int'(dig[k]);
    out_sum = int'(s) + int'(c) + 16 * $countones(cout);
    checks++;
    if (in_sum != out_sum) begin
      failures++;
      $display("MISMATCH in=%0d out=%0d", in_sum, out_sum);
    end
  endtask

  initial begin
    checks++;
    if (NCOUT != 15) begin failures++; $display("carry outputs %0d", NCOUT); end
    dig = '0; cin = '0; check_one();
    dig = '1; cin = '1; check_one();
    for (int n = 0; n < 5000; n++) begin
      for (int k = 0; k < H; k++) dig[k] = 4'($urandom_range(0, 15));
      cin = NCIN'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
