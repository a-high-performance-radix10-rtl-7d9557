// tb_dec_compressor32: exhaustive check of the decimal 3:2 digit compressor
// over all 2^14 combinations of three 4-bit digits and a carry in 0..3:
//   (a_xs6 - 6) + b + 10*wh_out = wz + gd + zd + wh_in,
// with a_xs6 in [6, 15], b in [0, 9] and so A + B <= 18. Combinational.
module tb_dec_compressor32;
  logic [3:0] wz, gd, zd, a_xs6, b;
  logic [1:0] wh_in, wh_out;
  int checks = 0, failures = 0;

  dec_compressor32 dut (.wz(wz), .gd(gd), .zd(zd), .wh_in(wh_in),
                        .a_xs6(a_xs6), .b(b), .wh_out(wh_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 14); v++) begin
      {wh_in, zd, gd, wz} = 14'(v);
      #1;
      checks++;
      if (int'(a_xs6) - 6 + int'(b) + 10 * int'(wh_out) != int'(wz) + int'(gd) + int'(zd) + int'(wh_in) ||
          a_xs6 < 4'd6 || b > 4'd9) begin
        failures++;
        if (failures < 5) $display("MISMATCH wz=%0d g=%0d z=%0d wh=%0d", wz, gd, zd, wh_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
