// tb_sign_ext_gen: exhaustive check of the sign extension generator.
// With S sign bits set, the eight terms' bits 14..23 add up to
// -S * 2^14 mod 2^24, so sext must equal (1024 - S) mod 1024.
module tb_sign_ext_gen;
  logic [7:0] sign;
  logic [9:0] sext;
  int checks = 0, failures = 0;

  sign_ext_gen dut (.sign(sign), .sext(sext));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int s_cnt, exp;
      sign = 8'(v);
      #1;
      s_cnt = $countones(sign);
      exp   = (1024 - s_cnt) % 1024;
      checks++;
      if (int'(sext) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL sign=%b sext=%0d exp=%0d", sign, sext, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
