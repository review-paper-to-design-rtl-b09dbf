// tb_csd_multiplier: exhaustive check of the CSD digit multiplier.
// For every 8-bit sample and every digit (+1, 0, -1) the product must be x,
// 0 or the one's complement -x-1, as 8-bit two's-complement numbers.
module tb_csd_multiplier;
  logic [7:0] x, p;
  logic       zero, plus;
  int checks = 0, failures = 0;

  csd_multiplier dut (.x(x), .zero(zero), .plus(plus), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -1; d <= 1; d++)
      for (int v = -128; v < 128; v++) begin
        int exp;
        x    = 8'(v);
        zero = (d == 0);
        plus = (d == 1) ? 1'b1 : (d == 0 ? 1'($urandom) : 1'b0);
        #1;
        exp = (d == 0) ? 0 : (d == 1 ? v : -v - 1);
        checks++;
        if (int'($signed(p)) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL d=%0d x=%0d p=%0d exp=%0d", d, v, $signed(p), exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
