// tb_csd_shifter: exhaustive check of the shifter.
// For every product p, shift pk and pad bit the 15-bit word {p[7], addend}
// must equal p * 2^(7-pk) plus (2^(7-pk) - 1) when pad is set, as a 15-bit
// two's-complement number.
module tb_csd_shifter;
  logic [7:0]  p;
  logic [2:0]  shift;
  logic        pad;
  logic [13:0] addend;
  int checks = 0, failures = 0;

  csd_shifter dut (.p(p), .shift(shift), .pad(pad), .addend(addend));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++)
      for (int pk = 0; pk < 8; pk++)
        for (int f = 0; f < 2; f++) begin
          int exp, got;
          automatic int s = 7 - pk;
          p = 8'(v); shift = 3'(pk); pad = 1'(f);
          #1;
          exp = v * (1 << s) + (f != 0 ? (1 << s) - 1 : 0);
          got = int'($signed({p[7], addend}));
          checks++;
          if (got != exp) begin
            failures++;
            if (failures < 10) $display("FAIL p=%0d pk=%0d pad=%0d got=%0d exp=%0d", v, pk, f, got, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
