// tb_pe_adder: the nine-input adder against integer addition.
// sum must be acc + sum of the eight addends + sext * 2^14, modulo 2^24, for
// corner cases (all ones, all zeros, single operands) and random operands.
module tb_pe_adder;
  logic [7:0][13:0] addend;
  logic [23:0]      acc;
  logic [9:0]       sext;
  logic [23:0]      sum;
  int checks = 0, failures = 0;

  pe_adder dut (.addend(addend), .acc(acc), .sext(sext), .sum(sum));

  task automatic check();
    longint exp;
    #1;
    exp = longint'(acc) + (longint'(sext) << 14);
    for (int i = 0; i < 8; i++) exp += longint'(addend[i]);
    exp = exp % (64'd1 << 24);
    checks++;
    if (longint'(sum) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%h sext=%h sum=%h exp=%h", acc, sext, sum, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addend = '1; acc = '1; sext = '1; check();
    addend = '0; acc = '0; sext = '0; check();
    for (int i = 0; i < 8; i++) begin
      addend = '0; acc = '0; sext = '0;
      addend[i] = 14'h3fff; check();
    end
    addend = '0; acc = 24'hffffff; sext = '0; check();
    addend = '0; acc = 24'h003fff; sext = 10'h3ff; addend[0] = 14'h1; check();
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 8; i++) addend[i] = 14'($urandom);
      acc  = 24'($urandom);
      sext = 10'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
