// tb_acc_sipo: serial loading of the 24-bit acc register.
// Random words are shifted in MSB first; after 24 enabled dclk edges q must
// equal the word, and it must hold while en is low.
module tb_acc_sipo;
  logic        dclk = 0, en, scan_in;
  logic [23:0] q;
  int checks = 0, failures = 0;

  acc_sipo dut (.dclk(dclk), .en(en), .scan_in(scan_in), .q(q));

  always #5 dclk = ~dclk;

  initial begin
    repeat (20000) @(posedge dclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; scan_in = 0;
    for (int n = 0; n < 50; n++) begin
      automatic logic [23:0] w = 24'($urandom);
      automatic int gap = $urandom_range(0, 3);
      for (int b = 23; b >= 0; b--) begin
        @(negedge dclk); en = 1; scan_in = w[b];
      end
      @(negedge dclk); en = 0; scan_in = 1'($urandom);
      checks++;
      if (q != w) begin failures++; $display("FAIL load q=%h exp=%h", q, w); end
      repeat (gap + 1) @(negedge dclk);
      scan_in = ~scan_in;
      checks++;
      if (q != w) begin failures++; $display("FAIL hold q=%h exp=%h", q, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
