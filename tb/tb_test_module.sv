// tb_test_module: carry-save accumulation and serial read-out.
// Random signed 24-bit sums are accumulated for a random number of clk
// cycles; then mode goes high and the 32 bits read from scan_out (MSB first,
// one per dclk) must equal the two's-complement total mod 2^32. Runs of
// large negative and positive sums check the sign extension and the
// wrap-around. setup must clear the accumulator.
module tb_test_module;
  logic        clk = 0, dclk = 0, setup, mode, scan_out;
  logic [23:0] sum;
  int checks = 0, failures = 0;

  test_module dut (.clk(clk), .dclk(dclk), .setup(setup), .mode(mode), .sum(sum), .scan_out(scan_out));

  always #5 clk = ~clk;
  initial begin
    #2;
    forever begin dclk = 1; #20; dclk = 0; #20; end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    setup = 1; mode = 0; sum = 0;
    repeat (3) @(negedge dclk);
    for (int r = 0; r < 40; r++) begin
      automatic longint total = 0;
      logic [31:0] got;
      automatic int ncyc = (r == 0) ? 0 : $urandom_range(1, 300);
      @(negedge clk);
      setup = 0;
      for (int c = 0; c < ncyc; c++) begin
        case (r % 4)
          0: sum = 24'($urandom);
          1: sum = 24'h800000 | 24'($urandom_range(0, 15));
          2: sum = 24'h7ffff0 | 24'($urandom_range(0, 15));
          default: sum = 24'($signed(10'($urandom)));
        endcase
        total += longint'($signed(sum));
        @(negedge clk);
      end
      mode = 1;
      sum  = 24'($urandom);
      @(posedge dclk);   // load edge
      for (int b = 31; b >= 0; b--) begin
        @(negedge dclk);
        got[b] = scan_out;
        @(posedge dclk);
      end
      checks++;
      if (got != 32'(total)) begin
        failures++;
        $display("FAIL round %0d got=%h exp=%h", r, got, 32'(total));
      end
      @(negedge clk);
      mode = 0; setup = 1;
      repeat (2) @(negedge dclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
