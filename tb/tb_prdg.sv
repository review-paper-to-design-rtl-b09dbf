// tb_prdg: the pseudo-random data generator.
// After setup with the default seed the output must follow the reference
// LFSR step by step and repeat after exactly 255 steps, visiting every
// non-zero value once; ctl[1] = 0 must hold the state; ctl[2] must seed from
// data_in; ctl[0] = 0 must pass data_in through.
module tb_prdg;
  import fir_tb_pkg::*;

  logic       clk = 0, setup;
  logic [2:0] ctl;
  logic [7:0] data_in, data;
  int checks = 0, failures = 0;

  prdg dut (.clk(clk), .setup(setup), .ctl(ctl), .data_in(data_in), .data(data));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [7:0] ref_s;
    bit seen[256];
    setup = 1; ctl = 3'b011; data_in = 8'h5a;
    @(posedge clk); @(negedge clk);
    setup = 0;
    ref_s = 8'h01;
    chk(data == ref_s, "default seed");
    for (int i = 0; i < 255; i++) begin
      chk(!seen[data], "no value repeats within the period");
      seen[data] = 1;
      @(negedge clk);
      ref_s = lfsr_next(ref_s);
      chk(data == ref_s, "LFSR sequence");
    end
    chk(data == 8'h01, "period 255");
    chk(!seen[0], "zero never produced");
    ctl = 3'b001;
    repeat (3) @(negedge clk);
    chk(data == ref_s, "hold");
    ctl = 3'b000;
    for (int i = 0; i < 20; i++) begin
      data_in = 8'($urandom);
      #1 chk(data == data_in, "data_in pass-through");
      @(negedge clk);
    end
    setup = 1; ctl = 3'b111; data_in = 8'hc3;
    @(negedge clk);
    setup = 0; data_in = 8'h00;
    chk(data == 8'hc3, "seed from data_in");
    @(negedge clk);
    chk(data == lfsr_next(8'hc3), "step after seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
