// tb_pe: the processing element against a behavioural FIR model.
// Each round draws a random assignment of eight CSD digits to taps (digit
// value, shift pk, and where each tap ends), shifts the 48 control bits and
// the compensation vector (number of -1 digits) in on dclk during setup, and
// then feeds random samples on clk. After every clk edge the 24-bit sum must
// equal sum_j d_j * x[n - t_j] * 2^(7-pk_j) mod 2^24, where t_j is the tap
// of digit j, and data_out must be the sample T+1 clk old, T being the
// number of taps. Samples include the extremes -128 and 127.
module tb_pe;
  import fir_tb_pkg::*;

  logic        clk = 0, dclk = 0, setup, acc_en, ctrl_in, ctrl_out, scan_in;
  logic [7:0]  data_in, data_out;
  logic [23:0] sum;
  int checks = 0, failures = 0;

  pe dut (
    .clk(clk), .dclk(dclk), .setup(setup), .acc_en(acc_en), .ctrl_in(ctrl_in),
    .ctrl_out(ctrl_out), .data_in(data_in), .data_out(data_out),
    .scan_in(scan_in), .sum(sum)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  digit_t     dg[8];
  int         tap[8];
  logic [7:0] hist[10];
  int         n_multi = 0, n_neg_sum = 0;

  initial begin
    setup = 1; acc_en = 0; ctrl_in = 0; scan_in = 0; data_in = 0;
    for (int r = 0; r < 60; r++) begin
      logic [47:0] stream;
      automatic int negs = 0, ntaps;
      logic [23:0] comp;
      for (int j = 0; j < 8; j++) begin
        dg[j].d    = $urandom_range(0, 3) == 0 ? 0 : ($urandom_range(0, 1) != 0 ? 1 : -1);
        dg[j].pk   = $urandom_range(0, 7);
        dg[j].last = (r % 3 == 0) ? 1'b1 : 1'($urandom);
        if (dg[j].d < 0) negs++;
      end
      ntaps = 0;
      for (int j = 0; j < 8; j++) begin
        tap[j] = ntaps;
        if (dg[j].last) ntaps++;
      end
      if (ntaps < 8) n_multi++;
      comp = 24'(negs);
      // stream bit k: DPU (47-k)/6, word bit 5 - (47-k)%6
      for (int k = 0; k < 48; k++)
        stream[k] = ctrl_word(dg[(47 - k) / 6])[5 - (47 - k) % 6];
      @(negedge clk);
      setup = 1; acc_en = 1;
      for (int k = 0; k < 48; k++) begin
        ctrl_in = stream[k];
        scan_in = (k >= 24) ? comp[47 - k] : 1'($urandom);
        #1 dclk = 1; #1 dclk = 0;
      end
      acc_en = 0;
      @(posedge clk); @(negedge clk);
      setup = 0;
      for (int k = 0; k < 10; k++) hist[k] = '0;
      for (int c = 0; c < 40; c++) begin
        automatic longint exp = 0;
        automatic int sel = $urandom_range(0, 9);
        data_in = sel == 0 ? 8'h80 : sel == 1 ? 8'h7f : 8'($urandom);
        @(posedge clk);
        for (int k = 9; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = data_in;
        #1;
        for (int j = 0; j < 8; j++) exp += longint'(term(dg[j].d, sx8(hist[tap[j]]), dg[j].pk));
        if (exp < 0) n_neg_sum++;
        chk(sum == 24'(exp), "filter sum");
        chk(data_out == hist[ntaps], "data_out");
        @(negedge clk);
      end
      // the control chain passes through: after 48 more shifts ctrl_out
      // must replay the stream
      setup = 1;
      for (int k = 0; k < 48; k++) begin
        chk(ctrl_out == stream[k], "ctrl chain pass-through");
        ctrl_in = 0;
        #1 dclk = 1; #1 dclk = 0;
      end
    end
    chk(n_multi > 0 && n_neg_sum > 0, "multi-digit taps and negative sums seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
