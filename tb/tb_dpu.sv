// tb_dpu: one digit processing unit.
// Random control words are shifted in on dclk (checking that the previous
// word leaves on ctrl_out bit by bit); then random samples are applied on
// clk. One clk after a sample enters, the 15-bit term {sign, addend} must be
// d * x * 2^(7-pk) for d = 0, +1 and d * x * 2^(7-pk) - 1 for d = -1 (the
// missing +1 is the compensation vector's job), and data_out must be the
// registered sample when cfg = 1 and the present one when cfg = 0. clr must
// empty the sample register.
module tb_dpu;
  import fir_tb_pkg::*;

  logic        clk = 0, dclk = 0, clr, ctrl_en, ctrl_in, ctrl_out;
  logic [7:0]  data_in, data_out;
  logic [13:0] addend;
  logic        sign;
  int checks = 0, failures = 0;

  dpu dut (
    .clk(clk), .dclk(dclk), .clr(clr), .ctrl_en(ctrl_en), .ctrl_in(ctrl_in),
    .ctrl_out(ctrl_out), .data_in(data_in), .data_out(data_out),
    .addend(addend), .sign(sign)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    digit_t     g, prev;
    logic [5:0] w, wprev;
    logic [7:0] x_prev;
    automatic int cnt_neg = 0, cnt_zero = 0, cnt_pos = 0;
    clr = 1; ctrl_en = 0; ctrl_in = 0; data_in = 0;
    prev = '{d: 0, pk: 0, last: 0};
    // first load, unchecked ctrl_out
    @(negedge clk);
    for (int b = 0; b < 6; b++) begin
      ctrl_en = 1; ctrl_in = ctrl_word(prev)[b];
      #1 dclk = 1; #1 dclk = 0;
    end
    ctrl_en = 0;
    @(posedge clk); #1;
    chk(addend == 0 && sign == 0, "clr empties the sample register");
    clr = 0;
    for (int n = 0; n < 300; n++) begin
      g.d    = $urandom_range(0, 2) - 1;
      g.pk   = $urandom_range(0, 7);
      g.last = 1'($urandom);
      w      = ctrl_word(g);
      wprev  = ctrl_word(prev);
      if (g.d < 0) cnt_neg++; else if (g.d == 0) cnt_zero++; else cnt_pos++;
      @(negedge clk);
      for (int b = 0; b < 6; b++) begin
        chk(ctrl_out == wprev[b], "ctrl_out carries the previous word");
        ctrl_en = 1; ctrl_in = w[b];
        #1 dclk = 1; #1 dclk = 0;
      end
      ctrl_en = 0; ctrl_in = 1'($urandom);
      #1 dclk = 1; #1 dclk = 0;   // disabled edge: must hold
      data_in = 8'($urandom);
      for (int c = 0; c < 4; c++) begin
        int exp;
        @(posedge clk);
        x_prev = data_in;
        #1;
        exp = term(g.d, sx8(x_prev), g.pk) - (g.d < 0 ? 1 : 0);
        chk(int'($signed({sign, addend})) == exp, "term value");
        @(negedge clk);
        data_in = 8'($urandom);
        #1;
        chk(data_out == (g.last ? x_prev : data_in), "bypass mux");
      end
      prev = g;
    end
    chk(cnt_neg > 0 && cnt_zero > 0 && cnt_pos > 0, "all digit kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
