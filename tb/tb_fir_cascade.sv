// tb_fir_cascade: two chips cascaded into one 16-digit filter.
//
// Chip A's ctrl_out, data_out and scan_out drive chip B's ctrl_in, data_in
// and scan_in. The 96-bit control stream goes in through A (B's words
// first). A's acc gets the compensation vector of both chips; B's acc is
// loaded with A's (cleared) scan_out. After the set-up:
//   * on every CLK edge sum_A + sum_B must equal the reference 16-digit sum,
//     where B's DPU j works on the sample T_A + 1 + t_j clocks old (T_A =
//     number of tap ends in A; the +1 is A's data_out register);
//   * after a run both chips dump at once; the two scanned-out totals must
//     add up to the reference total, and B's acc must then hold the low 24
//     bits of A's total, which travelled over the scan chain.
// Two configurations: one where A's last DPU continues a tap (no gap between
// the chips' taps) and one where it ends a tap.
module tb_fir_cascade;
  import fir_tb_pkg::*;

  logic       CLK = 0, DumpCLK = 0, Setup, Mode, ctrl_in, scan_in;
  logic [2:0] control;
  logic [7:0] data_in;
  logic       a_ctrl, a_scan, b_ctrl, b_scan;
  logic [7:0] a_data, b_data;
  int checks = 0, failures = 0;

  fir_chip chip_a (
    .CLK(CLK), .DumpCLK(DumpCLK), .Setup(Setup), .Mode(Mode), .control(control),
    .ctrl_in(ctrl_in), .data_in(data_in), .scan_in(scan_in),
    .ctrl_out(a_ctrl), .data_out(a_data), .scan_out(a_scan)
  );

  fir_chip chip_b (
    .CLK(CLK), .DumpCLK(DumpCLK), .Setup(Setup), .Mode(Mode), .control(3'b000),
    .ctrl_in(a_ctrl), .data_in(a_data), .scan_in(a_scan),
    .ctrl_out(b_ctrl), .data_out(b_data), .scan_out(b_scan)
  );

  always #5 CLK = ~CLK;
  initial begin
    #2;
    forever begin DumpCLK = 1; #20; DumpCLK = 0; #20; end
  end

  initial begin
    #1000000;
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

  digit_t     dg[16];
  int         src[16];          // sample age used by each digit
  logic [7:0] hist[24];
  longint     total;
  bit         check_on = 0;
  int         n_transfer = 0, n_cycles = 0;

  function automatic longint ref_sum();
    longint s = 0;
    for (int j = 0; j < 16; j++) s += longint'(term(dg[j].d, sx8(hist[src[j]]), dg[j].pk));
    return s;
  endfunction

  always @(posedge CLK) begin
    if (Setup) begin
      for (int k = 0; k < 24; k++) hist[k] = '0;
    end else begin
      if (!Mode) total += ref_sum();
      for (int k = 23; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = data_in;
      #1;
      if (check_on && !Mode) begin
        chk(chip_a.u_pe.sum + chip_b.u_pe.sum == 24'(ref_sum()), "cascaded sum");
        n_cycles++;
      end
    end
  end

  task automatic one_config(int which);
    logic [95:0] stream;
    logic [23:0] comp;
    logic [31:0] got_a, got_b;
    int negs = 0, ta = 0, tb = 0;
    for (int j = 0; j < 16; j++) begin
      dg[j].d    = $urandom_range(0, 3) == 0 ? 0 : ($urandom_range(0, 1) != 0 ? 1 : -1);
      dg[j].pk   = $urandom_range(0, 7);
      dg[j].last = 1'($urandom);
      if (dg[j].d < 0) negs++;
    end
    dg[7].last  = (which == 1);
    dg[15].last = 1'b1;
    for (int j = 0; j < 8; j++) begin
      src[j] = ta;
      if (dg[j].last) ta++;
    end
    for (int j = 8; j < 16; j++) begin
      src[j] = ta + 1 + tb;
      if (dg[j].last) tb++;
    end
    comp = 24'(negs);
    // bit k of the stream ends in DPU (95-k)/6 of the 16-DPU chain
    for (int k = 0; k < 96; k++)
      stream[k] = ctrl_word(dg[(95 - k) / 6])[5 - (95 - k) % 6];
    check_on = 0;
    @(negedge DumpCLK);
    ctrl_in = stream[0];
    scan_in = 1'b0;
    @(negedge CLK);
    Setup = 1;
    for (int k = 0; k < 96; k++) begin
      @(posedge DumpCLK);
      @(negedge DumpCLK);
      if (k < 95) begin
        ctrl_in = stream[k + 1];
        scan_in = (k + 1 >= 72) ? comp[95 - (k + 1)] : 1'b0;
      end
    end
    @(negedge CLK);
    Setup = 0;
    total = 0;
    check_on = 1;
    for (int c = 0; c < 300; c++) begin
      @(negedge CLK);
      data_in = 8'($urandom);
    end
    // both chips dump together; A's result also flows into B's acc
    @(negedge DumpCLK);
    scan_in = 1'b0;
    @(negedge CLK);
    Mode = 1;
    @(posedge DumpCLK);
    for (int b = 31; b >= 0; b--) begin
      @(negedge DumpCLK);
      got_a[b] = a_scan;
      got_b[b] = b_scan;
      @(posedge DumpCLK);
    end
    @(negedge CLK);
    Mode = 0;
    check_on = 0;
    chk(got_a + got_b == 32'(total), "sum of the two scanned-out totals");
    chk(chip_b.u_pe.u_acc.q == got_a[23:0], "partial sum carried into the next chip's acc");
    if (chip_b.u_pe.u_acc.q == got_a[23:0] && got_a[23:0] != 0) n_transfer++;
  endtask

  initial begin
    Setup = 1; Mode = 0; control = 3'b000; ctrl_in = 0; scan_in = 0; data_in = 0;
    repeat (2) @(negedge DumpCLK);
    one_config(0);
    one_config(1);
    chk(n_transfer > 0, "partial-sum transfer happened");
    chk(n_cycles > 0, "cascaded cycles checked");
    $display("mechanisms: cascaded_cycles=%0d transfers=%0d", n_cycles, n_transfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
