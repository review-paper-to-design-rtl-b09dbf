// tb_fir_chip: end-to-end test of the FIR chip at its full size.
//
// Five filters with different digit configurations are loaded one after the
// other through the set-up scan chains (48 control bits, and the
// compensation vector = number of -1 digits):
//   A  8 taps of 1 digit        B  1 tap of 8 digits
//   C  4 taps of 2 digits       D  taps of 3, 2, 2 and 1 digits
//   E  3 taps using 5 digits, three DPUs set to digit 0
// Each filter runs twice (run, dump, resume, dump), fed from data_in for A,
// C and E and from the pseudo-random generator for B and D (D seeded through
// data_in, and holding the generator for part of a run). A reference model
// in tap form, y = sum_i H_i * x_i with H_i = sum of the tap's digits
// d * 2^(7-pk), runs on every CLK edge: the per-cycle PE sum is compared with
// it, and every value scanned out of the test module (32 bits, MSB first on
// DumpCLK) is compared with the running total of the reference sums. The
// acc register is refilled with the compensation vector over scan_in while
// dumping, so the resumed run must still be right. Also checked: the
// control chain replays on ctrl_out, and data_out carries the sample that
// leaves the last tap. Every mechanism exercised is counted, and one that
// never happens counts as a failure.
module tb_fir_chip;
  import fir_tb_pkg::*;

  logic       CLK = 0, DumpCLK = 0, Setup, Mode, ctrl_in, scan_in;
  logic [2:0] control;
  logic [7:0] data_in;
  logic       ctrl_out, scan_out;
  logic [7:0] data_out;
  int checks = 0, failures = 0;

  fir_chip dut (
    .CLK(CLK), .DumpCLK(DumpCLK), .Setup(Setup), .Mode(Mode), .control(control),
    .ctrl_in(ctrl_in), .data_in(data_in), .scan_in(scan_in),
    .ctrl_out(ctrl_out), .data_out(data_out), .scan_out(scan_out)
  );

  // CLK: period 10, rising at 5 + 10k. DumpCLK: a quarter of CLK, rising at
  // 2 + 40k, so that no edge of one clock meets an edge of the other.
  always #5 CLK = ~CLK;
  initial begin
    #2;
    forever begin DumpCLK = 1; #20; DumpCLK = 0; #20; end
  end

  initial begin
    #2000000;
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

  // ---------------- configuration and reference model ----------------
  digit_t     dg[8];
  int         tap[8];
  int         ntaps;
  int         coef[8];          // H_i in units of 2^-7
  logic [7:0] hist[9];          // hist[0]: newest registered sample
  logic [7:0] lfsr_ref;
  longint     total;            // reference of the test accumulator
  bit         model_on = 0;
  bit         check_on = 0;     // off while a new configuration is loaded

  // mechanism counters
  int n_src_data = 0, n_src_prdg = 0, n_hold = 0, n_seeded = 0;
  int n_multi_tap = 0, n_neg_digit = 0, n_zero_digit = 0, n_multi_neg = 0;
  int n_dump = 0, n_resume = 0, n_passthru = 0, n_wrap = 0;

  function automatic longint ref_sum();
    longint s = 0;
    for (int i = 0; i < ntaps; i++) s += longint'(coef[i]) * sx8(hist[i]);
    return s;
  endfunction

  function automatic int neg_terms();
    int s = 0;
    for (int j = 0; j < 8; j++) begin
      int x = sx8(hist[tap[j]]);
      if ((dg[j].d == 1 && x < 0) || (dg[j].d == -1 && x >= 0)) s++;
    end
    return s;
  endfunction

  always @(posedge CLK) if (model_on) begin
    if (Setup) begin
      for (int k = 0; k < 9; k++) hist[k] = '0;
      lfsr_ref = (control[2] && data_in != 0) ? data_in : 8'h01;
    end else begin
      logic [7:0] smp;
      if (!Mode) begin
        total += ref_sum();
        if (control[0]) n_src_prdg++; else n_src_data++;
        if (control[0] && !control[1]) n_hold++;
        if (neg_terms() >= 2) n_multi_neg++;
      end
      smp = control[0] ? lfsr_ref : data_in;
      if (control[1]) lfsr_ref = lfsr_next(lfsr_ref);
      for (int k = 8; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = smp;
      #1;
      if (check_on && !Mode) chk(dut.u_pe.sum == 24'(ref_sum()), "per-cycle filter sum");
      if (check_on) chk(data_out == hist[ntaps], "data_out");
    end
  end

  // ------------------------------ stimulus ------------------------------
  logic [47:0] stream, old_stream;
  logic [23:0] comp;

  task automatic set_config(int which);
    int d[8], pk[8];
    bit last[8];
    int negs = 0;
    case (which)
      0: begin  // 8 taps x 1 digit
        d  = '{1, -1, 1, 1, -1, 1, -1, 1};
        pk = '{0, 1, 2, 3, 4, 5, 6, 7};
        last = '{1, 1, 1, 1, 1, 1, 1, 1};
      end
      1: begin  // 1 tap x 8 digits
        d  = '{1, 1, -1, 1, -1, -1, 1, 1};
        pk = '{0, 2, 3, 4, 5, 6, 6, 7};
        last = '{0, 0, 0, 0, 0, 0, 0, 1};
      end
      2: begin  // 4 taps x 2 digits
        d  = '{1, -1, -1, 1, 1, 1, -1, -1};
        pk = '{1, 3, 0, 4, 2, 5, 3, 7};
        last = '{0, 1, 0, 1, 0, 1, 0, 1};
      end
      3: begin  // taps of 3, 2, 2, 1 digits
        d  = '{1, -1, 1, -1, -1, 1, 1, -1};
        pk = '{0, 2, 5, 1, 4, 0, 6, 3};
        last = '{0, 0, 1, 0, 1, 0, 1, 1};
      end
      default: begin  // 3 taps using 5 digits, 3 unused DPUs
        d  = '{1, 0, -1, 1, 0, -1, 0, 1};
        pk = '{0, 0, 3, 1, 0, 2, 0, 4};
        last = '{0, 0, 1, 0, 1, 0, 0, 1};
      end
    endcase
    ntaps = 0;
    for (int j = 0; j < 8; j++) coef[j] = 0;
    for (int j = 0; j < 8; j++) begin
      dg[j].d = d[j]; dg[j].pk = pk[j]; dg[j].last = last[j];
      tap[j] = ntaps;
      coef[ntaps] += term(d[j], 1, pk[j]);
      if (last[j]) ntaps++;
      if (d[j] < 0) negs++;
      if (d[j] == 0) n_zero_digit++;
    end
    for (int j = 0; j < 7; j++)
      if (!last[j] && d[j] != 0 && d[j+1] != 0) n_multi_tap++;
    if (negs > 0) n_neg_digit++;
    comp = 24'(negs);
    for (int k = 0; k < 48; k++)
      stream[k] = ctrl_word(dg[(47 - k) / 6])[5 - (47 - k) % 6];
  endtask

  // Set-up phase: 48 DumpCLK edges with Setup high.
  task automatic do_setup(int which, logic [2:0] ctl, logic [7:0] seed, bit check_old);
    check_on = 0;
    old_stream = stream;
    set_config(which);
    control = ctl;
    data_in = seed;
    @(negedge DumpCLK);
    ctrl_in = stream[0];
    scan_in = 1'($urandom);
    @(negedge CLK);
    Setup = 1;
    for (int k = 0; k < 48; k++) begin
      @(posedge DumpCLK);
      @(negedge DumpCLK);
      if (k < 47) begin
        if (check_old) begin
          chk(ctrl_out == old_stream[k + 1], "control chain replays on ctrl_out");
          n_passthru++;
        end
        ctrl_in = stream[k + 1];
        scan_in = (k + 1 >= 24) ? comp[47 - (k + 1)] : 1'($urandom);
      end
    end
    chk(ctrl_out == stream[0], "first control bit reaches ctrl_out");
    @(negedge CLK);
    Setup = 0;
    check_on = 1;
    if (ctl[2] && seed != 0) n_seeded++;
    total = 0;
  endtask

  task automatic run(int ncyc, bit toggle_hold);
    for (int c = 0; c < ncyc; c++) begin
      @(negedge CLK);
      case ($urandom_range(0, 7))
        0: data_in = 8'h80;
        1: data_in = 8'h7f;
        default: data_in = 8'($urandom);
      endcase
      if (toggle_hold && c == ncyc / 2) control[1] = 0;
      if (toggle_hold && c == ncyc / 2 + 5) control[1] = 1;
    end
  endtask

  // Dump: Mode high for 33 DumpCLK edges; the first loads the result, the
  // next 32 shift it out. scan_in refills the acc with the compensation
  // vector on the last 24 of them.
  task automatic dump();
    logic [31:0] got;
    logic [32:0] dstream;
    for (int e = 0; e < 33; e++) dstream[e] = (e >= 9) ? comp[32 - e] : 1'($urandom);
    @(negedge DumpCLK);
    scan_in = dstream[0];
    @(negedge CLK);
    Mode = 1;
    @(posedge DumpCLK);
    for (int b = 31; b >= 0; b--) begin
      @(negedge DumpCLK);
      got[b] = scan_out;
      scan_in = dstream[32 - b];
      @(posedge DumpCLK);
    end
    @(negedge CLK);
    Mode = 0;
    chk(got == 32'(total), "scanned-out accumulation");
    if (got != 32'(total)) $display("  got %h expected %h", got, 32'(total));
    if (total < 0) n_wrap++;
    n_dump++;
  endtask

  initial begin
    Setup = 1; Mode = 0; control = 3'b000; ctrl_in = 0; scan_in = 0; data_in = 0;
    stream = '0;
    repeat (2) @(negedge DumpCLK);
    model_on = 1;
    for (int f = 0; f < 5; f++) begin
      logic [2:0] ctl;
      ctl = (f == 1) ? 3'b011 : (f == 3) ? 3'b111 : 3'b010;
      do_setup(f, ctl, (f == 3) ? 8'h9d : 8'h00, f > 0);
      run(200, f == 3);
      dump();
      run(150, 0);
      n_resume++;
      dump();
    end
    chk(n_src_data > 0,   "samples from data_in");
    chk(n_src_prdg > 0,   "samples from the PRDG");
    chk(n_hold > 0,       "PRDG held");
    chk(n_seeded > 0,     "PRDG seeded from data_in");
    chk(n_multi_tap > 0,  "taps of several digits");
    chk(n_neg_digit > 0,  "negative digits with compensation");
    chk(n_zero_digit > 0, "zero digits");
    chk(n_multi_neg > 0,  "several negative terms in one sum");
    chk(n_dump == 10,     "dumps");
    chk(n_resume > 0,     "resumed runs");
    chk(n_passthru > 0,   "control chain pass-through");
    $display("mechanisms: src_data=%0d src_prdg=%0d hold=%0d seeded=%0d multi_digit_taps=%0d neg_digit_cfgs=%0d zero_digits=%0d multi_neg_sums=%0d dumps=%0d resumes=%0d passthru=%0d negative_totals=%0d",
             n_src_data, n_src_prdg, n_hold, n_seeded, n_multi_tap, n_neg_digit, n_zero_digit,
             n_multi_neg, n_dump, n_resume, n_passthru, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
