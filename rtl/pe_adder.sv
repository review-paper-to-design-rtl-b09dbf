// pe_adder: the nine-input adder of the processing element.
//
// Adds the eight 14-bit DPU addends, the 24-bit acc word and the 10-bit
// sign-extension word (weight 2^14) modulo 2^24:
//   1. the fourteen LSBs of acc and the eight addends (nine operands) are
//      reduced to four vectors by five 3:2 carry-save adders in two levels;
//   2. these four vectors, the ten MSBs of acc and the sign-extension word
//      are reduced to two vectors by two levels of 4:2 compressors;
//   3. a carry-propagate adder forms the 24-bit sum.
// Steps 1 and 3 follow the published adder. Its final adder is a modified
// ELM adder whose circuit is not described, so a plain carry-propagate
// adder stands in for it; the 4:2 compressors of step 2 are this design's
// reading of "two-level carry-save adder". The carry-save vectors of step 1
// are kept 24 bits wide so that carries out of bit 13 are not lost (they are
// zero above bit 17 and synthesis trims the constant bits).
// Purely combinational.
module pe_adder
  import fir_pkg::*;
(
  input  logic [N_DPU-1:0][ADDEND_W-1:0] addend,
  input  logic [ACC_W-1:0]               acc,
  input  logic [SEXT_W-1:0]              sext,
  output logic [ACC_W-1:0]               sum
);

  logic [8:0][ACC_W-1:0] op;        // level-1 operands
  logic [2:0][ACC_W-1:0] s1, c1;    // level-1 results
  logic [1:0][ACC_W-1:0] s2, c2;    // level-2 results
  logic [ACC_W-1:0]      s3, c3, s4, c4;
  logic [ACC_W-1:0]      acc_hi, sext_hi;

  always_comb begin
    for (int i = 0; i < 8; i++) op[i] = ACC_W'(addend[i]);
    op[8]   = ACC_W'(acc[ADDEND_W-1:0]);
    acc_hi  = {acc[ACC_W-1:ADDEND_W], {ADDEND_W{1'b0}}};
    sext_hi = {sext, {ADDEND_W{1'b0}}};
  end

  // Level 1: three 3:2 adders, nine operands to six vectors.
  for (genvar g = 0; g < 3; g++) begin : g_l1
    csa #(.W(ACC_W)) u_csa (
      .a(op[3*g]), .b(op[3*g+1]), .c(op[3*g+2]), .s(s1[g]), .cy(c1[g])
    );
  end

  // Level 2: two 3:2 adders, six vectors to four.
  csa #(.W(ACC_W)) u_l2a (.a(s1[0]), .b(c1[0]), .c(s1[1]), .s(s2[0]), .cy(c2[0]));
  csa #(.W(ACC_W)) u_l2b (.a(c1[1]), .b(s1[2]), .c(c1[2]), .s(s2[1]), .cy(c2[1]));

  // Upper part: two levels of 4:2 compressors.
  csa42 #(.W(ACC_W)) u_l3 (.a(s2[0]), .b(c2[0]), .c(s2[1]), .d(c2[1]), .s(s3), .cy(c3));
  csa42 #(.W(ACC_W)) u_l4 (.a(s3), .b(c3), .c(acc_hi), .d(sext_hi), .s(s4), .cy(c4));

  // Final carry-propagate adder.
  assign sum = s4 + c4;

  if (N_DPU != 8) begin : g_bad_n
    $error("pe_adder: the carry-save tree is written for eight DPUs");
  end

endmodule
