// test_module: on-chip accumulation and serial read-out of the filter sums.
//
// The 24-bit sums come at the full clk rate, faster than the pins can carry
// them. The test module therefore adds every sum (sign-extended) into a
// 32-bit carry-save accumulator, two 32-bit vectors s and c that a 3:2
// carry-save adder updates each clk without carry propagation. The result
// s + c is formed only when it is read, at the slow dclk rate.
// Operation:
//   setup = 1           : s, c and the read-out register are cleared.
//   mode = 0            : every clk adds sum into the accumulator.
//   mode = 1            : the accumulator holds. On the first dclk edge that
//                         sees mode = 1, s + c is loaded into a 32-bit
//                         shift register; each further dclk edge shifts it
//                         one place left. scan_out is its MSB, so the value
//                         leaves MSB first, bit 31 right after the load edge.
// A cascaded chip whose acc SIPO shifts on the following 32 dclk edges ends
// up holding bits 23..0 of the value.
// Accumulating in a 32-bit carry-save adder and scanning the result out on
// the slower clock follow the published chip; the control and timing are
// this design's own. mode must be stable for a few clk before the first dclk
// edge that sees it, so that the accumulator is quiet when it is read.
module test_module
  import fir_pkg::*;
(
  input  logic             clk,
  input  logic             dclk,
  input  logic             setup,
  input  logic             mode,
  input  logic [ACC_W-1:0] sum,
  output logic             scan_out
);

  logic [TEST_W-1:0] s_q, c_q, s_d, c_d;
  logic [TEST_W-1:0] shreg;
  logic              mode_q;

  csa #(.W(TEST_W)) u_csa (
    .a  (s_q),
    .b  (c_q),
    .c  (TEST_W'($signed(sum))),
    .s  (s_d),
    .cy (c_d)
  );

  always_ff @(posedge clk)
    if (setup) begin
      s_q <= '0;
      c_q <= '0;
    end else if (!mode) begin
      s_q <= s_d;
      c_q <= c_d;
    end

  always_ff @(posedge dclk)
    if (setup) begin
      mode_q <= 1'b0;
      shreg  <= '0;
    end else begin
      mode_q <= mode;
      if (mode && !mode_q) shreg <= s_q + c_q;
      else if (mode)       shreg <= {shreg[TEST_W-2:0], 1'b0};
    end

  assign scan_out = shreg[TEST_W-1];

endmodule
