// fir_chip: the digit-reconfigurable FIR filter chip.
//
// One processing element (eight DPUs, so up to eight non-zero CSD digits
// shared freely among the taps), one pseudo-random data generator and one
// test module. Two clocks: CLK runs the filter; DumpCLK, slower (a quarter
// of CLK in the published measurements), loads the set-up data and carries
// results out.
// Use:
//   1. Setup = 1: on every DumpCLK edge ctrl_in shifts into the 48-bit
//      control chain (last DPU's word first, each word LSB first) and
//      scan_in into the 24-bit acc SIPO (MSB first: compensation vector, or
//      the previous chip's partial sum). CLK edges clear the sample
//      registers and the test accumulator and seed the PRDG.
//   2. Setup = 0, Mode = 0: the filter runs on CLK; the samples come from
//      data_in or from the PRDG (control[0]); the test module accumulates
//      every sum.
//   3. Mode = 1: the accumulated result leaves on scan_out, MSB first, one
//      bit per DumpCLK; the acc SIPO also shifts scan_in, which is how a
//      cascaded chip receives the partial sum of the one before it.
// ctrl_out and data_out continue the control and sample chains into a
// cascaded chip. The ports and the block structure follow the published
// chip diagram; the control timing is this design's own. Setup and Mode
// must not be high at the same time (checked by an assertion).
module fir_chip
  import fir_pkg::*;
(
  input  logic              CLK,
  input  logic              DumpCLK,
  input  logic              Setup,
  input  logic              Mode,
  input  logic [2:0]        control,
  input  logic              ctrl_in,
  input  logic [DATA_W-1:0] data_in,
  input  logic              scan_in,
  output logic              ctrl_out,
  output logic [DATA_W-1:0] data_out,
  output logic              scan_out
);

  logic [DATA_W-1:0] data;
  logic [ACC_W-1:0]  sum;

  prdg u_prdg (
    .clk     (CLK),
    .setup   (Setup),
    .ctl     (control),
    .data_in (data_in),
    .data    (data)
  );

  pe u_pe (
    .clk      (CLK),
    .dclk     (DumpCLK),
    .setup    (Setup),
    .acc_en   (Setup | Mode),
    .ctrl_in  (ctrl_in),
    .ctrl_out (ctrl_out),
    .data_in  (data),
    .data_out (data_out),
    .scan_in  (scan_in),
    .sum      (sum)
  );

  test_module u_test (
    .clk      (CLK),
    .dclk     (DumpCLK),
    .setup    (Setup),
    .mode     (Mode),
    .sum      (sum),
    .scan_out (scan_out)
  );

  // Set-up and dump are separate phases.
  a_phase : assert property (@(posedge DumpCLK) !(Setup && Mode))
    else $error("fir_chip: Setup and Mode are both high");

endmodule
