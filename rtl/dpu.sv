// dpu: digit processing unit, the building block of the filter.
//
// A DPU evaluates one CSD digit term d * 2^-pk * x of one tap. Its parts:
//  * a 6-bit SIPO control register (cfg, zero, plus, shift) that is part of
//    one long scan chain through all DPUs; it shifts on dclk while ctrl_en is
//    high: ctrl_q <= {ctrl_in, ctrl_q[5:1]}, ctrl_out = ctrl_q[0];
//  * a sample register on clk, and a mux that passes either the registered
//    (cfg = 1, last digit of a tap: the next DPU sees the next tap's sample)
//    or the unregistered sample (cfg = 0, next DPU works on the same tap);
//  * the digit multiplier and the shifter, fed by the registered sample.
// Outputs addend (term bits 13..0) and sign (term bit 14) are combinational
// from the sample register and the control word, so a term appears one clk
// after its sample enters. clr (synchronous, on clk) empties the sample
// register.
// The structure follows the published DPU; the register clear, the enable of
// the control chain and the bit order of the control word are own choices.
module dpu
  import fir_pkg::*;
(
  input  logic                clk,       // filter clock
  input  logic                dclk,      // slow set-up / dump clock
  input  logic                clr,       // clear the sample register (clk)
  input  logic                ctrl_en,   // shift the control chain (dclk)
  input  logic                ctrl_in,
  output logic                ctrl_out,
  input  logic [DATA_W-1:0]   data_in,
  output logic [DATA_W-1:0]   data_out,
  output logic [ADDEND_W-1:0] addend,
  output logic                sign
);

  dpu_ctrl_t          ctrl_q;
  logic [DATA_W-1:0]  x_q;
  logic [DATA_W-1:0]  prod;

  always_ff @(posedge dclk)
    if (ctrl_en) ctrl_q <= {ctrl_in, ctrl_q[CTRL_W-1:1]};

  assign ctrl_out = ctrl_q[0];

  always_ff @(posedge clk)
    if (clr) x_q <= '0;
    else     x_q <= data_in;

  assign data_out = ctrl_q.cfg ? x_q : data_in;

  csd_multiplier u_mult (
    .x    (x_q),
    .zero (ctrl_q.zero),
    .plus (ctrl_q.plus),
    .p    (prod)
  );

  csd_shifter u_shift (
    .p      (prod),
    .shift  (ctrl_q.shift),
    .pad    (~ctrl_q.zero & ~ctrl_q.plus),
    .addend (addend)
  );

  assign sign = prod[DATA_W-1];

endmodule
