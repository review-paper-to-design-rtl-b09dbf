// fir_pkg: widths, control-word layout and shared helpers of the
// digit-reconfigurable FIR filter.
//
// The filter computes y[n] = sum_i h_i * x[n-1-i] where every coefficient is
// written in canonical signed digit (CSD) form, h_i = sum_k d_ik * 2^-pk with
// d_ik in {-1,0,1}. One digit processing unit (DPU) evaluates one digit term.
// The widths below follow the published chip: 8-bit samples, 7+7 bit shifted
// terms (14-bit addend plus a sign bit), a 24-bit accumulated sum, a 10-bit
// sign-extension word and a 32-bit test accumulator. The control-word layout
// and its serial order are this design's own choice.
package fir_pkg;

  localparam int unsigned DATA_W    = 8;   // sample width (two's complement)
  localparam int unsigned MAG_W     = DATA_W - 1;          // bits below the sign
  localparam int unsigned SHIFT_W   = 3;   // pk in 0..7
  localparam int unsigned ADDEND_W  = 14;  // shifted term without its sign
  localparam int unsigned ACC_W     = 24;  // accumulated sum
  localparam int unsigned SEXT_W    = ACC_W - ADDEND_W;    // 10-bit sign-extension word
  localparam int unsigned N_DPU     = 8;   // DPUs in one processing element
  localparam int unsigned TEST_W    = 32;  // test-module accumulator

  // Control word held in the SIPO register array of every DPU.
  //   cfg   : 1 = pass the registered sample on (last digit of a tap),
  //           0 = pass the unregistered sample on (more digits of the same tap)
  //   zero  : 1 = the digit is 0
  //   plus  : 1 = the digit is +1, 0 = the digit is -1 (ignored when zero = 1)
  //   shift : pk, the digit's weight is 2^-pk
  typedef struct packed {
    logic               cfg;
    logic               zero;
    logic               plus;
    logic [SHIFT_W-1:0] shift;
  } dpu_ctrl_t;

  localparam int unsigned CTRL_W = $bits(dpu_ctrl_t);  // 6 bits per DPU

endpackage
