// csd_shifter: scales a digit product by 2^-pk and forms the DPU's addend.
//
// The 8-bit product is placed at the top of a 15-bit word and shifted right
// arithmetically by pk, which is the same as shifting its 7 magnitude bits
// left by 7-pk inside a 14-bit field. The vacated LSBs are padded with the
// pad bit: 0 for a +1 or 0 digit, 1 for a -1 digit, so that a negative term
// stays the exact one's complement of the positive one (-(x*2^(7-pk)) - 1).
// The bits above the magnitude are copies of the sign. The sign bit itself
// leaves the DPU separately; the sign extension generator supplies the bits
// from position 14 upwards.
// The shift direction, the 7 -> 14 bit expansion and the padding rule follow
// the published design. Purely combinational.
module csd_shifter
  import fir_pkg::*;
(
  input  logic [DATA_W-1:0]   p,       // product from the multiplier
  input  logic [SHIFT_W-1:0]  shift,   // pk
  input  logic                pad,     // LSB fill: 1 for a -1 digit
  output logic [ADDEND_W-1:0] addend   // term bits 13..0
);

  logic [ADDEND_W:0] word;  // {sign, magnitude, fill} before the shift

  always_comb begin
    word   = {p, {MAG_W{pad}}};
    addend = ADDEND_W'($signed(word) >>> shift);
  end

endmodule
