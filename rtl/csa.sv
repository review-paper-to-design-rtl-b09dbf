// csa: carry-save (3:2) adder over W bits.
//
// Reduces three operands to a sum vector and a carry vector with
// a + b + c == s + cy (mod 2^W). The carry vector is already moved one place
// left; the carry out of the top bit is dropped. Purely combinational.
module csa #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-2:0] maj;  // majority of the lower W-1 bits; the top carry is dropped

  assign s   = a ^ b ^ c;
  assign maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
  assign cy  = {maj, 1'b0};

endmodule
