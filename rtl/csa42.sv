// csa42: 4:2 compressor over W bits, built from two 3:2 carry-save adders.
//
// a + b + c + d == s + cy (mod 2^W). Purely combinational.
module csa42 #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] s0, c0;

  csa #(.W(W)) u_first  (.a(a),  .b(b),  .c(c), .s(s0), .cy(c0));
  csa #(.W(W)) u_second (.a(s0), .b(c0), .c(d), .s(s),  .cy(cy));

endmodule
