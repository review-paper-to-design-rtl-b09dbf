// sign_ext_gen: sum of the sign-extension bits of all DPU terms.
//
// Each DPU term is 15 bits wide (sign at bit 14) while the sum is 24 bits.
// Instead of extending every term, the sign bits 14..23 of all terms are
// added at once. A negative term contributes 2^24 - 2^14, so S negative terms
// contribute -S * 2^14 (mod 2^24), i.e. the 10-bit word 2^10 - S (or 0 when
// S = 0). For N = 8 terms this is: the seven upper bits are all ones when any
// sign is set and all zeros otherwise, and the three low bits are the low
// bits of the number of non-negative terms (8 - S). This rule is the one
// published for the chip; it is written here for any power-of-two N.
// Purely combinational; sext is aligned to bit 14 of the sum.
module sign_ext_gen
  import fir_pkg::*;
#(
  parameter int unsigned N = N_DPU
) (
  input  logic [N-1:0]      sign,
  output logic [SEXT_W-1:0] sext
);

  localparam int unsigned CNT_W = $clog2(N);

  logic [CNT_W:0] n_nonneg;

  always_comb begin
    n_nonneg = '0;
    for (int i = 0; i < N; i++)
      n_nonneg += (CNT_W+1)'(~sign[i]);
    sext = {{(SEXT_W-CNT_W){|sign}}, n_nonneg[CNT_W-1:0]};
  end

  initial assert (N >= 2 && (N & (N - 1)) == 0 && CNT_W < SEXT_W)
    else $error("sign_ext_gen: N must be a power of two");

endmodule
