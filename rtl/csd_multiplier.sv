// csd_multiplier: multiplies a two's-complement sample by one CSD digit.
//
// Every bit is out = NOT(zero OR (plus XOR in)). With zero = 1 the result is
// 0 whatever the sample. With zero = 0 and plus = 1 the sample passes
// unchanged (digit +1); with plus = 0 it is inverted, giving the one's
// complement -x-1 (digit -1). The missing +1 of the two's-complement negation
// is not added here: it is collected for all negative digits into the
// compensation vector that initialises the accumulator. The bit equation and
// this compensation scheme follow the published design.
// Purely combinational. The MSB of the result is the term's sign bit.
module csd_multiplier
  import fir_pkg::*;
(
  input  logic [DATA_W-1:0] x,     // sample
  input  logic              zero,  // digit is 0
  input  logic              plus,  // digit is +1 (else -1)
  output logic [DATA_W-1:0] p      // d * x, one's complement for d = -1
);

  always_comb begin
    for (int b = 0; b < DATA_W; b++)
      p[b] = ~(zero | (plus ^ x[b]));
  end

endmodule
