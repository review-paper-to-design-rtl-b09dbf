// prdg: pseudo-random data generator and input selector of the chip.
//
// An 8-bit maximal-length Fibonacci LFSR (x^8 + x^6 + x^5 + x^4 + 1, period
// 255) provides test samples at full clk rate, so the filter can be
// exercised faster than the data pins allow. The three control signals are
//   ctl[0] : 1 = feed the filter from the LFSR, 0 = from data_in;
//   ctl[1] : 1 = the LFSR steps every clk, 0 = it holds;
//   ctl[2] : 1 = setup seeds the LFSR from data_in (when not zero),
//            0 = setup seeds it with SEED.
// While setup is high the LFSR is (re)seeded on every clk. data is
// combinational: the LFSR state or data_in.
// That a PRDG drives the first DPU in place of data_in follows the published
// chip; the polynomial, seed and meaning of the three control signals are
// this design's own choice.
module prdg
  import fir_pkg::*;
#(
  parameter logic [DATA_W-1:0] SEED = 8'h01
) (
  input  logic              clk,
  input  logic              setup,
  input  logic [2:0]        ctl,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data
);

  logic [DATA_W-1:0] lfsr;
  logic              fb;

  assign fb = lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3];

  always_ff @(posedge clk)
    if (setup)       lfsr <= (ctl[2] && data_in != '0) ? data_in : SEED;
    else if (ctl[1]) lfsr <= {lfsr[DATA_W-2:0], fb};

  assign data = ctl[0] ? lfsr : data_in;

  initial assert (SEED != '0) else $error("prdg: SEED must not be zero");

endmodule
