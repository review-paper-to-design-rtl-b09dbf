// acc_sipo: serial-in parallel-out register that holds the acc word.
//
// It replaces the accumulated-sum register of the processing element so that
// the word can come in over the scan chain: the compensation vector (number
// of -1 digits, at LSB weight) for the first chip, or the partial sum of the
// previous chip when chips are cascaded. On each dclk edge with en high the
// word shifts one place left and scan_in enters at the LSB, so a value is
// sent MSB first; after W shifts it is complete. The width follows the published chip; the shift direction is this
// design's own choice.
module acc_sipo
  import fir_pkg::*;
#(
  parameter int unsigned W = ACC_W
) (
  input  logic         dclk,
  input  logic         en,
  input  logic         scan_in,
  output logic [W-1:0] q
);

  always_ff @(posedge dclk)
    if (en) q <= {q[W-2:0], scan_in};

endmodule
