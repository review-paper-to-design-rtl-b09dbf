// pe: processing element, eight cascaded DPUs with one nine-input adder.
//
// The DPUs form two chains: the control scan chain (ctrl_in -> DPU 0 -> ...
// -> DPU 7 -> ctrl_out, 6 bits per DPU, shifted on dclk while setup is high)
// and the sample chain (data_in -> DPU 0 -> ... -> DPU 7). A DPU whose cfg
// bit is set ends a tap, so the samples of consecutive taps are one clk
// apart; DPUs with cfg = 0 share their tap's sample. The sign extension
// generator turns the eight sign bits into the 10-bit sign-extension word,
// and pe_adder adds the eight addends, that word and the acc word:
//   sum = acc + sum_j d_j * x_j * 2^(7-pk_j)   (mod 2^24),
// where the negative digits' missing +1s are expected in acc (the
// compensation vector). acc is the 24-bit SIPO register, loaded MSB first
// from scan_in on dclk while acc_en is high; it holds its value otherwise.
// sum is combinational from the DPU sample registers, i.e. valid one clk
// after a sample enters DPU 0. data_out is the last DPU's sample output
// through one more register, for the next cascaded chip. setup also clears
// the sample registers (synchronously on clk).
// The DPU cascade, adder, sign extension generator and SIPO acc follow the
// published processing element; the output register placement is read from
// its block diagram, and the control timing is this design's own.
module pe
  import fir_pkg::*;
(
  input  logic              clk,
  input  logic              dclk,
  input  logic              setup,     // initialisation: load control chain, clear samples
  input  logic              acc_en,    // shift scan_in into the acc SIPO (dclk)
  input  logic              ctrl_in,
  output logic              ctrl_out,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  input  logic              scan_in,
  output logic [ACC_W-1:0]  sum
);

  logic [N_DPU:0]                 ctrl_chain;
  logic [N_DPU:0][DATA_W-1:0]     data_chain;
  logic [N_DPU-1:0][ADDEND_W-1:0] addend;
  logic [N_DPU-1:0]               sign;
  logic [SEXT_W-1:0]              sext;
  logic [ACC_W-1:0]               acc;

  assign ctrl_chain[0] = ctrl_in;
  assign data_chain[0] = data_in;

  for (genvar j = 0; j < N_DPU; j++) begin : g_dpu
    dpu u_dpu (
      .clk      (clk),
      .dclk     (dclk),
      .clr      (setup),
      .ctrl_en  (setup),
      .ctrl_in  (ctrl_chain[j]),
      .ctrl_out (ctrl_chain[j+1]),
      .data_in  (data_chain[j]),
      .data_out (data_chain[j+1]),
      .addend   (addend[j]),
      .sign     (sign[j])
    );
  end

  assign ctrl_out = ctrl_chain[N_DPU];

  always_ff @(posedge clk)
    if (setup) data_out <= '0;
    else       data_out <= data_chain[N_DPU];

  sign_ext_gen #(.N(N_DPU)) u_sext (
    .sign (sign),
    .sext (sext)
  );

  acc_sipo #(.W(ACC_W)) u_acc (
    .dclk    (dclk),
    .en      (acc_en),
    .scan_in (scan_in),
    .q       (acc)
  );

  pe_adder u_add (
    .addend (addend),
    .acc    (acc),
    .sext   (sext),
    .sum    (sum)
  );

endmodule
