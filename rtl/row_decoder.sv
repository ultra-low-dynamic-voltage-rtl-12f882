// Refresh row decoder.
//
// Decodes the refresh row address into one-hot word-line enables. The
// refresh counter changes the row on the rising edge of CLK_REF; the selected
// word line is driven only while CLK_REF is low, i.e. in the second half of
// the period when the row address has settled. So in each CLK_REF period one
// row is opened for half a period, consecutive word lines never overlap and
// the counter's own transition can never open a wrong row. Decoding the
// refresh counter into word lines follows the original; gating with the low
// phase of CLK_REF is this design's choice. Purely combinational.
`timescale 1ns/1ps
module row_decoder #(
  parameter int unsigned ROWS_LOG2 = 7
) (
  input  logic [ROWS_LOG2-1:0]    row,
  input  logic                    clk_ref,
  output logic [2**ROWS_LOG2-1:0] wl
);

  always_comb begin
    wl = '0;
    if (!clk_ref) wl[row] = 1'b1;
  end

endmodule
