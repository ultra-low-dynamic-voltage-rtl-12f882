// Refresh row counter.
//
// A ROWS_LOG2-bit counter clocked by CLK_REF. Its value is the address of the
// row being refreshed; it advances by one on every rising edge of CLK_REF and
// wraps from the last row to row 0, so every word line is refreshed once in
// 2^ROWS_LOG2 CLK_REF periods (128 for the 128-row DRAM block). Counting up
// with wrap-around follows the original; reset to row 0 (asynchronous, active
// high) is this design's choice.
`timescale 1ns/1ps
module refresh_counter #(
  parameter int unsigned ROWS_LOG2 = 7
) (
  input  logic                 clk_ref,
  input  logic                 rst,
  output logic [ROWS_LOG2-1:0] row
);

  always_ff @(posedge clk_ref or posedge rst) begin
    if (rst) row <= '0;
    else     row <= row + 1'b1;
  end

endmodule
