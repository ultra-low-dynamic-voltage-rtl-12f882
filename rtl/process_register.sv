// Process register.
//
// Keeps the process code P[4:0] = PV[8:4] measured in the process-sensing
// cycle after RESET; load (one CLK cycle) comes from the sequencer once the
// count has settled. The value is held until the next RESET. Reset value 11,
// the typical-corner code, is this design's choice, so an unloaded register
// reads as typical.
`timescale 1ns/1ps
module process_register
  import pvt_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       load,
  input  logic [4:0] pv_hi,
  output logic [4:0] p
);

  always_ff @(posedge clk) begin
    if (reset)     p <= P_TT;
    else if (load) p <= pv_hi;
  end

endmodule
