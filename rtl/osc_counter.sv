// Edge counter clocked by a ring oscillator.
//
// Counts rising edges of osc while gate is high; clr clears it at once
// (asynchronous, active high). This is the frequency-to-digital step used
// throughout the design: with gate held high for a known time, cnt is the
// oscillator frequency times that time. Gating the count with an enable is
// equivalent to the AND-gated clock of the original circuit: both count the
// oscillator's rising edges inside the window.
//
// The counter wraps at 2^W. Output cnt changes only on osc edges and must be
// read after gate has fallen.
`timescale 1ns/1ps
module osc_counter #(
  parameter int unsigned W = 12
) (
  input  logic         osc,
  input  logic         clr,
  input  logic         gate,
  output logic [W-1:0] cnt
);

  always_ff @(posedge osc or posedge clr) begin
    if (clr)       cnt <= '0;
    else if (gate) cnt <= cnt + 1'b1;
  end

endmodule
