// Voltage mapping: process-compensated voltage code V[2:0].
//
// The ZTC-ring count PV[8:0] grows with the supply but also with the process
// corner. A shift chosen by the process code P[4:0] (+90 at the SS code 7,
// 10 less per code, 0 at the FF code 16) is added to PV in a 9-bit adder so
// that all corners give about the same sum at a given supply. The sum is
// compared with five ascending thresholds TH and the number of thresholds
// reached is the supply-range code: 0 = 0.25 V ... 5 = 0.50 V. V is latched
// on load (end of the voltage-mapping cycle) and held through temperature
// sensing and compensation.
//
// The shift table is the original's. The thresholds of the mapping table are
// not published and are parameters; the defaults are placeholders to be set
// from silicon characterisation. The adder saturates at 511 and the reset
// value of V is 0.5 V; both are this design's choices.
`timescale 1ns/1ps
module voltage_mapping
  import pvt_pkg::*;
#(
  parameter int unsigned TH [5] = '{60, 90, 120, 160, 200}
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       load,
  input  logic [8:0] pv,
  input  logic [4:0] p,
  output vcode_e     v
);

  logic [9:0] sum;
  logic [8:0] comp;
  logic [2:0] v_next;

  always_comb begin
    sum    = {1'b0, pv} + {3'b000, vs_shift(p)};
    comp   = sum[9] ? 9'h1FF : sum[8:0];
    v_next = '0;
    for (int i = 0; i < 5; i++)
      if (32'(comp) >= TH[i]) v_next = 3'(i + 1);
  end

  always_ff @(posedge clk) begin
    if (reset)     v <= V_050;
    else if (load) v <= vcode_e'(v_next);
  end

endmodule
