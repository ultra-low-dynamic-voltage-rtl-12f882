// Process / voltage compensation of the temperature code.
//
// At the end of each conversion (load) the raw count T[11:0] is corrected for
// the process corner and for the TSRO in use:
//     T_OUT = T + P_STEP * (11 - P) - V_OFFS[V]
// computed in 13-bit two's complement (adder and subtracter) and latched with
// valid pulsed for one CLK cycle. A slow corner (small P) counts low and gets
// a positive correction; each supply range has its own offset because each
// TSRO has its own offset. Multiplexers select the correction values from P
// and V as in the original; the published tables are not available, so the
// shape of the correction and its default values are this design's
// placeholders, to be replaced by calibration data. V codes 6 and 7 use no
// voltage offset.
`timescale 1ns/1ps
module pv_compensation
  import pvt_pkg::*;
#(
  parameter int          P_STEP    = 40,
  parameter int unsigned V_OFFS [6] = '{0, 24, 48, 72, 96, 120}
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               load,
  input  logic [11:0]        t,
  input  logic [4:0]         p,
  input  vcode_e             v,
  output logic signed [12:0] t_out,
  output logic               valid
);

  logic signed [12:0] p_corr;
  logic signed [12:0] v_corr;
  logic signed [12:0] t_next;

  always_comb begin
    p_corr = 13'(P_STEP * (int'(P_TT) - int'(p)));
    v_corr = (32'(v) < NUM_TSRO) ? 13'(V_OFFS[v]) : 13'sd0;
    t_next = $signed({1'b0, t}) + p_corr - v_corr;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      t_out <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) t_out <= t_next;
    end
  end

endmodule
