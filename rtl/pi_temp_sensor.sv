// 0.4 V process-invariant, frequency-ratio temperature sensor.
//
// Two temperature-sensitive ring oscillators run while pw is high: a 51-stage
// near-threshold ring (f_o1) clocks the N-bit counter of the fixed pulse width
// generator, and a 13-stage sub-threshold ring (f_o2) clocks the S-bit output
// counter. The output counter counts only while the pulse q is high, i.e. for
// 2^(N-1) near-threshold periods, so
//     TS = 2^(N-1) * f_o2 / f_o1   (= 512 * f_o2 / f_o1 for N = 10).
// In silicon both frequencies follow drain current, and the ratio of the
// sub-threshold to the near-threshold current rises linearly with temperature
// while mobility, oxide capacitance and device size cancel; that is why the
// ratio is used instead of a count against a fixed clock.
//
// Interface: clk (system clock, > 500 kHz), rst, start (each rising edge
// starts one conversion), ts (TS[10:0]) and rdy (TS valid). near_tpd_ps and
// sb_tpd_ps are simulation stimuli of the two ring models (one stage delay
// each), standing for the die temperature.
//
// Timing: a conversion takes 2^(N-1) near-ring periods plus about
// 7 + RDY_DELAY CLK cycles of control. rdy falls one CLK cycle after START is
// seen and rises when TS is final. The sizes (N = 10, S = 11, 51 and 13
// stages) are the original design's; the control details are described in
// pi_control_unit.
`timescale 1ns/1ps
module pi_temp_sensor #(
  parameter int unsigned N           = 10,
  parameter int unsigned S           = 11,
  parameter int unsigned NEAR_STAGES = 51,
  parameter int unsigned SB_STAGES   = 13,
  parameter int unsigned RDY_DELAY   = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [31:0]  near_tpd_ps,
  input  logic [31:0]  sb_tpd_ps,
  output logic [S-1:0] ts,
  output logic         rdy
);

  logic f_o1, f_o2;
  logic q;
  logic s_rst, pw, n_rst;
  logic ts_clr;

  ring_osc #(.STAGES(NEAR_STAGES)) u_near_tsro (.en(pw), .tpd_ps(near_tpd_ps), .osc(f_o1));
  ring_osc #(.STAGES(SB_STAGES))   u_sb_tsro   (.en(pw), .tpd_ps(sb_tpd_ps),   .osc(f_o2));

  fixed_pulse_gen #(.N(N)) u_pulse (
    .start(start), .osc(f_o1), .n_rst(n_rst), .rst(rst), .q(q), .qmsb()
  );

  pi_control_unit #(.RDY_DELAY(RDY_DELAY)) u_ctrl (
    .clk(clk), .rst(rst), .q(q), .s_rst(s_rst), .pw(pw), .n_rst(n_rst), .rdy(rdy)
  );

  assign ts_clr = s_rst | rst;

  osc_counter #(.W(S)) u_ts_cnt (.osc(f_o2), .clr(ts_clr), .gate(q), .cnt(ts));

endmodule
