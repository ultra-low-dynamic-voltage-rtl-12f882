// Top level: ultra-low-voltage frequency-ratio thermal sensing.
//
// Two independent circuits side by side, each with its own ports:
//   pvt_*  the 0.5-0.25 V adaptive-voltage PVT sensor (pvt_sensor), and
//   ref_*  the temperature-aware refresh controller of a DRAM sub-block
//          (dram_refresh_ctrl), which contains the 0.4 V process-invariant
//          temperature sensor (pi_temp_sensor).
// The *_tpd_ps inputs are simulation stimuli of the behavioural ring
// oscillators (one stage delay in ps) and stand for the physical temperature,
// supply and process; they are not pins of a real chip.
`timescale 1ns/1ps
module pvt_thermal_top
  import pvt_pkg::*;
(
  // adaptive-voltage PVT sensor
  input  logic               pvt_clk,
  input  logic               pvt_reset,
  input  logic               pvt_en,
  input  logic [31:0]        pvt_ztc_tpd_ps,
  input  logic [31:0]        pvt_tsro_tpd_ps [NUM_TSRO],
  output logic               pvt_p_done,
  output logic [4:0]         pvt_p,
  output logic [11:0]        pvt_t,
  output vcode_e             pvt_v,
  output logic signed [12:0] pvt_t_out,
  output logic               pvt_t_valid,
  // DRAM refresh controller with process-invariant sensor
  input  logic               ref_clk_in,
  input  logic               ref_clk,
  input  logic               ref_rst,
  input  logic               ref_start,
  input  logic [31:0]        ref_near_tpd_ps,
  input  logic [31:0]        ref_sb_tpd_ps,
  output logic [10:0]        ref_ts,
  output logic               ref_rdy,
  output ctrl_e              ref_ctrl,
  output logic               ref_clk_ref,
  output logic [6:0]         ref_row,
  output logic [127:0]       ref_wl
);

  pvt_sensor u_pvt (
    .clk(pvt_clk), .reset(pvt_reset), .en(pvt_en),
    .ztc_tpd_ps(pvt_ztc_tpd_ps), .tsro_tpd_ps(pvt_tsro_tpd_ps),
    .p_done(pvt_p_done), .p(pvt_p), .v(pvt_v), .t(pvt_t), .t_out(pvt_t_out), .t_valid(pvt_t_valid)
  );

  dram_refresh_ctrl u_refresh (
    .clk_in(ref_clk_in), .clk(ref_clk), .rst(ref_rst), .start(ref_start),
    .near_tpd_ps(ref_near_tpd_ps), .sb_tpd_ps(ref_sb_tpd_ps),
    .ts(ref_ts), .rdy(ref_rdy), .ctrl(ref_ctrl), .clk_ref(ref_clk_ref),
    .row(ref_row), .wl(ref_wl)
  );

endmodule
