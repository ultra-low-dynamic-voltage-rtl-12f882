// 0.5-0.25 V process, voltage and temperature sensor with adaptive voltage
// selection.
//
// Built for energy-harvesting systems whose supply is scaled between 0.25 V
// and 0.5 V. A ring oscillator's frequency depends on temperature, supply and
// process at once, so the sensor first measures process and supply and then
// uses them to pick the right temperature oscillator and to correct its
// count:
//   pvt_fsm           sequences everything (8 CLK cycles per conversion)
//   pv_sensor         ZTC ring + 9-bit counter -> PV[8:0]
//   process_register  P[4:0] = PV[8:4] measured once after RESET
//   voltage_mapping   PV + shift(P) -> supply-range code V[2:0]
//   tsro_temp_sensor  six TSROs, one per range, + 12-bit counter -> T[11:0]
//   pv_compensation   T_OUT[12:0] = T corrected by P and V
// The block structure and signal names are the original's; see each module
// for which details are this design's.
//
// Interface: clk (CLK, 400 kHz for 50 kS/s), reset (RESET, active high;
// releasing it starts the one-cycle process measurement), en (EN, convert
// continuously while high). Outputs p_done (low during process sensing), p,
// v, t (raw count), t_out and t_valid (high for the one CLK cycle after T_OUT
// changed). ztc_tpd_ps and tsro_tpd_ps are simulation stimuli of the ring
// models.
`timescale 1ns/1ps
module pvt_sensor
  import pvt_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic               en,
  input  logic [31:0]        ztc_tpd_ps,
  input  logic [31:0]        tsro_tpd_ps [NUM_TSRO],
  output logic [4:0]         p,
  output vcode_e             v,
  output logic               p_done,
  output logic [11:0]        t,
  output logic signed [12:0] t_out,
  output logic               t_valid
);

  logic       en_ztc, en_tsro, reset_ctr, p_load, v_load, t_load;
  logic [8:0] pv;

  pvt_fsm u_fsm (
    .clk(clk), .reset(reset), .en(en),
    .en_ztc(en_ztc), .en_tsro(en_tsro), .reset_ctr(reset_ctr), .p_done(p_done),
    .p_load(p_load), .v_load(v_load), .t_load(t_load)
  );

  pv_sensor u_pv (.en_ztc(en_ztc), .reset_ctr(reset_ctr), .ztc_tpd_ps(ztc_tpd_ps), .pv(pv));

  process_register u_preg (.clk(clk), .reset(reset), .load(p_load), .pv_hi(pv[8:4]), .p(p));

  voltage_mapping u_vmap (.clk(clk), .reset(reset), .load(v_load), .pv(pv), .p(p), .v(v));

  tsro_temp_sensor u_ts (
    .en_tsro(en_tsro), .reset_ctr(reset_ctr), .v(v), .tsro_tpd_ps(tsro_tpd_ps), .t(t)
  );

  pv_compensation u_comp (
    .clk(clk), .reset(reset), .load(t_load), .t(t), .p(p), .v(v), .t_out(t_out), .valid(t_valid)
  );

endmodule
