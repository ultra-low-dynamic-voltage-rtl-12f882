// Process and voltage sensor.
//
// A 31-stage ring oscillator built in low-Vt devices and biased at its zero-
// temperature-coefficient point runs while en_ztc is high and clocks a 9-bit
// counter, cleared by reset_ctr. Because the ring frequency hardly moves with
// temperature, the count PV[8:0] taken over one CLK cycle depends only on the
// process corner (at the nominal supply) and on the supply voltage. The
// process register keeps PV[8:4] (7 at SS, 11 at TT, 16 at FF); the voltage
// mapping uses all nine bits. Structure and sizes follow the original; the
// counter wraps at 512.
//
// ztc_tpd_ps is the simulation stimulus of the ring model (one stage delay).
`timescale 1ns/1ps
module pv_sensor #(
  parameter int unsigned STAGES = 31,
  parameter int unsigned W      = 9
) (
  input  logic         en_ztc,
  input  logic         reset_ctr,
  input  logic [31:0]  ztc_tpd_ps,
  output logic [W-1:0] pv
);

  logic ztc_osc;

  ring_osc #(.STAGES(STAGES)) u_ztc_ring (.en(en_ztc), .tpd_ps(ztc_tpd_ps), .osc(ztc_osc));

  osc_counter #(.W(W)) u_cnt (.osc(ztc_osc), .clr(reset_ctr), .gate(en_ztc), .cnt(pv));

endmodule
