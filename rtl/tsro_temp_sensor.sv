// Temperature sensor of the adaptive-voltage PVT sensor.
//
// Six temperature-sensitive ring oscillators (TSROs), one for each supply
// range 0.25, 0.30, ..., 0.50 V. Each is sized so that its devices stay in
// sub-threshold up to the top of the temperature range at its supply, which
// makes its frequency rise linearly with temperature. A decoder of V[2:0],
// gated by en_tsro, enables only the TSRO that suits the present supply
// (EN025 ... EN05); a multiplexer sends its output to a 12-bit counter that is
// cleared by reset_ctr and counts while en_tsro is high (four CLK cycles).
// T[11:0] = 4 * f_TSRO / f_CLK.
//
// Structure and widths follow the original. The stage counts of the six
// rings are not published; in this model each ring's period comes from its
// stimulus tsro_tpd_ps[i] (one stage delay) with a nominal 21 stages. V codes
// 6 and 7 enable no ring.
`timescale 1ns/1ps
module tsro_temp_sensor
  import pvt_pkg::*;
#(
  parameter int unsigned W      = 12,
  parameter int unsigned STAGES = 21
) (
  input  logic                en_tsro,
  input  logic                reset_ctr,
  input  vcode_e              v,
  input  logic [31:0]         tsro_tpd_ps [NUM_TSRO],
  output logic [W-1:0]        t
);

  logic [NUM_TSRO-1:0] tsro_en;   // EN025, EN03, EN035, EN04, EN045, EN05
  logic [NUM_TSRO-1:0] tsro_out;
  logic                sel_osc;

  always_comb begin
    tsro_en = '0;
    if (en_tsro && 32'(v) < NUM_TSRO) tsro_en[v] = 1'b1;
  end

  for (genvar i = 0; i < NUM_TSRO; i++) begin : g_tsro
    ring_osc #(.STAGES(STAGES)) u_tsro (.en(tsro_en[i]), .tpd_ps(tsro_tpd_ps[i]), .osc(tsro_out[i]));
  end

  assign sel_osc = (32'(v) < NUM_TSRO) ? tsro_out[v] : 1'b0;

  osc_counter #(.W(W)) u_cnt (.osc(sel_osc), .clr(reset_ctr), .gate(en_tsro), .cnt(t));

endmodule
