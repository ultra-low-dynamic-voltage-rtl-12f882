// Behavioural model of an enable-gated CMOS ring oscillator (not synthesizable).
//
// The real parts are analog: a ring of STAGES inverters closed through an
// enable gate, whose frequency is set by the drain current of the devices and
// so by temperature, supply and process. This model stands for every ring in
// the design: the 31-stage zero-temperature-coefficient ring of the voltage /
// process sensor, the six TSROs of the adaptive-voltage temperature sensor,
// and the 51-stage near-threshold and 13-stage sub-threshold TSROs of the
// process-invariant sensor.
//
// Interface: en starts and stops the ring; osc is its output. tpd_ps is not a
// pin of the real circuit: it is the delay of one stage in picoseconds, which a
// testbench drives to stand for the physical condition (temperature, supply,
// corner). The half period is STAGES * tpd_ps.
//
// Timing: osc is low while en is low. After en rises the first rising edge
// comes one half period later. When en falls, osc returns low at the end of
// the half period in progress, so no extra rising edge is produced.
//
// The delay below draws a ZERODLY lint warning because its value is only known
// at run time; it is never zero, as a stage delay of 0 is treated as 1 ps.
`timescale 1ns/1ps
module ring_osc #(
  parameter int unsigned STAGES = 13
) (
  input  logic        en,
  input  logic [31:0] tpd_ps,
  output logic        osc
);

  initial osc = 1'b0;

  always begin
    if (!en) begin
      osc = 1'b0;
      @(posedge en);
    end
    #((STAGES * ((tpd_ps == 0) ? 32'd1 : tpd_ps)) * 1ps);
    osc = en ? ~osc : 1'b0;
  end

endmodule
