// Sequencer of the adaptive-voltage PVT sensor.
//
// Process sensing: RESET is sampled by a chain of flip-flops. In the first
// CLK cycle after RESET is seen low, en_ztc runs the zero-temperature-
// coefficient ring for one cycle and p_done is low; the next cycle p_load
// tells the process register to keep PV[8:4]. While RESET (and for those two
// cycles) reset_ctr clears the sensor counters.
//
// Conversion loop: while EN is high, a 3-bit counter clocked by CLK walks
// through eight states, one CLK cycle each, so every step of a conversion has
// its own state:
//   1  reset_ctr clears the voltage and temperature counters
//   2  en_ztc: voltage sensing with the ZTC ring
//   3  v_load: the voltage mapping latches V[2:0] at the end of the cycle
//   4-7 en_tsro (= counter bit 2): the selected TSRO is counted for 4 cycles
//   0  t_load: PV compensation latches T_OUT at the end of the cycle
// t_load is a registered flag set by state 7, so the state 0 a conversion
// passes through before its first measurement loads nothing, and a conversion
// whose temperature phase finished is compensated even if EN has just fallen.
// EN low holds the counter at 0 at once and the sensor idles. One conversion
// takes 8 CLK cycles, so a 400 kHz CLK gives 50 k samples/s.
//
// Following the original: one cycle of process sensing after RESET, the
// order reset-counters / voltage sensing / voltage mapping / four cycles of
// temperature sensing / compensation, a 3-bit counter gated by EN and reset
// through EN and RESET, and EN_TSRO taken from its bit 2. This design's
// choices: which counter value serves which step, the explicit load strobes,
// and one extra hold cycle after process sensing (a third flip-flop on RESET).
`timescale 1ns/1ps
module pvt_fsm (
  input  logic clk,
  input  logic reset,
  input  logic en,
  output logic en_ztc,
  output logic en_tsro,
  output logic reset_ctr,
  output logic p_done,
  output logic p_load,
  output logic v_load,
  output logic t_load
);

  logic       r1, r2, r3;   // RESET delayed by 1, 2 and 3 CLK cycles
  logic       p_sense;
  logic       hold;
  logic       run;
  logic [2:0] q;
  logic       t_pend;

  always_ff @(posedge clk) begin
    r1 <= reset;
    r2 <= r1;
    r3 <= r2;
  end

  assign p_sense = r2 & ~r1 & ~reset;
  assign p_load  = r3 & ~r2 & ~r1 & ~reset;
  assign hold    = reset | r1 | r2 | r3;
  assign run     = en & ~hold;

  always_ff @(posedge clk) begin
    if (!run) q <= '0;
    else      q <= q + 1'b1;
  end

  // compensation follows the last temperature cycle
  always_ff @(posedge clk) t_pend <= run && q == 3'd7;

  assign p_done    = ~p_sense;
  assign en_ztc    = p_sense | (run && q == 3'd2);
  assign reset_ctr = reset | r1 | (run && q == 3'd1);
  assign v_load    = run && q == 3'd3;
  assign en_tsro   = run & q[2];
  assign t_load    = t_pend;

endmodule
