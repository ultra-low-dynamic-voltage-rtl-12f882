// Fixed pulse width generator of the process-invariant temperature sensor.
//
// A flip-flop with its data input tied high is clocked by START, so each
// rising edge of START sets the pulse q. An N-bit counter, clocked by the
// near-threshold ring oscillator (f_o1), counts until its most significant bit
// C[N-1] rises; that bit clears the flip-flop asynchronously. The pulse is
// therefore 2^(N-1) oscillator periods wide: W = 2^(N-1) / f_o1.
//
// The counter advances only while q is high (in the sensor the ring only
// runs then anyway), stops at C[N-1] = 1 and holds, keeping the flip-flop cleared,
// until the control unit pulses n_rst (this hold is a design choice; the
// original only says the counter runs until its MSB is set). A START edge
// that arrives before n_rst is ignored. rst clears both the flip-flop and the
// counter. n_rst also clears the flip-flop (this design's addition, so the
// power-on clear of the control unit leaves no pulse pending).
//
// Interface: start (START), osc (f_o1), n_rst (N_rst), rst; outputs q (pulse
// PW window) and qmsb (C[N-1]).
`timescale 1ns/1ps
module fixed_pulse_gen #(
  parameter int unsigned N = 10
) (
  input  logic start,
  input  logic osc,
  input  logic n_rst,
  input  logic rst,
  output logic q,
  output logic qmsb
);

  logic [N-1:0] cnt;
  logic         ff_clr;
  logic         cnt_clr;

  assign qmsb    = cnt[N-1];
  assign ff_clr  = qmsb | n_rst | rst;
  assign cnt_clr = n_rst | rst;

  // D tied high: each START edge sets the pulse; the counter MSB ends it.
  always_ff @(posedge start or posedge ff_clr) begin
    if (ff_clr) q <= 1'b0;
    else        q <= 1'b1;
  end

  always_ff @(posedge osc or posedge cnt_clr) begin
    if (cnt_clr)              cnt <= '0;
    else if (q && !qmsb) cnt <= cnt + 1'b1;
  end

endmodule
