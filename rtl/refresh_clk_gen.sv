// Refresh clock generator: CLK_REF = CLK_IN / 1, 2, 4 or 8 chosen by Ctrl.
//
// Three toggle flip-flops in a ripple chain give CLK_IN/2, /4 and /8; a
// multiplexer picks CLK_IN itself for Ctrl = 11 and one of the divided
// clocks for 10, 01 and 00 (20, 10, 5 and 2.5 MHz from a 20 MHz CLK_IN). The
// more flip-flops the clock passes through, the slower CLK_REF; this follows
// the original divider.
//
// Safe switching is this design's addition: the requested code ctrl is copied
// into the multiplexer select only on a falling edge of CLK_IN at which all
// three divided clocks are low. At that moment every multiplexer input is low,
// so a change of selection cannot make a short pulse or an extra CLK_REF
// edge. A new code therefore takes effect within 8 CLK_IN periods.
//
// rst (active high, asynchronous) clears the dividers and selects the fastest
// rate (Ctrl = 11), which is safe for data retention.
`timescale 1ns/1ps
module refresh_clk_gen
  import pvt_pkg::*;
(
  input  logic  clk_in,
  input  logic  rst,
  input  ctrl_e ctrl,
  output logic  clk_ref
);

  logic  div2, div4, div8;
  ctrl_e sel;

  always_ff @(posedge clk_in or posedge rst)
    if (rst) div2 <= 1'b0; else div2 <= ~div2;

  always_ff @(posedge div2 or posedge rst)
    if (rst) div4 <= 1'b0; else div4 <= ~div4;

  always_ff @(posedge div4 or posedge rst)
    if (rst) div8 <= 1'b0; else div8 <= ~div8;

  always_ff @(negedge clk_in or posedge rst) begin
    if (rst)                         sel <= CTRL_DIV1;
    else if (!div2 && !div4 && !div8) sel <= ctrl;
  end

  always_comb begin
    unique case (sel)
      CTRL_DIV1: clk_ref = clk_in;
      CTRL_DIV2: clk_ref = div2;
      CTRL_DIV4: clk_ref = div4;
      CTRL_DIV8: clk_ref = div8;
      default:   clk_ref = clk_in;
    endcase
  end

endmodule
