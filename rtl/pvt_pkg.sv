// Shared types and constants of the PVT sensor and the DRAM refresh controller.
//
// ctrl_e is the 2-bit refresh-rate code produced by the temperature mapping
// table and consumed by the refresh clock generator. The four codes and their
// CLK_REF rates (with a 20 MHz CLK_IN) follow the refresh table of the design:
// 11 -> 20 MHz (75-100 C), 10 -> 10 MHz (50-75 C), 01 -> 5 MHz (25-50 C),
// 00 -> 2.5 MHz (0-25 C).
//
// vcode_e names the supply-range codes V[2:0] of the adaptive-voltage sensor.
// Which binary value stands for which supply is this design's choice: the
// order follows the six TSRO enables EN025 ... EN05.
`timescale 1ns/1ps
package pvt_pkg;

  typedef enum logic [1:0] {
    CTRL_DIV8 = 2'b00,   // 0-25 C   : CLK_REF = CLK_IN / 8
    CTRL_DIV4 = 2'b01,   // 25-50 C  : CLK_REF = CLK_IN / 4
    CTRL_DIV2 = 2'b10,   // 50-75 C  : CLK_REF = CLK_IN / 2
    CTRL_DIV1 = 2'b11    // 75-100 C : CLK_REF = CLK_IN
  } ctrl_e;

  typedef enum logic [2:0] {
    V_025 = 3'd0,
    V_030 = 3'd1,
    V_035 = 3'd2,
    V_040 = 3'd3,
    V_045 = 3'd4,
    V_050 = 3'd5
  } vcode_e;

  localparam int unsigned NUM_TSRO = 6;

  // Process code of the typical corner: PV[8:4] reads 7 at SS, 11 at TT and
  // 16 at FF.
  localparam logic [4:0] P_SS = 5'd7;
  localparam logic [4:0] P_TT = 5'd11;
  localparam logic [4:0] P_FF = 5'd16;

  // Voltage-sensor process shift: +90 at the SS code falling by 10 per code
  // to 0 at the FF code; codes outside SS..FF are clamped.
  function automatic logic [6:0] vs_shift(input logic [4:0] p);
    if (p <= P_SS)      return 7'd90;
    else if (p >= P_FF) return 7'd0;
    else                return 7'(10 * (int'(P_FF) - int'(p)));
  endfunction

endpackage
