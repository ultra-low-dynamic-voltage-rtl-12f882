// Temperature mapping table of the DRAM refresh controller.
//
// Converts the 11-bit sensor code TS into the 2-bit refresh-rate code Ctrl:
//   TS <  TS_25C           -> 00 (0-25 C,   slowest refresh)
//   TS_25C <= TS < TS_50C  -> 01 (25-50 C)
//   TS_50C <= TS < TS_75C  -> 10 (50-75 C)
//   TS >= TS_75C           -> 11 (75-100 C, fastest refresh)
// The four ranges and codes follow the original refresh table. The code at
// each boundary temperature depends on the calibrated sensor and is a
// parameter here; the defaults assume a sensor slope of about 2.04 LSB/C
// (0.49 C per LSB) and TS = 300 at 0 C. A code on a boundary takes the hotter
// range, so refresh errs on the fast side. Purely combinational.
`timescale 1ns/1ps
module temp_mapping_table
  import pvt_pkg::*;
#(
  parameter logic [10:0] TS_25C = 11'd351,
  parameter logic [10:0] TS_50C = 11'd402,
  parameter logic [10:0] TS_75C = 11'd453
) (
  input  logic [10:0] ts,
  output ctrl_e       ctrl
);

  always_comb begin
    if (ts >= TS_75C)      ctrl = CTRL_DIV1;
    else if (ts >= TS_50C) ctrl = CTRL_DIV2;
    else if (ts >= TS_25C) ctrl = CTRL_DIV4;
    else                   ctrl = CTRL_DIV8;
  end

endmodule
