// Temperature-aware refresh controller of one DRAM sub-block.
//
// DRAM cells leak faster when hot, so the refresh rate only needs to be high
// when the die is hot. This controller measures the sub-block temperature with
// the 0.4 V process-invariant sensor, maps the code to one of four refresh
// rates, divides the 20 MHz CLK_IN accordingly and steps a row counter and
// decoder so that each of the 128 word lines is refreshed once every 128
// CLK_REF periods:
//     75-100 C: 20 MHz -> 6.4 us    50-75 C: 10 MHz -> 12.8 us
//     25-50 C : 5 MHz  -> 25.6 us   0-25 C : 2.5 MHz -> 51.2 us
// (row refresh interval). The chain and the rates follow the original design.
// The level shifter between the 0.4 V sensor and the 1.2 V logic has no logic
// function and is a plain connection here.
//
// The refresh-rate code is taken from the mapping table when rdy rises, after
// rdy has been brought into the CLK_IN domain by two flip-flops; until the
// first conversion it is 11 (fastest, always safe). These are this design's
// choices.
//
// Interface: clk_in (CLK_IN), clk (sensor control clock), rst (active high),
// start (conversion request), near_tpd_ps / sb_tpd_ps (simulation stimuli of
// the two ring models). Outputs: ts and rdy of the sensor, the code ctrl in
// use, clk_ref, row and the word lines wl.
`timescale 1ns/1ps
module dram_refresh_ctrl
  import pvt_pkg::*;
#(
  parameter int unsigned ROWS_LOG2 = 7,
  parameter logic [10:0] TS_25C    = 11'd351,
  parameter logic [10:0] TS_50C    = 11'd402,
  parameter logic [10:0] TS_75C    = 11'd453
) (
  input  logic                    clk_in,
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [31:0]             near_tpd_ps,
  input  logic [31:0]             sb_tpd_ps,
  output logic [10:0]             ts,
  output logic                    rdy,
  output ctrl_e                   ctrl,
  output logic                    clk_ref,
  output logic [ROWS_LOG2-1:0]    row,
  output logic [2**ROWS_LOG2-1:0] wl
);

  ctrl_e      ctrl_map;
  logic [2:0] rdy_sync;

  pi_temp_sensor u_sensor (
    .clk(clk), .rst(rst), .start(start),
    .near_tpd_ps(near_tpd_ps), .sb_tpd_ps(sb_tpd_ps),
    .ts(ts), .rdy(rdy)
  );

  temp_mapping_table #(.TS_25C(TS_25C), .TS_50C(TS_50C), .TS_75C(TS_75C)) u_map (
    .ts(ts), .ctrl(ctrl_map)
  );

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      rdy_sync <= '0;
      ctrl     <= CTRL_DIV1;
    end else begin
      rdy_sync <= {rdy_sync[1:0], rdy};
      if (rdy_sync[1] && !rdy_sync[2]) ctrl <= ctrl_map;
    end
  end

  refresh_clk_gen u_clkgen (.clk_in(clk_in), .rst(rst), .ctrl(ctrl), .clk_ref(clk_ref));

  refresh_counter #(.ROWS_LOG2(ROWS_LOG2)) u_rowcnt (.clk_ref(clk_ref), .rst(rst), .row(row));

  row_decoder #(.ROWS_LOG2(ROWS_LOG2)) u_rowdec (.row(row), .clk_ref(clk_ref), .wl(wl));

endmodule
