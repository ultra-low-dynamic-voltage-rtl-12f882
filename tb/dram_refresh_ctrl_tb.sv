// End-to-end testbench of the temperature-aware refresh controller.
//
// For four die temperatures (one per refresh range) it sets the sub-threshold
// ring speed so that the sensor reads about 320, 380, 430 and 480, starts a
// conversion, and checks: the refresh code chosen (00, 01, 10, 11), the
// CLK_REF period (8, 4, 2, 1 CLK_IN periods of 50 ns), the time between two
// refreshes of the same word line (128 CLK_REF periods: 51.2, 25.6, 12.8 and
// 6.4 us), that rows advance by one on every CLK_REF edge, and that at most
// one word line is ever high and it is the addressed row.
`timescale 1ns/1ps
module dram_refresh_ctrl_tb;
  import pvt_pkg::*;
  localparam int NEAR_TPD = 350;
  int checks = 0, failures = 0;
  logic         clk_in = 1'b0, clk = 1'b0, rst = 1'b0, start = 1'b0;
  logic [31:0]  near_tpd_ps = NEAR_TPD, sb_tpd_ps = 32'd2000;
  logic [10:0]  ts;
  logic         rdy;
  ctrl_e        ctrl;
  logic         clk_ref;
  logic [6:0]   row, prev_row;
  logic [127:0] wl;
  int           row_errors = 0, wl_errors = 0;
  realtime      wl5_interval = 0;
  bit           seen_row = 1'b0;

  dram_refresh_ctrl dut (.clk_in(clk_in), .clk(clk), .rst(rst), .start(start),
    .near_tpd_ps(near_tpd_ps), .sb_tpd_ps(sb_tpd_ps), .ts(ts), .rdy(rdy),
    .ctrl(ctrl), .clk_ref(clk_ref), .row(row), .wl(wl));

  always #25ns  clk_in = ~clk_in;  // 20 MHz
  always #100ns clk    = ~clk;     // 5 MHz

  // row must step by one on each CLK_REF edge
  always @(posedge clk_ref) begin
    #1ps;
    if (!rst) begin
      if (seen_row && row != 7'(prev_row + 1)) row_errors++;
      prev_row = row;
      seen_row = 1'b1;
    end else seen_row = 1'b0;
  end

  always @(wl) begin
    #1ps;
    if (!rst && wl != '0 && wl != (128'd1 << row)) wl_errors++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run_temp(input int ts_target, input logic [1:0] exp_ctrl, input int div);
    realtime t0;
    // TS = 512 * f_sb / f_near = 512 * 51 * tpd_near / (13 * tpd_sb)
    sb_tpd_ps = 32'(512 * 51 * NEAR_TPD / (13 * ts_target));
    @(negedge clk) start = 1'b1;
    repeat (4) @(negedge clk);
    start = 1'b0;
    @(posedge rdy);
    check(int'(ts) >= ts_target - 2 && int'(ts) <= ts_target + 2,
          $sformatf("TS=%0d expected about %0d", ts, ts_target));
    repeat (12) @(posedge clk_in);
    check(ctrl == exp_ctrl, $sformatf("ctrl=%b expected %b for TS=%0d", ctrl, exp_ctrl, ts));
    // let the new rate settle for a whole refresh round, then time one round
    @(posedge wl[5]);
    @(posedge wl[5]); t0 = $realtime;
    @(posedge wl[5]); wl5_interval = $realtime - t0;
    check(wl5_interval > 128 * div * 50ns - 1ns && wl5_interval < 128 * div * 50ns + 1ns,
          $sformatf("row refresh interval %0t expected %0t", wl5_interval, 128 * div * 50ns));
    @(posedge clk_ref); t0 = $realtime;
    @(posedge clk_ref);
    check($realtime - t0 > div * 50ns - 1ps && $realtime - t0 < div * 50ns + 1ps,
          $sformatf("CLK_REF period %0t expected %0t", $realtime - t0, div * 50ns));
  endtask

  initial begin
    #1ns rst = 1'b1;
    #300ns rst = 1'b0;
    repeat (6) @(posedge clk);
    check(ctrl == CTRL_DIV1, "fastest refresh before the first conversion");
    run_temp(320, 2'b00, 8);
    run_temp(480, 2'b11, 1);
    run_temp(380, 2'b01, 4);
    run_temp(430, 2'b10, 2);
    check(row_errors == 0, $sformatf("%0d row sequence errors", row_errors));
    check(wl_errors == 0, $sformatf("%0d word-line errors", wl_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
