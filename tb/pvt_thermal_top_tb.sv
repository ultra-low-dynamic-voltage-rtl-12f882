// End-to-end testbench of the whole design at its default parameters.
//
// Two threads run side by side:
//  - PVT sensor, 400 kHz CLK: process sensing at the typical and slow corners,
//    then a sweep of the supply (ZTC ring speed) so that every supply code and
//    so every TSRO is used; each compensated result is compared with a value
//    worked out from the ring periods, and a pause with EN low is checked.
//  - Refresh controller, 5 MHz sensor CLK and 20 MHz CLK_IN: four conversions
//    at die temperatures in each of the four ranges, each checked for the
//    chosen code, the CLK_REF period and the interval between two refreshes of
//    one word line (128 CLK_REF periods).
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module pvt_thermal_top_tb;
  import pvt_pkg::*;
  localparam realtime TCLK = 2500ns;
  localparam int ZTC_STAGES = 31, TSRO_STAGES = 21, NEAR_STAGES = 51, SB_STAGES = 13;
  localparam int NEAR_TPD = 350;
  int checks = 0, failures = 0;

  // PVT sensor side
  logic               pvt_clk = 1'b0, pvt_reset = 1'b0, pvt_en = 1'b0;
  logic [31:0]        pvt_ztc_tpd_ps = 32'd219;
  logic [31:0]        pvt_tsro_tpd_ps [NUM_TSRO] = '{400, 330, 280, 238, 200, 170};
  logic               pvt_p_done, pvt_t_valid;
  logic [4:0]         pvt_p;
  logic [11:0]        pvt_t;
  vcode_e             pvt_v;
  logic signed [12:0] pvt_t_out;

  // refresh side
  logic         ref_clk_in = 1'b0, ref_clk = 1'b0, ref_rst = 1'b0, ref_start = 1'b0;
  logic [31:0]  ref_near_tpd_ps = NEAR_TPD, ref_sb_tpd_ps = 32'd2000;
  logic [10:0]  ref_ts;
  logic         ref_rdy, ref_clk_ref;
  ctrl_e        ref_ctrl;
  logic [6:0]   ref_row;
  logic [127:0] ref_wl;

  // mechanism counters
  int n_process = 0, n_conv = 0, n_pause = 0;
  int v_seen [NUM_TSRO] = '{default: 0};
  int n_ts_conv = 0, n_rate_switch = 0, n_row_wrap = 0, n_refresh = 0;
  int ctrl_seen [4] = '{default: 0};
  int row_errors = 0, wl_errors = 0;
  logic [6:0] prev_row = '0;
  bit seen_row = 1'b0;
  ctrl_e prev_ctrl = CTRL_DIV1;
  int VTH [5] = '{60, 90, 120, 160, 200};
  int voffs [NUM_TSRO] = '{0, 24, 48, 72, 96, 120};
  realtime last_valid = 0;

  pvt_thermal_top dut (
    .pvt_clk(pvt_clk), .pvt_reset(pvt_reset), .pvt_en(pvt_en),
    .pvt_ztc_tpd_ps(pvt_ztc_tpd_ps), .pvt_tsro_tpd_ps(pvt_tsro_tpd_ps),
    .pvt_p_done(pvt_p_done), .pvt_p(pvt_p), .pvt_t(pvt_t), .pvt_v(pvt_v),
    .pvt_t_out(pvt_t_out), .pvt_t_valid(pvt_t_valid),
    .ref_clk_in(ref_clk_in), .ref_clk(ref_clk), .ref_rst(ref_rst), .ref_start(ref_start),
    .ref_near_tpd_ps(ref_near_tpd_ps), .ref_sb_tpd_ps(ref_sb_tpd_ps),
    .ref_ts(ref_ts), .ref_rdy(ref_rdy), .ref_ctrl(ref_ctrl), .ref_clk_ref(ref_clk_ref),
    .ref_row(ref_row), .ref_wl(ref_wl)
  );

  always #(TCLK / 2) pvt_clk = ~pvt_clk;  // 400 kHz
  always #25ns  ref_clk_in = ~ref_clk_in;  // 20 MHz
  always #100ns ref_clk    = ~ref_clk;     // 5 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #3ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- refresh monitors ----------------
  always @(posedge ref_clk_ref) begin
    #1ps;
    if (!ref_rst) begin
      if (seen_row && ref_row != 7'(prev_row + 1)) row_errors++;
      if (seen_row && prev_row == 7'd127 && ref_row == 7'd0) n_row_wrap++;
      prev_row = ref_row;
      seen_row = 1'b1;
    end else seen_row = 1'b0;
  end

  always @(ref_wl) begin
    #1ps;
    if (!ref_rst && ref_wl != '0 && ref_wl != (128'd1 << ref_row)) wl_errors++;
  end

  always @(posedge ref_wl[0]) if (!ref_rst) n_refresh++;

  always @(posedge ref_clk_in) if (!ref_rst) begin
    if (ref_ctrl != prev_ctrl) n_rate_switch++;
    prev_ctrl = ref_ctrl;
  end

  // ---------------- PVT helpers ----------------
  function automatic int edges(input int stages, input int tpd, input realtime window);
    real half;
    half = stages * real'(tpd) / 1000.0;
    return int'($floor((window / 1ns - half) / (2.0 * half))) + 1;
  endfunction

  function automatic int map_v(input int pv, input int pc);
    int sum, n;
    sum = pv + ((pc <= 7) ? 90 : (pc >= 16) ? 0 : 10 * (16 - pc));
    n = 0;
    foreach (VTH[i]) if (sum >= VTH[i]) n++;
    return n;
  endfunction

  task automatic pvt_corner(input int corner_tpd, input int exp_p);
    @(negedge pvt_clk);
    pvt_en = 1'b0;
    pvt_reset = 1'b1;
    pvt_ztc_tpd_ps = corner_tpd;
    repeat (3) @(negedge pvt_clk);
    pvt_en = 1'b1;
    pvt_reset = 1'b0;
    @(posedge pvt_p_done);
    @(posedge pvt_clk); #1ns;
    check(int'(pvt_p) == exp_p, $sformatf("P=%0d expected %0d", pvt_p, exp_p));
    if (int'(pvt_p) == exp_p) n_process++;
    last_valid = 0;
  endtask

  task automatic pvt_convert(input int supply_tpd);
    int ev, et;
    pvt_ztc_tpd_ps = supply_tpd;
    ev = map_v(edges(ZTC_STAGES, supply_tpd, TCLK), int'(pvt_p));
    // the result is flagged in counter state 1 of the next conversion, while the
    // ZTC ring is idle, so the next supply speed can be set right after it
    do begin @(posedge pvt_clk); #1ns; end while (!pvt_t_valid);
    check(int'(pvt_v) == ev, $sformatf("V=%0d expected %0d", pvt_v, ev));
    et = edges(TSRO_STAGES, int'(pvt_tsro_tpd_ps[ev]), 4 * TCLK) + 40 * (11 - int'(pvt_p)) - voffs[ev];
    check(int'(pvt_t_out) >= et - 1 && int'(pvt_t_out) <= et + 1,
          $sformatf("T_OUT=%0d expected %0d", pvt_t_out, et));
    if (last_valid != 0)
      check($realtime - last_valid > 8 * TCLK - 1ns && $realtime - last_valid < 8 * TCLK + 1ns,
            "one result every 8 CLK cycles");
    last_valid = $realtime;
    n_conv++;
    if (int'(pvt_v) < NUM_TSRO) v_seen[int'(pvt_v)]++;
  endtask

  // ---------------- refresh helper ----------------
  task automatic ref_temp(input int ts_target, input ctrl_e exp_ctrl, input int div);
    realtime t0, dt;
    ref_sb_tpd_ps = 32'(512 * NEAR_STAGES * NEAR_TPD / (SB_STAGES * ts_target));
    @(negedge ref_clk) ref_start = 1'b1;
    repeat (4) @(negedge ref_clk);
    ref_start = 1'b0;
    @(posedge ref_rdy);
    n_ts_conv++;
    check(int'(ref_ts) >= ts_target - 2 && int'(ref_ts) <= ts_target + 2,
          $sformatf("TS=%0d expected about %0d", ref_ts, ts_target));
    repeat (12) @(posedge ref_clk_in);
    check(ref_ctrl == exp_ctrl, $sformatf("ctrl=%b expected %b", ref_ctrl, exp_ctrl));
    ctrl_seen[int'(ref_ctrl)]++;
    @(posedge ref_wl[9]);
    @(posedge ref_wl[9]); t0 = $realtime;
    @(posedge ref_wl[9]); dt = $realtime - t0;
    check(dt > 128 * div * 50ns - 1ns && dt < 128 * div * 50ns + 1ns,
          $sformatf("word line refreshed every %0t, expected %0t", dt, 128 * div * 50ns));
  endtask

  initial begin
    fork
      begin : pvt_thread
        repeat (3) @(negedge pvt_clk);
        pvt_corner(219, int'(P_TT));
        pvt_convert(202);    // V = 5
        pvt_convert(310);    // V = 4
        pvt_convert(448);    // V = 3
        pvt_convert(733);    // V = 2
        pvt_convert(1613);   // V = 1
        pvt_convert(8064);   // V = 0
        // pause
        @(negedge pvt_clk) pvt_en = 1'b0;
        begin
          int n_valid;
          n_valid = 0;
          repeat (20) begin @(posedge pvt_clk); #1ns; if (pvt_t_valid) n_valid++; end
          check(n_valid == 0, $sformatf("%0d results while EN is low", n_valid));
          if (n_valid == 0) n_pause++;
        end
        @(negedge pvt_clk) pvt_en = 1'b1;
        last_valid = 0;
        pvt_convert(202);
        // die heats: the faster TSRO must give a larger result
        pvt_tsro_tpd_ps[5] = 32'd150;
        pvt_convert(202);
        pvt_corner(340, int'(P_SS));
        pvt_convert(700);
        pvt_convert(240);
      end
      begin : refresh_thread
        #1ns ref_rst = 1'b1;
        #300ns ref_rst = 1'b0;
        repeat (6) @(posedge ref_clk);
        ref_temp(320, CTRL_DIV8, 8);   //  0..25 C  -> 2.5 MHz
        ref_temp(480, CTRL_DIV1, 1);   // 75..100 C -> 20 MHz
        ref_temp(380, CTRL_DIV4, 4);   // 25..50 C  -> 5 MHz
        ref_temp(430, CTRL_DIV2, 2);   // 50..75 C  -> 10 MHz
      end
    join

    check(row_errors == 0, $sformatf("%0d row sequence errors", row_errors));
    check(wl_errors == 0, $sformatf("%0d word-line errors", wl_errors));
    $display("mechanisms: process=%0d conversions=%0d pause=%0d V0..5=%0d,%0d,%0d,%0d,%0d,%0d",
             n_process, n_conv, n_pause, v_seen[0], v_seen[1], v_seen[2], v_seen[3], v_seen[4], v_seen[5]);
    $display("mechanisms: ts_conversions=%0d rate_switches=%0d row_wraps=%0d row0_refreshes=%0d ctrl00..11=%0d,%0d,%0d,%0d",
             n_ts_conv, n_rate_switch, n_row_wrap, n_refresh, ctrl_seen[0], ctrl_seen[1], ctrl_seen[2], ctrl_seen[3]);
    check(n_process >= 2, "process sensing at two corners");
    check(n_conv > 0, "PVT conversions");
    check(n_pause > 0, "EN pause");
    foreach (v_seen[i]) check(v_seen[i] > 0, $sformatf("supply code %0d (TSRO %0d) used", i, i));
    check(n_ts_conv >= 4, "temperature conversions for refresh");
    check(n_rate_switch >= 4, "refresh rate switches");
    check(n_row_wrap > 0, "row counter wrap");
    check(n_refresh > 0, "word-line refreshes");
    foreach (ctrl_seen[i]) check(ctrl_seen[i] > 0, $sformatf("refresh code %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
