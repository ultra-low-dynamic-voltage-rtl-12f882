// End-to-end testbench of the PVT sensor at a 400 kHz CLK.
//
// The ZTC ring speed stands for process and supply: during the process cycle
// after RESET it is set to a corner speed, and before each conversion it is
// set to a speed that stands for the supply of that conversion. Each TSRO has
// its own speed. For every conversion the testbench works out, from the ring
// periods alone, the PV count over one CLK cycle, the voltage code it maps to,
// the edge count of the selected TSRO over four CLK cycles and the
// compensated result, and compares V and T_OUT with them. It also checks that
// results come every 8 CLK cycles (50 kS/s at 400 kHz), that EN low pauses the
// sensor, and that a new RESET at another corner reloads P.
`timescale 1ns/1ps
module pvt_sensor_tb;
  import pvt_pkg::*;
  localparam realtime TCLK = 2500ns;
  localparam int ZTC_STAGES = 31, TSRO_STAGES = 21;
  int checks = 0, failures = 0;
  logic               clk = 1'b0, reset = 1'b0, en = 1'b0;
  logic [31:0]        ztc_tpd_ps = 32'd219;
  logic [31:0]        tsro_tpd_ps [NUM_TSRO] = '{400, 330, 280, 238, 200, 170};
  logic [4:0]         p;
  vcode_e             v;
  logic               p_done;
  logic [11:0]        t;
  logic signed [12:0] t_out;
  logic               t_valid;
  int                 VTH [5] = '{60, 90, 120, 160, 200};
  int                 voffs [NUM_TSRO] = '{0, 24, 48, 72, 96, 120};
  realtime            last_valid = 0;

  pvt_sensor dut (.clk(clk), .reset(reset), .en(en), .ztc_tpd_ps(ztc_tpd_ps), .tsro_tpd_ps(tsro_tpd_ps),
                  .p(p), .v(v), .p_done(p_done), .t(t), .t_out(t_out), .t_valid(t_valid));

  always #(TCLK / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #5ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // rising edges of a ring with the given stage count and delay in a window
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

  task automatic start_corner(input int corner_tpd, input int exp_p);
    int pv;
    @(negedge clk);
    en = 1'b0;
    reset = 1'b1;
    ztc_tpd_ps = corner_tpd;
    repeat (3) @(negedge clk);
    check(p_done, "P_DONE high while in reset");
    en = 1'b1;
    reset = 1'b0;
    @(posedge clk); #1ns;
    check(!p_done, "P_DONE low during process sensing");
    @(posedge p_done);
    @(posedge clk); #1ns;
    pv = edges(ZTC_STAGES, corner_tpd, TCLK);
    check(int'(p) == (pv >> 4), $sformatf("P=%0d expected %0d (PV %0d)", p, pv >> 4, pv));
    check(int'(p) == exp_p, $sformatf("P=%0d expected corner code %0d", p, exp_p));
  endtask

  // one conversion: supply speed for the ZTC ring, then wait for the result
  task automatic convert(input int supply_tpd, input int exp_v);
    int pv, ev, et;
    ztc_tpd_ps = supply_tpd;
    pv = edges(ZTC_STAGES, supply_tpd, TCLK);
    ev = map_v(pv, int'(p));
    check(ev == exp_v, $sformatf("stimulus gives V=%0d, wanted %0d", ev, exp_v));
    // the result is flagged in counter state 1 of the next conversion, while the
    // ZTC ring is idle, so the next supply speed can be set right after it
    do begin @(posedge clk); #1ns; end while (!t_valid);
    check(int'(v) == ev, $sformatf("V=%0d expected %0d (PV %0d, P %0d)", v, ev, pv, p));
    // the counter is cleared again in the cycle the result appears, so the
    // raw count is checked through T_OUT
    et = edges(TSRO_STAGES, int'(tsro_tpd_ps[ev]), 4 * TCLK) + 40 * (11 - int'(p)) - voffs[ev];
    check(int'(t_out) >= et - 1 && int'(t_out) <= et + 1,
          $sformatf("T_OUT=%0d expected %0d (TSRO %0d, P %0d)", t_out, et, ev, p));
    if (last_valid != 0)
      check($realtime - last_valid > 8 * TCLK - 1ns && $realtime - last_valid < 8 * TCLK + 1ns,
            $sformatf("conversion period %0t, expected 8 CLK", $realtime - last_valid));
    last_valid = $realtime;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    start_corner(219, int'(P_TT));
    // first conversion starts right after the process cycle
    convert(202, 5);
    convert(310, 4);
    convert(448, 3);
    convert(733, 2);
    convert(1613, 1);
    convert(8064, 0);
    convert(202, 5);
    // EN low pauses, EN high resumes with a fresh counter reset
    @(negedge clk) en = 1'b0;
    begin
      int n_valid;
      n_valid = 0;
      repeat (20) begin @(posedge clk); #1ns; if (t_valid) n_valid++; end
      check(n_valid == 0, $sformatf("%0d results while EN is low", n_valid));
    end
    en = 1'b1;
    last_valid = 0;
    convert(448, 3);
    // slow corner: PV[8:4] = 7 and a larger shift
    last_valid = 0;
    start_corner(340, int'(P_SS));
    convert(700, 3);
    convert(240, 5);
    // fast corner
    last_valid = 0;
    start_corner(154, int'(P_FF));
    convert(224, 4);
    convert(384, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
