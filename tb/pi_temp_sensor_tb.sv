// Testbench of the process-invariant temperature sensor. For several
// sub-threshold ring speeds (standing for temperatures) it runs a conversion
// and compares TS with the number of sub-threshold ring edges that fit in
// 512 near-threshold periods, computed here from the two ring periods. It also
// checks RDY handling and that one conversion takes less than 1/45 kHz with a
// 28 MHz near-threshold ring and a 5 MHz control clock.
`timescale 1ns/1ps
module pi_temp_sensor_tb;
  localparam int NEAR_STAGES = 51, SB_STAGES = 13;
  localparam int NEAR_TPD = 350;
  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst = 1'b0, start = 1'b0;
  logic [31:0] near_tpd_ps = NEAR_TPD, sb_tpd_ps = 32'd2000;
  logic [10:0] ts;
  logic        rdy;

  pi_temp_sensor dut (.clk(clk), .rst(rst), .start(start), .near_tpd_ps(near_tpd_ps),
                      .sb_tpd_ps(sb_tpd_ps), .ts(ts), .rdy(rdy));

  always #100ns clk = ~clk;   // 5 MHz control clock

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic convert(input int sb_tpd);
    real tn, tsb, window, expected;
    realtime t0, t1;
    sb_tpd_ps = sb_tpd;
    tn  = 2.0 * NEAR_STAGES * NEAR_TPD;   // ps
    tsb = 2.0 * SB_STAGES * sb_tpd;
    window = 512.0 * tn;
    // rising edges of the sub-threshold ring at tsb/2 + k*tsb inside the window
    expected = $floor((window - tsb / 2.0) / tsb) + 1.0;
    @(negedge clk) start = 1'b1;
    t0 = $realtime;
    repeat (4) @(negedge clk);
    check(!rdy, "rdy cleared by a new conversion");
    @(posedge rdy);
    t1 = $realtime;
    check(int'(ts) >= int'(expected) - 1 && int'(ts) <= int'(expected) + 1,
          $sformatf("TS=%0d expected %0.1f (sb stage %0d ps)", ts, expected, sb_tpd));
    check(t1 - t0 < 22222ns, $sformatf("conversion time %0t exceeds 1/45 kHz", t1 - t0));
    start = 1'b0;
    repeat (4) @(negedge clk);
    check(rdy && int'(ts) >= int'(expected) - 1 && int'(ts) <= int'(expected) + 1, "TS and rdy hold after conversion");
  endtask

  initial begin
    #1ns rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(!rdy && ts == 0, $sformatf("reset state rdy=%b ts=%0d", rdy, ts));
    convert(2100);
    convert(1757);
    convert(1500);
    convert(1200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
