// Testbench of the refresh clock generator: for each Ctrl code the CLK_REF
// period must be 1, 2, 4 or 8 CLK_IN periods (20, 10, 5, 2.5 MHz from 20 MHz),
// and across random code changes CLK_REF must never show a high or low phase
// shorter than half a CLK_IN period.
`timescale 1ns/1ps
module refresh_clk_gen_tb;
  import pvt_pkg::*;
  localparam realtime TIN = 50ns;
  int checks = 0, failures = 0;
  logic  clk_in = 1'b0, rst = 1'b0;
  ctrl_e ctrl = CTRL_DIV1;
  logic  clk_ref;
  realtime last_edge = 0, last_rise = 0, period = 0;
  int    short_phases = 0;

  refresh_clk_gen dut (.clk_in(clk_in), .rst(rst), .ctrl(ctrl), .clk_ref(clk_ref));

  always #(TIN/2) clk_in = ~clk_in;

  always @(clk_ref) begin
    if (!rst && $realtime > 100ns && $realtime - last_edge < TIN/2 - 1ps) begin
      short_phases++;
      $display("short phase at %0t after %0t, sel %b", $realtime, $realtime - last_edge, dut.sel);
    end
    last_edge = $realtime;
    if (clk_ref) begin
      period = $realtime - last_rise;
      last_rise = $realtime;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic measure(input ctrl_e c, input int div);
    ctrl = c;
    repeat (20) @(posedge clk_in);
    repeat (3) begin
      @(posedge clk_ref); #1ps;
      check(period > div * TIN - 1ps && period < div * TIN + 1ps, $sformatf("ctrl=%b period %0t expected %0t", c, period, div * TIN));
    end
  endtask

  initial begin
    #1ns rst = 1'b1;
    #60ns rst = 1'b0;
    measure(CTRL_DIV1, 1);
    measure(CTRL_DIV2, 2);
    measure(CTRL_DIV4, 4);
    measure(CTRL_DIV8, 8);
    measure(CTRL_DIV2, 2);
    measure(CTRL_DIV1, 1);
    for (int i = 0; i < 40; i++) begin
      #($urandom_range(1, 400) * 1ns);
      ctrl = ctrl_e'($urandom_range(0, 3));
    end
    repeat (20) @(posedge clk_in);
    check(short_phases == 0, $sformatf("%0d short CLK_REF phases", short_phases));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
