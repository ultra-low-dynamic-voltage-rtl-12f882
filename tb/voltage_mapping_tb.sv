// Testbench of the voltage mapping: for random PV and process codes the
// latched V must be the number of thresholds (60, 90, 120, 160, 200) reached
// by PV plus the process shift (+90 at code 7 down to 0 at code 16, in steps
// of 10, clamped outside), and V must only change on load.
`timescale 1ns/1ps
module voltage_mapping_tb;
  import pvt_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, reset = 1'b1, load = 1'b0;
  logic [8:0] pv = '0;
  logic [4:0] p = 5'd11;
  vcode_e     v;
  int         expected;

  voltage_mapping dut (.clk(clk), .reset(reset), .load(load), .pv(pv), .p(p), .v(v));

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_v(input int pv_i, input int p_i);
    int shift, sum, n;
    shift = (p_i <= 7) ? 90 : (p_i >= 16) ? 0 : 10 * (16 - p_i);
    sum = pv_i + shift;
    if (sum > 511) sum = 511;
    n = 0;
    if (sum >= 60)  n++;
    if (sum >= 90)  n++;
    if (sum >= 120) n++;
    if (sum >= 160) n++;
    if (sum >= 200) n++;
    return n;
  endfunction

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(v == V_050, "reset to 0.5 V code");
    reset = 1'b0;
    expected = 5;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i < 300) begin
        pv = 9'(i);           // sweep at varying corners
        p  = 5'(7 + (i % 10));
      end else begin
        pv = 9'($urandom);
        p  = 5'($urandom);
      end
      load = (i % 3 != 2);
      if (load) expected = ref_v(int'(pv), int'(p));
      @(posedge clk); #1ns;
      check(int'(v) == expected, $sformatf("PV=%0d P=%0d: V=%0d expected %0d", pv, p, v, expected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
