// Testbench of the process-invariant sensor's control unit: drives the pulse q
// and checks, cycle by cycle, S_rst, PW, N_rst and RDY against the sequence
// S_rst (1 cycle) -> PW until q low -> N_rst (1 cycle) -> RDY after RDY_DELAY.
`timescale 1ns/1ps
module pi_control_unit_tb;
  localparam int RDY_DELAY = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b0, q = 1'b0;
  logic s_rst, pw, n_rst, rdy;

  pi_control_unit #(.RDY_DELAY(RDY_DELAY)) dut (.clk(clk), .rst(rst), .q(q), .s_rst(s_rst), .pw(pw), .n_rst(n_rst), .rdy(rdy));

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #50us;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // cycle index after q rises at which each output must be seen (sampled
  // just after the clock edge): q is synchronised by two flops and edge
  // detected, so s_rst comes on the 3rd edge
  task automatic conversion(input int pw_cycles);
    int c;
    @(negedge clk) q = 1'b1;
    for (c = 1; c <= 3; c++) begin
      @(posedge clk); #1ns;
      if (c < 3) check(!s_rst && !pw, $sformatf("idle before s_rst, cycle %0d", c));
    end
    check(s_rst && !pw && !rdy, "s_rst for one cycle, rdy low");
    @(posedge clk); #1ns;
    check(!s_rst && pw, "pw after s_rst");
    repeat (pw_cycles) begin @(posedge clk); #1ns; check(pw && !n_rst, "pw held while q high"); end
    @(negedge clk) q = 1'b0;
    // q low seen after two sync flops; pw drops and n_rst pulses on the 3rd edge
    @(posedge clk); #1ns; check(pw, "pw still high (sync 1)");
    @(posedge clk); #1ns; check(pw, "pw still high (sync 2)");
    @(posedge clk); #1ns; check(!pw && n_rst && !rdy, $sformatf("pw low, n_rst pulse: pw=%b n_rst=%b rdy=%b", pw, n_rst, rdy));
    @(posedge clk); #1ns; check(!n_rst && !rdy, "n_rst one cycle");
    for (c = 1; c < RDY_DELAY; c++) begin @(posedge clk); #1ns; check(!rdy, "rdy waits"); end
    @(posedge clk); #1ns; check(rdy, "rdy after RDY_DELAY");
    repeat (3) begin @(posedge clk); #1ns; check(rdy && !pw && !s_rst, "rdy holds, idle"); end
  endtask

  initial begin
    #1ns rst = 1'b1;
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    check(!pw && !rdy && !s_rst && !n_rst, "reset state");
    for (int c = 0; c < 3; c++) begin
      @(posedge clk); #1ns;
      check(s_rst && n_rst && !pw, "power-on clear");
    end
    @(posedge clk); #1ns;
    check(!s_rst && !n_rst, "power-on clear ends");
    conversion(5);
    conversion(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
