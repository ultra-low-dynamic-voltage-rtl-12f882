// Testbench of the PV compensation: for random T, P and V the latched T_OUT
// must equal T + 40*(11 - P) - offset(V) with offsets 0, 24, 48, 72, 96, 120
// for V = 0..5 and none for 6 and 7, in 13-bit two's complement; valid must
// pulse the cycle after each load and T_OUT must hold otherwise.
`timescale 1ns/1ps
module pv_compensation_tb;
  import pvt_pkg::*;
  int checks = 0, failures = 0;
  logic               clk = 1'b0, reset = 1'b1, load = 1'b0;
  logic [11:0]        t = '0;
  logic [4:0]         p = 5'd11;
  vcode_e             v = V_050;
  logic signed [12:0] t_out, expected;
  logic               valid;
  int                 voffs [8] = '{0, 24, 48, 72, 96, 120, 0, 0};

  pv_compensation dut (.clk(clk), .reset(reset), .load(load), .t(t), .p(p), .v(v), .t_out(t_out), .valid(valid));

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(t_out == 0 && !valid, "reset state");
    reset = 1'b0;
    expected = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      t = 12'($urandom);
      p = 5'($urandom_range(0, 31));
      v = vcode_e'($urandom_range(0, 7));
      load = ($urandom_range(0, 1) == 1);
      if (load) expected = 13'(int'(t) + 40 * (11 - int'(p)) - voffs[int'(v)]);
      @(posedge clk); #1ns;
      check(t_out == expected && valid == load,
            $sformatf("T=%0d P=%0d V=%0d: T_OUT=%0d expected %0d valid=%b", t, p, v, t_out, expected, valid));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
