// Testbench of the process register: resets to the typical code 11, loads
// PV[8:4] only on load, and holds it while PV keeps changing.
`timescale 1ns/1ps
module process_register_tb;
  int checks = 0, failures = 0;
  logic       clk = 1'b0, reset = 1'b1, load = 1'b0;
  logic [4:0] pv_hi = '0, p, expected;

  process_register dut (.clk(clk), .reset(reset), .load(load), .pv_hi(pv_hi), .p(p));

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100us;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(p == 5'd11, "reset value is the typical code");
    reset = 1'b0;
    expected = 5'd11;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      pv_hi = 5'($urandom);
      load  = ($urandom_range(0, 7) == 0);
      if (load) expected = pv_hi;
      @(posedge clk); #1ns;
      check(p == expected, $sformatf("P=%0d expected %0d", p, expected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
