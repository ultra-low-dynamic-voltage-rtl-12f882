// Testbench of the refresh row counter: after reset the row is 0, it advances
// by one per CLK_REF edge and wraps from 127 to 0.
`timescale 1ns/1ps
module refresh_counter_tb;
  int checks = 0, failures = 0;
  logic       clk_ref = 1'b0, rst = 1'b0;
  logic [6:0] row;
  int         n = 0;

  refresh_counter dut (.clk_ref(clk_ref), .rst(rst), .row(row));

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1ns rst = 1'b1;
    #9ns;
    checks++; if (row != 0) begin failures++; $display("FAIL: reset row %0d", row); end
    rst = 1'b0;
    repeat (300) begin
      #10ns clk_ref = 1'b1; n++;
      #10ns clk_ref = 1'b0;
      checks++;
      if (int'(row) != n % 128) begin failures++; $display("FAIL: row %0d after %0d edges", row, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
