// Testbench of the temperature mapping table: every TS code is compared with
// the four temperature ranges of the refresh table, using boundary codes
// 351 (25 C), 402 (50 C) and 453 (75 C).
`timescale 1ns/1ps
module temp_mapping_table_tb;
  import pvt_pkg::*;
  int checks = 0, failures = 0;
  logic [10:0] ts;
  ctrl_e       ctrl;
  logic [1:0]  expected;

  temp_mapping_table dut (.ts(ts), .ctrl(ctrl));

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      ts = 11'(i);
      #1ns;
      if (i >= 453)      expected = 2'b11;
      else if (i >= 402) expected = 2'b10;
      else if (i >= 351) expected = 2'b01;
      else               expected = 2'b00;
      checks++;
      if (ctrl != expected) begin
        failures++;
        $display("FAIL: TS=%0d ctrl=%b expected %b", i, ctrl, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
