// Testbench of the refresh row decoder: for every row, exactly that word line
// is high while CLK_REF is low and none while it is high.
`timescale 1ns/1ps
module row_decoder_tb;
  int checks = 0, failures = 0;
  logic [6:0]   row;
  logic         clk_ref;
  logic [127:0] wl;

  row_decoder dut (.row(row), .clk_ref(clk_ref), .wl(wl));

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < 128; r++) begin
      row = 7'(r);
      clk_ref = 1'b0; #1ns;
      checks++;
      if (wl != (128'd1 << r)) begin failures++; $display("FAIL: row %0d low phase", r); end
      clk_ref = 1'b1; #1ns;
      checks++;
      if (wl != '0) begin failures++; $display("FAIL: row %0d high phase", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
