// Testbench of the six-TSRO temperature sensor. Each TSRO gets its own stage
// delay; for every supply code V the count over a 10 us EN_TSRO window must
// match the edges of that TSRO alone (computed here from its period), and
// codes 6 and 7 must count nothing.
`timescale 1ns/1ps
module tsro_temp_sensor_tb;
  import pvt_pkg::*;
  localparam int STAGES = 21;
  int checks = 0, failures = 0;
  logic        en_tsro = 1'b0, reset_ctr = 1'b0;
  vcode_e      v = V_025;
  logic [31:0] tpd [NUM_TSRO] = '{400, 330, 280, 238, 200, 170};
  logic [11:0] t;

  tsro_temp_sensor dut (.en_tsro(en_tsro), .reset_ctr(reset_ctr), .v(v), .tsro_tpd_ps(tpd), .t(t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic measure(input int code);
    real half, expected;
    v = vcode_e'(code);
    #10ns reset_ctr = 1'b1;
    #10ns reset_ctr = 1'b0;
    en_tsro = 1'b1;
    #10000ns en_tsro = 1'b0;
    #50ns;
    if (code < NUM_TSRO) begin
      half = STAGES * real'(tpd[code]) / 1000.0;
      expected = $floor((10000.0 - half) / (2.0 * half)) + 1.0;
    end else expected = 0;
    check(int'(t) >= int'(expected) - 1 && int'(t) <= int'(expected) + 1,
          $sformatf("V=%0d: T=%0d expected %0.0f", code, t, expected));
  endtask

  initial begin
    for (int c = 0; c < 8; c++) measure(c);
    // same code, hotter die (faster ring) must count more
    tpd[3] = 32'd220;
    measure(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
