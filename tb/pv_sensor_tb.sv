// Testbench of the process/voltage sensor: with EN_ZTC high for one 2.5 us
// CLK cycle, PV must equal the number of ZTC-ring rising edges in that window
// (computed here from the stage delay and the 31 stages), RESET_CTR must clear
// it, and PV[8:4] must read the typical-corner code 11 at the nominal speed.
`timescale 1ns/1ps
module pv_sensor_tb;
  int checks = 0, failures = 0;
  logic        en_ztc = 1'b0, reset_ctr = 1'b0;
  logic [31:0] ztc_tpd_ps = 32'd219;
  logic [8:0]  pv;

  pv_sensor dut (.en_ztc(en_ztc), .reset_ctr(reset_ctr), .ztc_tpd_ps(ztc_tpd_ps), .pv(pv));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic sense(input int tpd, input int exp_p);
    real half, expected;
    ztc_tpd_ps = tpd;
    half = 31.0 * tpd / 1000.0;   // ns
    expected = $floor((2500.0 - half) / (2.0 * half)) + 1.0;
    #10ns reset_ctr = 1'b1;
    #10ns reset_ctr = 1'b0;
    check(pv == 0, "RESET_CTR clears PV");
    en_ztc = 1'b1;
    #2500ns en_ztc = 1'b0;
    #50ns;
    check(int'(pv) >= int'(expected) - 1 && int'(pv) <= int'(expected) + 1,
          $sformatf("PV=%0d expected %0.0f at %0d ps/stage", pv, expected, tpd));
    if (exp_p >= 0) check(int'(pv[8:4]) == exp_p, $sformatf("PV[8:4]=%0d expected %0d", pv[8:4], exp_p));
    #500ns;
    check(int'(pv) >= int'(expected) - 1 && int'(pv) <= int'(expected) + 1, "PV holds while EN_ZTC is low");
  endtask

  initial begin
    sense(219, 11);   // typical corner
    sense(340, 7);    // slow corner
    sense(154, 16);   // fast corner
    sense(600, -1);   // low supply
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
