// Testbench of the behavioural ring oscillator. Three instances with the
// stage counts used in the design (13, 31 and 51) run from one stage delay.
// For each it checks: silence while disabled, the time of the first rising
// edge after enable (one half period, STAGES * tpd), the period and the duty
// cycle of the following edges, that a new stage delay takes effect, and that
// disabling stops the output low without a short extra pulse.
`timescale 1ns/1ps
module ring_osc_tb;
  localparam int NOSC = 3;
  localparam int STG [NOSC] = '{13, 31, 51};
  int checks = 0, failures = 0;
  logic        en = 1'b0;
  logic [31:0] tpd_ps = 32'd100;
  logic [NOSC-1:0] osc;

  ring_osc #(.STAGES(13)) dut13 (.en(en), .tpd_ps(tpd_ps), .osc(osc[0]));
  ring_osc #(.STAGES(31)) dut31 (.en(en), .tpd_ps(tpd_ps), .osc(osc[1]));
  ring_osc #(.STAGES(51)) dut51 (.en(en), .tpd_ps(tpd_ps), .osc(osc[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20us;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  // per-oscillator edge log
  realtime rise [NOSC][$];
  realtime fall [NOSC][$];
  for (genvar i = 0; i < NOSC; i++) begin : g_mon
    always @(posedge osc[i]) rise[i].push_back($realtime);
    always @(negedge osc[i]) fall[i].push_back($realtime);
  end

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 1ps) && (b - a < 1ps);
  endfunction

  task automatic run_at(input int tpd);
    realtime t_en, half;
    tpd_ps = tpd;
    foreach (rise[i]) begin rise[i].delete(); fall[i].delete(); end
    #10ns;
    check(osc == '0, "low while disabled");
    en = 1'b1; t_en = $realtime;
    #2us;
    for (int i = 0; i < NOSC; i++) begin
      half = STG[i] * tpd * 1ps;
      check(rise[i].size() > 4 && near(rise[i][0] - t_en, half),
            $sformatf("%0d stages: first edge at %0t, expected %0t", STG[i], rise[i][0] - t_en, half));
      check(near(rise[i][3] - rise[i][2], 2 * half),
            $sformatf("%0d stages: period %0t, expected %0t", STG[i], rise[i][3] - rise[i][2], 2 * half));
      check(near(fall[i][2] - rise[i][2], half), $sformatf("%0d stages: high phase", STG[i]));
    end
    en = 1'b0;
    #1us;
    check(osc == '0, "low after disable");
    for (int i = 0; i < NOSC; i++) begin
      // the last high phase is a full half period long
      half = STG[i] * tpd * 1ps;
      check(fall[i].size() == rise[i].size() &&
            fall[i][fall[i].size() - 1] - rise[i][rise[i].size() - 1] > half - 1ps,
            $sformatf("%0d stages: no short pulse at disable", STG[i]));
    end
    foreach (rise[i]) rise[i].delete();
    #1us;
    check(rise[0].size() == 0 && rise[1].size() == 0 && rise[2].size() == 0, "silent while disabled");
  endtask

  initial begin
    run_at(100);
    run_at(237);   // a new stage delay takes effect
    run_at(350);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
