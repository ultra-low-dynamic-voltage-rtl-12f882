// Testbench of the fixed pulse width generator: the pulse set by START must
// last exactly 2^(N-1) oscillator periods, ignore a second START until N_rst,
// and restart after N_rst.
`timescale 1ns/1ps
module fixed_pulse_gen_tb;
  localparam int N = 10;
  localparam realtime TOSC = 10ns;
  int checks = 0, failures = 0;
  logic start = 1'b0, osc = 1'b0, n_rst = 1'b0, rst = 1'b0;
  logic q, qmsb;
  realtime t_rise, t_fall;

  fixed_pulse_gen #(.N(N)) dut (.start(start), .osc(osc), .n_rst(n_rst), .rst(rst), .q(q), .qmsb(qmsb));

  always #(TOSC/2) osc = ~osc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100us;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic one_pulse(input int k);
    #3ns start = 1'b1;
    t_rise = $realtime;
    #1ps;
    check(q == 1'b1, $sformatf("pulse %0d: q set by START", k));
    @(negedge q);
    t_fall = $realtime;
    check(t_fall - t_rise > (2**(N-1) - 1) * TOSC && t_fall - t_rise <= 2**(N-1) * TOSC,
          $sformatf("pulse %0d width %0t", k, t_fall - t_rise));
    check(qmsb == 1'b1, "qmsb set at end of pulse");
    start = 1'b0;
    #200ns;
    start = 1'b1;
    #1ps;
    check(q == 1'b0, "START ignored before N_rst");
    start = 1'b0;
    #20ns n_rst = 1'b1;
    #20ns n_rst = 1'b0;
    check(qmsb == 1'b0, "N_rst clears the counter");
    #50ns;
  endtask

  initial begin
    #1ns rst = 1'b1;
    #25ns rst = 1'b0;
    check(q == 1'b0 && qmsb == 1'b0, "reset state");
    one_pulse(1);
    one_pulse(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
