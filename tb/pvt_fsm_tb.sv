// Testbench of the PVT sensor sequencer. A reference sequence written out
// here is compared cycle by cycle with the outputs: one cycle of process
// sensing after RESET (en_ztc high, p_done low), a process-register load the
// cycle after, then while EN is high the 8-cycle loop compensation (state 0;
// no load on the first pass) / reset-counters / voltage sensing / voltage
// mapping / four temperature cycles. EN low must stop the loop at once, a
// conversion that finished its temperature cycles must still be compensated
// when EN falls in the compensation cycle, and EN high must restart the loop.
`timescale 1ns/1ps
module pvt_fsm_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b0, en = 1'b0;
  logic en_ztc, en_tsro, reset_ctr, p_done, p_load, v_load, t_load;

  pvt_fsm dut (.clk(clk), .reset(reset), .en(en), .en_ztc(en_ztc), .en_tsro(en_tsro),
               .reset_ctr(reset_ctr), .p_done(p_done), .p_load(p_load), .v_load(v_load), .t_load(t_load));

  always #1250ns clk = ~clk;  // 400 kHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #2ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // expected outputs {en_ztc, en_tsro, reset_ctr, p_done, p_load, v_load, t_load}
  // for counter state ph; first = no conversion precedes this state 0
  function automatic logic [6:0] loop_vec(input int ph, input bit first = 1'b0);
    case (ph)
      0: return first ? 7'b0001000 : 7'b0001001;
      1: return 7'b0011000;
      2: return 7'b1001000;
      3: return 7'b0001010;
      4, 5, 6, 7: return 7'b0101000;
      default: return 7'bx;
    endcase
  endfunction

  function automatic logic [6:0] outs();
    return {en_ztc, en_tsro, reset_ctr, p_done, p_load, v_load, t_load};
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b1;
    en = 1'b1;
    repeat (4) @(negedge clk);
    check(reset_ctr && !en_ztc && !en_tsro && p_done, "held in reset");
    reset = 1'b0;
    @(posedge clk); #1ns;
    check(outs() == 7'b1000000, $sformatf("process sensing cycle: %b", outs()));
    @(posedge clk); #1ns;
    check(outs() == 7'b0001100, $sformatf("process load cycle: %b", outs()));
    for (int k = 0; k < 24; k++) begin
      @(posedge clk); #1ns;
      check(outs() == loop_vec(k % 8, k == 0), $sformatf("loop cycle %0d: %b expected %b", k, outs(), loop_vec(k % 8, k == 0)));
    end
    // EN falls during state 3: the sensor idles at once
    repeat (3) @(posedge clk);
    @(negedge clk) en = 1'b0;
    #1ns check(outs() == 7'b0001000, "EN low stops at once");
    repeat (5) begin @(posedge clk); #1ns; check(outs() == 7'b0001000, "idle while EN low"); end
    @(negedge clk) en = 1'b1;
    #1ns check(outs() == loop_vec(0, 1'b1), "EN high restarts in state 0 without a load");
    for (int k = 1; k < 8; k++) begin
      @(posedge clk); #1ns;
      check(outs() == loop_vec(k), $sformatf("restart cycle %0d: %b", k, outs()));
    end
    // EN falls during the compensation state: the load still happens
    @(posedge clk);
    @(negedge clk) en = 1'b0;
    #1ns check(outs() == 7'b0001001, "compensation goes on after EN fell in state 0");
    @(posedge clk); #1ns;
    check(outs() == 7'b0001000, "then idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
