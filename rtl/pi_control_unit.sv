// Control unit of the process-invariant temperature sensor (system-clock domain).
//
// After reset the unit spends three CLK cycles in INIT with s_rst and n_rst
// high, clearing both counters and the pulse flip-flop (this power-on clear
// is this design's addition). Sequence for one conversion, started when the pulse q of the fixed pulse
// width generator is seen rising (q is set by the START edge):
//   1. S_RST  one CLK cycle: s_rst clears the output counter, rdy drops.
//   2. MEAS   pw = 1 enables both ring oscillators until q is seen low again
//             (the pulse generator ends q after 2^(N-1) near-threshold
//             oscillator periods).
//   3. NRST   one CLK cycle: pw = 0 and n_rst clears the pulse counter.
//   4. WAIT   RDY_DELAY CLK cycles, then rdy = 1: TS is valid.
// q is asynchronous to CLK and passes through a two-flip-flop synchronizer
// first. The order of the steps follows the original design; the
// synchronizer, the state encoding and RDY_DELAY = 3 are this design's
// choices. All outputs are registered; rst is asynchronous, active high. CLK should be faster than 500 kHz.
`timescale 1ns/1ps
module pi_control_unit #(
  parameter int unsigned RDY_DELAY = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic q,
  output logic s_rst,
  output logic pw,
  output logic n_rst,
  output logic rdy
);

  typedef enum logic [2:0] {INIT, IDLE, S_RST, MEAS, NRST, WAIT} state_e;

  state_e       state;
  logic [1:0]   q_sync;
  logic         q_prev;
  logic [7:0]   wait_cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q_sync   <= '0;
      q_prev   <= 1'b0;
      state    <= INIT;
      s_rst    <= 1'b0;
      pw       <= 1'b0;
      n_rst    <= 1'b0;
      rdy      <= 1'b0;
      wait_cnt <= '0;
    end else begin
      q_sync <= {q_sync[0], q};
      q_prev <= q_sync[1];
      s_rst  <= 1'b0;
      n_rst  <= 1'b0;
      unique case (state)
        INIT: begin
          // power-on clear: hold both clears for three cycles, long enough
          // for the cleared pulse to pass the synchronizer
          s_rst    <= 1'b1;
          n_rst    <= 1'b1;
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 8'd2) state <= IDLE;
        end
        IDLE: if (q_sync[1] && !q_prev) begin
          state <= S_RST;
          s_rst <= 1'b1;
          rdy   <= 1'b0;
        end
        S_RST: begin
          state <= MEAS;
          pw    <= 1'b1;
        end
        MEAS: if (!q_sync[1]) begin
          state    <= NRST;
          pw       <= 1'b0;
          n_rst    <= 1'b1;
          wait_cnt <= '0;
        end
        NRST: state <= WAIT;
        WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 8'(RDY_DELAY - 1)) begin
            rdy   <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
