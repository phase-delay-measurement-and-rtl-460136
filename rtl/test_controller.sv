// test_controller -- sequences one BIST measurement.
//
// On 'start' (while idle) it pulses 'nco_sync' and 'acc_clear' for one
// cycle, which restarts every oscillator at its initial phase and zeroes
// both accumulators. It then waits 1 + 'settle' cycles, enough for the
// first oscillator sample to appear plus the programmed fill time of the
// analog return path, and holds 'acc_en' for exactly 'k_len' cycles (the
// BIST sequence length K). One cycle later 'done' pulses; the accumulators
// then hold their results until the next start. 'busy' is high from the
// start cycle to the done cycle. A k_len of zero accumulates nothing.
//
// The architecture names a test controller without describing it; this
// state machine is the simplest one that runs the measurement as
// described, and the settle wait is this design's own addition.
//
// Cycle count: start in cycle t, first acc_en cycle t+2+settle, last
// t+1+settle+k_len, done in t+2+settle+k_len.
module test_controller #(
  parameter int unsigned KW = bist_pkg::M_BITS - 2 * bist_pkg::N_BITS,
  parameter int unsigned SW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [KW-1:0] k_len,      // sequence length K in clock cycles
  input  logic [SW-1:0] settle,     // extra wait before accumulating
  output logic          nco_sync,
  output logic          acc_clear,
  output logic          acc_en,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {S_IDLE, S_SYNC, S_WAIT, S_ACC, S_DONE} state_e;

  state_e        state;
  logic [KW-1:0] k_cnt;
  logic [SW:0]   w_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k_cnt <= '0;
      w_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_SYNC;
        S_SYNC: begin
          w_cnt <= (SW+1)'(settle);
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (w_cnt == '0) begin
            k_cnt <= k_len;
            state <= (k_len == '0) ? S_DONE : S_ACC;
          end else begin
            w_cnt <= w_cnt - 1'b1;
          end
        end
        S_ACC: begin
          k_cnt <= k_cnt - 1'b1;
          if (k_cnt == KW'(1)) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    nco_sync  = (state == S_SYNC);
    acc_clear = (state == S_SYNC);
    acc_en    = (state == S_ACC);
    done      = (state == S_DONE);
    busy      = (state != S_IDLE);
  end

endmodule
