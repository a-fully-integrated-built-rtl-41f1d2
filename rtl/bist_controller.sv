// BIST controller: sequences the four steps of the sine-wave fitting test.
//
// A rising edge of start begins step 1. Each step runs the same sequence:
//   INIT   one cycle: bsg_init restarts both bitstream generators (phase 0),
//          est_clear clears the accumulators;
//   SETTLE SETTLE decimated samples are discarded while the modulator and
//          the decimation filter settle on the new input;
//   ACC    the next N_SAMPLES decimated samples are passed on (est_acc is
//          the decimated-sample strobe gated by this phase);
//   DRAIN  wait until the ORA is no longer busy (serial multiplier);
//   LATCH  one cycle of est_latch, then the next step, or done after step 4.
// step is the step index (1..4, 0 when idle); t_mode (the modulator's test
// pin) is high during steps 1-4. done stays high from the end of step 4
// until the next start. The four steps and their order follow the published
// procedure; the settle count and the handshake are this design's.
module bist_controller
  import bist_pkg::step_e;
#(
  parameter int N_SAMPLES = 2048,
  parameter int SETTLE    = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  dec_valid,
  input  logic  ora_busy,
  output step_e step,
  output logic  bsg_init,
  output logic  est_clear,
  output logic  est_acc,
  output logic  est_latch,
  output logic  t_mode,
  output logic  done
);

  import bist_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_SETTLE, S_ACC, S_DRAIN, S_LATCH} state_e;

  localparam int CW = $clog2(N_SAMPLES + SETTLE + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic          start_q;

  always_comb begin
    bsg_init  = (state == S_INIT);
    est_clear = (state == S_INIT);
    est_acc   = (state == S_ACC) && dec_valid;
    est_latch = (state == S_LATCH);
    t_mode    = (step != STEP_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      step    <= STEP_IDLE;
      cnt     <= '0;
      done    <= 1'b0;
      start_q <= 1'b0;
    end else begin
      start_q <= start;
      unique case (state)
        S_IDLE: if (start && !start_q) begin
          state <= S_INIT;
          step  <= STEP_OFFSET;
          done  <= 1'b0;
        end
        S_INIT: begin
          cnt   <= '0;
          state <= (SETTLE > 0) ? S_SETTLE : S_ACC;
        end
        S_SETTLE: if (dec_valid) begin
          if (cnt == CW'(SETTLE - 1)) begin
            cnt   <= '0;
            state <= S_ACC;
          end else cnt <= cnt + 1'b1;
        end
        S_ACC: if (dec_valid) begin
          if (cnt == CW'(N_SAMPLES - 1)) begin
            cnt   <= '0;
            state <= S_DRAIN;
          end else cnt <= cnt + 1'b1;
        end
        S_DRAIN: if (!ora_busy) state <= S_LATCH;
        S_LATCH: begin
          if (step == STEP_THDN) begin
            state <= S_IDLE;
            step  <= STEP_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_INIT;
            step  <= step_e'(step + 3'd1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
