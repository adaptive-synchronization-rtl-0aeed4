// Training-session controller for one receiving module.
//
// A training session suspends normal operation, makes every sender put dummy
// transmissions on its Rdy line, and lets every adaptive synchronizer sweep
// its delay until no conflict remains. The session lasts a fixed number of
// cycles; normal operation resumes afterwards on the assumption that every
// adaptation has completed. The adaptation mode (as_pkg::adapt_mode_e)
// decides when sessions happen:
//   MODE_ONE_TIME   - only on the `burnin_start` command (test / burn-in)
//   MODE_POWER_UP   - once after reset
//   MODE_PERIODIC   - after reset, then every PERIOD_CYCLES cycles
//   MODE_TRIGGERED  - after reset, then whenever `drift_alarm` is raised
//   MODE_CONTINUOUS - after reset, then `tracking` lets the counters follow
//                     drift with no further sessions
//
// Session sequence (states):
//   DRAIN   DRAIN_CYCLES: `suspend` high, senders stop accepting words, words
//           already in flight are still received
//   TRAIN   TRAIN_CYCLES: `train` high, `adapt_start` pulses in the first
//           cycle, `adapting` high
//   QUIESCE DRAIN_CYCLES: `train` low again, the last dummy transmissions
//           drain while receivers still ignore them (`rx_ignore`)
// `suspend` also stays high from reset until the first session has ended.
// Mode must be held stable while out of reset.
//
// The session length (1000 cycles, the convergence bound quoted for the
// scheme) and the periodic interval (8000 cycles = 1.25 MHz at 10 GHz,
// slightly above a 1 MHz drift bandwidth) follow the described numbers; the
// drain phases and the state encoding are this design's own.
`timescale 1ps/1ps
module training_controller
  import as_pkg::*;
#(
  parameter int unsigned TRAIN_CYCLES  = 1000,
  parameter int unsigned PERIOD_CYCLES = 8000,
  parameter int unsigned DRAIN_CYCLES  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  adapt_mode_e mode,
  input  logic        burnin_start,
  input  logic        drift_alarm,
  output logic        suspend,
  output logic        train,
  output logic        adapt_start,
  output logic        adapting,
  output logic        rx_ignore,
  output logic        tracking,
  output logic        monitor,
  output logic        adapted,
  output logic [15:0] session_count
);

  typedef enum logic [1:0] {S_IDLE, S_DRAIN, S_TRAIN, S_QUIESCE} state_e;

  localparam int unsigned MAXC = (PERIOD_CYCLES > TRAIN_CYCLES) ? PERIOD_CYCLES : TRAIN_CYCLES;
  localparam int unsigned TW   = $clog2(MAXC + 1);

  state_e        state;
  logic [TW-1:0] timer;
  logic          start_session;
  logic          first_cycle;

  always_comb begin
    start_session = 1'b0;
    if (state == S_IDLE) begin
      unique case (mode)
        MODE_ONE_TIME:   start_session = burnin_start;
        MODE_POWER_UP,
        MODE_CONTINUOUS: start_session = !adapted;
        MODE_PERIODIC:   start_session = !adapted || (timer == TW'(PERIOD_CYCLES - 1));
        MODE_TRIGGERED:  start_session = !adapted || drift_alarm;
        default:         start_session = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      timer         <= '0;
      adapted       <= 1'b0;
      first_cycle   <= 1'b0;
      session_count <= '0;
    end else begin
      first_cycle <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_session) begin
            state <= S_DRAIN;
            timer <= '0;
          end else if (adapted && mode == MODE_PERIODIC) begin
            timer <= timer + 1'b1;
          end
        end
        S_DRAIN: begin
          if (timer == TW'(DRAIN_CYCLES - 1)) begin
            state       <= S_TRAIN;
            timer       <= '0;
            first_cycle <= 1'b1;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_TRAIN: begin
          if (timer == TW'(TRAIN_CYCLES - 1)) begin
            state <= S_QUIESCE;
            timer <= '0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_QUIESCE: begin
          if (timer == TW'(DRAIN_CYCLES - 1)) begin
            state         <= S_IDLE;
            timer         <= '0;
            adapted       <= 1'b1;
            session_count <= session_count + 1'b1;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign suspend     = (state != S_IDLE) || !adapted;
  assign train       = (state == S_TRAIN);
  assign adapting    = (state == S_TRAIN);
  assign adapt_start = (state == S_TRAIN) && first_cycle;
  assign rx_ignore   = (state == S_TRAIN) || (state == S_QUIESCE) || !adapted;
  assign tracking    = (state == S_IDLE) && adapted && (mode == MODE_CONTINUOUS);
  assign monitor     = (state == S_IDLE) && adapted && (mode == MODE_TRIGGERED);

  // Session rules: dummy traffic only while normal traffic is held off, and
  // the counters are cleared exactly once, at the start of training.
  a_train_suspended: assert property (@(posedge clk) disable iff (!rst_n) train |-> suspend);
  a_start_once:      assert property (@(posedge clk) disable iff (!rst_n) adapt_start |=> !adapt_start);
  a_track_xor_train: assert property (@(posedge clk) disable iff (!rst_n) !(tracking && adapting));

endmodule
