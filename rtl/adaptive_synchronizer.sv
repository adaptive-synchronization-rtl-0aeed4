// Adaptive synchronizer (A/S) for one input bus of a module.
//
// The bus arrives as bundled data: a data word and a two-phase Rdy line whose
// every edge marks a new word. The sender's clock has the receiver's frequency
// but an unknown, slowly varying phase. Instead of a chain of synchronizer
// flip-flops, the A/S delays Rdy and data together through a programmable
// delay line until the Rdy edges fall well away from the local clock's rising
// edge, and then samples them directly with one register.
//
// Parts: a digital delay line (WIDTH+1 wires, tap chosen by the counter), a
// conflict detector watching the delayed Rdy against the local clock, and
// the adaptation counter that sets the tap.
//   Training   - `adapt_start` clears the counter to the shortest delay; while
//                `adapting` is high, every conflict steps the delay up by one
//                tap. Because the window d is just under half a period, the
//                sweep stops with the Rdy edges near the middle of the cycle.
//   Tracking   - while `tracking` is high (continuous mode) a conflict with
//                an edge just before the clock steps the delay down, and one
//                just after steps it up, so drift never accumulates.
//   Monitoring - while `monitor` is high (triggered mode) conflicts seen in
//                normal traffic are counted; after TRIG_THRESH of them
//                `drift_alarm` stays high until the next `adapt_start`.
// After any change of the tap the counter waits SETTLE_CYCLES before it acts
// on a conflict again, so glitches of the switching multiplexer and the
// conflict flags of the old setting are not acted on.
//
// Receive path: delayed Rdy and data are registered at each rising clock
// edge; a change of the registered Rdy is a new word. `rx_valid` is high for
// one cycle with the word on `rx_data`, except while `rx_ignore` is high
// (dummy transmissions of a training session).
//
// The structure (delay line, conflict detector, counter) follows the described
// circuit; the settle time, the early/late direction for tracking, the alarm
// count and the two-phase Rdy protocol are this design's choices.
`timescale 1ps/1ps
module adaptive_synchronizer #(
  parameter int unsigned WIDTH         = 32,
  parameter int unsigned TAPS          = as_pkg::TAPS,
  parameter int unsigned STEP_PS       = as_pkg::STEP_PS,
  parameter int unsigned WINDOW_PS     = as_pkg::WINDOW_PS,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned TRIG_THRESH   = 4,
  localparam int unsigned SW           = $clog2(TAPS)
) (
  input  logic             clk,          // local clock of the receiving module
  input  logic             rst_n,
  input  logic             rdy_in,       // two-phase Rdy from the channel
  input  logic [WIDTH-1:0] data_in,
  input  logic             adapt_start,  // start of a training session (1 cycle)
  input  logic             adapting,     // training session in progress
  input  logic             rx_ignore,    // drop received words (dummy traffic)
  input  logic             tracking,     // continuous up/down tracking enabled
  input  logic             monitor,      // count conflicts for the drift alarm
  output logic             rx_valid,
  output logic [WIDTH-1:0] rx_data,
  output logic [SW-1:0]    delay_sel,
  output logic             conflict,     // conflict seen in the last frame
  output logic             drift_alarm
);

  logic             rdy_dl;
  logic [WIDTH-1:0] data_dl;
  logic             cd_conflict, cd_early;
  logic             step_up, step_down;
  logic [3:0]       settle;
  logic [$clog2(TRIG_THRESH+1)-1:0] alarm_cnt;
  logic             rdy_s, rdy_prev;
  logic [WIDTH-1:0] data_s;

  digital_delay_line #(
    .WIDTH  (WIDTH + 1),
    .TAPS   (TAPS),
    .STEP_PS(STEP_PS)
  ) u_delay (
    .din ({rdy_in, data_in}),
    .sel (delay_sel),
    .dout({rdy_dl, data_dl})
  );

  conflict_detector #(
    .WINDOW_PS(WINDOW_PS)
  ) u_detect (
    .clk           (clk),
    .data          (rdy_dl),
    .conflict      (cd_conflict),
    .conflict_early(cd_early)
  );

  assign conflict  = cd_conflict;
  assign step_up   = (settle == '0) && cd_conflict && !adapt_start &&
                     (adapting || (tracking && !cd_early));
  assign step_down = (settle == '0) && cd_conflict && !adapt_start &&
                     tracking && cd_early;

  adapt_counter #(
    .W(SW)
  ) u_count (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(adapt_start),
    .up   (step_up),
    .down (step_down),
    .count(delay_sel)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               settle <= 4'(SETTLE_CYCLES);
    else if (adapt_start || step_up || step_down) settle <= 4'(SETTLE_CYCLES);
    else if (settle != '0)                    settle <= settle - 1'b1;
  end

  // Drift alarm for triggered training sessions
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alarm_cnt   <= '0;
      drift_alarm <= 1'b0;
    end else if (adapt_start) begin
      alarm_cnt   <= '0;
      drift_alarm <= 1'b0;
    end else if (monitor && cd_conflict && !drift_alarm) begin
      if (alarm_cnt == ($bits(alarm_cnt))'(TRIG_THRESH - 1)) drift_alarm <= 1'b1;
      alarm_cnt <= alarm_cnt + 1'b1;
    end
  end

  // Receive register: one sampling stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_s    <= 1'b0;
      rdy_prev <= 1'b0;
      data_s   <= '0;
    end else begin
      rdy_s    <= rdy_dl;
      rdy_prev <= rdy_s;
      data_s   <= data_dl;
    end
  end

  assign rx_valid = (rdy_s != rdy_prev) && !rx_ignore;
  assign rx_data  = data_s;

endmodule
