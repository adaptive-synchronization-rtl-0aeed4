// Multi-synchronous link system with adaptive synchronization (top level).
//
// One receiving module ("module B") has NBUS input buses, each coming from a
// sending module with its own local clock. All local clocks share one
// frequency but have unknown, slowly drifting phases. Each bus is bundled
// data with a two-phase Rdy line. On the receiving side every bus has its own
// adaptive synchronizer, which delays the bus until its Rdy edges sit away
// from the local clock edge; one training controller runs the training
// sessions of all of them according to the adaptation mode.
//
// The wires between the modules are outside this block: the sender pins
// (ch_rdy_out/ch_data_out) and the receiver pins (ch_rdy_in/ch_data_in) are
// separate ports so that a board, a floorplan model or a testbench can put the
// interconnect delay between them. The clocks come in as ports too; the
// global clock network and the per-module clock regeneration are analog and
// not part of this RTL.
//
// Interfaces:
//   sender i (clk_tx[i]): tx_valid/tx_data accepted when tx_ready, one word
//     per cycle at most
//   receiver (clk_rx):    rx_valid[i] for one cycle with rx_data[i]
//   control (clk_rx):     mode (static), burnin_start (one-time mode command)
//   status:               suspend, training, adapted, session_count,
//                         delay_sel[i], conflict[i], drift_alarm
// Default sizes: ten input buses (the bus count used in the scheme's cost
// estimate); the 32-bit word is this design's choice.
`timescale 1ps/1ps
module as_system
#(
  parameter int unsigned NBUS          = 10,
  parameter int unsigned WIDTH         = 32,
  parameter int unsigned TAPS          = as_pkg::TAPS,
  parameter int unsigned STEP_PS       = as_pkg::STEP_PS,
  parameter int unsigned WINDOW_PS     = as_pkg::WINDOW_PS,
  parameter int unsigned TRAIN_CYCLES  = 1000,
  parameter int unsigned PERIOD_CYCLES = 8000,
  parameter int unsigned DRAIN_CYCLES  = 16,
  localparam int unsigned SW           = $clog2(TAPS)
) (
  input  logic                         clk_rx,
  input  logic                         rst_n,
  input  as_pkg::adapt_mode_e          mode,
  input  logic                         burnin_start,
  // sending modules
  input  logic [NBUS-1:0]              clk_tx,
  input  logic [NBUS-1:0]              tx_valid,
  input  logic [NBUS-1:0][WIDTH-1:0]   tx_data,
  output logic [NBUS-1:0]              tx_ready,
  output logic [NBUS-1:0]              ch_rdy_out,
  output logic [NBUS-1:0][WIDTH-1:0]   ch_data_out,
  // receiving module
  input  logic [NBUS-1:0]              ch_rdy_in,
  input  logic [NBUS-1:0][WIDTH-1:0]   ch_data_in,
  output logic [NBUS-1:0]              rx_valid,
  output logic [NBUS-1:0][WIDTH-1:0]   rx_data,
  // status
  output logic [NBUS-1:0][SW-1:0]      delay_sel,
  output logic [NBUS-1:0]              conflict,
  output logic                         drift_alarm,
  output logic                         suspend,
  output logic                         training,
  output logic                         adapted,
  output logic [15:0]                  session_count
);

  logic adapt_start, adapting, rx_ignore, tracking, monitor;
  logic [NBUS-1:0] alarm;

  training_controller #(
    .TRAIN_CYCLES (TRAIN_CYCLES),
    .PERIOD_CYCLES(PERIOD_CYCLES),
    .DRAIN_CYCLES (DRAIN_CYCLES)
  ) u_ctrl (
    .clk          (clk_rx),
    .rst_n        (rst_n),
    .mode         (mode),
    .burnin_start (burnin_start),
    .drift_alarm  (drift_alarm),
    .suspend      (suspend),
    .train        (training),
    .adapt_start  (adapt_start),
    .adapting     (adapting),
    .rx_ignore    (rx_ignore),
    .tracking     (tracking),
    .monitor      (monitor),
    .adapted      (adapted),
    .session_count(session_count)
  );

  assign drift_alarm = |alarm;

  for (genvar i = 0; i < NBUS; i++) begin : g_bus
    as_transmitter #(
      .WIDTH(WIDTH)
    ) u_tx (
      .clk     (clk_tx[i]),
      .rst_n   (rst_n),
      .suspend (suspend),
      .train   (training),
      .tx_valid(tx_valid[i]),
      .tx_data (tx_data[i]),
      .tx_ready(tx_ready[i]),
      .rdy_out (ch_rdy_out[i]),
      .data_out(ch_data_out[i])
    );

    adaptive_synchronizer #(
      .WIDTH    (WIDTH),
      .TAPS     (TAPS),
      .STEP_PS  (STEP_PS),
      .WINDOW_PS(WINDOW_PS)
    ) u_as (
      .clk        (clk_rx),
      .rst_n      (rst_n),
      .rdy_in     (ch_rdy_in[i]),
      .data_in    (ch_data_in[i]),
      .adapt_start(adapt_start),
      .adapting   (adapting),
      .rx_ignore  (rx_ignore),
      .tracking   (tracking),
      .monitor    (monitor),
      .rx_valid   (rx_valid[i]),
      .rx_data    (rx_data[i]),
      .delay_sel  (delay_sel[i]),
      .conflict   (conflict[i]),
      .drift_alarm(alarm[i])
    );
  end

endmodule
