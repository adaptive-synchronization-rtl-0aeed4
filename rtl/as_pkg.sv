// Shared types and constants of the adaptive synchronization design.
//
// The five adaptation modes decide when the training controller starts a
// training session and whether the per-bus counters track drift during normal
// operation. The time constants are in picoseconds for a 10 GHz local clock
// (100 ps period); the window, step and tap count are choices of this design,
// sized so that the delay line spans more than one clock period and a step is
// smaller than the conflict-free part of the cycle.
`timescale 1ps/1ps
package as_pkg;

  typedef enum logic [2:0] {
    MODE_ONE_TIME   = 3'd0,  // adapt once on a test/burn-in command, then keep the setting
    MODE_POWER_UP   = 3'd1,  // adapt once after reset
    MODE_PERIODIC   = 3'd2,  // adapt after reset and then at a fixed interval
    MODE_TRIGGERED  = 3'd3,  // adapt after reset and whenever a receiver flags drift
    MODE_CONTINUOUS = 3'd4   // adapt after reset, then track with an up/down counter
  } adapt_mode_e;

  // Default time constants (ps)
  localparam int unsigned CLK_PERIOD_PS = 100;  // 10 GHz local clock
  localparam int unsigned WINDOW_PS     = 40;   // conflict threshold d, slightly below T/2
  localparam int unsigned STEP_PS       = 8;    // one delay-line tap
  localparam int unsigned TAPS          = 16;   // delay-line taps, 16 x 8 ps > one period

endpackage
