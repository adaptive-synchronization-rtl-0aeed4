// Digital delay line -- behavioural model of a tapped delay line with a tap
// multiplexer.
//
// A bundle of WIDTH wires passes through TAPS identical delay stages of
// STEP_PS each; the tap selected by `sel` drives the output, so the delay from
// din to dout is (sel + 1) * STEP_PS. The stages are analog delay elements,
// modelled here with transport delays; the multiplexer is plain logic. The
// adaptation counter drives `sel`. Changing `sel` may glitch the output, so
// the user lets it settle before trusting the output again.
//
// The tap count and step are this design's choice: the line must span a
// clock period (16 x 8 ps = 128 ps > 100 ps) and one step must be smaller than
// the conflict-free part of the cycle (T - 2d = 20 ps).
`timescale 1ps/1ps
module digital_delay_line #(
  parameter int unsigned WIDTH   = 1,
  parameter int unsigned TAPS    = as_pkg::TAPS,
  parameter int unsigned STEP_PS = as_pkg::STEP_PS,
  localparam int unsigned SW     = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic [WIDTH-1:0] din,
  input  logic [SW-1:0]    sel,
  output logic [WIDTH-1:0] dout
);

  logic [TAPS-1:0][WIDTH-1:0] taps;

  for (genvar i = 0; i < TAPS; i++) begin : g_stage
    logic [WIDTH-1:0] q;
    initial q = '0;
    if (i == 0) begin : g_first
      always @(din) q <= #(STEP_PS) din;
    end else begin : g_next
      always @(g_stage[i-1].q) q <= #(STEP_PS) g_stage[i-1].q;
    end
    assign taps[i] = q;
  end

  always_comb begin
    dout = taps[0];
    for (int unsigned k = 0; k < TAPS; k++)
      if (sel == SW'(k)) dout = taps[k];
  end

endmodule
