// Adaptation counter: selects the delay-line tap of one adaptive synchronizer.
//
// `clear` returns the count to zero (start of a training session). `up`
// increments and `down` decrements; both saturate at the ends, so the count
// never wraps to the other end of the delay line. In a training session only
// `up` is used, which makes it the plain up-counter of the basic scheme; the
// `down` input turns it into the up/down counter used for continuous
// tracking. `clear` wins over `up`/`down`, and `up` wins over `down`.
// Synchronous, one step per cycle, asynchronous active-low reset to zero.
`timescale 1ps/1ps
module adapt_counter #(
  parameter int unsigned W = $clog2(as_pkg::TAPS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         up,
  input  logic         down,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     count <= '0;
    else if (clear)                 count <= '0;
    else if (up && count != '1)     count <= count + 1'b1;
    else if (!up && down && count != '0) count <= count - 1'b1;
  end

endmodule
