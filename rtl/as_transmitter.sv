// Sender side of one data channel.
//
// The channel is bundled data with a two-phase Rdy line: every word is sent by
// putting it on `data_out` and toggling `rdy_out` in the same clock edge, so
// each transfer makes exactly one Rdy edge, rising or falling.
//
// The training controller lives in the receiving clock domain; its `suspend`
// and `train` levels reach this domain through two-flop synchronizers. While
// suspended the sender accepts no words (`tx_ready` low). While training it
// sends dummy transmissions: Rdy toggles every cycle and the data word is
// inverted every cycle, so the receiver sees both Rdy edge polarities and
// every data wire switching.
//
// Timing: a word accepted at a rising edge (tx_valid && tx_ready) appears on
// the channel after that edge. Active-low asynchronous reset.
// The dummy pattern and the handshake are this design's choices; the
// described scheme only says that the sender generates dummy transmissions.
`timescale 1ps/1ps
module as_transmitter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             suspend,    // from the training controller (other domain)
  input  logic             train,      // from the training controller (other domain)
  input  logic             tx_valid,
  input  logic [WIDTH-1:0] tx_data,
  output logic             tx_ready,
  output logic             rdy_out,
  output logic [WIDTH-1:0] data_out
);

  logic [1:0] suspend_sync, train_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      suspend_sync <= '1;
      train_sync   <= '0;
    end else begin
      suspend_sync <= {suspend_sync[0], suspend};
      train_sync   <= {train_sync[0], train};
    end
  end

  assign tx_ready = !suspend_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_out  <= 1'b0;
      data_out <= '0;
    end else if (train_sync[1]) begin
      rdy_out  <= !rdy_out;
      data_out <= ~data_out;
    end else if (tx_valid && tx_ready) begin
      rdy_out  <= !rdy_out;
      data_out <= tx_data;
    end
  end

  // A word is never taken while the controller holds the senders off
  a_no_word_when_held: assert property (@(posedge clk) disable iff (!rst_n)
                                        !tx_ready |=> $stable(data_out) || train_sync[1] || $past(train_sync[1]));

endmodule
