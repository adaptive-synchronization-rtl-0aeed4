// Testbench for as_transmitter: words are sent with one Rdy toggle each;
// suspend blocks new words after the two-flop synchronizer delay; training
// toggles Rdy and inverts the data word every cycle.
`timescale 1ps/1ps
module tb_as_transmitter;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, suspend, train, tx_valid, tx_ready, rdy_out;
  logic [W-1:0] tx_data, data_out;
  int checks = 0, failures = 0;
  logic prev_rdy;
  logic [W-1:0] prev_data;

  as_transmitter #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .suspend(suspend), .train(train), .tx_valid(tx_valid),
    .tx_data(tx_data), .tx_ready(tx_ready), .rdy_out(rdy_out), .data_out(data_out));

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    suspend = 1; train = 0; tx_valid = 0; tx_data = '0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!tx_ready && !rdy_out, "blocked after reset while suspended");
    suspend = 0;
    @(negedge clk); check(!tx_ready, "ready one cycle after suspend drops");
    @(negedge clk); check(tx_ready, "ready after two cycles");
    // normal words
    for (int i = 0; i < 20; i++) begin
      logic valid;
      valid = $urandom_range(1, 0) == 1;
      tx_valid = valid;
      tx_data  = W'($urandom);
      prev_rdy = rdy_out;
      @(negedge clk);
      if (valid) check(rdy_out != prev_rdy && data_out == tx_data, "word sent with Rdy toggle");
      else       check(rdy_out == prev_rdy, "no toggle without a word");
    end
    // suspend: two cycles of synchronizer, then no words
    tx_valid = 1;
    suspend = 1;
    @(negedge clk); @(negedge clk);
    check(!tx_ready, "not ready once suspended");
    prev_rdy = rdy_out;
    repeat (5) @(negedge clk);
    check(rdy_out == prev_rdy, "no words while suspended");
    tx_valid = 0;
    // training: toggles every cycle, data inverted
    train = 1;
    @(negedge clk); @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      prev_rdy = rdy_out; prev_data = data_out;
      @(negedge clk);
      check(rdy_out != prev_rdy && data_out == ~prev_data, "dummy transmission");
    end
    train = 0;
    @(negedge clk); @(negedge clk); @(negedge clk);
    prev_rdy = rdy_out;
    repeat (4) @(negedge clk);
    check(rdy_out == prev_rdy, "dummy traffic stops after training");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
