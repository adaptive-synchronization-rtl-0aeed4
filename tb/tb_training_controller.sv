// Testbench for training_controller at reduced sizes (session 20 cycles,
// drain 4, period 50). For each adaptation mode it checks when sessions start,
// that each phase lasts exactly its number of cycles, and the level outputs
// (suspend, train, adapt_start, rx_ignore, tracking, monitor).
`timescale 1ps/1ps
module tb_training_controller;
  import as_pkg::*;
  localparam int TR = 20, PER = 50, DR = 4;
  logic clk = 1'b0, rst_n;
  adapt_mode_e mode;
  logic burnin_start, drift_alarm;
  logic suspend, train, adapt_start, adapting, rx_ignore, tracking, monitor, adapted;
  logic [15:0] session_count;
  int checks = 0, failures = 0;

  training_controller #(.TRAIN_CYCLES(TR), .PERIOD_CYCLES(PER), .DRAIN_CYCLES(DR)) dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .burnin_start(burnin_start),
    .drift_alarm(drift_alarm), .suspend(suspend), .train(train), .adapt_start(adapt_start),
    .adapting(adapting), .rx_ignore(rx_ignore), .tracking(tracking), .monitor(monitor),
    .adapted(adapted), .session_count(session_count));

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Follow one whole session from the cycle in which suspend rises (or is
  // already high): DR drain cycles, TR training cycles, DR quiesce cycles.
  task automatic follow_session();
    int n;
    n = 0;
    while (!train) begin
      check(suspend && (rx_ignore == !adapted), "drain: suspended, still receiving once adapted");
      @(negedge clk); n++;
      if (n > 100) break;
    end
    check(n == DR, $sformatf("drain lasted %0d cycles", n));
    check(adapt_start, "adapt_start in the first training cycle");
    n = 0;
    while (train) begin
      check(adapting && rx_ignore && suspend, "training levels");
      if (n > 0) check(!adapt_start, "adapt_start is one cycle");
      @(negedge clk); n++;
      if (n > 1000) break;
    end
    check(n == TR, $sformatf("training lasted %0d cycles", n));
    n = 0;
    while (rx_ignore) begin
      check(suspend && !train, "quiesce levels");
      @(negedge clk); n++;
      if (n > 100) break;
    end
    check(n == DR, $sformatf("quiesce lasted %0d cycles", n));
    check(!suspend && adapted, "normal operation resumes");
  endtask

  task automatic do_reset(input adapt_mode_e m);
    rst_n = 0; mode = m; burnin_start = 0; drift_alarm = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // one-time mode: nothing until the burn-in command
    do_reset(MODE_ONE_TIME);
    repeat (100) begin
      check(!train && suspend, "one-time: waits for command");
      @(negedge clk);
    end
    burnin_start = 1; @(negedge clk); burnin_start = 0;
    follow_session();
    repeat (200) begin
      check(!train && !suspend, "one-time: no further session");
      @(negedge clk);
    end
    check(session_count == 1, "one-time: one session");

    // power-up mode
    do_reset(MODE_POWER_UP);
    follow_session();
    repeat (200) begin
      check(!train && !tracking && !monitor, "power-up: no further session");
      @(negedge clk);
    end

    // periodic mode: PER idle cycles between sessions
    do_reset(MODE_PERIODIC);
    follow_session();
    for (int s = 0; s < 3; s++) begin
      int idle;
      idle = 0;
      while (!suspend && idle < 1000) begin @(negedge clk); idle++; end
      check(idle == PER, $sformatf("periodic: %0d idle cycles", idle));
      follow_session();
    end
    check(session_count == 4, "periodic: four sessions");

    // triggered mode
    do_reset(MODE_TRIGGERED);
    follow_session();
    repeat (100) begin
      check(monitor && !suspend, "triggered: monitoring between sessions");
      @(negedge clk);
    end
    drift_alarm = 1;
    @(negedge clk);
    drift_alarm = 0;
    check(suspend && !monitor, "triggered: alarm starts a session");
    follow_session();
    check(session_count == 2, "triggered: two sessions");

    // continuous mode
    do_reset(MODE_CONTINUOUS);
    check(!tracking, "continuous: no tracking before the first session");
    follow_session();
    repeat (200) begin
      check(tracking && !train && !suspend, "continuous: tracking, no sessions");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
