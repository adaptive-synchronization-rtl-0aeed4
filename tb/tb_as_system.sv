// End-to-end testbench of as_system with every parameter at its default
// (ten 32-bit buses, 100 ps clocks, 1000-cycle sessions, 8000-cycle period).
//
// Each sender has its own clock with a fixed phase against the receiver clock;
// the wires between the sender and receiver pins are transport delays set
// here, so that bus i reaches the receiver (62 + 3i) ps after a receiver
// clock edge. Random words are sent on every bus and checked at the receiver
// for order and content. The adaptation modes are run one after another:
//   power-up    - one session after reset, then traffic
//   periodic    - traffic runs across two further sessions; no word lost
//   triggered   - bus 0's wire delay drifts until the drift alarm starts a
//                 new session
//   continuous  - all wires drift +30 ps and back under full traffic, the
//                 delays follow by up and down steps
//   one-time    - nothing until the burn-in command, then one session
// After every session each bus's delay must put its Rdy edges outside the
// +-40 ps window (worked out here from the wire delay and the tap).
// Counted mechanisms, each of which must occur: sessions, conflicts seen in
// training, delay steps, senders held off by suspend, periodic, triggered
// and burn-in sessions, tracking steps down and up, words delivered.
`timescale 1ps/1ps
module tb_as_system;
  import as_pkg::*;
  localparam int NB = 10, W = 32, T = 100, D = 40, STEP = 8;

  logic clk_rx = 1'b0, rst_n = 1'b0, burnin_start = 1'b0;
  adapt_mode_e mode = MODE_POWER_UP;
  logic [NB-1:0] clk_tx = '0, tx_valid, tx_ready, ch_rdy_out, rx_valid, conflict;
  logic [NB-1:0] ch_rdy_in = '0;
  logic [NB-1:0][W-1:0] tx_data, ch_data_out, rx_data;
  logic [NB-1:0][W-1:0] ch_data_in = '0;
  logic [NB-1:0][3:0] delay_sel;
  logic drift_alarm, suspend, training, adapted;
  logic [15:0] session_count;

  int checks = 0, failures = 0;
  int tx_phase [NB];
  int wire_dly [NB];
  bit traffic = 0;
  bit full_rate = 0;
  logic [W-1:0] expq [NB][$];
  // mechanism counters
  int n_conflicts = 0, n_steps = 0, n_held = 0, n_words = 0;
  int n_periodic = 0, n_triggered = 0, n_burnin = 0, n_down = 0, n_up = 0;

  as_system dut (
    .clk_rx(clk_rx), .rst_n(rst_n), .mode(mode), .burnin_start(burnin_start),
    .clk_tx(clk_tx), .tx_valid(tx_valid), .tx_data(tx_data), .tx_ready(tx_ready),
    .ch_rdy_out(ch_rdy_out), .ch_data_out(ch_data_out),
    .ch_rdy_in(ch_rdy_in), .ch_data_in(ch_data_in),
    .rx_valid(rx_valid), .rx_data(rx_data), .delay_sel(delay_sel), .conflict(conflict),
    .drift_alarm(drift_alarm), .suspend(suspend), .training(training), .adapted(adapted),
    .session_count(session_count));

  function automatic int tx_phase_of(input int i);
    return (i * 37) % 50;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #(T/2) clk_rx = ~clk_rx;

  for (genvar i = 0; i < NB; i++) begin : g_bus
    // sender clock: same frequency, own phase
    initial begin
      #(tx_phase_of(i) + T/2);   // receiver rising edges are at T/2 + kT
      clk_tx[i] = 1'b1;
      forever #(T/2) clk_tx[i] = ~clk_tx[i];
    end
    // interconnect
    // (transport delay: every change is scheduled on its own)
    always @(ch_rdy_out[i] or ch_data_out[i]) begin
      automatic logic         r = ch_rdy_out[i];
      automatic logic [W-1:0] v = ch_data_out[i];
      automatic int           d = wire_dly[i];
      fork
        begin
          #(d);
          ch_rdy_in[i]  = r;
          ch_data_in[i] = v;
        end
      join_none
    end
    // traffic source
    always @(negedge clk_tx[i]) begin
      tx_valid[i] <= traffic && (full_rate || $urandom_range(1, 0) == 1);
      tx_data[i]  <= W'($urandom);
    end
    // what the sender accepts at the next rising edge, read while stable
    always @(negedge clk_tx[i]) begin
      #1;
      if (tx_valid[i] && tx_ready[i]) expq[i].push_back(tx_data[i]);
      if (tx_valid[i] && !tx_ready[i]) n_held++;
    end
    // receiver scoreboard and mechanism counters
    logic [3:0] prev_sel = '0;
    always @(negedge clk_rx) begin
      if (rx_valid[i]) begin
        checks++;
        if (expq[i].size() == 0) begin
          failures++; $display("FAIL bus %0d: unexpected word at %0t", i, $time);
        end else begin
          automatic logic [W-1:0] e = expq[i].pop_front();
          if (e != rx_data[i]) begin
            failures++;
            $display("FAIL bus %0d: got %h expected %h at %0t", i, rx_data[i], e, $time);
          end else n_words++;
        end
      end
      if (training && conflict[i]) n_conflicts++;
      if (delay_sel[i] != prev_sel) begin
        n_steps++;
        if (!training && delay_sel[i] < prev_sel) n_down++;
        if (!training && delay_sel[i] > prev_sel) n_up++;
      end
      prev_sel = delay_sel[i];
    end
  end

  function automatic int arrival(input int i);
    return (tx_phase[i] + wire_dly[i] + (delay_sel[i] + 1) * STEP) % T;
  endfunction

  task automatic check_positions(input string when);
    for (int i = 0; i < NB; i++) begin
      automatic int a = arrival(i);
      check(a >= D && a <= T - D, $sformatf("%s: bus %0d edge at %0d ps (sel %0d)",
                                            when, i, a, delay_sel[i]));
    end
  endtask

  task automatic start_mode(input adapt_mode_e m);
    traffic = 0;
    rst_n = 0;
    mode = m;
    repeat (20) @(negedge clk_rx);
    for (int i = 0; i < NB; i++) expq[i].delete();
    rst_n = 1;
  endtask

  task automatic wait_sessions(input int n);
    int guard;
    guard = 0;
    while (session_count < 16'(n) && guard < 20000) begin @(negedge clk_rx); guard++; end
    check(session_count == 16'(n), $sformatf("%0d sessions reached", n));
  endtask

  task automatic drain_traffic();
    traffic = 0;
    repeat (20) @(negedge clk_rx);
    for (int i = 0; i < NB; i++)
      check(expq[i].size() == 0, $sformatf("bus %0d: %0d words lost", i, expq[i].size()));
  endtask

  initial begin
    #10000000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start_cycle;
    for (int i = 0; i < NB; i++) begin
      tx_phase[i] = tx_phase_of(i);
      wire_dly[i] = 62 + 3 * i - tx_phase[i] + T;   // arrival 62+3i ps after a receiver edge
    end

    // power-up mode
    start_mode(MODE_POWER_UP);
    traffic = 1;
    wait_sessions(1);
    check_positions("power-up");
    repeat (300) @(negedge clk_rx);
    drain_traffic();
    for (int i = 0; i < NB; i++) $display("power-up: bus %0d tap %0d", i, delay_sel[i]);

    // periodic mode, traffic across sessions
    start_mode(MODE_PERIODIC);
    traffic = 1;
    wait_sessions(1);
    wait_sessions(3);
    n_periodic = session_count - 1;
    check_positions("periodic");
    repeat (100) @(negedge clk_rx);
    drain_traffic();

    // triggered mode: bus 0 drifts until the alarm
    start_mode(MODE_TRIGGERED);
    traffic = 1; full_rate = 1;
    wait_sessions(1);
    repeat (100) @(negedge clk_rx);
    check(session_count == 1 && !drift_alarm, "triggered: no session without drift");
    start_cycle = 0;
    while (!drift_alarm && start_cycle < 1000) begin
      if (start_cycle % 10 == 0) wire_dly[0] = wire_dly[0] + 1;
      @(negedge clk_rx);
      start_cycle++;
    end
    check(drift_alarm, "triggered: drift raised the alarm");
    $display("triggered: alarm after %0d ps of drift", start_cycle / 10 + 1);
    wait_sessions(2);
    n_triggered = session_count - 1;
    check_positions("triggered");
    drain_traffic();
    full_rate = 0;

    // continuous mode: all wires drift +30 ps and back
    for (int i = 0; i < NB; i++) wire_dly[i] = 62 + 3 * i - tx_phase[i] + T;
    start_mode(MODE_CONTINUOUS);
    wait_sessions(1);
    traffic = 1; full_rate = 1;
    for (int k = 0; k < 60; k++) begin
      for (int i = 0; i < NB; i++) wire_dly[i] = wire_dly[i] + ((k < 30) ? 1 : -1);
      repeat (20) @(negedge clk_rx);
    end
    check(session_count == 1, "continuous: no further session");
    check_positions("continuous");
    drain_traffic();
    full_rate = 0;

    // one-time mode: waits for the burn-in command
    start_mode(MODE_ONE_TIME);
    repeat (200) @(negedge clk_rx);
    check(session_count == 0 && suspend, "one-time: no session before the command");
    burnin_start = 1; @(negedge clk_rx); burnin_start = 0;
    wait_sessions(1);
    n_burnin = session_count;
    check_positions("one-time");
    traffic = 1;
    repeat (200) @(negedge clk_rx);
    drain_traffic();

    $display("mechanisms: conflicts %0d, delay steps %0d, held words %0d, words %0d",
             n_conflicts, n_steps, n_held, n_words);
    $display("            periodic %0d, triggered %0d, burn-in %0d, tracking down %0d up %0d",
             n_periodic, n_triggered, n_burnin, n_down, n_up);
    check(n_conflicts > 0, "conflicts in training");
    check(n_steps > 0, "delay steps");
    check(n_held > 0, "senders held by suspend");
    check(n_words > 1000, "words delivered");
    check(n_periodic >= 2, "periodic sessions");
    check(n_triggered >= 1, "triggered session");
    check(n_burnin == 1, "burn-in session");
    check(n_down > 0 && n_up > 0, "tracking steps both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
