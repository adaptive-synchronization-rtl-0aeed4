// Testbench for adaptive_synchronizer at the default timing (100 ps clock,
// d = 40 ps, 16 taps of 8 ps) and an 8-bit bus.
//
// A sender model launches Rdy/data edges at a chosen phase after each rising
// edge of the receiver clock (the sum of clock skew and wire delay).
//  1. For phases all around the cycle: a training session with dummy
//     transmissions, then the chosen tap must put the delayed Rdy edges
//     outside the +-d window (worked out here from phase + (sel+1)*8 ps), the
//     setting must be reached well within 1000 cycles, and a stream of
//     random words must arrive complete, in order and within 3 cycles.
//     The same is repeated with +-4 ps of random jitter on every edge.
//  2. Continuous tracking: the phase drifts up by 30 ps and back while a word
//     is sent every cycle; the tap must move both ways and no word may be
//     lost or corrupted.
//  3. Monitoring: no alarm while the phase is still, an alarm after the
//     phase drifts into the window.
`timescale 1ps/1ps
module tb_adaptive_synchronizer;
  localparam int T = 100, D = 40, STEP = 8, W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rdy_in = 1'b0;
  logic [W-1:0] data_in = '0;
  logic adapt_start = 0, adapting = 0, rx_ignore = 0, tracking = 0, monitor = 0;
  logic rx_valid, conflict, drift_alarm;
  logic [W-1:0] rx_data;
  logic [3:0] delay_sel;
  int checks = 0, failures = 0;

  int  phase = 0;         // sender edge time after the receiver's rising edge
  int  jitter = 0;        // each edge moves by up to +-jitter ps
  bit  dummy = 0;         // dummy transmissions
  bit  stream = 0;        // send a word every cycle
  bit  random_gaps = 0;
  bit  check_rx = 0;
  logic [W-1:0] expq[$];
  longint sent_cycle[$];
  longint cycle = 0;
  int  words_ok = 0;

  adaptive_synchronizer #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .rdy_in(rdy_in), .data_in(data_in),
    .adapt_start(adapt_start), .adapting(adapting), .rx_ignore(rx_ignore),
    .tracking(tracking), .monitor(monitor), .rx_valid(rx_valid), .rx_data(rx_data),
    .delay_sel(delay_sel), .conflict(conflict), .drift_alarm(drift_alarm));

  always #(T/2) clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // sender model
  always @(posedge clk) begin
    automatic int p = phase + ((jitter > 0) ? $urandom_range(2 * jitter, 0) - jitter : 0);
    fork
      begin
        #(p);
        if (dummy) begin
          rdy_in  = ~rdy_in;
          data_in = ~data_in;
        end else if (stream && (!random_gaps || $urandom_range(2, 0) != 0)) begin
          automatic logic [W-1:0] w = W'($urandom);
          data_in = w;
          rdy_in  = ~rdy_in;
          t_dlq.push_back($realtime + (delay_sel + 1) * STEP);
          expq.push_back(w);
          sent_cycle.push_back(cycle);
        end
      end
    join_none
  end

  // time each word's Rdy edge leaves the delay line: launch + (sel+1)*STEP
  realtime t_dlq[$];
  real     wait_sum = 0;
  int      wait_n = 0;

  // receiver check
  always @(negedge clk) if (check_rx && rx_valid) begin
    // the capturing rising edge was half a period ago; the wait from the
    // delayed edge to it must lie between d and T - d
    automatic real wt = ($realtime - T/2) - ((t_dlq.size() > 0) ? t_dlq.pop_front() : 0.0);
    wait_sum += wt; wait_n++;
    checks++;
    if (wt < D - jitter || wt > T - D + jitter) begin
      failures++; $display("FAIL sampling wait %0.1f ps", wt);
    end
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected word %h at %0t", rx_data, $time);
    end else begin
      automatic logic [W-1:0] e = expq.pop_front();
      automatic longint sc = sent_cycle.pop_front();
      if (e != rx_data || cycle - sc > 3) begin
        failures++;
        $display("FAIL word %h expected %h, latency %0d cycles", rx_data, e, cycle - sc);
      end else words_ok++;
    end
  end

  // position of the delayed Rdy edge inside the cycle
  function automatic int arrival(input int ph, input int sel);
    return (ph + (sel + 1) * STEP) % T;
  endfunction

  task automatic train_session(output int conv_cycles);
    int last_change;
    logic [3:0] prev;
    @(negedge clk);
    adapt_start = 1; adapting = 1; rx_ignore = 1; dummy = 1;
    @(negedge clk);
    adapt_start = 0;
    last_change = 0; prev = delay_sel;
    for (int c = 1; c < 300; c++) begin
      @(negedge clk);
      if (delay_sel != prev) last_change = c;
      prev = delay_sel;
    end
    conv_cycles = last_change;
    dummy = 0;
    repeat (6) @(negedge clk);
    adapting = 0; rx_ignore = 0;
    expq.delete(); sent_cycle.delete(); t_dlq.delete();
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int conv, a, worst;
    int ups, downs;
    logic [3:0] s0;
    worst = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. training at many phases, then traffic
    for (int ph = 3; ph < T; ph += 7) begin
      phase = ph;
      train_session(conv);
      if (conv > worst) worst = conv;
      a = arrival(ph, delay_sel);
      check(a >= D && a <= T - D, $sformatf("phase %0d: sel %0d puts edge at %0d", ph, delay_sel, a));
      check(conv < 1000, "converged within 1000 cycles");
      stream = 1; random_gaps = 1; check_rx = 1;
      repeat (60) @(negedge clk);
      stream = 0;
      repeat (5) @(negedge clk);
      check(expq.size() == 0, $sformatf("phase %0d: %0d words not received", ph, expq.size()));
      check_rx = 0;
    end
    // 1b. the same with +-4 ps of cycle-to-cycle jitter on every edge
    jitter = 4;
    for (int ph = 5; ph < T; ph += 9) begin
      phase = ph;
      train_session(conv);
      if (conv > worst) worst = conv;
      a = arrival(ph, delay_sel);
      check(a >= D - jitter && a <= T - D + jitter,
            $sformatf("jitter, phase %0d: sel %0d puts edge at %0d", ph, delay_sel, a));
      stream = 1; random_gaps = 1; check_rx = 1;
      repeat (60) @(negedge clk);
      stream = 0;
      repeat (5) @(negedge clk);
      check(expq.size() == 0, $sformatf("jitter, phase %0d: %0d words not received", ph, expq.size()));
      check_rx = 0;
    end
    jitter = 0;
    $display("training settled after at most %0d cycles", worst);
    $display("average wait from delayed Rdy edge to sampling edge: %0.1f ps", wait_sum / wait_n);

    // 2. continuous tracking with drift up and back
    phase = 60;
    train_session(conv);
    s0 = delay_sel;
    ups = 0; downs = 0;
    tracking = 1; stream = 1; random_gaps = 0; check_rx = 1;
    for (int k = 0; k < 60; k++) begin
      logic [3:0] prev_sel;
      prev_sel = delay_sel;
      phase = (k < 30) ? phase + 1 : phase - 1;
      repeat (20) begin
        @(negedge clk);
        if (delay_sel > prev_sel) ups++;
        if (delay_sel < prev_sel) downs++;
        prev_sel = delay_sel;
      end
    end
    stream = 0;
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "tracking: all words received");
    check(downs > 0 && ups > 0, $sformatf("tracking moved down %0d and up %0d times", downs, ups));
    a = arrival(phase, delay_sel);
    check(a >= D && a <= T - D, "tracking: edge outside the window at the end");
    tracking = 0; check_rx = 0;
    $display("tracking: start sel %0d, %0d down and %0d up steps", s0, downs, ups);

    // 3. monitoring
    phase = 20;
    train_session(conv);
    monitor = 1; stream = 1;
    repeat (200) @(negedge clk);
    check(!drift_alarm, "no alarm without drift");
    for (int k = 0; k < 30 && !drift_alarm; k++) begin
      phase = phase + 1;
      repeat (10) @(negedge clk);
    end
    check(drift_alarm, "alarm after drift");
    stream = 0;
    repeat (5) @(negedge clk);
    @(negedge clk); adapt_start = 1; @(negedge clk); adapt_start = 0;
    check(!drift_alarm, "alarm cleared by a new session");
    monitor = 0;
    check(words_ok > 500, $sformatf("%0d words received", words_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
