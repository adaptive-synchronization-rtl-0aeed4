// Testbench for adapt_counter: random clear/up/down commands against a
// reference model, including saturation at both ends.
`timescale 1ps/1ps
module tb_adapt_counter;
  logic clk = 1'b0, rst_n = 1'b0, clear, up, down;
  logic [3:0] count;
  int checks = 0, failures = 0;
  int model;
  int top_hits = 0, bottom_hits = 0;

  adapt_counter #(.W(4)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .up(up),
                              .down(down), .count(count));

  always #50 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; up = 0; down = 0; model = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (count != 0) begin failures++; $display("FAIL reset value %0d", count); end
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear = ($urandom_range(40, 0) == 0);
      // phases of mostly-up and mostly-down traffic reach both ends
      up    = ((i / 200) % 2 == 0) ? ($urandom_range(3, 0) != 0) : ($urandom_range(3, 0) == 0);
      down  = $urandom_range(1, 0) == 1;
      @(posedge clk);
      if (clear)                       model = 0;
      else if (up && model != 15)      model++;
      else if (!up && down && model != 0) model--;
      if (up && model == 15) top_hits++;
      if (down && !up && model == 0) bottom_hits++;
      #1;
      checks++;
      if (count != 4'(model)) begin
        failures++;
        $display("FAIL step %0d: count=%0d model=%0d", i, count, model);
      end
    end
    checks++;
    if (top_hits == 0 || bottom_hits == 0) begin
      failures++;
      $display("FAIL saturation not exercised (%0d, %0d)", top_hits, bottom_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
