// Testbench for conflict_detector at a 100 ps clock and d = 40 ps.
// The data line toggles once per cycle (alternating rising and falling edges)
// at a chosen offset from the clock's rising edge. For every offset from
// -50 to +49 ps the flag read at the next rising edge must equal
// |offset| <= d; exact ties (|offset| == d) are arbitrated at random and are
// not checked. The early flag must be set for conflicts before the edge.
// Frames without any data edge must report no conflict.
`timescale 1ps/1ps
module tb_conflict_detector;
  localparam int T = 100, D = 40;
  logic clk = 1'b0, data = 1'b0;
  logic conflict, conflict_early;
  int checks = 0, failures = 0;
  int offset;
  bit toggling = 0;

  conflict_detector #(.WINDOW_PS(D)) dut (
    .clk(clk), .data(data), .conflict(conflict), .conflict_early(conflict_early));

  always #(T/2) clk = ~clk;

  // data edge at rising edge + offset, one per cycle while toggling
  always @(posedge clk) if (toggling) begin
    if (offset >= 0) begin
      #(offset) data = ~data;
    end else begin
      #(T + offset) data = ~data;   // before the next rising edge
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    offset = 0;
    repeat (4) @(posedge clk);
    // no data edges at all
    repeat (4) begin
      @(posedge clk); #1;
      checks++;
      if (conflict) begin failures++; $display("FAIL conflict without data edges"); end
    end
    for (int o = -50; o < 50; o++) begin
      offset = o;
      toggling = 1;
      // let two edges of each polarity pass, then check four frames
      repeat (3) @(posedge clk);
      repeat (4) begin
        @(posedge clk); #1;
        if (o != D && o != -D) begin
          checks++;
          if (conflict != ((o <= D) && (o >= -D))) begin
            failures++;
            $display("FAIL offset %0d: conflict=%0b", o, conflict);
          end
          if (conflict && (conflict_early != (o < 0))) begin
            failures++;
            $display("FAIL offset %0d: early=%0b", o, conflict_early);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
