// Testbench for digital_delay_line: for every tap, a data edge must reach the
// output (sel + 1) * STEP_PS after it enters, for both polarities and for
// each wire of the bundle.
`timescale 1ps/1ps
module tb_digital_delay_line;
  localparam int unsigned TAPS = 16, STEP = 8, W = 3;
  logic [W-1:0] din, dout;
  logic [3:0]   sel;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  digital_delay_line #(.WIDTH(W), .TAPS(TAPS), .STEP_PS(STEP)) dut (
    .din(din), .sel(sel), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; sel = '0;
    #500;
    for (int s = 0; s < TAPS; s++) begin
      sel = s[3:0];
      #300;
      for (int e = 0; e < 4; e++) begin
        logic [W-1:0] nv;
        nv = (e % 2 == 0) ? W'($urandom_range(7, 1)) | din : '0;
        if (nv == din) nv = ~din;
        din = nv;
        t_in = $realtime;
        @(dout);
        t_out = $realtime;
        #1;
        checks++;
        if (t_out - t_in != real'((s + 1) * STEP) || dout !== din) begin
          failures++;
          $display("FAIL sel=%0d delay=%0t dout=%b din=%b", s, t_out - t_in, dout, din);
        end
        #200;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
