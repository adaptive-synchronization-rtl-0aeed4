// Testbench for me_element: first-come grant, hold while requested, handover
// to a waiting request, mutual exclusion at all times, one grant on a tie.
`timescale 1ps/1ps
module tb_me_element;
  logic r1, r2, g1, g2;
  int checks = 0, failures = 0;

  me_element dut (.r1(r1), .r2(r2), .g1(g1), .g2(g2));

  task automatic expect_g(input logic e1, input logic e2, input string what);
    #1;
    checks++;
    if (g1 !== e1 || g2 !== e2) begin
      failures++;
      $display("FAIL %s: g1=%0b g2=%0b expected %0b %0b", what, g1, g2, e1, e2);
    end
  endtask

  // Mutual exclusion is checked on every grant change
  always @(g1 or g2) if (g1 && g2) begin
    failures++;
    $display("FAIL both grants high at %0t", $time);
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r1 = 0; r2 = 0;
    expect_g(0, 0, "idle");
    r1 = 1;             expect_g(1, 0, "r1 alone");
    r2 = 1;             expect_g(1, 0, "r2 waits behind r1");
    r1 = 0;             expect_g(0, 1, "handover to r2");
    r1 = 1;             expect_g(0, 1, "r1 waits behind r2");
    r2 = 0;             expect_g(1, 0, "handover to r1");
    r1 = 0;             expect_g(0, 0, "released");
    r2 = 1;             expect_g(0, 1, "r2 alone");
    r2 = 0;             expect_g(0, 0, "released again");
    // ties: both requests change in the same time step
    for (int i = 0; i < 20; i++) begin
      #5 {r1, r2} = 2'b11;
      #1 checks++;
      if ((g1 ^ g2) !== 1'b1) begin
        failures++;
        $display("FAIL tie %0d: g1=%0b g2=%0b", i, g1, g2);
      end
      #5 {r1, r2} = 2'b00;
      expect_g(0, 0, "released after tie");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
