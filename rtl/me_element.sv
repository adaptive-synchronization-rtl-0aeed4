// Mutual exclusion (ME) element -- behavioural model, not synthesizable logic.
//
// An ME element is an analog arbiter: two requests, two grants, at most one
// grant high at any time. The request that rises first is granted and keeps
// its grant while it stays high; when it falls, a waiting request is granted.
// When both requests rise in the same simulation time step the model picks a
// winner at random, standing in for the metastable resolution of the real
// cell (whose extra resolution time is not modelled).
//
// Ports: r1/r2 requests, g1/g2 grants. Grants follow requests in zero time.
`timescale 1ps/1ps
module me_element (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);

  initial begin
    g1 = 1'b0;
    g2 = 1'b0;
  end

  always @(r1 or r2) begin
    if (!r1) g1 = 1'b0;
    if (!r2) g2 = 1'b0;
    if (!g1 && !g2) begin
      if (r1 && r2) begin
        if ($urandom_range(1, 0) == 0) g1 = 1'b1;
        else                           g2 = 1'b1;
      end else if (r1) begin
        g1 = 1'b1;
      end else if (r2) begin
        g2 = 1'b1;
      end
    end
    assert (!(g1 && g2)) else $error("ME element granted both requests");
  end

endmodule
