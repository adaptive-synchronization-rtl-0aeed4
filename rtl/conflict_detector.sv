// Data/clock conflict detector -- behavioural model (ME elements and analog
// delay elements are not synthesizable logic).
//
// It flags a cycle in which an edge of `data` (rising or falling) lies within
// WINDOW_PS (the threshold d) of a rising edge of `clk`, i.e.
// |t(data) - t(clk)| <= d. Time is cut into frames that run from one falling
// clock edge to the next, so each frame holds exactly one rising clock edge
// tC, the one nearest to any data edge inside the frame.
//
// Four ME elements make the decision, two per data-edge polarity:
//   ME A: (data edge delayed by d) against (clock edge). Data wins when
//         t(data) + d < tC, i.e. the edge is safely early.
//   ME B: (clock edge delayed by d) against (data edge). The delayed clock
//         wins when tC + d < t(data), i.e. the edge is safely late.
// A conflict is the case where the clock wins ME A and the data edge wins
// ME B. Every request is a level that an edge sets and that the end of the
// frame clears, so a grant cannot change hands inside the frame.
//
// Outputs change at the falling clock edge (end of the frame) and hold for
// one cycle, so the local clock domain samples them once per frame at the
// next rising edge:
//   conflict       - a data edge of the frame was inside the window
//   conflict_early - that edge came before tC (a flip-flop samples the edge
//                    requests at tC); used only by up/down tracking
// The four-ME structure follows the described detector; the frame-based
// request reset and the early/late flag are this design's reading of it.
`timescale 1ps/1ps
module conflict_detector #(
  parameter int unsigned WINDOW_PS = as_pkg::WINDOW_PS
) (
  input  logic clk,
  input  logic data,
  output logic conflict,
  output logic conflict_early
);

  logic clk_d, data_d;
  // Edge requests, set by an edge and cleared at the end of the frame
  logic req_c, req_cd;             // clock edge, delayed clock edge
  logic req_er, req_erd;           // rising data edge, delayed
  logic req_ef, req_efd;           // falling data edge, delayed
  logic ga_r_d, ga_r_c, gb_r_cd, gb_r_e;
  logic ga_f_d, ga_f_c, gb_f_cd, gb_f_e;
  logic edge_before_clk;

  initial begin
    clk_d = 1'b0; data_d = 1'b0;
    req_c = 1'b0; req_cd = 1'b0;
    req_er = 1'b0; req_erd = 1'b0; req_ef = 1'b0; req_efd = 1'b0;
    conflict = 1'b0; conflict_early = 1'b0; edge_before_clk = 1'b0;
  end

  // The two delay elements of length d
  always @(clk)  clk_d  <= #(WINDOW_PS) clk;
  always @(data) data_d <= #(WINDOW_PS) data;

  always @(posedge clk) begin
    req_c = 1'b1;
    edge_before_clk = req_er | req_ef;
  end
  always @(posedge clk_d)  req_cd  = 1'b1;
  always @(posedge data)   req_er  = 1'b1;
  always @(negedge data)   req_ef  = 1'b1;
  always @(posedge data_d) req_erd = 1'b1;
  always @(negedge data_d) req_efd = 1'b1;

  // Rising data edges
  me_element u_me_a_rise (.r1(req_erd), .r2(req_c),  .g1(ga_r_d),  .g2(ga_r_c));
  me_element u_me_b_rise (.r1(req_cd),  .r2(req_er), .g1(gb_r_cd), .g2(gb_r_e));
  // Falling data edges
  me_element u_me_a_fall (.r1(req_efd), .r2(req_c),  .g1(ga_f_d),  .g2(ga_f_c));
  me_element u_me_b_fall (.r1(req_cd),  .r2(req_ef), .g1(gb_f_cd), .g2(gb_f_e));

  // End of frame: read the arbitration results, then clear every request
  always @(negedge clk) begin
    conflict       = (ga_r_c && gb_r_e) || (ga_f_c && gb_f_e);
    conflict_early = conflict && edge_before_clk;
    req_c   = 1'b0;
    req_cd  = 1'b0;
    req_er  = 1'b0;
    req_erd = 1'b0;
    req_ef  = 1'b0;
    req_efd = 1'b0;
  end

endmodule
