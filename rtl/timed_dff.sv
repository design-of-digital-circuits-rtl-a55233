// Behavioural model (not synthesizable) of an edge-triggered D flip-flop with
// its three timing terms.
//
// t_su (setup): D must be stable for T_SU before the rising clock edge.
// t_h (hold): D must stay stable for T_H after the edge.
// t_co (clock-to-Q): Q and Qn change T_CO after the edge.
// The model captures D at each rising edge and drives Q = D, Qn = ~D after
// T_CO. It also checks every D change against the edges around it: a change
// less than T_SU before an edge sets setup_viol, a change less than T_H after
// an edge sets hold_viol. A change exactly T_SU before or T_H after an edge is
// allowed. Both flags stay set until clr is pulsed high, so a test can
// sweep input timing and ask whether any violation happened. A real flip-flop
// may go metastable or capture either value on a violation; this model still
// captures the value D has at the edge and only reports the violation.
//
// Default times are the flip-flop of the lecture's worked example:
// t_su = 12 ns, t_h = 18 ns, t_co = 8 ns. The checking flags and clr are this
// model's own additions; the gate-level latch structure of a real flip-flop
// is not modelled.
module timed_dff #(
  parameter realtime T_SU = 12.0,  // setup time, ns
  parameter realtime T_H  = 18.0,  // hold time, ns
  parameter realtime T_CO = 8.0    // clock-to-Q delay, ns
) (
  input  logic clk,
  input  logic d,
  input  logic clr,          // clears setup_viol and hold_viol
  output logic q,
  output logic qn,
  output logic setup_viol,
  output logic hold_viol
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime     t_d_change;  // time of the last change of D
  realtime     t_edge;      // time of the last rising clock edge
  logic        seen_d;      // D has changed at least once
  logic        seen_edge;   // at least one edge has happened
  int unsigned n_setup;     // setup violations seen so far
  int unsigned n_hold;      // hold violations seen so far
  int unsigned n_setup_clr; // n_setup at the last clr
  int unsigned n_hold_clr;  // n_hold at the last clr

  initial begin
    q           = 1'b0;
    qn          = 1'b1;
    seen_d      = 1'b0;
    seen_edge   = 1'b0;
    t_d_change  = 0.0;
    t_edge      = 0.0;
    n_setup     = 0;
    n_hold      = 0;
    n_setup_clr = 0;
    n_hold_clr  = 0;
  end

  // Capture, clock-to-Q delay, and the setup check at the edge. The time
  // stamps are blocking so that a D change in the same time step sees them.
  always @(posedge clk) begin
    if (seen_d && ($realtime - t_d_change < T_SU)) n_setup++;
    t_edge    = $realtime;
    seen_edge = 1'b1;
    q  <= #(T_CO) d;
    qn <= #(T_CO) ~d;
  end

  // Hold check at each change of D.
  always @(d) begin
    if (seen_edge && ($realtime - t_edge < T_H)) n_hold++;
    t_d_change = $realtime;
    seen_d     = 1'b1;
  end

  always @(posedge clr) begin
    n_setup_clr = n_setup;
    n_hold_clr  = n_hold;
  end

  assign setup_viol = (n_setup != n_setup_clr);
  assign hold_viol  = (n_hold != n_hold_clr);

endmodule
