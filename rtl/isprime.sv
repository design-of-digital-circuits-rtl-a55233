// isPrime: decides whether the W-bit unsigned input Num is a prime number.
//
// Trial division: numbers below 3 are prime only if equal to 2; otherwise
// the circuit tries F = 2, 3, ... and stops with P = 0 at the first F that
// divides N, or with P = 1 once F exceeds N/2. isprime_control (the FSM) and
// isprime_datapath (registers N, F, P) are split as in the lecture's block
// diagram, which names the same control and status signals.
//
// Interface: Reset (synchronous, active high), Start, Ready and Done as in
// the usual handshake. Num is copied when Start is sampled in the ready
// state, so it may change afterwards. P is valid while Done is high and stays
// valid until the next Start.
//
// Timing: one trial divisor per clock. With m = 1 for Num < 3 and otherwise
// m = the number of divisors tried, Done rises m+1 clock edges after the edge
// that samples Start, and Ready m+2 edges after it when Start is already low.
module isprime
  import isprime_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [W-1:0] num,
  output logic         ready,
  output logic         done,
  output logic         p
);

  isprime_ctrl_t   ctrl;
  isprime_status_t status;

  isprime_control u_control (
    .clk    (clk),
    .reset  (reset),
    .start  (start),
    .status (status),
    .ctrl   (ctrl),
    .ready  (ready),
    .done   (done)
  );

  isprime_datapath #(.W(W)) u_datapath (
    .clk    (clk),
    .reset  (reset),
    .num    (num),
    .ctrl   (ctrl),
    .status (status),
    .p      (p)
  );

endmodule
