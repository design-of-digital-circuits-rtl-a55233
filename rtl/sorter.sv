// Exchange sorter: sorts K unsigned N-bit words in place, smallest first.
//
// For i = 0 .. K-2 and j = i+1 .. K-1 it compares Reg[j] with Reg[i] and
// swaps them when Reg[j] is smaller, so that after pass i the smallest of the
// remaining words sits at index i. sort_control sequences the algorithm and
// sort_datapath holds the register file, A, B, i and j, as in the lecture's
// ASMD chart and datapath drawing.
//
// Interface: the usual Reset/Start/Ready/Done handshake. Pulse or hold Start
// while Ready is high to begin; Done goes high when the words are sorted and
// stays high until Start is low, after which Ready returns. Words are written
// through ld_we/ld_addr/ld_data and read back through rd_addr/rd_data; the
// load port is this design's addition and is honoured only while Ready is
// high. Reset is synchronous and active high; it does not clear the words.
//
// Timing: with s swaps, Done rises (K-1) + 3*K*(K-1)/2 + s clock edges
// after the edge that samples Start: one S_A cycle per outer pass, three
// cycles per compare and one more per swap. For K = 8 that is 91 to 119.
module sorter
  import sort_pkg::*;
#(
  parameter int unsigned K  = 8,
  parameter int unsigned N  = 8,
  parameter int unsigned AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  output logic          ready,
  output logic          done,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [N-1:0]  ld_data,
  input  logic [AW-1:0] rd_addr,
  output logic [N-1:0]  rd_data
);

  sort_ctrl_t   ctrl;
  sort_status_t status;

  sort_control u_control (
    .clk    (clk),
    .reset  (reset),
    .start  (start),
    .status (status),
    .ctrl   (ctrl),
    .ready  (ready),
    .done   (done)
  );

  sort_datapath #(.K(K), .N(N), .AW(AW)) u_datapath (
    .clk       (clk),
    .reset     (reset),
    .ctrl      (ctrl),
    .status    (status),
    .ext_we    (ld_we && ready),
    .ext_addr  (ld_addr),
    .ext_wdata (ld_data),
    .x_addr    (rd_addr),
    .x_data    (rd_data)
  );

endmodule
