// K x N register file of the exchange sorter.
//
// Holds the K words being sorted. It has one synchronous write port and two
// combinational read ports. Read port r_* serves the sorting algorithm: the
// controller loads A and B from it in the same cycle that it presents the
// address, so the read must be combinational. Read port x_* lets the user
// read the words out when sorting is done; it is this design's addition, as
// the lecture's drawing shows only the algorithm's ports (w_addr, w_data,
// w_en, r_addr, r_data).
//
// Timing: a write with w_en high takes effect at the rising clock edge; both
// reads follow their address within the same cycle. There is no reset: the
// contents are whatever was last written.
module sort_regfile #(
  parameter int unsigned K  = 8,              // number of words
  parameter int unsigned N  = 8,              // bits per word
  parameter int unsigned AW = $clog2(K)       // address width, log2 k
) (
  input  logic          clk,
  input  logic          w_en,
  input  logic [AW-1:0] w_addr,
  input  logic [N-1:0]  w_data,
  input  logic [AW-1:0] r_addr,
  output logic [N-1:0]  r_data,
  input  logic [AW-1:0] x_addr,
  output logic [N-1:0]  x_data
);

  logic [N-1:0] mem [K];

  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr] <= w_data;
  end

  assign r_data = mem[r_addr];
  assign x_data = mem[x_addr];

endmodule
