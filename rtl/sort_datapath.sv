// Datapath of the exchange sorter.
//
// Built as in the lecture's sorting datapath: the K x N register file, data
// registers A and B, and two up-counters i and j. Counter i loads 0 (Init_i)
// or counts (Incr_i); counter j loads i+1 (Init_j) or counts (Incr_j). The
// read address is j when Load_B is asserted and i otherwise, so A <- Reg[i]
// and B <- Reg[j]. The write address and data are i and B when Store_B is
// asserted (Reg[i] <- B), j and A otherwise (Reg[j] <- A); the file is
// written when either store is asserted. Status: B_lt_A compares B with A,
// i_done flags i == K-2 and j_done flags j == K-1.
//
// This design's own additions: a synchronous reset that clears A, B, i and
// j, and a load port (ext_we/ext_addr/ext_wdata) that writes the register
// file directly when no store is in progress. The enclosing module allows it
// only while the controller is idle. A second read port (x_addr/x_data)
// reads the words back. Values are compared as unsigned numbers.
//
// Timing: registers update on the rising edge; status is combinational from
// the registers.
module sort_datapath
  import sort_pkg::*;
#(
  parameter int unsigned K  = 8,
  parameter int unsigned N  = 8,
  parameter int unsigned AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          reset,
  input  sort_ctrl_t    ctrl,
  output sort_status_t  status,
  input  logic          ext_we,
  input  logic [AW-1:0] ext_addr,
  input  logic [N-1:0]  ext_wdata,
  input  logic [AW-1:0] x_addr,
  output logic [N-1:0]  x_data
);

  logic [AW-1:0] i, j;
  logic [N-1:0]  a, b;
  logic [AW-1:0] r_addr, w_addr;
  logic [N-1:0]  r_data, w_data;
  logic          w_en;

  // Address and data multiplexers of the datapath drawing.
  always_comb begin
    r_addr = ctrl.load_b ? j : i;
    if (ctrl.store_a || ctrl.store_b) begin
      w_en   = 1'b1;
      w_addr = ctrl.store_b ? i : j;
      w_data = ctrl.store_b ? b : a;
    end else begin
      w_en   = ext_we;
      w_addr = ext_addr;
      w_data = ext_wdata;
    end
  end

  sort_regfile #(.K(K), .N(N), .AW(AW)) u_regfile (
    .clk    (clk),
    .w_en   (w_en),
    .w_addr (w_addr),
    .w_data (w_data),
    .r_addr (r_addr),
    .r_data (r_data),
    .x_addr (x_addr),
    .x_data (x_data)
  );

  // Up-counter i.
  always_ff @(posedge clk) begin
    if (reset)            i <= '0;
    else if (ctrl.init_i) i <= '0;
    else if (ctrl.incr_i) i <= i + 1'b1;
  end

  // Up-counter j.
  always_ff @(posedge clk) begin
    if (reset)            j <= '0;
    else if (ctrl.init_j) j <= i + 1'b1;
    else if (ctrl.incr_j) j <= j + 1'b1;
  end

  // Registers A and B.
  always_ff @(posedge clk) begin
    if (reset) begin
      a <= '0;
      b <= '0;
    end else begin
      if (ctrl.load_a) a <= r_data;
      if (ctrl.load_b) b <= r_data;
    end
  end

  localparam logic [AW-1:0] I_LAST = AW'(K - 2);
  localparam logic [AW-1:0] J_LAST = AW'(K - 1);

  assign status.b_lt_a = (b < a);
  assign status.i_done = (i == I_LAST);
  assign status.j_done = (j == J_LAST);

endmodule
