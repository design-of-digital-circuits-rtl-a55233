// Top level: three independent designs from the same lecture, side by side.
//
// 1. sorter   - an ASMD-style exchange sorter for K unsigned N-bit words with
//               its own Start/Ready/Done handshake and load/read ports.
// 2. isprime  - a trial-division primality tester for a W-bit number.
// 3. timed_dff - a behavioural edge-triggered D flip-flop that models setup,
//               hold and clock-to-Q times and flags violations. It is a
//               simulation model; synthesis sees only its ports.
//
// The three share the clock and nothing else; sorter and isprime share the
// synchronous active-high reset. Each brings out its own ports, prefixed
// srt_, prm_ and ff_. Latencies are those of the blocks themselves.
module dcs_top #(
  parameter int unsigned K  = 8,         // sorter: number of words
  parameter int unsigned N  = 8,         // sorter: bits per word
  parameter int unsigned W  = 4,         // isprime: width of Num
  parameter int unsigned AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          reset,
  // sorter
  input  logic          srt_start,
  output logic          srt_ready,
  output logic          srt_done,
  input  logic          srt_ld_we,
  input  logic [AW-1:0] srt_ld_addr,
  input  logic [N-1:0]  srt_ld_data,
  input  logic [AW-1:0] srt_rd_addr,
  output logic [N-1:0]  srt_rd_data,
  // isprime
  input  logic          prm_start,
  input  logic [W-1:0]  prm_num,
  output logic          prm_ready,
  output logic          prm_done,
  output logic          prm_p,
  // timed D flip-flop
  input  logic          ff_d,
  input  logic          ff_clr,
  output logic          ff_q,
  output logic          ff_qn,
  output logic          ff_setup_viol,
  output logic          ff_hold_viol
);

  sorter #(.K(K), .N(N), .AW(AW)) u_sorter (
    .clk     (clk),
    .reset   (reset),
    .start   (srt_start),
    .ready   (srt_ready),
    .done    (srt_done),
    .ld_we   (srt_ld_we),
    .ld_addr (srt_ld_addr),
    .ld_data (srt_ld_data),
    .rd_addr (srt_rd_addr),
    .rd_data (srt_rd_data)
  );

  isprime #(.W(W)) u_isprime (
    .clk   (clk),
    .reset (reset),
    .start (prm_start),
    .num   (prm_num),
    .ready (prm_ready),
    .done  (prm_done),
    .p     (prm_p)
  );

  timed_dff u_dff (
    .clk        (clk),
    .d          (ff_d),
    .clr        (ff_clr),
    .q          (ff_q),
    .qn         (ff_qn),
    .setup_viol (ff_setup_viol),
    .hold_viol  (ff_hold_viol)
  );

endmodule
