// End-to-end test of dcs_top at its default parameters (K = 8 words of
// N = 8 bits, W = 4), with a 65 ns clock, the minimum period of the timing
// worked example. Three threads run at once, one per design:
//  - sorter: several sorts (random, with duplicates, sorted, reversed); each
//    result is checked against a reference sort, and the cycle count against
//    (K-1) + 3*K*(K-1)/2 + swaps.
//  - isprime: all 2**W values of Num, P checked against trial division and
//    the latency against the number of trial divisors.
//  - timed D flip-flop: D changes in the safe window, too soon after an edge
//    and too close to the next edge; Q and the violation flags are checked.
// Every mechanism is counted (swap, no swap, next j, next i, Done held by
// Start, Special, Clr_P, Set_P, Incr_F, setup and hold violation, clean
// capture) and a failure is counted for any that never happened.
module dcs_top_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned K  = 8;
  localparam int unsigned N  = 8;
  localparam int unsigned W  = 4;
  localparam int unsigned AW = $clog2(K);
  localparam realtime     T  = 65.0;

  logic          clk = 1'b0, reset;
  logic          srt_start, srt_ready, srt_done, srt_ld_we;
  logic [AW-1:0] srt_ld_addr, srt_rd_addr;
  logic [N-1:0]  srt_ld_data, srt_rd_data;
  logic          prm_start, prm_ready, prm_done, prm_p;
  logic [W-1:0]  prm_num;
  logic          ff_d, ff_clr, ff_q, ff_qn, ff_setup_viol, ff_hold_viol;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_swap = 0, n_noswap = 0, n_next_j = 0, n_next_i = 0, n_done_held = 0;
  int n_special = 0, n_clr_p = 0, n_set_p = 0, n_incr_f = 0;
  int n_setup = 0, n_hold = 0, n_clean = 0;

  always #(T / 2.0) clk = ~clk;

  dcs_top dut (.*);

  initial begin
    #(T * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // Count control events from inside the two controllers.
  always @(posedge clk) if (!reset) begin
    if (dut.u_sorter.ctrl.store_b) n_swap++;
    if (dut.u_sorter.u_control.state == sort_pkg::S_COMPARE && !dut.u_sorter.ctrl.store_b) n_noswap++;
    if (dut.u_sorter.ctrl.incr_j) n_next_j++;
    if (dut.u_sorter.ctrl.incr_i) n_next_i++;
    if (dut.u_isprime.ctrl.special) n_special++;
    if (dut.u_isprime.ctrl.clr_p) n_clr_p++;
    if (dut.u_isprime.ctrl.set_p) n_set_p++;
    if (dut.u_isprime.ctrl.incr_f) n_incr_f++;
  end

  function automatic int prm_visits(input int n);
    if (n < 3) return 1;
    for (int f = 2; ; f++) if (n % f == 0 || f > n / 2) return f - 1;
  endfunction

  function automatic logic prm_ref(input int n);
    if (n < 2) return 1'b0;
    for (int f = 2; f < n; f++) if (n % f == 0) return 1'b0;
    return 1'b1;
  endfunction

  task automatic run_sorter();
    logic [N-1:0] w [K];
    logic [N-1:0] t;
    int swaps, cycles;
    for (int trial = 0; trial < 6; trial++) begin
      for (int a = 0; a < K; a++) begin
        case (trial % 3)
          0: w[a] = N'($urandom);
          1: w[a] = N'($urandom % 4);
          default: w[a] = (trial == 2) ? N'(a) : N'(K - a);
        endcase
        srt_ld_we = 1; srt_ld_addr = AW'(a); srt_ld_data = w[a];
        @(negedge clk);
      end
      srt_ld_we = 0;
      swaps = 0;
      for (int i = 0; i < K - 1; i++)
        for (int j = i + 1; j < K; j++)
          if (w[j] < w[i]) begin t = w[i]; w[i] = w[j]; w[j] = t; swaps++; end
      check(srt_ready, "sorter ready");
      srt_start = 1; @(negedge clk);
      srt_start = trial[0];
      cycles = 0;
      while (!srt_done) begin @(negedge clk); cycles++; end
      check(cycles == (K - 1) + 3 * K * (K - 1) / 2 + swaps, "sorter cycle count");
      if (srt_start) begin
        @(negedge clk);
        if (srt_done) n_done_held++;
        srt_start = 0;
      end
      @(negedge clk);
      for (int a = 0; a < K; a++) begin
        srt_rd_addr = AW'(a); #1;
        check(srt_rd_data == w[a], $sformatf("sorted word %0d", a));
      end
      @(negedge clk);
    end
  endtask

  task automatic run_isprime();
    int cycles;
    for (int n = 0; n < 2 ** W; n++) begin
      check(prm_ready, "isprime ready");
      prm_start = 1; prm_num = W'(n); @(negedge clk);
      prm_start = 0; prm_num = W'(n + 5);
      cycles = 1;
      while (!prm_done) begin @(negedge clk); cycles++; end
      check(prm_p == prm_ref(n), $sformatf("isPrime(%0d)", n));
      check(cycles == prm_visits(n) + 1, $sformatf("isPrime(%0d) latency", n));
      @(negedge clk);
    end
  endtask

  task automatic run_dff();
    for (int k = 0; k < 30; k++) begin
      realtime off;
      logic v;
      @(posedge clk);
      ff_clr = 1; #0.5; ff_clr = 0;
      case (k % 3)
        0: off = 30.0;      // inside [t_h, T - t_su] = [18, 53]
        1: off = 10.0;      // before t_h: hold violation
        default: off = 60.0; // after T - t_su: setup violation
      endcase
      #(off - 0.5);
      v = ~ff_d; ff_d = v;
      @(posedge clk);
      #(8.5);
      check(ff_q == v && ff_qn == ~v, "flip-flop captured D");
      case (k % 3)
        0: begin check(!ff_setup_viol && !ff_hold_viol, "clean capture");
                 if (!ff_setup_viol && !ff_hold_viol) n_clean++; end
        1: begin check(ff_hold_viol && !ff_setup_viol, "hold violation flagged");
                 if (ff_hold_viol) n_hold++; end
        default: begin check(ff_setup_viol && !ff_hold_viol, "setup violation flagged");
                 if (ff_setup_viol) n_setup++; end
      endcase
    end
  endtask

  initial begin
    reset = 1; srt_start = 0; srt_ld_we = 0; srt_ld_addr = 0; srt_ld_data = 0;
    srt_rd_addr = 0; prm_start = 0; prm_num = 0; ff_d = 0; ff_clr = 0;
    @(negedge clk); @(negedge clk); reset = 0;
    fork
      run_sorter();
      run_isprime();
      run_dff();
    join
    check(n_swap > 0, "sorter swapped");
    check(n_noswap > 0, "sorter compared without swapping");
    check(n_next_j > 0, "sorter advanced j");
    check(n_next_i == 6 * (K - 2), "sorter advanced i K-2 times per sort");
    check(n_done_held > 0, "sorter held Done while Start high");
    check(n_special == 3, "isprime Special for 0, 1, 2");
    check(n_clr_p > 0, "isprime found a factor");
    check(n_set_p > 0, "isprime found a prime");
    check(n_incr_f > 0, "isprime tried further factors");
    check(n_clean > 0 && n_setup > 0 && n_hold > 0, "flip-flop: clean, setup and hold cases");
    $display("mechanisms: swap=%0d noswap=%0d next_j=%0d next_i=%0d done_held=%0d",
             n_swap, n_noswap, n_next_j, n_next_i, n_done_held);
    $display("            special=%0d clr_p=%0d set_p=%0d incr_f=%0d clean=%0d setup=%0d hold=%0d",
             n_special, n_clr_p, n_set_p, n_incr_f, n_clean, n_setup, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
