// Self-checking test of the timed_dff model, built around the lecture's
// timing worked example: t_su = 12 ns, t_h = 18 ns, t_co = 8 ns, an AND gate
// of 25 ns and a NOR gate of 20 ns.
//
// 1. Clock-to-Q: Q and Qn change exactly t_co after the rising edge.
// 2. Minimum clock period: a register (toggling through a 25 ns gate) whose
//    output reaches a second register through 45 ns of logic (AND then NOR)
//    needs
//    t_co + 25 + 20 <= T - t_su, i.e. T >= 65 ns. At T = 65 ns no setup
//    violation may occur, at T = 64 ns one must.
// 3. Input window at T = 65 ns: an input In reaches one register after 25 ns
//    (AND) and another after 45 ns (AND then NOR). Sweeping the time t_in at
//    which In changes after an edge, a violation must be flagged exactly when
//    t_in is outside [0, 8] and [58, 65), the intersection of the two paths'
//    windows t_h <= t_in + delay <= T - t_su taken modulo the period.
module timed_dff_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T_AND = 25.0;
  localparam realtime T_NOR = 20.0;

  realtime period = 65.0;
  logic    clk = 1'b0;
  int checks = 0, failures = 0;

  always begin
    #(period / 2.0) clk = 1'b1;
    #(period / 2.0) clk = 1'b0;
  end

  initial begin
    #2000000;
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

  // Part 1: a single flip-flop.
  logic d0 = 1'b0, clr0 = 1'b0, q0, qn0, su0, h0;
  timed_dff u0 (.clk(clk), .d(d0), .clr(clr0), .q(q0), .qn(qn0), .setup_viol(su0), .hold_viol(h0));

  // Part 2: toggling register A feeding register B through AND and NOR.
  // A toggles through a 25 ns gate: a direct Qn -> D loop (8 ns) would break
  // the 18 ns hold time.
  logic da = 1'b1, qa, qna, sua, ha, db = 1'b0, qb, qnb, sub, hb, clr_ab = 1'b0;
  always @(qna) da <= #(T_AND) qna;
  timed_dff ua (.clk(clk), .d(da), .clr(clr_ab), .q(qa), .qn(qna), .setup_viol(sua), .hold_viol(ha));
  always @(qa) db <= #(T_AND + T_NOR) qa;
  timed_dff ub (.clk(clk), .d(db), .clr(clr_ab), .q(qb), .qn(qnb), .setup_viol(sub), .hold_viol(hb));

  // Part 3: input In through AND (to register 1) and AND + NOR (register 2).
  logic in_s = 1'b0, d1 = 1'b0, d2 = 1'b0, clr12 = 1'b0;
  logic q1, qn1, su1, h1, q2, qn2, su2, h2;
  always @(in_s) d1 <= #(T_AND) in_s;
  always @(in_s) d2 <= #(T_AND + T_NOR) in_s;
  timed_dff u1 (.clk(clk), .d(d1), .clr(clr12), .q(q1), .qn(qn1), .setup_viol(su1), .hold_viol(h1));
  timed_dff u2 (.clk(clk), .d(d2), .clr(clr12), .q(q2), .qn(qn2), .setup_viol(su2), .hold_viol(h2));

  task automatic pulse(ref logic c);
    c = 1'b1; #0.1; c = 1'b0;
  endtask

  initial begin
    realtime t_edge;
    logic ok_exp, ok_got;
    int n_bad = 0;
    // --- part 1: clock-to-Q
    @(posedge clk); #20; d0 = 1'b1;
    @(posedge clk); t_edge = $realtime;
    @(q0);
    check($realtime - t_edge == 8.0, "Q changes t_co after the edge");
    check(qn0 == ~q0, "Qn is the complement of Q");
    check(!su0 && !h0, "no violation for a well-timed input");
    // D changes 5 ns after the edge: hold violation, Q still follows later
    @(posedge clk); #5; d0 = 1'b0;
    #1; check(h0 && !su0, "hold violation 5 ns after the edge");
    pulse(clr0);
    // D changes 5 ns before the edge: setup violation
    @(posedge clk); #(period - 5.0); d0 = 1'b1;
    @(posedge clk); #1;
    check(su0 && !h0, "setup violation 5 ns before the edge");
    pulse(clr0);
    // exactly t_h after and exactly t_su before are allowed
    @(posedge clk); #18.0; d0 = 1'b0;
    #(period - 18.0 - 12.0); d0 = 1'b1;
    @(posedge clk); #1;
    check(!su0 && !h0, "changes at exactly t_h and T - t_su are allowed");

    // --- part 2: minimum period
    pulse(clr_ab);
    repeat (6) @(posedge clk);
    #1; check(!sub && !hb && !sua && !ha, "T = 65 ns meets timing");
    period = 64.0;
    @(posedge clk); pulse(clr_ab);
    repeat (6) @(posedge clk);
    #1; check(sub, "T = 64 ns violates setup at register B");
    check(!hb, "T = 64 ns has no hold violation at register B");
    period = 65.0;
    @(posedge clk); @(posedge clk);

    // --- part 3: input window
    for (int t_in = 0; t_in < 65; t_in++) begin
      @(posedge clk); #1; pulse(clr12);
      @(posedge clk);
      #(real'(t_in)); in_s = ~in_s;
      repeat (3) @(posedge clk);
      #1;
      ok_got = !(su1 || h1 || su2 || h2);
      ok_exp = (t_in <= 8) || (t_in >= 58);
      check(ok_got == ok_exp, $sformatf("window, t_in = %0d ns", t_in));
      if (!ok_got) n_bad++;
    end
    check(n_bad == 65 - 9 - 7, "number of bad input times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
