// Self-checking test of sort_control. The status inputs are driven by a small
// model of the datapath's counters (i, j) and of B < A kept in the test, so
// the controller walks the full nested loop for K = 4. At every cycle the
// test checks the control word, Ready and Done against the values the ASMD
// chart prescribes for the current step, and it checks the total cycle count.
module sort_control_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import sort_pkg::*;

  localparam int K = 4;

  logic         clk = 1'b0, reset, start;
  sort_status_t status;
  sort_ctrl_t   ctrl;
  logic         ready, done;
  int checks = 0, failures = 0;
  int i_m, j_m;
  logic lt;

  always #5 clk = ~clk;

  sort_control dut (.*);

  assign status.b_lt_a = lt;
  assign status.i_done = (i_m == K - 2);
  assign status.j_done = (j_m == K - 1);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctrl(input sort_ctrl_t exp, input logic er, input logic ed, input string what);
    checks++;
    if (ctrl !== exp || ready !== er || done !== ed) begin
      failures++;
      $display("FAIL %s (i=%0d j=%0d): ctrl=%b exp %b ready=%b done=%b", what, i_m, j_m, ctrl, exp, ready, done);
    end
  endtask

  function automatic sort_ctrl_t c(input logic ii, input logic inci, input logic ij,
                                   input logic incj, input logic la, input logic sa,
                                   input logic lb, input logic sb);
    return '{init_i: ii, incr_i: inci, init_j: ij, incr_j: incj,
             load_a: la, store_a: sa, load_b: lb, store_b: sb};
  endfunction

  int cycles, swaps;

  initial begin
    reset = 1; start = 0; lt = 0; i_m = 0; j_m = 0;
    @(posedge clk); @(negedge clk);
    reset = 0;
    expect_ctrl('0, 1, 0, "idle");
    @(negedge clk);
    expect_ctrl('0, 1, 0, "idle holds without start");
    start = 1; #1;
    expect_ctrl(c(1,0,0,0,0,0,0,0), 1, 0, "idle with start: Init_i");
    @(negedge clk); start = 0; i_m = 0;
    cycles = 0; swaps = 0;
    forever begin
      // S_A
      expect_ctrl(c(0,0,1,0,1,0,0,0), 0, 0, "S_A");
      @(negedge clk); cycles++; j_m = i_m + 1;
      forever begin
        // S_B
        expect_ctrl(c(0,0,0,0,0,0,1,0), 0, 0, "S_B");
        @(negedge clk); cycles++;
        // S_compare, swap on a pseudo-random pattern
        lt = ((i_m + j_m) % 2) == 1; #1;
        if (lt) begin
          expect_ctrl(c(0,0,0,0,0,0,0,1), 0, 0, "S_compare swap");
          @(negedge clk); cycles++; swaps++; lt = 0;
          expect_ctrl(c(0,0,0,0,0,1,0,0), 0, 0, "S_swap");
          @(negedge clk); cycles++;
        end else begin
          expect_ctrl('0, 0, 0, "S_compare no swap");
          @(negedge clk); cycles++;
        end
        // S_loops
        if (j_m != K - 1) begin
          expect_ctrl(c(0,0,0,1,1,0,0,0), 0, 0, "S_loops next j");
          @(negedge clk); cycles++; j_m++;
        end else if (i_m != K - 2) begin
          expect_ctrl(c(0,1,0,0,1,0,0,0), 0, 0, "S_loops next i");
          @(negedge clk); cycles++; i_m++;
          break;
        end else begin
          expect_ctrl(c(0,0,0,0,1,0,0,0), 0, 0, "S_loops last");
          @(negedge clk); cycles++;
          break;
        end
      end
      if (done) break;
    end
    // cycle count: (K-1) S_A + 3 per inner pass + 1 per swap
    checks++;
    if (cycles != (K - 1) + 3 * K * (K - 1) / 2 + swaps) begin
      failures++;
      $display("FAIL cycle count %0d", cycles);
    end
    start = 1;
    expect_ctrl('0, 0, 1, "S_done");
    @(negedge clk);
    expect_ctrl('0, 0, 1, "S_done holds while Start high");
    start = 0;
    @(negedge clk);
    expect_ctrl('0, 1, 0, "back to idle");
    // reset from the middle of a run
    start = 1; @(negedge clk); start = 0; @(negedge clk);
    reset = 1; @(negedge clk); reset = 0;
    expect_ctrl('0, 1, 0, "reset returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
