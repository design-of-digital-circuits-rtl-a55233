// Self-checking test of isprime_control. The status inputs are driven by the
// test, which walks the controller through each exit of its S_check state:
// N < 3 (Special), a factor found (Clr_P), no factor below N/2 (Set_P), and
// a number of repeated visits with Incr_F. At every cycle the control word,
// Ready and Done are checked against what the ASMD chart prescribes, as is
// the number of cycles spent in S_check and the Start/Done handshake.
module isprime_control_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import isprime_pkg::*;

  logic            clk = 1'b0, reset, start, ready, done;
  isprime_status_t status;
  isprime_ctrl_t   ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isprime_control dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input isprime_ctrl_t exp, input logic er, input logic ed, input string what);
    checks++;
    if (ctrl !== exp || ready !== er || done !== ed) begin
      failures++;
      $display("FAIL %s: ctrl=%b exp %b ready=%b done=%b", what, ctrl, exp, ready, done);
    end
  endtask

  function automatic isprime_ctrl_t c(input logic lr, input logic inc, input logic sp,
                                      input logic cl, input logic st);
    return '{load_regs: lr, incr_f: inc, special: sp, clr_p: cl, set_p: st};
  endfunction

  // One run: 'loops' visits with Incr_F, then the exit selected by 'kind'
  // (0: N < 3, 1: factor found, 2: F > N/2).
  task automatic run(input int loops, input int kind, input logic hold_start);
    status = '0;
    expect_out('0, 1, 0, "idle");
    start = 1; #1;
    expect_out(c(1,0,0,0,0), 1, 0, "idle + Start: Load_regs");
    @(negedge clk);
    start = hold_start;
    for (int v = 0; v < loops; v++) begin
      expect_out(c(0,1,0,0,0), 0, 0, "S_check: Incr_F");
      @(negedge clk);
    end
    case (kind)
      0: begin status.n_lt_3 = 1; status.nmodf_zero = 1; status.f_gt_halfn = 1; #1;
               expect_out(c(0,0,1,0,0), 0, 0, "S_check: Special"); end
      1: begin status.nmodf_zero = 1; status.f_gt_halfn = 1; #1;
               expect_out(c(0,0,0,1,0), 0, 0, "S_check: Clr_P"); end
      default: begin status.f_gt_halfn = 1; #1;
               expect_out(c(0,0,0,0,1), 0, 0, "S_check: Set_P"); end
    endcase
    @(negedge clk);
    status = '0;
    expect_out('0, 0, 1, "S_done");
    if (hold_start) begin
      @(negedge clk);
      expect_out('0, 0, 1, "S_done held by Start");
      start = 0;
    end
    @(negedge clk);
  endtask

  initial begin
    reset = 1; start = 0; status = '0;
    @(negedge clk); @(negedge clk); reset = 0;
    for (int k = 0; k < 3; k++)
      for (int loops = 0; loops < 5; loops++)
        run((k == 0) ? 0 : loops, k, loops[0]);
    // reset from S_check
    start = 1; @(negedge clk); start = 0;
    reset = 1; @(negedge clk); reset = 0;
    expect_out('0, 1, 0, "reset to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
