// Self-checking test of isprime_datapath, driving its control word directly.
// For every W-bit Num it applies Load_regs, then walks F upwards with Incr_F
// and at each F checks N_lt_3, NmodF_zero and F_gt_halfN against values
// computed here. It checks each write of P: Special (P = (N == 2)), Clr_P and
// Set_P, and that P holds when no control signal is given.
module isprime_datapath_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import isprime_pkg::*;

  localparam int unsigned W = 5;

  logic            clk = 1'b0, reset, p;
  logic [W-1:0]    num;
  isprime_ctrl_t   ctrl;
  isprime_status_t status;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isprime_datapath #(.W(W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what, input int n, input int f);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s N=%0d F=%0d: got %b expected %b", what, n, f, got, exp);
    end
  endtask

  task automatic step(input isprime_ctrl_t c);
    ctrl = c;
    @(negedge clk);
    ctrl = '0;
  endtask

  initial begin
    isprime_ctrl_t c;
    reset = 1; ctrl = '0; num = 0;
    @(negedge clk); reset = 0;
    for (int n = 0; n < 2 ** W; n++) begin
      num = W'(n);
      c = '0; c.load_regs = 1; step(c);
      num = W'($urandom);   // N must keep the copied value
      for (int f = 2; f <= n / 2 + 1 || f == 2; f++) begin
        check(status.n_lt_3, n < 3, "N_lt_3", n, f);
        check(status.nmodf_zero, (n % f) == 0, "NmodF_zero", n, f);
        check(status.f_gt_halfn, f > n / 2, "F_gt_halfN", n, f);
        c = '0; c.incr_f = 1; step(c);
      end
      c = '0; c.set_p = 1; step(c);
      check(p, 1'b1, "Set_P", n, 0);
      step('0);
      check(p, 1'b1, "P holds", n, 0);
      c = '0; c.clr_p = 1; step(c);
      check(p, 1'b0, "Clr_P", n, 0);
      c = '0; c.special = 1; step(c);
      check(p, n == 2, "Special", n, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
