// Self-checking test of sort_datapath, driving its control word directly.
// Each round loads K random words through the load port, moves i and j to
// random positions (Init_i/Incr_i, Init_j/Incr_j), loads A <- Reg[i] and
// B <- Reg[j], checks B_lt_A against the test's copy of the words, then
// swaps the pair with Store_B and Store_A and reads all words back. i_done
// and j_done are checked after every counter step.
module sort_datapath_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import sort_pkg::*;

  localparam int unsigned K  = 8;
  localparam int unsigned N  = 8;
  localparam int unsigned AW = $clog2(K);

  logic          clk = 1'b0, reset;
  sort_ctrl_t    ctrl;
  sort_status_t  status;
  logic          ext_we;
  logic [AW-1:0] ext_addr, x_addr;
  logic [N-1:0]  ext_wdata, x_data;
  logic [N-1:0]  model [K];
  int checks = 0, failures = 0;
  int i_m, j_m;

  always #5 clk = ~clk;

  sort_datapath #(.K(K), .N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (i=%0d j=%0d)", what, got, exp, i_m, j_m);
    end
  endtask

  task automatic step(input sort_ctrl_t c);
    ctrl = c;
    @(negedge clk);
    ctrl = '0;
  endtask

  task automatic check_counters();
    check(status.i_done, i_m == K - 2, "i_done");
    check(status.j_done, j_m == K - 1, "j_done");
  endtask

  initial begin
    sort_ctrl_t c;
    int ni, nj;
    logic [N-1:0] t;
    reset = 1; ctrl = '0; ext_we = 0; ext_addr = 0; ext_wdata = 0; x_addr = 0;
    @(negedge clk); reset = 0;
    for (int round = 0; round < 200; round++) begin
      for (int a = 0; a < K; a++) begin
        ext_we = 1; ext_addr = AW'(a);
        ext_wdata = (round % 4 == 0) ? N'($urandom % 4) : N'($urandom);
        model[a] = ext_wdata;
        @(negedge clk);
      end
      ext_we = 0;
      ni = $urandom % (K - 1);
      nj = $urandom % (K - 1 - ni);
      c = '0; c.init_i = 1; step(c); i_m = 0; check_counters();
      for (int s = 0; s < ni; s++) begin
        c = '0; c.incr_i = 1; step(c); i_m++; check_counters();
      end
      c = '0; c.init_j = 1; c.load_a = 1; step(c); j_m = i_m + 1; check_counters();
      for (int s = 0; s < nj; s++) begin
        c = '0; c.incr_j = 1; step(c); j_m++; check_counters();
      end
      c = '0; c.load_b = 1; step(c);
      check(status.b_lt_a, model[j_m] < model[i_m], "B_lt_A");
      // swap through the two stores
      c = '0; c.store_b = 1; step(c);
      c = '0; c.store_a = 1; step(c);
      t = model[i_m]; model[i_m] = model[j_m]; model[j_m] = t;
      // reload A <- Reg[i]; now B (old Reg[j]) equals A, so B_lt_A is 0
      c = '0; c.load_a = 1; step(c);
      check(status.b_lt_a, 1'b0, "B_lt_A after reload");
      for (int a = 0; a < K; a++) begin
        x_addr = AW'(a); #1;
        checks++;
        if (x_data !== model[a]) begin
          failures++;
          $display("FAIL word %0d: %0h expected %0h", a, x_data, model[a]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
