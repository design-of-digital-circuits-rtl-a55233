// Self-checking test of sort_regfile: fills every word through the write
// port, then reads all words on both read ports and compares them with a
// copy kept by the test. Also checks that a write with w_en low changes
// nothing and that a write is visible on the read ports right after the edge.
module sort_regfile_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned K  = 8;
  localparam int unsigned N  = 8;
  localparam int unsigned AW = $clog2(K);

  logic          clk = 1'b0;
  logic          w_en;
  logic [AW-1:0] w_addr, r_addr, x_addr;
  logic [N-1:0]  w_data, r_data, x_data;
  logic [N-1:0]  model [K];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sort_regfile #(.K(K), .N(N)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    w_en = 0; w_addr = 0; w_data = 0; r_addr = 0; x_addr = 0;
    for (int rep = 0; rep < 4; rep++) begin
      for (int a = 0; a < K; a++) begin
        @(negedge clk);
        w_en = 1; w_addr = AW'(a); w_data = N'($urandom); model[a] = w_data;
      end
      @(negedge clk);
      w_en = 0;
      // write with w_en low must be ignored
      w_addr = AW'(rep); w_data = ~model[rep];
      @(negedge clk);
      for (int a = 0; a < K; a++) begin
        r_addr = AW'(a); x_addr = AW'(K - 1 - a); #1;
        check(r_data, model[a], "r port");
        check(x_data, model[K-1-a], "x port");
      end
      // write-then-read in the next cycle
      w_en = 1; w_addr = 3; w_data = 8'h5a; model[3] = 8'h5a; r_addr = 3;
      @(posedge clk); #1;
      check(r_data, 8'h5a, "read after write");
      @(negedge clk); w_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
