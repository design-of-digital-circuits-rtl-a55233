// Self-checking test of sorter. Each trial loads K words (random, small
// values with many duplicates, already sorted, or reverse sorted), runs the
// sort through the Start/Ready/Done handshake and checks that the words read
// back are the input in ascending order. The test also runs the same
// exchange sort on its own copy to count the swaps s, and checks that Done
// rises exactly (K-1) + 3*K*(K-1)/2 + s clock edges after the edge on which
// Start is sampled. Load-port writes while the sorter is busy must be ignored.
module sorter_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned K  = 8;
  localparam int unsigned N  = 8;
  localparam int unsigned AW = $clog2(K);

  logic          clk = 1'b0, reset, start, ready, done;
  logic          ld_we;
  logic [AW-1:0] ld_addr, rd_addr;
  logic [N-1:0]  ld_data, rd_data;
  logic [N-1:0]  in_w [K];
  logic [N-1:0]  exp_w [K];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sorter #(.K(K), .N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int swaps, cycles;
    logic [N-1:0] t;
    reset = 1; start = 0; ld_we = 0; ld_addr = 0; ld_data = 0; rd_addr = 0;
    @(negedge clk); @(negedge clk); reset = 0;
    for (int trial = 0; trial < 300; trial++) begin
      for (int a = 0; a < K; a++) begin
        case (trial % 4)
          0: in_w[a] = N'($urandom);
          1: in_w[a] = N'($urandom % 3);
          2: in_w[a] = N'(a * 3);
          default: in_w[a] = N'((K - a) * 5);
        endcase
        ld_we = 1; ld_addr = AW'(a); ld_data = in_w[a];
        @(negedge clk);
      end
      ld_we = 0;
      // reference: same exchange sort, counting swaps
      exp_w = in_w; swaps = 0;
      for (int i = 0; i < K - 1; i++)
        for (int j = i + 1; j < K; j++)
          if (exp_w[j] < exp_w[i]) begin
            t = exp_w[i]; exp_w[i] = exp_w[j]; exp_w[j] = t; swaps++;
          end
      checks++;
      if (!ready) begin failures++; $display("FAIL not ready before start"); end
      start = 1;
      @(negedge clk);
      start = (trial % 2 == 0);   // sometimes hold Start through the run
      // try to disturb the words while busy
      ld_we = 1; ld_addr = 0; ld_data = '1;
      cycles = 0;
      while (!done) begin @(negedge clk); cycles++; ld_we = 0; end
      ld_we = 0;
      checks++;
      if (cycles != (K - 1) + 3 * K * (K - 1) / 2 + swaps) begin
        failures++;
        $display("FAIL trial %0d: %0d cycles, expected %0d", trial, cycles,
                 (K - 1) + 3 * K * (K - 1) / 2 + swaps);
      end
      // Done holds while Start is high
      if (start) begin
        @(negedge clk);
        checks++;
        if (!done || ready) begin failures++; $display("FAIL done not held"); end
        start = 0;
      end
      @(negedge clk);
      checks++;
      if (!ready || done) begin failures++; $display("FAIL not back to ready"); end
      for (int a = 0; a < K; a++) begin
        rd_addr = AW'(a); #1;
        checks++;
        if (rd_data !== exp_w[a]) begin
          failures++;
          $display("FAIL trial %0d word %0d: %0d expected %0d", trial, a, rd_data, exp_w[a]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
