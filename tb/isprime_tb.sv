// Self-checking test of isprime. Runs every W-bit value of Num through the
// Start/Ready/Done handshake, as in a loop over 0 .. 2**W-1, and checks P
// against a prime test computed here by plain trial division. It also checks
// the latency: Done must rise m+1 clock edges after the edge that samples
// Start, where m is 1 for Num < 3 and otherwise the number of trial divisors
// 2, 3, ... up to the first that divides Num or exceeds Num/2. With a 20 ns
// clock, consecutive results are then 20*(m+2) ns apart, which for W = 4
// gives result times 90, 150, 210, ... 1270 ns, which are checked too.
// Num is changed while the circuit works to show that it was copied.
// A second instance with a 10-bit Num is then run over all 1024 values,
// checking P and the latency in the same way.
module isprime_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 4;

  logic         clk = 1'b0, reset, start, ready, done, p;
  logic [W-1:0] num;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  isprime #(.W(W)) dut (.*);

  localparam int unsigned WW = 10;
  logic          start_w, ready_w, done_w, p_w;
  logic [WW-1:0] num_w;

  isprime #(.W(WW)) dut_w (.clk(clk), .reset(reset), .start(start_w), .num(num_w),
                           .ready(ready_w), .done(done_w), .p(p_w));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_prime(input int n);
    if (n < 2) return 1'b0;
    for (int f = 2; f * f <= n; f++) if (n % f == 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int ref_visits(input int n);
    int f;
    if (n < 3) return 1;
    f = 2;
    forever begin
      if (n % f == 0) return f - 1;
      if (f > n / 2) return f - 1;
      f++;
    end
  endfunction

  // Time (ns) at which Ready returns after each Num, for W = 4 and this
  // test's clock and reset sequence.
  localparam int RESULT_NS [16] = '{90, 150, 210, 270, 330, 410, 470, 570,
                                    630, 710, 770, 910, 970, 1130, 1190, 1270};

  initial begin
    int cycles;
    realtime t_last, t_now;
    reset = 1; start = 0; num = 0; start_w = 0; num_w = 0;
    @(posedge clk); #1;
    reset = 0;
    @(posedge clk); #1;
    t_last = 0;
    for (int i = 0; i < 2 ** W; i++) begin
      checks++;
      if (!ready) begin failures++; $display("FAIL not ready"); end
      start = 1; num = W'(i);
      @(posedge clk); #1;
      start = 0; num = ~W'(i);   // must not disturb the result
      cycles = 1;
      while (!done) begin @(posedge clk); #1; cycles++; end
      checks++;
      if (p !== ref_prime(i)) begin
        failures++;
        $display("FAIL isPrime(%0d) = %b", i, p);
      end
      checks++;
      if (cycles != ref_visits(i) + 1) begin
        failures++;
        $display("FAIL isPrime(%0d): Done after %0d edges, expected %0d", i, cycles, ref_visits(i) + 1);
      end
      @(posedge ready);
      t_now = $realtime;
      checks++;
      if (i > 0 && (t_now - t_last) != 20.0 * (ref_visits(i) + 2)) begin
        failures++;
        $display("FAIL spacing for %0d: %0t", i, t_now - t_last);
      end
      if (W == 4) begin
        checks++;
        if (t_now != realtime'(RESULT_NS[i])) begin
          failures++;
          $display("FAIL result time for %0d", i);
        end
      end
      $display("T = %4.0f, isPrime(%2d) = %s", t_now, i, p ? "Yes" : "No ");
      t_last = t_now;
      #1;
    end
    for (int i = 0; i < 2 ** WW; i++) begin
      @(negedge clk);
      start_w = 1; num_w = WW'(i);
      @(negedge clk);
      start_w = 0; num_w = WW'(i + 1);
      cycles = 1;
      while (!done_w) begin @(negedge clk); cycles++; end
      checks++;
      if (p_w !== ref_prime(i) || cycles != ref_visits(i) + 1) begin
        failures++;
        $display("FAIL %0d-bit isPrime(%0d) = %b after %0d edges", WW, i, p_w, cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
