// Datapath of the isPrime circuit.
//
// Holds N, a copy of the input Num taken at the start so that Num may change
// while the algorithm runs; F, the trial factor; and P, the result. Control
// signals from isprime_control: Load_regs (F <- 2, N <- Num), Incr_F
// (F <- F+1), Special (P <- (N == 2)), Clr_P (P <- 0) and Set_P (P <- 1).
// Status signals back: N_lt_3 (N < 3), NmodF_zero (N % F == 0) and
// F_gt_halfN (F > N/2, with N/2 rounded down). The register transfers and
// the status names are those of the isPrime ASMD chart; the remainder is a
// plain combinational modulo, which is this design's choice.
//
// F is W+1 bits wide so that it can never wrap, and a zero F (only possible
// before the first Load_regs) is kept out of the modulo. Reset is synchronous
// and active high and clears N, F and P. All registers update on the rising
// edge; the status outputs are combinational from N and F.
module isprime_datapath
  import isprime_pkg::*;
#(
  parameter int unsigned W = 4   // width of Num
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [W-1:0]    num,
  input  isprime_ctrl_t   ctrl,
  output isprime_status_t status,
  output logic            p
);

  logic [W-1:0] n;
  logic [W:0]   f;
  logic [W:0]   rem;

  always_ff @(posedge clk) begin
    if (reset) begin
      n <= '0;
      f <= '0;
    end else if (ctrl.load_regs) begin
      n <= num;
      f <= (W+1)'(2);
    end else if (ctrl.incr_f) begin
      f <= f + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset)             p <= 1'b0;
    else if (ctrl.special) p <= (n == W'(2));
    else if (ctrl.clr_p)   p <= 1'b0;
    else if (ctrl.set_p)   p <= 1'b1;
  end

  always_comb begin
    rem = (f == '0) ? '1 : ({1'b0, n} % f);
  end

  assign status.n_lt_3     = (n < W'(3));
  assign status.nmodf_zero = (rem == '0);
  assign status.f_gt_halfn = (f > {2'b00, n[W-1:1]});

endmodule
