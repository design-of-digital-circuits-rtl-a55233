// Controller of the isPrime circuit.
//
// Follows the isPrime ASMD chart with its three states. S_idle holds Ready
// high; Start asserts Load_regs and moves to S_check. Each cycle in S_check
// makes one decision: N < 3 asserts Special and ends; otherwise N % F == 0
// asserts Clr_P and ends; otherwise F > N/2 asserts Set_P and ends;
// otherwise Incr_F is asserted and S_check is visited again. Ending means
// going to S_done, which holds Done high while Start stays high and returns
// to S_idle once Start is low. Reset is synchronous and active high.
//
// All control signals except Ready and Done are conditional (Mealy) outputs,
// as drawn in the chart. A number whose test needs m visits to S_check has
// Done high m+1 clock edges after the edge that samples Start.
module isprime_control
  import isprime_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic            start,
  input  isprime_status_t status,
  output isprime_ctrl_t   ctrl,
  output logic            ready,
  output logic            done
);

  isprime_state_e state, next;

  always_ff @(posedge clk) begin
    if (reset) state <= S_IDLE;
    else       state <= next;
  end

  always_comb begin
    next  = state;
    ctrl  = '0;
    ready = 1'b0;
    done  = 1'b0;
    unique case (state)
      S_IDLE: begin
        ready = 1'b1;
        if (start) begin
          ctrl.load_regs = 1'b1;
          next           = S_CHECK;
        end
      end
      S_CHECK: begin
        if (status.n_lt_3) begin
          ctrl.special = 1'b1;
          next         = S_DONE;
        end else if (status.nmodf_zero) begin
          ctrl.clr_p   = 1'b1;
          next         = S_DONE;
        end else if (status.f_gt_halfn) begin
          ctrl.set_p   = 1'b1;
          next         = S_DONE;
        end else begin
          ctrl.incr_f  = 1'b1;
        end
      end
      S_DONE: begin
        done = 1'b1;
        if (!start) next = S_IDLE;
      end
      default: next = S_IDLE;
    endcase
  end

  // At most one write to P per cycle.
  assert property (@(posedge clk) disable iff (reset)
                   $onehot0({ctrl.special, ctrl.clr_p, ctrl.set_p}));

endmodule
