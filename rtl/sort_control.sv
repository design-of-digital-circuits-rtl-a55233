// Controller of the exchange sorter.
//
// Follows the sorter's ASMD chart. From S_idle (Ready high), Start moves to
// S_A and asserts Init_i on the way. S_A loads A <- Reg[i] and sets
// j <- i+1. S_B loads B <- Reg[j]. S_compare tests B_lt_A: if B < A it
// asserts Store_B (Reg[i] <- B) and goes to S_swap, which asserts Store_A
// (Reg[j] <- A); otherwise it goes straight to S_loops. S_loops reloads
// A <- Reg[i] (after a swap that is the new smaller word) and then: if j is
// not done, Incr_j and back to S_B; else if i is not done, Incr_i and back to
// S_A; else on to S_done. S_done holds Done high while Start stays high and
// returns to S_idle once Start is low. Reset is synchronous and active high,
// and forces S_idle.
//
// Ready and Done are Moore outputs; Init_i, Store_B, Incr_j and Incr_i are
// conditional (Mealy) outputs of their ASMD blocks, as in the chart.
// One pass of the inner loop takes 3 cycles (S_B, S_compare, S_loops), 4 when
// the words are swapped; each outer pass adds one S_A cycle.
module sort_control
  import sort_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  sort_status_t status,
  output sort_ctrl_t   ctrl,
  output logic         ready,
  output logic         done
);

  sort_state_e state, next;

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
          ctrl.init_i = 1'b1;
          next        = S_A;
        end
      end
      S_A: begin
        ctrl.load_a = 1'b1;
        ctrl.init_j = 1'b1;
        next        = S_B;
      end
      S_B: begin
        ctrl.load_b = 1'b1;
        next        = S_COMPARE;
      end
      S_COMPARE: begin
        if (status.b_lt_a) begin
          ctrl.store_b = 1'b1;
          next         = S_SWAP;
        end else begin
          next         = S_LOOPS;
        end
      end
      S_SWAP: begin
        ctrl.store_a = 1'b1;
        next         = S_LOOPS;
      end
      S_LOOPS: begin
        ctrl.load_a = 1'b1;
        if (!status.j_done) begin
          ctrl.incr_j = 1'b1;
          next        = S_B;
        end else if (!status.i_done) begin
          ctrl.incr_i = 1'b1;
          next        = S_A;
        end else begin
          next        = S_DONE;
        end
      end
      S_DONE: begin
        done = 1'b1;
        if (!start) next = S_IDLE;
      end
      default: next = S_IDLE;
    endcase
  end

  // Exactly one of the two stores and at most one counter step per cycle.
  assert property (@(posedge clk) disable iff (reset)
                   !(ctrl.store_a && ctrl.store_b));
  assert property (@(posedge clk) disable iff (reset)
                   !(ctrl.incr_i && ctrl.incr_j));

endmodule
