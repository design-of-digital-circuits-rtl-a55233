// Shared types of the exchange sorter.
//
// The sorter is split, as usual for an algorithm turned into hardware, into a
// controller (sort_control) and a datapath (sort_datapath). The control
// signals and status signals that pass between them are bundled here as
// packed structs; their names follow the sorting datapath drawing (Init_i,
// Incr_i, Init_j, Incr_j, Load_A, Store_A, Load_B, Store_B and B_lt_A,
// i_done, j_done). The state names follow the ASMD chart of the sorter.
package sort_pkg;

  // Controller states, one per ASMD block.
  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,  // Ready; waits for Start
    S_A       = 3'd1,  // A <- Reg[i], j <- i+1
    S_B       = 3'd2,  // B <- Reg[j]
    S_COMPARE = 3'd3,  // if B < A: Reg[i] <- B
    S_SWAP    = 3'd4,  // Reg[j] <- A
    S_LOOPS   = 3'd5,  // A <- Reg[i]; advance j or i
    S_DONE    = 3'd6   // Done; waits for Start to drop
  } sort_state_e;

  // Control signals from the controller to the datapath.
  typedef struct packed {
    logic init_i;   // i <- 0
    logic incr_i;   // i <- i + 1
    logic init_j;   // j <- i + 1
    logic incr_j;   // j <- j + 1
    logic load_a;   // A <- Reg[i]
    logic store_a;  // Reg[j] <- A
    logic load_b;   // B <- Reg[j]
    logic store_b;  // Reg[i] <- B
  } sort_ctrl_t;

  // Status signals from the datapath to the controller.
  typedef struct packed {
    logic b_lt_a;   // B < A
    logic i_done;   // i == K-2 (last outer-loop pass)
    logic j_done;   // j == K-1 (last inner-loop pass)
  } sort_status_t;

endpackage
