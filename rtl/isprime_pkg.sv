// Shared types of the isPrime circuit.
//
// Control signals (Load_regs, Incr_F, Special, Clr_P, Set_P) and status
// signals (N_lt_3, NmodF_zero, F_gt_halfN) exchanged between isprime_control
// and isprime_datapath, as named in the isPrime block diagram, and the three
// controller states of the isPrime ASMD chart.
package isprime_pkg;

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,  // Ready; waits for Start
    S_CHECK = 2'd1,  // one trial division per visit
    S_DONE  = 2'd2   // Done; waits for Start to drop
  } isprime_state_e;

  typedef struct packed {
    logic load_regs;  // F <- 2, N <- Num
    logic incr_f;     // F <- F + 1
    logic special;    // P <- (N == 2)
    logic clr_p;      // P <- 0
    logic set_p;      // P <- 1
  } isprime_ctrl_t;

  typedef struct packed {
    logic n_lt_3;       // N < 3
    logic nmodf_zero;   // N % F == 0
    logic f_gt_halfn;   // F > N/2
  } isprime_status_t;

endpackage
