// rp_pkg: shared types and constants of the residual processor (RP).
//
// The RP solves one system of linear congruences A x = b (mod m) for a prime
// modulus m. Its operating phases, the fixed cycle budget of the elimination
// and the elimination-time formula live here so that the controller and the
// testbenches use the same numbers.
//
// Elimination time: elim(n, z) = ((z + (4z - 2)) n + 3) n + 14 clock cycles
// for an n x n system with z-bit words, counted from the first cycle of the
// elimination phase to its last. Each of the n elimination steps spends
// STEP_OVH_CYC cycles on pivot bookkeeping and then one row slot of
// slot_cycles(z) = 5z - 2 cycles per matrix row; PRE_CYC + POST_CYC cycles
// frame the whole run. How the constants 3 and 14 split into work is this
// design's own choice; only the totals come from the formula.
package rp_pkg;

  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,  // waiting for a command
    PH_LOAD = 3'd1,  // receiving and reducing the augmented matrix
    PH_ELIM = 3'd2,  // Gauss-Jordan elimination
    PH_OUT  = 3'd3,  // streaming the solution vector out
    PH_DONE = 3'd4   // finished; det and singular flag valid
  } phase_e;

  localparam int unsigned STEP_OVH_CYC = 3;   // per elimination step
  localparam int unsigned PRE_CYC      = 12;  // before the first step
  localparam int unsigned POST_CYC     = 2;   // after the last step

  // Cycles of one row slot, z + (4z - 2).
  function automatic int unsigned slot_cycles(int unsigned z);
    return z + (4 * z - 2);
  endfunction

  // Total elimination cycles for a runtime dimension n and word length z.
  function automatic longint unsigned elim_cycles(int unsigned n, int unsigned z);
    return ((64'(slot_cycles(z)) * 64'(n) + 64'(STEP_OVH_CYC)) * 64'(n))
           + 64'(PRE_CYC) + 64'(POST_CYC);
  endfunction

endpackage
