// gja_pkg: shared constants and types of the Gauss-Jordan Algorithm (GJA)
// accelerator.
//
// The accelerator solves the linear system that arises in fuzzy-vault
// polynomial reconstruction: an N x (N+1) augmented matrix over the finite
// field GF(2^M) is reduced by Gauss-Jordan elimination, leaving the N
// polynomial coefficients in the last column. The field, its reduction
// polynomial and the default system size are this design's choices: the
// default GF(2^16) with x^16 + x^12 + x^3 + x + 1 is the field commonly used
// by fuzzy-vault implementations, and N = 9 unknowns corresponds to a secret
// polynomial of degree 8.
package gja_pkg;

  // Default field width (bits per matrix element) and reduction polynomial.
  localparam int unsigned    GF_M_DEF    = 16;
  localparam logic [16:0]    GF_POLY_DEF = 17'h1100B;

  // Default number of unknowns (rows of the augmented matrix).
  localparam int unsigned    N_DEF       = 9;

  // System bus data width and register word addresses (control region).
  localparam int unsigned    BUS_DW      = 32;
  localparam int unsigned    REG_CTRL    = 0;  // write: bit0 = start; read: status
  localparam int unsigned    REG_INFO    = 1;  // read: {M[15:0], N[15:0]}

  // Elimination sequencer states.
  typedef enum logic [2:0] {
    S_IDLE,    // waiting for start; matrix accessible from the bus
    S_SEARCH,  // scan column k, rows k..N-1, for a non-zero pivot
    S_SWAP,    // exchange pivot row with row k, start the inverter
    S_INV,     // wait for the pivot inverse
    S_NORM,    // scale row k by the pivot inverse
    S_ELIM,    // clear column k of one other row per cycle
    S_DONE     // one-cycle completion pulse
  } gja_state_e;

  // Status word returned by REG_CTRL.
  typedef struct packed {
    logic singular;  // no pivot found: the system has no unique solution
    logic done;      // a run has finished since the last start
    logic busy;      // elimination in progress
  } gja_status_t;

endpackage
