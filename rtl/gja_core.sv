// gja_core: Gauss-Jordan elimination engine over GF(2^M).
//
// Holds an N x (N+1) augmented matrix [A | b] in registers and reduces it to
// [I | x], so that the last column holds the solution of A x = b. In
// fuzzy-vault polynomial reconstruction A is the Vandermonde matrix of the N
// unlocking points and x the coefficients of the secret polynomial.
//
// For every column k the sequencer
//   1. SEARCH scans rows k, k+1, ... for a non-zero element in column k
//      (one row per cycle); if none exists the matrix is singular and the run
//      stops with singular = 1;
//   2. SWAP exchanges the pivot row with row k (all columns in one cycle) and
//      starts the inverter on the pivot;
//   3. INV waits M cycles for the pivot inverse;
//   4. NORM scales row k by the inverse (N+1 multipliers in parallel);
//   5. ELIM visits every row i (one row per cycle, row k left as it is) and
//      subtracts (XORs) row k times element [i][k].
// In the field, addition and subtraction are both XOR, so elimination needs
// only the one bank of N+1 multipliers shared with NORM.
//
// Interface: while busy is low the host port reads (combinationally) and
// writes (on the clock edge) any element; writes while busy are ignored.
// start (one cycle) begins a run; done is high for one cycle at the end;
// singular holds the outcome until the next start.
//
// Timing: with every pivot found on the diagonal, done is high in the cycle
// N*(N + M + 3) clock edges after the edge that samples start (252 cycles,
// 2.52 us at 100 MHz, for the default N = 9, M = 16); every row searched
// past the diagonal adds one cycle.
// The algorithm (Gauss-Jordan elimination) and its role in fuzzy-vault
// polynomial reconstruction follow the original system; the row-parallel
// datapath, the finite field and this schedule are this design's choices.
module gja_core #(
  parameter int unsigned N    = gja_pkg::N_DEF,
  parameter int unsigned M    = gja_pkg::GF_M_DEF,
  parameter logic [M:0]  POLY = gja_pkg::GF_POLY_DEF[M:0],
  localparam int unsigned C   = N + 1,
  localparam int unsigned RW  = $clog2(N),
  localparam int unsigned CW  = $clog2(C)
) (
  input  logic          clk,
  input  logic          rst_n,
  // control
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          singular,
  // host access to the matrix
  input  logic          host_we,
  input  logic [RW-1:0] host_row,
  input  logic [CW-1:0] host_col,
  input  logic [M-1:0]  host_wdata,
  output logic [M-1:0]  host_rdata
);

  import gja_pkg::*;

  gja_state_e    state;
  logic [M-1:0]  mat [N][C];
  logic [RW-1:0] k, i, piv;

  // pivot inverter
  logic          inv_start, inv_busy, inv_done;
  logic [M-1:0]  inv_y;

  // shared multiplier bank: prod[j] = mat[k][j] * factor
  logic [M-1:0]  factor;
  logic [M-1:0]  prod [C];

  localparam logic [RW-1:0] LAST = RW'(N - 1);

  // pivot row number used as a column index
  logic [CW-1:0] kc;
  assign kc = CW'(k);

  assign inv_start = (state == S_SWAP);
  assign factor    = (state == S_NORM) ? inv_y : mat[i][kc];

  gf_inv #(.M(M), .POLY(POLY)) u_inv (
    .clk  (clk),
    .rst_n(rst_n),
    .start(inv_start),
    .a    (mat[piv][kc]),
    .busy (inv_busy),
    .done (inv_done),
    .y    (inv_y)
  );

  for (genvar j = 0; j < C; j++) begin : g_mul
    gf_mul #(.M(M), .POLY(POLY)) u_mul (.a(mat[k][j]), .b(factor), .p(prod[j]));
  end

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      k        <= '0;
      i        <= '0;
      piv      <= '0;
      singular <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          k        <= '0;
          i        <= '0;
          singular <= 1'b0;
          state    <= S_SEARCH;
        end
        S_SEARCH: begin
          if (mat[i][kc] != '0) begin
            piv   <= i;
            state <= S_SWAP;
          end else if (i == LAST) begin
            singular <= 1'b1;
            state    <= S_DONE;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_SWAP: state <= S_INV;
        S_INV:  if (inv_done) state <= S_NORM;
        S_NORM: begin
          i     <= '0;
          state <= S_ELIM;
        end
        S_ELIM: begin
          if (i != LAST) begin
            i <= i + 1'b1;
          end else if (k == LAST) begin
            state <= S_DONE;
          end else begin
            k     <= k + 1'b1;
            i     <= k + 1'b1;
            state <= S_SEARCH;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // matrix storage (no reset: contents are loaded by the host before a run)
  always_ff @(posedge clk) begin
    unique case (state)
      S_IDLE: if (host_we) mat[host_row][host_col] <= host_wdata;
      S_SWAP:
        for (int unsigned j = 0; j < C; j++) begin
          mat[k][j]   <= mat[piv][j];
          mat[piv][j] <= mat[k][j];
        end
      S_NORM:
        for (int unsigned j = 0; j < C; j++) mat[k][j] <= prod[j];
      S_ELIM:
        if (i != k)
          for (int unsigned j = 0; j < C; j++) mat[i][j] <= mat[i][j] ^ prod[j];
      default: ;
    endcase
  end

  assign host_rdata = mat[host_row][host_col];
  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);

  // the inverter is only started when idle and never asked to invert zero
  assert property (@(posedge clk) disable iff (!rst_n) inv_start |-> !inv_busy);
  assert property (@(posedge clk) disable iff (!rst_n) inv_start |-> mat[piv][kc] != '0);

endmodule
