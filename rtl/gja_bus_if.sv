// gja_bus_if: system-bus slave (interface unit) of the GJA accelerator.
//
// Gives the host processor's driver a small memory-mapped view of the core.
// The bus is a simple memory-mapped slave in the style of the Avalon-MM
// interface of Nios II systems: word addresses, 32-bit data, no wait states
// and a fixed read latency of one cycle (readdata is registered).
//
// Address map (word addresses, AW = 1 + RW + CW bits):
//   addr[AW-1] = 0, addr[0] = 0 (REG_CTRL)
//       write: bit0 = 1 starts a run (ignored while busy)
//       read : {29'b0, singular, done, busy}; done is set at the end of a run
//              and cleared by the next start
//   addr[AW-1] = 0, addr[0] = 1 (REG_INFO)
//       read : {M[15:0], N[15:0]}, the core's dimensions
//   addr[AW-1] = 1: matrix element, addr = {1, row[RW-1:0], col[CW-1:0]}
//       read/write the low M bits; a write while busy or to a row/column past
//       the matrix is dropped, and such a read returns 0.
// The original system pairs the accelerator with an interface unit and a
// software driver on the Nios II processor; this register map and the bus
// timing are this design's own choices.
module gja_bus_if #(
  parameter int unsigned N   = gja_pkg::N_DEF,
  parameter int unsigned M   = gja_pkg::GF_M_DEF,
  localparam int unsigned C  = N + 1,
  localparam int unsigned RW = $clog2(N),
  localparam int unsigned CW = $clog2(C),
  localparam int unsigned AW = 1 + RW + CW,
  localparam int unsigned DW = gja_pkg::BUS_DW
) (
  input  logic          clk,
  input  logic          rst_n,
  // system bus slave
  input  logic [AW-1:0] avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [DW-1:0] avs_writedata,
  output logic [DW-1:0] avs_readdata,
  // core control and status
  output logic          core_start,
  input  logic          core_busy,
  input  logic          core_done,
  input  logic          core_singular,
  // core matrix port
  output logic          host_we,
  output logic [RW-1:0] host_row,
  output logic [CW-1:0] host_col,
  output logic [M-1:0]  host_wdata,
  input  logic [M-1:0]  host_rdata
);

  import gja_pkg::*;

  logic        sel_mat, in_range, done_flag;
  gja_status_t status;

  assign sel_mat    = avs_address[AW-1];
  assign host_row   = avs_address[CW +: RW];
  assign host_col   = avs_address[CW-1:0];
  assign in_range   = (32'(host_row) < N) && (32'(host_col) < C);
  assign host_we    = avs_write && sel_mat && in_range && !core_busy;
  assign host_wdata = avs_writedata[M-1:0];
  assign core_start = avs_write && !sel_mat && (avs_address[0] == REG_CTRL[0])
                      && avs_writedata[0] && !core_busy;

  assign status = '{singular: core_singular, done: done_flag, busy: core_busy};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_flag    <= 1'b0;
      avs_readdata <= '0;
    end else begin
      if (core_start)     done_flag <= 1'b0;
      else if (core_done) done_flag <= 1'b1;

      if (avs_read) begin
        if (sel_mat)
          avs_readdata <= in_range ? DW'(host_rdata) : '0;
        else if (avs_address[0] == REG_INFO[0])
          avs_readdata <= {16'(M), 16'(N)};
        else
          avs_readdata <= DW'(status);      // REG_CTRL
      end
    end
  end

  // the bus never reads and writes in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write));

endmodule
