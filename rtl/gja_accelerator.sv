// gja_accelerator: Gauss-Jordan Algorithm accelerator as a system-bus
// co-processor.
//
// In the biometric-encryption system-on-chip the fuzzy-vault software on the
// embedded processor hands polynomial reconstruction, the compute-heavy step
// of unlocking a vault, to this core. The driver writes the N x (N+1)
// augmented matrix of the reconstruction system element by element, writes
// 1 to the control register, polls the status register until done is set
// (or checks singular), and reads the solution from column N of the matrix.
//
// Structure: gja_bus_if (register map, see its header) in front of gja_core
// (elimination engine over GF(2^M), see its header). Ports are those of the
// bus slave. Timing: one-cycle registered reads, single-cycle writes, and
// N*(N+M+3) cycles of elimination when every pivot lies on the diagonal.
// The processor, system bus, memory, AES core, image preprocessing, USB and
// I/O peripherals of the system are outside this module.
module gja_accelerator #(
  parameter int unsigned N    = gja_pkg::N_DEF,
  parameter int unsigned M    = gja_pkg::GF_M_DEF,
  parameter logic [M:0]  POLY = gja_pkg::GF_POLY_DEF[M:0],
  localparam int unsigned AW  = 1 + $clog2(N) + $clog2(N + 1),
  localparam int unsigned DW  = gja_pkg::BUS_DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [DW-1:0] avs_writedata,
  output logic [DW-1:0] avs_readdata
);

  localparam int unsigned RW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);

  logic          core_start, core_busy, core_done, core_singular;
  logic          host_we;
  logic [RW-1:0] host_row;
  logic [CW-1:0] host_col;
  logic [M-1:0]  host_wdata, host_rdata;

  gja_bus_if #(.N(N), .M(M)) u_bus_if (
    .clk          (clk),
    .rst_n        (rst_n),
    .avs_address  (avs_address),
    .avs_read     (avs_read),
    .avs_write    (avs_write),
    .avs_writedata(avs_writedata),
    .avs_readdata (avs_readdata),
    .core_start   (core_start),
    .core_busy    (core_busy),
    .core_done    (core_done),
    .core_singular(core_singular),
    .host_we      (host_we),
    .host_row     (host_row),
    .host_col     (host_col),
    .host_wdata   (host_wdata),
    .host_rdata   (host_rdata)
  );

  gja_core #(.N(N), .M(M), .POLY(POLY)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (core_start),
    .busy      (core_busy),
    .done      (core_done),
    .singular  (core_singular),
    .host_we   (host_we),
    .host_row  (host_row),
    .host_col  (host_col),
    .host_wdata(host_wdata),
    .host_rdata(host_rdata)
  );

endmodule
