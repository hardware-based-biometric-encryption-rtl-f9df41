// tb_gja_accelerator: end-to-end testbench of the GJA accelerator at its
// default size (9 unknowns over GF(2^16)), driven only through the bus.
//
// Plays the part of the driver on the embedded processor during fuzzy-vault
// unlocking: for each attempt it picks a secret polynomial of degree 8 and
// nine distinct vault points on it, writes the Vandermonde system, starts
// the core, polls the status register and reads the coefficients back.
// Mechanisms exercised and counted: a plain solve, a solve that needs a
// pivot row swap, detection of a singular system (two equal abscissae), a
// matrix write and a start request dropped because the core is busy. The run
// length is checked against N*(N+M+3) cycles for systems without swaps.
module tb_gja_accelerator;
  import tb_gf_pkg::*;

  localparam int unsigned N  = 9;
  localparam int unsigned M  = 16;
  localparam int unsigned RW = 4, CW = 4, AW = 9;
  localparam logic [32:0] POLY = 33'h1100B;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] address = '0;
  logic read = 0, write = 0;
  logic [31:0] writedata = '0, readdata;
  int checks = 0, failures = 0;
  int n_solve = 0, n_swap = 0, n_singular = 0, n_busy_write = 0, n_busy_start = 0;

  always #5 clk = ~clk;

  gja_accelerator dut (.clk(clk), .rst_n(rst_n), .avs_address(address), .avs_read(read),
                       .avs_write(write), .avs_writedata(writedata), .avs_readdata(readdata));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic bus_write(logic [AW-1:0] a, logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; write = 1;
    @(negedge clk);
    write = 0;
  endtask

  task automatic bus_read(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    address = a; read = 1;
    @(negedge clk);
    read = 0;
    d = readdata;
  endtask

  function automatic logic [AW-1:0] mat_addr(int r, int c);
    return {1'b1, RW'(r), CW'(c)};
  endfunction

  // cycles from the start strobe to the done pulse, measured at the core
  int run_cycles, cyc;
  bit running = 0;
  always @(posedge clk) begin
    if (dut.core_start) begin
      running <= 1; cyc <= 0;
    end else if (running) begin
      cyc <= cyc + 1;
      if (dut.core_done) begin
        running <= 0; run_cycles <= cyc;
      end
    end
    if (rst_n && dut.u_core.state == gja_pkg::S_SWAP && dut.u_core.piv != dut.u_core.k)
      n_swap++;
  end

  // rev = 0: unknown c is the coefficient of x^c; rev = 1: of x^(N-1-c)
  task automatic load_system(logic [31:0] xs[], logic [31:0] coefs[], bit rev);
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++)
        bus_write(mat_addr(r, c), ref_pow(xs[r], rev ? N - 1 - c : c, M, POLY));
      bus_write(mat_addr(r, N), poly_eval(coefs, xs[r], M, POLY));
    end
  endtask

  task automatic start_and_wait(output logic [31:0] status);
    bus_write(9'h000, 32'h1);
    do bus_read(9'h000, status); while (status[0]);
  endtask

  task automatic distinct_points(ref logic [31:0] xs[]);
    for (int r = 0; r < N; r++) begin
      bit fresh;
      do begin
        xs[r] = $urandom_range(0, 65535);
        fresh = 1;
        for (int q = 0; q < r; q++) if (xs[q] == xs[r]) fresh = 0;
      end while (!fresh);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] xs[], coefs[], st, d;
    int sw0;
    bit rev;
    xs = new[N]; coefs = new[N];
    repeat (3) @(posedge clk);
    rst_n = 1;

    bus_read(9'h001, d);
    check("info", d, {16'(M), 16'(N)});

    for (int t = 0; t < 12; t++) begin
      foreach (coefs[q]) coefs[q] = $urandom_range(0, 65535);
      distinct_points(xs);
      // highest power first with x = 0 in row 0: row 0 is [0 .. 0 1 | c0],
      // so column 0 needs a pivot from another row
      rev = (t % 3 == 2);
      if (rev) xs[0] = 0;
      if (t == 11) xs[N-1] = xs[1];       // repeated point: no unique polynomial
      load_system(xs, coefs, rev);
      sw0 = n_swap;

      if (t == 4) begin
        // while the core runs: a matrix write and a second start are dropped
        bus_write(9'h000, 32'h1);
        bus_write(mat_addr(0, N), 32'hBEEF);
        bus_read(9'h000, st);
        check("busy seen", 32'(st[0]), 1);
        if (st[0]) begin
          bus_read(mat_addr(0, N), d);
          n_busy_write++;
          bus_write(9'h000, 32'h1);
          n_busy_start++;
        end
        do bus_read(9'h000, st); while (st[0]);
        check("single run", run_cycles, N * (N + M + 3));
      end else begin
        start_and_wait(st);
      end

      if (t == 11) begin
        check("singular", st, 32'b110);
        if (st[2]) n_singular++;
        continue;
      end
      check("status done", st, 32'b010);
      if (!rev) check("run length", run_cycles, N * (N + M + 3));
      if (rev) check("swap needed", 32'(n_swap > sw0), 1);
      for (int r = 0; r < N; r++) begin
        bus_read(mat_addr(r, N), d);
        check("coefficient", d, coefs[rev ? N - 1 - r : r]);
        for (int c = 0; c < N; c++) begin
          bus_read(mat_addr(r, c), d);
          check("identity", d, (r == c) ? 1 : 0);
        end
      end
      n_solve++;
    end

    $display("solves=%0d swaps=%0d singular=%0d busy_writes=%0d busy_starts=%0d",
             n_solve, n_swap, n_singular, n_busy_write, n_busy_start);
    check("mechanism: solve", 32'(n_solve > 0), 1);
    check("mechanism: pivot swap", 32'(n_swap > 0), 1);
    check("mechanism: singular", 32'(n_singular > 0), 1);
    check("mechanism: write while busy", 32'(n_busy_write > 0), 1);
    check("mechanism: start while busy", 32'(n_busy_start > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
