// tb_gja_core: self-checking testbench of gja_core at its default size
// (N = 9 unknowns over GF(2^16)).
//
// Each test builds a fuzzy-vault style reconstruction system: a random secret
// polynomial of degree N-1, N distinct random abscissae x_r, rows
// [1 x_r x_r^2 ... x_r^(N-1) | P(x_r)]. After a run the left N x N block must
// be the identity and the last column the secret coefficients. Variants:
// rows permuted so that zero pivots force row swaps, a system built so that
// column 0 is zero on the diagonal, and duplicated abscissae (singular).
// The run length is checked against N*(N+M+3) cycles when no swap is needed.
module tb_gja_core;
  import tb_gf_pkg::*;

  localparam int unsigned N  = 9;
  localparam int unsigned M  = 16;
  localparam int unsigned C  = N + 1;
  localparam logic [32:0] POLY = 33'h1100B;

  logic clk = 0, rst_n = 0, start = 0, busy, done, singular;
  logic host_we = 0;
  logic [3:0]  host_row = '0, host_col = '0;
  logic [M-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gja_core dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
                .singular(singular), .host_we(host_we), .host_row(host_row),
                .host_col(host_col), .host_wdata(host_wdata), .host_rdata(host_rdata));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(int r, int c, logic [M-1:0] v);
    @(negedge clk);
    host_we = 1; host_row = 4'(r); host_col = 4'(c); host_wdata = v;
    @(posedge clk);
    #1 host_we = 0;
  endtask

  task automatic rd(int r, int c, output logic [31:0] v);
    host_row = 4'(r); host_col = 4'(c);
    #1 v = 32'(host_rdata);
  endtask

  task automatic run(output int lat);
    @(negedge clk);
    start = 1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 0;
    while (!done) begin
      check("busy during run", 32'(busy), 1);
      @(posedge clk); lat++;
      @(negedge clk);
    end
  endtask

  // load [V(xs) | P(xs)] with the rows in the order given by perm; with rev
  // set, unknown c is the coefficient of x^(N-1-c) instead of x^c
  task automatic load_system(logic [31:0] xs[], logic [31:0] coefs[], int perm[],
                             bit rev = 0);
    for (int r = 0; r < N; r++) begin
      logic [31:0] x;
      x = xs[perm[r]];
      for (int c = 0; c < N; c++) wr(r, c, 16'(ref_pow(x, rev ? N - 1 - c : c, M, POLY)));
      wr(r, N, 16'(poly_eval(coefs, x, M, POLY)));
    end
  endtask

  task automatic check_solution(logic [31:0] coefs[], bit rev = 0);
    @(negedge clk);
    for (int r = 0; r < N; r++) begin
      logic [31:0] v;
      for (int c = 0; c < N; c++) begin
        rd(r, c, v);
        check("identity", v, (r == c) ? 1 : 0);
      end
      rd(r, N, v);
      check("coefficient", v, coefs[rev ? N - 1 - r : r]);
    end
  endtask

  task automatic random_points(ref logic [31:0] xs[], input int unsigned lo);
    for (int r = 0; r < N; r++) begin
      bit fresh;
      do begin
        xs[r] = $urandom_range(lo, 65535);
        fresh = 1;
        for (int q = 0; q < r; q++) if (xs[q] == xs[r]) fresh = 0;
      end while (!fresh);
    end
  endtask

  int swaps = 0;
  always @(posedge clk)
    if (rst_n && dut.state == gja_pkg::S_SWAP && dut.piv != dut.k) swaps++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] xs[], coefs[];
    int perm[], lat, swaps_before;
    logic [31:0] v;
    xs = new[N]; coefs = new[N]; perm = new[N];
    repeat (3) @(posedge clk);
    rst_n = 1;

    // in-order systems: pivots on the diagonal, exact run length
    for (int t = 0; t < 6; t++) begin
      foreach (coefs[q]) coefs[q] = $urandom_range(0, 65535);
      random_points(xs, 1);
      foreach (perm[q]) perm[q] = q;
      load_system(xs, coefs, perm);
      swaps_before = swaps;
      run(lat);
      check("singular flag clear", 32'(singular), 0);
      check("run length", lat, N * (N + M + 3));
      check("no swap", swaps - swaps_before, 0);
      check_solution(coefs);
    end

    // highest power first, rows rotated so that x = 0 sits in row k: that
    // row is [0 .. 0 1 | c0] and column k needs a pivot from below
    for (int t = 0; t < 4; t++) begin
      foreach (coefs[q]) coefs[q] = $urandom_range(0, 65535);
      random_points(xs, 1);
      xs[0] = 0;
      foreach (perm[q]) perm[q] = (q + N - 2 * t) % N;
      load_system(xs, coefs, perm, 1);
      swaps_before = swaps;
      run(lat);
      check("singular flag clear (swap)", 32'(singular), 0);
      check("swap happened (vandermonde)", 32'(swaps > swaps_before), 1);
      check_solution(coefs, 1);
    end

    // reversed row order, x = 0 in row 0
    begin
      foreach (coefs[q]) coefs[q] = $urandom_range(0, 65535);
      random_points(xs, 1);
      xs[N-1] = 0;
      foreach (perm[q]) perm[q] = N - 1 - q;     // row 0 is x = 0 -> [1 0 ..]
      load_system(xs, coefs, perm);
      run(lat);
      check_solution(coefs);
    end

    // rows 0 and 1 of the identity exchanged: column 0 is zero on the
    // diagonal, so one swap is needed and the solution is b with its first
    // two entries exchanged
    begin
      swaps_before = swaps;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          int src;
          src = (r == 0) ? 1 : (r == 1) ? 0 : r;
          wr(r, c, (c == src) ? 16'h0001 : 16'h0000);
        end
      for (int r = 0; r < N; r++) wr(r, N, 16'(100 + r));
      run(lat);
      check("swap happened", 32'(swaps > swaps_before), 1);
      check("run length with swap", lat, N * (N + M + 3) + 1);
      @(negedge clk);
      rd(0, N, v);
      check("x0", v, 101);
      rd(1, N, v);
      check("x1", v, 100);
      for (int r = 2; r < N; r++) begin
        rd(r, N, v);
        check("xr", v, 100 + r);
      end
    end

    // duplicate abscissae: singular
    begin
      foreach (coefs[q]) coefs[q] = $urandom_range(0, 65535);
      random_points(xs, 1);
      xs[5] = xs[2];
      foreach (perm[q]) perm[q] = q;
      load_system(xs, coefs, perm);
      run(lat);
      check("singular flag", 32'(singular), 1);
    end

    // writes while busy are ignored
    begin
      foreach (coefs[q]) coefs[q] = $urandom_range(0, 65535);
      random_points(xs, 1);
      foreach (perm[q]) perm[q] = q;
      load_system(xs, coefs, perm);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      host_we = 1; host_row = 4'(3); host_col = 4'(N); host_wdata = 16'hDEAD;
      @(negedge clk);
      host_we = 0;
      while (!done) @(negedge clk);
      check("singular flag clear (busy write)", 32'(singular), 0);
      check_solution(coefs);
    end

    check("swaps seen", 32'(swaps > 0), 1);
    $display("swaps=%0d", swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
