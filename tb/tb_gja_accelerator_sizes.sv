// tb_gja_accelerator_sizes: the accelerator at non-default sizes.
//
// Instantiates three configurations side by side -- N = 2 over GF(2^8)
// (AES polynomial x^8+x^4+x^3+x+1), N = 5 over GF(2^8) (x^8+x^4+x^3+x^2+1)
// and N = 16 over GF(2^12) (x^12+x^6+x^4+x+1) -- and solves random
// reconstruction systems on each through the bus, checking the coefficients
// and the N*(N+M+3) run length. Shows that the address split, the inverter
// counter width and the sequencer follow the parameters.
module tb_gja_accelerator_sizes;
  import tb_gf_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one bus per instance
  logic [2:0]  bsel = '0;
  logic [9:0]  address = '0;
  logic        read = 0, write = 0;
  logic [31:0] writedata = '0, rd [3];

  gja_accelerator #(.N(2), .M(8), .POLY(9'h11B)) dut_a (
    .clk(clk), .rst_n(rst_n), .avs_address(address[3:0]), .avs_read(read && bsel[0]),
    .avs_write(write && bsel[0]), .avs_writedata(writedata), .avs_readdata(rd[0]));
  gja_accelerator #(.N(5), .M(8), .POLY(9'h11D)) dut_b (
    .clk(clk), .rst_n(rst_n), .avs_address(address[6:0]), .avs_read(read && bsel[1]),
    .avs_write(write && bsel[1]), .avs_writedata(writedata), .avs_readdata(rd[1]));
  gja_accelerator #(.N(16), .M(12), .POLY(13'h1053)) dut_c (
    .clk(clk), .rst_n(rst_n), .avs_address(address[9:0]), .avs_read(read && bsel[2]),
    .avs_write(write && bsel[2]), .avs_writedata(writedata), .avs_readdata(rd[2]));

  task automatic bus_write(int u, logic [9:0] a, logic [31:0] d);
    @(negedge clk);
    bsel = 3'(1 << u); address = a; writedata = d; write = 1;
    @(negedge clk);
    write = 0;
  endtask

  task automatic bus_read(int u, logic [9:0] a, output logic [31:0] d);
    @(negedge clk);
    bsel = 3'(1 << u); address = a; read = 1;
    @(negedge clk);
    read = 0;
    d = rd[u];
  endtask

  task automatic solve_system(int u, int n, int m, logic [32:0] poly);
    int rw, cw, cyc;
    logic [31:0] xs[], coefs[], d;
    rw = $clog2(n); cw = $clog2(n + 1);
    xs = new[n]; coefs = new[n];
    for (int r = 0; r < n; r++) begin
      bit fresh;
      coefs[r] = $urandom_range(0, (1 << m) - 1);
      do begin
        xs[r] = $urandom_range(0, (1 << m) - 1);
        fresh = 1;
        for (int q = 0; q < r; q++) if (xs[q] == xs[r]) fresh = 0;
      end while (!fresh);
    end
    bus_read(u, 10'h001, d);
    check("info", d, {16'(m), 16'(n)});
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c <= n; c++)
        bus_write(u, 10'((1 << (rw + cw)) | (r << cw) | c),
                  (c == n) ? poly_eval(coefs, xs[r], m, poly) : ref_pow(xs[r], c, m, poly));
    end
    bus_write(u, 10'h000, 1);
    cyc = 0;
    do begin
      bus_read(u, 10'h000, d);
      cyc += 2;
    end while (d[0]);
    check("status", d, 32'b010);
    // polling reads take two cycles each: the run fits within the last poll
    checks++;
    if (cyc < n * (n + m + 3) || cyc > n * (n + m + 3) + 4) begin
      failures++;
      $display("FAIL run length unit %0d: %0d polled cycles, expected about %0d",
               u, cyc, n * (n + m + 3));
    end
    for (int r = 0; r < n; r++) begin
      bus_read(u, 10'((1 << (rw + cw)) | (r << cw) | n), d);
      check("coefficient", d, coefs[r]);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      solve_system(0, 2, 8, 33'h11B);
      solve_system(1, 5, 8, 33'h11D);
      solve_system(2, 16, 12, 33'h1053);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
