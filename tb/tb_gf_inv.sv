// tb_gf_inv: self-checking testbench of gf_inv.
//
// Inverts random non-zero elements of GF(2^16), checks a * y == 1 with the
// reference multiplier, checks the inverse of 1 and of 0, and checks that done
// rises exactly M-1 cycles after the start edge.
module tb_gf_inv;
  import tb_gf_pkg::*;

  localparam int unsigned M = 16;
  localparam logic [32:0] POLY = 33'h1100B;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] a = '0, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gf_inv dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a),
              .busy(busy), .done(done), .y(y));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic invert(input logic [M-1:0] v, output logic [M-1:0] res, output int lat);
    @(negedge clk);
    a = v; start = 1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(posedge clk); lat++;
      @(negedge clk);
    end
    res = y;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] r;
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    invert(16'h0001, r, lat);
    check("inv(1)", 32'(r), 1);
    check("latency", lat, M - 1);
    invert(16'h0000, r, lat);
    check("inv(0)", 32'(r), 0);
    invert(16'h0002, r, lat);
    check("inv(x)*x", ref_mul(32'(r), 2, M, POLY), 1);
    for (int t = 0; t < 300; t++) begin
      logic [M-1:0] v;
      v = 16'($urandom_range(1, 65535));
      invert(v, r, lat);
      check("a*inv(a)", ref_mul(32'(r), 32'(v), M, POLY), 1);
      check("latency", lat, M - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
