// tb_gf_mul: self-checking testbench of gf_mul.
//
// Checks the default GF(2^16) multiplier against the reference model on
// random operands and on identities (x*0, x*1), and a GF(2^8) instance with
// the AES polynomial against the published product {57}*{83} = {c1}.
module tb_gf_mul;
  import tb_gf_pkg::*;

  localparam int unsigned M = 16;
  localparam logic [32:0] POLY = 33'h1100B;

  logic [15:0] a, b, p;
  logic [7:0]  a8, b8, p8;
  int checks = 0, failures = 0;

  gf_mul dut (.a(a), .b(b), .p(p));
  gf_mul #(.M(8), .POLY(9'h11B)) dut8 (.a(a8), .b(b8), .p(p8));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = 8'h57; b8 = 8'h83; #1;
    check("aes 57*83", 32'(p8), 32'hC1);
    a8 = 8'h57; b8 = 8'h13; #1;
    check("aes 57*13", 32'(p8), 32'hFE);
    for (int t = 0; t < 2000; t++) begin
      a = 16'($urandom); b = 16'($urandom); #1;
      check("random", 32'(p), ref_mul(32'(a), 32'(b), M, POLY));
      b = 16'h0001; #1;
      check("x*1", 32'(p), 32'(a));
      b = 16'h0000; #1;
      check("x*0", 32'(p), 0);
    end
    // x^15 * x = x^16 = x^12 + x^3 + x + 1
    a = 16'h8000; b = 16'h0002; #1;
    check("reduce", 32'(p), 32'h100B);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
