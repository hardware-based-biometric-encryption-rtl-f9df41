// gf_mul: combinational multiplier in GF(2^M).
//
// Computes p = a * b modulo the field polynomial POLY (bit M set, the rest
// giving the reduction terms). It is the shift-and-add method: for each set
// bit of b, the running multiple of a is XORed into the product, and the
// multiple is doubled (shifted left and reduced) between bits. One instance
// is a tree of M*M AND gates and XORs with no state; the result is valid in
// the same cycle. The field and the polynomial are this design's choice, as
// the GJA arithmetic domain is not fixed beyond "fuzzy vault".
module gf_mul #(
  parameter int unsigned M    = gja_pkg::GF_M_DEF,
  parameter logic [M:0]  POLY = gja_pkg::GF_POLY_DEF[M:0]
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);

  always_comb begin
    logic [M-1:0] mult;
    p    = '0;
    mult = a;
    for (int unsigned i = 0; i < M; i++) begin
      if (b[i]) p = p ^ mult;
      mult = {mult[M-2:0], 1'b0} ^ (mult[M-1] ? POLY[M-1:0] : '0);
    end
  end

endmodule
