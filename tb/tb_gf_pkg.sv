// tb_gf_pkg: reference arithmetic for the GJA testbenches.
//
// Works independently of the RTL multiplier: the full carry-less product is
// formed first and then reduced modulo the field polynomial from the top bit
// down. Also provides Horner evaluation of a polynomial, used to build
// fuzzy-vault style reconstruction systems whose solution is known.
package tb_gf_pkg;

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b,
                                          int unsigned m, logic [32:0] poly);
    logic [63:0] prod;
    prod = '0;
    for (int unsigned i = 0; i < m; i++)
      if (b[i]) prod ^= 64'(a) << i;
    for (int i = 2 * m - 2; i >= int'(m); i--)
      if (prod[i]) prod ^= 64'(poly) << (i - int'(m));
    return prod[31:0];
  endfunction

  // coefs[0] is the constant term
  function automatic logic [31:0] poly_eval(logic [31:0] coefs[], logic [31:0] x,
                                            int unsigned m, logic [32:0] poly);
    logic [31:0] acc;
    acc = '0;
    for (int i = coefs.size() - 1; i >= 0; i--)
      acc = ref_mul(acc, x, m, poly) ^ coefs[i];
    return acc;
  endfunction

  function automatic logic [31:0] ref_pow(logic [31:0] x, int unsigned e,
                                          int unsigned m, logic [32:0] poly);
    logic [31:0] r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = ref_mul(r, x, m, poly);
    return r;
  endfunction

endpackage
