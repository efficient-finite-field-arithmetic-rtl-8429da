// gf_pkg: shared constants of the GF(2^113) arithmetic.
// Field elements are 113-bit vectors in polynomial basis, bit i holding the
// coefficient of x^i. The field size follows the document; the reduction
// polynomial is not printed there, so this design uses the standard
// irreducible trinomial x^113 + x^9 + 1 (an assumption, change F_POLY to use
// another one; every unit reads it from here).
package gf_pkg;
  localparam int unsigned M = 113;
  // Reduction polynomial f(x) including the x^M term (M+1 bits).
  localparam logic [M:0] F_POLY = (114'd1 << M) | (114'd1 << 9) | 114'd1;
  typedef logic [M-1:0] gf_t;
  typedef logic [2*M-2:0] gf_prod_t;
endpackage
