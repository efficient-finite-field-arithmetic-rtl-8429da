// poly_ref_pkg: reference polynomial arithmetic in GF(2^113)[u] for the
// ring testbenches, built on the reference field functions. Polynomials
// are arrays of NW coefficients, index 0 the constant term. Provides
// degree, product (truncated to NW coefficients), sum, long division and
// the extended Euclidean algorithm with the same trivial-input rules and
// cofactor convention as the hardware (d = s*g + t*h, d not monic).
package poly_ref_pkg;
  import gf_ref_pkg::*;
  localparam int NW = 6;
  typedef fe_t poly_t [NW];

  function automatic int pdeg(poly_t x);
    int r = -1;
    for (int k = 0; k < NW; k++) if (x[k] != '0) r = k;
    return r;
  endfunction
  function automatic poly_t pmul(poly_t x, poly_t y);
    poly_t z;
    for (int k = 0; k < NW; k++) z[k] = '0;
    for (int i = 0; i < NW; i++)
      for (int j = 0; j < NW; j++)
        if (i + j < NW) z[i+j] ^= fmul(x[i], y[j]);
    return z;
  endfunction
  function automatic poly_t padd(poly_t x, poly_t y);
    poly_t z;
    for (int k = 0; k < NW; k++) z[k] = x[k] ^ y[k];
    return z;
  endfunction
  function automatic poly_t pconst(fe_t c);
    poly_t z;
    for (int k = 0; k < NW; k++) z[k] = '0;
    z[0] = c;
    return z;
  endfunction
  function automatic poly_t rpoly(int dg);
    poly_t x;
    for (int k = 0; k < NW; k++) x[k] = (k <= dg) ? rand_fe() : '0;
    if (dg >= 0 && x[dg] == '0) x[dg] = fe_t'(1);
    return x;
  endfunction
  // long division: x = q*y + r, y non-zero
  function automatic void pdivmod(poly_t x, poly_t y, output poly_t q, output poly_t r);
    int dy;
    fe_t il, c;
    r = x;
    for (int k = 0; k < NW; k++) q[k] = '0;
    dy = pdeg(y);
    il = finv(y[dy]);
    for (int k = NW - 1; k >= dy; k--) begin
      if (r[k] != '0) begin
        c = fmul(r[k], il);
        q[k-dy] = c;
        for (int j = 0; j <= dy; j++) r[k-dy+j] ^= fmul(c, y[j]);
      end
    end
  endfunction
  function automatic void ref_egcd(poly_t a, poly_t b, output poly_t rd, output poly_t rs,
                                   output poly_t rt);
    poly_t one, zero, q, r, s1, s2, t1, t2, sn, tn;
    one = pconst(fe_t'(1)); zero = pconst('0);
    if (pdeg(a) < 0) begin rd = b; rs = zero; rt = one; return; end
    if (pdeg(b) < 0) begin rd = a; rs = one; rt = zero; return; end
    if (a == one) begin rd = one; rs = one; rt = zero; return; end
    if (b == one) begin rd = one; rs = zero; rt = one; return; end
    s1 = zero; s2 = one; t1 = one; t2 = zero;
    while (pdeg(b) >= 0) begin
      pdivmod(a, b, q, r);
      sn = padd(pmul(q, s1), s2);
      tn = padd(pmul(q, t1), t2);
      a = b; b = r; s2 = s1; s1 = sn; t2 = t1; t1 = tn;
    end
    rd = a; rs = s2; rt = t2;
  endfunction
endpackage
