// gf_ref_pkg: bit-level reference models used by the testbenches.
// Everything here is written independently of the RTL: plain shift-and-XOR
// carry-less multiplication, long division by f(x) = x^113 + x^9 + 1,
// inversion by exponentiation a^(2^113 - 2), and a direct O(N^2) number
// theoretic transform over Z_16417.
package gf_ref_pkg;
  localparam int RM = 113;
  typedef logic [RM-1:0] fe_t;
  typedef logic [511:0]  wide_t;

  function automatic wide_t clmul(wide_t x, wide_t y, int n);
    wide_t r = '0;
    for (int i = 0; i < n; i++) if (y[i]) r ^= (x << i);
    return r;
  endfunction

  function automatic fe_t reduce(wide_t x);
    for (int i = 511; i >= RM; i--)
      if (x[i]) begin x[i] = 1'b0; x[i-RM+9] ^= 1'b1; x[i-RM] ^= 1'b1; end
    return x[RM-1:0];
  endfunction

  function automatic fe_t fmul(fe_t a, fe_t b);
    return reduce(clmul(wide_t'(a), wide_t'(b), RM));
  endfunction

  function automatic fe_t finv(fe_t a);
    // a^(2^113-2) = prod_{k=1}^{112} a^(2^k)
    fe_t r = fe_t'(1), s = a;
    for (int k = 1; k < RM; k++) begin
      s = fmul(s, s);
      r = fmul(r, s);
    end
    return r;
  endfunction

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < 4; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  // --- Z_Q arithmetic for the NTT checks
  localparam int Q = 16417;
  function automatic int powq(int b, int e);
    longint r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % Q;
    return int'(r);
  endfunction
endpackage
