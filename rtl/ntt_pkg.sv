// ntt_pkg: constants and modular arithmetic of the 16-point number
// theoretic transform used by the FFT multiplier.
// Arithmetic is in Z_Q with the prime Q = 16417 = 2^4 * 1026 + 1 and the
// principal 16th root of unity W = 7339 (both from the document); its
// inverse is 1586 and 1/16 = 15391 mod Q. Residues are W_C = 15 bits wide.
// The twiddle constants W^i and W^-i are computed at elaboration with
// pow_mod rather than stored as a table.
package ntt_pkg;
  localparam int unsigned Q     = 16417;
  localparam int unsigned NPT   = 16;      // transform length
  localparam int unsigned W_C   = 15;      // residue width
  localparam int unsigned OMEGA = 7339;    // primitive 16th root of unity
  localparam int unsigned OMEGA_INV = 1586;
  localparam int unsigned N_INV = 15391;   // 16^-1 mod Q
  typedef logic [W_C-1:0] res_t;
  typedef res_t vec_t [NPT];

  function automatic int unsigned pow_mod(int unsigned base, int unsigned e);
    longint unsigned r, bb;
    r = 1; bb = longint'(base % Q);
    for (int unsigned i = 0; i < e; i++) r = (r * bb) % Q;
    return int'(r);
  endfunction

  function automatic res_t add_mod(res_t x, res_t y);
    logic [W_C:0] s;
    s = {1'b0, x} + {1'b0, y};
    if (s >= (W_C+1)'(Q)) s = s - (W_C+1)'(Q);
    return s[W_C-1:0];
  endfunction

  function automatic res_t sub_mod(res_t x, res_t y);
    logic [W_C:0] s;
    s = {1'b0, x} + (W_C+1)'(Q) - {1'b0, y};
    if (s >= (W_C+1)'(Q)) s = s - (W_C+1)'(Q);
    return s[W_C-1:0];
  endfunction

  function automatic res_t mul_mod(res_t x, res_t y);
    logic [2*W_C-1:0] pr;
    pr = (2*W_C)'(x) * (2*W_C)'(y);
    return res_t'(pr % (2*W_C)'(Q));
  endfunction
endpackage
