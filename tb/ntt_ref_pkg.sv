// ntt_ref_pkg: reference 16-point transforms over Z_16417 for the NTT
// testbenches, computed directly as sums of x(n) * w^(nk), with the twiddle
// powers taken from the published constant table (w = 7339).
package ntt_ref_pkg;
  localparam int Q = 16417;
  // w^i mod Q and its inverse for i = 0..15
  localparam int WPOW [16] = '{1, 7339, 13161, 7368, 12571, 11446, 12822, 14831,
                               16416, 9078, 3256, 9049, 3846, 4971, 3595, 1586};
  localparam int WINV [16] = '{1, 1586, 3595, 4971, 3846, 9049, 3256, 9078,
                               16416, 14831, 12822, 11446, 12571, 7368, 13161, 7339};
  typedef int ivec_t [16];

  function automatic ivec_t dft(ivec_t x, bit inverse);
    ivec_t y;
    for (int k = 0; k < 16; k++) begin
      longint s;
      s = 0;
      for (int n = 0; n < 16; n++)
        s = (s + longint'(x[n]) * (inverse ? WINV[(n*k) % 16] : WPOW[(n*k) % 16])) % Q;
      if (inverse) s = (s * 15391) % Q;   // 1/16
      y[k] = int'(s);
    end
    return y;
  endfunction

  function automatic ivec_t cyc_conv(ivec_t a, ivec_t b);
    ivec_t c;
    for (int k = 0; k < 16; k++) begin
      longint s;
      s = 0;
      for (int i = 0; i < 16; i++) s = (s + longint'(a[i]) * b[(k - i + 16) % 16]) % Q;
      c[k] = int'(s);
    end
    return c;
  endfunction

  function automatic ivec_t rand_vec();
    ivec_t v;
    for (int k = 0; k < 16; k++) v[k] = int'($urandom % Q);
    return v;
  endfunction
endpackage
