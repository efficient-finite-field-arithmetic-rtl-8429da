// tb_ff_arith_top: end-to-end test of ff_arith_top at its default
// parameters. It
//  * multiplies operand pairs on all four parallel multipliers and checks
//    the three Karatsuba results against the reference field product and
//    the NTT result against the model of its data flow (and the exact field
//    product for b = x^14k), with latencies 6, 5, 1 and 5 cycles;
//  * streams back-to-back pairs (one per cycle) so the NTT pipeline holds
//    several operations at once while the sequential multipliers ignore the
//    starts that arrive while they are busy;
//  * runs the HECC field multiplier, squarer and inverter (including the
//    zero-operand error) and the ring addition, multiplication, squaring and
//    division (including the early exit) and the extended Euclidean
//    algorithm (general, common-factor and trivial inputs) and the
//    three-input gcd, checking every result.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_ff_arith_top;
  import gf_ref_pkg::*;
  import ntt_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mul_start = 0;
  logic [112:0] mul_a, mul_b;
  logic oka_busy, oka_done, pka_busy, pka_done, pks_done, fft_done;
  logic [112:0] oka_p, pka_p, pks_p, fft_p;
  logic fmul_start = 0, fsqr_start = 0, finv_start = 0;
  logic [112:0] fld_a, fld_b;
  logic fmul_busy, fmul_done, fsqr_busy, fsqr_done, finv_busy, finv_done, finv_err;
  logic [112:0] fmul_p, fsqr_p, finv_p;
  logic radd_start = 0, rmul_start = 0, rsqr_start = 0, rdiv_start = 0;
  logic [112:0] ring_a [6];
  logic [112:0] ring_b [6];
  logic radd_done, rmul_busy, rmul_done, rsqr_busy, rsqr_done, rdiv_busy, rdiv_done, rdiv_err;
  logic [112:0] radd_c [6];
  logic [112:0] rmul_c [8];
  logic [112:0] rsqr_c [5];
  logic [112:0] rdiv_q [6];
  logic [112:0] rdiv_r [3];
  logic regcd_start = 0, regcd_busy, regcd_done;
  logic [112:0] regcd_d [3];
  logic [112:0] regcd_s [3];
  logic [112:0] regcd_t [3];
  logic gcd3_start = 0, gcd3_busy, gcd3_done;
  logic [112:0] ring_c [3];
  logic [112:0] gcd3_d [3];
  logic [112:0] gcd3_s1 [3];
  logic [112:0] gcd3_s2 [3];
  logic [112:0] gcd3_s3 [3];
  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_ka = 0, n_fft_overlap = 0, n_busy_ignored = 0, n_fft_exact = 0;
  int n_field = 0, n_inv_err = 0, n_ring = 0, n_div_early = 0;
  int n_egcd = 0, n_egcd_trivial = 0, n_egcd_factor = 0, n_gcd3 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  ff_arith_top dut (.*);

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  function automatic fe_t fft_model(fe_t x, fe_t y);
    ivec_t ca, cb, cc;
    wide_t xw = wide_t'(x), yw = wide_t'(y), rr = '0;
    for (int i = 0; i < 16; i++) begin ca[i] = int'(xw[14*i +: 14]); cb[i] = int'(yw[14*i +: 14]); end
    cc = cyc_conv(ca, cb);
    for (int i = 0; i < 16; i++) rr[14*i +: 14] = 14'(cc[i]);
    return reduce(rr);
  endfunction

  // NTT results checked as they stream out
  fe_t fa_q [$];
  fe_t fb_q [$];
  int  ft_q [$];
  int  fft_in_flight = 0;
  always @(negedge clk) if (rst_n) begin
    if (mul_start) begin fa_q.push_back(mul_a); fb_q.push_back(mul_b); ft_q.push_back(cyc); end
    if (fft_done) begin
      fe_t x, y; int t;
      x = fa_q.pop_front(); y = fb_q.pop_front(); t = ft_q.pop_front();
      checks += 2;
      if (fft_p !== fft_model(x, y)) fail("fft result");
      if (cyc - t != 5) fail($sformatf("fft latency %0d", cyc - t));
      if (y == fe_t'(1) || y == (fe_t'(1) << 14)) begin
        checks++; n_fft_exact++;
        if (fft_p !== fmul(x, y)) fail("fft exact product");
      end
    end
    if (fa_q.size() > 1) n_fft_overlap++;
  end

  // one multiplication on all four multipliers, waiting for the slowest
  task automatic mul_all(fe_t x, fe_t y);
    int t0;
    bit got_o = 0, got_p = 0, got_s = 0;
    fe_t e;
    e = fmul(x, y);
    @(negedge clk); mul_a = x; mul_b = y; mul_start = 1; t0 = cyc;
    @(negedge clk); mul_start = 0;
    repeat (8) begin
      if (pks_done && !got_s) begin got_s = 1; checks += 2; if (pks_p !== e) fail("PaddedKA* result"); if (cyc - t0 != 1) fail("PaddedKA* latency"); end
      if (pka_done && !got_p) begin got_p = 1; checks += 2; if (pka_p !== e) fail("PaddedKA result"); if (cyc - t0 != 5) fail("PaddedKA latency"); end
      if (oka_done && !got_o) begin got_o = 1; checks += 2; if (oka_p !== e) fail("OrderedKA result"); if (cyc - t0 != 6) fail("OrderedKA latency"); end
      @(negedge clk);
    end
    checks++;
    if (!(got_o && got_p && got_s)) fail("a Karatsuba multiplier did not finish");
    else n_ka++;
  endtask

  // back-to-back starts: the NTT pipeline accepts all, the sequential
  // Karatsuba units only the first one
  task automatic burst();
    int n_o = 0, n_p = 0, n_s = 0;
    fe_t xs [4];
    fe_t ys [4];
    for (int i = 0; i < 4; i++) begin xs[i] = rand_fe(); ys[i] = (i == 2) ? fe_t'(1) : rand_fe(); end
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); mul_a = xs[i]; mul_b = ys[i]; mul_start = 1;
      if (pks_done) n_s++;
      if (pka_done) n_p++;
      if (oka_done) n_o++;
      if (i > 0 && oka_busy && pka_busy) n_busy_ignored++;
    end
    @(negedge clk); mul_start = 0;
    repeat (10) begin
      if (pks_done) n_s++;
      if (pka_done) begin n_p++; checks++; if (pka_p !== fmul(xs[0], ys[0])) fail("PaddedKA burst result"); end
      if (oka_done) begin n_o++; checks++; if (oka_p !== fmul(xs[0], ys[0])) fail("OrderedKA burst result"); end
      @(negedge clk);
    end
    checks += 3;
    if (n_s != 4) fail($sformatf("PaddedKA* gave %0d results for 4 starts", n_s));
    if (n_p != 1) fail($sformatf("PaddedKA gave %0d results for a busy burst", n_p));
    if (n_o != 1) fail($sformatf("OrderedKA gave %0d results for a busy burst", n_o));
  endtask

  task automatic field_ops(fe_t x, fe_t y);
    @(negedge clk); fld_a = x; fld_b = y; fmul_start = 1; fsqr_start = 1; finv_start = 1;
    @(negedge clk); fmul_start = 0; fsqr_start = 0; finv_start = 0;
    while (fmul_busy || fsqr_busy || finv_busy) @(negedge clk);
    @(negedge clk);
    checks += 3;
    if (fmul_p !== fmul(x, y)) fail("field multiplication");
    if (fsqr_p !== fmul(x, x)) fail("field squaring");
    if (x == '0) begin
      if (!finv_err) fail("inverse of zero not flagged"); else n_inv_err++;
    end else begin
      if (finv_err || fmul(finv_p, x) !== fe_t'(1)) fail("field inversion");
    end
    n_field++;
  endtask

  // extended GCD on g = ring_a[0..2], h = ring_b[0..2]: checks
  // s*g + t*h = d and the expected degree of d
  task automatic egcd_run(int exp_deg);
    fe_t e [5];
    int dd;
    @(negedge clk); regcd_start = 1;
    @(negedge clk); regcd_start = 0;
    while (regcd_busy) @(negedge clk);
    for (int k = 0; k < 5; k++) e[k] = '0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      e[i+j] ^= fmul(regcd_s[i], ring_a[j]) ^ fmul(regcd_t[i], ring_b[j]);
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (e[k] !== ((k < 3) ? regcd_d[k] : '0)) fail("extended GCD identity");
    end
    dd = -1;
    for (int k = 0; k < 3; k++) if (regcd_d[k] != '0) dd = k;
    checks++;
    if (dd != exp_deg) fail($sformatf("GCD degree %0d, expected %0d", dd, exp_deg));
    n_egcd++;
  endtask

  task automatic egcd_ops();
    fe_t l0, l1, u0, u1, w0, w1;
    // common linear factor (l1 u + l0) of two degree-2 polynomials
    l0 = rand_fe(); l1 = fe_t'(1); u0 = rand_fe(); u1 = rand_fe(); w0 = rand_fe(); w1 = fe_t'(1);
    for (int k = 0; k < 6; k++) begin ring_a[k] = '0; ring_b[k] = '0; end
    ring_a[0] = fmul(l0, u0); ring_a[1] = fmul(l0, u1) ^ fmul(l1, u0); ring_a[2] = fmul(l1, u1);
    ring_b[0] = fmul(l0, w0); ring_b[1] = fmul(l0, w1) ^ fmul(l1, w0); ring_b[2] = fmul(l1, w1);
    egcd_run(1);
    n_egcd_factor++;
    // trivial input g = 1
    for (int k = 0; k < 6; k++) ring_a[k] = '0;
    ring_a[0] = fe_t'(1);
    egcd_run(0);
    n_egcd_trivial++;
  endtask

  // three-input gcd on a1 = ring_a[0..2], a2 = ring_b[0..2], b = ring_c:
  // d = s1*a1 + s2*a2 + s3*b, and d constant for random operands
  task automatic gcd3_op();
    fe_t e [5];
    for (int k = 0; k < 6; k++) begin
      ring_a[k] = (k < 3) ? rand_fe() : '0;
      ring_b[k] = (k < 3) ? rand_fe() : '0;
    end
    ring_c[0] = rand_fe(); ring_c[1] = rand_fe(); ring_c[2] = '0;
    @(negedge clk); gcd3_start = 1;
    @(negedge clk); gcd3_start = 0;
    while (gcd3_busy) @(negedge clk);
    for (int k = 0; k < 5; k++) e[k] = '0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      e[i+j] ^= fmul(gcd3_s1[i], ring_a[j]) ^ fmul(gcd3_s2[i], ring_b[j]) ^ fmul(gcd3_s3[i], ring_c[j]);
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (e[k] !== ((k < 3) ? gcd3_d[k] : '0)) fail("three-input gcd identity");
    end
    checks++;
    if (gcd3_d[0] == '0 || gcd3_d[1] != '0 || gcd3_d[2] != '0) fail("three-input gcd not constant");
    n_gcd3++;
  endtask

  task automatic ring_ops(int div_da);
    fe_t e [9];
    for (int k = 0; k < 6; k++) begin
      ring_a[k] = (k <= div_da) ? rand_fe() : '0;
      ring_b[k] = (k < 3) ? rand_fe() : '0;
    end
    @(negedge clk); radd_start = 1; rmul_start = 1; rsqr_start = 1; rdiv_start = 1; regcd_start = 1;
    @(negedge clk); radd_start = 0; rmul_start = 0; rsqr_start = 0; rdiv_start = 0; regcd_start = 0;
    while (rmul_busy || rsqr_busy || rdiv_busy || regcd_busy) @(negedge clk);
    @(negedge clk);
    for (int k = 0; k < 6; k++) begin checks++; if (radd_c[k] !== (ring_a[k] ^ ring_b[k])) fail("ring add"); end
    for (int k = 0; k < 8; k++) e[k] = '0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 6; j++) e[i+j] ^= fmul(ring_a[i], ring_b[j]);
    for (int k = 0; k < 8; k++) begin checks++; if (rmul_c[k] !== e[k]) fail("ring mul"); end
    for (int k = 0; k < 5; k++) e[k] = '0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) e[i+j] ^= fmul(ring_a[i], ring_a[j]);
    for (int k = 0; k < 5; k++) begin checks++; if (rsqr_c[k] !== e[k]) fail("ring sqr"); end
    for (int k = 0; k < 9; k++) e[k] = '0;
    for (int i = 0; i < 6; i++) for (int j = 0; j < 4; j++) e[i+j] ^= fmul(rdiv_q[i], ring_b[j]);
    for (int k = 0; k < 3; k++) e[k] ^= rdiv_r[k];
    for (int k = 0; k < 6; k++) begin checks++; if (e[k] !== ring_a[k]) fail("ring div"); end
    if (div_da < 2) n_div_early++;
    // extended GCD of two random polynomials: coprime, constant gcd
    for (int k = 0; k < 5; k++) e[k] = '0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      e[i+j] ^= fmul(regcd_s[i], ring_a[j]) ^ fmul(regcd_t[i], ring_b[j]);
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (e[k] !== ((k < 3) ? regcd_d[k] : '0)) fail("extended GCD identity");
    end
    checks++;
    if (regcd_d[0] == '0 || regcd_d[1] != '0 || regcd_d[2] != '0) fail("GCD of random polynomials not constant");
    n_egcd++;
    n_ring++;
  endtask

  initial begin
    mul_a = '0; mul_b = '0; fld_a = '0; fld_b = '0;
    for (int k = 0; k < 6; k++) begin ring_a[k] = '0; ring_b[k] = '0; end
    for (int k = 0; k < 3; k++) ring_c[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mul_all(fe_t'(1) << 112, fe_t'(1) << 112);
    mul_all(rand_fe(), fe_t'(1));
    mul_all(rand_fe(), fe_t'(1) << 14);
    repeat (5) mul_all(rand_fe(), rand_fe());
    burst();
    repeat (8) @(negedge clk);
    field_ops(rand_fe(), rand_fe());
    field_ops('0, rand_fe());
    field_ops(fe_t'(1), '1);
    ring_ops(5);
    ring_ops(1);
    egcd_ops();
    gcd3_op();
    $display("mechanisms: ka=%0d fft_overlap=%0d busy_ignored=%0d fft_exact=%0d field=%0d inv_err=%0d ring=%0d div_early=%0d egcd=%0d egcd_factor=%0d egcd_trivial=%0d gcd3=%0d",
             n_ka, n_fft_overlap, n_busy_ignored, n_fft_exact, n_field, n_inv_err, n_ring, n_div_early,
             n_egcd, n_egcd_factor, n_egcd_trivial, n_gcd3);
    if (n_ka == 0)           fail("no Karatsuba multiplication");
    if (n_fft_overlap == 0)  fail("NTT pipeline never held two operations");
    if (n_busy_ignored == 0) fail("no start arrived while busy");
    if (n_fft_exact == 0)    fail("no exact NTT case");
    if (n_field == 0)        fail("no field operation");
    if (n_inv_err == 0)      fail("inverse of zero never tried");
    if (n_ring == 0)         fail("no ring operation");
    if (n_div_early == 0)    fail("division early exit never taken");
    if (n_egcd == 0)         fail("no extended GCD");
    if (n_egcd_factor == 0)  fail("extended GCD never found a common factor");
    if (n_egcd_trivial == 0) fail("extended GCD trivial input never taken");
    if (n_gcd3 == 0)         fail("no three-input gcd");
    if (fa_q.size() != 0)    fail("NTT results missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
