// ff_arith_top: GF(2^113) finite field arithmetic, all units side by side.
// Two groups of hardware share one clock and one active-low asynchronous
// reset but are otherwise independent:
//  * Four parallel field multipliers that take the same operands mul_a,
//    mul_b on mul_start: OrderedKA (6 cycles), PaddedKA (5 cycles),
//    PaddedKA* (1 cycle) and the pipelined NTT multiplier (5 cycles, one
//    pair per cycle). Each reports its own done pulse and result.
//  * The field and ring arithmetic units of the HECC coprocessor: bit-serial
//    field multiplier, squarer and inverter on fld_a, fld_b, and ring
//    addition, multiplication, squaring, division and the extended
//    Euclidean algorithm in GF(2^113)[u] on ring_a, ring_b (coefficient 0
//    first; multiplication, squaring and the extended GCD use coefficients
//    0..2 of ring_a, the GCD and division use the low 3 or 4 of ring_b).
//    The three-input gcd (gcd3_start) takes a1 = ring_a[0..2],
//    a2 = ring_b[0..2] and b = ring_c. Each unit has its own start and done; results are held until the
//    unit's next start. ring_sqr's odd output coefficients are constant
//    zero (squaring in characteristic 2), so rsqr_c[1] and rsqr_c[3] are
//    idle outputs by construction.
// A start to a busy sequential unit is ignored by that unit.
// Which units exist follows the document; sharing the operand ports is
// this design's choice.
module ff_arith_top
  import gf_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // parallel multipliers
  input  logic         mul_start,
  input  logic [M-1:0] mul_a,
  input  logic [M-1:0] mul_b,
  output logic         oka_busy,
  output logic         oka_done,
  output logic [M-1:0] oka_p,
  output logic         pka_busy,
  output logic         pka_done,
  output logic [M-1:0] pka_p,
  output logic         pks_done,
  output logic [M-1:0] pks_p,
  output logic         fft_done,
  output logic [M-1:0] fft_p,
  // HECC field arithmetic
  input  logic         fmul_start,
  input  logic         fsqr_start,
  input  logic         finv_start,
  input  logic [M-1:0] fld_a,
  input  logic [M-1:0] fld_b,
  output logic         fmul_busy,
  output logic         fmul_done,
  output logic [M-1:0] fmul_p,
  output logic         fsqr_busy,
  output logic         fsqr_done,
  output logic [M-1:0] fsqr_p,
  output logic         finv_busy,
  output logic         finv_done,
  output logic         finv_err,
  output logic [M-1:0] finv_p,
  // HECC ring arithmetic
  input  logic         radd_start,
  input  logic         rmul_start,
  input  logic         rsqr_start,
  input  logic         rdiv_start,
  input  logic [M-1:0] ring_a [6],
  input  logic [M-1:0] ring_b [6],
  output logic         radd_done,
  output logic [M-1:0] radd_c [6],
  output logic         rmul_busy,
  output logic         rmul_done,
  output logic [M-1:0] rmul_c [8],
  output logic         rsqr_busy,
  output logic         rsqr_done,
  output logic [M-1:0] rsqr_c [5],
  output logic         rdiv_busy,
  output logic         rdiv_done,
  output logic         rdiv_err,
  output logic [M-1:0] rdiv_q [6],
  output logic [M-1:0] rdiv_r [3],
  input  logic         regcd_start,
  output logic         regcd_busy,
  output logic         regcd_done,
  output logic [M-1:0] regcd_d [3],
  output logic [M-1:0] regcd_s [3],
  output logic [M-1:0] regcd_t [3],
  input  logic         gcd3_start,
  input  logic [M-1:0] ring_c [3],
  output logic         gcd3_busy,
  output logic         gcd3_done,
  output logic [M-1:0] gcd3_d [3],
  output logic [M-1:0] gcd3_s1 [3],
  output logic [M-1:0] gcd3_s2 [3],
  output logic [M-1:0] gcd3_s3 [3]
);
  ordered_ka_mul     u_oka (.clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
                            .busy(oka_busy), .done(oka_done), .p(oka_p));
  padded_ka_mul      u_pka (.clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
                            .busy(pka_busy), .done(pka_done), .p(pka_p));
  padded_ka_star_mul u_pks (.clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
                            .done(pks_done), .p(pks_p));
  fft_mul            u_fft (.clk, .rst_n, .en(mul_start), .op1(mul_a), .op2(mul_b),
                            .done(fft_done), .dout(fft_p));

  gf_mul_serial u_fmul (.clk, .rst_n, .start(fmul_start), .a(fld_a), .b(fld_b),
                        .busy(fmul_busy), .done(fmul_done), .p(fmul_p));
  gf_sqr_serial u_fsqr (.clk, .rst_n, .start(fsqr_start), .a(fld_a),
                        .busy(fsqr_busy), .done(fsqr_done), .b(fsqr_p));
  gf_inv        u_finv (.clk, .rst_n, .start(finv_start), .a(fld_a),
                        .busy(finv_busy), .done(finv_done), .err(finv_err), .inv(finv_p));

  logic [M-1:0] ra3 [3];
  logic [M-1:0] rb4 [4];
  logic [M-1:0] rb3 [3];
  for (genvar k = 0; k < 3; k++) begin : g_ra3
    assign ra3[k] = ring_a[k];
  end
  for (genvar k = 0; k < 4; k++) begin : g_rb4
    assign rb4[k] = ring_b[k];
  end
  for (genvar k = 0; k < 3; k++) begin : g_rb3
    assign rb3[k] = ring_b[k];
  end

  ring_add #(.NC(6)) u_radd (.clk, .rst_n, .start(radd_start), .a(ring_a), .b(ring_b),
                             .done(radd_done), .c(radd_c));
  ring_mul #(.NA(3), .NB(6)) u_rmul (.clk, .rst_n, .start(rmul_start), .a(ra3), .b(ring_b),
                                     .busy(rmul_busy), .done(rmul_done), .c(rmul_c));
  ring_sqr #(.NA(3)) u_rsqr (.clk, .rst_n, .start(rsqr_start), .a(ra3),
                             .busy(rsqr_busy), .done(rsqr_done), .b(rsqr_c));
  ring_div #(.NA(6), .NB(4)) u_rdiv (.clk, .rst_n, .start(rdiv_start), .a(ring_a), .b(rb4),
                                     .busy(rdiv_busy), .done(rdiv_done), .err(rdiv_err),
                                     .q(rdiv_q), .r(rdiv_r));
  ring_egcd #(.NC(3)) u_regcd (.clk, .rst_n, .start(regcd_start), .g(ra3), .h(rb3),
                               .busy(regcd_busy), .done(regcd_done),
                               .d(regcd_d), .s(regcd_s), .t(regcd_t));
  ring_gcd3 #(.NC(3)) u_gcd3 (.clk, .rst_n, .start(gcd3_start), .a1(ra3), .a2(rb3), .b(ring_c),
                              .busy(gcd3_busy), .done(gcd3_done),
                              .d(gcd3_d), .s1(gcd3_s1), .s2(gcd3_s2), .s3(gcd3_s3));
endmodule
