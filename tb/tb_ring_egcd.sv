// tb_ring_egcd: checks the extended Euclidean algorithm in GF(2^113)[u].
// For random g, h of degree <= 2 (and pairs with a common linear factor,
// so that the gcd is not constant) the outputs must equal a reference
// run of the same algorithm built from the reference field arithmetic,
// and d = s*g + t*h must hold. The four trivial inputs (g = 0, h = 0,
// g = 1, h = 1) must finish with done 2 cycles after start. The reference
// polynomial arithmetic is in poly_ref_pkg.
module tb_ring_egcd;
  import gf_ref_pkg::*;
  import poly_ref_pkg::*;
  localparam int NC = 3;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [112:0] g [NC];
  logic [112:0] h [NC];
  logic [112:0] d [NC];
  logic [112:0] s [NC];
  logic [112:0] t [NC];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  ring_egcd #(.NC(NC)) dut (.clk, .rst_n, .start, .g, .h, .busy, .done, .d, .s, .t);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(poly_t a, poly_t b, input int exp_lat);
    poly_t rd, rs, rt, chk;
    int t0, lat;
    for (int k = 0; k < NC; k++) begin g[k] = a[k]; h[k] = b[k]; end
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    ref_egcd(a, b, rd, rs, rt);
    for (int k = 0; k < NC; k++) begin
      checks += 3;
      if (d[k] !== rd[k]) begin failures++; $display("FAIL d[%0d]", k); end
      if (s[k] !== rs[k]) begin failures++; $display("FAIL s[%0d]", k); end
      if (t[k] !== rt[k]) begin failures++; $display("FAIL t[%0d]", k); end
    end
    // Bezout identity from the DUT outputs
    for (int k = 0; k < NW; k++) begin rs[k] = '0; rt[k] = '0; end
    for (int k = 0; k < NC; k++) begin rs[k] = s[k]; rt[k] = t[k]; end
    chk = padd(pmul(rs, a), pmul(rt, b));
    for (int k = 0; k < NW; k++) begin
      checks++;
      if (chk[k] !== ((k < NC) ? d[k] : '0)) begin failures++; $display("FAIL s*g+t*h coeff %0d", k); end
    end
    if (exp_lat > 0) begin
      checks++;
      if (lat != exp_lat) begin failures++; $display("FAIL latency %0d, expected %0d", lat, exp_lat); end
    end else $display("egcd deg %0d,%0d: %0d cycles, deg d = %0d", pdeg(a), pdeg(b), lat, pdeg(rd));
  endtask

  initial begin
    poly_t a, b, z, one, lin, u1, u2;
    for (int k = 0; k < NC; k++) begin g[k] = '0; h[k] = '0; end
    for (int k = 0; k < NW; k++) begin z[k] = '0; one[k] = '0; end
    one[0] = fe_t'(1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // trivial inputs
    run(z, rpoly(2), 2);
    run(rpoly(2), z, 2);
    run(one, rpoly(2), 2);
    run(rpoly(1), one, 2);
    // general cases
    run(rpoly(2), rpoly(2), 0);
    run(rpoly(2), rpoly(1), 0);
    run(rpoly(1), rpoly(2), 0);
    run(rpoly(2), rpoly(0), 0);
    repeat (3) run(rpoly(2), rpoly(2), 0);
    // common linear factor: gcd of degree 1
    lin = rpoly(1); u1 = rpoly(1); u2 = rpoly(1);
    run(pmul(lin, u1), pmul(lin, u2), 0);
    run(pmul(lin, u1), lin, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
