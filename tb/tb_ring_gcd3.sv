// tb_ring_gcd3: checks the three-polynomial gcd with cofactors in
// GF(2^113)[u] on genus-2 sized operands (a1, a2 of degree 2, b of degree
// <= 1). Expected values come from two reference extended Euclidean runs
// and reference products (poly_ref_pkg); in addition
// d = s1*a1 + s2*a2 + s3*b must hold. Cases: random (coprime) inputs,
// a1 and a2 with a common linear factor that b lacks, all three sharing
// a linear factor (gcd of degree 1), and b = 0.
module tb_ring_gcd3;
  import gf_ref_pkg::*;
  import poly_ref_pkg::*;
  localparam int NC = 3;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [112:0] a1 [NC];
  logic [112:0] a2 [NC];
  logic [112:0] b  [NC];
  logic [112:0] d  [NC];
  logic [112:0] s1 [NC];
  logic [112:0] s2 [NC];
  logic [112:0] s3 [NC];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  ring_gcd3 #(.NC(NC)) dut (.clk, .rst_n, .start, .a1, .a2, .b, .busy, .done, .d, .s1, .s2, .s3);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(poly_t x1, poly_t x2, poly_t y, int exp_deg);
    poly_t d1, e1, e2, rd, c1, c2, r1, r2, chk, o1, o2, o3;
    int t0;
    for (int k = 0; k < NC; k++) begin a1[k] = x1[k]; a2[k] = x2[k]; b[k] = y[k]; end
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    ref_egcd(x1, x2, d1, e1, e2);
    ref_egcd(d1, y, rd, c1, c2);
    r1 = pmul(c1, e1);
    r2 = pmul(c1, e2);
    for (int k = 0; k < NC; k++) begin
      checks += 4;
      if (d[k]  !== rd[k]) begin failures++; $display("FAIL d[%0d]", k); end
      if (s1[k] !== r1[k]) begin failures++; $display("FAIL s1[%0d]", k); end
      if (s2[k] !== r2[k]) begin failures++; $display("FAIL s2[%0d]", k); end
      if (s3[k] !== c2[k]) begin failures++; $display("FAIL s3[%0d]", k); end
    end
    o1 = pconst('0); o2 = pconst('0); o3 = pconst('0);
    for (int k = 0; k < NC; k++) begin o1[k] = s1[k]; o2[k] = s2[k]; o3[k] = s3[k]; end
    chk = padd(padd(pmul(o1, x1), pmul(o2, x2)), pmul(o3, y));
    for (int k = 0; k < NW; k++) begin
      checks++;
      if (chk[k] !== ((k < NC) ? d[k] : '0)) begin failures++; $display("FAIL identity coeff %0d", k); end
    end
    checks++;
    if (pdeg(rd) != exp_deg) begin failures++; $display("FAIL gcd degree %0d, expected %0d", pdeg(rd), exp_deg); end
    $display("gcd3: %0d cycles, deg d = %0d", cyc - t0, pdeg(rd));
  endtask

  initial begin
    poly_t l, m;
    for (int k = 0; k < NC; k++) begin a1[k] = '0; a2[k] = '0; b[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) run(rpoly(2), rpoly(2), rpoly(1), 0);
    l = rpoly(1);
    run(pmul(l, rpoly(1)), pmul(l, rpoly(1)), rpoly(1), 0);
    m = rpoly(0);
    run(pmul(l, rpoly(1)), pmul(l, rpoly(1)), pmul(l, m), 1);
    run(rpoly(2), rpoly(2), pconst('0), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
