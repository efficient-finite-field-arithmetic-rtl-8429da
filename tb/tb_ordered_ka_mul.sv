// tb_ordered_ka_mul: drives the ordered_ka_mul GF(2^113) multiplier with corner cases (0, 1,
// all-ones, x^112) and random operands, compares each product with the
// bit-level reference a*b mod f and checks that done arrives exactly
// 6 cycles after start.
module tb_ordered_ka_mul;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [112:0] a, b, p;
  logic done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  logic busy; ordered_ka_mul dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .p);
  task automatic run(fe_t x, fe_t y);
    int t0, lat;
    fe_t e;
    @(negedge clk); a = x; b = y; start = 1;
    t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    e = fmul(x, y);
    checks += 2;
    if (p !== e) begin failures++; $display("FAIL a=%h b=%h p=%h exp=%h", x, y, p, e); end
    if (lat != 6) begin failures++; $display("FAIL latency %0d, expected 6", lat); end
  endtask
  initial begin
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, '1); run(fe_t'(1), 113'h1_2345_6789_abcd_ef01_2345_6789_abcd);
    run('1, '1); run(fe_t'(1) << 112, fe_t'(1) << 112);
    repeat (40) run(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
