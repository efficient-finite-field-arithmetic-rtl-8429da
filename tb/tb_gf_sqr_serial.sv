// tb_gf_sqr_serial: checks the serial field squarer against the reference
// product a*a mod f for corner cases and random operands, and checks that
// done arrives 58 cycles after start.
module tb_gf_sqr_serial;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [112:0] a, b;
  logic done, busy;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  gf_sqr_serial dut (.clk, .rst_n, .start, .a, .busy, .done, .b);
  task automatic run(fe_t x);
    int t0, lat;
    fe_t e;
    @(negedge clk); a = x; start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    e = fmul(x, x);
    checks += 2;
    if (b !== e) begin failures++; $display("FAIL a=%h b=%h exp=%h", x, b, e); end
    if (lat != 58) begin failures++; $display("FAIL latency %0d", lat); end
  endtask
  initial begin
    a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0); run(fe_t'(1)); run('1);
    for (int k = 0; k < 113; k += 7) run(fe_t'(1) << k);
    run(fe_t'(1) << 112);
    repeat (40) run(rand_fe());
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
