// tb_ring_mul: checks polynomial multiplication in GF(2^113)[u] (3 by 6
// coefficients) against a schoolbook product with the reference field
// multiplier, and that done arrives 345 cycles after start.
module tb_ring_mul;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [112:0] a [3];
  logic [112:0] b [6];
  logic [112:0] c [8];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  ring_mul #(.NA(3), .NB(6)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .c);
  task automatic run(int mode);
    fe_t e [8];
    int t0;
    for (int k = 0; k < 3; k++) a[k] = (mode == 0 && k > 0) ? '0 : rand_fe();
    for (int k = 0; k < 6; k++) b[k] = (mode == 1 && k == 5) ? '0 : rand_fe();
    for (int k = 0; k < 8; k++) e[k] = '0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 6; j++) e[i+j] ^= fmul(a[i], b[j]);
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != 345) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (c[k] !== e[k]) begin failures++; $display("FAIL coeff %0d", k); end
    end
  endtask
  initial begin
    for (int k = 0; k < 3; k++) a[k] = '0;
    for (int k = 0; k < 6; k++) b[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0); run(1);
    repeat (8) run(2);
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
