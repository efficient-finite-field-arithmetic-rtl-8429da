// tb_ring_sqr: checks polynomial squaring in GF(2^113)[u] (3 coefficients
// in, 5 out) against the schoolbook product a*a with the reference field
// multiplier, and the 58-cycle latency.
module tb_ring_sqr;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [112:0] a [3];
  logic [112:0] b [5];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  ring_sqr #(.NA(3)) dut (.clk, .rst_n, .start, .a, .busy, .done, .b);
  initial begin
    for (int k = 0; k < 3; k++) a[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) begin
      fe_t e [5];
      int t0;
      for (int k = 0; k < 3; k++) a[k] = rand_fe();
      for (int k = 0; k < 5; k++) e[k] = '0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) e[i+j] ^= fmul(a[i], a[j]);
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != 58) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (b[k] !== e[k]) begin failures++; $display("FAIL coeff %0d", k); end
      end
    end
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
