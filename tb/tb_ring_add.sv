// tb_ring_add: checks coefficient-wise addition of two 6-coefficient
// polynomials over GF(2^113) and the one-cycle latency.
module tb_ring_add;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [112:0] a [6];
  logic [112:0] b [6];
  logic [112:0] c [6];
  fe_t ea [6];
  fe_t eb [6];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ring_add #(.NC(6)) dut (.clk, .rst_n, .start, .a, .b, .done, .c);
  initial begin
    for (int k = 0; k < 6; k++) begin a[k] = '0; b[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) begin
      @(negedge clk);
      for (int k = 0; k < 6; k++) begin ea[k] = rand_fe(); eb[k] = rand_fe(); a[k] = ea[k]; b[k] = eb[k]; end
      start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!done) begin failures++; $display("FAIL done"); end
      for (int k = 0; k < 6; k++) begin
        fe_t s;
        s = '0;
        for (int i = 0; i < 113; i++) s[i] = (ea[k][i] != eb[k][i]);
        checks++;
        if (c[k] !== s) begin failures++; $display("FAIL coeff %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
