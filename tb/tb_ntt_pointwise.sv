// tb_ntt_pointwise: checks c[k] = a[k]*b[k] mod 16417 for random and
// extreme residues (0, 1, 16416) and the one-cycle latency.
module tb_ntt_pointwise;
  import ntt_pkg::*;
  logic clk = 0, rst_n = 0, vin = 0, vout;
  res_t a [16];
  res_t b [16];
  res_t c [16];
  int checks = 0, failures = 0;
  longint ea [16];
  longint eb [16];
  always #5 clk = ~clk;
  ntt_pointwise dut (.clk, .rst_n, .vin, .a, .b, .vout, .c);
  initial begin
    for (int k = 0; k < 16; k++) begin a[k] = '0; b[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      @(negedge clk);
      for (int k = 0; k < 16; k++) begin
        a[k] = res_t'((r < 3) ? (r == 0 ? 0 : (r == 1 ? 1 : 16416)) : $urandom % 16417);
        b[k] = res_t'((r == 2) ? 16416 : $urandom % 16417);
        ea[k] = a[k]; eb[k] = b[k];
      end
      vin = 1;
      @(negedge clk); vin = 0;
      checks++;
      if (!vout) begin failures++; $display("FAIL vout not set after 1 cycle"); end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (longint'(c[k]) != (ea[k] * eb[k]) % 16417) begin failures++; $display("FAIL k=%0d", k); end
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
