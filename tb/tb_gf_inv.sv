// tb_gf_inv: checks the inverter against a^(2^113-2) computed by the
// reference model, checks a * inv = 1, checks the err flag for a = 0, and
// reports the average iteration count over random operands.
module tb_gf_inv;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [112:0] a, inv;
  logic done, busy, err;
  int checks = 0, failures = 0, cyc = 0, total = 0, nrun = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  gf_inv dut (.clk, .rst_n, .start, .a, .busy, .done, .err, .inv);
  task automatic run(fe_t x);
    int t0;
    fe_t e;
    @(negedge clk); a = x; start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    total += cyc - t0; nrun++;
    checks++;
    if (x == '0) begin
      if (!err) begin failures++; $display("FAIL no err for a=0"); end
    end else begin
      e = finv(x);
      checks++;
      if (inv !== e || err) begin failures++; $display("FAIL a=%h inv=%h exp=%h", x, inv, e); end
      if (fmul(inv, x) !== fe_t'(1)) begin failures++; $display("FAIL a*inv != 1"); end
    end
  endtask
  initial begin
    a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(fe_t'(1)); run(fe_t'(2)); run('1); run(fe_t'(1) << 112); run('0);
    total = 0; nrun = 0;
    repeat (30) run(rand_fe());
    $display("average inversion latency %0d cycles", total / nrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
