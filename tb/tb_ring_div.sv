// tb_ring_div: checks polynomial division with remainder in GF(2^113)[u]:
// a = q*b + r must hold coefficient by coefficient (products from the
// reference field multiplier) with deg(r) < deg(b). Covers divisors of
// degree 3, 2 and 1, the early exit deg(a) < deg(b) (2 cycles) and b = 0.
module tb_ring_div;
  import gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, busy, err;
  logic [112:0] a [6];
  logic [112:0] b [4];
  logic [112:0] q [6];
  logic [112:0] r [3];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  ring_div #(.NA(6), .NB(4)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .err, .q, .r);
  task automatic run(int da, int db, output int lat);
    fe_t e [9];
    int t0, dr;
    for (int k = 0; k < 6; k++) a[k] = (k <= da) ? rand_fe() : '0;
    for (int k = 0; k < 4; k++) b[k] = (k <= db) ? rand_fe() : '0;
    if (da >= 0 && a[da] == '0) a[da] = fe_t'(1);
    if (db >= 0 && b[db] == '0) b[db] = fe_t'(1);
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    checks++;
    if (db < 0) begin
      if (!err) begin failures++; $display("FAIL no err for b=0"); end
      return;
    end
    if (err) begin failures++; $display("FAIL unexpected err"); end
    // e = q*b + r
    for (int k = 0; k < 9; k++) e[k] = '0;
    for (int i = 0; i < 6; i++) for (int j = 0; j < 4; j++) e[i+j] ^= fmul(q[i], b[j]);
    for (int k = 0; k < 3; k++) e[k] ^= r[k];
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (e[k] !== ((k < 6) ? a[k] : '0)) begin failures++; $display("FAIL da=%0d db=%0d coeff %0d", da, db, k); end
    end
    dr = -1;
    for (int k = 0; k < 3; k++) if (r[k] != '0) dr = k;
    checks++;
    if (dr >= db) begin failures++; $display("FAIL remainder degree %0d >= %0d", dr, db); end
  endtask
  initial begin
    int lat;
    for (int k = 0; k < 6; k++) a[k] = '0;
    for (int k = 0; k < 4; k++) b[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(5, 3, lat); run(5, 2, lat); run(4, 2, lat); run(3, 1, lat); run(2, 2, lat);
    run(1, 2, lat);
    checks++;
    if (lat != 2) begin failures++; $display("FAIL early-exit latency %0d", lat); end
    run(3, -1, lat);
    repeat (4) run(5, 2, lat);
    $display("last division latency %0d cycles", lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
