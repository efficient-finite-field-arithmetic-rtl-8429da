// tb_gf_reducer: checks the modular reducer (225-bit and 224-bit inputs)
// against bit-by-bit long division by f(x) = x^113 + x^9 + 1, including
// the single-bit inputs x^k for every k.
module tb_gf_reducer;
  import gf_ref_pkg::*;
  logic [224:0] d1;
  logic [223:0] d2;
  logic [112:0] r1, r2;
  int checks = 0, failures = 0;
  gf_reducer #(.M(113), .W_IN(225)) dut1 (.din(d1), .dout(r1));
  gf_reducer #(.M(113), .W_IN(224)) dut2 (.din(d2), .dout(r2));
  task automatic chk();
    #1;
    checks += 2;
    if (r1 !== reduce(wide_t'(d1))) begin failures++; $display("FAIL225 %h", d1); end
    if (r2 !== reduce(wide_t'(d2))) begin failures++; $display("FAIL224 %h", d2); end
  endtask
  initial begin
    for (int k = 0; k < 225; k++) begin d1 = 225'd1 << k; d2 = 224'(d1); chk(); end
    repeat (300) begin
      wide_t t;
      for (int w = 0; w < 8; w++) t[w*32 +: 32] = $urandom;
      t[224] = 1'($urandom);
      d1 = t[224:0];
      d2 = 224'(d1 >> 1);
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
