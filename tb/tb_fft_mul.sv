// tb_fft_mul: streams operand pairs, one per cycle, into the NTT
// multiplier and checks every result and its 5-cycle latency against a
// model built from the stated data flow: 14-bit chunking, 16-point cyclic
// convolution mod 16417 computed directly, low 14 bits of each coefficient
// concatenated and reduced modulo f(x). Operand pairs with b = 1 and
// b = x^14k must also equal the true field product a*b.
module tb_fft_mul;
  import gf_ref_pkg::*;
  import ntt_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, done;
  logic [112:0] op1, op2, dout;
  fe_t va [64];
  fe_t vb [64];
  bit  exact [64];
  int  tin [64];
  int  nsent = 0, nout = 0, nexact = 0;
  int  checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  fft_mul dut (.clk, .rst_n, .en, .op1, .op2, .done, .dout);

  function automatic fe_t model(fe_t x, fe_t y);
    ivec_t ca, cb, cc;
    wide_t xw = wide_t'(x), yw = wide_t'(y), r = '0;
    for (int i = 0; i < 16; i++) begin
      ca[i] = int'(xw[14*i +: 14]);
      cb[i] = int'(yw[14*i +: 14]);
    end
    cc = cyc_conv(ca, cb);
    for (int i = 0; i < 16; i++) r[14*i +: 14] = 14'(cc[i]);
    return reduce(r);
  endfunction

  always @(negedge clk) if (rst_n && done) begin
    fe_t e;
    e = model(va[nout], vb[nout]);
    checks += 2;
    if (dout !== e) begin failures++; $display("FAIL pair %0d got %h exp %h", nout, dout, e); end
    if (cyc - tin[nout] != 5) begin failures++; $display("FAIL latency %0d", cyc - tin[nout]); end
    if (exact[nout]) begin
      checks++; nexact++;
      if (dout !== fmul(va[nout], vb[nout])) begin failures++; $display("FAIL exact pair %0d", nout); end
    end
    nout++;
  end

  initial begin
    op1 = '0; op2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      @(negedge clk);
      op1 = rand_fe();
      case (r % 5)
        0: op2 = fe_t'(1);
        1: op2 = fe_t'(1) << (14 * ((r / 5) % 7));
        default: op2 = rand_fe();
      endcase
      en = (r % 9 != 4);
      if (en) begin
        va[nsent] = op1; vb[nsent] = op2; tin[nsent] = cyc;
        // exact cases: b = x^14k and a's top chunk index + k stays below 16
        exact[nsent] = (r % 5) < 2;
        nsent++;
      end
    end
    @(negedge clk); en = 0;
    repeat (8) @(negedge clk);
    if (nout != nsent) begin failures++; $display("FAIL %0d results for %0d pairs", nout, nsent); end
    if (nexact == 0) begin failures++; $display("FAIL no exact case checked"); end
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
