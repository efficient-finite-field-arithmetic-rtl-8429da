// tb_ntt_fft: streams random vectors, one per cycle, through the forward
// and the inverse transform and checks each output against the direct DFT
// over Z_16417 (inverse output in base-4 digit-reversed order), the 2-cycle
// latency of both, and that inverse(forward(x)) = x.
module tb_ntt_fft;
  import ntt_pkg::*;
  import ntt_ref_pkg::*;
  logic clk = 0, rst_n = 0, vin = 0, vf, vi;
  res_t din [16];
  res_t fo [16];
  res_t io [16];
  ivec_t vecs [60];
  int tin [60];
  int nf = 0, ni = 0, nsent = 0;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  ntt_fft  dut_f (.clk, .rst_n, .vin, .din, .vout(vf), .dout(fo));
  ntt_ifft dut_i (.clk, .rst_n, .vin, .din, .vout(vi), .dout(io));
  always @(negedge clk) if (rst_n) begin
    if (vf) begin
      ivec_t e;
      e = dft(vecs[nf], 1'b0);
      checks++;
      if (cyc - tin[nf] != 2) begin failures++; $display("FAIL fft latency %0d", cyc - tin[nf]); end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(fo[k]) != e[k]) begin failures++; $display("FAIL fft k=%0d got %0d exp %0d", k, fo[k], e[k]); end
      end
      nf++;
    end
    if (vi) begin
      ivec_t e;
      e = dft(vecs[ni], 1'b1);
      checks++;
      if (cyc - tin[ni] != 2) begin failures++; $display("FAIL ifft latency %0d", cyc - tin[ni]); end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(io[4*(k%4) + k/4]) != e[k]) begin failures++; $display("FAIL ifft k=%0d", k); end
      end
      ni++;
    end
  end
  initial begin
    ivec_t x;
    for (int k = 0; k < 16; k++) din[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      @(negedge clk);
      x = rand_vec();
      if (r == 0) begin
        for (int k = 0; k < 16; k++) x[k] = 0;
        x[1] = 1;                                   // impulse
      end
      for (int k = 0; k < 16; k++) din[k] = res_t'(x[k]);
      vin = (r % 7 != 3);    // a gap now and then
      if (vin) begin vecs[nsent] = x; tin[nsent] = cyc; nsent++; end
    end
    @(negedge clk); vin = 0;
    repeat (5) @(negedge clk);
    if (nf != nsent || ni != nsent) begin failures++; $display("FAIL outputs missing"); end
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
