// tb_ntt_butterfly: checks the radix-4 butterfly (forward constant) against
// the 4-point transform with the 4th root of unity w^4 = 12571:
// y(k) = sum_n x(n) * 12571^(nk) mod 16417.
module tb_ntt_butterfly;
  import ntt_pkg::*;
  localparam int QQ = 16417;
  localparam int W4 [4] = '{1, 12571, 16416, 3846};
  res_t x [4];
  res_t y [4];
  int checks = 0, failures = 0;
  ntt_butterfly dut (.x, .y);
  initial begin
    repeat (500) begin
      for (int n = 0; n < 4; n++) x[n] = res_t'($urandom % QQ);
      #1;
      for (int k = 0; k < 4; k++) begin
        longint s; s = 0;
        for (int n = 0; n < 4; n++) s = (s + longint'(x[n]) * W4[(n*k) % 4]) % QQ;
        checks++;
        if (int'(y[k]) != int'(s)) begin failures++; $display("FAIL k=%0d y=%0d exp=%0d", k, y[k], s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
