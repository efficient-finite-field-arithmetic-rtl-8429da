// tb_ntt_commutator: checks the commutator stage wiring and arithmetic:
// output 4n+q must equal the 4-point transform (root 12571 forward,
// 3846 inverse) of inputs n, n+4, n+8, n+12, evaluated at q.
module tb_ntt_commutator;
  import ntt_pkg::*;
  localparam int W4F [4] = '{1, 12571, 16416, 3846};
  localparam int W4I [4] = '{1, 3846, 16416, 12571};
  res_t din [16];
  res_t df [16];
  res_t di [16];
  int checks = 0, failures = 0;
  ntt_commutator #(.INV(1'b0)) dut_f (.din(din), .dout(df));
  ntt_commutator #(.INV(1'b1)) dut_i (.din(din), .dout(di));
  initial begin
    repeat (200) begin
      for (int k = 0; k < 16; k++) din[k] = res_t'($urandom % 16417);
      #1;
      for (int n = 0; n < 4; n++) for (int q = 0; q < 4; q++) begin
        longint sf, si; sf = 0; si = 0;
        for (int m = 0; m < 4; m++) begin
          sf = (sf + longint'(din[n + 4*m]) * W4F[(m*q) % 4]) % 16417;
          si = (si + longint'(din[n + 4*m]) * W4I[(m*q) % 4]) % 16417;
        end
        checks += 2;
        if (int'(df[4*n+q]) != int'(sf)) begin failures++; $display("FAIL fwd %0d", 4*n+q); end
        if (int'(di[4*n+q]) != int'(si)) begin failures++; $display("FAIL inv %0d", 4*n+q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
