// tb_ntt_twiddle: checks both twiddle stages position by position against
// the published constants: forward dout[4a+b] = din * w^(ab), inverse
// dout[4a+b] = din * w^-(ab) * 16^-1 (16^-1 = 15391 mod 16417).
module tb_ntt_twiddle;
  import ntt_pkg::*;
  import ntt_ref_pkg::*;
  res_t din [16];
  res_t df [16];
  res_t di [16];
  int checks = 0, failures = 0;
  ntt_twiddle #(.INV(1'b0)) dut_f (.din(din), .dout(df));
  ntt_twiddle #(.INV(1'b1)) dut_i (.din(din), .dout(di));
  initial begin
    repeat (200) begin
      for (int k = 0; k < 16; k++) din[k] = res_t'($urandom % 16417);
      #1;
      for (int k = 0; k < 16; k++) begin
        longint ef, ei;
        ef = (longint'(din[k]) * WPOW[(k/4)*(k%4) % 16]) % 16417;
        ei = (((longint'(din[k]) * WINV[(k/4)*(k%4) % 16]) % 16417) * 15391) % 16417;
        checks += 2;
        if (int'(df[k]) != int'(ef)) begin failures++; $display("FAIL fwd k=%0d", k); end
        if (int'(di[k]) != int'(ei)) begin failures++; $display("FAIL inv k=%0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
