// tb_ka_rec: checks the recursive Karatsuba multiplier at N = 64 (the KA64
// of PaddedKA) and N = 16 against the shift-and-XOR reference.
module tb_ka_rec;
  import gf_ref_pkg::*;
  logic [63:0] a, b;
  logic [126:0] p;
  logic [15:0] a16, b16;
  logic [30:0] p16;
  int checks = 0, failures = 0;
  ka_rec #(.N(64)) dut (.a, .b, .p);
  ka_rec #(.N(16), .LEAF(4)) dut16 (.a(a16), .b(b16), .p(p16));
  task automatic chk();
    wide_t e, e16;
    #1;
    e = clmul(wide_t'(a), wide_t'(b), 64);
    e16 = clmul(wide_t'(a16), wide_t'(b16), 16);
    checks += 2;
    if (p !== e[126:0]) begin failures++; $display("FAIL64 a=%h b=%h", a, b); end
    if (p16 !== e16[30:0]) begin failures++; $display("FAIL16 a=%h b=%h", a16, b16); end
  endtask
  initial begin
    a = '1; b = '1; a16 = '1; b16 = '1; chk();
    a = 64'h8000_0000_0000_0000; b = 64'h8000_0000_0000_0001; a16 = 16'h8000; b16 = 16'h8001; chk();
    repeat (300) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      a16 = 16'($urandom); b16 = 16'($urandom); chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
