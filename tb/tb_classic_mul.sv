// tb_classic_mul: random and corner-case check of the schoolbook GF(2)[x]
// multiplier (N = 20) against the shift-and-XOR reference.
module tb_classic_mul;
  import gf_ref_pkg::*;
  localparam int N = 20;
  logic [N-1:0] a, b;
  logic [2*N-2:0] p;
  int checks = 0, failures = 0;
  classic_mul #(.N(N)) dut (.a, .b, .p);
  task automatic chk();
    wide_t e;
    #1;
    e = clmul(wide_t'(a), wide_t'(b), N);
    checks++;
    if (p !== e[2*N-2:0]) begin failures++; $display("FAIL a=%h b=%h p=%h exp=%h", a, b, p, e[2*N-2:0]); end
  endtask
  initial begin
    a = '1; b = '1; chk();
    a = 1;  b = 20'h80000; chk();
    a = 0;  b = '1; chk();
    repeat (500) begin a = N'($urandom); b = N'($urandom); chk(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
