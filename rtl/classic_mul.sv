// classic_mul: schoolbook GF(2)[x] multiplier ("Classic 20" in OrderedKA).
// Multiplies two N-bit binary polynomials without reduction: N^2 AND terms
// summed with XOR trees, giving the 2N-1 bit product. Combinational.
// Structure follows the document's classical multiplier; N is a parameter.
module classic_mul #(
  parameter int unsigned N = 20
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);
  always_comb begin
    p = '0;
    for (int j = 0; j < int'(N); j++) begin
      if (b[j]) p = p ^ ((2*N-1)'(a) << j);
    end
  end
endmodule
