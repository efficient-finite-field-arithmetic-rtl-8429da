// gf_reducer: the "Modular Reducer" found at the top of every multiplier.
// Folds a W_IN-bit unreduced GF(2) polynomial product back to M bits modulo
// the reduction polynomial F. Purely combinational: from the top bit down,
// every set bit at position i >= M clears itself by XORing F shifted by i-M.
// For a trinomial this flattens into a small XOR network, roughly the
// (r-1)(n-1) two-input XORs the document counts. The folding order is this
// design's choice; the function (reduction modulo f) is the document's.
module gf_reducer #(
  parameter int unsigned M    = 113,
  parameter int unsigned W_IN = 2*M-1,
  parameter logic [M:0]  F    = gf_pkg::F_POLY
) (
  input  logic [W_IN-1:0] din,
  output logic [M-1:0]    dout
);
  logic [W_IN-1:0] r;
  always_comb begin
    r = din;
    for (int i = W_IN-1; i >= int'(M); i--) begin
      if (r[i]) r = r ^ (W_IN'(F) << (i - M));
    end
    dout = r[M-1:0];
  end
endmodule
