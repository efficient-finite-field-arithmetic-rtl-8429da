// ntt_twiddle: twiddle stage between the two commutators. Position 4a+b is
// multiplied by W^(a*b) (forward) or by W^(-a*b) * 16^-1 (INV = 1, the
// "twiddle-inv" stage, which also applies the 1/N of the inverse transform).
// In the forward stage the 7 positions with a*b = 0 pass unchanged and only
// 9 constant multiplications remain. Combinational.
module ntt_twiddle
  import ntt_pkg::*;
#(
  parameter bit INV = 1'b0
) (
  input  res_t din  [NPT],
  output res_t dout [NPT]
);
  for (genvar k = 0; k < int'(NPT); k++) begin : g_tw
    localparam int unsigned E  = (k / 4) * (k % 4);
    localparam int unsigned TW = INV ? (pow_mod(OMEGA_INV, E) * N_INV) % Q : pow_mod(OMEGA, E);
    if (!INV && E == 0) begin : g_one
      assign dout[k] = din[k];
    end else begin : g_mul
      assign dout[k] = mul_mod(din[k], res_t'(TW));
    end
  end
endmodule
