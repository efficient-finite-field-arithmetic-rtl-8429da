// ntt_commutator: one radix-4 stage of the restructured 16-point transform,
// four ntt_butterfly units with a fixed wiring that is the same for both
// stages. Butterfly n takes the inputs at positions n, n+4, n+8, n+12 and
// drives its output q to position 4n+q. Applied twice (with the twiddle
// stage between) this yields the transform in base-4 digit-reversed order.
// INV selects the inverse-transform butterfly constant. Combinational.
module ntt_commutator
  import ntt_pkg::*;
#(
  parameter bit INV = 1'b0
) (
  input  res_t din  [NPT],
  output res_t dout [NPT]
);
  localparam int unsigned J = INV ? pow_mod(OMEGA, 4) : pow_mod(OMEGA, 12);
  for (genvar n = 0; n < 4; n++) begin : g_bf
    res_t bx [4];
    res_t by [4];
    for (genvar q = 0; q < 4; q++) begin : g_io
      assign bx[q] = din[n + 4*q];
      assign dout[4*n + q] = by[q];
    end
    ntt_butterfly #(.J(J)) u_bf (.x(bx), .y(by));
  end
endmodule
