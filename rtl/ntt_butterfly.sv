// ntt_butterfly: radix-4 decimation-in-frequency butterfly over Z_Q.
// Computes the 4-point transform of (x0, x1, x2, x3) with 8 modular
// additions/subtractions and one constant multiplication by J, the 4th root
// of unity standing in for the complex j:
//   t0 = x0+x2, t1 = x0-x2, t2 = x1+x3, t3 = J*(x1-x3)
//   y0 = t0+t2, y1 = t1-t3, y2 = t0-t2, y3 = t1+t3
// Forward transforms use J = W^12 = 3846 (the constant printed in the
// butterfly figure), the inverse uses J = W^4 = 12571. Combinational.
module ntt_butterfly
  import ntt_pkg::*;
#(
  parameter int unsigned J = 3846
) (
  input  res_t x [4],
  output res_t y [4]
);
  res_t t0, t1, t2, t3;
  always_comb begin
    t0 = add_mod(x[0], x[2]);
    t1 = sub_mod(x[0], x[2]);
    t2 = add_mod(x[1], x[3]);
    t3 = mul_mod(res_t'(J), sub_mod(x[1], x[3]));
    y[0] = add_mod(t0, t2);
    y[1] = sub_mod(t1, t3);
    y[2] = sub_mod(t0, t2);
    y[3] = add_mod(t1, t3);
  end
endmodule
