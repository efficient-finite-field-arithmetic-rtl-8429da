// ka_rec: recursive two-way Karatsuba GF(2)[x] multiplier (KA64, KA32, ...,
// KA2 of PaddedKA). An N-bit operand is split into halves A = Au x^(N/2) + Al;
// three half-size products D0 = Al*Bl, D1 = Au*Bu, D01 = (Al+Au)(Bl+Bu) are
// formed by three instances of this module and combined by the "overlap"
// XOR: C = D1 x^N + (D01+D0+D1) x^(N/2) + D0. Recursion stops at N = LEAF,
// where a classic_mul takes over; with the default LEAF = 1 a KA64 holds 729
// single-bit AND multiplications, the count the document gives for PaddedKA.
// Combinational, N must be LEAF times a power of two.
// Lint note: when Verilator lints this module as its own top level it does
// not elaborate the module's instances of itself and so reports d0, d1 and
// d01 as undriven; inside any parent (padded_ka_mul, padded_ka_star_mul, the
// testbench) the full tree is built and no such warning appears.
module ka_rec #(
  parameter int unsigned N    = 64,
  parameter int unsigned LEAF = 1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);
  if (N <= LEAF) begin : g_leaf
    classic_mul #(.N(N)) u_cl (.a(a), .b(b), .p(p));
  end else begin : g_split
    localparam int unsigned H = N / 2;
    logic [2*H-2:0] d0, d1, d01;
    ka_rec #(.N(H), .LEAF(LEAF)) u_lo  (.a(a[H-1:0]), .b(b[H-1:0]), .p(d0));
    ka_rec #(.N(H), .LEAF(LEAF)) u_hi  (.a(a[N-1:H]), .b(b[N-1:H]), .p(d1));
    ka_rec #(.N(H), .LEAF(LEAF)) u_mid (.a(a[H-1:0] ^ a[N-1:H]),
                                        .b(b[H-1:0] ^ b[N-1:H]), .p(d01));
    // overlap: place the three partial products and XOR where they overlap
    assign p = ((2*N-1)'(d1) << N) ^ ((2*N-1)'(d01 ^ d0 ^ d1) << H) ^ (2*N-1)'(d0);
  end
endmodule
