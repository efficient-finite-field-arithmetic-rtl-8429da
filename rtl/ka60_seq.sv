// ka60_seq: the KA60 unit of OrderedKA, a three-way (degree-2) Karatsuba
// multiplier for 3*P-bit binary polynomials built from three P-bit classic
// multipliers that are each used twice.
// The operands are split into thirds a = a2 x^2P + a1 x^P + a0. Cycle 1
// (the edge that samples start) forms D0 = a0b0, D1 = a1b1, D2 = a2b2;
// cycle 2 feeds the same three multipliers with the sums and forms
// D01, D02, D12; cycle 3 registers the overlap
//   C = D2 X^4 + (D12+D1+D2) X^3 + (D02+D2+D0+D1) X^2 + (D01+D1+D0) X + D0,
// X = x^P, and raises done for one cycle. Latency 3 cycles, one product per
// 3 cycles. The split, the three Classic-20 units run twice and the overlap
// stage follow the document; the cycle split is this design's choice.
module ka60_seq #(
  parameter int unsigned P = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [3*P-1:0]   a,
  input  logic [3*P-1:0]   b,
  output logic             done,
  output logic [6*P-2:0]   p
);
  localparam int unsigned W = 2*P-1;   // width of one partial product
  logic [P-1:0] a0, a1, a2, b0, b1, b2;
  logic [3*P-1:0] a_q, b_q;
  logic [1:0] ph;                      // 0 idle, 1 second pass, 2 overlap
  logic [P-1:0] ma [3], mb [3];
  logic [W-1:0] mp [3];
  logic [W-1:0] d0, d1, d2, d01, d02, d12;

  // in the start cycle the live operands are used, later the held copies
  always_comb begin
    if (ph == 2'd1) {a2, a1, a0} = a_q; else {a2, a1, a0} = a;
    if (ph == 2'd1) {b2, b1, b0} = b_q; else {b2, b1, b0} = b;
    if (ph == 2'd1) begin
      ma[0] = a0 ^ a1; mb[0] = b0 ^ b1;
      ma[1] = a0 ^ a2; mb[1] = b0 ^ b2;
      ma[2] = a1 ^ a2; mb[2] = b1 ^ b2;
    end else begin
      ma[0] = a0; mb[0] = b0;
      ma[1] = a1; mb[1] = b1;
      ma[2] = a2; mb[2] = b2;
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_cl
    classic_mul #(.N(P)) u_cl (.a(ma[k]), .b(mb[k]), .p(mp[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= 2'd0; done <= 1'b0; p <= '0;
      a_q <= '0; b_q <= '0;
      d0 <= '0; d1 <= '0; d2 <= '0; d01 <= '0; d02 <= '0; d12 <= '0;
    end else begin
      done <= 1'b0;
      unique case (ph)
        2'd0: if (start) begin
          a_q <= a; b_q <= b;
          d0 <= mp[0]; d1 <= mp[1]; d2 <= mp[2];
          ph <= 2'd1;
        end
        2'd1: begin
          d01 <= mp[0]; d02 <= mp[1]; d12 <= mp[2];
          ph <= 2'd2;
        end
        2'd2: begin
          p <= ((6*P-1)'(d2) << (4*P))
             ^ ((6*P-1)'(d12 ^ d1 ^ d2) << (3*P))
             ^ ((6*P-1)'(d02 ^ d2 ^ d0 ^ d1) << (2*P))
             ^ ((6*P-1)'(d01 ^ d1 ^ d0) << P)
             ^ (6*P-1)'(d0);
          done <= 1'b1;
          ph <= 2'd0;
        end
        default: ph <= 2'd0;
      endcase
    end
  end
endmodule
