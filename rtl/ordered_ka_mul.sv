// ordered_ka_mul: OrderedKA, a hybrid Karatsuba/classical GF(2^M) multiplier
// with the coefficient order {120, 60, 20}.
// The M = 113 bit operands are zero-padded to 2*H = 120 bits and split in two
// 60-bit halves; a two-way Karatsuba step needs the three products A0B0,
// A1B1 and (A0+A1)(B0+B1), which three KA60 units (ka60_seq, each a three-way
// Karatsuba over three Classic-20 multipliers used twice) form in parallel.
// The overlap circuit merges the three 119-bit products into the 239-bit
// product and the modular reducer folds it to M bits.
// Timing: start is sampled with a, b; done pulses 6 cycles later with the
// reduced product on p (held until the next result). A start while busy is
// ignored. The architecture and the 6-cycle count follow the document; the
// cycle boundaries are this design's choice.
module ordered_ka_mul
  import gf_pkg::*;
#(
  parameter int unsigned P = 20          // classic multiplier size
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] p
);
  localparam int unsigned H  = 3*P;      // 60-bit half
  localparam int unsigned WH = 2*H-1;    // 119-bit half product
  localparam int unsigned WP = 4*H-1;    // 239-bit full product
  logic [2*H-1:0] a_q, b_q;
  logic           go, ov_v, red_v;
  logic [2:0]     ka_done;
  logic [WH-1:0]  d0, d1, d01;
  logic [WP-1:0]  full_q;
  logic [M-1:0]   red;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; go <= 1'b0; busy <= 1'b0;
    end else begin
      go <= 1'b0;
      if (start && !busy) begin
        a_q  <= (2*H)'(a);
        b_q  <= (2*H)'(b);
        go   <= 1'b1;
        busy <= 1'b1;
      end else if (done) begin
        busy <= 1'b0;
      end
    end
  end

  ka60_seq #(.P(P)) u_ka0 (.clk, .rst_n, .start(go), .a(a_q[H-1:0]), .b(b_q[H-1:0]),
                           .done(ka_done[0]), .p(d0));
  ka60_seq #(.P(P)) u_ka1 (.clk, .rst_n, .start(go), .a(a_q[2*H-1:H]), .b(b_q[2*H-1:H]),
                           .done(ka_done[1]), .p(d1));
  ka60_seq #(.P(P)) u_ka2 (.clk, .rst_n, .start(go),
                           .a(a_q[H-1:0] ^ a_q[2*H-1:H]), .b(b_q[H-1:0] ^ b_q[2*H-1:H]),
                           .done(ka_done[2]), .p(d01));

  gf_reducer #(.M(M), .W_IN(WP), .F(F_POLY)) u_red (.din(full_q), .dout(red));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '0; ov_v <= 1'b0; red_v <= 1'b0; p <= '0;
    end else begin
      ov_v <= &ka_done;
      if (&ka_done)   // overlap circuit
        full_q <= (WP'(d1) << (2*H)) ^ (WP'(d01 ^ d0 ^ d1) << H) ^ WP'(d0);
      red_v <= ov_v;
      if (ov_v) p <= red;
    end
  end
  assign done = red_v;
endmodule
