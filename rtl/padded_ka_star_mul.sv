// padded_ka_star_mul: PaddedKA*, the one-iteration form of PaddedKA.
// Three KA64 units (ka_rec, N = 64) form A0B0, A1B1 and (A0+A1)(B0+B1) of
// the 128-bit zero-padded operands in parallel; the overlap circuit and the
// modular reducer complete the GF(2^M) product in the same cycle.
// Timing: the product of the a, b presented with start is registered on p at
// that clock edge and done pulses for one cycle: one multiplication per
// clock, latency 1. Follows the document; registering only the output is
// this design's choice.
module padded_ka_star_mul
  import gf_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         done,
  output logic [M-1:0] p
);
  localparam int unsigned H  = 64;
  localparam int unsigned WH = 2*H-1;
  localparam int unsigned WP = 4*H-1;
  logic [2*H-1:0] ap, bp;
  logic [WH-1:0]  d0, d1, d01;
  logic [WP-1:0]  full;
  logic [M-1:0]   red;
  assign ap = (2*H)'(a);
  assign bp = (2*H)'(b);
  ka_rec #(.N(H)) u_ka_lo  (.a(ap[H-1:0]),   .b(bp[H-1:0]),   .p(d0));
  ka_rec #(.N(H)) u_ka_hi  (.a(ap[2*H-1:H]), .b(bp[2*H-1:H]), .p(d1));
  ka_rec #(.N(H)) u_ka_mid (.a(ap[H-1:0] ^ ap[2*H-1:H]), .b(bp[H-1:0] ^ bp[2*H-1:H]), .p(d01));
  assign full = (WP'(d1) << (2*H)) ^ (WP'(d01 ^ d0 ^ d1) << H) ^ WP'(d0);
  gf_reducer #(.M(M), .W_IN(WP), .F(F_POLY)) u_red (.din(full), .dout(red));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0; done <= 1'b0;
    end else begin
      done <= start;
      if (start) p <= red;
    end
  end
endmodule
