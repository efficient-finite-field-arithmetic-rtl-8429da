// fft_mul: pipelined radix-4 NTT multiplier for GF(2^M) operands, M = 113.
// Setup: each operand is zero-padded to 224 bits and cut into 16 chunks of
// 14 bits; every chunk, widened to 15 bits, becomes one residue mod
// Q = 16417 (chunk i = bits 14i+13..14i). Two forward 16-point NTTs, the
// point-wise multiplier and the inverse NTT follow. Finalization reorders
// the inverse output (base-4 digit reversal), drops the top (15th) bit of
// every coefficient, concatenates the 16 14-bit fields into a 224-bit value
// and reduces it modulo f(x) with the modular reducer.
// Arithmetic note: the transform chain computes the length-16 cyclic
// convolution mod Q of the chunk vectors exactly. The finalization then
// treats that integer convolution as the GF(2) product, which is exact only
// for special operands (for example b = 1); in general carries between
// 14-bit chunks, wrap-around of the 16-point cyclic convolution and the
// integer (not carry-less) chunk products make dout differ from a*b in
// GF(2^113). The datapath is built as the document describes it.
// Timing: fully pipelined, one operand pair per cycle; the result for the
// pair presented with en appears on dout with done high 5 cycles later.
module fft_mul
  import gf_pkg::*;
  import ntt_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] op1,
  input  logic [M-1:0] op2,
  output logic         done,
  output logic [M-1:0] dout
);
  localparam int unsigned CW = W_C - 1;           // 14 payload bits per coefficient
  localparam int unsigned WB = NPT * CW;          // 224
  logic [WB-1:0] a_pad, b_pad;
  res_t sa [NPT];
  res_t sb [NPT];
  res_t fa [NPT];
  res_t fb [NPT];
  res_t pw [NPT];
  res_t iv [NPT];
  logic va, vb, vp, vi;
  logic [WB-1:0] recon;

  // setup modules (wiring and zero padding)
  assign a_pad = WB'(op1);
  assign b_pad = WB'(op2);
  for (genvar i = 0; i < int'(NPT); i++) begin : g_setup
    assign sa[i] = {1'b0, a_pad[CW*i +: CW]};
    assign sb[i] = {1'b0, b_pad[CW*i +: CW]};
  end

  ntt_fft       u_fft_a (.clk, .rst_n, .vin(en), .din(sa), .vout(va), .dout(fa));
  ntt_fft       u_fft_b (.clk, .rst_n, .vin(en), .din(sb), .vout(vb), .dout(fb));
  ntt_pointwise u_pw    (.clk, .rst_n, .vin(va & vb), .a(fa), .b(fb), .vout(vp), .c(pw));
  ntt_ifft      u_ifft  (.clk, .rst_n, .vin(vp), .din(pw), .vout(vi), .dout(iv));

  // finalization: rearrange, drop the padding bit, rebuild, reduce
  for (genvar k = 0; k < int'(NPT); k++) begin : g_final
    localparam int unsigned SRC = 4*(k%4) + k/4;
    assign recon[CW*k +: CW] = iv[SRC][CW-1:0];
  end
  gf_reducer #(.M(M), .W_IN(WB), .F(F_POLY)) u_red (.din(recon), .dout(dout));
  assign done = vi;
endmodule
