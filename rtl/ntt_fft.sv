// ntt_fft: 16-point forward NTT ("FFT module"), two pipeline stages.
// Stage 1 registers commutator + twiddle, stage 2 registers the second
// commutator followed by the rearrange wiring that undoes the base-4 digit
// reversal (output k gets position 4*(k%4) + k/4). dout[k] = sum_n din[n]
// W^(nk) mod Q in natural order. Latency 2 cycles, one transform per cycle;
// vin/vout mark valid data. Stage contents follow the document (two
// commutators, one twiddle, one rearrange); the register placement is this
// design's choice.
module ntt_fft
  import ntt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic vin,
  input  res_t din  [NPT],
  output logic vout,
  output res_t dout [NPT]
);
  res_t c1 [NPT];
  res_t t1 [NPT];
  res_t s1 [NPT];
  res_t c2 [NPT];
  logic v1;
  ntt_commutator #(.INV(1'b0)) u_comm1 (.din(din), .dout(c1));
  ntt_twiddle    #(.INV(1'b0)) u_tw    (.din(c1),  .dout(t1));
  ntt_commutator #(.INV(1'b0)) u_comm2 (.din(s1),  .dout(c2));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; vout <= 1'b0;
      for (int k = 0; k < int'(NPT); k++) begin s1[k] <= '0; dout[k] <= '0; end
    end else begin
      v1   <= vin;
      vout <= v1;
      if (vin) s1 <= t1;
      if (v1)  for (int k = 0; k < int'(NPT); k++) dout[k] <= c2[4*(k%4) + k/4];
    end
  end
endmodule
