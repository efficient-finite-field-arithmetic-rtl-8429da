// ntt_ifft: 16-point inverse NTT, two pipeline stages: inverse commutator +
// twiddle-inv (which includes the 1/16 factor), then the second inverse
// commutator. There is no rearrange stage: the output stays in base-4
// digit-reversed order, dout[4q+k] = x(4k+q), and the finalization stage
// reorders it. Latency 2 cycles, one transform per cycle.
module ntt_ifft
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
  ntt_commutator #(.INV(1'b1)) u_icomm1 (.din(din), .dout(c1));
  ntt_twiddle    #(.INV(1'b1)) u_twinv  (.din(c1),  .dout(t1));
  ntt_commutator #(.INV(1'b1)) u_icomm2 (.din(s1),  .dout(c2));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; vout <= 1'b0;
      for (int k = 0; k < int'(NPT); k++) begin s1[k] <= '0; dout[k] <= '0; end
    end else begin
      v1   <= vin;
      vout <= v1;
      if (vin) s1 <= t1;
      if (v1)  dout <= c2;
    end
  end
endmodule
