// ntt_pointwise: point-wise multiplier between the forward and inverse
// transforms, c[k] = a[k] * b[k] mod Q for the 16 points, registered.
// Latency 1 cycle, one vector per cycle.
module ntt_pointwise
  import ntt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic vin,
  input  res_t a [NPT],
  input  res_t b [NPT],
  output logic vout,
  output res_t c [NPT]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vout <= 1'b0;
      for (int k = 0; k < int'(NPT); k++) c[k] <= '0;
    end else begin
      vout <= vin;
      if (vin) for (int k = 0; k < int'(NPT); k++) c[k] <= mul_mod(a[k], b[k]);
    end
  end
endmodule
