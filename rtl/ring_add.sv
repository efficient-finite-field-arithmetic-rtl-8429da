// ring_add: polynomial ring addition in GF(2^M)[u] for the HECC
// coprocessor: coefficient-wise field addition (bitwise XOR) of two
// polynomials with NC coefficients each, registered.
// Timing: the sum of the a, b presented with start is on c with done high
// one cycle later (1 cycle, as in the document's results).
module ring_add
  import gf_pkg::*;
#(
  parameter int unsigned NC = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a [NC],
  input  logic [M-1:0] b [NC],
  output logic         done,
  output logic [M-1:0] c [NC]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int k = 0; k < int'(NC); k++) c[k] <= '0;
    end else begin
      done <= start;
      if (start) for (int k = 0; k < int'(NC); k++) c[k] <= a[k] ^ b[k];
    end
  end
endmodule
