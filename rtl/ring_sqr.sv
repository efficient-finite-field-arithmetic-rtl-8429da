// ring_sqr: polynomial ring squaring in GF(2^M)[u] for the HECC coprocessor.
// In characteristic two (sum a_i u^i)^2 = sum a_i^2 u^(2i): every odd
// coefficient of the result is zero and every even one is the field square
// of one input coefficient. NA field squarers (gf_sqr_serial) run in
// parallel. Timing: start is sampled with a; done pulses 58 cycles later
// (one field squaring) with the 2*NA-1 coefficients held on b.
module ring_sqr
  import gf_pkg::*;
#(
  parameter int unsigned NA = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a [NA],
  output logic         busy,
  output logic         done,
  output logic [M-1:0] b [2*NA-1]
);
  logic [NA-1:0] sq_done, sq_busy;
  logic [M-1:0]  sq [NA];
  for (genvar k = 0; k < int'(NA); k++) begin : g_sq
    gf_sqr_serial u_sq (.clk, .rst_n, .start(start && !busy), .a(a[k]),
                        .busy(sq_busy[k]), .done(sq_done[k]), .b(sq[k]));
    assign b[2*k] = sq[k];
    if (k < int'(NA) - 1) begin : g_odd
      assign b[2*k+1] = '0;
    end
  end
  assign busy = |sq_busy;
  assign done = &sq_done;
endmodule
