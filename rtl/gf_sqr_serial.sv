// gf_sqr_serial: GF(2^M) squarer of the HECC coprocessor.
// Squaring spreads the bits: a_i moves to x^(2i). The low half
// (i <= (M-1)/2) lands below x^M directly; for each higher bit a running
// constant g = x^(2i) mod f is added when a_i = 1, and g is advanced by
// x^2 (two shift-and-conditionally-add-f steps) for the next bit.
// g starts as x^(M+1) mod f, which is the low part of f shifted left once.
// Timing: start is sampled with a; one cycle per high bit ((M-1)/2 = 56
// cycles) plus load and done, so done pulses 58 cycles after start with the
// square held on b. Algorithm as in the document; the schedule is this
// design's choice.
module gf_sqr_serial
  import gf_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] b
);
  localparam int unsigned LO = (M - 1) / 2;        // last bit not needing reduction
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t st;
  logic [M-1:0] a_q, g, acc;
  logic [$clog2(M)-1:0] i;
  logic [M-1:0] spread;
  logic [M:0]   g1, g2;

  always_comb begin
    spread = '0;
    for (int k = 0; k <= int'(LO); k++) spread[2*k] = a[k];
    g1 = {g, 1'b0};
    if (g1[M]) g1 = g1 ^ F_POLY;
    g2 = {g1[M-1:0], 1'b0};
    if (g2[M]) g2 = g2 ^ F_POLY;
  end

  assign busy = (st != S_IDLE);
  assign b = acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; a_q <= '0; g <= '0; acc <= '0; i <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          a_q <= a;
          acc <= spread;
          g   <= {F_POLY[M-2:0], 1'b0};             // x^(M+1) mod f
          i   <= ($clog2(M))'(LO + 1);
          st  <= S_RUN;
        end
        S_RUN: begin
          if (a_q[i]) acc <= acc ^ g;
          g <= g2[M-1:0];
          if (i == ($clog2(M))'(M-1)) st <= S_DONE;
          i <= i + 1'b1;
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
