// gf_mul_serial: bit-serial ("digit serial") GF(2^M) multiplier of the HECC
// coprocessor, reducing as it goes so the accumulator never grows.
// The bits of b are scanned from b[M-1] down to b[1]; each cycle
//   c <- (c + b_i * a) * x, and if the shifted-out carry x^M is set, c <- c + f,
// and a last cycle adds b[0] * a. The accumulator is M+1 bits wide so the
// carry is visible before it is cancelled by f.
// Timing: start is sampled with a, b; M-1 shift cycles and one final cycle
// follow, and done pulses 114 cycles (M+1) after start with c held on p.
// A start while busy is ignored. Algorithm as in the document; the
// one-bit-per-cycle schedule is this design's choice.
module gf_mul_serial
  import gf_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] p
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_LAST} state_t;
  state_t st;
  logic [M-1:0] a_q, b_q, c;
  logic [$clog2(M)-1:0] i;
  logic [M:0] nxt;

  always_comb begin
    nxt = {(b_q[i] ? (c ^ a_q) : c), 1'b0};
    if (nxt[M]) nxt = nxt ^ F_POLY;
  end

  assign busy = (st != S_IDLE);
  assign p = c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; a_q <= '0; b_q <= '0; c <= '0; i <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          a_q <= a; b_q <= b; c <= '0; i <= ($clog2(M))'(M-1); st <= S_SHIFT;
        end
        S_SHIFT: begin
          c <= nxt[M-1:0];
          if (i == 1) st <= S_LAST;
          i <= i - 1'b1;
        end
        S_LAST: begin
          if (b_q[0]) c <= c ^ a_q;
          done <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
