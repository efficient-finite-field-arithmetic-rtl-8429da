// ring_mul: polynomial ring multiplication in GF(2^M)[u], c = a * b, for the
// HECC coprocessor. a has NA coefficients, b has NB, c has NA+NB-1.
// Horner scheme over the coefficients of a, from the top one down:
//   c <- c * u + a_j * b,
// where the scalar product a_j * b uses NB bit-serial field multipliers
// (gf_mul_serial) working in parallel and "* u" is a coefficient shift.
// Timing: start is sampled with a, b; one cycle later the first field
// multiplication starts. Each of the NA steps is one field multiplication
// (114 cycles); the accumulate happens in the cycle its done is seen, and
// the next multiplication starts in that same cycle. done pulses
// NA*114 + 3 cycles after start (345 for NA = 3; the document reports 347)
// with c held until the next start.
// NB = 6 matches the six field multipliers the document counts for ring
// multiplication; NA = 3 (a reduced-divisor polynomial of degree <= 2) is
// this design's choice. Algorithm as in the document.
module ring_mul
  import gf_pkg::*;
#(
  parameter int unsigned NA = 3,
  parameter int unsigned NB = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a [NA],
  input  logic [M-1:0] b [NB],
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c [NA+NB-1]
);
  localparam int unsigned NCW = NA + NB - 1;
  typedef enum logic [1:0] {S_IDLE, S_KICK, S_WAIT, S_DONE} state_t;
  state_t st;
  logic [M-1:0] a_q [NA];
  logic [M-1:0] b_q [NB];
  logic [M-1:0] sp [NB];
  logic [NB-1:0] fm_done;
  logic [$clog2(NA+1)-1:0] j;
  logic fm_start;
  logic [$clog2(NA+1)-1:0] jn;
  logic [M-1:0] c_next [NCW];
  // coefficient of a fed to the field multipliers: a_j for the first step,
  // a_(j-1) when a step completes and the next one is started
  assign jn = (st == S_WAIT) ? j - 1'b1 : j;

  for (genvar k = 0; k < int'(NB); k++) begin : g_fm
    gf_mul_serial u_fm (.clk, .rst_n, .start(fm_start), .a(a_q[jn]), .b(b_q[k]),
                        .busy(), .done(fm_done[k]), .p(sp[k]));
  end

  // c*u + a_j*b
  always_comb begin
    for (int k = 0; k < int'(NCW); k++)
      c_next[k] = ((k >= 1) ? c[k-1] : '0) ^ ((k < int'(NB)) ? sp[k] : '0);
  end

  assign fm_start = (st == S_KICK) || (st == S_WAIT && (&fm_done) && j != 0);
  assign busy = (st != S_IDLE);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; j <= '0; done <= 1'b0;
      for (int k = 0; k < int'(NA); k++) a_q[k] <= '0;
      for (int k = 0; k < int'(NB); k++) b_q[k] <= '0;
      for (int k = 0; k < int'(NCW); k++) c[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          a_q <= a; b_q <= b;
          for (int k = 0; k < int'(NCW); k++) c[k] <= '0;
          j  <= ($clog2(NA+1))'(NA-1);
          st <= S_KICK;
        end
        S_KICK: st <= S_WAIT;
        S_WAIT: if (&fm_done) begin
          c <= c_next;
          if (j == 0) st <= S_DONE;
          else j <= j - 1'b1;
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
