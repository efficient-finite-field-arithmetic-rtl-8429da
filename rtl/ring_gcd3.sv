// ring_gcd3: gcd of three polynomials in GF(2^M)[u] with cofactors, the
// first step of genus-2 divisor addition (Cantor's algorithm):
//   d = gcd(a1, a2, b) = s1*a1 + s2*a2 + s3*b,
// where, in divisor addition, a1 and a2 are the first polynomials of the
// two divisors and b = b1 + b2 + h. It runs two extended Euclidean
// algorithms on one ring_egcd unit:
//   1. (d1, e1, e2) = EGCD(a1, a2)      d1 = e1*a1 + e2*a2
//   2. (d,  c1, c2) = EGCD(d1, b)       d  = c1*d1 + c2*b
// and then forms s1 = c1*e1 and s2 = c1*e2 with two ring_mul units in
// parallel; s3 = c2. Products are cut back to NC coefficients, which holds
// them exactly for genus-2 operands (deg a <= 2, deg b <= 1 give
// deg c1 <= 1 and deg e1, e2 <= 1).
// Timing: start is sampled with a1, a2, b; done pulses after the two EGCD
// runs, one ring multiplication (NC*114 + 3 cycles) and a few control
// cycles; d, s1, s2, s3 are held until the next start.
// The three-step procedure follows the document; the document's further
// specialized datapath for this step is not reproduced, and NC = 3 and the
// reuse of one EGCD unit are this design's choices.
module ring_gcd3
  import gf_pkg::*;
#(
  parameter int unsigned NC = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a1 [NC],
  input  logic [M-1:0] a2 [NC],
  input  logic [M-1:0] b  [NC],
  output logic         busy,
  output logic         done,
  output logic [M-1:0] d  [NC],
  output logic [M-1:0] s1 [NC],
  output logic [M-1:0] s2 [NC],
  output logic [M-1:0] s3 [NC]
);
  typedef enum logic [2:0] {S_IDLE, S_E1, S_E2K, S_E2, S_MULK, S_MUL, S_DONE} state_t;
  state_t st;
  logic [M-1:0] a1_q [NC];
  logic [M-1:0] a2_q [NC];
  logic [M-1:0] b_q  [NC];
  logic [M-1:0] d1 [NC];
  logic [M-1:0] e1 [NC];
  logic [M-1:0] e2 [NC];
  logic [M-1:0] c1 [NC];
  logic [M-1:0] eg_g [NC];
  logic [M-1:0] eg_h [NC];
  logic [M-1:0] eg_d [NC];
  logic [M-1:0] eg_s [NC];
  logic [M-1:0] eg_t [NC];
  logic [M-1:0] m1 [2*NC-1];
  logic [M-1:0] m2 [2*NC-1];
  logic eg_start, eg_busy, eg_done, mul_start, m1_busy, m1_done, m2_busy, m2_done;
  logic second;   // EGCD inputs: 0 -> (a1, a2), 1 -> (d1, b)

  assign eg_start  = (st == S_IDLE && start) || (st == S_E2K);
  assign mul_start = (st == S_MULK);
  assign busy      = (st != S_IDLE);
  assign second    = (st == S_E2K) || (st == S_E2);

  always_comb begin
    for (int k = 0; k < int'(NC); k++) begin
      // in the start cycle the inputs go straight to the EGCD unit
      eg_g[k] = second ? d1[k]  : ((st == S_IDLE) ? a1[k] : a1_q[k]);
      eg_h[k] = second ? b_q[k] : ((st == S_IDLE) ? a2[k] : a2_q[k]);
    end
  end

  ring_egcd #(.NC(NC)) u_egcd (.clk, .rst_n, .start(eg_start), .g(eg_g), .h(eg_h),
                               .busy(eg_busy), .done(eg_done), .d(eg_d), .s(eg_s), .t(eg_t));
  ring_mul #(.NA(NC), .NB(NC)) u_m1 (.clk, .rst_n, .start(mul_start), .a(c1), .b(e1),
                                     .busy(m1_busy), .done(m1_done), .c(m1));
  ring_mul #(.NA(NC), .NB(NC)) u_m2 (.clk, .rst_n, .start(mul_start), .a(c1), .b(e2),
                                     .busy(m2_busy), .done(m2_done), .c(m2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0;
      for (int k = 0; k < int'(NC); k++) begin
        a1_q[k] <= '0; a2_q[k] <= '0; b_q[k] <= '0;
        d1[k] <= '0; e1[k] <= '0; e2[k] <= '0; c1[k] <= '0;
        d[k] <= '0; s1[k] <= '0; s2[k] <= '0; s3[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          a1_q <= a1; a2_q <= a2; b_q <= b;
          st <= S_E1;
        end
        S_E1: if (eg_done) begin
          d1 <= eg_d; e1 <= eg_s; e2 <= eg_t;
          st <= S_E2K;
        end
        S_E2K: st <= S_E2;
        S_E2: if (eg_done) begin
          d  <= eg_d; c1 <= eg_s; s3 <= eg_t;
          st <= S_MULK;
        end
        S_MULK: st <= S_MUL;
        S_MUL: if (m1_done && m2_done) begin
          for (int k = 0; k < int'(NC); k++) begin
            s1[k] <= m1[k];
            s2[k] <= m2[k];
          end
          st <= S_DONE;
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
