// ring_egcd: extended Euclidean algorithm in GF(2^M)[u] for the HECC
// coprocessor: returns (d, s, t) with d = gcd(g, h) = s*g + t*h.
// The trivial inputs are answered at once, as the algorithm prescribes:
// g = 0 -> (h, 0, 1), h = 0 -> (g, 1, 0), g = 1 -> (1, 1, 0),
// h = 1 -> (1, 0, 1). Otherwise, with s1 = 0, s2 = 1, t1 = 1, t2 = 0, it
// repeats while h != 0:
//   (q, r) = g div h;  s = q*s1 + s2;  t = q*t1 + t2;
//   g <- h, h <- r, s2 <- s1, s1 <- s, t2 <- t1, t1 <- t
// and returns (g, s2, t2). d is not made monic (that is the job of a
// separate normalization step).
// Hardware: one ring_div for quo/rem and two ring_mul units that form q*s1
// and q*t1 in parallel; the additions are XORs. All polynomials have NC
// coefficients (degree < NC). Cofactor products are cut back to NC
// coefficients; their upper part is zero because deg(s) < deg(h_in) and
// deg(t) < deg(g_in) throughout.
// Timing: start is sampled with g, h. Trivial inputs finish with done 2
// cycles after start. Otherwise each loop iteration takes one division
// (2 cycles if deg g < deg h, else an inversion plus two field
// multiplications per quotient coefficient) plus one ring multiplication
// (NC*114 + 3 cycles) plus 2 control cycles. busy is high from the cycle
// after start until done; d, s, t are held until the next start.
// The algorithm follows the document; NC = 3 (genus-2 operands of degree
// <= 2), the reuse of ring_div/ring_mul and the schedule are this design's
// choices.
module ring_egcd
  import gf_pkg::*;
#(
  parameter int unsigned NC = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] g [NC],
  input  logic [M-1:0] h [NC],
  output logic         busy,
  output logic         done,
  output logic [M-1:0] d [NC],
  output logic [M-1:0] s [NC],
  output logic [M-1:0] t [NC]
);
  typedef enum logic [2:0] {S_IDLE, S_LOOP, S_DIV, S_MULK, S_MUL, S_DONE} state_t;
  state_t st;
  logic [M-1:0] gq [NC];
  logic [M-1:0] hq [NC];
  logic [M-1:0] s1 [NC];
  logic [M-1:0] s2 [NC];
  logic [M-1:0] t1 [NC];
  logic [M-1:0] t2 [NC];
  logic [M-1:0] qq [NC];
  logic [M-1:0] rq [NC];
  logic [M-1:0] div_q [NC];
  logic [M-1:0] div_r [NC-1];
  logic [M-1:0] ms [2*NC-1];
  logic [M-1:0] mt [2*NC-1];
  logic div_start, div_done, div_busy, div_err;
  logic mul_start, ms_done, mt_done, ms_busy, mt_busy;
  logic ms_seen, mt_seen;
  logic g_zero, h_zero, g_one, h_one, hq_zero;

  // polynomial tests on the inputs and on the running h
  always_comb begin
    g_zero = 1'b1; h_zero = 1'b1; hq_zero = 1'b1;
    for (int k = 0; k < int'(NC); k++) begin
      if (g[k] != '0)  g_zero  = 1'b0;
      if (h[k] != '0)  h_zero  = 1'b0;
      if (hq[k] != '0) hq_zero = 1'b0;
    end
    g_one = (g[0] == M'(1));
    h_one = (h[0] == M'(1));
    for (int k = 1; k < int'(NC); k++) begin
      if (g[k] != '0) g_one = 1'b0;
      if (h[k] != '0) h_one = 1'b0;
    end
  end

  assign div_start = (st == S_LOOP) && !hq_zero;
  assign mul_start = (st == S_MULK);
  assign busy      = (st != S_IDLE);

  ring_div #(.NA(NC), .NB(NC)) u_div (.clk, .rst_n, .start(div_start), .a(gq), .b(hq),
                                      .busy(div_busy), .done(div_done), .err(div_err),
                                      .q(div_q), .r(div_r));
  ring_mul #(.NA(NC), .NB(NC)) u_ms (.clk, .rst_n, .start(mul_start), .a(qq), .b(s1),
                                     .busy(ms_busy), .done(ms_done), .c(ms));
  ring_mul #(.NA(NC), .NB(NC)) u_mt (.clk, .rst_n, .start(mul_start), .a(qq), .b(t1),
                                     .busy(mt_busy), .done(mt_done), .c(mt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0; ms_seen <= 1'b0; mt_seen <= 1'b0;
      for (int k = 0; k < int'(NC); k++) begin
        gq[k] <= '0; hq[k] <= '0; s1[k] <= '0; s2[k] <= '0; t1[k] <= '0; t2[k] <= '0;
        qq[k] <= '0; rq[k] <= '0; d[k] <= '0; s[k] <= '0; t[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          for (int k = 0; k < int'(NC); k++) begin
            s[k] <= '0; t[k] <= '0;
          end
          if (g_zero) begin
            d <= h; t[0] <= M'(1); st <= S_DONE;
          end else if (h_zero) begin
            d <= g; s[0] <= M'(1); st <= S_DONE;
          end else if (g_one) begin
            for (int k = 0; k < int'(NC); k++) d[k] <= '0;
            d[0] <= M'(1); s[0] <= M'(1); st <= S_DONE;
          end else if (h_one) begin
            for (int k = 0; k < int'(NC); k++) d[k] <= '0;
            d[0] <= M'(1); t[0] <= M'(1); st <= S_DONE;
          end else begin
            gq <= g; hq <= h;
            for (int k = 0; k < int'(NC); k++) begin
              s1[k] <= '0; s2[k] <= '0; t1[k] <= '0; t2[k] <= '0;
            end
            s2[0] <= M'(1); t1[0] <= M'(1);
            st <= S_LOOP;
          end
        end
        S_LOOP: if (hq_zero) begin
          d <= gq; s <= s2; t <= t2; st <= S_DONE;
        end else st <= S_DIV;
        S_DIV: if (div_done) begin
          qq <= div_q;
          for (int k = 0; k < int'(NC) - 1; k++) rq[k] <= div_r[k];
          rq[NC-1] <= '0;
          st <= S_MULK;
        end
        S_MULK: begin ms_seen <= 1'b0; mt_seen <= 1'b0; st <= S_MUL; end
        S_MUL: begin
          if (ms_done) ms_seen <= 1'b1;
          if (mt_done) mt_seen <= 1'b1;
          if ((ms_done || ms_seen) && (mt_done || mt_seen)) begin
            for (int k = 0; k < int'(NC); k++) begin
              s1[k] <= ms[k] ^ s2[k];
              t1[k] <= mt[k] ^ t2[k];
            end
            s2 <= s1; t2 <= t1;
            gq <= hq; hq <= rq;
            st <= S_LOOP;
          end
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
