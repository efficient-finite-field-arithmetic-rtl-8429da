// gf_inv: GF(2^M) inverter of the HECC coprocessor, a binary extended
// Euclidean algorithm working with shifts and XORs only.
// State: u <- a, v <- f, b <- 1, c <- 0. Each cycle, with j = deg(u)-deg(v):
// if j < 0 swap u<->v and b<->c and negate j; then u <- u + v*x^j,
// b <- b + c*x^j. When deg(u) = 0 (u = 1), b = a^-1. The degrees come from
// two priority encoders; b and c stay below degree M.
// Timing: start is sampled with a (which must be non-zero); one iteration
// per cycle, roughly 2M on average; done pulses with the result held on inv.
// For a = 0 the unit stops with err = 1 and inv = 0. Algorithm as in the
// document; one iteration per cycle and the err flag are this design's
// choices.
module gf_inv
  import gf_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic         err,
  output logic [M-1:0] inv
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t st;
  logic [M:0]   u, v;
  logic [M-1:0] bb, cc;
  int           du, dv, j;
  logic [M:0]   us, vs;
  logic [M-1:0] bs, cs;

  function automatic int deg(logic [M:0] x);
    int d = -1;
    for (int k = 0; k <= int'(M); k++) if (x[k]) d = k;
    return d;
  endfunction

  always_comb begin
    du = deg(u);
    dv = deg(v);
    j  = du - dv;
    if (j < 0) begin us = v; vs = u; bs = cc; cs = bb; j = -j; end
    else       begin us = u; vs = v; bs = bb; cs = cc; end
  end

  assign busy = (st != S_IDLE);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; u <= '0; v <= '0; bb <= '0; cc <= '0; inv <= '0;
      done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          u <= {1'b0, a}; v <= F_POLY; bb <= M'(1); cc <= '0; err <= 1'b0;
          st <= S_RUN;
        end
        S_RUN: begin
          if (du <= 0) begin
            inv <= (du == 0) ? bb : '0;
            err <= (du < 0);
            st  <= S_DONE;
          end else begin
            u  <= us ^ (vs << j);
            v  <= vs;
            bb <= bs ^ (cs << j);
            cc <= cs;
          end
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
