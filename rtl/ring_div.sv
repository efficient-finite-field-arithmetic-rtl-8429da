// ring_div: polynomial ring division with remainder in GF(2^M)[u] for the
// HECC coprocessor: a = q*b + r with deg(r) < deg(b).
// a has NA coefficients, b has NB; the degrees are taken from the highest
// non-zero coefficient. The leading coefficient of b is inverted once
// (gf_inv); then for j = deg(a)-deg(b) down to 0 one field multiplier forms
// f = r[deg(b)+j] * lead(b)^-1, which becomes q[j], and NB field
// multipliers in parallel form f*b, which is added to r at offset j.
// All field multipliers are the bit-serial gf_mul_serial, so with NB = 4
// the unit holds 1 + 4 = 5 field multipliers and one inverter.
// Timing: start is sampled with a, b. If deg(a) < deg(b) the unit finishes
// at once (q = 0, r = a, done 2 cycles after start); if b = 0 it finishes
// with err = 1. Otherwise it takes one inversion plus 2 field
// multiplications (about 230 cycles) per quotient coefficient. q (NA
// coefficients) and r (NB-1) are held until the next start.
// Algorithm as in the document; NA = 6, NB = 4 and the schedule are this
// design's choices.
module ring_div
  import gf_pkg::*;
#(
  parameter int unsigned NA = 6,
  parameter int unsigned NB = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a [NA],
  input  logic [M-1:0] b [NB],
  output logic         busy,
  output logic         done,
  output logic         err,
  output logic [M-1:0] q [NA],
  output logic [M-1:0] r [NB-1]
);
  localparam int unsigned DW = $clog2(NA + 1) + 1;
  typedef enum logic [2:0] {S_IDLE, S_INV, S_LEAD, S_MULB, S_NEXT, S_DONE} state_t;
  state_t st;
  logic [M-1:0] rr [NA];
  logic [M-1:0] bq [NB];
  logic [M-1:0] ilead, fco;
  logic signed [DW-1:0] da_in, db_in;
  logic [DW-1:0] db, j;
  logic inv_start, inv_done, inv_err;
  logic [M-1:0] inv_p, lead_p;
  logic lead_start, lead_done, mb_start;
  logic [NB-1:0] mb_done;
  logic [M-1:0] mb_p [NB];

  always_comb begin
    da_in = -1;
    db_in = -1;
    for (int k = 0; k < int'(NA); k++) if (a[k] != '0) da_in = DW'(k);
    for (int k = 0; k < int'(NB); k++) if (b[k] != '0) db_in = DW'(k);
  end

  assign inv_start  = (st == S_IDLE) && start && (db_in >= 0) && (da_in >= db_in);
  assign lead_start = (st == S_NEXT);
  assign mb_start   = (st == S_LEAD) && lead_done;

  gf_inv u_inv (.clk, .rst_n, .start(inv_start), .a(b[db_in[DW-2:0]]),
                .busy(), .done(inv_done), .err(inv_err), .inv(inv_p));
  gf_mul_serial u_lead (.clk, .rst_n, .start(lead_start), .a(rr[db + j]), .b(ilead),
                        .busy(), .done(lead_done), .p(lead_p));
  for (genvar k = 0; k < int'(NB); k++) begin : g_mb
    gf_mul_serial u_mb (.clk, .rst_n, .start(mb_start), .a(bq[k]), .b(lead_p),
                        .busy(), .done(mb_done[k]), .p(mb_p[k]));
  end

  for (genvar k = 0; k < int'(NB) - 1; k++) begin : g_r
    assign r[k] = rr[k];
  end
  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0; err <= 1'b0; ilead <= '0; fco <= '0;
      db <= '0; j <= '0;
      for (int k = 0; k < int'(NA); k++) begin rr[k] <= '0; q[k] <= '0; end
      for (int k = 0; k < int'(NB); k++) bq[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          rr <= a; bq <= b;
          for (int k = 0; k < int'(NA); k++) q[k] <= '0;
          err <= (db_in < 0);
          db  <= db_in[DW-1:0];
          j   <= DW'(da_in - db_in);
          st  <= inv_start ? S_INV : S_DONE;
        end
        S_INV: if (inv_done) begin
          ilead <= inv_p;
          st <= S_NEXT;
        end
        S_NEXT: st <= S_LEAD;
        S_LEAD: if (lead_done) begin
          fco <= lead_p;
          st  <= S_MULB;
        end
        S_MULB: if (&mb_done) begin
          for (int k = 0; k < int'(NB); k++)
            if (k + int'(j) < int'(NA)) rr[k + int'(j)] <= rr[k + int'(j)] ^ mb_p[k];
          q[j] <= fco;
          if (j == 0) st <= S_DONE;
          else begin j <= j - 1'b1; st <= S_NEXT; end
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
