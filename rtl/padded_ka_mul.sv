// padded_ka_mul: PaddedKA, a GF(2^M) multiplier that pads the operands to
// 128 = 2^7 bits and applies two-way Karatsuba at every level
// ({128, 64, 32, 16, 8, 4, 2}).
// The top level needs three 64-bit products; one combinational KA64
// (ka_rec, N = 64) is time-shared and forms A0B0, A1B1 and (A0+A1)(B0+B1)
// in three successive cycles. The overlap circuit and the modular reducer
// then produce the reduced M-bit result.
// Timing: start is sampled with a, b; done pulses 5 cycles later with the
// product on p (held). A start while busy is ignored. Architecture and the
// 5-cycle count follow the document; the schedule is this design's choice.
module padded_ka_mul
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
  localparam int unsigned H  = 64;
  localparam int unsigned WH = 2*H-1;
  localparam int unsigned WP = 4*H-1;
  typedef enum logic [2:0] {S_IDLE, S_D0, S_D1, S_D01, S_FIN} state_t;
  state_t st;
  logic [2*H-1:0] a_q, b_q;
  logic [H-1:0]   ka_a, ka_b;
  logic [WH-1:0]  ka_p, d0, d1;
  logic [WP-1:0]  full;
  logic [M-1:0]   red;

  always_comb begin
    unique case (st)
      S_D0:    begin ka_a = a_q[H-1:0];   ka_b = b_q[H-1:0];   end
      S_D1:    begin ka_a = a_q[2*H-1:H]; ka_b = b_q[2*H-1:H]; end
      default: begin ka_a = a_q[H-1:0] ^ a_q[2*H-1:H]; ka_b = b_q[H-1:0] ^ b_q[2*H-1:H]; end
    endcase
  end

  ka_rec #(.N(H), .LEAF(1)) u_ka64 (.a(ka_a), .b(ka_b), .p(ka_p));

  // overlap circuit, fed by the third KA64 pass directly
  assign full = (WP'(d1) << (2*H)) ^ (WP'(ka_p ^ d0 ^ d1) << H) ^ WP'(d0);
  gf_reducer #(.M(M), .W_IN(WP), .F(F_POLY)) u_red (.din(full), .dout(red));

  assign busy = (st != S_IDLE);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; a_q <= '0; b_q <= '0; d0 <= '0; d1 <= '0; p <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE:  if (start) begin a_q <= (2*H)'(a); b_q <= (2*H)'(b); st <= S_D0; end
        S_D0:    begin d0 <= ka_p; st <= S_D1;  end
        S_D1:    begin d1 <= ka_p; st <= S_D01; end
        S_D01:   begin p <= red; st <= S_FIN; end
        S_FIN:   begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
