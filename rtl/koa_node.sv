// koa_node: one Karatsuba-Ofman (KOA) level of a hybrid multiplier.
//
// A W-bit product A*B is formed from three half-size products:
//   a0 = AH*BH,  a1 = (AH+AL)*(BH+BL),  a2 = AL*BL,
//   A*B = a0*2^(2H) + (a1 - a0 - a2)*2^H + a2,     H = ceil(W/2).
// The three sub-multipliers sit outside this module (hybrid_mult builds the
// next level of the tree from them); this node holds the operand registers, the pre-additions, the
// recombination and the control. a0 and a2 take H-bit operands, a1 takes the
// (H+1)-bit sums, so a1's sub-multiplier is one bit wider.
//
// Schedule (one state per cycle), after the start cycle c:
//   PRE   AH+AL and BH+BL                 (addition 1)
//   ISSUE start the three sub-multipliers (control 1)
//   WAIT  until sub_done                  (sub-multiplier latency Ls)
//   CAP   take the three sub-products     (control 2)
//   D1    a1 - a0                         (addition 2)
//   D2    ... - a2                        (addition 3)
//   D3    a0*2^2H + a2 + mid*2^H          (addition 4)
//   DONE  done pulse, p valid             (control 3)
// Latency = Ls + 4 + 3 cycles, the KOA case of the analytical cycle model with
// one cycle per addition and three control cycles. How the four additions and
// three control cycles are laid out is this design's choice; the counts are
// the model's. p is held until the next start; start is only accepted in IDLE.
module koa_node #(
  parameter int unsigned W = 192,
  localparam int unsigned H = (W + 1) / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic             done,
  output logic [2*W-1:0]   p,
  // the three sub-multipliers
  output logic             sub_start,
  output logic [H-1:0]     sub_a0, sub_b0,   // AH, BH
  output logic [H:0]       sub_a1, sub_b1,   // AH+AL, BH+BL
  output logic [H-1:0]     sub_a2, sub_b2,   // AL, BL
  input  logic             sub_done,
  input  logic [2*H-1:0]   sub_p0,
  input  logic [2*H+1:0]   sub_p1,
  input  logic [2*H-1:0]   sub_p2
);

  typedef enum logic [3:0] {
    S_IDLE, S_PRE, S_ISSUE, S_WAIT, S_CAP, S_D1, S_D2, S_D3, S_DONE
  } state_t;

  state_t state;
  logic [2*H-1:0] a_q, b_q;          // operands, zero-extended to 2H bits
  logic [H:0]     sa_q, sb_q;        // pre-added halves
  logic [2*H-1:0] q0, q2;
  logic [2*H+1:0] q1, mid;
  logic [2*W-1:0] full;

  assign sub_start = (state == S_ISSUE);
  assign sub_a0 = a_q[2*H-1:H];
  assign sub_b0 = b_q[2*H-1:H];
  assign sub_a2 = a_q[H-1:0];
  assign sub_b2 = b_q[H-1:0];
  assign sub_a1 = sa_q;
  assign sub_b1 = sb_q;
  assign done   = (state == S_DONE);
  assign p      = full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q <= '0; b_q <= '0; sa_q <= '0; sb_q <= '0;
      q0 <= '0; q1 <= '0; q2 <= '0; mid <= '0; full <= '0;
    end else begin
      // start is only legal while the node is idle
      if (start) a_start_idle: assert (state == S_IDLE)
        else $error("koa_node: start while busy");
      unique case (state)
        S_IDLE:  if (start) begin
                   a_q   <= (2*H)'(a);
                   b_q   <= (2*H)'(b);
                   state <= S_PRE;
                 end
        S_PRE:   begin
                   sa_q  <= {1'b0, a_q[2*H-1:H]} + {1'b0, a_q[H-1:0]};
                   sb_q  <= {1'b0, b_q[2*H-1:H]} + {1'b0, b_q[H-1:0]};
                   state <= S_ISSUE;
                 end
        S_ISSUE: state <= S_WAIT;
        S_WAIT:  if (sub_done) state <= S_CAP;
        S_CAP:   begin
                   q0 <= sub_p0; q1 <= sub_p1; q2 <= sub_p2;
                   state <= S_D1;
                 end
        S_D1:    begin mid <= q1 - {2'b00, q0}; state <= S_D2; end
        S_D2:    begin mid <= mid - {2'b00, q2}; state <= S_D3; end
        S_D3:    begin
                   full  <= (2*W)'({q0, q2} + ((4*H)'(mid) << H));
                   state <= S_DONE;
                 end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
