// bcast_node: one broadcast-multiplier level of a hybrid multiplier.
//
// A and B (W bits) are cut into K blocks of P = ceil(W/K) bits. In iteration
// i the block B_i is broadcast to K sub-multipliers, which form A_j*B_i for
// all j at once; their sum is A*B_i. The products of the K iterations are
// accumulated block-shift-add style:
//   A*B = sum_i (A*B_i) * 2^(i*P).
// The accumulator is split into hi (still changing) and lo (finished bits):
// each iteration adds A*B_i to hi, then moves hi's lowest P bits into lo.
// The K sub-multipliers sit outside (in hybrid_mult); this node holds the
// operand registers, the accumulator and the control.
//
// Schedule of one iteration (one state per cycle):
//   ISSUE start the K sub-multipliers with B_i  (control 1)
//   WAIT  until sub_done                         (sub-multiplier latency Ls)
//   CAP   take the K sub-products                (control 2)
//   ADD1  A*B_i = sum_j A_j*B_i*2^(jP)           (addition 1)
//   ADD2  hi/lo accumulation and block shift     (addition 2)
//   LOOP  next block of B; in the last iteration this is the done cycle
//                                                (loop overhead)
// Latency = K*(Ls + 2 + 2) + K, the broadcast case of the analytical cycle
// model. How the steps are laid out is this design's choice; the counts are
// the model's. p is held until the next start; start is only accepted in IDLE.
// When W is not a multiple of K the accumulator (2*K*P bits) is wider than
// the product, and its top 2*(K*P - W) bits, always zero, are left unread.
// In the {1,1,3} multiplier the broadcast node has W = 50, K = 3, P = 17, so
// 2 of its 102 accumulator bits are unused and lint reports them as such.
module bcast_node #(
  parameter int unsigned W = 48,
  parameter int unsigned K = 3,
  localparam int unsigned P = (W + K - 1) / K
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [W-1:0]           a,
  input  logic [W-1:0]           b,
  output logic                   done,
  output logic [2*W-1:0]         p,
  // the K sub-multipliers
  output logic                   sub_start,
  output logic [K-1:0][P-1:0]    sub_a,      // A_j, one per sub-multiplier
  output logic [P-1:0]           sub_b,      // B_i, broadcast to all
  input  logic                   sub_done,
  input  logic [K-1:0][2*P-1:0]  sub_p
);

  localparam int unsigned KP = K * P;
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_ISSUE, S_WAIT, S_CAP, S_ADD1, S_ADD2, S_LOOP
  } state_t;

  state_t state;
  logic [IW-1:0]             it;
  logic [KP-1:0]             a_q, b_q;
  logic [K-1:0][2*P-1:0]     q;
  logic [KP+P-1:0]           row_q;     // A*B_i
  logic [KP+P-1:0]           row_sum;
  logic [KP+P:0]             acc_t;
  logic [KP-1:0]             hi, lo;
  logic [2*KP-1:0]           full;

  assign sub_start = (state == S_ISSUE);
  assign sub_a     = a_q;
  assign sub_b     = b_q[P-1:0];
  assign done      = (state == S_LOOP) && (it == IW'(K - 1));
  assign full      = {hi, lo};
  assign p         = full[2*W-1:0];

  always_comb begin
    row_sum = '0;
    for (int j = 0; j < K; j++)
      row_sum = row_sum + ((KP+P)'(q[j]) << (j * P));
  end

  assign acc_t = {{(P+1){1'b0}}, hi} + {1'b0, row_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      it <= '0; a_q <= '0; b_q <= '0; q <= '0; row_q <= '0; hi <= '0; lo <= '0;
    end else begin
      // start is only legal while the node is idle; the accumulator never
      // overflows (A*B_i plus the running high part fits in KP+P bits)
      if (start) a_start_idle: assert (state == S_IDLE)
        else $error("bcast_node: start while busy");
      if (state == S_ADD2) a_no_ovf: assert (!acc_t[KP+P])
        else $error("bcast_node: accumulator overflow");
      unique case (state)
        S_IDLE:  if (start) begin
                   a_q   <= KP'(a);
                   b_q   <= KP'(b);
                   hi    <= '0;
                   lo    <= '0;
                   it    <= '0;
                   state <= S_ISSUE;
                 end
        S_ISSUE: state <= S_WAIT;
        S_WAIT:  if (sub_done) state <= S_CAP;
        S_CAP:   begin q <= sub_p; state <= S_ADD1; end
        S_ADD1:  begin row_q <= row_sum; state <= S_ADD2; end
        S_ADD2:  begin
                   lo    <= {acc_t[P-1:0], lo[KP-1:P]};
                   hi    <= acc_t[KP+P-1:P];
                   state <= S_LOOP;
                 end
        S_LOOP:  if (it == IW'(K - 1)) begin
                   state <= S_IDLE;
                 end else begin
                   it    <= it + 1'b1;
                   b_q   <= b_q >> P;
                   state <= S_ISSUE;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
