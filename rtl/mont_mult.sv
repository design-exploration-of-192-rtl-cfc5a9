// mont_mult: 192-bit Montgomery modular multiplier, r = a * b * R^-1 mod p,
// R = 2^W.
//
// One Montgomery multiplication costs three W x W multi-precision products,
// all done one after the other on a single hybrid multiplier:
//   T = a * b                     (2W bits)
//   m = (T mod R) * NPRIME mod R  (low half only, NPRIME = -p^-1 mod R)
//   u = (T + m * p) / R           (exact division: the low half is zero)
//   r = u - p if u >= p, else u   (a, b < p gives u < 2p)
// This is why each of the fourteen modular multiplications of a point
// addition amounts to three multiplications on the hybrid multiplier. The
// document names the technique only; the step order, sharing one multiplier
// for the three products, and the final conditional subtraction are this
// design's choices.
//
// Timing: start in cycle c (accepted while idle). Each product takes one
// issue cycle plus the multiplier latency Lm; then one cycle for T + m*p, one
// for the conditional subtraction and one done cycle:
//   latency = 3 * (Lm + 1) + 3 = ecc_pkg::mm_latency(GAMMA, NLEV)
// which is 102 cycles with the default {1,1,3} multiplier (Lm = 32). r is
// held until the next start. Reset is asynchronous, active low.
module mont_mult
  import ecc_pkg::*;
#(
  parameter int unsigned  W      = FW,
  parameter logic [W-1:0] P      = W'(P192),
  parameter logic [W-1:0] NPR    = W'(NPRIME),
  parameter gamma_t       GAMMA  = GAMMA_113,
  parameter int unsigned  NLEV   = NLEV_113
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         done,
  output logic [W-1:0] r
);

  typedef enum logic [3:0] {
    S_IDLE, S_M1, S_W1, S_M2, S_W2, S_M3, S_W3, S_ADD, S_SUB, S_DONE
  } state_t;

  state_t         state;
  logic [W-1:0]   a_q, b_q, m_q;
  logic [2*W-1:0] t_q, mp_q;
  logic [W:0]     u_q, u_red;

  // shared hybrid multiplier
  logic           mul_start, mul_done;
  logic [W-1:0]   mul_a, mul_b;
  logic [2*W-1:0] mul_p;

  hybrid_mult #(.W(W), .GAMMA(GAMMA), .NLEV(NLEV)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b), .done(mul_done), .p(mul_p)
  );

  assign mul_start = (state == S_M1) || (state == S_M2) || (state == S_M3);

  always_comb begin
    unique case (state)
      S_M2, S_W2: begin mul_a = t_q[W-1:0]; mul_b = NPR; end
      S_M3, S_W3: begin mul_a = m_q;        mul_b = P;   end
      default:    begin mul_a = a_q;        mul_b = b_q; end
    endcase
  end

  logic [2*W:0] sum_tm;
  assign sum_tm = {1'b0, t_q} + {1'b0, mp_q};
  assign u_red  = u_q - {1'b0, P};

  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q <= '0; b_q <= '0; m_q <= '0; t_q <= '0; mp_q <= '0; u_q <= '0;
      r <= '0;
    end else begin
      // start is only legal while idle; T + m*p is an exact multiple of R
      if (start) a_start_idle: assert (state == S_IDLE)
        else $error("mont_mult: start while busy");
      if (state == S_ADD) a_exact: assert (sum_tm[W-1:0] == '0)
        else $error("mont_mult: low half of T + m*p is not zero");
      unique case (state)
        S_IDLE: if (start) begin
                  a_q   <= a;
                  b_q   <= b;
                  state <= S_M1;
                end
        S_M1:   state <= S_W1;
        S_W1:   if (mul_done) begin t_q <= mul_p;          state <= S_M2; end
        S_M2:   state <= S_W2;
        S_W2:   if (mul_done) begin m_q <= mul_p[W-1:0];   state <= S_M3; end
        S_M3:   state <= S_W3;
        S_W3:   if (mul_done) begin mp_q <= mul_p;         state <= S_ADD; end
        S_ADD:  begin u_q <= sum_tm[2*W:W];                state <= S_SUB; end
        S_SUB:  begin
                  r     <= u_red[W] ? u_q[W-1:0] : u_red[W-1:0];
                  state <= S_DONE;
                end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
