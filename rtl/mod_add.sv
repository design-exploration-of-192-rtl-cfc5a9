// mod_add: modular adder/subtractor over GF(p), one cycle.
//
// r = (a + b) mod p when sub = 0, r = (a - b) mod p when sub = 1, for
// a, b < p. The sum (or difference) and its corrected value (minus p, or plus
// p after a borrow) are both formed, and the carry/borrow picks one. These
// are the "modular addition" units of the point adder; units 1, 3, 5, 6 and 7
// of the data-flow graph subtract, units 2 and 4 add. Letting one unit do
// both, with a sub input, is this design's choice.
//
// Timing: start in cycle c gives done and r in cycle c+1 (one cycle per
// addition, as in the multiplier cycle model). r is held until the next start.
// Reset (asynchronous, active low) clears done and r.
module mod_add
  import ecc_pkg::*;
#(
  parameter int unsigned W = FW,
  parameter logic [W-1:0] P = W'(P192)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         sub,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         done,
  output logic [W-1:0] r
);

  logic [W:0] sum, sum_red;   // a + b, a + b - p
  logic [W:0] dif;            // a - b
  logic [W-1:0] dif_cor;      // a - b + p (used after a borrow; fits W bits)
  logic [W-1:0] res;

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b};
    sum_red = sum - {1'b0, P};
    dif     = {1'b0, a} - {1'b0, b};
    dif_cor = dif[W-1:0] + P;
    if (sub) res = dif[W] ? dif_cor : dif[W-1:0];   // borrow: add p back
    else     res = sum_red[W] ? sum[W-1:0] : sum_red[W-1:0]; // sum < p: keep it
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      r    <= '0;
    end else begin
      done <= start;
      if (start) r <= res;
    end
  end

endmodule
