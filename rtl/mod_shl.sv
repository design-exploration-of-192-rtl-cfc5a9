// mod_shl: modular shift left by one bit, r = 2a mod p, one cycle.
//
// The "<<" units of the point adder: they double XA and S*V^3. 2a is a wire
// shift; if it is not below p, p is subtracted once (a < p, so 2a < 2p).
//
// Timing: start in cycle c gives done and r in cycle c+1. r is held until the
// next start. Reset (asynchronous, active low) clears done and r. The
// one-cycle latency is this design's choice.
module mod_shl
  import ecc_pkg::*;
#(
  parameter int unsigned W = FW,
  parameter logic [W-1:0] P = W'(P192)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  output logic         done,
  output logic [W-1:0] r
);

  logic [W:0] dbl, dbl_red;

  assign dbl     = {a, 1'b0};
  assign dbl_red = dbl - {1'b0, P};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      r    <= '0;
    end else begin
      done <= start;
      if (start) r <= dbl_red[W] ? dbl[W-1:0] : dbl_red[W-1:0];
    end
  end

endmodule
