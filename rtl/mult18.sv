// mult18: the lowest level of a hybrid multiplier, standing for one embedded
// 18x18 multiplier block of the FPGA with its output register.
//
// Every multiplication of 18 bits or less in a hybrid multiplier is done by
// such a block. The operands are unsigned, W bits wide (W <= 18); the product
// is registered, so a start pulse in cycle c gives done and the product in
// cycle c+1 (leaf latency 1, the value that makes the analytical cycle model
// match the published cycle counts). The product stays valid until the next
// start.
//
// Interface: start/a/b in, done (one-cycle pulse)/p out. Reset (asynchronous,
// active low) clears done and p; the reset style is this design's choice.
module mult18 #(
  parameter int unsigned W = 18
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           done,
  output logic [2*W-1:0] p
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      p    <= '0;
    end else begin
      done <= start;
      if (start) p <= a * b;
    end
  end

  if (W > 18) begin : g_width_check
    $error("mult18: operands wider than the 18-bit embedded multiplier");
  end

endmodule
