// tb_koa_node: one Karatsuba-Ofman level (W = 21, odd, so the halves differ)
// with three behavioural sub-multipliers of latency LS written here. Checks
// the product against the * operator and the latency LS + 4 + 3.
module tb_koa_node;
  localparam int unsigned W  = 21;
  localparam int unsigned H  = (W + 1) / 2;
  localparam int unsigned LS = 3;

  logic clk = 0, rst_n = 1, start = 0, done;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] p;
  logic sub_start, sub_done;
  logic [H-1:0] sub_a0, sub_b0, sub_a2, sub_b2;
  logic [H:0] sub_a1, sub_b1;
  logic [2*H-1:0] sub_p0, sub_p2;
  logic [2*H+1:0] sub_p1;
  int checks = 0, failures = 0, sub_calls = 0;

  koa_node #(.W(W)) dut (.*);

  // behavioural sub-multipliers: product after LS cycles
  logic [LS-1:0] sd = '0;
  always_ff @(posedge clk) begin
    sd <= {sd[LS-2:0], sub_start};
    if (sub_start) begin
      sub_calls++;
      sub_p0 <= (2*H)'(sub_a0) * (2*H)'(sub_b0);
      sub_p1 <= (2*H+2)'(sub_a1) * (2*H+2)'(sub_b1);
      sub_p2 <= (2*H)'(sub_a2) * (2*H)'(sub_b2);
    end
  end
  assign sub_done = sd[LS-1];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    logic [2*W-1:0] exp_p;
    exp_p = (2*W)'(x) * (2*W)'(y);
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0; a = '0; b = '0; cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != int'(LS + 7)) begin failures++; $display("latency %0d, expected %0d", cyc, LS + 7); end
    if (p !== exp_p) begin failures++; $display("%h*%h = %h, expected %h", x, y, p, exp_p); end
  endtask

  initial begin
    sub_p0 = '0; sub_p1 = '0; sub_p2 = '0;
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, '0);
    run('1, '1);
    run('1, 21'd1);
    run(21'h100000, 21'h0003ff);
    for (int i = 0; i < 300; i++) run(W'($urandom), W'($urandom));
    checks++;
    if (sub_calls != 304) begin failures++; $display("sub-multiplier calls %0d", sub_calls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
