// tb_bcast_node: one broadcast level (W = 50, K = 3, so the last block is
// partly padding) with K behavioural sub-multipliers of latency LS written
// here. Checks the product against the * operator, the latency
// K*(LS + 4) + K and that B's blocks are broadcast one per iteration.
module tb_bcast_node;
  localparam int unsigned W  = 50;
  localparam int unsigned K  = 3;
  localparam int unsigned P  = (W + K - 1) / K;
  localparam int unsigned LS = 2;

  logic clk = 0, rst_n = 1, start = 0, done;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] p;
  logic sub_start, sub_done;
  logic [K-1:0][P-1:0] sub_a;
  logic [P-1:0] sub_b;
  logic [K-1:0][2*P-1:0] sub_p;
  int checks = 0, failures = 0, iterations = 0;

  bcast_node #(.W(W), .K(K)) dut (.*);

  logic [LS-1:0] sd = '0;
  always_ff @(posedge clk) begin
    sd <= {sd[LS-2:0], sub_start};
    if (sub_start) begin
      iterations++;
      for (int j = 0; j < K; j++) sub_p[j] <= (2*P)'(sub_a[j]) * (2*P)'(sub_b);
    end
  end
  assign sub_done = sd[LS-1];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc, it0;
    logic [2*W-1:0] exp_p;
    exp_p = (2*W)'(x) * (2*W)'(y);
    it0 = iterations;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0; a = '0; b = '0; cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    checks += 3;
    if (cyc != int'(K * (LS + 4) + K)) begin
      failures++; $display("latency %0d, expected %0d", cyc, K * (LS + 4) + K);
    end
    if (p !== exp_p) begin failures++; $display("%h*%h = %h, expected %h", x, y, p, exp_p); end
    if (iterations - it0 != int'(K)) begin failures++; $display("iterations %0d", iterations - it0); end
  endtask

  initial begin
    sub_p = '0;
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, '0);
    run('1, '1);
    run('1, 50'd1);
    run(50'd1, '1);
    for (int i = 0; i < 300; i++) run({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
