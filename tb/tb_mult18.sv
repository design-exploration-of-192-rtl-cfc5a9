// tb_mult18: random and corner 18x18 products against the * operator; checks
// the one-cycle latency and that the product is held after done.
module tb_mult18;
  localparam int unsigned W = 18;
  logic clk = 0, rst_n = 1, start = 0, done;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  mult18 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    logic [2*W-1:0] exp_p;
    exp_p = (2*W)'(x) * (2*W)'(y);
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 10) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 1) begin failures++; $display("latency %0d, expected 1", cyc); end
    if (p !== exp_p) begin failures++; $display("%h*%h = %h, expected %h", x, y, p, exp_p); end
    a = ~x; b = ~y;                          // inputs change, product must hold
    @(negedge clk);
    checks++;
    if (p !== exp_p || done) begin failures++; $display("product not held"); end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, '0);
    run('1, '1);
    run('1, 18'd1);
    for (int i = 0; i < 300; i++) run(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
