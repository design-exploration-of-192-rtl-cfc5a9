// tb_mod_add: modular addition and subtraction mod p against the reference
// (% operator on wider integers), with the wrap-around cases forced: sums at
// and above p, differences below zero. Checks the one-cycle latency.
module tb_mod_add;
  import ecc_ref_pkg::*;

  logic clk = 0, rst_n = 1, start = 0, sub = 0, done;
  fe_t a = '0, b = '0, r;
  int checks = 0, failures = 0, n_wrap = 0, n_borrow = 0;

  mod_add dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic s, input fe_t x, input fe_t y);
    int cyc;
    fe_t e = s ? modsub(x, y) : modadd(x, y);
    if (!s && 193'(x) + 193'(y) >= 193'(P)) n_wrap++;
    if (s && x < y) n_borrow++;
    @(negedge clk); a = x; b = y; sub = s; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 10) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 1) begin failures++; $display("latency %0d", cyc); end
    if (r !== e) begin failures++; $display("sub=%0d %h, %h -> %h, expected %h", s, x, y, r, e); end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, '0, '0);
    run(0, P - 1, 192'd1);          // sum exactly p -> 0
    run(0, P - 1, P - 1);
    run(1, '0, 192'd1);             // -1 -> p-1
    run(1, 192'd5, 192'd5);
    run(1, '0, P - 1);
    for (int i = 0; i < 400; i++) run(i[0], rnd_fe(), rnd_fe());
    checks += 2;
    if (n_wrap == 0)   begin failures++; $display("no reduced sum"); end
    if (n_borrow == 0) begin failures++; $display("no borrowed difference"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
