// tb_mod_shl: modular doubling 2a mod p against the reference, with values
// on both sides of p/2 so that the reduction is and is not needed.
module tb_mod_shl;
  import ecc_ref_pkg::*;

  logic clk = 0, rst_n = 1, start = 0, done;
  fe_t a = '0, r;
  int checks = 0, failures = 0, n_red = 0;

  mod_shl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fe_t x);
    int cyc;
    fe_t e = modadd(x, x);
    if (193'(x) * 2 >= 193'(P)) n_red++;
    @(negedge clk); a = x; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 10) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 1) begin failures++; $display("latency %0d", cyc); end
    if (r !== e) begin failures++; $display("2*%h -> %h, expected %h", x, r, e); end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0);
    run(P - 1);
    run(P >> 1);
    run((P >> 1) + 1);
    for (int i = 0; i < 400; i++) run(rnd_fe());
    checks++;
    if (n_red == 0) begin failures++; $display("no reduction exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
