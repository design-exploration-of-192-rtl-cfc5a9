// tb_mont_mult: 192-bit Montgomery multiplication a*b*2^-192 mod p against
// the reference, at the default {1,1,3} multiplier. Checks the latency of
// 3*(32+1)+3 = 102 cycles and that the final conditional subtraction is
// exercised both ways (u >= p and u < p).
module tb_mont_mult;
  import ecc_ref_pkg::*;

  localparam int EXP_CYC = 3 * (32 + 1) + 3;

  logic clk = 0, rst_n = 1, start = 0, done;
  fe_t a = '0, b = '0, r;
  int checks = 0, failures = 0, n_sub = 0, n_nosub = 0;

  mont_mult dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // u = (T + m p) / R before the final subtraction, computed independently
  function automatic logic [192:0] pre_sub(fe_t x, fe_t y);
    logic [383:0] t  = 384'(x) * 384'(y);
    logic [191:0] np = 192'h00000000_00000000_ffffffff_ffffffff_00000000_00000001;
    logic [383:0] m  = 384'(t[191:0]) * 384'(np);
    logic [384:0] s  = 385'(t) + 385'(384'(m[191:0]) * 384'(P));
    return s[384:192];
  endfunction

  task automatic run(input fe_t x, input fe_t y);
    int cyc;
    fe_t e = mont(x, y);
    if (pre_sub(x, y) >= 193'(P)) n_sub++; else n_nosub++;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0; a = '0; b = '0; cyc = 1;
    while (!done && cyc < 300) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != EXP_CYC) begin failures++; $display("latency %0d, expected %0d", cyc, EXP_CYC); end
    if (r !== e) begin failures++; $display("mont(%h, %h) = %h, expected %h", x, y, r, e); end
  endtask

  initial begin
    fe_t x;
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, '0);
    run(P - 1, P - 1);
    run(192'd1, 192'd1);
    run(to_mont(192'd7), to_mont(192'd9));
    // search for operands that need the final subtraction
    for (int i = 0; i < 2000 && n_sub == 0; i++) begin
      x = rnd_fe();
      if (pre_sub(x, P - 1) >= 193'(P)) run(x, P - 1);
    end
    for (int i = 0; i < 60; i++) run(rnd_fe(), rnd_fe());
    checks += 2;
    if (n_sub == 0)   begin failures++; $display("final subtraction never taken"); end
    if (n_nosub == 0) begin failures++; $display("final subtraction always taken"); end
    // the result converts back to the plain product
    checks++;
    x = from_mont(mont(to_mont(192'd7), to_mont(192'd9)));
    if (x != 192'd63) begin failures++; $display("reference round trip %h", x); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
