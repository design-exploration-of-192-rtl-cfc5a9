// tb_hybrid_mult: the 192-bit hybrid multiplier in the five compositions
// {1,6}, {6,1}, {1,1,3}, {1,3,1} and {3,1,1}, all fed the same operands.
// Each product is compared with the * operator, and each latency with the
// cycle count published for that composition (43, 78, 32, 46, 60 cycles).
// The {1,1,3} instance uses the module's default parameters.
module tb_hybrid_mult;
  import ecc_pkg::*;

  localparam int NCFG = 5;
  localparam int EXP_CYC [NCFG] = '{32, 43, 78, 46, 60};

  logic clk = 0, rst_n = 1, start = 0;
  logic [191:0] a = '0, b = '0;
  logic [NCFG-1:0] done;
  logic [383:0] p [NCFG];
  int checks = 0, failures = 0;

  hybrid_mult                                          dut     (.clk, .rst_n, .start, .a, .b, .done(done[0]), .p(p[0]));
  hybrid_mult #(.GAMMA(64'h06_01),    .NLEV(2)) u_g16  (.clk, .rst_n, .start, .a, .b, .done(done[1]), .p(p[1]));
  hybrid_mult #(.GAMMA(64'h01_06),    .NLEV(2)) u_g61  (.clk, .rst_n, .start, .a, .b, .done(done[2]), .p(p[2]));
  hybrid_mult #(.GAMMA(64'h01_03_01), .NLEV(3)) u_g131 (.clk, .rst_n, .start, .a, .b, .done(done[3]), .p(p[3]));
  hybrid_mult #(.GAMMA(64'h01_01_03), .NLEV(3)) u_g311 (.clk, .rst_n, .start, .a, .b, .done(done[4]), .p(p[4]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [191:0] x, input logic [191:0] y);
    int cyc;
    int got [NCFG];
    logic [383:0] exp_p;
    exp_p = 384'(x) * 384'(y);
    for (int c = 0; c < NCFG; c++) got[c] = -1;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0; a = '0; b = '0; cyc = 1;
    while (cyc < 120) begin
      for (int c = 0; c < NCFG; c++) if (done[c]) got[c] = cyc;
      @(negedge clk); cyc++;
    end
    for (int c = 0; c < NCFG; c++) begin
      checks += 2;
      if (got[c] != EXP_CYC[c]) begin
        failures++; $display("config %0d: latency %0d, expected %0d", c, got[c], EXP_CYC[c]);
      end
      if (p[c] !== exp_p) begin
        failures++; $display("config %0d: %h*%h = %h, expected %h", c, x, y, p[c], exp_p);
      end
    end
  endtask

  initial begin
    // the package's cycle model must agree with the published counts too
    checks += 5;
    if (hm_latency(64'h03_01_01, 3, 0) != 32) failures++;
    if (hm_latency(64'h06_01,    2, 0) != 43) failures++;
    if (hm_latency(64'h01_06,    2, 0) != 78) failures++;
    if (hm_latency(64'h01_03_01, 3, 0) != 46) failures++;
    if (hm_latency(64'h01_01_03, 3, 0) != 60) failures++;
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, '0);
    run('1, '1);
    run('1, 192'd1);
    run({64'd0, {128{1'b1}}}, {{128{1'b1}}, 64'd0});
    for (int i = 0; i < 60; i++)
      run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
          {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
