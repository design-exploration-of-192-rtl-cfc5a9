// tb_ecc_point_adder: end-to-end test of the point adder at its default
// parameters ({1,1,3} hybrid multipliers in all fourteen Montgomery units).
//
// 1. Curve points: Q_k = k*G on P-192 is built here in affine coordinates
//    (Q_2 by doubling, then Q_{k+1} = Q_k + G), each with its own inverse.
//    The adder gets Q_k and G in randomly scaled projective Montgomery form
//    and must return a projective point whose affine image is Q_{k+1}.
// 2. Random coordinates (not on the curve): every output coordinate is
//    compared with the data-flow formulas evaluated with the reference
//    Montgomery product.
// Every addition must take 1 + 4*(102+1) + 5*(1+1) + 1 = 424 cycles (the
// critical path of four Montgomery multiplications and five one-cycle units).
// The test counts the mechanisms the design relies on and fails if one never
// happened: modular sums that wrap past p, differences that borrow, doublings
// that reduce, Montgomery results that need the final subtraction, KOA and
// broadcast levels and embedded-multiplier operations inside a Montgomery
// unit, and units of the graph starting in parallel.
module tb_ecc_point_adder;
  import ecc_ref_pkg::*;

  localparam int MM_CYC  = 3 * (32 + 1) + 3;
  localparam int EXP_CYC = 1 + 4 * (MM_CYC + 1) + 5 * (1 + 1) + 1;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  fe_t x1 = '0, y1 = '0, z1 = '0, x2 = '0, y2 = '0, z2 = '0;
  fe_t x3, y3, z3;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_borrow = 0, n_shl_red = 0, n_mm_sub = 0;
  int n_koa = 0, n_bcast = 0, n_leaf = 0, n_par = 0;

  ecc_point_adder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // activity inside the design: the multiplier of MM1 and the unit starts
  always @(posedge clk) begin
    n_koa   += $countones(dut.u_MM1.u_mul.g_lev[0].dn) + $countones(dut.u_MM1.u_mul.g_lev[1].dn);
    n_bcast += $countones(dut.u_MM1.u_mul.g_lev[2].dn);
    n_leaf  += $countones(dut.u_MM1.u_mul.g_lev[3].st);
    if ($countones(dut.go) > 1) n_par++;
  end

  // ---- reference of the data-flow graph, with event counting ---------------
  function automatic fe_t r_mm(fe_t a, fe_t b);
    logic [383:0] t  = 384'(a) * 384'(b);
    logic [191:0] np = 192'h00000000_00000000_ffffffff_ffffffff_00000000_00000001;
    logic [383:0] m  = 384'(t[191:0]) * 384'(np);
    logic [384:0] s  = 385'(t) + 385'(384'(m[191:0]) * 384'(P));
    if (s[384:192] >= 193'(P)) n_mm_sub++;
    return mont(a, b);
  endfunction

  function automatic fe_t r_add(fe_t a, fe_t b);
    if (193'(a) + 193'(b) >= 193'(P)) n_wrap++;
    return modadd(a, b);
  endfunction

  function automatic fe_t r_sub(fe_t a, fe_t b);
    if (a < b) n_borrow++;
    return modsub(a, b);
  endfunction

  function automatic fe_t r_shl(fe_t a);
    if (193'(a) * 2 >= 193'(P)) n_shl_red++;
    return modadd(a, a);
  endfunction

  task automatic graph_ref(input fe_t X1, Y1, Z1, X2, Y2, Z2, output fe_t X3, Y3, Z3);
    fe_t x1z2, y1z2, x2z1, y2z1, s, u, t, v, w, u2, v2, v3, wv2, u2s, xa, xa2, tv3, sv3, ya, uya;
    x1z2 = r_mm(X1, Z2);  y1z2 = r_mm(Y1, Z2);  x2z1 = r_mm(X2, Z1);
    y2z1 = r_mm(Y2, Z1);  s    = r_mm(Z1, Z2);
    u = r_sub(y2z1, y1z2);  t = r_add(y1z2, y2z1);
    v = r_sub(x2z1, x1z2);  w = r_add(x1z2, x2z1);
    u2 = r_mm(u, u);  v2 = r_mm(v, v);  v3 = r_mm(v2, v);  wv2 = r_mm(w, v2);
    u2s = r_mm(u2, s);
    xa = r_sub(u2s, wv2);  xa2 = r_shl(xa);
    tv3 = r_mm(t, v3);  sv3 = r_mm(s, v3);
    ya = r_sub(wv2, xa2);  uya = r_mm(u, ya);
    X3 = r_mm(xa2, v);  Y3 = r_sub(uya, tv3);  Z3 = r_shl(sv3);
  endtask

  task automatic add_points(input fe_t X1, Y1, Z1, X2, Y2, Z2);
    int cyc;
    @(negedge clk);
    x1 = X1; y1 = Y1; z1 = Z1; x2 = X2; y2 = Y2; z2 = Z2; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    x1 = '0; y1 = '0; z1 = '0; x2 = '0; y2 = '0; z2 = '0;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != EXP_CYC) begin failures++; $display("latency %0d, expected %0d", cyc, EXP_CYC); end
    if (busy) begin failures++; $display("busy after done"); end
  endtask

  initial begin
    fe_t qx, qy, nx, ny, za, zb, ex3, ey3, ez3, ax, ay, zi;
    fe_t rx1, ry1, rz1, rx2, ry2, rz2;
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. points of the curve --------------------------------------------
    checks++;
    if (!on_curve(GX, GY)) begin failures++; $display("reference: G not on curve"); end
    aff_dbl(GX, GY, qx, qy);
    for (int k = 2; k < 6; k++) begin
      aff_add(qx, qy, GX, GY, nx, ny);
      za = rnd_fe() | 192'd1;
      zb = rnd_fe() | 192'd1;
      add_points(to_mont(modmul(qx, za)), to_mont(modmul(qy, za)), to_mont(za),
                 to_mont(modmul(GX, zb)), to_mont(modmul(GY, zb)), to_mont(zb));
      // the reference graph must give the same coordinates
      graph_ref(to_mont(modmul(qx, za)), to_mont(modmul(qy, za)), to_mont(za),
                to_mont(modmul(GX, zb)), to_mont(modmul(GY, zb)), to_mont(zb), ex3, ey3, ez3);
      zi = modinv(from_mont(z3));
      ax = modmul(from_mont(x3), zi);
      ay = modmul(from_mont(y3), zi);
      checks += 5;
      if (z3 == '0)            begin failures++; $display("k=%0d: Z3 = 0", k); end
      if (ax != nx || ay != ny) begin failures++; $display("k=%0d: got (%h, %h), expected (%h, %h)", k, ax, ay, nx, ny); end
      if (!on_curve(ax, ay))   begin failures++; $display("k=%0d: result not on curve", k); end
      if (x3 != ex3 || y3 != ey3 || z3 != ez3) begin failures++; $display("k=%0d: differs from graph reference", k); end
      if (!on_curve(nx, ny))   begin failures++; $display("reference: (k+1)G not on curve"); end
      qx = nx; qy = ny;
    end

    // ---- 2. random coordinates ---------------------------------------------
    for (int i = 0; i < 6; i++) begin
      rx1 = rnd_fe(); ry1 = rnd_fe(); rz1 = rnd_fe();
      rx2 = rnd_fe(); ry2 = rnd_fe(); rz2 = rnd_fe();
      if (i == 0) begin ry1 = P - 1; rz1 = P - 1; end   // near-p operands
      add_points(rx1, ry1, rz1, rx2, ry2, rz2);
      graph_ref(rx1, ry1, rz1, rx2, ry2, rz2, ex3, ey3, ez3);
      checks += 3;
      if (x3 != ex3) begin failures++; $display("random %0d: X3 %h, expected %h", i, x3, ex3); end
      if (y3 != ey3) begin failures++; $display("random %0d: Y3 %h, expected %h", i, y3, ey3); end
      if (z3 != ez3) begin failures++; $display("random %0d: Z3 %h, expected %h", i, z3, ez3); end
    end

    // ---- mechanisms ----------------------------------------------------------
    $display("events: wrap=%0d borrow=%0d shl_red=%0d mm_sub=%0d koa=%0d bcast=%0d leaf=%0d parallel=%0d",
             n_wrap, n_borrow, n_shl_red, n_mm_sub, n_koa, n_bcast, n_leaf, n_par);
    checks += 8;
    if (n_wrap == 0)    begin failures++; $display("no modular sum wrapped"); end
    if (n_borrow == 0)  begin failures++; $display("no modular difference borrowed"); end
    if (n_shl_red == 0) begin failures++; $display("no doubling reduced"); end
    if (n_mm_sub == 0)  begin failures++; $display("no Montgomery final subtraction"); end
    if (n_koa == 0)     begin failures++; $display("no KOA level operation"); end
    if (n_bcast == 0)   begin failures++; $display("no broadcast level operation"); end
    if (n_leaf == 0)    begin failures++; $display("no embedded multiplier operation"); end
    if (n_par == 0)     begin failures++; $display("no parallel unit starts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
