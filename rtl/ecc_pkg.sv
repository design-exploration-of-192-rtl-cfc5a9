// ecc_pkg: constants and elaboration-time helpers shared by the 192-bit
// elliptic curve point adder and its hybrid multipliers.
//
// Field: the 192-bit NIST prime p = 2^192 - 2^64 - 1 (P-192). The Montgomery
// radix is R = 2^192 and NPRIME = -p^-1 mod R. The choice of P-192 is this
// design's own; the text only says "192-bit" and names the NIST curves.
//
// Hybrid multiplier composition (Gamma): a list {m1, m2, ..., mN}; level i uses
// Karatsuba-Ofman when m_i = 1 and a broadcast multiplier with k = m_i units
// when m_i > 1; below the last level the embedded 18x18 multipliers are used.
// The list is packed into a 64-bit parameter, one byte per level, level 1 in
// the least significant byte: {1,1,3} is 64'h03_01_01.
//
// hm_latency() is the cycle model of the hybrid multiplier. It reproduces
// T(n) of the analytical model with T_add = 1, leaf = 1, KOA control = 3,
// broadcast per-iteration control = 2 and loop overhead = 1 per iteration,
// which are the constants that make the model match the cycle counts quoted
// for the five example compositions; the RTL is scheduled to meet it exactly.
//
// A block that imports the package uses only part of it, so linting a single
// block reports the constants it does not read (P192, NPRIME, GAMMA_113, ...)
// as unused parameters.
package ecc_pkg;

  localparam int unsigned FW = 192;                 // field width
  typedef logic [FW-1:0] fe_t;                      // field element

  localparam fe_t P192   = 192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff;
  localparam fe_t NPRIME = 192'h00000000_00000000_ffffffff_ffffffff_00000000_00000001;

  typedef logic [63:0] gamma_t;
  localparam gamma_t GAMMA_113 = 64'h03_01_01;      // {1,1,3}
  localparam int unsigned NLEV_113 = 3;

  // m_i of level 'lev' (0-based)
  function automatic int unsigned gamma_at(gamma_t g, int unsigned lev);
    return int'(g[8*lev +: 8]);
  endfunction

  function automatic int unsigned cdiv(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Number of sub-multipliers one node of level 'lev' uses.
  function automatic int unsigned hm_fan(gamma_t g, int unsigned lev);
    return (gamma_at(g, lev) == 1) ? 3 : gamma_at(g, lev);
  endfunction

  // Operand width of every node of level 'lev' of a w-bit multiplier: a KOA
  // level hands ceil(W/2)+1 bits down (room for the carry of AH+AL), a
  // broadcast level with k units ceil(W/k) bits.
  function automatic int unsigned hm_width(int unsigned w, gamma_t g, int unsigned lev);
    int unsigned x = w;
    for (int unsigned l = 0; l < lev; l++)
      x = (gamma_at(g, l) == 1) ? cdiv(x, 2) + 1 : cdiv(x, gamma_at(g, l));
    return x;
  endfunction

  // Number of nodes at level 'lev' (level 0 is the whole multiplier).
  function automatic int unsigned hm_count(gamma_t g, int unsigned lev);
    int unsigned n = 1;
    for (int unsigned l = 0; l < lev; l++) n = n * hm_fan(g, l);
    return n;
  endfunction

  // Cycles from the start pulse to the done pulse of a hybrid multiplier node
  // at level 'lev' of composition g with nlev levels above the leaves.
  function automatic int unsigned hm_latency(gamma_t g, int unsigned nlev, int unsigned lev);
    int unsigned m, sub;
    if (lev >= nlev) return 1;
    m   = gamma_at(g, lev);
    sub = hm_latency(g, nlev, lev + 1);
    if (m == 1) return sub + 4 + 3;                 // KOA: 4 additions, 3 control
    return m * (sub + 2 + 2) + m;                   // broadcast: k iterations + loop
  endfunction

  // Cycles of one Montgomery multiplication: three multiplier passes, each
  // with one issue cycle, then the reduction addition, the conditional
  // subtraction and the done cycle.
  function automatic int unsigned mm_latency(gamma_t g, int unsigned nlev);
    return 3 * (hm_latency(g, nlev, 0) + 1) + 3;
  endfunction

endpackage
