// ecc_ref_pkg: reference arithmetic for the testbenches, written with plain
// wide integer operators (*, %, +) and no use of the design's datapath.
//   modmul(a, b)   = a*b mod p
//   mont(a, b)     = a*b*R^-1 mod p, R = 2^192 (what a Montgomery multiplier returns)
//   to_mont(x)     = x*R mod p,   from_mont(x) = x*R^-1 mod p
//   modinv(a)      = a^(p-2) mod p (Fermat)
//   aff_add / aff_dbl: affine point addition and doubling on P-192 (A = -3)
package ecc_ref_pkg;

  typedef logic [191:0] fe_t;

  localparam fe_t P    = 192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff;
  localparam fe_t RINV = 192'h00000000_00000000_ffffffff_ffffffff_00000000_00000000;
  localparam fe_t CB   = 192'h64210519_e59c80e7_0fa7e9ab_72243049_feb8deec_c146b9b1;
  localparam fe_t GX   = 192'h188da80e_b03090f6_7cbf20eb_43a18800_f4ff0afd_82ff1012;
  localparam fe_t GY   = 192'h07192b95_ffc8da78_631011ed_6b24cdd5_73f977a1_1e794811;

  function automatic fe_t modmul(fe_t a, fe_t b);
    logic [383:0] t = 384'(a) * 384'(b);
    return fe_t'(t % 384'(P));
  endfunction

  function automatic fe_t modadd(fe_t a, fe_t b);
    logic [192:0] t = 193'(a) + 193'(b);
    return fe_t'(t % 193'(P));
  endfunction

  function automatic fe_t modsub(fe_t a, fe_t b);
    logic [193:0] t = 194'(a) + 194'(P) - 194'(b % P);
    return fe_t'(t % 194'(P));
  endfunction

  function automatic fe_t mont(fe_t a, fe_t b);
    return modmul(modmul(a, b), RINV);
  endfunction

  function automatic fe_t to_mont(fe_t x);
    logic [383:0] t = {x, 192'd0};
    return fe_t'(t % 384'(P));
  endfunction

  function automatic fe_t from_mont(fe_t x);
    return modmul(x, RINV);
  endfunction

  function automatic fe_t modinv(fe_t a);
    fe_t e = P - 192'd2;
    fe_t r = 192'd1;
    fe_t s = a;
    for (int i = 0; i < 192; i++) begin
      if (e[i]) r = modmul(r, s);
      s = modmul(s, s);
    end
    return r;
  endfunction

  function automatic void aff_add(fe_t x1, fe_t y1, fe_t x2, fe_t y2, output fe_t x3, output fe_t y3);
    fe_t l = modmul(modsub(y2, y1), modinv(modsub(x2, x1)));
    x3 = modsub(modsub(modmul(l, l), x1), x2);
    y3 = modsub(modmul(l, modsub(x1, x3)), y1);
  endfunction

  function automatic void aff_dbl(fe_t x1, fe_t y1, output fe_t x3, output fe_t y3);
    fe_t num = modsub(modmul(192'd3, modmul(x1, x1)), 192'd3);
    fe_t l   = modmul(num, modinv(modadd(y1, y1)));
    x3 = modsub(modmul(l, l), modadd(x1, x1));
    y3 = modsub(modmul(l, modsub(x1, x3)), y1);
  endfunction

  function automatic bit on_curve(fe_t x, fe_t y);
    fe_t rhs = modadd(modsub(modmul(modmul(x, x), x), modmul(192'd3, x)), CB);
    return modmul(y, y) == rhs;
  endfunction

  function automatic fe_t rnd_fe();
    logic [223:0] t = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    return fe_t'(t % 224'(P));
  endfunction

endpackage
