// ecc_point_adder: 192-bit elliptic curve point adder in homogeneous
// projective coordinates over GF(p), p = 2^192 - 2^64 - 1.
//
// Adds P1 = (X1, Y1, Z1) and P2 = (X2, Y2, Z2) on Y^2 Z = X^3 + A X Z^2 + B Z^3
// (P1 != +-P2, neither at infinity) with fourteen Montgomery multipliers
// (MM1..MM14), seven modular adders (MAdd1..MAdd7) and two modular doublers,
// wired as this data-flow graph:
//   MM1  X1Z2 = X1*Z2    MM2 Y1Z2 = Y1*Z2    MM3 X2Z1 = X2*Z1
//   MM4  Y2Z1 = Y2*Z1    MM5 S    = Z1*Z2
//   MAdd1 U = Y2Z1 - Y1Z2          MAdd2 T = Y1Z2 + Y2Z1
//   MAdd3 V = X2Z1 - X1Z2          MAdd4 W = X1Z2 + X2Z1
//   MM6  U^2      MM7 V^2      MM8 V^3 = V^2*V     MM9 WV^2 = W*V^2
//   MM10 U^2 S    MM11 TV^3 = T*V^3    MM12 SV^3 = S*V^3
//   MAdd5 XA = U^2 S - WV^2        <<  2XA
//   MAdd6 YA = WV^2 - 2XA          MM14 UYA = U*YA
//   MM13 X3 = 2XA*V    MAdd7 Y3 = UYA - TV^3    <<  Z3 = 2 SV^3
// The result is (2vA, 2(u(v^2 X1Z2 - A) - v^3 Y1Z2), 2 v^3 Z1Z2) of the usual
// projective addition (u = U, v = V, A = XA), i.e. the same point scaled by 2.
// The curve coefficients A and B are not needed.
//
// All coordinates, in and out, are in Montgomery form (x*R mod p, R = 2^192),
// which the Montgomery multipliers preserve and the modular adders do not
// disturb; conversion into and out of that form is left to the user.
//
// Control: every unit is one instance, as in the data-flow graph. A unit
// starts as soon as all units it reads from have finished (a dataflow,
// as-soon-as-possible schedule); each unit holds its result until the next
// operation. The graph and unit mapping follow the document; the dataflow
// firing rule is this design's choice, since the document leaves mapping and
// scheduling to future work.
//
// Interface: pulse start with the six input coordinates while busy is low;
// busy rises in the next cycle, and done pulses (busy falls) when X3, Y3, Z3
// are valid. They stay valid until the next start. The critical path is
// MM - MAdd - MM - MM - MAdd - << - MAdd - MM - MAdd; with the default {1,1,3}
// multiplier (102 cycles per Montgomery multiplication) an addition takes 424
// cycles from start to done.
module ecc_point_adder
  import ecc_pkg::*;
#(
  parameter gamma_t      GAMMA = GAMMA_113,
  parameter int unsigned NLEV  = NLEV_113
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fe_t  x1, y1, z1,
  input  fe_t  x2, y2, z2,
  output logic busy,
  output logic done,
  output fe_t  x3, y3, z3
);

  // units of the data-flow graph
  typedef enum int unsigned {
    MM1, MM2, MM3, MM4, MM5, MM6, MM7, MM8, MM9, MM10, MM11, MM12, MM13, MM14,
    MA1, MA2, MA3, MA4, MA5, MA6, MA7, SH1, SH2, NU
  } unit_t;

  typedef logic [NU-1:0] umask_t;

  function automatic umask_t bit_of(unit_t u);
    return umask_t'(1) << u;
  endfunction

  // the units each unit reads from
  function automatic umask_t deps(unit_t u);
    case (u)
      MA1, MA2:  return bit_of(MM2)  | bit_of(MM4);
      MA3, MA4:  return bit_of(MM1)  | bit_of(MM3);
      MM6:       return bit_of(MA1);
      MM7:       return bit_of(MA3);
      MM8:       return bit_of(MM7)  | bit_of(MA3);
      MM9:       return bit_of(MA4)  | bit_of(MM7);
      MM10:      return bit_of(MM6)  | bit_of(MM5);
      MA5:       return bit_of(MM10) | bit_of(MM9);
      SH1:       return bit_of(MA5);
      MM11:      return bit_of(MA2)  | bit_of(MM8);
      MM12:      return bit_of(MM5)  | bit_of(MM8);
      SH2:       return bit_of(MM12);
      MM13:      return bit_of(SH1)  | bit_of(MA3);
      MA6:       return bit_of(MM9)  | bit_of(SH1);
      MM14:      return bit_of(MA1)  | bit_of(MA6);
      MA7:       return bit_of(MM14) | bit_of(MM11);
      default:   return '0;                        // MM1..MM5 read inputs
    endcase
  endfunction

  fe_t    x1_q, y1_q, z1_q, x2_q, y2_q, z2_q;
  umask_t fired, ready, go, fin;

  // unit results
  fe_t x1z2, y1z2, x2z1, y2z1, s, u, t, v, w, u2, v2, v3, wv2, u2s;
  fe_t xa, xa2, tv3, sv3, ya, uya;

  always_comb begin
    for (int i = 0; i < NU; i++)
      go[i] = busy && !fired[i] && ((ready & deps(unit_t'(i))) == deps(unit_t'(i)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      fired <= '0;
      ready <= '0;
      {x1_q, y1_q, z1_q, x2_q, y2_q, z2_q} <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          fired <= '0;
          ready <= '0;
          {x1_q, y1_q, z1_q, x2_q, y2_q, z2_q} <= {x1, y1, z1, x2, y2, z2};
        end
      end else if (&ready) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        fired <= fired | go;
        ready <= ready | fin;
      end
    end
  end

  // ---- Montgomery multipliers ----------------------------------------------
  `define ECC_MM(U, A, B, R) \
    mont_mult #(.GAMMA(GAMMA), .NLEV(NLEV)) u_``U ( \
      .clk, .rst_n, .start(go[U]), .a(A), .b(B), .done(fin[U]), .r(R));

  `ECC_MM(MM1,  x1_q, z2_q, x1z2)
  `ECC_MM(MM2,  y1_q, z2_q, y1z2)
  `ECC_MM(MM3,  x2_q, z1_q, x2z1)
  `ECC_MM(MM4,  y2_q, z1_q, y2z1)
  `ECC_MM(MM5,  z1_q, z2_q, s)
  `ECC_MM(MM6,  u,    u,    u2)
  `ECC_MM(MM7,  v,    v,    v2)
  `ECC_MM(MM8,  v2,   v,    v3)
  `ECC_MM(MM9,  w,    v2,   wv2)
  `ECC_MM(MM10, u2,   s,    u2s)
  `ECC_MM(MM11, t,    v3,   tv3)
  `ECC_MM(MM12, s,    v3,   sv3)
  `ECC_MM(MM13, xa2,  v,    x3)
  `ECC_MM(MM14, u,    ya,   uya)
  `undef ECC_MM

  // ---- modular adders (SUB = 1: A - B) -------------------------------------
  `define ECC_MA(U, SUB, A, B, R) \
    mod_add u_``U ( \
      .clk, .rst_n, .start(go[U]), .sub(SUB), .a(A), .b(B), .done(fin[U]), .r(R));

  `ECC_MA(MA1, 1'b1, y2z1, y1z2, u)
  `ECC_MA(MA2, 1'b0, y1z2, y2z1, t)
  `ECC_MA(MA3, 1'b1, x2z1, x1z2, v)
  `ECC_MA(MA4, 1'b0, x1z2, x2z1, w)
  `ECC_MA(MA5, 1'b1, u2s,  wv2,  xa)
  `ECC_MA(MA6, 1'b1, wv2,  xa2,  ya)
  `ECC_MA(MA7, 1'b1, uya,  tv3,  y3)
  `undef ECC_MA

  // ---- modular doublers ----------------------------------------------------
  mod_shl u_SH1 (.clk, .rst_n, .start(go[SH1]), .a(xa),  .done(fin[SH1]), .r(xa2));
  mod_shl u_SH2 (.clk, .rst_n, .start(go[SH2]), .a(sv3), .done(fin[SH2]), .r(z3));

endmodule
