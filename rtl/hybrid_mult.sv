// hybrid_mult: hierarchical hybrid multiplier, W x W -> 2W bits, unsigned.
//
// The composition list GAMMA = {m1, ..., mN} (see ecc_pkg) chooses the
// strategy of each level: m = 1 is a Karatsuba-Ofman level (koa_node, three
// sub-multipliers), m = k > 1 a broadcast level (bcast_node, k sub-multipliers
// of ceil(W/k) bits). Below level N every multiplication is done by an
// embedded 18x18 multiplier (mult18). The default {1,1,3} on 192 bits is the
// worked example of the hybrid scheme: two KOA levels (192 -> 96 -> 48 bits)
// and a 3-unit broadcast level whose 16/17-bit products go to 27 embedded
// multipliers.
//
// Structure: the tree is built level by level with a generate loop rather
// than by recursive instantiation. Level l holds hm_count(l) nodes, all of
// operand width hm_width(l); the nodes of level l drive the start/operand
// vectors (cs/ca/cb) that level l+1 takes as its inputs, and read back level
// l+1's done and product vectors. All children of one node share its start;
// the node sees the AND of their done flags.
//
// Widths: a KOA node hands ceil(W/2)+1 bits to all three children. Only the
// middle product (AH+AL)*(BH+BL) needs the extra bit; the outer two use it
// zero-extended, so their two top product bits are always zero and unused.
// The document does not say how the carry of AH+AL is handled; a uniform
// child width is this design's choice.
//
// Interface: start pulse with a/b, done pulse with p; p is held until the next
// start, and start is only legal while idle. The latency is
// ecc_pkg::hm_latency(GAMMA, NLEV, 0) cycles: 32 for {1,1,3}, 43 for {1,6},
// 78 for {6,1}, 46 for {1,3,1} and 60 for {3,1,1}, the cycle counts quoted
// for these five compositions.
module hybrid_mult
  import ecc_pkg::*;
#(
  parameter int unsigned W     = 192,
  parameter gamma_t      GAMMA = GAMMA_113,
  parameter int unsigned NLEV  = NLEV_113
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           done,
  output logic [2*W-1:0] p
);

  for (genvar l = 0; l <= int'(NLEV); l++) begin : g_lev
    localparam int unsigned WL = hm_width(W, GAMMA, l);
    localparam int unsigned NN = hm_count(GAMMA, l);

    // inputs and results of the NN nodes of this level
    logic [NN-1:0]           st, dn;
    logic [NN-1:0][WL-1:0]   xa, xb;
    logic [NN-1:0][2*WL-1:0] xp;

    if (l == 0) begin : g_in
      assign st = start;
      assign xa = a;
      assign xb = b;
    end else begin : g_in
      assign st = g_lev[l-1].g_nodes.cs;
      assign xa = g_lev[l-1].g_nodes.ca;
      assign xb = g_lev[l-1].g_nodes.cb;
    end

    if (l == int'(NLEV)) begin : g_nodes
      // lowest level: embedded multipliers
      for (genvar j = 0; j < int'(NN); j++) begin : g_leaf
        mult18 #(.W(WL)) u_mul (
          .clk, .rst_n, .start(st[j]), .a(xa[j]), .b(xb[j]), .done(dn[j]), .p(xp[j]));
      end

    end else begin : g_nodes
      localparam int unsigned M  = gamma_at(GAMMA, l);
      localparam int unsigned F  = hm_fan(GAMMA, l);
      localparam int unsigned WC = hm_width(W, GAMMA, l + 1);
      localparam int unsigned NC = NN * F;

      // start and operands of the children (level l+1)
      logic [NC-1:0]         cs;
      logic [NC-1:0][WC-1:0] ca, cb;

      for (genvar j = 0; j < int'(NN); j++) begin : g_node
        if (M == 1) begin : g_koa
          localparam int unsigned H = (WL + 1) / 2;   // = WC - 1
          logic           sub_start;
          logic [H-1:0]   a0, b0, a2, b2;
          logic [H:0]     a1, b1;

          koa_node #(.W(WL)) u_node (
            .clk, .rst_n, .start(st[j]), .a(xa[j]), .b(xb[j]), .done(dn[j]), .p(xp[j]),
            .sub_start,
            .sub_a0(a0), .sub_b0(b0), .sub_a1(a1), .sub_b1(b1), .sub_a2(a2), .sub_b2(b2),
            .sub_done(&g_lev[l+1].dn[3*j +: 3]),
            .sub_p0(g_lev[l+1].xp[3*j][2*H-1:0]),
            .sub_p1(g_lev[l+1].xp[3*j+1]),
            .sub_p2(g_lev[l+1].xp[3*j+2][2*H-1:0])
          );

          assign cs[3*j +: 3] = {3{sub_start}};
          assign ca[3*j]   = {1'b0, a0};
          assign cb[3*j]   = {1'b0, b0};
          assign ca[3*j+1] = a1;
          assign cb[3*j+1] = b1;
          assign ca[3*j+2] = {1'b0, a2};
          assign cb[3*j+2] = {1'b0, b2};

        end else begin : g_bcast
          logic          sub_start;
          logic [WC-1:0] sb;

          bcast_node #(.W(WL), .K(M)) u_node (
            .clk, .rst_n, .start(st[j]), .a(xa[j]), .b(xb[j]), .done(dn[j]), .p(xp[j]),
            .sub_start,
            .sub_a(ca[M*j +: M]),
            .sub_b(sb),
            .sub_done(&g_lev[l+1].dn[M*j +: M]),
            .sub_p(g_lev[l+1].xp[M*j +: M])
          );

          assign cs[M*j +: M] = {M{sub_start}};
          assign cb[M*j +: M] = {M{sb}};
        end
      end
    end
  end

  assign done = g_lev[0].dn[0];
  assign p    = g_lev[0].xp[0];

endmodule
