# 192-bit elliptic curve point adder with hierarchical hybrid multipliers

This is synthesizable SystemVerilog for a point adder on a 192-bit NIST
elliptic curve. Adding two points takes 14 modular multiplications. Each one is
a Montgomery multiplication, built from three 192 x 192-bit integer products, so
one point addition needs 42 large products. Nearly all of the cost is in those
multipliers. The core of the design is therefore a **hybrid multiplier**. It
builds a 192-bit product in several levels, and each level uses one of two
strategies:

* **Karatsuba-Ofman (KOA)**: three half-size products, with extra additions.
* **Broadcast**: a block shift-add scheme with *k* small multipliers working
  in parallel.

At the bottom, the FPGA's embedded 18x18 multipliers do the work. The choice
of strategy per level is a parameter, and it trades area against cycles. The
cycle count of every composition follows a closed-form model, and the RTL is
scheduled to match that model cycle for cycle.

The design follows the architecture in *Design Exploration of 192-bit Elliptic
Curve Adder On The StarBridge HC-36 System*. That text gives the data-flow
graph of the adder, the hybrid-multiplier scheme and its cycle model. Some
things it does not give: the prime, the number representation, handshakes,
reset, and the insides of the modular adders and the Montgomery units. Those
were chosen here. The section "What is this design's own" at the end lists each
such choice.

## The point addition

Points are in homogeneous projective coordinates (X : Y : Z) on
Y²Z = X³ + AXZ² + BZ³ over GF(p), with p = 2¹⁹² − 2⁶⁴ − 1 (NIST P-192). All
six input coordinates and the three results are in **Montgomery form**
(x·2¹⁹² mod p). Montgomery multiplication keeps values in that form, so no
conversion is needed inside the adder. Converting into and out of the form is
left to the user. One way: multiply by 2³⁸⁴ mod p, or by 1, on a Montgomery
multiplier.

`ecc_point_adder` holds one hardware unit per node of the graph:

| unit | computes | unit | computes |
|---|---|---|---|
| MM1 | X1Z2 = X1·Z2 | MAdd1 | U = Y2Z1 − Y1Z2 |
| MM2 | Y1Z2 = Y1·Z2 | MAdd2 | T = Y1Z2 + Y2Z1 |
| MM3 | X2Z1 = X2·Z1 | MAdd3 | V = X2Z1 − X1Z2 |
| MM4 | Y2Z1 = Y2·Z1 | MAdd4 | W = X1Z2 + X2Z1 |
| MM5 | S = Z1·Z2 | MAdd5 | XA = U²S − WV² |
| MM6 | U² | << | 2XA |
| MM7 | V² | MAdd6 | YA = WV² − 2XA |
| MM8 | V³ = V²·V | MM14 | UYA = U·YA |
| MM9 | WV² | MAdd7 | **Y3** = UYA − TV³ |
| MM10 | U²S | MM13 | **X3** = 2XA·V |
| MM11 | TV³ = T·V³ | << | **Z3** = 2·SV³ |
| MM12 | SV³ = S·V³ | | |

This is the usual projective addition, (vA, u(v²X1Z2 − A) − v³Y1Z2, v³Z1Z2),
scaled by 2. Scaling is harmless in projective coordinates, and it lets the
formulas use the sums T and W instead of X1Z2 and Y1Z2 directly. The curve
coefficients A and B never appear. As in the graph, the adder does not handle
special cases: P1 = ±P2 or a point at infinity gives Z3 = 0 or a wrong result.

**Scheduling.** Each unit starts in the cycle after all units it reads from
have finished, so the schedule is dataflow, as-soon-as-possible. The firing
logic is a 23-bit `ready` mask, a `fired` mask and a fixed dependency mask per
unit (function `deps`). Every unit keeps its result until the next addition,
so no extra registers are needed between units. The critical path is
MM → MAdd → MM → MM → MAdd → << → MAdd → MM → MAdd. With the default
multiplier, one addition takes **424 cycles** from `start` to `done`:
1 + 4·(102 + 1) + 5·(1 + 1) + 1. Several units often run at the same
time; MM1 to MM5, for example, all start together.

## Montgomery multiplier (`mont_mult`)

The unit computes r = a·b·2⁻¹⁹² mod p for a, b < p. It has one hybrid
multiplier, which it uses three times in sequence:

1. T = a·b (384 bits)
2. m = (T mod 2¹⁹²)·N′ mod 2¹⁹², where N′ = −p⁻¹ mod 2¹⁹². Only the low half
   of this product is kept.
3. m·p, then u = (T + m·p) / 2¹⁹². The low half of T + m·p is zero, and an
   assertion checks this. Then r = u − p if u ≥ p, else u.

Each product costs one issue cycle plus the multiplier latency. The addition,
the conditional subtraction and a done cycle follow. So the latency is
3·(Lmul + 1) + 3, which is **102 cycles** with the default multiplier
(Lmul = 32). Both p and N′ are parameters, so any odd 192-bit modulus works.

## The hybrid multiplier

### Composition list Γ

The composition of a multiplier is written as a list Γ = {m1, m2, …, mN}. Entry
m_i sets the strategy of level i:

* m_i = 1: a Karatsuba-Ofman level.
* m_i = k > 1: a broadcast level with k multipliers.

Below level N, the embedded multipliers take over. The default is
**Γ = {1, 1, 3}** on 192 bits:

* KOA at 192 bits: three 97-bit products.
* KOA at 97 bits: three 50-bit products each.
* Broadcast with 3 units on the 50-bit operands: 17-bit blocks.

That makes 27 embedded multipliers of 17 × 17 bits.

In RTL, Γ is the parameter `GAMMA`, a 64-bit vector with one byte per level and
level 1 in the least significant byte. The parameter `NLEV` gives the number
of levels. So {1, 1, 3} is `GAMMA = 64'h03_01_01, NLEV = 3`, and {6, 1} is
`64'h01_06, NLEV = 2`.

`hybrid_mult` builds the tree level by level in a generate loop. Level l has
`hm_count(l)` nodes, all with operand width `hm_width(l)`. The nodes of level l
drive the start and operand vectors of level l+1. They read back level l+1's
done flags, combined with AND per parent, and its products. The leaves are
`mult18` instances.

### KOA level (`koa_node`)

With H = ⌈W/2⌉ the node forms three products:

* a0 = AH·BH
* a1 = (AH+AL)·(BH+BL)
* a2 = AL·BL

It then combines them: A·B = a0·2²ᴴ + (a1 − a0 − a2)·2ᴴ + a2. The sums
AH+AL and BH+BL have H+1 bits. So all three children are H+1 bits wide; the
outer two get zero-extended operands. The node uses one state per cycle:

| state | work | counted as |
|---|---|---|
| PRE | AH+AL, BH+BL | addition 1 |
| ISSUE | start the three children | control |
| WAIT | children busy | child latency |
| CAP | take the products | control |
| D1 / D2 / D3 | a1−a0, −a2, final combination | additions 2–4 |
| DONE | done pulse | control |

Latency: **L_child + 4 + 3**.

### Broadcast level (`bcast_node`)

A and B are cut into k blocks of P = ⌈W/k⌉ bits. In iteration i, block B_i is
*broadcast* to all k children. Together they form A_j·B_i for every j in one
step, and the sum of those products is the row A·B_i. The rows are
accumulated with A·B = Σ (A·B_i)·2^(iP). A right-shifting hi/lo accumulator
does this: each iteration adds the row to `hi`, then moves hi's lowest P bits
into `lo`. One iteration:

| state | work | counted as |
|---|---|---|
| ISSUE | start the k children with B_i | control |
| WAIT | children busy | child latency |
| CAP | take the k products | control |
| ADD1 | row sum A·B_i | addition 1 |
| ADD2 | accumulate and shift | addition 2 |
| LOOP | next block (last iteration: done pulse) | loop overhead |

Latency: **k·(L_child + 2 + 2) + k**.

### Embedded multiplier (`mult18`)

`mult18` is a registered unsigned W × W multiply, with W ≤ 18, that stands for
one embedded multiplier block with its output register. Latency is 1. It is
written as plain RTL, not as a vendor primitive.

### Cycle model

The latencies above form a recursion. Each addition counts as 1 cycle, each
leaf as 1 cycle, each KOA level adds 3 control cycles, and each broadcast
level adds 2 control cycles plus 1 loop cycle per iteration. Function
`ecc_pkg::hm_latency` evaluates this recursion. The five compositions below
are simulated in `tb_hybrid_mult`. The published cycle counts for them are
reproduced exactly:

| Γ (192 bits) | cycles | leaves (width) |
|---|---|---|
| {1, 1, 3} (default) | 32 | 27 (17 bit) |
| {1, 6} | 43 | 18 (17 bit) |
| {6, 1} | 78 | 18 (17 bit) |
| {1, 3, 1} | 46 | 27 (18 bit) |
| {3, 1, 1} | 60 | 27 (18 bit) |

Published area figures for these compositions are FPGA slice counts. They
cannot be checked from RTL and are not modelled here.

## Interfaces and timing

Every arithmetic unit uses the same protocol:

* `start` is a one-cycle pulse, accepted only while the unit is idle. An
  assertion flags a violation.
* `done` is a one-cycle pulse. The result is valid when it rises and stays
  valid until the next `start`.

`ecc_point_adder` adds `busy`: it is high from the cycle after `start` until
`done`. Reset is asynchronous and active low (`rst_n`); it clears every state
machine and result register.

| unit | latency (cycles) |
|---|---|
| `mult18` | 1 |
| `koa_node` | child + 7 |
| `bcast_node` | k·(child + 4) + k |
| `hybrid_mult` {1,1,3} | 32 |
| `mont_mult` | 3·(Lmul + 1) + 3 = 102 |
| `mod_add`, `mod_shl` | 1 |
| `ecc_point_adder` | 424 |

## Files

| file | contents |
|---|---|
| `rtl/ecc_pkg.sv` | field constants (p, N′), Γ encoding, width/count/latency functions |
| `rtl/ecc_point_adder.sv` | top: the 23-unit data-flow graph and its firing logic |
| `rtl/mont_mult.sv` | Montgomery multiplier around one hybrid multiplier |
| `rtl/mod_add.sv`, `rtl/mod_shl.sv` | modular add/subtract, modular doubling |
| `rtl/hybrid_mult.sv` | level-by-level hybrid multiplier tree |
| `rtl/koa_node.sv`, `rtl/bcast_node.sv`, `rtl/mult18.sv` | KOA level, broadcast level, embedded multiplier |
| `tb/ecc_ref_pkg.sv` | reference arithmetic: wide `*`/`%`, modular inverse, affine P-192 add/double |
| `tb/tb_<unit>.sv` | one self-checking testbench per unit |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if the simulation hangs. To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_point_adder.sv \
        --top-module tb_ecc_point_adder
    ./obj_dir/Vtb_ecc_point_adder

For another unit, replace the testbench file and the top name. All tests run in
seconds.

* **`tb_ecc_point_adder`** runs the full-size design at its default
  parameters. It adds k·G + G on P-192 for k = 2…5, with random projective
  scalings, and checks the affine result against an affine reference that
  computes each inverse. It also runs six additions with random coordinates
  against the data-flow formulas. It checks the 424-cycle latency. It counts
  modular wrap, borrow and doubling reductions, Montgomery final
  subtractions, KOA, broadcast and leaf operations, and parallel unit starts,
  and it fails if any of these never happens.
* **`tb_hybrid_mult`** checks the five compositions side by side, products
  and cycle counts.
* **`tb_koa_node` and `tb_bcast_node`** test one level each against
  behavioural children of configurable latency.

## Changing it

* **Another composition.** Set `GAMMA`/`NLEV` on `ecc_point_adder`; they
  propagate to all fourteen Montgomery units. The latency changes with
  `hm_latency`. Keep leaf widths at 18 bits or less; elaboration stops with an
  error otherwise.
* **Another modulus.** Set `P` and `NPR` on `mont_mult`, and `P` on `mod_add`
  and `mod_shl`. The top uses the P-192 constants from `ecc_pkg`.
* **Different timing.** The control and addition cycles are single states in
  `koa_node`/`bcast_node`. Adding or merging states changes the model, and
  `hm_latency` should be changed to match.

## What is this design's own

These points are choices where the source architecture is silent, or
corrections of it:

* **The prime and the number representation.** NIST P-192 and Montgomery form
  are choices made here.
* **The Karatsuba identity.** The printed combination formula has its terms in
  the wrong order. The standard identity a0·2²ᴴ + (a1 − a0 − a2)·2ᴴ + a2,
  which follows from the definitions of a0, a1 and a2, is used.
* **The carry of AH+AL.** This is handled by making every KOA child one bit
  wider than H.
* **Two cycle constants.** The addition time (1 cycle) and the leaf time
  (1 cycle) are not stated. They are the values that make the cycle model
  match all published counts. How the four additions and three control cycles
  of a KOA level, and the per-iteration steps of a broadcast level, are
  ordered is also chosen here.
* **Inside the Montgomery unit.** Three sequential products on one shared
  multiplier, then a final conditional subtraction.
* **The modular adders.** They also subtract, selected by a `sub` input. The
  doubler finishes in one cycle.
* **Scheduling of the point adder.** Dataflow, as soon as possible, with one
  instance per graph node. No resource sharing between graph nodes is
  attempted. The source leaves mapping and scheduling open, and one node per
  instance is the most direct reading of its graph. This spends a lot of
  area: 14 × 27 = 378 leaf multipliers with the default Γ.
* **Embedded multiplier operands.** `mult18` treats its operands as unsigned.
  Compositions {1,3,1} and {3,1,1} reach 18-bit unsigned leaves. A real
  signed 18 × 18 block holds only 17 unsigned bits, so on an FPGA those leaves
  would need splitting.
* **Operand widths.** The source describes {1, 1, 3} as 96-bit, then 48-bit,
  then 16-bit products. Here the KOA children are one bit wider to hold the
  carry of AH+AL. That gives 97, then 50, then 17 bits. All the leaves still
  fit the 18 × 18 embedded multiplier, and the cycle counts are unchanged.
* **KOA control at 192 bits.** The source gives 3 control cycles per KOA
  level "for n < 192". The top level, at n = 192, uses 3 as well. That is the
  value that reproduces the published totals.
* **Area model.** The slice formula (α = 15 per bit for KOA, β = 11 per bit
  for broadcast) is not built into the package. Its published estimates need
  a leaf cost of 516/18 slices for the two-level lists but 678/27 for the
  three-level ones. So one leaf constant does not reproduce all five.
* **Not included.** Partitioning over several FPGAs and inter-chip
  communication are not part of this RTL.
