# Blinded Montgomery-ladder scalar multiplier for binary Edwards curves, GF(2^233)

This is synthesizable SystemVerilog for a hardware unit that computes the
elliptic-curve scalar product Q = e·P on a binary Edwards curve (BEC) over
GF(2^233). Binary Edwards curves have a complete, unified group law. One set
of formulas adds any two points, including a point to itself, and there are
no exceptional points. That already takes away most of the leverage of simple
power analysis. On top of it the unit randomises the computation with a
blinding point, and it runs the same sequence of operations for every key bit.

The cost of that safety is arithmetic. A unified projective addition needs
19 field multiplications, where a Weierstrass addition needs far fewer. The
design wins the speed back with parallelism. Every ladder round performs one
point addition and two point doublings, which together need 27
multiplications, 14 squarings and 40 additions. A fixed schedule spreads them
over two bit-parallel multipliers, two squarers and three adders, in
**14 clock cycles per key bit**. A full 233-bit scalar multiplication takes
3287 cycles.

## The blinded Montgomery power ladder

Inputs: base point P, scalar e of T bits, and a random curve point R together
with its negative −R. On a BEC, −(X:Y:Z) = (Y:X:Z).

```
R0 = R,  R1 = R + P,  RR = −R
for i = T−1 downto 0:
    RR = 2·RR                                  (every round)
    if e_i = 0:  R1 = R0 + R1,  R0 = 2·R0
    else:        R0 = R0 + R1,  R1 = 2·R1
return R0 + RR
```

The ladder keeps R1 − R0 = P. Starting from R0 = R, after T rounds
R0 = e·P + 2^T·R and RR = −2^T·R, so the final addition cancels the blinding.
The values inside the unit depend on R and change from run to run, but the
result does not. The testbench checks this: the same e and P with two
different R give different projective coordinates that describe the same
point.

## Point formulas

All points are projective (X:Y:Z). The curve is
d1(x+y) + d2(x²+y²) = xy + xy(x+y) + x²y². The formulas implemented are the
unified addition and the doubling for the case **d1 = d2**. The doubling
forms DG = DB + DD, where a general curve would need (d2/d1)(DB + DD), and the
addition uses L = d1·K.

Addition (X3:Y3:Z3) = (X1:Y1:Z1) + (X2:Y2:Z2): 19 M, 2 S, 22 A.

```
A=X1·X2  B=Y1·Y2  C=Z1·Z2  D=d1·C  E=C²  F=D²
G1=X1+Z1 G2=X2+Z2 G=G1·G2  H1=Y1+Z1 H2=Y2+Z2 H=H1·H2  I=A+G  J=B+H
K1=X1+Y1 K2=X2+Y2 K=K1·K2  L=d1·K
U1=K+I U2=J+C U3=U1+U2  L1=L·U3  L2=L1+F  Z3=C·L2
V1=A·B V2=G·H V3=d1·E V4=V1+V2 V5=V3+V4 L3=L·V5 V6=D·F V7=L3+V6 V=V7+Z3
S1=A+D S2=G+D S3=S1·S2 S4=D·S3 X3=V+S4
T1=B+D T2=H+D T3=T1·T2 T4=D·T3 Y3=V+T4
```

Doubling (X3D:Y3D:Z3D) = 2(X1:Y1:Z1): 4 M, 6 S, 9 A.

```
DA=X1² DC=Y1² DE=Z1² DB=DA² DD=DC² DF1=DE²  DH=DA·DE  DI=DC·DE  DF=d1·DF1
DG=DB+DD DV2=DH+DD DV3=DI+DB DJ=DH+DI DV1=DF+DG DK1=d2·DJ DK=DG+DK1
Z3D=DV1+DJ  X3D=DK+DV2  Y3D=DK+DV3
```

The doubling of the blinding point uses the same names with an `_R` suffix.
It reads (XR:YR:ZR) and writes X_R, Y_R and Z_R back into RR.

## The layer schedule

The schedule is the hardest part of the design to follow. One *layer* is one
clock cycle. In a layer each unit performs at most one operation. It reads
only registers written in earlier layers, and its result is written at the
end of the layer. Operations in the same layer are therefore independent of
each other. `bec_microcode` holds three programs.

**Later rounds (PROG_STEADY, 14 layers).** This program fully uses the
resource bounds: 27 M on 2 multipliers needs at least 14 layers, and so do
40 A on 3 adders. The addition and the ladder doubling start in layer 1. The
doubling of RR cannot start that early, because its squarings sit on a
dependency chain of two squarings and a multiplication. It is therefore
split across rounds. Layers 3–9 of round i finish 2·RR from values that round
i−1 precomputed: DV1_R, DJ_R, DV2_R, DK1_R, DK_R, then X_R, Y_R, Z_R. Layers
9–14 then precompute, from the new RR, the squarings DE_R … DF1_R, the
products DF_R, DI_R and DH_R, and the sums DG_R and DV3_R that round i+1
needs. All reads of the old look-ahead values come before the layer that
overwrites them.

| layer | M1 | M2 | Sq1 | Sq2 | Ad1 | Ad2 | Ad3 |
|---|---|---|---|---|---|---|---|
| 1 | A | B | DA | DC | G1 | G2 | H2 |
| 2 | C | G | DB | DD | H1 | K2 | K1 |
| 3 | D | H | DE | – | I | DG | DV1_R |
| 4 | DI | DH | E | – | J | S2 | T2 |
| 5 | V1 | V3 | DF1 | – | DJ | DV2 | DJ_R |
| 6 | DK1_R | K | – | – | S1 | DV2_R | U2 |
| 7 | DK1 | V2 | – | – | U1 | DK_R | T1 |
| 8 | L | DF | – | F | Z_R | V4 | U3 |
| 9 | S3 | L1 | DE_R | – | X_R | Y_R | V5 |
| 10 | V6 | L3 | DA_R | DC_R | DK | DV3 | L2 |
| 11 | T3 | Z3 | DB_R | DD_R | DV1 | Y3D | V7 |
| 12 | T4 | S4 | DF1_R | – | X3D | Z3D | V |
| 13 | DF_R | DI_R | – | – | X3 | Y3 | DG_R |
| 14 | DH_R | – | – | – | DV3_R | – | – |

**First round (PROG_FIRST, 15 layers).** No look-ahead values exist yet, so
this round also computes the squarings of the initial RR and its three
products. That is 30 multiplications in all, hence 15 layers. It ends with
the same look-ahead as a later round. Its layer assignment is a list schedule
of this design. It has the same operations, units and layer count as the
first-round schedule of the original architecture, but not necessarily the
same placement.

**Lone addition (PROG_PA, 11 layers).** This program computes R + P before
the ladder and R0 + RR after it. The schedule of these two additions is this
design's own.

Each program is listed in `rtl/bec_microcode.sv` as one micro-instruction
per layer. A micro-instruction holds seven (operand a, operand b,
destination) triples, one per unit. Slots 0–1 are the multipliers, 2–3 the
squarers and 4–6 the adders.

## Datapath and key-bit steering

`bec_datapath` has one 233-bit register per formula variable (72
temporaries), the ladder points R0 and R1, and the blinding point RR. Each
unit operand is a multiplexer over this register file. The micro-instructions
use *logical* names for the round's inputs and outputs, and the current key
bit b maps them onto R0 and R1:

| logical | meaning | register |
|---|---|---|
| X1,Y1,Z1 | addition input 1, doubling input | R_b |
| X2,Y2,Z2 | addition input 2 | R_(1−b), or RR in the final addition |
| X3,Y3,Z3 | sum | R_(1−b), or R0 in the final addition |
| X3D,Y3D,Z3D | double | R_b |

This implements "R_(1−b) = R0 + R1, R_b = 2·R_b" without copying and without
any key-dependent change in the operation sequence. Only multiplexer
selects depend on b. This is safe because every program reads all of its
inputs within its first five layers, and writes its first output into one of
those registers in layer 9 or later. The test of the schedule checks these rules independently of
the datapath.

The curve constants d1 and d2 are inputs and appear to the units as
read-only registers. The datapath registers have no reset, because the
schedule writes every register before it reads it.

## Controller and timing

`bec_ctrl` is a small FSM:

| phase | cycles | action |
|---|---|---|
| LOAD | 1 | R0 ← R, R1 ← P, RR ← −R |
| INIT | 11 | R1 ← R0 + R1 |
| FIRST | 15 | round for e[T−1] |
| LOOP | 14 × (T−1) | rounds for e[T−2] … e[0] |
| FINAL | 11 | R0 ← R0 + RR |

The scalar is captured in a shift register when start is accepted. `done`
goes high 25 + 14·T clock edges after the edge that accepted `start`: 3287
for T = 233. For comparison, the original FPGA results, 25 µs at 132 MHz and
49 µs at 67 MHz, work out to about 3300 and 3283 cycles. The result stays on
`q` until the next start, and `start` is ignored while `busy` is high. An
assertion checks that the layer counter never leaves its program.

## Field arithmetic

* **Multiplier** (`gf2m_mul`): bit-parallel and combinational. It is a
  Karatsuba–Ofman polynomial multiplier (`gf2_kmul`) followed by reduction.
  The operands are zero-padded to 240 bits and split four times, giving 81
  schoolbook leaves of 15 bits. The tree is written level by level with
  generate loops rather than by recursive instantiation. The multiplier is
  the critical path and sets the clock period.
* **Reduction** (`gf2m_reduce`): folds bits 464…233 down modulo the field
  polynomial, from the top bit down.
* **Squarer** (`gf2m_sqr`): inserts a zero between coefficients, then
  reduces.
* **Adder** (`gf2m_add`): XOR.

The field polynomial is **x^233 + x^74 + 1**, the NIST B-233 trinomial, set
in `bec_pkg::POLY`. Another irreducible polynomial of degree 233 can be
substituted there.

## Using it

Top module: `bec_scalar_mult #(T = 233, LEVELS = 4)`.

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset of the controller |
| start | in | 1 | start when `busy` is low |
| e | in | T | scalar |
| p | in | 3×233 (`point_t`) | base point (X:Y:Z) |
| r, r_neg | in | `point_t` | blinding point R and −R = (Y:X:Z) |
| d1, d2 | in | 233 | curve constants; **must be equal** |
| busy, done | out | 1 | busy; `done` is a one-cycle pulse |
| q | out | `point_t` | e·P, projective |

Things the caller must provide:

* Fresh random points R on the curve for each run.
* Affine conversion of the result, x = X/Z and y = Y/Z, if it is needed.
* A curve with Tr(d) = 1, so that the addition law is complete.

The neutral element is (0:0:1).

## Where this RTL departs from the original architecture

* The field polynomial, the Karatsuba–Ofman split depth and the multiplier's
  exact structure are choices of this design. The original uses an
  "overlap-free" Karatsuba–Ofman variant whose details are not reproduced
  here.
* The register file uses one register per variable with full operand
  multiplexers. No register sharing was attempted, so area is not
  comparable with the published FPGA figures (about 33k Virtex-5 slices).
* The first-round schedule and the two lone additions are scheduled by this
  design. The 14-layer round follows the original table.
* Generating R and −R, and converting to and from affine coordinates, are
  outside the unit.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The shared reference model is
`tb/bec_ref_pkg.sv`. It contains shift-and-add field multiplication, the
formulas above written directly, double-and-add scalar multiplication, trace
and half-trace, and random complete curves and random points on them.

* `tb_gf2m_mul`, `tb_gf2m_sqr`, `tb_gf2m_add`: random and corner-case
  operands against the reference.
* `tb_bec_microcode`: runs the three ROM programs on a behavioural register
  model. It compares the results with the formulas, flags reads of
  never-written registers and double writes, and counts multiplications per
  round: 19, 30 and 27.
* `tb_bec_datapath`: drives the datapath from the ROM for load, INIT, FIRST
  and later rounds with both key bits, then FINAL, and compares all ladder
  registers.
* `tb_bec_ctrl`: checks the exact program and layer sequence, the MSB-first
  key bits, the latency and the ignored start, and also runs an instance
  with T = 2.
* `tb_bec_scalar_mult`: the end-to-end test at full size (k = T = 233). It
  runs six multiplications: random scalars, e = 0, e = 1, e = all ones, and a
  blinding test with the same e and a new R. Each result is checked against
  double-and-add, checked to lie on the curve, and checked for a latency of
  exactly 3287 cycles. It also counts each mechanism (INIT, first round,
  later rounds, bit 0 and bit 1 rounds, FINAL, ignored start).

All of these pass. The end-to-end test simulates in about 1.5 s after a
build of under a minute. To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/bec_pkg.sv tb/bec_ref_pkg.sv tb/tb_bec_scalar_mult.sv \
    --top-module tb_bec_scalar_mult -o sim
./obj_dir/sim
```

Replace the testbench name to run any of the others. To lint the design:
`verilator --lint-only -Wall -y rtl rtl/bec_pkg.sv rtl/bec_scalar_mult.sv`.

## Files

| file | content |
|---|---|
| `rtl/bec_pkg.sv` | field size, polynomial, `point_t`, register names, micro-instruction types |
| `rtl/bec_scalar_mult.sv` | top level |
| `rtl/bec_ctrl.sv` | ladder controller |
| `rtl/bec_microcode.sv` | layer schedules |
| `rtl/bec_datapath.sv` | registers, units, key-bit steering |
| `rtl/gf2m_mul.sv`, `rtl/gf2_kmul.sv`, `rtl/gf2m_reduce.sv` | multiplier |
| `rtl/gf2m_sqr.sv`, `rtl/gf2m_add.sv` | squarer, adder |
| `tb/bec_ref_pkg.sv` | reference model |
| `tb/tb_*.sv` | testbenches |
