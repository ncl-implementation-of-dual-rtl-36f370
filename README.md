# Clockless dual-rail 8×8 Booth2 multiplier in NULL Convention Logic

This is a signed (two's-complement) 8×8 → 16-bit multiplier that has no clock.
Every bit travels on two wires, and the circuit works out for itself when a
result is complete. The arithmetic is ordinary. Modified Booth (radix-4,
"Booth2") recoding turns the 8-bit multiplier into four partial products. A
Wallace tree of carry-save adders and a final ripple-carry adder sums them.
The unusual part is the logic style: NULL Convention Logic (NCL). In NCL every
gate is a *threshold gate with hysteresis*, and data moves as alternating DATA
and NULL *wavefronts* under a four-phase request/acknowledge handshake. The
circuit is correct whatever its gate and wire delays are, so no timing
analysis is needed.

The RTL describes the design at gate level. Each NCL gate is one instance of
`ncl_th` (or `ncl_th_x`), and the adders, Booth cells, registers and completion trees are
built from those instances, the way the circuit would be drawn. It
synthesises to latches and logic. It simulates in zero-delay two-state
Verilator, and every product of the 65,536 operand pairs has been checked
through the full handshaking system.

## 1. Dual-rail signals and threshold gates

A dual-rail bit `D` is a pair `{r1, r0}` (`ncl_pkg::dr_t`):

| r1 r0 | meaning |
|-------|---------|
| 0 0   | NULL: no data yet |
| 0 1   | DATA0 |
| 1 0   | DATA1 |
| 1 1   | illegal (never occurs; `ncl_reg` asserts on it) |

A **THmn** gate has n inputs and asserts its output once at least m of them
are asserted. In a **weighted** gate THmnWw1w2… some inputs count more than
once. For example, TH34w2 gives input A weight 2, so it computes
Z = AB + AC + AD + BCD. Every gate has **hysteresis**: once its output is
asserted, it stays asserted until *all* of its inputs are deasserted:

    Z = set(inputs) + Z_prev · (OR of inputs)

So THnn is an n-input C-element, and TH1n is a plain OR gate with no state.
`ncl_th` implements any threshold or weighted gate of up to four inputs:

| parameter | meaning |
|-----------|---------|
| `N`, `M` | number of inputs and threshold |
| `W1`..`W3` | weights of inputs 1..3 (`a[0]`..`a[2]`) |
| `RESET` | `RST_NONE`, `RST_N` (reset to 0) or `RST_D` (reset to 1) |

A gate with state is a level-sensitive latch. It opens to load 1 when the set
function is true, and to load 0 when no input is asserted; otherwise it keeps
its value. A transistor-level gate can be built in a "static" form (the output
fed back into the pull-up and pull-down networks) or a "semi-static" form (a
weak feedback inverter). The two differ only in area, speed and power, so one
logic model stands for both.

### Why everything is built from minterms

An NCL block must be *input-complete*. Its outputs must not all become DATA
until every input is DATA, and must not all return to NULL until every input is
NULL. Otherwise a slow input could be mistaken for part of the next wavefront.
The Booth cells get this from the helper `ncl_sop`. For a
function of up to four dual-rail inputs it builds:

- one C-element (THnn) per input combination, fed by the rails that spell that
  combination. Such a gate fires only when all inputs are DATA and holds until
  all of them are NULL;
- for each output, an OR tree of TH1n gates over the minterms where the output
  is 1 (rail 1), and another over the minterms where it is 0 (rail 0).

Combinations that can never occur get no gate (the `CARE` mask). The full and
half adders instead use the usual compact NCL forms (section 4).

## 2. The wavefront handshake (`ncl_booth_mult_top`)

```
          md, mr (16 dual-rail)                     p (16 dual-rail)
producer ───────────────► [ncl_reg 16] ──► ncl_booth_mult ──► [ncl_reg 16] ───────► consumer
   ▲                         │   ▲                              │    ▲
   │ ko ◄── ncl_completion ◄─┘   └──── ncl_completion ◄─────────┘    │ ki
```

A **register bit** (`ncl_reg`) is two resettable TH22 gates. One input of each
is its incoming rail, the other is the request `ki` from the next stage. With
`ki = 1` (request for data, *rfd*) the bit can take DATA. With `ki = 0`
(request for NULL, *rfn*) it can only return to NULL. Otherwise it holds. Its
acknowledge is `ko = NOR(r1, r0)`: rfn while it holds DATA, rfd while it holds
NULL.

A **completion component** (`ncl_completion`) combines the `ko` lines of a
whole register into one signal, using a tree of C-elements of at most four
inputs (⌈log4 N⌉ levels; 2 levels for 16 bits). Its output flips only after
every bit agrees. A tree of C-elements behaves like one wide C-element only
when the lines move monotonically within a phase. The protocol guarantees
this, and it matters if you reuse the block.

There is one register at the input and one at the output, with no pipeline
stages between them. The output register's completion is the input register's
request, so a new operand can enter only after the previous product has been
stored and cleared again. The environment's protocol is:

1. Producer: wait for `ko = 1`, drive `md`, `mr` to DATA.
2. The product appears at `p` as DATA (the consumer keeps `ki = 1`). The
   consumer takes it and drops `ki` to 0.
3. Producer: once `ko = 0`, return the operands to NULL.
4. `p` returns to NULL and `ko` rises again. The consumer raises `ki`, and the
   cycle repeats.

Back-pressure works without extra logic. Suppose the consumer leaves `ki = 1`
after taking a product. The output register then keeps the product even
though the operands have gone NULL. The input register also refuses the next
DATA (its request stays rfn) until the consumer cycles `ki`. The end-to-end
testbench exercises both cases.

`rst` (active high) resets both registers to NULL. Hold the operands at NULL
and `ki` at 1 while it is high. Every other gate clears itself, because a
gate whose inputs are all deasserted releases its output.

## 3. Booth2 partial products (`booth_pp_gen`)

The multiplier MR is read in four overlapping 3-bit groups
`{MR[2j+1], MR[2j], MR[2j-1]}`, with `MR[-1] = 0`. Each group selects one
partial product of weight 4^j:

| group | PP | m1 | m2 | sign |
|-------|----|----|----|------|
| 000 | 0     | 0 | 0 | 0 |
| 001, 010 | +MD  | 1 | 0 | 0 |
| 011 | +2MD  | 0 | 1 | 0 |
| 100 | −2MD  | 0 | 1 | 1 |
| 101, 110 | −MD  | 1 | 0 | 1 |
| 111 | −0    | 0 | 0 | 1 |

- `booth_decoder` turns the group into the dual-rail selects m1 (±MD) and
  m2 (±2MD). The sign is `MR[2j+1]` itself, taken straight from the input.
  The first group has only two real inputs, because a constant 0 cannot be a
  dual-rail wire that returns to NULL, so `FIRST_GROUP = 1` selects a
  two-input variant.
- `booth_block1` makes bit 0 of a partial product: `(m1 & MD0) ^ sign`.
- `booth_block2` makes bits 1..8:
  `((m1 & MD[i]) | (m2 & MD[i-1])) ^ sign`, with MD sign-extended so that
  MD[8] = MD[7]. It uses twelve TH44 minterms for the selection and a TH22
  XOR stage for the sign.

A partial product is 9 bits wide, the width ±2MD needs. A negative partial
product comes out as the **one's complement**. The missing +1 is the sign bit
itself, which the adder tree adds at the partial product's lowest column
(output `neg[j]`). That is also why group 111 ("−0") works: all ones plus 1
gives 0.

The design uses 4 decoders, 4 Block1 and 32 Block2 instances.

## 4. Partial-product summation (`wallace_tree`)

The five rows to add have these column ranges. Row and bit names follow the
adder diagram the structure was taken from.

| row | bits | columns | content |
|-----|------|---------|---------|
| w | w0..w15 | 0..15 | PP0, bit 8 repeated up to column 15 |
| x | x0..x13 | 2..15 | PP1, sign-extended |
| y | y0..y11 | 4..15 | PP2, sign-extended |
| z | z0..z9  | 6..15 | PP3, sign-extended |
| r | r0, r3, r5, r7 | 0, 2, 4, 6 | the +1 of each PP: MR1, MR3, MR5, MR7 |

Three carry-save levels reduce the rows to two, and a ripple-carry adder
finishes the sum:

| stage | column 0–1 | 2 | 3 | 4 | 5 | 6 | 7..15 |
|-------|------------|---|---|---|---|---|-------|
| CSA 1 | – | FA(r3,x0,w2) | – | FA(y0,x2,w4) | FA | FA | FA(y,x,w) |
| CSA 2 | – | – | FA(x1,w3,c2) | – | – | FA(+z0) | FA(+z) |
| CSA 3 | – | – | – | FA(+r5) | HA | HA(+r7) | HA |
| RCA   | HA p0 (w0,r0), HA p1 | HA p2 | HA p3 | HA p4 | FA p5 | FA p6 | FA p7..p15 |

In all there are 36 full adders and 16 half adders. Carries out of column 15
are dropped: those adders keep their carry gates, with the outputs left open.
A ripple-carry adder is used rather than a carry-lookahead adder on purpose.
An asynchronous circuit finishes as soon as its actual carries settle, so its
speed is set by the average carry chain (O(log N)), not the worst case. The
ripple adder is also much smaller.

Adders:

- `ncl_fa`: `co.r1 = TH23(a1,b1,ci1)`, `co.r0 = TH23(a0,b0,ci0)`,
  `s.r1 = TH34w2(co0,a1,b1,ci1)`, `s.r0 = TH34w2(co1,a0,b0,ci0)`. The carry is
  a majority gate and may fire before all three inputs arrive. The sum never
  does. So a ripple chain may show some upper product bits early, but the
  product is complete only when every input has arrived.
- `ncl_ha`: `s.r1 = THxor0(a0,b1,a1,b0)` (= a0·b1 + a1·b0),
  `s.r0 = THxor0(a0,b0,a1,b1)`, `c.r1 = TH22(a1,b1)`, `c.r0 = TH12(a0,b0)`.
  THxor0 is one of the three fundamental gates that are not weighted
  thresholds (`ncl_th_x`, which also offers THand0 and TH24comp).

## 5. Files

| file | contents |
|------|----------|
| `rtl/ncl_pkg.sv` | `dr_t`, DATA/NULL constants, reset kinds, operand widths |
| `rtl/ncl_th.sv` | threshold gate (THmn and weighted gates) |
| `rtl/ncl_th_x.sv` | THxor0, THand0, TH24comp |
| `rtl/ncl_or_tree.sv`, `rtl/ncl_sop.sv` | helpers: TH1n OR tree, minterm-style function |
| `rtl/ncl_reg.sv`, `rtl/ncl_completion.sv` | register stage, completion tree |
| `rtl/booth_decoder.sv`, `rtl/booth_block1.sv`, `rtl/booth_block2.sv`, `rtl/booth_pp_gen.sv` | Booth2 partial products |
| `rtl/ncl_ha.sv`, `rtl/ncl_fa.sv`, `rtl/wallace_tree.sv` | summation |
| `rtl/ncl_booth_mult.sv` | combinational multiplier core |
| `rtl/ncl_booth_mult_top.sv` | top: registers, completion, core |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## 6. Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself, and a watchdog ends a run that hangs. Using Verilator 5,
from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/ncl_pkg.sv tb/tb_ncl_booth_mult_top.sv --top-module tb_ncl_booth_mult_top
./obj_dir/Vtb_ncl_booth_mult_top
```

Replace the testbench name to run another one. `-Wno-fatal` is needed because
Verilator reports the asynchronous loops (`UNOPTFLAT`):

- the real one is the handshake loop through the registers and completion;
- the others are apparent loops, where a ripple chain reads and writes one
  packed vector.

All of them settle, because each signal changes at most once per wavefront.
The `NOLATCH` lint note on `ncl_th` does not matter: the block is a latch,
and synthesis infers one latch per stateful gate.

What the testbenches cover:

- `tb_ncl_booth_mult_top`: all 65,536 operand pairs through the full handshake.
  Every fourth operation goes through the back-pressure sequence. The
  testbench counts the DATA and NULL wavefronts, every Booth group code, the
  output-hold cases and the input-stall cases, and fails if any of them never
  occurred. It runs in about 2 s.
- `tb_ncl_booth_mult`, `tb_booth_pp_gen`: exhaustive over all operands.
- `tb_wallace_tree`: 20,000 random rows plus corner cases.
- `tb_booth_decoder`, `tb_booth_block1`, `tb_booth_block2`, `tb_ncl_ha`,
  `tb_ncl_fa`: every input combination. Inputs arrive and leave one at a
  time in random order, which checks input-completeness and hysteresis.
- `tb_ncl_th`, `tb_ncl_th_x`: nine gate types against their Boolean set
  equations.
- `tb_ncl_reg`: random rail and request sequences.
- `tb_ncl_completion`: monotonic Ko sequences.

The simulation has no delays, so it shows that the logic and the protocol are
correct, not how fast the circuit is. The design is delay-insensitive by
construction, which is the property that makes a zero-delay check
meaningful, but this RTL does not prove it for every possible delay.

## 7. How far to trust it, and where it is this design's own

- **Taken from the source design:**
  - the NCL gate semantics and the register and completion structure;
  - the Booth2 selection table and the Booth2 algorithm;
  - the split into Decoder, Block1 (PP LSB) and Block2 (other PP bits);
  - the decoder outputs M and 2M;
  - the exact adder arrangement of the Wallace tree and ripple adder, with
    its row and bit names;
  - a non-pipelined system with one input and one output register.
- **Choices made here:**
  - the gate-level insides of the decoder, Block1 and Block2 (minterm
    style). Only their functions were specified;
  - the full and half adder structures: the standard NCL ones;
  - one's-complement partial products with the +1 supplied by the
    multiplier's odd bits;
  - reset to NULL, the reset port and the port names;
  - the grouping of the completion tree.
- **Label mismatch:** in the source adder diagram the column-0 correction
  input is labelled r0, while the others are r3, r5, r7 (the multiplier bits
  MR3, MR5, MR7). Group 0's sign bit is MR1, so MR1 drives that input. The
  port keeps the name `r0`.
- **Component and gate counts differ from the published tallies.** This RTL
  has 4 decoders, 4 Block1, 32 Block2, 36 full adders and 16 half adders.
  The published component tally lists 13 decoders, 6 Block1, 29 Block2,
  26 full adders and 17 half adders, and its gate tally is not consistent with
  itself. So neither was reproduced. The logic function and the adder
  structure are what the tests confirm.
- **Not modelled:**
  - static versus semi-static transistor circuits, transistor sizing and
    layout;
  - delay, power and area figures (for the record: about 0.29 mm² static and
    0.26 mm² semi-static in a 0.18 µm process).

  These are circuit-level properties outside RTL.
- The design is fixed at 8×8. The adder tree is specific to those widths, so
  the widths are package constants rather than parameters.
