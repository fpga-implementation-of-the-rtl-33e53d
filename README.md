# Carry select adder without a multiplexer

A classic carry select adder computes every block of the sum twice, once for
carry-in 0 and once for carry-in 1, and picks one result with a multiplexer
when the real carry arrives. This design keeps only the carry-in-0 adder. The
carry-in-1 result is derived from it afterwards: adding one to a number flips
its bits from the least significant end up to and including the first zero.
A short AND chain driven by the carry does that flip. So each block needs no
second adder and no sum multiplexer. Each block's carry-in-0 adder is a
Kogge-Stone parallel prefix adder. A second Kogge-Stone tree, over whole
4-bit blocks, delivers the carry into every block at once.

The RTL is synthesizable SystemVerilog and purely combinational: no clock, no
reset, no state.

## Structure

```
csa_nomux_top (WIDTH bits, default 8)
 ├─ csa_group  ×(WIDTH/4)          one 4-bit block
 │   ├─ ks_adder (cin = 0)         Kogge-Stone adder → s0, cout0
 │   │   └─ ks_prefix              prefix tree
 │   └─ first_zero_logic           s0 (+1 if carry) → sum, cout, grp_p
 └─ fast_carry_ks                  carries into the blocks from (grp_g, grp_p)
     └─ ks_prefix
csa_pkg                            gp_t pair type and the prefix operator
```

| file | role |
|---|---|
| `rtl/csa_pkg.sv` | `gp_t` = {g, p} and `gp_combine`, the operator `(G,P)hi o (G,P)lo = (Ghi + Phi·Glo, Phi·Plo)` |
| `rtl/ks_prefix.sv` | Kogge-Stone tree of ⌈log2 N⌉ levels over N pairs; output i = combination of inputs i..0 |
| `rtl/ks_adder.sv` | Kogge-Stone adder with carry input (default 4 bits) |
| `rtl/first_zero_logic.sv` | flip-up-to-the-first-zero network (default 4 bits) |
| `rtl/csa_group.sv` | one block: `ks_adder` with cin tied to 0, then `first_zero_logic` |
| `rtl/fast_carry_ks.sv` | block-level carry network (default 2 blocks) |
| `rtl/csa_nomux_top.sv` | the complete adder |

Top-level ports: `a`, `b` (WIDTH), `cin` in; `sum` (WIDTH), `cout` out.

## The Kogge-Stone adder

Bit i forms `g = a&b` and `p = a^b`. The carry input is folded into bit 0
(`g0' = g0 | p0&cin`), so the prefix over bits i..0 *is* the carry into bit
i+1:

```
c1 = G0 + P0·cin
c2 = (G1 + P1·G0) + P1·P0·cin
c4 = (G3 + P3·G2) + P3·P2·(G1 + P1·G0) + P3·P2·P1·P0·cin
```

At level l of the tree every position i ≥ 2^l combines with position i−2^l.
Depth is log2(n). The operator count is about n·log2(n): fast, but the
largest of the prefix adders. Then `sum = p ^ c`. Inside a block the carry
input is tied to 0, which removes all the `cin` terms.

## The first zero finding logic

Given the block's carry-in-0 result `s0`/`cout0` and the block's actual carry
`cin`:

```
pp[0] = 1,      pp[i+1] = pp[i] & s0[i]       (all bits below i are 1)
t[i]  = cin & pp[i]                            (flip bit i)
sum   = s0 ^ t[3:0]
cout  = cout0 | t[4]                           (s0 was 1111 and cin = 1)
```

With `cin = 0` nothing flips and the Kogge-Stone result goes straight out.
With `cin = 1` the trailing ones and the first zero flip, which is exactly
`s0 + 1`. The carry passes serially through the AND chain. So the block's
output settles a few gate delays after its carry arrives, slightly later than
a multiplexer would allow. In exchange the block has far fewer gates than a
second adder plus a multiplexer.

## Block product terms and the fast carry network

This is the part that is easiest to get wrong. Each block hands two
carry-independent terms to the fast carry network:

* `grp_g`: `cout0`, the carry-in-0 adder overflowed. The block generates a
  carry whatever its input.
* `grp_p`: `pp[4]`, the AND of all four bits of `s0`. The AND chain forms this
  product anyway, before `cin` is applied.

`grp_p` is the true block propagate (all `a^b` bits set) even though it is
taken from the sum and not from the operands. For 4-bit operands, `s0 = 1111`
means `a+b` is 15 (no internal carry, so every bit propagates) or 31, and 31
cannot occur. When `grp_g` is 1, `grp_p` is always 0.

`fast_carry_ks` folds the adder's `cin` into block 0 and runs the same
Kogge-Stone tree over the block pairs. It yields `c[k+1] = G[k:0] + P[k:0]·cin`
for every block in log2(blocks) operator levels. `c[k]` drives block k's first
zero logic, and the last carry is the adder's `cout`. Each block also computes
its own carry out. An assertion in `csa_nomux_top` checks that it always
equals the network's carry. The local value is not otherwise used.

End-to-end critical path: the bit-level Kogge-Stone tree of one block, then
the block-level tree, then one block's AND chain and XOR.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `csa_nomux_top.WIDTH` | 8 | adder width, a positive multiple of `GROUP_W`; anything else stops elaboration |
| `csa_nomux_top.GROUP_W` | 4 | block width |
| `ks_adder.WIDTH`, `first_zero_logic.WIDTH`, `csa_group.WIDTH` | 4 | block width when used alone |
| `fast_carry_ks.NGROUPS` | 2 | number of blocks |

## What follows the original description and what was chosen here

Taken from the description of the design:
* the Kogge-Stone carry-in-0 adder;
* flipping up to the first zero through an AND network, in place of the
  carry-in-1 adder and the multiplexer;
* 4-bit blocks feeding product terms to a Kogge-Stone fast carry network.

Choices made here:
* **Width.** The description gives no adder width. Its carry equations run to
  C8, while its adder figure is labelled 4-bit. The default is 8 bits (two
  blocks), so the fast carry network has something to do. `WIDTH = 4` gives
  the single-block adder.
* **Product terms.** The block product terms are exactly the ones chosen
  above: `cout0` and the AND of `s0`.
* **Inclusive flip.** The first zero itself is flipped, and a flip that runs
  out of the top becomes the carry out.
* **Tree shapes.** The AND network is a linear chain, and the block-level
  tree is a full Kogge-Stone tree.

Not included: the carry select adder variants this design was compared
against. These are the ripple-carry-based adder, the Kogge-Stone adder with
an add-one (Excess-1) circuit and a multiplexer, and the FPGA's built-in
adder. The published results (about 5.1 mW and 9.0 ns on a Zynq device,
against 6.8 mW and 9.4 ns for the multiplexer version) are FPGA measurements.
This RTL has not been measured that way. The description also states, in one
place, that the multiplexer version is faster.

## Verification

Each testbench computes the expected result with plain integer arithmetic and
ends by printing `TB_RESULT checks=N failures=M`:

| testbench | what it covers |
|---|---|
| `tb_ks_adder` | every a, b, cin at 4 and 8 bits |
| `tb_first_zero_logic` | every s0, cout0, cin; `grp_p` |
| `tb_csa_group` | every a, b, cin; sum, carry, and the G/P product terms against their operand definitions |
| `tb_fast_carry_ks` | every g, p, cin for 2 and 5 blocks, against a block-by-block ripple |
| `tb_csa_nomux_top` | default 8-bit adder, all 2^17 input combinations |
| `tb_csa_nomux_wide` | 16- and 32-bit adders: corner cases and 200,000 random vectors, a quarter of them with forced all-propagate blocks |

`tb_csa_nomux_top` also counts how often each mechanism occurs and fails if
any count is zero:
* a block passing its sum unchanged;
* a flip that stops inside the block;
* a flip that runs out as a carry;
* a carry generated in block 0 and delivered by the network;
* `cin` carried across block 0 by its propagate term.

To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/csa_pkg.sv rtl/ks_prefix.sv rtl/ks_adder.sv rtl/first_zero_logic.sv \
  rtl/csa_group.sv rtl/fast_carry_ks.sv rtl/csa_nomux_top.sv \
  tb/tb_csa_nomux_top.sv --top-module tb_csa_nomux_top
./obj_dir/Vtb_csa_nomux_top
```

Each run takes well under a second. To try another width, override `WIDTH`
on the instance, as `tb_csa_nomux_wide` does.
