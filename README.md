# 64-bit multiply-accumulate unit with a Vedic multiplier and reversible-gate Kogge-Stone adders

This is a multiply-accumulate (MAC) unit. On each clock it can compute

    acc <- acc + x*y      or      acc <- acc - x*y

with 64-bit unsigned operands and a 128-bit accumulator. Two ideas shape the design:

* **The multiplier uses the Urdhva-Tiryakbhyam ("vertically and crosswise") method.**
  Each operand is split into halves, and the four half-size products are formed at once.
  Adders then merge them. No partial products are shifted and summed one after another.
  The same split is applied again to each half, down to 2-bit pieces.
* **Every adder is a Kogge-Stone parallel-prefix adder built from reversible logic gates**
  (Peres, Toffoli and Feynman gates). This holds for the adders inside the multiplier and for
  the accumulate adder/subtractor.

All of the RTL is synthesizable SystemVerilog (IEEE 1800-2017) and can be simulated with plain
Verilator.

## Dataflow and timing

```
 x[63:0] y[63:0]
    |       |
 +--v-------v--+   vedic_mult: combinational 64x64 -> 128
 | Multiplier  |
 +------+------+
 | Product reg |   product_reg: product + {valid, clr, op}
 +------+------+
        |   +-------------------------+
 +------v---v--+                      |
 |   ADD\SUB   |   add_sub: 128-bit   |
 +------+------+   Kogge-Stone        |
        |                             |
 +------v------+                      |
 | Accumulator |---> acc[127:0] ------+
 +-------------+
```

The unit is a two-stage pipeline:

1. An operation is sampled on rising edge *t* (`in_valid` = 1, plus `x`, `y`, `sub` and `clr`).
   At that edge the product register captures `x*y` and the control bits.
2. On edge *t+1* the accumulator loads `acc ± product`. `acc_valid` is 1 in the cycle after
   each update of `acc`.

A new operation can be issued on every clock. Back-to-back operations need no forwarding,
because the accumulator feeds the adder directly.

The control inputs work as follows:

| `in_valid` | `clr` | `sub` | effect on `acc` (one clock later than the product register) |
|---|---|---|---|
| 1 | 0 | 0 | `acc + x*y` |
| 1 | 0 | 1 | `acc - x*y` |
| 1 | 1 | 0/1 | starts a new sum: `+x*y` or `-x*y` |
| 0 | 1 | – | `0` |
| 0 | 0 | – | holds; `acc_valid` = 0 |

The accumulator wraps modulo 2^128. It has no guard bits and no overflow flag. A subtraction
that goes below zero leaves the two's-complement value. `rst_n` is asynchronous and active
low, and it clears the accumulator and the pipeline.

## The recursive Vedic multiplier (`vedic_mult`)

For an N-bit multiply, write A = {A_M, A_L} and B = {B_M, B_L}, with H = N/2 bits per half.
Four half-size multipliers run in parallel:

| instance | product | width |
|---|---|---|
| `u_m0` | A_L × B_L | N |
| `u_m1` | A_M × B_L | N |
| `u_m2` | A_L × B_M | N |
| `u_m3` | A_M × B_M | N |

Three Kogge-Stone adders then merge these four products:

| adder | width | computes |
|---|---|---|
| `u_k1` | N | t1 = m1 + m2, with the carry kept as bit N |
| `u_k2` | N+1 | t2 = t1 + m0[N-1:H] |
| `u_k3` | N | hi = m3 + t2[N:H] |

The product is assembled as:

    P[2N-1:N]  = hi
    P[N-1:H]   = t2[H-1:0]
    P[H-1:0]   = m0[H-1:0]

The low half of A_L×B_L goes straight to the output. The middle bits come from the crosswise
sum. The top half is the vertical product of the high halves plus everything that carries
into it. The carry outs of `u_k2` and `u_k3` are always 0. Lint reports them as unused, and
that is expected.

Each `u_m*` is again a `vedic_mult` of half the width. The recursion ends at `vedic_mult_2x2`,
which applies the same method to single bits:

* s0 = a0·b0
* s1 = a1·b0 ⊕ a0·b1
* s2 and s3 add a1·b1 to the crosswise carry

At N = 64 there are five levels of recursion. That makes 1024 leaf multipliers and 341
split nodes. Each split node has three adders, 4 to 65 bits wide. N must be a power of two;
elaboration stops with an error otherwise.

The multiplier is purely combinational. Its depth is about log2(N) adder stages, and each
adder has log2(width) prefix levels. No timing-driven pipelining is done inside it. The only
register between the operands and the accumulator is the product register.

## The Kogge-Stone adder in reversible gates (`ksa_adder`)

A W-bit adder has three stages:

1. **Generate/propagate.** For each bit, a Peres gate with its third input tied to 0 acts as a
   half adder: p_i = a_i ⊕ b_i and g_i = a_i·b_i. A second Peres gate merges the carry in into
   bit 0: G_0 = g_0 ⊕ p_0·cin.
2. **Prefix tree.** There are ⌈log2 W⌉ levels. At level k, each bit i ≥ 2^k combines its
   group with the group 2^k places below it:
   * G = G_hi ⊕ (P_hi · G_lo), using a Peres gate.
   * P = P_hi · P_lo, using a Toffoli gate with its third input at 0.

   Bits below 2^k pass through unchanged. After the last level, G_i is the carry out of bit i.
3. **Sum.** s_i = p_i ⊕ c_(i−1), using a Feynman gate, with c_(−1) = cin. `cout` is the carry
   out of bit W−1.

Two facts make the XOR form in stage 2 correct:

* The usual generate merge is an OR. Here it is written as an XOR, so it fits the Peres gate.
* This is exact because propagate is defined as XOR. A group can then never both generate and
  propagate, so the two OR terms are never 1 together.

Worked 4-bit example: 1011 + 1100 with cin = 0 gives S = 0111 and cout = 1. The testbench
checks this case.

Each reversible gate has pass-through outputs that the adder does not use (so-called garbage
outputs). They are wired to `unused_*` nets, and Verilator's `-Wall` lint reports them as
unused signals.

The add/subtract unit (`add_sub`) uses a 128-bit `ksa_adder`. Each bit of the product passes
through a Feynman gate whose control is the subtract select. The same select drives the carry
in, so subtraction is ordinary two's complement.

## What is specified and what was chosen here

These parts follow the source design:

* the MAC structure (multiplier, product register, add/subtract, accumulator fed back to the
  adder);
* the equation X ← X + Y·Z, with a subtract mode;
* 64-bit operands;
* the split of each operand into most and least significant halves;
* a 32-bit multiplier made from four 16-bit ones and three Kogge-Stone adders, with the bit
  ranges given above;
* the three stages of the Kogge-Stone adder;
* the rule that the adder is made of reversible gates.

These are choices made in this implementation:

* **Which reversible gates are used.** No gate types are named for the adder, so Peres,
  Toffoli and Feynman gates were chosen as described above.
* **Multiplier structure.** The split is applied recursively down to a 2×2 leaf, and the leaf
  uses ordinary AND/XOR gates.
* **Word widths and signedness.** The accumulator is 128 bits (2N) with wrap-around, and the
  operands are unsigned.
* **Control.** The `clr`, `in_valid`/`acc_valid` handshake and the `sub` select are local
  choices.
* **Reset.** The reset is asynchronous and active low.
* **Pipeline.** There are two stages: the product register, then the accumulator.

No latency, clock rate or area target was given, so none is claimed. The reversible gates are
logical models only. Synthesis maps them to ordinary AND/XOR logic, and nothing here models
the power of a reversible or quantum implementation.

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | `MAC_N` = 64, `op_e` (add/sub), `mac_ctrl_t` (valid, clr, op) |
| `rtl/mac_top.sv` | the MAC unit (top) |
| `rtl/vedic_mult.sv` | recursive N×N Vedic multiplier |
| `rtl/vedic_mult_2x2.sv` | 2×2 leaf multiplier |
| `rtl/ksa_adder.sv` | W-bit Kogge-Stone adder from reversible gates |
| `rtl/add_sub.sv` | 2N-bit add/subtract unit |
| `rtl/product_reg.sv` | product register with control word |
| `rtl/accumulator.sv` | accumulator register |
| `rtl/peres_gate.sv`, `rtl/toffoli_gate.sv`, `rtl/feynman_gate.sv` | reversible gates |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

Parameters:

* `mac_top #(.N(...))` sets the operand width. It defaults to 64, and any power of two ≥ 2
  works; the multiplier, product register, adder and accumulator follow at 2N.
* `vedic_mult` has its own `N` parameter.
* `ksa_adder` has its own `W` parameter.

## Verification

Every testbench is self-checking. It compares against the simulator's own integer arithmetic
and ends by printing `TB_RESULT checks=<n> failures=<n>`. Each one has a watchdog.

* **`mac_top_tb`** runs the unit at its default 64-bit size. It covers:
  * the one-clock latency from the product register to `acc`;
  * a directed dot product (Σ i·(i+8) for i = 1..8 = 492, then −7·7 = 443);
  * 500 operations with 32-bit operands;
  * 20 000 random cycles with a reset in the middle.

  It compares `acc` and `acc_valid` every cycle with a cycle-accurate model. It also counts
  how often each mechanism happens, and counts a failure if any never happens:
  * add, subtract;
  * clear with and without an operation;
  * idle cycles and back-to-back issue;
  * wrap-around above 2^128 and below zero;
  * reset.
* **`vedic_mult_tb`** checks N = 4 and 8 exhaustively. It checks N = 16 and 32 with corner
  and random operands. The 64-bit multiplier is tested inside the MAC by `mac_top_tb`, which
  keeps this testbench's build time down.
* **`ksa_adder_tb`** checks W = 4 exhaustively, including the worked example. It checks W = 16
  and 129 with random operands and with operands that carry through every bit.
* **`add_sub_tb`** checks both modes at 128 bits, including wrap-around.
* **The register and gate testbenches** check reset, load and hold, or all input patterns and
  that each gate's mapping is one-to-one.

To simulate one testbench with Verilator, for example the top:

```
verilator --binary --timing --assert --top-module mac_top_tb \
  -y rtl -y tb +libext+.sv -Irtl rtl/mac_pkg.sv tb/mac_top_tb.sv
./obj_dir/Vmac_top_tb
```

Replace `mac_top_tb` with any other `*_tb` to run that testbench instead. The full-size top
testbench simulates in a few seconds, but Verilator needs a few minutes to compile the
flattened 64-bit multiplier.

Lint notes for `verilator --lint-only -Wall`:

* The reversible gates' pass-through outputs are reported as unused signals, and so are the
  multiplier's always-zero carry outs.
* When `vedic_mult` itself is linted as the top module, Verilator reports its four
  sub-products as undriven. This comes from how Verilator handles a self-instantiating module
  at the top. It does not appear when the multiplier sits under `mac_top` or a testbench, and
  the simulations there confirm every product.
