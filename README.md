# Fast adders without dedicated carry logic

An adder is as slow as the path a carry can take from the least significant bit
to the most significant one. This RTL holds five 32-bit adders that compute the
same thing, `{cout, s} = x + y + cin`, and differ only in how the carry gets
across the word:

| Adder | Module | How the carry travels |
|---|---|---|
| Ripple-carry | `ripple_carry_adder` | bit by bit through N full adders |
| Carry-skip, equal blocks | `carry_skip_adder` | ripples inside a block, jumps over whole blocks that propagate |
| Carry-skip, variable blocks | `carry_skip_var_adder` | as above, block sizes 1,3,5,7,7,5,3,1 |
| Carry-skip with carry-strength blocks ("CKP") | `carry_skip_ckp_adder` | as carry-skip, but a carry that ends inside a block reaches every sum bit through one multiplexer |
| Lynch-Swartzlander hybrid carry-look-ahead | `lynch_swartzlander_adder` | a carry tree computes only the carries into bits 8, 16 and 24; the sums come from 8-bit carry-select slices |

The adders come from a study of full-custom adder techniques mapped onto
Xilinx XC4000E FPGAs without the chips' dedicated carry logic. That study
measured each style at 16, 32 and 64 bits against plain ripple-carry and the
synthesis tool's own library adder. The RTL here is written as generic logic:
no vendor primitive and no `+` operator inside the adders. The point is to
see what each carry structure costs and gains on its own.

All blocks are purely combinational. There is no clock, no reset and no
register. Each output is valid once the slowest carry path has settled.

## Shared conventions

Every adder has the ports `x`, `y` (N bits), `cin`, `s` (N bits) and `cout`.
Bit 0 is the least significant bit. Two per-bit signals appear throughout:

* propagate `p = x ^ y`: the bit passes an incoming carry on;
* generate `g = x & y`: the bit makes a carry by itself.

`adder_pkg` defines `pg_t`, a (p, g) pair that describes a span of bits. It also
defines `pg_combine(hi, lo)`, the usual prefix operator
(`g = hi.g | hi.p & lo.g`, `p = hi.p & lo.p`). Only the carry tree uses them.

## Ripple-carry

`ripple_carry_adder #(N)` is a chain of `full_adder` cells. It is the smallest
adder here. Its delay is N carry stages. The other adders also use it as their
building block: as the first block of a carry-skip adder, inside each skip
block, and as the 8-bit slice adders of the carry-select stage.

## Carry-skip with equal blocks

`carry_skip_adder #(N, K)` cuts the word into M = N/K blocks:

```
   cin -> [blk 0: K-bit RCA] -> bc1 -> [blk 1] -> mux -> bc2 -> [blk 2] -> mux -> ... -> cout
                                         |  dont_skip ^              |  dont_skip ^
                                         +-- bc1 --- mux input 0     +-- bc2 --- mux input 0
```

* Block 0 is a plain K-bit ripple adder.
* Every higher block is a `skip_block`. It ripples its own carry and also
  outputs `dont_skip = ~&(x ^ y)`, which is low when every bit of the block
  propagates.
* A 2:1 multiplexer after each higher block passes on the rippled carry-out
  when `dont_skip` is 1. When it is 0, the multiplexer passes the block's
  carry-in, skipping the block.

Both choices give the same logical value. The multiplexer only shortens the
path. `dont_skip` depends on the operands alone, so it is ready long before the
carry arrives.

In units of one carry stage, with a multiplexer counted as 0.5, the worst case
has three parts:

* the carry rises in the first block and ripples out of it: K-1;
* it crosses the middle blocks through their multiplexers: about M-2;
* it ripples into the last block: K-1.

That totals about `2K + N/K - 3.5`. The minimum is at `K = sqrt(N/2)`, which
gives `2*sqrt(2N) - 3.5`. For N = 32 the best K is 4. The default is K = 8,
the block size used for the main 32-bit comparison.

## Carry-skip with variable blocks

Equal blocks waste time. The blocks in the middle finish rippling early and
then wait for the skipped carry. `carry_skip_var_adder` uses short blocks at
both ends and long ones in the middle. The 32-bit arrangement is:

```
bits:   0 | 1-3 | 4-8 | 9-15 | 16-22 | 23-27 | 28-30 | 31
size:   1 |  3  |  5  |  7   |   7   |   5   |   3   |  1
```

Each of the first seven blocks is a `skip_block` followed by a skip
multiplexer. The last block (bit 31) is a plain ripple adder whose carry-out
is `cout`. With sizes that step by one stage from block to block, the worst
case drops to about `2*sqrt(N) - 2.5` stages. For large N that is roughly 1.4
times faster than with equal blocks.

`SIZES` is an unpacked parameter array. Its entries must add up to `N`;
elaboration stops with `$error` if they do not.

## Carry-skip with carry-strength (CKP) blocks

This is the least obvious block in the set. In a normal carry-skip adder, a
long carry that arrives at its last block must still ripple through that block
before the upper sum bits are valid. The CKP block removes that final ripple.
For every bit position k it decides early whether the carry into k comes from
the block's carry-in or is produced inside the block. A late carry-in then
reaches every sum bit through a single multiplexer.

`ckp_block #(K)`, per bit i:

```
e[i]   = ~(x[i] ^ y[i])          // bit does not propagate: it generates (x=y=1) or kills (x=y=0)
c[0]   = cin
c[i+1] = e[i] ? x[i] : c[i]       // multiplexer ripple: a non-propagating bit forces its own carry x[i]
cs[1]  = e[0]
cs[i+1]= cs[i] | e[i]             // carry-strength: some bit below i+1 in the block does not propagate
cc[k]  = cs[k] ? c[k] : cin       // for k >= 2; cc[0] = cin, cc[1] = c[1]
s[k]   = ~(e[k] ^ cc[k])          // = x ^ y ^ carry
cout      = c[K]
dont_skip = cs[K]
```

Why this helps:

* `e`, `cs` and the internally decided part of `c` depend only on `x` and
  `y`, so they all settle during setup.
* If `cs[k] = 1`, the carry into k was fixed by a lower bit of the same block
  and does not depend on `cin`.
* If `cs[k] = 0`, every bit below k propagates and the carry into k is `cin`,
  taken straight through the `cc` multiplexer.

When the long-range carry arrives, each sum bit is therefore one multiplexer
and one XNOR away. `dont_skip` is simply the carry-strength of the whole block.
That is exactly the skip condition.

`carry_skip_ckp_adder #(N, K)` has the same arrangement as the equal-block
carry-skip adder: a plain ripple first block, then `ckp_block`s with skip
multiplexers.

## Lynch-Swartzlander: carry tree plus carry-select

`lynch_swartzlander_adder` (32 bits, fixed) never propagates a carry backwards
and never ripples more than 8 bits.

**Carry tree (`ls_carry_tree`).** It is built from `ls_group4` nodes. Each
node takes four (p, g) pairs and returns the prefix pairs of spans 1:0, 2:0
and 3:0. The bottom node also takes `cin`.

```
level 1   8 nodes, one per 4-bit group (bits 3..0 node takes cin -> its 3:0 output is c4)
level 2   lower node over groups 3..0:  1:0 output = c8,   3:0 output = c16
          upper node over groups 7..4:  spans 23..16, 27..16, 31..16
level 3   node with inputs (31..16, 27..16, 23..16, c16):
                                        1:0 output = c24,  3:0 output = c32 = cout
```

Each carry passes through at most three nodes.

**Sum slices.** In parallel with the tree:

* `s[7:0]` comes from an 8-bit ripple adder fed by `cin`.
* Each higher byte is computed twice, by two 8-bit ripple adders with
  carry-in 1 and carry-in 0.
* A multiplexer picks one of the two by `c8`, `c16` or `c24`.

The adder's delay is the slower of the tree and one 8-bit ripple, plus one
multiplexer. It is also the largest adder here: it has seven 8-bit adders.

## The top: `adder_suite`

`adder_suite #(N = 32, K = 8)` instantiates all five adders side by side, each
with its own ports (`rca_*`, `csk_*`, `csv_*`, `ckp_*`, `ls_*`), so each can be
placed and timed separately. `N` and `K` reach the ripple, equal-block skip and
CKP adders. The variable-block and Lynch-Swartzlander adders are fixed at 32
bits.

## Sizes and configurations

The defaults, N = 32 and block size 8, are the main configuration of the
comparison. The study also measured these configurations:

* 16 bits: ripple, carry-skip with 4- or 8-bit blocks, CKP with 4- or 8-bit
  blocks, Lynch-Swartzlander.
* 32 bits: the above with 8- or 16-bit blocks.
* 64 bits: carry-skip with 8-, 16- or 32-bit blocks, CKP with 8- or 16-bit
  blocks.

The parameterised adders cover all of these through `N` and `K`. The
testbenches simulate every one of those sizes. Only 32-bit versions exist of
the variable-block adder and of the Lynch-Swartzlander carry tree, because only
32-bit versions of them are specified.

The reported FPGA results are worth knowing before using these adders on an
FPGA. Without the dedicated carry chain, routing delay dominates. The fast
styles gained at most about a quarter over ripple-carry and were often slower.
The library adder, which does use the carry chain, was the fastest and by far
the smallest in every case. In full-custom CMOS the same structures run about
1.8 (carry-skip) to 3.9 (Lynch-Swartzlander) times faster than ripple-carry.

## Where this RTL makes its own choices

* **Full adder and ripple adders inside.** The full adder is the textbook
  majority/XOR cell. The "8-bit adders" of the carry-select slices are ripple
  adders.
* **Carry-tree nodes.** Only the inputs and outputs of a node are specified.
  Inside, each node is a serial chain of three prefix operators. `c16` enters
  the level-3 node as a generate with propagate 0.
* **First block of the carry-skip adders.** It has no skip multiplexer. One
  32-bit drawing of the equal-block adder shows a multiplexer there too. The
  sum is the same either way; only the worst-case path changes slightly.
* **Bits 0 and 1 of the CKP block.** They use `cin` and `c[1]` directly, with
  no `cc` multiplexer, as the reference 8-bit block does.
* **No timing.** The RTL carries no delay information. Speed comparisons need
  synthesis and place-and-route. Keep hierarchy and prevent logic
  re-optimisation if the carry structures are to survive. A synthesis tool
  that recognises an adder may rebuild it.
* **Not included.** The vendor library adder that served as the reference is
  not included.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Every testbench
compares against integer addition, or, for the tree node, against a bit-by-bit
definition. Each one prints `TB_RESULT checks=N failures=M` and has a
watchdog. Coverage:

* The full adder, the 8-bit ripple adder, the 8-bit skip block and the 8- and
  4-bit CKP blocks are checked exhaustively.
* Wider adders get corner cases and 20,000 random vectors per instance. Half of
  the vectors use `y = ~x` with one bit flipped, so that long carries cross
  many blocks.
* The carry-skip testbenches count how often a carry of 1 actually skipped a
  block, and fail if it never did.
* `tb_adder_suite` runs all five adders at their default sizes with 30,000
  vectors. It counts each carry mechanism: full-length ripple, skip in each
  skip adder, a CKP sum bit fed directly by the block carry-in, and
  carry-select choosing each of its two sums. It fails if any of them never
  occurred.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/adder_pkg.sv tb/tb_adder_suite.sv \
          --top-module tb_adder_suite -Mdir obj && ./obj/Vtb_adder_suite
```

Replace `tb_adder_suite` with any other testbench name. `-Irtl` lets Verilator
find each module in `rtl/<module>.sv`. Every testbench finishes in well under a
second.
