# Radix-16 sequential multiplier with carry-save accumulation

A sequential multiplier forms a product by adding one partial product per
clock cycle into a running sum. This one retires **four multiplier bits per
cycle** (one radix-16 digit), so an N x N product takes N/4 accumulation
cycles plus a single carry-propagate addition at the end: **N/4 + 1 cycles**,
9 for 32-bit operands. The running sum never goes through a carry-propagate
adder while it accumulates. It is kept in carry-save form, so the critical path
of an accumulation cycle is a short carry-save tree. The one slow addition
happens once, in the last cycle.

The RTL covers a whole family of such multipliers. Three parameters select a
point in it:

| parameter     | values                       | default   | what it changes |
|---------------|------------------------------|-----------|-----------------|
| `N`           | 32, 64, 128 (any multiple of 4 works) | 32 | operand width |
| `PPR_RADIX`   | 2, 4, 16                     | 16        | width of the carry chains in the reduction CSAs, hence how many carry bits the accumulator stores (N, N/2, N/4) and what is left for the early output adder |
| `FINAL_ADDER` | `ADD_KS`, `ADD_SK`, `ADD_BK`, `ADD_CLA`, `ADD_CSL` | `ADD_CLA` | architecture of the final adder |

Together these give 45 configurations. The default is radix-16 carry-save
adders with a carry look-ahead final adder. This pairing dissipates the least
power of the family, and at 128 bits it also uses the least energy. It is not
the fastest. Its clock period is set by the 4-bit carry chains of the
reduction CSAs, not by the final adder, so the final adder can be the slow,
frugal CLA at no cost in speed.

## One multiplication, cycle by cycle

```
 edge 0        start sampled: X, Y loaded, Sum/Carry/F cleared
 edges 1..N/4  one digit Y[3:0] per edge:
                 PPG -> reduction tree -> Sum, Carry, F registers
                 4 finished product bits shift into the low product half
                 Y shifts right by 4
 edge N/4+1    final adder: Sum + Carry + F -> high product half
               done is high in the following cycle; product holds
```

Each accumulation cycle:

1. The **partial product generator** (`ppg`) forms four components,
   `Y[k] ? X<<k : 0` for k = 0..3. Their sum is `digit * X`. It never
   builds 3X, 5X and so on: only the shifts X, 2X, 4X and 8X, each gated by
   one digit bit.
2. The **reduction tree** (`ppr_tree`) adds those four components to the
   accumulator. The accumulator is held as a sum vector and a sparse carry
   vector.
3. The result is one digit wider than the accumulator. Its lowest 4 bits can
   no longer change, because every later partial product enters 4 bits
   higher. The **early output adder** (`early_out_adder`) resolves them into
   binary and they go to the low half of the product. The rest, shifted right
   by 4 bits, becomes the next cycle's accumulator.

## Carry-save adders with sparse carries

This is the part that distinguishes the three radices, and the part to read
carefully before changing anything.

A `radix_csa` adds a plain binary vector `a` to a redundant operand. The
redundant operand is a full sum vector `s` plus a carry vector `c` with **one
bit per group of g bits**, where g = log2(radix):

```
for each group j (bits g*j+g-1 .. g*j):
    {c_out[j], s_out[group]} = a[group] + s[group] + c[j]
    c[j]     has weight 2^(g*j)       (lowest bit of group j)
    c_out[j] has weight 2^(g*(j+1))   (lowest bit of group j+1)
```

- **g = 1 (radix 2):** an ordinary row of full adders. The carry vector is as
  wide as the sum.
- **g = 2 (radix 4):** 2-bit adders, one carry every second bit. The carry
  chain is 2 bits long.
- **g = 4 (radix 16):** 4-bit adders, one carry every fourth bit. The carry
  chain is 4 bits long.

The output has the same form as the input. That makes the CSAs chainable, and
it makes the Carry register N/g bits wide. Larger g means fewer carry
flip-flops and a sparser second operand for the final adder, which costs less
area and power. It also means a longer carry chain inside each CSA. Groups
start at bit 0.

`ppr_tree` chains them as follows:

```
  pp1, pp2, pp3 --> plain radix-2 CSA --> t_s (sum), t_c (carry, shifted left 1)
  (acc_s, acc_c) + pp0  --> radix-g CSA #1 --> (s1, c1)
  (s1, c1)       + t_c  --> radix-g CSA #2 --> (s2, c2)      F enters here (radix 4)
  (s2, c2)       + t_s  --> radix-g CSA #3 --> (s_out, c_out)
```

Between stages, carry j of one CSA becomes carry j+1 of the next, because the
weights line up. This leaves the lowest carry input of CSAs #2 and #3 free.

**Widths.** The tree is N+4 bits wide. The accumulator value is always below
2^N, and one digit adds less than 15 * 2^N, so every intermediate value is
below 2^(N+4). All vectors are non-negative and their total is exact, so the
carries that fall off the top are provably zero. The final adder checks the
same fact with an assertion (`a_no_overflow`).

## The four finished bits and the flip-flop F

After CSA #3 the carries have weights g, 2g, 3g, ... The ones below 2^4 still
have to be added into the 4 finished bits:

- **radix 16:** no carry has a weight below 16. The 4 low sum bits are final
  as they stand, so the early output adder is just wires.
- **radix 4:** one carry, of weight 4. Bits 1:0 are final. A **2-bit adder**
  adds that carry to bits 3:2.
- **radix 2:** carries of weight 2, 4 and 8. A **4-bit adder** is needed.

In the last two cases the adder can carry out (weight 16). That bit is saved
in the flip-flop **F** and added back in the next cycle at weight 1:

- **radix 2:** F is the 4-bit adder's carry-in, since that adder covers bit 0.
- **radix 4:** the 2-bit adder starts at bit 2, so it cannot take F. F enters
  the free lowest carry input of CSA #2 instead.
- **all radices:** after the last digit, F is the final adder's carry-in.

The two reduction-tree choices are linked. With the plain CSA's sum vector fed
to CSA #3, the weight-4 carry can actually be 1. If the two plain-CSA outputs
were swapped, bits 0 and 1 of the carry vector would always be 0, and for
radix 4 the 2-bit adder would never see a carry.

## Final adder

The upper product half is `Sum + Carry + F`. `Carry` is expanded to N bits
with zeros between its sparse bits, and F goes in as the carry-in.
`final_adder` instantiates one of:

| module      | architecture | notes |
|-------------|--------------|-------|
| `adder_ks`  | Kogge-Stone prefix | log2 N levels, about N cells per level: fastest, most power |
| `adder_sk`  | Sklansky prefix | log2 N levels, fan-out doubling per level |
| `adder_bk`  | Brent-Kung prefix | up-sweep plus down-sweep, about 2N cells: smallest prefix adder |
| `adder_cla` | carry look-ahead, blocking factor 4 | 4-bit look-ahead units applied over ceil(log4 N) levels; the width is padded to a power of 4 |
| `adder_csl` | carry select | 4-bit blocks (`BLOCK`), each with two ripple adders and a mux |

The zero bits of the sparse operand are left for synthesis to propagate; the
adders themselves are generic. The final adder gets a whole clock cycle of its
own. That is why the latency is N/4 + 1 and not N/4. The clock period then has
to cover the longer of one reduction cycle and one final addition.

## Interface and timing (`radix16_seq_mult`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock, rising edge |
| `rst_n`   | in  | 1     | asynchronous active-low reset |
| `start`   | in  | 1     | sampled while `busy` is low: load `x`, `y` and begin |
| `x`, `y`  | in  | N     | unsigned multiplicand and multiplier |
| `busy`    | out | 1     | high from the edge after `start` until the product is written |
| `done`    | out | 1     | one-cycle pulse, N/4+1 edges after the edge that accepted `start` |
| `product` | out | 2N    | `x * y`, valid from `done` until the next operation starts |

`start` is ignored while `busy` is high, and so are changes of `x` and `y`.
A new operation may start in the same cycle that `done` is high. The operands
are unsigned.

## Files

| file | contents |
|------|----------|
| `rtl/r16_mult_pkg.sv` | `adder_e` enum, `radix_bits()` |
| `rtl/radix16_seq_mult.sv` | top: registers, wiring, overflow assertion |
| `rtl/mult_ctrl.sv` | idle / N/4 digit cycles / final cycle sequencer |
| `rtl/mplier_reg.sv` | multiplier register, one digit per cycle |
| `rtl/csa_acc_reg.sv` | Sum, Carry and F registers with the 4-bit re-alignment |
| `rtl/product_reg.sv` | lower-half shift register, upper-half register |
| `rtl/ppg.sv` | partial product generator |
| `rtl/radix_csa.sv` | radix-2/4/16 carry-save adder |
| `rtl/ppr_tree.sv` | plain CSA + three radix-g CSAs |
| `rtl/early_out_adder.sv` | 4-bit / 2-bit / no early output adder |
| `rtl/final_adder.sv` | final adder selection |
| `rtl/adder_{ks,sk,bk,cla,csl}.sv` | the five adders |

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/r16_mult_pkg.sv \
    tb/tb_radix16_seq_mult.sv --top-module tb_radix16_seq_mult
./obj_dir/Vtb_radix16_seq_mult
```

- **`tb_radix16_seq_mult`:** the multiplier at its default parameters. It runs
  about 3000 products against `x*y`: corners, random operands, back-to-back
  starts, and starts or operand changes while busy. Every latency must be
  exactly 9 cycles. It also counts a non-zero Carry register at the final
  addition and a carry rippling through the final adder.
- **`tb_design_space`:** all 45 configurations side by side, 2000 random
  products each. It checks the result and the latency (9, 17 or 33 cycles).
  For radix 2 and 4 it checks that F was set at least once. About 20 s of
  simulation; compiling it takes about 30 s.
- **Block testbenches:** `tb_ppg`, `tb_radix_csa` (group sums and value
  preservation for all radices), `tb_ppr_tree` (value preservation including
  F), `tb_early_out_adder` (exhaustive), `tb_final_adder`,
  `tb_adder_{ks,sk,bk,cla,csl}` (N = 13, 32, 64, 128, ripple patterns from
  every bit), `tb_mult_ctrl` (cycle-exact control sequence), `tb_csa_acc_reg`,
  `tb_mplier_reg`, `tb_product_reg` (against reference models of the
  registers).

## What comes from the architecture and what is chosen here

These come from the architecture:

- a radix-16 digit per cycle;
- the four gated multiples 1X, 2X, 4X, 8X;
- a plain CSA plus three radix-g CSAs, with a 4-bit shift of Sum and Carry;
- the 2-bit-per-group and 4-bit-per-group CSAs, with N/2 and N/4 carry bits;
- a 4-bit early adder for radix 2, a 2-bit one for radix 4 and none for
  radix 16;
- the flip-flop F;
- the five final adder types, including the CLA's blocking factor of 4;
- N/4 + 1 cycles per product.

These are this implementation's choices:

- the start/busy/done handshake and the asynchronous reset;
- unsigned operands only;
- the N+4-bit internal width;
- which partial product component and which plain-CSA output goes into which
  CSA;
- groups aligned to bit 0;
- for radix 4, F re-entering at CSA #2 rather than at the 2-bit adder;
- the final addition registered in its own cycle;
- the hierarchical arrangement of the CLA's 4-bit look-ahead units;
- the 4-bit block size of the carry select adder;
- a separate low-product shift register rather than reusing the Y register.

Delay, power, energy and area depend on the technology library and synthesis
constraints. None of them are reproduced here. For orientation only: in a
45 nm synthesis of this architecture at its default configuration, the
reported latency was about 8.6 ns (32 bit), 16 ns (64 bit) and 33 ns
(128 bit). That is roughly one clock period of 0.95-1.0 ns per cycle.
