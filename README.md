# 16-bit multiply-accumulate unit on a Vedic (Urdhva Tiryakbhyam) multiplier

This design is a multiply-accumulate (MAC) unit for 16-bit unsigned operands. Each
clock it multiplies a new pair of operands and adds the 32-bit product to a 64-bit running
sum. The multiplier is built with the "vertical and crosswise" scheme of Vedic
arithmetic:

- an NxN product is split into four (N/2)x(N/2) products;
- those are computed in parallel;
- a fixed addition tree of three adders and a half adder joins them.

The split repeats down to 2x2 multipliers. That makes the multiplier a regular hierarchy
(2x2 -> 4x4 -> 8x8 -> 16x16) in which every level looks the same.

## Datapath of the MAC unit (`vedic_mac16`)

```
 data_a[15:0]   data_b[15:0]
      |              |
  [Data A reg]   [Data B reg]        data_reg, 16 bit
       \            /
        vedic_mul16                  combinational 16x16 -> 32
             |
      [Multiply out reg]             data_reg, 32 bit
             |
      +--> (+) cla_adder 64 bit
      |      |
      |  [Data out reg]              64 bit, part of mac_accumulator
      |      |
      +------+----> data_out[63:0]
```

- **Throughput:** one product is accumulated every clock. There is no enable or valid
  signal: the unit accumulates whatever is on `data_a`/`data_b` at every rising edge.
- **Latency:** operands applied before rising edge *k* are held in the operand registers
  after edge *k*. Their product is in the Multiply out register after edge *k+1*. It is
  included in `data_out` after edge *k+2*. So a product reaches `data_out` on the third
  rising edge, counting the edge that loads its operands as the first.
- **Reset:** `rst` is synchronous and active high. It clears all four registers, so the
  sum starts at zero. Products already in the pipeline are discarded too.
- **Overflow:** the 64-bit sum wraps modulo 2^64. The worst-case product is
  ffff x ffff = fffe0001. About 2^32 of those fit before the sum wraps.

If you keep applying ffff, ffff, `data_out` reads 0, 0, then 00000000fffe0001,
00000001fffc0002, 00000002fffa0003, and so on, one step per clock.

## The Vedic multiplier

### 2x2 leaf (`vedic_mul2`)

For A = (a1 a0) and B = (b1 b0):

- s0 = a0·b0;
- a0·b1 + a1·b0 goes through a half adder. Its sum is s1.
- That carry plus a1·b1 goes through a second half adder. Its sum is s2 and its carry is s3.

Bit products are AND gates. There are no other adders.

### NxN from four (N/2)x(N/2) blocks (`vedic_mul4`, `vedic_mul8`, `vedic_mul16`)

With H = N/2, split a = {aH, aL} and b = {bH, bL}:

| partial product | operands   | position in a·b |
|-----------------|------------|-----------------|
| q0              | aL · bL    | weight 1        |
| q1              | aH · bL    | weight 2^H      |
| q2              | aL · bH    | weight 2^H      |
| q3              | aH · bH    | weight 2^N      |

Each q is N bits wide.

### Addition tree (`vedic_add_tree`)

This is the part that needs the most care. The tree does not add the four partial
products in general. It relies on their alignment:

```
 product bits:   [2N-1 : N+H]       [N+H-1 : H]                  [H-1 : 0]
                 Adder 3            Adder 2                      q0[H-1:0]
                 q3[N-1:H]          (q2 + q1)  (Adder 1)
                 + {0..0, hc, hs}   + {q3[H-1:0], q0[N-1:H]}
```

1. **Adder 1:** q1 and q2 have the same weight, so Adder 1 adds them directly
   (N bits, carry c1).
2. **Adder 2:** the sum from Adder 1 is added to an N-bit word with the same weight,
   2^H. That word is the low half of q3 placed above the high half of q0. Adder 2's
   N-bit sum is product bits [N+H-1:H], and its carry is c2.
3. **Half adder:** c1 and c2 both have weight 2^(N+H). The half adder adds them into a
   two-bit number {hc, hs}.
4. **Adder 3:** it adds {hc, hs} to the high half of q3, giving product bits
   [2N-1:N+H]. Adder 3 is H bits wide, so {hc, hs} is padded with H-2 zeros: none at
   N = 4, two at N = 8 and six at N = 16.
5. **Low bits:** the low half of q0 goes straight to product bits [H-1:0].

Adder 3's carry out is always zero, because the product of two N-bit numbers fits in 2N
bits. It is left unused, which is why lint reports an unused signal there.

Worked example at N = 4, for 1101 x 1010:

- The partial products are q0 = 0010, q1 = 0110, q2 = 0010 and q3 = 0110.
- Adder 1 gives 1000 with carry 0.
- Adder 2 adds 1000 + 1000 and gives 0000 with carry 1.
- The half adder gives {0, 1}.
- Adder 3 adds 01 + 01 = 10.
- The product is 10_0000_10 = 130.

The tree testbench checks this example.

One parametrised module, `vedic_add_tree #(N)`, serves all three levels. `vedic_mul4`,
`vedic_mul8` and `vedic_mul16` are each four instances of the level below plus one tree.

### Adders (`cla_adder`, `half_adder`)

Every multi-bit adder is a `cla_adder #(W)`. This includes Adders 1-3 at every level and
the 64-bit accumulator adder. It is a carry look-ahead adder:

- each bit computes generate (a&b) and propagate (a^b);
- a parallel-prefix network of log2(W) levels computes every carry;
- the carry-in is folded into bit 0.

## Where this departs from, or fills in, the original description

- **The adders are not pipelined.** The original asks for pipelined carry look-ahead
  adders. It also says the MAC makes one result per clock, and it reports the multiplier
  as a single combinational delay. Here the adders are purely combinational, so the
  whole 16x16 multiplier is one register-to-register stage.
- **The accumulator adder is 64 bits wide.** The block diagram labels the adder 32 bit
  but the register it feeds 64 bit. The published accumulation values go past 32 bits,
  so the adder matches the 64-bit register.
- **Added choices:** reset (synchronous, active high, clears everything), unsigned
  operands, the absence of enable/clear controls, and wrap-around on overflow are this
  design's own choices. The original does not specify them.
- **The internal carry look-ahead structure** is this design's own (parallel prefix).
  The original only names the adder type.
- **Not reproduced:** the FPGA results reported for the original design (delay, slices,
  LUTs, power on a Spartan-3E) depend on a vendor tool flow.

## Files

| file | contents |
|------|----------|
| `rtl/vedic_pkg.sv` | shared widths: MUL_W = 16, PROD_W = 32, ACC_W = 64 |
| `rtl/vedic_mac16.sv` | top: the MAC unit |
| `rtl/mac_accumulator.sv` | 64-bit adder + Data out register |
| `rtl/data_reg.sv` | operand / product register |
| `rtl/vedic_mul16.sv`, `vedic_mul8.sv`, `vedic_mul4.sv`, `vedic_mul2.sv` | multiplier hierarchy |
| `rtl/vedic_add_tree.sv` | addition tree, parameter N |
| `rtl/cla_adder.sv`, `rtl/half_adder.sv` | adders |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## How far it is verified

Every testbench compares against arithmetic computed independently in the testbench.
Each ends by printing `TB_RESULT checks=<n> failures=<m>`.

- `half_adder`, `vedic_mul2`, `vedic_mul4` and `vedic_mul8`: exhaustive (the 8x8 block
  covers all 65536 pairs).
- `cla_adder`: exhaustive at 2 and 8 bits. At 16 and 64 bits, random operands plus full
  carry-chain corners.
- `vedic_add_tree`: exhaustive at N = 4, random at N = 8 and 16, plus the worked example.
- `vedic_mul16`: ffff x ffff = fffe0001, corner operands and 200000 random pairs. Not all
  2^32 pairs.
- `data_reg`: reset, one-cycle load, holding the old value before the edge.
- `mac_accumulator`: the fffe0001 sequence, random products, mid-run reset, and
  wrap-around in a narrow (10-bit) instance.
- `vedic_mac16`, at its default sizes:
  - the worst-case sequence above;
  - the three-edge latency;
  - 5000 clocks of random operands against a cycle-accurate reference model;
  - a reset in the middle of a stream, which must also flush the in-flight products.

  It counts each of these events and fails if one never occurred.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/vedic_pkg.sv \
          tb/tb_vedic_mac16.sv --top-module tb_vedic_mac16
./obj_dir/Vtb_vedic_mac16
```

Replace `vedic_mac16` with any other module name to run its testbench. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/vedic_pkg.sv rtl/<module>.sv`.

## Changing it

- `ACC_W` on `vedic_mac16` sets the accumulator width.
- `vedic_add_tree` and `cla_adder` take any power-of-two width from N = 4 and W = 1
  upward.
- A 32x32 multiplier is four `vedic_mul16` instances and a `vedic_add_tree #(.N(32))`,
  written the same way as `vedic_mul16.sv`.
- To pipeline the multiplier, put registers between the partial products and the tree,
  then add the extra stages to the latency the testbench expects.
