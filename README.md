# Partitioned look-up table: a 10-bit sine table at single-block speed

A look-up table with a 10-bit address and a 10-bit word, such as the sine
table of a direct digital synthesizer, can be put into an FPGA built from
small 4-input LUTs in two obvious ways. Both are poor:

* **As a table.** Every output bit is a 10-input function of the address.
  This is fast but costs a great deal of logic.
* **As minimised Boolean equations.** This is compact, but the logic is
  deep, so the clock is slow. It also takes hand work or special tools to
  derive the equations.

This RTL takes a third route. It relies on one property of the target
fabric: any function of **six** inputs fits one configurable logic block
(four 4-input LUTs joined by the block's two levels of wide multiplexers)
and costs one logic delay. Each output bit of the wide table is cut into
6-input sub-tables (SLUTs). Registered 6-input "collection functions" then
put the pieces back together. Every stage between two registers is one
block deep, so the table runs at the clock rate of a single block. The
cost is a few clocks of latency, and the logic grows only linearly with
the number of sub-tables. The contents are still an arbitrary truth table:
nothing is minimised.

The design follows the method of the paper *Low Cost and High Speed
Look-Up Table Implementation of Xilinx FPGA*. The section "What is taken
from the method and what is not" lists where it departs from that method.

## The cost and delay rules behind the six-input cut

The target is a Virtex-II-class device. Its unit is the logic cell: one
4-input LUT with its flip-flop. Two cells form a slice and four form a
block. The rules that follow, and that drive the whole design, are:

| inputs of one function | cells  | logic delays |
|------------------------|--------|--------------|
| 1 to 4                 | 1      | 1            |
| 5                      | 2      | 1            |
| 6                      | 4 (one block) | 1     |
| 7                      | 8      | 2            |

Six inputs is therefore the widest function that still costs one delay.
The design is built so that no function has more than six inputs, and a
register follows each one.

## The building block: an 8-input table from four SLUTs (`lut8x1`)

Write the 8 address bits as `A B C D E F G H`, with `A` the most
significant. The 256-entry truth table of `S(A..H)` is a 16 x 16 Karnaugh
map. Split along `A` and `B`, it falls into four 8 x 8 quadrants. Each
quadrant is a function `Ti(C,D,E,F,G,H)` of six inputs, and so one SLUT:

```
        C..H ──► T0 ─┐
             ──► T1 ─┤ 4-bit   ┌───────────────────────────────┐
             ──► T2 ─┤ storage ├─►  S = A'B'T0 + A'BT1         │
             ──► T3 ─┘         │      + AB'T2  + ABT3          ├─► S
        A,B ───────► 2-bit ────►   (registered)                │
                     storage   └───────────────────────────────┘
```

`Ti` holds the entries whose `{A,B}` equals `i`, that is addresses
`64*i .. 64*i+63`. The collection function has six inputs (`A`, `B`,
`T0..T3`), so it is one block too. It is written exactly as the sum of
products above (`collector`). `A` and `B` are registered beside the SLUT
outputs, so the two reach the collection function in the same clock.

The result is five blocks (20 cells) and two clocks from address to `S`.
A new address can be applied every clock.

## Growing the table: the collection tree (`lut_nx1`)

An N-input table (N ≥ 8) is built in three steps:

1. Make `2^(N-8)` of the 8x1 tables above. All of them see address bits
   `7:0`, and table `g` holds entries `256*g .. 256*g+255`.
2. Merge their results in fours with further registered 4:1 collection
   functions. Each level uses the next two address bits: first bits `9:8`,
   then `11:10`, and so on.
3. If an odd number of upper bits is left over, make the last level the
   two-input form `S = A'T0 + AT1`, on the top bit alone.

The address bits above bit 7 must arrive at each level in the same clock
as the partial results they select. They therefore pass through one
storage register per stage. Getting this alignment wrong is the easiest
mistake to make here, and the testbenches check the exact latency for
that reason.

| N  | SLUTs | collection blocks | blocks | clocks |
|----|-------|-------------------|--------|--------|
| 6  | 1     | 0                 | 1      | 1      |
| 7  | 2     | 1 (2:1)           | 3      | 2      |
| 8  | 4     | 1                 | 5      | 2      |
| 9  | 8     | 2 + 1 (2:1)       | 11     | 3      |
| 10 | 16    | 4 + 1             | 21     | 3      |
| 11 | 32    | 8 + 2 + 1 (2:1)   | 43     | 4      |

## The 10 x 10 sine table (`lut10x10`, the top level)

The table has ten output bits. Each bit is its own `lut_nx1` with N = 10.
All ten share an input register on the address:

```
clock 1   input register (addr)
clock 2   16 SLUTs per bit  -> storage      (address bits 5:0 used)
clock 3   4 collectors per bit -> storage   (bits 7:6 select)
clock 4   1 collector per bit -> data       (bits 9:8 select)
```

So a word comes out **four clocks** after its address, and one address is
accepted per clock. The word stored at address `i` is

```
data(i) = floor( 511.5 * sin(2*pi*i / 1024) + 512 )
```

This is one full sine period, unsigned, from 0 to 1023. The synthesis tool
computes it while it elaborates the design (`lut_pkg::sine_word`,
`lut_pkg::sine_bit_table`). No data file is read.

Ports:

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst_n`     | in  | 1     | synchronous, active low. Clears the valid pipeline only |
| `in_valid`  | in  | 1     | `addr` holds an address this clock |
| `addr`      | in  | 10    | phase / table address |
| `out_valid` | out | 1     | `data` holds the word for the address given 4 clocks earlier |
| `data`      | out | 10    | table word |

There is no back-pressure and no clock enable. The data path has no reset,
so `data` is meaningful only while `out_valid` is high.

## Cost and speed compared with the reference figures

By the cell counting above, one output bit costs 21 blocks, or 84 cells.
The ten bits cost 840 cells of LUT logic, plus the pipeline flip-flops.
The reference implementation of the method reports 1030 cells and
250 MHz, with 4 clocks of latency. It compares this with about 10,000
cells at 250 MHz for a direct table, and about 650 cells at 50 MHz for
Boolean equations. The latency and the structure agree with this RTL. The
reference does not say which extra logic makes up its other ~190 cells.
The clock rate is a property of the device, and simulation cannot confirm
it.

After generic synthesis, each SLUT shows up as a 64-bit constant memory.
Some are merged or removed where bits of the sine table are constant or
repeat. Mapping to a real FPGA should turn each one into one 6-input
function.

## What is taken from the method and what is not

Taken from the method:

* the 6-input sub-table as the unit
* the quadrant split of the 8-input table
* the collection function `S = A'B'T0 + A'BT1 + AB'T2 + ABT3`
* the storage after the SLUTs and after the collection function, and the
  2-bit storage of `A`, `B`
* the 10 x 10 size
* the four-clock latency

Choices made in this RTL:

* **Number of sub-tables.** An N-input table is cut into `2^(N-6)`
  sub-tables, which is four for the 8-input case. One general statement
  of the method reads as "N-6" sub-tables; the worked 8-input example
  (four sub-tables) was followed.
* **Above 8 inputs.** The method does not say how the pieces of a 10-input
  table are merged. This RTL uses a tree of the same registered
  collection function. This also explains the four-clock latency:
  input register + SLUT + two collection levels.
* **Odd N.** Widths of 7, 9 and 11 use a final 2:1 collection function.
  This is an extension.
* **Contents.** The method only says that the table turns a linear input
  into a sinusoidal output. The scaling and rounding are chosen here.
* **Bit order.** Address bit N-1 is the most significant variable, and H
  is bit 0.
* **Control.** The input register, the valid flag and the reset of the
  valid pipeline are additions. Storage registers have no reset or enable.
* **Vendor parts.** The FPGA fabric itself is not modelled. The CLB, slice
  carry logic, IOBs, routing, block RAM and DLLs are left to the vendor
  tools. The SLUT is written as a plain indexed truth table.

## Files

| file | contents |
|------|----------|
| `rtl/lut_pkg.sv`     | sizes (`SLUT_IN = 6`, `TOP_N = TOP_W = 10`) and the sine-table functions |
| `rtl/slut.sv`        | 6x1 sub-table, `y = INIT[a]` |
| `rtl/storage_reg.sv` | W-bit pipeline register |
| `rtl/collector.sv`   | registered collection function, 4:1 (or 2:1) |
| `rtl/lut8x1.sv`      | 8-input table: 4 SLUTs, storage, collector |
| `rtl/lut_nx1.sv`     | N-input table: 8x1 tables and a collection tree (default N = 10) |
| `rtl/lut10x10.sv`    | top level: 10 x 10 sine table, 4-clock pipeline |
| `tb/tb_*.sv`         | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lut_pkg.sv tb/tb_lut10x10.sv --top-module tb_lut10x10 -o sim
./obj_dir/sim
```

Replace `tb_lut10x10` with `tb_lut_nx1`, `tb_lut8x1`, `tb_collector`,
`tb_slut` or `tb_storage_reg` to run the others. Each runs in well under
a second.

What the testbenches check:

* **`tb_lut10x10`** runs the top level at full size. First, all 1024
  addresses back to back. Then 2000 random addresses with random idle
  clocks. Then a reset in the middle of a burst. Every word is compared,
  in order, with the sine formula computed independently in the
  testbench, and its latency must be exactly 4. It also counts back-to-back
  words, idle gaps, the reset flush, and use of each of the 16 SLUT groups
  and of each select value at both collection levels. Any of these that
  never happened counts as a failure.
* **`tb_lut_nx1`** runs N = 6 to 11 side by side on pseudo-random tables
  and checks each against its expected latency (1, 2, 2, 3, 3, 4).
* **`tb_lut8x1`**, **`tb_collector`**, **`tb_slut`** and
  **`tb_storage_reg`** check the smaller parts, exhaustively where the
  input space allows.

## Changing it

* **Other contents.** Replace `sine_word` in `lut_pkg`, or pass your own
  truth table to `lut_nx1` through `TABLE`. Bit k of `TABLE` is the entry
  for address k. The expected values in `tb_lut10x10` (`ref_word`) must
  change to match.
* **Other sizes.** `lut_nx1` takes any N ≥ 6. Latency grows by one clock
  for every two address bits above eight. A wider word is more copies of
  `lut_nx1`, as in `lut10x10`. The top level's `LATENCY` constant must
  then equal the new pipeline depth plus one, for the input register.
