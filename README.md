# Pipelined Wallace-tree multiplier with a carry select final adder

This is a 32 x 32-bit unsigned multiplier that accepts a new operand pair on
every clock cycle. It works in three steps:

1. An AND-array forms all 1024 partial-product bits.
2. A Wallace tree of full and half adders reduces them to two numbers.
3. A carry select adder adds those two numbers.

Both the tree and the adder have a depth that grows with log n. Two register
cuts split the work into three pipeline stages of about the same depth:

| stage | logic | gate delays* | register at the end |
|---|---|---|---|
| 1 | AND-array + Wallace layers 1-4 | 1 + 8 | R1, 252 bits |
| 2 | Wallace layers 5-8 | 8 | R2, 117 bits |
| 3 | 55-bit carry select adder | 8 | R3, 64 bits (the product) |

\*These are estimates for two-input gates: a full adder counts as 2 and a
register as 1. The architecture is built around them, but this RTL does not
check them. Only function, latency and throughput are verified.

Each stage is about ten gate delays including its register. A product
leaves R3 three clock edges after its operands enter, and one product comes
out per cycle.

The design follows the published architecture "A New Multiplier Using Wallace
Structure and Carry Select Adder with Pipelining". The sections below mark
where this RTL had to make its own choices.

## The bit matrix

The whole multiplier is described in terms of **columns**. A column holds
bits of equal weight. Column `c` of the AND-array output holds the
`min(c+1, 2N-1-c)` products `a_i & b_j` with `i + j = c`. For N = 32 the
heights run 1, 2, ..., 32, ..., 2, 1 over columns 0..62.

In the RTL a matrix is a packed array `logic [2*N-1:0][N-1:0]`. Entry
`[c][k]` has weight 2^c. Only the positions `k` below the column's current
height carry data, and the rest are held at zero.

The value of the matrix is the sum of all its bits, each weighted by its
column. Every layer keeps that value unchanged. A layer only trades three
bits of weight 2^c for one bit of weight 2^c and one of weight 2^(c+1), with
a full adder (a 3:2 counter). A half adder trades two bits for one of each
weight.

## Wallace layers and where the adders go

This is the part that needs the most care. All adders of one layer work at
the same time, so one layer costs one full-adder delay. The layers run one
after another. Each layer shrinks the columns by about a factor of 3/2, so
the number of layers grows with log(N):

| N | layers | mixed adders per layer |
|---|---|---|
| 4 | 2 | 4, 4 |
| 8 | 4 | 17, 13, 8, 8 |
| 16 | 6 | 76, 51, 33, 24, 16, 16 |
| 32 | 8 | 321, 215, 144, 97, 65, 39, 26, 31 |
| 64 | 10 | 1324, 883, 588, 393, 263, 173, 117, 71, 44, 60 |

The published design gives these layer counts and the per-layer adder
counts for 4, 16 and 32 bits, but it does not state a rule for placing the
adders. The rule below reproduces every published number exactly: the
adder counts above, the column-by-column heights of the 4-bit and 16-bit
examples, and the register sizes R1 = 252 and R2 = 117 bits. It is
implemented once, as constant functions in `rtl/wallace_pkg.sv`:

* Every complete group of three bits in a column gets a full adder.
* A column's one or two leftover bits pass through unchanged, with two
  exceptions. A leftover **pair** gets a half adder when:
  * it is in the lowest column of the layer that holds exactly two bits.
    This lets the low-order columns settle to one bit each, one column per
    layer, so the final adder can start higher up.
  * without the half adder, the column would exceed the layer's **target
    height**. The target is the tallest column the layer would produce if
    every leftover pair had a half adder, so it is the lowest height the
    layer can reach anyway. Columns are processed from the bottom up,
    because a half adder sends one more carry into the column above.
* Sums stay in their column, and carries go to the next column up.
* Layers are added until no column holds more than two bits.

An example for N = 4, with column heights listed highest column first:

```
AND-array   1 2 3 4 3 2 1
layer 1     1 3 2 3 2 1 1      half adder in column 1, full adders in columns 2, 3, 4
layer 2     2 2 2 2 1 1 1      half adders in columns 2 and 4, full adders in 3 and 5
```

Inside a column after a layer, the bits are ordered like this:

1. the sums of the column's full adders;
2. the half-adder sum, or the bits passed through;
3. the carries from the column below.

That order is a choice of this RTL. It does not change the function, but it
does decide which late-arriving bits meet in the same adder.

After the eighth layer of the 32-bit tree, columns 0..8 hold one bit each.
They are already final product bits. Columns 9..62 hold two bits each, which
makes 9 + 2·54 = 117 bits. Column 63 is empty and only receives the final
carry. The two-operand adder therefore spans columns 9..63 and is only
**55 bits** wide.

## The pipeline registers

R1 and R2 store only the bits that exist at their cut. `matrix_pack`
flattens the matrix into a vector, column by column. `matrix_unpack`
restores it after the register. That is why R1 is 252 flip-flops rather
than 2048. R1 sits after layer `num_layers(N)/2`, which is layer 4 for
N = 32, and R2 after the last layer.

The data registers have no reset and no enable. A 3-bit valid shift register
runs beside them, with an asynchronous active-low reset. It adds
`in_valid`/`out_valid` to the interface. These valid flags are an addition
of this RTL.

## The carry select adder

The final adder (`carry_select_adder`, 64 bits by default, 55 bits inside the
multiplier) has three parts:

* **Partial adder slices.** Each bit is added twice in parallel, once for an
  incoming carry of 0 and once for an incoming carry of 1:
  `m = a^b`, `o = a&b` and `n = ~(a^b)`, `i = a|b`.
* **Carry flag channel.** The real carry out of each bit is picked with
  2-to-1 multiplexers. A group of bits is summarised by the pair of its
  carry outs, one for each carry in. Two neighbouring groups merge with two
  multiplexers that are steered by the lower group's pair. Once a group
  starts at bit 0, its "carry in 0" output is the real carry.

  The merges form a divide-by-two prefix tree. `c_i` (the carry out of bit
  i) is ready after ceil(log2(i+1)) multiplexer levels: `c_1` after 1,
  `c_2..c_3` after 2, and so on up to `c_32..c_63` after 6. The published
  design gives these depths and the first merge steps but not the whole
  tree, so the tree shape is this RTL's reading of it. After synthesis the
  64-bit channel has 321 cells, against 322 gates published for it.
* **Sum block.** `s_i = c_{i-1} ? n_i : m_i`, which equals `m_i ^ c_{i-1}`,
  with `s_0 = m_0`.

The adder has no carry input, because the multiplier needs none. Its
`cout` is `c_{W-1}`. Inside the multiplier this carry is always zero and is
left unused.

## Interface and timing (`wallace_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock for R1, R2, R3 |
| `rst_n` | in | 1 | asynchronous active-low reset, valid flags only |
| `in_valid` | in | 1 | `a`, `b` hold an operand pair |
| `a`, `b` | in | N | unsigned operands |
| `out_valid` | out | 1 | `p` holds a product |
| `p` | out | 2N | `a * b`, from R3 |

The first register samples `a`, `b` and `in_valid` on a rising edge. The
product is on `p`, with `out_valid` high, after the third rising edge
counted from that one. There are no stalls: a pair can be issued every
cycle, and cycles with `in_valid` low simply leave gaps.

## Files

| file | contents |
|---|---|
| `rtl/wallace_pkg.sv` | column heights, adder placement, layer count, register sizes (constant functions) |
| `rtl/and_array.sv` | partial-product matrix |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | the mixed adders |
| `rtl/wallace_layer.sv` | one layer of mixed adders |
| `rtl/wallace_section.sv` | consecutive layers between two registers |
| `rtl/matrix_pack.sv`, `rtl/matrix_unpack.sv` | matrix to register vector and back |
| `rtl/pipe_reg.sv` | R1, R2, R3 |
| `rtl/partial_adder_slices.sv`, `rtl/carry_flag_channel.sv`, `rtl/sum_block.sv`, `rtl/carry_select_adder.sv` | final adder |
| `rtl/wallace_multiplier.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_multiplier_sizes.sv` | the multiplier at N = 4 (exhaustive), 8, 16 and 64 |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
It also has a watchdog that counts a failure if the run hangs. To build and
run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal rtl/wallace_pkg.sv rtl/*.sv \
          tb/tb_wallace_multiplier.sv --top-module tb_wallace_multiplier -Mdir obj -o sim
./obj/sim
```

Substitute another testbench name to run it the same way.

* `tb_wallace_multiplier` runs the default 32-bit design. It issues about
  2400 products: corner operands back to back, then random bursts with
  bubbles. It checks each product, the three-cycle latency and that the
  pipeline really held three products at once.
* `tb_wallace_section` checks, over random operands, that exactly 252 bit
  positions are ever used at R1 and 117 at R2. It also checks the adder
  counts and layer counts in the tables above.
* `tb_multiplier_sizes` takes a few minutes to compile because of the
  64-bit instance. The package functions are evaluated at elaboration.

## Changing it

* `N`, the operand width, is the only parameter of the top. Everything else
  follows from `wallace_pkg`: the number of layers, the R1 position, the
  register widths and the adder width and base column. The tables support
  N up to `wallace_pkg::MAXN` = 64. Raise `MAXN` for wider operands. The
  height entries are 8 bits wide, which is enough up to N = 255.
* To move R1, change `SPLIT` in `wallace_multiplier.sv`. `matrix_pack` and
  `matrix_unpack` follow automatically.
* To change the placement rule, edit `ha_flags` in `wallace_pkg.sv`. Every
  layer, register and adder width is derived from it.

## What to trust and where it departs

* **Verified by simulation:** exact products at N = 4 (all pairs), 8, 16,
  32 and 64; latency 3; one product per cycle. The carry tree is checked
  against the sequential carry rule, including for carry pairs that no
  adder produces.
* **Matches the published numbers:** the layer counts, the per-layer adder
  counts for 4, 16 and 32 bits, R1/R2/R3 = 252/117/64 flip-flops (also
  after synthesis) and the 55-bit final adder starting at column 9.
* **Own choices:** the adder placement rule, which is reconstructed (see
  above); the bit order inside columns; the exact shape of the carry tree;
  the valid flags and reset; and unsigned operands. The published design
  never mentions signed numbers.
* **Not modelled:** gate-level delays. The roughly-ten-gate-delay balance
  between stages is an argument about the netlist, and it is not
  re-checked here. The published gate counts per block (for example 4638
  gates for the first Wallace section) are not reproduced. Synthesis maps
  the adders to word-level cells instead.
