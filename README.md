# 16-bit heterogeneous adder: Ling, carry lookahead and carry skip in one carry chain

Every adder architecture trades area against delay. A ripple-carry adder is small and slow.
A lookahead adder is fast and large. A *heterogeneous* adder does not pick one architecture for
the whole word. It cuts the word into slices and gives each slice its own architecture. The
slices are then joined by their carries. By choosing which architecture sits on which bits, the
designer can tune the area and delay of the whole adder.

This RTL implements one such split, for 16-bit unsigned operands:

```
            a[3:0] b[3:0]      a[11:4] b[11:4]       a[15:12] b[15:12]
               |     |             |      |              |      |
   cin --> [ SA1: 4-bit Ling ] -c1-> [ SA2: 8-bit lookahead ] -c2-> [ SA3: 4-bit carry skip ] --> cout
                  |                        |                            |
               s[3:0]                   s[11:4]                      s[15:12]
```

`{cout, s} = a + b + cin`. The adder is purely combinational. It has no clock and no reset.

The published design this follows was evaluated on a Xilinx Spartan-3E (XC3S250E). Its
authors report 19 slices, 33 LUTs and a 17.727 ns path delay. For comparison, they report
22.022 ns for a heterogeneous adder built from carry select, lookahead and skip slices, and
29.211 ns for a plain 16-bit carry skip adder. Those figures come from their VHDL and tool flow.
They have not been reproduced with this RTL.

## Files

| file | module | role |
|---|---|---|
| `rtl/hetero_adder_pkg.sv` | package | slice widths and bit offsets (`SA1_W=4`, `SA2_W=8`, `SA3_W=4`, `CSK_BLOCK_W=4`) |
| `rtl/hetero_adder_16.sv` | `hetero_adder_16` | top: the three slices and their carry chain |
| `rtl/ling_adder_4.sv` | `ling_adder_4` | SA1, 4-bit Ling adder |
| `rtl/cla_adder_8.sv` | `cla_adder_8` | SA2, two 4-bit lookahead groups plus a second lookahead level |
| `rtl/cla_adder_4.sv` | `cla_adder_4` | 4-bit lookahead adder: four cells and one lookahead unit |
| `rtl/cla_lookahead_4.sv` | `cla_lookahead_4` | carry lookahead unit: C1..C4, group propagate PG, group generate GG |
| `rtl/full_adder.sv` | `full_adder` | 1-bit cell giving sum, propagate and generate, with no carry out |
| `rtl/carry_skip_adder.sv` | `carry_skip_adder` | SA3, ripple blocks with skip logic (parameters `WIDTH`, `BLOCK_W`) |
| `rtl/ripple_carry_adder.sv` | `ripple_carry_adder` | ripple block used by the skip adder (parameter `WIDTH`) |

Top-level ports of `hetero_adder_16`:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | 16 | unsigned addends |
| `cin` | in | 1 | carry in |
| `s` | out | 16 | sum |
| `cout` | out | 1 | carry out, which is the only overflow indication |
| `c1` | out | 1 | carry from SA1 into SA2, for observation |
| `c2` | out | 1 | carry from SA2 into SA3, for observation |

## SA1: the Ling adder

This slice is the least familiar one. A Ling adder is a lookahead adder that does not compute
the carries. It computes a *pseudo-carry* `h(i) = c(i) | c(i-1)`. Each bit uses three signals:

- generate `g = a & b`
- transmit `t = a | b`
- half sum `p = a ^ b`

The real carry `c(i+1) = g(i) | t(i) c(i)` can be written as `t(i) (g(i) | c(i))`, because
`t` absorbs `g`. Hence:

```
h(i+1) = g(i) | c(i)          c(i) = t(i-1) & h(i)          s(i) = p(i) ^ (t(i-1) & h(i))
```

Unrolled down to the carry in, the pseudo-carries are:

```
h1 = g0 | cin
h2 = g1 | g0 | t0 cin
h3 = g2 | g1 | t1 g0 | t1 t0 cin
h4 = g3 | g2 | t2 g1 | t2 t1 g0 | t2 t1 t0 cin
cout (= c1 of the top) = t3 & h4
```

Compare these with the lookahead carries. Each `h` has one fewer literal in its first products:
`g1 | g0` in place of `g1 | p1 g0`. That is where a Ling adder saves logic. The final AND with
`t(i-1)` is moved into the sum, where it sits off the critical path.

`ling_adder_4` brings `h[4:1]` out as a port, so the pseudo-carries can be checked directly.

## SA2: the lookahead slice

`cla_adder_4` is the basic lookahead adder. It has four `full_adder` cells. Each cell returns
`p = a ^ b` and `g = a & b`. One `cla_lookahead_4` turns these, with the carry in, into every
carry as a flat two-level sum of products. It also produces the group signals
`PG = p3 p2 p1 p0` and `GG = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0`.

The 8-bit slice uses two such groups. A second lookahead level joins them:

```
carry into upper group = GG0 | PG0 cin
cout (= c2 of the top) = GG1 | PG1 GG0 | PG1 PG0 cin
```

This two-level arrangement is a choice made in this RTL. The published design specifies an
8-bit lookahead slice but details the lookahead structure only at four bits.

## SA3: the carry skip slice

`carry_skip_adder` cuts its operands into ripple blocks of `BLOCK_W` bits. For each block it
forms the group propagate, the AND of the block's `a ^ b` bits. When the group propagate is 1,
the block cannot absorb an incoming carry. The carry in is then passed straight to the block's
carry out:

```
block_cout = rca_cout | (group_propagate & block_cin)
```

The skip term never changes the value. When it is 1, the ripple chain would produce the same
carry anyway. The skip only shortens the worst-case path. Each block's `skip` output shows when
the bypass carried the carry.

**Block size.** The published description asks for at least four ripple blocks per skip adder.
Its drawing, however, shows 4-bit ripple blocks, each with its own skip stage. For a 4-bit
slice, four blocks would mean 1-bit blocks, which makes the skip pointless. This RTL follows
the drawing. SA3 is therefore a single 4-bit ripple block with skip logic
(`CSK_BLOCK_W = 4`). Setting `BLOCK_W` to 1 or 2 builds the finer variant.

## Choices made in this RTL

These points are left open by the published design, so the RTL makes its own choices:

- Bit propagate is `a ^ b` in the lookahead and skip slices.
- The full adder cell has no carry out; its carry comes from the lookahead unit.
- The pseudo-carries are written as flat sums of products.
- The 8-bit lookahead slice is built from two groups joined by a second lookahead level.
- SA3 uses 4-bit skip blocks.
- `c1` and `c2` are brought out as ports.

The reference waveform of the published design also shows two signals, `z` and `y`, whose
meaning is never given. They are not implemented.

The comparison designs are not part of this RTL. These are the 16-bit ripple / skip / select /
lookahead heterogeneous adder, a 32-bit variant of it, and the plain 16-bit carry skip adder.

## Verification

Each module has a self-checking testbench in `tb/`. It compares the outputs with integer
arithmetic worked out inside the testbench. At the end it prints
`TB_RESULT checks=N failures=M`. A watchdog ends any run that hangs.

| testbench | coverage |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_cla_lookahead_4` | all 512 combinations of p, g, c0, against a rippled reference |
| `tb_cla_adder_4`, `tb_ling_adder_4` | all 512 combinations of a, b, cin; the Ling test also checks every `h(i)` against `c(i) \| c(i-1)` |
| `tb_cla_adder_8` | all 131072 combinations, including PG and GG |
| `tb_ripple_carry_adder` | exhaustive at 4 and 8 bits |
| `tb_carry_skip_adder` | exhaustive at 4 bits; 200000 random cases at 16 bits in 4-bit blocks, checking each block's `skip` flag |
| `tb_hetero_adder_16` | the top at its default size (see below) |

`tb_hetero_adder_16` applies the following:

- the six operand pairs of the published reference simulation, e.g. 65000 + 54000 = 53464 with carry out
- corner cases
- 1,000,000 random pairs, half of them biased towards long propagate runs

It checks `s`, `cout`, `c1` and `c2`. It also counts each carry mechanism and fails if any one
of them never happens. The mechanisms are:

- SA1 carry out
- SA2 carry out
- a carry crossing all eight bits of SA2
- the SA3 skip path
- a Ling pseudo-carry set without a real carry
- an adder carry out

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/hetero_adder_pkg.sv rtl/*.sv tb/tb_hetero_adder_16.sv --top-module tb_hetero_adder_16
./obj_dir/Vtb_hetero_adder_16
```

Replace the testbench name to run any other. Every testbench finishes in well under a second.

## Changing the design

- **Slice widths.** These are constants in `hetero_adder_pkg`. The Ling and lookahead slices
  are written at fixed widths (4 and 8 bits). A different split needs matching sub-adders.
- **Skip block size.** The carry skip adder is fully parameterized. `WIDTH` must be a multiple
  of `BLOCK_W`, and an assertion reports a violation at elaboration.
- **Unused outputs in the top.** The top leaves some sub-adder outputs unread: the Ling
  pseudo-carries, SA2's group propagate and generate, and SA3's skip flags. They exist for
  testing the blocks on their own. A lint tool reports them as unused signals.
