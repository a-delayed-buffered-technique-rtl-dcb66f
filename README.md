# Low-power delay buffer with a C-element-gated ring counter and gated driver trees

A delay buffer returns every input sample a fixed number of samples later.
Built as a shift register, it clocks all N×W flip-flops on every cycle and
moves every stored word every cycle, which costs a lot of power. This design
keeps the words still and moves only a pointer instead, and then makes sure
that almost nothing else toggles:

- **Ring counter of double-edge-triggered (DET) flip-flops.** A single 1
  (the *token*) circulates through DEPTH DET flip-flops and selects the
  storage word of the current slot. A DET flip-flop takes data on both clock
  edges, so the clock runs at half the sample rate.
- **C-element clock gating.** The ring is cut into blocks. Each block's
  clock is switched on by a Muller C-element only while the token is in, or
  about to enter, that block. The storage words of the block share the same
  gated clock.
- **Gated driver trees.** The input word reaches the storage through a tree
  of gated drivers, and the output word leaves through a tree of gated
  multiplexers. Only the branch that leads to the selected word is switched
  on, so the long data buses do not toggle at every leaf.

Default size: DEPTH = 64 words, WIDTH = 8 bits, FANOUT = 4. The trees have
three levels with fan-out 4, so 4 × 4 × 4 = 64 leaves. The ring has 16
blocks of 4 flip-flops.

## Data flow and timing

```
 din ──► gated_demux_tree ──► delay_memory ──► gated_mux_tree ──► dout
              ▲   (wdata)         ▲   (rdata)        ▲
              │ e1,e2,e3          │ gclk, we         │ e1,e2,e3
              └─────────── ring_counter_cgate ───────┘
```

The buffer takes one sample per clock edge, on the rising and on the falling
edge. Call the state between two edges a *slot*. In each slot the token
points at one word. That word still holds the sample written DEPTH edges
earlier, and `dout` shows it for the whole slot. At the next edge, `din` is
written into that same word and the token moves on.

So a consumer that samples `dout` at an edge gets exactly the `din` sampled
DEPTH edges before. The latency is DEPTH samples, which is DEPTH/2 clock
periods. There is no valid, ready or stall signal: the buffer always runs.
After `init`, the first DEPTH outputs are whatever the memory held.

## Gating: who gets clock edges and when

This is the subtle part of the design, and the reason for several of its
rules.

**Enables.** Token position p is reached after edge p of a revolution.
Block b covers positions b·F … b·F+F−1, where F = FANOUT. Its C-element
has two inputs:

- `a` is the last flip-flop of the previous block (position b·F−1).
- `b` is the *inverted* first flip-flop of the next block (position (b+1)·F).

The enable `blk_en[b]` therefore rises when the token reaches b·F−1, one
edge before the block is needed. It holds while the token is inside the
block, and it falls once the token has reached (b+1)·F. That last edge is
the one that clocks the final 1 out of the block. Group enables `grp_en[g]`
are built the same way over spans of F² positions. A group's window contains
the windows of all its blocks.

**Clock tree.** The global clock feeds one AND gate per group (enabled by
`grp_en`), and each group clock feeds one AND gate per block (enabled by
`blk_en`). The resulting `gclk[b]` clocks the F ring flip-flops and the F
storage words of block b. Per revolution of DEPTH edges, each block clock
rises F/2+1 times against DEPTH/2 for the global clock: 3 against 32 at the
defaults.

**Why AND-gating a DET clock is safe here.** A DET flip-flop reacts to every
clock transition. So an enable that changed while the clock was high would
make a false edge. The design avoids this by fixing the edge parity:

1. `init` is registered on the rising clock edge inside `delay_buffer`, so
   the ring is always released while `clk` is high. The first move, 0→1,
   then happens on a falling edge.
2. FANOUT must be even. Every enable then *rises* on reaching an odd
   position, which happens on a falling edge while `clk` is low, so no
   clock edge is produced.
3. Every enable *falls* on reaching an even position, which happens on a
   rising edge while `clk` is high. This does give the block one extra
   falling edge, but at that moment the block's ring flip-flops and their
   input are all 0, and none of its words is selected. Nothing changes.

**DET flip-flop.** `det_ff` is two single-edge registers whose XOR is the
output. The output has no combinational path from the clock, so the extra
falling edge of step 3 cannot glitch the token. A clock-steered output
multiplexer would glitch there and could write a wrong word.

**Data trees.** Both trees use the same three enable levels: `grp_en`
(e1), `blk_en` (e2) and the token (e3), plus a root enable (e0) that is
high whenever the buffer is not being initialised. A disabled gate outputs
0, so the output tree merges its branches with OR.

## Modules

| file | role |
|---|---|
| `rtl/dbuf_pkg.sv` | default sizes `DBUF_DEPTH`, `DBUF_WIDTH`, `DBUF_FANOUT` |
| `rtl/det_ff.sv` | DET flip-flop with hold enable and async init |
| `rtl/c_element.sv` | Muller C-element (a latch open while a == b) with init |
| `rtl/ring_counter_cgate.sv` | token ring, block and group C-elements, gated clock tree |
| `rtl/gated_demux_tree.sv` | input gated driver tree |
| `rtl/delay_memory.sv` | DEPTH words of DET registers, clocked per block |
| `rtl/gated_mux_tree.sv` | output gated multiplexer tree |
| `rtl/delay_buffer.sv` | top level |

Top-level ports of `delay_buffer`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; both edges carry a sample |
| `init` | in | 1 | active-high initialise; asynchronous assert, released on a rising edge |
| `din` | in | WIDTH | sample, sampled at every edge |
| `dout` | out | WIDTH | the sample from DEPTH edges earlier, stable through the slot |

Parameters: `DEPTH`, `WIDTH`, `FANOUT`. FANOUT must be even and at least 2.
DEPTH must be a multiple of 2·FANOUT², so that there are at least two groups.
The ring counter stops elaboration with an error otherwise.

## Where this RTL departs from, or adds to, the source design

The source describes the architecture at block level. The following are
choices made here:

- **Width.** The source leaves WIDTH open; 8 bits is this design's choice.
  DEPTH = 64 and fan-out 4 come from the source's gated driver tree.
- **C-element inputs.** The source says only that the gating signals come
  from C-elements fed by ring outputs. Which outputs feed them, and the
  parity rules above, are this design's.
- **Initialisation.** The source ring shows two initialise inputs. Here a
  single `init` presets the token to position 0 and sets the enables of
  block 0 and group 0.
- **Storage.** The source describes the storage as an SRAM-like memory. Here
  it is an array of DET registers, one per ring position, so that writes can
  happen on both clock edges.
- **Disabled drivers** output 0; no tri-state buses are used.
- **Group clock level.** The group level of the clock tree follows the
  source's remark that gated driver trees are also used for the clock
  network. Its exact shape is this design's.
- **Not built.** The shift-register and SRAM-with-decoder buffers that the
  source compares against, and its earlier SR-flip-flop ring counter, are
  not built.
- **Power.** The source reports power figures (about 26% less than its
  baseline). This RTL has not been power-characterised.

Implementation notes:

- `c_element` is written as a latch (`always_latch`). Synthesis reports one
  latch bit per C-element, and that is intended.
- The ring and the storage use asynchronous presets that respond to the
  rising edge of `init`. With two-state simulation, which starts with random
  values, `init` must therefore show a real 0→1 transition.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dbuf_pkg.sv tb/tb_delay_buffer.sv \
          --top-module tb_delay_buffer -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_delay_buffer` | Default size, end to end. Random stream, one sample per edge, exact latency of DEPTH samples. Exact count of block-clock edges per revolution. In every slot, only the selected leaf of the input tree is driven. Enable hand-overs, token wrap-around, and re-initialisation in mid-stream. |
| `tb_delay_buffer_small` | The same test at DEPTH 16, WIDTH 5, FANOUT 2. |
| `tb_ring_counter_cgate` | After every edge: token position, every block and group enable, and exact block- and group-clock edge counts. |
| `tb_delay_memory` | Writes happen only when a word is selected *and* its block clock makes an edge. |
| `tb_gated_demux_tree`, `tb_gated_mux_tree` | Every leaf or output against a reference, with each enable level switched off in turn. |
| `tb_det_ff`, `tb_c_element` | Both-edge capture, hold, and init. C-element set, clear and hold. |

To change the size, override `DEPTH`, `WIDTH` and `FANOUT` on
`delay_buffer`, or edit the defaults in `dbuf_pkg`.
