# Clock-gated ring-counter CAM / delay buffer

This design is a small memory. It works as a delay buffer and can also be
searched by content, like a CAM. Its words are always written in order, one per
clock: word 0, then 1, and so on up to 31, and then word 0 again. So no address
decoder is needed. A one-hot ring counter points at the word, and the 1 in it
moves one place per write. Only one flip-flop of that counter holds a 1 at any
time. The counter is therefore split into blocks of eight flip-flops, and each
block gets its own gated clock. A block is clocked only while the 1 is about to
enter it, is inside it, or has just left it. The same idea is used on the data
side:

- the input word is steered only onto the bus of the block being written (a
  gated demultiplexer);
- only that block of words gets a clock edge;
- only the pointed block drives the read-out bus (a gated multiplexer).

On top of the buffer there is a parallel search. A search word is compared with
every stored word. The lowest matching address and the matched word come back.

The structure follows the clock-gated ring-counter CAM of K. Sai Lakshmi and
K. Siva Nagendra, "Power Optimized CNN Based CAM Using Clock Gating
Techniques":

- the input buffer, memory block, output buffer and ring-counter block;
- the blocks of eight flip-flops, each with an R-S flip-flop that controls its
  clock gate;
- the initialise input of the ring;
- the 8-bit words and the 32-bit ring.

Many details are this implementation's own, because that description does not
give them. They are listed under "Choices made here".

Default size: 32 words of 8 bits, ring counter in 4 blocks of 8 (`cam_pkg`).

## Operating the buffer

Top module: `cam_delay_buffer`. All outputs change only at the rising edge of
`clk`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low. Clears the ring, the words, the valid bits and the outputs |
| `init` | in | 1 | one-cycle pulse, with `sel = 0`, that puts the 1 into bit 0 of the ring |
| `sel` | in | 1 | `0` = write (delay) mode, `1` = search mode |
| `ip` | in | 8 | word to write (write mode) or to search for (search mode) |
| `dop` | out | 8 | delayed output: the word written 32 write cycles earlier |
| `hit` | out | 1 | the last search found the word |
| `addre` | out | 8 | lowest matching address of the last search (only the low 5 bits are used) |
| `muop` | out | 8 | the matched word of the last search |
| `ringop` | out | 32 | the ring counter, i.e. the write/read pointer, one-hot |
| `blk_clk_en` | out | 4 | ring-counter blocks that get a clock edge at the coming rising edge |
| `mem_clk_en` | out | 4 | blocks of words that get a clock edge at the coming rising edge |
| `match_lines` | out | 32 | per-word compare result for the current `ip` (combinational) |

**Start-up.** Pull `rst_n` low, then release it. The ring is now all zeros and
nothing gets written. Give one clock with `init = 1` and `sel = 0`. After that
edge `ringop = 1` and the pointer is on word 0.

**Write mode (`sel = 0`).** At every rising edge, three things happen at once:

- the word under the pointer is read out into the `dop` register;
- `ip` is written into that word, which becomes valid;
- the pointer moves on by one word.

A word written at edge *t* therefore appears on `dop` after edge *t + 32*,
counting write edges only. This is a delay line of length 32. For the first 32
writes after reset `dop` shows zeros.

**Search mode (`sel = 1`).** Nothing is written, and the ring counter and the
word array get no clock edges. At each rising edge `ip` is compared with all
valid words. The result appears on `hit`, `addre` and `muop` after that edge,
with a latency of one cycle. The outputs hold while `sel = 0`. When several
words match, the lowest address wins. Words never written since reset never
match.

Example (phase 1 of the end-to-end testbench): write `8'b1000_0011` into word 2
and other values into the rest. Then search for `8'b1000_0011`. One cycle later
the outputs are `hit = 1`, `addre = 8'd2` and `muop = 8'b1000_0011`.

## The gated ring counter

This is the part that needs care (`ring_counter_cg`, `ring_segment`,
`clock_gate`). Each block of eight D flip-flops shifts on its own gated clock
`gclk`. The first flip-flop of a block takes the last flip-flop of the previous
block. For block 0, it takes `init OR` the ring's last bit. Each block has one
R-S flip-flop on the free-running clock:

- **set** at an edge where the input of the block's first flip-flop (`d_in`)
  is 1;
- **reset** at an edge where the first flip-flop of the *next* block holds the
  1.

The block's clock enable is `adv AND (d_in OR rs)`. The R-S flip-flop alone
would be too late. It only becomes 1 at the edge that must already move the 1
into the block, so the `d_in` term opens the gate for that edge. After that the
R-S flip-flop keeps the gate open while the 1 moves through the block. It keeps
it open for one more edge after the hand-over, and then the block goes quiet.

Example: the 1 leaves block 0 for block 1. Positions are ring bits, the state is
shown before each edge, and `rs0` and `rs1` are the two blocks' R-S flip-flops.

| before edge | 1 is at bit | rs0 | rs1 | block 0 clocked | block 1 clocked |
|---|---|---|---|---|---|
| e1 | 6 | 1 | 0 | yes | no |
| e2 | 7 | 1 | 0 | yes | yes (`d_in`) |
| e3 | 8 | 1 | 1 | yes (last one) | yes |
| e4 | 9 | 0 | 1 | no | yes |

So a block is clocked on 10 of every 32 edges (entry, eight inside, hand-over),
and at most two blocks are clocked on any edge. The testbench checks this exact pattern on every cycle,
including cycles where `adv` is low. The R-S flip-flops run on the ungated
clock, so a hand-over that stalls in search mode still closes the old block's
gate.

Each clock gate is a latch that is open while `clk` is low, followed by an AND
with `clk`. This is the usual integrated clock-gating cell. Lint tools and
synthesis report these latches (one per block); they are intended. For a real
implementation, replace `clock_gate` with the library's clock-gating cell.

The ring counter is the only block whose inner workings come from the source
description. For the other blocks only their function is described.

## Gated data paths and word array

- `input_buffer`: drives `ip` onto the local bus of the block that holds the
  pointer, and only in write mode. The other blocks' buses stay at 0.
- `memory_block`: 32 words, each with a valid bit, in four blocks of eight.
  Each block has a clock gate enabled by (write AND the pointer is in this
  block). The pointed word takes its block's bus.
- `output_buffer`: an AND-OR multiplexer in two levels. It picks a word inside
  each block, and only the pointed block's result reaches the output register.
- `cam_match`: one equality compare per word. It produces the match lines and
  the lowest-address encoder, and registers `hit`, `addre` and `muop`.

## Files

| file | contents |
|---|---|
| `rtl/cam_pkg.sv` | default sizes: `CAM_WIDTH = 8`, `CAM_DEPTH = 32`, `CAM_SEG = 8`, `CAM_ADDR_W = 8` |
| `rtl/cam_delay_buffer.sv` | top level |
| `rtl/ring_counter_cg.sv`, `rtl/ring_segment.sv`, `rtl/clock_gate.sv` | gated ring counter |
| `rtl/input_buffer.sv`, `rtl/memory_block.sv`, `rtl/output_buffer.sv` | data paths and words |
| `rtl/cam_match.sv` | search |
| `tb/tb_<module>.sv` | self-checking testbench per block, and `tb_cam_delay_buffer` for the whole design at default size |

Parameters: `WIDTH`, `DEPTH`, `SEG`, `ADDR_W` on the top. `DEPTH` must be a
multiple of `SEG`, and `SEG` must be at least 2. `2**ADDR_W` must be at least
`DEPTH`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. It
also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cam_pkg.sv tb/tb_cam_delay_buffer.sv \
    -y rtl --top-module tb_cam_delay_buffer
obj_dir/Vtb_cam_delay_buffer
```

Replace the testbench name to run another block's test.

The end-to-end test runs in well under a second at the default size. It does
3000 random cycles of mixed writes and searches and checks every output against
a model. It also counts each mechanism: init, writes, delayed read-outs, pointer
wrap-around, block hand-overs, gated blocks, search hits, misses and multiple
matches, and pointer holds. The test fails if any of these never happens.

One thing to keep in mind with a two-state simulator: flip-flops on a gated
clock see no clock edges during reset. The testbenches therefore drive `rst_n`
high first and then low, so that the asynchronous reset sees a falling edge.

## Choices made here

The source description does not settle these points:

- **Meaning of `sel`.** `sel = 1` is search mode and `sel = 0` is write/delay
  mode. During a search the ring holds (`adv` input of the ring counter), so
  searching does not use up buffer slots.
- **The gate's inputs.** The clock enable is `d_in OR rs`, as explained above.
  The clock gate is latch based.
- **Reset and initialise.** The reset is asynchronous and active low.
  `init` is a one-cycle pulse ORed into the first flip-flop.
- **Valid bits.** Each word has a valid bit, so that words never written cannot
  match.
- **Search outputs.**
  - When several words match, the lowest address wins.
  - The results are registered, with a latency of one cycle.
  - `muop` returns the matched word.
  - `addre` is 8 bits wide, although 5 bits would address 32 words.
- **Storage.** The words are registers, not SRAM, because every word must be
  compared at once.
- **Gated word clocks.** The word array uses gated clocks in blocks of eight,
  matching the ring counter.
- **Read before write.** The output word is registered, and the pointed word is
  read at the same edge that overwrites it.

## Not included

- **Baselines.** This design is meant to replace two earlier designs, and
  neither is included:
  - a classifier-based CAM that makes compare-enable signals for CAM
    sub-blocks from decoded parts of the search tag;
  - a delay buffer made from a plain shift register.
- **Power.** No power figure is claimed for this RTL. The savings come from
  clock edges and bus toggles that do not happen. The testbenches check that
  those edges are indeed suppressed, but they do not measure power.
