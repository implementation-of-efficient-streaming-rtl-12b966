# Clock-gated streaming actor: a deblocking filter that sleeps when its output queue fills

A streaming design is a chain of actors joined by lossless queues. Each actor
waits while its input queue is empty and must stop while its output queue is
full. An actor that is clocked while blocked burns dynamic power for nothing.
This design therefore gives the actor its own gated clock and watches the
queue it writes into. As soon as that queue is almost full, the actor's clock is stopped. So are the
clocks of the two queue ports next to it. The clock comes back when the consumer
has drained the queue. Nothing in the actor has to know about this: it
freezes between two clock edges and continues where it stopped. No data is
lost. As long as the consumer keeps up, the clock never stops, so throughput
is unchanged.

The actor here is a video deblocking filter. It smooths the steps that
block-based compression leaves at the edges of 8x8 pixel blocks. Next to the
chain sits a double-edge-triggered (DET) register. It samples on both clock
edges, so it carries the same data rate at half the clock frequency.

```
            clk (free)                                 clk (free)
   producer ──► queue ──► deblocking_filter ──► queue ──► consumer
               (write)  ▲   (gated clock)     ▲ (write)  (read)
               (read)───┤                     │  │  F, AF
                        │                     │  ▼
                  gclk ─┴──── clock_buffer ◄── clock_enabler (ce_controller + D flip-flop)
```

## The enable path and its timing

This is the part that decides whether the scheme is safe, so it is described
in detail.

**Flags.** The output queue (`queue`) raises `almost_full` (AF) once at least
`AF_LEVEL` words are stored. It raises `full` (F) at `DEPTH` words.

**Controller (`ce_controller`).** A five-state Moore machine on the free clock:

| state          | en | leaves for                                              |
|----------------|----|---------------------------------------------------------|
| INIT (reset)   | 1  | SPACE when AF=0                                         |
| SPACE          | 1  | AFULL_DISABLE when F=0, AF=1                            |
| AFULL_DISABLE  | 0  | SPACE when F=0, AF=0; FULL when F=1, AF=1               |
| FULL           | 0  | AFULL_ENABLE when F=0, AF=1                             |
| AFULL_ENABLE   | 1  | FULL when F=1, AF=1; SPACE when F=0, AF=0               |

Any other input keeps the state. The machine has hysteresis in two ways:
- Normally the actor is stopped at AF and restarted only when the queue has
  drained below AF.
- If the queue did fill up completely, the actor restarts as soon as one word
  has left it (FULL → AFULL_ENABLE). It then runs while AF is still high,
  until the queue is full again or drains below AF.

**Enable register (`clock_enabler`).** A D flip-flop on the free clock registers
`en`. A flag change therefore reaches the clock buffer two rising edges later:
one edge for the state register and one for the flip-flop.

**Clock buffer (`clock_buffer`).** A latch that is transparent while `clk` is
low, followed by an AND gate. This is the usual integrated clock-gating cell,
and it plays the role of an FPGA's BUFGCE. An enable that changes while `clk`
is high cannot cut a pulse short. An enable that falls after rising edge *n*
suppresses edge *n+1*.

**Consequence for the queue size.** After AF rises, the actor still sees two
gated edges, so it can write up to two more words. `Q_AF_LEVEL` must therefore
be at most `Q_DEPTH - 2`. With the defaults (depth 16, AF at 12) the output
queue never reaches FULL, and the controller only uses INIT, SPACE and
AFULL_DISABLE. With AF at 15 the queue does fill, and the FULL and
AFULL_ENABLE states come into play. `tb_streaming_top` runs that
configuration.

The actor also checks F itself before each write. This guard is never needed
at the defaults, but it keeps the queue lossless with any AF level.

**Clock domains.** The gated clock is a copy of `clk`. The queues therefore
compare their read and write pointers directly, with no synchronisers. Each
queue has separate `wclk` and `rclk` pins so that one side can be gated:
- input queue: written on `clk`, read on the gated clock;
- output queue: written on the gated clock, read on `clk`.

Do not use these queues between unrelated clocks.

## The deblocking filter actor

**Stream format.** A picture is `FRAME_W_BLOCKS` × `FRAME_H_BLOCKS` blocks of
8x8 pixels (8-bit), sent in raster order. Each block is 16 words of 32 bits:
- word `2r` holds row `r`, columns 0–3;
- word `2r+1` holds row `r`, columns 4–7;
- column `c` of a word sits in bits `8*(c%4)+7 : 8*(c%4)`.

The filter settings `qp` (0..51), `bs` (boundary strength 0..3, 0 = off) and
`chroma` are actor inputs. They must be stable for a whole block.

**What is filtered.** For every block, four edges are filtered, in this order:
1. the left edge and the edge through column 4, on each row;
2. the top edge and the edge through row 4, on each column.

Edges on the picture border are skipped. Each edge is filtered on a line of
eight pixels, p3 p2 p1 p0 | q0 q1 q2 q3 (`filter_unit`). The line is left
alone unless all of these hold:
- `bs > 0`;
- |p0−q0| < α;
- |p1−p0| < β;
- |q1−q0| < β.

A bigger step is taken to be a real edge in the picture. Otherwise p0 and q0
move towards each other by a clipped amount. For luma, p1 and q1 may move
too. The equations, and the QP-indexed α, β and tc0 tables in
`threshold_derivation`, are those of the H.264/AVC normal-strength
(bS < 4) filter. Each filter unit computes the luma and the chroma result
side by side, and `chroma` picks one.

**Neighbour pixels.** The left and top edges need pixels from neighbouring
blocks. Two 32-word × 32-bit dual-port memories hold them:
- Block Memory 1 holds columns 4–7 of the block to the left (8 words).
- Block Memory 2 holds rows 4–7 of the block above, 8 words per block column.

Memory 2 limits a picture to 4 block columns (32 pixels) at its default size.
Both memories are filled from the actor's own output as each block leaves.

**Schedule.** An administration state machine runs five phases per block:

| phase | cycles     | work |
|-------|------------|------|
| CTX   | 9          | read the 8 neighbour words of each memory (one-cycle read latency) |
| LOAD  | 16 + waits | block words from the input queue into the 8x8 block buffer |
| H     | 8          | Filter Units 1/2 take even/odd rows: left edge, then column 4; each row pair goes to the RAM transposer |
| V     | 8          | Filter Units 3/4 take even/odd columns from the transposer: top edge, then row 4; columns go back to the block buffer |
| OUT   | 16 + waits | block words to the output queue; right half and bottom rows copied into the block memories |

Without stalls, a block takes 57 cycles. The two steps on a row or column
(border edge, then middle edge) are sequential because the middle edge reads
pixels that the border edge has just changed. The intermediate line is held in
a lane register.

**Where this actor is simpler than a full deblocker.** The pixels on the
neighbour side of a left or top edge (p1, p0) are read as context, but the
changed values are not written back. Those blocks have already left the
actor. A standard-conforming deblocker would revise them, and would need a
delayed output to do so.

Other limits:
- The strong bS = 4 filter is not included.
- bS is a per-block input, not derived from coding modes.
- Slice offsets to the table index are not supported.

## DET registers (`det_ff`, `det_latch_ff`)

A DET register takes a new value on both clock edges. It is provided in two
equivalent forms, fed by the same `det_d` in `streaming_top`. The filter
chain does not use either one; they are a separate bank on the free clock.

- **`det_ff`, flip-flop form.** A register on the rising edge and one on the
  falling edge feed a multiplexer selected by the clock. While `clk` is high
  the output shows the rising-edge sample; while it is low, the falling-edge
  sample.
- **`det_latch_ff`, latch form.** A positive latch (transparent while `clk` is
  1) and a negative latch (transparent while `clk` is 0) work side by side on
  the same `d`, not in series. The output multiplexer always picks the latch
  that is currently closed, so the output is never transparent to `d`. When
  the clock rises, the negative latch closes with the value `d` had at that
  edge, and the multiplexer switches to it. The falling edge does the same
  with the positive latch.

In both forms, `q` equals `d` as sampled at the most recent clock edge of
either polarity. The latch form needs no reset. It holds whatever it sampled
last, and is valid from the first edge.

## Departures from the architecture this follows, and choices made here

- **Splitters, combiners and administration.** The block diagram draws
  splitters, combiners, a block buffer and an administration unit with
  select lines S1…S8. Here they are the lane multiplexers and the phase state
  machine inside `deblocking_filter`, not separate modules.
- **Where the block memories are filled from.** In that diagram the block
  memories are loaded from the input bus. The combiners feed the output bus
  and a block buffer, and the transposer is fed from that buffer. Here:
  - the memories are filled from the actor's own output;
  - the horizontal combiner writes the transposer directly;
  - the block leaves from the block buffer after the vertical pass.
- **Filter arithmetic.** The original implementation's filter arithmetic is
  not known (its timing path runs through multipliers). The H.264 filter is
  used instead.
- **Sizes.** Queue depth (16), AF level (12), word width (32), picture size
  (4x4 blocks) and the DET width (8) are choices made here. The 32 × 32-bit
  block memories and the 8x8 transposer follow the architecture.
- **Reset.** All resets are asynchronous and active low; `det_latch_ff` has
  none. The enable flip-flop resets to 1, so the actor runs from reset.
- **One gated actor.** The scheme gives every actor of a chain its own clock
  enabler and clock buffer. This top holds one gated actor. The input queue's
  F and AF are brought out (`in_full`, `in_almost_full`) so that an upstream
  actor's enabler can be attached in the same way.
- **INIT → SPACE.** The state diagram labels this transition with F=1, AF=0,
  which a queue cannot produce. Here INIT leaves whenever AF=0.
- **DET multiplexer.** For the flip-flop form of the DET register, the drawing
  puts the falling-edge register on the multiplexer input that the high clock
  level selects. Taken literally, that output lags by half a period. The
  multiplexer here selects so that the output shows the latest sample.

## Files

| file | contents |
|------|----------|
| `rtl/streaming_top.sv` | the top: queues, actor, clock enabler, clock buffer, DET bank |
| `rtl/queue.sv` | FIFO with F/AF, separate read/write clocks, overflow/underflow assertions |
| `rtl/ce_controller.sv`, `rtl/clock_enabler.sv`, `rtl/clock_buffer.sv` | enable path |
| `rtl/deblocking_filter.sv` | the actor |
| `rtl/filter_unit.sv`, `rtl/threshold_derivation.sv`, `rtl/block_memory.sv`, `rtl/ram_transposer.sv` | actor parts |
| `rtl/det_ff.sv`, `rtl/det_latch_ff.sv` | DET register, flip-flop and latch forms |
| `rtl/dbf_pkg.sv` | shared types (pixel, line, edge line, thresholds) and stream constants |
| `tb/dbf_ref_pkg.sv` | independent reference model: line filter, whole-picture deblocking, test-picture generator |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_streaming_full.sv` | end to end with all defaults |
| `tb/tb_streaming_top.sv` | end to end with AF at 15 of 16, so the queue fills |

Parameters of the top: `Q_DEPTH` (power of two), `Q_AF_LEVEL`,
`FRAME_W_BLOCKS` (1..4 with the 32-word block memory), `FRAME_H_BLOCKS` and
`DET_WIDTH`.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
- **Line filter.** `tb_filter_unit` puts 4000 random lines through the unit
  and compares them with the reference filter.
- **Tables.** `tb_threshold_derivation` checks every QP and bS against the
  reference tables.
- **Controller.** `tb_ce_controller` checks every state against a transition
  table. It must visit all five states.
- **Enable latency.** `tb_clock_enabler` checks the two-edge latency.
- **DET registers.** `tb_det_ff` and `tb_det_latch_ff` change `d` right after
  every edge. They check that `q` holds the value sampled at that edge.
- **Clock gate.** `tb_clock_buffer` checks that no pulse is shortened and
  that the pulse count matches the enable pattern.
- **Queue.** `tb_queue` checks data order and all flags under random traffic,
  with a stopped read clock.
- **Actor.** `tb_deblocking_filter` checks:
  - whole pictures, luma and chroma, against the reference model;
  - the 57-cycle block period without stalls;
  - random input and output stalls.
- **End to end.** The two top-level testbenches run four pictures each. They
  use four producer/consumer rate patterns and compare every output pixel.
  - At full rate, no gating may occur and the block period must be 57 cycles.
  - They count each mechanism and fail if one never happens: clock stopped,
    restart, input-empty waits, input back-pressure, luma and chroma, the DET
    registers, and, with AF at 15, the enabler's FULL state.
  - While the actor's clock is stopped, the consumer must never find the
    output queue empty. This checks that gating costs no throughput.

The α/β/tc0 tables were written from general knowledge of H.264. The
reference model uses the same numbers, so a wrong table entry would not be
caught.

With generic coarse synthesis the top comes to about 2250 word-level cells,
57 flip-flop bits and 6.5 kbit of memory and register arrays. Its latches
are intended: one in the clock gate, and two per bit in `det_latch_ff`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/tb_streaming_full.sv \
    --top-module tb_streaming_full
obj_dir/Vtb_streaming_full
```

Replace `tb_streaming_full` with any other testbench name to run that one.
The testbenches avoid x/z, so a two-state simulator is fine. Every register
that is read before it is written has a reset.
