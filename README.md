# Clock-gated dataflow actor: a deblocking filter behind a queue-driven clock enabler

In a streaming (dataflow) design, actors talk only through order-preserving
FIFO queues. An actor whose output queue is full cannot do anything useful,
so its clock can be switched off until the consumer has made room, and the
throughput of the network does not change. This RTL builds that scheme
around one actor, a video deblocking filter:

```
          clk (free running)
   producer ──► [input queue] ──► [deblocking filter actor] ──► [output queue] ──► consumer
                  CLK W=clk         CLK = gclk                   CLK W = gclk
                  CLK R=gclk                                     CLK R = clk
                                                                   │ F  │ AF
                                        gclk ◄── BUFGCE ◄── DETFF ◄── controller(s)
```

A small state machine watches the output queue's **F** (full) and **AF**
(almost full) flags. Its enable passes through a **double edge triggered
flip-flop** (DETFF) into a clock buffer with enable (the FPGA's `BUFGCE`),
whose output `gclk` clocks the actor, the read side of its input queue and
the write side of its output queue.

The scheme follows the paper *Clock Gating Using Energy Efficient Double Edge
Triggered Flip Flop For Streaming Applications*. That paper gives the
controller's state machine, the way several controllers combine, and the
position of the DETFF and the clock buffer. It names the deblocking filter's
internal blocks but does not describe how they work. The filter arithmetic
here is therefore the HEVC deblocking filter, and the filter is reduced to
its threshold block and four filter units (see *What is not here*).

## The clock enabling controller

One controller serves one output queue. AF is high when **at most one** slot
is free, so AF stays high while F is high. The controller is a Moore
machine with five states:

| state          | en | leaves when                | to             |
|----------------|----|----------------------------|----------------|
| INIT           | 1  | F=0, AF=0                  | SPACE          |
| SPACE          | 1  | AF=1                       | AFULL_DISABLE  |
| AFULL_DISABLE  | 0  | AF=0                       | SPACE          |
|                |    | F=1, AF=1                  | FULL           |
| FULL           | 0  | F=0                        | AFULL_ENABLE   |
| AFULL_ENABLE   | 1  | F=0, AF=0                  | SPACE          |
|                |    | F=1, AF=1                  | FULL           |

Any other input holds the state. The published diagram does not label some
combinations. This design resolves them as follows: SPACE leaves on AF=1
whatever F is, and FULL leaves on F=0 whatever AF is. F=1 with AF=0 cannot
come from a queue, and it holds the state.

The clock is already stopped at *almost* full (AFULL_DISABLE, en=0). The
reason is the latency of the enable path. For an actor that writes on every
clock:

```
clk edge   k      : actor writes; queue now has 1 free slot -> AF=1
clk edge   k+1    : controller sees AF -> AFULL_DISABLE, en=0
                    gclk still pulses (the old enable is in the DETFF):
                    actor writes the last slot -> F=1
falling    k+1    : DETFF passes en=0 to the buffer while clk is low
clk edge   k+2    : no gclk pulse; controller sees F,AF -> FULL
```

The free slot at AF absorbs the one cycle that the enable needs to take
effect. The same latency works against the scheme on the way out. After a
read from a full queue, the controller goes to AFULL_ENABLE and turns the
clock back on with a single slot free. If the actor holds a result and also
has a new token waiting, it can offer two words before the controller
returns to FULL. For that reason the actor in this design also **blocks on
a full output** (`out_full`), as a dataflow actor would. The gating saves
power, and correctness never depends on it. The end-to-end test counts
these stalls: about one per refill when the consumer is slow.

## DETFF and clock buffer: why the gated clock has no glitches

`detff` is the classic XOR double edge flip-flop. One flop samples on the
rising edge and one on the falling edge, each storing `d ^ other`, and the
output is `q_pos ^ q_neg`. The controller's enable changes just after a
rising edge. The rising-edge flop has already sampled the old value, so
the new value reaches the output at the following **falling** edge, while
`clk` is low. `bufgce` models the FPGA primitive: it takes `CE` only while
the clock is low (a transparent-low latch) and ANDs it with the clock. A
pulse of `gclk` is therefore always a whole pulse of `clk`. The latch in
`bufgce` is intended. On an FPGA, map `bufgce` to the vendor's `BUFGCE`
primitive; on an ASIC, map it to an integrated clock-gating cell.

## Several output queues: AND over a fanout, OR across ports

`clock_enabler` holds `N_QUEUES` controllers. `PORT_OF` holds 4 bits per
queue and says which output port of the actor each queue hangs off.

* Queues fed from **the same port** (a fanout) are ANDed: if any of them is
  about to fill, the port must not produce.
* **Different ports** are ORed: the actor keeps running while any port
  still has room. A consumer downstream may need more tokens on another
  port before it frees space anywhere. Stopping the actor in that case
  could deadlock the network.

| configuration                           | `N_QUEUES` | `N_PORTS` | `PORT_OF` |
|-----------------------------------------|-----------|-----------|-----------|
| one port, single queue (used in the top)| 1         | 1         | `'h0`     |
| (a) one port with a fanout of two       | 2         | 1         | `'h00`    |
| (b) two separate ports                  | 2         | 2         | `'h10`    |
| (c) fanout of two plus another port     | 3         | 2         | `'h100`   |

## The queues

`async_queue` is a dual-clock FIFO with Gray-coded pointers and
`SYNC_STAGES`-deep synchronisers. Its read side is first-word fall-through:
`rdata` is valid whenever `empty` is low. F and AF are combinational in the
write pointer, so they rise on the same edge as the write that causes them.
This matters for the latency argument above.

One detail is specific to gated clocks. If the write clock is stopped, a
normal FIFO stops synchronising the read pointer, so F can never fall, and
the actor would then stay off for ever. This queue therefore runs the
read-pointer synchroniser on its own clock, `wsync_clk`. The top ties it to
the free-running `clk`, the source of `gclk`, so both share edges. For two
unrelated free-running clocks, tie `wsync_clk` to `wclk`. A write offered
while F is high is not taken and is flagged on `wr_refused`.

## The deblocking filter actor

A **token** (`dbf_pkg::dbf_token_t`, 1039 bits) carries four *segments*
plus the block's `qp`, one boundary strength `bs` (0..2) per segment, and a
`chroma` flag. A segment is four lines across a block edge, with four 8-bit
samples on each side (`p[0]`/`q[0]` next to the edge). Segments 0 and 1
cross the left edge of an 8x8 block and go to the two horizontal filter
units. Segments 2 and 3 cross its top edge and go to the two vertical
filter units. Each unit treats its segment independently.

`threshold_derivation` turns the QP and the per-picture offsets into:

* β: 0 for Q < 16, Q−10 up to Q = 28, then 2Q−38 (Q clipped to 0..51).
* tc: the HEVC tc table indexed by `qp + 2(bS−1) + 2·tc_offset`, clipped
  to 0..53.

`filter_unit` (four instances) makes the HEVC decisions on lines 0 and 3:

* The segment is skipped if bS = 0, or if the second-difference activity
  `d` is at least β.
* It gets the **strong** filter (three samples on each side rewritten,
  clipped to ±2tc) if both decision lines are flat enough and the step is
  small enough.
* Otherwise it gets the **normal** filter: p0/q0 move by a clipped Δ, and
  p1/q1 move by up to tc/2 where that side is smooth.

For chroma, only bS = 2 edges are filtered, and only p0/q0 move. `p3`/`q3`
are never modified, so those output bits simply copy the input.

The actor reads a token whenever its input queue is not empty and its
output register is free or leaving. It filters all four segments in one
clock and offers the result to the output queue on the next clock. It has
one stage and accepts one token per clock.

## What is not here, and other departures from the paper

* **Inside the filter.** The paper's block diagram also shows two block
  memories (left and top neighbours), two splitters, two combiners, a block
  buffer, a RAM transposer and an administration unit with control signals
  S1..S8. The paper gives no sizes, sample order or control timing for any
  of them. Here the token supplies the samples those blocks would gather,
  and nothing models their sequencing.
* **Filter arithmetic.** The thresholds and filters are HEVC's, chosen
  because the paper uses HEVC's β and tc (it also calls the decoder "MPEG
  Simple profile"). Sample depth is 8 bits. QP for chroma is expected
  already mapped by the producer. The β/tc offsets are inputs and must only
  change while no token is in flight.
* **Blocking write.** The actor holds its result while the output queue is
  full (see above). The paper relies on the clock gating alone.
* **Idle input.** The paper's waveform discussion also shows the clock off
  while the input queue is empty. Its controller, as specified, looks only
  at the output queue's F and AF, and that is what is built here. An actor
  with an empty input simply does not read; its clock keeps running.
* **Double-edge clocking of the actor.** The paper also suggests that
  double edge flip-flops would let the actor run at half the clock
  frequency. Here the DETFF sits only in the enable path. The actor's
  registers are ordinary rising-edge flops.
* **Own choices.** Queue depths (8), token layout, state encoding, the
  XOR DETFF, the latch-based buffer model and asynchronous active-low
  reset.
* **Not reproduced.** The paper's area, frequency and power figures come
  from an FPGA flow and are not reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/cg_pkg.sv` | controller state type |
| `rtl/cg_controller.sv` | five-state clock enabling controller |
| `rtl/detff.sv` | double edge triggered flip-flop |
| `rtl/bufgce.sv` | behavioural model of the clock buffer with enable |
| `rtl/clock_enabler.sv` | controllers + AND/OR combination + DETFF + buffer |
| `rtl/async_queue.sv` | dual-clock FIFO with F/AF |
| `rtl/dbf_pkg.sv` | sample, segment, token and mode types |
| `rtl/threshold_derivation.sv` | β and tc from QP |
| `rtl/filter_unit.sv` | luma/chroma edge filter for one segment |
| `rtl/deblocking_filter.sv` | the actor: thresholds + four filter units + output register |
| `rtl/cg_dbf_top.sv` | top: input queue, actor, output queue, clock enabler |
| `tb/dbf_ref_pkg.sv` | independent reference model of the filter, random token generator |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Packages
are listed first; `-y` finds the rest:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/cg_pkg.sv rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/tb_cg_dbf_top.sv \
    --top-module tb_cg_dbf_top
./obj_dir/Vtb_cg_dbf_top
```

Replace the last file and the top name for another testbench. What they
check:

* `tb_cg_dbf_top`: the whole design at its default sizes. A producer
  keeps the input queue full. The consumer changes pattern by phase:
  reading every cycle, stopped, slow and random. Every output token must
  equal the reference-filtered input token, in order. The test counts
  gated-clock edges, cycles in each controller state, input back-pressure,
  actor stalls and each filter mode, and fails if any of them never
  happened. It also fails if the clock is ever gated while the consumer
  reads every cycle, or if the filter then falls behind the producer (no
  throughput loss). On every clock it checks that `gclk` pulses exactly
  when the controller's enable was high one clock earlier. A typical run moves about 2000
  tokens, with roughly 40% of actor clock edges gated.
* `tb_cg_controller`: every cycle against the transition table above.
* `tb_detff`: sampling on both edges.
* `tb_bufgce`: enable changes while the clock is high have no effect.
* `tb_clock_enabler`: configurations (a), (b) and (c) against a model.
* `tb_async_queue`: exact F/AF thresholds, and ordering under two
  unrelated clocks.
* `tb_threshold_derivation`: β and tc for all QPs, against literal tables.
* `tb_filter_unit`: 20,000 random and directed segments, with all four
  modes reached.
* `tb_deblocking_filter`: one-clock latency, one token per clock, and
  holding on `out_full`.

## Changing it

* **Queue depth:** `IN_DEPTH` and `OUT_DEPTH` on `cg_dbf_top` (powers of
  two, at least 2).
* **Actors with more outputs:** instantiate `clock_enabler` with one
  controller per output queue and set `PORT_OF` to match the wiring.
* **Sample depth:** `dbf_pkg::BITDEPTH`. The reference model in
  `tb/dbf_ref_pkg.sv` assumes 8 bits.
* **Another actor:** replace `deblocking_filter`. The actor must
  * take its clock from `gclk`;
  * read its input queue through `in_empty`/`in_rd`;
  * write its output queue through `out_wr`/`out_full`.
