# Switch allocators for a four-port NoC router

A network-on-chip router has to decide, every cycle, which of its inputs may
send to which of its outputs. Several inputs often want the same output, and an
input may have traffic for several outputs. The decision is a *matching*: no
input gets more than one output and no output more than one input. The circuit
that makes it is the switch allocator. Its algorithm sets how much traffic gets
through, how fair the router is to its inputs, and what it costs in area and
timing.

This RTL puts four allocation schemes for a four-port router (north, south,
east, west) next to each other so they can be compared on identical traffic:

* **iSLIP**: iterative request/grant/accept matching with round-robin
  pointers.
* **Wavefront**: a square array of cells through which grant tokens sweep from
  a rotating priority diagonal.
* **Lonely output**: a separable allocator that first counts the requests
  for each output and steers inputs toward the outputs few others want.
* **Wormhole**: allocation for wormhole flow control. Packets are cut into
  flits. A lane of an output stays reserved for one packet from its head flit
  to its tail flit, and each link has two lanes. This one is part of a small
  working switch, with flit buffers and a crossbar.

Everything is synthesizable SystemVerilog-2017 and is written as a parameterized
library. The top level `noc_alloc_top` wires it into one core.

## Ports, requests and the 12-bit request vector

A packet never leaves by the port it came in on, so each input can ask for only
three outputs. Four inputs times three requests gives the **12-bit request
vector** the allocators are built for. At the top level it is a `compact_t`
(`logic [3:0][2:0]`). `req_in[i][k]` means that input `i` wants the `k`-th of
the other ports, counting upwards in the order north=0, south=1, east=2, west=3:

| input | k=0   | k=1   | k=2  |
|-------|-------|-------|------|
| north | south | east  | west |
| south | north | east  | west |
| east  | north | south | west |
| west  | north | south | east |

Inside, every allocator works on a square `N x N` matrix. `req[i][j]` means
input `i` wants output `j`, and the U-turn diagonal is held at zero. The package
functions `compact_to_matrix` and `matrix_to_compact` convert between the two
forms. Grant vectors use the same layouts.

## iSLIP (`islip_allocator`)

Each output has a *grant pointer* over the inputs, and each input has an
*accept pointer* over the outputs. Each pointer names the partner that
currently has top priority. One iteration has three steps:

1. **Request.** Every still-unmatched input requests every still-unmatched
   output it has traffic for.
2. **Grant.** Every output grants the first requesting input found from its
   grant pointer onwards, wrapping around.
3. **Accept.** Every input accepts the first grant found from its accept
   pointer onwards.

Accepted pairs join the matching. The next iteration works only on what is
still unmatched. `ITERATIONS` iterations (default 4 = N, which is enough for
the result to be a maximal matching) are unrolled in one clock cycle. Each
iteration has its own 2N round-robin arbiters (`rr_arbiter`).

The pointer rule makes iSLIP fair and keeps it from starving anyone. **Only
accepts made in the first iteration move pointers.** The input's accept pointer
moves to one past the output it accepted, and that output's grant pointer moves
to one past the input. A connection just made therefore becomes the
lowest-priority one. A grant that is not accepted moves nothing, so the output
keeps granting the same input until that input takes it. Matches added by later
iterations fill in the matching but do not change the pointers. If they did,
the pointers would no longer de-synchronise under heavy load, and the
testbench's reference model would catch it.

## Wavefront (`wavefront_allocator`)

Picture an `N x N` array with one cell per request. Diagonal `d` is the set of
cells with `(i + j) mod N = d`. It has exactly one cell in every row and every
column, which is why the array must be square. Each cycle, every cell of the
*priority diagonal* gets a row token and a column token:

* A cell that holds both tokens and has a request grants it and absorbs both
  tokens.
* A cell that does not use a token passes its row token right, to `(i, j+1)`,
  and its column token down, to `(i+1, j)`. Both land on the next diagonal,
  and both wrap around the array edges.

The tokens sweep outwards as a wavefront. The result is always a maximal
matching: a request is refused only if its row or its column is already
granted. The priority diagonal moves on by one every clock cycle, so every cell
gets first claim in turn.

The array as drawn is a ring of combinational logic. The RTL evaluates the
diagonals one after another, starting at the priority diagonal. This gives
exactly the grants of the wrapped array but contains no combinational loop. The
testbench checks it against a cell-by-cell token model of the wrapped array.
A non-square problem, such as 4 inputs x 3 outputs, is handled by leaving the
extra requests low, which has the same effect as dummy rows or columns. The
`prio` output reports the diagonal that produced the grant now shown.

The rotating diagonal is not fair to every pair of inputs. If north and south
both want east, their cells lie on diagonals 2 and 3, so north wins three
cycles out of four. `tb_fig5_scenario` checks exactly this.

## Lonely output (`lonely_output_allocator`)

In a simple separable allocator each input picks one of its requests on its
own, and then each output picks among the inputs that picked it. The inputs
tend to crowd onto a popular output while an output that only one input wants
(a *lonely* output) goes unused. This allocator adds a stage in front and runs
three stages in one cycle:

1. **Count.** For each output, count how many inputs request it
   (`req_count`).
2. **Input stage.** Each input keeps only its requests for the outputs with
   the lowest count among those it wants. It chooses one of them with a
   round-robin arbiter.
3. **Output stage.** Each output grants one of the inputs that chose it, with
   a round-robin arbiter.

On a grant, the output's pointer moves past the input and the input's pointer
moves past the output. Example: input 0 wants outputs 1 and 2, and inputs 1 and
2 want only output 1. Output 1 has count 3 and output 2 has count 1, so input 0
takes output 2 and output 1 is left to the other two.

The result is a valid matching but not always a maximal one. That is the
nature of a single-pass separable allocator.

## Wormhole path

### Flits and lanes

A packet is a destination port, a lane number and a `PKT_W`-bit payload
(default 64). The `flitizer` sends it as:

* a **head** flit, whose data field holds the destination port;
* `PKT_W/16 - 1` **body** flits;
* one **tail** flit. The tail carries the last payload word and ends the
  packet.

The payload goes out least significant word first. A flit is the `flit_t`
struct: a lane number (`vc`, `VC_W` bits), a 2-bit `flit_type_e` and 16 data
bits, 19 bits in all. A 64-bit packet is five flits. `pkt_ready` is also high
in the cycle the tail leaves, so back-to-back packets stream with no gap.

Every physical link carries `NUM_VCS` = 2 virtual channels, or *lanes*. A lane
is a flit queue of its own at the receiver, with its own ready signal. Flits of
packets on different lanes can interleave on one link, cycle by cycle. The
`vc` field says which lane a flit belongs to. Within one lane, packets never
mix.

### Allocation (`wormhole_allocator`)

Lanes are numbered `q = port * NUM_VCS + lane`, on the input side and on the
output side. Before a head flit may move, it must hold three resources:

* the channel state of an output lane at its destination. That lane must not
  belong to another packet (`ovc_busy`);
* a buffer in that lane at the receiver (`out_ready[q]`);
* the link for this one flit.

Allocation takes two steps.

**Lane (VC) allocation** is registered. Each cycle, every output port that
has a free lane gives its lowest free lane to one of the head flits waiting for
that port. The winner is chosen round-robin over all eight input lanes. The
input lane then owns that output lane (`ovc_owner`) until its tail flit leaves.

**Switch allocation** is combinational and separable. Each input port picks,
round-robin, one of its lanes that owns an output lane, has a flit waiting,
and sees its receiver lane ready. Each output port then picks, round-robin, one
of the input ports that chose it. The result is the connection matrix `conn`,
the pops `in_pop`, and `out_vc`, the lane each output flit travels on. Head,
body and tail flits all go through this step. Body and tail flits need only the
receiver buffer and the link, because their packet already owns the lane. The
tail flit frees the output lane.

Two things follow from the lanes:

* Two packets to the same output can be in flight at once on the two lanes.
  Their flits alternate on the link instead of one packet waiting for the
  whole of the other.
* When one lane of an input port is blocked by its receiver, the other lane
  of that port still moves. A stalled packet does not hold the physical
  channel.

A head flit needs at least one cycle after it reaches the front of its queue,
because it must first be granted a lane.

### Preemption

In a network of wormhole switches, packets can block each other in a cycle.
Each one holds lanes and waits for a lane that another one holds, and none of
them can ever move. The allocator breaks such waits by preemption. A head flit
that has sat at the front of its input lane for `TIMEOUT` cycles without
moving is preempted. The default is 256 cycles. A head waits like this either
because every lane at its output is taken, or because it holds a lane whose
receiver never becomes ready. Once preempted, its packet is discarded at
this input: `in_drop` pops the head and every following flit of the packet
up to and including the tail, and forwards none of them. If the head held an
output lane, the head's discard frees it.

The packet is thrown away at the point where its head waits. No flit of it
has gone further, so the next link never sees a partial packet. The link
before has already delivered its flits, and the freed input buffer lets the
packets behind move on. A discarded packet is lost: anything that needs
delivery guarantees must resend at a higher level. `TIMEOUT = 0` turns
preemption off. The timeout should be well above the longest wait that normal
contention can cause. Under random traffic with frequent receiver stalls, the
testbenches never see a head wait anywhere near 256 cycles.

### Switch (`wormhole_switch`)

The switch has:

* one `flit_fifo` per input lane (default depth 4). An arriving flit goes into
  the queue named by its `vc` field. A queue is popped when its flit is
  switched or discarded;
* the `wormhole_allocator`, fed with the type and destination of the flit at
  the front of each queue;
* a `crossbar` (AND-OR multiplexer per output), steered by the allocator's
  connection matrix. Each input port first selects the flit of the lane that
  won switch allocation;
* lane re-tagging: a flit leaves with `vc` set to the output lane it was
  given.

Every link uses a valid/ready handshake, with one valid per link and one ready
per lane. A flit moves on a clock edge where valid and the ready of its lane
are both high. This plays the part of the request/acknowledge exchange
between neighbouring nodes. `in_ready[q]` is the ready of input lane `q`. A
sender must look at the lane it is about to send on.

One departure from common valid/ready practice: a switch output raises
`out_valid` only in a cycle where the ready of the chosen lane is high,
because a flit is switched only once its transfer is acknowledged. A receiver
must therefore drive `out_ready` without waiting for `out_valid`.

Timing, uncontended:

* a head flit written into an input queue on edge t is granted a lane on
  edge t+1 and leaves on edge t+2;
* the rest of the packet follows one flit per cycle.

So the tail of a 5-flit packet leaves 6 cycles after its head went in. Each
further switch adds two cycles, not a packet time. Across D switches the tail
is out after `2*D + 4` cycles, against `5*(D+1)` for store-and-forward
switching. That is the wormhole property.

## Timing summary

| block | latency | throughput |
|---|---|---|
| iSLIP, wavefront, lonely output | grant registered: valid the cycle after the request is sampled | a new matching every cycle |
| `rr_arbiter`, `crossbar` | combinational | — |
| `flit_fifo` | a written word is visible after the write edge | 1 word/cycle in and out, simultaneous read and write when full |
| `flitizer` | head flit the cycle after the packet is taken | 1 flit/cycle, packets back to back |
| `wormhole_allocator` | lane grant registered; switch allocation combinational | one lane grant per output and one flit per input and per output each cycle |
| `wormhole_switch` | 2 cycles for a head flit, 1 for the flits after it | 1 flit/cycle per output link |

All resets are active-low and synchronous (`rst_n`). They clear grants,
pointers, lane ownership and queues.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `PORTS` | `noc_alloc_pkg` | 4 | router ports (N, S, E, W) |
| `REQ_BITS` | `noc_alloc_pkg` | 12 | request vector, `PORTS*(PORTS-1)` |
| `FLIT_DATA_W` | `noc_alloc_pkg` | 16 | flit data bits |
| `NUM_VCS` | `noc_alloc_pkg` | 2 | lanes (virtual channels) per link |
| `ISLIP_ITERATIONS` | `noc_alloc_top` | 4 | iSLIP iterations per cycle |
| `PKT_W` | `noc_alloc_top`, `flitizer` | 64 | packet payload bits (a multiple of `FLIT_DATA_W`) |
| `BUF_DEPTH` | `noc_alloc_top` | 4 | input flit buffer depth |
| `PREEMPT_TIMEOUT` | `noc_alloc_top` (`TIMEOUT` in the switch and allocator) | 256 | cycles a head flit may wait before its packet is discarded; 0 disables |
| `N` | each allocator, switch, crossbar | 4 | port count of the block |
| `VCS` | `wormhole_allocator` | 2 | lanes per port (the switch uses `NUM_VCS`) |

The allocators, the arbiter, the crossbar and the switch can be used at other
sizes, including N that is not a power of two. The top level is tied to four
ports through the package because of the compact request layout.

## What is this design's own choice

The algorithms follow their usual published descriptions. The following points
were chosen here:

* The 12-bit vector is taken as four ports with three requests each.
* All iSLIP iterations run in a single clock cycle. A design with a tighter
  clock could instead iterate over several cycles, reusing one set of 2N
  arbiters.
* Grants are registered in all three matching allocators.
* The wavefront array is evaluated diagonal by diagonal, not as a loop, and
  its diagonal rotates every cycle whether or not anything was granted.
* Lonely output: the count is recomputed from the present requests every
  cycle, ties are broken round-robin, and the output stage is round-robin.
* The packet, flit and buffer sizes, the flit type encoding and the word
  order are chosen here.
* Two lanes per link. Lane allocation and switch allocation are separate
  steps: lane allocation is registered and hands out the lowest free lane,
  switch allocation is separable with round-robin arbiters.
* The sender picks the lane of each packet (`pkt_vc`). A packet stays on
  that lane for the hop, and the switch moves it to the lane it was granted at
  the output.
* The switch does no route computation: the head flit names the output
  directly.
* A packet is preempted by a fixed timeout on its waiting head flit, and only
  while no flit of it has left the switch.
* The link handshake is valid/ready, with the `out_valid`-waits-for-`out_ready`
  behaviour described above.

## Files

* `rtl/noc_alloc_pkg.sv`: shared constants, port and flit types, request
  layout conversion.
* `rtl/rr_arbiter.sv`: round-robin programmable priority encoder.
* `rtl/islip_allocator.sv`, `rtl/wavefront_allocator.sv`,
  `rtl/lonely_output_allocator.sv`: the matching allocators.
* `rtl/flitizer.sv`, `rtl/flit_fifo.sv`, `rtl/wormhole_allocator.sv`,
  `rtl/crossbar.sv`, `rtl/wormhole_switch.sv`: the wormhole path.
* `rtl/noc_alloc_top.sv`: the allocators side by side, plus the wormhole
  switch with one flitizer per port.
* `tb/tb_<block>.sv`: one self-checking testbench per module.
  `tb/tb_fig5_scenario.sv` runs a two-input contention scenario on the whole
  core. `tb/tb_wormhole_chain.sv` measures latency over a chain of switches.

## Verification

Every testbench checks against a reference written independently of the RTL.
Each ends with a line `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

* `tb_rr_arbiter`: every request pattern and pointer, for N=4 and N=5.
* `tb_islip_allocator`: thousands of random request matrices compared cycle
  by cycle with a loop-based iSLIP model, for 4 iterations and for 1
  iteration. It also checks that the 4-iteration matchings are maximal.
* `tb_wavefront_allocator`: compared with a token-relaxation model of the
  wrapped array, including the diagonal rotation. It also checks that the
  matchings are maximal.
* `tb_lonely_output_allocator`: compared with a behavioural model, plus the
  lonely-output example above and the request counts.
* `tb_flit_fifo`: compared with a queue model, including a full buffer written
  and read in the same cycle.
* `tb_flitizer`: flit sequence and the back-to-back packet rate.
* `tb_crossbar`: random legal connection matrices.
* `tb_wormhole_allocator`: a packet stream on each of the eight input lanes,
  against randomly stalling receiver lanes. Checks at most one flit per input
  port and per output port, that a flit moves only when its receiver lane is
  ready, that a head takes a lane nobody owns at its destination, that body
  and tail flits follow their head's port and lane, and that the tail frees
  the lane. Every packet must arrive. It also requires that two packets
  interleave on one output, and that one lane of an input moves while the
  other is blocked. No flit may be discarded. A directed phase then holds
  every receiver lane off. Four waiting heads, three holding lanes and one
  waiting for a lane, must be discarded exactly `TIMEOUT` cycles later,
  together with their packets. Their lanes must be freed, and a new packet
  must then pass.
* `tb_wormhole_switch`: packets on both lanes of all four links, interleaved
  at random. On every output lane the flits must form whole packets, in
  order per source lane. It also checks the 6-cycle timing of a packet sent
  alone.
* `tb_wormhole_chain`: three switches in a row. It checks that the tail
  leaves switch D after `2*D + 4` cycles, and that a packet on the other lane
  follows right behind.
* `tb_noc_alloc_top`: the whole core at its default parameters. It checks
  every matching, then sends 400 packets end to end and compares their
  payloads. It also counts each mechanism and fails if one never occurs:
  output contention, iSLIP matches completed by later iterations, iSLIP
  pointer rotation, wavefront rotation, lonely-output wins, heads waiting for
  a busy lane, receiver stalls, injection back-pressure, lane interleaving on
  a link, a lane moving past a blocked one, and a preemption. The preemption
  is forced at the end: both east receiver lanes are held off, so a
  north-to-east packet is discarded after the timeout without a flit of it
  reaching the east link. The next packet to east must then arrive intact.
* `tb_fig5_scenario`: north and south both want east. iSLIP and lonely output
  alternate strictly, and wavefront splits 3:1. North sends on lane 0 and
  south on lane 1, so the east link alternates between the lanes every cycle.
  Each lane delivers whole packets of its own source.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/noc_alloc_pkg.sv tb/tb_noc_alloc_top.sv --top-module tb_noc_alloc_top
./obj_dir/Vtb_noc_alloc_top
```

Swap in any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/noc_alloc_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused status outputs: arbiter indices, the
wavefront `prio`, the lonely-output counts and the switch's lane ownership. They
are brought out for observation and testing.
