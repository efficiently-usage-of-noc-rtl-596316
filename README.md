# Virtual-channel router and 2x2 network-on-chip with serial links

A wormhole router with one queue per input has a well-known weakness. If the
packet at the head of the queue is blocked, every packet behind it waits too,
even when its own output is free. This design gives each router input several
queues side by side: the virtual channels. A new packet goes into whichever
queue is free, so a packet stuck in one queue does not stop a packet in
another queue of the same input. Four such routers form a 2x2 mesh with one
core on each router. All links are bit-serial: an 8-bit flit moves as eight
data bits framed by an enable wire, and a credit wire runs back against every
link.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) with
self-checking testbenches. It passes Verilator lint and simulation.

## The network

```
          west  <-------------------  east
   +-----------+   link + credit   +-----------+
   | router 1  | <---------------> | router 0  |
   |  core 1   |                   |  core 0   |
   +-----------+                   +-----------+
        ^ |                             ^ |
        | v  link + credit              | v
   +-----------+                   +-----------+
   | router 3  | <---------------> | router 2  |
   |  core 3   |                   |  core 2   |
   +-----------+                   +-----------+
                                        south
```

Router *r* has ID *r*. It sits at column `r % MESH_X` and row `r / MESH_X`.
Columns count towards the **west** and rows towards the **south**. So router
1 is west of router 0, and router 3 is south of router 1. Routing is
dimension-ordered (XY): a packet first travels along the row to the right
column, then along the column. A packet from core 0 to core 3 therefore
leaves router 0 on its west port and router 1 on its south port. XY routing
on a mesh has no cyclic channel dependencies, so the network cannot deadlock.

The top module `noc_2x2` takes `MESH_X` and `MESH_Y` parameters (default
2 x 2). Router IDs are 4 bits, so meshes of up to 16 routers can be built.
Edge ports of the mesh are tied off.

## Flits and packets

| item | format |
|---|---|
| flit | 8 bits |
| head flit | `[3:0]` destination router ID, `[7:4]` number of body flits that follow (0-15) |
| packet | head flit, then 0-15 body flits; the last flit is the tail |
| link | `flit_en` high for 8 cycles, `flit` carries bit 0 first; at least one idle cycle between flits |

A packet has at most 16 flits, and one queue holds 16 flits. Keep both in
mind when you change the parameters.

## Inside a router (`vc_router`)

Ports are numbered L=0 (local core), N=1, E=2, S=3, W=4. A head flit goes
through five stages:

1. **QW, queue write.** The serial-in buffer (`ser_in_buffer`) shifts the
   bits into an 8-bit register as `s_out = {s_in, s_out[7:1]}`. After the
   eighth bit it raises `valid`. The input port acknowledges in the same
   cycle (`rd_ack`) and writes the flit into a queue. A head flit takes the
   lowest-numbered free queue (`vc_input_port`). Body flits follow it into
   the same queue.
2. **LRC / VCA, route computation and VC allocation in one cycle.** The
   controller (`router_ctrl`) computes the XY output port from the head
   flit. In the same cycle it asks the VC allocator (`vc_allocator`) for
   that output. The allocator grants an output only if two things hold: no
   other packet owns it, and it holds a credit, meaning a free queue waits
   downstream. The winning packet then owns the output until its tail has
   gone through.
3. **SA, switch allocation.** Each input has a single path into the
   crossbar. Among the queues of one input that own an output, have a flit,
   and whose output serializer is idle, `switch_allocator` picks one per
   cycle (round robin). That flit is popped.
4. **ST, switch traversal.** The popped flit sits in a per-input register.
   The `crossbar` moves it to the output chosen by the registered select.
5. **LT, link traversal.** The output serializer (`ser_out`) shifts the flit
   out LSB first. Then it stays busy for one idle cycle.

Body and tail flits skip stage 2. With no contention, the first output bit
leaves 5 cycles after the cycle in which the last input bit arrived. Each
router adds 12 cycles from the last bit of a flit in to the last bit out.

### Flow control

Credits count **free queues**, not flit slots. After reset every output
holds `NUM_VC` credits. Starting a packet on an output costs one credit. The
downstream input port returns one credit (a one-cycle pulse on its
`credit_out`) when the tail of a packet leaves one of its queues. A queue
holds exactly one packet, and a packet fits in a queue, so a queue never
overflows and no flit-level credits are needed. The cores follow the same
rule at the local ports. A core may start a packet only while it holds a
credit from `core_credit_out`. It pulses `core_credit_in` once for each
packet it has finished receiving.

## Timing of the 2x2 network

All counts are clock cycles, taken from the clock edge that samples the
first bit a core sends. The testbench checks each one.

| event | cycles |
|---|---|
| flit valid in the serial-in buffer | 8 |
| flit stored in router 0's local queue | 9 |
| credit back at core 0, single-flit packet | 11 |
| head flit fully received, core 0 to core 1 or core 2 (2 routers) | 31 |
| head flit fully received, core 0 to core 3 (3 routers) | 43 |

A packet streaming through a router output sends one flit every 11 cycles:
8 bits, the idle cycle, and 2 cycles of switch allocation and traversal.
The output serializer must be idle before the next flit wins switch
allocation. A core may send faster, with one flit every 9 cycles.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | widths, port enum, head-flit fields, XY routing function |
| `rtl/ser_in_buffer.sv` | serial-in flit buffer (valid / rd_ack) |
| `rtl/ser_out.sv` | output link serializer |
| `rtl/vc_fifo.sv` | one queue |
| `rtl/vc_input_port.sv` | the parallel queues of one input, queue choice, credit return |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/vc_allocator.sv` | output ownership and credit counters, grant |
| `rtl/switch_allocator.sv` | one queue per input per cycle |
| `rtl/crossbar.sv` | 5x5 switch |
| `rtl/router_ctrl.sv` | route computation, allocators, selects |
| `rtl/vc_router.sv` | the five-port router |
| `rtl/noc_2x2.sv` | top: the mesh |
| `tb/tb_*.sv` | one self-checking testbench per module above, `tb_noc_2x2` for the whole network |

### Parameters

| parameter | default | where |
|---|---|---|
| `NUM_VC` | 2 | queues per input, also the credits per output |
| `DEPTH` | 16 | flits per queue; keep it at 16 or more |
| `MESH_X`, `MESH_Y` | 2, 2 | mesh size |
| `MY_ID` | 0 | router ID, set by `noc_2x2` |

With `NUM_VC = 1` the router becomes a single-queue wormhole router, which
is useful as a baseline. Run through the same end-to-end traffic as
`tb_noc_2x2` (with one credit per core instead of two), it delivers every
packet. The whole run takes about 5,800 cycles, against about 4,400 with
two queues per input.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. To run the network test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_2x2.sv \
          --top-module tb_noc_2x2 -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, with the name changed.
Variables nothing resets start at random values. Run with
`+verilator+rand+reset+2` to confirm that the design does not depend on
them.

`tb_noc_2x2` runs the network at its default parameters in five phases:

1. a single-flit packet from core 0 to core 3, with the latency table
   above checked;
2. isolated packets from core 0 to cores 1, 2 and 3;
3. 100 random packets among all cores;
4. a hot spot: cores 0-2 all send to core 3 while core 3 returns credits
   slowly;
5. a final check that all credits have come back.

A scoreboard checks that every packet arrives complete and unchanged at the
right core. The testbench also counts how often each mechanism of the design
happened, and fails if any of them never did:

- both queues of an input in use at once;
- a queue passing a blocked queue;
- VC allocation waiting for a credit;
- a request for an output that another packet owns;
- switch allocation choosing between two queues;
- credit pulses.

`tb_vc_router` tests one router as the centre of a 3x3 mesh, so that all
five outputs are used. It also runs a directed head-of-line test. The west
output is starved of credits, so a packet bound for it waits in one queue
of the north input. A later packet from the same input, bound south, must
get past it. The same testbench checks the 11-cycle streaming rate and the
5-cycle pass-through latency. `tb_router_ctrl` drives the controller from queue
and serializer models. Assertions in the RTL flag protocol errors: buffer
overrun, a queue pushed when full or popped when empty, a packet started
without a free queue, and a serializer loaded while busy.

## Where this design departs from its source description, and what it adds

The description this RTL follows gives the block structure, the serial
buffer, the link signals and the 2x2 arrangement, but few internals. The
following points are this design's own choices or differences:

- **Latency numbers.** The published comparison gives, for a VC router,
  22 cycles core 0 to core 1, 12 cycles core 0 to its router, 32 cycles core 0
  to core 3, and 34 cycles for a credit path. Only the 8-cycle buffer write
  matches this design. The other numbers above come from the serial links
  and the five-stage pipeline described here.
- **Packet format, queue count and depth.** None of these were given. The
  8-bit flit, the 4-bit IDs and the two queues per input follow the source.
  The head-flit layout and the depth of 16 are this design's own.
- **Credits.** The source shows credit wires but does not define a credit.
  Here one credit is one free queue.
- **Queue choice at the receiver.** The receiving input picks a free queue.
  The upstream allocator therefore grants an output link plus a downstream
  credit, not a numbered downstream virtual channel. The link carries no VC
  number, and packets on one link do not interleave.
- **No output VC buffers.** The source mentions separate input and output
  buffers per virtual channel. Here each output has only its serializer
  register.
- **Crossbar selects.** The source's waveforms show 2-bit selects per output.
  Their encoding is not given, so a 3-bit port index is used.
- **Unicast only.** A demonstration in the source sends one flit from core 0
  in all four directions at once. No broadcast encoding is described, and
  this design routes unicast packets only.
- **One deterministic path.** The core-0-to-core-3 waveform shows activity
  on both possible paths. This design uses the XY path only.
- **Not built.** Queues shared between input ports, and packets bypassing
  the queues at low load, are described only as future directions. The
  4x4 folded-torus example network is not built; this design has no torus
  wrap-around links. The cores themselves are not modelled beyond their
  link behaviour in the testbenches. The source's `credit_ack` and
  per-direction `cnt_*` waveform signals have no stated function and have
  no counterpart here.
- **Reset** is synchronous and active low, as the waveforms suggest.
