# Slack-aware packet prioritisation for a wormhole mesh NoC

Routers in a priority-based network-on-chip normally decide every conflict
on the fixed priority an application gave a packet. A low-priority packet
that has already waited a long time keeps losing against a high-priority
packet that still has time to spare. This design adds a notion of time
without a global clock. Every packet header carries a **slack** value: how
many time units the packet can still lose and arrive without harm. Routers
lower that value while the packet sits blocked. They arbitrate on an
**instantaneous priority** built from the packet priority and the residual
slack:

    P_i = P_p + (S >> D)        lower P_i wins

`P_p` is the packet priority (0 is the most urgent), `S` the residual slack
and `D` the divider index (0, 1 or 2 give S, S/2 or S/4 weight). A
high-priority packet with plenty of slack can therefore be overtaken by a
lower-priority packet whose slack is used up.

The routers are five-port (east, west, north, south, local) wormhole routers
with XY routing. They also implement two earlier mechanisms for priority
traffic, and both use `P_i`:

- **selective packet splitting**: a low-priority packet that holds an output
  is cut short with an extra closing flit when a more urgent packet wants
  that output, and its remainder follows later;
- **priority forwarding**: a router tells its downstream neighbour the
  priority of a packet stalled behind a link, and the neighbour raises the
  priority of whatever packet is blocking it.

The default configuration is a 4 x 4 mesh with a slack-interrupt every 256
cycles (scale pointer 7) and divider index 0.

## Flits and packets

A flit is a 2-bit type plus a 32-bit data word (`dhara_pkg::flit_t`).

| type | meaning |
|------|---------|
| `FT_HEAD` | first flit; data holds the header below |
| `FT_BODY` | payload |
| `FT_TAIL` | last payload flit; closes the packet |
| `FT_SPLIT` | no payload; closes a packet fragment after a split |

Header data word (`header_t`, bits 31..0): `spare[2:0]`, `slack[6:0]`,
`prio[5:0]`, `src_y[3:0]`, `src_x[3:0]`, `dst_y[3:0]`, `dst_x[3:0]`.

Slack is 7 bits. The value 127 means the packet's timeliness is not tracked:
its slack never changes and it adds nothing to `P_i`. Other values count down
to 0 and stay there.

A packet that gets split reaches its destination as several fragments. Each
fragment starts with a HEAD. All fragments but the last end with a SPLIT
flit, and the last one ends with the TAIL. Within a packet, the payload stays
in order. A receiver that needs whole packets joins the fragments by source.
The packet generator puts a flow number, sequence number and flit index into
every payload word, which makes this easy.

## How slack is aged

Each router has one **slack-interrupt generator** (`slack_tick_gen`): a
free-running counter that pulses once every `2^(SCALE_PTR+1)` cycles. On
every pulse:

- **In the input buffer** (`slack_fifo`): every header held anywhere in the
  queue has its slack field reduced by one. This covers the time a header
  spends behind the flits of an earlier packet. The buffer marks header slots
  as the flits are written.
- **In the input port** (`input_port`): a header at the front of the buffer
  is moved into the port's registers, which are destination, priority, slack
  and requested output. From then on the slack register is decremented on
  every pulse for as long as the port waits for its output. This includes the
  wait after its packet was split. While the packet is actually moving, its
  slack does not change.

When the port finally sends the packet, it writes a fresh HEAD from its
registers, so the next router receives the *residual* slack. The
granularity of a slack unit is therefore `2^(SCALE_PTR+1)` cycles spent
blocked, counted per router.

## Inside a router

```
            +-----------------------------------------------+
 in_link -->| input_port x5                                 |
 (flit,     |  slack_fifo -> header regs -> xy_route        |
  pf)       |               slack reg  -> inst_prio -> P_i  |
            |       req/port/P_i |  ^ grant/split            |
            |                    v  |                        |
            |  output_arbiter x5 (one per output)            |--> out_link
            |   grant lowest P_i, ask owner to split,        |   (flit + pf)
            |   forward lowest blocked P_i (registered)      |
            |  crossbar: output <- owner's flit              |
            |  slack_tick_gen (one per router)               |
            +-----------------------------------------------+
```

### Input port states

| state | what happens |
|-------|--------------|
| `S_IDLE` | waits for a HEAD at the buffer front, then pops it into the registers and computes the XY route |
| `S_WAIT` | requests the output with its effective priority; slack register ages; a grant moves it on |
| `S_ACTIVE` | sends the regenerated HEAD, then buffer flits up to the TAIL (or an incoming SPLIT), then releases the output and returns to `S_IDLE` |

The **effective priority** sent to the arbiters is `P_i`. If the upstream
router is forwarding a smaller value on this link, that value is used
instead. This is the priority-forwarding boost.

### Arbitration and splitting

Each output has its own `output_arbiter`. It holds the "out port"
connection: the owner input and a valid bit.

- **Free output.** The request with the lowest effective priority gets a
  one-cycle grant. Ties go round-robin. The grant can come one cycle after
  the previous owner releases.
- **Owned output.** If another input requests the output with a *strictly*
  lower value than the owner's current effective priority, the arbiter
  raises `split` to the owner. The owner then does one of three things:
  - If it has not yet sent its HEAD, it just gives the output back.
  - Otherwise it sends a `FT_SPLIT` flit, releases the output and goes back
    to `S_WAIT`. It keeps its registers, so it can later send a new HEAD
    and the rest of the packet.
  - If its next flit is the TAIL, it ignores `split` and finishes the
    packet.

The owner keeps aging while it waits again. Its `P_i` can drop below that of
the packet that displaced it, and then it displaces that packet in turn. This
is the intended behaviour: slack is traded between packets.

### Priority forwarding

Packet splitting cannot help when the blocker is in the *next* router. If
that router's input buffer is full of a low-priority packet that is itself
waiting, flits cannot cross the link whoever owns it. So every output
computes, each cycle, the lowest effective priority among its inputs that are
blocked on it. An input counts as blocked if it requests the output without
owning it, or if it owns the output while the downstream buffer refuses
flits. That value is registered and sent on the link's dedicated `pf_valid`
/ `pf_prio` wires. The downstream input port takes the smaller of its own
`P_i` and the forwarded value. The packet at its front therefore competes
with the urgency of the packet stuck behind it. That router forwards the
boosted value in turn when its own packet is blocked, so the boost walks
along a chain of blocked links, one cycle per hop. The register on the
forwarding path also breaks any combinational loop around the mesh.

### Timing

- A header written into an idle router's buffer leaves it on the third clock
  edge after it was written. The three steps are: load the registers,
  request and grant, then transfer.
- Payload then follows at one flit per cycle.
- `ready` of a link depends only on buffer space (`!full`). A flit moves in
  every cycle in which `valid` and `ready` are both high.
- All resets are synchronous and active low.

## Modules

| module | role |
|--------|------|
| `dhara_pkg` | flit, header, link and flow-configuration types; `slack_dec` |
| `slack_tick_gen` | slack-interrupt generator, period `2^(scale_ptr+1)` |
| `inst_prio` | `P_i = P_p + (S >> D)`; slack 127 adds nothing |
| `xy_route` | XY routing; east = +x, north = +y |
| `slack_fifo` | input buffer that ages every queued header |
| `input_port` | buffer, header registers, request, flit forwarding, splitting |
| `output_arbiter` | per-output arbitration, split request, priority forwarding |
| `dhara_router` | five input ports, five arbiters, crossbar, slack-interrupt generator |
| `packet_generator` | periodic multi-flow traffic source with slack insertion |
| `dhara_noc` | top: `MESH_W x MESH_H` routers, a generator on each local input |

Parameters of the top, `dhara_noc`:

| parameter | default | meaning |
|-----------|---------|---------|
| `MESH_W`, `MESH_H` | 4, 4 | mesh size |
| `DEPTH` | 8 | flits per input buffer |
| `SCALE_PTR` | 7 | slack-interrupt every `2^(SCALE_PTR+1)` = 256 cycles |
| `DIV_IDX` | 0 | `D` in `P_i` |
| `FLOWS` | 4 | flows per packet generator |

Node `n = y*MESH_W + x`. The top's ports are:

- `cfg[n][f]`, one `flow_cfg_t` per flow: enable, destination, priority,
  slack, payload size, period;
- `ej_valid/ej_flit/ej_ready[n]`, each router's local output, for a
  receiver outside the top;
- `inj_*`, `released`, `ev_split` and `ev_boost`, for observing injection,
  releases, splits and forwarding boosts.

A flow releases a packet every `period` cycles. The first release comes
`period` cycles after the flow is enabled. Released packets queue, up to
255 per flow. An idle generator sends the pending flow with the lowest
priority value first.

## What follows the scheme and what is this design's own

These follow the slack-aware scheme as specified:

- the 7-bit slack in the header, with 127 meaning "not tracked";
- one slack-interrupt generator per router with a static scale pointer;
- decrement only while blocked, including headers queued behind other flits;
- `P_i = P_p + (S >> D)` used by arbitration, splitting and forwarding alike;
- splitting by adding a closing flit and re-arbitrating the remainder;
- forwarding of the blocked priority on dedicated wires;
- five ports, XY routing, wormhole switching, a 4 x 4 mesh, scale pointer 7
  and divider index 0.

These are this design's own choices, because the scheme leaves them open:

- flit width, the header layout and the SPLIT flit type;
- buffer depth 8 and valid/ready flow control;
- one arbiter per output working in parallel, with round-robin ties;
- the exact condition for forwarding a priority, and its one-cycle
  register;
- a HEAD regenerated from registers, which also carries the current slack;
- slack stopping at 0, and slack 127 adding nothing to `P_i`;
- the generator's queueing and order, and its payload format.

The slack-interrupt period follows the formula `2^(scale pointer + 1)`. With
scale pointer 7 that is 256 cycles.

Not included: the baseline routers the scheme is compared against, the
statistics and logging side of the traffic framework, and a dynamic
(per-packet) scale pointer, which is only proposed as future work.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_slack_tick_gen` | interrupt period for all 8 scale-pointer values |
| `tb_inst_prio` | `P_i`, exhaustive over priority, slack and `D` |
| `tb_xy_route` | XY routing, exhaustive on an 8 x 8 grid |
| `tb_slack_fifo` | random traffic against a queue model that ages headers; a header parked behind three flits |
| `tb_input_port` | slack aging while waiting, the forwarded header, split and resume, forwarding boost, stall, a SPLIT from upstream ending the packet |
| `tb_output_arbiter` | random traffic against a reference arbiter: grant, owner, split, forwarded priority; round-robin order |
| `tb_dhara_router` | slack beating packet priority, a split with resume, forwarding in both directions, header latency of 3 cycles; a second router with scale pointer 0 and divider index 2 where waiting packets run out of slack and slack 127 stays untouched |
| `tb_packet_generator` | header fields, payload words, release periods, order of simultaneous releases, all releases sent |
| `tb_dhara_noc` | full 4 x 4 mesh at default parameters, see below |

`tb_dhara_noc` runs 40,000 cycles of random periodic traffic:

- two flows per node, 16 priority levels, slack 20 on most flows and 127 on
  a few;
- receivers that stall at random.

It follows every packet through the mesh. The checks are:

- every fragment arrives at the right node;
- fragments and payload arrive in order;
- after draining, every injected packet has arrived complete, exactly once.

It also counts how often each mechanism acted, and fails if any count is
zero:

- slack decrement (headers arriving with less slack than they were given);
- splits;
- forwarding boosts;
- grants where slack overruled the packet priority;
- injection back-pressure.

A typical run delivers about 5,200 packets in about 5,900 fragments, with
about 900 splits. It simulates in well under a minute.

`tb_workload_load_sweep` is a workload run rather than a unit test. It uses
the full mesh at default parameters with sixteen flows, one per node, with
priorities 1 to 16 and 16 to 64 payload flits. It sweeps four load levels in
the ratio 0.6 : 0.67 : 0.83 : 1.1. Each flow's period is its no-load latency
times 1.5 / level. At each level it runs the same traffic twice: once with
slack 20 on every packet, and once with slack 127, where arbitration uses
the packet priority alone.

For every run it checks delivery and prints, per priority, the average
latency, the maximum latency and the number of late packets. Latency is
counted from release. A packet is late when its latency exceeds the no-load
latency plus 20 x 256 cycles.

At the two upper levels some links saturate. The lowest-priority flows then
wait tens of thousands of cycles. With slack enabled, the worst of them
improve somewhat; in one run the maximum for priority 16 at the top level
fell from 35,140 to 31,558 cycles. High-priority flows are unaffected. The
size of the effect depends on the traffic, so the testbench reports it and
does not check it.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/dhara_pkg.sv tb/tb_dhara_noc.sv \
          --top-module tb_dhara_noc -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Verilator finds the other
modules through `-Irtl`.

## Limits

- No timing or area results are claimed for this RTL.
- The original router's reported cost of the slack logic was about 16 % more
  LUTs and 12 % more registers, measured on an FPGA. It cannot be compared
  directly with this implementation.
- The mesh edges are tied off. A destination outside the mesh would stall
  its packet at the edge.
- Four flows per generator is enough for 42 flows on 16 nodes only if no
  node hosts more than four. Raise `FLOWS` for denser mappings.
