# Deadline-scheduled interconnect with two FIFO virtual channels

Earliest-deadline-first (EDF) scheduling gives each flow its own latency and
bandwidth, but switches normally cannot afford it: picking the packet with the
smallest deadline from a buffer needs a sorted buffer, and per-flow state in every
switch is out of the question. This RTL implements a cheaper scheme, following the
paper "Efficient Deadline-Based QoS Algorithms for High-Performance Networks":

* **Hosts do the real EDF work.** Each host interface keeps per-flow state, stamps
  every packet with a deadline, and injects packets in deadline order. Regulated
  packets can also be held back until shortly before their deadline.
* **Switches only merge.** Packets arrive from each input already close to deadline
  order, so a switch that compares only the *heads* of its input queues produces a
  nearly ordered output, as a merge sort does. Switches keep two virtual channels
  (VCs) of plain FIFOs: VC0 for regulated (admitted) traffic, VC1 for best effort.
  VC0 has absolute priority.
* **One extra FIFO repairs most order errors.** VC0 of every switch port is split
  into an *ordered queue* and a *take-over queue*. This lets a packet with an early
  deadline overtake one with a late deadline that got into the network first.
* **Deadlines need no clock synchronisation.** On a link a packet carries its
  time-to-destination (TTD), not an absolute deadline. Each node converts it to and
  from a deadline on its own free-running clock.

Everything is synthesizable SystemVerilog 2017. A packet is represented by its
header (`pkt_t`: deadline/TTD, destination, source, route, VC, length, flow,
sequence number, CRC). Payload bytes are not stored. All buffer occupancy,
credits and link time are computed from the length field, so scheduling and flow
control behave as they would with the payload present.

## The two-queue VC0 buffer (`edf_vc0_buffer`)

This is the part of the design that needs the most care.

**Enqueue.** The arriving packet's deadline is compared with the deadline of the
packet at the *tail* of the ordered queue L:

* If L is empty, or the new deadline is later than or equal to L's tail, the
  packet is appended to L.
* Otherwise (an *order error*: it is more urgent than something already queued)
  it is appended to the take-over queue U.

**Dequeue.** The buffer offers whichever of the two heads has the smaller deadline
(L on a tie). The consumer checks credits for that one packet only. It never falls
back to the other head when credits are short; doing so could reorder a flow.

Three properties follow, and the testbenches check them:

1. L is always sorted by deadline, so its tail holds the latest deadline in the VC.
2. Every packet in U has an earlier deadline than L's tail, so U always drains
   before L's tail leaves. U is therefore never occupied while L is empty (this is
   an assertion in the RTL).
3. Packets of one flow never leave out of order, provided their deadlines increase,
   which the host guarantees.

Example of an order error: a video packet with deadline 12 is waiting in a switch.
A control packet with deadline 11, created later at the same host, arrives behind
it. With a single FIFO the control packet would wait for the video packet. Here it
goes to U and leaves first.

Each of L and U can hold the whole VC (`DEPTH` descriptors). The real bound on the
VC is the 8 Kbyte of credits the upstream sender holds. Each packet is charged at
least 128 bytes, so 64 descriptor slots can never run out before the credits do.

## Host interface (`edf_host_if`)

**Deadlines** (`deadline_calc`, combinational):

* Rate flows: `D = max(D_prev, now) + len / BW_avg`.
  * `1/BW_avg` is stored per flow as cycles per byte in Q8.8.
  * Control traffic uses the link rate, 1/8 cycle per byte. This gives it the
    earliest deadlines without any separate priority class.
* Frame flows (video): `D = max(D_prev, now) + frame_latency / packets_in_frame`.
  * The packets of a frame are spread evenly over the target frame latency,
    whatever the frame's size.
* Eligible time:
  * Smoothed flows: `deadline - ELIG_FACTOR`.
  * All other flows: `now`, i.e. eligible at once.
  * The default ELIG_FACTOR is 2500 cycles, which is 20 µs at 125 MHz.

**Queues** (`sorted_queue`, a shift register with parallel-compare insertion):

* Regulated packets enter an *eligible-time queue*. As soon as its head is eligible
  (`now >= eligible time`), the head moves (one per cycle) into a *deadline queue*.
* Best-effort packets go into a third queue, sorted by deadline.

**Injection.** When the link is idle:

* The head of the deadline queue is sent if the VC0 credits cover it.
* Otherwise the best-effort head is sent if the VC1 credits cover it.

Packets that are only waiting to become eligible do not block best effort. On the
way out the deadline becomes `TTD = deadline - now - 1`. The `- 1` charges the
registered link cycle, so the TTD is exact on arrival. The header CRC is
regenerated at the same time.

**Receive.** Delivered packets appear on `rx_*` one cycle after arrival. Their
`dl` field holds the remaining TTD at that cycle, negative if the packet is late.
Credits go straight back to the switch.

## Switch (`edf_switch`)

The switch uses combined input and output buffering. Every input and every output
port has an `edf_port_buffer`: VC0 as above, VC1 as one common FIFO, and a MUX
that offers VC0 whenever its head can go and VC1 otherwise.

* **Input.** The input stage checks the CRC and rebuilds a local deadline:
  `deadline = TTD + local clock`.
* **Crossbar.** For every output the crossbar looks at the packet each input
  offers. Candidates are inputs whose offered packet routes to that output, whose
  output crossbar port is free, and whose output buffer has room in that VC. It
  picks VC0 over VC1, then the earliest deadline, then the lowest port number.
  * An input offers VC1 when its VC0 head cannot move.
  * A moved packet holds the input and the output crossbar port for
    `ceil(len/8)` cycles. There is no speed-up.
* **Output.** When the link is idle, the output stage sends the offered packet if
  the downstream credits for its VC cover it. It then rewrites the TTD, regenerates
  the CRC, and holds the link for `ceil(len/8)` cycles.
* **Routing.** Routing is fixed and read from the header:
  * A leaf switch sends a packet for one of its own hosts down to port
    `dest % HPL`. Any other packet goes up to port `HPL + up_sel`.
  * A spine switch sends it down to port `dest / HPL`.
  * `up_sel` is chosen when the flow is admitted, so all packets of a flow take the
    same path and cannot be reordered by the network.

`stats` counts the following: packets steered into a take-over queue; take-over
heads sent first; VC1 packets sent while a VC0 head was blocked; link-idle cycles
that lacked credits; and bad CRCs.

## Network (`edf_network`, the top)

The top is a two-stage folded network. There are `N_LEAF` leaf switches, each with
`HPL` hosts and `N_SPINE` up-links. Spine `s` port `l` connects to leaf `l` port
`HPL + s`. The defaults give 128 endpoints, 16 leaves and 8 spines, all switches
with 16 ports.

Every node has its own clock offset input (`*_t_offset`), since nothing depends on
clocks agreeing. The top's ports are all plain arrays:

* per-host flow configuration;
* application requests;
* delivered packets;
* per-node counters.

| Parameter | Default | Meaning |
|---|---|---|
| `HPL`, `N_LEAF`, `N_SPINE` | 8, 16, 8 | 128 hosts; 16-port switches |
| `DEPTH` | 64 | descriptors per switch queue (8 Kbyte / 128 byte) |
| `VC_BYTES` (package) | 8192 | buffer and credits per VC per port |
| `QDEPTH` | 64 | host queue depth (a 120 Kbyte frame in 2 Kbyte packets) |
| `NFLOWS` | 16 | flow-table entries per host |
| `ELIG_FACTOR` | 2500 | eligibility factor in cycles |
| `BYTES_PER_CYCLE` (package) | 8 | 8 Gbit/s links at 125 MHz |

All deadlines and clocks are 32-bit cycle counts compared modulo 2^32. They may wrap
as long as deadlines stay within ±2^31 cycles (17 s at 125 MHz) of the clock.

## Interfaces and timing

* `link_fwd_t {valid, pkt}` carries at most one header per cycle. The sender then
  keeps the link idle for the rest of `tx_cycles(len)`.
* `link_crd_t {valid, vc, bytes}` returns credits for one VC. A switch returns an
  input packet's credit when the packet leaves the input buffer; a host returns it
  on arrival.
* All link outputs and credit returns are registered. The only combinational paths
  inside a node run from queue state to the selection logic.
* The reset is asynchronous and active low. A node's local clock is its
  cycles-since-reset counter plus its `t_offset`.
* Flows are configured with `cfg_we/cfg_flow/cfg` (`flow_cfg_t`: mode, VC,
  smoothing, 1/bandwidth, frame latency). A flow keeps its last deadline and
  sequence number if it is reconfigured.
* `req_ready` is combinational: there is room in the target queue.

## Departures from the published scheme and open points

* **No virtual output queues.** The switches of the original evaluation use VOQs at
  the switch level. How VOQs combine with the ordered/take-over structure is not
  specified, so each input has one port buffer. A head waiting for a busy output
  can therefore block packets behind it that are bound for other outputs.
* **Topology.** The evaluated network is described only as a folded perfect-shuffle
  butterfly with 128 endpoints. The two-stage leaf/spine wiring here is this
  design's reading of that description.
* **Admission control is external.** The scheme keeps admitted traffic below
  70 % of each link and assigns the least-loaded route. These decisions arrive here
  only as flow configuration and the `up_sel` field.
* **Design choices where the method says nothing:**
  * the CRC (CRC-16-CCITT, init 0xFFFF, over all header fields);
  * bad-CRC packets are counted but still forwarded;
  * the Q8.8 bandwidth format;
  * the 128-byte minimum buffer charge;
  * the 125 MHz / 8-byte link;
  * the crossbar tie-break;
  * one eligible-queue transfer per cycle;
  * the queue depths.
* **Eligibility test.** A packet is eligible when `now >= deadline - factor`, i.e.
  it leaves at most `factor` cycles before its deadline. This follows the
  definition of the eligible time as the deadline minus the factor.
* **Payload.** Payload is not modelled; only headers and lengths move.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_desc_fifo` | random push/pop against a queue model |
| `tb_sorted_queue` | random keys across clock wrap against a stable sorted-list model |
| `tb_header_crc` | CRC against an independent long-division reference; single-bit error detection |
| `tb_deadline_calc` | both formulas, `max()`, wrap, eligibility; random cases against an integer model |
| `tb_edf_vc0_buffer` | the 7/12/11 order-error example; 4000 random cycles of four flows against a model of the enqueue/dequeue rules; per-flow order |
| `tb_edf_port_buffer` | VC allocation, VC0 priority, VC1 bypass, byte occupancy, take-over |
| `tb_edf_switch` | routing; exact TTD rewrite across a clock offset; CRC; deadline merge across inputs; take-over; credit stall; VC1 bypass; CRC error count; credit return |
| `tb_edf_host_if` | eligibility factor 3 with a 4-packet frame and a control packet injected between waiting video packets; best effort yielding and using idle time; credit stall; receive path |
| `tb_edf_network` | 4 hosts / 2 leaves / 2 spines (see below) |

`tb_edf_network` runs 30,000 cycles of random four-class traffic with a congestion
burst, then two directed phases: the order-error case, and VC0 credit exhaustion
with best effort behind it. It checks that:

* every packet arrives once, at the right host, in flow order, with a good CRC;
* each delivered packet's remaining TTD matches its source deadline to within a
  few link cycles;
* each mechanism (take-over, take-over win, VC1 bypass, switch and host credit
  stalls, eligibility hold, spine route, in-leaf turn-around) happened.

To run one testbench with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/edf_pkg.sv tb/tb_util_pkg.sv tb/tb_edf_switch.sv \
    --top-module tb_edf_switch -o sim
./obj_dir/sim
```

Random stimulus comes from `$urandom`; `+verilator+seed+N` changes it.

**Simulated sizes.** As checked in, `tb_edf_network` runs 4 hosts, 2 leaf switches and 2
spine switches. The largest network simulated end to end has 16 hosts, 4 leaf
switches of 8 ports and 4 spine switches. It used the same testbench with
`HPL = NL = NS = 4` and a final drain of 400,000 cycles instead of 30,000. All
1524 packets arrived and every check passed. The switch alone was simulated
with 4 ports. The default 128-host network has not been simulated. It passes lint and
elaboration, and each switch synthesizes on its own. Verilator, however, gives every
host and switch its own specialised copy, because `NODE_ID` and `SW_ID` are
parameters. At the defaults this produces about 1 GB of C++, too much to compile in
reasonable time. Making the node number a port would allow a full-size simulation
without changing the logic.

## Files

* `rtl/edf_pkg.sv`: shared types (`pkt_t`, link and credit structs, flow
  configuration, counters) and helpers (modulo deadline compare, transfer cycles,
  credit charge).
* `rtl/desc_fifo.sv`, `rtl/sorted_queue.sv`, `rtl/header_crc.sv`,
  `rtl/deadline_calc.sv`: building blocks.
* `rtl/edf_vc0_buffer.sv`, `rtl/edf_port_buffer.sv`: switch port buffer.
* `rtl/edf_switch.sv`, `rtl/edf_host_if.sv`, `rtl/edf_network.sv`: switch, host
  interface, top.
* `tb/tb_util_pkg.sv`: reference CRC and packet constructors for the testbenches.
