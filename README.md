# A network-on-chip that tests itself

A network-on-chip (NoC) is made of switches, their FIFO buffers and the links between
them. This design builds one that tests itself with its own transport. A tester connects
to one switch. It tests that switch first. It then sends test data over the links that are
now known to work, to test the next switches and links, and so on outward. Every switch
has a small test controller. The controller applies the test data to a buffer, to the
routing logic or to a set of outgoing links. It then compares the response with the
expected data carried in the same packet. A failure sets the switch's pass/fail flop.
These flops form one shift register, which the tester reads at the end.

Testing goes faster because switches that are alike get identical tests. A *multicast*
test packet names a route through the network. Every switch on the route copies the packet
to the output ports the route lists. Several switches are therefore tested in the same
cycles.

The method is the one published as "Testing Network-on-Chip Communication Fabrics" (test
packets, MAF crosstalk test of links, march test of FIFOs, scan test of the routing logic,
multicast wrapper, on-chip comparison). The RTL, its encodings and its micro-architecture
are this design's own. Where it departs from the method, or fills gaps, it says so below.

## The example network

The top, `noc_fabric`, is the four-switch network used to illustrate the method:

```
              tester
                |
               S1
        l1 / /    \ \ l2          each link is a pair of one-way links:
   l1' / /            \ \ l2'     l1 S1->S2   l2 S1->S3   l5 S3->S2
      S2 ====l5 / l5'==== S3      l3 S2->S4   l4 S3->S4   primed = reverse
   l3  \ \            / / l4
   l3'   \ \        / /  l4'
               S4
```

| switch | port 0 | port 1 | port 2 | port 3 |
|--------|--------|--------|--------|--------|
| S1 (address 1) | to/from S2 | to/from S3 | unused | local |
| S2 (address 2) | S1 | S3 | S4 | local |
| S3 (address 3) | S1 | S2 | S4 | local |
| S4 (address 4) | S2 | S3 | unused | local |

The local port (3) of every switch is a top-level port, where a core would attach. On S1
it is also where the tester injects test packets. Functional packets take shortest paths.
S1 and S4 reach each other through S2. Each one-way link adds one cycle of latency.

## Flits and packets

A flit is 32 data bits plus a 2-bit kind on side wires: `HEAD`, `BODY`, `TAIL`, and
`LTEST` for a link-test vector. A packet is a head flit, body flits and a tail flit.
Switches route packets wormhole-fashion.

```
test packet:  header | route flits (multicast only) | control | T_start | data ... | ~T_start
```

| flit | bits |
|------|------|
| header | `[31:30]` type: 0 functional, 1 unicast test, 2 multicast test; `[15:8]` number of route flits; `[3:0]` destination (unicast) |
| route | `[7:4]` switch address, `[3:0]` output ports that get a copy (bit mask) |
| control | `[31:28]` component under test (1 links, 2 FIFO, 3 RLB); `[27:20]` which one (link: port mask; FIFO: 0-3 input, 4-7 output); `[15:0]` unused |
| T_start | `32'hA5C3_3C5A`; the tail carries its complement |

`noc_pkg` has the types and builder functions (`mk_header`, `mk_route`, `mk_ctrl`).

## Inside a switch

```
in p --+--> input FIFO p --+--> RLB crossbar ----+--> output FIFO q --+--> out q
       |                    \                   /                     |
       | LTEST vectors       +--> MWU ---------+--> test controller   +<-- MAF vectors
       +--> link checker (in the test controller)                         from the TC
```

- **FIFOs** (`noc_fifo`): four flits deep, on both the input and the output side of every
  port. Each has a write-only port, a read-only port, and empty and full flags. An input
  port's `ready` is high while its FIFO has at least two free cells. The second cell
  covers the flit that may still be on the link.
- **RLB** (`rlb`): routing and arbitration. Each output picks a waiting head flit by round
  robin. The output then stays locked to that input until the packet's tail has passed.
  A table parameter (`ROUTE_TBL`) holds the output port for every destination. The
  switch's own address goes to the local port. An idle switch takes three cycles from
  the input-FIFO write to the output port.
- **MWU** (`mwu`): the multicast wrapper. It takes two kinds of packet away from the RLB:
  multicast test packets, and unicast test packets addressed to this switch.
- **Test controller** (`test_ctrl`): runs the tests and holds the pass/fail flop.

Multiplexers around every FIFO let the test controller take one FIFO out of service and
drive it directly. While that happens, the port's `ready` is held low. Link-test vectors
never enter a FIFO. An outgoing port under link test is driven by the controller's
vector generator. An incoming `LTEST` flit goes straight to that port's link checker.

### The multicast wrapper

Each input port of the MWU has its own small state machine. When the head of an input
FIFO is a multicast header, the MWU reads the header and its route flits into a replay
buffer (up to `MAX_ROUTE` = 8 route flits). It looks for its own address in the route:

- **Found:** the packet goes to the output ports in that entry's mask.
- **Not found:** this switch is a destination. The packet goes to the test controller.

A unicast test packet addressed to this switch also goes to the test controller.

Once the target set is known, the input claims all its targets at once. It waits while
any target is held by another MWU input or locked by the RLB. It then replays the
buffered flits and streams the rest of the packet. Each flit is written to every target
in the same cycle, once all of them have room. The tail releases the targets.

The MWU does no real arbitration: the schedule is fixed offline, so packets never compete.
If two inputs claim in the same cycle, the lower-numbered one wins. Copies leave unchanged,
route flits included. Every switch on the route therefore sees the whole route and finds
its own entry.

## The three tests

### FIFOs: march test

A FIFO test packet names one FIFO. Its data field holds four background patterns: `0101...`,
`1010...`, `0000...` and `1111...`. Within each pattern, alternate cells get the pattern and
its complement. For a FIFO of *n* cells the data flits of one pattern are:

```
I0, I1, E0, I2, E1, ..., I(n-1), E(n-2), E(n-1)
```

The controller writes `I0` alone. Then, for each remaining cell, it holds `I(k)` for a
cycle and, when `E(k-1)` arrives, writes `I(k)` and reads in the same cycle. The last
read empties the FIFO again. This is the sequence w {(wr)} r: a single write, n-1
simultaneous write-and-read steps, then a final read. Each read word is compared with the
expected `E` word on all 34 bits. The two kind bits are written with `data[1:0]`. The
empty flag must be high before each first write and low on every read. The test takes
one cycle per flit.

### RLB: scan test

The RLB keeps all of its state in 64 flip-flops on 32 scan chains, one per link wire, two
flops per chain. Besides the routing state, the chains hold wrapper cells:

- input wrapper: request, head, tail, destination and output ready per port;
- output wrapper: the pop and push decisions.

In test mode the RLB sees only the wrapper, and its real pop/push outputs are held low.

| state bits | field |
|------------|-------|
| 3:0 | request per input |
| 7:4 | head per input |
| 11:8 | tail per input |
| 27:12 | destination per input (4 bits each) |
| 31:28 | output ready per output |
| 35:32 | input connected |
| 43:36 | output each input is connected to (2 bits each) |
| 47:44 | output locked |
| 55:48 | round-robin pointer per output (2 bits each) |
| 59:56 | push (captured) |
| 63:60 | pop (captured) |

Chain *c* holds state bits 2c (scan-in side) and 2c+1 (scan-out side).

An RLB test packet carries (scan-in word, expected scan-out word) pairs. Each pair shifts
all chains by one bit, and the expected word is checked before the shift. After every two
shifts the controller inserts one capture cycle, in which the logic clocks once. Each
pattern's response is therefore unloaded while the next pattern loads. The last pattern
must load zeros, which leaves the RLB idle. The expected data need the state the chains
held before the test. In the end-to-end test that is the reset state, because every RLB is
tested before any packet passes through it.

### Links: MAF crosstalk test

A link test packet names a set of output ports. The controller's `maf_gen` drives all of
their links at once, one vector per cycle. It gives 8 vectors per wire, 256 for 32 wires,
with one wire at a time as the victim:

| step | s1 | s2 | s3 | s4 | s5 | s6 | s7 | s8 |
|------|----|----|----|----|----|----|----|----|
| victim wire | 1 | 0 | 1 | 1 | 0 | 1 | 0 | 0 |
| all other wires | 1 | 0 | 1 | 0 | 1 | 0 | 0 | 1 |

These steps create the falling and rising speed-up, the positive and negative glitches,
and the falling and rising delay on the victim. The victim counter moves to the next wire
after s8. The expected output equals the input, so the packet carries no data. The
controller at the far end of each link starts its own copy of the generator on the first
vector and compares every registered vector with it. A missing or different vector is a
failure.

### Pass/fail register

Each controller's flop is set by any mismatch: a test response, a wrong `T_start` or
tail word, or a link vector. The flops chain S1 -> S2 -> S3 -> S4 -> `pf_out`. Pulsing
`pf_shift` four times reads them out, S4 first, and shifts zeros in behind. `pkt_done`,
`link_done` and `fail_evt` expose each controller's events.

## Test schedule and test time

The end-to-end testbench (`tb/tb_noc_fabric.sv`) plays the tester on S1's local port. It
follows the multicast schedule for this network with S1 as the source:

| step | what | cycles |
|------|------|--------|
| 1 | S1: RLB, 7 FIFOs (unicast) | 55 + 294 |
| 2 | links l1, l2 from S1 | 277 |
| 3 | S2 and S3: RLBs by unicast, 7 FIFOs each by one multicast packet per FIFO | 468 |
| 4 | l1', l5', l3 from S2 and l2', l5, l4 from S3, one multicast packet | 285 |
| 5 | S4: RLB by unicast through S1 and S2, 7 FIFOs by multicast S1 -> S2 -> S4 | 483 |
| 6 | l3', l4' from S4 | 285 |
| 7 | arrival-port input FIFOs of S2, S3, S4, reached by another port | 180 |

The whole network test takes about 2,300 cycles. Only one FIFO in the network is left
untested: the local input FIFO of S1, through which every test packet enters. The RLB
tests go by unicast because the expected responses depend on each switch's routing
table. Identical switches with identical tables could share a multicast RLB test.

For comparison, `tb/tb_noc_fabric_unicast.sv` runs the unicast schedule: S1, l1, l2, S2,
l1', S3, l2', l5, l5', l3, S4, l3', l4, l4', one element after the other, every test
packet addressed to one switch and every link tested on its own. It takes 4,337 cycles
and reaches 28 FIFOs, because the input FIFO on which unicast packets arrive at each
switch cannot be tested. The same testbench then times S2 and S3 both ways: 762 cycles
by unicast, 468 with the FIFO tests sent by multicast.
The switch tests in that run differ only by transport latency, 4 cycles per packet and
extra hop (one link cycle, three switch cycles): S2 and S3 each take 32 cycles more than
S1, and S4 takes 32 cycles more than S2. The testbench checks this.

## Where this design departs from the method

- **One virtual channel per port.** The method's evaluation uses four virtual channels
  per port, four flits each.
- **One clock.** The FIFO has one clock, not separate write and read clocks.
- **MWU on every port.** Every switch port is connected to the MWU, not only the ports
  the schedule needs.
- **Far-end link check.** Each link is checked by the controller at its receiving end.
  That controller generates the expected vectors itself.
- **Partial full-flag check.** The march sequence never fills a FIFO. The controller checks
  that the full flag stays low on every access, so a flag stuck at 1 is caught, but one
  stuck at 0 is not.
- **FIFO test needs an idle port.** A FIFO is tested only while no traffic uses its port.
- **Routing by table.** Functional routing uses a table, not e-cube or
  least-common-ancestor routing, and the top is the fixed four-switch network. The
  16-to-256-switch meshes and 6-to-120-switch butterfly fat trees the method was
  evaluated on are not built. The 4-bit switch address would allow 16 switches. A
  multicast route is limited to 8 entries.
- **Scan patterns.** RLB test patterns come from a model of the RLB in the testbench
  (random states and their computed next states), not from an ATPG tool.
- **Test scheduling is not hardware.** The schedule is computed offline (a shortest-path
  search over the network graph). Here the testbench carries a hand-made schedule.

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. The
packet builders and the reference models (MAF vectors, RLB next state, march data) are
in `tb/noc_tb_pkg.sv`. Example with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/noc_pkg.sv rtl/noc_fifo.sv rtl/maf_gen.sv \
  rtl/rlb.sv rtl/mwu.sv rtl/test_ctrl.sv rtl/noc_link.sv rtl/noc_switch.sv \
  rtl/noc_fabric.sv tb/noc_tb_pkg.sv tb/tb_noc_fabric.sv --top-module tb_noc_fabric
./obj_dir/Vtb_noc_fabric
```

| testbench | covers |
|-----------|--------|
| `tb_noc_fifo` | random traffic against a queue model, march sequence, flags |
| `tb_maf_gen` | all 256 vectors against the step table, cycle count, restart |
| `tb_rlb` | routing, grant latency, stalls, round robin, scan shift and capture |
| `tb_mwu` | multicast copies, destination detection, claim against the RLB |
| `tb_test_ctrl` | FIFO, RLB and link tests, passing and failing, a stuck full flag, pass/fail shift |
| `tb_noc_link` | one-cycle latency, ready path |
| `tb_noc_switch` | every test through packets, routing latency, contention, multicast, link vectors |
| `tb_noc_fabric` | the whole schedule above, then functional traffic between all local ports under stalls, then a deliberately wrong test that must show up as S3 in the read-out |
| `tb_noc_fabric_unicast` | the unicast schedule, then S2 and S3 again with multicast, which must be faster |

`tb_noc_fabric` runs the top at its default parameters in about half a minute. It counts
every mechanism: unicast and multicast transport, multicast copies, FIFO, RLB and link
tests, test packets through an RLB, functional delivery, stalls, read-outs and fault
detection. Any mechanism that never happened counts as a failure.

## Files

`rtl/`: `noc_pkg` (types), `noc_fifo`, `maf_gen`, `rlb`, `mwu`, `test_ctrl`, `noc_link`,
`noc_switch`, `noc_fabric` (top). `tb/`: one testbench per module plus `noc_tb_pkg`.
