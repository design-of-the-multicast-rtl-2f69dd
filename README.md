# Multicast tree controller for a cross-bar router

A router built around a unicast cross-bar can carry multicast traffic without
blocking. It does this by *circulating* each multicast packet through the
ports that want it. The input port sends the packet to at most two member
ports. Each of those forwards it to at most two more, and so on, until every
member has it. The sending load of a popular session is thus spread over all
of its members. The packet delay is bounded by roughly one policing interval
per tree level, so the trees should be kept as shallow as possible.

This RTL is the control path that builds and maintains those trees. There is
one tree per multicast session. Each port stores only its own place in the
tree: its parent, its two children, and how many ports hang below each child.
When a port joins or leaves a session, the ports exchange short control
messages through the same cross-bar, and each port rewrites its own entry. No
port ever holds the whole tree.

The design is written for an 8 x 8 router with up to 40 sessions per port. Both
numbers are parameters.

## Structure

```
                 +---------------------- mc_port i (x N) ---------------------------+
 CP message  --->|  mc_ctrl                                          sgs_module     |
 + dest ID       |  input FIFO --> lookup --> message   --> output  --> per-dest    |---> mc_crossbar --+
 (one per slot)  |  (CP / x-bar    memory     processing    FIFO        queues + SGS |   (N x N)        |
                 |   multiplexer)   tree memory + SID allocator          choice      |                  |
                 +------------------------------------------------------------------+                  |
                        ^                                                                                 |
                        +------------------------------ cross-bar output i ------------------------------+
```

The port control modules are grouped NP to a device (`mc_port_chip`). The SGS
chain runs through all N of them in port order, from device to device.

| module | role |
|---|---|
| `mc_router_top` | N/NP devices, the cross-bar and the slot timer |
| `mc_port_chip` | NP port control modules on one device. The CP message goes to the module of its destination port, and the SGS chain runs through the modules. A slot timer is kept in step by `slot_sync` |
| `mc_port` | port control module: one port's controller and scheduler module joined |
| `mc_ctrl` | multicast control module of one port; owns the FIFOs and memories, and runs the six-phase slot schedule |
| `mc_msg_proc` | the protocol rules: one message plus one tree entry gives a new entry and up to three messages (combinational) |
| `mc_tree_mem` | tree memory: one entry per session at this port, synchronous read |
| `mc_lookup_mem` | maps a router session ID (RSID) to this port's local session ID (SID) |
| `mc_sid_alloc` | hands out free tree-memory locations; a location's address is the SID |
| `mc_fifo` | 128-word FIFO, used for the input FIFO and the output FIFO |
| `sgs_module` | per-destination message queues in a 64-cell memory; one link of the sequential greedy scheduling chain |
| `mc_crossbar` | N x N unicast cross-bar for control messages |
| `mc_pkg`, `mc_types.svh` | message-type encoding, field widths, and the message and entry structs |

The central processor (CP) is outside this RTL. It stands for the higher-layer
multicast routing protocols. It turns "add port p to session S" into a type 1
message sent to p. It turns "remove p from S" into a type 3 message sent to the
root of S. It may send one message per slot, together with the destination port
ID. The testbenches contain a behavioural CP.

The top's interface is small. `cp_valid`, `cp_dest` and `cp_msg` are sampled
in the first cycle of a slot, when `slot_start` is high. `xb_valid` and
`xb_msg` show what the cross-bar delivers to each port in the current slot.
`idle` is high when no message is queued, in flight or being processed
anywhere. `err` is the OR of the controllers' sticky error flags.

## Identifiers

* **Port ID**: 1..N in messages (clog2(N)+1 bits, where 0 means "none"). The
  tree memory keeps the index ID-1 in clog2(N) bits.
* **SID**: the address of the session's entry in one port's tree memory. The
  same session has a different SID at every port.
* **RSID** = (root port ID, root port's SID): names a session uniquely inside
  the router. The session is created at its root, so the RSID is fixed when
  the session is created. Each port's lookup memory translates RSID to local
  SID.

## Message and entry formats

At the default size (N = 8, NS = 40) a message is 27 bits and a tree entry is
33 bits. The fields are listed most-significant first.

| message field | bits | |
|---|---|---|
| type | 3 | 1..7, and 0 for data packets (not handled) |
| destination SID | 6 | |
| destination ID | 4 | |
| port SID | 6 | usually the sender, but see below |
| port ID | 4 | |
| info | 4 | depends on the type, see below |

| entry field | bits |
|---|---|
| F_right, F_left | 3 + 3: number of ports reachable through the right / left child |
| parent SID, parent index | 6 + 3 |
| left child SID, index | 6 + 3 |
| right child SID, index | 6 + 3 |

A child is present exactly when its fanout is non-zero. The fanout field is
clog2(N/2+1) bits wide, because a branch below the root of a full 8-port tree
holds 4 ports.

## The protocol

Every message addresses a (port, SID) pair. Each port on a message's path
rewrites the destination fields with its child's (SID, ID) and sends the
message on. No port needs to search by IP address.

| type | sent by → to | fields used | action at the receiver |
|---|---|---|---|
| 1 allocate | CP → new port | port = RSID | take a free SID, record RSID → SID, send type 2 to the root. If the RSID names the receiver itself, create the root entry (parent = itself) and send nothing |
| 2 add | new port → root, then down the tree | port = new port (ID, SID) | go to the child with the **smaller** fanout (left on a tie) and add 1 to that fanout. If that fanout was 0, adopt the new port as that child and send it type 6 |
| 3 find replacement | CP → root, then down the tree | port = RSID, info = leaving ID | at a childless port: this is the replacement, so send type 4 to the leaving port. Otherwise go to the child with the **larger** fanout (right on a tie) and subtract 1 from that fanout |
| 4 request entry | replacement → leaving port | dest SID + info = RSID, port = replacement | look up own SID from the RSID. Send type 5 (left child), type 5 (right child) and type 6 (own parent, with the transfer flag set) to the replacement. Free the entry and the lookup word |
| 5 change child | leaving → replacement | port = child, info = {side, fanout} | write that child and its fanout |
| 6 change parent | any → child | port = new parent, info = {transfer flag, leaving index} | write the parent. If the transfer flag is set, the entry is complete: send type 6 to each present child and type 7 to the new parent |
| 7 change child | replacement → its new parent | port = replacement, info = leaving ID | replace the child whose ID is the leaving ID |

Why the two walks keep the tree shallow: a join walks toward the smaller
subtree, so the new port lands at the end of a shortest path. A leave finds the
port at the end of a longest path and moves it into the leaving port's place.
The fanout updates along each walk keep every count exact. At every port the
two fanouts never differ by more than one.

A worked removal. Session S has root A. Its left child is B, and B's left
child is D. Its right child is C. Port B leaves:

```
      before                         after
        A   (F_left 2, F_right 1)      A   (F_left 1, F_right 1)
       / \                            / \
      B   C                          D   C
     /
    D
```

1. The CP sends type 3 to A, with the leaving ID B.
2. A's left fanout (2) is the larger one. A lowers it to 1 and passes the
   message to B.
3. B's left fanout (1) is the larger one. B lowers it to 0, which detaches D,
   and passes the message to D.
4. D has no children, so D is the replacement. D sends type 4 to B, with the
   RSID of S.
5. B looks up its SID for S and sends D three messages:
   * type 5, left: no child;
   * type 5, right: no child;
   * type 6: parent A, with the transfer flag.
6. B frees its entry and its lookup word.
7. D writes each field as it arrives. On the flagged type 6 it announces
   itself: type 6 to each child (it has none) and type 7 to A, naming B as the
   child to replace.
8. A replaces its left child B by D. The tree is one level shallower than
   before.

Some cases need care:

* **Detaching the replacement.** The type 3 walk subtracts 1 from the fanouts
  along its path. The last step brings the replacement's branch at its old
  parent to 0. Because a child is present only while its fanout is non-zero,
  this step also removes the replacement from its old position. No extra
  message is needed.
* **The leaving port is the deepest port.** The walk ends at the leaving port
  itself. Its parent has already dropped it (see above), so it only frees its
  entry and its lookup word.
* **The replacement was a child of the leaving port.** That child's fanout is
  already 0 when type 4 arrives, so the type 5 message for that side carries
  "no child".
* **Order of the handover.** The three handover messages (5, 5, 6) travel from
  the same source to the same destination. They pass through one
  per-destination queue, so they arrive in order, and the type 6 with the
  transfer flag always comes last.

Requests for the same session must not overlap. Two concurrent walks could
each see fanouts the other is about to change. The higher layer (the CP) must
let one add or remove finish before it starts the next one for the same
session. Requests for different sessions may overlap freely. The root port
cannot leave its own session.

## Timing

A time slot is six clock cycles. A slot timer in the top drives a phase number
from 0 to 5. A controller processes one message per slot. It can receive two
messages per slot (one from the CP, one from the cross-bar) and can produce up
to three.

| phase | `mc_ctrl` | `sgs_module` |
|---|---|---|
| 0 | store the CP message; take the oldest message from the input FIFO | take one word from the output FIFO into the message memory |
| 1 | store the cross-bar message; read the lookup memory | link it at the tail of its destination queue |
| 2 | resolve the SID (allocated / looked up / from the message); read the tree memory | SGS chain settles; grant registered |
| 3 | apply the rules; write outgoing message 0 | move the granted head message to the output register |
| 4 | write the tree and lookup memories, allocate or free the SID; write message 1 | |
| 5 | write message 2 | |

Sequential greedy scheduling: in phase 2, scheduler module 0 chooses an output
first, then module 1, then module 2, and so on. An N-bit "taken" vector runs
along the chain. Each module chooses, round robin, an output that is not yet
taken and for which it holds a message. Each module then adds its choice to
the vector. The result is a maximal matching: no input is left idle while it
holds a message for an output that nobody took.

Latency of one hop, with no queueing:

1. A message reaches a controller in slot s.
2. The controller processes it in slot s+1.
3. The scheduler takes it and grants it in slot s+2.
4. The next controller receives it in phase 1 of slot s+3.

So one hop costs 3 slots. For example, adding a port below the root costs:

* CP → new port: 1 slot.
* New port → root (type 2).
* Root → new port (type 6).

Each tree level on a walk adds one hop.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | router ports |
| `NS` | 40 | sessions per port (tree memory entries) |
| `NP` (`mc_router_top`) | 8 = N | port control modules per device. The default puts the whole 8 x 8 control path on one device. Smaller values split it over N/NP devices, with the cross-bar outside them |
| `FIFO_DEPTH` (`mc_ctrl`) | 128 | input and output FIFO depth |
| `F` (`sgs_module`) | 8N = 64 | message cells per scheduler module |

The derived widths are as follows:

* message length L = 3 + 2·clog2(NS) + 3·(clog2(N)+1)
* tree entry = 3·clog2(N) + 3·clog2(NS) + 2·clog2(N/2+1)
* lookup memory = N · 2^clog2(NS) words of 1 + clog2(NS) bits (512 × 7 at the
  defaults, one 4-Kbit FPGA block RAM)

The memory arrays are plain SystemVerilog arrays with registered reads, so
synthesis tools can map them to block RAM. Larger sessions-per-port counts
need only a larger `NS`. An FPGA's block RAMs allow thousands per port when
only one to four ports share a chip. Routers of 16 ports with 8192 sessions
per port, and of 32 ports with 4096, are simulated by `tb_mc_router_table1`. The lookup table grows as N times
a power of two of NS, and at that size it would normally live in external
memory.

## Error behaviour

The following events drop the message and set the port's sticky `err` flag,
which is ORed into the top's `err`:

* a full FIFO
* no free tree entry when a port joins
* a type 4 for an RSID that the port does not know

The FIFOs carry assertions against overflow and underflow. The cross-bar
carries an assertion against two inputs driving one output.

## Departures from the source description and open points

* The fanout field is one bit wider than a clog2(N/2) count would give. That
  count cannot hold the value N/2.
* How the root entry is created is not specified in the source. Here, a type 1
  whose RSID names the receiving port creates it.
* Several choices of this design are not specified in the source:
  * A port that adopts a new port tells it its parent with a type 6.
  * The replacement recognises the last handover message by a flag in the info
    field.
  * The info-field encodings are this design's own.
* The replacement writes each field of its entry as the corresponding handover
  message arrives. The source describes one update after all three messages.
  The end state is the same, because nothing else touches that entry while the
  session's removal is under way.
* The scheduler is a plain maximal-matching SGS chain with a fixed module
  order. Frame-based scheduling over policing intervals is not modelled.
* Data packets (type 8) are not forwarded. They are discarded by the controller.
* When the ports are split over devices, the lookup memory still sits on the
  device, in each controller. A large router would move it to external memory.
* A device brings the SGS chain out in both directions (2N pins), and it has
  `cp_valid`, `busy` and `err` pins. A pin budget that counts the chain once
  must allow for these.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=<n> failures=<m>`. For example, the end-to-end test at the
default size:

```
verilator --binary --timing --assert -y rtl rtl/mc_pkg.sv \
    tb/tb_mc_router_top.sv --top-module tb_mc_router_top -Mdir obj
./obj/Vtb_mc_router_top
```

`-y rtl` lets verilator find every module in the file of the same name, and
the include file too. The package is named on the command line so that it is
read before the files that import it. The workload testbenches also use the
shared environment in `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mc_pkg.sv \
    tb/tb_mc_router_workload.sv --top-module tb_mc_router_workload -Mdir obj_wl
./obj_wl/Vtb_mc_router_workload
```

The block testbenches are built the same way, each with its own file and
`--top-module` name. Each one sets its block's parameters itself.

| testbench | what it checks |
|---|---|
| `tb_mc_router_top` | runs 400 rounds of random joins and leaves over 40 sessions and 8 ports: up to eight CP requests per round, each naming a different session and port, then a wait until the router is idle. After each round it compares every port's lookup and tree memory with a reference tree model: membership, SIDs, fanouts, children and parent. It also checks the six-cycle slot and requires every mechanism to occur (message types 2–7, root creation, self-replacement, replacement by another port, CP and cross-bar arrivals in one slot, SGS contention) |
| `tb_mc_router_workload` | random add and remove traffic, 50 runs of 350 slots from reset. Each slot carries a request with probability 1/2, an add or a remove with probability 1/2, and a uniformly chosen port and session. Operations on different sessions overlap, also at the same port. A monitor inside the environment tracks each session's messages in flight. As soon as an operation finishes, it compares that session's tree at every port with the model, and it also checks every allocated SID |
| `tb_mc_router_table1` | the same traffic on larger routers: N = 16 with NS = 8192 (one port control module per device), and N = 32 with NS = 4096 (two per device). Memories are at full size; requests are drawn from 48 sessions so that trees grow deep |
| `tb_mc_port_chip` | the workload on an 8 x 8 router built from four devices of two modules each (`NP = 2`). This exercises CP steering by port range, the SGS chain across devices, and the device slot timers |
| `tb_mc_port` | one port control module. It checks exit slots (two slots after arrival, or later when the output is taken), handling of a CP and a cross-bar message in the same slot, three outputs leaving in consecutive slots, and the SGS chain output in every slot |
| `tb_mc_ctrl` | one controller driven directly. It checks each output message's contents and the slot it is written in (a message given in slot s has all its outputs written in slot s+1), three outputs in one slot, SID reuse, and the error flag |
| `tb_mc_msg_proc` | hand-worked cases for every message type and every tie rule |
| `tb_sgs_module` | grants only untaken outputs, always grants when it can (maximality), keeps per-destination order, and stops at 64 stored messages |
| `tb_mc_fifo`, `tb_mc_tree_mem`, `tb_mc_lookup_mem`, `tb_mc_crossbar` | checks against reference models |

The testbenches read the tree and lookup memories through hierarchical
references, because the trees are not visible at any output.
