# A DAMQ network switch with self-compacting buffers

A buffered n x n switch for multiprocessor interconnection networks (Omega/Delta
networks, k-ary n-cubes) that keeps packets in input buffers. A plain FIFO input
buffer suffers head-of-line blocking: a packet waiting for a busy output holds up
every packet behind it, even those bound for idle outputs. A *dynamically allocated
multi-queue* (DAMQ) buffer fixes this. It keeps one queue per output channel inside a
single shared buffer, and gives buffer space to whichever queue needs it.

The usual way to build a DAMQ buffer is with linked lists: every block carries a
pointer, plus head and tail pointers per queue. This design uses a **self-compacting
buffer** instead. All queues live in one array, packed one after another in channel
order, with no gaps and no per-entry pointers. An insertion into the middle of the
array pushes the entries behind it down by one place. A deletion pulls them up.
Each entry therefore only needs a small tag and a shifter. A queue is fully described
by where it starts, so NCH queues need NCH+1 pointers in total.

This repository gives synthesizable SystemVerilog for the whole switch, with
self-checking testbenches. The default configuration is one 4x4 switch of a
256-node radix-4 Omega network with 16-entry buffers of 64-bit flits.

## The self-compacting buffer

### Layout

```
address  0 ┌──────────────┐ ◄─ ptr[0] = 0
           │ channel 0    │   FIFO: oldest at the top
           ├──────────────┤ ◄─ ptr[1]
           │ channel 1    │   (may be empty: ptr[1] == ptr[2])
           ├──────────────┤ ◄─ ptr[2]
           │ ...          │
           ├──────────────┤ ◄─ ptr[NCH] = occupancy
           │ free         │
     N-1   └──────────────┘
```

* Region c spans addresses `ptr[c] .. ptr[c+1]-1`. It holds `count[c] = ptr[c+1]-ptr[c]` flits.
* A channel with nothing queued has no space at all. Nothing is reserved per channel.
* Reading channel r always takes its head at `R = ptr[r]`.
* Writing channel w always inserts at `W = ptr[w+1]`, just after its last entry.
* After an operation: `ptr[j] += (write && j > w) - (read && j > r)`.

### The four movement cases

"Up" means toward address i-1 and "down" toward i+1. In one clock the buffer can do
a read, a write, or both:

| case | operation | moves | new flit lands at |
|---|---|---|---|
| 1 | write only | entries `i >= W` move down | `W` |
| 2 | read only | entries `i > R` move up | (entry `R` leaves) |
| 3 | read and write, `R < W` | entries `R < i < W` move up | `W-1` |
| 4 | read and write, `W <= R` | entries `W <= i < R` move down | `W` |

Entries outside the listed range stay where they are. In cases 3 and 4 the hole left
by the read and the slot needed by the write cancel out between the two addresses.
Only the entries between them move.

In case 4 the entries move **down**. The written flit goes in above the read one,
so the entries between must move toward the hole. If `W == R`, the new flit simply
replaces the one read and nothing moves.

Every storage location has a data field and an `e` (end-of-packet) tag bit. The `e`
bit travels with the data. The `u` and `d` tags are computed each clock by the buffer
controller and used in the same clock.

### Tag setting with a comparator tree

For each location, the controller must decide whether its address is above or below
some boundary. One comparator per location would need N comparators of log2(N)-bit
inputs. `bit_setting_tree` uses N-1 tiny three-input nodes in a binary tree instead.

* **Node inputs.** Each node sees three signals:
  * a control bit `c`: the subtree below is already decided;
  * a selection bit `s`: the value of the tags once decided;
  * one key bit.
* **Undecided node.** The action depends on its key bit:
  * key bit 1: the lower-address child is decided to 0, and the higher child goes on undecided;
  * key bit 0: the higher-address child is decided to 1, and the lower child goes on undecided.
* **Decided node.** It passes `(c=1, s)` to both children.
* **Root.** It starts with `c=0`. The leaf that arrives undecided is the key address itself, and it receives the root's `s`.
* **Result.** With root `s=1` the tree gives `tag[i] = i >= key`; with root `s=0` it gives `i > key`.
* **Key bits.** A second tree, the address-feeding logic, brings the key bits to the nodes. Each level passes the key rotated left by one bit, so every node reads the MSB of what it receives.

`buffer_controller` uses two such trees, one keyed by W and one by R. It combines
their thermometer codes into the table above. The load position is the edge of the
`i >= W` code: `W` itself, or `W-1` in case 3. Both trees are combinational, with a
depth of log2(N) node levels.

## The input port: packet flow controller

`packet_flow_controller` handles buffer management for one input port. It contains:

* the bypass buffer;
* the new-header register;
* the output-channel-number register;
* the free-space register;
* the channel pointers, case selector, buffer controller and buffer.

`input_controller` adds the routing algorithm handler to form a complete input port.

### Receive

1. A flit from the link enters the one-flit **bypass buffer**. A head flit is also
   copied into the **new header register**.
2. The routing handler works combinationally from the header register. During the
   next cycle the route of the head flit is known, and it is kept for the rest of the
   packet in the **output channel number register**.
3. In that cycle the flit always leaves the bypass buffer. It goes straight to the
   crossbar (**cut-through**) if this input is currently sending that channel, the
   channel's region is empty and the output takes it. Otherwise it is inserted at
   the tail of its channel's region.

### Admission (virtual cut-through)

The **free space register** holds the number of entries not yet spoken for:

`N - occupancy - (flit in bypass) - (flits still expected of the packet being received)`.

* A head flit is accepted only when this value is at least `PKT_LEN`, so a whole
  packet always fits.
* Once a packet has started, its flits are always accepted.
* `in_ready` is a register, so a chain of switches has no combinational path through
  the links.
* Packets may be shorter than `PKT_LEN`, but not longer (an assertion checks this).

### Send

* **Not sending a packet.** The port offers the head of one non-empty channel and
  raises `req_valid/req_ch`. Channels are chosen round robin, and the choice moves on
  after every cycle in which the request is not taken. That lets a queue whose output
  is busy be passed by another queue (the point of DAMQ).
* **After a flit is taken.** Once a flit that is not an end-of-packet flit is taken
  (`x_pull`), the port stays on that channel until the packet's `e` flit has gone.
* **Per cycle.** At most one flit is written and one read. A read and a write in the
  same cycle are cases 3/4.

## Switch level

`damq_router` connects NP input controllers, a multiplexer `crossbar` and NP
`output_controller`s.

* **Arbitration.** An idle output grants round robin among the inputs asking for it.
  The grant and the first flit transfer can happen in the same cycle.
* **Packet lock.** The output then stays locked to that input until the end of the
  packet, so packets never interleave on a link.
* **Output register.** Each output has a one-flit output register with valid/ready.
* **One output per input.** Each input asks for only one output at a time, so no
  input is ever pulled by two outputs.

**Latency.** In an idle switch, a flit accepted from the input link at clock edge t
is on the output link from edge t+1.

**Links.** `valid`, `data[FLIT_W]`, `tail` (end of packet) and `ready`. A flit moves
when valid and ready are both high. `ready` from a switch input is a register.

**Packet format.** The destination address is in the low `ADDR_W` bits of the head
flit. The rest of the flit is payload.

### Routing

| `ROUTING` | network | rule |
|---|---|---|
| `ROUTE_DELTA` (default) | Delta/Omega of NP x NP switches | stage `STAGE` uses base-NP digit `STAGE` of the destination, most significant first |
| `ROUTE_KCUBE` | unidirectional k-ary n-cube, n = NP-1 | lowest dimension whose coordinate differs from `node_id`; channel NP-1 (local processor) when none does. Coordinates are `$clog2(K)`-bit fields, dimension 0 lowest |

For an Omega network, put a radix-NP perfect shuffle in front of every stage (rotate
the line number left by one digit). Give stage s `STAGE = s`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NP` | 4 | ports per switch, and queues per input buffer |
| `N` | 16 | flits per input buffer (power of two, at least `PKT_LEN`) |
| `FLIT_W` | 64 | flit (buffer block) width in bits, i.e. 8 bytes |
| `PKT_LEN` | 1 | largest packet, in flits, for admission |
| `ADDR_W` | 8 | destination address bits (256 nodes) |
| `ROUTING`, `STAGE`, `K` | `ROUTE_DELTA`, 0, 8 | routing function (see above) |

## Files

`rtl/`:

* `damq_pkg`: the buffer case enum and the routing enum.
* `bit_setting_tree`
* `case_selector`
* `buffer_controller`
* `storage_location`
* `self_compacting_buffer`
* `channel_pointers`
* `bypass_buffer`
* `routing_handler`
* `packet_flow_controller`
* `input_controller`
* `crossbar`
* `output_controller`
* `damq_router`: the top.

`tb/`:

* One `tb_<module>.sv` per module.
* `tb_damq_router`: end to end with up to 4-flit packets.
* `tb_damq_router_full`: end to end at the defaults, with no parameter overrides.
* `tb_omega_network`: the 256-node, 4-stage Omega network (64 switches per stage) at 50% load, with single-flit packets.
* `tb_omega_network_8flit`: the same network with 8-flit packets.
* `tb_single_switch`: one switch at the defaults under Delta-network traffic, used for the single-switch latency estimate below.
* `tb_hypercube_switch`: one 9-port switch of a binary 8-cube (dimension-ordered routing, `K=2`).
* `tb_torus_network`: a 100-node unidirectional 10-ary 2-cube of 3-port switches with dimension-ordered routing, at light load.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself through a
watchdog.

Example run with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  --top-module tb_damq_router_full rtl/damq_pkg.sv tb/tb_damq_router_full.sv
./obj_dir/Vtb_damq_router_full
```

The Omega testbenches build 256 switches and the torus testbench 100. They take a
few minutes to compile and seconds to run.

### What the tests check

* **Buffer.** Each of the four movement cases is checked against a queue model.
* **Tree.** The comparator tree is checked exhaustively.
* **Input port.** Per-channel FIFO order is checked, and packets are checked not to
  interleave.
* **Counted mechanisms.** The switch tests count each of these and fail if one never
  happens:
  * every buffer case;
  * cut-through from the bypass buffer;
  * a head flit held back by the free-space check;
  * output link stalls;
  * two inputs contending for one output;
  * a flit leaving while another queue of the same buffer waits.
* **Network.** The network tests check delivery to the right node, exactly once, in
  order per source/destination pair. They also print the mean packet latency.

### Network latency from one switch

In a Delta network under uniform traffic, every switch sees the same input load and
sends each packet to any output with probability 1/n. So the mean delay of one switch
under that traffic, times the number of stages, estimates the latency of the whole
network. That takes far less simulation than the network itself.

Both sides of the comparison use the same measure: cycles from the head flit's
acceptance at the first input to the packet's appearance on the last output link.

| configuration (single-flit packets, 50% load) | mean latency |
|---|---|
| 256-node radix-4 Omega network, measured (`tb_omega_network`) | 11.8 cycles |
| one switch (`tb_single_switch`) | 2.76 cycles per switch |
| 4-stage estimate from one switch (4 x 2.76) | 11.0 cycles |

The estimate is slightly optimistic. With 8-flit packets at the same load, the Omega
network's mean latency is 41.2 cycles (`tb_omega_network_8flit`).

## Departures and choices

**Where the design departs from the scheme:**

* **Case 4 direction.** Case 4 moves entries toward higher addresses. The scheme's
  text for that case says they move "up", but that would leave both a hole and a
  collision.
* **Tree root input.** The tree's root `s` is an input rather than the constant 1, so
  that one tree also gives the strict `i > R` comparison.

**Choices this design makes where the scheme says nothing:**

* **One operation per clock.** Buffer management is done in the same clock as the
  transfer. The scheme overlaps the management of block n+1 with the transfer of
  block n; a single-cycle form hides it fully, at the cost of a longer combinational
  path (tree depth log2 N plus a shifter).
* **Small internals.**
  * The bypass buffer is one flit deep.
  * The arbiters are round robin.
  * The output register is one flit.
  * Links use valid/ready with a registered ready.
* **Reset.** Only the control state and the pointers are reset. Buffer data is not.
* **Packet format.** The destination is in the low bits of the head flit. End of
  packet is marked by a `tail` wire on the link and by the `e` bit in the buffer.

**Not built:**

* The virtual channels that dimension-ordered routing on wrap-around k-ary n-cubes
  uses against deadlock. `ROUTE_KCUBE` gives only the channel choice.
* Tori at high load. Without virtual channels a wrap-around ring can fill up and
  deadlock, so the 10-ary 2-cube is only tested at light load (about 22% ring
  utilisation).
* Hypercube networks. The 9-port switch they need is tested on its own, but no
  whole hypercube network is simulated.

## Sizes of the evaluated networks

| network | fits the defaults? |
|---|---|
| 256-node radix-4 Omega, single-flit packets | yes (4 ports, 8-bit addresses) |
| Omega with 8-flit packets | needs `PKT_LEN=8` (fits in N=16) |
| 8-ary 3-cube torus | 4 ports fit; needs `ADDR_W=9`, `ROUTE_KCUBE` and virtual channels |
| 10-ary 2-cube | needs `NP=3`, `ROUTE_KCUBE`, `K=10` (simulated at light load) and virtual channels |
| binary 8-cube | needs `NP=9`, `ROUTE_KCUBE`, `K=2` (one such switch simulated) |
| 2/4/8/16-block buffers of 8 bytes | `N` = 2..16, `FLIT_W=64` |
