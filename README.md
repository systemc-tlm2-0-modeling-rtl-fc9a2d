# Cycle-accurate 4x4 mesh network-on-chip

This is a synthesizable model of a small network-on-chip (NoC): sixteen
five-port routers in a 4x4 mesh connect eight traffic-generating masters to
eight memory slaves. A master issues read and write transactions, and the
network carries each one to its slave. The slave executes it in one cycle
and sends a response back through the network. The design moves one whole
transaction per link per cycle, with no splitting into flits. Every router
decides each cycle which transaction leaves each output. So the design gives
exact, cycle-by-cycle latencies, contention and back-pressure under
synthetic traffic. It is meant as a reference against which faster, less
detailed NoC models can be measured. The RTL also serves as a starting point
for a real interconnect.

```
   col 0      col 1      col 2      col 3
  [R0 M0]----[R1 M1]----[R2 M2]----[R3 M3]     row 0
     |          |          |          |
  [R4 M4]----[R5 M5]----[R6 M6]----[R7 M7]     row 1
     |          |          |          |
  [R8 S0]----[R9 S1]----[R10 S2]---[R11 S3]    row 2
     |          |          |          |
  [R12 S4]---[R13 S5]---[R14 S6]---[R15 S7]    row 3
```

Each `----` or `|` is a pair of one-way links, one in each direction. A
link carries a request or a response in any given cycle, never both.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | sizes, the transaction and back-pressure structs, topology and X-Y routing functions |
| `rtl/route_decoder.sv` | routing-table lookup for one input socket |
| `rtl/noc_crossbar.sv` | gives every input a write port into every output FIFO |
| `rtl/out_fifo.sv` | output FIFO, searchable by the ID of the input socket |
| `rtl/rr_arbiter.sv` | round-robin arbiter with a priority that changes every cycle |
| `rtl/noc_router.sv` | five-port router built from the four blocks above |
| `rtl/synth_master.sv` | synthetic master: injection-rate generator, storage buffer, response checker |
| `rtl/synth_slave.sv` | synthetic memory slave, one cycle per operation |
| `rtl/noc_mesh.sv` | top level: 16 routers, 8 masters, 8 slaves, with statistics outputs |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Transactions and addressing

A transaction is one packed struct, `txn_t`, 117 bits wide. It holds:

- a request/response bit;
- read/write;
- a 32-bit address;
- 32-bit data;
- the issuing master's node number;
- a 16-bit sequence number;
- the cycle in which the master created it.

On a link it travels as `flit_t`, which is the transaction plus a valid bit.

Every node n owns the 256-byte window from `n*0x100` to `n*0x100+0xFF`. Only
the slave windows (nodes 8–15) hold memory. Each slave has 64 words.

Routing works differently for the two directions:

- A request is routed by its target address.
- A response keeps the request's address, so it cannot be routed by that
  address. It is routed by the window of the master that issued it
  (`src*0x100`). See `noc_pkg::route_key`.

Every router has a routing table with one entry per node window. Each entry
holds a start address, an end address and an output socket. The tables are
computed at elaboration from the router's position using dimension-order
(X-Y) routing: a transaction first travels along its row, then along its
column. An address that matches no entry is dropped, and the router flags it
on `drop`. With the tables as built this never happens. The mesh testbench
checks that.

X-Y routing has a consequence that matters later:

- Requests go from rows 0–1 down to rows 2–3. They travel along rows 0–1 and
  down the columns.
- Responses travel along rows 2–3 and up the columns.
- So every router-to-router link carries only one class of transaction.

## Inside a router

A router has five sockets: north, east, south, west and local. It has no
input buffers. In the cycle a transaction arrives, these steps happen:

1. The route decoder for that input looks up the output socket.
2. The crossbar presents the transaction to that output's FIFO.
3. The transaction is written into the FIFO at the clock edge.

Each FIFO entry records the ID of the socket the transaction came in
through. Several inputs may write into the same output FIFO in the same
cycle. All of them are accepted, in socket order.

Each output socket has one FIFO and one arbiter. Each cycle, one transaction
at most leaves each output:

1. The arbiter looks at the set of socket IDs that have a sendable entry in
   its FIFO.
2. It picks one ID.
3. The oldest sendable entry with that ID leaves, and the entries behind it
   close up.

The arbiter's priority rule, in `rr_arbiter`:

- The priority register names a socket ID.
- If that ID is waiting, it wins.
- Otherwise the priority steps on, wrapping around, to the next ID that is
  waiting, and that ID wins.
- After a grant, the priority becomes the winner's ID + 1.
- When nothing is waiting, the priority still advances by one. So the
  starting point rotates even in idle cycles.

Ordering follows from this rule. Transactions that entered through the same
socket leave in order. Transactions from different sockets can overtake one
another.

A router's FIFO kinds depend on its position:

| socket faces | FIFO kind | holds |
|---|---|---|
| another router | pair FIFO | requests and responses |
| a master (routers 0–7, local socket) | target FIFO | responses only |
| a slave (routers 8–15, local socket) | initiator FIFO | requests only |
| the mesh edge | none | — |

A transaction spends exactly one cycle in an unloaded router. Take R as the
number of routers on the X-Y path, so R = |dx| + |dy| + 1. Without
contention:

- A request created in cycle t reaches its slave at the edge ending cycle
  t + R + 1.
- The slave executes the request at that edge and sends its response in the
  next cycle.
- The master sees the response 2R + 2 cycles after it created the request.

The mesh testbench checks this formula for every master-slave pair of the
complement pattern.

## Back-pressure: FIFO_FULL and FIFO_AVAILABLE

FIFO_FULL and FIFO_AVAILABLE are not messages. Each is a level on a
`stop_t` bundle that runs against the data direction on every link:

- A FIFO is full when it holds `FIFO_DEPTH` (8) entries. The router then
  raises FIFO_FULL towards all its neighbours.
- As soon as the FIFO holds 7 or fewer, the level drops. That drop is
  FIFO_AVAILABLE.

The level is decoded from registered counts, so a sender sees it in the same
cycle. `stop_t` has three parts:

- `req`: a pair or initiator FIFO is full, so requests must stop.
- `resp`: a pair or target FIFO is full, so responses must stop.
- `full[4:0]`: exactly which output FIFOs are full.

The masters and slaves use the bundle as follows:

- A master stops sending requests while its router shows `req`.
- A slave raises `req` towards its router when its 4-entry response queue is
  full.
- A slave holds its responses while the router shows `resp`.

**Two ways for a router to react.** The parameter `SCOPE` of type
`stop_scope_e` sets how a router reacts to FIFO_FULL from a neighbouring
router. It exists on `noc_router`, `out_fifo` and `noc_mesh`.

- `STOP_SOCKET`: nothing of the stopped class goes out through that socket
  until FIFO_AVAILABLE. This is the classic scheme, in which FIFO_FULL of
  any FIFO is broadcast to every neighbour. It turns out to lock up this
  mesh under load. Take two adjacent routers, each with a full FIFO that
  points at the other. Each stops the other completely, so neither FIFO can
  ever drain. In simulation with hot-spot traffic at injection rates of 1/3
  and above, the whole network hung after a few hundred transactions. At low
  rates no FIFO fills and the scheme works.
- `STOP_FIFO` (the default): a router holds back only the entries whose next
  hop, computed from the neighbour's routing function, would be one of the
  neighbour's full FIFOs. Everything else in the same FIFO may still leave.
  Two facts make this deadlock-free here:
  - every link carries one class only;
  - X-Y routing has no cyclic channel dependencies.

  With this scope, the network drains completely at every load tested.

**Skid entries.** FIFO_FULL only takes effect from the cycle after the count
reaches 8. In the cycle in which the count is 7, up to four inputs may still
write into the FIFO. A transaction never leaves by the socket it came in
through, so at most four sockets can write, not five. Each FIFO therefore
stores `DEPTH + 3` = 11 entries. An assertion in `out_fifo` checks that this
room is never exceeded.

## Synthetic masters and slaves

**Master** (`synth_master`). A generator creates one transaction per
injection period of `inj_period` cycles. The injection rate is
1/`inj_period`. The cycle within each period is drawn uniformly at random.
New transactions wait in a 64-entry storage buffer. The master sends the
oldest one per cycle unless its router shows FIFO_FULL for requests.

If a transaction is created while the buffer is full, it is counted in
`stats.lost` and discarded. The buffer would need to be unbounded to avoid
that. Each master has its own 64-bit xorshift generator, seeded from `SEED`
and the master number.

Destinations follow `pattern`:

- `PAT_UNIFORM`: any slave with equal probability.
- `PAT_HOTSPOT`: S0 and S7 get 30% of the traffic each. The other 40% is
  spread evenly over S1–S6.
- `PAT_COMPLEMENT`: the slave number is the bitwise complement of the 3-bit
  master number, so M0 talks to S7, M1 to S6, and so on.

Reads and writes are equally likely, and the word within the slave is random.
A write stores `addr ^ 0xA5A5A5A5`. A read must therefore return that value,
or 0 for a word never written. Every response is checked for:

- kind;
- source;
- address range;
- data.

Bad responses count in `stats.errors`. The master also accumulates
round-trip latency: its sum, minimum and maximum.

**Slave** (`synth_slave`). A request is executed at the clock edge at which
it arrives. Its response leaves one cycle later through a 4-entry queue. The
slave records the master-to-slave latency of every request. That is the
number of cycles from creation to arrival, and it is the usual latency figure
for this kind of study. Slave memory is cleared at reset.

## Top level and statistics

`noc_mesh` has the following control inputs:

- `clk`;
- `rst_n`, a synchronous, active-low reset;
- `enable`, which starts and stops generation;
- one `inj_period` and one `pattern`, shared by all masters.

It brings out:

- each master's `master_stats_t` and idle flag;
- each slave's `slave_stats_t`;
- per router and socket, three flags: drop, FIFO full and contention.
  Contention means more than one socket ID was waiting at an arbitration.

The average master-to-slave latency at the current load is
`sum(s_stats.lat_sum) / sum(reads + writes)`.

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 8 | FIFO_FULL threshold of every router FIFO |
| `SCOPE` | `STOP_FIFO` | back-pressure reaction, see above |
| `BUF_DEPTH` | 64 | master storage buffer |
| `SEED` | `64'h9E3779B97F4A7C15` | random seed |

Mesh size, node placement and address windows are constants in `noc_pkg`.

## Where this design departs from the classic description

This design follows the usual description of a cycle-accurate TLM NoC model:

- output FIFOs that hold (input socket ID, transaction);
- a variable-priority round-robin arbiter;
- range-based routing tables with X-Y routing;
- FIFO_FULL/FIFO_AVAILABLE with a depth of 8;
- synthetic masters with an injection rate and three traffic patterns;
- one-cycle slaves.

It departs from that description in these points:

- **Back-pressure scope.** The default is `STOP_FIFO` instead of stopping
  the whole socket. The reason is the deadlock described above. `STOP_SOCKET`
  remains selectable.
- **Bounded buffers.** The master buffer holds 64 entries, where the classic
  description has an unbounded buffer, and overflow is counted. Each FIFO
  has 3 skid entries beyond the FIFO_FULL threshold.
- **No input FIFOs.** Block diagrams of such a router often show buffers at
  the inputs too. The cycle-accurate behaviour only needs the output FIFOs,
  so there are none at the inputs.
- **Response routing.** Responses are routed by the source master's window.
  They do not retrace a recorded path.
- **Complement traffic.** The pattern uses the plain 3-bit complement
  (M0 → S7). Some descriptions pair the nodes differently.
- **One clock.** All masters share one injection rate, and the whole mesh
  runs on one clock. Per-core clock frequencies are not modelled.
- **Link semantics.** A link is a registered-output, level-handshake
  connection, not a TLM socket with phases. One transaction per link per
  cycle reproduces the cycle-accurate timing.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and ends. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/noc_pkg.sv \
    tb/tb_noc_mesh.sv --top-module tb_noc_mesh -Mdir obj
obj/Vtb_noc_mesh
```

Replace `tb_noc_mesh` with any other `tb/tb_*.sv` to test a single block.
Two system-level testbenches go beyond the block tests:

- `tb_noc_workloads` runs the load sweep described below.
- `tb_noc_mesh_stop_socket` runs the mesh with `SCOPE = STOP_SOCKET`. It
  shows that the mesh drains at rate 0.1. It also reproduces the lock-up
  under hot-spot traffic at rate 1: about a hundred requests stay stuck for
  good.

`tb_noc_mesh` runs the top at its default parameters in three phases:

1. **Complement traffic at rate 1/200.** Checks the exact 2R+2 round-trip
   latency for each master, and the number of transactions generated.
2. **Hot-spot traffic at rate 1.** Makes every mechanism happen: FIFO_FULL,
   FIFO_AVAILABLE, arbitration between several sockets, master stalls and
   buffer overflow.
3. **Uniform traffic at rate 0.1.**

After each phase, the testbench stops generation and checks four things:

- the network drains completely;
- every sent request got exactly one correct response;
- the slaves executed the same number of operations;
- nothing was dropped.

It takes a few seconds to run. Most of the time goes into building it.

The block testbenches check the following:

- **route decoder**: window edges;
- **arbiter**: a worked example with six socket IDs, plus a reference model
  run over random requests;
- **FIFO**: reference queues, under both back-pressure scopes;
- **crossbar**: exhaustive random patterns;
- **router**: latency, arbitration order, drop, back-pressure and random
  traffic;
- **master**: slot timing, patterns, stall and overflow;
- **slave**: memory contents, response timing and queue-full back-pressure.

## Load sweep

`tb_noc_workloads` sweeps the injection rate per master from 0.01 to 1 for
each pattern, at the default parameters. Each rate gets a window of 2000
cycles, after which the network drains. The table gives the average
master-to-slave latency in cycles:

| rate | uniform | hot spot | complement |
|---|---|---|---|
| 0.01 | 5.25 | 5.26 | 6.01 |
| 0.10 | 5.32 | 5.55 | 6.11 |
| 0.25 | 5.62 | 6.19 | 6.29 |
| 0.33 | 6.03 | 13.4 | 6.40 |
| 0.50 | 50.5 | 179 | 6.75 |
| 1.00 | 233 | 198 | 136 |

At low load, the latency matches the mean of R+1 over the pattern's paths:

- uniform: 5.25;
- hot spot: 5.37;
- complement: 6.00.

The testbench checks each of these to within 0.4 cycles.

Each pattern saturates at a different rate:

- **Uniform** traffic saturates between 0.33 and 0.5.
- **Hot-spot** traffic saturates earlier, at about 0.33, because S0 and S7
  each receive 30% of all requests.
- **Complement** traffic saturates only at rate 1. It spreads evenly with
  one flow per slave.

Past saturation, the master buffers fill up. Part of the generated traffic
is then lost, and that loss is counted.

The testbench then runs 10^6 transactions at rate 0.1 for each pattern,
about 1.25 million cycles each. That takes about a minute of simulation in
total.

## Limits

- The model uses 32-bit counters and timestamps, so runs must stay below
  2^32 cycles.
- Latency sums are 48 bits wide.
- Sequence numbers are 16 bits and wrap around. Nothing depends on them
  being unique.
- The hot-spot percentage is drawn as a 16-bit random value scaled to
  0–99, so each share is accurate to about 0.01%.
- Synthesis of the full mesh gives roughly 44k word-level cells. Almost all
  of that is the 80 output FIFOs, which store full 117-bit transactions.
