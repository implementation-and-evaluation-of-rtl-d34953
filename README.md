# Large packet routers for many-core networks on chip

When hundreds of cores share one chip, a star, hierarchical-star or fat-tree
network needs a few very large routers instead of many small mesh routers.
This repository holds three synthesizable 128 x 128 router architectures for
that role. They differ in how inputs buffer packets, how output contention is
resolved and how packets cross the switch:

| Router            | Input buffering              | Arbiter                       | Switching core  |
|-------------------|------------------------------|-------------------------------|-----------------|
| `fifo_bb_router`  | one FIFO per input           | Ring Reservation (serial)     | Batcher-Banyan  |
| `voq_bb_router`   | virtual output queues (VOQ)  | Diagonal Propagation Arbiter  | Batcher-Banyan  |
| `voq_xbar_router` | virtual output queues (VOQ)  | Diagonal Propagation Arbiter  | crossbar        |

`large_router_top` places the three side by side. They share clock and reset
only, and each has its own ports (`f_*`, `vb_*`, `vx_*`).

## Packets and ports

Every input and output carries a start-of-frame bit `sf` and one 8-bit phit
per clock. A packet is 32 phits long. `sf` is high together with phit 0, whose
low log2(N) bits hold the destination output. An input that cannot store an
arriving packet discards it and pulses `drop` for one cycle. There is no flow
control towards the sender.

Parameters (all routers): `N` = 128 ports, `PHIT_W` = 8, `PKT_PHITS` = 32,
`BLOCKS` = 128 packet blocks per input buffer. `N`, `PKT_PHITS` and `BLOCKS`
must be powers of two, and `PHIT_W` must hold log2(N) bits. Reset is
synchronous and active high.

## Input units: block-addressed buffers

Each input owns a dual-port RAM (`dual_port_ram`) of `BLOCKS` x `PKT_PHITS`
phits. A packet always occupies one whole block, so a RAM address is simply
`{block, phit counter}`. Two three-state controllers run independently. The
writer stores a packet: S0 waits for `sf`, S1 and S2 write the remaining
phits. The reader sends a granted packet to the core: S0 waits for a grant,
S1 raises `sf_out`, S2 streams the rest. A packet can be written and another
read in the same cycles.

**FIFO unit (`fifo_input_unit`).** The blocks form a circular queue with
`head`, `tail` and an `empty` flag. The buffer is full when it is not empty
and `head == tail`. `request` is `!empty`, and `req_addr` is the destination
of the head packet, kept in a small table indexed by block. A blocked head
packet blocks everything behind it: this is head-of-line blocking.

**VOQ unit (`voq_input_unit`).** One buffer is shared among N logical queues,
one per output, plus a free-space queue, all as linked lists of blocks:

- `next_blk[b]` links block b to the following block of its list;
- each queue has a head, a tail and an empty flag, and so does the free list.

An arriving packet takes the free-list head. In writer state S1 that block is
unlinked from the free list and appended to its output's queue. After a read
starts, in reader state S1 the queue's head block is unlinked and appended to
the free list. If both moves fall in the same cycle, the write move is applied
first and the read move sees its result. `request[j]` is high while queue j is
not empty. A one-hot `grant` selects which queue to read. At reset every block
is on the free list in order (0, 1, ... BLOCKS-1) and all output queues are
empty.

## Ring Reservation (FIFO router)

`ring_reservation` is a ring of N cell switch interfaces (`csi`), one per
input, driven by a ring head end (`rhe`). Each CSI holds a circulating output
address, initially its own position, and a token bit meaning "this output is
taken". In each scan cycle, the address and token of each CSI move to the next
CSI. A CSI whose input requests the address now passing it, while the token is
clear and the input has not already won, wins. It sets its grant flag and
passes the token on set. After N scan cycles every address has visited every
CSI, so each requested output has exactly one winner. The winner is the first
requester met on the ring, which gives a maximal matching.

The RHE sequences the ring: IDLE, then SCAN for N cycles, then GRANT, then
WAIT. In the grant cycle the flagged CSIs pulse `grant`, tokens are cleared,
and the addresses move one more place. The next round therefore starts from a
shifted position, which rotates priority among the inputs. WAIT keeps the ring
still until the granted packets have been read, so a head packet is not
granted twice. The grant comes N+2 cycles after the request. A round takes
N+3 cycles, or PKT_PHITS cycles if packets are longer than the ring.

This serial scan is the FIFO router's weak point at N = 128. Only one round
of grants is issued every 131 cycles, while a packet lasts 32 cycles, so each
output is busy at most 32/131 of the time (about 24%). Head-of-line blocking
alone would allow about 58%.

## Diagonal Propagation Arbiter (VOQ routers)

`dpa_arbiter` solves the N x N request matrix (`req[i][j]`: input i has a
packet for output j) in one combinational pass. Cell (i, j) grants when it
has a request and no higher-priority cell has granted in its row (west) or
column (north). Cells are grouped into wrapped diagonals: diagonal d holds
cells (i, (d - i) mod N), so no two cells of a diagonal share a row or a
column and a whole diagonal can decide at once. Priority ripples from one
diagonal to the next.

For fairness the matrix is laid out twice, as 2N-1 diagonals, and a priority
window of N consecutive diagonals chooses which copy of each cell is active.
The window starts on diagonals 0..N-1 and moves down one diagonal per
arbitration (`arb`). It reloads after the last position. So the diagonal with
top priority changes at every arbitration. The result is a maximal,
conflict-free matching.

`voq_scheduler` wraps the arbiter in packet slots. When any request is
pending and the slot counter is zero, it registers the DPA result as a
one-cycle `grant` pulse and restarts a PKT_PHITS-cycle counter. So all granted
packets start in the same cycle. `conn` holds the last grant from the cycle
after the pulse and drives the crossbar.

## Switching cores

**Batcher-Banyan (`batcher_banyan`).** A banyan network routes without
conflict only if its inputs are packed and sorted by destination. The Batcher
network (`batcher_network`) sorts the packets first:

- it is a bitonic sorter with log2(N)(log2(N)+1)/2 columns of N/2 nodes;
- each `batcher_node` compares the two destinations and puts the smaller on
  top (ascending node) or the reverse (descending node);
- an idle line counts as the smallest address, so packets end packed on the
  highest-numbered lines in ascending order.

The banyan (`banyan_network`) is an omega network: log2(N) stages, each a
perfect shuffle followed by N/2 `banyan_node`s. Stage k routes on destination
bit log2(N)-1-k, most significant bit first. For packed, sorted, distinct
destinations this routes every packet without a collision.

Every node decides from `sf` and the destination bits in the cycle phit 0
arrives, combinationally. It holds that setting in a register for the rest of
the packet. The whole core is therefore combinational for the data path and
adds no pipeline stage: what the input units put in comes out in the same
cycle. The arbiters guarantee distinct destinations.

**Crossbar (`crossbar`).** An N x N AND-OR matrix driven by the connection
matrix `conn`. An assertion checks that at most one input drives each output.

## Timing summary

| Router            | sf in to sf out (idle router) | Packet starts per output |
|-------------------|-------------------------------|--------------------------|
| `fifo_bb_router`  | N + 4 cycles                  | one per N + 3 cycles     |
| `voq_bb_router`   | 4 cycles                      | one per PKT_PHITS cycles |
| `voq_xbar_router` | 4 cycles                      | one per PKT_PHITS cycles |

## Where this design makes its own choices

- The FIFO tail pointer moves when a write starts, not one cycle later. The
  cycle count is the same and the full test is simpler.
- The VOQ free list starts with its tail on the last block, so that the full
  list is consistent. The documented reset points every head and tail at block
  zero.
- In the ring, a CSI passes `token_in OR win`. A token is never cleared by a
  non-matching CSI, as the worked ring example requires. The prose describing
  the CSI clears the token on a mismatch.
- The RHE WAIT state and the VOQ packet-slot scheduler are additions that keep
  grants aligned with whole packets.
- The DPA rotation steps one diagonal per arbitration.
- The Batcher and banyan wiring are the standard bitonic and omega patterns.
- Drop pulses and the one-hot VOQ grant are interface choices. The outputs
  are driven straight from the switching core, with no output buffer.
- Not built: traffic generators, throughput and delay counters, and an output
  buffer stage. The testbenches provide the traffic and the
  measurement.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=... failures=...`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_voq_xbar_router rtl/router_pkg.sv tb/tb_voq_xbar_router.sv \
  --Mdir obj -o sim && obj/sim
```

- `tb_large_router_top` drives all three routers with random traffic at
  N = 8 using `router_env`, a shared traffic source and scoreboard. It checks
  that every packet is delivered intact to the right output or dropped and
  counted. It also counts each mechanism: drops, ring rounds, head-of-line
  waits, multi-queue inputs, same-cycle list moves, DPA refusals and
  back-to-back packets.
- `tb_large_router_full` runs the top with all parameters at their defaults
  (128 ports, 32-phit packets, 128 blocks). It sends one packet per input in a
  permutation, then a wave of contention for a single output, and checks
  delivery, latency and spacing for all three routers. The build takes several
  minutes.

At 8 ports, 8-phit packets, 4-block buffers and about 90% offered load, the
FIFO router delivered about 50% of the offered packets and the two VOQ routers
about 86-87%.
