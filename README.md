# A multi-FPGA accelerator for time-driven spiking network simulation

This RTL describes a cluster of FPGA nodes that together simulate a network of
leaky integrate-and-fire (LIF) neurons with current-based exponential synapses,
much faster than biological real time. The target network is a cortical
microcircuit of about 77,000 neurons, with a 0.1 ms timestep and synaptic delays
of up to several milliseconds. The cluster is a grid of 5 × 7 nodes. Each node:

- updates up to 2,550 neurons per timestep, in ten pipelined workers of up to
  255 neurons each;
- broadcasts every spike to every other node;
- looks up, for each spike it receives, that neuron's synaptic list in off-chip
  DRAM, and adds the weights into per-neuron ring buffers indexed by the future
  timestep.

Nodes stay in lock-step through a local neighbour synchronisation instead of a
global barrier.

What follows explains how a timestep moves through one node, how spikes travel
through the cluster, how the nodes agree that a timestep is over, and then where
this RTL deliberately departs from the architecture it implements.

## Hierarchy

```
neuroaix_cluster            NX x NY nodes; row and column links wired directly
└─ neuroaix_node            one FPGA
   ├─ packet_router         spike broadcast, config unicast, sync, priority arbitration
   │  ├─ rr_arbiter         one per output port
   │  └─ sync_fifo          one per output port
   ├─ sync_controller       timestep scheduler and neighbour synchronisation
   ├─ rr_arbiter            merges the workers' spike FIFOs toward the router
   ├─ sync_fifo  x2         spike queues in front of the lookups
   ├─ synapse_lookup x2     one per DRAM channel
   ├─ local_router          lookup lanes -> per-worker ring-buffer FIFOs
   └─ per worker (x NW):
      ├─ lif_worker         neuron state update, 30-stage pipeline
      ├─ sync_fifo          spikes produced by the worker
      ├─ sync_fifo          synaptic inputs waiting for the ring buffer
      └─ ring_buffer        lumped synaptic input per neuron and future step
```

`neuroaix_pkg` holds the shared types: the 128-bit packet, the 64-bit synapse
word, the ring-buffer input and the neuron parameter set.

## Numbers

Everything is in Q16.16 fixed point (32 bits). A synapse word is 64 bits. It packs:

- a 16-bit target `{worker[7:0], slot[7:0]}`;
- an 8-bit delay, in timesteps;
- a 32-bit weight.

Eight synapse words make one 512-bit memory beat. A neuron is named inside its
node by a 12-bit local id `{worker[3:0], slot[7:0]}`. Across the cluster, a
neuron's synaptic list index is `node * 4096 + local id`, where
`node = y * NX + x`.

## One timestep inside a node

1. **Start.** `sync_controller` raises `compute_start` with the new `cur_ts`.
   Timesteps start at 1.
2. **Update.** Each `lif_worker` walks its slots 0..`npw`-1, one per clock. The
   update happens in the first stage and uses exact integration with run-time
   propagators:
   ```
   if refractory == 0:  v = P22*v + P21ex*iex + P21in*iin + P20*idc
   else                 refractory -= 1
   iex = P11ex*iex + ring_exc[slot, ts]
   iin = P11in*iin + ring_inh[slot, ts]
   if v >= theta:       spike, v = v_reset, refractory = t_ref
   ```
   The ring-buffer word for `(slot, ts)` is read and cleared in the same cycle.
   The result then travels down a `PIPE`-deep pipeline before it is written back.
   Spikes leave the pipeline end into the worker's spike FIFO. A worker finishes
   `npw + PIPE + 2` cycles after it samples `start`.
3. **Send.** A round-robin arbiter merges the ten spike FIFOs into the
   router's local input. The router may serve one broadcast over several cycles
   while some outputs are full. The offered packet must not change meanwhile, so
   the arbiter's grant is held until the router accepts it.
4. **Look up.** The router's local output carries spikes, from this node and
   from others, into two spike queues. The lowest neuron-id bit chooses the
   queue; each queue feeds the lookup of one DRAM channel.
5. **Deliver.** The local router moves up to 16 synapses per clock to the
   per-worker ring-buffer FIFOs. Each worker output has its own round-robin
   arbiter and back-pressure.
6. **Finish.** Once all workers are done and all spike FIFOs are empty, the node
   sends its synchronisation messages.

### Ring buffers

Each worker has two arrays:

- an excitatory one, `NPW x 64` steps deep;
- an inhibitory one, `NPW x 32` steps deep.

Both are indexed by `(slot, ts mod depth)`. The sign of the weight chooses the
array. An input for the current or a past timestep is *late*; one more than the
depth ahead is an *overflow*. Neither is added. Each has a counter (`err_late`,
`err_overflow`).

### Synapse lookup

Lists sit in DRAM at a fixed stride of `STRIDE` beats, at address
`list_index * STRIDE`, so no base-address table is needed. Lists shorter than
the stride are padded. Word 0 of a list holds its length, and the lookup always
reads it.

Two run-time settings control the reads:

- `prefetch`: how many beats the first read fetches.
- `max_par`: how many spikes may have reads in flight, up to `MAX_PAR`.

If the length shows the list is longer than the prefetch, one continuation read
fetches the rest. Responses return in request order. A context FIFO records, for
each read in flight, its origin timestep and how many synapses remain. Each beat
is unpacked into eight lanes, and effective timestep = origin + delay. The beat
stays on the lanes until every valid lane has been acknowledged.

## Spikes across the cluster

Each node links to every other node in its row and every other node in its
column (`NX-1 + NY-1` links). A spike spreads in two stages:

- The source sends it on all its links.
- A node in the source's **column** that receives it directly forwards it along
  its own **row**, marked with the `fwd` bit.
- Nodes in the source's row, and nodes receiving a forwarded copy, only consume
  it.

Every node thus gets exactly one copy within two hops.

Other packet types:

- **Configuration packets** (neuron state writes) travel unicast: first along the
  row to the target column, then along the column.
- **Synchronisation packets** go from a node to all its neighbours and are
  consumed there.

The router serves a packet with several destinations over several cycles and
remembers which outputs it has already served. Each output has a small FIFO and
an arbiter. Synchronisation packets win arbitration over spikes and
configuration.

## Synchronisation

The longest path is two hops, and the shortest synaptic delay is one timestep.
One sync message per timestep is therefore not always enough. With
`n_sync = 2` (the normal mode), each timestep runs like this:

1. compute;
2. send sync level 0 to every neighbour, after the last spike;
3. wait for level 0 from every neighbour, which guarantees that each spike has
   been forwarded at least once;
4. send sync level 1;
5. wait for level 1 from all neighbours;
6. start the next timestep.

A neighbour can be at most one step ahead. Received syncs are therefore counted
per level and per timestep parity.

`n_sync = 1` skips the second round. This is faster, but spikes can then arrive
late. The late counters in the ring buffers show when that happens. The
end-to-end testbench runs both modes.

## Interfaces of the top (`neuroaix_cluster`)

- **Run control**, shared by all nodes: `run`, `n_steps`, `n_sync` (1 or 2),
  `npw` (neurons per worker in use), `prefetch`, `max_par`, and `prm` (the LIF
  propagators, threshold, reset value and refractory steps).
- **Host port** `host_valid/ready/pkt`: enters node (0,0) and accepts
  configuration packets.
- **Two DRAM channels per node**:
  - requests `mem_req_valid/ready/addr/beats`, where the address is in 512-bit
    beats;
  - responses `mem_rsp_valid/ready/data`, returned in order.
  - The DRAM controller and devices are outside this RTL.
- **Monitors per node**: the spike entering the router (`mon_spike_valid/lid`),
  `cur_ts`, `finished`, lookup and synapse counts, forwarded copies, cycles spent
  waiting for syncs, and the late and overflow counters.

All handshakes are valid/ready: a transfer happens on a clock edge where both
are high. A valid packet must not change until it is accepted. Reset is
asynchronous and active low. On-chip memories do not reset; they start at zero
as FPGA block RAM does, and are not written while reset is active.

## Where this design departs from, or adds to, the architecture

- **Fixed point throughout.** The reference architecture accumulates 32-bit
  fixed-point weights in the ring buffers but updates neurons in 32-bit float.
  Here the update is also Q16.16. This shifts a spike by a timestep now and then
  compared with a float model.
- **Packet layout, list format, continuation reads and the two-queue channel
  split** are this design's own choices. Nothing external fixes them.
- **Router modes.** Only the emulation mode with xy-style broadcast is present.
  The measurement and debugging modes are not built, and neither is unicast
  spike delivery with lookup at the sender.
- **Links are ideal.** Links are wired directly and are lossless. The
  transceivers, and the acknowledgement/CRC retransmission layer that makes real
  serial links reliable, are not part of this RTL.
- **External stimulus** is a constant per-neuron current (`idc`), written by
  configuration packets. There is no Poisson generator.
- **Not included:** the host processor, the DRAM controller, plasticity, a
  non-linear function unit, and any soft processor.

## Capacity

At the default parameters, 35 nodes × 10 workers × 255 neurons = 89,250 neuron
slots. The full microcircuit needs 77,169, about 2,205 per node against 2,550
available. Excitatory delays up to 64 steps (6.4 ms) and inhibitory delays up to
32 steps fit the ring buffers.

Only the DRAM holds the synaptic lists. With the default `STRIDE` of 41 beats, a
list has room for 327 synapses. A larger `STRIDE` is needed if a neuron has
more.

## Verification

Each module has a self-checking testbench in `tb/` that compares against an
independent model and prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue model |
| `tb_rr_arbiter` | every grant against a reference model of priority class plus rotation |
| `tb_ring_buffer` | random accumulation and read-and-clear against arrays; late and overflow counts |
| `tb_lif_worker` | neuron trajectories against a fixed-point model; cycle count `npw + PIPE + 2` |
| `tb_local_router` | every synapse delivered once to the right worker, with random back-pressure; fairness bound |
| `tb_synapse_lookup` | every synapse of random lists (short and long) delivered once, across settings; uses the DRAM model |
| `tb_packet_router` | router of node (1,1) in a 3 × 3 grid: every copy of every packet type arrives once with the right forward flag, per-input order is kept, syncs overtake waiting spikes |
| `tb_sync_controller` | three modelled neighbours, one of them a step ahead: timesteps start only after both sync rounds and an idle node; one- and two-sync modes |
| `tb_neuroaix_cluster` | 3 × 2 nodes, 3 workers of 16 neurons: full-network spike raster against a reference model, for 12 steps with two syncs and 12 with one |
| `tb_cluster_full` | the top at its default parameters (5 × 7 nodes, 10 × 255 neurons each) for a few timesteps |

The cluster testbenches share a few pieces:

- **Connectome.** `tb_conn_pkg` defines a synthetic connectome by formulas, so
  no tables are stored:
  - length `fan + idx mod 5`;
  - target worker `(7*idx + j) mod nw`;
  - target slot `(idx + 3j) mod npw`;
  - delay `1 + (idx + j) mod dmax`;
  - weight −0x800 every fourth synapse, otherwise `0x400 * (1 + j mod 3)`.
- **DRAM model.** `dram_model` is a behavioural memory channel with fixed
  latency that builds beats from those formulas.
- **Mechanism checks.** The end-to-end test also counts a failure if any of
  these never happened: spikes, forwarding, waiting for syncs, continuation reads
  and configuration packets.

To run one, for example with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_neuroaix_cluster \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/neuroaix_pkg.sv tb/tb_conn_pkg.sv \
  tb/tb_neuroaix_cluster.sv
./obj_dir/Vtb_neuroaix_cluster
```

The full-size build is large: 350 workers, 70 lookups and 35 routers.
Verilator needs about seven minutes to compile it. The simulation itself then
finishes in seconds. It runs two short runs of three timesteps each, one with two
syncs per timestep and one with one, and compares 246 spikes against the
reference.

## Known limitations

- The sizes of the FIFOs and queues are reasonable guesses, not tuned:
  - the router output FIFOs, 4 deep;
  - the ring-buffer FIFOs, 16 deep;
  - the spike queues, 16 deep;
  - the lookup context FIFO, `2*MAX_PAR` deep.
- `n_neigh` is the same for every node, which fits a full row-and-column
  topology.
- The neuron parameters are global (`prm`), not per population.
