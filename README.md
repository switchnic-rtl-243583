# SwitchNIC switch data plane

A stateful network function (a TCP reassembler, a key-value cache, a load
balancer, a firewall) usually needs per-flow state that every packet reads
and most packets update. A switch pipeline can do that at line rate, but only
for simple arithmetic. Anything harder has to run on general-purpose cores.
The SwitchNIC idea is to put both on one box: a programmable switch, with a
few ARM-based SmartNIC cores on its side ports. The switch keeps a cache of
the states of the heaviest flows and serves their simple packets itself. Each
packet that needs more goes to the ARM cores.

The hard part is keeping the state consistent when it lives in two places.
This design keeps each flow's state in exactly one place at a time. The
switch alone knows where. Every hand-over of the state rides inside a packet
of that flow, so there is no separate control channel and no lock. This
repository contains the switch side of that scheme as synthesizable
SystemVerilog. It also has a behavioural model of the ARM side, which is used
only in the testbenches.

## The hand-over protocol

Each table entry goes through five states. They are encoded by one-bit flags,
which sit in different pipeline stages.

```
 initial ──state request──▶ incomplete ──state response──▶ active
    ▲                          │  (timeout, or a packet of        │ packet needing
    │ reset delay              │   the same flow in between)      │ complex processing
    │                          ▼                                  ▼ (or TTL expiry)
    └──────────────────────  inactive  ◀──────write-back ACK─── frozen
```

- **Pull into the switch.** A packet of a heavy flow can find its entry free.
  If so, the switch marks the entry *incomplete* and sends the packet to the
  ARM cores with a `req` flag in the in-band header. The cores piggyback the
  flow's current state on the packet when it comes back (`resp`), and stop
  updating the flow. The switch stores the state and marks the entry
  *active*.
- **Cancel on a racing packet.** Another packet of the same flow can arrive
  while the entry is incomplete. It has to go to the cores, which still own
  the state. So the pull is cancelled: the entry becomes *inactive*, and the
  late response is discarded. The same happens when no response arrives
  within `cfg.timeout`.
- **Fast path.** While the entry is active, a simple packet updates the state
  in the switch and leaves directly to the network.
- **Freeze and write back.** A packet that needs complex processing *freezes*
  the entry. It goes to the cores with the state piggybacked (`wb`). Until
  the cores return an `ack`, every later packet of the flow also goes to the
  cores and carries the same frozen state. This makes the write-back survive
  packet loss. The cores keep a per-flow *write-back bit*, so they import
  only the first copy that reaches them. The ACK moves the entry to
  *inactive*. After `cfg.reset_delay` the entry is free again.
- **TTL eviction.** An active entry that sees no packet for `cfg.ttl` is
  frozen in the same way. It is written back with a header-only message,
  which frees room for other heavy flows.

### Why there are two copies of the state

The freeze decision can only be made once the packet's operation has been
worked out. By then the packet has already passed the stage that holds the
state, and that stage has already updated it. A later packet of the same
flow, one slot behind, would read that polluted value. To avoid this, the
design keeps a second copy of the key and value in a deeper stage
(`frozen_state_stage`), next to the *frozen* flag.

- While the entry is not frozen, both copies get the same update. An
  assertion in the top checks that they agree on every fast-path hit.
- When the entry is frozen, the deep copy is no longer written. It is the
  value piggybacked to the cores.

The original copy may go stale while the entry is frozen. This does no harm,
because it is overwritten by the next insert.

## Pipeline

One slot per clock. All stages are registered.

| stage | module | holds / does |
|---|---|---|
| in | `ingress_arbiter` | picks returning ARM packet > network packet > maintenance slot |
| S0 | `flow_hash`, `count_min_sketch` | table index; heavy-hitter bit (estimate > `cfg.hh_threshold`) |
| S1 | `ctrl_stage` | key, flags valid/incomplete/active/inactive, last-touch timestamp; all FSM decisions |
| S2 | `orig_state_stage` | original state value |
| S3 | `frozen_state_stage` + `nf_simple_op` | frozen flag, duplicate key/value, the NF's simple operation, freeze/write-back |
| S4 | `inband_egress` | writes the in-band header, steers to network / ARM / drop |

- **Latency.** A network packet taken in cycle 0 appears on `net_out` or
  `arm_out` after 5 clock edges.
- **Input stalls.** `net_in_ready` falls while a packet from the ARM cores is
  taken. Both inputs are held off after reset while the flag columns are
  wiped one entry per cycle. `init_busy` is high during the wipe, which takes
  `TABLE_ENTRIES` cycles.
- **Outputs.** The outputs have no backpressure.
- **Timers.** `ttl_sweeper` walks the table in idle slots. Each visit checks
  the timeout, the TTL and the reset delay of one entry. An inactive entry
  whose reset delay has passed is also freed as soon as a network packet
  maps to it.
- **Hash collisions.** The table is direct-mapped. A flow whose entry is held
  by another flow is simply served by the cores.

`ev` (type `event_t`) pulses one bit per mechanism each cycle:

- fast hit, miss, collision, cold (free entry, flow not heavy)
- state request, cancel, response accepted, response discarded, timeout
- freeze, repeated write-back, ACK delete, reset, TTL expiry

Use it for counters.

## Interface (`switchnic_dataplane`)

Parameters:

- `NF`: default `NF_REASSEMBLER`. Also `NF_KVSTORE`, `NF_LOADBAL`, `NF_FIREWALL`.
- `TABLE_ENTRIES`: default 32768.
- `CMS_ROWS`: default 2.
- `CMS_COLS`: default 4096.
- `CMS_CTR_W`: default 16.

Packets are the `pkt_t` struct from `switchnic_pkg`. It has these fields:

- `flow_id`: 32 bits.
- `seq` and `len`: TCP byte position and payload length.
- `op`: data, KV read, KV write, or "complex".
- `arg`: the KV write value in, and the read or lookup result out.
- `ctrl_only`: marks a header-only message.
- `hdr`: the in-band header, `req/resp/wb/ack` plus a 32-bit state.

Network packets enter with their header ignored. Packets from the cores must
come back with the header the model in `tb/arm_core_model.sv` produces.
`cfg_t` carries the heavy-hitter threshold and the TTL, timeout and reset
delay, all in clock cycles. `cms_clear` restarts the sketch window, and
`sweep_en` enables the maintenance slots.

The simple operations per NF (`nf_simple_op`):

- **Reassembler.** The state is the next expected byte. An in-order segment
  advances it. Any other segment is complex.
- **KV store.** A read returns the value in `arg`. A write replaces the value.
- **Load balancer.** The state is the backend, returned in `arg`.
- **Firewall.** State bit 0 = allowed. Otherwise the packet is dropped.

Any packet with `op = OP_COMPLEX` goes to the cores.

## What is taken as given, and what is this design's own

The following are as the scheme describes them:

- the five-state entry life cycle and its transitions
- the cancel-on-concurrent-packet rule
- continuous write-back until ACK, with an idempotency bit on the cores
- the deeper second indicator with a duplicated state
- admission by a count-min sketch with a configurable threshold
- per-entry TTL eviction
- a hash table whose collisions go to the cores
- a table of 32k entries

The following are choices of this implementation:

- all widths and the header layout
- the hash function (multiplicative) and the sketch size
- the exact stage split of the columns, with the key next to the flags and
  the timers kept as one timestamp per entry
- the use of idle slots to check timers
- the inline reset of stale inactive entries
- TTL eviction through a header-only write-back
- the fixed input priority
- a single NF per build

The design also relies on some things from its environment:

- The link to and from the cores is assumed to keep packet order in each
  direction. A duplicate ACK could otherwise delete an entry that has just
  been re-inserted.
- `cfg.reset_delay` must be longer than the worst round trip to the cores,
  so that a late response from a cancelled pull cannot be taken by a new
  pull of the same entry.
- `cfg.timeout` should be longer than that round trip too.

Not included:

- the ARM cores' software (only a testbench model)
- the Ethernet MACs
- the switch's packet parser
- the TCAM or shallow-inspection tables of a real switch
- fusing several NFs into one table
- entries shared by several flows under one hash value (as sketch-based
  NFs would use); each entry here belongs to one flow ID

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_switchnic_dataplane \
    rtl/switchnic_pkg.sv tb/tb_switchnic_dataplane.sv
./obj_dir/Vtb_switchnic_dataplane
```

The package goes first; `-y` lets Verilator find the other modules by name.
Replace the top-module name to run any other testbench.

- **`tb_switchnic_dataplane`** runs the full-size design, with 32768 entries
  and a reassembler, against the ARM model. The traffic has 14 heavy flows,
  two flows that collide in the table, one light flow and one flow whose
  pulls the cores decline. Segments are reordered, and some write-backs are
  dropped and resent. The testbench checks:
  - per-flow byte order at the output
  - the 5-cycle fast-path latency
  - that the cores end with exactly the bytes sent
  - that the table is empty after the drain
  - that every event in `ev` occurred at least once

  It runs in a few seconds.
- **`tb_switchnic_kvstore`** builds the design as a key-value cache,
  also at full size. It sends 10,000 keys with a skew, in three phases with
  0 %, 30 % and 90 % writes. A reference store executes every request in
  the order the switch accepted it. Each result must match that store, and
  so must the values the cores hold after TTL eviction. It also reports the
  share of requests served in the switch, and the number of writes among
  them.
- **`tb_switchnic_churn`** builds the design as a load balancer. It keeps
  about 2,000 connections open and replaces them at a slow and at a fast
  rate. Every packet of a connection must report the same backend, whether
  the switch or the cores served it.
- **`tb_switchnic_flowcount`** runs the reassembler at full size with
  uniform traffic over 1,000, 16,000 and 64,000 flows. The share of packets
  served in the switch is about 74 %, 72 % and 25 % of the packets. At
  16,000 flows hash collisions already appear, and past the table size the
  share drops. Per-flow order and the final byte counts are checked as in
  the first testbench. It runs in about 20 s.
- **Unit testbenches** `tb_<module>` compare each block with an independent
  model. The tables are scaled down where that keeps the run short.

## How far it can be trusted

- All testbenches pass with Verilator 5. The three system-level ones run the
  full 32768-entry table. Each unit testbench has also been run against a
  deliberately broken copy of its block, and it caught the fault.
- The protocol's safety rests on the two timing settings above, and on the
  ordered link to the cores. The testbenches respect both. They do not
  cover a link that reorders packets.
- The table columns are plain SystemVerilog arrays with one read and one
  write per cycle. A real device would map them onto SRAM macros. With
  256 entries, the design goes through generic yosys synthesis in under a
  minute. The full size has been linted and elaborated, but not
  synthesized to gates, because flip-flop mapping of 32k-entry arrays
  takes too long.
- Traffic rates in the evaluated setups were checked only by arithmetic.
  Nothing here models 100 Gb/s links or the clock rate of a switch ASIC.
