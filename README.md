# 3-D mesh-of-trees interconnect for a multi-core cluster with stacked L2 TCDM

A cluster of simple cores shares a large, multi-banked L2 *tightly-coupled data memory*
(TCDM): a software-managed scratchpad without caches or coherence, so every core can reach
every word in a bounded and short time. Here the memory banks do not sit next to the cores:
they are placed on memory dies stacked on top of the logic die and reached through
through-silicon vias (TSVs). The interconnect between the two is a *mesh of trees* (MoT):
every core has a binary routing tree that fans out to all bank destinations, every bank
destination has a binary arbitration tree that collects the requests of all cores, and the
leaves of the two kinds of tree are wired to each other one to one.

A plain MoT is fully combinational, so its clock period is set by the longest horizontal wire
from a core to the farthest bank. In a 3-D stack the vertical hop is short and cheap in delay,
and the horizontal wires dominate. This design applies two techniques to that situation:

* **Sequential routing switches (SRS).** In the top level(s) of every routing tree, the
  branch that leads to the far half of the banks holds a register stage in each direction.
  Accesses to the near half keep their single-cycle latency; accesses to the far half take
  two extra cycles, but the long wire is split in two, so the network can be clocked faster.
* **TSV sharing.** Banks that sit directly above each other in the memory tiers form a *bank
  stack* and share one set of TSVs. The routing trees then end at bank stacks rather than at
  banks (one level fewer per doubling of the tier count), and a tier ID on the shared TSVs
  selects the bank. The price is contention: two cores that target different tiers of the
  same stack must take turns.

The default build is the combination of both at the size of the evaluated cluster: 32 cores,
64 banks of 64 KB (4 MB), 2 memory tiers (32 bank stacks), one level of sequential switches.

## Structure

```
mot3d_cluster                      top: network + stacked memory
├── mot_network                    the 3-D mesh of trees
│   ├── routing_tree   x N_CORE    one per core, N_STACK leaves
│   │   ├── seq_routing_switch     levels 1 .. N_SEQ
│   │   └── routing_switch         the deeper levels
│   └── arb_tree       x N_STACK   one per bank stack, N_CORE leaves
│       └── arb_switch             2:1 round robin
└── bank_stack         x N_STACK   N_TIER banks behind one shared TSV bus
    └── tcdm_bank      x N_TIER    64 KB single-port SRAM, 1-cycle read
mot_pkg                            packet type, widths, TSV-count function
```

The cores (32-bit processors with their own L1 caches) are not part of the RTL; their TCDM
ports are the ports of `mot3d_cluster`. The TSVs themselves are plain wires in RTL: the
stack-side links between `mot_network` and `bank_stack` are the signals that cross them.

## Address map

Byte addresses, 32 bits. For the defaults:

| bits    | field                               |
|---------|-------------------------------------|
| 1:0     | byte within the word (ignored)      |
| 15:2    | word within the 64 KB bank          |
| 16      | tier ID (log2 N_TIER bits)          |
| 21:17   | bank stack (log2 N_STACK bits)      |
| 31:22   | ignored                             |

Each bank is one contiguous 64 KB region, so software can place a thread's data in the banks
near its core. The routing tree decodes the stack field MSB first: the root splits the stacks
into halves, the next level into quarters, and so on. Field positions follow from the
parameters (`TIER_LSB = 2 + log2(words per bank)`, `STACK_LSB = TIER_LSB + log2(N_TIER)`).

## Core interface and timing

Per core: `core_req`, `core_pkt` (`we`, `be[3:0]`, `addr[31:0]`, `wdata[31:0]`), `core_gnt`,
`core_rvalid`, `core_rdata[31:0]`. All signals are synchronous to `clk` (rising edge);
`rst_n` is an asynchronous active-low reset.

* A request is taken in the cycle in which `core_req` and `core_gnt` are both high. Until
  then the core keeps `core_req` high and `core_pkt` stable.
* Every access, read or write, is answered by exactly one cycle with `core_rvalid` high;
  for a read, `core_rdata` holds the word in that cycle.
* A core has at most one access in flight: it issues the next request only after the
  response. The routing trees rely on this; they merge the responses of their subtrees
  without arbitration.

With no contention, the cycles from the request to the response are

* **1** for a bank stack on the core's side at every sequential level (request and grant in
  cycle *t*, the bank reads at the end of *t*, the response is valid in *t+1*);
* **1 + 2·k** for a stack on the far side at *k* of the sequential levels, so **2·N_SEQ+1**
  for the farthest ones. With N_SEQ = 1, half of the stacks are 1 cycle away and half 3.

Contention adds cycles in two places: a near request waits at the core (no `core_gnt`) until
its arbitration tree grants it; a far request is granted at once by the sequential switch,
which then holds it until the arbitration tree takes it.

## Sequential routing switches: near and far

`seq_routing_switch` has the same ports as the combinational `routing_switch` and replaces it
one for one, so the network topology does not change. Which output is *far* is a parameter.
`routing_tree` makes every switch in the first `N_SEQ` levels sequential and points its far
side away from the core's *home* stack. `mot_network` spreads the cores evenly over the
stacks: core *c* has home stack `c * N_STACK / N_CORE`. With 32 cores and 32 stacks, core
*c* sits under stack *c*. Cores 0–15 reach stacks 0–15 in one cycle and stacks 16–31 in three;
cores 16–31 the other way round. Of the stacks a core can address, `N_STACK / 2^N_SEQ` are
closest.

Inside the switch, the far side has:

* a **forward stage**: a one-entry register with a valid bit. It accepts a far packet when it
  is empty or is being emptied in the same cycle (`gnt` from the far side). It then presents
  the packet to the arbitration tree until that tree grants it. An assertion checks that a
  held packet does not change.
* a **backward stage**: a register that delays the far response (valid and data) by one cycle.

The near side is a straight combinational path, as in a plain routing switch. Response
merging inside a routing switch is by valid bit. With one access in flight per core, the
near and far responses can never arrive together.

## Arbitration and shared TSVs

`arb_switch` is a 2:1 arbiter with a priority token. A lone request wins at once. When both
inputs request, the token holder wins, and after every grant the token moves to the other
input. A tree of these switches serves every competing core within N_CORE−1 grants.
`tb_arb_tree` checks this bound. The tree is combinational from the cores to the bank stack,
and the grant ripples back in the same cycle. Each switch remembers the input it granted, and
the response, which the bank stack returns exactly one cycle after the grant, retraces that
path.

A `bank_stack` takes one access per cycle, so its grant is tied high. The tier ID on the
shared bus selects one `tcdm_bank`; the stack remembers the accessed tier for one cycle to
return that bank's read data. Every access to any tier of a stack passes through the stack's
single arbitration tree. That tree is where TSV-sharing contention happens.

Signals on the shared bus of one stack, default build: tier ID 1, word address 14, write
data 32, read data 32, byte enables 4, write enable 1, valid 1. That makes 85 signal TSVs per
stack, plus the clock and reset TSVs of the die. The count model behind this design counts
`log2 N_TIER + address bits + data bits` per stack, plus clock TSVs and one reset TSV
(`mot_pkg::n_tsv`). It treats data as a single bus and leaves out control lines. This RTL
keeps read and write data separate. With one clock TSV, that model gives 1 + 1 + 32·(1 + 14 +
32) = 1,506 TSVs for the default two-tier stack. Without sharing (one bank per stack) it gives
1 + 1 + 64·(14 + 32) = 2,946.

## Parameters

| parameter    | default | meaning                                                       |
|--------------|---------|---------------------------------------------------------------|
| `N_CORE`     | 32      | cores (power of two)                                          |
| `N_BANK`     | 64      | L2 TCDM banks                                                 |
| `N_TIER`     | 2       | memory tiers = banks per bank stack (1 means no sharing)      |
| `N_SEQ`      | 1       | routing-tree levels built of sequential switches (0 = plain)  |
| `BANK_BYTES` | 65536   | bytes per bank                                                |

`N_BANK / N_TIER` must be a power of two, at least 2. `N_SEQ` may not exceed log2 of it or
log2 `N_CORE`. The evaluated cluster used 32 cores, 64 banks of 64 KB, one sequential level,
and 1 to 8 tiers. The two-tier default is the point where both techniques were compared in
detail. The other tier counts are parameter settings (see the testbenches below). `N_SEQ = 0`
with `N_TIER = 1` gives a plain MoT with no register stages and no TSV sharing. That is the
baseline the techniques were measured against, so it is not a target of this design.

## Departures and choices

These points are choices made in this design where the source architecture says nothing or
gives only the idea:

* **Registers on the far side only.** The switch is described as buffering both directions.
  It is also described as keeping half of the banks close, with `2·N_SEQ+1` cycles to the
  farthest ones. Only far-side registers satisfy both statements, so that is what is built.
* **One clock.** The original backward registers run on a skewed clock that can transfer on
  both edges. Here they use the rising edge of `clk`. The cycle counts above are unaffected;
  the skewed clock would matter only to the timing closure of a physical implementation.
* **Handshake and packet format** (req/gnt, one access in flight per core, byte enables,
  separate read/write data, a response for writes) are this design's choices.
* **Banks** are written as synthesizable arrays with a one-cycle read. They stand for
  the 64 KB SRAM macros, whose own access time is taken to fit one network clock period.
* **Home stack** placement of the cores (`c * N_STACK / N_CORE`) is chosen here.
* Not built: the cores and their caches, the TSVs and clock/reset distribution as physical
  structures, the skewed clock, and the analytical performance, yield and cost models used
  to evaluate the architecture.

## Simulation

Every testbench is self-checking and ends with `TB_RESULT checks=<n> failures=<n>`. Example
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/mot_pkg.sv \
          tb/tb_mot3d_cluster.sv --top-module tb_mot3d_cluster -Mdir obj
./obj/Vtb_mot3d_cluster
```

| testbench                | what it exercises                                                     |
|--------------------------|-----------------------------------------------------------------------|
| `tb_routing_switch`      | steering, grant, response merge                                       |
| `tb_seq_routing_switch`  | near path same cycle; far packet +1 cycle, held while not granted; far response +1 cycle |
| `tb_arb_switch`          | reference model of the token; alternation under full load; response steering |
| `tb_routing_tree`        | 8 leaves, 2 sequential levels: latency 1, 3, 5 cycles by far-level count; random back-pressure |
| `tb_arb_tree`            | 8 cores: one grant per cycle, response to the winner, wait ≤ 7 cycles |
| `tb_tcdm_bank`           | random reads and byte-enabled writes against a reference array        |
| `tb_bank_stack`          | 4 tiers: tier isolation, 1-cycle response                             |
| `tb_mot_network`         | 4 cores × 8 stacks with model stacks: exact latencies, then contended traffic |
| `tb_mot3d_cluster`       | full default size, end to end (below)                                 |
| `tb_mot3d_tiers`         | the cluster with 4 and 8 tiers                                        |
| `tb_mot3d_tier1`         | the cluster with one tier (no sharing)                                |

`tb_mot3d_cluster` runs the top with its default parameters. First, each of the 32 cores
writes and reads every one of the 64 banks alone, and the test checks the 1/3-cycle latencies.
Then all cores run together at 0.06 and 0.24 accesses per cycle, and then back to back. 80 %
of these accesses go to the core's near half. Every read is compared with a reference memory.
The test requires near and far accesses, arbitration waits at the core, far packets waiting
inside a sequential switch, and cycles in which different tiers of one stack competed for its
shared TSVs. A typical run issues about 42,000 accesses. Mean latency is 2.0 cycles in the
one-at-a-time phase, about 1.2 and 1.3 cycles at the two rates, and 1.4 cycles back to back.
The longest wait for a grant was 7 cycles. The cluster build takes about two minutes of C++
compilation; the simulation takes about a second.

`cluster_check` (in `tb/`) holds the traffic generator and checker that the tier-count
testbenches instantiate once per configuration.
