# Hardware termination detection as a refutable global barrier

This is SystemVerilog for the termination-detection hardware of a
message-passing many-core cluster: 48 FPGAs, each with 64 small cores of 16
hardware threads (49,152 threads in all). Threads compute and exchange short
messages. At any point a thread may block in a *barrier call*. The call
returns in one of two ways:

- **0**: a message has arrived for the thread, so it has more work.
- **non-zero**: every thread in the cluster is blocked and no message is in
  flight anywhere. The computation has terminated, or the current step has.
  The value is **2** if every thread voted "true" when it called, and **1**
  otherwise.

The same primitive gives two programming styles:

- **Asynchronous**: threads exchange messages freely, and the barrier only
  detects the end.
- **Synchronized**: the barrier ends each step of a bulk-synchronous
  algorithm, and the vote decides whether another step follows.

The barrier is *refutable*. Being blocked costs nothing: the fabric keeps
delivering messages, and a message simply wakes its receiver and cancels the
detection in progress.

The design follows the termination-detection scheme published for the POETS
platform (Rafiev et al., "Synchronization in graph analysis algorithms on the
Partially Ordered Event-Triggered Systems many-core architecture", IET
Computers & Digital Techniques, 2022, Section 3.1). The RTL here is an
independent implementation. The section "Where this RTL makes its own
choices" lists every point it had to decide for itself.

## Detecting termination: Safra's algorithm between FPGAs

Termination means two things are true at once:

- every thread is passive (blocked in the call);
- no message is in flight.

Passivity alone is not enough, because a message in flight will wake
somebody. Each FPGA therefore keeps a **count**, the number of messages its
threads have sent minus the number they have received, accumulated since
reset. Summed over all FPGAs, the counts give the number of messages in
flight.

The sum cannot be read in one instant across 48 boards, so the counts are
sampled at different times. Safra's algorithm makes that safe:

- A **token** visits every FPGA. An FPGA holds the token until it is passive,
  then returns its count and its **colour**.
- An FPGA turns **black** whenever it receives a message. It turns **white**
  again when it forwards a token.
- Termination is declared only when the counts sum to zero **and** every
  reply is white.

The colour catches the dangerous case. Suppose FPGA A has already been
sampled, then wakes up and sends a message to FPGA B, which has not been
sampled yet. The counts could still sum to zero, but B has received a message
since its last reply, so B's reply is black and the round is refuted.

Refuted rounds are simply repeated.

The classic algorithm passes the token around a ring. Here a **master**
(`td_master`, meant for a bridge board at the edge of the FPGA mesh) sends
the token to all FPGAs **in parallel** (a star) and combines the replies:

- it sums the counts;
- it ORs the colours;
- it ANDs the votes.

One round costs about one round trip instead of N hops. The order in which
FPGAs are sampled does not matter for correctness.

## Inside one FPGA: equal-depth reduction trees

At FPGA level a "machine" is 1,024 threads, and its state has to be reduced
every cycle without stalling. Each core provides:

- a **send pulse** and a **receive pulse**, each one bit per cycle, since
  only one thread of a barrel-scheduled core acts in a cycle;
- an **all-threads-blocked** wire, from `td_core_barrier`;
- an **all-voted-true** wire.

Four pipelined binary trees (`td_fpga`) reduce these wires to FPGA-wide
values:

| tree | input per core | output | module |
|---|---|---|---|
| adder | send − recv ∈ {−1, 0, +1} | signed sum per cycle | `td_count_tree` |
| conjunction | all threads blocked | FPGA passive | `td_and_tree` |
| conjunction | all votes true | FPGA vote | `td_and_tree` |
| disjunction (AND of inverted) | receive pulse | some core received | `td_and_tree` |

**The trees all have the same depth, DEPTH = clog2(CORES) register stages
(6 for 64 cores). Correctness depends on this.** With equal depths, the
count, the passive flag and the colour that reach the Safra machine
(`td_machine`) in one cycle all describe the same earlier cycle of the cores.
If the count lagged the passive flag, an FPGA could report "passive, count 0"
while a message sent in the lagging cycles was still missing from its count.

`td_machine` adds the tree's sum into its count every cycle. When it replies
to a token, it reports `count + this cycle's sum` and
`black | this cycle's receive`, so the reply matches the passive sample that
allowed it.

## Releasing the barrier: three phases

Detecting termination at the master is not enough: every thread must then be
released. Releasing them is itself racy. A thread released early could send
a message to a thread not yet released, whose call would then return 0 even
though termination was declared. The master therefore runs three phases,
each a broadcast followed by collecting a reply from every FPGA:

1. **Detect**: the token round described above, repeated until it succeeds.
2. **Release** (`REQ_TERMINATE`, carrying the combined vote): each FPGA
   releases all its calls with 1 or 2, **disables sending** (`send_en` low)
   and acknowledges.
3. **Re-enable** (`REQ_REENABLE`), sent only after *all* phase-2
   acknowledgements: each FPGA raises `send_en` and acknowledges.

Then the next detection round starts. Phases 2 and 3 cost nothing unless a
detection succeeds.

## Timing

Let L be the one-way latency between the master and an FPGA. The default is
`LINK_LATENCY` = 150 cycles, the inter-board latency measured on the
platform, at 240 MHz.

- A token round with every FPGA already passive takes 2L + DEPTH + about 4
  cycles.
- From the moment the whole system goes quiet, the calls return within at
  most about three round times (the round in progress, plus one full round)
  plus L + 2 cycles for the release to reach the threads. The testbenches
  check the bound 3·(2L + DEPTH + 8) + L + 8 on every release.
- Sending is re-enabled 2L later.

At the defaults one detection costs about 300 to 1,000 cycles, 1.3 to 4 µs.
The end-to-end average reported for the platform, about 5,000 cycles,
includes the software on either side.

## Modules

```
td_system                      top: master + N_FPGA × (two links + td_fpga)
├── td_master                  star master, three-phase FSM, status counters
├── td_link  (×2 per FPGA)     master↔FPGA channel with LINK_LATENCY delay
└── td_fpga  (×N_FPGA)
    ├── td_core_barrier (×CORES)   barrier state of one core's threads
    ├── td_count_tree              send/recv adder tree
    ├── td_and_tree (×3)           passive, vote, receive-OR trees
    └── td_machine                 Safra machine of the FPGA
td_pkg                         request/reply structs, master states, status
```

The master and the FPGAs exchange `td_pkg::td_req_t` and `td_rsp_t` items
(kinds `TOKEN`, `TERMINATE`, `REENABLE`; replies `TOKEN`, `ACK`). These are
one-cycle valid pulses with no backpressure. The protocol never has more than
one request outstanding per FPGA, and assertions in `td_machine`, `td_link`
and `td_master` check that rule.

### Top-level ports (`td_system`)

| port | width | direction | meaning |
|---|---|---|---|
| `send_pulse`, `recv_pulse` | N_FPGA×CORES | in | a thread of the core sent / received a message this cycle |
| `bar_call`, `bar_vote` | N_FPGA×CORES×THREADS | in | thread enters the barrier call (pulse), with its vote |
| `msg_avail` | N_FPGA×CORES×THREADS | in | the mailbox holds a message for the thread |
| `ret_valid`, `ret_val` | …×THREADS, ×2 bits | out | the call returns (pulse) with 0, 1 or 2 |
| `in_barrier` | N_FPGA×CORES×THREADS | out | thread blocked in the call |
| `send_en` | N_FPGA | out | FPGA may send (low during release) |
| `enable` | 1 | in | master may run rounds |
| `detect`, `status` | 1, struct | out | detection pulse; round, refutation and detection counters |

A call returns one cycle after its cause. A message wins over a release in
the same cycle. Reset is synchronous and active low.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N_FPGA` | 48 | worker FPGAs (8 boxes × 6 boards) |
| `CORES` | 64 | cores per FPGA (16 tiles × 4) |
| `THREADS` | 16 | threads per core |
| `LINK_LATENCY` | 150 | master↔FPGA latency, cycles, ≥ 1 |
| `td_pkg::COUNT_W` | 32 | width of the message counts |

The defaults are the cluster's own sizes.

## What the RTL does not contain

The cores, the mailboxes, the on-chip network and the 10G inter-board links
are platform components that this hardware only connects to. They appear as
ports:

- the per-core pulses and the per-thread call, vote and message-available
  signals come from the cores and mailboxes;
- `send_en` has to be obeyed by the mailboxes.

`td_link` models only the latency of the path between the master and an
FPGA, not a link layer.

## Where this RTL makes its own choices

The published description fixes the algorithm, the star topology, the
equal-depth adder and conjunction trees, the three release phases and the
meaning of the return values. These points are decided here:

- **Colour source.** A receive blackens the FPGA. The receive pulses are
  reduced by their own OR tree of the same depth, because the adder tree's
  net sum hides a send and a receive in the same cycle.
- **Votes.** They are reduced by a third equal-depth AND tree, returned with
  the token, ANDed by the master and sent back with `TERMINATE`. The source
  says only that a return value above one means every caller voted true.
- **Return codes.** The codes are exactly 1 and 2. A message beats a release
  in the same cycle, which cannot happen in a correct run anyway.
- **Latency.** Every FPGA gets the same channel latency. In the cluster the
  token crosses the FPGA mesh, so far boards see more latency than near ones.
- **Link model.** `td_link` holds one item and a down-counter instead of an
  L-deep shift register. This is valid because one item at most is in flight
  per direction.
- **Round scheduling.** A new round starts immediately after a refuted round
  and after phase 3.
- **Trees.** They are binary, with one register stage per level, and their
  inputs are padded to a power of two. Conjunction trees reset to "not all",
  and the receive tree resets to "none".
- **Clock and reset.** There is one clock and a synchronous active-low reset.
  A real cluster has a clock per board, with the links crossing between them.
- **Thread set.** All threads of a core take part; there is no mask for
  unused threads.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_td_link` | exact latency and data of every item |
| `tb_td_count_tree`, `tb_td_and_tree` | every output cycle against a delayed reference, N = 6 and 5 (padding), reset values |
| `tb_td_core_barrier` | a cycle-by-cycle reference model of the blocking call; all three return values occur |
| `tb_td_machine` | a Safra reference model: held tokens, count including the passive cycle, black/white, whitening, release/re-enable |
| `tb_td_master` | broadcast, ordering of phases, votes, and all three round outcomes against predicted results |
| `tb_td_fpga` | directed: clean token, traffic (count +1, black), whitening, a held token replied exactly DEPTH + 2 cycles after the last call, releases with 2 and with 1 |
| `tb_td_system` | end to end at 3 FPGAs × 4 cores × 2 threads, L = 10 |
| `tb_td_system_box` | one box: 6 FPGAs × 64 cores × 16 threads (6,144 threads), L = 150 |

The two system testbenches use `tb_sssp_driver`. It is a behavioural model of
the threads and of a message fabric with random delays, and it runs
single-source shortest path as an event-driven vertex program: one vertex per
thread, a 2D grid with random long-range edges, and unit or random 1..4
weights. It runs in two modes:

- **synchronized**: each barrier release is one step; the vote ends the run;
- **asynchronous**: the run goes until the first release.

The driver checks four things:

- final distances match an independent shortest-path solution;
- at every release the fabric is empty and all threads were blocked;
- each release falls within the latency bound above;
- (reduced-size testbench) every mechanism occurred at least once: wake-up
  by a message, step release, finish release, a round refuted by a black
  token, a round refuted by a non-zero count, a token held by an active FPGA,
  and a send held back by `send_en`.

**Largest size simulated.** The full default configuration: `td_system`
with no parameter overrides, 48 FPGAs of 64 cores × 16 threads and 150-cycle
links. Driven by the same thread model as `tb_td_system_box`, it ran an
asynchronous shortest path over 49,152 vertices (98,884 edges). The run had
five token rounds, three of them refuted by a black token and one token held
by an active FPGA. The worst release latency was 909 cycles against a bound
of 1,100. All 49,158 checks passed. The simulation itself takes about 7
seconds. Verilator, however, flattens the 3,072 core instances into roughly
135 MB of C++, which took about 26 minutes and 2.3 GB to compile on a 4-core
machine. For that reason the regular testbenches stop at one box. To
repeat the full-size run, copy `tb/tb_td_system_box.sv`, instantiate
`td_system` without parameters and set the driver to 48 × 64 × 16 threads
with `L = 150`.

Each testbench has also been run against a deliberately broken copy of its
module, for example a tree node that ORs instead of ANDs, or a reply whose
count is dropped, and fails as it should.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_td_system rtl/td_pkg.sv tb/tb_td_system.sv
./obj_dir/Vtb_td_system
```

Replace `tb_td_system` with any testbench name. Lint a module with:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/td_pkg.sv rtl/td_system.sv
```

To simulate a different cluster size, copy `tb/tb_td_system_box.sv` and
change its `N_FPGA`, `CORES`, `THREADS` and `L`. The driver sizes its graph
to the thread count.
