# Protocol converters generated from scenario specifications

Components on a system-on-chip often speak incompatible protocols. One
master expects `grant`/`ok`, another bus wants `req`/`split`/`resume`, a 32-bit
master talks to a 16-bit slave. A *protocol converter* sits between them, so
that each component keeps its native protocol while the system as a whole
follows the intended pattern of interaction.

This RTL implements converters of that kind in hardware, following a
scenario-based synthesis method:

- The interaction among all components is written as a graph of
  scenarios: a high-level message sequence chart (HMSC).
- Each node of the graph is a scenario (a message sequence chart, MSC) saying
  which messages each component sends and receives in that mode of
  operation.
- Because the components cannot talk to each other directly, the converter
  plays the other side for every component. Its task in a node is the
  *dual* of each component's view: what the component sends, the converter
  receives, and the other way round.

Two kinds of extra information make the converter more than a message
router:

- **Message relationships** say which message a component sends is the
  content of a message another component receives. For example, master 1's
  `data` in node E becomes the slave's `D1` and `D2`. A relationship is
  one of three kinds:
  - *relay*: the content is passed on unchanged;
  - *chop*: one wide message becomes two narrow ones;
  - *merge*: two narrow messages become one wide one.
  All other messages are control messages, which the converter generates or
  absorbs on its own.
- **Behavioural specifications** are small automata over some of the
  converter's messages. They impose an order the scenarios do not. For
  example, "the slave may get `startW` only after the reading master got
  `done`".

The hardware is one fixed skeleton, `conv_core`. Each converter is that
skeleton plus constant tables: a program per thread and per node, and the
monitor automata.

## Structure of a converter

```
                 path (environment)
                        |
                  +-------------+
                  | run_channel |  next node / WAIT
                  +-------------+
                   |     |     |
   component 0 <-> thread 0    |          thread k <-> component k
                     |  \      |           /   |
                     |   +--msg_queue--+      |     important messages
                     |   +--msg_queue--+      |     (relay / chop / merge)
                     |                         |
                     +---- behav_monitor x2 ---+     allow / fire
```

| module | role |
|---|---|
| `conv_pkg` | Action encoding and constructor functions for thread programs and monitor tables. |
| `conv_thread` | The sequencer that serves one component. It runs that component's dual program node by node. |
| `msg_queue` | A FIFO for the content of one important message on its way from one thread to another. |
| `run_channel` | Holds the path through the HMSC. It tells each thread which node comes next, or makes it wait. |
| `behav_monitor` | Runs one behavioural automaton and decides which monitored actions may execute now. |
| `conv_core` | Puts the above together. The per-converter program and monitor tables are parameters. |
| `conv_ex_pkg` | Channel, node and symbol numbers of the six example converters. |
| `*_converter` | The six example converters (see below). |
| `conv_examples_top` | The six converters side by side, each with its own ports. |

### Threads and their programs

There is one thread per component. A thread's life is a loop:

1. Ask `run_channel` for the next node of the path.
2. Execute the thread's program for that node, one action at a time.
3. Ask again when it reaches an `OP_END` action or the last step.

The program is a flat parameter vector. `NSTEP` actions per node, thread
after thread, and for every action:

| field | meaning |
|---|---|
| `op` | `OP_RECV` (the component sends, the thread receives), `OP_SEND` (the thread sends), or `OP_END`. |
| `ch` | The channel: one per message occurrence, for example `M1_GRANT_D`. |
| `qa`, `qb` | On a receive: the queues the content is appended to. On a send: the queues whose heads are consumed. |
| `fmt` | How a send builds its content: `FMT_CTRL`, `FMT_FULL` (relay), `FMT_HI`/`FMT_LO` (chop), or `FMT_CAT` (merge). |
| `mon_en`, `sym` | Whether the action is in a behavioural specification's alphabet, and its symbol number. |

How each kind of action behaves:

- **Receive.** `rx_ready` is raised on its channel. If the message is
  important, the content is pushed into one queue (relay or merge partner),
  or into two queues (chop: each receiving half gets a copy). The action
  waits while a target queue is full.
- **Control send.** The message is generated at once with content 1. This is
  how the converter produces `grant`, `nogrant`, `split` and so on, often
  before the component the message "stands for" has acted. For example, the
  master gets `split` before the slave has even received the transfer.
- **Important send.** The action waits until its queue heads are present. It
  then builds the content from them and pops them when the component takes
  the message:
  - relay: the whole head;
  - chop: the upper or lower half of the head, zero-extended;
  - merge: `{head_a[15:0], head_b[15:0]}`.
  The first half of a chopped word (`D1`) is the upper half.
- **Monitored action.** It also waits for its monitor's `allow` and reports
  `fire` when it completes.

Only the waiting thread stops. The other threads carry on, so the sides of a
converter run as independently as the scenarios allow.

### The RUN channel and cycle-bounded execution

This is the subtle part. The HMSC is a graph with branches and loops, and
all threads must take the same branch. An external environment therefore
supplies a *path*: a finite list of node numbers, written into
`run_channel` through `path_we`/`path_waddr`/`path_wnode`, with its length in
`path_len`.

Nodes are concatenated *asynchronously*. A thread that has finished its part
of a node may move on while other threads are still inside it. Without a
bound, a fast thread could run around a loop arbitrarily far ahead of a slow
one, and arbitrarily many copies of the same node would be open at once.

The execution is therefore kept *cycle-bounded*:

- A **copy** of a node is one position in the path.
- A copy is **active** from when the first thread enters it until the last
  thread has left it.
- A thread that asks for node `n` at path position `q` gets **WAIT**
  (`wait_o`) as long as some other thread has not yet finished a position
  `p < q` that holds `n`.
- In hardware: for each thread `j`, `first[j]` is the first position it has
  not finished. It is the position it is inside, or the next one if it is
  between nodes. Thread `t` is blocked if any `p` with
  `first[j] <= p < idx[t]` holds `path[p] == node[t]`.
- A thread that asks in the same cycle as another counts as having left its
  node. So of two threads asking for copies of the same node in one cycle,
  the one at the earlier path position wins.

One consequence is worth knowing: no queue of the example converters ever
holds more than one message at a time. A producer cannot enter the next copy
of a node before its consumer has finished the previous one.

- The queues are 4 deep (`QDEPTH`). They never fill in these examples.
- Their full-stall logic is a safety net for programs that push several
  messages into one queue within a single node.
- `tb_conv_core` exercises that stall with a 2-deep queue.

### Behavioural monitors

`behav_monitor` holds up to `NTR` transitions `{valid, from, sym, to}` over
states 0–3. It starts in state 0, and every state is accepting.

- A thread whose next action carries symbol `s` raises `req[s]`. The monitor
  answers `allow[s]` if the current state has a transition on `s`.
- When the action completes, `fire[s]` moves the automaton along that
  transition.
- Actions outside the alphabet are never affected.
- If two enabled symbols are requested together, the lower number wins. The
  permission is then held until that action fires, so that a `tx_valid`
  shown to a component is never withdrawn.

`conv_core` has two monitors. Each monitor sees only the fires of its own
symbols.

## Interface and timing

- **Channels.** Every message occurrence is its own valid/ready channel
  (`rx_*` from the components, `tx_*` to them) with `W`-bit content.
  - A message moves in a cycle where valid and ready are both high.
  - Once raised, `tx_valid` stays high with stable content until it is taken.
    An assertion in `conv_thread` checks this.
  - Control messages carry the value 1.
- **Timing.** Each action takes at least one clock cycle. A node with `k`
  actions thus takes at least `k` cycles for its thread, plus one cycle to
  ask for the next node after an `OP_END`.
- **Reset.** All state is reset synchronously by `rst_n` (active low). The
  path memory is not reset: entries beyond `path_len` are never handed out.
- **Status outputs.** Each converter has:
  - `finished`: one bit per thread, high when the thread has used up the
    path. It falls again if the path is made longer.
  - `cur_node` and `in_node`: which node each thread is in.
  - `stat_run_wait`: a thread got WAIT.
  - `stat_mon_block`: an action is held by a monitor.
  - `stat_q_stall`: a receive is held by a full queue.

  The top packs the three `stat_` flags into `<ex>_stat[2:0]`.

## The example converters

The node numbering is A=0, B=1, and so on. The channel names in
`conv_ex_pkg` are `<COMPONENT>_<MESSAGE>_<NODE>`.

| module | components (threads) | nodes | relationships | monitors |
|---|---|---|---|---|
| `pq_converter` | P sends `req`, `data` and waits for `ack`; Q sends `ready`, waits for `msg`, `finish` and sends `ack` | 1 | `data` relayed as `msg` | none |
| `ackpull_converter` | Ack-Nack sender, Pull-End receiver | set-up, transfer, error recovery, release | `msg` relayed as `data` | `data` before `ack` |
| `split_bus_converter` | master, slave with split transactions | A–H | `transfer` relayed | none |
| `prio_bus_converter` | masters m1 (higher priority) and m2, slave | A–E | each master's `transfer` relayed | none |
| `rw_overlap_converter` | 32-bit masters 1 and 2, 16-bit slave, overlapped read/write | A–H | writes chopped into `D1`/`D2`, reads merged | G: `done` to master 2 before `startW`; H: `done` to master 1 before `startW` |
| `split2_bus_converter` | masters m0 and m1 (higher priority), 16-bit slave | A–F | reads merged | F: `req` then `split` then `grant` |

More detail on some of them:

- **Split bus.** Nodes A–D are an ordinary request/grant/transfer/ok
  exchange. E is the slave splitting the transfer. F–G are the master asking
  again and being refused while split. H is the slave resuming.
- **Two-priority bus.** Node D grants m1. Node E grants m2, which is only
  possible after m1 said `req0`.
- **Read/write overlap.** Nodes A–D are the four request combinations. E and
  F are a write and a read of master 1 while master 2 gets `noack`. G and H
  overlap a write of one master with a read of the other.
- **Split with two masters.** Node F is m1 interrupting m0's transaction
  with `split`, doing its own read and then `resume`-ing m0.

## Where this design departs from the method, and what it chooses

- **Hardware, not software threads.** The original converters are
  multithreaded software models that exchange messages through unbounded
  FIFO channels. Here each thread is a small sequencer with a program table,
  and every message is a valid/ready channel. The cycle-level handshake is
  this design's own.
- **Bounded queues.** The queues are bounded: `QDEPTH` = 4, and a full queue
  stalls the receive. As explained above, the examples never reach the
  bound.
- **The path.** It is written into a memory of `PLEN` = 32 entries. The
  longest reference path has 14 nodes. The path can be extended while the
  threads run: halted threads resume.
- **Data width.** The width is 32 bits throughout. Slave half-words travel
  in the lower 16 bits of a channel. `D1` is the upper half of a master's
  word.
- **Scenario contents.** The contents of each scenario were transcribed from
  the drawings of the examples. Three readings matter:
  - In the read/write overlap example, the priority stated for the masters
    (master 2 higher) does not match the scenarios, where master 1 is served
    in nodes E and F when both ask. The scenarios are followed.
  - For node G of the same example, the ordering requirement is written two
    ways. One says `done` to the reading master 2 before `startW` to the
    slave; the other names master 1's `done` and a start-read. The first is
    implemented, because it is the one that frees the bus for the writer.
    Node H is treated symmetrically.
  - In the P/Q example, a single sequential converter would answer `ack`
    only after `msg`. The multithreaded converter built here lets P get its
    `ack` as soon as its data is buffered.
- **Not included.** A combined priority-and-split bus (13 nodes) is not
  included. Its message directions could not be determined with confidence.
- **No timers or edge guards.** The method allows one timer per component
  process, to bound the delay between two of its events, and guards on
  clock edges. Both belong to the component specification. Neither is
  modelled here: every action is taken on the rising edge, and delays are
  not bounded.
- **Out of scope.** The generator software that produces the tables from a
  specification is not part of this RTL. The tables are written by hand in
  each `*_converter.sv` and `conv_core` accepts any table.

## Verification

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_msg_queue` | 4000 random push/pop cycles against a reference queue (flags, head, full/empty corner cases). |
| `tb_behav_monitor` | Allow patterns per state, state changes on fire, lowest-symbol tie rule, held permission, reset. |
| `tb_run_channel` | Path order, shared copies, WAIT while an earlier copy is active (including for threads that have not reached it), the same-cycle tie, `done`, path extension. |
| `tb_conv_thread` | One thread against a modelled environment: receive stalled by a full queue, push content, monitored send, relay/chop/merge formatting and pops, stable valid, end of path. |
| `tb_conv_core` | Two threads with a 2-deep queue: in-order relay, queue-full stall, monitor-imposed order, second monitor. |
| `tb_<example>` | Each example converter against component models walking through their views of a path. Data contents, message orders, monitor orders and speculative control messages are checked. The split bus and two-priority bus examples use the reference paths `ABACEFGFHABACD` and `BDADCEAD`. |
| `tb_conv_examples_top` | All six converters at once at default parameters, as above. It also counts at the top's ports every mechanism (relay, chop, merge, control generation, monitor hold, WAIT, threads in different nodes, branching, early `split`) and fails on any that never happened. It also checks that no queue ever filled. |

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_conv_examples_top \
    rtl/conv_pkg.sv rtl/conv_ex_pkg.sv tb/tb_conv_examples_top.sv
./obj_dir/Vtb_conv_examples_top
```

Replace the top module and testbench file for any other testbench. The
whole end-to-end run takes well under a second.

## Writing a new converter

1. Number the channels, queues, nodes and monitor symbols, as
   `conv_ex_pkg` does for the examples.
2. In a wrapper like `pq_converter.sv`, fill the program vector. The
   `` `PSET(thread, node, step, action) `` macro from `conv_prog.svh` places
   an action. Build actions with the `a_*` constructors of `conv_pkg`:
   `a_recv`, `a_recv_q`, `a_recv_q2`, `a_send`, `a_send_q`, `a_send_cat`,
   `a_mon`.
3. Build monitor transitions with `tr(from, sym, to)`. The first `NTR`
   entries belong to monitor 0, the next `NTR` to monitor 1.
4. Instantiate `conv_core` with those tables.

Rules the tables must follow:

- Every channel and queue must belong to exactly one thread for sending or
  receiving: the core ORs the threads' outputs together.
- Every monitored symbol must belong to exactly one monitor.
