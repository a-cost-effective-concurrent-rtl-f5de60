# WLDP: a watchdog processor with loop detection and prediction

A transient fault in a processor can send its program counter to an address the program
never intended to reach. WLDP is a small coprocessor that detects such control flow errors
while the program runs. It watches the stream of addresses that the main processor retires.
In step with that stream, it walks its own *reference program*, a compact description of the
program's control flow graph, and flags an error as soon as the retired addresses leave that
graph.

A plain watchdog of this kind reads its reference memory once for every node it passes, so a
hot loop makes it read the same two nodes, the loop's head and tail, on every iteration. WLDP
adds a **loop detection module (LDM)** that recognises a loop the first time its backward
branch is taken and keeps the head and tail nodes in registers. From then on it supplies
them itself, and each further iteration costs no reference-memory read. The second idea is
to store branch targets as an offset in node space. The offset needs only log2(M) bits for a
program of M nodes, not a full address.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017). The design is written from a
published description of the scheme. Where that description stops short, the choices made
here are listed in the last section.

## The reference program

The watchdog memory holds one node per word, and a node has three fields:

| field | width | meaning |
|---|---|---|
| node type | 3 | one of the eight codes below |
| reference address | `ADDR_W` (32) | main-processor address at which the node is checked |
| offset | log2(`NODES`) | branch target = own node index + offset, modulo `NODES` |

| code | node | on a match | next node |
|---|---|---|---|
| 000 | starting node, entry point | - | PC+1 |
| 001 | proceeding node, start of a basic block | - | PC+1 |
| 010 | unconditional backward branch (loop tail) | loop may be learned | PC+offset, must hit at once |
| 011 | unconditional forward branch | - | PC+offset, must hit at once |
| 100 | conditional backward branch (loop tail) | loop may be learned; PC+1 kept as fall-through | PC+offset, predicted taken |
| 101 | conditional forward branch | PC+1 kept as fall-through | PC+offset, predicted taken |
| 110 | subroutine call | PC+1 pushed on the return stack | PC+offset, must hit at once |
| 111 | return | - | popped PC, must hit at once |

Offsets wrap modulo `NODES` (a power of two), so a backward branch is stored as a large
offset. The node type, not the offset, tells backward from forward.

Nodes sit in address order. A tool that builds the reference program from a binary creates
nodes for the following:

* the entry point (type 000);
* every branch, call and return instruction, with its own address as reference;
* every other basic-block leader, with type 001: branch targets, the fall-through instruction
  after a conditional branch, and the return point after a call.

The behavioural processor model in `tb/wldp_cpu_model.sv` (function `compile`) does exactly
this and is a working example.

## How a retired instruction is checked

The **RPM** (retiring address processing module, `rtl/wldp_rpm.sv`) registers each retiring
address. It compares the address with the previous one plus `ADDR_STEP` and sends the address
on together with an *address break* flag. The first retire after `start` always counts as a
break.

The **CPM** (central processing module, `rtl/wldp_cpm.sv`) holds the watchdog PC, the current
node, a return stack and the error state. For each retire event:

1. **Address equals the node's reference address.** The node is executed as in the table
   above, and the next node is requested in the same cycle.
2. **No match, and a conditional branch was just taken as predicted.** The branch actually
   fell through. The CPM fetches the fall-through node it kept and checks the *same* event
   again one cycle later. This retry is the only case where an event takes two cycles.
3. **No match after an unconditional branch, call or return.** The instruction right after
   such a node must be its target, so this is a *branch error*.
4. **No match, and the RPM reports an address break.** The processor jumped somewhere no node
   expects: a *break error*.
5. **Otherwise** the instruction is an ordinary one inside a basic block and passes.

The rules detect any jump whose destination is not the reference address of the node that
guards that point. The one thing they cannot see is a jump that lands exactly on the next
checkpoint, for instance a skip from the middle of a block to its final branch. The return
stack (`STACK_DEPTH` entries) reports overflow and underflow as errors too. After an error,
`error` and `error_code` hold and checking stops until the next `start`.

## Loop detection and prediction

The LDM (`rtl/wldp_ldm.sv`) has two loop entries, `LOOPS = 2`. Each entry holds:

* `loop_tail`: the backward-branch node (all three fields) and its index;
* `loop_head`: the head node (all three fields) and its index, tail + offset;
* `previous_node`: tail - 1;
* `next_node`: tail + 1, the node the loop exits to, as an index and, once it has run, its
  contents.

**Learning.** The LDM sees every node the CPM executes. The first time a node of type 010 or
100 executes that no entry holds, the LDM stores it as a loop tail and computes the head,
previous and next indices. The head node's contents are captured the next time the CPM
executes the head, which is right after the tail has sent it back there. The next node's
contents are captured the first time the loop is left.

**Predicting.** The LDM looks at every node fetch together with the node that caused it. It
raises its `loop_hit` line in two cases:

* the tail is fetched right after the previous node executed;
* the head is fetched right after the tail executed;
* the next node is fetched right after the tail executed (the loop exit), once its contents
  are held.

On a hit the watchdog memory read is suppressed, and the next cycle a registered select
steers the LDM's stored node into the CPM in place of the memory word. Each entry has its own
hit line, `loop_hit_1` and `loop_hit_2`. When a known tail executes, the LDM also hands its
`next_node` to the CPM as the fall-through node for the loop exit.

**What it saves.** Every taken back-edge after the first saves two reads, one for the tail and
one for the head. The head fetched after the final, falling-through tail is predicted too.
When a loop is entered again later (an inner loop on the next outer iteration), its entry is
still there, so all of its tail and head reads are saved. For a loop instance with N
iterations, the number of tail and head reads saved is:

* 2N - 2 the first time the loop runs;
* 2N on every later run while the entry is kept.

From the second exit on, the read of the exit node is saved as well, so a loop whose entry is
kept saves one more read per run after its first.

The end-to-end tests check these counts exactly.

**Which loops get an entry.** Entries are not freed when a loop ends. A new loop takes a free
entry, or else the first entry whose [head, tail] range does not contain the new tail. A loop
can therefore never evict a loop that encloses it. In a doubly nested loop, both levels are
predicted. In a triple nest, the innermost loop is predicted only until both outer levels have been
learned. From then on the outer two levels hold the entries. The innermost loop is still
checked in full, but its nodes are read from memory. Prediction never changes
what is checked, because the LDM only ever returns a copy of a memory word. `start` clears
the entries.

Measured with the test programs, at the default size:

| workload | tail+head reads | supplied by the LDM |
|---|---|---|
| single loop, 100 iterations | 200 | 198 (99.0 %) |
| doubly nested, inner loop (15 entries x 4 = 60 iterations) | 120 | 118 (98.3 %) |
| doubly nested, outer loop (15 iterations) | 30 | 28 (93.3 %) |
| overlapping loops [0x41, 0x43] and [0x42, 0x44], the second of 27 iterations | 162 and 54 | 160 and 52 |

## Structure and timing

```
 retire_hit, retiring_addr
        |
      [RPM] --event--> [retire queue] --valid/ready--> [CPM] --fetch addr--+--> [watchdog memory]
                                                         |  ^              |           |
                                             executed node |  | node         +--> [LDM]   |
                                                         v  |                    |       |
                                                       [LDM] ---- loop_hit ------+       |
                                                             ---- stored node ---> mux <-+
```

* `wldp_top`: wiring, the memory/LDM select register, and the queue-overflow error.
* `wldp_rpm`: address-break detection. One cycle.
* `wldp_retq`: a 4-entry FIFO of retire events. It absorbs the extra cycle of a conditional
  fall-through. If the processor retires faster than the watchdog can check for long enough,
  the queue overflows and `error_code` = `ERR_QUEUE`. A processor that retires every single
  cycle through many untaken conditional branches will do this.
* `wldp_cpm`: node execution, stack and errors.
* `wldp_ldm`: loop entries.
* `wldp_wmem`: the reference memory, with a synchronous read and a separate write port for
  loading.
* `wldp_pkg`: the node-type and error-code enums.

A retire in cycle *t* is checked in cycle *t*+2 if the queue is empty, and a detected error
shows on `error` in cycle *t*+3. The conditional fall-through retry adds one cycle. The CPM
asks for the next node in the cycle it executes one. The node, from memory or from the LDM,
arrives in the next cycle and is used straight away, so back-to-back events that each execute
a node run without bubbles.

## Using it

1. Hold `rst_n` low, then high.
2. Write the reference program through `prog_we`, `prog_addr`, `prog_type`, `prog_ref` and
   `prog_off`. Node 0 must be the entry node.
3. Pulse `start` for one cycle.
4. Drive `retire_hit` and `retiring_addr` from the processor's retire stage.
5. Watch `error` and `error_code`: 1 break, 2 branch, 3 stack overflow, 4 stack underflow,
   5 queue overflow.

`mem_read`, `loop_hit_1`, `loop_hit_2` and `loop_valid` are there for monitoring.

| parameter | default | notes |
|---|---|---|
| `NODES` | 16 | reference-memory words; a power of two. The default is the 16-word memory of the original architecture drawing; real programs need more (a program of M nodes needs the next power of two). |
| `ADDR_W` | 32 | main-processor address width |
| `ADDR_STEP` | 1 | address increment between sequential instructions (4 for byte-addressed 32-bit code) |
| `STACK_DEPTH` | 8 | return-stack entries |
| `QUEUE_DEPTH` | 4 | retire-event FIFO entries |

Assertions in the retire queue (valid/ready hold), the CPM (sticky error, stack range, fetch
timing) and the LDM (a hit only answers a fetch, no loop held twice) run in every simulation
with `--assert`.

## Tests

Each testbench prints `TB_RESULT checks=N failures=M`. Run any of them with plain Verilator from
the directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/wldp_pkg.sv \
          tb/tb_wldp_top.sv --top-module tb_wldp_top -o sim && obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_wldp_rpm` | break flag against a reference over random sequential and jumping streams |
| `tb_wldp_wmem` | read latency, hold and rewrite |
| `tb_wldp_cpm` | every node type on a legal path, the fall-through retry, all four CPM error causes, use of the LDM's next node |
| `tb_wldp_ldm` | learning, head capture, tail and head hits, the two-entry limit for a third nested loop, kept entries, replacement by a sibling loop, clear |
| `tb_wldp_top` | end to end at the default parameters: clean runs with exact loop-hit counts, reads + hits = fetches, queue overflow at one retire per cycle, 80 random wrong jumps all caught within 8 cycles |
| `tb_wldp_loops` | the loop workloads in the table above, at the default parameters; only the first tail read and the first head read of each loop go to memory |
| `tb_wldp_m100` | a 100-node program (the smallest size in the published memory-cost table) on a 128-word build with 7-bit offsets: a call across 97 nodes, 47 loops in a row so entries are replaced again and again, exact hit count, 150 wrong jumps all caught |
| `tb_wldp_workload` | 32-node build: a triple nest, an endless loop left by a break, a loop inside a subroutine. Every loop tail is predicted; the innermost tail of the triple nest only until the two outer loops hold both entries. About 440 wrong jumps, binned by the type of the node guarding the point (all eight types) and by error class (wrong node address at a plain node, at a branch node, or an address inside a block or outside the program), all caught |

The main processor is not part of the design. `tb/wldp_cpu_model.sv` stands in for it: it walks
a small instruction table, retires one instruction per call, and builds the reference program
from the same table.

## Where this design makes its own choices

The published description of the scheme gives the four modules, the node types and their
behaviour, and the registers of the loop module. The following are choices made here:

* **When a mismatch is an error.** The description says a node whose reference address does
  not match raises an error, but not which retire counts as "reaching" the node. Here a
  mismatch is an error only on an address break or right after an unconditional branch, call
  or return (rules 3 and 4 above).
* **Conditional branches are predicted taken**, with a one-cycle retry against the saved
  fall-through node. The retire queue that hides this retry, and its overflow error, are
  additions.
* **The LDM's triggers.** The LDM predicts the tail from the "previous node has just executed"
  condition and the head from "the tail has just executed". It takes the head's contents from
  the CPM's execution of it. It does not use the address-break and address-equal signals
  directly, because the executed-node events already carry that information.
* **The replacement rule** (keep entries, never evict an enclosing loop) is this design's own.
* **No separate tail-to-head counter.** The loop module is said to contain a counter for the
  serial operation from loop tail to loop head. Its role is not described further, so none is
  built; the comparators do the sequencing.
* **The exit node.** The LDM hands the CPM the exit node's index as soon as the tail executes,
  for the fall-through retry. It can only supply the exit node's contents after the loop has
  been left once, because it captures them from the CPM's execution of that node; the first
  exit reads the node from memory.
* **Error handling** stops at the first error. The error causes and their encoding are this
  design's own.
* **Sizes.** `ADDR_W`, `ADDR_STEP`, `STACK_DEPTH` and `QUEUE_DEPTH` are assumptions. `NODES = 16`
  follows the architecture drawing, not any evaluated program.
* **Not reproduced.** The exact triple-nest iteration counts of the original evaluation were
  not rebuilt, because they do not divide evenly between the levels. The memory-overhead comparison with an earlier
  watchdog is arithmetic on field widths, not hardware.
