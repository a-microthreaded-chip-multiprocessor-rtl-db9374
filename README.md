# A microthreaded MIPS-like processor with hardware loop iteration

This design is a simple, single-issue, five-stage RISC pipeline. It hides
memory latency and branch latency by switching between many very small
threads ("microthreads") instead of speculating.

- **Threads come from one program.** They are created by instructions of the
  program itself, and they share its registers.
- **Loops become thread families.** A loop body is written once, as a thread
  with a header `{start, limit, step}`. Hardware creates one thread per
  iteration and writes the iteration index into that thread's first
  register. The loop is in effect a vector instruction whose element is a
  whole loop body.
- **Threads synchronise through registers.** Every register has a state:
  full, empty or waiting. An instruction that reads an empty register does
  not stall the pipeline. It parks its thread in that register, and the
  write that later fills the register brings the thread back.
- **Switches are scheduled statically.** Every instruction carries a 2-bit
  tag, chosen by whoever generates the code. The tag says whether the next
  instruction may come from the same thread:
  - `h`: horizontal, the thread continues;
  - `v`: vertical, switch to another thread;
  - `k`: kill, the thread ends after this instruction.
- **Switches are free.** A switch costs no cycle. A failed synchronisation
  costs one cycle, to reissue the instruction.

The top module `mt_cmp` holds one processor, together with the units that a
chip multiprocessor built from such pipelines would share:

- the global continuation queue (GCQ);
- the register allocation unit (RAU);
- the global register file;
- the L2 cache.

## Block map

```
      cre/creq/crne                                 wake / decrement / branch
 RR ─────────────► GCQ ──thread──► RAU ──new──► LCQ ◄───────────────────────── RR, EX, register files
                    │ header         │ init       │  request/ack   ┌─────────┐
                    └──── I-cache ◄──┼────────────┼──────────────► │ I-cache │
                                     ▼            │ ready thread   └────┬────┘
                       local + global register    ▼                     │ instr
                       files (full/empty/wait)   IF ──► RR ──► EX ──► MEM ──► WB
                                     ▲                                 │
                                     └──────── fill ─────── L1 D-cache ─ L2 ─ main memory
```

| Module | Role |
|---|---|
| `mt_pkg` | Types, opcodes, instruction-builder functions |
| `mt_cmp` | Top: wires one pipeline to the units below |
| `mt_pipeline` | IF, RR, EX, MEM, WB, with bypasses and synchronisation |
| `alu` | add, sub, mul, and, or, slt, equality for branches |
| `lcq` | Local continuation queue: the thread state table of one processor |
| `gcq` | Global continuation queue: iterates thread families |
| `rau` | Register allocation unit: register blocks, dependent base, initialisation |
| `sync_regfile` | Register file with full/empty/waiting state (two instances: local, global) |
| `icache` | Program store with the per-thread prefetch request/acknowledge |
| `dcache` | L1 data cache: 8 KiB, 4-way, LRU, write-through, non-blocking loads |
| `l2cache` | L2 cache: 256 KiB, 4-way, LRU, copy-back, 5-cycle hit |

Main memory is outside the design. `tb/mem_model.sv` is a behavioural model
of it, with a fixed latency and one line request at a time.

## Instructions, tags and registers

An instruction word is 34 bits. Bits 33:32 hold the transfer tag
(`00` h, `01` v, `10` k). Bits 31:0 hold a MIPS-format word
(R, I or J format).

| Instruction | Encoding | Meaning |
|---|---|---|
| add, sub, mul, and, or, slt | R-type, funct 20, 22, 18, 24, 25, 2a | ALU |
| addi, muli | opcode 08, 1c | ALU with a 16-bit signed immediate |
| lw, sw | opcode 23, 2b | word address = rs + imm |
| beq, bne | opcode 04, 05 | branch relative to pc+1; must be tagged v |
| j | opcode 02 | jump within the thread |
| cre | opcode 1e, J format | create the family whose header is at the target |
| creq, crne | opcode 14, 15, beq format | create at pc+1+imm if rs==rt (rs!=rt) |
| last | R-type, funct 39 | wait until only the main thread is left |
| killall | R-type, funct 38 | kill every thread but the main one |
| end | R-type, funct 3f | stop fetching (`halted` goes high) |

"Wait on $x" is not an instruction of its own. It is written as a v-tagged
`add $x, $x, $G0`.

### Register specifiers

A 5-bit register specifier is `{class[1:0], offset[2:0]}`:

| Class | Name | Register file | Physical address |
|---|---|---|---|
| 0 | `$G` | global | offset; `$G0` always reads 0 |
| 1 | `$L` | local | L-base + offset |
| 2 | `$S` | global | S-base + offset (this thread's shared registers) |
| 3 | `$D` | global | D-base + offset (the shared registers of the thread this one depends on) |

Register files and blocks:
- Each register file has 128 entries. The eight `$G` registers sit at global
  addresses 0–7.
- Registers are handed out in blocks of 4, so a thread has at most 4 `$L`
  and 4 `$S` registers.
- The local file has 32 blocks. The global file has 30 blocks above the `$G`
  registers.
- The main thread owns local block 0 and the first shared block (global
  addresses 8–11) from reset.

### Family header

A family header is two words in instruction memory, followed directly by
the thread code (at header + 2):

```
word 0: {start[15:0], limit[15:0]}
word 1: {step[15:0], dep_dist[7:0], n_locals[3:0], n_shared[3:0]}
```

Threads are created for `index = start, start+step, … ≤ limit`.
- A thread gets a local block if `n_locals` is nonzero. Its `$L0` is set to
  its index and its other registers are set empty.
- It gets a shared block, all empty, if `n_shared` is nonzero.
- `dep_dist` is the dependency distance. A thread's `$D` registers are the
  `$S` registers of the thread allocated `dep_dist` allocations before it.
- The main thread counts as the allocation before the first thread. So with
  `dep_dist = 1`, the first thread of a family reads the main thread's `$S`
  registers as its `$D` registers.

`tb/tb_mt_cmp.sv` shows a whole program assembled with the builder
functions of `mt_pkg`: `rg`, `i_r`, `i_i` and `i_j`. The loop it runs
computes `a[i] = a[i-1] - 2*a[i] + a[i+1]` with one thread per `i`:

```
vect:  {1,N,1; 1; 2,2}
  (h) lw   $L1, a+1($L0)        # a[i+1]
  (v) add  $S1, $L1, $G0        # publish a[i+1]; waits for the load
  (v) muli $L1, $D1, 2          # a[i] from the previous thread
  (h) sub  $L1, $S1, $L1
  (v) add  $S0, $L1, $D0        # + a[i-1], the previous thread's result
  (k) sw   $S0, a($L0)
```

## How a thread lives

The hardest part of the design is the interplay of the LCQ, the register
states and the pipeline. A thread moves through these steps.

1. **Creation.**
   - `cre` reaches register read (RR) and pushes its header address into
     the GCQ. This uses one pipeline slot.
   - The GCQ reads the header in one cycle. It then offers one thread per
     clock to the RAU.
2. **Allocation.** The RAU waits until an LCQ slot and the needed register
   blocks are free. In one cycle it then:
   - claims them;
   - finds the D-base in a 16-entry history of recent allocations;
   - initialises the blocks;
   - writes the thread into the LCQ in state *waiting*.
3. **Prefetch.**
   - The LCQ sends `request(slot, pc)` to the I-cache.
   - The I-cache answers `ack(slot)` on the next edge, and the thread
     becomes *ready*.
   - This request/acknowledge exchange is repeated on every wake. Here the
     I-cache always holds the code, so it always acknowledges on the next
     edge.
4. **Running.**
   - Instruction fetch (IF) keeps the running thread's slot, pc and three
     bases. An `h` instruction continues the thread.
   - On a `v` or `k` instruction, IF hands the thread back to the LCQ with
     pc+1. The thread becomes *waiting*.
   - In the next cycle IF takes the lowest-numbered ready slot, which the
     LCQ offers combinationally. A switch therefore costs no bubble.
5. **Wake.** A waiting thread becomes ready again, through the
   request/acknowledge exchange, when one of these happens:
   - **RR found all operands full.** The slot goes back to the LCQ at once,
     so the thread is ready two cycles after it issued.
   - **Branch.** EX sends the slot back with the taken or fall-through
     target. Branches never redirect IF, so no branch delay slot is needed.
   - **Failed synchronisation.**
     - A `v`/`k` instruction finds an operand empty at RR.
     - It becomes a write of `{processor, slot}` into that register, which
       becomes *waiting*, and goes no further.
     - When the register is written, by writeback or by a cache fill, the
       register file sends the slot back with *decrement*.
     - The LCQ then sets the pc back by one, so the instruction is reissued.
6. **Kill and release.**
   - A `k` instruction that passes RR sends a wake with *kill*, and the
     thread becomes *killed*.
   - Its slot and registers are kept as long as another thread may still
     read its `$S` registers through `$D`.
   - The slot is released once the thread that depends on it has been
     killed too. A thread without shared registers is released at once.
   - A thread with shared registers but no dependent is released once the
     GCQ and RAU have nothing left to create.
   - On release, the RAU frees the blocks.

### Waiting on a register

A register can hold only one waiting thread. A second thread that reads a
waiting register is not suspended: RR holds it until the register is full.

An `h` instruction cannot be suspended, because the thread would not be
handed back to the LCQ. So RR also holds on an `h` instruction whose operand
is not full; this is the only case where a missing operand stalls the
pipeline. Code should tag v any instruction that reads a register another
thread or memory must still fill.

A load marks its destination register empty already at RR. Any later reader
then synchronises on the outstanding load, whether it hits or misses.

### Bypasses

Operands are forwarded from EX, MEM, WB and the fill port, in that
priority. An operand that will arrive on a bypass counts as full. So the
loop above carries its thread-to-thread dependency at one cycle per
iteration: `add $S0` in one thread feeds `add … $D0` in the next thread
through the EX bypass.

### `last`, `killall`, `end`

Only the main thread (LCQ slot 0) should use these.
- **last:** while other threads live, IF does not issue `last`. It hands
  the main thread back with the same pc, already marked for fetch, so that
  other threads can run. Once only the main thread is left, `last`
  completes.
- **killall:** marks every other thread killed and releasable.
- **end:** raises `halted`.

## Memory system

Loads do not block.
- A load that misses in L1 is queued with its register tag, and the
  pipeline goes on.
- The returned line is installed, and the word is written through the fill
  port into the register. This wakes a thread waiting on it.
- A store that follows a missing load to the same line marks that load
  "no fill". The load still gets its word, but the stale line is not
  installed.

Stores:
- update L1 if the line is present, and do not allocate on a miss;
- are queued to the L2 (write-through).

The L1 queue holds 8 requests and is sent to the L2 in order. A read waits
for its line before the next request is sent. While the queue is full, the
pipeline up to MEM stalls.

The L2:
- is copy-back and write-allocate;
- serves one request at a time;
- writes back a dirty victim before fetching the new line.

| Case | Latency |
|---|---|
| L2 hit | 5 cycles |
| L2 miss, 20-cycle memory | 27 cycles |
| L1 hit | same cycle |
| L1 miss that hits L2 | fill 8 cycles after the request |

All addresses count 32-bit words.

## Sizes and parameters

The top parameters all default to the configuration described above:

| Parameter | Default | Meaning |
|---|---|---|
| `NSLOT` | 32 | LCQ slots (threads per processor, including the main thread) |
| `IWORDS` | 1024 | instruction memory words |
| `LREGS`, `GREGS` | 128 | local and global registers |
| `NGFIX` | 8 | fixed `$G` registers |
| `BLK` | 4 | registers per allocation block |
| `GCQ_DEPTH` | 8 | queued families |
| `L1_BYTES`, `L2_BYTES` | 8192, 262144 | cache sizes |
| `WAYS`, `LINE_BYTES` | 4, 32 | associativity and line size of both caches |
| `L2_HIT` | 5 | L2 hit time |
| `DADDR_W` | 20 | data word-address width |

With the defaults, 29 threads besides the main thread can be in flight.
They are limited by the 29 free shared blocks.

The choices that belong to this design, and not to the architecture, are:
- the block size;
- the header and instruction encodings;
- the ready-thread order;
- the cache sizes;
- one-request-at-a-time L1/L2 traffic;
- the release rule for threads without a dependent.

## How far it goes, and known limits

- **One processor.** The shared units have a single client. The global
  register file stores a 1-bit processor number in waiting registers, but
  there is no arbitration for several pipelines.
- **No I-cache misses.** The I-cache is one array loaded before reset is
  released. The prefetch handshake and the per-slot "pinned" information
  exist, but nothing is ever evicted.
- **Lower throughput with a slow memory.** The end-to-end test runs 100
  relaxation iterations against a 100-cycle memory at IPC ≈ 0.25. An ideal
  microthreaded pipeline would approach 0.8 on this loop. The gap comes
  from the memory system, not the pipeline:
  - the L1 sends one request at a time;
  - the L2 is blocking;
  - so misses to different lines do not overlap.

  The effect grows with memory latency. `tb_k3` runs the inner product with
  200 threads against a 1000-cycle memory. It takes 51,617 cycles for 806
  instructions, an IPC of 0.016: one serialised miss per 8-word line of `x`
  and of `z`. With overlapped misses, the 29 threads that fit in the
  registers would keep about 29 iterations in flight per miss time.

  A non-blocking L2 with several outstanding misses would be the next
  step.
- **Deadlock is possible with badly tagged or over-sized code:**
  - an `h`-tagged instruction waiting for a value that only a
    not-yet-running thread can produce;
  - more threads in a dependency chain than free shared blocks;
  - a register used as a synchroniser by two threads at once.

  The hardware does not detect these.
- **No ready thread means no issue.** After a `v` or `k` instruction the
  thread always leaves IF. If no other thread is ready, IF issues nothing
  until a wake arrives. A fuller design would keep fetching the current
  thread in that case and stall it further down the pipe when an operand is
  missing. That needs a flush of the thread's younger instructions when its
  synchronisation fails, which is not built here.
- **Limited instruction set.** Only the instructions listed above are
  decoded. Others execute as no-operations.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/mt_pkg.sv rtl/*.sv \
    tb/mem_model.sv tb/tb_mt_cmp.sv --top-module tb_mt_cmp -o sim
./obj_dir/sim            # add +trace for a per-cycle issue trace
```

### `tb_mt_cmp`

`tb_mt_cmp` runs the whole design at its default parameters. The main
program:
- runs the relaxation loop above (100 dependent threads plus a sync
  thread);
- runs a count-down branch loop;
- creates a family with `creq` (taken) and skips one with `crne` (not
  taken);
- waits with `last`;
- creates a family that never finishes, then clears it with `killall`;
- ends.

It compares memory and registers with a model it computes itself. It also
counts each mechanism, and fails if any of them never happened:
- context switches, kills and suspensions;
- decrement wakes, bypasses and branches;
- creates and allocation stalls;
- RR holds;
- L1 hits and misses, L2 misses, L1 queue stalls;
- releases, killall, `last` yields, I-cache acknowledges.

`tb_k3` runs the inner-product loop `q += z[k]*x[k]` as one thread per `k`,
chained through `$S0`/`$D0`. It uses 200 threads, so slots and registers
are reused about seven times, and a 1000-cycle memory.

The unit testbenches check each block against its own reference model,
including these cycle counts:
- GCQ: one thread per clock;
- I-cache: acknowledge on the next edge;
- L2: hit time;
- L1: miss-to-fill time.
