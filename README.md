# A demand-driven processor in SystemVerilog

Most processors run a program forward. They fetch the next instruction, execute it, and store the
result in case someone needs it. This processor works the other way round. It starts from the value
that is wanted. A *demand* for a location makes the instruction there demand its own operands, and
so on down to constants and memory. Each value is sent back to whoever asked for it as soon as it
exists. Only instructions whose results are needed ever run. Independent demands are in flight at
the same time, so the parallelism in the program is found while it runs and needs no scheduling at
compile time.

The RTL is a single-issue, pipelined implementation of this model. Each cycle it handles one demand,
one operand arrival and one result. It supports procedures, loops unrolled at run time, arrays in a
conventional memory, and frame pools that limit how much work is spawned. All of it is synthesizable
SystemVerilog-2017 (`rtl/`). Self-checking testbenches are in `tb/`.

## Programs as demand graphs

A program is a set of *blocks* of 64 instructions. Each instruction sits at an offset in its block
and names its operands by offset rather than by register:

```
 4: li   4            ; b
 5: li   28           ; c
 8: add  4, 5         ; a = b + c
```

Demanding offset 8 sends demands to offsets 4 and 5. Their values come back as operands of the
`add`, the `add` executes, and its result goes back to the demander of 8. When the same location is
demanded a second time, the demand is either answered from the stored value or parked until the
value arrives. Either way, an instruction runs at most once per frame.

There are no branches. Control flow is expressed with instructions that choose which operand to
demand:

| instruction | meaning |
|---|---|
| `psi p, x, y` | demand the predicate `p` first; then demand only `x` (if `p` is true) or only `y` |
| `then x, y` | demand `x`; once it arrives, demand `y`; return `x` once `y` has arrived (sequencing) |
| `with x, y` | demand both and return `x` once both have arrived |
| `either x, y` | demand both and return whichever arrives first |
| `first x, y` | demand both and return `x` as soon as it arrives, without waiting for `y` |
| `next b, n, p` | loop initiator, explained below |
| `sw a, v, d, p` / `lw a, d, p` | store / load heap word `a + d`, after the optional predicate `p` has arrived |
| `newf label, src, trg` | create a frame from code block `label`, passing a pointer to this frame's argument block |
| `delf x, f, p` | free the frame `f` points into (only if the optional predicate `p` is true), return `x` |
| `faddr` | the address of the executing frame |

Predicates also order memory accesses. A `sw` that names a previous `sw` as its predicate runs after
it. The integer operations are add, sub, mul, and, or, xor, the three shifts, and six
set-on-compare forms. Each operation has a form with a 32-bit immediate right operand.

### Operands and addressing

Each of the three operand fields (left, right, predicate) has a mode:

* **none** — the operand is not used;
* **direct** `o` — location `o` of the executing frame;
* **displacement** `d(b)` — location `b` of this frame holds a pointer to some frame location `P`,
  and the operand is location `P + d`. This is how a frame reaches its caller's arguments and the
  results of the frames it created.

A displacement operand costs two demands. First the pointer at `b` is demanded. When the pointer
comes back, the send-back pipeline turns it into a second demand for `P + d`, addressed to the
original requester. This is called an *indirect* demand.

### Frames

A *frame* is one live instance of a code block: 64 scalar-memory locations, each holding an
instruction, its result, and tags. A scalar-memory address is `{frame index (7 bits), offset
(6 bits)}`. A pointer to a frame is the address of its location 0, held as an ordinary data value.

`newf` asks a frame allocation stage for a free frame. The stage copies the 64 instructions of the
block from code memory into the frame's instruction memory, one word per cycle, and clears every
location's tags. It then writes the *argument pointer* into the location the `newf` names: the
address of the argument block in the caller's frame. Finally it returns the new frame's address as
the value of the `newf`. The callee reaches its arguments with displacement operands through the
argument pointer. The caller reaches the callee's results with displacement operands through the
`newf` location. `tb/dde_asm_pkg.sv` (`prog_call`) has a worked example.

## Tokens and the three pipelines

All traffic between the parts of the machine is carried by small messages called tokens:

| token | fields | meaning |
|---|---|---|
| EV | `d, r, port, indirect, disp, fwd, host` | demand location `d`; answer to requester `r`, operand `port` (L, R or P) |
| OP | `v, ra, port` | operand value `v` for the instruction at `ra` |
| WB | `v, cr` | result `v` of location `cr` |
| FA | `loc, label, arg_src, arg_trg, boot, boot_off` | frame creation request |

Each pipeline reads one queue and writes others. The three pipelines form a loop:

```
            +----------------------------------------------------------+
            |                                                          |
  ev-queue --> EVALUATION  s_Eval > s_Fetch > s_Decode > s_Demand ---+ | operand demands
            |                  |         |          |                 | |
            |           answer |    park | newf     | li / faddr      | |
            |                  v         v          v                 | |
            |           op-queue   reservation   frame alloc      wb-queue
            |                      station       queues 0 / 1         ^
            |                                        |                |
  op-queue --> EXECUTION   Read_SM > Pre_EX > EX ----------------------+
            |                         |        |                      |
            |          2nd operand of |        | lw / sw              |
            |        then/psi/next    |        v                      |
            +-------------------------+      heap                     |
                                                                      |
  wb-queue --> SEND-BACK   WB_update > Access_res > Gen_token --> op-queue, ev-queue
                                                                      (indirect), host
```

**Evaluation** (`dde_eval_pipe`) takes one demand per cycle.

* `s_Eval` reads the location's evaluation tag (*Evtag*): empty & unlocked, empty & locked, or full.
  If the location is full, the demand is answered from the stored value.
* `s_Fetch` reads the tag again and acts on it atomically. If the location is full, the demand is
  answered. If it is locked, the requester is parked in the return storage. If it is unlocked,
  the requester is parked, the location is locked, and the instruction is read.
* `s_Decode` handles the instructions that need no operands. `li` and `faddr` go straight to the
  wb-queue and never pass through execution; this is the *bypass*. `newf` goes to its frame
  allocation queue.
* `s_Demand` issues a demand for each operand needed now.

The second read in `s_Fetch` makes the lock safe. A value written back, or a lock set by the demand
one cycle ahead, is seen there.

**Execution** (`dde_exec_pipe`) takes one operand per cycle.

* `Read_SM` reads the instruction.
* `Pre_EX` reads and updates the operand tag (*Optag*). If the instruction is not ready, the operand
  is *shelved* in the location's data word. `Pre_EX` also issues the demands that depend on a first
  operand: the second operand of `then`, the selected branch of `psi`, and the next step of `next`.
* `EX` computes, accesses the heap, or frees a frame, and writes the result to the wb-queue.

Operands that arrive after the instruction has fired are dropped. This happens, for example, to the
later operand of `either`.

**Send-back** (`dde_sendback_pipe`) takes one result per cycle.

* `WB_update` writes the result and sets the Evtag to full.
* `Access_res` looks up the waiters of the location in the return storage (see below) and
  takes one waiter per cycle. It stays on the same result until none are left.
* `Gen_token` builds the answer for each waiter: an OP-token, a follow-up demand for an indirect
  waiter, or the host result.

The tag is full before the search starts. Any demand that arrives afterwards finds the value in
`s_Eval` or `s_Fetch`, so no waiter is missed.

### Return storage: CAM or linked lists

Waiting demands are kept in one of two interchangeable structures, chosen by the `LINKED_RETURN`
parameter of `dde_core`:

* **Reservation station** (`dde_resv_station`, the default). Each entry stores its key, the
  demanded location. A search compares the key with all entries at once and returns the lowest
  match.
* **Linked-list return storage** (`dde_ras`). Every location has a chain of waiters, with a head,
  a tail and a non-empty flag per location and a next-link per entry. A new waiter is appended at
  the tail. Send-back walks the chain from the head, oldest waiter first. Only indexed reads are
  needed, at the cost of the per-location head/tail arrays.

Both take one insert, one take and one re-key (described under loops) per cycle, with the same
timing. Both have `RS_ENTRIES` entries.

### Scalar memory

`dde_scalar_memory` holds, for every location of every frame:

* the instruction (64 bits);
* the Evtag;
* a 5-bit Optag: fired, have left, have right, have predicate, and the predicate's value;
* two 32-bit slots.

Slot L holds a shelved left operand until the instruction fires. After that it holds the result,
which is what later demands read. Slot R holds a shelved right operand. The memory has one
combinational read port per pipeline stage that needs one. Writes happen at the clock edge. If
several ports write the same location in one cycle, the frame allocators win over write-back, and
write-back wins over a lock.

### Instruction word

```
 63    58  57   56  55      42 41      28 27      14 13       0
 [ op   ][imm][pool][ left    ][ right   ][ pred    ][ mdisp   ]
                    each operand = mode(2) base(6) disp(6)
 bits 31:0 double as the 32-bit immediate (imm = 1) or the newf label
```

For `newf`, the left operand's `disp` field is the argument block offset in the caller, and its
`base` field is the slot in the new frame that receives the argument pointer. `pool` selects the
frame pool. The exact field layout is this implementation's own packing.

## Loops without control flow

This part is the least obvious, and most of the machinery exists for it.

A loop is unrolled while it runs: **each iteration is a frame** of the loop body's block. The
iteration for `k` computes `k + 1` and, with `newf`, creates the frame for `k + 1`. The result of
the loop comes from the `next` instruction at a fixed offset of the iteration block:

```
 6: next  19, 6(5), 7     ; body root, next iteration's offset 6, exit predicate
 7: sgei  3, n            ; k + 1 >= n ?
```

`next` first demands its predicate. If the exit predicate is true, it demands the body (left
operand) and returns it; this is the last iteration. If it is false, it demands the body for its side
effects and *hands the demand on* to location 6 of the next iteration's frame. This hand-over is a
**tail demand** (an EV-token with `fwd` set). It does not park a new waiter. In `s_Fetch` it
**re-keys** the reservation-station entries waiting on this iteration's `next`, so they now wait on
the next iteration's. If the next iteration's value already exists, the hand-over becomes a
write-back of that value to this `next` instead. Either way, whoever demanded the loop's value is
answered directly by the last iteration. No chain of 200 frames waits for the value to ripple back.

Because nothing waits on an old iteration any more, its frame can be freed. Iteration `k + 1` frees
iteration `k`: the body root of each iteration is

```
19: then  20, 19(0)       ; do this iteration's store, then the predecessor's 19
20: sw    ...             ; x[k] = ...
21: faddr
22: delf  19, 21          ; (in the predecessor) free this frame
```

The argument pointer of an iteration points at offset 3 of its predecessor, where the argument
block starts. So `19(0)` is the predecessor's offset 22, its `delf`. Once an iteration's store is
done, it demands that `delf`. The `delf` waits for the predecessor's own root (19), then frees the
predecessor's frame (`faddr`). The first iteration's argument pointer points into the frame that
started the loop. That frame keeps a harmless constant at the matching offset. The last iteration's
frame stays allocated and holds the result.

The allocator reuses the lowest free frame, and reloading a frame takes 66 cycles. A stray token
for a just-freed frame is consumed long before that, since operands pass through a single queue in
order. `tb/dde_asm_pkg.sv` has the whole loop. `prog_kernel1` is Livermore kernel 1,
`x[k] = q + y[k]·(r·z[k+10] + t·z[k+11])`. `prog_loop` is a generic form that also carries a value
from one iteration to the next in the argument block, as in the running sum `q += z[k]·x[k]`.

Throughput: a loop runs at about 130 cycles per iteration. Iteration `k + 1`'s frame is requested
only once iteration `k` has found that the loop goes on. The request then takes the 66-cycle frame
load, and the new frame has to fetch `k` before it can do the same. The bodies of successive
iterations overlap with this chain, but the chain itself is sequential.

### Frame pools: throttling the unrolling

A loop that creates a frame per iteration would take all of scalar memory if nothing held it back.
There are two frame allocation stages (`dde_frame_alloc`), each with its own queue and its own pool:

| pool | default frames | used for |
|---|---|---|
| 0 | 16 | procedures, outer loop levels, host boot frames |
| 1 | 64 | iterations of innermost loops |

`newf` selects the pool with its `pool` bit. When a pool is empty, the request waits at the head of
its queue (`pool_stall`) until a `delf` releases a frame. Only the allocation waits: the rest of the
machine keeps running, and its work is what frees frames. This is how the number of iterations in
flight is limited. With the recycling above, a loop of any length runs in a pool of two frames.

## Back-pressure and its limits

Every queue reports *room* when it can take a write from all of its writers in the same cycle. Each
pipeline advances only when every queue it writes has room. The evaluation pipeline also waits
while the return storage is full; this is counted as `eval_stall`. Nothing is ever dropped.

The evaluation pipeline both reads the ev-queue and writes it, with up to three operand demands per
demand. A program whose demands multiply faster than they are answered could fill the ev-queue and
then stall forever. The ev-queue is therefore deep (256 entries by default). The return storage
(128 entries) and the other queues are sized well above what the test programs use. There is no
recovery from such a deadlock; size the queues for the program.

Other rules a program must keep:

* A `next` must have all its demanders parked before it hands its demand on. In the loop pattern
  above there is exactly one demander.
* A frame must not be freed while tokens that need it can still be created. The pattern above frees
  a frame only after its body is done.

## Host interface (`dde_core`)

| ports | use |
|---|---|
| `ld_en, ld_addr, ld_data` | write a 64-bit word of code memory (4096 words) |
| `h_we, h_addr, h_wdata, h_rdata` | read/write heap memory (4096 × 32 bit); reads are combinational |
| `start_valid, start_label, start_off, start_ready` | boot: create a pool-0 frame from block `start_label` and demand its offset `start_off` |
| `res_valid, res_data` | the value of the boot demand (one-cycle pulse) |
| `idle` | no token and no frame request in flight |
| `pool0_free, pool1_free` | free frames per pool |
| `events` | one-cycle pulses: demand, full_hit, locked_hit, indirect, bypass_wb, shelve, execute, forward, frame_new, frame_free, pool_stall, eval_stall, store |
| `ev_count, op_count, wb_count, fa0_count, fa1_count, rs_used` | queue and reservation-station occupancy |

Reset is synchronous and active low. Scalar, code and heap memory are not reset. A frame's tags are
initialized when it is loaded, and the program must be loaded before it is started. All memories are
arrays read combinationally; synthesis keeps them as memories.

Timing: each pipeline accepts one token per cycle. A demand for a full location is answered from
`s_Eval`, so it never reaches the later stages. A fresh `li` passes through the four evaluation
stages and the three send-back stages. An allocation takes 64 + 2 cycles after the request reaches
the head of its queue.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `POOL0_FRAMES` | 16 | frames in pool 0 |
| `POOL1_FRAMES` | 64 | frames in pool 1 (the sum may not exceed 128) |
| `LINKED_RETURN` | 0 | return storage: 0 CAM reservation station, 1 linked lists |
| `RS_ENTRIES` | 128 | return storage entries |
| `EVQ_DEPTH`, `OPQ_DEPTH`, `WBQ_DEPTH` | 256, 128, 128 | token queue depths |
| `FAQ_DEPTH` | 16 | each frame allocation queue |
| `CODE_WORDS`, `HEAP_WORDS` | 4096 | memory sizes |

`dde_pkg` holds the fixed widths: 64-location frames, 7-bit frame index, 32-bit data, 12-bit code
and heap addresses.

## Departures from the original architecture

* Both return storages are built behind one interface, selected by `LINKED_RETURN`. The pipeline
  stages are those of the CAM variant in both cases.
* `s_Demand` always sends operand demands through the ev-queue. It does not read an operand that is
  already available and send it as an OP-token itself. `s_Eval` answers that demand from the stored
  value when it gets there.
* The linked-list storage appends a waiter at the tail of its chain rather than at the head, so
  waiters are answered oldest first.
* `Access_res` takes one waiter per cycle. It does not read several matches in parallel.
* Only the single-issue machine (one token per pipeline per cycle) is built, not the wider
  versions.
* Integer arithmetic only. There are no floating-point units and no division. Programs such as the
  Livermore kernels run on integer data.
* The 64-bit instruction is a packing of the needed fields, not the exact two-word format.
* The Optag has five flags, and the data word is split into two operand slots. Per-location
  return-link and in-use bits are replaced by a host flag in the return storage and by the
  allocators' free lists.
* A demand that only waits for completion is an ordinary demand whose value is ignored.
* Tail demands with re-keying in the return storage, and the frame-recycling loop pattern built on
  them, are this implementation's way of running long loops in a small pool.
* `newf` always creates a new frame. The option to link to an existing frame is not built.
* The larger configuration with 64 + 128 frames needs an 8-bit frame index (`FIDX_W` in `dde_pkg`).
  That size has not been simulated.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/dde_pkg.sv tb/dde_asm_pkg.sv rtl/*.sv \
          tb/dde_core_tb.sv --top-module dde_core_tb -o sim && obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `dde_core_tb` | Reduced sizes: 8 + 2 frames, 4-entry op-queue. Runs an expression block, a procedure call with both `psi` outcomes and callee freeing, ordered stores and a load, and kernel 1 for 24 iterations. Checks every result and every `x[k]`, and that all loop frames but one are freed. Counts every mechanism in `events`; each must occur, including pool throttling and back-pressure. Tracks the peak op-queue and return-storage occupancy, and checks that the return storage is empty at the end. |
| `dde_core_full_tb` | The same programs on the default-size core, with kernel 1 at its full 200 iterations. Kernel 1 takes about 26,600 cycles, about 133 cycles per iteration. |
| `dde_livermore_tb` | Default-size core running Livermore kernels 1, 3, 5, 11 and 12 in integer arithmetic at their full inner-loop lengths (200, 1000, 999, 1199 and 200 iterations). Checks every `x[k]` and the loop result, and that each loop leaves one frame allocated. |
| `dde_core_ras_tb` | As `dde_core_tb`, with the linked-list return storage. |
| `dde_fifo_tb`, `dde_resv_station_tb`, `dde_ras_tb` | Random traffic against a reference model, including full conditions, shared keys and re-keying. |
| `dde_scalar_memory_tb` | Loading, lock, write-back, argument writes, Optag/slot writes, write priority. |
| `dde_frame_alloc_tb` | Burst copy, argument pointer, write-back timing (64 + 2 cycles), pool throttling, release, boot requests, hold under back-pressure. |
| `dde_alu_tb`, `dde_code_memory_tb`, `dde_heap_memory_tb` | Every operation and port. |

`tb/dde_asm_pkg.sv` has small functions that assemble instructions (`li`, `alu`, `psi`, `next`,
`newf`, ...) and the test programs. Use it as a starting point for new programs.
