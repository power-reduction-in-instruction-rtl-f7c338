# Forward-branch and subroutine bufferable innermost loop buffer (FSLB)

A small loop buffer placed between a processor's fetch stage and its level-1
instruction cache (IL1) saves fetch energy: while the core runs an innermost
loop, instructions come from a 256-byte buffer and the 8 KB IL1 stays idle.
Simple loop buffers have no tags and are read by a counter, so they can only
hold code whose addresses are consecutive, which rules out every loop that
contains an `if` or a function call. This design keeps the cheap counter-read
buffer but lets it hold such loops, by storing one *path* through the loop
(the instructions in the order they were fetched, not in address order) and
by adding one bit to every branch target buffer (BTB) entry, the
**filled-direction (FD) bit**, that remembers which way each stored forward
branch went.

The RTL follows the architecture of B.-H. Tein, *Power Reduction in
Instruction Fetch Using Forward-Branch and Subroutine Bufferable Innermost
Loop Buffer with Assistance of BTB* (M.S. thesis, National Chiao Tung
University, 2006), in the configuration that work found best. Where the thesis
describes only behaviour, the implementation choices are this design's own and
are listed below.

## Blocks

| file | role |
|---|---|
| `rtl/lb_pkg.sv` | shared types: controller states, branch kinds, BTB prediction, resolved branch, action pulses |
| `rtl/btb_fd.sv` | 512-set, 4-way BTB; each entry has tag, target, kind, 2-bit bimodal counter and the FD bit |
| `rtl/loop_buffer.sv` | 64 x 32-bit tagless buffer, one instruction per entry, same-cycle read |
| `rtl/lb_controller.sv` | IDLE / FILL / ACTIVE state machine, `L_addr`, `L_len`, fill and fetch counters |
| `rtl/fslb_fetch_top.sv` | the three blocks wired together plus the IL1-or-buffer select |

The CPU core and the IL1 are not part of the RTL. The top brings out their
connections as ports, and the end-to-end testbench models both.

## Storing one path, and the FD bit

The buffer is written in fetch order. When the loop is filled, the words
after a forward branch are the ones the core actually fetched next. These are
the fall-through words if the branch was predicted not taken, or the words at
the target if it was predicted taken. At the same time the controller writes
the predicted direction into that branch's FD bit in the BTB.

Later, while the buffer feeds the core (ACTIVE), the core still looks up the
BTB with every fetch address, because it needs the prediction to choose its
next address. For each forward conditional branch the controller compares
that fresh prediction with the FD bit:

* **Equal.** The core is about to fetch the path that is stored. The buffer
  keeps supplying words from its counter.
* **Different (a loop buffer miss).** The core will leave the stored path
  after this branch. The branch word itself is still supplied from the buffer.
  From the next fetch on, words come from IL1 and are written over the buffer
  from the entry after the branch. The FD bit is rewritten to the new
  direction. The prefix before the branch is kept.

No address comparison and no second address generator are needed; the whole
cost is one bit per BTB entry plus the controller. A BTB miss counts as
"not taken" both while filling and while ACTIVE, so a branch without an entry
is consistent as long as it stays not taken. When it is first taken it is
mispredicted and a new BTB entry is created (see below).

## Subroutines without return stack

A loop that calls a subroutine containing no loop is stored with the
subroutine body inlined in the trace: the call is predicted by the BTB, so the
fetch sequence runs loop → subroutine → back, and that sequence is what gets
written. The core has no return stack, so returns are never predicted. After
every return the core fetches a fixed number of wrong-path words (two on a
five-stage pipeline) before the return resolves and fetch is redirected.
Those wrong-path words are written into the buffer as well, and the core
discards them again each time they are replayed. This keeps the buffer order
equal to the fetch order. A return redirect is therefore not treated as a path
change. The scheme relies on the core always fetching the same number of words
behind a return; a pipeline freeze that stops fetch and execute together
keeps that number.

## Controller

The letters are the action names used by the state diagram of the thesis.

| state | what happens | leaves on |
|---|---|---|
| IDLE | fetch from IL1; watch for a loop-closing branch: a conditional or unconditional direct branch that the BTB predicts taken to a target at or below its own address (one occurrence is enough, policy *FILL-1*) | that branch's address equals a valid `L_addr`: the loop is stored, go ACTIVE (**C**); otherwise record its address in `L_addr` (policy *END*) and go FILL (**B**) |
| FILL | fetch from IL1 and write every word into the next entry (**D**); write FD bits of forward branches | the loop-closing branch fetched again and predicted taken: set `L_len`, go ACTIVE (**E**); buffer full first: keep the first 64 words, go IDLE (**F**, BIG loop); any misprediction: give up, invalidate `L_addr`, go IDLE (**G**, *GOTO IDLE*) |
| ACTIVE | words come from the buffer, IL1 not accessed (**H**); the counter wraps after the loop-closing branch | FD mismatch: go FILL at the next entry (**I**, *aFILL*); misprediction: go IDLE, buffer kept (**J**, *aIDLE*); last entry of a partial BIG loop fetched: go IDLE and let IL1 supply the rest (**K**) |

Because `L_addr` holds the address of the loop-closing branch, detection of a
stored loop happens when that branch is fetched. The very next fetch, the
first instruction of the loop, is already served by the buffer.

**Invalidating `L_addr`.** A new BTB entry is created only when a branch
that missed in the BTB turns out taken. The new entry may evict an entry whose
FD bit belongs to the stored path. Rather than track which entries matter,
the controller invalidates `L_addr` whenever the BTB allocates. The next time
the loop is detected it is filled again.

Action pulses (`lb_events`) are exported so that the actions can be counted.

## Interface and timing

Everything happens in the fetch cycle. The core drives `fetch_valid` and
`fetch_pc`. In the same cycle the block returns `fetch_instr`,
`fetch_from_lb` and the BTB prediction `fetch_pred`, which the core uses to
choose its next address.

The IL1 is modelled as a same-cycle read: `il1_req`, `il1_addr` and
`il1_rdata`. `il1_req` is low whenever the buffer supplies the word. An IL1
miss is represented by the core simply not fetching in that cycle.

The execute stage reports each resolved control transfer on `ex`, a
`br_resolve_t` carrying pc, kind, direction, target and whether the fetch
went down a wrong path. The BTB trains on it. The controller reacts only to
mispredictions that are not returns.

Rules the core must obey:

* It does not fetch in a cycle in which it reports a redirect (a misprediction
  or a return). An assertion in `lb_controller` checks this.
* It keeps a constant number of wrong-path fetches behind a return.

Reset (`rst_n`, asynchronous, active low) clears the BTB valid bits and the
controller, which starts in IDLE with `L_addr` invalid. Buffer contents and
BTB payloads are not reset. They are only read behind a valid bit or after
being written.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LB_ENTRIES` (top), `ENTRIES` | 64 | buffer size in instructions. The thesis evaluates 16 to 512 (64 B to 2 KB); 256 B and 512 B gave the largest savings |
| `BTB_SETS`, `SETS` | 512 | BTB sets |
| `BTB_WAYS`, `WAYS` | 4 | BTB ways (at most 4: the FD way index is 2 bits) |

Instructions and addresses are 32 bits, word-aligned, as on ARM. A BTB entry
is 57 bits (valid, 21-bit tag, 30-bit target, 2-bit kind, 2-bit counter, FD),
so the FD bit adds about 1.8 % to the BTB storage.

## Where this departs from, or goes beyond, the thesis

* **Policy set.** Only the best policy set is built: FILL-1, END, GOTO IDLE,
  aFILL and aIDLE. The alternatives the thesis compares are not implemented:
  detection after two takens (FILL-2), tracking the start address (START),
  continuing a fill after a misprediction by counting back (CONT FILL), and
  the strong/weak-state variants (pFILL). The thesis text is not consistent
  about the winner. One passage names CONT FILL for the FILL state, and
  another calls pFILL best for mispredictions while ACTIVE. This design
  follows the summary table of the best set and the descriptions of actions G
  and J.
* **Loop detection.** A loop is detected from the BTB prediction at fetch,
  not from the resolved branch. Unconditional backward jumps count as
  loop-closing branches; calls and returns do not.
* **Predictor storage.** The bimodal 2-bit counters live in the BTB entries.
  Replacement is round robin per set. Entries are allocated only for taken
  branches. Returns are never entered.
* **Resuming after a loop buffer miss.** A refill after a loop buffer miss
  resumes at the entry after the branch. The thesis says only that the state
  returns to FILL.
* **BIG loops.** These are recognised by a "trace complete" flag rather than
  by comparing `L_len` with the buffer size. A loop of exactly 64 instructions
  is therefore treated as a whole loop, not a BIG one.
* **Cases the thesis does not cover.** These are this design's choices:
  * A different loop-closing branch met while filling (a loop inside a called
    subroutine, or a more inner loop) restarts the fill on that loop.
  * A loop-closing branch predicted not taken while filling or ACTIVE ends in
    IDLE, and the stored loop is kept.
* **`L_addr` invalidation** on a new BTB entry happens in every state; the
  thesis mentions it for the detection phase.
* **Same-cycle reads.** IL1 and the loop buffer are both read in the fetch
  cycle. Real IL1 timing and misses are left to the surrounding core.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
All of them run at the default sizes.

```
verilator --binary --timing --assert -Irtl rtl/lb_pkg.sv rtl/loop_buffer.sv \
  rtl/btb_fd.sv rtl/lb_controller.sv rtl/fslb_fetch_top.sv \
  tb/tb_fslb_fetch_top.sv --top-module tb_fslb_fetch_top -o sim
./obj_dir/sim
```

(replace the testbench for the others).

* **`tb_loop_buffer`**: random writes and reads against a reference array.
* **`tb_btb_fd`**: directed allocation, training, FD-write and return cases,
  then 8 000 random cycles on four heavily conflicting sets, all compared with
  a reference model of the BTB.
* **`tb_lb_controller`**: a directed walk through every action (B, C, D, E,
  F, G, H, I, J, K, loop exit, restart on an inner loop, `L_addr`
  invalidation). Predictions are driven by hand and every index and write
  strobe is checked.
* **`tb_fslb_fetch_top`**: the whole front end with a model of a five-stage
  core without return stack, random stalls, and a synthetic program. The
  program has a plain loop, a loop with two forward branches (one changes
  direction in blocks, one is rarely taken), a loop calling two loop-free
  subroutines (one with a forward branch), a 90-instruction BIG loop and an
  outer jump.
  * It checks every fetched word against the IL1 contents, whichever source
    delivered it.
  * It checks that IL1 is idle exactly when the buffer delivers, and that the
    fetch right after C or E is served by the buffer.
  * It requires every action, plus buffered returns, calls, taken forward
    paths and post-return wrong-path words, to occur at least once.
  * It requires the buffer to supply at least 30 % of the fetches. In 60 000
    cycles it supplies about 78 %.

* **`tb_fslb_sizes`**: runs the same bench (`tb/fslb_bench.sv`) at the six
  sizes of the original evaluation, 16 to 512 entries, side by side.
  * The 90-instruction loop must overflow (F, K) at 16 to 64 entries and fit
    whole from 128 on.
  * The buffer's share of fetches must not drop as the buffer grows. It
    rises from about 66 % at 16 entries to 82 % from 128 on.

Each module also has a deliberately broken variant that its testbench was
confirmed to reject.
