# Shared-memory emulation on a butterfly network

A PRAM lets every processor read any shared memory word in one step, and
lets many processors read the same word at once. Real machines have
distributed memory modules joined by a sparse network. This RTL shows how
a butterfly network of N = n·2^n nodes can run one PRAM read step in
O(n) cycles with high probability, using switches that hold only a
constant number of messages per input.

The design rests on three ideas:

* **Hashed placement.** A random polynomial hash of degree 8n−1 spreads
  the PRAM locations over the N memory modules. No fixed access pattern
  then loads one module much more than another.
* **Sorted streams.** Every processor sends its request followed by an
  end-of-stream marker. Each switch merges its input streams by tag, where
  the tag is ⟨module, address⟩. So every link carries messages in
  increasing tag order. Two requests for the same word meet at the first
  switch their paths share, and they **combine** into one. Hot spots
  therefore cost nothing extra.
* **Ghosts.** A switch may forward a message only when it knows that
  nothing smaller can still arrive on the other input. A switch that sends
  a request on one output sends a **GHOST** with the same tag on its other
  outputs. The ghost tells the next switch "nothing below this tag will
  come from me". This prevents deadlock without large queues.

Replies retrace the request paths in reverse. Each two-input switch
records which inputs a request came from (its **direction bits**). Its
mirror switch on the return path reads these bits back in order and
**replicates** the reply to every requester that was combined.

## The logical network

Each butterfly node ⟨c, r⟩ (column c < n, row r < 2^n) contains six
switches, and the nodes of column 0 contain a seventh. Unrolled, this
gives 6n+1 columns of 2^n switches, and a message crosses them left to
right:

| columns | phase | what happens |
|---|---|---|
| 0 … n−1 | 1 | The message travels along its own row to column 0. Switch k merges the stream from the left with the request of processor ⟨k, r⟩. |
| n … 2n−1 | 2 | Butterfly stages. Switch n+j goes straight or crosses to row r ⊕ 2^j, by bit j of the destination row. |
| 2n … 3n−1 | 3 | The message travels along the destination row. At column 2n+c′, the switch of node ⟨c′, r′⟩ reads the hash-table word (below) and writes it into the message. |
| 3n | — | Turnaround. |
| 3n+1 … 6n | 4–6 | The mirror of phases 3, 2 and 1. Return switch R(k) sits at column 6n−k and is the twin of forward switch F(k). Its inputs are F(k)'s outputs, and the reverse holds too. |

In phase 4 the reply passes every node of the destination row, and each
node searches its part of the overflow group for the word. In phases 5 and
6, each return switch pops its twin's direction bits. It then sends the
reply to one or both outputs.

In `pram_emulator.sv` the arrays are indexed as `g_fk[k].g_fr[r]`
(forward), `g_t[r]` (turnaround) and `g_rk[k].g_rr[r]` (return).

## The switch (`merge_switch`)

A switch has up to two inputs and up to two outputs. Each input has a FIFO
of `B` messages. There are three message types: `MSG_REQ`, `MSG_GHOST` and
`MSG_EOS`.

Each cycle the switch does the following:

1. With two inputs, it does nothing unless both queues are non-empty.
   Otherwise an empty side could still deliver a smaller tag.
2. It selects the smaller head tag, with end-of-stream counting as
   infinity. If both heads have the same tag, it takes both. Two requests
   become one; a ghost beside a request is absorbed by the request.
3. A **request** waits until every output it is routed to has space. The
   outputs come from the tag (forward switches) or from the direction bits
   (return switches). When it leaves, every other output that has space
   gets a ghost with the same tag.
4. A **ghost** is copied to every output that has space and is then
   dropped. It never waits. A ghost at a queue head with a newer message
   behind it is also dropped, because the newer message already gives a
   bound at least as good.
5. **End-of-stream** leaves when both inputs show it and every output has
   space.

Flow control uses each queue's registered `full` flag. There is therefore
no combinational path between switches, and each link carries at most one
message per cycle.

The surrounding logic in the top decides three things through the
`req_route`, `req_hold` and `req_rewrite`/`req_new` ports: where a request
goes, whether it must wait, and how it is rewritten (memory access).
`req_fire` and `req_src` report back so that the direction FIFOs can be
pushed or popped.

## Direction bits and reply replication

Every forward switch with two inputs pushes two bits, {came-from-1,
came-from-0}, into a `sync_fifo` each time a request leaves it. These are
the phase-1 switches, the phase-2 switches and the first phase-3 column.
Return traffic is sorted the same way, so its twin return switch pops the
FIFO head each time a reply leaves. It routes the reply to the output(s)
the bits name. A reply whose bits are both set is replicated, which is
counted in `perf_replicate`.

The FIFO is `DIR_DEPTH = N` entries deep. One step can never push more
than that. If the FIFO were full, the forward switch would hold its
request.

## Hashing and the memory layout

The hash is y = (Σ a_i·x^i) mod P over 8n coefficients. From y the
design derives two values:

* a = y mod M, the hash address;
* module h = a mod N and hash-table word a div N.

`hash_row` evaluates the hash for all n processors of a butterfly row at
once. No node stores the whole polynomial: node k keeps only a_{8k} …
a_{8k+7}. Each node holds one *token*, which is one processor's partial
result.

* Every cycle, each node applies one of its coefficients to its token by
  Horner's rule.
* Every 8 cycles, all tokens move one node along the row, from k to k−1,
  with node 0 wrapping to node n−1.

The token of the processor in column c visits columns c, c−1, …, 0 and
then n−1, …, c+1. Horner's rule needs the coefficients from highest to
lowest, so the token keeps two partial sums:

* L, the low part, for the columns c … 0, together with x^{8(c+1)};
* H, the high part, for the columns n−1 … c+1.

Back home it combines them as L + x^{8(c+1)}·H. The whole evaluation
takes 8n cycles. The result is ready ZETA+1 cycles after `start`.

Several locations can share a hash address, so a module cannot simply
store word x at a fixed place. `memory_module` splits each module's
LOCAL_WORDS = M/N + 8·n·M/N words into two areas:

* **Hash-table area** (words 0 … M/N−1). Word l of module ⟨c, r⟩ stands
  for hash address l·N + c·2^n + r. It holds a pointer p to that address's
  overflow group.
* **Overflow area.** Each hash address owns the 8 words p … p+7 in
  *every* module of its row. Together these hold up to 8n (x, data)
  pairs. The loader uses p = M/N + 8·(c·M/N + l).

A read therefore takes two passes through the destination row:

* Phase 3 fetches the pointer at module h(x).
* Phase 4 visits every module of the row. Each module compares the 8
  slots at p with x in one cycle and fills in the data if it holds x. The
  reply's `found` bit is set at that point.

A location that was never loaded reads as 0.

The host loads the memory through the `mem_*` ports. It computes h(x) for
every location with the current coefficients and places the pointers and
pairs itself.

## Step time guard and rehashing

A step finishes in O(n) cycles with high probability. An unlucky hash
function can make one step slow, for example when too many requests
collide on one module. `rehash_control` guards against this.

* It holds the coefficients used by all hash rows. The host writes them
  with `coef_load`/`coef`, and they can be read back on `hash_coef`.
* It counts the cycles of every step. If `step_done` has not come after
  `step_limit` cycles, it pulses `overrun`. The limit is never less than
  ZETA+1, so coefficients never change under a running hash.
* After an overrun it draws a new hash function, one coefficient per cycle
  for ZETA cycles. Each coefficient is a 32-bit LFSR value reduced mod P.
  During this `rehash_busy` is high; at the end `rehash_ready` pulses and
  `rehash_count` increments.

The slow step itself still completes with the old placement. The host
must then reload the memories for the new function before the next step.
The testbench does this once, by giving one step too little time.

## Permutation routing

With `step_perm` high, the same network routes messages instead of
reading memory. Processor i sends `perm_payload[i]` to processor
`perm_dest[i]`. The message is tagged ⟨h(i), i⟩, so phases 1–3 spread
the traffic exactly as for a read of location i. No memory is touched and
no direction bits are kept.

In phases 4–6 the return switches route on the destination:

* the phase-4 and phase-5 switches each fix one row bit;
* a phase-6 switch hands the message to its own processor when the
  destination is that processor's column.

The receiver gets the payload on `rsp_data` and the sender's number on
`rsp_from`.

## Top-level interface and timing

`pram_emulator` has these parameters:

* `B` = 2, messages per input queue;
* `DIR_DEPTH` = N.

The sizes are set in `emu_pkg`:

* LEVELS n = 3, so N = 24 processors and modules, with 8 rows;
* WORDS_PER_MODULE = 2, so M = 48 locations;
* P = 53, the smallest prime ≥ M;
* DATA_W = 16;
* ZETA = 24;
* SLOTS = 8.

Processors are numbered c·2^n + r.

To use the design:

1. Load `coef` (pulse `coef_load`), optionally seed the LFSR
   (`seed_we`, `seed`), set `step_limit`, and load memory words
   (`mem_we`, `mem_node`, `mem_waddr`, `mem_wvalid`, `mem_wkey`,
   `mem_wdata`).
2. Pulse `step_start` with `req_active`, `req_addr` and `step_perm`. In
   permutation mode also give `perm_dest` and `perm_payload`.
3. Each active processor sees one `rsp_valid` pulse with `rsp_data`.
4. `step_done` rises once every processor has its end-of-stream back.
   `step_cycles` then holds the step's length.
5. If `overrun` pulsed during the step, wait for `rehash_ready`. Then
   reload the memories for `hash_coef` before the next step.

A step costs ZETA+1 cycles of hashing plus about one cycle per column and
queue delays. At the default size, steps take 47–64 cycles. The counters
`perf_combine`, `perf_ghost`, `perf_blocked` and `perf_replicate` restart
at each `step_start`.

## Files

| file | contents |
|---|---|
| `rtl/emu_pkg.sv` | sizes, message and tag types, sort key |
| `rtl/sync_fifo.sv` | FIFO, used as switch input queue and direction-bit queue |
| `rtl/merge_switch.sv` | the merging / combining / ghost switch |
| `rtl/hash_row.sv` | polynomial hash shared by the nodes of a row, 8 coefficients per node |
| `rtl/memory_module.sv` | hash-table and overflow memory of one node |
| `rtl/rehash_control.sv` | coefficient registers, step timer, LFSR drawing of a new hash function |
| `rtl/proc_port.sv` | processor interface: send request and end-of-stream, collect reply |
| `rtl/pram_emulator.sv` | top: 8 hash rows, 24 ports, 24 memories, 152 switches and their routing |
| `tb/tb_<block>.sv` | self-checking testbench for each block; `tb_pram_emulator` runs the whole design at its default size |

## Simulating

Each testbench prints `TB_RESULT checks=… failures=…`. To run one:

```
verilator --binary --timing --assert -Irtl rtl/emu_pkg.sv rtl/sync_fifo.sv \
  rtl/merge_switch.sv rtl/hash_row.sv rtl/memory_module.sv rtl/proc_port.sv \
  rtl/rehash_control.sv \
  rtl/pram_emulator.sv tb/tb_pram_emulator.sv --top-module tb_pram_emulator -o sim
./obj_dir/sim
```

A block testbench needs `emu_pkg.sv`, its block and the blocks inside it.
For example, `tb_merge_switch` also needs `sync_fifo.sv`.

`tb_pram_emulator` runs 28 steps and checks every reply against a model of
memory:

* distinct addresses, a single hot spot, a few hot spots, an idle step;
* random mixes, one of them given too little time, so that it overruns
  and a new hash function is drawn and loaded;
* permutation steps alternating with reads.

It also checks the step length against a lower and an upper bound. It
counts a failure if any of these never occurred:

* combining;
* ghosts;
* blocking;
* replication;
* idle processors;
* permutation steps;
* mode switches;
* multi-way sharing of a hash address;
* the overrun and rehash. The overrun must also happen exactly once. It finishes in about a second.

## Where this design departs from, or goes beyond, the description it follows

* **Reads only.** Concurrent writes would travel the same way, but their
  combining rule is not defined here.
* **Ghost semantics.** A ghost promises that later tags are *strictly
  greater*. A request with the ghost's tag absorbs it rather than
  following it.
* **Queue size.** `B` = 2 is the smallest value the delay argument allows.
  The direction-bit queues are sized never to fill in one step, where a
  size of O(n) bits would do with high probability.
* **Hash schedule.** Spreading the coefficients over the row follows the
  description. The ring schedule and the low/high split are this design's
  own.
* **Hash address.** a(x) = ((Σ a_i x^i) mod P) mod M is an assumed form.
  It gives module a mod N and table word a div N.
* **Memory layout.** Only the simple layout with empty slots is built,
  needing M/N + 8n·M/N words per module. A denser layout with O(M/N)
  words per module is possible in principle, but no allocation method is
  given for it.
* **Rehashing.** The time check and the new random hash function are in
  hardware. Moving the variables to their new places is done by the host
  reloading the memories. The allotted time is a runtime input, because
  only its order, c·n cycles, is known.
* **Processors.** There are no processors; their requests and replies are
  the top's ports.
* **Memory reads** are combinational, so a switch rewrites a message in the
  cycle it leaves. The 8 overflow slots of a module are compared in
  parallel.
* **Verilator warnings that remain:**
  * unconnected outputs of instances;
  * bits of shared helper functions unused in some instances;
  * `rst_n` used both as an asynchronous reset and as the `disable iff`
    of assertions.

  None of them is a circuit fault.
