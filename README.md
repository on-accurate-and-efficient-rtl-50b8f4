# Perceptron branch predictors: weight caching, partitioning, pseudotags and an inverted, pipelined weight table

A perceptron branch predictor keeps, for each branch, a small vector of signed
weights, one per bit of global branch history plus a bias. It predicts by
summing the weights, adding each weight when its history bit says "taken" and
subtracting it when the bit says "not taken", and calls the branch taken when
the sum is above zero. It learns by nudging each weight towards agreement with
the outcome. Such predictors can use long histories cheaply. They have three
weak points:

* **Aliasing.** Two branches that map to the same line of the weight table
  train the same perceptron against each other.
* **Linear inseparability.** One perceptron can only learn a linear function
  of its inputs.
* **Latency.** The table is indexed by the branch address, which arrives only
  in the cycle of the prediction. Table read and sum must then fit in that
  one cycle, and this limits the table size.

This library holds synthesizable SystemVerilog for five predictor
organisations that attack these problems. They are the organisations
proposed in *On Accurate and Efficient Perceptron-Based Branch Prediction*,
at the sizes of that work's main configurations:

| organisation | module | main idea | default size |
|---|---|---|---|
| weight caching | `wc_predictor` (NPART=1) | small tagged table, big weight cache behind it | 64 x 9 weights, 1024 sets x 4 ways cache, 8-cycle cache |
| partitioned + weight cache | `wc_predictor` (NPART=16) | both ideas combined, one shared cache | 16 x 64 x 9, same cache |
| partitioned | `partitioned_predictor` | older history bits pick one of 16 perceptrons | 16 x 64 x 9 weights |
| inverted, pipelined | `inverted_predictor` | table indexed by old history, read 8 cycles ahead | 2048 x 18 weights |
| pseudotag | `pseudotag_predictor` | address bits as extra perceptron inputs | 128 x 24 weights |

`perceptron_bp_top` puts all five side by side on one branch stream so that
they can be compared. A processor would use one of them.

## The perceptron datapath (shared)

* **Weights** are 8-bit two's complement and saturate at -128 and +127
  (`perceptron_pkg`). The 8-bit width follows from the published storage
  budgets, for example 3 KB for 128 lines of 24 weights.
* **`perceptron_sum`** computes `w0 + sum(x_i ? w_i : -w_i)` and predicts
  taken when the result is greater than zero. It is combinational. A fast
  implementation would use a carry-save tree; here synthesis chooses the
  adders.
* **`perceptron_train`** decides whether to train. It trains when the
  prediction was wrong or when |sum| <= 15 (threshold 15). When it trains,
  every weight whose input agreed with the outcome goes up by one, every
  other weight goes down by one, and the bias moves towards the outcome.
* **`bhr`** is the global history shift register, with the newest outcome at
  bit 0.
* **`weight_table`** is an array of perceptrons. It has one read port for
  prediction, one read port for the training read-modify-write, and one write
  port. A per-line valid bit, cleared by reset, makes untouched lines read as
  zero. The weight storage itself needs no reset and maps to memory.

## Common interface and timing

Every predictor has the same protocol. `perceptron_bp_top` shares the
address and outcome ports among all five.

* **Prediction.** Drive `pred_pc` (and `pred_valid` on the weight-caching
  predictors). `pred_taken`, `pred_sum` and `pred_hist` are combinational in
  the same cycle. `pred_sum` and `pred_hist` form the **checkpoint** of the
  prediction.
* **Update.** When the branch resolves, drive `upd_valid` together with
  `upd_pc`, `upd_taken` and the checkpoint (`upd_hist`, `upd_sum`). At the
  next clock edge the perceptron trains and the outcome is shifted into the
  history.
* **Rules.** At most one update per cycle, in program order. The history is
  non-speculative: it holds resolved outcomes only. Nothing here repairs a
  speculative history; a core that predicts several branches before the
  first one resolves would have to add that.
* **Addresses.** Instructions are taken as 4-byte words, so `pc[1:0]` is
  ignored (`PC_LSB = 2`).

The testbenches predict and update the same branch in the same cycle. That
is the "immediate update" model that accuracy studies of these predictors
use.

## Weight caching (`wc_predictor`, `weight_cache`)

This is the most involved organisation and the one that helped most in the
published evaluation. A 64-line first-level table (WT) is small enough to read
and sum in one cycle. Each of its lines holds a perceptron and the 16-bit
partial address tag of the branch that owns it. Behind it sits a weight cache
(WC): 1024 sets x 4 ways of perceptrons with an 8-cycle access.

**The prediction never waits for the cache.** In the prediction cycle the WT
line is summed and its tag is compared at the same time. The prediction is
the sum, whether or not the tag matched.

**On a tag mismatch** (or an empty line), three things happen at the clock
edge:

1. If the line held a perceptron, that perceptron is written back to the WC
   under its owner's key.
2. The line takes the new branch's tag and its weights become zero.
3. A WC query for the new branch starts.

Until the answer arrives, the line predicts and trains with what it holds.
Right after the miss, that is zero weights. The answer comes exactly 8
cycles after the query (`WC_LAT`). On a hit, and only if the line still
belongs to the branch that asked, the returned weights overwrite the line.
On a miss, the line keeps what it has learnt meanwhile.

**Why the cache stays alias-free.** A perceptron is trained only while its WT
line carries its branch's tag. An update for a branch that has lost its line
is dropped. Every perceptron written to the WC was therefore trained by one
branch only, up to the 16-bit partial tag.

**Same-cycle corner cases**, which are this implementation's choices:

* One WT line can be reset by a new miss, filled by a WC answer and trained
  by an update in the same cycle. The reset wins over the fill, and the fill
  wins over the training.
* A line can be evicted in the very cycle its own WC answer arrives. It is
  then written back with the returned weights, not with the zeroed ones it
  still holds.
* With the testbench protocol (predict and update in one cycle), a branch
  that misses loses the training of that one execution.

**WC organisation** (`weight_cache`):

* **Key.** The key is `{partition, 16-bit tag, 6-bit WT index}`. The low 10
  key bits choose the set. The remaining bits are stored as the line's tag:
  12 bits without partitions, 16 with 16 partitions.
* **Writeback.** A writeback overwrites a line with the same key. Otherwise
  it fills a free way, and otherwise it replaces the set's round-robin
  victim.
* **Pipelining.** The lookup happens in the query cycle and the result is
  delayed through `LAT` registers, so a new query can start every cycle.
* **Storage.** Tags and weights are memories. Valid bits and round-robin
  pointers are flip-flops that reset clears.

`ev_writeback`, `ev_fill` and `ev_wc_miss` pulse for the three cache events,
and `pred_tag_hit` shows the tag compare.

## Partitioned + weight cache (`wc_predictor`, NPART=16)

The 4 history bits just older than the 8 input bits choose one of 16 WT
partitions. Each partition's lines are tagged and backed by the cache as
described above. One WC is shared by all partitions, and the partition number
is part of the key. Only one partition is read per prediction, so a shared
cache sees at most one query per cycle. (The written description of this
combination speaks of a cache per partition. The published figure shows one
shared cache. This RTL follows the figure.)

## Partitioned (`partitioned_predictor`, `partition_selector`)

Sixteen 64-line tables are read in parallel with the low address bits. History
bits 11..8, which are not perceptron inputs, drive `partition_selector` to
pick one line. The perceptron sums it against history bits 7..0. Only the
partition that predicted is trained. A branch thus gets a separate linear
classifier for every value of the older history. For example, a branch that
follows the XOR of two older history bits cannot be learnt by one perceptron,
but it is learnt perfectly here (see the testbench).

## Inverted, pipelined table (`inverted_predictor`)

The roles of address and history are swapped. The table has 2048 lines and is
indexed by 11 bits of history that are already 8 outcomes old. The branch
address joins the inputs instead: the perceptron sums 8 newest history bits
and 9 low address bits, plus a bias (18 weights per line). Because the index
is known 8 branches early, the table read can take 8 cycles and be pipelined.
The prediction cycle only forms the sum.

How it runs:

1. Each time an outcome enters the history, the low 11 bits of the new
   history start a pipelined table read (`LAT` = 8 cycles). The index also
   goes into a queue of 9 entries.
2. When the read returns, its weights are stored in that queue entry.
3. A prediction uses the oldest queue entry, the one formed 8 outcomes ago.
   Its inputs are the 8 outcomes pushed since then and the address bits.

The queue advances per outcome, not per cycle. This guarantees that exactly 8
new history bits separate the index from the prediction, however the branches
are spaced. With at most one outcome per cycle and `LAT <= 8`, the weights are
always back in time; `pred_ready` shows this, and an assertion checks that the
oldest entry's index equals history bits 18..8.

Training reads the line again through the second port, trains it and writes
it back. A **bypass** copies written weights into every in-flight read and
every queued entry with the same index. As a result each prediction sees the
table exactly as it is in that cycle. The source design leaves the way of
combining in-flight reads and updates open, so the bypass is this
implementation's choice. After reset the history is all zero and so are all
weights, so the queue starts full of valid entries for index 0.

## Pseudotag (`pseudotag_predictor`)

A 128-line table is indexed by address bits 8..2. The inputs are 19 history
bits and the 4 address bits just above the index (bits 12..9), plus a bias.
Two branches that collide in the table but differ in those address bits get
different inputs. The perceptron can then learn a different answer for each;
the testbench checks this with two colliding branches of opposite direction.

## Sizes and storage

| organisation | weight storage | other state |
|---|---|---|
| weight caching | WT 64 x 9 B; WC 4096 x 9 B = 36 KB | 64 x 16-bit tags; 4096 x 12-bit tags; 4096 valid + 2048 round-robin bits |
| partitioned + WC | WT 1024 x 9 B; WC 36 KB | 16-bit WT and WC tags |
| partitioned | 16 x 64 x 9 B = 9 KB | 1024 valid bits |
| inverted | 2048 x 18 B = 36 KB | 9-entry queue, 8-stage read pipeline |
| pseudotag | 128 x 24 B = 3 KB | 128 valid bits |

All sizes are module parameters: `LINES`, `NHIST`, `NPC`, `NPART`, `TAG_W`,
`WC_SETS`, `WC_WAYS`, `WC_LAT` and `LAT`. Other configurations from the
published design-space study can be obtained this way: 1K-line pseudotag
tables, 24-bit histories with 16 or 32 partitions, or a 10-cycle weight cache
for a faster clock.

## Where this RTL departs from or adds to the published design

* **Training rule.** The threshold of 15 comes from the published
  evaluation. The rule "train on a misprediction or when |sum| <= threshold"
  is the usual perceptron-predictor rule; the source does not spell it out.
* **Inverted table width.** The inverted table stores 17 input weights plus a
  bias (18 per line). The published text gives both "17 weights per line"
  and a bias input.
* **Initial state.** All perceptrons start at zero.
* **History.** The history is non-speculative and is fed by the update
  port.
* **Weight cache internals.** The key layout, the round-robin replacement,
  the same-cycle priorities and the inverted table's bypass are this
  implementation's choices.
* **Not built.** The faster-clock variants are not built: a 2-cycle first
  level, and an inverted table read 9 cycles ahead with a 2-cycle sum. An
  overriding arrangement behind a fast primary predictor is not built either.
  The baseline predictors the work compares with are not included (the
  address-indexed global perceptron, gshare, bimode, Alpha 21264).
* **Accuracy not re-measured.** The published misprediction and IPC results
  come from SPECint 2000 traces. These were not re-run. The testbenches use
  synthetic branch streams.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

* **Reference-model tests.** `tb_wc_predictor` and
  `tb_partitioned_wc_predictor` compare, every cycle, the sum, the tag-hit
  flag and all cache events with an independent behavioural model. The model
  covers the tagged table and the set-associative cache with round-robin
  replacement. The cache is shrunk to 16 sets so that evictions happen, and
  the tests check that every answer comes exactly 8 cycles after its query.
  `tb_inverted_predictor` compares every prediction with an immediately
  updated table, across back-to-back branches and idle gaps of up to 20
  cycles. It also checks `pred_ready` and that the bypass is exercised.
  `tb_pseudotag_predictor` and `tb_partitioned_predictor` compare every sum
  with a model, and check that the pseudotag and partition mechanisms learn
  what a single perceptron cannot.
* **Leaf tests.** `tb_weight_cache`, `tb_weight_table`, `tb_perceptron_sum`,
  `tb_perceptron_train`, `tb_bhr` and `tb_partition_selector` test the
  building blocks against reference arithmetic.
* **End-to-end test.** `tb_perceptron_bp_top` runs all five organisations at
  their full default sizes on 40,000 branches. Three loops share table lines
  under different tags, so both weight-caching organisations must swap
  perceptrons with their caches. Every organisation must end below 10 %
  mispredictions and do better than in its first quarter. Every cache event,
  idle gaps and back-to-back branches must have occurred.
* **Other configurations.** `tb_design_space` runs five configurations away
  from the defaults on a similar stream:
  * a 1K-line pseudotag table
  * 24-bit-history partitioning with 16 partitions of 128 lines
  * 24-bit-history partitioning with 32 partitions of 1K lines
  * a 128-line × 8-input weight table with a 2048-set, 2-way cache
  * a 128-line × 24-input weight table with a 4096-set, direct-mapped cache
    that answers in 10 cycles

  Each configuration must learn the stream, and both caches must refill the
  table.

To simulate, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/perceptron_pkg.sv \
    tb/tb_perceptron_bp_top.sv --top-module tb_perceptron_bp_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The package must be listed
first; `-y rtl` finds the other modules.
