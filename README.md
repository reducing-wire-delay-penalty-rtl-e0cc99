# A clustered out-of-order core that uses value prediction to avoid inter-cluster wires

Splitting a wide out-of-order core into clusters keeps each issue queue,
register file and bypass network small and fast. The price is that a value
produced in one cluster and needed in another has to cross long wires: the
consumer waits for an explicit copy and for the wire latency. This design
attacks that cost with value prediction. When the predictor is confident
about a source operand that lives in another cluster, the consumer does not
wait for the value. It starts with the predicted value, and a small
*verification-copy* runs in the producing cluster. That operation compares
the real value with the prediction and uses the wires only when they differ.
The steering logic knows about this. Once the workload gets unbalanced, it
treats a confidently predicted operand as if it were present in every
cluster, which frees it to send the instruction wherever there is spare
capacity. This steering policy is called VPB here (value-prediction-based
steering).

The RTL models the integer core of a 4-cluster, 8-wide machine. It has 56
physical registers, a 16-entry issue queue and two integer units per cluster.
The reorder buffer has 128 entries, the stride value predictor has 128K
entries, and a value takes one cycle to cross between clusters.

## Pipeline at a glance

```
decoded group (8) --> value predictor lookup --+
                                               v
                         rename / steer (map table, DCOUNT, VPB rules)
                          |  ops per cluster       |  ROB entries
                          v                        v
    +---------+  +---------+  +---------+  +---------+     +-----+
    |cluster 0|  |cluster 1|  |cluster 2|  |cluster 3| --> | ROB | --> commit:
    +---------+  +---------+  +---------+  +---------+     +-----+     free registers,
         \___________ inter-cluster network (B paths per  _/           train predictor
                      destination, LAT cycles)
```

| Module | Role |
|---|---|
| `vpc_pkg` | sizes, instruction and message structs, ALU function |
| `clustered_core` | top level; wires everything below |
| `stride_vp` | stride value predictor, one entry per (PC, operand) |
| `rename_steer` / `rename_slot` | map table, per-instruction steering and renaming, copy generation |
| `steer_select` | the steering rules for one instruction |
| `dcount` | per-cluster workload counters |
| `free_list` | free physical registers of one cluster |
| `cluster` | issue queue, register file, ALUs, local bypass, copy execution, reissue |
| `icn` | inter-cluster network |
| `rob` | reorder buffer with generation-checked completion |
| `nready_monitor` | measured workload imbalance (statistics only) |

The front end is not part of the RTL. That covers fetch, branch prediction
and the caches. The core takes groups of up to eight already-decoded
instructions (`in_v`/`in_ins`) and says which ones it took with `in_acc`,
which is always a prefix of the group. The instruction set is a small integer
one: 32 logical 64-bit registers and ADD, SUB, AND, OR, XOR, ADDI and LI.

## Renaming across clusters

The map table holds, for every logical register, one field per cluster. Each
field is a valid bit and a physical register. The table also records the
*home* cluster, which is the one whose register receives the value from the
producing instruction. Values are not broadcast to every cluster. A register
only gets a copy in another cluster when an instruction steered there needs
it:

* The destination gets a new register in the chosen cluster. It replaces the
  whole map entry. The old entry goes into the reorder buffer, and all of its
  registers (the original and every copy) go back to their free lists when
  the instruction commits.
* A source that is mapped in the chosen cluster is read there.
* A source that is not mapped there gets a new register in the chosen
  cluster, and the map entry gains that field. One extra operation goes to
  the home cluster:
  * a **copy**, which reads the register and sends it over the network; or,
    if the predictor is confident,
  * a **verification-copy**, which carries the predicted value. The new
    register is preloaded with the prediction at dispatch, so the consumer
    can issue immediately.

Copies and verification-copies are real operations. Each one takes an issue
queue entry, an issue slot and a reorder-buffer entry, and counts towards the
workload balance like an instruction. A copy must also win a network path
before it can issue.

If a local source is not ready yet but is confidently predicted, the consumer
also gets the predicted value attached (a local prediction). The producer's
own result later checks it.

## Steering

Every instruction is steered while the group is renamed. Each of the eight
slots sees the map table and counters as the earlier slots left them, so
dependences inside a group are handled.

Workload is measured with **DCOUNT**. Each cluster has a signed counter. An
operation sent to cluster c adds N-1 to counter c and subtracts 1 from each
of the others. The counters therefore always sum to zero, and each one is N
times that cluster's surplus over the average. The imbalance is the largest
absolute counter value. The rules, in order:

1. If the imbalance is above 32, use the least loaded cluster.
2. Otherwise, find the clusters that cost the least communication:
   * If a source is not yet available (and not confidently predicted), use
     the cluster that will produce it.
   * Otherwise, use the clusters where the most sources are already mapped.
     **VPB:** while the imbalance is above 16, a confidently predicted source
     counts as mapped in every cluster.
   * With no sources, every cluster is a candidate.
3. Among the candidates, take the one with the smallest counter. Ties go to
   the lowest index.

Without the relaxation, value prediction tends to pile dependent work into
one cluster. With it, a predicted operand stops tying the instruction to the
producer's cluster once balance matters. The threshold keeps the relaxation
off when the machine is already balanced. It pays off there because a wrong
prediction for an operand that was sent remotely costs a network transfer
and a reissue.

A second measure, **NREADY**, is computed for reporting only. In each cycle
it counts the ready instructions that cannot issue because their cluster's
units are busy while another cluster has idle units. It equals the smaller
of the total excess and the total idle slots.

## Value speculation and selective reissue

This is the least obvious part of the RTL. A value can be wrong in three
places:

* a local prediction attached at dispatch;
* a register preloaded for a verification-copy;
* a value already computed from one of these two.

A wrong value is corrected as follows.

* **Operands keep watching their tags.** The issue queue captures data: each
  operand holds its value. An entry stays in the queue after it issues and
  is freed only when its reorder-buffer entry commits. For as long as it is
  there, each operand compares every broadcast on its register tag with the
  value it holds. Broadcasts come from local results and from network
  deliveries.
* **A different value means reissue.** The new value replaces the old one.
  If the operation had already issued, it becomes ready again and issues
  once more. Its own result is then broadcast again, so exactly the
  operations that consumed a wrong value re-execute, and nothing else does.
  A correct prediction costs nothing: the broadcast matches and nothing
  happens.
* **Verification-copies.** A verification-copy issues when its local source
  is ready. If the source equals the carried prediction, it reports done and
  sends nothing. If it differs, it asks for a network path and sends the
  real value. The arrival overwrites the preloaded register in the consumer
  cluster and triggers the reissue there. A verification-copy that has
  already sent once sends again whenever its source changes.
* **Completion is tagged with a generation.** Whenever an entry is marked to
  reissue, it raises an *undone* request for its reorder-buffer entry and
  increments a 3-bit generation number kept in both the queue entry and the
  reorder buffer. Every done report carries the generation of the issue that
  produced it. The reorder buffer ignores a report whose generation is no
  longer current. This is what prevents a result that is already in flight
  (for example a copy crossing the network) from marking a re-executing
  operation complete too early. An undone request takes priority over a done
  report for the same entry in the same cycle.

Commit therefore sees only results computed from correct values. At commit
the cluster hands the reorder buffer the final operand values of each
committing instruction, and these values train the predictor.

## The stride predictor

Each entry, indexed by PC and operand number, holds the following:

* the last value;
* the stride;
* a 2-bit confidence counter (a prediction is confident when the counter is
  above 1);
* the last committed value;
* a count of instances in flight.

The prediction is the last value plus the stride. The table is updated when
instructions are decoded. The real value, however, only becomes known later,
so the update is split in two:

* **At decode**, every accepted lookup advances the speculative last value
  by one stride and counts one more instance in flight. Several lookups of
  the same entry in one group get last+1·stride, last+2·stride and so on, in
  program order. This keeps loop induction variables predictable even with
  many iterations in flight.
* **At commit**, the true value is compared with the last committed value
  plus the stride.
  * On a hit, the counter goes up and the speculative value is left as it
    is.
  * On a miss, the counter goes down and the stride becomes the difference.
    The speculative value is then rebuilt as value + (instances still in
    flight) × stride.

All updates of one cycle are applied in sequence in a single combinational
chain, commits first.

## Inter-cluster network and timing

Each destination cluster has B buses (default 1), and each bus feeds one
register-file write port. Any cluster may drive any bus. Every cycle each
cluster offers up to two messages to the network. A round-robin arbiter per
destination grants up to B of them, and only granted copies issue. This means
path reservation is part of the issue decision.

A value leaves in the cycle its copy executes (t). It is written and
broadcast in the destination cluster in cycle t+1+LAT. With LAT = 1, a
remote consumer can execute in t+2, one idle cycle after the copy.

Inside a cluster, an operation selected in cycle t executes in t and
broadcasts its result in t+1. A dependent operation in the same cluster can
therefore execute in t+1 (back-to-back).

## How this departs from the original proposal

* Only single-cycle integer ALU operations are modelled. The original
  machine has the following, none of which exists here:
  * loads and stores with a memory hierarchy;
  * branches with a combined branch predictor;
  * a multiply/divide unit per cluster;
  * FP queues, registers and units.

  As a result, none of the media benchmarks used to evaluate the original
  machine can run on this core.
* The rename/steer stage takes one cycle and there is no branch recovery.
* A prediction is checked by the consumer's operands, which compare the
  producer's result broadcast with the value they hold. A mismatch makes the
  consumer issue again in the cycle of that broadcast, so the check adds no
  cycle of its own. The original budgets one cycle for verification during
  the producer's writeback and no further penalty for a restart.
* The split decode/commit update of the predictor, the generation-checked
  completion protocol, the data-capture queue that keeps entries until
  commit, the preloading of the register behind a verification-copy and the
  round-robin network arbitration are choices made here. The original
  describes the behaviour (update at decode, selective reissue, compare and
  forward only on mismatch) but not these mechanisms.
* The default network has one path per destination (B = 1), the
  cost-effective arrangement. Setting B = 6 makes the network never limit
  transfers (three other clusters each offering two values).
* After reset, logical register r lives in cluster r mod 4 as physical
  register r/4 and holds zero.

## Parameters

The top module `clustered_core` has these parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 8 | decode/rename/commit width |
| `IQN` | 16 | issue queue entries per cluster |
| `ISSUE_W` | 2 | issue slots per cluster |
| `LAT` | 1 | network latency in cycles |
| `B` | 1 | network paths per destination |
| `VP_ENTRIES` | 131072 | predictor entries |
| `T_BAL` | 32 | imbalance threshold of rule 1 |
| `T_VPB` | 16 | imbalance threshold of the VPB relaxation |

Setting `T_VPB` above any reachable imbalance gives plain steering without
VPB. The number of clusters (4), registers per cluster (56) and reorder
buffer size (128) are constants in `vpc_pkg`. The steering logic is written
for four clusters.

## Verification

Each module has a self-checking testbench in `tb/`. All of them end by
printing a line of the form `TB_RESULT checks=N failures=M`.

* `tb_stride_vp` works through a training sequence by hand. It covers the
  confidence threshold, group lookups, speculative advance and repair after
  a miss.
* `tb_dcount`, `tb_steer_select`, `tb_free_list`, `tb_nready_monitor`,
  `tb_rob` and `tb_icn` check thousands of random cycles against reference
  models written in the testbench. These include generation-stale done
  reports, undone requests, the exact delivery cycle and round-robin
  fairness.
* `tb_cluster` checks the following with exact cycle counts where timing
  matters:
  * back-to-back local bypass;
  * a copy waiting for its grant;
  * verification-copies with right and wrong predictions;
  * a wrong local prediction that makes two dependent operations reissue
    with a new generation;
  * a correct prediction that causes nothing;
  * preload capture;
  * commit.
* `tb_rename_steer` checks every steering rule, copy and verification-copy
  generation, the map update, dependences inside a group and resource
  stalls.
* `tb_clustered_core` runs the full-size core with all defaults. It
  generates a 1200-instruction program containing the following:
  * strided induction variables;
  * values that wrap around, so confident predictions fail;
  * random operations;
  * a long serial chain.

  It checks all 32 registers against a sequential model and that every
  committed operation is accounted for. It also requires each mechanism to
  occur at least once. A typical run takes about 640 cycles (IPC about 1.9)
  with roughly 240 copies, 460 verification-copies, 250 local predictions,
  250 reissues, 50 balance-rule and about 700 VPB decisions, and stalls when
  queues fill.

* `tb_sensitivity` runs the same program on two further configurations and
  checks the results the same way: inter-cluster latency 4 (about 790
  cycles, IPC 1.5) and a network that never limits transfers (B = 6, about
  625 cycles against about 640 with B = 1).

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/vpc_pkg.sv rtl/*.sv tb/tb_clustered_core.sv \
          --top-module tb_clustered_core -Mdir obj -o sim
./obj/sim
```

Use the same command for any other testbench, changing the file and top
name. The full-size core takes under a minute to build and a fraction of a
second to run.

Synthesis needs care. The 128K-entry predictor with 16 lookup and 32 update
ports dominates the design. Its valid and touched bits are flip-flop vectors,
because they must clear at reset. Expect synthesis of the top level to take
a long time at the default size. The same code synthesizes quickly with a
smaller `VP_ENTRIES`.
