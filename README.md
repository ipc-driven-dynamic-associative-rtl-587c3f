# IPC-driven dynamic associative L1 data cache

A set-associative cache normally reads all of its ways for every access, so a
4-way cache switches the word lines, bit lines and sense amplifiers of four
ways even though at most one of them holds the data. This design reads only
one or two ways at a time, in a fixed order, and chooses that order from the
instruction-level parallelism around each load or store.

The idea: the issue stage of a 4-wide superscalar core already knows how many
instructions it selects in each cycle. A load/store selected together with
k-1 other instructions is an "IPC-k" access. Loads from busy (high-IPC) program
regions and loads from quiet regions tend to use different working sets, so
each class gets its own probe order ("access schedule") and, crucially, a
missing line is placed where the first probe of its class looks. Working sets
of different classes then end up in different ways, most accesses hit in
their first probe, and that probe switches one or two ways instead of four.

The cache here is the one of the main configuration: 32 KB, 4 ways, 16-byte
lines (512 sets), behind a 32-entry load/store queue of a 4-issue core.

## The access schedules

Each IPC class has up to three way masks, probed in successive cycles:

| IPC class | probe I      | probe II     | probe III    |
|-----------|--------------|--------------|--------------|
| 1         | way 0        | way 1        | ways 2 and 3 |
| 2         | ways 0 and 1 | ways 2 and 3 | -            |
| 3         | ways 2 and 3 | ways 0 and 1 | -            |
| 4         | ways 2 and 3 | ways 0 and 1 | -            |

Probes never exceed two ways: the measurements behind this design found that
conflicting accesses almost always need 2-way associativity, rarely more.
Every row covers all four ways, so a line that is in the cache is always found
by the end of the schedule, whichever class placed it. A miss after the last
probe is an L1 miss.

These rows are the reset contents of `access_schedule_table`. The table can be
rewritten at run time through the `sched_wr_*` port (for example per process,
from a table prepared by the compiler), and a row of `0` masks in cycle III
simply ends the schedule after two probes, which is how all classes can be
limited to two-cycle access. **Rule for whoever writes the table:** each row
must still cover all four ways. Nothing in hardware checks this; a row that
skips a way can miss a resident line and fetch a second copy of it.

## How one access proceeds

```
cycle 0   request accepted (req_valid && req_ready); the row of its class is
          read from the schedule table into the selected way mask register
cycle 1   probe I:   way_en = head mask; the register shifts
cycle 2   compare tags of probe I; hit  -> completion registered
                                   miss -> probe II enabled in this same cycle
cycle 3   resp_valid (hit in probe I)   | compare probe II ...
```

* `way_mask_register` holds the three masks. Its head drives the way enables;
  every probe shifts the next mask to the head, and an empty head means the
  schedule is used up.
* `cache_way` (one per way) reads its tag, valid bit and line only when its
  enable is set, one cycle after the enable, and compares the tag. A way that
  was not probed cannot report a hit.
* The next probe's enables are gated by the miss of the previous probe, so no
  way is switched after a hit. The price is a path from the tag comparators
  to the way enables inside one cycle.
* A hit in probe n completes n + 2 cycles after acceptance: 3 cycles for a
  first-probe hit (the access latency assumed for the conventional cache of
  the same core), 4 and 5 cycles for second- and third-probe hits.
* On a miss the controller reads the line from L2, writes it with its tag into
  **a way of the class's probe-I mask** (way 0 for IPC-1, way 0 or 1 for
  IPC-2, way 2 or 3 for IPC-3 and IPC-4), and completes the load from the
  line. Between two candidate ways an invalid one is taken first; otherwise
  they are used in turn, steered by a 2-bit counter of fills. There is no
  other replacement policy: which ways a line may go to is fixed by its
  class.
* Stores are write-through with write-allocate. A store hit writes its bytes
  into the hitting way, a store miss merges its bytes into the fetched line
  before the fill; in both cases the word is also sent to L2 before the store
  completes. L1 lines are therefore never dirty and an eviction is just an
  overwrite.

The cache handles one access at a time (blocking). The completion carries the
load data, the id given with the request, whether it hit in L1 and how many
probe cycles it used.

## Classification and the load/store queue

`ipc_classifier` sits on the select grants of the issue stage: it counts the
granted slots (k, 1 to 4) and tags every granted load/store with class k
(encoded as k-1 in two bits). The tag stays with the operation through `lsq`
to the cache. The queue is a 32-entry circular buffer that accepts a whole
issue group (up to four operations, in slot order) per cycle and hands them
to the cache oldest first. It has no address disambiguation and no
store-to-load forwarding; those belong to the core and are not part of this
design. `issue_ready` is high while four entries are free; the core must not
grant load/stores while it is low.

## Classification consistency monitor

The scheme works only if a load that recurs is given the same class again,
since its class decides both where its line is placed and where it is looked
for. `ipc_consistency_monitor` watches the accesses entering the cache and
keeps the last 1024 line addresses seen, with their class, first in first
out. Each access that finds its line there counts as reclassified the same
(`mon_same`) or differently (`mon_diff`), and updates the stored class; one
that does not creates an entry (`mon_new`). The search is one fully
associative compare; results reach the counters two cycles after the access.
The design measured this (about two thirds of recurring loads kept their
class) in simulation; here it is a hardware monitor, and identifying a load
by its line address is this design's choice.

## Top level: `ipc_dcache_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `sel_valid[3:0]`, `sel_is_mem[3:0]` | in | select grants of this cycle, and which granted slots are load/stores |
| `sel_op[4]` (`issue_op_t`) | in | address, store data, byte enables, store flag, 6-bit id per slot |
| `issue_ready` | out | the queue can take a full issue group |
| `issue_count`, `lsq_count` | out | issue IPC of this cycle, queue occupancy |
| `resp_valid`, `resp_ready`, `resp` (`mem_resp_t`) | out/in/out | completions, in queue order |
| `sched_wr_en`, `sched_wr_class`, `sched_wr` | in | rewrite one schedule row (`sched_wr[0]` is the probe-I mask) |
| `way_en[3:0]`, `way_we` | out | which way arrays are active this cycle, and whether they are written |
| `mon_clear`, `mon_same`, `mon_diff`, `mon_new` | in/out | clear and read the consistency counters |
| `l2_req_valid`, `l2_req_ready`, `l2_req` (`l2_req_t`) | out/in/out | line reads (line-aligned address) and write-through word writes |
| `l2_resp_valid`, `l2_resp_line[127:0]` | in | the line of a read, one-cycle pulse |

The types are in `rtl/dac_pkg.sv`. The core and the L2 cache are outside this
design. Parameters: `SETS` (512), `LSQ_DEPTH` (32) and `MON_ENTRIES` (1024). Issue width, number of
ways, schedule depth and line size are constants of the package.

Module hierarchy:

```
ipc_dcache_top
  ipc_classifier
  lsq
  dyn_assoc_dcache
    access_schedule_table
    seq_access_ctrl
      way_mask_register
    cache_way x4
  ipc_consistency_monitor
```

## Energy accounting

The saving comes from the number of way arrays switched, so the design brings
out `way_en`: counting its set bits in cycles with `way_we` low gives the way
activations of all lookups. Per access, with `E_dec` the decoder energy,
`E_arr` the word-line, bit-line and comparison energy of one way and `E_cons`
the constant output-side energy, the design's model is

* conventional cache: `E = E_dec + 4 * E_arr + E_cons` (tag and data arrays each)
* this cache, hit in probe n: `E = n * E_dec + (ways probed) * E_arr + E_cons`

so an IPC-1 first-probe hit costs one way, an IPC-2..4 first-probe hit two,
and a third-probe IPC-1 hit four ways plus three decoder uses. The response
field `probes` gives n. The end-to-end testbench prints the average way
activations and decoder uses per access of its traffic.

The study this design comes from reported, for SPEC2000 programs on a 4-issue
core, an average 28.6% saving of L1 data cache energy at about 2% lower IPC.
Those figures come from architectural simulation and are not reproduced by
this RTL.

## Choices made here

What follows the design: the classification rule, the schedule table and its
reset contents, the shifting way mask register, sequential probing of only the
scheduled ways, placement into the ways of a class's first probe, the 32 KB / 4-way /
16-byte-line geometry and the 32-entry queue.

What this RTL chose where the design says nothing:

* 32-bit byte addresses and 32-bit load/store words with byte enables (the
  evaluated core is a 64-bit Alpha), 6-bit request ids.
* Write-through, write-allocate stores and a blocking cache, one access at a
  time.
* Synchronous-read arrays and the resulting latency of n + 2 cycles.
* The choice between the two ways of a two-way probe-I mask (invalid first,
  then in turn). The design only says a missing line goes where the first
  probe of its class looks; always taking the lower way would leave ways 1
  and 3 empty under the default schedules, although second-probe hits of
  IPC-1 accesses in way 1 are part of the design's energy accounting.
* Valid/ready handshakes everywhere, synchronous active-low reset; valid bits
  are reset, tag and data arrays are not.
* The load/store queue is a plain in-order FIFO.
* The consistency monitor is a hardware version of a measurement; it keys
  loads by line address and replaces its entries first in first out.
* The schedule overview example of the design names "ways 0 & 2" for a
  `[(0,1);(2,3)]` schedule; the table and its notation say ways 0 and 1, which
  is what is built.

Not built: classes generated by the compiler and checked in the queue (the
design mentions them as an option; here classes always come from the issue
stage), and the profiling used to choose the default schedules.

Not modelled: the circuit level of the arrays (decoders, partitioned word
lines, sense amplifiers), the access-time reduction of switching fewer ways,
the L2 cache and memory, and the core.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. They share `tb/dac_ref_pkg.sv`, an
independent model of the cache (memory contents, tags per way, probes per
access under the schedule), and `tb/l2_model.sv`, a behavioural L2 that
answers line reads after 6 cycles and randomly stalls its request handshake.

| testbench | what it checks |
|-----------|----------------|
| `tb_ipc_classifier` | all 256 grant/load-store combinations |
| `tb_way_mask_register` | load, hold, shift order, empty detection, load over shift |
| `tb_access_schedule_table` | reset rows against the schedule table above, random rewrites, reset again |
| `tb_cache_way` | refills, byte writes, probes with hit, line and valid bit, no hit unprobed, reset invalidation (32 sets) |
| `tb_lsq` | ordering of multi-operation groups, ready rule, full-queue stall |
| `tb_seq_access_ctrl` | exact way enables of every probe, placement way, L2 requests, latency; ways modelled in the testbench |
| `tb_dyn_assoc_dcache` | random loads/stores on 16 sets against the model: data, hit, probes, way activations, exact hit latency, schedule rewrite |
| `tb_ipc_consistency_monitor` | same/different/new counts against a model, eviction from a 16-entry buffer, back-to-back accesses, clear |
| `tb_ipc_workload` | full size, traffic shaped like the design's measurements: the same class mix, a working set per class, 84% of accesses staying in their class's set; checked as below, and must show first-probe hits dominating and fewer way activations than a 4-way lookup |
| `tb_ipc_dcache_top` | full size, 20,000 operations with a 5/15/20/60% IPC-1..4 mix; every completion against the model, way activations, L2 traffic and the monitor's total; requires hits in probes 1, 2 and 3, misses, stores, a full queue, completion and L2 back-pressure and a schedule rewrite to occur |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dac_pkg.sv tb/dac_ref_pkg.sv tb/tb_ipc_dcache_top.sv --top-module tb_ipc_dcache_top
./obj_dir/Vtb_ipc_dcache_top
```

(`tb/dac_ref_pkg.sv` is only needed by the testbenches that import it.) The
end-to-end testbenches run at the default parameters in about a second.

With the shaped traffic of `tb_ipc_workload`, about 85% of accesses hit in
their first probe and an access switches on average 2.3 way arrays and 1.16
decoder uses, against 4 and 1 for a conventional lookup; under the uniformly
random classes of `tb_ipc_dcache_top`, where a line's class is not stable,
the figures are 3.3 and 1.7. The saving depends on how stable the classes
of a program's accesses are.
