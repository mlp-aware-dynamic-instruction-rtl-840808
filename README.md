# A dynamically resized instruction window for ILP and MLP

An out-of-order core hides memory latency best with a very large instruction window: with
hundreds of instructions in flight, several loads that miss the last-level cache (LLC)
can be outstanding at once, and their latencies overlap (memory-level parallelism,
MLP). The cost is that a window that large no longer fits in one clock cycle. It has to
be pipelined, and a pipelined issue queue cannot issue a dependent instruction in the
cycle after its producer. Compute-bound code, which lives on instruction-level
parallelism (ILP), then runs slower than it would with a small, unpipelined window.

This design keeps both. The issue queue (IQ), reorder buffer (ROB) and load/store queue
(LSQ) are built at four times the size of a conventional 4-wide core. At run time they
are used at one of three **levels**:

| level | IQ entries | ROB entries | LSQ entries | pipeline depth |
|------:|-----------:|------------:|------------:|---------------:|
| 1     | 64         | 128         | 64          | 1              |
| 2     | 160        | 320         | 160         | 2              |
| 3     | 256        | 512         | 256         | 2              |

Level 1 is the small, fast window of the base core. Levels 2 and 3 trade a one-cycle
bubble between dependent instructions for a much deeper window. A small controller
decides which level to use by predicting whether MLP is available.

## Predicting MLP and choosing the level (`resize_ctrl`)

LLC misses come in clusters. The controller therefore treats one LLC miss as a sign that
more misses will follow, and that a bigger window will find them:

* **On an LLC miss** the level goes up by one (it stays at 3 if it is already there), and
  a counter of cycles since the last miss restarts.
* **When a full memory latency passes without a miss** (`MEM_LATENCY` = 300 cycles,
  the minimum main-memory latency), MLP is predicted to be gone and the window should
  shrink by one level.

A shrink is not always possible at once. It switches off the top of each resource, and
live instructions may still sit there. The controller asks the three resources whether
they are *shrinkable* (`shrink_ok`). If they are, the level drops at the next clock edge.
If not, the controller raises `alloc_stall`. Dispatch then stops, so the resources drain,
and the level drops in the first cycle in which all three are shrinkable. An LLC miss
during that wait cancels the shrink and raises the level instead. After a drop the
counter restarts, so a level-3 window returns to level 1 over two quiet memory
latencies.

`alloc_stall` depends only on registers. It is therefore already high in the cycle in
which `lvl_down` fires, and nothing can be allocated into the part being switched off.

## What the pipelined levels cost

* **Issue queue.** At depth 1 the tag of a selected one-cycle instruction is broadcast
  in the same cycle, so its dependent is selected in the next cycle (back-to-back). At
  depth 2 the tag goes through one register first, so the dependent issues two cycles
  after its producer. Results of variable-latency units (loads) wake dependents through
  the external wakeup port at the time they return. The delayed tags are kept across a
  level change, so no wakeup is lost.
* **Reorder buffer.** At depth 2 the commit stage sees an entry's done bit one cycle late.
  Every commit moves one cycle later, and so does the flush after a mispredicted branch:
  this is the extra misprediction penalty of the pipelined levels.
* **Load/store queue.** At depth 2 the associative search takes two cycles: a load
  leaves the queue two cycles after it is picked instead of one.

## Resizing circular buffers (`ring_ctrl`)

The IQ is a set of unordered slots. Growing it only lets more slots be allocated, and it
is shrinkable when no valid entry sits at or above the next lower size. Allocation fills
the lowest free slots first, which helps the queue become shrinkable.

The ROB and LSQ are circular buffers in program order, and their entries at level L live
in physical positions `[0, size(L))`. Resizing them while entries are live needs care:

* **Growing** is always allowed. If the live region does not wrap, the tail simply runs
  on into the new entries. If it wraps, the head must still wrap where the tail wrapped.
  `head_limit` remembers that point and the `wrap` flag marks a wrapped region. The
  new entries become usable once the head has wrapped.
  Consequence: if the ROB is already full and wrapped when the LLC miss arrives, the
  larger ROB helps only after the instructions up to the physical end have committed.
* **Shrinking** is allowed when the buffer is empty, or when the live region does not
  wrap and ends at or below the lower size. On a shrink, an empty buffer restarts at 0,
  and a tail that sits exactly at the new end wraps to 0.

`alloc_n`, `retire_n` and `shrink` all act at the same clock edge. `free_n`, `count` and
`shrink_ok` are combinational.

## The window as a block (`diw_window`)

`diw_window` connects the controller and the three resources. It talks to the rest of a
P6-style core: results are named by their ROB index, so the renamer must learn the
index of each new instruction (`disp_rob_idx`). Every port is synchronous to `clk`.

| group | signals | notes |
|---|---|---|
| dispatch | `disp_valid[4]`, `disp_uop[4]`, `disp_ready`, `disp_rob_idx[4]` | a prefix of up to 4 per cycle. A group is accepted only when every resource has room for 4 and no shrink or flush is pending. `srcN_wait` means "the producer was dispatched and has not committed"; the window clears it if the producer has already completed, and it checks same-group producers itself. |
| issue | `iss_valid[4]`, `iss_uop[4]` | up to 4 per cycle, lowest IQ slot first; carries ROB and LSQ index |
| completion | `cp_valid[6]`, `cp_idx[6]`, `cp_mispred[6]` | marks ROB entries done and wakes dependents |
| addresses | `agu_valid[4]`, `agu_idx[4]`, `agu_addr[4]`, `agu_data[4]` | address (and store data) of issued memory instructions |
| loads | `ld_res_valid[2]`, `ld_res[2]` | picked loads: `fwd` = data forwarded from an older store, otherwise read the data cache |
| commit | `commit_valid[4]`, `commit_idx[4]`, `commit_payload[4]`, `st_commit_*[4]`, `flush` | in order; stores write the cache at commit; `flush` empties the whole window after a mispredicted branch commits |
| resizing | `llc_miss` in; `level`, `alloc_stall`, `lvl_up`, `lvl_down`, occupancy counts out | |

The LSQ does not speculate on memory dependences. A load waits until every older store
knows its address. The two oldest such loads are then picked per cycle (one per data-cache
port), and the youngest older store to the same word address forwards its data.

## Files

| file | contents |
|---|---|
| `rtl/diw_pkg.sv` | level type, size/depth table functions, widths, instruction structs |
| `rtl/resize_ctrl.sv` | MLP predictor and level controller |
| `rtl/ring_ctrl.sv` | head/tail/wrap bookkeeping of a resizable circular buffer |
| `rtl/issue_queue.sv` | resizable IQ with a 1- or 2-stage wakeup-select loop |
| `rtl/reorder_buffer.sv` | resizable ROB, in-order commit, misprediction flush |
| `rtl/load_store_queue.sv` | resizable LSQ, forwarding, 1- or 2-stage search |
| `rtl/diw_window.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_diw_workloads` |

The parameter defaults are the full sizes of the table above.

## Simulating

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each runs with plain
Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/diw_pkg.sv tb/tb_diw_window.sv --top-module tb_diw_window
./obj_dir/Vtb_diw_window
```

* `tb_resize_ctrl`: level steps, the decrease exactly 300 cycles after the last miss,
  the stall while not shrinkable, a miss cancelling a shrink, and 20 000 random cycles
  against a reference model.
* `tb_issue_queue`: the back-to-back/bubble timing at each level, capacities, the
  external wakeup, and random dependent streams. Each instruction must issue exactly once
  and never before its sources' wakeups.
* `tb_reorder_buffer`: commit order and commit latency per level, flush on
  misprediction, capacities, growth with and without a wrapped region, and random shrinks
  against a reference model.
* `tb_load_store_queue`: which loads are picked, forwarding data, result latency per
  level, committed stores, flushes and shrinks, against a reference model.
* `tb_diw_window`: the whole window at full size inside a behavioural 4-wide core.
  12 000 instructions run in three phases: compute, memory-bound with frequent LLC misses
  (314-cycle loads), and compute again. The test checks commit order, load values and
  issue timing. It also requires every mechanism to occur at least once: level up,
  level 3, level down, allocation stall, a held-back shrink, forwarding, misprediction
  flush, a full window, back-to-back issue and the depth-2 bubble. It takes about 15 s.
* `tb_diw_workloads`: the same core and checks on three separate 6000-instruction
  programs. A compute-bound one (no LLC misses, average load latency about 5 cycles) must
  stay at level 1 and issue back-to-back. Two memory-bound ones (10% and 40% of cache
  loads miss the LLC, average load latency 35 and 133 cycles) must reach level 3 and
  spend most of their cycles above level 1. Throughput and latency are printed per program.

## Where this design goes beyond the description it follows

The sizes, depths, issue width, memory latency, data-cache port count and the
prediction/resizing algorithm are taken from the design being implemented. These choices
are this implementation's own:

* one level per step, both up and down, with the miss counter restarting after each
  decrease;
* where the extra pipeline stage sits in each resource (the IQ's wakeup loop, the ROB's
  commit, the LSQ's search);
* the circular-buffer resizing rule, including the deferred growth of a wrapped buffer;
* IQ selection by slot position, not by age. On its own this could starve an entry, but
  the bounded ROB stops dispatch before that can last;
* conservative load/store disambiguation and commit-time store writes;
* recovery from mispredicted branches at commit, by flushing the whole window;
* port counts (6 completion ports, 2 LSQ load ports) and the 16-bit opaque payload.

Not included are the parts of the core that the window only connects to: fetch and
branch prediction, rename, execution units, the L1 caches, the 2 MB LLC, the stride
prefetcher and main memory. Their interfaces are brought out as ports of `diw_window`, and
the top-level testbench models them behaviourally. Energy and area results cannot be
reproduced at the RTL level here.
