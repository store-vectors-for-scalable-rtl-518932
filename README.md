# Store-vector memory dependence predictor and load scheduler

An out-of-order core wants to issue a load before every older store has computed
its address. If the load issues blindly, it sometimes reads memory before an older
store writes the same address, and the core must flush and re-fetch. The usual
cure is a memory dependence predictor that makes a load wait only for the older
stores it has collided with before. Predictors that name those stores by PC
(load-store pairs, store sets) need associative searches in the load/store queues
to find whether such a store is in flight and when it resolves.

This design avoids all associative logic. A store is named by its **age relative
to the load**, not by its PC: "the load collided with the 1st and the 4th most
recent store before it". A load's set of such ages is its *store vector*. Since
the store queue already holds stores in program order, an age turns into a store
queue entry with a rotation. The load then waits in a dependency matrix, like the
matrix schedulers used for register dependences: one row per load, one column per
store queue entry, and a store that issues clears its column with one wire.

## Data flow

```
           load PC                    store queue tail   address-unknown bits
              |                              |                  |
      +-------v--------+   vec    +----------v------+  row  +---v-----------+
      | svt            |--------->| sv_barrel_shift |------>| sv_ready_mask |
      | store vector   |          | age -> column   |       | AND, minus    |
      | table          |          +-----------------+       | issuing stores|
      +-------^--------+                                    +---+-----------+
              | set bit "age"                                   | wait row
      +-------+--------+                                +-------v-------+ st_issue
      | sv_update      |<-- violation (load, store)     | lsm           |<--------- column clears
      | age arithmetic |                                | load x store  |
      +----------------+                                | matrix, NOR   |
              ^ load PC, tail at dispatch               +-------+-------+
      +-------+--------+   candidates                           | row empty
      | load_queue     |--------------------------------------->+ AND
      +----------------+                                +-------v-------+
                                                        | load_select   |--> up to 2 loads
                                                        | oldest first  |
                                                        +---------------+
```

`store_vector_unit` is the top and wires these together.

* **Lookup (dispatch cycle).** Low PC bits of the load index the store vector
  table (SVT). The vector is rotated onto the store queue columns, ANDed with the
  per-entry "store address still unknown" bits, and written into the load's row
  of the load scheduling matrix (LSM) at the clock edge. The load is allocated a
  load queue entry in the same cycle; that entry number is also its matrix row.
* **Scheduling.** While any bit in a load's row is set, the load is not ready.
  When a store issues, it clears its whole column. A load whose row is empty,
  whose address is computed and which has not issued yet requests issue. The
  select grants up to two such loads per cycle, oldest first.
* **Update.** When the core reports that a store collided with a younger load
  that has already issued, the store's age relative to that load is computed and
  that bit is set in the load's table entry. The load and all younger loads are
  flushed from the load queue.
* **Forgetting.** Bits only ever accumulate. So the whole table is reset every
  `CLEAR_INTERVAL` cycles, or when `svt_clear_req` is raised.

## Ages, columns and the rotation

This arithmetic is the least obvious part of the design. The store queue is a
circular buffer of `STQ` entries. `tail` is the next free entry, so the most
recent store before a dispatching load sits in entry `tail-1`.

* Vector bit `a` (`a = 0` is the most recent store) belongs to store queue entry
  `(tail - 1 - a) mod STQ`. The barrel shifter computes
  `row[i] = vec[(tail - 1 - i) mod STQ]`. If the vector is drawn with bit 0 on the
  right, this is a right rotation by `tail` of the bit-reversed vector. It is built
  that way: `log2(STQ)` rotate stages, one per bit of `tail`.
* Ages that reach past the oldest store in the queue land on empty entries. Ages
  of stores that have already resolved land on entries whose address-unknown bit
  is 0. The AND removes both. Without it, the load would wait for a column clear
  that has already happened and would never issue.
* On a violation, the load queue supplies the store queue tail the load saw at
  dispatch. The offending store's age is then
  `(tail_at_dispatch - 1 - store_index) mod STQ`. Younger stores fetched after
  the load do not change it.

Example with 8-entry queues. Stores B, C and D are in entries 0, 1 and 2. Entries
3 to 6 are empty. The oldest store, A, is in entry 7, and the tail is 3. Load X's
vector is `00100101`, which means it waits for the most recent, the 3rd most
recent and the 6th most recent store. Rotated, these land on entries 2 (D), 0 (B)
and 5 (empty). D has already resolved and entry 5 is empty, so X waits only for
B. X becomes ready the cycle after B issues. A then resolves to X's address. A is
X's 4th most recent store, since `(3 - 1 - 7) mod 8 = 3`, so bit 3 is set and the
vector becomes `00101101`. `tb_sv_example` replays exactly this sequence.

## Timing

| event | when it takes effect |
|---|---|
| table lookup, rotation, mask | combinational, in the dispatch cycle (`disp_wait_vec` shows the row) |
| matrix row write, column clear | clock edge at the end of that cycle |
| load ready after its last predicted store issues | the next cycle |
| issue grant (`ld_iss_valid/idx`) | combinational, in the cycle the load is ready |
| table update after a violation | clock edge at the end of the violation cycle |
| table lookup of an entry being updated in the same cycle | returns the old vector |
| column clear in the same cycle as the row write | applied to the new row as well |
| violation cycle | dispatch refused (`disp_ready` low), no load granted |
| table reset | clock edge; an update in the same cycle lands after the reset |

## Interface of `store_vector_unit`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `disp_valid`, `disp_pc` | in | 1, `PC_W` | dispatch a load (one per cycle) |
| `disp_ready` | out | 1 | load queue not full and no flush this cycle |
| `disp_lq_idx` | out | log2 `LQ` | load queue entry / matrix row of the load |
| `disp_wait_vec` | out | `STQ` | predicted wait row written for it |
| `stq_tail` | in | log2 `STQ` | store queue tail (next free entry) |
| `stq_addr_unknown` | in | `STQ` | per entry: holds a store whose address is unknown (0 when empty) |
| `st_issue` | in | `STQ` | stores issuing this cycle; any number at once |
| `agen_valid`, `agen_lq_idx` | in | 1, log2 `LQ` | a load's address is now known |
| `ld_iss_valid`, `ld_iss_idx` | out | `LD_ISSUE_W`, `LD_ISSUE_W` x log2 `LQ` | loads granted, oldest first |
| `commit_valid` | in | 1 | retire the oldest load |
| `viol_valid`, `viol_lq_idx`, `viol_stq_idx` | in | 1, log2 `LQ`, log2 `STQ` | store `viol_stq_idx` collided with load `viol_lq_idx` |
| `svt_clear_req` | in | 1 | reset the table now |
| `svt_clear_pulse` | out | 1 | the table is reset at this edge |
| `lq_count` | out | log2 `LQ` + 1 | load queue occupancy |
| `svt_upd_valid`, `svt_upd_age` | out | 1, log2 `VLEN` | table bit being set |

The store queue itself and the address comparators that detect ordering
violations are ordinary parts of a core and are outside this unit. The unit only
sees their tail pointer, their address-unknown bits, store issue and violation
reports.

## Parameters

| parameter | default | origin |
|---|---|---|
| `LQ` | 32 | load queue size of the evaluated core |
| `STQ` | 32 | store queue size of the evaluated core; must be a power of two |
| `VLEN` | 32 | store vector length = store queue size; may be set shorter (16, 8, ... 1), and then only the `VLEN` most recent stores are tracked |
| `SVT_ENTRIES` | 512 | 2 KB table budget / 32-bit vectors; 256 and 1024 give 1 KB and 4 KB |
| `LD_ISSUE_W` | 2 | two memory ports |
| `PC_W` | 64 | 64-bit PCs |
| `PC_LSB` | 2 | 4-byte instructions: the index starts above the two zero bits |
| `CLEAR_INTERVAL` | 2^20 | own choice; the period of the table reset is a tuning knob |

The defaults are collected in `sv_pkg`. At the defaults, synthesis gives about
1.6 k word-level cells and 1676 flip-flop bits, which include the 32 x 32
matrix. The memory bits come to 18.6 k: the 512 x 32 table, plus the PCs and
tail snapshots kept in the load queue.

## Design choices beyond the algorithm

The algorithm fixes the table, the rotation, the AND, the matrix with column
clears and the age update. The following choices are this implementation's own:

* **Table reset by valid bits.** Each entry has a valid bit, and an invalid entry
  reads as zero. Resetting the table clears only the 512 valid bits, so the vector
  array can be a plain memory without reset.
* **Index.** The index is `PC[PC_LSB +: log2(SVT_ENTRIES)]`. No other hash is
  applied, and the table has no tags.
* **Same-cycle clear.** A store that issues in the cycle a load's row is written
  is masked out of that row. Otherwise the clear and the write would race.
* **Load queue.** It keeps only what the scheduler needs: valid, address known,
  issued, PC, and the store queue tail at dispatch. It handles one dispatch and
  one commit per cycle. A flush removes the violating load and everything
  younger.
* **Select.** The select is oldest-first from the load queue head, offering both
  memory ports to loads. Sharing ports with stores is left to the surrounding
  core.
* **Flush cycle.** Nothing is granted or dispatched in a violation cycle.
* **Store issue.** `st_issue` is taken to be the moment a store's address
  resolves. It clears the column, and the store queue drops the entry's
  address-unknown bit in the next cycle.

Not included: path-history (gshare-style) indexing, partial tags, and a
dynamically chosen default prediction. These are mentioned as possible
refinements of the algorithm, not as part of it.

## Files

| file | contents |
|---|---|
| `rtl/sv_pkg.sv` | default sizes |
| `rtl/svt.sv` | store vector table with periodic reset |
| `rtl/sv_barrel_shift.sv` | age-to-column rotation |
| `rtl/sv_ready_mask.sv` | AND with address-unknown bits |
| `rtl/lsm.sv` | load scheduling matrix with column clear and row NOR |
| `rtl/load_queue.sv` | load queue state, allocation, commit, flush |
| `rtl/load_select.sv` | oldest-first select of up to W loads |
| `rtl/sv_update.sv` | violation-to-age computation |
| `rtl/store_vector_unit.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sv_example` and `tb_store_vector_unit` |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if
it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_store_vector_unit \
    -y rtl -y tb +libext+.sv -Irtl rtl/sv_pkg.sv tb/tb_store_vector_unit.sv
./obj_dir/Vtb_store_vector_unit
```

Replace the top module and file name to run another testbench.

* `tb_store_vector_unit` runs the top at its default sizes against a reference
  model. The model covers a behavioural store queue, random loads and stores to
  a few addresses, address generation, commits and violation detection, and it
  recomputes every row by age arithmetic. The test runs 40 000 random cycles,
  then idles until the periodic table reset, which must come exactly
  `CLEAR_INTERVAL` cycles after the previous one. It counts each mechanism
  (predicted waits, masking, same-cycle clears, rotation wrap-around, wake-ups,
  multiple column clears, dual issue, violations with update and flush, full load
  queue, requested and periodic resets) and fails any that never happened. It
  takes a few seconds.
* `tb_sv_example` replays the 8-entry example above, including the one-cycle
  wake-up latency.
* `tb_sv_short_vector` runs the same kind of random test with 16-bit vectors on
  a 32-entry store queue, where collisions with older stores are not recorded.
* The unit testbenches check each module against an independent model: random
  and exhaustive for the combinational blocks, cycle by cycle for the
  sequential ones.

## Limits

This is the scheduling and prediction unit only. Its accuracy depends on what the
surrounding core reports. A violation must name the load that actually read
stale data, and `stq_addr_unknown` must be 0 for empty store queue entries. The
testbench model of the core is deliberately simple: one dispatch per cycle and
random addresses. It checks that the hardware is correct, not how well it
predicts.
