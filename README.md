# Linear-stride RPT data prefetcher

A stride prefetcher watches each load/store instruction. It remembers the
last data address the instruction used and the distance (stride) between its
last two addresses, and fetches `last address + stride` into the data cache
before the instruction asks for it. That covers scalars, zero strides and
constant strides. It does not cover a stride that *changes by a constant
factor* on every reference. The textbook case is a binary search: the probe
moves by N/2, then N/4, then N/8, and the direction of each step depends on
the data.

This design extends a reference prediction table (RPT) prefetcher to catch
strides that halve or double. These are the only factors it handles,
because multiplying by 2 or 1/2 is a one-place shift and needs no
multiplier. When an instruction's stride is halving, the prefetcher cannot
know the sign of the next step. It therefore prefetches both candidates:
`prev_addr + |stride|/2` and `prev_addr - |stride|/2`. When the stride is
doubling it uses `|stride|*2` instead.

The scheme follows the published proposal "Some Additions to Hardware-Based
Data Prefetching". That proposal extends the basic RPT scheme of Chen et al.
The pipeline timing, table organisation, widths and interface here are
this implementation's own choices; they are listed in
[Departures and choices](#departures-and-choices).

## The table entry

There is one entry per load/store instruction (`rpt_entry_t` in `rpt_pkg`):

| field       | bits | meaning |
|-------------|------|---------|
| `valid`     | 1    | entry in use |
| `tag`       | 32   | instruction address |
| `prev_addr` | 32   | last data address referenced by this instruction |
| `stride`    | 32   | last difference of data addresses (two's complement) |
| `stimes`    | 2    | stride multiplier: `00` = 0 (none), `10` = +1 (x2), `01` = -1 (x1/2) |
| `state`     | 3    | `init`, `transient1`, `transient2`, `steady`, `no_pred` |

Compared with a basic RPT, the extension costs two `stimes` bits and one
extra state bit per entry. It also adds a shifter, two magnitude
comparators with a decoder, and an adder/subtractor pair for the second
prefetch address.

## What happens on one reference

Take an instruction at `pc` that references data address `ea`, and suppose
its entry hits:

1. **New stride** `ns = ea - prev_addr`.
2. **Ratio detection** (`stride_ratio_detector`). Two comparators test
   `|ns| == |stride| << 1` (`eq_left`) and `|ns| == |stride| >> 1`
   (`eq_right`). A decoder turns these into a candidate `stimes`:
   - only `eq_left` matches: `+1`;
   - only `eq_right` matches: `-1`;
   - otherwise: `0`.

   Magnitudes are compared because a binary search's steps alternate in sign.
3. **Was the last prediction right?** The same comparators answer this.
   - `stimes = +1`: right when `eq_left`.
   - `stimes = -1`: right when `eq_right`.
   - `stimes = 0`: right when `ns == stride`.

   So "correct" means that `ea` was one of the addresses prefetched after
   the previous reference.
4. **State update** (`rpt_state_fsm`, below) picks the next state. It also
   decides whether `stride` and `stimes` are rewritten. `prev_addr` always
   becomes `ea`.
5. **Prefetch** (`prefetch_addr_gen`) works on the *updated* entry:
   - state `no_pred`: nothing;
   - `stimes = 0`: one request, `prev_addr + stride`;
   - `stimes = +/-1`: two requests, `prev_addr + s` and `prev_addr - s`,
     where `s = |stride|` shifted one place in the `stimes` direction.

   A request whose offset is 0 is not issued, because it would fetch the
   address just used. This covers a new entry (stride 0) and a halving
   stride that has reached 1.

On a table miss, the indexed entry is replaced by a new one: tag = `pc`,
`prev_addr = ea`, `stride = 0`, `stimes = 0`, state `init`. No prefetch is
issued.

## The state machine

Each entry's state records how much the prefetcher trusts it. `transient2`
is the state this scheme adds. An entry reaches it from `transient1` when a
guess failed but the stride just halved or doubled: the pattern may be
linear rather than irregular, so the entry gets one more chance.

| state        | correct                 | incorrect |
|--------------|-------------------------|-----------|
| `init`       | `steady`                | `transient1`, stride rewritten |
| `transient1` | `steady`                | new stimes = +/-1: `transient2`; new stimes = 0: `no_pred`. Stride and stimes rewritten in both cases |
| `transient2` | `steady`                | `no_pred`, stride and stimes rewritten |
| `steady`     | `steady`                | `init`, nothing rewritten |
| `no_pred`    | `transient1`            | `no_pred`, stride and stimes rewritten |

On every correct outcome the stride is rewritten with `ns`. For a constant
stride this changes nothing, because a correct guess means `ns == stride`.
For a linear stride it is what lets the entry follow the changing stride.
`stimes` is only rewritten on the incorrect transitions marked above. An
entry that has locked onto "halving" therefore keeps halving for as long as
its guesses hit.

## Worked example

One instruction references 256, 128, 192, 160, 144, 152, 156, 154, 155 (the
shape of a binary search). The entry evolves like this:

| reference | stride | stimes | state      | prefetches |
|-----------|--------|--------|------------|------------|
| 256       | 0      | 0      | init       | - (new entry) |
| 128       | -128   | 0      | transient1 | 0 |
| 192       | 64     | -1     | transient2 | 224, 160 |
| 160       | -32    | -1     | steady     | 176, 144 |
| 144       | -16    | -1     | steady     | 152, 136 |
| 152       | 8      | -1     | steady     | 156, 148 |
| 156       | 4      | -1     | steady     | 158, 154 |
| 154       | -2     | -1     | steady     | 155, 153 |
| 155       | 1      | -1     | steady     | - (offset 0) |

Each reference from 160 on was prefetched by the reference before it.
`tb_linear_prefetcher` replays this table and checks every cell.

## Pipeline and interface

`linear_prefetcher` accepts one reference per cycle and never stalls.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset (clears all entries) |
| `ref_valid_i` | in | 1 | a memory reference this cycle |
| `ref_pc_i` | in | 32 | its instruction address |
| `ref_addr_i` | in | 32 | its data address |
| `pf_valid_o` | out | 2 | bit 0: `pf_addr_o[0]` valid (the `+` or only address); bit 1: `pf_addr_o[1]` valid (the `-` address) |
| `pf_addr_o` | out | 2 x 32 | prefetch addresses |
| `upd_valid_o`, `upd_state_o`, `upd_stimes_o`, `upd_stride_o`, `upd_correct_o`, `upd_alloc_o` | out | | the updated entry of the previous cycle's reference, for observation |

Timing:

- **Cycle 0.** The table is looked up with `ref_pc_i`, and steps 1-4 run.
  The new entry is written back at the clock edge and also captured in a
  pipeline register.
- **Cycle 1.** Step 5 runs on the registered entry. The prefetch requests
  and the `upd_*` outputs are valid for this one cycle.

A reference to the same instruction in cycle 1 already sees the entry
written at the end of cycle 0, so back-to-back references need no bypass.
There is no backpressure on the prefetch outputs: the cache side must take
a request or drop it. That is acceptable for a prefetch hint.

The order of the two steps follows the datapath. The stride comparison and
the new `stimes` come first. The stride/address update and the prefetch
adders come second.

Parameters:

- `ENTRIES` (default 64, power of two): number of table entries.
- `ADDR_W` (32, in `rpt_pkg`): width of addresses and strides.

## Files

| file | contents |
|------|----------|
| `rtl/rpt_pkg.sv` | widths, `stimes_e`, `state_e`, `rpt_entry_t`, `stride_mag()` |
| `rtl/linear_prefetcher.sv` | top: table, update step, pipeline register, prefetch step, assertions |
| `rtl/rpt_table.sv` | direct-mapped entry storage; tag = full PC, index = PC[IDX+1:2] |
| `rtl/rpt_entry_update.sv` | new stride, correctness, allocation, updated entry |
| `rtl/stride_ratio_detector.sv` | two magnitude comparators and the stimes decoder |
| `rtl/rpt_state_fsm.sv` | next-state function and field-rewrite enables |
| `rtl/stride_shifter.sv` | one-place left/right shift of the stride magnitude |
| `rtl/prefetch_addr_gen.sv` | the one or two prefetch addresses |
| `tb/rpt_model_pkg.sv` | untimed integer reference model used by the system testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two workload testbenches |

The data cache that receives the prefetches and the processor that produces
the reference stream are not part of this RTL. Their signals are the top's
ports.

## Verification

Every testbench is self-checking. It ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

- Each leaf module has a unit testbench. These compare the module against
  values computed another way: multiplication instead of shifts, a
  hand-written transition table, or a shadow copy of the table.
- `tb_linear_prefetcher` runs at the default size (64 entries). It first
  replays the worked example. It then drives 40,000 references from 16
  streams: constant, halving, doubling, scalar, random and pattern-switching
  streams. Some of the streams alias in the table, and the run includes idle
  cycles and back-to-back references. Every output is compared with
  `rpt_model_pkg`. The testbench fails if any of the following never
  happens:
  - one of the eleven state transitions;
  - an allocation or a replacement;
  - a one-address or a two-address prefetch;
  - a doubling or a halving stride.
- `tb_binary_search_workload` runs 200 binary searches for each array size
  (100, 128, 1000, 1024, 8000 and 8192 four-byte elements). It also uses
  cache block sizes of 1, 2 and 4 elements. Each search starts from reset,
  with an empty, unbounded cache model. The test prints hit rates and
  prefetch counts. With block size 1, typical hit rates are about 4% (100
  elements), 54% (128), 24% (1000), 68% (1024), 49% (8000) and 76% (8192).
  Power-of-two sizes do best because their halving is exact.
- `tb_sort_workloads` generates the reference streams of these programs:
  - bubble sort (50 elements);
  - insertion, shell, quick, merge and heap sort (100 and 200 elements);
  - a 50x50 matrix multiplication.

  It checks the prefetcher against the model on every reference and prints
  hit rates, about 99-99.98% with the unbounded cache model. Heap sort is
  where most two-address prefetches appear (index doubling).

The hit rates depend on the simple cache model in the testbenches. They
show the trend, not a calibrated cache.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/rpt_pkg.sv tb/rpt_model_pkg.sv tb/tb_linear_prefetcher.sv \
    --top-module tb_linear_prefetcher -o sim
./obj_dir/sim
```

For another testbench, swap in its file and top name. The unit testbenches
do not need `tb/rpt_model_pkg.sv`. Every run takes well under a second.

## Departures and choices

Where the scheme is silent or ambiguous, this implementation chose as
follows:

- **Ratio direction.** The written rule says that when the ratio of old to
  new stride is 2, `stimes` becomes +1. The worked example does the
  opposite: -128 followed by 64 gives `stimes = -1`. The RTL follows the
  example. A stride that halved predicts a further halving, which is the
  only reading under which the example's prefetches hit.
- **Stride rewrite on correct transitions.** The state diagram marks a
  stride update only on some correct transitions. Here the stride is
  rewritten on all of them. This is identical for constant strides and
  necessary for linear ones.
- **Zero-offset prefetches are suppressed.** This reproduces the last row of
  the worked example, where stride 1 halved to 0 issues nothing.
- **Decoder ties.** When both comparators match (both strides 0), the
  decoder gives `stimes = 0`. The right shift truncates, so `|old| = 2|new|+1`
  also counts as halving.
- **Shifter.** The scheme calls it a shift register. Here it is a
  combinational one-place shifter, used within the cycle.
- **Table organisation.** The table is direct-mapped with 64 entries, tagged
  with the full instruction address and indexed by PC bits above the byte
  offset. The indexed entry is replaced on a miss. The scheme gives no size
  or associativity.
- **Timing.** The two-step pipeline, one reference per cycle, the
  synchronous reset and the absence of a prefetch handshake are all choices
  of this design.
- **Not included.** The lookahead and correlated variants of RPT
  prefetching are not part of this design. Neither is any cache-side
  filtering of prefetches that would hit.
