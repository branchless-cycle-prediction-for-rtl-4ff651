# Branchless-cycle prediction: gating the BTB in an embedded front end

A single-issue embedded core that looks up its branch target buffer (BTB) on
every fetch wastes most of those lookups: typically well under one
instruction in five is a branch, so in most fetch cycles nothing the BTB could
return is needed. The BTB is also by far the most energy-hungry part of a
small branch predictor. Branchless-cycle prediction (BLCP) adds a tiny
history-based predictor, the *BLC-filter*, that says one cycle ahead of time
"the next fetch cycle will contain no branch". In such a cycle the BTB read is
simply not performed. Because the decision is ready before the fetch cycle
starts, nothing is added to the fetch path's timing.

This RTL implements the technique as described in *Branchless Cycle
Prediction for Embedded Processors* (K. Jokar Deris, A. Baniasadi, SAC 2006):
the filter itself, plus the BTB and bimodal direction predictor of the
XScale-like core used there, wired into one branch prediction unit. The
processor around it is not part of this code; its interface is brought out
as ports.

Terms used throughout:

- **BC (branch cycle)**: a fetch cycle that fetched at least one branch.
- **BLC (branchless cycle)**: a fetch cycle that fetched no branch.
- **GHR**: global history register. It holds one bit per past fetch cycle: 1 for BC, 0 for BLC.
- **PHT**: pattern history table. It holds one saturating counter per GHR value.

## The BLC-filter

The filter has two parts:

- `blcp_ghr`: a shift register of BC/BLC outcomes.
- `blcp_pht`: a table of `2^GHR_SIZE` counters, each `CNT_W` bits wide.

The newest `GHR_SIZE` history bits are used directly as the table index, with
no hashing and no PC bits. The counter rules are:

- A BLC increments the counter of the history that preceded it. The counter stops at `SAT`.
- A BC clears that counter to zero.

So a counter is saturated only if the last `SAT` times this history was seen,
it was followed by a branchless cycle. A saturated counter predicts that the
next fetch cycle is a BLC.

With the default 3-bit history and 6-bit counters, the table has 8 entries of
6 bits. One history pattern must be followed by 63 branchless cycles in a row
before it is trusted. A single branch after it resets that trust. The filter
is therefore very conservative:

- Predicting a BLC wrongly costs performance, because a branch's target is found late.
- Missing a BLC only costs a BTB read that could have been saved.

Wider counters raise accuracy and lower coverage. Longer histories separate
patterns better, but the table doubles with each extra bit.

## Timing: predicting ahead, training at decode

This is the least obvious part of the design. Two latencies meet in it:

1. **The prediction is one cycle ahead.** `pred_blc` is a flip-flop. At the
   clock edge before fetch cycle *f*, it is loaded with "counter saturated?"
   for the newest history. During cycle *f* the BTB read enable is simply
   `fetch_valid && !pred_blc`. No table lookup lies in the fetch cycle.
2. **The outcome is only known at decode.** Whether the group fetched in cycle
   *f* held a branch is known in cycle *f + FETCH_LAT* (2 by default). That is
   when `dec_branch` arrives. In that cycle the filter does three things:
   - It shifts the outcome into the GHR. A cycle with nothing at decode counts as a BLC.
   - It updates the counter that was used to predict that group.
   - It raises `blc_miss` if the group was predicted BLC but held a branch.

The counter to update is selected by the history as it was when the group was
predicted. By the time the group reaches decode, `FETCH_LAT` newer outcomes
have been shifted in. The GHR therefore keeps `GHR_SIZE + FETCH_LAT` bits:

```
 bit:      GHR_SIZE+FETCH_LAT-1 ...  FETCH_LAT | FETCH_LAT-1 ... 0
           [ update window (fetch-time history) ][ newer outcomes  ]
                                    lookup window = newest GHR_SIZE bits
                                    of the value after this cycle's shift
```

`upd_idx` is the lookup window shifted by `FETCH_LAT` bits. This is exact
provided the filter advances once per cycle. `hold` freezes the whole filter,
so a stall does not break the relation.

The lookup at the clock edge already sees the update made at that same edge.
The table forwards the new counter value to the lookup port when both indices
match. As a result, the prediction for cycle *f+1* is based on outcomes up to
and including the group fetched in *f − FETCH_LAT*.

```
cycle        f-1              f                   f+1     f+2 (= f+FETCH_LAT)
filter       lookup, pred     pred_blc valid      ...     dec_branch of group f:
             registered       btb_access gated            shift, count, blc_miss
```

After reset all counters are zero and no cycle is predicted branchless. Under a
steady branch-free stream, the first BLC prediction appears exactly
`SAT` cycles after reset. The filter testbench checks this.

## The branch prediction unit (`blcp_bpu`)

| block | module | size (default) | role |
|---|---|---|---|
| BLC-filter | `blc_filter` (`blcp_ghr`, `blcp_pht`) | 3-bit history, 8 × 6-bit counters | gates the BTB read |
| BTB | `btb` | 128 entries, direct mapped | target of taken branches |
| direction predictor | `bimodal_predictor` | 128 × 2-bit counters | taken / not taken |

A branch is predicted taken when the BTB hits and the bimodal counter is in a
taken state. `pred_target` is the BTB's target. The bimodal table is read
every cycle. Only the BTB is gated, and when it is not read it reports no hit.

Ports of `blcp_bpu`:

- **fetch**: `fetch_valid` and `fetch_pc` come in. `pred_blc`, `btb_access`, `pred_taken` and `pred_target` go out in the same cycle. The outputs are combinational, apart from `pred_blc`.
- **decode**: `dec_branch[FETCH_W]` carries the branch flags of the group fetched `FETCH_LAT` cycles earlier. `blc_miss` goes out. When it is high, the core must find that branch's target late and lose one cycle. Recovery is left to the core.
- **resolve**: `res_valid`, `res_pc`, `res_taken` and `res_target` train the bimodal counter. For a taken branch they also write the BTB entry.
- **hold**: front-end stall. It freezes the filter.
- `clk`, and `rst_n` (asynchronous, active low).

The BTB is indexed by PC bits `[8:2]`, which assumes 4-byte instructions. It
stores the remaining upper PC bits as tag, plus a full 32-bit target. Reads
are combinational from a register array and writes take effect at the clock
edge. Only the valid bits are reset.

## Parameters

Shared defaults live in `blcp_pkg` (`DEF_*`). Every module also takes them as parameters.

| parameter | default | origin |
|---|---|---|
| `GHR_SIZE` | 3 | the configuration the original study found most efficient |
| `CNT_W` | 6 | same (6-bit counters) |
| `SAT` | `2^CNT_W − 1` | own choice: the original names a saturation value without a number |
| `FETCH_LAT` | 2 | fetch-to-decode latency of the modelled core |
| `FETCH_W` | 1 | one instruction fetched per cycle in the modelled core |
| `BTB_ENTRIES`, `BIM_ENTRIES` | 128, 128 | modelled core |
| `PC_W` | 32 | own choice |

`FETCH_W > 1` is supported by the filter: a group counts as a BC if any slot
holds a branch. The unit's BTB, however, has a single read port for one PC.

## What follows the original description and what does not

Taken from the original description:

- The BC/BLC history coding.
- Using the history directly as the table index, with `2^GHR_SIZE` counters.
- Increment on BLC, clear on BC.
- Predicting BLC on a saturated counter, one cycle ahead.
- Skipping the BTB read in predicted BLCs.
- Updating every cycle at decode, with the history shifted by the fetch latency.
- All sizes in the parameter table not marked as own choice.

Choices made here, where the description is silent:

- The registered prediction with write-through from the update to the lookup.
- Recording decode cycles with no instruction as BLC.
- The `hold` input.
- The `blc_miss` signal.
- The reset state: all cleared, so the BTB is read until the filter has trained.
- The value of `SAT`.
- The BTB's index/tag split, target width and allocate-on-taken policy.
- The bimodal index and its reset value (weakly not taken).
- Combining BTB hit and bimodal direction.

The original description does not fix the bit order of the history. Here
bit 0 is the newest outcome. Because the table is indexed by the whole
history, another bit order would only renumber the entries and would change no
behaviour.

Not included:

- The processor core, caches and TLBs of the modelled system.
- Any energy model.

The energy and slowdown results of the original study come from architectural
simulation of MiBench programs and cannot be reproduced by this RTL. The
testbenches report the quantities behind them instead: accuracy, coverage and
BTB reads saved.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
outputs every cycle with a cycle-level model kept in the testbench, and ends
with a `TB_RESULT checks=… failures=…` line.

| testbench | what it exercises |
|---|---|
| `tb_blcp_ghr` | history shifting, both index windows, stalls |
| `tb_blcp_pht` | increment/saturate/clear, write-through to the lookup |
| `tb_blc_filter` | exact training latency (`SAT` cycles), random loop-like stream with stalls, `blc_miss` |
| `tb_btb` | hits, tag conflicts, replacement, gated reads never hit |
| `tb_bimodal_predictor` | counter saturation at both ends |
| `tb_blcp_bpu` | whole unit at default sizes on a synthetic loop-nest program |
| `tb_blcp_sweep` | the 30 filter configurations of the original design-space study, side by side |

`tb_blcp_bpu` checks every output of the unit. It also requires each
mechanism to occur at least once:

- BTB reads suppressed;
- BC predicted BLC (`blc_miss`);
- BTB installs;
- taken predictions from a BTB hit;
- stalls.

A typical run prints about 98 % accuracy, 27 % coverage and 26 % of BTB
reads saved. The exact figures depend on the random seed.

`tb_blcp_sweep` runs history lengths 1–6 with 2- to 6-bit counters. It
checks each configuration against the model. It also checks that at a fixed
history length, a wider counter predicts BLC only in cycles where the next
narrower one does. That is why coverage falls as counters widen. On its
synthetic stream (about 91 % BLCs), the pattern matches the original study:

- With 2-bit counters, coverage is about 75–80 % at about 92 % accuracy.
- With 6-bit counters, accuracy is about 99 %, and coverage grows with history length from under 10 % to about 40 %.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/blcp_pkg.sv tb/tb_blcp_bpu.sv \
          --top-module tb_blcp_bpu
./obj_dir/Vtb_blcp_bpu
```

Replace `tb_blcp_bpu` with any testbench name. The package is listed
explicitly, and the modules are found in `rtl/` by name. All runs take well
under a second. The testbenches use only `$urandom`, so a different seed
gives a different stream:

```
./obj_dir/Vtb_blcp_bpu +verilator+seed+7
```

To try another filter configuration, override `GHR_SIZE`, `CNT_W` or `SAT`
on `blcp_bpu` or `blc_filter`. The testbench models read the sizes from
their own localparams, which are set from `blcp_pkg`.
