# RST: Reuse through Speculation on Traces

A processor keeps recomputing the same things. A *trace* is a dynamic run of
integer instructions (branches included). If a trace starts at the same PC and
sees the same values in the registers it reads, it writes the same values to
the registers it sets and ends at the same next PC. Trace reuse stores such
traces in a table. When fetch reaches a stored trace's first instruction with
matching register values, it writes the stored outputs at once and jumps past
the trace. Every instruction and dependence inside the trace collapses into one
step.

Plain trace reuse has one weakness: the test needs every input to be *ready*.
In a deep pipeline, the producer of an input is often still in flight when
fetch reaches the trace, so the trace is passed over. RST fixes this. If at
most two inputs are missing and the trace's confidence counter is high enough,
the unit *predicts* the missing inputs and reuses the trace speculatively.
Later, when the real values are written back, it verifies the prediction. A
wrong prediction squashes the speculative reuse.

This RTL implements the RST unit, which sits beside a superscalar core, with
three input predictors:

| `MODE`         | prediction of a missing input                                                                                                          |
|----------------|----------------------------------------------------------------------------------------------------------------------------------------|
| `RST_NVALUE`   | **default.** Last *n*-value: the values already stored in the *n* ways of the trace's set (up to 4 instances of one PC) are the predictions. |
| `RST_STRIDE`   | Also recognises traces whose inputs and outputs move by a constant stride between iterations. Such a trace is reused and predicted at *last value + stride*, so instances never seen before are covered. |
| `RST_FILTERED` | Recognises strides only to refuse predictions at PCs with strided traces. Use it to measure how much the n-value predictor gains on strided code. |

`RST_NVALUE` is the default because its results on integer benchmarks match
the stride-aware variant, and it needs no stride fields, adders or comparison
buffer.

## The four stages

The unit follows the host pipeline in four stages. None of them lies on the
core's critical path.

```
 fetch PC ──► RS1  lookup: Memo_Table_T (traces), Memo_Table_G (instructions),
                   confidence table                       [registered, 1 cycle]
              RS2  reuse test against the register state, prediction of up
                   to 2 missing inputs, candidate choice  [combinational]
 writeback ─► RS3  verify predicted inputs, squash / train confidence
 commit ────► RS4  build traces (+ stride recognition), fill both tables
```

| module              | stage | role |
|---------------------|-------|------|
| `rst_top`           | all   | wiring, RS1→RS2 register, confidence training |
| `memo_table_t`      | RS1/RS2/RS4 | trace table: 1024 entries, 4-way, true LRU |
| `memo_table_g`      | RS1/RS2/RS4 | instruction table: 2048 entries, 4-way, with its own reuse test |
| `conf_table`        | RS1/RS3 | 4096 two-bit saturating counters |
| `reuse_test`        | RS2   | trace reuse test and input prediction |
| `pred_verifier`     | RS3   | prediction tracker (8 in-flight speculative reuses) |
| `trace_builder`     | RS4   | trace construction from the commit stream |
| `stride_recognizer` | RS4   | stride detection buffer (only in the two stride modes) |
| `rst_pkg`           | –     | widths, `trace_t`, `commit_t`, `instr_t`, helper functions |

## The trace record

`rst_pkg::trace_t` is one `Memo_Table_T` entry:

| field        | bits          | meaning |
|--------------|---------------|---------|
| `pc`, `npc`  | 30 + 30       | start PC (also the tag), PC after the trace |
| `icnt`, `icr`, `icv` | 3 + 6×5 + 6×32 | input context: register ids and the values they must hold |
| `icd`        | 2×(1+3+32)    | input strides: valid, input slot, difference |
| `ocnt`, `ocr`, `ocv` | 3 + 4×5 + 4×32 | output context: registers written and their final values |
| `ocd`        | 2×(1+2+32)    | output strides |
| `bm`, `btk`  | 4 + 4         | which branch slots are used and their outcomes (for updating the branch predictor) |
| `it`         | 8             | iterations reused through strides since recognition |
| `strided`    | 1             | a stride pattern was confirmed for this trace |

The field widths (30-bit PCs, 5-bit register ids, 32-bit values) and the field
order follow the published entry format. That format leaves the counts open,
so the counts are choices made here. Six inputs and four outputs hold a
typical five-input, three-output trace. There are two stride slots, because at
most two inputs are ever predicted, and four branches per trace. All of these
are `localparam`s in `rst_pkg`.

## How a trace is built (RS4)

`trace_builder` takes one committed instruction per cycle:

* A source register that has not yet been read or written in the trace joins
  the input context, together with its current value.
* A destination register joins the output context. If it is written again, the
  slot keeps the last value.
* A branch takes the next bit of `bm` and records its direction in `btk`.
* The trace ends on any of these:
  * an instruction outside the reuse domain (`IC_OTHER`);
  * a load or store (`IC_MEM`); memory values are not reused, only the address
    calculation, which goes to `Memo_Table_G`;
  * `brk`;
  * an instruction that would overflow a context or the branch limit. The trace
    ends before that instruction, which then starts the next trace.
* Instructions join whether or not they were themselves reused.
* Traces of fewer than `MIN_LEN` = 2 instructions are dropped. Every
  reuse-domain instruction is also offered to `Memo_Table_G`.

`memo_table_t` keeps several *instances* of a PC when their input values
differ. Those instances are the n-value predictor's candidates. An insert with
the same PC and input context overwrites its old copy. Otherwise the insert
takes an invalid way, or else evicts the least recently used way.

## Reuse test and prediction (RS2)

In the cycle after the lookup, `reuse_test` checks every way of the set:

* The tag must equal the fetch PC.
* Each input register that is **ready** must hold the stored value (in
  `RST_STRIDE` mode, for a strided trace, stored value + stride).
* Inputs that are **not ready** are counted as missing.

The result:

* **0 missing**: regular reuse. A regular candidate always wins.
* **1–2 missing**: speculative reuse, when all three of these hold:
  * the confidence counter of the PC is ≥ 3;
  * the RS3 tracker has a free entry;
  * in `RST_FILTERED` mode, no strided trace of that PC is in the set.

  The missing inputs take the stored (or extrapolated) values. Each predicted
  register is reported with the tag of its in-flight producer. If several
  instances qualify, the most recently used way is taken.
* **More missing**: no reuse.

A reuse of a strided trace (`adv`) writes the extrapolated values back as the
new last values and advances `it`. The next iteration is then predicted one
stride further on.

The `ev_spec_no_conf`, `ev_spec_no_room` and `ev_spec_no_filter` outputs say
why a possible speculative reuse was refused.

## Verification and confidence (RS3)

`pred_verifier` holds, for each speculative reuse, the predicted registers,
their values and their producer tags. Writeback results (four per cycle) are
matched by tag. A wrong value resolves the entry at once: `sq_en` goes high,
with the tracker id, the trace PC and the first wrong register. When every
prediction of an entry is confirmed, `ver_ok` goes high. One entry is resolved
per cycle. `flush` clears the tracker.

The confidence counters follow the published settings:

* 4096 entries, 2 bits each, start at 1 and saturate at 3;
* a prediction is allowed at 3;
* +1 for a correct prediction, −3 (clamped at 0) for a wrong one.

Those settings do not say how a counter starting at 1 ever reaches 3. Here, a
**regular reuse also counts as a correct prediction**, because it shows that
the stored input values recur. When RS3 and RS2 both want to update a counter
in the same cycle, RS3 wins.

## Stride recognition (RS4, stride modes only)

`stride_recognizer` buffers the last created trace and compares it with the
next one. The two must have the same start PC, no branches, and the same input
and output register lists. The per-slot differences then form a *candidate*:
at least one input must change, and at most two inputs and two outputs may
change. If the next pair gives the same differences, the stride is confirmed.
The trace is then inserted with `icd`/`ocd` filled in and `strided` set.
Traces with branches never get strides. A predicted branch inside an
extrapolated trace would need extra recovery hardware.

## Interface and timing (`rst_top`)

* **Cycle *t*:** `f_en`/`f_pc` (word address) starts the RS1 lookup.
* **Cycle *t + 1*:** RS2 reads `rf_val`/`rf_rdy`/`rf_tag` (32 registers:
  value, ready flag, 7-bit producer tag). In the same cycle it drives:
  * `tr_reuse`, `tr_spec`: trace reused, and whether it was speculative;
  * `tr_ocnt`/`tr_ocr`/`tr_ocv`: the registers to write;
  * `tr_npc`: the PC after the trace;
  * `tr_bm`/`tr_btk`: branch outcomes, for the branch predictor;
  * `tr_id`: the tracker entry of a speculative reuse;
  * `ir_*`: a single-instruction reuse from `Memo_Table_G`.

  Table updates from this reuse (LRU, stride advance, tracker allocation) take
  effect at the end of the cycle.
* **Writeback:** `wb_en`/`wb_tag`/`wb_val` (4 ports) feed RS3. A resolution
  appears as `sq_*` or `ver_ok` in the cycle after the last needed writeback,
  or in the same cycle for a producer that finishes during allocation.
* **Commit:** `c_en`/`c` (`commit_t`: PC, next PC, class, sources with values,
  destination with result, branch outcome) and `brk` feed RS4. A finished
  trace is written one cycle after the instruction that ends it.
* **Statistics:** `ev_*` are one-cycle event flags.
* **Reset:** `rst_n` is synchronous and active low. It clears every valid bit,
  sets every confidence counter to 1 and empties the tracker.

Two hazards are worth knowing:

* The confidence value read in RS1 does not include an update made in that same
  cycle.
* A fetch sees the set as it was at lookup, so it does not see an insert from
  RS4 in the same cycle.

Applying the output context, redirecting fetch and squashing are the host
core's job. The unit only reports them.

## Parameters

| parameter | default | note |
|-----------|---------|------|
| `MODE` | `RST_NVALUE` | predictor variant |
| `MT_ENTRIES`, `MT_WAYS` | 1024, 4 | trace table |
| `MG_ENTRIES`, `MG_WAYS` | 2048, 4 | instruction table |
| `CONF_ENTRIES`, `CONF_SAT`, `CONF_THRESH`, `CONF_PENALTY`, `CONF_INC`, `CONF_INIT` | 4096, 3, 3, 3, 1, 1 | confidence |
| `PV_ENTRIES` | 8 | speculative reuses in flight (design choice) |
| `WBP` | 4 | writeback ports (pipeline width) |

The table sizes, associativities and confidence settings are the published
configuration. The tracker size, the context sizes in `rst_pkg` and the
one-commit-per-cycle trace builder are choices made here.

## Where this differs from the published description, or fills gaps

* The entry counts *n*, *m*, *n′*, *m′* and *b*, the stride slot encoding, the
  PC indexing of all three tables, LRU ages and the tracker organisation are
  not given, and were chosen here.
* Regular reuse trains the confidence counter (see above).
* Of several speculative candidates, the most recently used one is chosen. The
  description says only that the choice uses the LRU information.
* The `it` field is kept and counted, but it does not limit prediction, because
  its use is not described.
* In `RST_STRIDE` mode a speculative reuse advances the stored last values at
  once. A later squash does not undo that advance.
* The 64-entry squash table of the published configuration is not built, since
  its function is not described. The host processor (fetch, rename, RUU,
  caches, branch predictor) is outside this unit.
* The trace builder takes one committed instruction per cycle. A 4-wide commit
  needs four copies of the append step in a chain.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog:

| testbench | what it covers |
|-----------|----------------|
| `tb_conf_table` | 3000 random updates and reads against a counter model |
| `tb_memo_table_t` | lookup, LRU eviction, touch protection, in-place overwrite, stride advance |
| `tb_memo_table_g` | several instances of one PC told apart by operand values, not-ready sources, oldest-instance replacement |
| `tb_reuse_test` | regular vs speculative reuse, predicted values and tags, MRU choice, refusals, filtered and stride modes |
| `tb_pred_verifier` | verification, a wrong value with the offending register, waiting for every predicted input, full tracker, producer finishing in the allocation cycle, flush |
| `tb_trace_builder` | the five-input / three-output example path with two branches ended by a load, domain, context and branch-limit splits, `brk` |
| `tb_stride_recognizer` | candidate, confirmation, stride changes, negative stride, branches, mismatched registers |
| `tb_rst_top` | **full default configuration**, end to end: regular and speculative reuse, verification, squash with penalty, refusal by confidence and by a full tracker, instruction reuse, eviction, all three termination reasons; each mechanism is counted |
| `tb_rst_top_stride` | stride-aware and filtered-stride units side by side: reuse of a never-seen instance by extrapolation, stride prediction verified, the filter refusing prediction |

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_rst_top rtl/rst_pkg.sv tb/tb_rst_top.sv
./obj_dir/Vtb_rst_top
```

The full-size end-to-end test runs in a few seconds, including compilation.

## Limits

The unit was checked only against the directed scenarios above and the random
confidence-table test. The published results come from running integer
benchmarks on a complete processor model. They cannot be reproduced with this
RTL alone: that needs a host core to drive `rst_top`.
