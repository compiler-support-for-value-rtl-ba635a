# VBBI: value-based BTB indexing for indirect branches

An indirect jump, such as a `switch` compiled to a jump table, a call through a
function pointer or a virtual call, can go to a different target each time it
runs. A conventional branch target buffer (BTB) keeps one target per branch
PC, so it predicts whatever target the jump took last time. For a jump whose
target keeps changing, that prediction is often wrong.

Value-based BTB indexing (VBBI) uses the fact that the target is usually
decided by a single value computed shortly before the jump: the switch
variable, or the loaded function pointer. The compiler finds the instruction
that produces this value (the *hint instruction*). It writes the distance from
the jump back to that instruction into spare bits of the jump's encoding. The
hardware saves the hint instruction's result when it writes back. When the
jump is fetched, the saved value is added to the jump PC to form the BTB index.
Each value of the switch variable then has its own BTB entry and its own
target.

This repository holds synthesizable SystemVerilog for the predictor:
 * the hint field decoder;
 * the Hint Instruction Buffer (HIB);
 * the BTB, indexed by value;
 * two mechanisms that keep the hint value current: the Hint Store Buffer
   (HSB) for load-to-store address matching, and target prediction overriding.

It also holds a self-checking testbench for each part and an end-to-end
testbench. The processor pipeline around the predictor is not included. The
predictor's top module brings out the pipeline connections as ports.

## The hint field

The jump format is the Alpha `jmp`/`jsr` format. Bits 13..0, which the
hardware otherwise ignores, carry the hint:

| bits  | 31..26 | 25..21 | 20..16 | 15..14    | 13                  | 12                       | 11..0                         |
|-------|--------|--------|--------|-----------|---------------------|--------------------------|-------------------------------|
| field | opcode | Ra     | Rb     | jump type | 1 = use VBBI        | 0 = positive, 1 = negative offset | offset in instructions |

A positive offset means the hint instruction comes *before* the jump, so the
hint PC is `PC - 4*offset`. A negative offset gives `PC + 4*offset`. Take
`jmp $31,($1),8203` as an example: 8203 = 2^13 + 11. VBBI is on, and the hint
instruction is 11 instructions (44 bytes) before the jump.
`vbbi_hint_decode` does this decoding.

## Making a prediction (fetch)

`vbbi_index_gen` holds the fetch-side logic. There is one lookup per cycle.

1. Choose the HIB index. For an indirect jump with VBBI on, the index is hint
   PC bits 5..2. For any other instruction, it is the instruction's own PC
   bits 5..2. The HIB is direct-mapped on the PC of the hint instruction.
2. Read the entry and compare:
   * For a jump: if the entry's `jmp_pc` equals the PC, the entry belongs to
     this jump. Its `hint_value` is used. Otherwise the value 0 is used, which
     gives an ordinary PC-indexed lookup. In that case the jump takes over the
     entry: it writes its own `jmp_pc` and `hint_pc` and clears the value.
   * For any other instruction: if the entry's `hint_pc` equals the PC, the
     instruction is a hint instruction (`f_is_hint_inst`). The pipeline must
     carry this flag to write-back.
3. The BTB key is `PC + 4*hint`. The hint is added to the word address. As a
   result, consecutive hint values such as case numbers 0, 1, 2, 3 fall into
   consecutive BTB sets.
4. The BTB is looked up with that key and returns hit and target in the same
   cycle.

Every other branch also goes through the same BTB, with a hint of 0.

## Keeping the hint current

The prediction is only as good as the hint value. If the hint instruction has
not written back by the time the jump is fetched, the HIB still holds the
previous value, and the jump goes to the entry of the previous case. The
design has three ways of getting the current value in.

**Write-back.** A hint instruction writes its result into the HIB entry at
PC bits 5..2 (the `wb_*` ports). This is the baseline scheme.

**Load-to-store address matching (`vbbi_hsb`).** Often the hint instruction is
a load, for example of `current_move[ply]`. The value it will load was stored
much earlier, by a store to the same address. When a hint load writes back, its
address and its HIB index are recorded in the 32-entry Hint Store Buffer. Each
later store is compared with all recorded addresses. On a match, the store
value is written into that HIB entry at once. The jump therefore sees the new
value even before the load runs again. The HSB is fully associative and
replaces entries round-robin. It compares full byte addresses. If several
entries match, the lowest one wins.

**Target prediction overriding (`vbbi_override`).** A jump can still be
fetched before its hint writes back. The override unit keeps every in-flight
VBBI jump in an 8-entry table with these fields:
 * tag;
 * PC;
 * HIB index;
 * the hint value it was predicted with;
 * its current prediction.

The HIB reports each change of a hint value, from write-back or from the HSB,
together with the `jmp_pc` of the entry's owner. A pending jump is marked when
the entry is still its own (same index and same jump PC) and its hint differs
from the new value. In the next cycle, the lowest marked jump looks the BTB up again
through a second read port, with `PC + 4*new hint`. The unit then does two
things:
 * It always reports the new key (`ov_valid`, `ov_tag`, `ov_key`). The
   pipeline must commit the jump with this key, so that the BTB is trained at
   the index of the final prediction.
 * If the BTB hits with a target different from the current prediction, it
   also raises `ov_redirect` with `ov_target`. The pipeline then redirects
   fetch.

Marked jumps are handled one per cycle. A change that arrives in the same
cycle as the jump's fetch is caught too. An entry is freed when its jump
commits (`c_valid` with `c_is_vbbi`) or on `flush`. A jump that finds the
table full (`ov_full`) is simply not overridden. The pipeline must not reuse
a tag while its jump is still pending. An assertion in `vbbi_override` checks
this.

`cfg_lsam_en` and `cfg_override_en` turn the two mechanisms off. With both
off, the design is the baseline VBBI scheme.

## The BTB and its training

`vbbi_btb` has 4096 entries in 4 ways, which gives 1024 sets:
 * Key bits 11..2 select the set.
 * All higher key bits (52) form the tag.
 * The full 64-bit target is stored.
 * Replacement is true LRU, with a 2-bit age per way.
 * A fetch hit and an update both count as a use. A re-prediction lookup
   does not.

An update writes, in order of preference, to the way that already holds the
key, then to an invalid way, then to the least recently used way. The top
trains the BTB at commit, only when the prediction missed or was wrong, with
the key the jump carried. The key carried is `f_btb_key`, or `ov_key` after a
re-prediction.

The BTB arrays have no reset. After reset, a sweep clears one set per cycle.
At the default size this takes 1024 cycles. During the sweep `ready` is low,
every lookup misses and updates are dropped. Because of this, all BTB state
stays in plain memories.

## Interface and timing

| group    | ports | meaning |
|----------|-------|---------|
| config   | `cfg_lsam_en`, `cfg_override_en` | enable HSB matching and overriding |
| fetch    | `f_valid f_pc f_insn f_is_ind_jmp f_tag` in; `f_pred_hit f_pred_target f_btb_key f_vbbi_hit f_is_hint_inst` out | combinational, same cycle |
| write-back | `wb_valid wb_pc wb_value wb_is_load wb_ld_addr` | only for instructions fetched with `f_is_hint_inst` |
| store    | `st_valid st_addr st_value` | every store |
| commit   | `c_valid c_is_vbbi c_tag c_key c_pred_hit c_pred_target c_target` | every committed branch; trains the BTB |
| flush    | `flush` | empties the override table |
| override | `ov_valid ov_tag ov_key ov_redirect ov_target ov_full` | one cycle after the hint change |
| status   | `ready` | BTB initialisation done |

All state changes at the rising edge of `clk`. `rst_n` is an asynchronous,
active-low reset. Addresses and values are 64 bits wide, instructions are 32
bits and jump tags are 8 bits. The pipeline assigns the tags and must keep
them unique among in-flight VBBI jumps. A hint write or store in cycle *n*
changes the HIB at the end of cycle *n*. A jump fetched in cycle *n+1* sees
the new value, and a re-prediction for a jump already in flight appears in
cycle *n+1*.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `vbbi_predictor` | `HIB_N` | 16 | published configuration |
| | `HSB_N` | 32 | published configuration |
| | `BTB_N`, `BTB_W` | 4096, 4 | published configuration |
| | `OVR_N` | 8 | this design's choice |
| `vbbi_pkg` | `ADDR_W`, `DATA_W`, `INSN_W`, `JTAG_W` | 64, 64, 32, 8 | Alpha widths; tag width chosen |

The HIB index width follows from `HIB_N` (PC bits `[log2(HIB_N)+1:2]`), and
the BTB set index width follows from `BTB_N/BTB_W`.

## What follows the published scheme and what was chosen here

These parts follow the published VBBI scheme:
 * the three HIB fields and the HIB index on PC bits 5..2;
 * the jmp_pc check that selects the hint value or 0;
 * the adder of PC and hint in front of the BTB;
 * the hint field layout;
 * training the BTB at commit only on a wrong target;
 * the HSB matching rule;
 * the overriding rule (re-predict with a changed hint and redirect fetch);
 * all table sizes except the override table.

These are choices made here, where the scheme is silent:
 * The adder adds `4*hint`, not `hint`. Without that, hint values 0 to 3
   would map to the same set.
 * A jump that misses takes over its HIB entry at fetch.
 * HIB write priority: allocation first, then write-back, then HSB store.
 * Write-back writes the HIB by index only; `hint_pc` is not checked again.
 * Full-width BTB tags, true LRU and the initialisation sweep.
 * The HSB organisation.
 * The override table, with one re-prediction per cycle and one cycle of
   latency.
 * The whole pipeline interface (tags, commit fields, flush).
 * One fetch lookup per cycle. The evaluated processor fetches four
   instructions per cycle. A wider front end would need more HIB read ports,
   or would check only the first branch of a fetch group.

Not included:
 * the processor that hosts the predictor;
 * the compiler passes that find hint instructions and fill in the hint
   field;
 * the conditional branch predictor and the return stack.

## Simulation

Each module has a testbench `tb/tb_<module>.sv`, and `tb_vbbi_distance` is an extra system test. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Run one with
Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/vbbi_pkg.sv \
  --top-module tb_vbbi_predictor tb/tb_vbbi_predictor.sv -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package is
named first because every module imports it.

| testbench | what it checks |
|-----------|----------------|
| `tb_vbbi_hint_decode` | the 8203 example and 2000 random encodings against a direct calculation |
| `tb_vbbi_index_gen` | index, hit, hint detection and key for random fetch cases |
| `tb_vbbi_hib` | random allocations, write-backs, stores against a model; priorities; change events; reset |
| `tb_vbbi_btb` | a 16-entry instance against a recency-list model, with many LRU evictions; the 4096-entry instance holding four targets for one jump; the sweep length |
| `tb_vbbi_hsb` | recording, duplicates, round-robin wrap and store matches against a model |
| `tb_vbbi_override` | redirect, same-target, BTB-miss, unchanged-hint, same-cycle, two-jump, full and flush cases |
| `tb_vbbi_predictor` | the whole predictor at default sizes (see below) |
| `tb_vbbi_distance` | hint-to-jump distances of 37 and 88 instructions under a pipeline timing model (see below) |

The end-to-end test plays a small program. One `switch` jump's target depends
on a value computed 11 instructions earlier. The same switch is also compiled
without a hint. A third jump's hint is a load whose address is later stored
to. The test checks and counts the following:
 * VBBI learns one target per hint value. On a run of 200, VBBI predicted
   about 196 of 199 jumps correctly, against about 44 of 200 for the plain
   BTB.
 * A jump fetched before its hint writes back is re-predicted and redirected
   exactly one cycle after the write-back.
 * A store to the recorded load address updates the hint.
 * With both enables off, neither of the last two happens.
 * HIB replacement, BTB LRU eviction, a full override table, a flush and the
   1024-cycle BTB sweep.

A mechanism that never happens counts as a failure.

`tb_vbbi_distance` shows why the distance between hint and jump matters. The
published averages are 37 instructions with a plain compiler and 88 with
hoisting, inlining and interprocedural hint selection. The testbench assumes
a 4-wide fetch and a 20-cycle fetch-to-write-back latency. At 88
instructions, the jump is fetched 22 cycles after its hint, so every
prediction uses the current hint and is correct. At 37 instructions, the jump
is fetched after 9 cycles. Its fetch prediction then uses the previous value
and is right only when the value repeats (about one time in four). With
overriding on, every one of these predictions is repaired 1 cycle after the
hint writes back. With overriding off, none of them is repaired.

## Limits

The HIB keeps full 64-bit PCs and values, 386 bytes in all. The storage cost
quoted for the original scheme is about 130 bytes. That figure implies
narrower, probably partial, fields, whose widths are not published.

The RTL has been linted, elaborated and simulated. It has not been run
against the SPEC programs used to evaluate the scheme. Running them needs the
host processor, which is not included, so nothing here reproduces published
accuracy or speed-up figures. The one-lookup-per-cycle fetch port is the
largest simplification compared with a 4-wide front end.
