# Global-history two-level branch predictor

A pipelined processor fetches the instruction after a conditional branch
before the branch has resolved. This unit guesses the direction (taken or not
taken) in the cycle after the branch is fetched, so fetch can carry on down
the predicted path. It is a *global-history two-level* predictor. The first
level is a short shift register holding the outcomes of the last few branches
of the program, whichever branches they were. The second level is a table of
2-bit counters. The table index combines that history with a few bits of the
branch's own address. So one branch can get different predictions depending
on the path that led to it, which is how loop exits and correlated branches
become predictable.

The unit is meant to sit next to the fetch and execute stages of a 32-bit
soft processor with word-aligned 32-bit instructions, such as MicroBlaze. Its
opcode decoder recognises MicroBlaze conditional branches. The processor,
memories and peripherals of such a system are not part of this RTL.

## How a prediction is formed

```
 fetch_pc[3:2] ─┐
                ├─► index = {PC bits, BHR} ─► PHT[index] ─► MSB ─► taken?
 BHR[3:0]  ─────┘            (6 bits)          64 × 2-bit
```

* **BHR** (branch history register, `gh_bhr`) is H = 4 bits wide. It holds
  the H most recent resolved outcomes, 1 = taken, with the newest in bit 0.
  It shifts left on each resolved branch and resets to `1111`.
* **PHT** (pattern history table, `gh_pht`) holds 2^(H+M) two-bit counters,
  64 by default. The index is `{PC[PC_LSB +: M], BHR}`: M = 2 address bits in
  the upper part and the history in the lower part.
* The **prediction** is the counter's MSB: `1x` means taken, `0x` means not
  taken.

Worked example at the default size: the branch sits at word address
`…0101` (byte address `…010100`) and the history is `0110`. The address
bits are `01`, so the index is `010110`, entry 22. If that counter holds
`10` or `11`, the branch is predicted taken.

Address bits. Instructions are 4-byte aligned, so byte-address bits 1:0 are
always 00 and would waste index bits. By default the unit therefore takes
bits 3:2, the two lowest bits of the *word* address (`PC_LSB = 2`). Set
`PC_LSB = 0` to take bits 1:0 of the byte address literally.

## The 2-bit counter

When a branch resolves, its counter moves toward the outcome
(`two_bit_counter`, rule in `gh_pkg::ctr_next`):

| `KIND`                     | taken                     | not taken                  |
|----------------------------|---------------------------|----------------------------|
| `CTR_SATURATING` (default) | +1, stops at 11           | −1, stops at 00            |
| `CTR_HYSTERESIS`           | 00→01, 01→11, 10→11, 11→11 | 11→10, 10→00, 01→00, 00→00 |

The saturating counter is the rule the table is specified with. The
hysteresis variant is a second four-state machine. In it, a miss from a weak
state jumps to the strong state of the other direction. It is there for
experiments. In both rules a strongly biased branch must miss twice in a row
before its prediction flips. Counters reset to `01`, weakly not taken
(`INIT`).

## Blocks and how they connect

```
                 ┌──────────────── branch_top ─────────────────┐
 fetch_instr ──► │ circuit_branch (CB) ─ branchin ──┐          │
 fetch_valid ──► │        │                         ▼          │
                 │        │ notbranchin   branch_prediction (BP)│ ◄── resolve_idx,
 fetch_pc ─────► │        │              ┌ gh_bhr, gh_pht ┐    │     resolve_taken,
                 │        ▼              └───── branchout ┘    │     resolve_valid
                 │   branch_control (BC) ◄──────┘              │ ◄── resolve_pred
                 └────────┬───────────────────────────────────┘
                          ▼
        Branch_prediction, pred_valid, pred_idx, mispredict, n_branches, n_correct
```

| block | file | role |
|---|---|---|
| CB | `rtl/circuit_branch.sv` | Decodes the fetched word. `branchin` is combinational: it is high in the fetch cycle for a conditional branch (major opcode `100111` register form, `101111` immediate form) and starts the lookup. `notbranchin` is the same decision registered one cycle, so it lines up with the prediction. Unconditional branches, returns and all other instructions count as "not a branch". |
| BP | `rtl/branch_prediction.sv` | Forms the index and looks up the PHT (synchronous read). It returns `branchout` and the index used one cycle later. On a resolution it updates the counter and the history. |
| BHR | `rtl/gh_bhr.sv` | History shift register. |
| PHT | `rtl/gh_pht.sv` | Counter array with one synchronous lookup port and one read-modify-write update port. |
| counter | `rtl/two_bit_counter.sv` | Next state and prediction of one counter. |
| BC | `rtl/branch_control.sv` | `Branch_prediction = branchout & ~notbranchin`. At resolution, raises `mispredict` when the prediction was wrong, and counts resolved and correct branches (accuracy = `n_correct / n_branches`). |
| package | `rtl/gh_pkg.sv` | Default sizes, counter type and rules, opcode constants. |

## Timing and the pipeline protocol

All state changes on the rising edge of `clk`. Reset is synchronous and
active low (`rst_n`).

```
cycle        t                      t+1                         later (resolve)
fetch_valid  1, fetch_pc/instr      -                           -
branchin     1 if cond. branch      -                           -
pred_valid   -                      1 if cond. branch           -
Branch_pred. -                      taken / not taken           -
pred_idx     -                      index used                  -
resolve_*    -                      -                           valid, idx, pred, taken
mispredict   -                      -                           same cycle, combinational
```

* Fetch one word per cycle. One cycle later the prediction for it is on
  `Branch_prediction`. That output is 0 whenever `pred_valid` is low.
* The pipeline must carry `pred_idx` and the prediction along with the
  branch. When the branch resolves, return them on `resolve_idx` and
  `resolve_pred` together with the real outcome on `resolve_taken`, and
  raise `resolve_valid` for one cycle. At that edge the counter is updated
  and then the outcome is shifted into the history. A resolution may come
  in the same cycle as a fetch, and then the lookup still sees the old
  contents (read-first).
* The history records **resolved** outcomes only. While older branches are
  still in flight, a new lookup uses a history that does not include them
  yet. Resolve branches in program order. Because the index comes back with
  the resolution, the counter that made the prediction is the one that gets
  trained, even if the history has moved on in the meantime.
* There is no flush input. Wrong-path branches that are squashed simply must
  not be resolved.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `H` | 4 | history bits |
| `M` | 2 | branch-address bits |
| `PC_LSB` | 2 | lowest address bit used |
| `KIND` | `CTR_SATURATING` | counter rule |
| `INIT` | `2'b01` | counter reset value |

The table holds 2^(H+M) counters, four counters per byte. The default is 64
counters (16 bytes). The sizes usually compared for this kind of predictor
map to these settings:

| storage | counters | H+M | e.g. |
|---|---|---|---|
| 8 B | 32 | 5 | H=3, M=2 |
| 16 B | 64 | 6 | default |
| 32 B | 128 | 7 | H=5 |
| 64 B | 256 | 8 | H=6 |
| 512 B | 2048 | 11 | H=9 |
| 1 KB | 4096 | 12 | H=10 |
| 4 KB | 16384 | 14 | H=12 |

How a larger budget should be split between history and address bits is
open. The size sweep below grows the history and keeps M = 2. The PHT
resets all entries in one cycle, which is fine for distributed RAM. For a
block-RAM mapping at large sizes, replace the reset loop with a sweep or an
initial value.

## Where this design makes its own choices

The index layout, the all-ones history reset, the saturating counter with
MSB prediction, and the 4-bit/2-bit/64-entry default come from the
predictor's specification. The following are this implementation's own:

* the fetch/resolve port protocol, the one-cycle synchronous lookup and the
  read-first collision rule;
* history updated at resolution rather than speculatively at prediction;
* using word-address bits (`PC_LSB = 2`) rather than the lowest byte-address
  bits;
* the counter reset value `01`;
* what CB treats as a branch (MicroBlaze conditional branches only), and
  the split between its same-cycle and next-cycle outputs;
* everything in BC beyond masking the prediction: the mispredict flag and
  the accuracy counters;
* the hysteresis counter rule is an option, not the default.

Not covered: the predictor gives only a direction, not a branch target
address. The target must come from the processor's decode or its branch
target cache. The schematic this unit follows labels the predictor's address
input as three bits wide, but the index is specified with two address bits,
and two are used here (`M` can be raised). The bimodal predictor that this
design is usually compared against is not included.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block with a model written independently inside the testbench, has a cycle
watchdog, and ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_two_bit_counter` | both counter rules, exhaustively, against hand-written tables |
| `tb_gh_bhr` | reset to all ones; random shifts at H = 4 and 7 |
| `tb_gh_pht` | reset contents, read latency and hold, read-first collisions, saturation, 3000 random cycles, both rules |
| `tb_branch_prediction` | the worked example above, then 4000 random cycles at default and at H=3/M=3/PC_LSB=0 |
| `tb_circuit_branch` | all 64 opcodes with and without `fetch_valid` |
| `tb_branch_control` | masking, mispredict, counters |
| `tb_branch_top` | the whole unit at default parameters, see below |
| `tb_size_sweep` | accuracy against size, see below |

`tb_branch_top` acts as a small pipeline. It fetches a mix of conditional
branches, other instructions and bubbles, keeps an in-flight queue, and
resolves branches after random delays, often in the same cycle as a fetch.
Every prediction, index, history value, mispredict flag and counter is
compared with a reference model. It then counts how often each mechanism
occurred, and fails if any never did: masked non-branch, right and wrong
prediction, saturation at both ends, history shift, two static branches
aliasing on one counter, lookup and update of the same entry in one cycle,
and fetch with resolve in one cycle. A final phase runs a loop branch with
the pattern T T T N. Once trained, the 4-bit history separates the four
positions of that pattern, so the last 200 iterations must all be predicted
correctly.

`tb_size_sweep` runs one synthetic loop-nest branch stream through six
predictor sizes from 8 B to 1 KB. The stream is an inner loop of six, a
random branch, a branch correlated with it, and an always-taken branch. The
sweep prints the accuracy of each size. Roughly: 83% up to 64 B, where the
history is too short to see the loop exit, and 94% at 512 B and 1 KB, which
is the ceiling set by the random branch. The testbench checks that trend.
These numbers describe the synthetic stream, not any real program.

Running a testbench with Verilator 5 (from the project root):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
          --top-module tb_branch_top rtl/gh_pkg.sv tb/tb_branch_top.sv -o sim
./obj_dir/sim
```

Use the same command for any other testbench. `gh_pkg.sv` must come first.
The RTL is plain synthesizable SystemVerilog-2017. It has one assertion, in
`branch_control`: the correct count never exceeds the branch count.
