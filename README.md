# Tagless per-address two-level branch predictor

A per-address two-level branch predictor gives every static branch its own
history of recent outcomes. It then uses that pattern, together with a few
address bits, to pick a two-bit counter that predicts the next outcome. The
usual implementation keeps these history registers in a set-associative
table. That table shares its tags with the branch target buffer (BTB). The tag
compare and the way selection are then on the critical path of every fetch.

This design drops the tags. The history table is a plain direct-mapped RAM,
indexed by low branch-address bits. A branch whose address maps onto a register
that another branch used before does not flush it. It keeps shifting its own
outcomes into the other branch's history (the *no-flush* policy). There is no
miss to detect and nothing to compare, so a lookup is two RAM reads in series.
The BTB is no longer tied to the history table. It has its own size and stores
only branches that were taken.

Two reasons explain why dropping the tags costs little accuracy:

- A flushed register would restart from a fixed reset pattern. For the next
  `HIST_BITS` outcomes it indexes counters that belong to no branch.
- An unflushed register keeps the old branch's outcomes. These are often just
  as useful: two loop branches have similar histories, and a branch that was
  interrupted briefly finds most of its own history still there.

The errors of a history register therefore come mostly from its *transitional*
phase, the first `HIST_BITS` outcomes after another branch took it over. Not
flushing shortens that phase or makes it less harmful. This matters most for
long histories and small tables. Once the register is full of the branch's own
outcomes, tagged and tagless tables behave the same.

## Structure

```
                 lookup_pc_i
                     |
      +--------------+-----------------------------+
      | pc[2 +: log2 BHT_ENTRIES]    pc[2 +: ADDR_BITS]       pc[2 +: log2 BTB_ENTRIES]
      v                              |                        v
  +--------+   history (HIST_BITS)   v                    +--------+
  |  bht   |-------------------->{row , column}           |  btb   |  target of taken
  | no tags|                         |                    | taken  |  branches only
  +--------+                         v                    | only   |
                               +-----------+              +--------+
                               |   pht     | 2**(H+A)         |
                               | two-bit   | counters         |
                               | counters  |                  |
                               +-----------+                  |
                                     | msb = taken            |
                                     v                        v
                                  pred_o.taken      pred_o.target_valid / target
```

| module | role |
|---|---|
| `tagless_pas_predictor` | top: wires the three tables, start-up, lookup and update paths |
| `bht` | `BHT_ENTRIES` history shift registers, direct-mapped, no tags, no-flush update |
| `pht` | `2**HIST_BITS` rows × `2**ADDR_BITS` columns of two-bit counters |
| `sat_counter2` | next state of one saturating up/down counter |
| `btb` | direct-mapped target buffer, written on taken branches only |
| `bp_pkg` | PC width, counter state enum, `bp_update_t` and `bp_predict_t` structs |

### The history register

Each `bht` entry is a shift register. A resolved outcome (1 = taken) enters
at the most significant bit, and the oldest outcome falls out of the least
significant bit:

```
before   0 1 1 1 0 1 1 1      (msb ... lsb)
outcome 0 of a new branch that maps here
after    0 0 1 1 1 0 1 1
```

Nothing else happens when a different branch takes over the entry. Since the
table has no tags, it cannot tell that this has happened.

### The counter table

The history read from the `bht` selects a row of the `pht`. `ADDR_BITS` low
address bits select a column. The memory is laid out flat at index
`{history, address bits}`. Each entry is a two-bit counter:

| state | encoding | prediction |
|---|---|---|
| strongly not-taken | 00 | not taken |
| weakly not-taken | 01 | not taken |
| weakly taken | 10 | taken |
| strongly taken | 11 | taken |

A taken outcome counts up and a not-taken outcome counts down. The counter
sticks at 00 and 11. Setting `ADDR_BITS = 0` leaves a single column, which is
the PAg organisation with the counters indexed by history alone.

### The target buffer

Only taken branches need a target, so `btb` is written only when a branch
resolves taken. Its entries hold the target address without its two
always-zero bits. They have no tag, like the direction tables. A valid bit
marks entries written since reset, and a lookup reports `target_valid` from it.
Branches whose low address bits collide overwrite each other's targets.

## Sizing

The storage of the direction predictor, in bits, is

    BHT_ENTRIES * HIST_BITS + 2 ** (HIST_BITS + ADDR_BITS + 1)

Address bits come free from the program counter, but every history bit costs
one bit in each history register. With few history registers the two cost
about the same. With many, a history bit costs far more than an address bit.

The best configuration for a given budget shifts as the budget grows:

- **Small budgets:** address bits matter most, because they separate static
  branches at no cost.
- **Larger budgets:** history bits take over. The history table must grow
  with them, or the longer histories are lost to sharing.

The best points found for two benchmark sets are below, written as
(history bits, address bits) at a number of history registers:

| budget | SPEC CINT95 | IBS |
|---|---|---|
| 512 B | (2, 8) × 1K | (1, 9) × 2K |
| 1 KB | (3, 7) × 2K | (2, 9) × 2K |
| 2 KB | (7, 4) × 2K | (3, 8) × 4K |
| 4 KB | (9, 4) × 2K | (4, 7) × 8K |
| 8 KB | (10, 4) × 4K | (5, 9) × 8K |
| 16 KB | (11, 4) × 8K | (9, 6) × 8K |

The defaults are the 16 KB SPEC CINT95 point: `BHT_ENTRIES = 8192`,
`HIST_BITS = 11`, `ADDR_BITS = 4`. This point is nominally 16 KB, but the
formula gives 8192·11 + 2^16 = 155,648 bits (19 KB). All six SPEC points and
all six IBS points are built and checked in `tb_pas_configs`.

At the defaults, synthesis gives:

- a 90,112-bit BHT RAM;
- a 65,536-bit counter RAM;
- a 30,720-bit target RAM;
- 1,024 BTB valid flip-flops;
- a few dozen flip-flops for the start-up counters and output registers.

## Interface and timing

All ports are on `clk_i`. `rst_ni` is an asynchronous active-low reset.

| port | width | meaning |
|---|---|---|
| `ready_o` | 1 | start-up clearing finished |
| `lookup_valid_i` | 1 | predict the conditional branch at `lookup_pc_i` |
| `lookup_pc_i` | 32 | its address |
| `pred_o` | `bp_predict_t` | `valid`, `taken`, `target_valid`, `target[31:0]` |
| `upd_i` | `bp_update_t` | `valid`, `pc[31:0]`, `taken`, `target[31:0]` of a resolved branch |

- **Lookup.** In the lookup cycle the `bht` is read combinationally and its
  history addresses the `pht`. The counter and the BTB entry are registered.
  `pred_o` is therefore valid exactly one cycle after `lookup_valid_i`, and
  holds its fields until the next lookup. One lookup can start every cycle.
- **Update.** When `upd_i.valid` is high, three things happen at the next
  edge:
  - the counter selected by the branch's history *before* this outcome is
    trained;
  - the outcome is shifted into the history register;
  - if the branch was taken, its target is written into the BTB.

  The design reads the tables itself at update time. The caller does not
  have to carry the lookup's history down the pipeline.
- **Same-cycle lookup and update.** A lookup in the same cycle as an update
  sees the tables as they were before the update. There is no bypass.
- **Start-up.** After reset every history register is cleared to zero, every
  counter to weakly not-taken, and every BTB valid bit to 0. This takes
  `max(BHT_ENTRIES, 2**(HIST_BITS+ADDR_BITS))` cycles (32,768 at the
  defaults). Until `ready_o` rises, lookups return no prediction and updates
  are dropped.

Branches are recognised outside the predictor, for example by predecode bits in
the instruction cache. The caller looks up only conditional branches.

## Choices made in this implementation

These points are not fixed by the predictor's definition and were chosen here.
They are the first places to look when adapting it:

- **Index bits.** Every table is indexed by the lowest address bits above the
  2 always-zero bits of a 4-byte instruction.
- **When tables are updated.** Updates happen at resolution, not when the
  branch is predicted. A processor that updates speculatively would need
  repair logic, which is not included.
- **Pipelining.** The lookup is split into a combinational history read and a
  registered counter and BTB read.
- **Start-up values.** The clearing sweep exists so that the RAMs start from
  known values. The start-up values `HIST_INIT` and `CTR_INIT` are parameters
  of `bht` and `pht`.
- **BTB.** The BTB size (`BTB_ENTRIES = 1024`), its valid bits and its tagless
  entries were chosen here. Its size was left open, to be set apart from the
  history table. A tagged or set-associative BTB would be a local change
  inside `btb`.
- **Address width.** The 32-bit PC and 4-byte instruction alignment are
  constants in `bp_pkg`.

Not included:

- the tagged, flush-on-miss history table used as the comparison point;
- the plain two-bit-counter predictor;
- the instruction-cache predecode that marks branches.

The two predictors are baselines, not part of this design.

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sat_counter2` | all 8 state/outcome pairs against count±1 with saturation |
| `tb_bht` | clearing time and value; random reads and updates against a model; msb-in shift; read-before-write |
| `tb_pht` | clearing time; one-cycle lookup; row/column indexing; both saturation limits |
| `tb_btb` | valid bits from reset; one-cycle lookup; targets; read-before-write |
| `tb_tagless_pas_predictor` | the top at its default sizes against an independent model (see below) |
| `tb_table1_workloads` | the default-size predictor on fifteen synthetic streams, 300,000 branches each, whose static-branch counts (95 to 17,361) match fifteen SPEC CINT95 and IBS programs, so that the larger ones share history registers; every prediction checked against a model |
| `tb_pas_configs` | the 12 budget optima above plus tagless PAg with 8 and 14 history bits and 128, 1K and 4K registers, all against a model on a synthetic branch stream |

The top also asserts that `ready_o`, once high, stays high until reset.

`tb_tagless_pas_predictor` checks the following:

- start-up takes 32,768 cycles, and lookups before that give no prediction;
- a period-4 loop branch is predicted perfectly after warm-up;
- 20,000 random cycles of mixed branches match the model in every
  prediction.

It also counts how often each mechanism occurred, and fails if one never did:

- a shared history register;
- counter saturation at both ends;
- BTB hits, misses and overwrites;
- same-cycle lookup and update of one entry.

The misprediction rates that `tb_pas_configs` prints come from a synthetic
stream, not from program traces. They show that the predictor learns, and
nothing more.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
  rtl/bp_pkg.sv tb/tb_tagless_pas_predictor.sv --top-module tb_tagless_pas_predictor
./obj_dir/Vtb_tagless_pas_predictor
```

Replace the testbench name to run another one. Every testbench finishes within seconds.

## Changing the configuration

Set `BHT_ENTRIES` (a power of two), `HIST_BITS` (≥ 1), `ADDR_BITS` (≥ 0) and
`BTB_ENTRIES` on `tagless_pas_predictor`. Use the cost formula and the table
above as a starting point. The number of history registers should follow the
number of static branches in the target code, and the split between history
and address bits should follow the budget.
