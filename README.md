# Tri-state register file for out-of-order cores

In an out-of-order core a physical register spends much of its life holding
a value nobody will read again. It may be *idle*: its last consumer has
read it, but the register has to wait for the instruction that redefines
the same architectural register to commit, in case a branch mispredicts.
It may be *checkpointed*: kept only because a checkpoint may be rolled
back to. It may be *free*: no longer in use at all. All that time its cells
leak, and a cell storing '1' leaks far more through the read-port bit lines
than one storing '0'.

The tri-state register file ties the electrical state of every register's
cells to this life cycle:

| register life cycle           | cell state | control            | cells              |
|-------------------------------|------------|--------------------|--------------------|
| ready / active (live data)    | work       | dead=0, drowsy=0   | normal operation   |
| idle / checkpointed           | drowsy     | dead=0, drowsy=1   | data kept, gated ground |
| free (released)               | dead       | one dead pulse     | discharged to all 0 |

Each cell gets an extra discharge transistor driven by `dead`. Each register
gets one data-retention transistor between its cells' virtual ground and
ground, driven by the inverse of `drowsy`. A released register is
discharged by a *short pulse* on `dead`, not a level, so the discharge
transistor is off again long before the register is reused. Per-register
management logic in the rename stage decides when to pulse `dead` and when
to raise `drowsy`. There are two versions of that logic: one for cores that
recover through a reorder buffer (ROB) and one for cores that recover
through checkpoints. This RTL builds both, around the same register file.

The published evaluation of the scheme (32 nm circuit simulation combined
with architectural state fractions) reports about 13-14 % lower register
file power for ROB-based and 12-18 % for checkpoint-based cores. The RTL
here models the logic: storage, release, retention and the control
signals. It does not model power.

## What the RTL models of a tri-state register

`tristate_reg` is one register at the logic level:

* a dead pulse clears the word to zero on that clock edge (it wins over a
  write in the same cycle);
* while `drowsy` is high the word is retained and can still be read. Writes
  are not allowed: an assertion flags them, and the model ignores them;
* otherwise it is an ordinary register.

The register also tracks `clean`: "all zeros since the last discharge, not
written since". The register file uses it for zero-write elimination (see
below). Leakage, the raised virtual ground (about 0.35 V in the circuit)
and noise margins are analog and not represented.

## The dead pulse

The circuit produces the pulse from the release level with a delay chain
and an XOR ("non-inverted dead pulse"). The pulse lasts about as long as
the discharge (tens of picoseconds, well under the 125 ps clock). Logic
clocked at the core frequency cannot make a pulse shorter than one cycle,
so `dead_pulse_gen` outputs `free & !free_last_cycle`. That is a one-cycle
pulse in the first cycle a register is free. The flop resets to 1: every
register comes out of reset already released and zeroed, so reset produces
no pulse.

## Releasing registers in a ROB core (`rob_reg_mgmt`)

This is the hardest part of the design. Each physical register keeps five
pieces of state:

| state       | meaning                                                     | set / changed by |
|-------------|-------------------------------------------------------------|------------------|
| `RegMap`    | mapped to an architectural register                         | 1 at allocation, 0 when the Redefiner commits (`unmap`) |
| `Complete`  | the register has been redefined                             | 1 when the Redefiner is renamed (`redef`), 0 when it is squashed (`restore`) |
| `RegUse`    | renamed consumers that have not read it yet                 | +1 per renamed source, -1 per consuming read |
| `LConFree`  | compiler hint: no unresolved branch between the last consumer and the Redefiner ("Case 1") | loaded with the last consumer |
| `1stMapped` | producer known, consumers still being renamed               | 1 at allocation, 0 when the marked last consumer is renamed |

A register is **free** when either condition holds:

* conventional release: `RegMap=0 && Complete=1 && RegUse=0`;
* early release: `RegUse=0 && LConFree=1 && 1stMapped=0`.

The cycle it becomes free, the dead pulse discharges it. The core sees
`free_o` and can put the register back on its free list. If the register
is not free but `RegUse=0 && 1stMapped=0`, it is **drowsy**. In every
other case it is in work state.

The two cases:

* **Case 1.** No branch lies between the last consumer and the Redefiner,
  so the value can never be needed again once the last consumer has read
  it. The register dies in the cycle after that read, possibly long
  before the Redefiner commits.
* **Case 2.** A branch in between might mispredict and bring back a path
  that still needs the old value. After the last read, the register goes
  drowsy and keeps its data at low leakage. It dies when the Redefiner
  commits. If recovery brings a new consumer, that consumer's rename
  raises `RegUse` and the register is back in work state before it is
  read.

The core must respect two rules:

* **No conventional events after an early release.** A register released
  early (Case 1) goes back on the free list and may be reallocated. So the
  core must not send `redef`, `unmap` or `restore` for that old version
  later. It knows which versions these are, from the same LConFree mark it
  passed in.
* **A marked last consumer that is itself a branch must be treated as
  Case 2.** Otherwise the wrong path after that branch could read a
  register that has already died. The test core model does this in its
  compiler pass.

## Releasing registers in a checkpoint core (`ckpt_reg_mgmt`)

Each register keeps one flag and two counters:

* `RegMapped`: cleared when the architectural register is renamed again,
  and set again by a rollback;
* `RegUse`: as in the ROB core;
* the CP counter: the number of live checkpoints that hold the register.

The conditions are:

* free (dead pulse) when `RegMapped=0`, `RegUse=0` and `CP=0`;
* drowsy when `RegMapped=0` and `RegUse=0` but `CP!=0`: the register is
  kept only for a possible rollback;
* work otherwise.

A rollback remaps the checkpoint's registers. Remap wins over unmap in the
same cycle. A drowsy register that is remapped goes straight back to work.
How the CP counter is driven is left to the core. The checkpoint-form ports
are per-register bit vectors (`unmap_i`, `remap_i`, `cp_inc_i`, `cp_dec_i`),
so that taking, releasing or rolling back a checkpoint can update a whole
map in one cycle. The CP counter is 4 bits wide, enough for an eight-deep
checkpoint buffer.

## Zero-write elimination

A released register already holds zeros. When `ZERO_WRITE_ELIM` is set (the
default), `tristate_regfile` drops a write of an all-zero word into a
register that is still `clean`. The word line is never enabled, so the
decoder, word-line driver and cells stay idle. `wr_skipped_o` reports this
in the same cycle. A zero write into a register that has been written since
its discharge is carried out normally. The zero test is made on the write
data inside the file. In a processor, the zero flag of the functional unit
can be used instead.

## Modules

```
trireg_top               both forms side by side, ports rob_* and cp_*
├── rob_trireg_rf        ROB form: event decode + 128 x rob_reg_mgmt + file
│   ├── rob_reg_mgmt     per-register flags, release/drowsy conditions
│   │   └── dead_pulse_gen
│   └── tristate_regfile 128 x 32 bit, 2 read ports, 1 write port
│       └── tristate_reg
└── ckpt_trireg_rf       checkpoint form: 128 x ckpt_reg_mgmt + file
    ├── ckpt_reg_mgmt
    │   └── dead_pulse_gen
    └── tristate_regfile
```

`trireg_pkg` holds the shared constants and types:

* `NREGS_DEF=128`, `DATA_W=32`, `NRD=2`, `PREG_W=7`, `USE_W=4`, `CP_W=4`;
* the state enum `reg_state_e` (`RS_WORK`, `RS_DROWSY`, `RS_DEAD`);
* the event structs:
  * `preg_evt_t`: {valid, preg};
  * `src_evt_t`: {valid, preg, last, lconfree};
  * `rd_req_t`: {valid, preg, consume};
  * `wr_req_t`: {valid, preg, data}.

Parameters of the subsystems and the top:

* `NREGS` (default 128). It must fit in `PREG_W`.
* `ZERO_WRITE_ELIM` (default 1).

## Interface and timing

All events are single-cycle and take effect on the rising clock edge:

* ROB form: `alloc`, the `NRD` renamed sources, `redef`, `unmap`,
  `restore`.
* Checkpoint form: `alloc`, the renamed sources, and the vectors.

Reads with `consume=1` lower `RegUse` on the same edge. Read data is
combinational from the stored words. There is no write-to-read bypass: a
value written at edge *t* can be read after *t*.

`free_o`, `dead_o`, `drowsy_o` and `state_o` are combinational from the
management flops. After the edge on which a register's last condition
changes:

* `free_o` rises, `dead_o` is high for exactly that cycle, and the cells
  are cleared on the following edge;
* or `drowsy_o` rises.

A register may be allocated in the same cycle as its dead pulse. The
dead/drowsy to work transition costs no cycle.

Assertions check that:

* only free registers are allocated;
* the counters never underflow or overflow;
* dead and drowsy are never high together;
* a drowsy register is never written.

Reset is asynchronous and active low. It leaves every register released and
zero.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_dead_pulse_gen`, `tb_tristate_reg` and `tb_tristate_regfile` drive
  random stimulus against a reference model. The register file is tested
  at full size: 128 x 32 bits, random dead pulses, drowsy registers and a
  quarter of the writes zero.
* `tb_rob_reg_mgmt` and `tb_ckpt_reg_mgmt` are directed scenarios, with the
  expected state worked out by hand for each step:
  * ROB form: Case 1, Case 2, recovery, a register with no consumers;
  * checkpoint form: released at once, held by one checkpoint, held by two
    checkpoints, rollback.
* `tb_rob_trireg_rf`, `tb_ckpt_trireg_rf` and `tb_trireg_top` put the
  subsystems under a small simulated core.

The simulated cores are `rob_core_model` and `ckpt_core_model`. Each
generates a random program with 32 architectural registers: ALU operations,
zero-producing operations and branches, a quarter of them mispredicted.
Each computes the architectural values from the program alone and runs it
through rename, execute and in-order commit, with 80 instructions in
flight.

* The ROB model runs a compiler pass that marks last consumers and Case 1.
  It squashes wrong paths one instruction per cycle.
* The checkpoint model keeps an eight-deep checkpoint buffer and rolls back
  in one cycle.

Both models check:

* every source value;
* that reads never hit a drowsy or dead register;
* every dead pulse, expected or unexpected;
* drowsy entry;
* every dropped zero write;
* the free-register count and the architectural state at the end.

Each model also counts a failure for any mechanism that never happened:

* ROB model: early release, drowsy entry, conventional release, wake-up,
  squash, zero-write drop;
* checkpoint model: release at redefinition, release after a checkpoint,
  drowsy entry, rollback wake-up, rollback, zero-write drop, full
  checkpoint buffer.

`tb_trireg_top` runs both forms together at the default parameters, with
4000 instructions each.

### Power estimate

`tb_power_model` turns the state mix into a power figure. Each register
costs power according to its state and to whether it holds a 1 or a 0.
The figures below are relative to a conventional register.

| state  | holding 1 | holding 0 |
|--------|-----------|-----------|
| work   | 1.088     | 1.040     |
| drowsy | 0.650     | 0.945     |
| dead   | 0.432     | 0.968     |

These figures are weighted by the fraction of time spent in each state.
They are then weighted again by the share of stored bits that are 1,
taken as 24 %.

The bench first checks the formula against three reference operating
points:

* 21 % work and 79 % dead gives 0.883;
* 21 % work, 45 % drowsy and 34 % dead gives 0.899;
* 13 % work, 41 % drowsy and 46 % dead gives 0.882.

A fourth reference figure is not used. For 56 % work, 9 % drowsy and 35 %
dead it lists 0.890, but the formula gives 0.961.

Then the bench runs `trireg_top` at its defaults under both core models.
It samples the state of all 256 registers every cycle and prints the
fractions and the estimate. A typical run gives about 24 % work, 10 %
drowsy and 67 % dead for the ROB form, an estimate of 0.89. The
synthetic programs are not real benchmarks, so the bench checks only
bounds:

* the fractions add up to one;
* every state occurs;
* the estimate is below 1.0;
* some but not all writes are dropped as zero writes (about a quarter in
  a typical run).

To run a testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/trireg_pkg.sv \
    tb/tb_trireg_top.sv --top-module tb_trireg_top -Mdir obj_top
./obj_top/Vtb_trireg_top
```

Replace the testbench file and `--top-module` name to run another one. The
core models take parameters `NLOG`, `ROBSZ`, `CPDEPTH`, `NINSTR` and
`WRONG` for other core sizes.

## Choices made where the scheme leaves freedom

* **Drowsy polarity.** One description of the checkpoint logic speaks of a
  *low* drowsy signal. Everywhere else, drowsy=1 is the drowsy state, and
  that convention is used throughout.
* **Checkpointed condition.** Written as "CP counter = 1" in the checkpoint
  description. It is implemented as CP != 0.
* **What the CP counter counts.** The original scheme counts reading
  instructions that carry a checkpoint tag, raised at rename and lowered at
  execute. The RTL only has generic increment and decrement inputs. The
  test core raises the counter for every register in a checkpoint's map
  when the checkpoint is taken, and lowers it when the checkpoint is
  released.
* **Pulse length.** One clock cycle, not a sub-cycle pulse.
* **When 1stMapped clears.** The scheme only says when it is set. Clearing
  it at the rename of the marked last consumer is this design's choice.
* **Complete and RegMap timing.** Complete is set at the Redefiner's
  rename and RegMap cleared at its commit.
* **Event interface.** The `restore` event for squashed Redefiners and the
  whole event interface are this design's choices.
* **Widths.** `RegUse` and `CP` are 4 bits each.
* **Ports.** One write port. The original only counts two reads and one
  write per instruction.
* **Zero detection.** Word-level, inside the file, instead of taken from
  the functional units.
* **Reset.** All registers released and zero.

## Not included

* The transistor-level cell, its sizing, layout and circuit simulation.
  The per-state power numbers used by `tb_power_model` are taken as given.
* The host core's reorder buffer, checkpoint buffer and checkpoint
  policy, free list and rename map. These are played by the testbench core
  models.
* The compiler analysis that produces the Case 1 / Case 2 marks.
* The functional units' early zero detection.
* A warning signal that wakes a register a few cycles before it is needed.
  The scheme only mentions it as an option, and it is not built.
