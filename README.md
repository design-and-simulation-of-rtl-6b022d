# A superscalar, out-of-order core for a subset of ARM

This is a small dynamically scheduled processor. It fetches one ARM instruction per cycle along a predicted path, renames its registers, and parks it in a pool of 64 entries. Any pooled instruction whose operands are ready may run on one of two ALUs or on the single load/store unit, in any order. A retirement stage then commits results strictly in program order, one instruction per cycle. It checks every branch against the committed flags. When a prediction proves wrong it throws away everything younger and restarts fetch.

The design shows how register renaming, an instruction pool and in-order commit fit together in a real pipeline, using the smallest useful instruction set. It is not a complete ARM. There is no barrel shifter, no multiply, no block transfer, no link register and no predication of non-branch instructions.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). Every block has a self-checking testbench.

## Instruction flow at a glance

```
            +-----------+   dec_t   +-----------+  col_t   +------------------------------------------+
 program -->|  feeder   |---------->| colouring |--------->| hold_unit                                |
 memory  <--| fetch, BP,|  accept   | rename    |  write   |  64 x hold_slot (ring)                    |
            |  decode   |<----------+-----------+<---------|  scheduler: 2 ALU + 1 LS priority encoders|
            +-----------+                                  |  exec_regs: 64 phys + 16 arch registers,  |
                 ^   ^     flush / redirect / BP feedback  |             2 ALUs, load/store unit       |
                 |   +-------------------------------------|  retire: in-order commit, branch check    |
                 |                                         +------------------------------------------+
                 |                                                       |  ^
                 +-- load port (program loading)             data_memory |  | ready
```

| Stage | Module | What happens in it |
|---|---|---|
| Fetch and decode | `feeder` (+ `branch_predictor`, `program_memory`) | The PC reads the program memory combinationally. The predictor chooses the next PC. The decoded instruction is latched into one output register. |
| Rename | `colouring` | Combinational lookup of the source registers. Allocation of a destination physical register when the pool accepts the instruction. |
| Pool | `hold_unit` → `hold_slot` ×64 | The instruction is written into the slot at the feed counter. It waits there until its operands are announced. |
| Issue / execute | `scheduler`, `exec_regs`, `alu` | Priority encoders pick ready slots. The operands are read and the result is written at the next clock edge. |
| Commit | `retire` | The slot at the retirement counter commits if it is complete. This copies the value into the architectural file and updates the flags. Branches are checked here. |

The top module is `ss_cpu`. It adds `data_memory` and wires the blocks together.

## Register colouring (renaming)

Every instruction that writes a register gets a fresh physical register, called its *colour*. This removes false dependencies: two independent writes to R1 can be in flight at once. Later readers of R1 are given the newest colour instead of the name R1. The `colouring` unit keeps five tables:

| Table | Indexed by | Holds |
|---|---|---|
| `fwd` | architectural register | physical register of its newest live range |
| `tag` | architectural register | 1 if it has been renamed since the last flush |
| `rev` | physical register | the architectural register it was allocated for |
| `last` | physical register | the colour that this allocation superseded (0 = none) |
| `free` | physical register | available for allocation |

**Source lookup.** A source register `a` becomes `{fwd[a], arch=0}` if `tag[a]` is set. Otherwise it becomes `{a, arch=1}`: nobody in flight writes `a`, so the value is read straight from the architectural register file. Lookup happens before the instruction's own allocation, so `ADD R1, R1, #1` reads the old R1.

**Allocation.** The destination takes the lowest-numbered free physical register. This happens at the clock edge at which the pool accepts the instruction (`write`). If no register is free, `ok` is low and the feeder stalls.

**Freeing.** A physical register cannot be freed when its own writer retires, because younger instructions may still read it. It can be freed when the *next* writer of the same architectural register retires. By then every reader of the old value has been fed, and in-order retirement guarantees those readers have retired too.

This is what `last` is for:

- When an instruction with destination `p` retires, `last[p]` is returned to the free list.
- Physical register 0 is never allocated, so `last = 0` safely means "nothing to free".
- Retirement also uses `rev[p]` to find which architectural register to copy `p` into.

**Flush.** After a misprediction the architectural file holds the complete correct state. So a flush simply clears every tag and marks every physical register (except 0) free.

## The instruction pool and operand readiness

The pool is a ring of 64 `hold_slot`s with two counters:

- The **feed counter** (`tail`) gives the slot the next instruction is written to. Feeding stalls while that slot is still occupied.
- The **retirement counter** (`head`) gives the oldest instruction.

Slots hold no operand values. Values live only in the physical register file, which has 7 read ports and 3 write ports. A slot keeps one *available* bit per source operand. An operand is available when any of the following holds:

- it is unused, or it names an architectural register;
- its physical register's valid bit (`preg_valid`, kept beside the register file) is already set when the slot is written;
- an execution unit *notifies* it. Each unit drives a notify bus carrying the physical register it will have written by the next cycle. Every waiting slot compares its operands with all three buses.

The valid bit covers a producer that finished before its consumer was fed. The notify buses cover the normal case of a consumer waiting in the pool.

A slot raises `ready` (ALU work) or `readyLS` (load/store work) when it holds an incomplete instruction whose operands are all available. Branches, NOP, HLT and REG need no execution, so they are marked complete when they are written.

## Scheduling and execution

`scheduler` holds three combinational priority encoders:

- **ALU 0** takes the lowest-numbered ready slot.
- **ALU 1** takes the lowest-numbered ready slot other than ALU 0's choice.
- **The load/store unit** takes the lowest `readyLS` slot, and only while it is idle.

Priority follows slot number, not age. After the ring wraps, a younger instruction can be preferred. This costs cycles but never correctness.

**Loads and stores run in program order.** The pool offers a load/store to the scheduler only when it sits at the retirement counter. This is this design's own rule, and it gives three guarantees:

- memory is accessed in program order;
- a store is never performed for an instruction that a flush could still cancel;
- no store-to-load forwarding is needed.

The price is that no memory access overlaps another.

**Timing in `exec_regs`:**

- **ALU:** reads its operands in the issue cycle and announces its destination on the notify bus. It writes the result and marks its slot complete at the clock edge. A dependent instruction therefore issues in the very next cycle.
- **Store:** writes memory at once and completes in the issue cycle.
- **Load:** sends a read request and waits for the memory's `ready` pulse. Then it notifies, writes and completes like an ALU.

The ALU implements all sixteen ARM data-processing operations on a register or 8-bit immediate second operand:

- **Logical operations** (AND, EOR, TST, TEQ, ORR, MOV, BIC, MVN) produce N and Z only. With no shifter there is no shifter carry, so C and V are left alone.
- **Arithmetic operations** produce all four flags.
- **ADC, SBC and RSC** take the carry from the committed flags at issue time. That is exact only when no older flag-setting instruction is still in flight.

## Retirement, branch checking and flush

Each cycle, `retire` looks at the slot under the retirement counter. If that slot is full and complete, the instruction retires: the slot is emptied and the counter advances. Depending on the instruction:

- **Register write:** the physical register is copied to the architectural file, and the superseded colour is freed.
- **ALU instruction with S set:** the committed flags take its flags, through its flag mask.
- **Branch:** its condition is evaluated on the committed flags, and the outcome is sent to the predictor as training. If the outcome differs from the prediction, three things happen in the same cycle:
  - `flush` empties every slot, the colouring tables and the feeder latch;
  - the feeder's PC is loaded with the branch's *alternative address*, which the predictor computed at fetch and stored with the instruction;
  - both ring counters return to slot 0.
- **HLT:** raises `halted`, and nothing retires after it.
- **REG:** pulses `dump` so a testbench can print the committed state.

The architectural registers and flags are only ever written here, in program order. So they are exactly the state at the mispredicted branch, and execution can resume from them.

## Branch prediction

`branch_predictor` decodes only the branch bit pattern and the 24-bit offset of the instruction at the PC. Every branch is treated as conditional, including `AL` branches.

- **Target:** `pc + 8 + 4·offset`.
- **Next PC:** the predicted address. The other address is kept as `alt_pc`.

`MODE` selects the method:

| MODE | Method |
|---|---|
| 0 | static, never taken |
| 1 | static, always taken |
| 2 | 1024-entry one-bit table (last outcome) |
| 3 (default) | 1024-entry two-bit saturating counters. Index `pc[11:2]`, reset value 2, predict taken at 2 or 3. |

Prediction is combinational. The table is updated from retirement at the next clock edge.

## Data memory

`data_memory` has 1024 32-bit words, addressed by word index. The load/store unit uses bits 11..2 of the byte address.

- **Read delay:** a counter runs 0,1,…,7,0,… continuously. A read becomes `ready` the next time the counter reaches 0, so the delay varies between 1 and 8 cycles.
- **Read data:** captured at the request.
- **Busy:** stays high until `ready`.
- **Writes:** immediate.
- **Power-up:** each word holds its own index.

This models the varying latency of a memory hierarchy cheaply. It is deliberately not realistic.

## Instruction subset and encoding

| Bits 27..25 | Class | Supported form |
|---|---|---|
| `00x` | data processing | bit 25 selects immediate (bits 7..0; rotate ignored) or register Rm (bits 3..0; shift ignored); S = bit 20 |
| `010` | load/store | LDR/STR word, 12-bit immediate offset, U bit = add/subtract, pre-indexed, no write-back |
| `101` | branch | B{cond} with a 24-bit word offset; the L bit is ignored |
| `111` | special | bits 1..0: 1 = HLT, 2 = REG, otherwise NOP |
| others | | decoded as NOP |

Only branches honour their condition code. Every other instruction executes unconditionally, whatever its condition field says.

## Measured behaviour

The testbenches run the two benchmark programs of the original work with each predictor (cycles from reset release to HLT):

| Program | never | always | 1-bit | 2-bit |
|---|---|---|---|---|
| factorial 5! | 171 | 116 | 122 | 116 |
| factorial 12! | 654 | 389 | 416 | 389 |
| infrequent-branch loop | 543 | 873 | 576 | 552 |

For comparison, the original work reports these figures, and the trend matches:

- **Factorial (always / 1-bit / 2-bit):** 97 / 106 / 86 for 5!, and 374 / 396 / 366 for 12!.
- **Infrequent-branch loop (never / always / 1-bit / 2-bit):** 542 / over 800 / 575 / 551.

Taking the 12! and infrequent-branch timings, the superscalar core is faster than a simple pipeline on predictable loops. It loses that advantage when branches are unpredictable, because each misprediction drains the whole pool.

The factorial runs here are somewhat slower than the original figures. Likely causes are the one-cycle latch between fetch and the pool, and the fact that a fed instruction can issue no earlier than the cycle after it is written. The original's exact cycle-level timing is not known.

## Departures from the original design and known limits

- **No barrel shifter:** the rotate and shift fields of operand 2 are ignored.
- **Program loading:** the program memory is loaded through a write port while the core is held in reset, instead of being a hard-wired table generated per program.
- **Loads and stores** issue only from the oldest slot (see above). The original does not say how memory ordering and speculative stores are handled.
- **ALU results** take one cycle.
- **Carry-in** for ADC/SBC/RSC is the committed carry at issue.
- **Flag mask:** logical operations do not touch C and V.
- **Free-register choice:** the lowest-numbered free register is used.
- **Reset:** a synchronous active-high reset replaces initial-value setup everywhere except the data-memory contents.
- **One-bit predictor** entries reset to "taken".
- **Not provided:** the five-stage non-superscalar pipeline that the original work used as its baseline, the link register, multiply, byte and halfword transfers, block transfers, and interrupts.

## Files

| File | Contents |
|---|---|
| `rtl/ss_pkg.sv` | widths, sizes (`NSLOTS`, `NPREG`, `NARCH`), decoded and coloured instruction structs, condition evaluation |
| `rtl/ss_cpu.sv` | top: feeder, colouring, hold_unit, program and data memory |
| `rtl/feeder.sv`, `rtl/branch_predictor.sv`, `rtl/program_memory.sv` | front end |
| `rtl/colouring.sv` | renaming |
| `rtl/hold_unit.sv`, `rtl/hold_slot.sv`, `rtl/scheduler.sv` | pool and issue |
| `rtl/exec_regs.sv`, `rtl/alu.sv`, `rtl/data_memory.sv` | execution, registers, memory |
| `rtl/retire.sv` | commit |
| `tb/arm_asm_pkg.sv` | instruction encoders and the benchmark programs |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_ss_cpu.sv` | end-to-end test at default sizes |
| `tb/tb_bp_modes.sv` | the benchmarks under all four predictors |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_ss_cpu` runs factorial, the infrequent-branch loop and a memory program. It counts each core mechanism and fails if any never happens:

- feed stall;
- flush, and correct prediction;
- dual ALU issue, and out-of-order issue;
- architectural-file operand, and register freeing;
- load wait, store, and REG dump.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/ss_pkg.sv tb/arm_asm_pkg.sv rtl/*.sv \
          tb/tb_ss_cpu.sv --top-module tb_ss_cpu -Mdir obj_ss_cpu
./obj_ss_cpu/Vtb_ss_cpu
```

Replace `tb_ss_cpu` with any other testbench name.

To run your own program:

1. Build it as a queue of words with the `arm_asm_pkg` encoders (or any ARM assembler restricted to the subset above).
2. Write it through `load_en`/`load_addr`/`load_data` while `rst` is high.
3. Release `rst` and wait for `halted`.

The sizes are parameters of `ss_pkg` (`NSLOTS`, `NPREG`) and of `ss_cpu` (`BP_MODE`, `PWORDS`). The slot and physical-register indices are derived from them.
