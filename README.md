# Temporal embedded signature monitor for a multi-cycle MIPS core

A particle strike can flip a bit in an instruction's opcode or funct field
while the processor is executing it. The processor then carries out some other
instruction. Often nothing notices, and the program silently computes the wrong
result. The monitor in this repository catches a large share of these
control-flow errors with only a few flip-flops. Its idea is simple: **in a
multi-cycle processor every instruction kind takes a fixed number of cycles,
and a corrupted instruction usually finishes at a different time.**

The temporal embedded signature monitor (TESM) decodes the instruction's
expected completion time when the instruction is fetched. When the processor
reports that the instruction has finished, the monitor compares that expected
time with the cycle in which it really finished. A mismatch raises an error
flag. The monitor needs nothing from the software. It converts part of the
silent errors into detected ones, at a cost of a decoder, six flip-flops and a
4-way multiplexer.

This repository holds:

- the monitor;
- the multi-cycle MIPS R2000-subset core it protects, with the monitor
  attached;
- XOR fault-injection points on the core's control-flow bits;
- a fault-mask generator;
- a memory;
- self-checking testbenches, including a golden/dirty fault-injection
  campaign.

All code is synthesizable SystemVerilog except the testbenches.

## The signature: completion time

The host core runs one instruction at a time through up to five control
states. The instruction kind fixes how many states it passes through:

| instruction | states visited | cycles | time code |
|---|---|---|---|
| `j` | fetch, decode | 2 | 0 |
| `beq`, `bne`, `jr` | fetch, decode, execute | 3 | 1 |
| R-type ALU, `addi`, `addiu`, `andi`, `ori`, `sw` | fetch … memory | 4 | 2 |
| `lw` | fetch … write-back | 5 | 3 |

The time code is the number of cycles minus 2. There are four distinct
completion times, so two bits hold the code. Any opcode the decoder does not
know gets code 2.

`tesm_decoder` maps the 12 control-flow bits (opcode `[31:26]`, funct `[5:0]`)
to the code. Jump-register is the one R-type instruction that needs its funct
field: it takes 3 cycles, not 4.

## How the monitor checks the time

```
              instr reg ──► decoder ──► tap0 ──► reg ──► tap1 ──► reg ──► tap2 ──► reg ──► tap3
                                          │                │                │                │
 core:  read_in (finish cycle − 2) ──► select ◄───────────┴────────────────┴────────────────┘
        check_in (last cycle)              │
                                           └──► XOR read_in ──► err_flag[1:0] (0 = match)
```

- **Cycle 1 (fetch).** The instruction is read into the core's instruction
  register.
- **Cycle 2 (decode).** Tap 0 is the decoder output for the new instruction.
- **Cycles 3, 4 and 5.** The code moves down the chain by one register per
  clock. The register that holds the current instruction's code is therefore
  always the one whose depth equals the number of cycles since decode.
- **Last cycle.** The core raises `check_in` (its `wd_check`) in the last
  cycle of every instruction. In that cycle it drives `read_in` with the number
  of the cycle it is in, minus 2. The monitor selects tap `read_in` and XORs it
  with `read_in`.

If the instruction finished when its opcode says it should, the tap holds
exactly `read_in` and the flag is zero. For example, an `add` finishes in cycle
4. It reads tap 2, the third tap, which holds code 2.

If the instruction finished early or late, the tap at that depth still holds
the decoded code of the true opcode, so the XOR is non-zero. The check is
temporal, because the code must match the time. It is also spatial, because
the code must sit in the register that matches the time.

It is essential that the monitor decodes the **uncorrupted** instruction
register, while the core's control logic acts on the possibly corrupted
control-flow bits. The decoded value is the signature, and the control's
actual behaviour is what it is checked against.

`err_flag` is combinational and valid in the instruction's last cycle. It is
zero whenever `check_in` is low. `error` is its OR.

### What it catches and what it cannot

A flipped bit is caught only if it changes the completion time:

- `lw` ↔ `sw` (one opcode bit apart) changes 5 ↔ 4 cycles and is caught.
- A jump turned into anything else is caught.
- An R-type instruction turned into another R-type ALU instruction keeps 4
  cycles and is **not** caught. The same holds for `addiu` ↔ `addi`, `andi` ↔
  `ori`, and `beq` ↔ `bne`.
- A store whose opcode is corrupted only in the memory state becomes an
  unknown opcode there. It then skips its write but still ends after 4 cycles,
  so it is not caught either.

The time codes make it possible to predict, for each instruction, how many of
its single-bit transitions into another implemented instruction are caught.
The percentages are:

| instruction | caught |
|---|---|
| `lw`, `sw`, `j` | 100 % |
| R-type ALU, `jr` | 75 % |
| `beq`, `bne`, `ori` | 50 % |
| `andi` | 33 % |
| `addi` | 25 % |
| `addiu` | 0 % |

`tb_detectability_table` checks the decoder against these numbers.

In return, the monitor never raises a false alarm. The core is compared
against a fault-free copy running in lockstep. Whenever the flag rises, the
dirty core's commit timing has already left the golden one's.

Measured by the testbenches: one fault per test, on every body instruction,
with every one of the 36 fault nodes. "Visible" means the memory bus or the
commit timing differed from the fault-free copy.

| campaign | tests | detected | undetected | benign | share of visible errors detected |
|---|---|---|---|---|---|
| every instruction kind (`tb_tesm_mips_top`) | 936 | 186 | 99 | 651 | 65 % |
| Dhrystone-section instruction mixes (`tb_dhrystone_sections`) | 4392 | 732 | 456 | 3204 | 61 % |

No test produced a false detection. The original evaluation reports about 60 %
for single instructions, which agrees with the first row. It reports 81 % for
the real Dhrystone benchmark. The second row is lower for two reasons:

- It runs only synthetic programs with each section's instruction counts.
  The sections' load counts are not available, so these programs contain
  stores but no loads.
- The classification is stricter: any difference on the bus counts as a
  visible error.

The original evaluation also expects every memory instruction to be caught.
The prediction table above supports that only for opcode flips that turn one
implemented instruction into another. Measured over all fault nodes in the characterization run, loads
reach 61 % and stores 54 % of their visible errors. Late opcode copies cause the
misses. An opcode corrupted only in the memory state makes a store skip its
write, yet it still ends after 4 cycles. In the benchmark mixes, that case
accounts for every undetected store error. An opcode corrupted only in the
write-back state changes what a load writes back, but not when it ends.

## The host core (`mips_core`)

`mips_core` is a multi-cycle, non-pipelined MIPS R2000 subset with a 32-bit
word and 32 registers. Its instructions are:

- R-type: `add`, `sub`, `and`, `or`, `slt`, `sll`, `srl`, `jr`;
- immediate: `addi`, `addiu`, `andi`, `ori`;
- memory: `lw`, `sw`;
- branches and jumps: `beq`, `bne`, `j`.

What happens in each control state:

| state | work |
|---|---|
| fetch | `instr <= mem[PC]`, `PC <= PC+1` |
| decode | Chooses the ALU operation and the immediate/register operand. A `j` loads its 26-bit target and finishes. |
| execute | Runs the ALU. A taken `beq`/`bne` sets `PC <= PC + sign-extended offset`, using the already incremented PC. `beq`, `bne` and `jr` finish here. |
| memory | R-type and immediate results are written to the register file, and these instructions finish. `sw` writes memory and finishes. `lw` reads memory. |
| write-back | `lw` writes its register and finishes. |

Conventions that differ from the MIPS architecture, kept because the monitor
was defined on a core that behaves this way:

- **Word addresses.** PC steps by 1, the branch offset is in words, and a
  jump target is a word address. No byte lanes exist.
- **Sign-extended immediates** for all I-type instructions, `andi` and `ori`
  included.
- **Unsigned `slt`.**
- **Unknown instructions act as `jr`.** An unknown funct, or an unknown I-type
  opcode, selects the jump-register operation. The instruction then jumps to
  `rs` after 3 cycles. This is how a corrupted instruction usually ends, and
  why it usually finishes at an unexpected time.

### Memory interface

The core has one word-addressed memory bus. `iram_sel` is high in fetch and
selects instruction memory. `mem_cs` and `mem_we` strobe the access.

Reads are combinational within the cycle. The core latches fetched and loaded
data at the end of the access cycle. Writes take effect at the clock edge.

`commit` (also `nstate_out`) is a registered pulse in the cycle after an
instruction's last cycle. `rst` is synchronous and active high.

`mips_memory` holds two 1024-word arrays behind this bus. It also has a
loading port used to place a program and clear data between runs.

## Fault injection

Each control state of the core reads its own copy of the opcode, and the
R-type decode reads a copy of the funct field. `fault_inject_nodes` produces
each copy as the field XOR a slice of a 36-bit mask:

| mask bits | corrupts |
|---|---|
| `[35:30]` | funct |
| `[29:24]` | opcode as seen in fetch (sets the instruction format: R, I or J) |
| `[23:18]` | opcode in decode |
| `[17:12]` | opcode in execute |
| `[11:6]` | opcode in memory |
| `[5:0]` | opcode in write-back |

A single mask bit therefore flips one control-flow bit in exactly one state,
the way a transient would. With a zero mask, the core is the plain hardened
processor.

`fault_mask_gen` is the fault-injection block:

1. `new_test` starts a test and names a target instruction, counted in
   completed instructions.
2. The selected node's mask bit is driven for every cycle of that one
   instruction.
3. When that instruction completes, the node advances by one, wrapping after
   35. A series of tests therefore walks through all 36 nodes.

`fi_en` low forces the mask to zero.

`tesm_mips_top` joins the core, the memory and the fault-mask generator. It
has separate resets for the core (`rst`) and the generator (`fi_rst`), so the
node rotation survives the per-test core reset.

## Files

| file | contents |
|---|---|
| `rtl/tesm_pkg.sv` | opcodes, funct codes, time codes, enums, mask layout |
| `rtl/tesm_decoder.sv` | control-flow bits → time code |
| `rtl/tesm.sv` | the monitor: decoder, register chain, tap select, compare |
| `rtl/mips_core.sv` | multi-cycle core with monitor and fault nodes |
| `rtl/mips_regfile.sv`, `rtl/mips_alu.sv` | datapath parts |
| `rtl/fault_inject_nodes.sv`, `rtl/fault_mask_gen.sv` | fault injection |
| `rtl/mips_memory.sv` | instruction and data memory with loading port |
| `rtl/tesm_mips_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mips_pkg.sv` | instruction encoders, program builders, and an instruction-level reference model that also gives each instruction's cycle count |
| `tb/tb_golden_dirty_bench.sv` | two top instances in lockstep, golden and dirty, with per-test classification |
| `tb/tb_dhrystone_sections.sv` | the instruction-mix campaign |
| `tb/tb_detectability_table.sv` | per-instruction detectability of the time codes |

Parameters: the memories default to `IMEM_WORDS = DMEM_WORDS = 1024`. The
monitor's `N_TAPS` defaults to 4, because 2-bit codes give four taps. Adding
instructions with new completion times means:

- widening `CODE_W`;
- adding rows to `tesm_decoder`;
- making sure the core drives `read_in` up to the longest instruction.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each needs `tesm_pkg` first and, for most, `tb_mips_pkg`. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tesm_pkg.sv tb/tb_mips_pkg.sv tb/tb_tesm_mips_top.sv --top-module tb_tesm_mips_top
./obj_dir/Vtb_tesm_mips_top
```

`tb_tesm_mips_top` runs the full-size system:

1. A program that uses every instruction kind runs fault-free. Every
   instruction's cycle count and the final data memory are checked against the
   reference model.
2. The 936-test characterization campaign follows, with its per-instruction
   table.

It also checks that every mechanism occurred:

- each completion time;
- each instruction kind, branches taken and not taken;
- a detection;
- an undetected error;
- a benign fault;
- a wrap of the node rotation.

It takes about a second.

`tb_dhrystone_sections` takes a few seconds. The simulator is two-state, and
the register file is not reset. Programs built by `tb_mips_pkg` therefore
clear all registers first. They also store all registers at the end, so that
a corrupted register shows on the bus.

## How far to trust it, and where it departs from the original description

Taken from the original description:

- the monitor's structure, time codes, tap selection and XOR compare;
- the core's state sequence, instruction set and ALU behaviour;
- the per-state fault-injection layout.

This design's own choices, not described there:

- memory sizes and the loading port;
- reset of the instruction register, control registers and monitor chain;
- register 0 hard-wired to zero;
- how the injector picks its target instruction;
- the split of the bidirectional memory bus into read and write data.

Resolved inconsistencies in the original description:

- **Branch time.** It is given as three cycles in one place and four in
  another. Three is used; it matches the state sequence.
- **Register chain.** One drawing shows four registers. The description
  implies three registers plus the decoder output. The latter is built.
- **Number of fault nodes.** It is stated as 35. The mask is 36 bits, and
  all 36 are used.
- **Fault-injection model.** A register-based injector is shown. Plain XOR
  gates on the control-flow bits are built, as in the processor description.
- **Addressing.** The processor drawing shows byte addressing (PC+4). The
  core follows the word-addressed behaviour.

Not reproduced: the area, timing and power figures of a 45 nm standard-cell
implementation. Synthesis of this RTL gives about 26 word-level cells and 6
flip-flop bits for the monitor, against about 230 cells and 156 flip-flop bits
for the system without its memories. The core is much smaller than a full
R2000, so the relative overhead is not comparable.

Also not reproduced: the compiled Dhrystone benchmark. It needs `jal`, `lui`,
byte loads and stores, and multiply, which this instruction subset lacks. Only
its sections' instruction mixes are exercised.
