# MULCOTAINT taint coprocessor in SystemVerilog

Dynamic taint analysis follows data from its sources (bytes read from a file or
a socket) to its sinks (a return address, a function pointer). Multi-tag
analysis also records *which* source bytes reached each location, and that is
slow in software: every instruction turns into a loop over bytes and sources.
This design does that work in a coprocessor beside an in-order RV64 CPU,
following the MULCOTAINT architecture. It rests on three ideas:

* **A tag is a wide bit vector.** Every byte of a register or of memory carries
  128 bits, one per taint source. A 64-bit word therefore carries a
  1024-bit tag. Propagating taint is then a handful of ORs over whole vectors,
  not a loop.
* **Rules are microcode.** Each traced instruction selects a small program
  (a *rule*) that the coprocessor runs. The program says where the operand
  tags come from, how they combine and where the result goes. Rules are
  loaded by software, so new instructions or policies need no new hardware.
* **Memory tags live in ordinary DRAM.** A multi-level *taint page table*
  maps each virtual address to a 128-byte tag block. Software builds the
  table. The rule programs walk it with 64-bit loads and then move the
  1024-bit tag as 16 back-to-back bus beats.

The CPU and the coprocessor are decoupled by a 9000-entry queue. When the
queue fills, the CPU is stalled and interrupted. Software then lets the
coprocessor drain the queue before execution continues.

## Data flow

```
 CPU WB stage ──► trace_unit ──► monitor_unit ──► trace_queue ──► control_unit ─┬─► alu_unit
   ▲  cpu_stall     (1 record)    15 matchers      9000 entries     runs a rule  ├─► taint_regfile (32 x 1024 b)
   │                              choose rule                       slot by slot ├─► filter_unit  (5 ranges)
   │                                                                             ├─► rule_store   (15 x 30 words)
 RoCC cmd/resp ◄──► rocc_cmd (configuration, status, resume)                    └─► mem_access ──► 64-bit bus
 exception  ◄────── control_unit (queue full, bad microcode)
```

| Module | Job |
|---|---|
| `mulcotaint` | Top level. Wires the blocks and brings out the CPU trace port, the RoCC command port, the exception line and the 64-bit memory bus. |
| `trace_unit` | Register at the CPU write-back stage holding `{instruction, PC, memory address}`. It drives `cpu_stall` while its record cannot be taken. |
| `monitor_unit` | 15 matchers of the form (match, mask, rule, enable) on the instruction word. The lowest-numbered hit picks the rule. Records are dropped when monitoring is off or nothing matches. |
| `trace_queue` | FIFO of `{rule, record}` entries, 9000 deep. |
| `rule_store` | 15 rules × 30 slots of 32-bit microcode words, written by command. |
| `control_unit` | Pops a record and steps through its rule. It holds six 64-bit local registers and two 1024-bit temporaries (`Taint_Reg0/1`), selects operands, and counts completed and filtered instructions. It also raises the queue-full exception and keeps the suspended state. |
| `alu_unit` | Combinational. Computes tag propagation on 1024-bit vectors and 64-bit data arithmetic for the page-table walk. |
| `taint_regfile` | One 1024-bit taint register per RISC-V register (x0 is always clean). It has three read ports, one write port, and a 64-bit chunk port for software. |
| `filter_unit` | Five address ranges `[base, limit)`. A hit ends the current rule at once. |
| `mem_access` | A single 64-bit access, or a 1024-bit tag access as 16 beats at `addr + 8*i`. |
| `rocc_cmd` | Decodes the custom instructions. Every command gets a response one cycle later. |
| `mct_pkg` | Sizes, types, microcode and command encodings. |

## Tag layout

Byte `i` of a 64-bit value owns tag bits `[128*i +: 128]`. Bit `s` of that
slice means "this byte depends on source byte `s`". The layout is the same for
taint registers, for `Taint_Reg0/1` and for a 128-byte tag block in memory.
Beat `k` of a tag transfer carries bits `[64*k +: 64]` and goes to address
`block + 8*k`.

## Microcode

A rule is up to 30 words. Execution starts at slot 0 and ends at an `FN_END`
word (encoding 0, which is also the reset value), at a filter hit, or after
slot 29.

```
 31     27 26   23 22   19 18   15 14            0
 ┌────────┬───────┬───────┬───────┬───────────────┐
 │   fn   │  in1  │  in2  │  out  │      imm      │
 └────────┴───────┴───────┴───────┴───────────────┘
```

Operand selects (4 bits) mean different things for data and tag microcodes:

| Code | Data operand (64 bits) | Tag operand (1024 bits) |
|---|---|---|
| 0–5 | Local_Reg0–5 | 0 rs1 tag, 1 rs2 tag, 2 rd tag, 3 Taint_Reg0, 4 Taint_Reg1 |
| 6 | memory address of the traced instruction | – |
| 7 | root address of the taint page table | – |
| 8 | `imm`, zero-extended | – |
| 9 | PC of the traced instruction | – |
| 15 | zero | zero |

"rs1/rs2/rd tag" means the taint register named by that field of the traced
instruction. A tag result can only be written to one of these taint registers
or to Taint_Reg0/1. A data result can only be written to a local register.

| fn | Name | Does |
|---|---|---|
| 1 | `FN_ALU_TAINT_REG` | tag propagation for a register–register instruction (see below) |
| 2 | `FN_ALU_TAINT_IMM` | tag propagation for a register–immediate instruction |
| 3 | `FN_ALU_TAINT_SHIFT` | tag propagation for a shift by register |
| 4 | `FN_PART_TAG_LOAD` | extract the tags of the bytes a load reads |
| 5 | `FN_PART_TAG_STORE` | OR the tags of stored bytes into a tag block |
| 6 | `FN_MASK_TAG` | clear the tags of the bytes a store writes |
| 7 / 8 | `FN_WRITE_TAG` / `FN_READ_TAG` | 16-beat tag transfer at the address in `in2` |
| 9 / 10 | `FN_WRITE_DATA` / `FN_READ_DATA` | single 64-bit transfer at the address in `in2` |
| 11 | `FN_FILTER` | end the rule if `in1` lies in an enabled filter range |
| 16–24 | `FN_ADD SUB SL SR SLT SEQ AND OR XOR` | 64-bit data arithmetic (`SL`/`SR` logical, `SLT` signed, `SEQ` gives 1/0) |

### Propagation

The tag microcodes read the traced instruction and pick a variant by its
opcode, funct3, funct7 bit 5 and shift amount. In every case a result byte gets
the OR of the tags of the operand bytes its value can depend on.

| Instruction class | Result byte `i` |
|---|---|
| ADD, SUB, ADDI | OR of operand bytes `0..i` (the carry chain) |
| AND, OR, XOR and their immediates | OR of operand byte `i` |
| SLT, SLTU, SLTI, SLTIU | byte 0 = OR of all operand bytes; the other bytes are clean |
| SLLI, SRLI, SRAI | the source byte shifted by `sh/8` positions, plus its neighbour when `sh` is not a multiple of 8. SRAI also ORs the sign byte into every byte the sign fill reaches. |
| SLL, SRL, SRA | every byte = OR of all rs1 bytes and rs2 byte 0, because the amount is data |
| `*W` forms | computed on bytes 0–3; bytes 4–7 copy byte 3 |
| loads (`PART_TAG_LOAD`) | the accessed bytes (given by funct3 size and address bits [2:0]) move to bytes 0 upwards. Signed loads copy the top loaded byte's tag upwards. |

Only the ADD behaviour is given by the MULCOTAINT description. The other rows
are this design's reading of the instruction semantics. They are the part to
check first if a different policy is wanted.

### Example rules

These are the rules the end-to-end testbench loads (`tb/mct_tb_pkg.sv`).

Taint page-table walk (16 words), with a 3-level table of 4096-entry levels
indexed by VA bits [38:27], [26:15] and [14:3]:

```
FILTER  MADDR                       ; skip filtered memory
repeat for level = 0,1,2 (shift = 27,15,3):
  SR    LR0 = MADDR >> shift
  AND   LR0 = LR0 & 0xFFF
  SL    LR0 = LR0 << 3              ; 8-byte entries
  ADD   LR0 = LR0 + (level0 ? PTROOT : LR1)
  READ_DATA LR1 = mem[LR0]          ; next table / finally the tag block address
```

LOAD: `walk; READ_TAG TR0 = tag[LR1]; PART_TAG_LOAD TR0 = part(TR0); ALU_TAINT_REG rd = TR0 | 0`

STORE: `walk; READ_TAG TR0; MASK_TAG TR0; PART_TAG_STORE TR0 |= part(rs2); WRITE_TAG tag[LR1] = TR0`

ADD and similar: a single `ALU_TAINT_REG rd = f(rs1, rs2)`.

The table format, the number of levels and the rule for each opcode all
belong to software. Only the microcode set and the operand selects are fixed
in hardware.

## Queue full, suspend and resume

1. A record that a matcher selects can only leave the trace register if the
   queue has room. Otherwise `cpu_stall` stays high and the CPU must hold
   write-back.
2. On the cycle after the queue becomes full, the control unit pulses
   `exc_valid` with `exc_cause = 1` and sets *suspended*. It then pops nothing.
3. The handler reads `CHECK_STATUS` (bit 1 = suspended) and sends `RESUME`.
   The coprocessor drains the queue. The stalled record enters as soon as
   there is room. If the queue fills again, a new exception is raised.
4. To wait for the end of analysis (the `SYSCALL_WAIT` idea), software polls
   `CHECK_STATUS` until bit 0 (*finished*: queue empty and no rule running)
   is set.

An unknown function code ends the rule and raises `exc_cause = 2`.

## Commands

The `cmd_funct` field carries a custom-instruction function code. `resp_valid`
follows one cycle after `cmd_valid`.

| funct7 | Command | Operands / response |
|---|---|---|
| 0 | MONITOR_START | – |
| 1 | MONITOR_END | – |
| 2 | SET_PAGETABLE | rs1 = root table address |
| 3 | CHECK_STATUS | response `{n_done[31:0], 2'b0, q_count[13:0], n_filtered[11:0], busy, monitoring, suspended, finished}` |
| 4 | RESUME | – |
| 5 | CFG_MONITOR | rs1 = `{mask[31:0], match[31:0]}`; rs2[3:0] matcher, [7:4] rule, [8] enable |
| 6 | CFG_FILT_BASE | rs1 = base; rs2[2:0] filter |
| 7 | CFG_FILT_LIM | rs1 = limit (exclusive); rs2[2:0] filter, [8] enable |
| 8 | WRITE_UCODE | rs1[31:0] = word; rs2[4:0] slot, [11:8] rule |
| 9 | WRITE_TREG | rs1 = 64 tag bits; rs2[3:0] chunk, [12:8] register |
| 10 | READ_TREG | response = 64 tag bits; rs2 as for WRITE_TREG |

`WRITE_TREG` is how taint sources in registers are set. Memory sources are set
by software writing tag blocks through the page table.

## Timing

* The trace register takes a record each cycle unless it is stalled.
  Monitoring adds no cycle.
* Taking a record from the queue takes one cycle. Each ALU word takes one
  cycle, and so does the closing `FN_END`. A register–register instruction
  therefore occupies the control unit for 3 cycles, and `busy` is high for
  the last 2 of them.
* Memory words wait for the bus. A load rule does 3 table reads and 16 tag
  beats (19 bus beats). A store rule does 3 table reads, 16 tag reads and
  16 tag writes (35 beats).
* Bus: `mem_req_valid`/`mem_req_ready` per beat, then `mem_resp_valid` with
  the read data or the write acknowledge. One beat is outstanding at a time.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `QUEUE_DEPTH` | 9000 | queue entries |
| `NUM_MON` | 15 | instruction matchers |
| `NUM_RULES` | 15 | rules in the rule store (assumed; at most 16, 4-bit index) |
| `SLOTS` | 30 | microcode words per rule |
| `NUM_FILT` | 5 | filter ranges |

The tag geometry (128 sources × 8 bytes, 16 beats), the 32 taint registers and
the six local registers are package constants in `mct_pkg`.

## How far it follows MULCOTAINT

Taken from the published design:

* the block structure;
* the 1024-bit tag made of 128 sources × 8 bytes;
* 32 taint registers;
* the list of microcodes and their operand kinds;
* 16-beat tag transfers over a 64-bit bus;
* a 3-level page table over the 39-bit virtual address that keeps the low
  3 address bits;
* the 9000-entry queue, 15 monitoring units, 30 microcodes per rule and five
  filter units;
* the stall / interrupt / resume protocol, Monitor_Start/End, passing the
  page-table root, and waiting for completion.

This design's own choices:

* all encodings (microcode word, operand selects, command codes, status word);
* the matcher form (mask and match, lowest index wins);
* the propagation formulas other than ADD;
* OR-merge plus MASK_TAG for stores;
* the filter range form `[base, limit)`;
* the number of rules (15);
* the MADDR, PC and PTROOT operand selects;
* the bus handshake;
* the chunk port for reading and writing taint registers.

The published evaluation used three of the five filter units. The hardware
here keeps five.

In the published flow, the CPU resumes only after the coprocessor has finished
all queued work. Here the hardware releases the stall as soon as the queue
has room. A handler that wants the published behaviour polls *finished*
before it returns.

Not included:

* the CPU and its pipeline changes beyond the trace port;
* DRAM;
* the operating-system and library support that builds the page table, labels
  sources and handles sinks.

The queue is a plain array with a combinational head read. A block-RAM mapping
would need a registered read and a one-cycle pop latency in `control_unit`.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Shared testbench code:

* `tb/mct_tb_pkg.sv`: instruction encoders, the example rules, and a
  reference propagation model written independently of `alu_unit` (bit-level
  shifts and carry chains);
* `tb/mem_model.sv`: a sparse memory with latency and back-pressure.

Example, the end-to-end test at full size (`-y` lets verilator find each
module in the file of the same name; `-Wno-fatal` keeps width warnings in the
testbenches from stopping the build):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -y rtl -y tb \
  rtl/mct_pkg.sv tb/mct_tb_pkg.sv tb/tb_mulcotaint.sv --top-module tb_mulcotaint -o sim
./obj_dir/sim
```

For a block, name its testbench instead, for example `tb/tb_control_unit.sv
--top-module tb_control_unit`.

`tb_mulcotaint` runs the top with every parameter at its default. It:

1. loads five rules and eight matchers;
2. sets a filter range and taint sources in registers and memory;
3. retires 200 instructions with monitoring off;
4. retires 3000 random loads, stores, ALU and shift instructions (and
   unmatched ones) with monitoring on;
5. retires 9300 loads back to back, which overflows the 9000-entry queue many
   times.

After each phase it compares all 32 taint registers and every memory tag
block with the reference model. It also counts CPU stalls, queue-full
exceptions, resumes, polls while busy, filtered instructions, dropped
records and each rule type, and fails if any of them never happened. The run
takes about one second of simulation after a 1–2 minute build.

`tb_overflow_trace` also uses the full-size top. It replays the instruction
trace of a byte-copy loop that overruns a 24-byte stack buffer onto a saved
function pointer, followed by `ld` and `jalr` through that pointer. Every
input byte is its own taint source. The test checks that byte `j` of the
loaded pointer is tainted by input byte `24+j` alone. That identifies input
bytes 25–32 as the ones that control the jump, which is the kind of answer
multi-tag analysis gives for a buffer-overflow case.

Real programs (SPEC CPU, web servers, the vulnerability suites used to
evaluate the original design) cannot be run here, because there is no CPU
model. The testbenches drive the trace port directly.
