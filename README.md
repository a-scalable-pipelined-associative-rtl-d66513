# Pipelined associative SIMD processor with a reconfigurable PE network

This is an 8-bit SIMD processor for search-heavy embedded work such as string
matching, data mining and bioinformatics. One Control Unit issues a single
instruction stream to many small processing elements (PEs), which run in
lock-step. The processor is also *associative*: it addresses data by content.
Every PE compares its local data with a broadcast key. The PEs that match
become **responders**, and later instructions act only on them. Two things
set this design apart from a plain SIMD array:

* **Every PE is pipelined.** The processor has five stages: IF, ID, EX, MEM
  and WB. A SIMD array normally gains speed only by adding PEs. Here each PE
  also overlaps instructions.
* **The PE network reconfigures itself from the search result.** A PE that is
  not a responder takes itself out of the linear neighbour network, and data
  passes straight through it. Responders that are far apart in the array
  therefore talk to each other as if they were neighbours.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. Every
module has a self-checking testbench in `tb/`.

## Block structure

```
                 +-------------------------+      control word (ctrl_t) -----------+
                 | Control Unit            |      immediate data (8b) ---------+   |
                 |  PC -> instr. memory    |                                   |   |
                 |  -> IF/ID -> decoder ---+-----------------------------------+---+
                 +-----------^-------------+                                   |   |
                    redirect | target                                          v   v
                 +-----------+-------------+  broadcast register (8b)  +--------------------+
                 | Sequential PE           |-------------------------->| PPE 0 <-> PPE 1 <->|
                 |  regfile, branch cmp    |                           |  ...  <-> PPE N-1  |
                 |  ID/EX ALU EX/MEM DMEM  |                           | (linear network,   |
                 |  MEM/WB                 |                           |  max/min unit)     |
                 +-------------------------+                           +--------------------+
```

| Module | Role |
|---|---|
| `asc_processor` | Top level. Holds the three units, the three broadcast buses, the host ports and the start/busy handshake. |
| `asc_control_unit` | IF stage and the decode half of ID: program counter, `asc_instr_mem`, IF/ID latch, `asc_decoder`. |
| `asc_spe` | Sequential PE. Runs scalar instructions, resolves branches and drives the broadcast-register bus. |
| `asc_ppe_array` | `NUM_PE` Parallel PEs. Chains their Data Switches into the linear network and holds the max/min unit. |
| `asc_ppe` | One Parallel PE: register file, Data Switch, comparator, mask stack, masked ID/EX latch, ALU, data memory and WB multiplexer. |
| `asc_data_switch` | The network node: six inputs, four outputs, five routing modes, plus Bypass. |
| `asc_mask_stack` | The 8 x 1 responder stack. |
| `asc_comparator`, `asc_maxmin` | The associative search (compare) and the max/min search. |
| `asc_alu`, `asc_regfile`, `asc_data_mem` | Shared datapath parts: 8-bit ALU, 16 x 8 register file, 256 x 8 memory. |
| `asc_pkg` | Widths, opcode and mode enums, the instruction and control-word structs. |

## The pipeline

| Stage | Control Unit | Sequential PE | Parallel PE |
|---|---|---|---|
| IF  | read instruction memory at PC | | |
| ID  | decode; broadcast the control word and immediate | read registers; branch comparator; drive the broadcast bus | read registers; Data Switch; comparator; push/pop the mask stack |
| EX  | | ALU | ALU (only if a responder) |
| MEM | | 256 x 8 data memory | 256 x 8 data memory |
| WB  | | memory data or ALU result to a register | same |

The ID stage is split. The Control Unit decodes, and each PE finishes ID
locally with its own register reads. All PEs see the same control word in the
same cycle. A parallel instruction therefore occupies the ID stage of every
PE at once.

**Throughput and timing.** The processor issues one instruction per cycle.
A taken branch (`BEQ`, `BNE`, `JMP`) is resolved in ID by the Sequential
PE's comparator. The Control Unit then squashes the one instruction it had
already fetched, so each taken branch costs one bubble. A program that
issues *n* instructions and takes *b* branches keeps `busy` high for
*n + b + 4* cycles after the start pulse.

**Hazards are the program's job.** The pipeline has no interlock and no
forwarding. The register file is write-through: a read in ID returns a value
being written in WB in the same cycle. A result can therefore be used by the
third instruction after the one that produces it. Fill the gap with
independent instructions or `NOP`s. The mask stack lives in ID, so a search
result affects the very next instruction.

## Responders and the mask stack

Each Parallel PE has an 8-deep, 1-bit mask stack. Its top bit is the
responder flag.

* **Search.** `CEQ`, `CNE`, `CLT` and `CGE` compare operand A with operand B
  (unsigned) and push the result. `MAX` and `MIN` push "my operand A is the
  extreme value among the responders". A push stores the new bit ANDed with
  the current top. Searches therefore nest: each one narrows the current
  responder set.
* **Pop.** `POP` restores the previous set. After reset the whole stack is 1,
  so every PE responds.
* **Masking.** The top bit enables the PE's ID/EX latch. In a non-responder,
  an ALU or memory instruction becomes a bubble and its operands are not
  latched. Instructions that are already past ID still finish. The mask
  stack itself is updated in every PE, responder or not, so all stacks stay
  aligned.

The responder bits leave the top as `responders[NUM_PE-1:0]`.

## The Data Switch and the reconfigurable network

This is the least obvious part of the design. Each Parallel PE has a Data
Switch between its register file and its ID/EX latch. Its six inputs are:

* the two register-file read ports, `rf1` (register `rs1`, the "left"
  register input) and `rf2` (register `rs2`, the "right" one);
* the Control Unit's immediate;
* the Sequential PE's broadcast register;
* the data arriving from the left neighbour and from the right neighbour.

Its four outputs are operands A and B (to the comparator and the ID/EX latch)
and the data sent to each neighbour. Each parallel instruction carries a
3-bit mode:

| Mode (`dsw`) | to left | to right | operand A | operand B |
|---|---|---|---|---|
| Computation | 0 | 0 | rf1 | rf2 |
| Broadcast | 0 | 0 | rf1 | immediate (`bsel`=0) or SPE register `rs2` (`bsel`=1) |
| Move Left | rf1 | 0 | rf2 | from right |
| Move Right | 0 | rf2 | rf1 | from left |
| Move Both | rf1 | rf2 | from left | from right |
| **Bypass** (mask top = 0, any mode) | from right | from left | - | - |

The PEs form a chain: PE *i*'s "to right" feeds PE *i+1*'s "from left", and
PE *i+1*'s "to left" feeds PE *i*'s "from right". Both ends receive 0; the
network does not wrap around. Bypass makes every non-responder a plain wire.
In a move, each responder therefore exchanges data with the **nearest
responder** on each side, however many PEs lie between them. The whole
transfer is one combinational path through the bypassed PEs, within the
single ID cycle. This is cheap, but the path grows with the array, and on an
FPGA it sets the clock rate of large arrays. A pipelined network with
registers every few PEs would shorten it; that is not built here.

Examples:

* Add the left responder's `R1` to your own `R2` and write `R3`:
  `ADD` with `dsw`=Move Right, `rd`=3, `rs1`=2, `rs2`=1. Every responder
  sends its `R1` to the right (`rf2`). Each one adds what arrives from its
  left to its own `R2` (`rf1`).
* Average the two neighbours' `R1`: `AVG` with `dsw`=Move Both and
  `rs1`=`rs2`=1.
* Copy the neighbour's value: `MOV` (operand B passes through the ALU).

The network value reaches the register file through the ALU and the normal
WB path.

## Instruction set

Every instruction is a 32-bit word (`asc_pkg::instr_t`):

| Bits | Field | Meaning |
|---|---|---|
| 31:27 | `op` | opcode |
| 26 | `par` | 1 = parallel (PE array), 0 = scalar (Sequential PE) |
| 25:22 | `rd` | destination register |
| 21:18 | `rs1` | source 1 |
| 17:14 | `rs2` | source 2; also the SPE register broadcast when `bsel`=1 |
| 13:11 | `dsw` | Data Switch mode (parallel only) |
| 10 | `bsel` | parallel: broadcast source. Scalar: operand B is the immediate. |
| 9:8 | - | write 0 |
| 7:0 | `imm` | immediate, memory offset or branch target |

| Opcode | Effect |
|---|---|
| `NOP` 0, `HALT` 1 | `HALT` stops fetching; `busy` falls when it leaves WB |
| `ADD` `SUB` `AND` `OR` `XOR` 2-6 | rd = A op B |
| `SHL` `SHR` 7-8 | rd = A shifted by one |
| `AVG` 9 | rd = (A + B) >> 1, using a 9-bit sum |
| `MOV` 10 | rd = B |
| `LD` 11 / `ST` 12 | rd = mem[A + imm] / mem[A + imm] = B |
| `CEQ` `CNE` `CLT` `CGE` 13-16 | parallel: push (A rel B) & top |
| `MAX` `MIN` 17-18 | parallel: push (A == extreme A over the responders) & top |
| `POP` 19 | parallel: pop the mask stack |
| `BEQ` `BNE` 20-21 | scalar: if R[rs1] ==/!= R[rs2] then PC = imm |
| `JMP` 22 | scalar: PC = imm |

For a scalar instruction, A = R[rs1] and B = R[rs2] (or `imm` when
`bsel`=1). For a parallel instruction, A and B come from the Data Switch.
`tb/asc_asm_pkg.sv` has small functions that build these words.

## Running a program

The host drives the processor through three ports, usable only while `busy`
is low:

* `imem_*` writes the program;
* `sdm_*` reads and writes the Sequential PE's memory;
* `pdm_*` reads and writes the memory of PE `pdm_pe`.

Reads are combinational. A one-cycle `start` pulse runs the program from
address 0. `busy` stays high until `HALT` leaves WB; by then every older
instruction, scalar or parallel, has retired. Per-PE data can only be
loaded through the host port, since every PE receives the same instruction
and immediate.

### Worked program: exact string matching

`tb/asc_vldc_prog_pkg.sv` holds an exact-match string search with one text
character per PE.

**Data layout.** PE 0 holds a sentinel character, and each PE keeps
`text$`, `counter$` and `match$` in its memory. The pattern sits in the
Sequential PE's memory.

**Main loop.** The program walks the pattern from its last character to its
first. For each pattern character it:

1. searches for PEs whose `text$` equals the character (broadcast from an
   SPE register) and whose `counter$` equals the number of characters
   matched so far;
2. has those responders send `counter$ + 1` to their left neighbour
   (Move Left);
3. stores the received value as the neighbour's `counter$`.

**Final step.** A last search finds `counter$ == pattern length`. Those PEs
send 1 to the right, which sets `match$` on the first character of every
occurrence.

**Cycle count.** The program issues 52 + 15(L - 1) instructions for a
pattern of length L.

**Coverage phases.** Two more short phases exercise the remaining
mechanisms. One averages the neighbours (Move Both) and searches for the
maximum. The other moves data between non-adjacent responders through
Bypass.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `NUM_PE` | 4 | `asc_processor`, `asc_ppe_array`. The published 4-PE build. Tested up to 70. |
| `DMEM_DEPTH` | 256 | Data memory of the SPE and of each PPE (256 x 8). |
| `IMEM_DEPTH` | 256 | Instruction memory (this design's choice). |
| `MASK_DEPTH` | 8 | Mask stack. |

The word width (8), the register count (16) and the instruction width (32)
are package constants in `asc_pkg`.

## What follows the published architecture and what is this design's own

**Taken from the published architecture:**

* the five stages and their contents;
* the CU / SPE / PPE split and the three broadcast buses;
* the 8-bit datapath, the 16 x 8 register file, the 256 x 8 data memory and
  the 8 x 1 mask stack;
* the Data Switch's ports, its five modes and Bypass;
* the mask top gating the ID/EX latch;
* the purely combinational bypass chain;
* the string-matching algorithm.

**This design's own choices:**

* the whole instruction encoding and opcode list;
* the ALU operation set;
* which operand (A or B) each Data Switch source lands on, and sending 0
  when not transmitting;
* no wrap-around at the array ends;
* push = result AND current top; reset to all responders;
* write-through register file;
* one-bubble branches; `HALT`, `start`/`busy` and the host ports;
* the max/min search comparing a register (operand A) rather than reading
  memory directly;
* the same 256 x 8 memory size for each Parallel PE as for the Sequential
  PE;
* 256 instruction words.

**Known departures and omissions:**

* One instruction cannot combine neighbour data with broadcast data. The
  Broadcast mode pairs a register with the broadcast value, and the move
  modes pair a register with neighbour data. Such a combination takes two
  instructions.
* Not built, because the published architecture leaves them to future work:
  * pipelined broadcast to the PEs;
  * the 2D-mesh network;
  * a network with intermediate registers;
  * multi-threading;
  * several instruction streams (multiple Control Units).
* "Virtual PEs" (more data rows than PEs) are a programming convention with
  no hardware of their own.
* The FPGA results (LE counts and clock rates) are not reproduced.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/asc_pkg.sv tb/asc_asm_pkg.sv tb/asc_vldc_prog_pkg.sv \
    tb/tb_asc_processor.sv --top-module tb_asc_processor
./obj_dir/Vtb_asc_processor
```

The unit testbenches (`tb_asc_<module>.sv`) need only `rtl/asc_pkg.sv`,
`tb/asc_asm_pkg.sv` and the search paths. Each one compares against values
computed independently in the testbench. The processor-level testbenches:

| Testbench | Size | What it does |
|---|---|---|
| `tb_asc_processor` | 8 PEs | The 5-PE worked example (text "ABAA" after a sentinel, pattern "AB") and eight random searches. Checks every memory result and the exact cycle count. Counts each mechanism and fails if any never occurs: branch flush, masked instruction, Bypass, each Data Switch mode, both broadcast sources, push/pop, max search, loads and stores. |
| `tb_asc_processor_full` | defaults (4 PEs) | The same program on "ABA" and random texts. |
| `tb_asc_processor_scaled` | 50 and 70 PEs | Random string searches on both arrays. |

To change the array size, override `NUM_PE` on `asc_processor`. The host
port `pdm_pe` is `$clog2(NUM_PE)` bits wide.
