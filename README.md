# A vector/VLIW processor for dynamic-programming kernels

Sequence-alignment algorithms such as Smith-Waterman fill a score matrix in
which every cell depends on its left, upper and upper-left neighbours. The
cells on one anti-diagonal are independent of each other. The usual way to
exploit that is SIMD, one instruction over a wide vector of cells. This
processor combines SIMD with VLIW:

- Each **execution unit** holds a 32-bit vector of four 8-bit cells.
- A **bundle** gives each execution unit its own instruction.
- The units can therefore run different steps of the recurrence in the same
  cycle, for example one compares symbols while another takes a maximum. This
  is instruction-level parallelism on top of the data-level parallelism inside
  each vector.
- A separate **Data Stream Unit** runs in parallel with the execution units.
  It moves data between memory and a small window of shared registers, and
  shifts that window from unit to unit.

The default configuration has 4 execution units, each with 32 registers of
32 bits, and issues a 163-bit bundle every cycle.

The RTL in `rtl/` is synthesizable SystemVerilog. Every block has a
self-checking testbench in `tb/`. Two end-to-end testbenches run Smith-Waterman
programs on the whole processor.

## The bundle

```
 162 ............ 131 | ... | 98 ........ 67 | 66 ........ 35 | 34 ........ 0
   unit 3 (32 bits)   | ... | unit 1         | unit 0         | Data Stream (35)
```

Unit `u` occupies bits `[35+32u +: 32]`. All slots of a bundle enter EXECUTE
together.

### Execution-unit instruction (32 bits)

| bits  | field  | meaning |
|-------|--------|---------|
| 31    | `we`   | write the result to `Rd` |
| 30    | `Td`   | three-way write (see below) |
| 29:25 | `Rd`   | destination |
| 24    | `Ta`   | operand A comes from the left neighbour's memory registers |
| 23:19 | `Ra`   | operand A |
| 18    | `Tb`   | same as `Ta`, for operand B; also the immediate's top bit |
| 17:13 | `Rb`   | operand B |
| 12:6  | opcode | see table |
| 5:0   | OpControl | `[0]` immediate, `[1]` unsigned, `[3:2]` sub-operation, `[5:4]` element size (0: 4×8, 1: 2×16, 2: 32) |

With `OpControl[0]` set, operand B is the immediate `{Tb,Rb}`. The immediate
is sign-extended and copied into every element.

| opcode | name | operation |
|-------:|------|-----------|
| 0  | NOP    | – |
| 1  | SUM    | `Ra + Rb`; sub-op 1 computes `Ra - Rb` |
| 2  | MAX    | element-wise maximum |
| 3  | MAXMOV | `Rd = max(Ra,Rb)` and `R(d+2) = R(b+2)`, which carries a traceback tag along with the maximum |
| 4  | MUL    | element-wise product |
| 5  | CMP    | 1/0 per element; sub-op 0 EQ, 1 LT, 2 GT |
| 6  | SHIFT  | sub-op 0 SRA, 1 SRL, 2/3 SLL; the amount is per element |
| 7  | LOGIC  | sub-op 0 OR, 1 AND, 2 XOR |
| 8  | LD     | `Rd` takes the RAM read data: LD (sub-op 0) the word, LH (sub-op 2) the half-word selected by `Ta`, LB (sub-op 1) the byte selected by `{Ta,Tb}`, zero-extended |
| 9  | IDXM   | present address `Ra+Rb` to the RAM read port |
| 10 | IDXS   | present address `Ra+Rb` to the scratchpad |
| 11 | SPLD   | `Rd` takes the scratchpad read data, with the same part selection as LD |
| 12 | ST     | `RAM[Ra] = Rb`: SD (sub-op 0) all bytes, SH (sub-op 2) the half selected by `Ta`, SB (sub-op 1) the byte selected by `{Ta,Tb}`; the data must already sit in that lane |
| 13 | BR     | delayed branch; `OpControl[2:0]` is the condition (0 always, 1 EQ, 2 NE, 3 LT, 4 GT, comparing `Ra` and `Rb`); the target is `{OpControl[5:3], Td, Rd}` |

**Three-way write (`Td`).** An ALU instruction with `Td` set performs three
operations at once:

```
R(d+k) = R(a+k) op R(b+k)    for k = 0, 8 and 12
```

A load with `Td` set writes the same value into `Rd`, `R(d+8)` and `R(d+12)`.
This fits the three candidate scores of the recurrence (diagonal, up and left)
when they are kept in registers 8 and 12 apart. A single `SUM` then updates
all three.

### Data Stream Unit instruction (35 bits)

| bits  | field | meaning |
|-------|-------|---------|
| 34    | shift_en   | shift the memory-register window |
| 33    | shift_left | 1: unit `u` takes from unit `u+1`; 0: from unit `u-1` |
| 32:31 | shift_addr | which memory register (R28 + n) shifts |
| 30    | mwe        | store: `RAM[w_madd]` = `R(28+w_radd)` of unit `w_unit` |
| 29:28 | w_unit     | |
| 27:18 | w_madd     | |
| 17:16 | w_radd     | |
| 15    | addr_en    | index: present `l_madd` to the RAM read port |
| 14    | reg_we     | load: `R(28+l_radd)` of unit `l_unit` = RAM read data |
| 13:12 | l_unit     | |
| 11:2  | l_madd     | |
| 1:0   | l_radd     | |

## Memory registers and sniffing

Registers R28–R31 of every unit are **memory registers**. They are the only
registers the Data Stream Unit can read or write. If the Data Stream Unit and
the owning unit write the same memory register in one cycle, the Data Stream
Unit wins. A load also wins over a shift.

A unit can read its **left neighbour's** memory registers without a move
instruction. To do so it sets `Ta` or `Tb` on a non-memory instruction whose
register number is 28 or higher. This is called sniffing. Unit 0 has no left
neighbour, so it reads its own. In Smith-Waterman this passes the last row of
one unit's four cells to the first row of the next unit every iteration, at
no cost.

The window shift moves one memory register across all units in a single
cycle. A right shift makes unit `u` take unit `u-1`'s value, while unit 0
receives what the Data Stream Unit loads in the same bundle. The Smith-Waterman
kernel uses this to stream the reference sequence through the units.

## Pipeline

There are four stages: FETCH, DECODE, EXECUTE and WRITE-BACK.

- **FETCH** reads the instruction memory synchronously at the PC.
- **DECODE** splits the bundle into typed slots.
- **EXECUTE** does the following:
  - reads operands;
  - arbitrates the shared resources;
  - drives the memories;
  - evaluates branches.
- **WRITE-BACK** writes the register banks.

**Forwarding.** EXECUTE reads a "view" of each register bank in which the
writes now in WRITE-BACK are already applied. A dependent instruction can
therefore sit in the very next bundle.

**Shared functional units and structural stalls.** Units do not own their
ALUs. A pool holds a fixed number of functional units per class, and the
defaults are:

| class | count |
|-------|------:|
| SUM | 2 |
| MAX | 2 |
| MUL | 1 |
| CMP | 2 |
| SHIFT | 1 |
| LOGIC | 1 |

The RAM read-index port, the RAM write port and the scratchpad index port
count as one resource each.

Each cycle the pool grants requests in unit order. When a bundle asks for more
units of a class than exist, the bundle stays in EXECUTE and the front end
freezes. A `done` mask records which slots have been served, and the remaining
slots are granted in the following cycles. Operands are captured in the
bundle's first EXECUTE cycle. As a result, a held bundle behaves exactly like
one issued in a single cycle, only later. The Data Stream Unit acts only in
that first cycle. It has priority on both RAM ports, so a unit that needs the
same port waits.

**Branches** are delayed by two bundles, the two slots that follow are always
executed. They resolve in EXECUTE. If several units branch in one bundle, the
lowest-numbered unit wins.

**Memories.**

- The RAM is dual-ported, with one write port and one read port, and 32-bit
  words with byte enables.
- A read takes two steps: an index instruction presents the address, and a
  load two cycles later takes the data. The data stays valid until the next
  index.
- The scratchpad is load-only for the execution units. Only the Data Stream
  Unit writes it: its stores to RAM addresses `[SPAD_BASE, SPAD_BASE+SPAD_DEPTH)`
  (default 768…1023) go to the scratchpad instead. It is used for constants
  such as gap penalties.

## Blocks

| file | role |
|------|------|
| `vliw_pkg.sv` | widths, instruction structs, opcodes, FU classes, the element-wise operation function shared by RTL and testbenches |
| `vliw_top.sv` | pipeline, operand forwarding, stall control, memory-port multiplexing with Data Stream priority, event outputs |
| `instr_mem.sv` | bundle memory, 512 × 163 bits, synchronous read with enable (the enable holds the bundle during a stall) |
| `pc_jump_ctrl.sv` | program counter and branch selection |
| `exec_unit.sv` | one unit's instruction decode: operand selection (register, immediate, sniffed), `Td` expansion, address and store-data generation, load/write-back selection, branch evaluation |
| `reg_bank.sv` | 32 × 32-bit registers with three owner write ports and the Data Stream writes to R28–R31 |
| `fu_pool.sv` | per-class grant logic and routing of operands/results between units and functional units |
| `vec_fu.sv` | one functional unit: 4×8, 2×16 or 1×32 element operation |
| `data_stream_unit.sv` | Data Stream instruction decode: index, load, store (RAM or scratchpad), window shift |
| `dual_port_ram.sv` | 1024 × 32 RAM, one write port with byte enables, one read port |
| `scratchpad_mem.sv` | 256 × 32 scratchpad |

The top reports, on the `evt` output, one pulse per occurrence of each
mechanism: issue, stall, forward, sniff, branch, broadcast, Data Stream load,
store and shift, scratchpad write, and Data Stream priority.

## Programming example: Smith-Waterman

`tb/tb_vliw_top.sv` contains a small bundle assembler and a linear-gap
Smith-Waterman kernel:

- Each unit holds four consecutive query rows, one per 8-bit element, so
  4 units cover a 16-row strip.
- The reference sequence enters unit 0 through the Data Stream Unit. It moves
  along the units with the window shift and inside each vector with shifts.
- Each unit gets its upper boundary by sniffing R30 of the unit to its left.
- Score, penalty and address constants are placed in the scratchpad by the
  Data Stream Unit. The units then load them with IDXS/SPLD.
- At the end, every unit stores its running maximum. In the same bundle the
  Data Stream Unit stores a memory register, which exercises its port
  priority.

`tb/tb_sw_workload.sv` extends this kernel to queries of any length:

- It processes the query in 16-row strips.
- Unit 3 writes the bottom row of each strip to RAM.
- In the next strip, the Data Stream Unit brings that row back into unit 0.
- The testbench runs the query lengths 20, 68, 74, 85, 94, 685, 1861 and 2276
  against a 4092-symbol reference.
- It checks the best score and the final matrix row against a reference model
  that uses the same 8-bit wrap-around arithmetic.

`tb/tb_sw_affine.sv` runs the same strips with the affine gap model, which
has separate penalties for opening a gap (`GO`) and extending it (`GE`):

- **E**, the gap along the reference, stays in its own element from one step
  to the next: `E = max(E - GE, H_left - GO)`.
- **F**, the gap along the query, travels down the rows the same way H does,
  through a vector shift and a sniff of the left unit's R29:
  `F = max(F_up - GE, H_up - GO)`.
- **H** is then `max(0, E, F, H_diag + S)`.
- The strip boundary carries an H row and an F row. Unit 3 stores both, and
  the Data Stream Unit returns both to unit 0.

### Measured speed and how it compares

With the default functional-unit counts, one anti-diagonal step of a 16-row
strip takes about 54 cycles with linear gaps and 76 with affine gaps. A query
of 16·k rows needs k strips. Each strip has 4092 + 15 steps.

| query × reference | linear: cycles | per cell | affine: cycles | per cell |
|-------------------|-------:|-----:|-------:|-----:|
| 16 × 40 (`tb_vliw_top`) | 2 970 | 4.6 | – | – |
| 20 × 4092 | 435 449 | 5.3 | 624 397 | 7.6 |
| 68 × 4092 | 1 088 546 | 3.9 | 1 560 916 | 5.6 |
| 74 × 4092 | 1 088 546 | 3.6 | 1 560 916 | 5.2 |
| 85 × 4092 | 1 306 245 | 3.8 | 1 873 089 | 5.4 |
| 94 × 4092 | 1 306 245 | 3.4 | 1 873 089 | 4.9 |
| 685 × 4092 (`RUN_ALL`) | 9 361 108 | 3.3 | 13 423 490 | 4.8 |

Scores are 8-bit. Over a long query they reach the top of that range (127),
after which they wrap. The reference models in the testbenches wrap the same
way, so the check still compares like with like. Real sequences of that length
need either 16-bit elements (OpControl element size 1) or periodic rescaling.

For comparison, the published figure for this architecture is about 0.31
cycles per cell update. That is 0.035 × 10⁶ cycles for a 20-symbol query and
2.9 × 10⁶ cycles for 2276 symbols, using the affine-gap model. This RTL does
not reach that figure with the example kernel, for three reasons:

- **The kernel runs the four units in lockstep.** Every bundle gives all four
  units the same operation. With one SHIFT, one LOGIC and one MUL unit, such a
  bundle needs four cycles. A schedule that skews the units so that they use
  different functional-unit classes in the same bundle would recover most of
  this, but it is not written. With four functional units of every class
  (`NUM_* = 4`), the same program takes about 20.5 cycles per step, which is
  1.3–2.0 cycles per cell for the queries above.
- **The kernel uses about 17 operations per cell vector.** Most of them move
  the reference symbol and the boundary values into place.
- **Functional-unit counts, opcode numbering, the immediate format, branch
  encoding, delay-slot count and memory map are this design's choices.** No
  published values exist for them. They are parameters or package constants
  and can be changed.

## Where this design departs from or fills in the source description

- **Published and followed:**
  - the bundle layout and both instruction formats, bit for bit;
  - the four-stage pipeline with forwarding;
  - stalling on functional-unit conflicts;
  - delayed branches;
  - the three-way `Td` write with offsets 0/8/12;
  - R28–R31 as memory registers with Data Stream write priority;
  - sniffing of the left neighbour;
  - the left/right window shift;
  - the scratchpad written only by the Data Stream Unit through a mapped RAM
    window;
  - the 2-cycle memory access;
  - 4 units with 4×8-bit vectors.
- **Chosen here:**
  - the opcode numbers and OpControl bit meanings;
  - the number of functional units per class;
  - the memory depths, the scratchpad window position and the 9-bit absolute
    branch target;
  - two delay slots;
  - lowest unit wins a branch tie;
  - the Data Stream Unit acting only in a bundle's first EXECUTE cycle;
  - reset values of zero;
  - the host loading port and the event outputs.
- **Left out:**
  - carry instructions;
  - the larger configurations tried as scalability variants, a 40-bit vector
    or a fifth unit. `VEC_W` is a package constant fixed at 32. The Data Stream
    `Unit` fields are 2 bits wide, so they address at most 4 units.
- **Not built:**
  - the FPGA system around the processor (host CPU and bus);
  - the processors it was compared against.
  - A program that reaches the published cycles-per-cell figure (see above).
- **Size:** a 4092-symbol reference needs about 9 300 RAM words with the
  linear kernel, which stores one symbol per word plus one boundary row. The
  affine kernel needs about 13 400 words because it keeps two boundary rows.
  The workload testbenches therefore set `RAM_DEPTH` to 16384. The default 1024 words only hold the small
  example.

## Simulating

All blocks compile with the package first. For example, for the end-to-end
test at default parameters:

```
verilator --binary --timing -Irtl rtl/vliw_pkg.sv rtl/*.sv tb/tb_vliw_top.sv \
          --top-module tb_vliw_top -o sim
./obj_dir/sim
```

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.

- Unit testbenches: `tb_<block>.sv` drive random stimulus from `$urandom` and
  compare against models written independently of the RTL.
- `tb_vliw_top` counts each mechanism (stall, forward, sniff, branch,
  broadcast, Data Stream load/store/shift, scratchpad write, port priority),
  and fails if one never happens.
- `tb_sw_workload` and `tb_sw_affine` run the five short queries by default,
  in about 40 and 50 s.
- Setting their `RUN_ALL` localparam to 1 adds the 685-, 1861- and 2276-symbol
  queries. For the linear kernel those add about 66 million cycles, and for
  the affine kernel about 95 million.
