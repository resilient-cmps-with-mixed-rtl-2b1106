# Resilient CMP with mixed-grain reconfigurability

A cluster of small in-order RISC cores that keeps working when some of its logic is permanently damaged.
Each core is cut into *substitutable blocks* (SBs): its pipeline stages IF, DC, EX and ME.
A damaged SB can be replaced in two ways:

* by the same SB taken from another row of the array (coarse grain);
* by a shared, FPGA-like *fine-grain fabric* that can take the place of a DC stage or of one third of an EX stage.

Borrowing a block from a distant row means a long wire. Here the long wire gets one register per row it
crosses, which keeps the clock period. The price is that every core can end up with a different
pipeline depth. The processor is therefore built so that it works at *any* depth:

* it has no global stall or flush wire;
* each stage decides locally;
* the EX stage alone resolves hazards, using local copies of recent results and a one-bit stream tag.

The top level is `rcmp_cmp`. It has `N_CORES` rows, default 8. By default every core has a 32-KByte
instruction memory, a 32-KByte data memory and a 16 × 32-bit register file.

## The component array (`rcmp_cmp`)

The array has one row per core and one column per SB kind. Logical core *k* is built from:

| SB | taken from |
|----|------------|
| IF | row `row_if[k]` |
| DC | row `row_dc[k]`; the value `N` means the DC in the fine-grain fabric |
| EX | row `row_ex[k]` |
| ME | row `row_me[k]` |

A core can also send one of its three EX sub-blocks to the fabric (`fg_ex[k]`, `fg_part[k]`).
Which rows are healthy, and which assignment to choose, is decided outside the array. For example,
software can run a greedy search after a self-test. The array only takes the result, while `rst` is high.

Every SB input is a `spare_link`. It holds two things:

* a multiplexer that picks the source row;
* a register chain that adds `|row_src - row_dst|` cycles.

Such links join IF→DC, DC→EX, EX→ME, ME→DC (write-back), ME→EX (load forward) and EX→IF (redirect).
The fabric counts as sitting above row 0, so row *r* is *r + 1* rows away from it. Inside a
fault-free core all distances are 0 and the links are plain wires.

Each SB has its own `clk_sel`, a glitch-free multiplexer between `clk_fast` and `clk_slow`. All SBs of
core *k* follow `slow[k]`. A core that uses the fabric must run slow, because fabric logic is slower.
The fabric itself always runs on `clk_slow`. SBs that no core uses are held in reset (switched off).

`cfg_ok[k]` reports whether core *k*'s configuration is legal. It is legal when all of these hold:

* its rows are in range;
* no SB is shared with another core;
* at most one core uses the fabric;
* a core that uses the fabric is slow;
* its result loop fits the bypass buffers (see below).

An illegal configuration is not blocked. It is only reported.

Observation ports:

* `halted[k]`;
* the event counters `ex_stats[k]` and `me_stats[k]`, which count executed and dropped instructions, flushes of each kind, bypass uses, forwards, fabric operations and split-EX operations;
* a read port into core *k*'s data memory (`dbg_addr`/`dbg_data`).

Programs are written per physical IF row with `prog_we[r]`, `prog_addr` and `prog_data`.

## The adaptive processor

Stages and timing, with no extra stages:

| stage | module | does | output |
|-------|--------|------|--------|
| IF | `if_stage` (+ `imem`) | fetch at PC, predict not taken (PC+4), tag with SIB = IF's InF bit | registered, 1 cycle |
| DC | `dc_stage` (+ `regfile`) | decode, read RF; write-back arrives here | registered, 1 cycle |
| EX | `ex_stage` (+ 3 × `ex_part`, `bypass_buf`) | SIB check, bypass, flush/reload, branch, ALU | registered, 1 cycle (2 when split) |
| ME | `me_stage` (+ `dmem`, `bypass_buf`) | load/store, write-back, forward | combinational into the links |

There is no separate write-back stage. ME's result travels over the interconnect straight into the
register file in DC. The register file passes a same-cycle write through to its read ports. Fetch
issues one instruction every cycle and never stops. Nothing is ever stalled: instructions are only
ever discarded, and only in EX.

### Stream tag: flushing without a flush wire

IF and EX each keep one *InF* bit. Every fetched instruction carries IF's InF value as its SIB.

1. EX needs a redirect when a branch is taken, at every jump, and at every reload (below). EX then inverts its own InF and sends the new PC to IF.
2. IF loads that PC and inverts its own InF.
3. The wrong-path instructions already in flight carry the old SIB. EX drops them on arrival, and they never touch the bypass buffer.
4. The first instruction from the new PC carries the new SIB and matches again.

A single bit is enough. Until a new-stream instruction reaches it, EX ignores everything, so it cannot
flush twice in a row.

### Bypass buffers: data hazards at any depth

EX and ME each keep a FIFO (`bypass_buf`) covering the last `BYP_DEPTH` instructions. Every
instruction that executes pushes one entry, even if it writes no register. An entry holds:

* the result location: EX, ME or nowhere;
* the destination register;
* the value;
* an *available* bit;
* a sequence tag.

For each source register, EX looks for the youngest entry that writes it:

* **No entry:** the register-file value read in DC is current, and EX uses it.
* **Entry with its value present:** EX uses the buffered value.
* **Entry without its value:** the value is a load that has not come back from ME yet, or, in split mode, the result of the instruction just ahead. EX does not stall. It *flushes and reloads*: it inverts InF and redirects IF to this very instruction. If the value is still missing when the instruction comes round again, EX flushes again.

When a load completes in ME, its value is sent back over the ME→EX link and fills the matching EX
entry by tag. A store whose *data* is such a missing load value is not flushed. It goes on to ME
flagged `sd_pend`, and ME takes the data from its own buffer. That buffer always holds the data,
because ME sees every instruction in program order.

**Depth rule.** A value is missing from both the buffer and the register file if more instructions
than the buffer holds fit between a consumer's register read in DC and the write-back of its producer.
That count is

    1 + (1 if EX is split) + dist(DC,EX) + dist(EX,ME) + dist(ME,DC)

`BYP_DEPTH` defaults to 2N − 1 = 15. This covers any choice of regular rows without split. The
configuration check flags configurations that exceed it, for example split EX with far-apart rows, or
the fabric DC with a distant EX. An assertion in ME also catches a store whose pending data is
missing.

### Split EX and the fabric sub-block

The ALU is made of three concurrent sub-blocks (`ex_part`):

| part | unit | operations |
|------|------|------------|
| 0 | adder / comparator | ADD, SUB, SLT, SLTU |
| 1 | logic unit | AND, OR, XOR, pass-b (LUI) |
| 2 | shifter | SLL, SRL, SRA |

Branch comparison and jump targets have logic of their own in EX, and branches always resolve in the
first EX cycle.

With `split` set, or whenever a sub-block runs in the fabric, a register sits after the sub-blocks:

* results leave EX one cycle later;
* result entries are pushed "not available" and filled from the second EX cycle;
* an instruction that uses the result of the one right before it is flushed and reloaded once.

When a sub-block is in the fabric, EX sends that operation's operands on `fg_op`. It takes the result
that the fabric returns, registered, on `fg_res` one cycle later.

### Fine-grain fabric (`fg_fabric`)

This is a behavioural model. It describes what the fabric does once configured, not its LUTs,
routing or bitstream. It can be configured in two ways:

* as a DC stage, which holds a `dc_stage` with its own register file;
* as one EX sub-block, with the result registered.

IF and ME are not offered, because they carry the 32-KByte memories. Fabric logic is slower, which is
modelled by clocking the core that uses it with `clk_slow`.

## Instruction set

The instruction set is this design's own: a minimal 32-bit RISC with 16 registers, where r0 reads as
zero.

Instruction fields:

* `[31:26]` opcode;
* `[25:22]` rd;
* `[21:18]` rs1;
* `[17:14]` rs2;
* `[13:0]` imm14, signed. LUI and JAL use `[17:0]` as an 18-bit immediate.

| opcode | instructions |
|--------|--------------|
| 1–10 | ADD SUB AND OR XOR SLL SRL SRA SLT SLTU (rd = rs1 op rs2) |
| 16–22 | ADDI ANDI ORI XORI SLLI SRLI SLTI (sign-extended imm14) |
| 23 | LUI rd = imm18 << 14 |
| 32 / 33 | LW rd, imm(rs1) / SW rs2, imm(rs1) (words only) |
| 40–43 | BEQ BNE BLT BGE rs1, rs2, target = PC + 4·imm14 |
| 44 / 45 | JAL rd, PC + 4·imm18 / JALR rd, rs1 + imm14 (rd = PC + 4) |
| 63 | HALT: EX stops executing and raises `halted` |
| others | NOP |

The full encoding is in `rtl/rcmp_pkg.sv`. `tb/tb_isa_pkg.sv` contains encoder functions and a
reference instruction-level model.

## Files

`rtl/` holds one unit per file:

* `rcmp_pkg` (types, opcodes, stage bundles);
* `rcmp_cmp` (top);
* `if_stage`, `imem`, `dc_stage`, `regfile`, `ex_stage`, `ex_part`, `bypass_buf`, `me_stage`, `dmem`;
* `spare_link`, `clk_sel`, `fg_fabric`.

Each file starts with a description of its interface and timing.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_isa_pkg.sv`: the reference model and the random program generator;
* `tb_rcmp_cmp.sv`: the end-to-end test at the default size;
* `tb_core_configs.sv`: single-core runs of the same program under each sparing configuration, comparing cycle counts (see Workloads).

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/rcmp_pkg.sv tb/tb_isa_pkg.sv tb/tb_rcmp_cmp.sv --top-module tb_rcmp_cmp -o sim
    ./obj_dir/sim

Every testbench prints `TB_RESULT checks=<n> failures=<m>`.

`tb_rcmp_cmp` runs the whole array at its default parameters, taking under a second of wall time.
It generates one random program per core with `$urandom`. Each program has:

* a loop with a call and a return;
* about 400 random instructions with dense dependences, loads, stores and forward branches.

It then runs them in eight configurations:

1. fault-free;
2. every column rotated, so every core has extra stages;
3. DC in the fabric;
4. each of the three EX sub-blocks in the fabric (three configurations);
5. split EX with a far ME;
6. a degraded array with three cores switched off.

In each configuration it checks:

* 32 data words and all 15 registers of each core against the reference model;
* that every enabled core halts;
* that the configuration is reported legal.

At the end it checks that every mechanism happened at least once: hazard flush, branch flush, SIB
drop, EX bypass, ME→EX forward, ME store-data bypass, fabric sub-block, split EX, extra stages,
fabric DC, slow clock and disabled core. `+BODY=<n>` changes the program length.

To change the size, override `N_CORES` (≥ 2), `IMEM_BYTES`, `DMEM_BYTES` or `BYP_DEPTH` on
`rcmp_cmp`.

## What to trust, and where this departs from the source design

These parts follow the source design:

* the partitioning into IF/DC/EX/ME SBs with EX split in three;
* write-back folded into the interconnect and DC;
* the two bypass buffers with location/register/value entries and ME→EX forwarding;
* the InF/SIB scheme held in IF and EX and checked only in EX;
* flush-and-reload in place of stalls;
* optional two-stage EX when a sub-block is in the fabric;
* one register per row crossed;
* two clocks per SB;
* 32-KByte memories and a 16-entry register file;
* bypass buffers of 2N − 1 entries.

These are this design's own choices:

* the instruction set;
* not-taken fetch prediction;
* which operations sit in which EX sub-block;
* the sequence tags and "available" bits in the buffers;
* letting stores with pending load data through to ME;
* exactly one register per row;
* the clock-switch circuit;
* combinational memory reads;
* the configuration check;
* HALT and the counters.

The cross-row wires are bidirectional tri-state buses in the source design. Here they are
multiplexers, which behave the same per cycle.

Not included:

* the algorithm that chooses configurations;
* fault detection and testing;
* the inside of the FPGA fabric;
* IF or ME in the fabric;
* frequency, power and area, which depend on the process. The source design reports 450 MHz for coarse-grain cores and 200 MHz for cores using the fabric; these only set the ratio between `clk_fast` and `clk_slow`.

Changing the configuration while cores run is not supported. Change it only while reset is high.

## Workloads

The source design was measured with EEMBC CoreMark and Telebench. Neither can run here, because
there is no compiler for this instruction set.

All the single-core configurations of its evaluation can be built at the default size:

* 0, 2, 5 and 15 extra stages;
* DC in the fabric;
* an EX part in the fabric.

The deepest, 15 extra stages, is for example IF row 0, DC row 7, EX row 0 and ME row 1. Its result
loop is 1 + 7 + 1 + 6 = 15 ≤ 15.

`tb/tb_core_configs.sv` runs one random program of about 700 instructions on a single core in each of
these configurations and checks the results against the reference model. Measured instructions per
cycle for one such program:

| configuration | IPC | rate vs. 0 extra | reference figure |
|---------------|-----|------------------|------------------|
| CG, 0 extra | 0.85 | 1.00 | 1.00 |
| CG, 2 extra | 0.70 | 0.82 | 0.85 |
| CG, 5 extra | 0.54 | 0.63 | 0.73 |
| CG, 15 extra | 0.29 | 0.34 | 0.50 |
| DC in fabric | 0.70 | 0.37 | 0.45 |
| EX part in fabric | 0.66 | 0.34 | 0.30 |

How the columns are computed:

* IPC counts instructions per clock cycle of the core's own clock.
* The rate column weighs IPC by 450 MHz for coarse-grain cores and 200 MHz for cores using the fabric.
* The reference figures are the source design's CoreMark/Telebench averages, normalised to its fault-free adaptive core. They use a different workload, so only the trend is comparable.
