# Single-core and multi-core sensor-node processors for multi-lead ECG conditioning

A body-worn ECG sensor node has to clean up several leads of a slow signal
(125 Hz to 1 kHz per lead) on a very small energy budget. Supply-voltage
scaling is the strongest lever on energy, but it costs speed. The idea behind
this RTL is to trade silicon for voltage: instead of one core clocked fast
enough to process eight leads in turn, eight identical cores process one lead
each at roughly an eighth of the clock, which lets the whole chip run at a
lower supply voltage. The cores share one banked data memory through a
crossbar; when two cores want the same bank port in the same cycle, the
lower-priority one is simply clock-gated for that cycle.

Both platforms are here, side by side, so that they can be compared on the
same program and the same data:

* **single-core node** (`single_core`): one processing unit, a selection
  logic, and a 64-kByte data memory of 16 banks;
* **multi-core node** (`multi_core`): eight processing units with private
  instruction memories, a crossbar, and the same 16-bank data memory.

`biosig_platform` is the top level and holds one of each.

## Block map

```
biosig_platform
├── single_core
│   ├── pu                    processing unit
│   │   ├── clk_gate          (stall tied low here)
│   │   ├── instr_mem         4k x 24-bit instruction memory
│   │   ├── proc_core         16-bit two-stage RISC core
│   │   └── out_latch         48 glitch-blocking latches
│   ├── sel_logic             address decode to 16 banks
│   └── data_mem              16 x mem_bank (2k x 16, 1 read + 1 write port)
└── multi_core
    ├── pu [0..7]             as above, each with its own stall
    ├── icsb                  crossbar with per-bank, per-port priority arbitration
    └── data_mem
```

Shared widths, the request structs and the instruction encoding live in
`rtl/biosig_pkg.sv`.

## The processing unit

### Core

`proc_core` is a 16-bit load/store core with sixteen general registers, a
Harvard memory model and two pipeline stages:

| stage | work |
|---|---|
| 1 | instruction from the instruction memory is decoded; registers are read; the data-memory read address of a load is generated and sent; branches are resolved and the next fetch address is formed |
| 2 | the operation executes (including a single-cycle 16x16 multiply); the result is written to a register, or a register is written to the data memory |

Every instruction issues in one cycle and has a two-cycle latency. A stage-2
result, including load data, is forwarded to stage 1, so dependent
instructions never wait. The instruction memory reads synchronously, and its
address is the next-PC that stage 1 computes, so fetch overlaps stage 1 and a
taken branch costs no cycle. A program of K straight-line instructions
followed by `HALT` raises `halted` K+2 rising edges after reset is released.

Instruction word, 24 bits (this encoding is this design's own; the original
description only lists the kinds of operation):

```
[23:20] opcode  [19:16] rd  [15:12] ra  [11:8] rb  [3:0] funct
[11:0]  imm12   (sign-extended for ADDI/LD/ST; absolute target for branches)
[15:0]  imm16   (LI)
```

| opcode | mnemonic | effect |
|---|---|---|
| 0 | NOP | |
| 1 | ALU rd, ra, rb | funct: ADD, SUB, AND, OR, XOR, SLL, SRL, SRA, MUL (low 16 bits), MULH (high 16, signed), MIN, MAX (signed), SLT |
| 2 | ADDI rd, ra, imm12 | rd = ra + imm |
| 3 | SHI rd, ra, k, s | multi-bit shift by imm12[3:0]; kind imm12[5:4]: 0 SLL, 1 SRL, 2 SRA |
| 4 | LI rd, imm16 | |
| 5 | LD rd, imm12(ra) | rd = DM[ra + imm] |
| 6 | ST rd, imm12(ra) | DM[ra + imm] = rd |
| 7, 8, 9 | BEQ / BNE / BLT rd, ra, target | compare register rd with register ra (BLT signed) |
| 10 | JMP target | |
| 11 | HALT | stop fetching, raise `halted` once earlier instructions are done |

MIN and MAX exist because the target application is morphological filtering
(erosion and dilation are running minima and maxima).

### Data-memory request and the output latches

Each cycle a unit can read one word and write another. Its request is the
packed struct `dm_req_t`: read enable, 15-bit read address, write enable,
15-bit write address, 16-bit write data, 48 bits in all. The read comes from
stage 1, the write from stage 2.

These 48 bits leave the unit through `out_latch`: latches that are opaque
while the clock is high and transparent while it is low. The core's outputs
glitch for a while after each rising edge; the latches hold the previous
value during that time and let the settled value through at the falling
edge, so the long address and data wires to the banks toggle once per cycle.
Because the memories sample on the next rising edge, the latches cost no
cycle. Setting `USE_LATCHES = 0` replaces them by wires (the variant without
glitch suppression); function and cycle counts are identical.

## Data memory

`data_mem` holds 16 banks (`mem_bank`) of 2048 x 16 bits, 64 kBytes. Every
bank has one write port and one synchronous read port, usable in the same
cycle. A read of the word being written in the same cycle returns the new
value. The 15-bit word address splits into bank `addr[14:11]` and row
`addr[10:0]`, so each bank holds a contiguous 2k-word region.

The host port (`host_sel`, `host_req`, `host_rdata`) is an addition of this
design: while `host_sel` is high it owns all banks, so samples can be stored
and results read back while the cores are held in reset.

## Single-core node: selection logic

With one requester, `sel_logic` only decodes: the read goes to the bank named
by the read address and the write to the bank named by the write address (the
two may be the same bank). The bank of each read is registered so the data
returned one cycle later is taken from it. The unit never stalls. Row address
and write data are broadcast to all banks; only the enables are decoded.

## Multi-core node: crossbar, priorities and stalls

This is the part that needs the most care.

**Arbitration.** `icsb` arbitrates each bank's read port and write port
separately. Among the units that address a bank on one port in a cycle, the
lowest-numbered unit wins (unit 0 has the highest priority; the order is this
design's choice). A read and a write to the same bank from two different
units do not conflict. The arbitration is combinational on the latched
requests, which are stable from the falling edge on.

**Stall by clock gating.** A unit with any request refused gets `stall` for
that cycle. `stall` drives the unit's `clk_gate` (a latch transparent while
the clock is low, and an AND), which removes the next rising edge from the
core and its instruction memory. Nothing in the unit changes, so in the next
cycle it presents exactly the same requests. If only one of its two requests
was refused, the granted one is carried out anyway and repeated in the next
cycle; repeating a read or re-writing the same value to the same word is
harmless. One consequence for programs that pass data between units through
the same word: a write carried out early and then repeated may land after a
write that another unit made to that word in between. Units that only share
banks, not words, as in the ECG application, are unaffected.

**Read data across a stall.** A load's data arrives one cycle after its read
was granted. If the unit is stalled in that cycle, the bank's output register
may be overwritten before the unit consumes it (another unit may read the
bank). Each `pu` therefore keeps a hold register on the free-running clock:
`fresh` marks the cycle right after an edge at which the unit advanced; in
that cycle the core sees the bank output and the hold register copies it;
in later stalled cycles the core sees the held copy. The crossbar likewise
registers, per unit, which bank to return read data from.

Cycle by cycle, for unit 1 losing bank 0's read port to unit 0:

```
cycle            t          t+1        t+2
unit0 request    read b0    ...
unit1 request    read b0    read b0    (next)
unit1 stall      1          0
unit1 clock      no edge    edge       edge
```

With the identical per-lead programs used in the tests, units that share a
bank collide a few times at start-up and then settle into a one-cycle offset,
so stalls are rare (12 stall cycles in a 23.5k-cycle run). Programs with less
regular access patterns will stall more.

## Loading and running

1. Hold `rst_n` low. Write each unit's program through `im_we`/`im_waddr`/
   `im_wdata` (in `multi_core`, `im_we` has one bit per unit and address and
   data are shared).
2. With `host_sel` high, store the input samples through `host_req.we`.
3. Drop `host_sel`, release `rst_n`. Every unit starts at address 0.
4. Wait for `halted` (one bit per unit in the multi-core node).
5. Raise `host_sel` and read results through `host_req.re`; data appears on
   `host_rdata` one cycle later.

`rst_n` is an asynchronous, active-low reset of the pipelines, the register
files and the routing registers; memories are not cleared.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/asm_pkg.sv` provides
instruction encoders, an instruction-set reference model (a plain
interpreter, independent of the pipeline) and the test program.

| testbench | what it shows |
|---|---|
| `tb_proc_core` | every operation, forwarding into address generation, store-then-load, all branch kinds, 40 random programs; data memory compared with the reference model; exact cycle counts |
| `tb_pu` | random stalls with the read data scribbled over while stalled; results match the model and cycles = stall-free count + stalled cycles |
| `tb_instr_mem`, `tb_mem_bank`, `tb_data_mem` | memory contents, read latency, read-during-write, host override |
| `tb_out_latch`, `tb_clk_gate` | transparency only in the low phase; no gated-clock glitch when the enable changes in the high phase |
| `tb_sel_logic`, `tb_icsb` | decode, fixed-priority grants per bank and port against a reference arbiter, stall vector, read-data routing |
| `tb_single_core`, `tb_multi_core` | 8 leads x 64 samples end to end (single core with and without latches) |
| `tb_multi_core_stress` | all eight units run random programs on slices of the same two banks (about 15,000 stalled unit-cycles over 12 rounds, often four or more units stalled at once); every slice matches a per-unit reference model and every unit's cycle count equals its instruction count plus one plus its stalled cycles |
| `tb_biosig_platform` | both nodes at full default size: 8 leads x 1024 samples; all 16,320 results of both nodes compared with a direct computation of the filter |

The test application removes the ECG baseline by a morphological opening with
a 3-sample structuring element: `e[n] = min(x[n-1..n+1])`,
`o[n] = max(e[n-1..n+1])`, `y[n] = x[n] - o[n]`. Inputs are synthetic
ECG-like samples (baseline wander, a beat every 64 samples, small noise)
computed in the testbench. Input, scratch and output of lead k start at word
`k*1024`, `8192 + k*1024` and `16384 + k*1024`, so two leads share each bank.
At full size the single-core node takes 187,943 cycles (183 per sample for
eight leads), the multi-core node 23,502 (22-23 per sample per unit).

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv \
  rtl/biosig_pkg.sv tb/asm_pkg.sv tb/tb_biosig_platform.sv \
  --top-module tb_biosig_platform
./obj_dir/Vtb_biosig_platform
```

Replace the last file and the top name for any other testbench. All
testbenches run in well under a second.

## How far this follows the original architecture

Taken from the published description: a 16-bit RISC-style core with sixteen
registers, two pipeline stages split as above, single-cycle multiply and
multi-bit shifts; 24-bit instruction memory of 4k words per unit; a
64-kByte data memory of 16 two-port banks of 2k words; one unit with a
selection logic in the single-core node; eight units with private
instruction memories and a crossbar to all 16 shared banks in the multi-core
node; conflicts only on the same port of the same bank, resolved by unit
priority with the waiting units clock-gated; 48 latches, transparent in the
low clock phase, at each unit's outputs.

This design's own choices: the whole instruction set and its encoding;
forwarding and zero-penalty branches; the priority order; the address map;
write-first read-during-write; the host port and the program-load port; the
read-data hold register in each unit; the reading of the 48 latches as the
48-bit memory request; reset behaviour.

Not built: the published application itself (a longer morphological
conditioning chain that takes about 5,580 cycles per sample on the single core
and 761 per unit on the multi-core, with about 12% stall overhead); the
shorter filter above stands in for it. Supply-voltage scaling, power-down of
unused banks and the process-specific memory macros are outside the RTL; the
banks are plain arrays that synthesis maps to memories.

## Changing it

* `N_PU` on `biosig_platform`/`multi_core` sets the number of units.
* Memory sizes are the constants in `biosig_pkg` (`IM_DEPTH`, `BANK_DEPTH`,
  `N_BANK` with their address widths).
* To change the priority scheme, edit the loop in `icsb`; the stall and
  read-return logic does not depend on the order.
* New instructions go into the stage-1 decode and stage-2 execute in
  `proc_core`, and into the reference model in `tb/asm_pkg.sv`.
