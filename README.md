# WISC-F05: a pipelined 16-bit load/store processor

WISC-F05 is a small 16-bit computer built around one idea: every instruction
is one 16-bit word whose top four bits select one of sixteen operations, so
decode is trivial and the whole machine fits in a classic five-stage pipeline.
It has sixteen 16-bit registers, a three-bit FLAG register (Zero, oVerflow,
Negative), a 128-byte direct-mapped instruction cache in front of a 64 KB main
memory, and a data cache that is as large as main memory and always hits.

This repository holds synthesizable SystemVerilog for the whole processor and
its memory system, with a self-checking testbench for every block and an
end-to-end testbench that runs random programs against an instruction-set
reference model.

## Instruction set

All addresses are byte addresses; instructions and data words are 16 bits.

| op   | mnemonic | format                 | effect |
|------|----------|------------------------|--------|
| 0000 | AND  | `0000 dddd ssss tttt` | rd = rs & rt; Z set, V = N = 0 |
| 0001 | OR   | `0001 dddd ssss tttt` | rd = rs \| rt; Z set, V = N = 0 |
| 0010 | XOR  | `0010 dddd ssss tttt` | rd = rs ^ rt; Z set, V = N = 0 |
| 0011 | NOT  | `0011 dddd ssss xxxx` | rd = ~rs; Z set, V = N = 0 |
| 0100 | ADD  | `0100 dddd ssss tttt` | rd = rs + rt; Z, V (two's-complement overflow), N |
| 0101 | SUB  | `0101 dddd ssss tttt` | rd = rs - rt; Z, V, N |
| 0110 | SRA  | `0110 dddd ssss iiii` | rd = rs >>> imm (arithmetic); flags kept |
| 0111 | SLL  | `0111 dddd ssss iiii` | rd = rs << imm; flags kept |
| 1000 | LW   | `1000 tttt oooo oooo` | rt = M[R14 + sext(off)] |
| 1001 | SW   | `1001 tttt oooo oooo` | M[R14 + sext(off)] = rt |
| 1010 | LHB  | `1010 tttt uuuu uuuu` | rt[15:8] = imm8, low byte kept |
| 1011 | LLB  | `1011 tttt uuuu uuuu` | rt[7:0] = imm8, high byte kept |
| 1100 | VADD | `1100 dddd ssss tttt` | two independent byte adds, no carry between bytes; flags kept |
| 1101 | B    | `1101 xccc iiii iiii` | if cond: PC = PC + 2 + 2*sext(imm) |
| 1110 | CALL | `1110 gggg gggg gggg` | R13 = PC + 2; PC = {(PC+2)[15:12], g} |
| 1111 | RET  | `1111 xxxx xxxx xxxx` | PC = R13 |

R14 is the data segment register used by every load and store; R13 is the
link register written by CALL. Otherwise all registers are general purpose
(none reads as zero). Branch conditions (`ccc`): 000 EQ (Z), 001 LT (N and not
V), 010 GT (Z = N = V = 0), 011 overflow (V), 100 NE (not Z), 101 GE (not LT),
110 LE (LT or Z), 111 always.

Two encodings are this implementation's reading: VADD uses the same
three-register layout as ADD, and the 12-bit CALL field is used as the low 12
bits of the target byte address as-is (not shifted).

## How the pipeline works

`wisc_cpu` has five stages:

```
 IF  PC -> instruction cache (hit and instruction in the same cycle)
 ID  decode, read two registers, interlock check, CALL/RET redirect
 EX  ALU, FLAG register update, branch decision, load/store address
 MEM data cache address / write
 WB  load data arrives, register write (passed through to ID the same cycle)
```

There is **no forwarding network and no branch delay slot.** Correctness comes
from three rules, and they are what to understand before changing anything:

1. **Interlock.** `hazard_unit` stalls the instruction in ID while an
   instruction in EX or MEM will write one of its source registers. The PC
   and IF/ID hold and a bubble goes into EX. Because the register file hands a
   write-back value straight to its read ports, the consumer may issue in the
   cycle its producer is in WB. So a dependence on the previous instruction
   costs 2 cycles, on the one before that 1 cycle, and loads cost no more than
   ALU results. LHB/LLB read their own target register (they keep one byte)
   and so also interlock; LW/SW wait for R14; RET waits for R13.
2. **Flags are written as an instruction leaves EX.** Only AND, OR, XOR, NOT,
   ADD and SUB write them. A branch is decided in EX the cycle after, so it
   always sees the flags of every older instruction, with no extra logic.
3. **Control transfer squashes younger instructions.** Fetch always continues
   sequentially. A taken B, decided in EX, loads the target into the PC and
   turns the two instructions in IF/ID and ID/EX into bubbles (2-cycle
   penalty; an untaken branch is free). CALL and RET know their target in ID
   and squash only the instruction in IF (1-cycle penalty). CALL then flows
   down the pipe to write PC+2 into R13. An EX redirect takes priority over
   an ID redirect in the same cycle, since the ID instruction is then on the
   wrong path itself.

Cycle spacing between successive instructions entering EX, with the cache
hitting (the core testbench checks each of these):

| situation | cycles |
|-----------|--------|
| independent instructions | 1 |
| source written by the previous instruction (ALU or load) | 3 |
| source written two instructions earlier | 2 |
| after a taken branch | 3 |
| after an untaken branch | 1 |
| after CALL or RET | 2 |

## Memory system

**Instruction cache (`icache`).** 128 bytes, direct mapped, 8 blocks of 16
bytes (8 instructions). Address split: tag `[15:7]`, index `[6:4]`, offset
`[3:0]`. Lookup is combinational, so a hit costs one cycle. On a miss the
cache sends the first request to main memory in the same cycle and marks the
block invalid. It then reads the block as four 4-byte words in address order,
each request issued in the cycle the previous word arrives. The block turns
valid with the last word, and the next lookup hits. A miss therefore costs
`4 x MEM_LATENCY + 1` cycles: 21 cycles (210 ns) at the defaults. While the
cache refills, the core holds its PC and feeds bubbles into decode. A refill
always finishes, even if a branch has moved the PC elsewhere in the meantime.
The program never writes the cache.

**Main memory (`main_memory`).** 64 KB, read 4 bytes at a time, with a
fixed `LATENCY` (default 5 cycles = 50 ns at a 10 ns clock). Only one access
is in flight at a time. A new request is accepted in the cycle the previous
data is delivered; an assertion checks that no request arrives while the
memory is busy. The halfword at the lower address is in bits 15:0 of the bus
word.

**Data cache (`data_cache`).** Every data access hits, so this is a 64 KB
memory of 16-bit words with a one-cycle access: the MEM stage gives the
address and the data is there in WB. Address bit 0 is ignored: loads and
stores always move whole aligned words.

**Timing assumption.** The memories' access times (10 ns for both caches,
50 ns for main memory) are turned into cycles with a 10 ns clock. If you
assume a different clock, change `MEM_LATENCY`. The cache's one-cycle access
is built into the design.

## Reset and program loading

`rst` is synchronous and active high. It clears the PC, so fetch starts at
address 0 once `rst` falls. It also empties the pipeline, clears the FLAG
register, all sixteen registers and the instruction cache's valid bits. Only
the PC clear is part of the architecture; the rest is this design's choice,
so that a program starts from a known state.

The top has a load port (`load_we`, `load_addr`, `load_data`). Each write
puts one halfword into main memory (the instruction image) and into the data
cache (the initial data image), so one image serves as code and data. Load
while `rst` is high. Stores by the running program reach only the data cache,
so a program must not modify its own code. There is no halt instruction: a
program ends in a branch to itself (`0xD7FF`, `B always, -1`).

## Files

| file | contents |
|------|----------|
| `rtl/wisc_pkg.sv` | opcodes, condition codes, flag struct, ALU operations, decoded-control struct |
| `rtl/wisc_f05.sv` | top: core + instruction cache + main memory + data cache |
| `rtl/wisc_cpu.sv` | five-stage pipeline, PC, FLAG register |
| `rtl/decoder.sv`, `rtl/regfile.sv`, `rtl/alu.sv`, `rtl/branch_cond.sv`, `rtl/hazard_unit.sv` | pieces of the core |
| `rtl/icache.sv`, `rtl/main_memory.sv`, `rtl/data_cache.sv` | memory system |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

Top-level parameters: `MEM_LATENCY` (5), `ICACHE_BYTES` (128),
`ICACHE_BLOCKS` (8), `BUS_BYTES` (4). The address width is fixed at 16 bits.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends; each has a
watchdog. With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/wisc_pkg.sv \
          tb/tb_wisc_f05.sv --top-module tb_wisc_f05
obj_dir/Vtb_wisc_f05
```

Swap in the name of any other testbench in the same way. The testbenches read
some internal signals by hierarchical name (register file, FLAG register,
pipeline valid bits), so renaming those means editing the testbenches too.

`tb_wisc_f05` runs the processor at its default parameters. It generates 40
random programs: register setup with LLB/LHB, a counted loop whose body mixes
arithmetic, VADD, shifts, R14-relative loads and stores, LHB/LLB, forward
conditional branches and CALLs to two subroutines that end in RET. Each
program runs to completion, and the registers, FLAG register and data segment
are compared with an instruction-set model in the testbench. The subroutines
share a cache index with the main code, so misses and evictions happen all
the time. Every third program is reset part way through and rerun from
address 0. The bench counts each pipeline event (interlocks, load-use stalls,
taken and untaken branches, CALL/RET redirects, cache misses and hits, loads,
stores, overflows, VADD, mid-run resets) and fails if any never happened.
Before the random programs it runs a small counted loop and checks the cycle
counts: 21 cycles from reset to the first hit, 9 cycles per warm pass of a
7-instruction loop ending in a taken branch, and 21 more on the pass that first
enters the second cache block.
`tb_wisc_cpu` runs the core with an ideal one-cycle instruction memory and
checks the cycle spacing in the table above; it then reruns the program with
random fetch misses.

## Where this departs from, or goes beyond, the specification

- The specification builds the memories from a library RAM component and
  grades designs on a gate-level cost/delay model. Here the memories are
  plain SystemVerilog arrays and no cost or delay model is included. The
  minimum clock period is therefore not determined.
- Pipeline depth, the interlock scheme, where branches and CALL/RET are
  resolved, the cache refill order, the memory handshake, the load port and
  the reset of registers and flags are this design's choices. The
  specification leaves them to the implementer.
- The earlier, cacheless development step (an instruction memory that always
  hits in 10 ns) is not a separate configuration of the top. `tb_wisc_cpu`
  tests the core in exactly that setting.
- Optional extras the specification mentions for bonus credit (forwarding, a
  small real data cache, exceptions, new instructions) are not included.
- The reference test and benchmark programs are not available; the random
  programs described above take their place.
