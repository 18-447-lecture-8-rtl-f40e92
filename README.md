# Data hazards in a 5-stage in-order pipeline: interlock, forwarding, load-use stall

In a pipelined processor an instruction reads its source registers in
decode (ID) but the instruction that produces the value writes it back four
stages later (WB). When a consumer follows its producer too closely, it
would read a stale register. This is a *read-after-write (RAW) data
hazard*. This RTL builds a classic IF/ID/EX/MEM/WB pipeline for an RV32I
subset and resolves those hazards in five ways that can be compared cycle
for cycle on the same program:

| core | `HAZ_MODE`   | how a RAW hazard is resolved | cost of a dependence at distance 1 / 2 / 3 |
|------|--------------|------------------------------|--------------------------------------------|
| 0    | `HAZ_STALL`  | interlock: stall until the producer has written the register file | 3 / 2 / 1 cycles |
| 1    | `HAZ_FWD_ID` | forwarding muxes in ID ("v1") take the value from EX, MEM or WB; load-use stall | 0 (load: 1 / 0 / 0) |
| 2    | `HAZ_FWD_EX` | forwarding muxes in EX ("v2") take it from EX/MEM or MEM/WB; the register file forwards internally; load-use stall | 0 (load: 1 / 0 / 0) |
| 3    | `HAZ_FWD_EX`, `LOAD_DELAY_SLOT=1` | as core 2, but with a MIPS-style load delay slot instead of the load-use stall: the instruction right after a load does not see the loaded value | 0 (load: 0, and the slot reads the old value) |
| 4    | `HAZ_FWD_EX`, `STORE_DATA_MEM_FWD=1` | as core 2, but a store of a value just loaded takes it in MEM, so it does not stall | 0 (load: 1 / 0 / 0, store data after a load: 0) |

"Distance" is the number of instructions between producer and consumer:
1 means back to back. Core 3 does not run the same architecture as cores 0
to 2 and 4. For a program that reads a register right after loading it, core 3
computes a different result, and the compiler is meant to schedule around
that. Next to the five cores sits an independent unit, a
32-bit adder split over two pipeline stages (`staggered_adder`). It shows
how a superpipelined adder can still run dependent additions back to back.
An unstaggered build of the same adder sits beside it for comparison.

The design follows the treatment of data hazards in Carnegie Mellon's
18-447 lecture "Data Hazard and Resolution". The stall condition, the
forwarding priority, the load-use rule and the adder structure are taken
from it, and so is the load delay slot, which the lecture presents as the
historical static alternative to the load-use stall. Control flow, memories, instruction encoding and the host
interface are this design's own choices (see *Departures and own choices*).

## When an instruction must wait

Three facts about the instruction in ID decide whether it has to wait:
- whether it reads rs1 and rs2 at all (`useRs1`, `useRs2`, from `decoder`);
- for each older instruction still in EX, MEM or WB, whether it will write
  a register (`RegWrite`) and which one (`rd`);
- whether a source is `x0`. Reading `x0` is never a hazard, because `x0` is
  always zero even when an instruction "writes" it.

The register file is written at the clock edge that ends WB and is read
combinationally in ID. Without write-through, a consumer in ID sees the new
value only one cycle after its producer left WB. This gives the first row
of the table above. The table below shows which instruction classes read
and write registers. The decoder encodes exactly this:

| class            | reads rs1 | reads rs2 | writes rd |
|------------------|-----------|-----------|-----------|
| R-type ALU       | yes | yes | yes |
| I-type ALU       | yes | –   | yes |
| LW               | yes | –   | yes (value ready only after MEM) |
| SW               | yes | yes (store data) | – |
| Bxx              | yes | yes | – |
| JAL              | –   | –   | yes (link) |
| JALR             | yes | –   | yes (link) |
| LUI, AUIPC       | –   | –   | yes |

Only RAW dependences need any of this. An anti-dependence (WAR: a younger
instruction overwrites a register an older one reads) and an output
dependence (WAW: both write it) cannot go wrong. Registers are read in one
stage (ID) and written in a later one (WB), always in program order. For
the same reason a store followed by a load from the same address is safe,
because memory is read and written only in MEM.

### Interlock (`stall_unit`, core 0)

`stall` is the OR of six comparisons: each of rs1 and rs2 against each
of `rd_EX`, `rd_MEM` and `rd_WB`. Each comparison is qualified by that
stage's `RegWrite`, by `useRs` and by `rs != x0`. On a stall:

- the PC and the IF/ID register (the instruction register) keep their
  values, so fetch and decode repeat;
- a bubble enters ID/EX. All its control bits are cleared, in particular
  `RegWrite` and `MemWrite`, so it changes no state;
- EX, MEM and WB keep advancing. This is essential: the producer has to
  drain out of the pipeline for the stall to end.

Once a dependence has been waited out, later readers of the same value do
not stall again. For example, if three instructions in a row read a value
produced just before them, only the first one stalls (3 cycles).

### Forwarding into ID (`fwd_unit_id`, core 1)

The register file is only one way of passing a value from producer to
consumer. The value exists in the datapath as soon as the producer has
computed it. For each source, `fwd_unit_id` picks:

1. the write-back value of the instruction in EX (ALU result or link
   address), if that instruction writes rs (distance 1);
2. otherwise the value in MEM (load data or ALU result) (distance 2);
3. otherwise the value in WB (distance 3);
4. otherwise the register file.

The order runs from young to old. When several older instructions write the
same register, the youngest one holds the value the program means. `useRs`
plays no part here: forwarding into an operand that is not used is
harmless.

### Forwarding into EX (`fwd_unit_ex`, core 2)

Here the operands are read in ID as usual and latched into ID/EX. In EX,
the ForwardA and ForwardB muxes replace them with the EX/MEM result
(distance 1) or the MEM/WB value (distance 2), youngest first. Distance 3
is covered by the register file itself (`WRITE_THROUGH=1`): a read of the
register being written in the same cycle returns the new value.

The two variants differ in where the mux delay lands. In v1 the forwarded
values pass through the mux before the ID/EX register, so the mux adds delay
to the end of EX (ALU result), of MEM (load data) and of WB. In v2 all
forwarding delay sits in EX, in front of the ALU. That pays off when EX is
the stage with the most slack.

### The load-use stall (`load_use_unit`, cores 1 and 2)

A load has its value only at the end of MEM. If the instruction directly
behind a load uses the loaded register, forwarding cannot help. That
instruction waits one cycle in ID. After that, the load is one stage
further on and the value comes over the distance-2 path. The condition is
`((rs1 == rd_EX && useRs1 && rs1 != 0) || (rs2 == rd_EX && useRs2 && rs2 != 0)) && MemRead_EX`.
A store whose data comes from the load right before it also waits, because
SW counts as using rs2, unless the option below is set.

### The load delay slot (`LOAD_DELAY_SLOT`, core 3)

The MIPS R2000 had no load-use interlock. Its architecture said instead
that a load's result arrives one instruction late. The instruction right
after a load, in the load's *delay slot*, must not expect the loaded value.
The hardware then never has to stall. The compiler puts an independent
instruction into the slot, or a NOP if it has none.

With `LOAD_DELAY_SLOT=1` (forwarding modes only) the core behaves like
this. `load_use_unit` is left out. The forward from a load one instruction
ahead is masked: in v1 the path from EX, in v2 the path from EX/MEM. So the
slot instruction falls through to the next older producer or to the
register file, and reads **the register as it was before the load**. The
lecture only calls such a read invalid. This design defines its value,
the same way the R2000 hardware did. From the second instruction after
the load onwards, the loaded value arrives over the normal distance-2
path. `perf.slot_reads` counts operands read in a delay slot.

Run time is the same either way. A NOP in the slot costs exactly the cycle
the load-use stall would, and an independent instruction in the slot costs
nothing in both designs. What changes is who is responsible. With the
stall, correctness is the hardware's job. With the slot, it is the
compiler's, and the rule is fixed into the architecture even for later
pipelines where a load might take longer.

### Store data forwarded in MEM (`STORE_DATA_MEM_FWD`, core 4)

A store uses its base register in EX, to form the address, but its data
only in MEM, where the memory is written. When the data comes from a load
right before the store, the load's value exists at the end of the load's
MEM stage, which is one cycle before the store's MEM stage. The store does
not need to wait.

With `STORE_DATA_MEM_FWD=1` (forwarding modes, no delay slot) the load-use
unit no longer counts a store's rs2. While the store is in EX and the load
is in EX/MEM with the store's rs2 as its destination, the store is marked.
In MEM, the marked store writes the MEM/WB value, which is the loaded word,
instead of the data it carried from EX. The store's base register still
causes the one-cycle load-use stall. The forward from a load in EX/MEM into
EX is not used for this: it would chain a memory read and the store path
in one cycle. `perf.fwd_store` counts the marked stores.

A word copy loop (`lw`, then `sw` of the same register) then runs without
a stall: `tb_hazard_top` copies 8 words with 8 load-use stalls on cores 1
and 2 and none on core 4.

### What it costs: the insertion-sort loop

The inner loop of an insertion sort (`for (j = i-1; j >= 0 && v[j] > v[j+1]; j--)`)
is a good example. Written as RV32I (`addi, slti, bne, slli, add, lw, lw,
slt, beq`), six of its instructions read a register written by the
instruction right before them. Going through the loop body once costs:

- interlock only: 6 × 3 = **18** stall cycles;
- forwarding (either variant): **1** stall cycle, for `lw` followed by
  `slt`. A compiler can hide it by moving an independent instruction into
  that slot;
- load delay slot: no stall, but the code needs one NOP after the second
  `lw` (the loop has no independent instruction to put there), so it also
  takes one extra cycle.

`tb_hazard_top` runs exactly this sequence and checks the 18, the 1 and
the delay-slot core's 0. It also sorts a 24-element array on cores 0 to 2 and 4. The run takes 4532 cycles with
the interlock and 2354 with forwarding: an IPC of 0.41 against 0.79 for the
same 1848 instructions. Average IPC is N / (N + S) for N instructions and S
lost cycles. Here S also includes two cycles per taken branch.
`tb_load_use_variants` sorts 20 words with and without the NOP. The
NOP-filled loop on the delay-slot cores takes 1768 cycles, exactly as many
as the unfilled loop with its stall on the interlocking forwarding cores.
Core 3 of `tb_hazard_top` runs the unfilled loop. `slt` then compares a
stale value, and the array does not come out sorted: the slot rule is part
of the instruction set.

## The staggered adder

`staggered_adder` splits a 32-bit addition into two 16-bit halves in
consecutive stages:

```
             EX1                                    EX2
 A_lo,B_lo ─▶ mux ─▶ 16-bit add ─▶ [reg] ─┬──────────────────────▶ [reg] ─▶ S_lower
               ▲          │               │
               └──────────┼──── fb ◀──────┘
                          └─ carry ─▶ [reg] ───────┐
 A_hi,B_hi ──────────────────────▶ [reg] ─▶ mux ─▶ 16-bit add ─▶ [reg] ─┬─▶ S_upper
                                             ▲                          │
                                             └────────── fb ◀───────────┘
```

Each stage is only as long as a 16-bit addition, so throughput is one
addition per 16-bit-add time. A dependent addition never waits. It needs
the lower half of the previous sum in EX1, and that half is ready at the
end of EX1. It needs the upper half in EX2, and that half is ready at the
end of EX2. `dep_a` and `dep_b` select the previous sum as operand A and/or
B. A result appears three clock edges after its operands are captured: one
edge into the operand register, then one for each stage.

**Why the staggering matters.** Splitting every stage in two (superpipelining)
roughly doubles the clock rate. But an operation's result is then complete
only at the end of its second half-stage, while the next, dependent
operation wants it at the start of its first. So even with forwarding, each
back-to-back dependent pair loses one cycle of the new clock. `STAGGER=0`
builds exactly this baseline. The same two stages forward only the complete
sum, from the output register, into EX1. `in_ready` is low while `dep_a` or
`dep_b` is set and an addition was accepted at the last edge, and the
caller holds the addition for that cycle. A chain of 50 dependent additions
takes 99 cycles there and 50 with staggering. Independent additions run
one per cycle in both.

## Files

| file | what it is |
|------|------------|
| `rtl/rv_pkg.sv` | opcodes, ALU operations, control bundle `ctrl_t`, hazard modes, forwarding select, counter struct `perf_t` |
| `rtl/hazard_top.sv` | top: the five cores and the two adders, each with its own ports |
| `rtl/pipeline5.sv` | the 5-stage core, hazard scheme chosen by `HAZ_MODE`, `LOAD_DELAY_SLOT` and `STORE_DATA_MEM_FWD` |
| `rtl/decoder.sv` | ID control: RegWrite/MemRead/MemWrite, useRs1/useRs2, immediate |
| `rtl/stall_unit.sv` | six-term interlock |
| `rtl/load_use_unit.sv` | one-cycle load-use stall |
| `rtl/fwd_unit_id.sv` | forwarding select in ID (EX > MEM > WB > RF) |
| `rtl/fwd_unit_ex.sv` | ForwardA/ForwardB in EX (EX/MEM > MEM/WB > ID/EX operand) |
| `rtl/regfile.sv` | 32 × 32 registers, optional internal write-through |
| `rtl/alu.sv`, `rtl/imem.sv`, `rtl/dmem.sv` | ALU, instruction memory, data memory |
| `rtl/staggered_adder.sv` | two-stage 32-bit adder, staggered or (`STAGGER=0`) not |
| `tb/rv_asm_pkg.sv` | instruction encoders and `rv_ref`, an instruction-level reference model with a hazard timing model |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_load_use_variants` for the delay-slot and store-forward options and `tb_adder_unstaggered` for `STAGGER=0` |

### Interface of a core

- `clk`, `rst_n`: synchronous, active-low reset. Reset clears the PC, the
  pipeline valid bits and the counters. It does not clear the register file
  or the memories.
- `imem_we/imem_addr/imem_wdata`: write one instruction word per cycle,
  normally while in reset.
- `dmem_we/dmem_addr/dmem_wdata`: write one data word per cycle. A store
  from the pipeline has priority in the same cycle.
- `dbg_reg_addr → dbg_reg_data`, `dbg_mem_addr → dbg_mem_data`:
  combinational reads of a register or a data word.
- `halted`: rises when ECALL leaves WB. Fetch stops as soon as ECALL leaves
  ID.
- `perf`: cycles, retired instructions, interlock stall cycles, load-use
  stall cycles, taken branches and jumps, and how many used operands came
  over each forwarding path (`fwd_ex` for distance 1, `fwd_mem` for
  distance 2, `fwd_wb` for distance 3 in v1) or from the register file's
  internal forward (`rf_bypass`, v2), and operands read in a load delay
  slot (`slot_reads`), and stores whose data was taken in MEM from the
  load just ahead (`fwd_store`).
- Parameters: `HAZ_MODE` (`HAZ_STALL`, `HAZ_FWD_ID`, `HAZ_FWD_EX`; default
  `HAZ_FWD_EX`), `LOAD_DELAY_SLOT` (default 0; ignored with `HAZ_STALL`),
  `STORE_DATA_MEM_FWD` (default 0; ignored with `HAZ_STALL` or with the
  delay slot),
  `IMEM_WORDS`, `DMEM_WORDS`.

Addresses are byte addresses. Memories are word arrays (`IMEM_WORDS`,
`DMEM_WORDS`, default 1024), and only word loads and stores exist.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rv_pkg.sv tb/rv_asm_pkg.sv tb/tb_hazard_top.sv --top-module tb_hazard_top -o sim
./obj_dir/sim
```

For other testbenches, replace the last file and the top module name. List
`tb/rv_asm_pkg.sv` only for `tb_pipeline5`, `tb_decoder`,
`tb_load_use_variants` and `tb_hazard_top`. To write your own programs, build them as a queue of
encoder calls (`ADDI(1, 0, 5)`, `LW(2, 8, 1)`, `BEQ(1, 2, 12)`, …, ending
with `ECALL()`) and load them through the `imem_*` port during reset, as
`tb_hazard_top` does.

## How far it has been checked

- `tb_pipeline5` runs 15 hand-worked programs on all three modes: distances
  1 to 4, load-use, x0, several readers of one value, youngest-producer
  priority, store data and a store followed by a load, branches, JAL/JALR,
  and WAR/WAW pairs (no stall). For each program it checks the
  exact stall, cycle, flush and per-path forwarding counts, and the results.
- `tb_hazard_top` runs, at the default sizes, the sort loop body, a word copy, a full
  insertion sort and 12 random 120-instruction programs. The random
  programs reuse seven registers densely and mix loads, stores, writes to
  x0, forward branches and jumps. Every register, 256 memory words and
  every counter are compared with `rv_ref`. The testbench also requires
  every mechanism to occur: interlock stall, load-use stall, flush, each
  forwarding path, the internal forward, a delay-slot read, a store forwarded in MEM, dependent
  back-to-back additions, and a held addition in the unstaggered adder.
- `tb_load_use_variants` runs six cores: v1 and v2, each with the load-use
  stall, with the delay slot and with the MEM store forward. It checks, by
  hand-worked values, that the slot reads the old value, also as a load
  base and as store data. It checks the NOP-versus-stall and
  independent-fill cycle counts and the sort loop. It checks that a store
  of the value just loaded stores the right word without a stall on the
  store-forward cores, and that a loaded store base still stalls. It also
  runs 8 random load-heavy programs against `rv_ref` in the matching mode.
- `tb_adder_unstaggered` runs a random stream on the unstaggered adder.
  It checks every sum, the latency and `in_ready` cycle by cycle. It also
  checks the 50-versus-99-cycle dependent chain and full throughput for
  independent additions.
- Each unit has its own randomized testbench against a model written in
  the testbench.
- Every testbench was also run against a deliberately broken copy of its
  module and caught the fault.

None of this was checked against other RISC-V implementations or
compliance suites. The instruction set covers only what is listed above.

## Departures and own choices

- **Control hazards are not the subject here.** Fetch assumes branches are
  not taken. Branches and jumps resolve in EX, and a taken one turns the two
  younger instructions into bubbles (2 cycles). The classic P&H datapath
  decides branches one stage later, in MEM. That was not followed.
- **ISA.** The instruction classes (R/I-type, LW, SW, Bxx, JAL, JALR) are
  encoded as RV32I. LUI and AUIPC are added. Only word loads and stores
  exist. ECALL serves as "end of program". Unknown encodings execute as
  no-ops.
- **Store data after a load.** By default the design follows the load-use
  stall equation as given, which stalls a store one cycle on its data. The
  MEM-stage forward that avoids this (`STORE_DATA_MEM_FWD`) is this
  design's reading of the forwarding table, which has the store use its
  data in MEM; it is off by default.
- **Value read in a load delay slot.** The lecture leaves it undefined
  ("invalid"). Here it is the register's value before the load.
- **Bubble contents.** A stall clears every control bit of the bubble, not
  only RegWrite and MemWrite.
- **Link values** of JAL/JALR are produced in EX, not in ID. All forwarding
  paths carry them, so they cost no extra stall.
- **Memories** are small behavioural-style arrays with combinational read
  and a host load port. Sizes (1024 words) are arbitrary.
- **Adder interface.** `in_valid/in_ready/out_valid` and `dep_a/dep_b` are
  this design's own. `dep_a/dep_b` refer to the most recent earlier
  addition, also across idle cycles. The feedback taps are taken after the EX1/EX2 register for
  the lower half and after the output register for the upper half. The
  design does not model what the adder sits in.
