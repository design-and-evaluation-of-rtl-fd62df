# A MIPS R3000-class core with per-unit run-time power gating

Leakage power in small embedded cores is spent mostly by logic that is idle.
Most of the time the multiplier and divider have nothing to do. Even the
ALU and the shifter sit unused for many cycles between the instructions that
need them. This design puts each of these four functional units (FUs) in a
power domain of its own. A hardware controller switches the supply of each
domain on just before an instruction needs the unit and off again straight
after it.

Software does not have to do anything: unmodified MIPS I code runs with
gating active. Two optional controls let software tune the gating:

* a **mode control register** enables or disables gating per unit;
* a **PG-cancel flag** inside an arithmetic instruction keeps its unit powered
  after the operation. A compiler sets it when the unit will be needed again
  too soon for a shutdown to pay off.

## The trade-off: break-even point

Switching a domain off and on costs energy. The supply has to be recharged
and the sleep transistor has to be driven. A sleep period saves energy only
if it lasts longer than the **break-even point (BEP)**, measured in cycles.
The BEP depends strongly on temperature, because leakage grows quickly as the
chip gets hotter. Published measurements of such a core give the following
BEP sets, used in this design's tests:

| unit       | BEP at 25 °C | BEP at 55 °C |
|------------|-------------:|-------------:|
| ALU        | 56           | 21           |
| shifter    | 47           | 21           |
| multiplier | 28           | 11           |
| divider    | 11           | 4            |

Two figures of merit follow from this. A short sleep (shorter than the BEP)
loses energy; the share of sleeps that are too short is the *BEP miss
rate*. A long sleep gains; the share of sleep cycles spent in long periods is
the *BEP hit rate*. The `sleep_monitor` block counts what is needed to
compute both: a histogram of sleep-period lengths per unit.

## How a unit is switched

Each domain has one `sleep` signal (high = off) and one `vdd_ok` signal (the
virtual supply is up). The controller works from three facts about the
pipeline.

**Waking early (pre-decode).** The word coming out of the instruction cache
goes through `fu_predecoder` while it is still in fetch. The predecoder only
looks at opcode and funct and returns the unit the instruction will use.
The controller lowers that unit's `sleep` at the next clock edge. The domain
then charges while the instruction is in decode, and the unit is powered
by the time the instruction reaches execute. With the default wake latency of
one cycle this hides the wake-up completely: in normal running no instruction
waits for power.

```
cycle        1      2      3      4      5
instr       IF     ID     EX     MEM    WB
sleep     ‾‾‾‾‾‾|______________________|‾‾‾‾   (unit off again after EX
vdd_ok    _____________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|___    unless another user follows)
```

**Sleeping right after use.** A unit stays on while any instruction in IF, ID
or EX needs it, or while the divider is still iterating. Once the last user
has left EX, the unit's `sleep` rises at the next edge. In pipeline terms,
the decision is taken while that instruction is in MEM, and the domain goes
down as it reaches WB. If that last instruction carried the PG-cancel flag,
the unit is held on instead. It stays on until the next instruction that
executes on it arrives without the flag.

**Cache misses.** A miss stalls the core for many cycles, so every enabled
unit is forced off during it, including held ones. A miss here means a
line refill: an instruction fetch that misses, or a load that misses. A
store waiting for the write-through bus is a short stall and leaves the
units as they are. The one exception is a
divider in the middle of a division, which is kept on (the division would
otherwise be lost). The PG-cancel holds are cleared.
After the miss the instruction waiting in EX may find its unit off. It then
waits in EX (the *wake stall*) until `vdd_ok` rises. The unit's outputs are
clamped to zero (isolation) whenever its `vdd_ok` is low, and an assertion
checks that nothing is executed on an unpowered unit.

**Mode control register.** The mode register is COP0 register 22, with one
enable bit per unit (bit 0 ALU, 1 shifter, 2 multiplier, 3 divider). Write it
with `MTC0 rt, $22` and read it with `MFC0`. Its reset value is `4'b1111`
(all units gated). A unit whose bit is 0 is simply always on, which is the
No-PG mode.

### Which instructions use which unit

| unit       | instructions |
|------------|--------------|
| ALU        | ADD(U), SUB(U), AND, OR, XOR, NOR, SLT(U), all immediate forms, LUI, conditional branches (BEQ, BNE, BLEZ, BGTZ, BLTZ, BGEZ), JR, JALR |
| shifter    | SLL, SRL, SRA and their variable forms |
| multiplier | MULT, MULTU |
| divider    | DIV, DIVU (32 iterations; the divider stays on until it finishes) |
| none       | loads and stores (own address adder), J, JAL, MFHI/MFLO/MTHI/MTLO, COP0 moves, the all-zero NOP |

Branches evaluate their condition on the ALU. BEQ/BNE look at the XOR of the
operands; the compare-with-zero branches and JR look at the register itself.
A branch therefore wakes the ALU exactly like an addition.

### PG-cancel encoding

The flag takes opcode space that MIPS I leaves unused. Plain MIPS I code has
every flag clear.

* Immediate ALU instructions (opcodes `001xxx`): set opcode bit 4
  (instruction bit 30). `ADDIU` `0x09` becomes `0x19`, `ORI` `0x0D`
  becomes `0x1D`, and so on.
* Register-format instructions (opcode `000000`): replace the opcode with
  `010100` (`0x14`) and keep the funct field. This applies to ALU, shift,
  multiply and divide operations.
* The flag has no effect on branches, jumps or instructions that use no unit.

## Blocks

| block | file | what it does |
|---|---|---|
| `frpg_core` | `rtl/frpg_core.sv` | top: pipeline, caches, arbiter, mode register, sleep controller, four power switches, sleep monitor |
| `frpg_pipeline` | `rtl/frpg_pipeline.sv` | 5-stage MIPS I integer pipeline with the four units, isolation and wake stall |
| `frpg_pkg` | `rtl/frpg_pkg.sv` | shared types, opcodes, and the instruction-to-unit classification |
| `fu_predecoder` | `rtl/fu_predecoder.sv` | unit and flag of the fetched word |
| `sleep_controller` | `rtl/sleep_controller.sv` | per-unit sleep signals and PG-cancel holds |
| `power_switch` | `rtl/power_switch.sv` | behavioural model of a domain's sleep transistor: `vdd_ok` rises `WAKE_CYCLES` after wake, falls one cycle after sleep |
| `pg_mode_reg` | `rtl/pg_mode_reg.sv` | 4-bit mode control register |
| `alu`, `shifter`, `multiplier`, `divider` | `rtl/*.sv` | the gated units (multiplier single-cycle, divider restoring radix-2, 32 cycles) |
| `regfile` | `rtl/regfile.sv` | 32 x 32, two read ports, one write port with bypass |
| `l1_cache` | `rtl/l1_cache.sv` | 8 KB, 2-way, 64-byte lines, LRU; write-through, no write-allocate |
| `mem_arbiter` | `rtl/mem_arbiter.sv` | shares one memory bus between the two caches, data side first |
| `sleep_monitor` | `rtl/sleep_monitor.sv` | per-unit sleep-period histogram (64 bins, last bin saturates), totals and counts |

Every file begins with a comment that describes the block's interface and
timing.

## Pipeline details

* Branches and jumps resolve in EX and keep the MIPS delay slot. A taken
  branch drops one wrong-path fetch.
* A load followed by a dependent instruction interlocks for one cycle; the
  core does not rely on the load delay slot.
* Results are forwarded from MEM and WB into EX.
* HI/LO reads and writes, and a new multiply or divide, wait in ID while a
  division is running.
* An instruction-cache miss inserts bubbles. A data-cache miss stalls the
  whole pipeline.
* Memory is little-endian.
* The memory bus is word wide and uses a request/acknowledge handshake: the
  request and address stay stable until `m_ack`. Cache lines are refilled
  word by word.

## Where this design departs from the original core

* **No TLB and no exceptions.** The original core had a 64-entry TLB and ran
  Linux. Here addresses are physical. SYSCALL, BREAK and unknown opcodes do
  nothing, and ADD/SUB/ADDI do not trap on overflow. Operating-system
  software therefore cannot run unmodified.
* **Power switches are models.** `power_switch` is a cycle-level model of a
  sleep transistor and virtual supply, not a circuit. Leakage, charge energy
  and temperature are not modelled; the BEP values above are inputs to the
  analysis, not results of it.
* **Choices not fixed by the original:**
  * the PG-cancel encoding above;
  * the mode register's COP0 number and reset value;
  * the one-cycle wake latency as default;
  * keeping a busy divider on during a cache miss;
  * all cache policies other than size, associativity and line size;
  * the multiplier and divider micro-architecture;
  * the histogram size.
* **Compiler analysis is software.** Setting the PG-cancel flags is the job of
  a compiler pass (next section). No compiler is part of this RTL. The
  end-to-end testbench contains hand-flagged code, and `tb_bep_workload`
  carries out the analysis itself.

## Choosing the PG-cancel flags

The hardware alone switches a unit off after every use. That is wasteful
when the unit is needed again within fewer cycles than its BEP. A compiler
can predict this per instruction. On the control-flow graph of a function,
let `OUT_D[s][f]` be the expected number of cycles after instruction `s`
until unit `f` is used again. It follows from a backward data-flow
iteration:

```
IN_D[s][f]  = 0                       if s uses f
            = OUT_D[s][f] + c          otherwise (c = cycles s occupies, 1 here)
OUT_D[s][f] = IN_D[next][f]                                  one successor
            = q*IN_D[next1][f] + (1-q)*IN_D[next2][f]         branch
IN_D = 0 at the function exit
```

The branch probability `q` is 0.5 unless profiling says otherwise. An
instruction that uses `f` gets the flag when `OUT_D[s][f] < BEP[f]`. For
MIPS code the branch's only successor is its delay slot, and the slot has
the two successors.

Because a branch wakes the ALU, branches count as ALU users in this
analysis, as do JR and JALR. This is what makes a small worked example come
out right: Add, Add, Shift, Mult, then a branch to either Mult then Add, or
straight to Add, then a return. The expected idle cycles after the first Add
are 0 (ALU), 1 (shifter), 2 (multiplier) and 6.5 (divider).
`tb_bep_workload` checks its implementation of the analysis on this example.

The flags only pay off with a BEP set that matches the chip's temperature.
In `tb_bep_workload`, with the 25 °C set the shifter's sleep periods in the
kernel drop from 51 to 9. Its BEPmissCR falls from 0.93 to 0.55, and its
BEPhitCR rises from 0.19 to 0.50. With the 55 °C set, short sleeps still
become fewer, but the remaining sleep time shrinks more. The *ratio*
BEPmissCR then rises (0.09 to 0.22 for the shifter).

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, for
example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
  rtl/frpg_pkg.sv tb/tb_prog_pkg.sv tb/tb_frpg_core.sv \
  --top-module tb_frpg_core -o sim && ./obj_dir/sim
```

`-y rtl` lets Verilator find every module by its file name, so the same
line works for any testbench: list the package first, then the testbench
(and `tb/tb_prog_pkg.sv` for the pipeline and core testbenches).

| testbench | checks |
|---|---|
| `tb_frpg_core` | The whole core at default sizes, with a slow memory. It runs the same program with flags clear and with flags set, and with gating disabled. It checks every result word and the monitor against its own cycle counts. It counts each mechanism (instruction and data misses, forced shutdowns, hidden wake-ups, wake stalls, PG-cancel holds, No-PG mode, divide and load-use interlocks, taken branches, bus contention) and fails if one never happened. It also checks that wake stalls happen only right after a miss. |
| `tb_bep_workload` | The whole core at default sizes on an ADPCM-like kernel (difference, shift, data-dependent correction, multiply every 8th and remainder every 16th sample). It runs the kernel under No-PG (gating disabled), HW-PG (gating on, no flags), and with flags from the analysis for the 25 °C and 55 °C BEP sets. It checks every result, that No-PG never sleeps, and that flags never add short sleeps. It also checks the 25 °C effect on the shifter, and prints BEPmissCR/BEPhitCR for every unit and run. |
| `tb_frpg_pipeline` | The pipeline on an ideal memory, with unit power randomly delayed. |
| `tb_sleep_controller` | Directed cases plus a random comparison against a reference model. |
| `tb_l1_cache` | LRU, hit latency, write-through, and random traffic over 32 KB against a memory model. |
| others | Exhaustive or random checks of each unit against SystemVerilog operators. |

`tb/tb_prog_pkg.sv` holds a small MIPS assembler (encoding functions). It
holds the test program and computes the program's expected results without
the core.

## Changing it

* Wake latency: `frpg_core #(.WAKE_CYCLES(n))`. With n > 1 the pre-decode
  margin no longer hides the wake-up, and wake stalls appear in normal
  running.
* Cache size and line: `CACHE_BYTES` and `LINE_BYTES` (powers of two, two
  ways).
* Histogram length: `HIST_BINS`. Keep it above the largest BEP you want to
  evaluate.
* To move a unit between domains, change `classify_instr` in `frpg_pkg`.
  The predecoder, the decoder and the testbenches all use this one function.
