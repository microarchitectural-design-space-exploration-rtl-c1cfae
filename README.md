# Riscy v2 — a seven-stage in-order RV64 core built around slow SRAMs

In an ASIC, the first thing to limit the clock of a simple five-stage RISC-V
core is usually not its logic. It is the cache SRAMs. An SRAM read takes a
large part of the cycle, and a classic one-cycle cache then compares the
SRAM's tag output with the physical tag in that same cycle. Riscy v2 never
lets those two share a cycle. **The output of every cache SRAM is registered
before anything looks at it.** This puts one extra stage into each cache
access. To keep that from hurting:

* the front end becomes three fetch stages (Fetch 1 to Fetch 3), with the
  branch predictors spread over them;
* the data-cache access starts in Execute rather than Memory. A load then
  finishes in Write Back, the same stage it would reach with a one-cycle
  cache.

This repository is a synthesizable SystemVerilog model of that
microarchitecture. It follows the design published as *"Microarchitectural
Design-Space Exploration of an In-Order RISC-V Processor in a 22nm CMOS
Technology"*, which reports about 1.3 GHz in a 22 nm process and
2.03 CoreMark/MHz. The publication fixes the pipeline structure, the cache
size and associativity, and where the registers go. Everything inside the
blocks is this implementation's own: predictor sizes, encodings, the
miss/store protocol, the multiply/divide algorithms. Those choices are listed
under [Where this model departs](#where-this-model-departs-and-what-it-leaves-out).

The model implements **RV64I + M + C** (compressed instructions) and a
machine-mode subset of the privileged architecture: CSRs, ECALL, EBREAK,
MRET and the illegal-instruction trap. Floating point, atomics, supervisor
and user modes, interrupts and virtual memory are left out (see below).

## The pipeline

| stage | what happens |
|---|---|
| **F1** | PC register, next-parcel adder, next-PC mux. The PC addresses the instruction-cache SRAMs. Fetch works on aligned 32-bit *parcels*. |
| **F2** | The instruction SRAM outputs (data, tags and valid bits of all 4 ways) are captured in registers. The BTB is looked up with this stage's parcel address; on a hit F1 is redirected to the BTB target. |
| **F3** | Tag compare and way select give the parcel. The re-aligner cuts it into instructions and expands 16-bit ones to 32 bits. The pre-decoder and the BHT decide this stage's opinion of the next PC; if it differs from F2's, F1 is redirected. |
| **D**  | Decoder, register-file read, scoreboard, operand bypass. A hazard stall is raised here. |
| **EX** | ALU, misprediction unit (real next PC, redirect, BTB/BHT training), CSR unit (CSR accesses, traps, MRET), start of multiply/divide. The load/store address from the ALU drives the data-cache SRAMs. |
| **MEM**| The data SRAM outputs are registered. The mul/div or ALU result is carried along. |
| **WB** | Data tag compare, load byte selection and sign extension, write-back mux, register write, scoreboard clear. Stores are written through here. |

Both caches use the same module (`l1_cache`). Its S0/S1/S2 steps are F1/F2/F3
for instructions and EX/MEM/WB for data.

## Compressed instructions: the re-aligner

With the C extension an instruction is 16 or 32 bits long and may start on
any 2-byte boundary. The cache still delivers one aligned 32-bit parcel per
fetch. The re-aligner in F3 turns the parcel stream into one instruction
per cycle:

* A parcel has a low and a high halfword. A jump to an address that is
  2 mod 4 enters its parcel at the high half.
* A 32-bit instruction that starts in the high half of one parcel is kept
  (its first halfword) and completed with the low half of the next parcel.
* A parcel can hold two instructions: two 16-bit ones, or the end of a
  split 32-bit one followed by a 16-bit one. The first goes to Decode, and
  F1 to F3 are held for one cycle while the second follows.
* A predicted-taken jump drops the rest of its parcel; a redirect from EX
  clears the re-aligner.
* 16-bit instructions are expanded to their 32-bit equivalents
  (`rvc_expand`). Decode and everything after it only see 32-bit
  encodings, plus one bit saying the instruction was short, which makes the
  next PC and the link address PC + 2.

## Control flow: three places that can redirect fetch

Fetch has three chances to get the next PC right. Each later one is slower,
but it knows more.

1. **F2, BTB (1 bubble).** F1 always fetches the next parcel. One cycle
   later the BTB sees that parcel's address in F2. A hit means "a taken jump
   or branch ended in this parcel before". F1 then restarts at the stored
   target, and the one sequentially-fetched parcel in F1 is squashed. F2
   records which parcel it fetched next (BTB target or next parcel).
2. **F3, pre-decoder + BHT (2 bubbles).** Once the instruction is known,
   the pre-decoder forms its own guess of its next PC:
   * JAL: PC + J-immediate.
   * Conditional branch: PC + B-immediate if the BHT's 2-bit counter says
     taken, otherwise the next instruction.
   * JALR: the BTB target if F2 had a hit, because its real target needs a
     register; otherwise the next instruction.
   * Anything else: the next instruction (PC + 2 or PC + 4).

   This guess is the instruction's *predicted next PC* and travels with it.
   When the parcel is left (after its last instruction, or after a
   predicted-taken one), the pre-decoder checks that F2 fetched the right
   parcel next. If not, F1 is redirected and F1 and F2 are squashed. This
   also clears a BTB false hit.
3. **EX, misprediction unit (4 bubbles).** The real next PC is computed from
   the register operands. It is compared with the predicted next PC for
   *every* instruction. A difference redirects F1 and squashes F1, F2, F3 and
   D. The same unit trains the predictors:
   * the BTB is written for every taken jump or branch;
   * the BHT counter is moved for every conditional branch.

When more than one redirect happens in a cycle, EX wins over F3, and F3 wins
over F2. A redirect only takes effect in a cycle without a global stall (see
below). An instruction-cache miss on a wrong path is therefore finished
before the redirect squashes it. This wastes a refill but keeps the control
simple.

## Operands: scoreboard and bypass

The scoreboard keeps, for each register, a count of issued instructions that
will write it and have not yet written back. The count goes up when Decode
issues the instruction and down in WB. If a source's count is zero, the
register file is up to date. Otherwise Decode takes the value from the
*youngest* in-flight writer:

| youngest writer in | value available when it is | otherwise |
|---|---|---|
| EX  | an ALU op, LUI/AUIPC, JAL/JALR (link address) | load or mul/div: stall |
| MEM | anything except a load | load: stall |
| WB  | anything (the load data is aligned in WB) | — |

A stall holds F1 to D and sends a bubble into EX. So a load followed
directly by a use of its result costs two bubbles. With one unrelated
instruction between them it costs one.

## Traps and CSRs (`csr_unit`)

The publication says the core implements the privileged architecture and
gives nothing more, so this part follows the RISC-V privileged
specification directly, reduced to machine mode.

* **Where.** Everything happens in EX. An instruction there is on the right
  path, and everything older has already passed the point where it could
  trap, so traps are precise with no extra bookkeeping. A trap or MRET
  redirects fetch exactly like a misprediction (4 bubbles) and flushes
  F1 to D.
* **What traps.** Any encoding the decoder does not recognise, including
  F/D/A instructions (cause 2, `mtval` = the instruction word); a CSR
  access to an unknown address or a write to a read-only one (cause 2);
  EBREAK (cause 3, `mtval` = PC); ECALL (cause 11). For a compressed
  instruction, `mtval` holds its 32-bit expansion, which is 0 for an
  illegal one.
* **What the trapped instruction does.** It continues to WB as a bubble: it
  writes no register and does not appear on the retirement trace. It still
  clears its scoreboard entry, so nothing waits on it.
* **Registers.** `mstatus` (MIE, MPIE; MPP reads as machine), `misa`,
  `mie`/`mip` (zero), `mtvec` (direct mode), `mscratch`, `mepc`, `mcause`,
  `mtval`, `mcycle`, `minstret`, the read-only `cycle`/`instret`, and the
  ID registers (zero). CSR reads return the old value as the instruction's
  result, which the bypass network forwards like an ALU result.
* **Counters.** `mcycle` counts every clock. `minstret` counts instructions
  on the retirement trace.

## Global stalls

Three conditions freeze **every** stage:
* an instruction-cache miss in F3;
* a data-cache miss or a store in WB;
* a multiply or divide in EX that has not finished.

Register writes, the scoreboard, predictor training and the retirement trace
are all gated by the global stall, so each one happens exactly once.

## The cache (`l1_cache`)

* 16 KB, 4 ways, 64-byte lines, so 64 sets. One way is 4 KB, so the set
  index falls inside a 4 KB page offset. This is what allows virtual
  indexing with physical tags. In this model there is no address
  translation, so addresses are physical.
* Each way has a data SRAM of 512 x 64 bits and a tag SRAM of 64 x 52 bits.
  The valid bits are resettable flip-flops next to them, read in step with
  the SRAMs.
* **Hit timing.** A request presented in S0 has its SRAM outputs registered
  at the end of S1. In S2 it is compared and selected. Data therefore
  returns 2 cycles after the request, and a new request is accepted every
  cycle.
* **Load miss.** The line is read from memory: one request, then 8 beats of
  64 bits, word 0 first. It is written into an invalid way if there is one,
  otherwise into the way a round-robin counter points at. The requested
  word is forwarded to S2.
* **Stores** are write-through without write-allocate:
  * every store goes to memory as one word with byte enables;
  * a store that hits also updates the data SRAM.
* **Busy and replay.** While a miss or a store is in progress, `busy` is
  high and the core stalls. A stalled cache keeps re-reading the SRAMs at the
  address of the request in S1. The cache also adds one more read of that
  address ("replay") after its own last SRAM write and before it drops
  `busy`. So the request waiting in S1 never carries data from before a
  refill or store.
* **Memory port.** `mem_req_valid/ready` is a handshake. A request is either
  a line read (`we=0`, line-aligned address) or a one-word write (`we=1`,
  `wdata`, `be`). The read beats come back on `mem_resp_valid/data`. Only
  one request is outstanding at a time. The core brings out one such port
  per cache (`imem_*`, `dmem_*`). What sits behind them is up to the
  system.

## Multiply and divide (`muldiv`)

* **Multiply.** A 65 x 65-bit signed product is registered, so it takes
  2 cycles. MUL and MULW use the low half; MULH, MULHSU and MULHU use the
  high half.
* **Divide.** A restoring divider works on the operand magnitudes, one
  quotient bit per cycle, followed by a sign fix-up: 65 cycles. Division by
  zero and signed overflow give the results the ISA specifies.
* **32-bit forms.** These divide the sign- or zero-extended low words. After
  sign extension of bit 31 this gives exactly the W results.
* **Handshake.** The core holds `req` until `done`, and `ack`s the result
  when Execute advances.

## Where this model departs, and what it leaves out

* **ISA.** The published core is RV64GC with the privileged ISA and boots
  Linux. This model is RV64IMC and has:
  * no FPU (F/D), so the compressed floating-point loads and stores are
    illegal too;
  * no atomics (A);
  * machine mode only: no supervisor or user mode, no interrupts, no TLB
    or virtual memory.

  Instructions of the missing extensions raise an illegal-instruction
  trap. FENCE, FENCE.I and WFI are no-operations.
* **Unsupported addresses.** Loads or stores that cross an 8-byte boundary
  are not supported. No misaligned-access exception flags them.
* **Re-aligner details.** The publication names a re-aligner in F3 and
  nothing more. The 32-bit parcel, one instruction per cycle, the one-cycle
  hold for parcels with two instructions, and BTB entries kept per parcel
  are this model's choices.
* **Pre-decoder placement.** The publication describes splitting decode in
  two. Its pipeline figure shows this as a pre-decoder in F3 followed by the
  Decode stage, and that is what is built.
* **Own choices.** Several details are choices of this model, not of the
  publication:
  * 64-entry direct-mapped BTB and 512-entry BHT;
  * the cache's line size, write policy, replacement and memory port;
  * the scoreboard as counters;
  * a mul/div unit that stalls the pipeline;
  * reset PC `0x8000_0000`, asynchronous active-low reset.
* **Store cost.** Every store holds the pipeline until memory accepts the
  write, plus one replay cycle. In the publication only the intermediate
  design (before the data-cache access was moved to Execute) is said to
  lose a cycle on memory instructions.
* **Not measured.** Clock frequency, area and CoreMark score are properties
  of the publication's synthesis flow and benchmark runs. Nothing here
  measures them.

## Files

| file | contents |
|---|---|
| `rtl/riscy_pkg.sv` | XLEN, opcodes, operation enums, the `ctrl_t` control word, immediate extraction |
| `rtl/riscy_v2.sv` | top: pipeline registers, next-PC logic, bypass and stall control, write-back |
| `rtl/realigner.sv`, `rtl/rvc_expand.sv` | cutting parcels into instructions, expanding compressed ones |
| `rtl/btb.sv`, `rtl/bht.sv`, `rtl/predecoder.sv`, `rtl/mispred_unit.sv` | branch prediction and resolution |
| `rtl/csr_unit.sv` | machine-mode CSRs, traps and MRET |
| `rtl/decoder.sv`, `rtl/regfile.sv`, `rtl/scoreboard.sv`, `rtl/alu.sv`, `rtl/muldiv.sv` | decode and execute units |
| `rtl/l1_cache.sv`, `rtl/sram_sp.sv` | cache and its SRAM arrays |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/mem_model.sv` | behavioural memory behind a cache port (latency, random back-pressure) |
| `tb/rv_asm_pkg.sv` | RISC-V instruction encoders used to build test programs |
| `tb/tb_trap.sv` | whole-core program that raises and handles four traps |
| `tb/tb_kernels.sv`, `tb/tb_kernels_c.sv` | compiled C workload, RV64IM and RV64IMC builds |
| `tb/kernels_text.hex`, `tb/kernels_c_text.hex`, `tb/kernels_data.hex` | their code and data images |
| `tb/rvc_vectors.hex` | compressed/expanded instruction pairs for `tb_rvc_expand` |

Top-level parameters (`riscy_v2`): `RESET_PC`, `ICACHE_BYTES`/`DCACHE_BYTES`
(16384), `CACHE_WAYS` (4), `LINE_BYTES` (64), `BTB_ENTRIES` (64),
`BHT_ENTRIES` (512). Cache size over ways and line size must give a power of
two number of sets.

The top's retirement trace (`rt_valid`, `rt_pc`, `rt_instr`, `rt_we`, `rt_rd`,
`rt_wdata`) shows every instruction leaving WB in program order. It is the
easiest way to follow a program.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends.
With Verilator 5, from the repository root:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/riscy_pkg.sv tb/rv_asm_pkg.sv tb/tb_riscy_v2.sv --top-module tb_riscy_v2
./obj_dir/Vtb_riscy_v2
```

Replace `tb_riscy_v2` with any other `tb_<module>` to test one block.

The full-core test `tb_riscy_v2` runs at the default sizes:
* It generates a random RV64IM program, a loop of 80 random instructions
  run 40 times. The program includes data-dependent branches, a call and
  return, loads and stores of every size, multiplies and divides, five
  accesses 4 KB apart that fight over one cache set, and an ECALL whose
  handler reads and writes `mepc` and `mcause` and returns with MRET.
* A reference instruction-set model inside the testbench runs the program
  first. Every retired instruction (PC, destination, value) and the final
  data memory are then compared against it.
* It also counts each mechanism and fails if one never occurred:
  * the three redirect kinds;
  * hazard stalls;
  * bypass from each stage;
  * instruction and data refills, evictions, write-through stores;
  * mul/div stalls;
  * traps and MRETs.

A typical run retires about 4,200 instructions in about 30,000 cycles. The
cycle count is dominated by the 65-cycle divides in the random mix. The
random program uses 32-bit instructions only; compressed code is covered by
the workload tests below.

## A compiled workload

`tb_kernels` and `tb_kernels_c` run a small C program in the style of
CoreMark on the full-size core: a linked list (build, reverse, insertion
sort), an 8 x 8 matrix multiply, a number-parsing state machine, and a
CRC-16 over all results, three times over. CoreMark itself is not included.
The program was compiled with GCC at -O2, once for RV64IM and once for
RV64IMC. The C source is in the header of `tb_kernels.sv`. Both tests check
the 64-bit result against the value the same source gives on a host
computer.

| build | code | instructions | cycles | IPC |
|---|---|---|---|---|
| RV64IM  | 1.4 KB | 133,216 | 208,388 | 0.64 |
| RV64IMC | 1.1 KB | 133,216 | 215,385 | 0.62 |

The memory model behind each cache answers after 6 cycles. About 42,000
cycles of each run are spent in the 65-cycle divider (the kernels use `%`
and `/`). In the compressed build, 40 % of the executed instructions are
16-bit; 27,000 parcels held two instructions and 49,000 32-bit
instructions were split over two parcels. These numbers are not comparable
with the publication's CoreMark/MHz figure.

## How far it has been checked

* **Unit tests.** Each unit testbench compares against values computed
  independently in the testbench:
  * ALU, decoder, mul/div: every operation, including the division corner
    cases and the 2- and 65-cycle latencies;
  * BTB and BHT against reference tables;
  * cache: 20,000 random requests with squashes and external stalls against
    a shadow memory, plus the 2-cycle hit latency;
  * compressed expansion: 760 instruction pairs made with the GNU assembler
    and disassembler, plus the illegal and reserved forms;
  * re-aligner: random mixed-length code entered at either half of a
    parcel, with random stalls, taken jumps and flushes;
  * CSR unit: 20,000 random CSR accesses, traps and MRETs against a model
    of the registers.
* **Traps on the whole core.** `tb_trap` runs a hand-assembled program that
  installs a handler and raises ECALL, an illegal word, a write to `cycle`
  and EBREAK. The handler counts the traps, sums their causes and returns
  past each one. The test checks the final registers (trap count, cause
  sum, `mcause`, `mepc`, `mtval`, `mstatus`, `mscratch`) and that no
  trapping instruction retires.
* **Fault checks.** Each testbench was also run against a copy of its module
  with one deliberate bug, and it caught the bug.
* **Not checked.** Timing closure, compressed code in the random full-core
  test, and real system software (no operating system or
  CoreMark binary has been run).
