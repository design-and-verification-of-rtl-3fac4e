# ViVit: a dual-issue RISC-V CPU

This core runs RV32IM programs, plus the common part of the single-precision
F extension, two instructions at a time. Decoding and
dispatch stay in program order. Execution finishes out of order, and results
are committed back in order, two per cycle, through a reorder buffer (ROB).

Register renaming is built as an extension of the register file rather than a
separate table. Each register carries:

- the ROB id of its youngest writer;
- a BUSY flag for the out-of-order back end;
- a second flag, B_BUSY, for the in-order front end, which resolves every jump
  in Decode without branch prediction.

The evaluated configuration has:

- two 1-cycle ALUs;
- a 5-cycle pipelined multiplier/divider (MULDIV);
- a 3-cycle load/store unit (LSU);
- a 5-cycle pipelined floating-point unit (FPU);
- a 16-entry issue queue and a 64-entry ROB;
- a 1024-word instruction memory and a 65 536-word data memory.

All of these are the RTL's default parameters.

```
 imem ──► fetch ──► decode ──► issue ──► execute ──► prio_mux ──► rob ──► commit_router ×2
 (2 words) (pre-     (2 decoders,  (queue,    (2 ALU,     (2 writes/   (64,   ├─► regfile (data + renaming)
           decode)    jump logic)   renaming,  MULDIV,     cycle +      in-    └─► dmem (stores)
   ▲                     │          operands,  LSU,        overflow     order
   └──── branch_taken ───┘          disamb.)   FPU,        buffer)      commit)
                                                queues)
```

## The front end: bundles and jumps

`imem` reads two consecutive words each cycle and registers them.

`fetch` pre-decodes the pair and handles jumps. Jumps here are JAL, JALR and
conditional branches:

- If the first word is a jump, it goes to Decode alone and the second word is
  dropped.
- If the second word is a jump, the first goes alone. The jump is kept and sent
  alone on the next cycle.
- After sending a jump, Fetch freezes the memory (`stall_mem`) and itself
  (`stall_fetch`). It stays frozen until Decode pulses `branch_taken` with the
  new PC pair.

A jump therefore always sits alone in slot 0 of Decode.

`decode` turns each word into a `decoded_ins_t` record. The record holds the
functional unit, the operation code, the operand and destination addresses
with an integer/float bit, the immediate, the load/store flags, the store size
and an exception flag.

LUI, AUIPC and the link write of JAL/JALR become ALU additions of x0 and a
constant that Decode computes (`imm`, `pc+imm` or `pc+4`). A branch leaves
nothing behind in the pipeline once it is resolved.

The jump logic reads its source registers combinationally from the register
file. It resolves a jump when all of these hold:

- it has held the jump for one synchronisation cycle;
- no source register has B_BUSY set;
- no instruction waiting in Decode's own output register writes a source
  register. The register file does not yet know about that instruction, so
  this check is needed.

The cost of a jump is therefore two cycles, plus however long its operands take
to arrive. The design has no predictor and no flush: nothing after a jump is
fetched until the jump is resolved.

Floating-point instructions name registers in the second bank of the register
file. Decode sets an integer/float bit on each operand and on the destination:
FCVT.S.W and FMV.W.X read an integer register, and compares, FCVT.W.S, FMV.X.W
and FCLASS write one. FLW and FSW are ordinary LSU word accesses whose
destination or store data is a float register.

Decoded as illegal instructions:

- SYSTEM instructions (ECALL, EBREAK, CSR access);
- the fused multiply-add instructions;
- floating-point arithmetic with a static rounding mode other than
  nearest-even, and FCVT.W[U].S with any mode but round-toward-zero;
- unknown opcodes.

An illegal instruction gets exception code 2. It flows through the pipeline as
a no-op, commits in order and is reported on `exc_valid`/`exc_code`/`exc_pc`.
No trap is taken.

## Renaming and operand selection (the hard part)

Each of the 64 register-file entries has four fields:

| field    | set by                                        | cleared by                          |
|----------|-----------------------------------------------|-------------------------------------|
| DATA     | commit                                        | —                                   |
| RENAMING | fill (queue entry): ROB id of the writer       | overwritten by the next writer       |
| B_BUSY   | fill                                          | commit whose ROB id = RENAMING       |
| BUSY     | dispatch of the writer                        | commit whose ROB id = RENAMING       |

The 64 entries are 32 integer and 32 floating-point registers, addressed
`{f_noti, index}`. Integer register 0 is never written or renamed. If a set and
a clear hit the same register in one cycle, the set wins, because a younger
writer now owns the register.

**Fill (Issue).** When a bundle enters the issue queue, each instruction goes
through these steps:

- It receives the next ROB cell as its ROB id.
- It reserves that cell with its PC, destination and store size.
- It records each operand's RENAMING, and whether B_BUSY was set. B_BUSY set
  means the value was still being produced at that point.
- If slot 1 reads the register that slot 0 writes, it takes slot 0's ROB id
  directly.
- The destination is renamed.

BUSY is not raised here. If it were, an instruction such as `addi x5, x5, 1`
would wait for itself.

**Double read operands (Issue, combinational).** Each cycle the two oldest
queue entries try to dispatch. An operand comes from one of three places:

1. The register file, if no renaming was recorded. It also comes from there if
   the recorded producer has already committed. A producer has committed when
   its ROB id is no longer between the ROB head and the consumer's own ROB id.
   The value is also taken from the register file if the register's BUSY flag
   is clear.
2. Otherwise, the ROB cell of the producer, if its result is there.
3. Otherwise, the instruction waits, and so does the one behind it, since
   dispatch is in order.

Slot 1 never uses the register file for a register that slot 0 writes, because
slot 0 raises BUSY in the same edge.

The age test in rule 1 makes the choice exact when a register has been renamed
again after the consumer was queued. At that point BUSY may belong to a younger
writer while the consumer's producer has long since committed.

**Disambiguation.** A dispatched store writes its word address and ROB id into
a cell of the 8-cell disambiguation buffer. A load whose word address matches a
cell, or matches a store dispatched beside it, waits. The cell is freed when
that store commits to memory, and the load then reads the committed data.
Stores wait while the buffer is full.

## Execute, priority multiplexer and freeze

ALU instructions go to ALU 0 or ALU 1 according to their bundle slot. MULDIV,
LSU and FPU instructions go through 4-entry input queues. Issue sends work to a
unit only when `fu_room` says two more instructions fit.

Results go through `prio_mux`, which writes two of them into the ROB per cycle
in this order:

1. the LSU;
2. the oldest results in its 8-entry overflow buffer;
3. the other units.

Results that are not chosen enter the buffer. When the buffer has fewer free
cells than there are units, `freeze` stops the units and dispatch until it
drains. No result is ever dropped.

The FPU handles FADD, FSUB, FMUL, FDIV, FSQRT, FMIN, FMAX, the sign
injections, FEQ, FLT, FLE, both FCVT directions, FMV and FCLASS. It computes the result in one
combinational step and then delays it through a 5-stage register chain, like
the MULDIV unit, so it accepts one instruction per cycle. Addition aligns the
smaller operand with guard, round and sticky bits. Both addition and
multiplication normalise with a leading-zero count and round to nearest,
ties to even. Division divides the significands, keeping 26 quotient bits
after the leading one plus a sticky bit from the remainder. Square root takes
a bit-by-bit integer root of the significand, scaled by an even power of two.
Subnormal inputs and results count as signed zero. Every NaN
result is the canonical quiet NaN.

The ROB commits its head, and the next entry too if it is ready, in the same
cycle. The commit outputs are combinational. Two commit routers send each
committing entry to the register file (register write) or to the data memory
(store, 1/2/4 bytes). The data memory therefore has two write ports.

## Where this RTL departs from the original description

- **The FPU's insides are this design's own.** The original description only
  calls for a floating-point unit with a 5-cycle latency. This one lacks:
  - fused multiply-add, which needs a third source operand that the
    instruction records do not carry;
  - the other rounding modes;
  - subnormal arithmetic;
  - the `fcsr` register and its exception flags.
- **No CSRs and no traps.** Exceptions are only reported at commit.
- **Jump synchronisation** ends on Decode's `branch_taken` handshake rather
  than on a cycle counter in Fetch. The timing is the same: a minimum of one
  cycle, extended while operands are missing.
- **Disambiguation** compares word addresses. It frees cells by the store's ROB
  id and stalls stores when full. The buffer size, the queue depths and the
  freeze back-pressure are this design's own.
- **The producer age test** in operand selection, and Decode's check of its own
  output register, are additions. Without them some back-to-back dependences
  read stale values.
- **Memories** are plain arrays. The instruction memory has a registered read
  and a write port for loading programs. The data memory has a combinational
  read, two store ports and a word preload port. Only aligned accesses are
  supported.

## Files

`rtl/vivit_pkg.sv` holds sizes, operation codes and the records passed between
stages. It defines `decoded_ins_t`, `iq_entry_t`, `rob_entry_t`, `exe_ins_t`,
`fu_res_t`, and the commit records.

Each file in `rtl/` opens with a comment on its timing and interface. The top
is `rtl/vivit_cpu.sv`. Besides the program and preload ports, it brings out:

- both commit slots: PC, register write and store;
- the exception report;
- one event line per mechanism: jump resolved, jump waiting for an operand,
  split bundle, issue queue full, load held by disambiguation, operand wait,
  freeze, overflow buffer used.

| module | parameters (default) |
|---|---|
| `imem` | `DEPTH` (1024), `RESET_PC` (0) |
| `issue` | `DEPTH` (16), `DISAMB` (8) |
| `execute` | `MULDIV_LAT` (5), `FPU_LAT` (5), `QDEPTH` (4), `BUF_DEPTH` (8) |
| `muldiv` | `LATENCY` (5) |
| `fpu` | `LATENCY` (5) |
| `prio_mux` | `NUM_FU` (5), `BUF_DEPTH` (8) |
| `dmem` | `DEPTH` (65536) |
| ROB depth | `ROB_DEPTH` = 64 in the package |

## Verification

Every block has a self-checking testbench in `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`.

`tb/rv_asm.sv` holds the shared test code:

- RV32IM and RV32F instruction encoders;
- a single-precision reference. It computes in double precision, where a sum
  or product of two single-precision values is exact or nearly so, and then
  rounds to nearest-even by hand;
- a reference instruction-set model (`rv_iss`) that returns the effect of each
  committed instruction.

What each testbench covers:

- **`vivit_cpu_tb`** runs the whole CPU at its default sizes. It loads a
  program with:
  - dependent chains;
  - bursts of multiplies, divides and loads;
  - a dependent divide chain;
  - store-then-load pairs;
  - byte and half-word accesses;
  - branches in both slots, taken and not taken, and waiting for operands;
  - calls and returns;
  - a loop;
  - a floating-point section: conversions, a dependent chain of FADD, FSUB,
    FMUL, FDIV and FSQRT, FSW then FLW, compares, and a branch on an FLT
    result;
  - an ECALL.

  It checks every commit against the model, and the memory at the end. It
  requires each event line to fire at least once. It also checks that 32
  independent ALU instructions commit in at most 20 cycles (16 is the dual-issue
  ideal; the measured figure is 17). It reports 233 commits in 672 cycles with
  67 dual commits.
- **`issue_tb`** runs Issue with the real Decode, Execute, ROB, register file
  and memory. It runs 2 500 random, heavily dependent instructions. They use 7
  integer and 8 float registers and a 128-byte area, and include
  floating-point operations, moves between the banks, FLW and FSW. Every
  commit is checked against the model.
- **The unit testbenches** check:
  - **ALU:** every operation.
  - **MULDIV:** every operation, including division by zero and overflow, and
    the exact 5-cycle latency.
  - **LSU:** all widths and the exact 3-cycle latency.
  - **FPU:** 4 000 random operations and the exact 5-cycle latency. Operands
    are biased towards the hard cases: zeros, infinities, NaNs, values near
    overflow or underflow, operands of nearly equal size, and values around
    2^31.
  - **Priority multiplexer:** order, buffering, freeze, and that no result is
    lost.
  - **ROB:** in-order dual commit and its read ports.
  - **Register file:** the renaming rules.
  - **Data memory:** byte lanes.
  - **Fetch and imem:** the pre-decode cases, against a Decode model that
    answers jumps late.
  - **Decode:** the field decoding, and jump timing under B_BUSY.

To simulate with Verilator, for example the full CPU:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/vivit_pkg.sv tb/rv_asm.sv tb/vivit_cpu_tb.sv --top-module vivit_cpu_tb
./obj_dir/Vvivit_cpu_tb +verilator+rand+reset+2
```

Swap in another `*_tb` name to run a unit testbench. A program is loaded
through `prog_we`/`prog_addr`/`prog_data` while `rst_n` is low. Data can be
preloaded through `dmem_we`/`dmem_waddr`/`dmem_wdata`. Execution starts at
`RESET_PC` when reset is released.

## Known limits

- **Partial F extension.** Programs that use fused multiply-add, a rounding
  mode other than nearest-even, subnormal values or `fcsr` are not run
  correctly. Neither are programs that rely on other CSRs (cycle counters,
  `mhartid`). Those instructions are turned into reported no-ops.
- **Jumps are expensive.** Every jump stops the front end for at least two
  cycles. Branch-dense code gets little out of the second issue slot.
- **Combinational paths are long.** The operand networks (register file → Issue,
  ROB → Issue, register file → Decode) and the combinational ROB commit are the
  critical paths. No timing closure has been attempted.
