# Decoder and state-machine control for a small root-of-trust SoC

Most of a small processor or accelerator is datapath: register files,
memories, an ALU and muxes. The part that is easy to get wrong is the control
that steers it. That control is either an instruction decoder, which turns
each opcode into a control word, or a state machine, which picks the datapath
operation from a state and a few inputs. This repository holds complete RTL
for a set of such designs, each with its control filled in:

| design | module | control style | what it shows |
|---|---|---|---|
| single-cycle RV32I + Zbkb + Zbkc core | `rv_core_single` | decoder | the decoder and control word on their own |
| two-stage RV32I + Zbkb + Zbkc core | `rv_core_2stage` | decoder | the same decoder on a pipelined datapath |
| constant-time crypto core | `ct_core` | decoder | three stages, no conditional branches, conditional move |
| AES-128 encryption accelerator | `aes128_accel` | FSM | first / intermediate / final round states |
| ALU machine | `alu_machine` | decoder + bypass selects | three-stage pipeline with bypassing |
| accumulator | `acc_fsm` | FSM | three-state machine driven by reset/go/stop |

All three cores share one decoder (`rv_control`), one ALU (`rv_alu`), one
register file (`rv_regfile`) and the two memories (`rv_imem`, `rv_dmem`).
`owl_top` puts all six designs side by side. They exchange no data. They
share `clk` and `rst_n`, and each brings out its own ports under a prefix
(`sc_`, `p2_`, `ct_`, `aes_`, `am_`, `acc_`).

All resets are synchronous and active low (`rst_n`). All memory and register
writes happen on the rising edge. All reads are combinational.

## The control word

`rv_pkg::ctrl_t` is the interface between the decoder and every core's
datapath:

| field | meaning |
|---|---|
| `reg_write` | write `rd` |
| `mem_read`, `mem_write` | load into `rd` / store `rs2` |
| `mask_mode` | access size: 0 byte, 1 half, 2 word |
| `mem_sign_ext` | sign-extend a byte or half load |
| `alu_op` | ALU operation (`alu_op_e`) |
| `alu_imm` | ALU operand 2 is the immediate, else `rs2` |
| `alu_pc` | ALU operand 1 is the PC, else `rs1` |
| `jump`, `jalr` | unconditional jump; `rd <- pc+4`; for JALR the target is the ALU result with bit 0 cleared |
| `branch` | conditional branch; the condition comes from funct3 and a comparator in the datapath |
| `cmov` | write `rd` only if the ALU's condition output is set |

`rv_control` is one flat `case` over the opcode, funct3 and funct7. The Zbkb
unary operations (`rev8`, `brev8`, `zip`, `unzip`) are told apart by the
12-bit immediate field. No encoding depends on another, so each instruction's
control word can be read off its own case arm. For `LW`, for example, the word
is `mem_read=1, mask_mode=2, alu_op=ADD, alu_imm=1, reg_write=1`, with
everything else 0. FENCE, ECALL/EBREAK and every undefined encoding decode to
`CTRL_NOP`: nothing is written and the PC just advances. There are no
exceptions or interrupts.

The decoder has four parameters: `ZBKB`, `ZBKC`, `BRANCHES` and `CMOV`. The
RV32I-only, +Zbkb and +Zbkc variants of a core are therefore just parameter
settings.

## The three cores

All three cores have the same ports:

- a write port into instruction memory (`imem_we`, `imem_waddr` word address, `imem_wdata`);
- a debug port onto data memory (`dbg_addr` word address, `dbg_we`, `dbg_wdata`, `dbg_rdata`);
- the current fetch PC (`pc_o`).

Instruction and data memories are separate. Each holds 1024 words by default
(`IMEM_WORDS`, `DMEM_WORDS`). Hold `rst_n` low while you load a program. The
core starts at PC 0 on the first cycle after reset goes high. The register
file is not reset, and `x0` always reads zero. Accesses are assumed to be
aligned.

**Single-cycle** (`rv_core_single`). Fetch, decode, execute, memory and
write-back all happen in one cycle. The register write-back mux picks load
data, `pc+4` (jumps) or the ALU result. The next PC is the jump or taken
branch target, else `pc+4`. One instruction completes per cycle.

**Two-stage** (`rv_core_2stage`). Stage 1 fetches, decodes, reads registers,
executes, and resolves jumps and branches. Stage 2 does the data-memory access
and register write-back. Because the PC is steered from stage 1, no
instruction is ever fetched down a wrong path. The hazard is in the register
file: stage 2 writes a register in the same cycle that stage 1 reads it. The
register file is instantiated with `BYPASS=1`, which makes a read of the
register being written return the value being written. That covers ALU
results, return addresses and load data. A dependent instruction, even one
right after a load, therefore issues with no stall, and the core completes
one instruction per cycle.

**Constant-time core** (`ct_core`). This core is meant for cryptographic code
whose running time must not depend on secret data:

- Stage 1 fetches into a fetch register that carries a valid bit.
- Stage 2 decodes, reads registers and executes.
- Stage 3 accesses data memory and writes back, with the same register-file
  bypass as the two-stage core.

The ISA is RV32I without conditional branches, plus Zbkb, plus a conditional
move:

    CMOV rd, rs1, rs2     rd <- rs1   if rs2 != 0, else rd unchanged
    encoding: R-type, opcode 0001011 (custom-0), funct3 = 000, funct7 = 0000000

The ALU passes `rs1` through and raises `cond = (rs2 != 0)`. The core writes
`rd` only when `cond` is set. JAL and JALR resolve in stage 2. They redirect
the PC and squash the instruction in the fetch register, so every jump costs
exactly one extra cycle. Since no instruction's latency depends on data, a
program's cycle count is fixed by its instruction path. Without branches, the
path can only change through computed jumps, and a program stays constant-time
as long as those jumps don't depend on data.

Loops are written without branches: decrement a counter, use CMOV to pick
between the loop-start address and the exit address, then `JALR` to the pick.
`tb/ct_sha256_tb.sv` assembles a complete SHA-256 program this way:

- a 48-iteration message-schedule loop;
- a round loop unrolled eight rounds deep, where the working variables are
  renamed rather than moved;
- `RORI`, `ANDN` and `REV8` from Zbkb.

It is 331 instructions. It hashes single-block messages of 4 to 32 bytes in
3068 cycles whatever the length, and the digests match a reference model.

## AES-128 accelerator

`aes128_accel` encrypts one 128-bit block in ten cycles, one AES round per
cycle, and expands the round keys as it goes. A 4-bit round counter `round`
is the only control state. The state decode is:

| `round` | `state_o` | round performed |
|---|---|---|
| 0 | `00` first | AddRoundKey with the cipher key, then AES round 1 |
| 1..8 | `01` intermediate | AES rounds 2..9 (SubBytes, ShiftRows, MixColumns, AddRoundKey) |
| 9 | `10` final | AES round 10, without MixColumns |
| 10 | (idle) | done; holds |

Each round replaces the round-key register with the next key and increments
`round`. To start, assert `start` for one cycle while the unit is idle (after
reset, or once `done` is high), with `key_in` and `plaintext` valid in that
same cycle. The first round runs in that cycle. `done` goes high nine cycles
later with the result in `ciphertext`, and stays high until the next start.
The S-box is not a table. It is computed in logic as the GF(2^8)
multiplicative inverse (x^254) followed by the AES affine map. The helper
functions are in `aes_pkg`. Bytes are ordered as in FIPS-197: byte 0 is bits
127:120.

## ALU machine

`alu_machine` is a minimal pipelined machine. It has four 8-bit registers and
instructions `(op, src1, src2, dest)`: op `00` no operation, `01` ADD, `10`
AND, `11` XOR. One instruction enters per cycle:

1. Read `src1` and `src2` and latch them into pipe register 1.
2. Apply the ALU and latch the result and `dest` into pipe register 2.
3. Write the register.

The control has two hazards to cover:

- **Distance 1.** The instruction one ahead is still in the ALU when its
  result is needed. A bypass mux in front of each operand takes the ALU
  output instead. The selects `fwd1_o` and `fwd2_o` are brought out.
- **Distance 2.** The instruction two ahead is being written back. The
  register file reads through the write.

A register's new value is therefore visible to the next instruction. It
appears at the register read-out port (`dbg_addr`/`dbg_data`) three clock
edges after the instruction is presented. The instructions have no way to
bring in a constant, so `dbg_we`/`dbg_wdata` load a register directly. A
write-back in the same cycle takes priority.

## Accumulator FSM

`acc_fsm` has three states: RESET (0), GO (1) and STOP (2). It has an 8-bit
accumulator and a 2-bit input `val`:

    RESET & go     -> GO     acc += val
    GO    & !stop  -> GO     acc += val
    GO    & stop   -> STOP   acc unchanged
    STOP  & reset  -> RESET  acc = 0
    otherwise         hold

## Where this departs from, or adds to, the published design

- **CMOV.** Its encoding is this design's own.
- **Constant-time core ISA.** It was specified as "what SHA-256 needs"
  without a list. This design keeps all of RV32I except conditional branches,
  adds Zbkb, and leaves out Zbkc. Branch encodings do nothing.
- **ISA variants.** The two RV32I cores build both extensions by default. Set
  `ZBKB`/`ZBKC` to 0 for the smaller variants.
- **Forwarding.** The bypass in the two pipelined cores is how this design
  meets the specified timing, where stage 1 reads the register file while the
  last stage writes it. The original names the timing, not the mechanism.
- **AES intermediate-round decode.** Two descriptions disagree. One gives
  round 1..8 for the intermediate state. The other, a printed state mux,
  decodes `(round > 1) & (round <= 9)`. The RTL follows the first, because it
  is the one that yields ten AES rounds.
- **AES start/done and idle value.** The handshake and the idle value 10 are
  this design's own.
- **Accumulator.** The transitions follow the state diagram. The textual
  specification gives the go update the wrong target instruction and gives
  stop no state update. The RTL does not copy those slips.
- **ALU machine.** The encodings for NOP, AND and XOR are this design's own.
  Only ADD = `01` is given. The register load port is an addition.
- **Memories and ports.** Memory sizes, the program-load and debug ports, and
  all reset behaviour are this design's own.

## Testbenches

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`.

- **Core tests** (`rv_core_single_tb`, `rv_core_2stage_tb`, `ct_core_tb`).
  Each runs twelve random 300-instruction programs from `rv_tb_pkg::rv_progen`
  and compares against the instruction-set model `rv_tb_pkg::rv_model`. The
  programs are dense in back-to-back and load-use dependencies, and use
  forward branches (not on the constant-time core), JAL, JALR and, on the
  constant-time core, CMOV. Each test checks:
  - the cycle count to the final jump-to-self (one per instruction, plus one
    per jump on the constant-time core);
  - all 512 data words, which include a dump of `x1..x31`.
- **`rv_isa_variants_tb`.** Builds both RV32I cores in the RV32I-only,
  +Zbkb and +Zbkc variants and runs the same full-ISA programs on all six. In
  a variant that lacks an extension, that extension's instructions must have
  no effect, as that variant's model predicts.
- **`ct_sha256_tb`.** Hashes 29 messages, lengths 4..32. It checks the
  digests, the cycle count against the model, and that the count is the same
  for every length.
- **`aes128_accel_tb`.** Runs the FIPS-197 example vectors plus 40 random
  blocks against a reference AES in the testbench. It checks the ten-cycle
  latency and the number of cycles spent in each state.
- **`owl_top_tb`.** The end-to-end test, at default parameters. It runs
  programs on all three cores at once, AES blocks, an ALU-machine instruction
  stream and accumulator sequences. It counts every mechanism and fails if one
  never happens: taken and not-taken branches, forwarded dependencies and
  load-use, jump flushes, CMOV move and keep, each AES state, both ALU-machine
  bypasses, and each accumulator transition.
- **Unit tests.** The remaining testbenches cover the decoder (every
  instruction, with random register and immediate fields, against
  hand-derived control words), the ALU (against bit-level reference
  functions), the register file, the memories, the ALU machine and the
  accumulator.

Each module's own testbench has been seen to fail against a deliberately
broken copy of that module.

## Simulating

Verilator 5 with `--timing`. The packages must come first:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/rv_pkg.sv rtl/aes_pkg.sv tb/rv_tb_pkg.sv tb/owl_top_tb.sv \
        --top-module owl_top_tb -Mdir obj_owl && obj_owl/Vowl_top_tb

To run another testbench, replace `owl_top_tb` with its name. Testbenches
that don't use the cores can drop `tb/rv_tb_pkg.sv`. Everything finishes in
well under a second.

## Limits

- The cores have no exceptions, interrupts, CSRs or misaligned-access
  support, and no memory protection.
- The memories read combinationally. They are written as arrays, so a
  synthesis flow will build them from flip-flops unless they are mapped to
  SRAM macros.
- The constant-time property covers the core's timing, not the program's. A
  jump whose target depends on secret data still takes a secret-dependent
  path.
- The AES unit encrypts only. It has no decryption and no key sizes other
  than 128 bits.
- Every check is simulation-based, against models written for these
  testbenches. There is no formal proof.
