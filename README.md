# SHA-RV: a RISC-V core with a pipelined SHA-224/256 unit

SHA-RV adds SHA-224 and SHA-256 hashing to a small five-stage RISC-V
pipeline. The host does not run the 64 rounds in software. It copies its
message blocks into data memory and runs a very short program: load a base
address, issue one custom SHA instruction, and stop. From then on the hardware
does the work:

- A 256-word flip-flop **BufferSet** holds the initial hash value (IV), the 64
  round constants (K) and the message blocks in a fixed layout.
- A small **SHA controller** moves data between data memory and the BufferSet,
  one word per cycle.
- A **four-stage pipelined SHA core** computes the rounds. Its pipeline stays
  full because up to four independent message blocks are interleaved.

One 512-bit block needs 257 cycles of computation. That makes one session of
one block about 356 cycles, against the roughly 96,000 cycles the same hash
takes as plain RV32I code.

The RTL is IEEE 1800-2017 SystemVerilog and synthesizable. The top module is
`sha_rv_top`. Every module has a self-checking testbench in `tb/`.

## Contents

1. [Block diagram](#block-diagram)
2. [The four-stage SHA core and case interleaving](#the-four-stage-sha-core-and-case-interleaving)
3. [The SHA controller: one session](#the-sha-controller-one-session)
4. [The BufferSet and its map](#the-bufferset-and-its-map)
5. [The custom instructions](#the-custom-instructions)
6. [The RISC-V pipeline](#the-risc-v-pipeline)
7. [Data memory and double buffering](#data-memory-and-double-buffering)
8. [Cycle counts](#cycle-counts)
9. [Where this RTL departs from the original description](#where-this-rtl-departs-from-the-original-description)
10. [Files](#files)
11. [Simulating](#simulating)
12. [How far it has been checked](#how-far-it-has-been-checked)

## Block diagram

```
 host ports                      sha_rv_top
 ──────────┐   ┌──────────────────────────────────────────────────────────┐
 start ────┼──►│ sha_rv_state_ctrl ── run ──► rv_core (IF ID EX MEM WB)   │
 done  ◄───┼───│        ▲ halted (EBREAK/ECALL)    │   │ custom instr.    │
 im_*  ────┼──►│ sha_rv_imem ◄──── fetch ──────────┘   │ in EX            │
           │   │                                  ┌────┴─────────┐        │
 dm_*  ◄──►┼──►│ sha_rv_dmem ◄─ port B (shared) ─►│ sha_buffer_  │        │
 (port A)  │   │   8192 x 32                      │ xfer (burst) │        │
           │   │        ▲                         └──────┬───────┘        │
           │   │        └──────── sha_controller ◄───────┤ base address   │
 sha_state ◄───┼───────────────── (PREP LOADMSG  ──► sha_bufferset        │
           │   │                  EXEC FINAL DONE)  256 x 32, all words   │
           │   │                        │   ▲        read in parallel     │
           │   │                        ▼   │                             │
           │   │                 sha_core (N_IN = 4 cases)                │
           │   │   sha_value_rotator → sha_message_expander               │
           │   │                     → sha_message_compressor             │
           └───└──────────────────────────────────────────────────────────┘
```

Port B of the data memory has three users:

- the burst engine, while it is busy;
- otherwise the SHA controller, while it copies;
- otherwise the MEM stage of the pipeline.

While a custom instruction waits in EX, the MEM stage only carries bubbles. So
the three users never collide, and an assertion in the top checks this.
Port A belongs to the host alone.

## The four-stage SHA core and case interleaving

`sha_core` combines three units:

- **Message expander** (`sha_message_expander`). It computes the schedule word
  W[j+16] = σ1(W[j+14]) + W[j+9] + σ0(W[j+1]) + W[j] in four stages.
  - Stage 1 forms σ1(W[j+14]) + W[j+9] and σ0(W[j+1]) + W[j].
  - Stage 2 adds the two sums.
  - Stages 3 and 4 only delay the result.
- **Message compressor** (`sha_message_compressor`). It runs one SHA-2 round
  in four stages, with no more than one adder on any path in a stage.
  - Stage 1 forms five sums in parallel: Σ1(e)+K, Ch(e,f,g)+W, Maj(a,b,c),
    Σ0(a)+h and d+h.
  - Stage 2 forms T1−h = (Σ1(e)+K) + (Ch+W) and T2+h = (Σ0(a)+h) + Maj.
  - Stage 3 forms a' = (T1−h) + (T2+h) and e' = (T1−h) + (d+h).
  - Stage 4 is a register.
  - The unchanged words (b' = a, c' = b, …) pass through four plain registers,
    so all eight outputs leave together.
  - Adding h into two of the stage-1 sums removes it from the later stages,
    which keeps one adder per stage.
- **Value rotator** (`sha_value_rotator`). It keeps a sliding 16-word window
  W[j..j+15] for each case, plus a 64-entry K ring that rotates by one word per
  round. The current round always reads W[j] from window position 0 and K[j]
  from the head of the ring.

Both pipelines are four cycles deep. A round of one block therefore cannot
start until its previous round leaves stage 4. The core fills the idle stages
with other blocks.

**Interleaving.** A counter `t` runs from 0 to 259.
- In cycle t, case `t mod 4` issues round `t div 4`, if that case exists.
  `n_cases` selects 1 to 4 cases.
- The compressor output that leaves stage 4 in cycle t is the state of case
  `t mod 4` after round `t div 4 − 1`. That is exactly the case issuing in the
  same cycle. So the state feeds straight back into the compressor input, and
  no state registers are needed outside the pipeline.
- Round 0 takes its state from `h_in` instead.
- The expander works in the same rhythm. The word it produces from case c's
  window in cycle t arrives in cycle t+4, when case c issues again. The rotator
  places it as the newest word of that case's window, shifts the window by one,
  and stores it back.
- The K ring is shared by all cases, because all cases are in the same round.
  It rotates on the fourth slot of every round.

**Finish.** Case c reaches round 64 in cycle 256 + c. The core then adds `h_in`
to the pipeline output (the feed-forward addition of SHA-2) and stores the
result in `digest`. `done` pulses one cycle after the last case finishes.

**Timing.** One case takes 258 cycles from the `start` pulse to `done`:
- 256 cycles for 64 rounds of 4 cycles;
- 1 cycle for the feed-forward addition;
- 1 cycle for the start pulse.

Each further case adds one cycle. So four blocks cost 261 cycles instead of
4 × 258.

SHA-224 and SHA-256 use the same core. The caller chooses the IV and how many
digest words to keep.

## The SHA controller: one session

`sha_controller` is the FSM behind the SHA instruction. It has six states. The
state code is visible on the top's `sha_state` port.

| State   | Code | What it does |
|---------|------|--------------|
| IDLE    | 000 | Waits for `start_sha`. |
| PREP    | 001 | Copies IV and K from data memory (region words 0–71) into BufferSet 0–71, one word per cycle (72 cycles). It is skipped (1 cycle) when the BufferSet already holds them for the same hash variant. |
| LOADMSG | 010 | Copies the 16 words of each block of the next batch into that block's BufferSet slot. |
| EXEC    | 011 | Starts the core. IV or chaining value, K and message are taken from the BufferSet in parallel. It then waits for the core's `done` (259 cycles for one block). |
| FINAL   | 100 | Writes each digest, one word per cycle, into the BufferSet and into the same place in data memory. |
| DONE    | 101 | Starts the next batch if blocks remain. Otherwise it raises `done_sha` until the core drops `start_sha`. |

**Long-message mode.** The blocks of a session form one message. Each block
waits for the previous one:
- block 0 starts from the IV;
- every later block starts from the chaining value held in BufferSet 72–79.

**Short-message mode.** Every block is a message of its own, hashed from the
IV. Because the blocks are independent, up to four of them go into one core
run. This is what makes short mode about three times faster per block.

For SHA-224, all eight state words go to the BufferSet, because they are needed
for chaining. Only the seven digest words go to data memory.

## The BufferSet and its map

`sha_bufferset` is 256 words of 32 bits, built from flip-flops.
- Every word is readable at the same time, which lets the core load four
  message blocks, the IV and all of K in one cycle.
- Writes go through one word port, shared by the burst engine and the
  controller.

The controller uses a fixed map. Data memory holds the same layout from the
session's base address, so one base register describes a whole session.

| Words   | Long-message mode | Short-message mode |
|---------|-------------------|--------------------|
| 0–7     | IV H0..H7 | IV H0..H7 |
| 8–71    | K[0..63] | K[0..63] |
| 72–79   | digest (chaining value) | block 0 (72–87) |
| 80–95   | block 0 | digest of block 0 (88–95) |
| then    | block i at 80 + 16i | block i at 72 + 24i, its digest 16 words later |

The BufferSet has room for 11 long-mode slots and 7 short-mode slots. Longer
sessions reuse the slots cyclically: block i goes to slot i mod 11 or i mod 7.
Data memory keeps every block and every short-mode digest at its own address,
so a session is limited only by the 8192-word data memory:
- 507 blocks in long mode;
- 338 blocks in short mode.

## The custom instructions

Both instructions use the R-type layout: funct7 [31:25], rs2 [24:20],
rs1 [19:15], funct3 [14:12], rd [11:7], opcode [6:0].

| Opcode  | funct3 | Operation |
|---------|--------|-----------|
| 0101011 | 000 | Latch the base (rs1, by convention r8) and the amount (rs2, by convention r20). |
| 0101011 | 001 | Burst: data memory → BufferSet, `amount` words from the base. |
| 0101011 | 010 | Burst: BufferSet → data memory. |
| 0001011 | 000 | SHA-224, short-message mode. rs1 holds the number of blocks. |
| 0001011 | 001 | SHA-256, short-message mode. |
| 0001011 | 010 | SHA-224, long-message mode. |
| 0001011 | 011 | SHA-256, long-message mode. |

**Base and amount.**
- The base is a data-memory word index, not a byte address.
- BufferSet word i pairs with data-memory word base + i.
- The amount is clipped to 256 words.
- The latched base is also the base of the region a SHA session works on.

**Burst engine.** `sha_buffer_xfer` handles the bursts. A burst of n words
takes n + 1 cycles.

**Handshakes.** Both custom instructions use four-phase handshakes:
- `buf_req`/`buf_ack` for bursts;
- `start_sha`/`done_sha` for SHA sessions.

The instruction stays in EX until the acknowledge arrives. It then drops its
request, and the unit drops its acknowledge.

**Bursts are optional for hashing.** A SHA session does not need them, because
the controller stages IV, K and blocks itself. They remain for software that
wants to read or fill the BufferSet directly.

## The RISC-V pipeline

`rv_core` is an in-order five-stage pipeline: IF, ID, EX, MEM, WB.

**Decoding.**
- `rv_decoder` (basic) decodes RV32I: LUI, AUIPC, JAL, JALR, branches, all
  loads and stores (byte, halfword and word), immediate and register ALU
  operations, FENCE, ECALL and EBREAK.
- `rv_spec_decoder` (special) decodes the two custom opcodes.
- FENCE executes as a no-op. CSR instructions are not implemented; the
  hashing flow does not need them.
- Byte and halfword stores write through byte enables on the data-memory port.
  Loads select and sign- or zero-extend the addressed bytes in MEM. Misaligned
  accesses are not trapped: the low address bits are ignored.

**Hazards.**
- Results are forwarded from MEM and WB into EX.
- A load followed by an instruction that uses its result stalls for one cycle.
- Branches and jumps are resolved in EX. When taken, they flush the two younger
  instructions.
- The register file (`rv_regfile`) reads through a write in the same cycle.

**Custom instructions** freeze IF, ID and EX until their unit answers. During
that time, bubbles go to MEM.

**Halting.** ECALL or EBREAK stops fetching. When it reaches WB, the state
controller (`sha_rv_state_ctrl`) raises `done`. A new `start` pulse restarts
the program from address 0.

The instruction memory is combinational on the fetch side. So is port B of the
data memory, which means a load returns its data in MEM.

## Data memory and double buffering

`sha_rv_dmem` is 8192 × 32 with two ports:
- **Port A** is for the host. It reads synchronously, with data one cycle after
  the address.
- **Port B** is for the core. It reads combinationally and writes with byte
  enables.

Both ports can write in the same cycle. An assertion forbids them writing the
same word.

Splitting the memory into two halves (words 0 and 4096) gives double
buffering. The host:
1. fills one half through port A while the core hashes the other;
2. reads the digests of the finished half;
3. points the next session's base at the half it has just filled.

The end-to-end testbench uses exactly this schedule. Nothing in the RTL is
specific to it; the only requirement is that the host leaves alone the half
the core is using.

## Cycle counts

Counts for a session as seen by the SHA instruction (request to `done_sha`):

| Session | This RTL | Published model |
|---------|----------|-----------------|
| Staging IV and K (first session of a variant) | 72 | 72 |
| Per long-mode block | 284 (16 copy + 259 compute + 8 write-back + 1) | 282 |
| Short mode, batch of b ≤ 4 blocks | 25b + 259 | 290 per block |
| Long, N = 256 | 72 705 | 72 264 |
| Short, N = 256 | 22 977 | 74 312 |

At a 300 MHz clock, 284 cycles per long block gives about 541 Mbit/s. Short
mode with full batches reaches about 1.7 Gbit/s. The clock frequency itself
has not been checked.

## Where this RTL departs from the original description

- **Interleaving and latency.** The original gives the latency as 64 + (N_in −
  1) and, elsewhere, as 257 cycles per block. A four-stage round pipeline needs
  4 × 64 cycles per block. This RTL follows the 257-cycle figure, with N_in
  blocks interleaved.
- **EXEC length.** The original EXEC state counts 0 to 82 with sub-windows at
  16 and 65. That count does not fit a four-cycle round. Here EXEC simply
  waits for the core's `done`.
- **Number of short-mode slots.** The original allows up to eight short-mode
  cases, but only seven 24-word slots fit the 256-word map. This RTL uses
  seven slots and reuses them in turn.
- **Batching of short-mode blocks** is this design's own addition. So are:
  - the PREP skip rule;
  - the digest copy to data memory;
  - the clipped amount;
  - the handshakes;
  - the slot reuse in long sessions.
- **Who stages the data.** The original describes both a bulk move by the
  host into the BufferSet and the FSM copying from data memory. Here the
  controller always copies; the host only writes data memory.
- **No chaining across sessions.** A long message is chained only within one
  session, so a message of more than 507 blocks cannot be hashed.
- **Flip-flop storage.** The BufferSet, the four message windows and the K
  ring are all flip-flops (about 15 000 bits). This is far more than the
  roughly 3 000 flip-flops reported for the original implementation on an
  FPGA.
- **Not included.** The host processor, its DMA and the AXI interconnect are
  outside this RTL. The top brings their connections out as plain memory and
  start/done ports.

## Files

All modules share `rtl/sha_rv_pkg.sv`. It holds the word type, the K and IV
tables, the SHA-2 functions, the opcodes, the state encoding and the map
constants.

| Module | Role |
|--------|------|
| `sha_rv_top` | The accelerator: all blocks below, wired together. |
| `sha_core` | Four-stage SHA core with up to `N_IN` interleaved blocks. |
| `sha_message_expander`, `sha_message_compressor`, `sha_value_rotator` | The core's three units. |
| `sha_controller` | Session FSM. |
| `sha_bufferset` | 256 × 32 flip-flop buffer. |
| `sha_buffer_xfer` | Burst engine for the buffer instructions. |
| `rv_core` | Five-stage RV32I pipeline. |
| `rv_alu` | ALU. |
| `rv_regfile` | Register file. |
| `rv_decoder`, `rv_spec_decoder` | Basic and special decoders. |
| `sha_rv_state_ctrl` | start/done control. |
| `sha_rv_imem` | 1024-word instruction memory. |
| `sha_rv_dmem` | 8192-word dual-port data memory. |

Parameters and their defaults:
- `N_IN` = 4 (`sha_core`, `sha_controller`, `sha_value_rotator`, top);
- `DM_DEPTH` = 8192;
- `IM_DEPTH` = 1024.

`N_IN` may be 1 to 4. A run can never hold more cases than the pipeline has
stages.

## Simulating

Each testbench `tb/tb_<module>.sv` checks one module. `tb/sha_ref_pkg.sv` is a
plain behavioural SHA-2 model that the testbenches use for expected values.
Every testbench:
- prints `TB_RESULT checks=<n> failures=<m>` and finishes;
- has a watchdog that counts a failure if it hangs.

With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -j 4 \
  --top-module tb_sha_rv_top -y rtl -y tb +libext+.sv \
  rtl/sha_rv_pkg.sv tb/sha_ref_pkg.sv tb/tb_sha_rv_top.sv
./obj_dir/Vtb_sha_rv_top
```

Replace `tb_sha_rv_top` with any other testbench name.

**`tb_sha_rv_top`** runs the full design at its default sizes, acting as the
host. It loads a program that runs five sessions alternating between the two
memory halves:
- SHA-256 long (3 blocks);
- SHA-224 short (5);
- SHA-224 long (2);
- SHA-256 short (2), twice.

The program also makes two bursts and a load/store loop. The testbench checks
every digest. It also counts, and requires at least once, each of these: every
mode, short-mode batching, long-mode chaining, IV/K staging and skipping, both
bursts, the latch, custom-instruction stalls, load-use stalls, taken branches,
forwarding, and host writes during a session.

**`tb_sha_rv_workload`** sweeps N = 1, 4, 16, 64 and 256 blocks in each of
the four modes, 1364 random blocks in all. It checks every digest and every
cycle count against the model in [Cycle counts](#cycle-counts).

## How far it has been checked

- **Testbenches.** Every module's testbench compares against independently
  computed values: the reference SHA-2 model, a reference ALU, or memory
  models. The core testbench includes the standard "abc" test vectors for
  SHA-224 and SHA-256.
- **Fault injection.** Each testbench has been shown to fail when its module
  is broken in one relevant way.
- **Tools.** The whole design passes Verilator lint and synthesizes with
  Yosys.
- **Not checked:**
  - timing closure at any clock frequency;
  - behaviour with the real host interconnect;
  - CSR instructions and traps, which are not implemented.
