# A masked ARX processor with a spanning-tree adder

ARX ciphers (SPARX, Speck, ChaCha and their relatives) use only three
operations on words: **A**ddition modulo 2^32, **R**otation and
e**X**clusive-or. This design is a small programmable processor for such
ciphers that keeps every secret value under first-order Boolean masking. Each
secret word is stored and processed as three random shares whose XOR is the
value. Side-channel measurements of one wire or one register then show
nothing about the secret.

XOR and rotation act on each share on its own, so they are cheap. Addition is
the hard part, because the carry is non-linear. Here it is done by a bit-serial
*threshold implementation* (TI) adder: 32 cycles per 32-bit addition and four
fresh random bits per addition. To hide that latency the processor has four
such adders and lets additions run in the background while the pipeline goes
on.

Public values never need masking: loop counters, addresses, round constants
and branch decisions. They go through a second ALU with its own register file.
That ALU works in a single cycle, and its adder is a *spanning-tree*
(sparse-prefix) adder, chosen to save area against a full Kogge–Stone prefix
network.

```
             +-----------+      +-------------------------------------------+
 host  ----> |  imem     | ---> | scp_core  IF -> ID -> EX -> WB            |
 (program,   +-----------+      |   scp_decoder                              |
  data,      +-----------+      |   unprot_regfile (16 x 32)  <-> unprot_alu |
  start,     |  dmem     | <--> |                                 (spanning  |
  done)      +-----------+      |                                  tree add) |
             +-----------+      |   prot_regfile (16 x 3 x 32) <-> prot_alu  |
             |  rng      | ---> |                        ti_adder_bank x4   |
             +-----------+      +-------------------------------------------+
```

Top module: `sparx_scp_top` (in `rtl/`). Shared types, the opcode list and the
helper functions are in the `scp_pkg` package.

## Masked words

`shared_t` is `logic [2:0][31:0]`: shares 0, 1 and 2, with the value
`s[0]^s[1]^s[2]`.

- **Masking** a plain word `v` with random words `r1` and `r2` gives
  `{v^r1^r2, r1, r2}`. A masked load (`PLD`) and `PMOV` do this. The two
  random words come from the randomness source in the same cycle.
- **XOR** of two masked words is a share-wise XOR.
- **Rotation** is the same rotation applied to each share.
- **XOR with a public word** (`PXORR`, for round constants and counters)
  touches share 0 only.
- **Unmasking** (XOR of the three shares) happens in exactly one place: a
  masked store (`PST`), which writes the plain value to the data RAM.
  Masked words do not otherwise leave the protected datapath.

## The threshold adder (`ti_adder`)

The adder is a ripple-carry adder that handles one bit per clock, least
significant bit first. At bit *i* it holds the three shares of the operand
bits `x = a_i` and `y = b_i`, and of the carry `z = c_i`.

- **Sum bit.** `s = x ^ y ^ z` is linear, so each share is computed on its own.
- **Carry.** `c' = maj(x, y, z) = xy ^ xz ^ yz` is computed from three shared
  ANDs. Each shared AND follows the TI non-completeness rule: output share
  *j* uses only input shares *j+1* and *j+2*, mod 3. For two shared bits
  `u` and `v`, output share 0 is `u1v1 ^ u1v2 ^ u2v1`, and shares 1 and 2
  follow by rotating the indices. So no output share ever sees all three
  shares of an input. This holds even when glitches occur, because every
  share function is missing one input share.
- **Re-masking.** The three carry shares are XORed with
  `{r0^r1, r1, r0}`. This mask is itself a sharing of zero, so it changes the
  sharing but not the carry. It keeps the carry sharing uniform from bit to
  bit.
- **Register between bits.** The carry shares are stored in a register at the
  end of each bit. This stops glitches from passing from one bit's non-linear
  step into the next.

**Randomness.** Each addition takes four fresh bits, sampled with `start`:

- Bits 3 and 2 give a random sharing of the initial carry 0:
  `{rnd3, rnd2, rnd3^rnd2}`.
- Bits 1 and 0 are the re-masking pair. They sit in a 4-bit register that
  rotates by one place every cycle, so the pair changes from bit to bit
  without any further random bits.

**Timing.** `start` is taken while the adder is idle, and that clock edge
already processes bit 0. `done` is high in the 32nd cycle, counting the start
cycle as the first, and `sum` then holds all three result shares. So one
addition occupies 32 cycles. `WIDTH` is a parameter and must be at least 2.

## Parallel adders and the scoreboard (`ti_adder_bank`, `prot_alu`)

Four adders (`NADD = 4`) form a bank. A masked addition in EX goes to the
lowest-numbered idle adder, together with its destination register. The
instruction then leaves EX at once. EX stalls only when all four adders are
busy.

The bank keeps one `pending` bit per protected register. The bit is set when
the addition is issued and cleared when its result is written. The result is
written through a second write port of the protected register file, in the
cycle its adder finishes. Only one addition can issue per cycle, so no two
adders finish in the same cycle and the port never has two writers.

The decoder stage stalls any instruction that reads or writes a pending
register. A cipher round can therefore start two independent additions
back-to-back, and they run in parallel. Assertions check two rules: at most
one adder finishes per cycle, and an accepted addition never targets a
pending register.

## The pipeline (`scp_core`)

There are four stages. One instruction is fetched per cycle.

| Stage | Work |
|---|---|
| IF | The program counter addresses `imem`. The synchronous read delivers the instruction one cycle later. |
| ID | `scp_decoder` produces a `ctrl_t` struct. Both register files are read. |
| EX | `unprot_alu` computes plain results, memory addresses and branch compares. `prot_alu` does the masked operations, or hands an addition to the bank. `dmem` is addressed. A masked load draws its random shares here. |
| WB | Load data arrives and results are written. For a masked load, the RAM word is XORed into share 0 of the sharing of zero drawn in EX. |

**Hazards and their cost:**

- **Read-after-write.** An instruction in ID that reads a register being
  written by the instruction in EX waits one cycle. Both register files write
  through, so a value written in WB can be read in ID in the same cycle, and
  no forwarding paths are needed.
- **Pending masked sum.** An instruction in ID that reads or writes a pending
  register waits until the sum is written back.
- **All adders busy.** A masked addition waits in EX until an adder is free.
- **Branches and jumps.** These are decided in EX. A taken branch or jump
  flushes IF and ID, which costs 2 cycles. There is no branch prediction.
- **HALT.** HALT waits in ID until no addition is pending. In EX it flushes
  the younger instructions and stops fetching. When it reaches WB, the core
  stops and raises `done`.

Assertions check that EX never stalls and flushes in the same cycle, and that
a RAM write always comes with an enable.

## Instruction set

Each instruction word has these fields:

| Bits | Field |
|---|---|
| `[31:27]` | opcode |
| `[26:23]` | `rd` |
| `[22:19]` | `rs1` |
| `[18:15]` | `rs2` |
| `[15:0]` | `imm16` |

`rs2` and `imm16` share bit 15, and no instruction uses both. `R[]` is the
plain register file and `S[]` is the masked one, with 16 registers each.
`R0` is an ordinary register.

| Op | Effect |
|---|---|
| `NOP` | nothing |
| `ADD SUB XOR AND OR` | `R[rd] = R[rs1] op R[rs2]` |
| `ADDI` | `R[rd] = R[rs1] + sext(imm)` |
| `ORI` | `R[rd] = R[rs1] \| zext(imm)` |
| `LUI` | `R[rd] = imm << 16` |
| `ROTL`, `ROTR` | `R[rd] = R[rs1]` rotated by `imm[4:0]` |
| `LD` | `R[rd] = M[R[rs1] + sext(imm)]` |
| `ST` | `M[R[rs1] + sext(imm)] = R[rd]` |
| `BEQ`, `BNE` | if `R[rd] ==` / `!= R[rs1]`, then `pc += sext(imm)` |
| `JMP` | `pc += sext(imm)` |
| `HALT` | stop and raise `done` |
| `PADD` | `S[rd] = S[rs1] + S[rs2]` (threshold adder, 32 cycles, in the background) |
| `PXOR` | `S[rd] = S[rs1] ^ S[rs2]` |
| `PROTL`, `PROTR` | `S[rd] = S[rs1]` rotated by `imm[4:0]` |
| `PXORR` | `S[rd] = S[rs1] ^ R[rs2]` (the plain word goes into share 0) |
| `PMOV` | `S[rd] = mask(R[rs1])` |
| `PLD` | `S[rd] = mask(M[R[rs1] + sext(imm)])` |
| `PST` | `M[R[rs1] + sext(imm)] = unmask(S[rd])` |

Undefined opcodes act as `NOP`. The package `tb/scp_asm_pkg.sv` has a
function `instr(op, rd, rs1, rs2, imm)` that assembles one instruction word.

## The spanning-tree adder (`spanning_tree_adder`)

This adder serves the public ALU (`ADD`, `SUB`, `ADDI`, and address sums). It
has three steps.

1. **Bit generate and propagate.** Each bit forms `g = a&b` and `p = a^b`.
   The carry in is folded into bit 0: `g0 = g0 | p0&cin`.
2. **Carry network.**
   - Two levels of black cells combine each 4-bit group into a group pair
     `(G, P)`. A black cell computes `G = Gh | Ph&Gl` and `P = Ph&Pl`.
   - A Sklansky-style tree over the 8 groups then forms the carry into every
     fourth bit, in 3 levels.
   - A merge whose span already reaches bit 0 needs only `G`. It is a grey
     cell (`grey_cell`). Every other merge is a black cell (`black_cell`).
   - Only the carries into bits 4, 8, …, 28 and the carry out are built.
3. **Sum.** Each 4-bit group is a 4-bit ripple-carry adder (`rca4`), fed by
   its group carry.

`SUB` is computed as `a + ~b + 1`. `WIDTH` must be 4 times a power of two.

## Randomness (`rng`)

The masking needs two random 32-bit words per masking operation and 4 random
bits per addition. The `rng` block supplies both every cycle. It is a
xorshift128 generator stepped three times per cycle and can be reseeded by
the host (`seed_load`, `seed`).

**Warning:** xorshift is predictable, so this generator is only a stand-in
with the right interface. A real device needs a true random source, or a
cryptographic generator seeded from one. Without that, the masking protects
nothing.

## Using the processor (`sparx_scp_top`)

An outside CPU drives the top through plain ports. It must do three things
while `busy` is low:

- write the program into `imem` with `host_imem_we/addr/wdata`;
- write the inputs into `dmem` with `host_dmem_en/we/addr/wdata`;
- optionally reseed the randomness.

A one-cycle `start` pulse then runs the program from address 0. `busy` stays
high until the program executes `HALT`. After that, `done` stays high until
the next `start`, and the host reads the results, with `host_dmem_rdata` valid
one cycle after `host_dmem_en`. While `busy` is high, the core owns the data
RAM and host accesses are ignored.

Both memories hold 256 words of 32 bits (parameters `IMEM_DEPTH` and
`DMEM_DEPTH`). `NADD` sets the number of threshold adders.

The end-to-end testbench runs **Speck64/128**, a 32-bit-word ARX cipher with
rotations by 8 and 3 and 27 rounds. Plaintext and key are loaded masked
(`PLD`), and the key schedule runs masked alongside the rounds. The round
counter is a plain register that enters the key schedule through `PXORR`, and
the ciphertext leaves through `PST`. Each round issues its two `PADD`s
back-to-back, and they overlap in two adders.

- **Size:** the program is 26 instructions and uses 7 masked registers.
- **Speed:** one encryption takes **1309 cycles** from `start` to `done`.
  About 28 cycles of each round are spent waiting for a masked sum.
- **Result:** the ciphertext matches the published test vector.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/scp_pkg.sv tb/scp_asm_pkg.sv tb/tb_sparx_scp_top.sv \
    --top-module tb_sparx_scp_top
./obj_dir/Vtb_sparx_scp_top
```

To run another testbench, replace `tb_sparx_scp_top` with its name.

| Testbench | What it checks |
|---|---|
| `tb_sparx_scp_top` | The full design at default sizes. It runs the test vector, random keys against a reference model, the exact cycle count, and that two runs with different randomness give different shares but the same ciphertext. It counts each pipeline event (RAW stall, pending wait, parallel additions, all-adders-busy, flush, masked load and store, done) and fails if any never happened. |
| `tb_scp_core` | A directed program covering every instruction. |
| `tb_ti_adder` | Random shared operands, the 32-cycle latency, and that the output sharing changes with the randomness. |
| `tb_ti_adder_bank`, `tb_prot_alu` | Issue, write back and the scoreboard, with four additions in flight. |
| `tb_spanning_tree_adder`, `tb_unprot_alu` | Corner cases (carry chains through every 4-bit group, both carry-in values) and random operands, against SystemVerilog arithmetic. |
| the rest | The register files, memories, decoder and randomness source. |

## Where this design departs from its source, and its limits

- **No clock doubling.** The original architecture clocks the masked adders
  at twice the system clock, so an addition costs 16 system cycles. Here
  everything runs on one clock and an addition costs 32 cycles. The
  parallel adders hide part of this.
- **SPARX itself does not run masked.** SPARX works on 16-bit words, with
  additions mod 2^16 and 16-bit rotations. The masked datapath is 32 bits
  wide and has no masked AND to separate two 16-bit halves. A 16-bit
  variant of the protected ALU would be needed. The end-to-end test
  therefore uses Speck64/128, which has the same structure on 32-bit words.
- **Own choices.** The instruction set, its encoding, the register counts,
  the memory depths, the pipeline hazard scheme, the scoreboard and the host
  port are all this design's own. The source names a four-stage RISC
  pipeline with load and store but does not define these.
- **Where the spanning-tree adder sits.** It replaces the Kogge–Stone adder of
  the earlier design as the processor's ordinary adder, which is the one in
  the unprotected ALU. The masked adder cannot be a plain prefix adder. The
  exact group-level tree shape (Sklansky) is this design's choice.
- **Stores unmask in the core.** RAM holds plain values, as in the original.
  The secret is therefore unmasked on the write data of a `PST`. Only
  outputs should be stored this way.
- **Not evaluated.** No leakage assessment has been made: no power traces
  and no t-test. No FPGA area, delay or power figures are produced. The
  published comparison is 996 against 979 LUTs at an equal 2.198 ns. The
  TI construction follows the standard non-completeness rules, but its
  security on real hardware has not been measured.
- The randomness source is not secure (see above).
