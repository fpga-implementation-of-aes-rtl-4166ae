# MAC: a MIPS pipeline with a pipelined AES-128 co-processor

This design puts a fully pipelined AES-128 engine next to a classic five-stage
MIPS-32 pipeline. The processor runs ordinary code. AES work is given to it as
extra instructions in the same program: the decode stage recognises a crypto
instruction and, in the next clock, hands it to the co-processor. The
processor does not stall for it and keeps fetching. The AES engine is
pipelined both across rounds and within each round, so it can accept a new
128-bit block on every clock while earlier blocks are still in flight.

The design follows the published MIPS-AES Crypto (MAC) processor, an FPGA
design evaluated at clocks between 50 and 553 MHz. That publication gives the
AES pipeline structure and the MIPS datapath as block diagrams, and says how
crypto instructions leave the decode stage. It does not give an instruction
encoding, a key schedule, or a way for results to get back to the processor.
This RTL fills those gaps with its own choices, which are listed in
[What is taken from the source and what is not](#what-is-taken-from-the-source-and-what-is-not).

```
          +---------------------------- mips_cpu ----------------------------+
 prog_* ->| IF: PC, +4, instruction_memory                                    |
          | ID: mips_regfile, sign extend, mips_control                       |
          | EX: mips_alu, branch target  --crypto_cmd-->  +--------------+    |
          | MEM: data_memory (host_*)    <--crypto_rdata-- | see below    |   |
          | WB: write-back mux                             +--------------+   |
          +-------------------------------------------------------------------+
   crypto_cmd --> aes_register (key, data) --> aes_coprocessor
                                               |- aes_key_expansion (11 round keys)
                                               |- aes_encrypter (31 stages)
                                               |- aes_decrypter (31 stages)
                                               '- result_fifo (finished blocks)
```

## The AES pipeline

`aes_encrypter` and `aes_decrypter` have the same shape: an input stage,
then ten instances of `aes_round`.

* **Input stage.** Add Round Key with the first key, then a register.
* **Rounds 1 to 9.** Each round has three register stages:
  1. S-Box on all 16 bytes → register
  2. Shift Row → register
  3. Mix Column, then Add Round Key → register
* **Round 10.** This is the last round. It has the same three stages without Mix Column.

The latency is therefore 1 + 3 × 10 = **31 clocks**, and the engine accepts
one block per clock. A `valid` bit travels with each block. There is no
back-pressure.

**Decryption uses the *equivalent inverse cipher* of FIPS-197.** Each
decryption round runs inverse S-box, Inverse Shift Row, Inverse Mix Column,
then Add Round Key. This is the same step order as encryption, so one
`aes_round` module with an `INV` parameter serves both. The order only works if
the decryption round keys are changed:

* they are used in reverse order;
* the nine middle keys are first passed through InvMixColumns.

`aes_key_expansion` supplies both sets of keys, `enc_keys[0..10]` and
`dec_keys[0..10]`.

**Round keys are static, not pipelined.** `aes_key_expansion` computes the 11
round keys one per clock (10 clocks after `start`). It keeps them in
registers, and both pipelines read them directly. A block therefore uses
whatever keys are stored while it passes through. For this reason the
co-processor refuses to re-key (`AESKX`) while any block is in flight.

**S-boxes are computed, not typed in.** `aes_pkg` builds the S-box and the
inverse S-box at elaboration with constant functions:

* walk the powers of the generator 3 and of its inverse in GF(2^8), with the polynomial x^8+x^4+x^3+x+1;
* apply the affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`.

Synthesis sees constant tables (ROMs/LUTs).

**Byte order.** A block is MSB-first: byte *i* of the FIPS-197 sequence is
bits `[127-8i -: 8]`. State column *c* is the 32-bit word `[127-32c -: 32]`.

## Crypto instructions

Crypto instructions use opcode `0x12`, which MIPS reserves for coprocessor 2.
They use the R-format, and `funct` selects the operation. `rs`, `rt`, `rd` and
`shamt` (written `sel` below) are the usual fields.

| funct | mnemonic | effect |
|---|---|---|
| 0 | `AESWK rs, rt, h` | key bits 127:64 (h = 1) or 63:0 (h = 0) ← {R[rs], R[rt]} |
| 1 | `AESWD rs, rt, h` | data block half h ← {R[rs], R[rt]} |
| 2 | `AESKX` | expand the key in the AES register (10 clocks) |
| 3 | `AESENC` | push the data block into the encrypt pipeline |
| 4 | `AESDEC` | push the data block into the decrypt pipeline |
| 5 | `AESRD rd, w[, pop]` | R[rd] ← word w (sel[1:0], 0 = bits 127:96) of the oldest result; sel[2] = 1 removes that result |
| 6 | `AESST rd[, clr]` | R[rd] ← status word; sel[0] = 1 clears the sticky flags |

Funct 7 and every other opcode outside the base subset decode as no-ops.

**Timing.** A crypto instruction is decoded in ID. In the next clock its
operation and the values of `rs` and `rt` appear on `crypto_cmd`, driven from
the ID/EX register. This is the clock in which an ordinary instruction would
be in EX. In that clock:

* the AES register is written;
* or a block enters a pipeline;
* or, for `AESRD`/`AESST`, the co-processor answers combinationally.

The answer replaces the ALU result and then follows the normal EX/MEM → MEM/WB
path to `rd`. So a crypto read is an ordinary three-stage producer for
hazard purposes.

**The processor never waits.** A command the co-processor cannot carry out is
dropped, and a sticky flag is set:

* `AESENC`/`AESDEC` with no expanded key: **error**.
* `AESKX` while blocks are in flight: **error**.
* `AESENC`/`AESDEC` when the result queue could not hold the result: **overflow**.
  A block is accepted only while results queued + blocks in flight < `RESULT_DEPTH`.

Software checks the status word:

| bits | field |
|---|---|
| 0 | key_busy |
| 1 | key_ready |
| 2 | result_valid (queue not empty) |
| 3 | overflow (sticky) |
| 4 | error (sticky) |
| 5 | pipe_busy (blocks in flight) |
| 15:8 | results queued |
| 23:16 | blocks in flight |

Encryption and decryption have the same latency, and at most one block enters
per clock. So results reach `result_fifo` in issue order, whatever mix of the
two was issued.

A typical sequence:
```
lw r1..r4 <- key words        ; then two independent instructions or nops
AESWK r1, r2, 1 ; AESWK r3, r4, 0
AESKX
loop: AESST r5 ; nop ; nop ; and r6, r5, r7(=2) ; nop ; nop ; beq r6, r0, loop ; nop ; nop ; nop
lw r1..r4 <- block words ; AESWD r1, r2, 1 ; AESWD r3, r4, 0 ; AESENC
... poll pipe_busy or result_valid ...
AESRD r1, 0 ; AESRD r2, 1 ; AESRD r3, 2 ; AESRD r4, 3, pop ; sw r1..r4
```

## The MIPS pipeline and its hazard rules

`mips_cpu` has the five textbook stages:

* **IF:** PC, +4 adder, `instruction_memory`.
* **ID:** `mips_regfile`, 16→32 sign extension, `mips_control`.
* **EX:** `mips_alu` with the immediate/register operand mux; the branch adder adds PC+4 and the immediate shifted left 2; rt/rd destination choice.
* **MEM:** `data_memory` and the branch decision.
* **WB:** the load/result mux.

It executes `add sub and or slt addi lw sw beq` plus the crypto instructions.

Like the datapath it is modelled on, it has **no forwarding unit and no hazard
detection**. Software must schedule around this:

* **Data hazards.** A result can be read by the third instruction after its
  producer. The register file passes a write to its read ports in the same
  clock, so two instructions, or nops, must separate a producer from its
  consumer. This also holds for `lw` and for `AESRD`/`AESST`.
* **Branches.** `beq` is resolved in MEM and nothing is flushed. The three
  instructions after a `beq` always execute, taken or not.

Reset clears the PC (which starts at 0), the register file and all pipeline
registers.

## Interfaces of the top level (`mac_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | one clock; asynchronous active-low reset |
| `prog_we`, `prog_addr`, `prog_wdata` | in | write the instruction memory (word address); use while in reset |
| `host_we`, `host_addr`, `host_wdata` | in | write the data memory (word address); use while in reset |
| `host_rdata` | out | data memory word at `host_addr` |
| `pc` | out | current fetch address |
| `aes_status` | out | the status word, as `AESST` returns it |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `IMEM_DEPTH` | 256 | instruction memory size, in words |
| `DMEM_DEPTH` | 256 | data memory size, in words |
| `RESULT_DEPTH` | 32 | result queue depth; must be a power of two |

AES-128 is fixed: `aes_pkg::NR = 10`.

## What is taken from the source and what is not

Taken from the source design:

* AES-128 as the algorithm.
* The pipelined encryption and decryption structure:
  * where the registers sit;
  * the step order, including Mix Column before Add Round Key in decryption;
  * the last round without Mix Column.
* A five-stage MIPS-32 datapath with the units named above.
* A branch target that is registered into EX/MEM and feeds the PC mux.
* An "AES register" next to the decode stage.
* AES encrypter and decrypter blocks in the co-processor.
* Crypto instructions handed over in the clock after decode, without blocking fetch.
* A single adjustable clock.

This design's own choices:

* The crypto instruction set and its encoding.
* 64-bit writes into the AES register.
* The iterative key schedule, shared by both pipelines.
* The result queue, the status word, and the refuse-and-flag policy.
* The instruction subset.
* The register-file bypass.
* Branch delay slots instead of a flush.
* The memory sizes.
* The host and program ports.
* The valid bits and the resets.

The source block diagram also shows an external "AES data control" input to
the AES register. Its function is not described, so it is not modelled.

Performance figures reported for the FPGA build:

* 58 Gbps at 553 MHz, which is about 105 bits per clock.
* 240 ns latency.
* Area and power figures.

The first is consistent with an engine that accepts 128 bits per clock, as this
one does. The latency figure is about 133 clocks at 553 MHz. It does not match
the 31 register stages of the pipeline diagram, and the source does not say
what it includes. This RTL follows the diagram. When the MIPS program feeds the
engine, each block costs at least three instructions (two `AESWD` and one
`AESENC`). Full engine throughput therefore needs a direct feed into
`aes_encrypter`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The AES benches compare against
`tb/aes_ref_pkg.sv`, a separate behavioural AES. It finds each S-box entry by
brute-force inversion and decrypts with the straightforward inverse cipher, so
it shares no code with the RTL. Published FIPS-197 vectors are checked too
(Appendix A.1 key schedule, Appendix C.1 encryption and decryption).

| bench | what it covers |
|---|---|
| `tb_mac_top` | full system at default sizes. A program expands a key and polls with `beq` loops. It encrypts random blocks and decrypts the FIPS vector, reads the results back, and provokes both refusals and an overflow. It also runs the ALU instructions. Every block's 31-clock latency is checked, and a counter must be non-zero for each mechanism. |
| `tb_mips_cpu` | ALU, loads, stores and branches. It checks that stale operands occur without forwarding, that the three delay slots execute, and the crypto command fields and their timing (two clocks after fetch). |
| `tb_aes_coprocessor` | refusals, flags, key-busy time, mixed encrypt/decrypt, back-to-back issue, in-order results, overflow |
| `tb_aes_encrypter`, `tb_aes_decrypter` | FIPS vector plus 39 random blocks at one per clock; 31-clock latency |
| `tb_aes_throughput` | 1000 blocks streamed through both pipelines at one per clock. It measures 128 bits per clock, which is 70.8 Gbps at 553 MHz, and a 31-clock latency. It prints the rate and latency across the 50–553 MHz range. |
| `tb_aes_round` | all four round variants; 3-clock latency |
| `tb_aes_key_expansion` | all encryption and decryption keys; 10-clock schedule; restart |
| others | register file, ALU, decoder, memories, AES register, FIFO |

Every bench has been run, and each passes with zero failures.

To simulate with Verilator, for example the full system:

```
verilator --binary --timing --assert --top-module tb_mac_top \
  -y rtl -y tb +libext+.sv rtl/aes_pkg.sv rtl/mac_pkg.sv \
  tb/aes_ref_pkg.sv tb/mac_asm_pkg.sv tb/tb_mac_top.sv
./obj_dir/Vtb_mac_top
```

`tb/mac_asm_pkg.sv` has small encoder functions (`add`, `lw`, `beq`,
`aeswd`, `aesenc`, ...) for writing further test programs in SystemVerilog.
