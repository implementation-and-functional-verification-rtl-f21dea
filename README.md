# RV32IM security SoC for IoT nodes

A small system-on-chip for devices that must encrypt what they send. A
five-stage pipelined RISC-V core (RV32I plus the M extension) runs the
application. An ACORN-128 authenticated-encryption engine (AEAD: it encrypts
and also produces an authentication tag) sits behind memory-mapped FIFOs. A
UART carries data out. The core, the UART and the cipher each run in their
own clock domain, and data crosses between domains only through dual-clock
FIFOs with Gray-coded pointers.

Software drives the cipher with plain loads and stores. It writes instruction
and segment-header words followed by data into two input queues:

- PDI (public data input): nonce, associated data and message;
- SDI (secret data input): the key.

It then polls a status bit and reads the ciphertext, tag and status words back
from an output queue. Those words can be written to the UART.

```
             +------------------- soc_top -------------------------------+
 program --->| imem 256 KB --> riscv_core --bus--> mmio_wrapper          |
 load port   |                 (5 stages,          |  addr[19:18]        |
             |                  M unit)            +-0-> dmem 256 KB     |
             |                                     +-1-> uart_periph ----+--> tx / rx
             |                                     +-2-> sec_module      |
             |                                     +-3-> addr_error      |
             |  reset_sync x3 (core, UART, cipher clock domains)         |
             +-----------------------------------------------------------+
```

## Memory map

The data bus decodes `address[19:18]`:

| Region | Address | Target |
|---|---|---|
| 0 | 0x00000–0x3FFFF | data memory, 256 KB |
| 1 | 0x40000 | UART |
| 2 | 0x80000 | security module |
| 3 | 0xC0000– | no device; any access sets the sticky `addr_error` output |

### Data memory

The data memory reads the word that holds the byte address and the word after
it. It returns the four bytes that start at the address, so halfword and word
accesses need not be aligned. Stores use byte enables across the same two
words. Byte order is little-endian.

### UART registers

Each register is one byte, at these byte offsets:

| Offset | Register | Behaviour |
|---|---|---|
| +0 | data-in | A store writes the byte and queues it for sending. |
| +1 | data-out | Byte at the head of the receive queue. |
| +2 | CSR | `{0000, Rx_Empty, Tx_full, Rd_UART, Wr_UART}` |

CSR write bits:

- writing 1 to `Wr_UART` sends data-in again;
- writing 1 to `Rd_UART` pops the receive queue;
- both bits read back as 0.

Line format: 8 data bits, no parity, 1 stop bit, 16 baud ticks per bit.
The baud divisor `DIV` defaults to 27 UART clocks per tick.

### Security module registers

| Offset | Register | Behaviour |
|---|---|---|
| +0 | PDI | A word store writes the register and pushes it into the PDI FIFO. |
| +4 | SDI | Same, for the SDI FIFO. |
| +8 | DO | Word at the head of the output FIFO. A word load pops it. |
| +12 | CSR | `{00, PDI_full, SDI_full, DO_empty, PDI_wr, SDI_wr, DO_rd}` |

Byte and halfword stores to PDI or SDI only update bytes of the register.
Writing 1 to `PDI_wr` or `SDI_wr` then pushes the register. Writing 1 to
`DO_rd` pops DO. A typical program:

1. Push the PDI words: instruction, headers, nonce, associated data,
   message. The 32-word PDI FIFO holds a whole short request, so no flag
   check is needed for the test vector; longer requests wait while
   `PDI_full` is set.
2. Push the SDI words (key instruction, key header, key).
3. Wait while `DO_empty` (CSR bit 3) is set, then load DO; repeat for each
   output word.

## The pipeline

Stages: IF, ID, EX, MEM, WB. The control unit decodes in ID into a bundle of
signals (`riscv_pkg::ctrl_t`) that travels down the pipeline.

### ALU and comparisons

The ALU has eight operations on a 3-bit select: add, sub, sll, xor, srl, sra,
or, and. It also produces zero, carry, sign and overflow flags.

There is no separate comparator. Branches and SLT/SLTU subtract and feed the
flags to the branch circuit, an 8:1 multiplexer on funct3:

- signed less-than is `sign XOR overflow`;
- unsigned less-than is the borrow.

### Hazards and forwarding

| Situation | Mechanism | Cost |
|---|---|---|
| Result needed by the next instructions | Stage-3 forwarding unit drives two 4:1 operand muxes (see below). The newer stage wins. | none |
| Store data produced by the instruction just ahead | Stage-4 forwarding unit (FDATA) replaces the store data in MEM with the write-back value. | none |
| Load result used by the next instruction | Hazard unit holds PC and IF/ID for one cycle and sends a bubble into ID/EX. Store data is exempt because FDATA covers it. | 1 cycle |
| Taken branch or jump | Branches are predicted not taken and resolved in MEM. A taken branch, JAL or JALR redirects the PC and flushes IF/ID, ID/EX and EX/MEM. Flush overrides both kinds of stall. | 3 instructions |

The stage-3 operand mux inputs are:

- 00: register file;
- 01: MEM-stage ALU result;
- 10: write-back data;
- 11: MEM-stage PC+4 or LUI immediate.

### Multiply and divide

The multiplier is a radix-2 Booth multiplier. The divider is a restoring
divider. Both iterate on 33-bit operands, so one extra sign or zero bit covers
every signed/unsigned mix (MULH, MULHSU, MULHU, DIV/DIVU, REM/REMU).

The wrappers:

- extend the operands;
- take magnitudes for signed division;
- fix the signs of the quotient and remainder;
- apply the RISC-V rules for division by zero and for −2^31 / −1.

Timing: an M instruction stays 34 cycles in EX. The first iteration runs in
the start cycle. Meanwhile PC, IF/ID and ID/EX hold and EX/MEM receives
bubbles, so older instructions drain. A flush aborts the operation.

The unit latches funct3 and both operands when it starts. An operand that came
through a forwarding path is gone from that path long before the result is
ready.

### Register file

The register file writes through: a read of the register being written returns
the new value.

## ACORN engine

`acorn_datapath` holds the 293-bit ACORN-128 state. It performs eight state
updates per clock: one byte in, one byte out. `acorn_aead` follows the
structure of the CAESAR hardware interface.

The pre-processor parses these PDI/SDI words:

| Word | PDI | SDI |
|---|---|---|
| 0x7000_0000 | activate key | |
| 0x2000_0000 | encrypt | |
| 0x3000_0000 | decrypt | |
| 0x4000_0000 | | load key |
| 0xD200_0010 | nonce header | |
| 0x1200_00LL | associated-data header | |
| 0x47/0x4700_00LL | message header | |
| 0x52/0x5200_00LL | ciphertext header | |
| 0x8300_0010 | tag header | |
| 0xC700_0010 | | key header |

LL is the segment length in bytes. Data bytes are big-endian within a word,
and a partial last word is zero-padded.

Phases, counted in cipher-clock cycles:

| Phase | Cycles |
|---|---|
| Initialisation | 224 |
| Each padding | 32 |
| Finalisation | 96 |

Data phases take one cycle per byte.

Output on DO:

- **Encryption:** ciphertext header (flags copied from the message header),
  the ciphertext, tag header, four tag words, then status 0xE000_0000.
- **Decryption:** the plaintext words wait in an internal FIFO until the
  computed tag equals the received one. On a match they are released,
  followed by 0xE000_0000. On a mismatch only 0xF000_0000 is output, and the
  plaintext is discarded.

Test vector:

| | Value |
|---|---|
| Key | 55565758…64 |
| Nonce | b0b1…bf |
| Associated data | a0a1…af |
| Message | "Mentor Graphics" |
| Ciphertext | `23604eff 0972a461 2d5f2d2f 4026cf` |
| Tag | `ab5a1f55 5facc365 c4ed4c9c 260234d3` |

## Clock domains

Each domain has a reset synchronizer that asserts asynchronously and releases
on the second clock edge. Crossings:

| Block | Dual-clock FIFOs | Width |
|---|---|---|
| UART | TX, RX | 8 bits |
| Security module | PDI, SDI, DO | 32 bits |

The UART FIFOs hold 16 entries and the security-module FIFOs 32; all have
first-word fall-through. Its Gray
pointers cross through two-flop synchronizers. Flags are pessimistic: a
clock or two late, never early.

## Departures from the reference design and own choices

- **Memories.** Instruction and data memories are plain arrays with
  combinational read, not 2-cycle FPGA block RAM. The instruction memory has
  a load port, used while the core is held in reset.
- **MUL/DIV hold.** While it runs, only PC, IF/ID and ID/EX hold; MEM and WB
  keep draining. The reference holds all five pipeline registers.
- **Booth guard bit.** The Booth adder is one bit wider than the
  accumulator, so the module is correct even for the most negative 33-bit
  multiplicand.
- **Signed comparisons.** They use `sign XOR overflow`. The plain sign bit
  gives wrong results when the subtraction overflows.
- **No address forwarding in MEM.** The stage-4 unit forwards store data
  only. The memory address is the ALU result of stage 3, whose operands
  already see the write-back value through the stage-3 forwarding unit, so a
  separate address-forwarding select would never change a result.
- **Unaligned stores.** Stores may straddle two words, like loads.
- **Own encodings and sizes.** The CSR side effects, the FIFO depths and
  the cipher-side FIFO sizes (bypass 4 words, plaintext hold 64 words) are this design's choices.
- **Not built.** A request/acknowledge handshake synchronizer was considered
  and rejected for this SoC in favour of the dual-clock FIFOs, so it is not
  included. The class-based UVM environment is replaced by plain
  self-checking SystemVerilog testbenches.

## Files

| File | Contents |
|---|---|
| `rtl/riscv_pkg.sv` | Opcodes, ALU codes, control bundle |
| `rtl/riscv_core.sv` | Pipeline |
| `regfile`, `alu`, `alu_control`, `branch_circuit`, `imm_gen`, `control_unit`, `load_ext` | Core datapath and decode |
| `hazard_unit`, `forward_unit_ex`, `forward_unit_mem` | Hazard detection and forwarding |
| `booth_mult`, `mult_wrapper`, `restoring_div`, `div_wrapper`, `muldiv_unit` | M extension |
| `imem`, `dmem`, `mmio_wrapper`, `soc_top` | Memories, bus decode, top |
| `baud_gen`, `uart_tx`, `uart_rx`, `uart_periph` | UART |
| `sync_2ff`, `reset_sync`, `async_fifo`, `sync_fifo` | Synchronizers and FIFOs |
| `acorn_datapath`, `acorn_aead`, `sec_module` | Cipher |

Every module has a testbench `tb/tb_<module>.sv` that checks against values
computed independently and prints `TB_RESULT checks=N failures=M`. Two are
system-level:

- `tb/tb_soc_top.sv` runs the whole SoC at its default size with three
  unrelated clocks. Its program encrypts the test vector (all PDI words
  first, then the key, without polling), decrypts the
  result, sends the ciphertext over the UART (decoded by the testbench),
  exercises MUL/DIV and provokes an address error. It counts load-use stalls,
  flushes, both forwarding paths, M operations, FIFO traffic, cipher output,
  UART transmit/receive and the address error, and fails if any count is zero.
- `tb/tb_core_random.sv` runs 10,000 random RV32IM instructions (ALU, M,
  loads/stores of all sizes, forward branches and jumps). It compares every
  register write with a reference model in the testbench, and at the end the
  registers and data memory.

To simulate with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/riscv_pkg.sv tb/tb_soc_top.sv --top-module tb_soc_top
./obj_dir/Vtb_soc_top
```

Substitute any other testbench name. The SoC test takes a few seconds.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `soc_top` | `MEM_AW` | 16 | Word-address bits of each memory (256 KB) |
| `soc_top` | `UART_DIV` | 27 | UART clocks per baud tick |
| `uart_periph` | `FIFO_AW` | 4 | Dual-clock FIFO depth 2^`FIFO_AW` |
| `sec_module` | `FIFO_AW` | 5 | Dual-clock FIFO depth 2^`FIFO_AW` |
| `acorn_aead` | `AUX_AW` | 6 | Depth (2^`AUX_AW` words) of the FIFO holding decrypted words until the tag check |
| `acorn_aead` | `BYP_AW` | 2 | Depth (2^`BYP_AW` words) of the bypass FIFO for output headers |
