# Ascon-TTA64: a transport-triggered 64-bit core with custom Ascon operations

Ascon, the NIST lightweight-cryptography standard, spends most of its time in
its 320-bit permutation. Each round of the permutation has a substitution layer
(a 5-bit S-box applied bit-sliced across five 64-bit words) and a linear layer
(every word XORed with two rotations of itself). On a plain 64-bit processor
each S-box term `a ^ (~b & c)` takes three instructions and each rotation three
more (two shifts and an OR). This core adds one functional unit, **ASCON**, with
four single-cycle operations that collapse these patterns:

| operation | result `O` | used for |
|-----------|------------|----------|
| `ROTR64`  | `I1` rotated right by `I2 & 63` | linear layer |
| `KSBOX`   | `I1 ^ (~I2 & I3)` | substitution layer |
| `GETBYTE` | byte `I2` of `I1`, byte 0 = most significant, zero-extended | storing and extracting bytes |
| `SETBYTE` | `I1 << (56 - 8*I2)` | loading bytes, padding, clearing |

The unit sits in a transport-triggered architecture (TTA) processor. A TTA
program does not name operations. It names data *moves* between unit ports, and
an operation starts as a side effect of a move into a unit's *trigger* port.
The default core has four transport buses, so up to four moves run per cycle.
A result can go straight from one unit into the next one without passing the
register file. This core is the 64-bit template processor with its multiplier
unit replaced by the ASCON unit. It keeps the template's two ALUs (the second
one smaller), its 32 x 64-bit register file and its two boolean registers, and
its load-store, control, immediate and output units.

## Programming model

### Instruction word

An instruction is `NBUS` move slots of 75 bits, one per bus. With the default
4 buses it is 300 bits wide. Slot `b` occupies bits `[75*b +: 75]`.

```
 74   72 71       64  63  62                                0
+-------+-----------+----+-----------------------------------+
| guard |    dst    | imm|  src id [5:0]  or  short imm [31:0]|
+-------+-----------+----+-----------------------------------+
```

* **guard** `0` always executes. `1` executes if `b0`, `2` if `!b0`, `3` if
  `b1`, `4` if `!b1`. `5` and `6` never execute: `6` is the no-op slot. `7`
  marks a **long-immediate slot**: bits `[63:0]` are a 64-bit constant written
  into immediate-unit register `dst[0]`. It becomes readable in the next
  instruction.
* **imm = 1**: the bus carries `src[31:0]`, sign-extended to 64 bits.
* **imm = 0**: the bus carries the source named by `src[5:0]`.

Guards read the boolean registers as they were at the start of the cycle.

### Address map (`rtl/tta_pkg.sv`)

| sources (`src`) | | destinations (`dst`) | |
|---|---|---|---|
| `0x00-0x1F` | register r0-r31 | `0x00-0x1F` | register r0-r31 |
| `0x20/0x21` | boolean b0/b1 | `0x20/0x21` | boolean b0/b1 (bit 0) |
| `0x28` | ALU64 result | `0x40` | ALU64 operand (in1) |
| `0x29` | ALU64_1 result | `0x41` | ALU64_1 operand (in1) |
| `0x2A` | ASCON result | `0x42/0x43` | ASCON operands I1 / I3 |
| `0x2B` | LSU load result | `0x44` | LSU store data |
| `0x2C` | GCU return address | `0x8o` | ALU64 trigger, opcode `o` (in2) |
| `0x30/0x31` | immediate unit r0/r1 | `0x9o` | ALU64_1 trigger |
| | | `0xAo` | ASCON trigger (I2) |
| | | `0xBo` | LSU trigger (byte address) |
| | | `0xCo` | GCU trigger (target) |
| | | `0xDo` | printf output trigger |

Opcodes are the enums in `tta_pkg`:

* ALU: `add sub and ior xor shl shr shru eq gt gtu` = 0..10. ALU64_1 has only
  `add sub and ior xor shl shru`.
* ASCON: `ROTR64 KSBOX GETBYTE SETBYTE` = 0..3.
* LSU: `ld64 st64 ld8u st8` = 0..3.
* GCU: `jump call halt` = 0..2.
* Output: `word char` = 0..1.

### Timing rules

These are the rules a scheduler (or a person writing moves) must respect.

* Every move of an instruction reads its source during the cycle. It writes
  its destination at the clock edge.
* A register written in cycle *t* can be read in cycle *t+1*.
* Every unit has latency 1. A trigger in cycle *t* gives a result readable
  from cycle *t+1*. The result stays until that unit's next trigger. Reading a
  result and triggering the same unit in one cycle is legal: the read sees the
  old result.
* An operand moved in the same cycle as the trigger is used by that trigger.
  This is how a three-input `KSBOX` issues in one 4-bus instruction:
  `I1 -> 0x42`, `I3 -> 0x43`, `I2 -> 0xA1`.
* A jump or call moved in cycle *t* makes the target execute in cycle *t+1*.
  There are no delay slots. Return is `ra (0x2C) -> jump (0xC0)`.
* There are no stalls. Only one move per unit port is allowed per
  instruction; the sockets assert this.

With these rules one Ascon round takes 28 instructions on 4 buses. That
includes the round constant, the loop counter and the loop branch; see
`tb/tb_ascon_tta64.sv`. The ASCON unit is busy in 15 of the 28 cycles: 5
`KSBOX` and 10 `ROTR64`.

## Running Ascon-128 on the core

`tb/tb_ascon_aead.sv` contains a complete Ascon-128 authenticated encryption
and decryption program of 114 instructions. It uses the parameter set of the
Ascon reference software: a 64-bit rate, 12- and 6-round permutations and
big-endian byte order. The program shows how the custom operations are used in
practice:

* **PERM** is a subroutine. It is the 28-instruction round loop, and its start
  round comes in `r10`. Calling it with `r10 = 0` runs 12 rounds; `r10 = 6` runs
  6 rounds.
* **LOAD** builds a 64-bit word from `n` bytes in memory. Each byte goes through
  `ld8u`, then `SETBYTE(byte, i)`, then `ior`.
* **STORE** is the reverse. Each byte goes through `GETBYTE(word, i)`, then
  `st8`.
* Padding is `SETBYTE(0x80, n)`.
* A partial block in decryption uses a byte mask `~(-1 >> 8n)`. The mask puts
  the ciphertext bytes into the state.
* Loop exits and returns are guarded moves on `b0` and `b1`.

Measured on the default core:

| associated data | message | encrypt | decrypt |
|-----------------|---------|---------|---------|
| 0 B  | 0 B  | 713 cycles  | 716 cycles  |
| 0 B  | 7 B  | 783 cycles  | 786 cycles  |
| 13 B | 21 B | 1721 cycles | 1724 cycles |
| 32 B | 32 B | 2840 cycles | 2843 cycles |

Most of the time goes into the permutation: 28 cycles per round inside PERM,
so 336 cycles for 12 rounds and 168 for 6, plus the call instruction. The byte-serial LOAD and STORE take 5
cycles per byte each. These figures come from hand scheduling. They are not
comparable one-to-one with the published figures for compiled C code.

## Hardware structure

```
            +----------------- instruction (NBUS x 75 bits) -----------------+
 tta_imem --+                                                                 |
    ^ pc    v                                                                 |
 tta_gcu  tta_interconnect: per slot guard check, source select, bus drive    |
            |  bus_en / bus_dst / bus_val  (NBUS buses)                       |
            +--> tta_socket (one per unit input port) --> unit operand/trigger|
 sources:  tta_rf (NBUS read ports), tta_boolrf, tta_imu, unit result regs    |
 units:    tta_alu (ALU64), tta_alu REDUCED (ALU64_1), ascon_fu, tta_lsu+tta_dmem,
           tta_gcu, tta_stdout
```

| file | role |
|------|------|
| `tta_pkg.sv` | widths, slot struct, address map, opcode enums |
| `ascon_tta64.sv` | top: the core, host ports for program and data, run control |
| `tta_interconnect.sv` | decodes the slots, checks guards, drives the buses |
| `tta_socket.sv` | input socket: matches a destination id (trigger ports mask out the opcode) |
| `ascon_fu.sv` | the ASCON unit |
| `tta_alu.sv` | ALU64, and ALU64_1 with `REDUCED=1` |
| `tta_rf.sv`, `tta_boolrf.sv` | 32 x 64 register file, 2 x 1 boolean registers |
| `tta_imu.sv` | long-immediate registers |
| `tta_lsu.sv`, `tta_dmem.sv` | load-store unit, dual-port data memory (LSU + host) |
| `tta_gcu.sv`, `tta_imem.sv` | program counter and control, instruction memory |
| `tta_stdout.sv` | printf output unit |

Every unit has the same shape. Operand ports are registers. The trigger port
carries the opcode in the low four destination bits. The result port is a
register written one cycle after the trigger.

### Top-level ports (`ascon_tta64`)

| port | dir | meaning |
|------|-----|---------|
| `imem_we/imem_addr/imem_wdata` | in | write one instruction word |
| `dmem_en/dmem_be/dmem_addr/dmem_wdata/dmem_rdata` | in/out | host port of data memory. Word address. `be = 0` reads, and the data appears the next cycle. |
| `start` | in | pulse while idle: run from address 0 |
| `running`, `pc` | out | run state and program counter |
| `out_valid/out_char/out_data` | out | one-cycle strobe per printf trigger |

Parameters:

* `NBUS`: number of buses, default 4.
* `DUAL_ALU`: default 1. Set it to 0 to remove ALU64_1.
* `IMEM_DEPTH`: default 1024 instructions.
* `DMEM_DEPTH`: default 1024 words of 64 bits.

The load-store unit uses byte addresses, with little-endian byte lanes within
a 64-bit word.

## What follows the source design and what is this design's own

These follow the published design:

* the four custom operations, their formulas and their 1-cycle latency;
* the 64-bit datapath;
* the unit mix: two ALUs with the second reduced, a 32 x 64 register file,
  2 x 1-bit booleans, an LSU, a GCU, an immediate unit and a printf unit;
* the ASCON unit taking the multiplier unit's place;
* 75 instruction bits per bus;
* the 4-bus dual-ALU configuration as the default. The single-ALU variant and
  other bus counts are parameters.

The published design is generated by a TTA toolset from a processor
description that is not given in text. These parts are therefore choices made
here:

* the slot layout, guard encoding and address map;
* the operation lists of the ALUs and the LSU;
* which ASCON input triggers (I2);
* full connectivity: every socket hears every bus;
* one register-file read port and one write port per bus;
* zero delay slots, the halt operation and the host ports;
* memory sizes;
* little-endian LSU lanes.

`SETBYTE` shifts all of `I1`, exactly as its formula is written, without
masking to 8 bits. `GETBYTE` and `SETBYTE` use only `I2[2:0]`.

The published cycle counts come from a compiled C program. For example, the
4-bus dual-ALU core runs Ascon-AEAD128 encryption plus decryption in 3035
cycles. These counts are not reproduced here, but their trends over bus count
and ALU variant are (see Verification). There is no compiler for this
encoding, so the tests use hand-scheduled programs and programs from a small
list scheduler in the testbench.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`, and
`tb_tta_alu_1.sv` for the reduced ALU). Each one compares the module with an
independently written model. Each ends with `TB_RESULT checks=N failures=M`
and has a cycle watchdog.

`tb/tb_ascon_tta64.sv` runs the whole core at its default parameters:

* It builds a TTA program with a small in-testbench assembler.
* The program runs the Ascon permutation for 12, 8 and 6 rounds on random
  states.
* The results are compared with a reference permutation built from the Ascon
  S-box lookup table.
* It also checks the exact cycle count, 24 + 28 x rounds.
* It counts each mechanism at least once: parallel moves, unit-to-unit bypass
  moves, squashed and taken guarded moves, long immediates, jumps, call and
  return, loads, stores, all four custom operations and printf output.

`tb/tb_ascon_aead.sv` runs the Ascon-128 program described above. It covers
associated-data and message lengths from 0 to 32 bytes, including partial
blocks. Each run encrypts, then decrypts the reference ciphertext. The test
compares ciphertext, tag and recovered plaintext with a reference model in
the testbench. The model itself is checked against the published
known-answer tag for an empty message (`E355159F292911F794CB1432A0103A8A`,
with key and nonce `000102...0F`). The test also checks the number of
permutation calls per run.

`tb/tb_ascon_tta64_sa.sv` builds the single-ALU, 2-bus variant (`NBUS=2`,
`DUAL_ALU=0`) and runs a short 2-slot program on it.

`tb/tb_ascon_bus_sweep.sv` compares bus counts and measures what the custom
operations save. It builds 24 cores: 1 to 6 buses, one or two ALUs, and two
builds of the program. One build uses the ASCON operations. The other uses
only general ALU operations:

* `KSBOX` becomes xor with all ones, and, xor.
* `ROTR64` becomes shru, shl, ior.

`tb/tb_bus_harness.sv` drives one core and contains a small greedy list
scheduler:

* It takes a straight-line p12 with loads and stores, all 12 rounds
  unrolled and round constants as immediates.
* It places every operation at the earliest cycle that has free buses for its
  operand, trigger and result moves.
* Register dependences are tracked by cycle. No bypass moves are used.

Each core must produce the reference permutation. Its run length must equal
the schedule length exactly. The test raises the instruction memory to 4096
words because the longest program needs 2289. Measured cycles:

| buses | custom, 1 ALU | custom, 2 ALUs | general, 1 ALU | general, 2 ALUs |
|------:|--------------:|---------------:|---------------:|----------------:|
| 1 | 1269 | 1269 | 2289 | 2289 |
| 2 | 695 | 659 | 1520 | 1233 |
| 3 | 477 | 466 | 1063 | 778 |
| 4 | 427 | 356 | 1063 | 667 |
| 5 | 367 | 343 | 1063 | 619 |
| 6 | 367 | 331 | 1063 | 607 |

Observations:

* The custom operations cut the permutation time by 45-65% with one ALU and
  by 40-47% with two.
* With general operations and one ALU, more than 3 buses bring nothing.
* With the custom operations, gains continue up to 5 buses with one ALU and
  up to 6 with two.
* The second ALU pays off once there are enough buses to feed it.

The scheduler is simple and uses no bypasses. The hand-scheduled 4-bus
program in `tb_ascon_tta64` is faster: 360 cycles including loads and stores.

To run a test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tta_pkg.sv rtl/ascon_tta64.sv \
          tb/tb_ascon_tta64.sv --top-module tb_ascon_tta64 -o sim
./obj_dir/sim
```

Submodules are found through `-Irtl`. Use the same pattern for the unit
testbenches (for example `rtl/ascon_fu.sv tb/tb_ascon_fu.sv --top-module
tb_ascon_fu`).

## Limitations

* No compiler or assembler is provided beyond the testbench helper functions.
* The instruction memory reads combinationally, as distributed RAM. A
  block-RAM fetch would need a fetch stage and delay slots.
* Writing one unit port from two buses in one instruction is a program error.
  It is only asserted.
