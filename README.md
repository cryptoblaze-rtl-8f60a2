# An encrypted-data processor with Paillier arithmetic

A server that stores a client's data should be able to compute on it without
ever seeing it. This processor runs ordinary, unencrypted programs whose data
are Paillier ciphertexts. Paillier encryption is additively homomorphic: the
product of two ciphertexts modulo n² decrypts to the sum of their plaintexts.
The processor therefore adds and subtracts encrypted numbers without holding
any key. Encryption is randomised, so equal plaintexts give different
ciphertexts, and a table that maps a ciphertext to its value cannot be built.
A branch on the sign of an encrypted value is the one thing the server cannot
do alone. For it, the processor sends the ciphertext to the client, which
holds the key, and waits for the answer.

The core runs a subset of the MicroBlaze integer instruction set, plus eight
instructions for encrypted data. The RTL is written in SystemVerilog and is
parameterised by the key size b and the adder width K.

## Encrypted operands: negation pairs

With a b-bit modulus n, a ciphertext has 2b bits. Paillier gives addition but
not negation, so each encrypted number is stored as a **negation pair** of 4b
bits:

```
 bit 4b-1          2b  2b-1             0
 [      Enc(A)       ][      Enc(-A)      ]
```

Subtraction adds the negative half of the second operand:

| instruction | upper half (Enc of result) | lower half (Enc of -result) |
|---|---|---|
| `EADD d,a,b` | a.hi · b.hi mod n² = Enc(A+B) | a.lo · b.lo mod n² = Enc(-A-B) |
| `ESUB d,a,b` | a.hi · b.lo mod n² = Enc(A-B) | a.lo · b.hi mod n² = Enc(B-A) |

The data owner must supply every operand as a well-formed pair. The processor
cannot check this.

## The eight encrypted instructions

| instruction | effect | unit | cycles (b = 32, K = 128) |
|---|---|---|---|
| `EADD ERd, ERa, ERb` | ERd = ERa ⊕ ERb | eALU | 3 + 192 + 1 |
| `ESUB ERd, ERa, ERb` | ERd = ERa ⊕ neg(ERb) | eALU | 3 + 192 + 1 |
| `EMOV ERd, ERa` | copy one eRegister to another | eRegisters | 3 |
| `N2MOV ERa` | keyRegister = ERa[2b-1:0] (must hold n²) | keyRegister | 3 |
| `ELD ERd, rA, rB` | ERd = mem[rA+rB], 4b/32 words | AXI load/store unit | 3 + (4b/32 + 1) + 1 |
| `EST ERd, rA, rB` | mem[rA+rB] = ERd | AXI load/store unit | 3 + (4b/32 + 2) + 1 |
| `EBRNEG ERa, imm` | if Dec(ERa) < 0, PC += imm | client link | 3 + 2b/32 + client time + 1 |
| `EBRZPOS ERa, imm` | if Dec(ERa) ≥ 0, PC += imm | client link | same |

Encoding (defined in `cb_pkg`):

- `EADD`, `ESUB`, `EMOV`, `N2MOV`, `ELD` and `EST` use opcode `011100`. They are
  type A (rD, rA and rB fields), with the function code in `instr[3:0]` (0 to 5,
  in the table's order).
- `EBRNEG` and `EBRZPOS` use opcode `011101`. They are type B: the rD field
  holds 0 for NEG or 1 for ZPOS, rA names the eRegister, and `imm16` is the
  PC-relative offset. An `IMM` prefix widens the offset. Neither branch has a
  delay slot.
- In the register and branch forms, the `ERx` fields name eRegisters. The
  `rA` and `rB` of `ELD`/`EST` name general registers.

## The eALU: modular multiplication on a K-bit adder

Each half of `EADD`/`ESUB` is a modular multiplication (c1·c2) mod n² on
2b-bit numbers. Two `cb_modmul` units run side by side, one per half. Each
unit owns one K-bit adder and works serially:

1. **Multiply by add and shift.** The multiplier is scanned one bit per pass,
   least significant first. Each pass adds the shifted multiplicand (or zero)
   into the 4b-bit product, one K-bit chunk per cycle: ceil(4b/K) cycles per
   bit, 2b bits.
2. **Divide by shift and subtract (restoring, remainder only).** The 4b
   product bits are shifted, most significant first, into a 2b-bit partial
   remainder. A 1-bit flag holds the bit that is shifted out at the top. Each
   step first compares the remainder with n²: one pass of ceil(2b/K) cycles,
   where the adder computes remainder − n² and keeps only the borrow. A second
   pass subtracts n² if the flag is set or there was no borrow.

The total is 8b²/K + 16b²/K = **24b²/K cycles** whenever K divides 2b. When
K ≥ 4b, the remainder fits in one adder pass with room to spare, and compare
and subtract share a cycle. K = 4b therefore also takes 24b²/K = 6b cycles,
and wider adders stay at 6b. The timing does not depend on the data. The eALU
raises `busy`, and the core stalls until `done`.

| b | K | cycles per EADD/ESUB | simulated |
|---|---|---|---|
| 32 | 32 | 768 | yes |
| 32 | 64 | 384 | yes |
| 32 | 128 (default) | 192 | yes |
| 256 | 256 | 6144 | yes (multiplier alone) |
| 1024 | 128 | 196608 | yes (multiplier alone) |

The K-bit adder sets the critical path, and the eRegister file (32 × 4b flip-flops)
dominates the area. Raising K cuts cycles but lengthens the carry chain.

## Branching through the client

`EBRNEG`/`EBRZPOS` stall the core while `cb_eclient_if` sends the upper half,
Enc(A), to the client. It goes out as 2b/32 32-bit words, least significant
first, on a valid/ready channel with a `last` flag. The client decrypts it and
returns a 2-bit sign code (`00` zero, `01` positive, `10` negative) on a
second valid/ready channel. The branch is resolved one cycle after the answer
arrives. How fast the client answers governs the run time of any program that
branches on data. In the testbenches the client is a behavioural model that
really decrypts.

## Processor organisation

`cb_top` contains:

- `cb_core`, a multicycle machine. Its states are FETCH, DECODE and EXEC, plus
  wait states for the eALU, the load/store unit and the client. A simple
  instruction takes 3 cycles, a load takes 6 and a store takes 7. The core
  contains:
  - `cb_gpr`: 32 × 32-bit general registers, with r0 = 0.
  - `cb_eregs`: 32 eRegisters of 4b bits, and the 2b-bit keyRegister.
  - `cb_ealu`: two `cb_modmul` units.
  - `cb_emem`: the load/store unit, an AXI4 master on the 32-bit data bus.
    `ELD`/`EST` move an eRegister as one INCR burst of 4b/32 beats, one beat
    per cycle. Integer loads and stores are single-beat bursts. A load
    takes 4b/32 + 1 cycles (address, then the beats). A store takes
    4b/32 + 2 (address, the beats, then the write response).
  - `cb_eclient_if`: the client link.
- `cb_ram` as program memory: 1024 words, unencrypted, read by a plain fetch
  port.
- `cb_axi_ram` as data memory: 4096 words (16 KiB), byte-addressed and shared
  by plain and encrypted data. It is an AXI4 slave that accepts INCR bursts
  and serves one beat per cycle. It honours write strobes and always answers
  OKAY. A read that arrives together with a write goes first.

  Each memory has a second, plain port for the host.

Integer instructions implemented:

- add and reverse-subtract, with and without carry and keep-carry (`ADD…`,
  `RSUB…`, and their immediate forms);
- `CMP`, `CMPU`, `MUL`, `MULI`;
- `OR`, `AND`, `XOR`, `ANDN`, and their immediate forms;
- `SRA`, `SRC`, `SRL`, `SEXT8`, `SEXT16`;
- the `IMM` prefix;
- `BR`/`BRI` (absolute or relative, link, delay slot), `BEQ`…`BGE` and their
  immediate forms with optional delay slot, and `RTSD`;
- `LBU`, `LHU`, `LW`, `SB`, `SH`, `SW`, and their immediate forms. Byte and
  halfword stores set only their lanes' AXI write strobes. A halfword address
  is aligned down to an even address.

Not implemented: the barrel shifter, divide, special-register moves,
exceptions and interrupts. Unimplemented opcodes execute as no-ops. `bri 0` (a jump to itself) halts the core and raises
`halted`.

A ciphertext in memory is stored least significant word first: word i is at
byte address addr + 4i, and memory is little-endian within a word. The core
counts executed instructions (`instret`), cycles from start to halt
(`cycles`) and cycles stalled on encrypted units (`estall`).

### Using the top level

1. Hold `rst_n` low, then release it.
2. Write the program through `host_i*`, with byte addresses starting at 0.
3. Write the ciphertexts through `host_d*`. One record holds n² in its low 64
   bits (at b = 32), to be loaded with `ELD` and then `N2MOV`.
4. Pulse `start`, and wait for `halted`.
5. Read the results through `host_d*`.

Both host ports return read data one cycle after the request. Connect the
client to `cl_*`.

## Departures from the original design

- **Data bus.** The data memory sits on a 32-bit AXI4 bus, with the five
  channels carried as two packed structs (`axi_req_t`, `axi_rsp_t` in
  `cb_pkg`). Only what the core needs is built: one ID, INCR bursts, one
  transaction at a time, and no cache, protection or QoS signals. ELD/EST
  move 4b/32 data beats, plus 1 or 2 cycles of address and response
  handshake.
- **Client link.** The original also reaches the client over AXI. Here the
  link is a pair of valid/ready channels, and the client itself is a
  behavioural model in the testbenches.
- **Core.** The original is a MicroBlaze variant. This core is a multicycle
  subset with the same instruction formats, so cycle counts of whole programs
  differ from a pipelined MicroBlaze.
- **Own choices, where the original is silent.** These are the encodings of the
  eight instructions, their operand forms, the half that `N2MOV` copies, the
  word order of ciphertexts in memory, the sign code, and the memory sizes.
- **Defaults.** b = 32 and K = 128. This is the smallest key size in the
  original evaluation, with its minimum-latency adder width. b = 32 is far too
  small for real security. Set `B` (up to 1024) and `K` on `cb_top` for
  realistic keys. The testbench key helper (`cb_tb_pkg`) covers b = 32. The
  whole processor has also been simulated at b = 64 and b = 128, and the
  modular multiplier alone at b = 256 and b = 1024.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_cb_modmul` | results against (a·b) mod m, and exact 24b²/K latency for K = 32, 64 and 128 |
| `tb_cb_modmul_sizes` | the same at b = 256/K = 256 and b = 1024/K = 128 |
| `tb_cb_ealu` | EADD/ESUB on real Paillier pairs: exact products, decryption of both halves, latency |
| `tb_cb_eregs`, `tb_cb_gpr`, `tb_cb_ram` | register files and memory against models |
| `tb_cb_emem` | AXI bursts against a slave model with random stalls: word order, addresses, one burst per transfer, back-to-back beats, and exact cycle counts without stalls |
| `tb_cb_axi_ram` | bursts and single beats with random valid/ready gaps, write strobes, read-ahead at one beat per cycle, and the host port |
| `tb_cb_eclient_if` | the link handshake with random back-pressure, and the sign decision |
| `tb_cb_core` | the integer subset (carry, compare, IMM, delay slots, call/return, word, halfword and byte loads/stores) and all encrypted instructions, with taken and untaken encrypted branches |
| `tb_cb_top` | at default size: Fibonacci, factorial with an encrypted argument, and bubble sort; checks each of the 8 encrypted instructions, stalls and branch outcomes |
| `tb_cb_benchmarks` | the same three programs at sizes that execute 896, 5 564 and 101 289 instructions |
| `tb_cb_top_keysizes` | the whole processor at b = 64, K = 256 and at b = 128, K = 512, with real keys of those sizes: EADD latency (384 and 768 cycles) and bubble sort of 150 elements |

Results of `tb_cb_benchmarks` at b = 32, K = 128, with a client that answers
in 1 cycle:

| program | instructions | cycles | stall cycles |
|---|---|---|---|
| Fibonacci, F(178) mod n | 896 | 36 874 | 34 186 |
| factorial, 50! mod n | 5 564 | 536 673 | 519 981 |
| bubble sort, 150 elements | 101 289 | 2 751 988 | 2 448 121 |

More than 90 % of the cycles are eALU and client stalls. The program-level
cost therefore follows 24b²/K almost directly. With larger keys, each at
its minimum-latency adder width (`tb_cb_top_keysizes`), the same
150-element sort takes:

| b | K | cycles per EADD/ESUB | words per ELD/EST | sort cycles | relative to b = 32 |
|---|---|---|---|---|---|
| 32 | 128 | 192 | 4 | 2 751 988 | 1 |
| 64 | 256 | 384 | 8 | 5 097 706 | 1.85 |
| 128 | 512 | 768 | 16 | 9 710 850 | 3.53 |

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/cb_pkg.sv tb/cb_tb_pkg.sv tb/tb_cb_top.sv --top-module tb_cb_top
./obj_dir/Vtb_cb_top
```

Replace `tb_cb_top` with any other testbench name. `cb_tb_pkg` is needed only
by the testbenches that use Paillier keys or the assembler.
