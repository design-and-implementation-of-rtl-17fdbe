# A programmable AES / DES / RSA engine built from 8-bit PEs

Embedded systems that run security protocols need several ciphers: a block
cipher for bulk data (AES or DES/3DES) and public-key arithmetic (RSA) for key
exchange. Giving each cipher its own ASIC core wastes area, and adding a new
algorithm later is impossible. This engine instead splits the work of all three
ciphers into three classes of operation, and gives each class one shared unit:

| class | what the ciphers need | unit |
|---|---|---|
| permutation / combination | AES ShiftRows, DES IP, PC-1, IP^-1 | two fixed permutation units, PCU-1 and PCU-2 |
| computation | XOR, X_TIME (multiply by x in GF(2^8)), long addition | computation unit (CU): 16 PEs of 8 bits |
| memory | S-box look-ups, round keys, Montgomery operands | memory unit (MU): 8 tile buffers |

A small dedicated DES round unit (two copies, one per 64-bit block) does the
bit-level DES round, which would be slow on byte-wide PEs. Everything is
driven by *context words* held in a writable context memory. Changing the
program changes the algorithm, so AES-192/256, 3DES and Montgomery
multiplication of any width from 256 to 4096 bits run on the same hardware
with no RTL change.

The design follows the thesis *Design and Implementation of a Flexible
Pipeline for Secure Embedded Systems*. Where that text fixes a structure or a
number, the RTL uses it. Where it is silent, the RTL makes its own choice;
these choices are listed under "Departures and own choices" below.

## Datapath

```
          din ──► PE regs (CU, 16 x 8-bit, 6 regs each) ──► dout
                  │ ▲          ▲ ▲                 │
        PCU-1 ◄───┘ │          │ └── MU preload ◄──┤ MU: 8 tiles x 512 words,
  (ShiftRows, IP,   │          │     (4 bytes/lane)│ word = 4 bytes per lane
   PC-1)            │          │                   │
     │   └──────────┘ rotate   └── PCU-2 (IP^-1) ◄─┤
     └──► DES unit x2 (round in 2 cycles, keys on the fly)
                          ctrl ─► context memory ─► context decoder ─► all units
                           └──► AGU (5 base registers, 6 address functions)
```

* **PE** (`pe.sv`). Each PE has six 8-bit registers and one operator with
  three operands: `a^b^c`, `xtime(a^b)^c`, or `a+b+cin` with a carry out. An
  operand is a register of the PE itself or of the PE 1–3 rows further down
  the same AES column (PE *k* holds state byte *k*, column *k/4*). That is
  enough to build MixColumns and InvMixColumns without a separate network.
* **CU** (`compute_unit.sv`). In *parallel mode* all 16 PEs run the same
  operation. In *propagation mode* the PEs form one 128-bit adder, with the
  carry rippling from PE 0 (least significant byte) to PE 15. The Montgomery
  extras live here too (see below).
* **MU** (`memory_unit.sv`, `tile_buffer.sv`). Each tile serves two PE lanes
  and has its own read address. So one cycle does eight independent S-box
  look-ups (16 bytes in two passes: even lanes, then odd lanes). Each lane word
  holds four byte *slots*, and a read lands in a preload register. A
  Montgomery step therefore gets N, B, B+N and the running result T of a
  lane in one read. Writes use a lane mask and a slot mask.
* **PCU-1 / PCU-2** (`pcu1.sv`, `pcu2.sv`). These are fixed wiring only.
  PCU-1 does forward or inverse ShiftRows, the DES IP of both 64-bit blocks,
  and PC-1 of the DES key. PCU-2 does IP^-1 and writes the bytes back to the
  PE lanes.
* **DES unit** (`des_unit.sv`). Each round takes two cycles:
  - Cycle 1: rotate C/D, apply PC-2, compute E(R) xor key.
  - Cycle 2: apply the S-boxes and P, then swap L and R.

  Encryption rotates the key halves left. Decryption rotates them right, so
  no key schedule is stored. Block 0 uses lanes 0–7 and block 1 uses lanes
  8–15. Both blocks use the same key.
* **Controller** (`ctrl.sv`, `agu.sv`, `context_memory.sv`,
  `context_decoder.sv`).
  - The five FSM states are idle, flow-register load, context-memory write,
    start and execute.
  - There is one non-nested loop, set by start address, end address,
    iteration count and index step.
  - The AGU has five base registers and six address functions.
  - The decoder expands each context word into one or more cycles ("steps").

## Programming model

The host drives two ports.

**Command port** (`cmd_valid`, `cmd`, `cmd_addr`, `cmd_data`). A command is
accepted while `cmd_ready` is high.

* `CMD_FLOW` writes a flow register. The register number goes in `cmd_addr`
  and the value in `cmd_data`:

  | number | register |
  |---|---|
  | 0–4 | AGU base registers |
  | 5 | loop start |
  | 6 | loop end |
  | 7 | loop count |
  | 8 | loop index step |
  | 9 | number of 128-bit sections C for Montgomery |
  | 10 | bit n of B+N |

* `CMD_CM` writes context word `cmd_addr`.
* `CMD_START` starts the program at word 0. The engine raises `in_req` for one
  cycle and takes `din` into PE register 0, byte *k* = `din[127-8k -: 8]`. When
  the `CX_END` word is reached, `done` pulses and `dout` holds register 0 of
  all PEs.

**Memory port** (`hm_*`). It works only while `busy` is low. It writes byte
slots of selected lanes at one MU address, or reads a whole word one cycle
later.

A context word (`ctx_t` in `fp_pkg.sv`, 45 bits) holds these fields:

| field | meaning |
|---|---|
| `op` | word type |
| `pe_op`, `rd`, `sa`, `sb`, `sc` | PE operation, destination and three operand selectors |
| `inv` | inverse direction |
| `slot` | MU byte slot |
| `afn`, `base`, `imm` | AGU function, base register and offset |

Word types and their step counts:

| op | steps | action |
|---|---|---|
| `CX_ALU` | 1 | one PE operation on all PEs; `PE_ADD` chains the carries |
| `CX_SBOX` | 3 | look-up of register `rd` in slot `slot` of the table at `base` |
| `CX_LDW` | 2 | load one MU byte slot of every lane into register `rd` |
| `CX_SBOXR` | 3 | as `CX_SBOX`, but the look-up addresses come through PCU-1's (Inv)ShiftRows wiring, so SubBytes and ShiftRows are done in one word |
| `CX_ROT` | 1 | ShiftRows (`inv`=0) or InvShiftRows (`inv`=1) of register `rd` |
| `CX_DES_LD` | 2 | read key word; IP of register `rd` and PC-1 of the key into both DES units |
| `CX_DES_RND` | 2 | one DES round |
| `CX_DES_FIN` | 1 | IP^-1 of both pre-outputs into register `rd` |
| `CX_MON` | C+1 | one Montgomery iteration (one multiplier bit), overlapping the previous one |
| `CX_MON_END` | 2 | finish the last Montgomery iteration |
| `CX_END` | 1 | finish |

The loop jumps back when the last step of the word at the loop-end address
finishes. The loop index (starting at 0, advanced by the step) feeds the AGU:

| function | address | typical use |
|---|---|---|
| `AF_LOOP` | `base+imm+i` | round key of the iteration |
| `AF_LOOP_REV` | `base+imm-i` | round keys read in reverse for decryption |
| `AF_ABIT` | `base+imm+i/128` | the word that holds multiplier bit *i* |

### Example programs

These are the programs used by `tb/flexcrypt_top_tb.sv`. The memory map is:
S-boxes at address 0, with the inverse S-box in slot 1; round keys at 256; DES
keys at 272; Montgomery data at 300.

* **AES encryption**, Nr rounds:
  1. Load key 0 and XOR.
  2. The loop, run Nr-1 times: S-box with ShiftRows (`CX_SBOXR`), load round
     key *i+1*, then three ALU words: `t = xtime(s0^s1)^s1`, `t ^= s2^s3`,
     `s = t ^ key`. SubBytes and ShiftRows commute. Each tile can therefore
     look up the byte that ShiftRows will bring into its lane, and the
     result lands already rotated.
  3. The last round uses the separate `CX_SBOX` and `CX_ROT` words, then key
     Nr, then `CX_END`.

  A loop round takes 8 cycles. The total is 8·Nr + 4: 84 cycles for AES-128,
  100 for AES-192 and 116 for AES-256.
* **AES decryption** runs in reverse order:
  1. Key Nr.
  2. The loop, run Nr-1 times: inverse S-box with InvShiftRows (`CX_SBOXR`,
     `inv`=1), key (`AF_LOOP_REV`),
     then AddRoundKey and InvMixColumns in five ALU words. InvMixColumns is
     computed as MixColumns applied after the pre-step
     `s_i ^= xtime(xtime(s_i ^ s_i+2))`, indices taken within the column.
  3. The last round.

  A loop round takes 10 cycles. The total is 10·Nr + 2: 102 cycles for
  AES-128, 122 for AES-192 and 142 for AES-256.
* **DES**: `CX_DES_LD`, then `CX_DES_RND` looped 16 times, then `CX_DES_FIN`.
  This takes 37 cycles for two 64-bit blocks. **3DES** (E-D-E) unrolls three
  such passes, because the loop cannot nest: 55 context words, 107 cycles.
* **Montgomery**: one `CX_MON` word looped n times, then `CX_MON_END`. It
  takes n·(C+1) + 4 cycles, with C = n/128:

  | n | cycles |
  |---|---|
  | 256 | 772 |
  | 512 | 2564 |
  | 1024 | 9220 |
  | 2048 | 34820 |
  | 4096 | 135172 |

## Montgomery multiplication in propagation mode

This is the least obvious part of the design. The engine computes
T = A·B·2^-n mod N, bit-serially over the multiplier:

    for i in 0..n-1:  q = T[0] ^ (a_i & B[0]);  T = (T + a_i·B + q·N) / 2

**Operand layout.**
- Operands are cut into C sections of 128 bits. MU word `base+j` holds
  section *j*. Lane *k* holds byte *k* of the section, least significant
  first, in four slots: N (0), B (1), B+N (2) and T (3).
- B+N is precomputed by the host. Its bit n, which does not fit in the
  section, is given in flow register 10.
- The multiplier A is stored one byte per lane in slot 0 of words
  `base+imm+w`.

**One iteration spans C+3 cycles.** Its work, counted from its own start:

| cycle | action |
|---|---|
| 0 | read the multiplier word (`AF_ABIT`); bit a_i is picked from it |
| 1 … C | read section 0 … C-1 (one cycle ahead, into the preload registers) |
| 2 … C+1 | add section j in cycle j+2 |
| 3 … C+1 | write section j-1 back into slot T |
| C+2 | flush: write back section C-1 with the top bits |

**Iterations overlap by two cycles, so each costs C+1.** Cycles C+1 and C+2
of iteration *i* are cycles 0 and 1 of iteration *i+1*, and they never compete
for a unit:

- In cycle 0 the new iteration only reads the multiplier word, while the old
  one adds its last section and writes back the section before it.
- In cycle 1 the new iteration reads section 0, while the old one flushes.

Two hazards stay clear:

- Section j is written back by iteration *i* before iteration *i+1* reads it.
  This needs C ≥ 2, which holds for n ≥ 256.
- The write address does not add the word's immediate. The write in cycle 0
  therefore goes to the T region while the read goes to the multiplier region.

The context decoder issues the tail of the previous iteration in steps 0 and
1 of each `CX_MON` word except the first. The tail of the last iteration is
issued by the two-step `CX_MON_END` word.

**The four extra circuits in the CU.**

- **Operand select.** At section 0 the CU forms q and chooses the addend once
  for the whole iteration: 0, B, N or B+N, indexed by {q, a_i}. This avoids
  a second addition.
- **Carry chain.** The carry ripples through all 16 PEs in the cycle, and a
  registered carry links one section to the next.
- **Shift chain.** The halving is folded into the write-back. Section j-1 is
  written one cycle late, shifted right by one, with bit 0 of section j's sum
  on top.
- **Overflow bit.** The final T is below 2N, so it may need n+1 bits. Bit n of
  T is kept in a flip-flop, not in the MU, and comes out as `mon_t_top`. In
  the flush step the top bit of the result is formed as last carry + stored
  top bit of T + top bit of B+N (when B+N was the addend). That is a
  three-input 1-bit adder, whose two output bits become bits n-1 and n of the
  new T.
- **No final subtraction.** N is not subtracted at the end, so T is only
  reduced below 2N. Inputs below 2N are accepted, so results can be chained
  in an exponentiation. The host subtracts N once at the very end.

A modular exponentiation (for example RSA-256) is a host-driven sequence of
such products. Between products the host copies T into the B and B+N slots.
The engine has no exponent loop of its own.

## Departures and own choices

* **Cycle counts.** Except for DES, they are higher than the thesis reports.

  | task | thesis | here |
  |---|---|---|
  | AES-128 encryption | 43 | 84 |
  | AES-128 decryption | 88 | 102 |
  | DES | 38 | 37 |
  | Montgomery 1024 | 8334 | 9220 |

  For AES, the thesis's figures imply that its steps overlap. Here every
  context word runs to completion before the next starts. As the thesis
  states, MixColumns and AddRoundKey take 3 PE cycles per round for
  encryption; they take 5 for decryption, where the thesis gives 9. The
  S-box look-up with ShiftRows (3 cycles) and the key load (2 cycles)
  add 5 cycles per round.

  A Montgomery iteration costs C+1 cycles: C additions plus the multiplier
  read. The thesis's count is about C per bit.
* **Propagation mode.** The thesis passes the control signals from PE to PE.
  Here the carry ripples through all 16 PEs in one cycle, so the same
  control is broadcast to all of them. The context decoder is therefore only
  a partial match.
* **Overflow adder.** The thesis uses a one-bit *half* adder. A three-input
  one-bit adder is used here, because when B+N is the addend its top bit
  also has to be added.
* **Round keys.** AES round keys are expanded by the host and stored in the
  MU. DES keys are generated on the fly, as in the thesis. The AES inverse
  S-box is kept in a second slot of the S-box words.
* **Tables.** The DES tables (PC-1, PC-2, shift counts, S-boxes) and AES
  constants are the standard ones. `des_pkg.sv` holds the DES tables.
* **Choices where the thesis is silent:**
  - all sizes except 16 PEs, 8 tiles, 6 registers, 5 base registers and
    2 DES blocks; in particular MU depth 512 and context memory depth 64;
  - the context word encoding and the step schedules;
  - the six address functions;
  - the host ports;
  - both DES blocks sharing one key;
  - reset: all control state and PE registers reset to zero, while the MU
    and context memory contents do not.
* **Not built:** the "SRAM taken off" variant, which uses system memory in
  place of the MU.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Each compares the module against a model
written in the testbench:

- `pe_tb`: the operator and the register file.
- `compute_unit_tb`: MixColumns against GF(2^8) arithmetic and the FIPS-197
  column, plus a full 256-bit Montgomery product checked after every
  iteration against wide integers.
- `des_unit_tb`: published DES vectors, 200 random keys and blocks against a
  model with a stored key schedule, and 2 cycles per round.
- `pcu1_tb`, `pcu2_tb`: published permutation values.
- The memories, AGU, decoder and controller against array and schedule
  models.

`flexcrypt_top_tb` runs the whole engine with every parameter at its default
and checks the cycle count of each program:

- AES-128/192/256 encryption and decryption with the FIPS-197 vectors, plus
  random AES-128 blocks against a reference cipher;
- DES on two blocks, and 3DES;
- Montgomery products from 256 to 4096 bits, compared bit for bit with a
  bit-serial model and, up to 1024 bits, with T·2^n ≡ A·B (mod N).

It also counts each mechanism and fails if one never occurs: forward and
inverse rotate, S-box and inverse S-box, loop-back, both CU modes, all four
Montgomery addends, the top carry, both DES directions and context reloads.

To run it with Verilator 5:

    verilator --binary --timing -j 8 --top-module flexcrypt_top_tb \
        rtl/fp_pkg.sv rtl/des_pkg.sv rtl/*.sv tb/flexcrypt_top_tb.sv
    ./obj_dir/Vflexcrypt_top_tb

It finishes in under a second. Other testbenches are run the same way, with
their own top module and the files they need. Lint warnings that remain:

- unused parameters and signals;
- `UNOPTFLAT` on the CU carry array. This is an array-granularity artefact
  of the ripple chain and is explained in `compute_unit.sv`.
