# CAMX: a CAM-based bit-serial SIMD matrix core, with AES-128 as its workload

CAMX is an accelerator that sits next to a mobile CPU on its system bus. It
holds a large number of small data words in two content-addressable memories
and processes all of them at once, one bit position per clock cycle. Every
word has its own 1-bit processing element (PE), so an 8-bit XOR over 1024
words takes as long as an 8-bit XOR over one word: ten cycles here.

The point of putting the data in CAMs rather than plain RAM is table lookup.
A table lookup on a SIMD machine is normally serial, because every lane needs
a different table entry. In CAMX it becomes a sweep over the table instead:
for every table index `v`, one masked search marks all words that hold `v`,
and one broadcast write stores `table[v]` into exactly those words. A
256-entry table costs 256 search/write pairs, independent of how many words
are being converted. The example workload, AES-128 encryption, uses this for
SubBytes and ordinary bit-serial XOR/copy instructions for everything else,
encrypting 1024 independent 16-byte blocks in parallel.

The default configuration is 1024 entries × 256 bits per CAM, the size of the
published CAMX evaluation.

## Organisation

```
             system bus (32-bit, host CPU)
                      |
               +--------------+      instruction       +-----------+
               | camx_bus_if  |----------------------->| camx_ctrl |
               | SEARCH_DIN   |                        +-----------+
               | MASK_DIN     |   per-cycle controls, broadcast |
               +--------------+                                 v
                 | word access          +------------------------------+
        +--------+---------+   column   | N x camx_pe                  |   column  +---------+
        | camx_cam (left)  |<---------->| store reg, ALU, carry,       |<--------->| camx_cam|
        | N x X bits       |  + match   | operation reg, valid flag    |  + match  | (right) |
        +------------------+            +------------------------------+           +---------+
```

* **Left and right CAM modules** (`camx_cam`, N entries × X bits each). Entry
  `k` of both belongs to PE `k`. Data is "vertical": a word occupies part of
  one entry, and processing walks along bit positions. Each module supports a
  bit-column read (bit `p` of all N entries), a bit-column write gated per
  entry, a masked search of all entries, and 32-bit word access for the host.
* **PEs** (`camx_pe`, one per entry). A store register, a 1-bit ALU (XOR, AND,
  OR, add with a carry register, pass-through, immediate), an operation
  register holding the result to be written back, and the **valid flag**.
* **Controller** (`camx_ctrl`). Decodes one instruction at a time and drives
  the same controls to both CAMs and all PEs.
* **Interface module** (`camx_bus_if`). Bus slave: CAM data access by
  address, the instruction register, the 256-bit SEARCH_DIN and MASK_DIN
  registers and a status register.
* **Top** (`camx`). Wires the above together; its ports are the bus plus
  `busy` and `done`.

The host CPU and its SDRAM are outside the design.

## The bit-serial pipeline

A W-bit instruction goes through three stages per bit, LSB first. A new bit
enters every cycle:

| cycle      | stage 0                         | stage 1                                      | stage 2 |
|------------|---------------------------------|----------------------------------------------|---------|
| t          | left CAM column `D+i` → store registers | | |
| t+1        | (bit i+1)                       | right CAM column `E+i`, ALU(store, right, carry) → operation registers | |
| t+2        | (bit i+2)                       | (bit i+1)                                    | operation registers → wing A, position `D+i` (left) or `E+i` (right), only where valid = 1 |

The left and right CAMs therefore deliver the two operands of one bit in
consecutive cycles. An instruction of width W keeps the core busy for exactly
**W+2 cycles**, whatever N is. A search takes **2 cycles**: the masked compare
in the first, and the valid flags are loaded from the match lines in the
second. Instructions do not overlap, so a read never sees a half-finished
write from the previous instruction. Inside one instruction, a bit written in
stage 2 is never read again by that instruction unless the operand and result
fields overlap in the same wing. In that case the read sees the new value
(the testbench reference model follows the same rule).

### Valid flags

Every write-back (basic instructions and the rewrite instruction alike) is
gated by the PE's valid flag. Reset sets all flags to 1. A search replaces
every flag with its entry's match result. A search with an all-zero mask
matches everything and re-activates all entries. This is the only form of
predication: "search, then operate" changes only the selected entries.

## Instruction set

Instructions are 32-bit words written to the CMD register. The fields follow
the CAMXLIB format: A (result wing), B (operation), C (width − 1), D and E
(8-bit positions). The bit layout and opcode values are this design's own:

```
 31   30..28  27..24  23..16  15..8  7..0
 A    0       B       C       D      E
```

| B   | name               | effect for each active entry, i = 0..C                         | busy   |
|-----|--------------------|----------------------------------------------------------------|--------|
| 0x0 | `CAMX_DATA_XOR`    | wing A[pos] = L[D+i] ^ R[E+i]                                  | C+3    |
| 0x1 | `CAMX_DATA_AND`    | wing A[pos] = L[D+i] & R[E+i]                                  | C+3    |
| 0x2 | `CAMX_DATA_OR`     | wing A[pos] = L[D+i] \| R[E+i]                                 | C+3    |
| 0x3 | `CAMX_DATA_ADD`    | bit-serial L[D..] + R[E..] with carry, carry-out dropped       | C+3    |
| 0x4 | `CAMX_DATA_COPY`   | wing A[pos] = the other wing's bit (move between wings)        | C+3    |
| 0x8 | `CAMX_MASK_SEARCH` | valid = ((wing A ^ SEARCH_DIN) & MASK_DIN) == 0                | 2      |
| 0x9 | `CAMX_ALL_WRITE`   | wing A[E+i] = D[i] (0 above bit 7): broadcast immediate        | C+3    |

`pos` is `D+i` when A is the left wing and `E+i` when it is the right wing.
Positions wrap modulo X. In MASK_DIN, a 1 means the bit is compared. Undefined
opcodes are accepted and do nothing.

Two instructions go beyond the operations named for the original core.
`CAMX_DATA_COPY` is a plain move between wings. The rewrite instruction is
realised by routing the immediate bit through the PE's ALU, so it uses the
same pipeline and write port as everything else.

## Host interface

32-bit bus, byte addresses. The master holds `bus_req`, `bus_we`, `bus_addr`
and `bus_wdata` until `bus_ready` is high, and the transfer happens in that
cycle. Read data appears on `bus_rdata` one cycle later with `bus_rvalid`.

| address                          | access | meaning |
|----------------------------------|--------|---------|
| `0x8000_0000 \| wing<<30 \| entry<<5 \| word<<2` | R/W | 32-bit word `word` (bits 32·word+31..32·word) of entry `entry`, wing 0 = left, 1 = right (`entry<<5` for X = 256; in general `entry << (2+log2(X/32))`) |
| `0x000`                          | W      | CMD: issue an instruction |
| `0x004`                          | R      | STATUS: bit 0 = busy |
| `0x100 + 4j`                     | W      | SEARCH_DIN bits 32j+31..32j |
| `0x200 + 4j`                     | W      | MASK_DIN bits 32j+31..32j |

CMD writes and CAM accesses wait (ready low) while an instruction runs. Writes
to SEARCH_DIN/MASK_DIN and STATUS reads never wait. A host can therefore load
the next search pattern while the current instruction executes, and then
simply issue the next command, which stalls until the core is free. Busy-wait
polling is not needed.

## AES-128 on CAMX

The testbench host model (`tb/camx_host_cpu.sv`) runs AES-128 as a CAMX
program. Each entry encrypts its own block. All blocks share one key, whose
schedule the host computes and broadcasts. Layout per entry:

| field        | bits          | contents |
|--------------|---------------|----------|
| left  S      | L[127:0]      | AES state, byte k (row k%4, column k/4) at bits 8k+7..8k |
| left  K1B    | L[135:128]    | the constant 0x1b, for the xtime reduction |
| right RK     | R[127:0]      | round key; holds 2·a during MixColumns |
| right T      | R[255:128]    | SubBytes+ShiftRows result |

Round structure:

1. **AddRoundKey**: 16 `CAMX_ALL_WRITE` of 8 bits put the round key into RK
   in every entry, then one 128-bit XOR gives S ^= RK (130 cycles).
2. **SubBytes fused with ShiftRows**: for each state byte k and each value
   v = 0..255: search S byte k == v, then `CAMX_ALL_WRITE` sbox(v) into byte
   `shiftrows(k)` of T. Writing to the other wing keeps the rewritten bytes
   out of the way of the searches still to come. Each pair costs 14 cycles:
   10 for the rewrite, 2 for the search, and one bus transfer each for the
   search word, the search command and the rewrite command. The mask words and
   the next search word are written while the previous rewrite runs.
3. **MixColumns**: with rotₙ(t) = t with the rows of each column rotated by
   n, and a = t ^ rot₁(t), the output column is
   2a ^ rot₁(t) ^ rot₂(t) ^ rot₃(t). The program:
   * S = rot₁(t) (8 COPYs, two per column), then S ^= T, giving a.
   * RK[i+1] = S[i] (one 127-bit COPY), then bits 8k of RK are cleared (16
     one-bit `CAMX_ALL_WRITE`). This gives a<<1 within each byte.
   * For each byte k: search S bit 8k+7 == 1, then RK byte k ^= K1B. Only the
     entries whose byte overflowed get the 0x1b reduction. RK now holds 2a.
   * S ^= RK, S ^= T, then S ^= rot₂(t) and S ^= rot₃(t) (16 XORs).
4. The last round skips MixColumns and copies T to S.

Cycle counts of this program, measured in simulation:

| phase                     | cycles (16 entries) | cycles (1024 entries) |
|---------------------------|---------------------|-----------------------|
| SubBytes (+ShiftRows)     | 574,640             | 574,640               |
| MixColumns                | 11,327              | 11,327                |
| AddRoundKey               | 2,145               | 2,145                 |
| load and unload over the bus | 454              | 8,518                 |
| total                     | 588,566             | 596,630               |

At 1024 entries this is 596,630 / (1024 × 16 bytes) = **36.4 cycles per
byte**. The published CAMX evaluation reports 1,362,699 cycles (1,312,160
SubBytes, 17,161 ShiftRows+MixColumns, 2,519 AddRoundKey) and 83.2 cycles
per byte for the same 1024 × 256 configuration. That program is not
published, so this one is not cycle-equivalent to it. The main difference is
SubBytes. Here it is a full 8-bit search per table value, written to the other
wing. The original is described as searching the upper and lower halves of
each byte in 4-bit steps and rewriting in place. Only the bus load/unload
grows with the number of entries, which shows the word-parallel claim.

## Where this RTL departs from or adds to the original design

* **CAM cells are flip-flop arrays.** `camx_cam` is written as a register
  array with column read/write and a compare per entry. It is functionally a
  CAM, but synthesising it at 1024 × 256 gives a huge, slow netlist. A real
  implementation would use a CAM macro with bit-line (column) access.
* **Bus, address map, instruction encoding, opcode values**: this design's own.
* **Timing**: pipeline depth (W+2), 2-cycle search, one instruction at a time.
* **COPY instruction** and the immediate path in the ALU: added.
* **Valid flags** gate all write-backs, are 1 after reset, and are replaced
  (not ANDed) by each search.
* **Key schedule**: computed by the host and broadcast with `CAMX_ALL_WRITE`,
  so all entries share one key. The original stores a key per entry in the
  right CAM. The SubBytes search/rewrite mechanism could also expand a key per
  entry (SubWord is four more lookups per round), but the host program here
  does not.
* **ShiftRows** is folded into the SubBytes write addresses instead of being
  applied when MixColumns results are stored.
* **Data flow direction of a round**: SubBytes writes into the right wing and
  MixColumns accumulates back into the left wing, so the state is in the left
  wing at every AddRoundKey. The original flow rewrites SubBytes in the left
  wing and stores the MixColumns result in the right wing.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench         | what it checks |
|-------------------|----------------|
| `tb_camx_cam`     | word port, column read/write with per-entry mask, masked search against a shadow array (32 × 256) |
| `tb_camx_pe`      | every ALU function, 8-bit bit-serial additions (carry chain), valid flag reset/load |
| `tb_camx_ctrl`    | for random instructions: every read/write position, ALU op, first/immediate bits, search strobes, W+2 / 2 cycle busy, done pulse, commands held off while busy |
| `tb_camx_bus_if`  | address decoding, register writes, command decode, read latency, wait rules |
| `tb_camx`         | whole core, 16 × 256. Part 1: 160 random instructions of every kind, with partial valid masks, stalls and latency checks, compared word by word with an ISA reference model. Part 2: AES-128 of 16 blocks checked against a reference AES |
| `tb_camx_full`    | default size 1024 × 256: AES-128 of 1024 blocks, all checked; entry 0 is the FIPS-197 example (3243f6a8… → 3925841d02dc09fbdc118597196a0b32) |

`tb/camx_aes_ref_pkg.sv` is the reference AES. It computes the S-box
(inverse in GF(2⁸) followed by the affine map) rather than storing it.
`tb/camx_host_cpu.sv` is the behavioural host CPU that runs the AES program.

Running a testbench with Verilator (here the full-size one, about 15 s of
simulation after the build):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/camx_pkg.sv rtl/camx_cam.sv rtl/camx_pe.sv rtl/camx_ctrl.sv \
  rtl/camx_bus_if.sv rtl/camx.sv tb/camx_aes_ref_pkg.sv tb/camx_host_cpu.sv \
  tb/tb_camx_full.sv --top-module tb_camx_full -o sim
./obj_dir/sim
```

For another testbench, list the modules it uses and change `--top-module`.

## Files

* `rtl/camx_pkg.sv`: wing, opcode and ALU enums, instruction struct, register map
* `rtl/camx_cam.sv`: CAM module
* `rtl/camx_pe.sv`: processing element
* `rtl/camx_ctrl.sv`: controller
* `rtl/camx_bus_if.sv`: interface module
* `rtl/camx.sv`: top level
* `tb/`: the testbenches above, the AES reference and the host model

Parameters: `N` (entries, default 1024) and `X` (bits per entry, default
256, a multiple of 32 and at most 256 because the instruction's position
fields are 8 bits).
