# Cryptographic instruction-set extension for a small 32-bit core

Block ciphers and hashes are slow on a small embedded core. DES works bit by
bit, but the core's shift and logic instructions work on whole words. AES and
DES both read large lookup tables from memory. SHA-256 moves its eight working
variables to and from memory in every round. This RTL adds a handful of
single-cycle custom instructions to the core's datapath. They cover those
hot spots and leave everything else to ordinary C code:

| Algorithm | What the hardware does | What software still does |
|---|---|---|
| DES / 3DES | 11 bit-permutation instructions (IP, IP⁻¹, PC-1, PC-2, key-half rotations, E, P, swap) and the whole Feistel F function, with the eight S-boxes as an on-chip table | the key-schedule loop, the `L ^ f` XOR and the half exchange in each round, chaining three DES passes for 3DES |
| AES-128/192/256 | MixColumns / InvMixColumns on a column; SubBytes+ShiftRows (or the inverses) on a row or key word, computed with GF(2⁸) logic instead of tables | AddRoundKey, key-expansion bookkeeping, moving bytes between rows and columns |
| SHA-256 | special registers for a..h and for a 16-word message-schedule window; one instruction does a full compression round, another does a schedule step | padding, passing K_t, the final `H += a..h` |

The design follows a published instruction-set extension for a configurable
commercial core. That work gives the instruction groups, the GF(2⁸) doubling
circuit, the idea of a shared MixColumns multiplier and of a row-wide
SubBytes/ShiftRows unit, and the use of special registers for SHA-256. The
opcode encoding, operand packing, latency, inverter circuit and the names of
most DES permutation instructions are this design's own choices. They are
listed under "Departures and choices" below. The processor core itself is not
part of this RTL.

## Instruction interface (`crypto_ise`)

The top module sits in the core's execute stage.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `issue` | in | 1 | an extension instruction is issued this cycle |
| `op` | in | 5 | `crypto_pkg::ise_op_e` |
| `imm` | in | 3 | immediate field (see below) |
| `rs` | in | 64 | first operand (a DES block, or a 32-bit word in `rs[31:0]`) |
| `rt` | in | 48 | second operand, used only by `OP_DES_F` (the round subkey) |
| `rd` | out | 64 | result |
| `rd_valid` | out | 1 | high one clock after `issue` |

**Timing.** Every instruction is computed in the cycle it is issued. The result
is registered, so `rd`/`rd_valid` appear one clock later. The SHA-256 special
registers update on that same edge. Instructions can be issued back to back,
one per cycle. `rd` holds its value while nothing is issued. An assertion
flags an opcode outside the enum.

| Opcode | Operands | Result |
|---|---|---|
| `OP_DES_IP`, `OP_DES_FP` | `rs` = 64-bit block | permuted block |
| `OP_DES_PC1` | `rs` = 64-bit key (parity bits ignored) | `{C0,D0}` in `rd[55:0]` |
| `OP_DES_ROL1/ROL2` | `rs[55:0]` = `{C,D}` | C and D each rotated left by 1 or 2 |
| `OP_DES_ROR1/ROR2` | `rs[55:0]` = `{C,D}` | C and D each rotated right by 1 or 2 |
| `OP_DES_PC2` | `rs[55:0]` = `{C,D}` | 48-bit subkey in `rd[47:0]` |
| `OP_DES_E` | `rs[31:0]` | 48-bit expansion |
| `OP_DES_P` | `rs[31:0]` | 32-bit permutation |
| `OP_DES_SWAP` | `rs` | 32-bit halves exchanged |
| `OP_DES_F` | `rs[31:0]` = R, `rt` = subkey | `P(S(E(R) ^ K))` |
| `OP_AES_MIX` | `rs[31:0]` = column; `imm[0]` = inverse | (Inv)MixColumns |
| `OP_AES_SUBSH` | `rs[31:0]` = row/word; `imm[1:0]` = left byte rotation; `imm[2]` = inverse | (Inv)SubBytes of the rotated word |
| `OP_SHA_WRS` | `rs[31:0]`, `imm` = 0..7 (a..h) | writes that register |
| `OP_SHA_RDS` | `imm` = 0..7 | reads that register |
| `OP_SHA_LDW` | `rs[31:0]` = message word | shifts it into the schedule window |
| `OP_SHA_ROUND` | `rs[31:0]` = K_t | one round with W_t = oldest window word |
| `OP_SHA_SCHED` | — | shifts the next schedule word into the window |

DES bit order follows the DES standard: bit 1 is the most significant bit of
each field. Results narrower than 64 bits are right-aligned and zero-extended.
AES words carry byte 0 in bits 31:24.

## How software drives it

The testbench `tb/tb_crypto_ise.sv` is the clearest reference. It plays the
processor and runs every algorithm this way.

**DES.** Encryption: `cd = PC1(key)`, then 16 times `cd = ROL1/ROL2(cd)`,
`K[i] = PC2(cd)`. Decryption reuses the same instructions in the reverse
direction. After all 16 shifts (28 positions) C and D are back where they
started, so `PC2(PC1(key))` is already K16. Each step back uses `ROR1/ROR2`,
with the shift amounts taken in reverse order. No subkey table has to be kept
in memory. A block takes `IP`, 16 × (`F` plus a software XOR and rename),
`SWAP` and `FP`. 3DES is encrypt–decrypt–encrypt with three keys. That is 52
extension instructions per DES block including its key schedule, and 156 for
3DES.

**AES.** The state is kept as four column words. MixColumns takes one column
per instruction. ShiftRows moves bytes within a row, so software gathers row
*r* from the four columns and issues `OP_AES_SUBSH` with rotation *r* (or
`(4-r) mod 4` and `imm[2]=1` for decryption). It then scatters the bytes back.
Substitution is byte-wise and rotation moves whole bytes, so the order of the
two does not matter. Key expansion reuses the same instruction. `RotWord` +
`SubWord` is rotation 1. The extra AES-256 `SubWord` is rotation 0. One block
costs 76 / 92 / 108 extension cycles for AES-128 / 192 / 256.

**SHA-256.** Per 512-bit block: 8 × `WRS` (load H), 16 × `LDW` (message words),
64 × (`ROUND` with K_t, then `SCHED`), 8 × `RDS` and software addition. That
is 160 cycles. The working variables never leave the extension during the 64
rounds.

## AES arithmetic: the hardest part

**Doubling in GF(2⁸).** With the AES polynomial x⁸+x⁴+x³+x+1, multiplying
`b7..b0` by 2 is a left shift with `b7` XORed into bit positions 0, 1, 3 and
4. That is three XOR gates, because bit 0 takes `b7` directly. This is
`crypto_pkg::xtime`.

**One MixColumns element** (`aes_mixcol_elem`) computes
`2·a0 ⊕ 3·a1 ⊕ a2 ⊕ a3`. Since `3·a1 = 2·a1 ⊕ a1`, both doublings merge into
one: `xtime(a0 ⊕ a1) ⊕ a1 ⊕ a2 ⊕ a3`. Four copies, each fed the column
rotated by one more byte, give the whole column.

**Inverse for almost free** (`aes_mixcol`). The inverse matrix
`(0e 0b 0d 09)` equals the forward matrix `(02 03 01 01)` times the
circulant `(05 00 04 00)`. So decryption first applies
`s0 ^= u, s2 ^= u, s1 ^= v, s3 ^= v` with `u = 4·(s0⊕s2)` and `v = 4·(s1⊕s3)`.
It then runs the same forward multiplier. `u` and `v` are ANDed with the
inverse select, which takes 16 AND gates. In encryption mode they are zero and
the column passes through untouched.

**S-box** (`aes_sbox`, `aes_gf_inv`). Forward is the inverse in GF(2⁸)
followed by the affine map (`b ⊕ rotl1 ⊕ rotl2 ⊕ rotl3 ⊕ rotl4 ⊕ 0x63`).
Inverse is the inverse affine map (`rotl2 ⊕ rotl5 ⊕ rotl7 ⊕ 0x05`) followed
by the field inverse. One inverter serves both directions through two
multiplexers. The inverter computes x²⁵⁴ with four multiplications and seven
squarings (x², x³, x⁶, x¹², x¹⁵, x³⁰, x⁶⁰, x¹²⁰, x¹²⁶, x¹²⁷, x²⁵⁴), which
also maps 0 to 0. `aes_subshift` places four S-boxes behind a 4-way byte
rotator.

## DES S-box table

`des_sbox` holds the eight standard S-boxes as constant arrays of 64 four-bit
entries (2 Kbit in all). For each 6-bit group, the first and last bits choose
the row and the middle four bits choose the column. All eight lookups happen
in the same cycle. Synthesis may map the arrays to ROM or to logic.
`des_f` chains E, the key XOR, the table and P.

## SHA-256 special registers

`sha256_unit` holds `a..h` (`crypto_pkg::sha_state_t`) and `win[0..15]`.
`win[0]` is the oldest schedule word, which is W_t for the round being
computed. `LDW` and `SCHED` both shift the window by one. `LDW` inserts the
operand. `SCHED` inserts `σ1(win[14]) + win[9] + σ0(win[1]) + win[0]`
(`sha256_sched`), which is W_(t+16). Issuing `ROUND` then `SCHED` for
t = 0..63 therefore walks the schedule with 16 words of storage instead of 64.
An assertion flags two operations in the same cycle. In total the unit holds
768 flip-flops.

## Departures and choices

- **Processor core not included.** The extension is meant to sit inside a
  configurable commercial core, which is not part of this RTL. The top brings
  out the issue interface, and the testbench stands in for the core and its
  software.
- **DES instruction set.** The original has 11 permutation instructions plus
  the F function. It names IP, IP⁻¹, PC-1, PC-2 and the left circular shift.
  The remaining six here (shift by 2, right shifts by 1 and 2, E, P, half
  swap) are a guess at a complete set.
- **GF(2⁸) inverter.** The original uses a published compact inverter whose
  structure is not reproduced here. This design uses a plain power chain, so
  its gate count differs (the original quotes about 584 XOR and 280 AND gates
  for the four-byte SubBytes/ShiftRows unit).
- **MixColumns gate count.** The original quotes roughly 280 XOR and 16 AND
  gates. The 16 AND gates match the gating described above. The XOR count of
  this netlist depends on synthesis.
- **SHA-256.** K_t is passed as an operand rather than held in a ROM, and the
  final `H += a..h` is done in software. The original only says that special
  registers hold the working variables and the schedule.
- **Encoding and latency.** The opcode numbers, operand packing, 64/48-bit
  operand widths, one-cycle registered result and reset behaviour are this
  design's own choices.
- **Not covered.** The area (about 5–7 % of a 110 Kgate core) and clock
  (910 MHz) figures of the original belong to a vendor core and cell library.
  This RTL does not model or check them.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Expected values are either published test
vectors or come from reference code written separately inside the testbench:
bit-serial GF multiplication, brute-force inverses, integer cube and square
roots for the SHA-256 constants in `tb/sha_ref_pkg.sv`.

- `tb_crypto_ise`: full AES-128/192/256 encryption and decryption (FIPS-197
  appendix C), AES-128 key expansion (appendix A.1), two DES vectors both ways,
  3DES with one key and with three keys plus random round trips, and SHA-256 of
  `"abc"` and of the 56-byte two-block message. It checks the one-cycle latency
  of every instruction and the 160-cycle SHA-256 block. It fails if any opcode,
  MixColumns direction or SubBytes/ShiftRows rotation/direction is never used.
- Block tests: DES permutations against the classic worked example and inverse
  pairs; the S-box rows are checked to be permutations; the F function against
  two rounds of the worked example; exhaustive tests for the AES inverter and
  S-box; random tests against reference matrices for MixColumns; FIPS
  intermediate values for SHA-256.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/crypto_pkg.sv tb/sha_ref_pkg.sv \
  rtl/des_perm.sv rtl/des_sbox.sv rtl/des_f.sv \
  rtl/aes_mixcol_elem.sv rtl/aes_mixcol.sv rtl/aes_gf_inv.sv rtl/aes_sbox.sv rtl/aes_subshift.sv \
  rtl/sha256_round.sv rtl/sha256_sched.sv rtl/sha256_unit.sv rtl/crypto_ise.sv \
  tb/tb_crypto_ise.sv --top-module tb_crypto_ise -Mdir obj
./obj/Vtb_crypto_ise
```

For a single block, swap in its testbench and top-module name (`tb_<block>`).
Every run takes well under a second. The design has no size parameters. All
widths are fixed by the algorithms.

## Files

| File | Content |
|---|---|
| `rtl/crypto_pkg.sv` | opcodes, DES permutation selector, SHA state struct, `xtime`, `gf_mul`, `rotr32` |
| `rtl/crypto_ise.sv` | top: decode, result mux, result register |
| `rtl/des_perm.sv`, `rtl/des_sbox.sv`, `rtl/des_f.sv` | DES permutations, S-box table, F function |
| `rtl/aes_mixcol_elem.sv`, `rtl/aes_mixcol.sv` | MixColumns element and column (both directions) |
| `rtl/aes_gf_inv.sv`, `rtl/aes_sbox.sv`, `rtl/aes_subshift.sv` | field inverter, S-box, row unit |
| `rtl/sha256_round.sv`, `rtl/sha256_sched.sv`, `rtl/sha256_unit.sv` | round, schedule step, special registers |
| `tb/sha_ref_pkg.sv` | SHA-256 reference and computed constants for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
