# Dual AES / CLEFIA encryption core (32-bit rolled datapath)

AES and CLEFIA look very different on paper. AES is a
substitution–permutation network with ShiftRows and MixColumns. CLEFIA is a
four-branch generalised Feistel network with two F-functions. Both work on
128-bit blocks, though, and on a 32-bit datapath both rounds reduce to the
same operation: **four table lookups, one per byte, XORed together with one
more word**.

- An AES column is `T0[a] ^ T1[b] ^ T2[c] ^ T3[d] ^ roundkey`. Here a, b, c, d
  are the ShiftRows diagonal, and each T-table combines SubBytes with one
  column of MixColumns.
- A CLEFIA F-function is `Tb0[x0] ^ Tb1[x1] ^ Tb2[x2] ^ Tb3[x3]`. Here
  `x = input ^ roundkey`, and each T-box combines an S-box (S0 or S1) with one
  column of the diffusion matrix M0 or M1. The result is XORed into the
  target word of the Feistel step.

This core uses that common shape. The two ciphers share:

- one state shift register,
- two dual-port block-RAM ROMs that give four lookups per cycle,
- one round-key RAM,
- one XOR output stage.

Only the controller knows which cipher is running. The core targets FPGAs
with 36 Kb block RAMs (1024 × 32 bits per RAM, two ports), and only
encrypts.

| cipher | key | rounds | cycles per block |
|--------|-----|--------|------------------|
| AES    | 128 / 192 / 256 | 10 / 12 / 14 | 53 / 63 / 73 |
| CLEFIA | 128 / 192 / 256 | 18 / 22 / 26 | 42 / 50 / 58 |

A new block can start in the cycle in which the previous one finishes, so
these counts are also the throughput. At 352 MHz this is 0.85 Gbit/s for
AES-128 and 1.07 Gbit/s for CLEFIA-128. These are the figures published for
this architecture on a Virtex-5; the clock rate itself has not been verified
here.

## Datapath

```
            din ─┐                          ┌──────────────┐
                 ▼                          │ round_key_ram │◄── key write port
 ┌──────────┐ feed mux ──┐          key ────┤   128 x 32    │
 │  state   │            ▼                  └──────────────┘
 │  shift   │──► addr_gen ──► tbox_bram (even: bytes 0,2) ──┐
 │ register │      ▲     └──► tbox_bram (odd:  bytes 1,3) ──┤ q0..q3
 │ s0..s3   │      │fwd                                      ▼
 │ + fb0..2 │◄─────┴──────────────── res ◄──────────── out_stage
 └──────────┘                                (align + 6-input XOR)
```

One pass through the loop takes one cycle. The path runs from the registers,
through address formation, into the ROM address registers. The ROM output
register then feeds the output stage, and the result goes back into the
state register. A lookup issued in cycle *t* therefore comes out of the
output stage in cycle *t+1*.

### T-box ROMs (`tbox_bram`)

Each ROM is one 1024 × 32 block RAM holding four 256-word tables, selected by
the top two address bits:

| select | table | word for input byte x |
|--------|-------|-----------------------|
| 0 | AES T-table, column 0 | `{2s, s, s, 3s}`, s = AES S(x) |
| 1 | AES last round        | `{s, 0, 0, 0}` |
| 2 | CLEFIA F0, M0 column 0 | `{c, 2c, 4c, 6c}` |
| 3 | CLEFIA F1, M1 column 0 | `{c, 8c, 2c, Ac}` |

CLEFIA products are in GF(2^8) modulo x^8+x^4+x^3+x^2+1. AES products are
modulo x^8+x^4+x^3+x+1.

Only column-0 tables are stored, and both ports of a ROM read the same four
tables. That is how four lookups per cycle fit into two block RAMs. The word
for byte position p is recovered after the lookup:

- **AES:** `T_p` is `T_0` rotated right by p bytes.
- **CLEFIA:** column p of M0 and of M1 is column 0 with its bytes reordered,
  so that byte i comes from byte `i xor p`.

These two rules agree for positions 0 and 2. Positions 1 and 3 need one byte
select per cipher.

The CLEFIA S-box also depends on position. F0 uses S0, S1, S0, S1 and F1 uses
S1, S0, S1, S0, so positions of equal parity always use the same S-box. The
*even* ROM (positions 0 and 2) stores F0 with S0 and F1 with S1. The *odd* ROM
(positions 1 and 3) stores the opposite.

ROM contents are computed at elaboration time:

- **AES S-box:** inverse in GF(2^8) through log/antilog tables of generator 3,
  then the FIPS-197 affine map.
- **CLEFIA S0:** built from the cipher's four 4-bit S-boxes.
- **CLEFIA S1:** read from `rtl/clefia_s1.hex`, the 256-byte S1 table of the
  CLEFIA specification. In the specification S1 is `g(f(x)^-1)`, an affine map
  around an inversion in GF(2^8) modulo 0x11d. The file holds its values.

The path is relative, so simulate from the directory that contains `rtl/`, or
override `S1_FILE`.

A `clr` input zeroes a ROM output register, like the output reset of a block
RAM. The controller clears every lookup it does not need, so idle table words
add nothing in the output stage.

### Address formation (`addr_gen`)

- **AES:** address p is byte p of state word p. The state register rotates by
  one word per AES step, so these fixed taps always see the ShiftRows diagonal
  of the next column. No ShiftRows multiplexer is needed.
- **CLEFIA:** the round key is added *before* the S-boxes. The address is
  therefore byte p of `s0 ^ key` (F0) or of `s2 ^ key` (F1).

### Output stage (`out_stage`)

`res = align(q0) ^ align(q1) ^ align(q2) ^ align(q3) ^ (key_en ? key : 0) ^ feed`.
That is at most six XOR inputs per bit, one 6-input LUT. It does three jobs:

| when | result |
|------|--------|
| AES round | T-boxes ^ round key |
| CLEFIA round | T-boxes ^ Feistel target word |
| loading | plaintext ^ whitening key (T-boxes read zero) |

The byte select for positions 1 and 3 comes in front of the XOR.

### State shift register (`state_shift_reg`)

Four 32-bit words, `s0` at the head, plus a three-word AES feedback register
`fb0..fb2`. The controller picks one operation per cycle:

| op | effect | used for |
|----|--------|----------|
| `SR_LOAD` | `{s1,s2,s3,res}` | loading plaintext |
| `SR_LOAD_FWD` | `{s2,s3,res,s1}` | last AES load word, loaded and rotated at once |
| `SR_ROT` | `{s1,s2,s3,s0}` | AES step |
| `SR_REFILL` | `{fb0,fb1,fb2,res}` | AES round end |
| `SR_SWAP` | `{res,s2,s3,s0}` | CLEFIA Feistel word swap |
| `SR_W1/2/3` | overwrite one word | CLEFIA last round and output whitening |

The feedback register is needed because an AES round reads every old column
until its last step, while new columns are already coming out.

## Schedule (`dual_cipher_ctrl`)

Cycle 0 is the cycle in which `start` is accepted. Key reads go out one cycle
before the key is used, because the key RAM is synchronous.

### Loading (cycles 0–3, both ciphers)

P0..P3 arrive on `din` in cycles 0..3 and pass through the output stage into
the shift register.

- **AES:** each word is XORed with the whitening key w0..w3.
- **CLEFIA:** P1 is XORed with WK0 and P3 with WK1.

### AES: five cycles per round

| phase | lookup issued | output stage | register |
|-------|---------------|--------------|----------|
| 0 | column 0 | – | rotate |
| 1 | column 1 | new column 0 ^ w[4r+0] → fb | rotate |
| 2 | column 2 | new column 1 ^ w[4r+1] → fb | rotate |
| 3 | column 3 | new column 2 ^ w[4r+2] → fb | rotate |
| 4 | – | new column 3 ^ w[4r+3] | refill |

The next round's first column depends on all four new columns, so the fifth
cycle cannot be hidden without a path from the ROM output straight back into
the ROM address.

There is one exception. Phase 0 of round 1 runs in load cycle 3. The
whitened P3 is *forwarded* to the address of its byte (`ADDR_AES_FWD`) before
it reaches the register. This gives 3 + 5·Nr cycles: 53 for AES-128. The last
round uses the S-box table instead of the T-table.

### CLEFIA: two cycles per round, starting in cycle 4

| half | lookup issued | output stage | register |
|------|---------------|--------------|----------|
| A | F0 on `s0 ^ RK(2i)` | previous F1 result ^ s2 | write s2 (not in round 1) |
| B | F1 on `s2 ^ RK(2i+1)` | F0 result ^ s1 | word swap `{res,s2,s3,s0}` (last round: write s1) |

This is GFN4 with its word rotation built into the register move. Each F
result lands one cycle after its lookup, so the next F0 input, which is the
word just written, is always ready.

Two cycles close the block:

- F1 result ^ s3 ^ WK3 into s3,
- then s1 ^ WK2 into s1.

This gives 4 + 2r + 2 cycles: 42 for CLEFIA-128.

## Interface (`dual_cipher_core`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | start a block; accepted only while `ready` |
| `cipher` | in | 1 | 0 = AES, 1 = CLEFIA; sampled with `start` |
| `key_len` | in | 2 | 0/1/2 = 128/192/256-bit key; 3 runs as 256 |
| `din` | in | 32 | P0 with `start`, then P1, P2, P3 in the next three cycles |
| `ready` | out | 1 | idle (also high in the `done` cycle) |
| `done` | out | 1 | one-cycle pulse; `dout` holds the ciphertext |
| `dout` | out | 128 | state words, word 0 in bits 127:96; valid in the `done` cycle |
| `key_we`, `key_waddr`, `key_wdata` | in | 1, 7, 32 | round-key RAM write port; use only while `ready` (asserted) |

Blocks are big-endian: word 0 holds bytes 0..3 of the block, which are AES
state column 0 and CLEFIA P0. `start` pulses while busy are ignored. `dout`
changes once the next block starts loading, so capture it at `done`.

### Round keys

The core has no key expansion. The host expands the key once and writes the
words with the round-key RAM write port:

| address | content |
|---------|---------|
| 0 … 4(Nr+1)−1 | AES expanded key w[0..] (FIPS-197 order) |
| 64 … 67 | CLEFIA WK0..WK3 |
| 68 … 68+2r−1 | CLEFIA RK0..RK(2r−1) |

Each cipher has its own region, so both key sets can be resident and the core
can switch cipher block by block. The key length is chosen per block with
`key_len` and must match the keys stored. `CLEFIA_KEY_BASE` and `KEY_DEPTH`
are parameters.

## How far it can be trusted

- **Functional correctness** is checked against published known-answer
  vectors (FIPS-197 appendix C for AES-128/192/256, and the CLEFIA-128 vector
  of its specification). It is also checked against independent reference
  models on random traffic, for all key lengths, with random back-to-back
  cipher switching.
- **Cycle counts** (53/42 and the longer-key ones) are checked block by block.
- **Not verified:** clock frequency, area and logic depth. The architecture
  was reported at 123 Virtex-5 slices plus 3 block RAMs (about 160 LUTs),
  352 MHz, and two LUT levels on the critical path. This RTL keeps the same
  resources in kind: two T-box RAMs, one key RAM, about 240 flip-flops and a
  small controller. Its LUT count and timing depend on the synthesis tool and
  have not been measured.

### Where this RTL makes its own choices

The architecture is known from a summary of its techniques and its results:

- state shift register shared by both ciphers,
- initial whitening keys,
- BRAM-based T-boxes,
- feedback and forwarding,
- CLEFIA round-key handling and word swap,
- reduced LUT6 output stage.

Everything below is this design's own, and was chosen to meet the published
cycle counts:

- The cycle schedule, the register moves and the load forwarding.
  128 × 352 MHz / 0.85 Gbit/s = 53 cycles for AES, and
  128 × 352 MHz / 1.073 Gbit/s = 42 cycles for CLEFIA, both met exactly.
- The ROM table layout and the byte alignment after the lookup. The last AES
  round uses its own S-box table slot rather than extracting S-box bytes from
  the T-table.
- The 32-bit input / 128-bit output interface, the handshake, the key RAM
  depth and its layout.

### Not included

- **Decryption.** Neither cipher's decryption is built.
- **Key expansion.** AES and CLEFIA key schedules run outside the core.

## Files

| file | content |
|------|---------|
| `rtl/cipher_pkg.sv` | shared enums, control struct, round counts, table functions |
| `rtl/dual_cipher_core.sv` | top level |
| `rtl/dual_cipher_ctrl.sv` | schedule / FSM |
| `rtl/state_shift_reg.sv` | state and AES feedback registers |
| `rtl/addr_gen.sv` | T-box address formation |
| `rtl/tbox_bram.sv` | dual-port T-box ROM (instantiated twice) |
| `rtl/out_stage.sv` | byte alignment and XOR output stage |
| `rtl/round_key_ram.sv` | round-key RAM |
| `rtl/clefia_s1.hex` | CLEFIA S1 S-box, 256 bytes |
| `tb/cipher_ref_pkg.sv` | reference AES (with key expansion) and CLEFIA (with 128-bit key schedule) models |
| `tb/*_tb.sv` | one self-checking testbench per module; `dual_cipher_core_tb` is the end-to-end test at default parameters |
| `tb/dual_cipher_throughput_tb.sv` | streams 64 AES-128 and 64 CLEFIA-128 blocks back to back and checks the sustained 53 / 42 cycles per block |

## Simulating

From the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cipher_pkg.sv tb/cipher_ref_pkg.sv tb/dual_cipher_core_tb.sv \
  --top-module dual_cipher_core_tb -o sim
./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M`. The end-to-end
bench runs about 80 blocks in well under a second. It also prints how often
each mechanism occurred:

- load forwarding,
- AES refill,
- AES last round,
- CLEFIA swap,
- CLEFIA output whitening,
- back-to-back start,
- cipher switch,
- key reload,
- ignored start.

The other benches (`tbox_bram_tb`, `round_key_ram_tb`, `state_shift_reg_tb`,
`addr_gen_tb`, `out_stage_tb`, `dual_cipher_ctrl_tb`, `dual_cipher_throughput_tb`)
build the same way with their own top module.

## Changing it

- **Different key RAM size or layout:** set `KEY_DEPTH` and `CLEFIA_KEY_BASE`
  on `dual_cipher_core`. The controller computes all key addresses from
  `CLEFIA_KEY_BASE`.
- **Targets without 36 Kb RAMs:** each `tbox_bram` can be split into four
  256 × 32 ROMs. The table select is the top two address bits.
- **Adding a cipher** that fits the same lookup-and-XOR shape means adding
  tables (the ROMs are full at four), an alignment rule in `out_stage`, and a
  schedule branch in `dual_cipher_ctrl`.
