# Fault-tolerant AES-128 with a composite-field S-box

This is an AES-128 encryption engine for on-board use in satellites. Radiation there flips single
bits in the logic (single event upsets). The design adds two things to a plain iterative AES core:

* **A composite-field S-box.** SubBytes is computed with logic instead of a 256-entry table. The
  byte is mapped into the tower field GF(((2^2)^2)^2) and inverted there, and the S-box is built
  from that inversion. The same hardware also gives the inverse S-box.
* **Concurrent Hamming (12,8) error correction.** Every byte that leaves SubBytes or MixColumns
  in an encryption round is checked against 4 Hamming check bits. These bits are *predicted* from
  the round input through small precomputed tables, so they do not depend on the datapath being
  checked. A single flipped bit per byte is found and flipped back in the same clock. Encryption
  goes on without a stall.

The engine runs blocks either one at a time (encrypt or decrypt) or in output feedback (OFB)
mode. OFB suits a noisy downlink: a corrupted ciphertext bit damages only the same bit of the
recovered plaintext.

## Structure

```
aes_ft_top
 ├─ key_expansion      key schedule: 11 round keys in a register array, 4 S-boxes
 ├─ ofb_mode           request front end: ENC / DEC / OFB IV load / OFB data
 └─ aes_core           state register, round counter, fault-injection decode
     └─ aes_round      one combinational round (encryption or inverse)
         ├─ sub_bytes        16 x cfa_sbox ── gf16_inv
         ├─ hamming_predict  16 x hamming_pred_rom, plus the MixColumns prediction
         ├─ ecc_correct      (48 instances) ── hamming_gen
         ├─ shift_rows
         └─ mix_columns
```

`aes_pkg` holds the shared types (`block_t`, `checks_t`, `op_e`, `fault_stage_e`), the field
constants and the small arithmetic functions.

Byte order follows FIPS-197 throughout. Byte n of a 128-bit block is at bits `[127-8n -: 8]`, and
state element s[r][c] is byte n = r + 4c, so the block fills the state column by column. The
check-bit matrix uses the same layout with 4-bit elements: byte n's bits are at `[63-4n -: 4]`.

## The composite-field S-box (`cfa_sbox`, `gf16_inv`)

SubBytes is S(a) = A·a⁻¹ + 63, where a⁻¹ is the inverse in GF(2^8) modulo x^8+x^4+x^3+x+1. That
inverse is the expensive part. The field is rebuilt as a tower of quadratic extensions:

| level      | built over | irreducible polynomial | constant used here |
|------------|------------|------------------------|--------------------|
| GF(2^2)    | GF(2)      | x^2 + x + 1            | –                  |
| GF(2^4)    | GF(2^2)    | x^2 + x + Φ            | Φ = `2'b11`        |
| GF(2^8)    | GF(2^4)    | x^2 + x + λ            | λ = `4'b1000`      |

An element of the top field is S_h·x + S_l, with S_h and S_l in GF(2^4). Its inverse is

    (S_h x + S_l)^-1 = S_h·Θ·x + (S_h + S_l)·Θ,     Θ = (S_h²·λ + S_h·S_l + S_l²)^-1

So one inverse in GF(2^8) becomes a few GF(2^4) multiplications, one squaring, one
multiplication by the constant λ, and one inverse in GF(2^4). `gf16_inv` computes that last
inverse with the same identity one level down. At that level the GF(2^2) inverse is just a
squaring, which costs nothing but wiring. Zero maps to zero without any special case.

**Isomorphic mapping.** An 8×8 bit matrix δ moves a byte from the AES representation into the
tower field, and δ⁻¹ moves it back. δ sends the AES generator x to a root of x^8+x^4+x^3+x+1 in
the tower field. There are 8 such roots, so each (Φ, λ) pair allows 8 mappings. There are 2
choices of Φ and 8 of λ, giving 16 constructions and 128 candidates in all. The one used here has
the fewest ones in δ plus (A·δ⁻¹), a simple proxy for XOR count: Φ = 3, λ = 8, and x maps to
`8'h5A`. The matrices are stored in `aes_pkg` as eight row masks each: output bit i is the parity
of `row[i] & input`.

* Forward S-box: `MAP_FWD` (δ), invert, then `MAP_INV_AFF` (A·δ⁻¹) and XOR `8'h63`. The
  affine transform is merged into the inverse mapping, so it costs no extra level.
* Inverse S-box: `MAP_AFF_INV` (δ·A⁻¹), XOR `8'h69` (this is δ(05)), invert, then `MAP_INV`
  (δ⁻¹).

With `dec` the same inverter serves both directions, behind 2:1 multiplexers. The S-box is
purely combinational. A different field or mapping only needs new constants in `aes_pkg`. The
testbench `tb_cfa_sbox` checks all 256 inputs in both directions, so any replacement can be
tested at once.

## Hamming prediction and correction

### The code

Each byte b7..b0 has four check bits:

    p3 = b7^b6^b4^b3^b1    p2 = b7^b5^b4^b2^b1    p1 = b6^b5^b4^b0    p0 = b3^b2^b1^b0

Each data bit has its own check-bit pattern with at least two ones. Each check bit alone has a
pattern with a single one. So any one flipped bit out of the 12 gives a distinct syndrome.

### Predicting the check bits

The code is linear, h(u ^ v) = h(u) ^ h(v). For the S-box output byte s = S[a] of an input byte a,
three tables of 256 entries give:

    hRD[a]  = h(S[a])      h2RD[a] = h(02·S[a])     h3RD[a] = h(03·S[a])

These tables are enough to predict every check bit of an encryption round from the round input a
alone:

* **SubBytes:** the check bits of byte n are hRD[a_n].
* **ShiftRows:** the same 4-bit values, permuted exactly like the data. `shift_rows` has a width
  parameter for this, and is reused with W = 4.
* **MixColumns:** each output byte is an XOR of 02·s, 03·s and s terms, so its check bits are
  the XOR of the matching table entries. Let a'_{i,j} be the input byte that ends up in row i,
  column j after ShiftRows. Then

      h0,j = h2RD[a'0,j] ^ h3RD[a'1,j] ^ hRD[a'2,j]  ^ hRD[a'3,j]
      h1,j = hRD[a'0,j]  ^ h2RD[a'1,j] ^ h3RD[a'2,j] ^ hRD[a'3,j]
      h2,j = hRD[a'0,j]  ^ hRD[a'1,j]  ^ h2RD[a'2,j] ^ h3RD[a'3,j]
      h3,j = h3RD[a'0,j] ^ hRD[a'1,j]  ^ hRD[a'2,j]  ^ h2RD[a'3,j]

`hamming_pred_rom` holds the three tables as one 256 × 12-bit constant. The constant is computed
at elaboration from the S-box's textbook definition, using exponent and logarithm tables over
the generator 03 and then the affine transform. It does not use the composite-field hardware, so
a fault in an S-box cannot also corrupt its own prediction. In synthesis it becomes a ROM (or
logic). `hamming_predict` reads 16 copies of it in parallel.

### Correcting

`ecc_correct` computes the check bits of the byte that actually came out and XORs them with the
prediction to get the syndrome:

| syndrome                         | meaning                     | action                          |
|----------------------------------|-----------------------------|---------------------------------|
| 0                                | no fault                    | pass                            |
| pattern of data bit i            | bit i flipped               | flip bit i, raise `corrected`   |
| single one                       | a check bit was hit         | pass the data unchanged         |
| `0111`, `1011`, `1111`           | more than one bit flipped   | pass, raise `uncorrectable`     |

Note that a double fault whose syndrome happens to equal a data-bit pattern is miscorrected. That
is a limit of any single-error-correcting code.

### Where the checks sit in a round (`aes_round`)

```
enc:  state ─ SubBytes ─⊕fault_sb─ correct(hRD) ─ ShiftRows ─ MixColumns ─⊕fault_mc─ correct(Eq. h*,j) ─⊕ key
last: state ─ SubBytes ─⊕fault_sb─ correct(hRD) ─ ShiftRows ─ check(rotated hRD) ─⊕ key
dec:  state ─ InvSubBytes ─ InvShiftRows ─⊕ key ─ InvMixColumns (skipped in the last round)
```

Substitution and byte permutation commute. So decryption uses the same S-boxes (in inverse mode)
and then the same `shift_rows` block, and both directions share one `mix_columns` block.

What is **not** protected:

* AddRoundKey is not checked.
* The key schedule is not checked.
* The state register is not checked between rounds.
* Decryption rounds have no correction, because there are no prediction tables for InvSubBytes
  or InvMixColumns. `ecc_correct` is disabled there (`en = 0`).
* The prediction tables are assumed to be fault-free. In a flight system they would be guarded
  by scrubbing, which is not modelled here.

## Timing

`aes_core` takes one round per clock:

| clock edge | action |
|------------|--------|
| t (start accepted) | state ← input ⊕ round key 0 (round key 10 when decrypting) |
| t+1 … t+10 | rounds 1 … 10 through `aes_round`; round 10 skips MixColumns |
| after t+10 | `done` is high for one clock and `dout` holds the result |

This gives **11 clocks per block**. A new start is accepted in the `done` clock, so blocks run
back to back at that rate, and so do OFB blocks: the next feedback value is forwarded straight
from the core output. Correction adds no clocks, because it sits inside the combinational round.
At 11 clocks per 128 bits, a rate of 4.4 Gbit/s needs a clock of about 378 MHz. Nothing here sets
or checks the clock frequency. The critical path is one full round: S-box, correction,
MixColumns, correction and key XOR.

`key_expansion` makes one round key per clock: RotWord, SubWord through four `cfa_sbox`, and Rcon,
with RC doubling in GF(2^8). `key_ready` is low for 10 clocks after `key_load`. Round keys are
held in an 11 × 128-bit register array, read asynchronously by index, which lets decryption walk
them backwards.

## Top-level interface (`aes_ft_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_load`, `key` | in | 1, 128 | start key expansion (only while no block is in flight; an assertion checks this) |
| `key_ready` | out | 1 | round keys are valid |
| `in_valid`, `in_ready` | in/out | 1 | request handshake; `in_ready` is low during key expansion and while a block runs |
| `in_op` | in | `op_e` | `OP_ENC`, `OP_DEC`, `OP_OFB_IV` (loads the feedback register, no response), `OP_OFB_DATA` |
| `in_data` | in | 128 | block, or the IV |
| `out_valid`, `out_data` | out | 1, 128 | one-clock result pulse (there is no back-pressure) |
| `fault_en`, `fault_stage`, `fault_round`, `fault_byte`, `fault_bit` | in | 1,1,4,4,3 | flip one bit of the next accepted block, after SubBytes or MixColumns of the given round |
| `corr_count`, `uncorr_count` | out | 16 | rounds with a correction / with an uncorrectable syndrome |

OFB works as O₁ = E_K(IV), Oᵢ = E_K(Oᵢ₋₁), outᵢ = inᵢ ⊕ Oᵢ. The same operation encrypts and
decrypts, so decryption is: load the same IV and send the ciphertext as `OP_OFB_DATA`.

The fault-injection ports exist to show the correction working in simulation. A flight build
would tie `fault_en` low.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare against `aes_ref_pkg`, a
reference model written straight from the AES definition: the S-box is computed from a^254 and
the affine transform, and the model has its own key schedule, cipher, inverse cipher and
check-bit matrix. Each testbench ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_gf16_inv`, `tb_cfa_sbox` | all inputs; S(95) = 2A and back |
| `tb_sub_bytes`, `tb_shift_rows`, `tb_mix_columns` | random states, both directions; MixColumns example column 87 6E 46 A6 → 47 and the FIPS-197 column |
| `tb_hamming_gen`, `tb_ecc_correct` | all bytes; every single data-bit and check-bit fault; uncorrectable double faults |
| `tb_hamming_pred_rom`, `tb_hamming_predict` | all table entries; the predictions match check bits computed from the reference round |
| `tb_aes_round` | random rounds; a bit flip at many positions after SubBytes / MixColumns is corrected |
| `tb_key_expansion` | FIPS-197 schedule, random keys, 10-clock busy time |
| `tb_aes_core` | FIPS-197 C.1 vector, random encrypt/decrypt, 11-clock latency, back-to-back, an upset in every round |
| `tb_ofb_mode` | NIST SP 800-38A OFB-AES128 vectors against a behavioural cipher |
| `tb_aes_ft_top` | the whole engine at its default configuration (see below) |

`tb_aes_ft_top` runs the whole engine. It loads a key with a request already waiting, runs the
FIPS vector and the SP 800-38A OFB vectors back to back, decrypts in OFB, reloads the key, runs
random blocks, and injects upsets in every round and stage, including during OFB. It counts each
mechanism: key stall, encrypt, decrypt, IV load, OFB data, back-to-back accept, SubBytes
correction, MixColumns correction, last-round correction and key reload. It fails if any of them
never happens.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_ft_top \
  -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_ft_top.sv
./obj_dir/Vtb_aes_ft_top
```

Replace the top module and file name to run another testbench. The ones that do not use the
reference package still need `rtl/aes_pkg.sv` first. Every testbench finishes in well under a
second.

## Design choices and limits

* Only AES-128 (4-word key, 44-word schedule, 10 rounds). AES-192 and AES-256 would need a
  longer key schedule and round counter.
* The field constants Φ, λ and the mapping come from the area-proxy search above. Any of the
  other 127 candidates would also be correct.
* This is an iterative architecture with one round per clock. A pipelined or unrolled version
  would raise throughput at a large cost in area.
* These are this design's own choices: the correction of the last-round ShiftRows check, the
  handling of check-bit faults and uncorrectable syndromes, the handshakes, the reset, and the
  fault-injection and counter ports.
* The MixColumns equations follow the standard circulant matrix [02 03 01 01].
* After synthesis the whole engine is roughly 6.6 k word-level cells and 1.9 k flip-flop bits;
  most of the flip-flops are the round-key array.
