# AES-256 encryption/decryption engine with composite-field S-boxes and on-the-fly round keys

This is a fully unrolled, pipelined AES-256 engine. One engine both encrypts and
decrypts. It takes a new 128-bit block every clock, in either direction, and returns
it 29 clocks later.

Three ideas keep it small and fast:

* **Composite-field S-boxes.** There are no 256-entry lookup tables. Every S-box
  computes the GF(2^8) inverse in the tower field GF(((2^2)^2)^2), which needs only
  small XOR/AND networks. A pipeline register sits inside each S-box (the
  "sub-pipeline"), so a round takes two short clock cycles instead of one long one.
* **One datapath for both directions.** SubBytes and InvSubBytes share the field
  inverter. ShiftRows and InvShiftRows share one shift network, and MixColumns and
  InvMixColumns share one column unit. A mode bit steers the multiplexers. That bit
  travels with each block, so blocks of both directions can follow each other clock
  by clock.
* **Round keys made on the fly.** No table of 15 round keys is kept. Each block
  carries a pair of round keys down the pipeline, and every round stage derives the
  next pair. The schedule runs forwards for encryption and backwards for
  decryption. Key expansion therefore runs in parallel with the cipher and never
  stalls the data.

Beside the cipher, the top level also holds an 8-bit unsigned multiplier built on
the Vedic "Nikhilam" rule with Kogge-Stone adders (see the Nikhilam multiplier
section).

## Pipeline structure

```
 in_data ──► [ARK: K0 or K14] ─► round 1 ─► round 2 ─► ... ─► round 14 (no MixColumns) ─► out_data
 key pair ─► (K0,K1) or (K14,K13) ─► step ─► step ─► ...   ─► (dropped)
              1 clock             2 clocks each (S-box register + round register)
```

* **Input stage.** Registers `in_data ^ first key`, the mode bit and the starting
  key pair. Encryption starts with the pair (K0,K1) and the first key K0.
  Decryption starts with (K14,K13) and the first key K14.
* **`aes_round` stages (14 of them).** Each applies its round to the state using the
  second key of the pair it receives. At the same time it computes the pair for the
  next stage.
* **Latency.** 1 + 14 × 2 = 29 clocks. Throughput is one 128-bit block per clock.
  At one block per clock, 35 Gbit/s needs a 273 MHz clock.
  With `PIPE = 0` the S-box registers disappear and the latency is 15 clocks.

## The composite-field S-box

The AES S-box is `affine(x^-1)` in GF(2^8), and the inverse S-box is
`(invaffine(x))^-1`. Only the inverse is hard. It is computed in a tower of fields:

| field | built as | reduction polynomial |
|---|---|---|
| GF(2^2) | GF(2)[x] | x^2 + x + 1 |
| GF(2^4) | GF(2^2)[x] | x^2 + x + φ, φ = {10} |
| GF(2^8) | GF(2^4)[y] | y^2 + y + λ, λ = {1100} |

1. **Into the tower (`iso_map`).** An 8×8 GF(2) matrix δ maps a byte from AES's
   polynomial basis into the tower. This linear map preserves both + and ×. The
   byte becomes qH·y + qL with qH, qL in GF(2^4).
2. **Reduce to GF(2^4).** For y^2 = y + λ:
   `(qH·y + qL)^-1 = qH·d^-1 · y + (qH ⊕ qL)·d^-1`, where `d = λ·qH^2 ⊕ qL·(qH ⊕ qL)`.
   So one GF(2^4) inverse replaces the GF(2^8) inverse. The rest of the work is
   one squarer (`gf4_square`), one λ multiplier (`gf4_mul_lambda`) and three GF(2^4)
   multipliers (`gf4_mul`).
3. **GF(2^4) pieces.**
   * Squaring is linear: k3=q3, k2=q3⊕q2, k1=q2⊕q1, k0=q3⊕q1⊕q0.
   * Multiplying by λ: k3=q2⊕q0, k2=q3⊕q2⊕q1⊕q0, k1=q3, k0=q2.
   * The GF(2^4) multiplier uses four GF(2^2) multipliers (`gf2_mul`) plus a
     multiplication by φ (`gf2_mul_phi`).
   * Multiplying by φ: k1 = q1⊕q0 and k0 = q1, because (q1x+q0)·x = (q1⊕q0)x + q1.
   * The GF(2^4) inverse (`gf4_inv`) is four sum-of-products equations, listed in
     its source file. Every one of these equations was checked exhaustively against
     plain polynomial arithmetic.
4. **Back out (`inv_iso_map`)** with δ^-1.
5. **`aes_sbox` wraps the inverter in two multiplexers.** In front it chooses x
   (SubBytes) or invaffine(x) (InvSubBytes). Behind it, it chooses affine(inverse)
   or the inverse itself.

**Pipeline register.** With `PIPE = 1`, `gf8_inv` has a 12-bit register right after
the GF(2^4) inverter. It holds qH, qH⊕qL and d^-1. Roughly half of the S-box logic
lies on each side of the register. The mode bit is delayed alongside it, so the
output multiplexer uses the mode of the byte being output.

The δ matrix used (rows are output bits 7..0; each row lists the input bits XORed):

```
a7 = q7^q5                 a3 = q7^q6^q2^q1
a6 = q7^q6^q4^q3^q2^q1     a2 = q7^q4^q3^q2^q1
a5 = q7^q5^q3^q2           a1 = q6^q4^q1
a4 = q7^q5^q3^q2^q1        a0 = q6^q1^q0
```

## Round keys on the fly, in both directions

AES-256 expands the 8-word key into 60 words w[0..59]. Round key Kr is
w[4r..4r+3]. Words are derived from the one eight places back:
`w[i] = w[i-8] ^ temp(w[i-1])`, where temp is:

* `SubWord(RotWord(w)) ^ Rcon` when i mod 8 = 0;
* `SubWord(w)` when i mod 8 = 4;
* `w` itself otherwise.

`key_expand_step` takes a pair (ka, kb) of consecutive round keys and returns
(kb, new). Both directions apply temp to the same word, the last word B3 of kb:

* **Forwards.** Round r receives (K(r-1), K(r)) and makes K(r+1):
  N0 = A0⊕t, N1 = A0⊕A1⊕t, N2 = A0⊕A1⊕A2⊕t, N3 = A0⊕…⊕A3⊕t.
  The prefix XORs of A are formed at the same time as the four S-boxes, so the
  critical path is one S-box plus one XOR, not a chain of four XORs.
* **Backwards.** Decryption round j receives (K(15-j), K(14-j)) and makes K(13-j),
  from `w[i-8] = w[i] ^ temp(w[i-1])`:
  N0 = A0⊕t, N1 = A1⊕A0, N2 = A2⊕A1, N3 = A3⊕A2.
* **Which temp and Rcon.** For an odd round index the step uses RotWord and Rcon;
  for an even index it uses SubWord only, in both directions. The Rcon index is
  (r+1)/2 forwards and (15-j)/2 backwards.

The backward walk has to start from the last two round keys. `key_setup` finds them
once per cipher key: after `key_load` it runs the forward step 13 times, one per
clock, and stores (K14, K13). That makes 512 bits of key storage in total
(`enc_key`, `dec_key`), instead of 15 × 128.

Blocks carry their own key pair. A new key can therefore be loaded while blocks
under the old key are still in the pipeline, and they finish correctly.

## The integrated round (`aes_round`)

| direction | order |
|---|---|
| encryption | SubBytes → ShiftRows → MixColumns → AddRoundKey |
| decryption | InvSubBytes → InvShiftRows → AddRoundKey → InvMixColumns |

ShiftRows is a byte permutation and SubBytes works byte by byte, so the two commute.
Both directions therefore use the same front end: the 16 `aes_sbox`es, then
`shift_rows`. A single `mix_columns` unit follows. For encryption it is fed
the shifted state and the key is XORed afterwards. For decryption it is fed the
shifted state XORed with the key. `LAST = 1` builds round 14, where MixColumns is
skipped.

The state layout is the FIPS-197 one: byte 0 is bits [127:120], and the bytes fill
the 4×4 state column by column. `mix_columns` builds the constant multiplications
from `xtime` and XOR, for all four columns at once.

## Interface of `aes256_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset (clears valid bits and key_busy) |
| key_load, key | in | 1, 256 | load a new cipher key |
| key_busy | out | 1 | key setup running (13 clocks after key_load) |
| in_valid, in_ready | in/out | 1 | block handshake; a block is taken when both are high |
| enc_dec | in | 1 | 1 = encrypt, 0 = decrypt |
| in_data | in | 128 | plaintext or ciphertext |
| out_valid, out_enc_dec, out_data | out | 1, 1, 128 | result, its direction; in order, 29 clocks after acceptance |
| mul_a, mul_b, mul_p | in/out | 8, 8, 16 | Nikhilam multiplier |

* `in_ready` is low while `key_busy` is high. A block accepted in the same clock as
  `key_load` still uses the previous key.
* Results cannot be stalled: the pipeline has no back-pressure.
* Before the first `key_load`, the key registers hold no defined key.

Two concurrent assertions in `aes256_top` state the timing contract. An accepted
block appears on the output exactly 29 clocks later, and a completed key setup has
been busy for 13 clocks.

Parameter: `PIPE` (default 1) sets the sub-pipeline register in every S-box.

## The Nikhilam multiplier (`nikhilam_mult`, `ksa_adder`)

This multiplier uses the Nikhilam rule with base B = 2^N (default N = 8). Write the
complements from the base: a' = B − a and b' = B − b. Then

```
a · b = (a − b') · B + a' · b'
```

* Multiplying by B is only a shift.
* Every addition uses a Kogge-Stone parallel-prefix adder. That covers the two
  complements, the signed cross difference a − b', the accumulation of the
  partial products of a'·b', and the final sum.
* The complements need N+1 bits (a = 0 gives a' = B).
* The cross term is signed, in N+2 bits.

It is combinational and is exhaustively verified for N = 8. Its only connection in
`aes256_top` is to its own ports (see the next section).

## How far this follows the published design, and where it departs

These points follow the published design:

* the AES-256 cipher and the integrated encryption/decryption datapath selected by
  a multiplexer;
* the tower-field polynomials and the constants φ = {10} and λ = {1100};
* the squaring, λ-multiplication, GF(2^4) multiplication and inversion equations;
* the row rotations of ShiftRows and its inverse;
* the on-the-fly round keys;
* pipelining inside the S-box;
* the Nikhilam multiplier with Kogge-Stone adders.

These points are this design's own choices:

* **Unrolled rounds.** The overall organisation (a 14-stage unrolled pipeline with
  one block per clock) is inferred from the quoted throughput. No iterative variant
  is provided.
* **Unspecified contents.**
  * The entries of δ and δ^-1 are not specified. A standard matrix for these
    polynomials is used, and the tests check that it is a field isomorphism.
  * The affine maps and the MixColumns matrices are the standard AES ones.
* **Register placement.** Where the S-box register sits is not specified; it is
  after the GF(2^4) inverse.
* **Backward schedule and key setup.** Generating decryption keys by running the
  schedule backwards, and the 13-clock key setup that precedes it, are this
  design's own method.
* **Separate key S-boxes.** The key schedule has its own S-boxes: four per round
  stage, always in the forward direction. It does not borrow S-boxes from the round
  datapath. The published description mentions S-box traffic between the round unit
  and the key-expansion unit without defining it.
* **Nikhilam multiplier is not in the cipher.** The published design says its
  multiplier replaces a conventional one, but does not say where. AES needs only
  carry-free GF(2^8) products, which an integer multiplier cannot compute, so the
  multiplier stands alone in the top with its own ports. Its width (8 bits) is an
  assumption.
* **GF(2^4) equations.** The φ multiplier uses k0 = q1, and the GF(2^4) inverse
  uses q3q1q0 in the q1^-1 equation. Both are the forms that give a correct field.
  Each was checked over every input.
* **Key sizes.** Only 256-bit keys are supported. 128- and 192-bit keys, with 10 and
  12 rounds, would need a different schedule and round count.
* **Handshake and reset.** The handshake, the reset behaviour and the `enc_dec`
  polarity (1 = encrypt) are this design's choices.
* **Unchecked figures.** The published performance figures (35 Gbit/s, 2120 slices,
  a latency of 0.41 in unstated units) have not been checked on an FPGA. Reaching
  35 Gbit/s would need a 273 MHz clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs. The
reference models live in `tb/aes_ref_pkg.sv` and are written independently of the
RTL:

* shift-and-add field products;
* field inverses found by exhaustive search;
* the S-box built from the rotation form of the affine map;
* a textbook byte-oriented AES-256 with the full 60-word key expansion.

What the tests cover:

* **Field arithmetic.** Every GF(2^2)/GF(2^4) unit, the affine maps, `gf8_inv`,
  `aes_sbox` and `nikhilam_mult` (N = 8) are tested exhaustively.
* **δ and δ^-1.** Checked as field isomorphisms: δ(a·b) = δ(a)·δ(b) in the tower.
* **Key schedule.** The key step and key setup are checked against the full key
  expansion, in both directions and for every round index.
* **`tb_aes256_top`.** Runs the whole engine at its default parameters:
  * the FIPS-197 Appendix C.3 vector: key 000102…1f, plaintext 00112233…eeff,
    ciphertext 8ea2b7ca516745bfeafc49904b496089, and back;
  * a few hundred random blocks of random direction, with back-to-back runs, gaps,
    and key reloads while blocks are in flight;
  * every result against the reference model, and the 29-clock latency of every
    block.

To run a testbench with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing -Irtl -Itb --top-module tb_aes256_top \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes256_top.sv rtl/*.sv -o sim
./obj_dir/sim
```

Replace `tb_aes256_top` with any other `tb_*` module. The full engine takes a few
minutes to compile and well under a second to simulate.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | shared types, state byte indexing, Rcon |
| `rtl/gf2_mul.sv`, `gf2_mul_phi.sv` | GF(2^2) multiplier, ×φ |
| `rtl/gf4_mul.sv`, `gf4_square.sv`, `gf4_mul_lambda.sv`, `gf4_inv.sv` | GF(2^4) units |
| `rtl/iso_map.sv`, `inv_iso_map.sv` | δ and δ^-1 |
| `rtl/gf8_inv.sv` | composite-field GF(2^8) inverse, optional mid register |
| `rtl/aes_affine.sv`, `aes_inv_affine.sv` | affine and inverse affine maps |
| `rtl/aes_sbox.sv` | integrated S-box / inverse S-box |
| `rtl/shift_rows.sv`, `mix_columns.sv` | integrated (Inv)ShiftRows, (Inv)MixColumns |
| `rtl/key_expand_step.sv`, `key_setup.sv` | on-the-fly key schedule, decryption key setup |
| `rtl/aes_round.sv` | one pipelined round with its key step |
| `rtl/aes256_top.sv` | the engine and the multiplier |
| `rtl/ksa_adder.sv`, `nikhilam_mult.sv` | Kogge-Stone adder, Nikhilam multiplier |
