# AES-128 with a composite-field S-box, shift-and-correct InvMixColumns and 4-lane counter mode

This is synthesizable SystemVerilog for an AES-128 core built around two
area-saving ideas:

* **No S-box tables.** SubBytes and InvSubBytes compute the GF(2^8)
  multiplicative inverse in the isomorphic composite field GF((2^4)^2), where
  it reduces to a handful of 4-bit multiplications and one 4-bit inversion.
* **"Advanced xtime" for InvMixColumns.** The decryption matrix multiplies by
  {09}, {0b}, {0d} and {0e}. Instead of chaining two or three `xtime` stages
  (each with its own conditional reduction), each constant is computed as a
  plain left-shift/XOR of the byte plus a single 8-bit correction term that
  depends only on the three top bits b[7:5].

Around these sit a counter-mode (CTR) unit that encrypts four consecutive
counter values in parallel (512 bits per clock), a block decryptor using the
inverse cipher, and one shared key schedule.

## Top level: `aes_top`

```
 key, key_load ──► aes_key_schedule ──► key_ready
                          │
                          └─ round keys (11 x 128), shared by both paths below
 ctr_iv, ctr_load, ctr_in_data[511:0] ──► aes_ctr (4 x aes_encrypt) ──► ctr_out_data[511:0]
 dec_in_block[127:0] ───────────────────► aes_decrypt ───────────────► dec_out_block[127:0]
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_load`, `key` | in | 1, 128 | start expanding a new cipher key |
| `key_ready` | out | 1 | round keys valid (10 clocks after `key_load`) |
| `ctr_load`, `ctr_iv` | in | 1, 128 | load the initial counter |
| `ctr_in_valid`, `ctr_in_data` | in | 1, 512 | four 128-bit blocks, block 0 in bits [511:384] |
| `ctr_out_valid`, `ctr_out_data` | out | 1, 512 | data XOR keystream, 10 clocks later |
| `dec_in_valid`, `dec_in_block` | in | 1, 128 | ciphertext block |
| `dec_out_valid`, `dec_out_block` | out | 1, 128 | plaintext, 10 clocks later |

Usage rules: pulse `key_load` for one clock, wait for `key_ready`, then send
data. Do not reload the key while blocks are in flight (the pipelines read
the stored round keys every clock). Assertions in `aes_top` flag data sent
without a ready key.

Both datapaths accept one input per clock with no back-pressure; a valid bit
travels with every item, and the output appears exactly 10 clocks after the
edge that accepted the input.

## Composite-field S-box (`aes_sbox`, `aes_inv_sbox`, `gf_inv_composite`)

The forward S-box is three steps:

1. **Map in.** `q = delta * a`, an 8x8 bit matrix that maps the AES field
   GF(2^8)/(x^8+x^4+x^3+x+1) isomorphically onto GF((2^4)^2).
2. **Invert in the composite field.** With q = qh·y + ql and y^2 = y + λ:

   ```
   d    = λ·qh^2  ⊕  (qh ⊕ ql)·ql        (a GF(2^4) element)
   q^-1 = (qh·d^-1)·y  +  (qh ⊕ ql)·d^-1
   ```

   That is one squaring, one multiply by the constant λ, three general
   GF(2^4) multipliers and one GF(2^4) inverse (`gf_inv_composite`). The GF(2^4)
   inverse is itself computed as a^14 = a^2·a^4·a^8 with two multipliers
   (`gf4_inv`); squaring in GF(2^4) is linear and costs only XORs. Zero maps
   to zero, as AES requires.
3. **Map out and apply the affine transform.** `b = delta^-1 * q^-1`, then
   s_i = b_i ⊕ b_(i+4) ⊕ b_(i+5) ⊕ b_(i+6) ⊕ b_(i+7) ⊕ {63}_i.

The inverse S-box runs the inverse affine transform
(b_i = s_(i+2) ⊕ s_(i+5) ⊕ s_(i+7) ⊕ {05}_i) first and then the same steps 1-2
and the delta^-1 map.

**Field choice.** GF(2^4) uses x^4 + x + 1. The extension uses y^2 + y + λ
with λ = {1100}, which is irreducible over that GF(2^4). `delta` is fixed by
choosing a root β of the AES polynomial inside the composite field. Column j
of `delta` is β^j. This design uses β = {21}, the smallest root, and
`DELTA_INV` is the matrix inverse. Both matrices are in `aes_pkg`, stored
row-wise: output bit i is the XOR of the input bits that row i selects.
Another root gives a different but equally valid matrix. If you change λ or
the polynomials, you must recompute both matrices. The S-box testbenches
check all 256 inputs against a reference that computes a^254 directly.

The S-box has no internal pipeline registers.

## Advanced xtime multipliers (`xtime_09`, `xtime_0b`, `xtime_0d`, `xtime_0e`)

Multiplying b by a constant c = Σ 2^k means XORing the shifted copies
b<<k and reducing every bit that leaves the byte. For these constants the
largest shift is 3, so only b7, b6 and b5 can leave the byte. Their
reduction can be gathered into one correction term T(b7,b6,b5):

| constant | shifted sum | correction term T (bit 7 … bit 0) |
|---|---|---|
| {09} | (b<<3) ⊕ b | 0, b7, b6⊕b7, b5⊕b6, b5⊕b7, b6⊕b7, b5⊕b6, b5 |
| {0b} | (b<<3) ⊕ (b<<1) ⊕ b | 0, b7, b6⊕b7, b5⊕b6⊕b7, b5, b6⊕b7, b5⊕b6⊕b7, b5⊕b7 |
| {0d} | (b<<3) ⊕ (b<<2) ⊕ b | 0, b7, b6, b5⊕b7, b5⊕b6⊕b7, b6, b5⊕b7, b5⊕b6 |
| {0e} | (b<<3) ⊕ (b<<2) ⊕ (b<<1) | 0, b7, b6, b5, b5⊕b6, b6, b5, b5⊕b6⊕b7 |

Each T is b5·{1b} ⊕ b6·R6 ⊕ b7·R7. Here {1b}, {36} and {6c} are x^8, x^9 and
x^10 reduced mod the AES polynomial. R6 and R7 are the sums of those
reductions over the shifts that the constant uses. The shifts are truncated
to 8 bits. The whole product is then an XOR tree of depth about three, with
no chain of conditional reductions.

Bit 3 of the {0d} term must be b5⊕b6⊕b7. A shorter expression that reduces
to b7 alone looks plausible, but it is wrong for half of the inputs. All four
units are checked exhaustively against shift-and-add multiplication.

`inv_mix_column` uses 16 of these units, one per matrix entry:
s'_r = {0e}s_r ⊕ {0b}s_(r+1) ⊕ {0d}s_(r+2) ⊕ {09}s_(r+3).
Encryption's `mix_column` uses the classic shared form
s'_r = xtime(s_r ⊕ s_(r+1)) ⊕ s_(r+1) ⊕ s_(r+2) ⊕ s_(r+3).

## Rounds and pipelines

* `aes_enc_round`: SubBytes → ShiftRows → MixColumns → AddRoundKey. With
  `FINAL=1` it skips MixColumns.
* `aes_dec_round`: InvShiftRows → InvSubBytes → AddRoundKey → InvMixColumns.
  With `FINAL=1` it skips InvMixColumns. The key is added before
  InvMixColumns, so decryption uses the ordinary round keys in reverse order
  and needs no separate "equivalent inverse cipher" keys.
* `aes_encrypt` / `aes_decrypt`: the initial AddRoundKey (key 0 or key 10)
  and ten unrolled rounds, with a register after each round. Latency is 10
  clocks and throughput is one block per clock.

State layout follows FIPS-197 throughout. Byte i of a 128-bit block is bits
[127-8i -: 8] and sits at row i mod 4, column i div 4. Column c is the 32 bits
[127-32c -: 32].

## Key schedule (`aes_key_schedule`, `aes_key_expand`)

A single expansion unit (RotWord, SubWord with four composite S-boxes, Rcon,
and the XOR chain) runs iteratively. `key_load` stores the key as round key
0, and the next ten clocks write round keys 1 to 10, with Rcon advanced by
xtime each step. `key_ready` rises on the tenth clock. The eleven keys stay in
registers and feed all five cipher pipelines (four CTR lanes and the
decryptor) in parallel. A `key_load` during an expansion restarts it.

## Counter mode (`aes_ctr`)

A 128-bit counter register is loaded from `ctr_iv`. For each accepted
512-bit word, lane l (l = 0..3) encrypts counter + l, and the counter then
advances by 4. Block k of the stream is therefore always XORed with
E(iv + k). The data waits in a 10-stage delay line that matches the cipher
latency.

The counter wraps modulo 2^128. If `ctr_load` and `ctr_in_valid` arrive in
the same clock, that word already uses the new counter. Encryption and
decryption are the same operation: to decrypt, feed the ciphertext through
the same port with the same initial counter and the same key.

## Where this design makes its own choices

These points are not fixed by the design idea above. They were chosen here:

* AES-128 only: 10 rounds, 128-bit key.
* The field polynomials, λ and β, and therefore the `delta` matrices.
* How the inverse S-box is arranged.
* A register after every round, with no registers inside the S-box or
  between a lane's sub-steps.
* An iterative key schedule with stored keys.
* The CTR counter width, its wrap, the lane order, and the load-with-data
  behaviour.
* Synchronous active-low reset, applied only to control and valid bits.
  Data registers and round-key storage are not reset, because nothing reads
  them before they are written.
* The CTR unit and the block decryptor share one key schedule.

The {0d} correction term is written from the field arithmetic, as noted
above. The older xtime-chain InvMixColumns, which this design replaces, is not
included.

This RTL has not been synthesized or timed on an FPGA, so no area, delay or
power figures are claimed. The fully unrolled datapath is large: five
ten-round pipelines with 16 S-boxes per round, i.e. 640 forward S-boxes in the
CTR lanes and 160 inverse S-boxes in the decryptor, plus four in the key
schedule. Coarse synthesis of `aes_top` gives about 89k word-level cells and
1.6k flip-flop bits, plus about 18k bits of pipeline and delay-line registers
that the synthesis tool keeps as memory arrays.

## Files

`rtl/` has one module or package per file:

| file | content |
|---|---|
| `aes_pkg.sv` | types, (Inv)ShiftRows wiring, `delta` matrices |
| `gf4_mul.sv`, `gf4_inv.sv` | GF(2^4) multiply and inverse |
| `gf_inv_composite.sv` | GF((2^4)^2) inverse |
| `aes_sbox.sv`, `aes_inv_sbox.sv` | composite-field S-boxes |
| `xtime_09/0b/0d/0e.sv` | advanced xtime multipliers |
| `mix_column.sv`, `inv_mix_column.sv` | column mixing |
| `aes_enc_round.sv`, `aes_dec_round.sv` | single rounds |
| `aes_key_expand.sv`, `aes_key_schedule.sv` | key expansion |
| `aes_encrypt.sv`, `aes_decrypt.sv` | 10-stage pipelines |
| `aes_ctr.sv` | 4-lane counter mode |
| `aes_top.sv` | top level |

`tb/` has one self-checking testbench per module (`<module>_tb.sv`) and
`aes_ref_pkg.sv`, a plain behavioural AES model that computes the S-box by
exponentiation. Every testbench prints `TB_RESULT checks=N failures=M` and has
a watchdog. The known-answer vectors used are:

* FIPS-197 Appendix B (3243f6a8… → 3925841d…).
* FIPS-197 Appendix C.1 (00112233… → 69c4e0d8…) and the Appendix A.1 key
  schedule.
* NIST SP 800-38A F.5.1 CTR-AES128.

`aes_top_tb` runs the whole design at its default parameters. It covers key
loading through the key schedule, the CTR vector, decryption, back-to-back
and gapped streams, a counter wrap, the CTR unit and the decryptor in the same
clock, and a CTR round trip. It counts each of these events and fails if any
of them never happens.

## Simulating

With Verilator 5 (the top-level testbench takes about 3 minutes to compile,
most of it C++ build time; the run itself takes seconds):

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes_top_tb.sv \
  --top-module aes_top_tb -o sim
./obj_dir/sim
```

Replace `aes_top_tb` with any other `<module>_tb` to test that block alone.
The packages are listed first; `-y` lets Verilator find every module by its
file name. The testbenches use `$urandom` and queues, and need no other files.
