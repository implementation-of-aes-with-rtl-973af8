# AES encryption core with an exponentiation-based S-box

This is an AES encryption core (FIPS-197 Cipher, 128-, 192- and 256-bit keys)
in which the usual S-box can be replaced by a *modified S-box*. The modified
S-box drops the affine transform of the AES S-box and instead first sends each
byte through a discrete exponentiation in the prime field F_257:

    S'(x) = inv( 3^x mod 257 )        with 3^128 mod 257 = 256 read as {00}

where `inv` is the multiplicative inverse in GF(2^8) ({00} maps to itself).
Everything else — ShiftRows, MixColumns, AddRoundKey and the key schedule — is
standard AES, so with the standard S-box selected the core reproduces the
FIPS-197 test vectors exactly. The modified S-box is the default.

The motivation is hardware cost: both S-boxes are 8-in/8-out look-up
functions of the same kind, and the modified table was reported to synthesise
to slightly fewer cells and less switching power than the AES table, with no
loss in resistance to linear cryptanalysis. The second half of that claim does
not hold up; see "Linear properties" below.

## The modified S-box

The construction has two steps, both permutations of the 256 byte values:

1. **Exponentiation in F_257.** Byte x (0..255) becomes 3^x mod 257. Because 3
   is a primitive root modulo 257, x = 0..255 reaches every value 1..256
   exactly once. The single value that does not fit in a byte, 256 (reached
   at x = {80}), is represented by {00}. Example: x = {32} = 50 gives
   3^50 mod 257 = 18 = {12}.
2. **Inversion in GF(2^8).** The byte from step 1 is replaced by its
   multiplicative inverse in GF(2^8) modulo the field polynomial;
   {00} stays {00}.

There is no affine step. Consequences worth knowing:

* S'({00}) = inv(1) = {01}, S'({80}) = {00}.
* The field polynomial matters. The default is **x^8+x^6+x^5+x+1 (9'h163)**,
  the polynomial this construction is specified with. Setting
  `FIELD_POLY = 9'h11B` uses the AES field instead. The two give different
  tables, e.g. S'({32}) = {E3} with 9'h163 and {AA} with 9'h11B.
* The key schedule's SubWord uses the same S-box as SubBytes, so changing the
  S-box changes the round keys as well as the rounds. Rcon and MixColumns
  always use the AES field.
* No inverse table is built: the core encrypts only.

Both S-boxes are written as 256-entry constant tables that are computed at
elaboration by constant functions in `aes_pkg` that follow the two constructions
literally (`std_sbox_table`, `mod_sbox_table`). There are no numbers pasted into
the source. Synthesis turns each table into a flat 8-input look-up function. The
modified S-box is thus a drop-in replacement, with the same ports and latency as
the standard one.

### Linear properties

`tb/tb_sbox_linear.sv` runs every input through both S-box modules. It then
scans all 255 x 255 non-zero input/output mask pairs for the best linear
approximation, measured as the largest |N - 128|, where N is the number of
inputs (out of 256) for which the approximation holds:

| S-box                         | largest \|N - 128\| | best bias |
|-------------------------------|---------------------|-----------|
| standard AES                  | 16                  | 2^-4      |
| modified, FIELD_POLY = 9'h163 | 36                  | ~2^-2.8   |
| modified, FIELD_POLY = 9'h11B | 36 (software model) | ~2^-2.8   |

So the modified S-box has a noticeably *stronger* best linear approximation
than the AES S-box. Inversion alone has the optimal bias of 2^-4, but composing
it with the exponentiation, which is not GF(2)-linear, destroys that bound.
The testbench also evaluates two particular approximations,
X7^Y2^Y3^Y4^Y5 = 0 for the standard box and X7^Y1^Y3^Y4^Y5 = 0 for the
modified one (bit 0 is the least significant bit). They hold for 134 and
136 of the 256 inputs respectively. Treat this core as a study of S-box
hardware cost, not as a cipher with AES-level security.

## Datapath and key schedule

```
             key, key_len                       in_data
                  |                                |
          +-------v--------+   rd_round     +------v-------+
          | key expansion  |<---------------| XOR (round 0)|
          | 1 word / clock |   round key    +------+-------+
          | 15 x 128-bit   |--------------->       |
          | round-key store|          +------------v-------------+
          +----------------+          | state register (128 b)   |
                                      +------------+-------------+
                                                   |
                                      +------------v-------------+
                                      | aes_round (comb.)        |
                                      | SubBytes  (16 S-boxes)   |
                                      | ShiftRows (wiring)       |
                                      | MixColumns, bypassed in  |
                                      |   round Nr               |
                                      | AddRoundKey              |
                                      +------------+-------------+
                                                   +--> back to state / out_data
```

* **Iterative round.** One complete round is evaluated combinationally per
  clock and fed back into a single 128-bit state register. Round 0 (AddRoundKey
  only) happens in the clock that accepts the block. Rounds 1..Nr-1 are full
  rounds. Round Nr skips MixColumns.
* **Key expansion** (`aes_key_expansion`) runs once per key, not once per
  block. It writes the Nk key words, then produces one schedule word per clock
  with the FIPS-197 recurrence: RotWord+SubWord+Rcon every Nk words, plus an
  extra SubWord at i mod 8 = 4 for 256-bit keys. It uses one 4-byte SubWord
  unit. The last eight words sit in a shift window, so w[i-1] and w[i-Nk] need
  only a 3-way select on Nk. Every word is also written into a store of 15
  round keys of 128 bits (60 words, enough for AES-256). The round logic reads
  this store by round number.
* **State layout.** Byte n of a block (n = 0 is the first byte, in bits
  127:120) is state element s(row = n mod 4, column = n div 4). Round key r is
  {w[4r], w[4r+1], w[4r+2], w[4r+3]} with w[4r] in bits 127:96, so word c is
  XORed into column c. Keys are left aligned in the 256-bit `key` port: a
  128-bit key goes in `key[255:128]`.

## Interface and timing (`aes_cipher`)

| port               | dir | width | meaning |
|--------------------|-----|-------|---------|
| clk, rst_n         | in  | 1     | clock; asynchronous active-low reset |
| key_valid/key_ready| in/out | 1  | key load handshake |
| key                | in  | 256   | cipher key, left aligned |
| key_len            | in  | 2     | `aes_pkg::key_len_e`: KEY_128, KEY_192, KEY_256 |
| in_valid/in_ready  | in/out | 1  | plaintext handshake |
| in_data            | in  | 128   | plaintext block |
| out_valid          | out | 1     | one-clock pulse: ciphertext available |
| out_data           | out | 128   | ciphertext; held until the next block is accepted |

A transfer happens on a rising edge where valid and ready are both high.

| event | AES-128 | AES-192 | AES-256 |
|-------|---------|---------|---------|
| key accepted -> in_ready (Nb(Nr+1)-Nk expansion clocks + 1) | 41 | 47 | 53 |
| block accepted -> out_valid (Nr clocks) | 10 | 12 | 14 |
| clocks per block, back to back (Nr+1) | 11 | 13 | 15 |

* `key_ready` is high when neither an expansion nor a block is in progress.
* `in_ready` also requires a loaded key, and it is held low while `key_valid`
  is high, so a key offered together with a block wins. After reset no key is
  loaded.
* A new block can be accepted in the same clock as `out_valid`. With `in_valid`
  held high the core therefore runs at Nr+1 clocks per block.
* Loading a new key invalidates the old schedule. Blocks wait (`in_ready` low)
  until the new expansion is complete.
* Concurrent assertions in `aes_cipher` check three rules: expansion and
  encryption never overlap, the round counter never passes Nr, and a block is
  only accepted with a key loaded. Verilator reports SYNCASYNCNET on `rst_n`
  because the assertions' `disable iff` samples it synchronously. That is
  intended.

### Parameters

| parameter  | default         | meaning |
|------------|-----------------|---------|
| SBOX_SEL   | `SBOX_MODIFIED` | `aes_pkg::sbox_sel_e`; `SBOX_STANDARD` gives plain AES |
| FIELD_POLY | 9'h163          | GF(2^8) polynomial of the modified S-box's inversion |

`aes_sbox_mod` also has `PRIM_ELEM` (default 3). It must be a primitive root
of 257 for the S-box to be a permutation.

## Files

| file | content |
|------|---------|
| `rtl/aes_pkg.sv` | types, key-length enum, GF(2^8) helpers, S-box table builders |
| `rtl/aes_sbox_std.sv`, `rtl/aes_sbox_mod.sv` | the two S-boxes |
| `rtl/aes_sbox.sv` | picks one of them from SBOX_SEL |
| `rtl/aes_sub_bytes.sv`, `rtl/aes_shift_rows.sv`, `rtl/aes_mix_columns.sv`, `rtl/aes_add_round_key.sv` | the four round transformations |
| `rtl/aes_round.sv` | one round, with the final-round MixColumns bypass |
| `rtl/aes_key_expansion.sv` | sequential key schedule and round-key store |
| `rtl/aes_cipher.sv` | top level: control, state register, handshakes |
| `tb/aes_ref_pkg.sv` | independent byte-matrix reference model used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_aes_cipher_std` and `tb_sbox_linear` |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`, and each has a watchdog.
The reference model in `tb/aes_ref_pkg.sv` is written differently from the
RTL. It finds inverses by exhaustive search, computes 3^x by repeated
multiplication, and works on a 4x4 byte matrix.

* `tb_aes_cipher` tests the top at its default parameters. It loads keys of
  all three lengths and encrypts fixed and random blocks, some back to back and
  some with gaps. It checks every ciphertext, the block latency and the key-load
  time. It also confirms that each mechanism occurred: stalls, acceptance in the
  out_valid clock, a key offered together with a block, and a key reload.
  Known answers for the default configuration, with plaintext
  00112233445566778899aabbccddeeff and key 000102...1f (first Nk words):

  | key | FIELD_POLY 9'h163 (default) | FIELD_POLY 9'h11B |
  |-----|------------------------------|-------------------|
  | 128 | af1ea55894487831a1ae240bdb6c288f | 7fd6eb2aacd956bb09781574348d572e |
  | 192 | af583083b663010dbdecc927bc8e14ba | eef9d67c3332aebb73d9108799acd90c |
  | 256 | 0bb47960a74abc25ad6f3a82f1b5df13 | 54205f2f02d0fe49f9c032c219dae691 |

* `tb_aes_cipher_std` selects the standard S-box. It checks the FIPS-197
  Appendix B and C vectors (69c4e0d8..., dda97ca4..., 8ea2b7ca...).
* The unit testbenches check the following:
  * Both S-boxes exhaustively, including the permutation property.
  * ShiftRows, MixColumns and AddRoundKey against FIPS-197 intermediate values
    and random States.
  * The key schedule against FIPS-197 Appendix A and the reference, for all key
    lengths, with timing.
* `tb_sbox_linear` runs the linear analysis described above.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_cipher.sv --top-module tb_aes_cipher
./obj_dir/Vtb_aes_cipher
```

Replace `tb_aes_cipher` with any other testbench name. All of them finish in
well under a second.

## Where this design makes its own choices

* **Encryption only.** No inverse cipher or inverse modified S-box is
  provided.
* **Architecture.** The architecture is this design's own choice: one round per
  clock, a stored key schedule, one SubWord unit, valid/ready handshakes, and an
  asynchronous active-low reset that clears control state but not data
  registers. Operation at about 1.2 GHz has been claimed for this design. That
  is a technology result the RTL cannot confirm. The critical path here is an
  S-box table, MixColumns, a key XOR and a multiplexer.
* **Field of the modified S-box.** The default polynomial, 9'h163, follows the
  specification of the construction. Because the inversion step is described
  as the same step as in the AES S-box, 9'h11B is an equally plausible reading.
  That is why it is a parameter.
* **S-box in the key schedule.** The modified S-box is also used in the key
  schedule.
* **Key schedule details.** RotWord, SubWord, Rcon and the extra AES-256
  SubWord follow FIPS-197.
* **Tables.** Both S-boxes are realised as tables, not as composite-field
  logic. Area and power of the two tables depend on the synthesis library and
  have not been measured here.
