# AES-128 encryption, unrolled with "complex parallelism"

This is an AES-128 encryption core built as one wide combinational circuit.
A 128-bit plain text block and a 128-bit cipher key go in, and the 128-bit cipher
text comes out after a single pass through all ten rounds. Nothing is iterated
or pipelined. The organisation follows the "complex parallelism" scheme from the
publication *High Efficient Complex Parallelism for Cryptography*:

- every round ("loop") runs its byte substitution as four units in parallel,
  one per 32-bit column;
- every loop has four Mix Column units in parallel;
- each loop carries its own key-expansion stage ("key elongation") beside the
  data path;
- nine such loops are placed in series, followed by a final stage.

The result is plain FIPS-197 AES-128. The core reproduces the standard's
worked example and its intermediate values bit for bit.

```
plain_text ─► Add Round Key ─► loop 1 ─► loop 2 ─► … ─► loop 9 ─► final stage ─► cipher_text
cipher_key ──────┴──────────► key 1 ──► key 2 ──► … ──► key 9 ──► key 10 ─┘
```

## Interface and timing

| port          | dir | width | meaning                    |
|---------------|-----|-------|----------------------------|
| `plain_text`  | in  | 128   | block to encrypt           |
| `cipher_key`  | in  | 128   | AES-128 key                |
| `cipher_text` | out | 128   | encrypted block            |

There is no clock, no reset and no handshake. The core has exactly 384 signal
pins. `cipher_text` is a combinational function of the two inputs, so it is
valid one propagation delay after they settle. In a synchronous system, place
it between two register stages and give it the whole clock period. You can also
cut it into a pipeline yourself: the natural cut points are the `text_out[i]` and
`key[i]` nets between loops. The reference implementation reported a
combinational delay of about 232 ns on an FPGA with 4-input LUTs. Its reported area was
21,629 4-input LUTs.

### Byte order

The state is a packed `logic [127:0]` in FIPS-197 order:

- byte 0 of the block is `[127:120]`;
- byte *n* is at row *n* mod 4, column *n* div 4 of the 4×4 state matrix;
- column *c* is `state[127-32c -: 32]`, with row 0 in its top byte.

Hex constants in the standard can therefore be pasted in unchanged. For
example, `128'h3243f6a8885a308d313198a2e0370734` with key
`128'h2b7e151628aed2a6abf7158809cf4f3c` gives
`128'h3925841d02dc09fbdc118597196a0b32`.

## The loop

`aes_round` is one loop. Its parameter `ROUND` (1..9) only selects the round
constant for the key path. The state goes through these steps:

1. **Substitution Byte**, done by four `aes_sub_word` units, one per column, each
   made of four byte S-boxes;
2. **Shift Row** (`aes_shift_rows`): row *r* rotates left by *r* bytes, so
   `a b c d / e f g h / i j k l / m n o p` becomes
   `a b c d / f g h e / k l i j / p m n o`;
3. **Mix Column**, done by four `aes_mix_column` units, one per column: each
   multiplies its column by 03x³+01x²+01x+02 mod x⁴+1 over GF(2⁸);
4. **Add Round Key** (`aes_add_round_key`): XOR with the loop's own round key.

The key path of the same loop (`aes_key_elongation`) builds round key *i* from
round key *i*−1:

- rotate the last word one byte left ([z3,z2,z1,z0] → [z2,z1,z0,z3]);
- pass it through one more `aes_sub_word` ("Substitution Byte with key");
- XOR the round constant into the top byte (01, 02, 04, … 80, 1b, 36);
- chain the result through the four words: w4 = w0⊕t, w5 = w1⊕w4, w6 = w2⊕w5,
  w7 = w3⊕w6.

The new key leaves the loop on the `round_key` port and becomes the next loop's
`prev_key`. No key is stored or precomputed. A change of key therefore
propagates through the whole chain combinationally, like a change of plain text.

`aes_final_round` is the tenth round:

- Substitution Byte (four units);
- Shift Row;
- Add Round Key with round key 10, which its own key path derives from key 9.

It has no Mix Column, as AES prescribes.

## The S-box

`aes_sbox` is the largest piece of logic. It is instantiated 200 times: 160 in
the data path and 40 in the key paths. Rather than a 256-entry table, it
computes the S-box from its definition:

1. **Inverse in GF(2⁸)** (modulus x⁸+x⁴+x³+x+1), taken as x²⁵⁴ because
   x²⁵⁵ = 1 for x ≠ 0. It uses a chain of squarings and multiplications:
   x², x³, x⁶, x⁷, x¹⁴, x¹⁵, x³⁰, x³¹, x⁶², x⁶³, x¹²⁶, x¹²⁷, x²⁵⁴. Zero maps
   to zero with no special case.
2. **Affine map**: bᵢ' = bᵢ ⊕ bᵢ₊₄ ⊕ bᵢ₊₅ ⊕ bᵢ₊₆ ⊕ bᵢ₊₇ ⊕ cᵢ, with
   indices mod 8 and c = 0x63.

The field multiplication is `aes_pkg::gf_mul`, a shift-and-add over the eight
bits of one operand. After synthesis each S-box is a pure XOR/AND network.
A synthesis tool that sees constant propagation can flatten it to two-level
logic if that suits the target. To change the S-box implementation, for example
to a composite-field inverse or a ROM, replace only `aes_sbox`. Its port is one
byte in and one byte out.

## Files

| file                                  | contents |
|---------------------------------------|----------|
| `rtl/aes_pkg.sv`                      | types (`byte_t`, `word_t`, `state_t`, `key_t`), sizes (`NUM_LOOPS = 9`), `xtime`, `gf_mul`, `rcon` |
| `rtl/aes_sbox.sv`                     | byte S-box: inverse by x²⁵⁴, then the affine map |
| `rtl/aes_sub_word.sv`                 | four S-boxes on a 32-bit word |
| `rtl/aes_shift_rows.sv`               | Shift Row |
| `rtl/aes_mix_column.sv`               | Mix Column on one column |
| `rtl/aes_add_round_key.sv`            | 128-bit XOR |
| `rtl/aes_key_elongation.sv`           | one key-expansion step |
| `rtl/aes_round.sv`                    | one loop: data path and key path |
| `rtl/aes_final_round.sv`              | final stage |
| `rtl/aes_complex_parallel_encrypt.sv` | top: initial key addition, nine loops, final stage |
| `tb/aes_ref_pkg.sv`                   | independent behavioural AES-128 model used by the testbenches |
| `tb/tb_<module>.sv`                   | one self-checking testbench per module |

Inside the top, the nets between stages are named as follows:

- `text_in1`: the state after the first key addition;
- `text_out[i]`: the state after loop *i*;
- `key[i]`: round key *i*.

These nets can be probed hierarchically.

## How far it is checked

Each testbench compares its module with values worked out independently. The
reference model in `tb/aes_ref_pkg.sv` is written differently from the RTL. Its
S-box walks the multiplicative group with generator 3 and its inverse, so it
never computes an inverse. Its state is a row/column matrix, and its key
schedule works word by word.

- `tb_aes_sbox`: all 256 inputs, plus a few published table entries.
- `tb_aes_mix_column`: the published MixColumns test columns (db135345 →
  8e4da1bc, …) and random columns.
- `tb_aes_shift_rows`: the a…p letter example, a FIPS-197 state and random
  states.
- `tb_aes_key_elongation`: the complete FIPS-197 key schedule for
  2b7e1516…, the last round key for 00010203…, and random keys.
- `tb_aes_round` and `tb_aes_final_round`: the FIPS-197 Appendix B states
  around loops 1 and 9 and around the final stage, and random inputs.
- `tb_aes_complex_parallel_encrypt`: the top at its default size.
  - Appendix B: the cipher text, every intermediate state and all ten round keys.
  - Appendix C.1: 00112233… with key 00010203… gives 69c4e0d86a7b0430d8cdb78070b4c55a.
  - 200 random key/plain-text pairs, with every intermediate value compared.
  - It counts how often each stage (initial key addition, each loop, each key
    step, the final stage) produced a correct value, and fails if any stage
    never did.

Every testbench prints `TB_RESULT checks=N failures=M` at the end. Each has a
watchdog that fails the run if it hangs.

Only encryption with 128-bit keys exists. AES-192/256 (12 and 14 rounds, a
different key schedule) and decryption are not implemented.

## Where this RTL makes its own choices

The source publication describes the steps mostly in words and with small
illustrations. These points were settled here:

- **Standard AES throughout.** The publication's worked example is the FIPS-197
  vector, and its listed intermediate round keys and states match the standard.
  The arithmetic is therefore exactly AES: field polynomial 0x11b, affine
  constant 0x63, round constants 01…36, MixColumns matrix 02 03 01 01. None of
  these constants is spelled out in the publication.
- **Mix Column is the real AES column mix.** One illustration of Mix Column
  shows only the first and third columns being swapped. The text calls the
  step a polynomial, finite-field multiplication, and the published
  intermediate values need that, so the swap is not built. Likewise, the small
  4-bit affine example shown for the S-box is an illustration, not the 8-bit
  map used here.
- **Final stage.** The block diagram shows only substitution boxes after the
  nine loops. The published intermediate values (the substituted state
  e9098972…, then the row-shifted state e9317db5…) and the key addition it
  mentions make the final stage Substitution Byte, Shift Row and Add Round Key.
- **Width of each parallel unit.** The diagram shows four Substitution Byte
  and four Mix Column boxes without widths. Each is taken as one 32-bit column.
- **No clock.** The reported pin count (384 = 3 × 128) and a single path
  delay point to a purely combinational core. No registers, reset or valid
  signals were added.
- **S-box by inversion.** The publication mentions both the inverse-plus-affine
  construction and a truth-table (two-level logic) form. The construction is
  used.

## Size

Word-level synthesis of the top gives about 83,000 cells and no flip-flops.
Roughly 200 S-boxes (13 GF(2⁸) multiplications each) make up most of it.
This count is not an FPGA LUT count. The 21,629 LUTs reported for the original
implementation were not reproduced.

## Simulating

Each testbench uses the package, the reference model and the RTL. For the top:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_complex_parallel_encrypt.sv \
    --top-module tb_aes_complex_parallel_encrypt -Mdir obj -o sim
./obj/sim
```

Verilator finds the other modules through `-Irtl`. The same pattern works for
every other `tb/tb_<module>.sv`. The full top builds in well under a minute and
runs in a fraction of a second.
