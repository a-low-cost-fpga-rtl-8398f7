# Secure Cipher: a fully unrolled 128-bit block cipher in SystemVerilog

Secure Cipher is a lightweight block cipher meant for small FPGAs. It
encrypts 128-bit blocks under a 128-bit key in five Feistel-like rounds built
only from XOR, XNOR, bit rotations and four 8-bit substitution boxes. Its
key expansion contains a multiplication by fixed 8x4 matrices. Because one
operand of that multiplication is a row of bits, it is built as constant
look-up tables instead of multipliers. The hardware unrolls all five rounds
into one combinational path: a new block, with its own key if wanted, can
enter on every clock.

This RTL follows the cipher as published in "A Low Cost FPGA based
Cryptosystem Design for High Throughput Area Ratio" (Ibrahim et al.). Where
that description leaves a detail open, this design makes its own choice. All
such choices are listed under
[Interpretations and departures](#interpretations-and-departures). Read the
section [What this datapath does to the data](#what-this-datapath-does-to-the-data)
before using the design for anything that needs secrecy.

## Block structure

```
                 key[127:0]                    plaintext[127:0]
                     |                                |
           +---------v----------+            +--------v---------+
 in_valid->|  input registers (key, plaintext, valid)            |
           +---------+----------+            +--------+---------+
                     |                                |
              +------v------+   K1..K5        +-------v--------+
              |   key_gen   |---------------->|encrypt_unrolled|
              | 4 branches, |                 | round1 .. round5|
              | 4 x fixed_  |                 | (enc_round, each|
              | matrix_mult |                 |  2 x f_function,|
              +-------------+                 |  8 x sbox)      |
                                              +-------+--------+
                                                      |
                                          output register (ciphertext, valid)
```

| Module | Role |
|---|---|
| `secure_cipher_top` | Input and output registers around `key_gen` and `encrypt_unrolled` |
| `key_gen` | Expands the 128-bit key into round keys K1..K5 (32 bits each) |
| `fixed_matrix_mult` | 4x8 bit matrix times a fixed 8x4 byte matrix, as 4 constant 256-entry tables |
| `encrypt_unrolled` | Chains `NUM_ROUNDS` (5) rounds with no register between them |
| `enc_round` | One round: two XNORs with the round key, two F functions, the inner-word cross-over |
| `f_function` | Four byte lanes: rotate lane n left by n bits, then substitution box n+1 |
| `sbox` | One 16x16 substitution table (SB1..SB4) |
| `secure_cipher_pkg` | Types, the fixed matrices, the S-box tables and the bit-matrix helper functions |

### Top-level interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low; clears only the two valid flags |
| `in_valid` | in | 1 | `key` and `plaintext` are captured on this clock edge |
| `key` | in | 128 | cipher key |
| `plaintext` | in | 128 | plaintext block |
| `out_valid` | out | 1 | `ciphertext` holds a result |
| `ciphertext` | out | 128 | ciphertext block |

A block captured at clock edge *n* appears on `ciphertext` with `out_valid`
high after edge *n+2*. There is no back-pressure and no stall. One block per
clock is accepted for as long as `in_valid` stays high. Each block is
encrypted under the key presented with it, because key expansion is part of
the combinational path. The clock period must cover that path: the key
generator plus five rounds. The published implementation reports it as
13.925 ns on a Cyclone II. The two register stages are this design's own
addition, so that the block can be simulated and timed as a clocked
circuit.

Parameter: `NUM_ROUNDS` (default 5, the cipher's number). The key
generator produces exactly five keys, so values above 5 are rejected.

## Bit conventions

The cipher is specified in terms of matrices. These conventions turn its
matrices into bit positions. They hold everywhere in the RTL.

* All data are MSB first. Word W0 of a block is `block[127:96]`. Byte 0 of
  a word is `word[31:24]`.
* A 32-bit word as a **4x8 bit matrix**: element (r, k) is bit
  `31-(8r+k)`. So row 0 is the most significant byte, and column 0 is the
  MSB of each row.
* A 128-bit value as a **4x4 byte matrix**: byte (i, j) is
  `[127-8(4i+j) -: 8]`. The same 128 bits as a **4x32 bit matrix**:
  element (r, k) is bit `127-(32r+k)`.
* **Shift row** rotates row r of a matrix left by r elements, as in AES.
  The elements are bits for a 4x8 bit matrix and bytes for a 4x4 byte
  matrix.
* **Column-wise arrangement** reads a matrix row by row as one bit stream.
  It then refills a matrix of the same shape column by column from that
  stream. For a 4x8 matrix, output (r, k) is stream bit `4k+r`. This is a
  fixed wire permutation.

## Encryption round and F function

A round takes four 32-bit words W0..W3 and a round key Kr:

```
y0 = W0 xnor Kr                y3 = W3 xnor Kr
y1 = F(y0) xor W2              y2 = F(y3) xor W1        output = {y0, y1, y2, y3}
```

The two inner words cross over: W2 goes to the left half and W1 to the
right. This cross-over is the per-round "swap" of the cipher. The round is
invertible without inverting F, the Feistel property. The testbenches use
that inverse as a check.

`F` splits its 32-bit input into bytes b0..b3, with b0 the most significant.
It rotates byte bn left by n bits and looks it up in box SB(n+1). The four
results are concatenated in the same order.

### Substitution boxes

Each box is a 16x16 byte table. From a selection byte b7..b0:

* the row number is `{b7,b6,b1,b0}`: the two outer bit pairs;
* the column number is `b5..b2`: the middle nibble.

For example, `8'b1100_0011` selects row 15, column 0. That entry is 8'h8C
in SB1.

SB1 is exactly the AES S-box. The package computes it from the AES
definition: the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1,
followed by the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^
rotl(b,4) ^ 0x63. SB2, SB3 and SB4 are the cipher's own constant tables.
They are written out in `secure_cipher_pkg`. These three boxes are not
permutations; a Feistel F function does not need them to be.

## Key expansion

Key expansion is the least obvious part of the design. `key_gen` cuts the
key into four 32-bit chunks; chunk 1 is `key[127:96]`. Branch m (1..4) then
computes:

1. `a_m = shift_row(chunk_m)`: each chunk is viewed as a 4x8 bit matrix.
2. `c_m = column_wise(a_m)`
3. `d_m = c_m xnor c_(m+1)`: each matrix is paired with its right-hand
   neighbour. Branch 4 pairs with `c_1`.
4. `e_m = shift_row(column_wise(d_m))`
5. `p_m = e_m x FM_m`: a 4x8 bit matrix times the fixed 8x4 byte matrix,
   giving a 4x4 byte matrix. See the next section.
6. `g_m = shift_row(p_m)`: row i of the byte matrix is rotated by i bytes.
7. `h_m = column_wise(g_m)`, with `g_m` seen as a 4x32 bit matrix.
8. `K_m` = the four 32-bit rows of `h_m`, combined by XOR for K1 and K3 and
   by XNOR for K2 and K4.

Finally K5 = K1 xor K2 xor K3 xor K4. Round r uses Kr.

Steps 7 and 8 together reduce to one rule: bit k of K_m (k = 0 is the MSB)
is the parity of nibble k of `g_m`, inverted for K2 and K4. Every step
except the matrix product is pure wiring or a few gates.

A worked example, also checked by `tb_key_gen`: for the all-zero key,
every XNOR yields ones. So every product sees all-ones rows. FM1..FM3 then
give 8'hFF everywhere, which makes K1 = K3 = 0 and K2 = 32'hFFFFFFFF.
FM4's second column sums to 263 mod 256 = 8'h07. After the byte rotation,
that leaves four odd-parity nibbles, which gives K4 = 32'hEFBFFEFB and
K5 = 32'h10400104.

### Fixed matrix multiplication as look-up tables

The product element is

```
FMo(i, j) = sum over a = 0..7 of RS(i, a) * FM(a, j)      (mod 256)
```

where RS(i, a) is a single bit. Column j of the product is therefore a
function of the 8-bit row RS(i, :) alone. `fixed_matrix_mult` builds that
function as a constant 256-entry table per column at elaboration (package
function `fm_lut`). It indexes the table with each of the four rows. The
result is 16 table reads and no multipliers.

The four fixed matrices are stored in `secure_cipher_pkg::FM`, as published
in 4x8 form. `FM[m][j][a]` is FM_m(a, j). In FM1, FM2 and FM3, every column
is a permutation of the powers of two, so the "multiplication" is just a
bit permutation of the row. FM4's second column is used as published:
64, 1, 4, 16, 32, 128, 16, 2. The value 16 occurs twice, so that column sums
with a carry.

## What this datapath does to the data

Two properties follow directly from the round as specified. The testbenches
confirm both. Anyone who means to use this cipher should know them.

* **The outer words are not encrypted.** W0 and W3 only ever pass through
  the XNOR with the round key. After five rounds, ciphertext word 0 is
  W0 xor ~(K1^K2^K3^K4^K5). Since K5 = K1^K2^K3^K4, that is simply ~W0, for
  every key. The same holds for W3. The plaintext `00112233...eeff` under
  key `000102...0f` encrypts to `ffeeddcc 0e2b0a30 0fd91448 33221100`.
* **Bytes never mix across lanes.** XOR, XNOR, the in-byte rotations and
  the S-boxes all act lane by lane. So ciphertext byte n of the inner words
  depends only on byte n of the four plaintext words (and on the key). A
  flip in an inner plaintext word changes exactly one ciphertext bit.

Measured over 1000 single-bit variations (`tb_image_workload`), this RTL
changes on average 4.9 % of the ciphertext bits. Key flips give 6.2 % and
plaintext flips 3.6 %. The published evaluation reports 54.55 %, and shows
encrypted images that look like noise. That implementation must therefore
permute the words between rounds in a way that the round diagram does not
show. This design does not guess such a permutation. It implements the
round exactly as drawn. The round's word order is set by the single
`assign dout = ...` line in `enc_round.sv`, which is where a permutation
would go.

## Interpretations and departures

The published description fixes the structure, the constants and the
operations. These points are this design's reading or its own choice:

* **Shift.** The "left shifts" of the F function are taken as rotations. A
  zero-filling shift would make most of SB2..SB4 unreachable, yet each box
  is said to select from all 256 values.
* **Shift row.** The key expansion's "shift row" is taken as the AES-style
  rotation of row r by r elements.
* **Column-wise arrangement.** This is taken as the column-major refill
  described above. The description calls the arrangement after the XNOR
  column-wise in one place and row-wise in another. The key-expansion
  diagram draws it column-wise, and that is followed.
* **Key reduction.** The final 4x32 matrix is reduced across its four rows
  to 32 bits: XOR for K1 and K3, XNOR for K2 and K4, as drawn.
* **Fixed matrices.** Each 4x8 matrix as printed is read as the transpose
  of the 8x4 matrix FM. The sum of products is taken modulo 256.
* **S-box row number.** The outer bit pairs form the row number as
  `{b7,b6,b1,b0}`. The published worked example cannot tell this order from
  `{b1,b0,b7,b6}`.
* **S-box numbering.** SB1..SB4 are numbered as in the S-box tables and the
  F-function diagram. One published figure lists the four tables in the
  opposite order.
* **SB4 entry (row 7, column 15)** is 8'h00 by this design's choice.
* **S-box uniqueness.** The cipher states that no two boxes return the same
  value for the same selection byte. The published tables break this in
  three cells: SB2/SB3 at (2,6), SB1/SB3 at (3,8) and SB3/SB4 at (15,15).
  The tables are used as published.
* **Byte and word order.** The most significant byte is byte 0 and the most
  significant word is W0.
* **Registers, valid flags and reset** are this design's own. The cipher is
  defined as one combinational path.
* **Encryption only.** Decryption is not built. The cipher mentions
  decryption rounds but does not define their hardware. `ref_decrypt` in
  `tb/secure_cipher_ref_pkg.sv` shows the inverse.

## Performance

The published implementation on a Cyclone II EP2C35F672C6N reports 802
logic elements, a 13.925 ns propagation delay and 4600 Mbit/s, which is
5.735 Mbit/s per LE. This RTL moves 128 bits per clock. At a 13.925 ns clock
that would be 9192 Mbit/s. The published 4600 Mbit/s corresponds to 64 bits
per 13.925 ns. Area and timing of this RTL on that device have not been
measured. Generic synthesis keeps the S-boxes and the fixed-matrix tables
as ROMs: 8 per round and 16 in the key generator.

## Simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles if it hangs. Run from the directory that holds `rtl/` and `tb/`, for
example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/secure_cipher_pkg.sv tb/secure_cipher_ref_pkg.sv \
    tb/tb_secure_cipher_top.sv --top-module tb_secure_cipher_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. Verilator finds the other
modules in `rtl/` by file name.

| Testbench | What it checks |
|---|---|
| `tb_sbox` | All 256 inputs of SB1..SB4 against the reference; the worked example C3 -> 8C; first and last table entries; SB1 is a permutation |
| `tb_f_function` | A vector worked out by hand (C3C3C3C3 -> 8CECF161); 2000 random inputs |
| `tb_fixed_matrix_mult` | All row values for FM1..FM4 against a sum-of-products model; FM1's identity and rotation columns; the carry in FM4's second column |
| `tb_key_gen` | The all-zero key worked out by hand; 2000 random keys; K5 = K1^K2^K3^K4 |
| `tb_enc_round` | 2000 random rounds; outer words = W xnor Kr; inversion |
| `tb_encrypt_unrolled` | 1000 random blocks against the reference and back through its inverse; the round-key order matters |
| `tb_secure_cipher_top` | 3000 blocks at default parameters with random gaps and keys. Checks every result, its 2-clock latency and one-block-per-clock throughput. Also checks back-to-back blocks, key changes, key reuse, idle clocks and a reset mid-stream, each of which must occur |
| `tb_image_workload` | Encrypts a generated 256x256 8-bit image (4096 blocks, one per clock). Checks every block and the complemented outer words, and prints histogram and neighbour correlation. Also runs 1000 avalanche variations and checks the lane and outer-word properties above |

`tb/secure_cipher_ref_pkg.sv` is the reference model. It is written
separately from the RTL. The key schedule works on explicit 2-D arrays. SB1
is built from GF(2^8) exponent and logarithm tables. The rounds are plain
assignments. The model shares only the published constants (FM1..FM4 and
SB2..SB4) with the RTL. It therefore checks the RTL against this design's
reading of the cipher, not against ciphertexts from an independent
implementation. No published test vectors exist.
