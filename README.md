# Byte-aware SEC-DED ECC with odd-per-byte correction

Main memories are built from chips that each deliver several bits of a word
(b bits per chip, a "byte" here). A failed cell, word line, bit line or whole
chip corrupts anywhere from one to b bits of the same byte. A plain SEC-DED
Hamming/Hsiao code handles single-bit errors well. It can miscorrect a
multi-bit error inside one chip, though, and it corrects none of them.

This RTL implements a family of **systematic odd-weight-column SEC-DED-SBD
codes**, that is, codes that correct single errors, detect double errors and
detect single-byte errors. They also **correct any odd number of wrong bits
inside one byte**. A single-bit error is one such case, and so is a 3-of-4-bit
chip fault. Every double-bit error and every even number of wrong bits inside
one byte is detected. So at least half of all multi-bit byte error patterns
are corrected, not just flagged. The extra cost over a plain SEC-DED-SBD code
is at most a few check bits.

The codec is fully parameterized by the byte length `B`, the number of check
bits `R` and the number of data bytes `K`. The parity-check matrix is built
while the design elaborates, so there is no table to maintain. The default is
the (64, 56) code with `B = 4`, `R = 8`, `K = 14`, which has 14 data chips and 2
check chips of 4 bits each.

## The parity-check matrix

The code is systematic: `H = [B_1 B_2 ... B_K | I_R]`, so a codeword is the
data bits followed by the check bits, and check bit *i* is the XOR of the data
bits with a 1 in row *i*. Every data byte owns an `R x B` block `B_j` made of
two parts stacked vertically:

* an identity `I_B`, which tells *which bit* of the byte is hit;
* an `(R-B) x B` matrix whose columns are **all the same** nonzero
  even-weight vector `h_j`, which tells *which byte* is hit.

Every data column is therefore one unit vector plus an even vector, so it has
odd weight. The check columns are unit vectors. Two layouts of a block are
used: `h_j` above `I_B`, or `I_B` above `h_j`. The choice depends on how `R`
compares with `2B`:

| construction | range | byte blocks | max data bytes K |
|---|---|---|---|
| C1 | R = 2B | all nonzero even B-tuples above I_B, then the same set below I_B | 2^B - 2 |
| C2 | R > 2B | all nonzero even (R-B)-tuples above I_B; then I_B above [M; N], M an even (R-2B)-tuple, N an even B-tuple, not both zero | 2^(R-B-1) + 2^(R-B-2) - 2 |
| C3 | B+2 <= R < 2B | all nonzero even (R-B)-tuples above I_B (or all below it, `C3_I_ABOVE = 1`) | 2^(R-B-1) - 1 |

The check bits form check bytes in the same way as the rows:

* C1 has two check bytes of B bits.
* C2 has three check bytes: B bits, then R-2B bits, then B bits.
* C3 has two check bytes: R-B bits, then B bits. With `C3_I_ABOVE = 1` the
  order is B bits, then R-B bits.
* When R >= 3B, the R-2B middle rows of C2 span more than one chip. The
  decoder still treats them as one region: it corrects any odd pattern that
  stays inside those rows, and `rd_err_byte` names the region, not the chip.

The even tuples are enumerated by increasing weight, then by decreasing value,
with the first row as the most significant bit. For C2, M varies slowest. With
`B=4, R=8` this yields the classic 8 x 64 matrix, whose first seven data bytes
have columns `1100, 1010, 1001, 0110, 0101, 0011, 1111` over rows 1-4. The
testbenches check the generated matrix bit for bit against that matrix.

`sbd_pkg::min_check_bits(b, k)` returns the smallest `R` for `k` data bits.
Some values:

| b \ k | 16 | 32 | 64 | 128 | 256 |
|---|---|---|---|---|---|
| 3 | 6 | 8 | 8 | 9 | 10 |
| 4 | 8 | 8 | 9 | 10 | 11 |
| 8 | 11 | 12 | 13 | 14 | 15 |
| 16 | 18 | 19 | 20 | 21 | 22 |

### Shortened codes and XOR depth

When `K` is below the maximum, some byte blocks are dropped. The number of 1s
in row *i* of `H` sets the size of the XOR tree for check bit *i*, so a good
shortened code keeps its densest row as light as possible. With
`BALANCED = 1` (the default), `sbd_pkg::select_bytes` picks blocks greedily:

1. It minimizes the heaviest row, then the total number of ones.
2. It keeps the chosen blocks in construction order.

For 32 data bits this gives a densest row of 13 ones with `B=4, R=8`, which is
the optimum for odd-weight-column SEC-DED codes. With `B=8, R=12` it gives 17.
The byte choice is a valid one, but not necessarily the one a hand-made table
would list. Set `BALANCED = 0` to take the first `K` blocks instead.

## How a syndrome is decoded

Let `e` be an odd-weight error pattern inside data byte *j*, whose identity
rows start at `OFF`. Its syndrome is

    S = h_j  |  (e placed on rows OFF .. OFF+B-1)

because the `h_j` columns hit by `e` add up to `h_j` an odd number of times.
The syndrome therefore names the byte directly: outside the byte's identity
rows it equals `h_j`. It also names the bits: inside those rows it *is* the
error pattern. An odd pattern inside a check byte gives a syndrome that is
nonzero only on that check byte's rows. The constructions make all of these
syndromes distinct.

An even number of wrong bits inside one byte, or any two wrong bits, gives an
even-weight nonzero syndrome. That is because every column has odd weight. No
correctable pattern has an even syndrome, so these errors are always detected.

`sbd_syndrome_decoder` implements this directly, with one comparator per
byte:

* **data byte j:** `hit_j = odd(S) && (S & ~identity_rows_j) == h_j`. The
  error mask is `S` on the identity rows.
* **check byte c:** `hit_c = odd(S) && S is zero outside the rows of c`. The
  error mask is `S`.
* **verdict:**
  * zero syndrome: `ST_CLEAN`;
  * a hit with one bit: `ST_CE_SINGLE`;
  * a hit with 3, 5, ... bits: `ST_CE_BYTE`;
  * no hit: `ST_UE`. This covers every even syndrome, and also odd syndromes
    that no byte claims. Those occur in shortened codes and in C2 and C3
    codes; a full-length C1 code claims every odd syndrome.

At most one byte can claim a syndrome. An immediate assertion checks this.

What is *not* promised: errors that span several bytes with an odd total
weight of 3 or more. These can alias to a correctable syndrome and be
miscorrected, as with any SEC-DED code.

## Modules

All modules take `B`, `R`, `K`, `BALANCED` and `C3_I_ABOVE`. The defaults
are 4, 8, 14, 1, 0.
Data byte *j* is `data[j*B +: B]`, and check/syndrome bit *i* belongs to row
*i* of `H`.

| file | function | timing |
|---|---|---|
| `rtl/sbd_pkg.sv` | construction functions (`construction`, `kmax`, `min_check_bits`, `candidate`, `select_bytes`, `check_byte_mask`), `status_e` | elaboration only |
| `rtl/sbd_encoder.sv` | check-bit generator: each byte adds `parity(byte) * h_j` plus the byte on its identity rows | combinational |
| `rtl/sbd_syndrome_gen.sv` | syndrome = check bits re-encoded from the received data, XOR received check bits (a second encoder instance) | combinational |
| `rtl/sbd_syndrome_decoder.sv` | syndrome → error mask, verdict, corrected byte index | combinational |
| `rtl/sbd_decoder.sv` | syndrome generator + syndrome decoder + XOR correction of data and check bits | combinational |
| `rtl/sbd_ecc_codec.sv` | top: registered write path (encode) and read path (check/correct) | 1 clock each way, one word per clock |

`sbd_ecc_codec` ports:

* **write path:** `wr_valid`, `wr_data[B*K]` go in; `mem_wr_valid`,
  `mem_wr_data`, `mem_wr_check[R]` come out one clock later.
* **read path:** `mem_rd_valid`, `mem_rd_data`, `mem_rd_check` go in;
  `rd_valid`, `rd_data` (corrected), `rd_check` (corrected), `rd_syndrome`,
  `rd_status`, `rd_err_byte` come out one clock later. `rd_err_byte` counts
  data bytes `0..K-1`, then the check bytes. On `ST_UE` the data pass through
  uncorrected.
* `rst_n` is a synchronous, active-low reset that clears only the two valids.

At the default size the top has 144 flip-flops. The syndrome decoder is one
R-bit comparator per byte.

Illegal parameter sets stop elaboration with `$error`. These are `R < B+2`,
`B < 3`, and `K` above the maximum for the construction. The package handles
`R` up to 24 and up to 512 candidate bytes, which covers every size in the
table above.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`:

| testbench | what it shows |
|---|---|
| `tb/tb_sbd_encoder.sv` | Default-code check bits match the published (64, 56) matrix for all unit vectors and 2000 random words. C1/C2/C3 instances (b=4 r=8 k=32; b=8 r=12 k=32 and 56; b=3 r=8 k=66; b=4 r=9 k=64) have odd, distinct columns and the byte structure; the 32-bit codes have densest rows of 13 and 17 ones. |
| `tb/tb_sbd_syndrome_gen.sv` | Syndromes of clean and corrupted words match the published matrix. |
| `tb/tb_sbd_syndrome_decoder.sv` | Default code, exhaustive over every odd and even pattern in each of the 16 bytes, all 2016 double errors, and all 255 nonzero syndromes. |
| `tb/tb_sbd_decoder.sv` | Encode, corrupt and decode for ten codes: C1, C2 and C3, full-length and shortened, both C3 block forms, and a C2 code whose middle region is wider than a byte. Exhaustive over in-byte patterns and double errors. It then sweeps all 2^R syndromes of each code. Every correction must be an odd flip inside one byte that yields a codeword. Full-length C1 codes must claim every odd syndrome; shortened codes must leave some uncorrected. |
| `tb/tb_sbd_ecc_codec.sv` | The top at its default size behind a behavioural memory (`tb/sbd_byte_memory.sv`). It writes 64 words, then streams 256 reads, one per clock. The reads inject clean, single data bit, single check bit, 3-bit data chip, 3-bit check chip, 2-bit chip, whole-chip (4-bit) and cross-chip double errors. It checks data, verdict, chip index and the one-clock latency, and requires every class to occur. |
| `tb/tb_sbd_examples.sv` | The complete unit (codec plus memory model) for six codes: (64, 56) b=4; its 32-bit shortening; b=3 r=8 with 66 data bits (C2); b=8 r=12 with 32 and 56 data bits (C3); and b=4 r=9 with 64 data bits. Reads are streamed with every error class injected (`tb/sbd_codec_stream.sv`). |
| `tb/tb_sbd_table.sv` | `min_check_bits` for b = 3..16, k = 16..256 (70 sizes), and the maximum lengths of the three constructions. |

`tb/sbd_ref_pkg.sv` holds the published (64, 56) matrix as an independent
reference. `tb/sbd_code_probe.sv`, `tb/sbd_roundtrip_probe.sv` and
`tb/sbd_codec_stream.sv` are parameterized helpers.

To run one with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/sbd_pkg.sv tb/sbd_ref_pkg.sv rtl/sbd_encoder.sv rtl/sbd_syndrome_gen.sv \
      rtl/sbd_syndrome_decoder.sv rtl/sbd_decoder.sv rtl/sbd_ecc_codec.sv \
      tb/sbd_byte_memory.sv tb/sbd_code_probe.sv tb/sbd_roundtrip_probe.sv \
      tb/sbd_codec_stream.sv \
      tb/tb_sbd_ecc_codec.sv --top-module tb_sbd_ecc_codec -Mdir obj
    ./obj/Vtb_sbd_ecc_codec

Replace the last file and the top name to run another testbench. Each one runs
in well under a second.

## What follows the code construction and what is this design's own

These follow the construction:

* the matrix structure and the three constructions;
* the maximum code lengths;
* the check-byte grouping;
* the correction and detection classes;
* the (64, 56) default matrix;
* the check-bit table.

These are choices made here:

* the enumeration order of the even-weight tuples, which reproduces the
  published example layouts;
* the greedy row-balancing rule for shortened codes;
* treating the middle check rows of a C2 code as one correction region, even
  when they span more than one chip;
* the decoder circuit itself, since the construction only proves that the
  syndromes are distinct;
* the status encoding and byte index;
* passing data through unchanged on an uncorrectable error;
* the one-clock registered wrapper with valid signals and reset.

The 32-bit shortened codes reach the published row weights, but with a
different choice of bytes than the published matrices. Any code of this class
can reorder its byte blocks freely.

These are not provided:

* the memory chips themselves (only a testbench model is included);
* the surrounding memory-interface device: multi-channel ports, scrubbing or
  error logging;
* the proposed extension techniques that lengthen the codes beyond `K_max`.
