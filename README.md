# Memory protected by an EG-LDPC code with an early-stopping majority logic decoder

Soft errors flip memory cells without damaging them. A common defence is to
store every word with an error-correcting code and to correct the word on
every read. Euclidean-geometry LDPC (EG-LDPC) codes are attractive for this.
They correct many errors and suit word lengths close to a power of two. They
can also be decoded by *one-step majority logic*: a shift register, a few
XOR gates, a majority vote and one correction XOR.

The catch is time. A serial majority logic decoder handles one bit per clock,
so an N-bit word takes N cycles whether or not it holds an error. This design
removes most of that cost. While decoding the first three bits, the decoder
also watches every check equation. If none of them fails, the word is declared
error free and leaves after three cycles instead of N. Only words that really
hold errors go through all N iterations. For the codes used here, every
pattern of one to four bit errors makes some check fail within those three
iterations. So the shortcut never lets through a word with four or fewer
errors. The extra hardware is a single "error seen" flag and a comparison on
the iteration counter.

```
 wr_data --> eg_encoder --> codeword_memory --> mld_decoder --> rd_data
   (K bits)    (N bits)       (DEPTH words)       (serial, 3 or N iterations)
                                  ^
                     seu_* ------ +   (soft-error injection for test)
```

## The codes

The codes are built on the two-dimensional Euclidean geometry EG(2,2^s) over
GF(2^s). Its points are the 2^(2s) elements of GF(2^(2s)). A line through
points a and b is the set {a + β(b − a) : β ∈ GF(2^s)}, which holds 2^s points.
Codeword bit c_i stands for the point α^i, where α is a primitive element.
The origin is left out, so N = 2^(2s) − 1.

| s | N    | K   | J = 2^s checks per bit | errors corrected (J/2) |
|---|------|-----|------------------------|------------------------|
| 2 | 15   | 7   | 4                      | 2                      |
| 3 | 63   | 37  | 8                      | 4                      |
| 4 | 255  | 175 | 16                     | 8                      |
| 5 | 1023 | 781 | 32                     | 16                     |

Each check equation is the XOR of the bits on one line. The decoder uses the
J lines through the point α^(N−1) that do not pass through the origin. Any two
of these lines meet only in that point. So bit c_(N−1) is in all J equations
and every other bit is in at most one: the equations are *orthogonal* on
c_(N−1). For the default (15,7) code they are:

```
checks[0] = c0 ^ c2  ^ c6  ^ c14
checks[1] = c1 ^ c5  ^ c13 ^ c14
checks[2] = c3 ^ c11 ^ c12 ^ c14
checks[3] = c7 ^ c8  ^ c10 ^ c14
```

Three properties of these lines matter:

- **Every check line is a cyclic shift of one line.** The code is therefore
  cyclic, and the same J equations can decode every bit in turn as the word
  rotates.
- **No two ones of a line are the same cyclic distance apart.**
- **No distance between two ones is a multiple of 2^s + 1.** This and the
  previous property are why errors that escape the first iteration's checks
  hit other equations once the word has shifted.

The code is the set of words that satisfy every cyclic shift of line 0. Its
generator polynomial is g(x) = (x^N + 1) / gcd(x^N + 1, L*(x)), where L* is
line 0 with its bit order reversed. For s = 2 this gives
g(x) = 1 + x^4 + x^6 + x^7 + x^8, K = 7 and minimum distance 5.

All of this is computed at elaboration time by constant functions in
`rtl/mld_pkg.sv`: `eg_check_masks`, `eg_gen_poly` and `code_k`. They use
these primitive polynomials:

| s | primitive polynomial    |
|---|-------------------------|
| 2 | x^4 + x + 1             |
| 3 | x^6 + x + 1             |
| 4 | x^8 + x^4 + x^3 + x^2 + 1 |
| 5 | x^10 + x^3 + 1          |

For s = 2 the functions reproduce exactly the four equations above. For
s = 2 to 5 they give the K values in the first table. No table is stored.
The single parameter `S` selects the code everywhere; it defaults to 2.

## The serial decoder (`mld_decoder`)

```
        +--------------------------------------------------------+
        |                                                        |
        v                                                        |
  c0 <- XOR <- c14     shift register  c0 c1 c2 ... c14 ---------+
        ^                                  |   (bits on the lines)
        |                          check_xor_matrix (J XORs)
        |                                  |
        +---------------------------- majority_gate
```

An N-bit cyclic shift register holds the word. In every iteration:

1. `check_xor_matrix` forms the J check sums orthogonal on c_(N−1).
2. `majority_gate` outputs 1 when more than J/2 of them are 1.
3. The register shifts by one place: c_i ← c_(i−1), and
   c_0 ← c_(N−1) XOR majority. This XOR is the correction gate.

Why this corrects up to J/2 errors: suppose c_(N−1) is wrong and at most
J/2 − 1 other bits are wrong. Each other error sits on at most one of the
J lines. So at least J/2 + 1 checks fail and the bit is flipped. Now suppose
c_(N−1) is right. The errors can then spoil at most J/2 checks, which is not
a majority. Once corrected, a bit stays corrected for the rest of the decode.
After N iterations every bit has been under the vote once, and the word is
back in its original alignment.

### Early stop

During iterations 1 to `DETECT_ITERS` (3), the decoder ORs every check sum
into an "error seen" flag.

- **Flag clear after iteration 3:** decoding stops. The register has been
  rotated three places and nothing was flipped. It is rotated back by wiring
  and written to the output buffer with `err_detected = 0`.
- **Flag set:** decoding runs all N iterations and reports
  `err_detected = 1`.

Why three iterations are enough for up to four errors: iteration k looks at
the J lines shifted by k − 1 places, so three iterations cover 3J check sums.
For one and two errors the distance properties of the lines
rule out a pattern that leaves all of them even. For three and four errors
no general proof is known, and the claim rests on enumeration. It is checked exhaustively for
N = 15 in `tb_mld_decoder`. It also holds for every pattern of up to four
errors in the (63,37) code. For the larger codes `tb_eg_codes` checks it on
random patterns.

A word with more errors than the code can correct (three or four for the
(15,7) code) is still flagged. But it may come out miscorrected, and nothing
reports that. Five or more errors may even pass the early stop unnoticed. The decoder only promises correction up to J/2 errors.

### Timing

| event                          | cycle                         |
|--------------------------------|-------------------------------|
| `start` with `in_ready`        | 0 (word loaded)               |
| `out_valid`, error-free word   | DETECT_ITERS + 1 = 4          |
| `out_valid`, word with errors  | N + 1 (16 for N = 15)         |

`in_ready` is low while decoding and high again in the cycle `out_valid`
pulses. `code_out` and `err_detected` hold until the next result.

## The top level (`mld_memory_top`)

| port                                   | dir | meaning                                           |
|----------------------------------------|-----|---------------------------------------------------|
| `clk`, `rst_n`                         | in  | clock; asynchronous active-low reset of the control |
| `wr_en`, `wr_addr`, `wr_data[K]`       | in  | encode and store a data word                       |
| `rd_en`, `rd_addr`                     | in  | read request, taken when `rd_ready` is high        |
| `rd_ready`                             | out | no read in flight and the decoder is idle          |
| `rd_valid`                             | out | one-cycle pulse: result ready                      |
| `rd_data[K]`, `rd_code[N]`             | out | decoded data bits and the whole corrected codeword |
| `rd_err_detected`                      | out | a check failed in the first three iterations       |
| `seu_en`, `seu_addr`, `seu_mask[N]`    | in  | XOR `seu_mask` into a stored word (fault injection); tie `seu_en` low in use |

The encoder is systematic, so the data sits unchanged in `code[N-1:N-K]` and
the parity in `code[N-K-1:0]`. The memory answers a read one cycle after it is
accepted, and the decoder starts in that cycle. So `rd_valid` arrives
**5 cycles** after an accepted `rd_en` for a clean word, and **N + 2** cycles
after it (17 for the (15,7) code) for a word with errors. Only one read is in
flight at a time; a further `rd_en` waits for `rd_ready`. Writes are accepted
in any cycle, also while a word is being decoded.

Parameters of the top: `S` (code, default 2), `DEPTH` (words, default 16) and
`AW` (address width, `$clog2(DEPTH)`).

## Files

| file                      | contents |
|---------------------------|----------|
| `rtl/mld_pkg.sv`          | geometry, check lines, generator polynomial, code sizes, defaults |
| `rtl/check_xor_matrix.sv` | J check sums of the shift register |
| `rtl/majority_gate.sv`    | "more than half" vote over J inputs |
| `rtl/mld_decoder.sv`      | serial decoder with early stop and output buffer |
| `rtl/eg_encoder.sv`       | systematic encoder (unrolled division by g(x)) |
| `rtl/codeword_memory.sv`  | DEPTH × N storage with synchronous read and an upset port |
| `rtl/mld_memory_top.sv`   | encoder → memory → decoder |
| `tb/tb_*.sv`              | one self-checking testbench per module, plus `tb_eg_codes` |
| `tb/eg_code_runner.sv`    | helper used by `tb_eg_codes`: one top instance per code |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a fixed time if the design hangs.

- `tb_check_xor_matrix`: all 2^15 words, against the four equations listed
  bit by bit.
- `tb_majority_gate`: every input of a 4-input and an 8-input gate.
- `tb_eg_encoder`: all 128 data words. It checks that the data bits are in
  place and that the word is divisible by g(x). It checks that all 15 shifts
  of the check line are satisfied. It also checks that the minimum weight is 5.
- `tb_codeword_memory`: random writes, reads and upsets against a reference
  array, including same-address collisions.
- `tb_mld_decoder`: every error pattern of weight 0 to 4 on four codewords.
  Codewords are built as m(x)·g(x), independently of the encoder. It checks
  the output, `err_detected`, the 4- or 16-cycle latency and `in_ready`.
- `tb_mld_memory_top`: end to end at the default size, over 2000 rounds. It
  covers clean reads (early stop), 1- and 2-bit errors (corrected),
  3- and 4-bit errors (flagged), and errors built up from two separate upsets.
  It also covers reads held off by `rd_ready` and writes during a decode. It
  counts each of these and fails if one never happened.
- `tb_eg_codes`: the whole memory for s = 2, 3, 4 and 5. It checks K and J
  against the first table. It checks orthogonality and the cyclic-shift and
  distance properties of the computed lines. It checks early stop, correction
  of up to J/2 errors at latency N + 2, and detection of 1 to 4 errors.

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mld_pkg.sv tb/tb_mld_memory_top.sv --top-module tb_mld_memory_top
./obj_dir/Vtb_mld_memory_top
```

All testbenches finish in seconds. `tb_eg_codes` elaborates the code
construction for N = 1023, which takes Verilator a few seconds.

## What is given and what is chosen

The following come from the published description of the scheme:

- the chain of encoder, memory and majority logic decoder;
- the serial decoder built from a cyclic shift register, an XOR matrix of
  check equations, a majority circuit and a correction gate feeding c0;
- the four check equations of the (15,7) code;
- the early stop after three error-free iterations, and the claim that one to
  four errors are always caught in that time;
- the code family and its sizes (first table).

The following are this design's own choices:

- the geometric construction in `mld_pkg` that regenerates those equations
  and the larger codes, and its primitive polynomials;
- the generator polynomial, derived from the check line;
- the systematic bit placement;
- the "more than half" vote threshold (a tie does not flip);
- one load cycle and a registered output buffer, which give the 4 / N + 1
  decoder latency;
- the start / ready / valid handshake and the asynchronous reset;
- the memory: 16 words, one synchronous read and one write port,
  read-before-write, no reset of the array;
- the upset port used to model soft errors.

Not included:

- Corrected words are not written back, so the memory is not scrubbed. A
  word that was read with errors keeps them until it is rewritten.
- No signal tells a corrected word from one with more errors than the code
  can correct.
- The memory is a plain array, not a process-specific SRAM macro.
- The code is fixed when the design is built. Switching between codes of the
  family while running, to trade correction strength for speed, is not
  supported.
- Only the serial decoder is built. Two variants are sometimes distinguished:
  one forms XOR combinations and decides from them which bits to correct; the
  other computes from the codeword bits directly whether the current bit is
  correct. Neither is built as a separate decoder, and neither is the
  parallel form that decodes all bits in one cycle.
- The check equations come out in a different order from the usual listing,
  where each equation is the previous one shifted by the smallest amount that
  still covers the last bit. The order does not affect the result.

## Changing it

- **Code:** set `S` on `mld_memory_top` (or on any of the modules) to 3, 4 or
  5. Every width follows. `MAXN` and `MAXJ` in `mld_pkg` bound the largest
  code (s = 5). A larger s needs a primitive polynomial in `prim_poly` and
  larger bounds.
- **Detection window:** `DETECT_ITERS` on `mld_decoder`. With fewer than three
  iterations, some two- and three-bit errors of the (15,7) code go unnoticed.
- **Memory depth:** `DEPTH` on the top.
