# BCH(255, 111, t = 18) decoder with an area-reduced syndrome calculator

A binary BCH code of length 255 over GF(2^8) that corrects up to 18 random bit
errors per codeword. The decoder follows the usual three steps: compute the
syndromes, find the error-locator polynomial with the Berlekamp-Massey
algorithm (BMA), and locate the errors with a Chien search. The main idea is
in the first step. Only a minimum set of syndromes is computed directly from
the received bits. All others are derived from them by *power operations*,
which are pure XOR networks. In a strong decoder (large t) this saves area,
because the syndrome calculator holds most of the per-bit hardware.

## Why most syndromes are free

The syndromes are S_i = r(alpha^i), for i = 1 .. 2t. The received polynomial
r(x) has 0/1 coefficients, and squaring is linear in GF(2^m). Therefore

    S_(2i) = r(alpha^(2i)) = r(alpha^i)^2 = S_i^2

and more generally S_(o * 2^k mod n) = S_o^(2^k). The indices 1 .. 2t split
into cyclotomic cosets {o, 2o, 4o, ...} (mod n = 255). Each coset needs only
one direct computation, for its smallest member, which is always odd.

* **Even syndromes.** Every even index lies in the coset of an odd index
  below it. This part is the well-known saving.
* **Odd syndromes.** Some odd indices also lie in the coset of a *smaller*
  odd index. For n = 255, t = 18:
  * 33 = 9 * 2^5 mod 255, so S_33 = S_9^32
  * 35 = 25 * 2^5 mod 255, so S_35 = S_25^32

  So 16 direct units (S_1, S_3, ..., S_31) serve all 36 syndromes, where a
  calculator that computes every odd syndrome directly needs 18.

The RTL does not hard-code this split. `syndrome_calculator` works it out at
elaboration from M and T using constant functions in `bch_pkg`
(`coset_o`, `coset_k`, `n_direct`, `direct_index`). It then instantiates one
`sc_direct_unit` per coset leader and one `gf_power` (x to x^(2^k)) for every
other syndrome. Each even syndrome is taken straight from its odd coset
leader in a single power unit, not through a chain of squarers.

The same fact changes the code itself. The generator polynomial g(x) has
degree 124, not m*t = 144, because alpha^17 has only four conjugates and
alpha^33, alpha^35 add no new roots. The nominal k = 111 follows from the bound
n - k <= m*t. The decoder never uses k: it corrects any word whose error
pattern has at most 18 bits, as long as S_1 .. S_36 of the transmitted word
are zero. The testbenches encode 111-bit messages with the degree-124 g(x).

## Datapath

```
 in_data (8 bits/clk) ──┬──► syndrome_calculator ──S_1..S_36──► ibma ──sigma──► chien_search ──e──┐
                        │                                                                        XOR ──► out_bit
                        └──► codeword_buffer ───────────────────────────────────────────── r ──────┘
```

| module | role | size at defaults |
|---|---|---|
| `bch_pkg` | code parameters; GF(2^8) helpers as constant functions | - |
| `gf_power` | y = x^(2^K), an 8x8 XOR matrix | combinational |
| `sc_direct_unit` | S_I by Horner's rule, P = 8 bits per clock | 8 flip-flops |
| `syndrome_calculator` | 16 direct units plus 20 power units, and a word counter | 32 clocks per codeword |
| `ibma` | inversionless simplified BMA, one step per clock | 18 clocks |
| `chien_search` | serial root search, one position per clock | 255 clocks |
| `codeword_buffer` | 32 x 8-bit array holding the received word | - |
| `bch_decoder` | top: FSM RECV, BMA, CHIEN, and the output XOR | - |

### Field and bit order

* Field elements are 8-bit vectors in polynomial basis: bit b is the
  coefficient of alpha^b.
* The primitive polynomial is x^8 + x^4 + x^3 + x^2 + 1 (`BCH_POLY = 9'h11D`).
  This is a choice of this design; any primitive polynomial works through
  the `POLY` parameter.
* The codeword enters highest degree first: ceil(255/8) = 32 words.
  * Bit b of word w carries degree (31 - w) * 8 + b.
  * Degree 255 (word 0, bit 7) is padding and must be 0.
* The corrected codeword leaves one bit per clock, from degree 254 down to 0.

### Syndrome units

`sc_direct_unit` computes acc <- acc * alpha^(I*8) + sum_b din[b] * alpha^(I*b).
Both terms are multiplications by constants, so each is a fixed XOR network
built at elaboration. The `first` input drops the old accumulator, so
codewords can follow each other with no clear cycle. The power units read the
direct accumulators combinationally. All 36 syndromes are valid when `done`
pulses, one clock after the 32nd word is taken, and they hold until the next
codeword starts.

### Inversionless BMA

For a binary code every other discrepancy is zero, so t = 18 steps suffice.
Step k uses S_(2k+1). The inverse of the earlier discrepancy is avoided by
scaling the running polynomial with gamma, the last nonzero discrepancy:

```
d      = sum_{i=0..L} sigma_i * S_(2k+1-i)
sigma' = gamma * sigma + d * B
if d != 0 and L <= k:  B <- x^2 * sigma,  L <- 2k+1-L,  gamma <- d
else:                  B <- x^2 * B
start: sigma = 1, B = x, L = 0, gamma = 1
```

B holds the correction polynomial already shifted by the x^2 of the skipped
odd step. The resulting sigma is the true error locator times a nonzero
constant, which leaves its roots unchanged. Each step uses 3 * 19 GF
multipliers in parallel, and each step takes one clock.

### Chien search and correction

lambda_j starts at sigma_j * alpha^j, and each clock multiplies it by the
constant alpha^j. In clock c the sum over lambda_j equals sigma(alpha^(c+1)).
A root alpha^i is the inverse of an error locator, so it marks bit position
255 - i. Starting the search at alpha^1 therefore produces positions 254, 253,
..., 0: the order in which the buffer is read. The top XORs each error flag
into the buffered bit.

A common shorthand says that a root alpha^i marks bit i. That holds only if
the error locator is defined with the locators themselves as roots. Here
sigma(x) = prod (1 + beta_l x) has the inverses as roots, so the position is
n - i. Anyone porting a different BMA must keep the two conventions
consistent.

## Interface and timing of `bch_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | a word is taken on a clock where both are high |
| `in_data` | in | P = 8 | received bits, as above |
| `out_valid` | out | 1 | corrected bit valid, for 255 consecutive clocks per codeword |
| `out_bit` | out | 1 | corrected bit, degree 254 first |
| `out_last` | out | 1 | degree 0 |

The decoder holds one codeword at a time. `in_ready` is high only in RECV,
and gaps in `in_valid` are allowed there. The output has no backpressure.
From the clock edge that takes the last word to the first `out_valid` is
T + 2 = 20 clocks:

* 1 clock for the last syndrome update
* 18 BMA steps
* 1 clock to load the Chien search

At 8 bits per clock with no gaps, one codeword takes 32 + 20 + 255 = 307
clocks. `in_ready` rises again in the clock after `out_last`.

## Parameters

All modules take `M`, `N`, `T`, `P` and `POLY` (where used), with defaults
from `bch_pkg`: 8, 255, 18, 8 and 9'h11D.

* The code parameters (m = 8, n = 255, t = 18) are the design's own.
* The parallel factor P = 8 is a choice of this design. Any P works, and
  `codeword_buffer` and the syndrome word counter follow ceil(N/P).
* Changing M needs a primitive polynomial of that degree in `POLY`.

## What is this design's own choice

The structure follows the standard decoder:

* a P-parallel syndrome calculator with power-operation derivation of the
  even syndromes and of the conjugate odd ones
* an inversion-free BMA
* a serial Chien search
* a buffer, and an XOR for the correction

These details are choices made here:

* the primitive polynomial and P = 8
* the exact inversionless BMA formulation, and its fully parallel
  one-step-per-clock datapath
* the Chien search order (starting at alpha^1 so the output is in input order)
* the handshake, and one-codeword-at-a-time operation
* the buffer organisation
* the reset style (asynchronous, active low)

There is no decoding-failure flag. A pattern of more than 18 errors produces
an arbitrary output word.

## Verification

Each testbench in `tb/` checks its module against `bch_ref_pkg`. That
package is an independent model:

* GF(2^8) through log and antilog tables built by stepping an LFSR
* syndromes evaluated from the definition
* a g(x) encoder
* random error patterns

| testbench | what it checks |
|---|---|
| `tb_gf_power` | K = 1, 2, 5, 7 on all 256 inputs, against repeated squaring |
| `tb_sc_direct_unit` | S_1, S_7, S_31 on random and corner words; 32 clocks per codeword |
| `tb_syndrome_calculator` | all 36 syndromes (including S_33, S_35) on random words and noisy codewords, with input gaps; `done` timing; zero syndromes for clean codewords |
| `tb_ibma` | 0 to 18 errors: degree = number of errors, a root at every error locator, 18-clock latency |
| `tb_chien_search` | exact error positions and order, 255 valid clocks, `out_last` |
| `tb_codeword_buffer` | write/read round trip, pointer restart |
| `tb_bch_decoder` | end to end at default parameters, described below |

`tb_bch_decoder` sends 40 codewords: 10 without errors, 10 with exactly 18
errors, and 20 with 1 to 17 errors. It also exercises input gaps, input held
off while the decoder is busy, and back-to-back codewords. It checks every
output bit and the 20-clock latency.

Every testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/bch_pkg.sv rtl/gf_power.sv rtl/sc_direct_unit.sv rtl/syndrome_calculator.sv \
    rtl/ibma.sv rtl/chien_search.sv rtl/codeword_buffer.sv rtl/bch_decoder.sv \
    tb/bch_ref_pkg.sv tb/tb_bch_decoder.sv --top-module tb_bch_decoder
./obj_dir/Vtb_bch_decoder
```

For a block testbench, replace the top module and file list with that
block's files.

Lint notes:

* `bch_decoder` leaves the `deg` output of `ibma` unconnected. The serial
  search does not need the degree, but `tb_ibma` checks it.
* Verilator reports `rst_n` as used both asynchronously (the flip-flops) and
  synchronously (the `disable iff` of the two handshake assertions). This is
  harmless.
