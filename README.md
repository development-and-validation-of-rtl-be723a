# Three-parallel syndrome block for the RS(15,11) Reed-Solomon decoder

The first stage of a Reed-Solomon decoder computes the syndromes of the
received word: the received polynomial evaluated at each root of the code's
generator polynomial. If every syndrome is zero, the word is a codeword. If
any is non-zero, the later decoder stages use the syndromes to find and fix
the errors. A symbol-serial syndrome circuit takes one symbol per clock, so it
needs n clocks per word. This design takes three symbols per clock. It
evaluates the polynomial with a three-step Horner recurrence, so a 15-symbol
word takes 5 clocks instead of 15.

The default configuration is the RS(15,11,2) code used for DVB-T:

| quantity | value |
|---|---|
| symbol width m | 4 bits, GF(2^4) |
| primitive polynomial | 1 + X + X^4 |
| code length n / message length k | 15 / 11 |
| correctable errors t | 2 |
| syndromes 2t | 4: S0, S1, S2, S3 |
| generator g(x) | (x+α^0)(x+α^1)(x+α^2)(x+α^3) |
| symbols per clock P | 3 |
| clocks per word | 5 |

## The three-parallel Horner recurrence

Write the received word as r(x) = r14 x^14 + ... + r1 x + r0. Symbols arrive
highest degree first. Syndrome S_j is r(β) with β = α^j. Grouping three
coefficients per step gives

    S_j = (((r14 β^2 + r13 β + r12) β^3 + r11 β^2 + r10 β + r9) β^3 + ...) β^3
          + r2 β^2 + r1 β + r0

Each clock is one step of this recurrence:

    acc <- acc * β^3  +  a * β^2  +  b * β  +  c

Here (a, b, c) are the three symbols of the beat, highest degree first. On the
first beat, (a, b, c) = (r14, r13, r12). On the fifth beat, (a, b, c) = (r2, r1, r0).
After the fifth beat, acc holds S_j.

All factors β, β^2 and β^3 are constants of the cell, so every product is a
constant multiplication in GF(2^4). A constant multiplication is linear over
GF(2), so it needs no multiplier array. It is a small XOR network: output bit
i is the XOR of the input bits picked out by a fixed 4x4 bit matrix. Column k
of that matrix is the constant times X^k, reduced modulo 1 + X + X^4. The
matrix is computed while the design elaborates. Addition in GF(2^m) is a
bitwise XOR. So a cell is four XOR matrices (one of them the identity, for the
lowest-degree symbol) and a 4-bit register.

On the first beat of a word, the cell feeds zero into the recurrence in place
of the old accumulator. The next word can therefore start on the clock after
the previous one ends, with no clear cycle in between.

## Modules

| file | module | role |
|---|---|---|
| `rtl/rs_pkg.sv` | package `rs_pkg` | code constants; `gf_mul` and `gf_alpha_pow`, used only to compute constants during elaboration |
| `rtl/gf_const_mult.sv` | `gf_const_mult` | `y = a * COEF` in GF(2^M), combinational XOR matrix |
| `rtl/syndrome_cell.sv` | `syndrome_cell` | one syndrome: the P-parallel Horner recurrence, accumulator and output register |
| `rtl/syndrome_block.sv` | `syndrome_block` (top) | beat counter and one cell for each of S0..S3 |

The hierarchy is `syndrome_block` → 4 × `syndrome_cell` → (P+1) ×
`gf_const_mult`. At the defaults, each cell holds a 4-bit accumulator and a
4-bit output register. The top adds a 3-bit beat counter and a valid bit. That
is 36 flip-flops in all, plus a few hundred XOR gates.

## Interface and timing of `syndrome_block`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | a beat of P symbols is on `in_sym` |
| `in_sym` | in | P×M (3×4) | `in_sym[0]` is the highest-degree symbol of the beat |
| `syn` | out | NSYN×M (4×4) | `syn[j]` = S_j = r(α^(ROOT0+j)) |
| `syn_valid` | out | 1 | one-clock pulse when `syn` holds a new result |

- A word is N/P = 5 accepted beats. A beat is accepted on a clock edge when
  `in_valid` is high.
- `in_valid` may drop between any two beats, for any number of clocks. The
  block simply waits. There is no back-pressure: the block accepts every beat.
- There is no start-of-word signal. A beat counter counts accepted beats
  modulo 5. Words must therefore start aligned: the first beat after reset
  begins a word.
- `syn` and `syn_valid` are registered. They change on the clock edge after
  the edge that accepts the last beat. Without idle clocks, `syn_valid` rises 5
  clocks after the first beat is presented, which is the sixth clock of the
  operation.
- `syn` keeps its value until the next word completes.
- Back-to-back words give one result every 5 clocks, with a throughput of
  3 symbols per clock.
- Reset clears the counter, the accumulators, `syn` and `syn_valid`.

Two assertions in `syndrome_block` check that all four cells report together
and that `syn_valid` only ever follows an accepted last beat.

## Parameters

Every module takes the field and code as typed parameters. The defaults come
from `rs_pkg`.

| parameter | default | meaning |
|---|---|---|
| `M` | 4 | bits per symbol (the helper functions support up to 16) |
| `POLY` | `17'h13` | primitive polynomial, bit i = coefficient of X^i, X^M included |
| `N` | 15 | symbols per word. Must be a multiple of `P` and below 2^M |
| `NSYN` | 4 | number of syndromes (2t) |
| `P` | 3 | symbols per clock |
| `ROOT0` | 0 | exponent of the first generator root |

Other standard primitive polynomials can be used. Examples: m=3 `'h0B`,
m=5 `'h25`, m=6 `'h43`, m=7 `'h89`, m=8 `'h11D`. A parameter set that breaks the
`N % P == 0` rule stops elaboration with an error.

## What follows the source architecture and what is this design's own

These parts follow the published three-parallel syndrome block:
- the code (RS(15,11), GF(2^4), 1 + X + X^4, generator roots α^0..α^3);
- three symbols per clock, highest degree first, with (r14, r13, r12) on the
  first clock;
- the per-clock recurrence with factors β^2, β and β^3;
- four syndromes S0..S3;
- five clocks per word.

These parts are this design's own choices:
- **Syndrome indexing.** The source writes the syndrome equation once with
  i = 1..2t. It defines the generator with roots α^0..α^3 and names the
  outputs S0..S3. This design follows the generator: S_j = r(α^j) for
  j = 0..3. To shift the roots, set `ROOT0`.
- **Iteration count.** The source gives both 5 and 6 iterations for the
  parallel circuit. Here the design takes 5 input beats, and the result
  appears on the clock after the last one.
- **Handshake and framing.** The `in_valid` qualifier, the internal beat
  counter and the lack of a start-of-word input are not from the source.
- **No clear cycle between words.** Zero is fed into the recurrence on a
  word's first beat, and the result is held in its own output register.
- **Reset.** Reset is synchronous and active low.
- **Multipliers.** The constant multipliers are built as elaboration-time XOR
  matrices.

Not included:
- the later decoder stages that use the syndromes (error locator, Chien
  search, error values);
- the symbol-serial reference circuit that the parallel block is compared with;
- any FPGA board harness.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. Each one also has
a watchdog that counts a failure and ends the run if the simulation hangs.

The reference model is `tb/rs_ref_pkg.sv`. It is written differently from the
RTL:
- multiplication uses log/antilog tables;
- syndromes are computed as the direct sum S_j = Σ r_k α^(jk);
- a systematic encoder divides by g(x) to produce true codewords.

- `tb_gf_const_mult` checks every constant (0..15) against every input (0..15).
  That is 256 products.
- `tb_syndrome_cell` runs four cells (roots α^0..α^3) on 300 random and
  all-zero words. It adds random idle clocks and sets random framing bits
  during idle clocks. It checks every syndrome, the one-clock `syn_valid`
  pulse, and that `syn` holds its value between results.
- `tb_syndrome_block` runs the top with no parameter overrides on 400 words:
  - clean codewords, which must give all-zero syndromes;
  - codewords with one or two symbol errors;
  - random words.

  The words are sent with idle clocks inside them, back to back, and with
  gaps. The testbench checks every syndrome and the 5-clock latency of
  unstalled words. It also checks that back-to-back words give results 5
  clocks apart. It counts each of these cases and fails if any of them never
  happened.

- `tb_syndrome_block_rs255` sets the top's parameters for 255-symbol words
  over GF(2^8): polynomial 1 + X^2 + X^3 + X^4 + X^8, 16 syndromes, 85 clocks
  per word. It runs 60 RS(255,239) words, clean, with up to eight symbol
  errors, or random. It checks every syndrome and the 85-clock latency.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Wall -Wno-fatal \
      rtl/rs_pkg.sv rtl/gf_const_mult.sv rtl/syndrome_cell.sv rtl/syndrome_block.sv \
      tb/rs_ref_pkg.sv tb/tb_syndrome_block.sv --top-module tb_syndrome_block -o sim
    ./obj_dir/sim

To run the other testbenches, swap in their files. `tb_gf_const_mult` needs
only `rs_pkg`, `gf_const_mult` and `rs_ref_pkg`. Each run takes well under a
second.
