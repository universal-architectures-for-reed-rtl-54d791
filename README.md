# Universal Reed-Solomon error-and-erasure decoder

A Reed-Solomon decoder whose code is not fixed in hardware. One circuit decodes
RS(n, k) codes over any Galois field GF(2^m) with m ≤ 8, defined at run time by
its primitive polynomial p(x), for any length n ≤ 2^m − 1 (so n ≤ 255) and up to
n − k = 32 parity symbols. It corrects up to 16 errors, or errors and erasures
together as long as 2·errors + erasures ≤ n − k and errors + erasures ≤ 16.
That covers, for example, the DVB-T and ITU J.83 A/B (204,188) code, J.83 D
(207,187), and the Blu-ray (248,216) and (62,30) codes, each with any primitive
polynomial of its degree.

What makes this possible is that every multiplication, constant or variable, is
done by one kind of multiplier that takes the field degree and the polynomial as
inputs: a bit-parallel Montgomery multiplier. Everything else follows from how
that multiplier behaves.

## The universal multiplier and the Montgomery domain

`uffm` computes the Montgomery product

    S = A · B · x^-m  mod p(x)

as an array of D = 8 rows. Each row adds a_i·B to a running sum, then adds
c·p(x), where c is the sum's lowest bit, which makes the sum divisible by x, and
shifts it right by one. Bit 0 of a row is a "Z" cell (forms c = s0 ⊕ a_i·b0); the
other bits are "Y" cells (s_out = s_in ⊕ a_i·b_j ⊕ c·p_j). p(x) enters as a
9-bit vector with its x^m bit set, so the same array reduces by any polynomial of
degree ≤ 8. For a field smaller than D, A is fed into the last m rows only: the
first D − m rows see zeros and do nothing, so the factor is x^-m, not x^-8, in
every field.

Because of that factor, the decoder keeps **every field element in Montgomery
form**, X' = X·x^m mod p(x). In that form the Montgomery product is an ordinary
product, (XY)' = uffm(X', Y'), and addition (XOR) is unchanged. There are only
two conversions:

* each received symbol enters as `uffm(R, x^2m)` = R·x^m;
* each error value leaves as `uffm(e', 1)` = e.

Multiplying by x (α, because α = x is the primitive element) and by x^-1 is
linear, so the α and α^-1 "generators" — a shift plus a conditional XOR with
p(x) — work on Montgomery values directly. Constant multipliers (syndrome
cells, Chien terms) are full `uffm` instances whose constant comes from a
register, because the constants depend on the field loaded at run time.

## Data flow

    rs_in ──┬─────────────────────────── rs_fifo (2 × 512 × 8) ───────────────┐
            │                                  │ second pass (n-k > 16)       │
            └─► rs_syndrome ◄──────────────────┘                              ▼
                 S1..S32, erasure locators ─► rs_kes ─► Λ, Ω ─► rs_chien ─► ⊕ ─► out_data

A codeword moves through three stages; different codewords occupy different
stages at the same time, with the two buffer banks alternating between them.

1. **Syndrome and erasure values** (`rs_syndrome`), one symbol per cycle,
   highest position first. 16 Horner cells compute S_i = R(α^i), i = 1..16.
   For n − k > 16 the codeword is read back from its bank for a second pass
   giving S17..S32 — unless S1..S16 were all zero, in which case the codeword is
   already known to be clean (fewer than 17 errors cannot hide behind 16 zero
   syndromes) and the second pass is skipped. In the first pass the locator
   α^j of each symbol flagged by `era` is stored, up to 16.
2. **Key equation** (`rs_kes`), see below.
3. **Chien search and Forney** (`rs_chien`) read the bank back in order and
   produce one error value per symbol, which is XORed onto it.

Two enables (`rs_enable`) sample per codeword: *RS_Enable1* takes `rs_en` at
the first symbol (when low the codeword passes through untouched and nothing is
computed for it); *RS_Enable2* is set when the codeword leaves stage 1 only if
its syndromes are not all zero, so clean codewords never wake stages 2 and 3.

## Key-equation solver

`rs_kes` runs the inversion-free Berlekamp-Massey algorithm with erasures,
initialised by the erasure locator, on a **serial datapath with three
multipliers**. A *pass* walks the coefficient index j = 0..16, one per cycle:

    Λ_j   ← γ·Λ_j + δ·A_j                  multipliers 1 and 2
    δnext ← δnext + Λ_j(new) · S_(r+1−j)     multiplier 3

A(x) holds x·B(x), the correction polynomial already shifted. The same step
does three jobs:

| pass | γ | δ | A afterwards | effect |
|---|---|---|---|---|
| 0 | 1 | 0 | x·Λ | nothing but the first discrepancy |
| 1..s | 1 | Z_k | x·Λ | Λ ← (1 + Z_k x)·Λ: erasure locator expansion |
| r = s+1..n−k | γ | Δ_r | x·Λold or x·A | one BM iteration |

In a BM pass, if Δ_r ≠ 0 and 2L ≤ r + s − 1 the length becomes r + s − L, B
becomes the old Λ and γ becomes Δ_r; otherwise B is only shifted. The
discrepancy of the next pass is accumulated on the fly, from the new
coefficients as they come out. After the last pass, 16 shorter passes use
multiplier 3 to form the evaluator Ω_i = Σ Λ_j·S_(i+1−j), i = 0..15 (that is,
S(x)Λ(x) mod x^(n−k)). Λ and Ω carry the same unknown nonzero factor (the
algorithm avoids inversions), which cancels in the error value.

A pass walks only the indices that can be nonzero: up to p + 1 in erasure pass
p, and up to max(L, r + s − L) + 1 (at most 16) in BM pass r; the Ω sums stop
at min(i, L). The solve time therefore follows the error pattern: about 215
cycles for 8 errors with n − k = 16, about 475 for 16 errors with n − k = 32,
and never more than 699. The solver reports failure for more than 16 or more than
n − k erasures, or when the locator degree exceeds 16.

## Chien search and error values

`rs_chien` visits positions j = n−1 down to 0, in the order the symbols leave
the buffer, and evaluates Λ at X^-1 = α^-j. To keep every step multiplier's
constant small it splits the locator:

    Λ(α^-j) = Λ0 + Σ_{i=1..8} Λ_i α^-ij + α^-8j · Σ_{i=1..8} Λ_(8+i) α^-ij

so 16 term registers step by α^1..α^8 and one shared register F = α^-8j
multiplies the sum of the upper eight. Odd and even terms are summed apart,
giving Λ_odd(X^-1) (which equals X^-1·Λ'(X^-1)) and the zero test. Terms are
loaded as Λ_i·β^i with β = α^-(n-1), so the first evaluation is position n−1.

The error value is Forney's formula in the form

    e = [ Σ_{k=1..16} Ω_(k−1) X^-k ] / Λ_odd(X^-1)

with the numerator built from 16 more term registers in the same split form.
The division is a table lookup: Λ_odd addresses the inversion table and one
more multiplier forms the product. Results follow each step by exactly two
cycles. At the end, the codeword is flagged (`dec_error`) if the number of roots
found differs from deg Λ or a root had Λ_odd = 0.

## Inversion table built on the fly

`rs_inv_table` is a 256 × 8 RAM holding V' → (V^-1)' for the current field. It
is not loaded from outside: after each field definition an α generator walks
the address through α^0, α^1, … while an α^-1 generator walks the data through
α^0, α^-1, …, writing mem[α^k] = α^-k for all 2^m − 1 nonzero elements (plus
mem[0] = 0), in 2^m cycles. Afterwards the address multiplexer gives the RAM to
the error evaluator.

## Interface

All ports are synchronous to `clk`; `rst_n` is an asynchronous active-low reset.

**Definition.** With the decoder empty, pulse `rs_def` with `def_m` (2..8),
`coe` (the coefficients of p(x) below x^m; p(0) must be 1), `def_n`
(≤ 2^m − 1) and `def_nk` (1..32, even for a t-error code). `rs_field_cfg`
derives all constants (x^m, x^2m, α^1..α^32, α^(n−1), β^1..β^8 in Montgomery
form) in 271 cycles, then the inversion table fills in 2^m cycles. `cfg_busy` is
high for that time (about 530 cycles for m = 8). After reset the definition is
m = 8, p(x) = x^8+x^4+x^3+x^2+1, n = 255, n − k = 32, but the constants are only
valid after a first `rs_def`.

**Input.** A codeword is n symbols, highest position (R_(n−1)) first. A symbol
is taken on a cycle with `rs_valid && rs_ready`; the first one must carry
`rs_sync` (a symbol without it is dropped while the decoder waits for a
codeword). `era` marks an erased symbol; `rs_en` is sampled with the first
symbol. Within a codeword `rs_ready` stays high, one symbol per cycle; between
codewords it is low while no buffer bank is free or a second syndrome pass runs.

**Output.** The n corrected symbols in the same order, on consecutive cycles
with `out_valid`; `out_sync` marks the first, `out_err` is the error value that
was applied. `dec_done` comes with the last symbol, and `dec_error` with it
flags an uncorrectable codeword (its symbols are then output with whatever
correction the Chien search found; when the solver itself failed, uncorrected).

**Rate.** Input is one symbol per cycle inside a codeword. A codeword holds a
buffer bank from its first input symbol to its last output symbol, and with two
banks three stages overlap only partly, so the sustained rate depends on the
slowest stage: in a burst of codewords that all need decoding, one (204,188)
codeword comes out every 217 cycles (the key equation, ~215 cycles, is the
limit; about 0.94 symbols per cycle), and one (255,223) codeword every 514
cycles (the two syndrome passes, 2n cycles, are the limit). Codewords with zero
syndromes skip the key equation.

## Scope and departures

* Only the m ≤ 8 configuration exists. A wider variant (m ≤ 10, as needed for
  the (526,518) code over GF(2^10) used in flash memory) would need D = 10,
  wider ports and a larger table; the RTL is not parameterised for it.
* Extended codes such as the (128,122) code over GF(2^7) of ITU J.83 C need
  n = 2^m and are not supported; (127,121) is.
* The key-equation solver is serial; for t = 8 codes it takes slightly longer
  than the 204-symbol block, so the sustained rate is about 0.94 symbol per
  cycle rather than one, and the worst case (many erasures in a 32-parity
  code) is slower than the block.
* The syndrome stage uses 16 uniform Horner cells with register constants
  instead of a dedicated constant-multiplier structure, and all constant
  multipliers are full universal multipliers; the gate count is therefore
  higher than a design with optimised constant multipliers.
* The SRAMs are written as arrays (`rs_sram`); a memory compiler macro would
  replace them. Of each 512-word bank only n words are used.
* Failure detection is the usual one (root count, Λ_odd = 0, degree and
  erasure limits); patterns far beyond the capability can still miscorrect.

## Files

| file | contents |
|---|---|
| `rtl/rs_pkg.sv` | sizes, element and definition types, ×x and ×x^-1 steps |
| `rtl/uffm.sv` | universal Montgomery multiplier |
| `rtl/rs_field_cfg.sv` | definition register and constant generator |
| `rtl/rs_syndrome.sv` | syndrome and erasure-value calculator |
| `rtl/rs_kes.sv` | erasure expansion and key-equation solver |
| `rtl/rs_chien.sv` | Chien search, Forney evaluator |
| `rtl/rs_inv_table.sv` | on-the-fly inversion table |
| `rtl/rs_fifo.sv`, `rtl/rs_sram.sv` | two-bank codeword buffer, RAM |
| `rtl/rs_enable.sv` | per-codeword enable |
| `rtl/urs_code.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_gf_pkg.sv` holds plain GF reference arithmetic and an RS encoder |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself
(each has a watchdog). Each compares with values computed independently in
plain (non-Montgomery) arithmetic. For example, the end-to-end test:

    verilator --binary --timing -Wno-fatal rtl/rs_pkg.sv rtl/*.sv \
        tb/tb_gf_pkg.sv tb/tb_urs_code.sv --top-module tb_urs_code
    ./obj_dir/Vtb_urs_code

`tb_urs_code` runs the top at its default size with eight code definitions
(m = 4, 6, 7, 8, two polynomials for m = 8, n − k from 6 to 32), random
messages and random error/erasure patterns up to the limits, RS_EN-off
codewords, a codeword with 17 erasures (must be flagged) and one with 17 errors
(must not come out clean). It checks every output symbol, the one-symbol-per-
cycle input rate, and that each mechanism occurred: second syndrome pass and its
early stop, no-error bypass, RS_EN bypass, erasure decoding, erasure overflow,
input stalls, corrections. The unit testbenches check the multiplier against a
shift-and-add reference over whole fields, the constants and table contents
for several fields, the locator and evaluator polynomials and the solver's
cycle count, and the Chien stage's error values and two-cycle latency.
