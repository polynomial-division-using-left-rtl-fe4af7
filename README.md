# Polynomial division over GF(2) with a left shift register

This RTL computes remainders of binary polynomials, `f(x) mod p(x)`, and
modular products, `f(x) g(x) mod p(x)`. It uses a shift register whose wiring
does not depend on the divisor. The usual LFSR divider hard-wires the
coefficients of `p(x)` into its feedback taps. This circuit instead keeps them
in a register `P`, so dividing by another polynomial of the same degree only
means loading a new value. The same datapath also serves as:

- a modular multiplier in which both operands are arbitrary;
- a GF(2^n) standard basis multiplier;
- the divider inside a systematic cyclic code encoder and a syndrome generator.

The method is the one in the note *Polynomial Division Using Left Shift
Register*. Where this RTL fills in details the method leaves open, the choice
is listed in "Departures and choices" below.

All arithmetic is over GF(2): addition is XOR. A polynomial of degree below
`n` is an `n`-bit vector. Bit `i` holds the coefficient of `x^i`.

## The MOD circuit

`p(x) = x^n + a_(n-1) x^(n-1) + ... + a_0` is monic of degree `n`. The
circuit (`rtl/mod_circuit.sv`) has three `n`-bit registers:

| register | holds |
|---|---|
| `P` | `a_(n-1) .. a_0`, which is also `x^n mod p(x)` |
| `C` | `t = x^(n+i) mod p(x)`, the current power of `x` reduced mod `p` |
| `R` | the remainder being accumulated |

The core fact: multiplying a reduced polynomial `t` by `x` and reducing it
again costs one left shift and at most one XOR with `P`. Shift `t` left by
one place. If the bit that falls out of the top (the coefficient of `x^n`) is
1, replace that `x^n` by `x^n mod p(x) = P`, i.e. XOR `P` into the shifted
value. In the source's terms, `C` is an `(n+1)`-cell register whose leftmost
cell catches the bit shifted out. That cell is only used within its own
cycle, so here it is a wire and `C` has `n` flip-flops.

**Algorithm A, `f(x) mod p(x)`**, for `f` of degree `m >= n`:

1. Set-up cycle: `C <= P` (that is, `x^n mod p`) and `R <= f_(n-1) .. f_0`.
   The low coefficients of `f` are already reduced.
2. For `i = 0 .. m-n`, one cycle each, with coefficient `f_(n+i)` on the
   serial input:
   - if `f_(n+i) = 1`, then `R <= R ^ C`;
   - at the same time, `C <= x*C mod p`.

After `m-n+1` cycles, `R = f mod p`. An LFSR divider needs `m+1` cycles,
because it must also clock in the `n` low coefficients. Here those
coefficients are loaded in parallel.

The source describes each step as a two-phase cycle: shift `C` and add `C`
into `R` on the high phase, then add `P` into `C` on the low phase. This RTL
folds both phases into one rising-edge update with the same XORs: `n` for
`R + C` and `n` for `C + P`. Note that `R` takes the value `C` had *before*
the shift, as step 2 requires.

The cost is 3n flip-flops, 2n XOR gates, plus the input multiplexers. An LFSR
divider needs n flip-flops and at most n XORs. The extra area buys a divisor
that can change at run time and operands that are not wired into the
circuit.

## Modular multiplication: algorithm B

To get `f(x) g(x) mod p(x)` for arbitrary `f`, `g` of degree at most `m`
(`rtl/polymod_mul.sv`):

1. **Phase one** (`m-n+1` cycles) runs algorithm A, leaving `h = f mod p` in
   `R`.
2. **Turn-around cycle** (1 cycle), with `g_0` on the serial input:
   - `C <= x*h mod p`: `R` goes through the same shift/add-`P` logic on its
     way into `C`;
   - if `g_0 = 0`, then `R <= 0`; otherwise `R` keeps `h`, which is `g_0*h`.
3. **Phase two** (`m` cycles), with `g_1 .. g_m` on the serial input: the
   same step as phase one. Step `j` adds `x^j h mod p` into `R` when
   `g_j = 1`.

Afterwards, `R = sum_j g_j x^j h mod p = f g mod p`. The total is
`2m-n+2` cycles after the set-up cycle.

The tricky point is the turn-around cycle. The step adds `C` into `R` and
only then advances `C`. If `h` itself were copied into `C`, the first
phase-two step would add `h` for `g_1` instead of `x*h`, so every term would
be one power short. Loading `x*h` fixes this at no cost in cycles. The
datapath for this is one multiplexer in front of the shift/reduce logic,
selecting `R` or `C`.

### Serial coefficient interface

`polymod_mul` asks for one coefficient per busy cycle and reads it from
`coef_in` in the same cycle. Three outputs say which coefficient it wants:

- `coef_req`: a coefficient is consumed this cycle;
- `coef_is_g`: the coefficient is `g_idx` (otherwise `f_idx`);
- `coef_idx`: the index.

The order is `f_N .. f_M`, then (for `op_mul = 1`) `g_0 .. g_M`. A source
that already streams coefficients in that order can ignore the index. A
source that holds the operands in a register can use the index as a
multiplexer select, as the testbenches do.

```
cycle      0        1 .. M-N+1          M-N+2      M-N+3 .. 2M-N+2     next
           start    f_N .. f_M          g_0        g_1 .. g_M          done=1
op         INIT     STEP                LOAD_C     STEP                result valid
busy       0        1                   1          1                   0
```

With `op_mul = 0` the unit stops after the `f_M` step: it is busy for
`M-N+1` cycles. `done` is a one-cycle pulse. `result` stays valid until the
next `start`. `start` and `p_load` are only allowed while idle. Assertions
flag a violation in simulation.

## GF(2^n) standard basis multiplier

With `p(x)` irreducible of degree `n` and `alpha` a root, an element is
`f_0 + f_1 alpha + ... + f_(n-1) alpha^(n-1)`. The product of two elements is
`f(x) g(x) mod p(x)` evaluated at `alpha`. `rtl/gf_mult.sv` computes it with
`polymod_mul` at `M = N`: the operands are treated as degree-`n` polynomials
whose top coefficient is 0. That makes the time `2n-n+2 = n+2` cycles:

| cycles | input |
|---|---|
| 1 | `f_n = 0` |
| 1 | `g_0` |
| `n` | `g_1 .. g_n`, where `g_n = 0` |

Operand `a` goes straight into `R` at `start`. Operand `b` goes into a shift
register that presents `g_0`, `g_1`, ... on its bit 0 and shifts in zeros.

Neither operand affects the circuit's structure. Loading a different `p(x)`
into `P` switches fields. The circuit reduces modulo any monic `p(x)`; making
sure `p(x)` is irreducible is up to the user.

## Systematic cyclic codes

A generator `g(x)` of degree `r` and a data word `d(x)` of `K` bits give the
codeword `u(x) = d(x) x^r + r(x)`, where `r(x) = d(x) x^r mod g(x)`. The MOD
circuit consumes coefficients low order first. So, unlike an LFSR encoder,
this link sends bits in this order on the line:

```
d_0, d_1, ..., d_(K-1), r_0, r_1, ..., r_(R-1)
```

**Encoder** (`rtl/cyclic_encoder.sv`). The low `r` coefficients of
`d(x) x^r` are zero, so `R` starts at 0 and data bit `d_i` is coefficient
`f_(r+i)`. Each data bit is sent and fed to the divider in the same cycle, so
the data part leaves without delay. After the `K`-th bit, `R` holds `r(x)`.
In the first check-bit cycle:

- `R` is copied into a parity shift register;
- the MOD circuit is set up for the next word.

Codewords can therefore follow each other back to back, one every `K+R`
cycles. `in_ready` is low while check bits are sent. The output is registered
(one cycle after the input bit). `out_check` and `out_last` mark the check
bits and the last bit.

**Syndrome generator** (`rtl/syndrome_gen.sv`). The received word is
`v(x) = d'(x) x^r + r'(x)`. Its syndrome
`v mod g = (d' x^r mod g) + r'(x)` can be formed as the bits arrive:

- the data bits go through the divider;
- each check bit `r'_j` is XORed into bit `j` of `R`.

The last check bit is added on its way into the syndrome output register. In
that same cycle the MOD circuit is set up again, so there is no bubble
between words. `synd_valid` pulses one cycle after the last bit. `error` is
`syndrome != 0`. Error *correction* from the syndrome is not part of this
design.

## Modules

| file | module | role |
|---|---|---|
| `rtl/polydiv_pkg.sv` | `polydiv_pkg` | `mod_op_e`, the MOD circuit's per-cycle operations |
| `rtl/mod_circuit.sv` | `mod_circuit #(N)` | `C`, `R`, `P` and their update |
| `rtl/polymod_mul.sv` | `polymod_mul #(N, M)` | sequencer for algorithms A and B |
| `rtl/gf_mult.sv` | `gf_mult #(N)` | GF(2^N) multiplier, N+2 cycles |
| `rtl/cyclic_encoder.sv` | `cyclic_encoder #(K, R)` | systematic encoder, low order first |
| `rtl/syndrome_gen.sv` | `syndrome_gen #(K, R)` | syndrome and error flag |
| `rtl/polydiv_top.sv` | `polydiv_top #(N, M, GF_N, K, R)` | the four units side by side |

`polydiv_top` gives each unit its own MOD circuit and its own ports, with the
prefixes `mm_`, `gf_`, `enc_` and `syn_`. The encoder and syndrome generator
are meant for opposite ends of a serial link; the channel between them is
outside the top.

The MOD circuit's operations (`mod_op_e`):

| op | effect |
|---|---|
| `MOD_LOAD_P` | `P <= p_in` |
| `MOD_INIT` | `C <= P`; `R <= r_in` |
| `MOD_STEP` | if `bit_in`: `R <= R ^ C`; `C <= x*C mod p` |
| `MOD_LOAD_C` | `C <= x*R mod p`; if `!bit_in`: `R <= 0` |
| `MOD_ADD_R` | `R <= R ^ r_in` |

All blocks use one clock (rising edge) and an asynchronous, active-low reset
that clears every register.

Default sizes: `N = 8`, `M = 15`, `GF_N = 8`, and `K = 7`, `R = 8` (the
(15,7) BCH code, generator `x^8+x^7+x^6+x^4+1`). These are examples only:
the method is stated for any sizes. The divisor and generator polynomials are
loaded at run time. They are given without their leading 1, e.g. `8'h1B` for
`x^8+x^4+x^3+x+1`.

## Departures and choices

- **One clock edge instead of two phases.** The update is the same as the
  two-phase description; see "The MOD circuit".
- **`x*h` loaded at the turn-around of algorithm B**, instead of `h`. This
  keeps one step operation for both phases; see "Modular multiplication:
  algorithm B". The cycle count `2m-n+2` is the source's.
- **GF multiplier at `m = n`.** The element tuples have `n` coefficients.
  The stated `n+2` cycles only come out of `2m-n+2` with `m = n`, so the
  operands are padded with a zero top coefficient.
- **`f_m = 1` is not required.** Algorithm A is stated for `f_m = 1`, but any
  `f` of degree at most `M` works. `M` is a parameter, not a run-time input.
- **Design choices, not in the source:** all interfaces and handshakes, the
  operand and parity shift registers, the syndrome output register with its
  last-bit bypass, reset, and all default sizes.
- **Not built:** error correction after syndrome generation. The LFSR divider
  appears only as a point of comparison.

## Verification

Each testbench in `tb/` checks against a reference in `tb/polyref_pkg.sv`.
The reference uses schoolbook long division and carry-less multiplication on
64-bit vectors, independent of the shift-register method. Each testbench
prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `mod_circuit_tb` | every operation; `C` against `x^(n+k) mod p` after every step; `f mod p`, `f g mod p`, `ADD_R` for 300 random divisors |
| `polymod_mul_tb` | 400 operations in both modes; result, busy cycles (`M-N+1`, `2M-N+2`), done pulse, both values of `g_0`, divisor changes |
| `polymod_mul_wide_tb` | the same at `N = 16`, `M = 31` |
| `gf_mult_tb` | 600 products in two GF(2^8) fields, known products (`57*83 = C1` in the AES field), `N+2` busy cycles |
| `cyclic_encoder_tb` | data and check bits, codeword divisible by `g`, flags, input gaps, `K+R` cycles per word back to back, two generators |
| `syndrome_gen_tb` | clean words and words with 1–3 flipped bits, syndrome against `v mod g`, `error` flag, one-cycle latency, two generators |
| `polydiv_top_tb` | all four units at once at default sizes. The encoder output goes through a bit-flipping channel into the syndrome generator. It counts and requires each behaviour: both operations, `g_0 = 0` and `= 1`, divisor, field and generator changes, back-to-back codewords, clean and corrupted words |

To run one with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/polydiv_pkg.sv tb/polyref_pkg.sv tb/polydiv_top_tb.sv \
  --top-module polydiv_top_tb -o sim
./obj_dir/sim
```

Every test runs in well under a second. The top-level test runs the top at
its default parameters.

To change a size, override the parameters. For the `N`/`M` parameters of
`polymod_mul`, `M >= N` is required (checked at elaboration). The test
reference handles products up to degree 63. A larger test therefore needs a
wider `poly_t`.
