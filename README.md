# Welch-Gong stream ciphers over polynomial bases

This SystemVerilog implements a parameterised family of Welch-Gong (WG) stream ciphers. A WG
cipher runs a word-oriented LFSR over the finite field GF(2^m). The newest LFSR word goes through
a nonlinear permutation of the field, the *WG permutation*. The absolute trace of the permuted word
gives one keystream bit. All field arithmetic uses a **polynomial basis**, so a single set of RTL
covers every field size from GF(2^5) to GF(2^16). Field size, field polynomial, LFSR length and
taps, decimation exponent, output bits per cycle and initialisation style are all parameters.

The defaults build WG-11:

- field polynomial f(x) = x^11 + x^2 + 1;
- 15 LFSR stages, holding a 165-bit state for an 80-bit key and an 80-bit IV;
- decimation exponent d = 203;
- the permutation built from multipliers and squarers;
- one keystream bit per clock.

The other published instances come from overriding parameters (see *Instances*).

```
             key/IV words (load)                    DWGP(s[L-1]) (init only)
                    |                                        |
   +----------------v-------------------------------------+  |
   | s[L-1] s[L-2] ...                   s[1] s[0]        |<-+-- feedback = g*s[0] + taps
   +---+--------------------------------------------------+
       | s[L-1]
       v
   x -> x^d -> +1 -> h() -> +1  = DWGP      Tr(DWGP) = keystream bit -> XOR text
```

## 1. Field arithmetic and bit order

Every field element is an M-bit vector. Bit i is the coefficient of alpha^i, where alpha is a root
of f(x). Parameter `POLY` holds f(x) as M+1 bits, with bit i the coefficient of x^i. For example,
x^11 + x^2 + 1 is `12'h805`.

- **`gf_mul`** forms the 2M−1-bit carry-less product of the two polynomials, then folds each high
  bit j ≥ M back using the precomputed row x^j mod f(x). The rows are computed while the design
  elaborates, so any f(x) works. This is the classic two-stage multiplier.
- **`gf_sqr`** is `gf_mul` with both inputs tied together. Synthesis reduces it to the sparse
  XOR network that squaring is in characteristic 2.
- **`gf_sqr_chain`** chains N squarers to give A^(2^N).
- Adding the field's unit element (`+1` in the permutation) flips bit 0.
- **`gf_trace`** computes the absolute trace Tr(A) = A + A^2 + A^4 + ... + A^(2^(M−1)), which is 0 or
  1. It has two forms, selected by `EQUATION`:
  - **Chain form** (`0`): builds the sum of squarer chains and returns bit 0.
  - **Equation form** (`1`): the trace is linear, so Tr(A) = XOR of those bits a_i for which
    Tr(alpha^i) = 1. The design computes this mask from f(x) while it elaborates. The hardware is
    then a single XOR of a few input bits. Synthesis tools tend not to discover this reduction in
    the chain form for fields of 13 bits and more.

## 2. Exponentiation by a constant (`gf_exp`)

A^d is needed twice: for the decimation d and, inside the permutation, for the inverse
A^-1 = A^(2^m − 2). `gf_exp` builds a fixed chain of squarers and multipliers. The functions in
`wg_pkg` plan the chain at elaboration time. The planner starts from T = d and works down to 1,
applying one rule per step:

| intermediate exponent T | step | cost |
|---|---|---|
| T = 2^(2n) − 1 | A^T = (A^(2^n−1))^(2^n) · A^(2^n−1), continue with 2^n − 1 | 1 multiplier, n squarers |
| T odd | A^T = A · (A^((T−1)/2))^2 | 1 multiplier, 1 squarer |
| T even | A^T = (A^(T/2))^2 | 1 squarer |

The hardware applies those steps in reverse order, starting from A. The first rule is an Itoh-Tsujii
style shortcut: 2^(m−1) − 1 is repeatedly halved in bit length. As a result, inversion in GF(2^11)
costs 4 multipliers rather than 9. For exponents without that structure the plan reduces to
ordinary square-and-multiply.

The generate loop `g_step` reads the kind of each step (`exp_kind_f`) and its size (`exp_n_f`) from
the planner. Its three branches are `g_sq`, `g_mula` and `g_kar`. Nothing recurses, so any fixed d
elaborates as a flat chain.

## 3. The decimated WG permutation and its trace

The WG permutation of GF(2^m) is

    WGP(A) = h(A + 1) + 1,    h(A) = A + A^r1 + A^r2 + A^r3 + A^r4,
    r1 = 2^k + 1,  r2 = 2^2k + 2^k + 1,  r3 = 2^2k − 2^k + 1,  r4 = 2^2k + 2^k − 1,

where k satisfies 3k ≡ 1 (mod m) (k = 4 for m = 11). The *decimated* permutation is
DWGP(A) = WGP(A^d), and the *WG transformation* is DWGT(A) = Tr(DWGP(A)). A decimation d coprime to
2^m − 1 keeps the map a permutation while changing its algebraic properties.

Evaluating five separate powers would be expensive. The design factors h instead:

    h(A) = A + A·( A^(2^k) + A^(2^2k)·A^(2^k) + A^(2^2k)·(A^-1)^(2^k) ) + A^-1·( A^(2^2k)·A^(2^k) )

In this form the expensive powers are Frobenius maps, which are only squarer chains, plus one
inversion. The work is split across blocks:

- **`wgp_simple`** produces A^(2^k), A^(2^2k), A^-1 and (A^-1)^(2^k) with squarer chains and a
  `gf_exp` for D = 2^m − 2.
- **`wgp_compose`** combines those terms with **four** multipliers. The product
  A^(2^2k)·A^(2^k) is shared between two terms.
- **`dwgp_comp`** connects the pieces: `gf_exp` (D = d) → `+1` → `wgp_simple` → `wgp_compose` → `+1`.
  With d = 1 the exponentiation collapses to a wire.
- **`dwgt_comp`** is `dwgp_comp` followed by `gf_trace`. It outputs both the permutation value
  and its trace.

At A = 0 the factored form gives 0, which matches the definition because both sides are 0. The
"inverse" of 0 computed by A^(2^m−2) is 0, and the factored form relies on that.

### Constant-array alternatives

For small fields a table is smaller than logic:

- **`dwgp_const`** stores all 2^m DWGP values.
- **`dwgt_const`** stores only the 2^m trace bits. Its output is 1 bit instead of m bits, which makes
  it much smaller than any DWGP.

Both tables are filled at elaboration by the package functions `wg_dwgp_f` and `gf_trace_f`. Each
generate iteration computes one entry, which keeps each constant evaluation small. There are no
data files. Elaboration time grows with 2^m: the 2048-entry WG-11 DWGT table takes tens of seconds
in current tools.

## 4. LFSR, feedback and phases

**Register (`wg_lfsr`).** This holds L words. s[0] is the oldest word and s[L−1] the newest, which
feeds the permutation. Each step shifts towards s[0] and appends new words at s[L−1]. The register
moves in one of three ways:

- `i_load`: shift in one key/IV word;
- `i_step1`: one step;
- `i_stepp`: P steps at once, taking the P future words computed by the feedback lanes.

At most one of the three may be active in a cycle; an assertion checks this. Reset is synchronous
and clears the state to zero.

**Feedback (`wg_lfsr_fb`).** The next word is

    s[L] = gamma·s[0] + sum over taps t of s[t]   (+ DWGP(s[L−1]) during initialisation)

Bit t of `TAPS` is the coefficient of x^t in the feedback polynomial l(x). `GAMMA` is the
constant term written as a field element. In every published instance gamma = omega, the
polynomial-basis element `2`, so the constant multiplication is a one-bit shift plus reduction.

**Sequencing (`wg_fsm`).** The controller moves through three phases, reported on `o_phase`:

1. **Load (`PH_LOAD`).** Accepts L words on `i_key_iv`, one per cycle with `i_valid` high. Cycles
   with `i_valid` low are waits.
2. **Init (`PH_INIT`).** Runs `INIT_ROUNDS` rounds (default 2·L) with the nonlinear feedback
   switched on. It advances every cycle without waiting for `i_valid`, so the latency is fixed.
3. **Run (`PH_RUN`).** Each cycle with `i_valid` high advances the LFSR by P words and outputs
   `o_text = i_text ^ keystream`, with `o_valid = 1`. A cycle with `i_valid` low stalls the cipher
   without losing state. Only `reset` leaves this phase; reset also starts the next key.

**Timing.** At the default parameters, the first keystream bit is available L + 2L = 45 cycles after
reset, provided every load cycle is valid. After that there is one bit per valid cycle. `o_text` and
`o_valid` are combinational from the state and from the same cycle's `i_text` / `i_valid`.

## 5. Several bits per cycle: lanes

With `P > 1`, `wg_cipher` unrolls the recurrence into P *lanes*. Lane j computes the future word
s[L+j] from a window of L words. That window is taken from the register and from the outputs of
lanes 0..j−1, so the feedback copies are chained. Lane j also filters word s[L−1+j] to produce
keystream bit j; bit 0 is the earliest in stream order. The two initialisation modes differ in
what the lanes contain:

- **`INIT_NORMAL`** (standard). Initialisation still runs one round per cycle, so only lane 0
  needs the full DWGP value for the nonlinear feedback. Lanes 1..P−1 need just a keystream bit and
  use a DWGT, by default the constant-array `dwgt_const`. Initialisation takes `INIT_ROUNDS` cycles;
  the running phase gives P bits per cycle. The register needs the extra multiplexer path for
  single steps.
- **`INIT_FAST`**. Every lane has a full DWGP followed by a trace. During initialisation, each
  lane's DWGP feeds its own feedback. The register then makes P rounds per cycle, and
  initialisation takes `INIT_ROUNDS / P` cycles. The cost is P DWGPs of area and P permutations in
  series on the critical path, so the clock frequency falls roughly as 1/P. `INIT_ROUNDS` must be a
  multiple of P. For WG-11 at P = 14 this means choosing a different count (42 is used in the
  tests); for WG-8 at P = 16, 48 would be needed.

P must not exceed L; an assertion checks this. Odd values of P are supported.

## 6. Instances

The defaults are WG-11. Override these parameters of `wg_cipher` for the other instances (all with
`GAMMA = 2`):

| Instance | M | POLY (f(x)) | L | TAPS (terms of l(x) besides x^L and gamma) | d | DWGP_IMPL | TRACE_EQ |
|---|---|---|---|---|---|---|---|
| WG-5 | 5 | `6'h3B` (x^5+x^4+x^3+x+1) | 32 | x^14,13,11,10,9,8,6,5,4,3,2,1 = `32'h6F7E` | 11 | const | 0 |
| WG-7 | 7 | `8'hEF` | 23 | x^12,10,9,8,7,6,3,2,1 | 63 | const | 0 |
| WG-8 | 8 | `9'h165` (x^8+x^6+x^5+x^2+1) | 20 | x^8,7,5,4,3,2,1 = `20'h1BE` | 19 | const | 0 |
| WG-10 | 10 | `11'h42D` | 16 | x^9,8,6,5,4,1 | 73 | const | 0 |
| **WG-11** | 11 | `12'h805` (x^11+x^2+1) | 15 | x^9,6,5,4,2 = `15'h0274` | 203 | comp | 0 |
| WG-13 | 13 | `14'h3A75` | 13 | x^7,4,3,1 = `13'h9A` | 195 | comp | 1 |
| WG-14 | 14 | `15'h6DBB` | 12 | x^7,5,4,3 | 47 | comp | 1 |
| WG-16 | 16 | `17'h155F5` | 10 | x^7,6,2 | 1057 | comp | 1 |
| WG-16, 256-bit key | 16 | `17'h155F5` | 32 | x^8,6,5,3,2,1 | 1057 | comp | 1 |

A decimation of `D = 1` gives the undecimated cipher. For every instance the DWGT lanes default to
the constant array (`DWGT_IMPL = IMPL_CONST`).

### Key and IV

The cipher receives L words of M bits, one per valid load cycle. The first word ends up in s[0]
and the last in s[L−1]. How the key and IV bits are arranged within those words is up to the user.
The tests use `{zero padding, IV, key}` split into M-bit words, least significant word first. For
WG-11 that is 5 zero bits on top of 80 IV and 80 key bits.

## 7. Simulation

Every testbench is self-checking. Each ends with a line `TB_RESULT checks=N failures=F` and has a
watchdog. The reference model in `tb/tb_gf_pkg.sv` is written independently of the RTL. It uses
bit-serial Horner multiplication, square-and-multiply exponentiation, and the five-power definition
of h.

| testbench | what it covers |
|---|---|
| `tb_gf_mul`, `tb_gf_sqr`, `tb_gf_exp`, `tb_gf_trace` | field blocks, exhaustively or randomly, several fields |
| `tb_wgp_simple`, `tb_wgp_compose`, `tb_dwgp_comp`, `tb_dwgt_comp`, `tb_dwgp_const`, `tb_dwgt_const` | permutation blocks against the definition |
| `tb_dwgp_fields` (helper `tb_dwgp_field`) | every field of the family with its smallest-area polynomials: components with d = 1 and decimated, and for m ≤ 11 the three table-based DWGT variants |
| `tb_wg_lfsr_fb`, `tb_wg_lfsr`, `tb_wg_fsm` | feedback, register moves, phase counts, stalls |
| `tb_wg_cipher` | 8 cipher configurations end to end (WG-11 with P = 1, 2, 3, normal and fast; WG-8 with P = 4; WG-5; WG-13); counts load gaps, init cycles, stalls and multi-bit steps, and fails if any of them never happens |
| `tb_wg_workloads` | the remaining table instances: WG-7, WG-10, WG-11 with d = 1, WG-14, both WG-16 variants, WG-5 at 32 bits per cycle, WG-8 at 16 and 8 bits per cycle, WG-11 at 14 bits per cycle |
| `tb_wg_cipher_full` | the default WG-11 cipher with no overrides: an 80-bit key and IV, 30 init cycles, 1024 keystream bits checked bit by bit, plus a balance check on the stream |

`tb/tb_wg_run.sv` is a helper. It drives one cipher configuration and compares it with a software
model of the same cipher.

Example with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/wg_pkg.sv tb/tb_gf_pkg.sv tb/tb_wg_cipher_full.sv --top-module tb_wg_cipher_full
    ./obj_dir/Vtb_wg_cipher_full

Replace the testbench file and the top name to run the others. The packages must come first on the
command line. The multi-configuration testbenches take about two minutes to compile, mostly
spent filling the constant tables.

## 8. Choices and departures

- **Keystream values.** There are no published test vectors for these parameters, so the keystream
  is checked only against the independent model built from the definitions above. A mismatch in
  conventions shared by both (word order of the key, bit order inside a word, which end of the
  register is s[0]) would not be detected.
- **Initialisation length.** 2·L rounds, following the usual WG practice of twice the register
  length. `INIT_ROUNDS` overrides it.
- **Interface.** The `i_valid` handshake, the fixed-latency initialisation, the synchronous reset
  and the `o_phase` output are this design's own. So is the key/IV word format.
- **Permutation factoring.** The published factoring of h is said to need five multiplications.
  It contains the product A^(2^2k)·A^(2^k) twice; here that product is formed once, so four
  multipliers are used.
- **Inversion chain.** For GF(2^11), inversion uses 4 multipliers and 10 squarers. The published
  worked example counts 9 squarers, but that chain stops at A^(2^10−1). One more squaring is needed
  to reach A^(2^11−2) = (A^(2^10−1))^2, and the exhaustive test confirms that the 10-squarer chain
  gives A^-1.
- **Trace equation.** The equation form is derived from f(x) at elaboration time rather than
  written out by hand per field, so it works for any field polynomial.
- **Not built.** The Karatsuba multiplier, normal-basis arithmetic, and pipelined or serialised
  variants. They are alternatives or extensions of this design, not part of it. Area, frequency and
  power figures depend on synthesis and are not reproduced here.
