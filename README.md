# Line spectral frequencies from LP coefficients, in hardware

Speech coders and speaker recognisers describe each 10–30 ms frame of speech
by a linear-prediction (LP) filter `A(z) = 1 - sum_{k=1..P} a(k) z^-k`, usually
of order P = 10 (coding) or P = 12 (speaker recognition). For quantisation
and classification the filter is better expressed by its *line spectral
frequencies* (LSFs): the angles of the unit-circle roots of two polynomials
built from `A(z)`. Finding those roots is the expensive part. This RTL does
the whole conversion `a(1..P) -> LSF(1..P)` as a small co-processor that a
speech system can hand frames to.

The trick that makes it cheap: after the two trivial roots at `z = ±1` are
divided out, each polynomial is a cosine series on the unit circle, and with
`x = cos(w)` it becomes a Chebyshev series in `x`. Its roots are all real and
lie in `[-1, 1]`, so they can be found by walking `x` from 1 down to -1 and
watching for sign changes, each evaluation costing only n multiplications
and 2n additions (Clenshaw's recurrence). The roots of the two series
interlace, which lets the search alternate between them. The LSF is finally
`arccos(x)`.

All arithmetic is IEEE-754 single precision, on one combinational adder,
one multiplier and one divider that every step of the conversion shares.

## The conversion, step by step

With `c(0) = 1`, `c(k) = -a(k)` and `c(P+1) = 0`:

| step | module | what it computes |
|---|---|---|
| 1 | `atopq` | `F1(z) = A(z) + z^-(P+1) A(1/z)`, `F2(z) = A(z) - z^-(P+1) A(1/z)`, i.e. `f1[k] = c(k) + c(P+1-k)`, `f2[k] = c(k) - c(P+1-k)` |
| 2 | `polydiv` (run twice) | deflation: P even: `G1 = F1/(1+z^-1)`, `G2 = F2/(1-z^-1)`; P odd: `G1 = F1`, `G2 = F2/(1-z^-2)` |
| 3 | `chebform` | Chebyshev series `G(x) = 2 T_M(x) + 2 g[1] T_{M-1}(x) + ... + 2 g[M-1] T_1(x) + g[M]` for both polynomials |
| 4 | `rootfinder` + `clenshaw` | the P roots of `G1(x)`, `G2(x)` in `[-1, 1]` |
| 5 | `acos_unit` | `LSF_i = arccos(x_i)`, radians, ascending |

`G1` and `G2` are symmetric of orders `2·M1` and `2·M2` (`M1 = M2 = P/2` for
even P; `M1 = (P+1)/2`, `M2 = (P-1)/2` for odd P), so only the first half of
every polynomial is ever computed or stored: arrays of `PMAX/2 + 1 = 7`
words. The deflation is a first- or second-order recurrence,
`g[k] = f[k] - g[k-1]`, `f[k] + g[k-1]` or `f[k] + g[k-2]`.

## The root search (`rootfinder`)

This is the part that decides accuracy and run time.

* The search starts at `x = 1` on `G1` and takes **coarse steps of 0.02**.
  When the sign of the series differs between `x_hi` and `x_lo = x_hi - 0.02`
  the root lies between them.
* From `x_hi` it then takes **fine steps of 0.0015**, never going below
  `x_lo`, until the sign changes again. The root is reported as the
  **midpoint** of that last fine interval, so the search alone places it
  within ±0.00075 in `x`.
* Roots of `G1` and `G2` interlace and the largest belongs to `G1`. After
  each root the search **switches series** and resumes from the top of the
  fine interval just found, so roots come out in descending `x`
  (ascending frequency): `G1, G2, G1, ...`.
* The last coarse step is clamped to exactly `x = -1`. If the walk reaches -1
  before P roots are found (roots of one series closer than a coarse step,
  which the interlacing of a stable filter normally prevents), the search
  stops with `err = 1` and the number of roots found.
* A series value counts as negative when its sign bit is set.

Each series value comes from `clenshaw` over a simple request/answer
handshake (`eval_start`, `eval_x`, `eval_sel` → `eval_done`, `eval_y`);
`eval_sel` also picks which coefficient set and order the top level feeds
it. `clenshaw` runs `b(j) = 2x·b(j+1) - b(j+2) + c[j]` for `j = n..1` and
`y = x·b(1) - b(2) + c[0]`, three states (multiply, subtract, add) per term.

**Accuracy in practice.** Single-precision evaluation of a 12th-order series
near clustered roots is not exact, and rounding moves the observed sign
change. Against the roots of the same (single-rounded) coefficients found in
double precision, the end-to-end test measures errors up to about 0.0009 in
`x` (the search alone accounts for 0.00075). An error `dx` in `x` is an error
`dx / sin(w)` in the LSF.

**Run time.** A 12th-order frame needs about 100 coarse evaluations, some
7–14 fine evaluations per root, and one restart evaluation per root, each
`3n + 7` cycles with `n = 6`: 3,000–5,200 cycles per frame for P = 10..12
(at most 5,821 over all orders tested) were measured over random frames,
almost all of it in the search. At 100 frames per second (10 ms frame
shift) any clock above about 0.6 MHz keeps up.

## Entities and how they cooperate

Every entity except the floating point units is a state machine with the
same contract:

* `start` — a one-cycle pulse, accepted only while `busy` is low (an
  assertion flags violations). The entity latches its scalar inputs; array
  inputs must stay stable while it is busy.
* `done` — a one-cycle pulse when its output arrays are complete. Outputs
  then hold until the next start.
* `fp_req` / `fp_rsp` — in each state the entity drives the operands of the
  operation it needs (a `fp_req_t` struct: adder, multiplier and divider
  operands) and registers the matching field of `fp_rsp_t` on the edge that
  leaves the state. Subtraction is addition with the sign bit of one operand
  flipped.

`lsf_asic` runs the entities one after the other with a small stage
controller (`C_ATOPQ → C_DIV1 → C_DIV2 → C_CHEB → C_ROOT → C_ACOS`),
copying the `polydiv` result to `g1` after the first run and to `g2` after
the second. Because only one entity works at a time, one `fpadd`, one
`fpmult` and one `fpdiv` serve all of them: the operands are taken from
whichever entity is busy, `clenshaw` ahead of `rootfinder` (which waits while
`clenshaw` evaluates for it). The design trades speed for area on purpose:
two `chebform` or two deflation paths working in parallel would be faster and
larger.

Latencies, in cycles from the edge that accepts `start` to `done`:

| entity | latency | for P = 12 |
|---|---|---|
| `atopq` | `2·floor((P+1)/2) + 1` | 13 |
| `polydiv` | `M + 1` | 7 (twice) |
| `chebform` | `max(M1, M2) + 2` | 8 |
| `clenshaw` | `3n + 5` | 23 per evaluation |
| `acos_unit` | `27` per value, plus 2 | 326 |
| `rootfinder` | data dependent | ~3,000–4,800 |

### Arccosine (`acos_unit`)

`arccos(|x|) ≈ sqrt(1 - |x|) · (c0 + c1|x| + ... + c7|x|^7)` with the classic
eight-term minimax coefficients (error below 2.2e-8 rad on `[0, 1]`);
negative roots give `pi - arccos(|x|)`. The square root is three Newton steps
`s ← (s + v/s)/2` (divider, adder, multiplier), seeded by halving the
exponent with an integer add on the bit pattern (`NEWTON_ITERS`, default 3).
`|x| = 1` gives 0 or pi directly.

### Floating point units

`fpadd`, `fpmult` and `fpdiv` are purely combinational single-precision
units with round-to-nearest-even. They are deliberately simple: subnormals
are treated as zero on input and flushed to zero on output, overflow gives
infinity, an infinite or NaN operand is passed on (no NaN is generated, so
`inf - inf` gives `inf` and `0/0` gives infinity). In a larger system these
would be replaced by the system's own floating point resources; the
`fp_req_t`/`fp_rsp_t` bundles are the place to connect them. A pipelined
unit would need the entities to wait for a valid flag instead of taking the
result on the next edge.

## Top-level interface (`lsf_asic`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while `busy` is low |
| `p_order` | in | 4 | LP order P, 2..`PMAX` (10 or 12 in the target applications) |
| `a_coef[PMAX]` | in | 32 each | `a_coef[k-1] = a(k)`, IEEE single, stable until `done` |
| `lsf[PMAX]` | out | 32 each | LSFs in radians, ascending; zero beyond `nlsf` |
| `nlsf` | out | 4 | number of valid LSFs (= P unless `err`) |
| `err` | out | 1 | search reached `x = -1` before finding P roots |
| `busy`, `done` | out | 1 | converter active; one-cycle completion pulse |

Note the sign convention: `A(z) = 1 - sum a(k) z^-k`. Coefficients from an
LPC routine that uses `1 + sum` must be negated first.

The only parameter is `PMAX` (default 12), the largest order supported; the
order of each frame is chosen at run time, and odd orders work too. Shared
types, the search steps and the arccosine coefficients live in `lsf_pkg`.

## What follows the original design and what is this implementation's

Taken from the design this RTL implements: the split into `atopq`,
`polydiv`, `chebform`, `rootfinder`, `clenshaw`, an arccosine entity and
three 32-bit floating point units; the sequential, one-entity-at-a-time
operation with START/DONE arbitration; operands presented on 32-bit ports
to external combinational floating point units with results taken at the next
state transition; `polydiv` handling one polynomial per run with a selector;
`chebform` receiving both coefficient sets; the search from `x = 1` with
coarse step 0.02 and fine step 0.0015 and the alternation between `G1` and
`G2`; orders 10 and 12 in single precision.

Chosen here, where the original is silent: the reset (asynchronous,
active low) and pulse-style handshake; sharing one set of floating point
units through a busy-priority multiplexer; storing only the first half of
each symmetric polynomial; a two-bit deflation selector so that odd orders
work; doubling `G1` on the multiplier and `G2` on the adder in the same
cycle; the midpoint as the root estimate, the restart point after a root and
the clamping at the ends of the range; the arccosine method; rounding and
special-value handling in the floating point units; all state encodings and
schedules, and therefore all cycle counts.

Not reproduced: gate counts and layout areas of a particular standard-cell
flow, and the surrounding speaker-identification software (feature
extraction, vector-quantiser training and classification), which is not
hardware.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_fpadd`, `tb_fpmult`, `tb_fpdiv` — thousands of random operands plus
  directed cases (ties, cancellation, zeros), compared bit-exactly with the
  double-precision result rounded to single (`tb_fp_pkg`). Double has enough
  extra bits that this double rounding is always exact.
* `tb_atopq`, `tb_polydiv`, `tb_chebform` — random coefficients, every output
  word compared with a step-by-step double-precision reference rounded to
  single; exact-division cases for all four deflation modes; latencies.
* `tb_clenshaw` — random series of order 1–6 at random points and at ±1
  against `sum c[j] cos(j·acos x)`; latency `3n + 5`.
* `tb_rootfinder` — the search against a behavioural evaluator with known
  roots: every root within 0.00075, P = 10, 11, 12, a root near -1, and a
  missing root that must raise `err`.
* `tb_acos_unit` — batches of values including ±1 and points within 1e-6 of
  them, against `$acos` within 2e-6 rad.
* `tb_lsf_asic` — end to end at the default `PMAX = 12`: frames built from
  known roots for P = 12, 10 and 11, converted to `a(k)` in single precision,
  compared with double-precision roots within 0.0015 in `x`; it counts and
  requires every mechanism (both deflation styles, coarse and fine steps, a
  fine walk stopped at the coarse bound, the clamp at -1, series switches,
  negative roots) and reports cycles per frame. It runs in well under a
  second.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    rtl/lsf_pkg.sv tb/tb_fp_pkg.sv tb/tb_lsf_asic.sv --top tb_lsf_asic
./obj_dir/Vtb_lsf_asic
```

Replace `tb_lsf_asic` by any other testbench name. The RTL is written for
synthesis (`always_ff`/`always_comb`, no delays); the combinational divider
is large and sets the critical path, together with the adder behind the
shared-unit multiplexer.
