# Error-detecting arithmetic for ring-LWE: polynomial multiplication and modular reduction

Ring-LWE encryption spends nearly all of its time on two operations: multiplying
polynomials in Z_p[x]/(x^n + 1), and reducing products modulo a prime. Both are
targets for fault attacks. A fault attack injects a stuck-at or transient fault and
compares the faulty output with the correct one. This RTL protects both operations
with **time redundancy on encoded operands**. Each computation runs twice on the
same hardware: once normally, and once with its operands encoded so that a healthy
circuit must give a predictable, related answer. After decoding, the two results
are compared. A fault that corrupts the two runs differently shows up as a
mismatch and raises an error flag.

The encodings used here are cheap:

| datapath | operation | encoding of the second run | decode |
|---|---|---|---|
| `rpm_reno` / `rpm_reno_pipe` | c = a·b in Z_P[x]/(x^N+1), N = 256, P = 1049089 | **RENO**: replace b by −b (P − b_j) | d = P − e, done by the existing adders in one extra cycle |
| `rpm_reno` with `NEG_BOTH=1` | same | negate both a and b | none, because (−a)(−b) = ab |
| `dsp_polymul` (built on `dsp_modq_ed`) | c = a·b in Z_16381[x]/(x^N+1), N = 256, one (±A·B + C) mod 16381 step at a time | **RESO**: double A and C; or **RESwO**: swap A and B, per step | halve mod q (RESO); none (RESwO) |
| `sams2_ed` | x mod 12289 (SAMS2 reduction) | **RESO**: double x | halve mod q |

RENO is scaling by −1, which is the cheapest form of recomputing with scaled
operands. The three datapaths use different moduli (1049089, 16381, 12289), so
they are independent building blocks. `ringlwe_ed_top` places them side by side, sharing only the clock
and reset.

## The polynomial multiplier (`rpm_reno`)

### Column array

The product is computed schoolbook-style by **N parallel columns**, one per output
coefficient c_k. Each column (`rpm_column`) has a modular multiplier
(`mod_mult`), a modular adder/subtractor (`mod_addsub`) and an accumulator. In
cycle j:

* b_j is broadcast to all columns from a rotating register whose head is b_j.
* Column k gets a_{(k−j) mod N} from a second rotating register. The register
  moves one place per cycle, so it is back in its original order after N cycles.
* Column k **subtracts** its product when k < j and adds it otherwise. Here the
  index i + j has wrapped past N, and x^N = −1 in this ring. This select signal is
  the sign term floor((i+j)/N) of the negacyclic product.

After N cycles, column k holds c_k. The last column never wraps.

### The two runs and the decode cycle

`rpm_ctrl` sequences one operation:

```
cycle      0      1..N         N+1..2N                 2N+1     2N+2     2N+3
          load    run1 (Norm)  run2 (RENO: b -> P-b)   decode   compare  done pulse
                               store run1 result in
                               the first run2 cycle
```

* **run1**: the normal product. In the first cycle of run2, the accumulators are
  copied into a holding bank (`res1`) while they restart.
* **run2**: a multiplexer at the b input selects P − b_j, so each column
  accumulates e_k = −c_k mod P.
* **decode cycle**: two multiplexers in front of each column's ±mod p unit feed it
  (P, e_k) and force subtraction. The column's own adder forms d_k = P − e_k, so
  no separate bank of N negation units is needed. This is why the scheme is
  called "modified": it replaces a separate decode stage.
* **compare**: `err` is the OR of the N comparisons res1[k] ≠ d_k.

Negating at the *input* is what lets permanent faults be detected. A stuck bit on
the b path sees b_j in one run and P − b_j in the other, so it corrupts the two
runs differently. If the sign select were inverted instead, only faults inside the
adder/subtractor would be caught.

With `NEG_BOTH = 1`, run2 also negates every a_i (one negation unit per column).
The run then reproduces c directly, with no decode cycle, and `done` comes one
cycle earlier (2N+2).

**The one blind spot is all-zero operands**: negating zero leaves it unchanged, so
both runs would be identical even under a fault. `zero_alarm` is the OR of every
operand bit, inverted, and is registered when the operation starts. It flags this
case.

### Interface and timing

Assert `start` for one cycle with `a_in[N]` and `b_in[N]` valid; the operands are
captured in that cycle. `busy` stays high until `done` pulses, 2N+3 cycles after
`start` (515 cycles at N = 256). `c_out` (the run1 result) and `err` stay valid
from `done` until the next `done`. An assertion flags a `start` while `busy` is
high.

### Pipelined variant (`rpm_reno_pipe`, `RPM_PIPELINED=1` on the top)

Recomputation doubles the number of cycles. To win back throughput, each column is
cut in two by a register: H1 is the modular multiply and H2 is the ±mod p
accumulate. This roughly halves the critical path. Normal and recomputed products
are interleaved:

```
H1:  N1  R1  N2  R2  ...  Nn  Rn
H2:      N1  R1  N2  ...  Rn-1 Nn  Rn
```

Each column therefore keeps two accumulators, one for the normal run and one for
the recomputed run. After the last R there is one drain cycle, then the decode
cycle (P − e_r) and the compare cycle. `done` follows `start` by 2N+4 cycles, at
the shorter clock period. This variant builds only the one-negated-operand form.

## Multiply-accumulate modulo 16381 (`dsp_modq_ed`)

This is a DSP-slice style datapath for q = 16381 with 14-bit operands.

* **`dsp_mac`** registers the inputs. It then computes A·B + C, or (D − A)·B + C
  for multiplication by a negative number. D is tied to q by the wrapper. The
  29-bit result x[28:0] is registered.
* **`modq16381_reducer`** uses 2^14 ≡ 3 (mod q). It folds
  x = 2^14·H + L into L + H + (H << 1), a value below 2^17, and registers it. It
  then subtracts 4q, 2q and q where possible and registers the residue. A final
  multiplexer decodes RESO results.
* **RESO**: the input multiplexers shift A and C left by one bit, giving
  x = 2(A·B + C). The reducer output is halved modulo q. Because halving a residue
  needs care when it is odd, the decoder computes (r + (r odd ? q : 0)) >> 1, which
  is exact. D is shifted too, so the signed form gives 2((D − A)·B + C).
* **RESwO**: A and B swap places at the input registers. The wrapper uses it when
  `swap = 1`, and only for unsigned operations, because swapping does not preserve
  (D − A)·B.

Each accepted operation issues its normal pass and then its recomputed pass in the
next cycle. `in_ready` is low during the second pass, so at most one operation
enters every two cycles. `recompute_checker` holds the first result and compares
it with the second. `res_valid` pulses **6 cycles after acceptance** with `res`
(the normal result) and `err`. `err_sticky` holds any mismatch until reset.

## Schoolbook polynomial multiplier modulo 16381 (`dsp_polymul`)

`dsp_polymul` turns the protected MAC into a full negacyclic product
c = a·b in Z_16381[x]/(x^N + 1), N = 256. It keeps a and b in register arrays
loaded at `start` and computes one coefficient after another. For coefficient
c_k it runs j = 0..N−1 with i = (k − j) mod N:

* if j ≤ k the term is a_i·b_j, so it issues the unsigned MAC A·B + C;
* if j > k the term wrapped past x^N, and x^N = −1, so it issues the signed MAC
  (q − A)·B + C.

The MAC's C input carries the running sum (zero for j = 0). The reduced result
comes back into the accumulator, so each step costs one modular reduction and
the sum never grows past 14 bits.

Every step goes through `dsp_modq_ed`, so every step is computed twice and
compared. `err` is the OR of all N² comparisons of the current product. With
`swap = 1`, unsigned steps use RESwO and signed steps still use RESO. The steps
do not overlap: the next one is issued when the previous result returns. That
is 7 cycles per step, so `done` pulses **7·N² + 1 cycles after `start`**
(458 753 cycles at N = 256). `c_out` and `err` hold until the next `start`.
Overlapping steps of different coefficients would raise the throughput about
threefold. That is not done here, to keep the sequencer simple.

## SAMS2 reduction modulo 12289 (`sams2_ed`)

This block reduces a 28-bit value (a product of two 14-bit residues) modulo
12289 without a divider:

1. **Shift-Add** (`sams2_shift_add`) estimates the quotient as
   t = Σ_{k=0..6} x >> (14 + 2k). This works because 1/12289 ≈ 2^−14 · 4/3.
2. **Multq** (`sams2_multq`) forms t·q as (t<<13) + (t<<12) + t.
3. **Subt** (`sams2_subt`) computes x − tq. In parallel it also computes that value
   minus q, 2q, …, 7q, and plus q, then keeps the candidate in [0, q). The quotient
   estimate lies between floor(x/q) − 7 and floor(x/q) + 1, so a single pass
   always finishes.

The x path has three registers before Subt, and the t path has registers around
Multq. The reduction is linear, so RESO works as for the multiply-accumulate
(double x at the input, halve modulo q at the output). `res_valid` follows
acceptance by 5 cycles, with the same handshake as `dsp_modq_ed`.

## Fault-injection ports

Every datapath has `flt_sa0` / `flt_sa1` masks that force bits to 0 or 1 with
AND/OR gates. They sit on the broadcast b operand of the polynomial multiplier,
on the encoded A operand of the MAC and on the encoded input of the SAMS2
reducer. Tie them to zero in a product. Keep them in a fault-evaluation build to
reproduce stuck-at experiments. Changing the masks between the two runs models a
transient fault. The comparators (`recompute_checker` and the column comparators)
are assumed to be hardened and have no fault ports.

## Where this RTL goes beyond, or departs from, the published architecture

* **Exact RESO decoding.** The original shifts the reduced result right by one.
  That equals the halved residue only when the residue is even, so here q is added
  first when the residue is odd.
* **Extra 4q subtraction** in the mod-16381 reducer. Two conditional subtractions
  (2q, q) suffice for normal inputs, but a doubled RESO input folds to up to 7q.
* **D is doubled in RESO mode** so that the signed form (D − A)·B + C stays
  correct.
* **RESwO is unsigned only**, as explained above.
* **SAMS2 Subt adds an x − tq + q candidate.** The shift-add estimate can be one
  too large, and with that candidate one parallel pass replaces the iterative loop.
* **One extra register on the SAMS2 t path**, so both paths have the same delay.
* **mod_mult** reduces its 42-bit product with a constant modulo operator. No
  specific reduction for P = 1049089 is given, so synthesis builds a constant
  divider. Replace it with a Barrett or Montgomery unit for a real implementation.
* **Control and handshakes are this design's own**: start/done, valid/ready,
  operand registers, the run1 holding bank, asynchronous active-low reset of
  every register, and the choice of where the pipeline register sits in
  `rpm_reno_pipe`.
* The **first RENO form** is not built. It inverts the sign select and uses a
  separate bank of P − e units, and catches only faults in the adder/subtractor.
  The **general scaling scheme** is not built either. It scales by an arbitrary k
  and decodes with k^−1, which needs multipliers and dividers.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ringlwe_ed_top` | `RPM_N`, `RPM_P` | 256, 1049089 | polynomial length and coefficient modulus (W = clog2(P) = 21 bits) |
| | `RPM_NEG_BOTH` | 0 | 1: negate both operands in run2 (no decode cycle) |
| | `RPM_PIPELINED` | 0 | 1: use the two-stage interleaved multiplier |
| | `PM_N` | 256 | polynomial length of the mod-16381 multiplier (power of two) |
| | `SAMS_XW` | 28 | SAMS2 input width |
| `rpm_reno` | `N`, `P`, `NEG_BOTH` | 256, 1049089, 0 | |
| `rpm_reno_pipe` | `N`, `P` | 256, 1049089 | |
| `dsp_polymul` | `N` | 256 | |

The polynomial multiplier also elaborates for the other published sizes:
N = 512 with P = 4206593, and N = 1024 with P = 536903681. P must be below 2^32.
The shift amounts of the q = 16381 and q = 12289 datapaths are fixed to those
moduli.

## Files

`rtl/`: one module or package per file.

* `rlwe_pkg.sv`: the recomputation mode enum and the halve-mod-q function.
* Polynomial multiplier: `rpm_reno`, `rpm_ctrl`, `rpm_column`, `mod_mult`,
  `mod_addsub`.
* Pipelined variant: `rpm_reno_pipe`, `rpm_pipe_column`.
* Mod-16381 polynomial multiplier: `dsp_polymul`, built on the protected MAC
  `dsp_modq_ed`, which uses `dsp_mac` and `modq16381_reducer`.
* SAMS2: `sams2_ed`, `sams2_reducer`, `sams2_shift_add`, `sams2_multq`,
  `sams2_subt`.
* Shared: `recompute_checker`.
* Top: `ringlwe_ed_top`.

`tb/`: one self-checking testbench per block (`tb_<module>.sv`), plus two
end-to-end tests:

* `tb_ringlwe_ed_top` runs the whole design at its default parameters (N = 256).
  It checks two full mod-1049089 products against a schoolbook reference, the
  latency, a detected permanent fault and the zero alarm. It runs three
  mod-16381 products (RESO, RESwO, and one with a stuck-at fault), each
  65 536 MAC steps long. It also streams SAMS2 operations, fault-free and faulty.
  It counts that every mechanism (RESO, RESwO, signed MAC, stall, detection in
  each datapath) actually occurred.
* `tb_ringlwe_ed_top_pipe` runs the same test with the pipelined multiplier at
  N = 64 and the mod-16381 multiplier at N = 8.
* `tb_rpm_reno_sizes` runs `rpm_reno` at the two larger published sizes,
  N = 512 with P = 4206593 and N = 1024 with P = 536903681, with one and with
  both operands negated. Compile its driver, `tb/rpm_size_run.sv`, with it.
  Building it takes a few minutes; it runs in seconds.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a cycle
watchdog. The expected values come from integer models inside the testbench: the
negacyclic product, and the faulty-datapath predictions for the injected faults.
They are not taken from the RTL.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ringlwe_ed_top \
    rtl/rlwe_pkg.sv $(ls rtl/*.sv | grep -v rlwe_pkg) tb/tb_ringlwe_ed_top.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file to run any other test. The full-size
end-to-end test builds and runs in under a minute; most of that is the
1.4 million cycles of the three mod-16381 products.

## How far to trust it

* Every block is checked against an independent integer model. The mod-1049089
  multiplier is checked at N = 8, and at N = 256 and N = 64 through the top. It
  is also checked at N = 512 and N = 1024 with their own moduli. The
  mod-16381 multiplier is checked at N = 8 and at N = 256. The reducers are
  checked over their full input ranges, including the worst-case RESO values.
* Fault detection is checked against a model of the faulty datapath, not against
  "err must be 1". Some faults are masked, for example a stuck-at-0 on a bit that
  is already 0 in both runs. Such faults rightly produce no error.
* Nothing here has been taken through timing-driven synthesis or place-and-route.
  Clock rates, area and power figures are not reproduced.
* The fault campaigns in the testbenches are a few hundred cases, not exhaustive.
