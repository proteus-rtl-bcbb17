# Pipelined NTT cores: SDF and MDC radix-2 pipelines with Montgomery arithmetic

This RTL computes the number theoretic transform (NTT) of polynomials with
n coefficients modulo a prime q. The NTT is the FFT over the integers mod q,
and it is the main cost in lattice-based homomorphic encryption and in
zero-knowledge proof systems. The transform is unrolled into log2(n) stages
in a row, one radix-2 butterfly per stage, and coefficients stream through
without stopping. Two classic streaming FFT organisations are provided:

* **SDF** (single-path delay feedback) takes one coefficient per cycle. Each
  stage has one butterfly and one feedback FIFO of n_s/2 words, where n_s is
  the stage's block size.
* **MDC** (multi-path delay commutator) takes two coefficients per cycle.
  Each stage has one butterfly and a commutator that reorders the data, with
  two FIFOs of n_s/4 words.

Both are generated from the same parameters: n (`LOGN`), the modulus
(`QW`, `Q`, `GEN`), the Montgomery word size (`WORD`) and the inverse-NTT
method (`INV`). They share one butterfly, one modular multiplier and one
twiddle ROM. The default design point is n = 4096 with 64-bit
coefficients, q = 2^64 − 2^32 + 1.

`proteus_top` puts the two pipelines side by side. Each has its own ports
and its own output buffer.

```
 sdf_in ──► sdf_ntt ──► bitrev_buffer (1 lane)  ──► sdf_out    1 coeff/cycle
            └ 12 × sdf_stage ┐
 mdc_in ──► mdc_ntt ──► bitrev_buffer (2 lanes) ──► mdc_out    2 coeff/cycle
            └ 12 × mdc_stage ┤
                             └ butterfly ─ mod_mul ─ int_mult + mont_red
                               twiddle_rom, delay_fifo
```

## Transform and ordering

Every stage uses a Gentleman–Sande (decimation-in-frequency) butterfly:

```
u = a + b
v = (a − b) · w
```

All values are mod q. The input is in natural order, and the pipeline
output is in bit-reversed order. Stage s pairs element j of each block of
n_s = n/2^s coefficients with element j + n_s/2. It uses the twiddle
w^((j mod n_s/2)·2^s), where w = GEN^((q−1)/n) is a primitive n-th root of
unity.

The output buffer (`bitrev_buffer`) writes coefficient p at address br(p)
and reads addresses in sequence. What leaves the top is therefore
A_k = Σ a_j w^(jk) in natural order.

**Inverse transform without n^-1 and without inverse twiddles (default,
`INV = INV_REORDER`).** The inverse uses the forward hardware and forward
twiddles unchanged. It relies on this identity:

```
INTT(X)_j = n^-1 · Σ_k X_k w^(−jk) = n^-1 · NTT(X')_j
X' = (X_0, X_(n−1), X_(n−2), …, X_1)
```

The n^-1 factor is spread over the stages. In an inverse pass, each
butterfly halves both of its results. Halving mod q is
`(x >> 1) + x[0]·(q+1)/2`, with no multiplier. After log2(n) stages this
gives n^-1. There is no final scaling pass, and there is no table of
inverse twiddles.

The reorder X → X' can be folded into the forward transform's output
buffer, which then writes coefficient p at address (−br(p)) mod n. A
polynomial product c = a·b mod (x^n − 1) works like this:

1. Run two forward transforms with `tag.ro = 1`.
2. Multiply the outputs pointwise outside the core.
3. Feed the products back with `tag.inv = 1`.

`tb_proteus_top` does exactly this.

**Alternative (`INV = INV_NEGTW`).** Inverse twiddles come from the forward
ROM through w^(−i) = −w^(n/2−i). That is one address subtraction and one
subtraction from q, with no second ROM. The input of the inverse is then in
natural order. Halving per butterfly is the same.

**Decimation in time (`DIT = 1`).** Both pipelines can instead be built
with Cooley–Tukey butterflies:

```
u = a + w·b
v = a − w·b
```

The data flow is unchanged: the same pair distances, natural order in and
bit-reversed order out, the same FIFOs and commutators. What differs is the
twiddle schedule. In stage s, every pair of block c (the c-th group of n_s
coefficients in the polynomial) uses the single twiddle
w^((n/2^(s+1))·br_s(c)), where br_s reverses the s low bits. A block
counter in each stage selects it. Each stage's ROM then holds 2^s entries
instead of n/2^(s+1).

Both inverse schemes carry over:

* `DIT = 1` with `INV_REORDER` is option OP7.
* `DIT = 1` with `INV_NEGTW` is OP5.
* The default DIF build gives OP8 and OP6.

The SDF bypass still works, because b = 0 also makes a CT butterfly output
u = v = a. The two variants cost the same, and the default is DIF.

Each stream carries a 2-bit tag (`tag_t`): `inv` selects inverse mode and
`ro` selects the reordered output. The tag travels with the data, so
forward and inverse polynomials can follow each other back to back.

## The SDF stage and the butterfly latency

This is the least obvious part of the design.

A textbook SDF stage works like this. In the first half of a block, the
inputs are written into the FIFO. In the second half, the FIFO output and
the new input meet in the butterfly: u leaves the stage and v goes back
into the FIFO. At the same time, the FIFO hands its output to the port
while the next block's first half is arriving.

With a butterfly that has LS cycles of latency, this breaks. v comes back
LS cycles late and collides with the next block's first-half writes. The
stage output is also no longer a contiguous run. `sdf_stage` picks one of
two collision-free arrangements at elaboration time, depending on LS
compared with H = n_s/2.

**Large stages (LS ≤ H).** Every coefficient passes through the butterfly.
In the first half of a block, the butterfly is told to pass its input
unchanged to v. It does this with b = 0 and w = 1 in Montgomery form,
because (a − 0)·1 = a. The first half therefore reaches the FIFO already
delayed by LS, so the FIFO needs only H − LS entries. In the second half,
u leaves the stage directly. v goes into the FIFO and then through an
LS-deep register buffer, which holds it until the port is free. The FIFO
is always written and read exactly once per cycle, so nothing collides.
At n = 4096 this covers stages 0 to 7. These are the deep ones, where the
saving of LS words per stage is free.

**Small stages (LS > H).** The first half goes into an H-deep FIFO. When
the second half arrives, u leaves the stage and v is stored in a separate
H-deep buffer. The buffer drains after the u values.

In both cases, a block's first output leaves H + LS cycles after its first
input. After that, one value leaves per cycle: the u values, then the v
values. Assertions in the stage check these rules:

* no two values ever compete for the FIFO or the port;
* in the small-stage arrangement, the two partners of a butterfly always
  belong to the same block.

The stage counter restarts at every block. Gaps are allowed between blocks
(and so between polynomials), but not inside a block.

## The MDC stage and its commutator

The MDC pipeline takes pairs (x_i, x_(i+n/2)) for i = 0 … n/2−1, which are
exactly the first butterfly's operands. After the butterfly of stage s, the
next stage needs partners that are D = n_s/4 apart.

The commutator does the regrouping:

1. The v lane goes through a D-deep FIFO.
2. A switch swaps the two lanes while the pair index within the block is at
   least D.
3. The upper lane goes through a second D-deep FIFO.

The next stage then receives (u_c, u_(c+D)) for the first D cycles, followed
by (v_c, v_(c+D)). The last stage (n_s = 2) needs no commutator.

Stage latency is LS + D. The whole MDC pipeline takes n/2 − 1 + log2(n)·LS
cycles from first input to first output, about half the SDF figure. It
delivers one transform every n/2 cycles. An assertion checks that the two
lanes always enter a butterfly together.

## Modular multiplier

`mod_mul` is an integer multiplier followed by a Montgomery reduction. Its
result is a·b·R^-1 mod q. All twiddles are stored pre-multiplied by R, so
the R factors cancel and data stay in normal form.

* **`int_mult`** splits the operands into 24 × 17-bit chunks. These are
  DSP48 operand widths on 7-series parts, and the `CA`/`CB` parameters can
  be set to 26/17 for newer parts. It forms all chunk products in parallel
  and adds the shifted products in one registered sum. Latency is 3 cycles:
  input, products, sum.
* **`mont_red`** works on primes of the form q = qH·2^w + 1. Each of its
  L = ⌈log2(q)/w⌉ steps removes w low bits with no multiplication by q:

  ```
  T2  = (−T) mod 2^w
  cin = T2[w−1] | T[w−1]
  T   = qH·T2 + (T >> w) + cin
  ```

  This equals (T + T2·q)/2^w exactly. The product qH·T2 is cut into slices
  of S bits of qH, one DSP-sized product per slice. A final conditional
  subtraction brings the result below q.

  At the default point, w = 16 and L = 4, so R = 2^64. Latency is L + 1
  cycles.

The butterfly therefore has a latency of 1 (pre add/sub) + 3 + 5
(multiplier) + 1 (post add/sub) + 1 (halving) = 11 cycles. The twiddle-ROM
read adds one more, so each stage has LS = 12. `ntt_pkg::bf_lat` computes
this for any width, and it holds for both butterfly types. The
`butterfly` module also has a unified mode, with CT or GS chosen at run
time, which the pipelines do not use.

## Memories

| Memory | Contents | Size |
|---|---|---|
| `twiddle_rom` | One ROM per stage holding the H = n/2^(s+1) powers w^(k·2^s)·R mod q, computed during elaboration. Read is registered. | n − 1 words in total |
| SDF FIFOs (`delay_fifo`) | Circular buffer of DEPTH−1 words plus an output register. Maps to block or distributed RAM. | Σ n_s/2 per pipeline, about n words |
| MDC FIFOs | Two per stage, n_s/4 each. | about n words |
| `bitrev_buffer` | Two banks of n words: one is written (bit-reversed address) while the other is read (sequential). The 2-lane version splits each bank into halves for A_k and A_(k+n/2). | 2n words |

The output buffer adds latency, because it must hold a whole polynomial
before reading starts. Reading starts 2 cycles after the last write. From
first input to first output, the full top takes:

* **SDF:** 2n + log2(n)·LS cycles, which is 8336 at the defaults.
* **MDC:** n + log2(n)·LS cycles, which is 4240 at the defaults.

Throughput is one polynomial every n cycles (SDF) or every n/2 cycles (MDC).

## Interfaces

All streams use a valid signal and have no back-pressure; the consumer must
keep up. Flow-control signals use an asynchronous active-low `rst_n`.
Datapath registers are not reset.

* **SDF path:** `sdf_in_valid`, `sdf_in_tag`, `sdf_in_data` on the input
  side, and `sdf_out_*` on the output side. A polynomial is presented on n
  consecutive cycles.
* **MDC path:** `mdc_in_valid`, `mdc_in_tag`, `mdc_in_a`, `mdc_in_b`. A
  polynomial is presented as n/2 consecutive pairs (a_i, a_(i+n/2)). The
  output pairs are (A_k, A_(k+n/2)) in natural order of k.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `LOGN` | 12 | log2 of the transform size; fixed when the design is built |
| `QW` | 64 | coefficient width |
| `Q` | 2^64 − 2^32 + 1 | prime modulus; must be qH·2^WORD + 1 with 2n dividing q − 1 |
| `GEN` | 7 | any element whose ((q−1)/n)-th power is a primitive n-th root of unity (a generator of Z_q* is safe) |
| `WORD` | 16 | Montgomery word size w (2^w must divide q − 1) |
| `INV` | `INV_REORDER` | or `INV_NEGTW` |
| `DIT` | 0 | 1 selects Cooley–Tukey butterflies with per-block twiddles |
| `CA`, `CB` | 24, 17 | DSP operand widths in `int_mult` (set inside `mod_mul`) |

Twiddle tables are computed from `Q`, `GEN` and `LOGN` when the design is
elaborated, so no memory files are needed. Elaboration at n = 2^16 takes
noticeably longer for this reason.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. The references come from `tb_ref_pkg`,
which uses wide-integer schoolbook arithmetic and a direct O(n²) DFT.

| Testbench | What it covers |
|---|---|
| `tb_int_mult`, `tb_mont_red`, `tb_mod_mul` | Random and corner operands, including a 32-bit prime with w = 12. |
| `tb_butterfly` | CT, GS and unified modes, halving, latency. |
| `tb_twiddle_rom` | Every entry, and the negated inverse twiddles. |
| `tb_delay_fifo` | Depths 0, 1, 2, 5 and 64 with random gaps. |
| `tb_sdf_stage`, `tb_mdc_stage` | Both SDF arrangements and several MDC stage positions, against a behavioural butterfly model. |
| `tb_sdf_ntt`, `tb_mdc_ntt` | Whole pipelines at n = 64, DIF and DIT, forward and both inverse methods (OP5–OP8), checked against the DFT. |
| `tb_bitrev_buffer` | Bit-reverse and reorder addressing, bank switching, one- and two-lane versions. |
| `tb_proteus_top` | The full default configuration (see below). |
| `tb_workloads` | Eight (n, q) design points (see below). |

`tb_proteus_top` runs the full default configuration, n = 4096 and 64 bits,
with no parameter overrides. It computes a cyclic polynomial product on
both pipelines and checks it against a direct convolution. It also checks
the latencies above. It counts the mechanisms:

* butterfly bypass;
* small-stage v buffer;
* commutator swaps;
* halving;
* reordered output;
* back-to-back polynomials and gaps.

It builds and runs in under a minute.

`tb_workloads` builds the top at n = 2^10, 2^12, 2^14 and 2^16, for both
64-bit q = 2^64 − 2^32 + 1 and 28-bit q = 2^28 − 2^16 + 1. On each point
it checks:

* sampled forward outputs, against direct evaluation;
* a full forward-then-inverse round trip;
* latency.

The DIT build is also run at n = 2^10 with 28 bits and at n = 2^12 with 64 bits. The testbench takes about three minutes to build and two to run.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -j 0 \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ntt_pkg.sv tb/tb_ref_pkg.sv tb/tb_proteus_top.sv \
    --top-module tb_proteus_top -o sim
./obj_dir/sim
```

Substitute any other `tb_*.sv` and its module name to run a different
testbench. `-Wno-fatal` is needed because lint warnings (mostly width
extensions in the testbenches) are otherwise fatal in `--binary` mode.
Lint the RTL alone with `verilator --lint-only -Wall -Wno-fatal -Irtl rtl/ntt_pkg.sv
-y rtl rtl/proteus_top.sv`.

## Departures and limits

**Where the design departs from the reference design:**

* **Orderings and inverse schemes.** Only normal-to-bit-reversed
  pipelines are built. They come in DIF and DIT, each with the two inverse
  schemes described above. Not built:
  * pipelines that take bit-reversed input, whose stages would need
    growing rather than shrinking pair distances;
  * negacyclic "merged" transforms with ψ twiddles.
* **Modular reduction.** Montgomery reduction is the only method. A
  custom shift-and-add reduction for fixed special moduli, such as the
  256-bit variant, is not included.
* **Latency.** The latencies differ slightly from published figures for
  this architecture. The stage latency LS = 12 is this design's own
  register placement.
* **Output buffer.** The bit-reverse/reorder buffer and where it sits are
  this design's choice. The latencies in this README include it.
* **Interfaces.** The stream interfaces, the tag, and the choice of input
  pairs for the MDC path are this design's own.
* **Carry-save adder tree.** The DSP mapping's carry-save adder tree is
  written as a plain sum, and the adder structure is left to synthesis.
  The pipeline depth of `int_mult` and `mont_red` is chosen here.
* **Modulus and generator.** The modulus and generator defaults are this
  design's choice. Any NTT-friendly prime with 2^WORD | q − 1 can be used.

**Limits:**

* n and q are fixed when the design is built; one instance serves one
  (n, q).
* No back-pressure is supported, and a block must not have gaps inside it.
* Moduli wider than 128 bits are not exercised by the testbenches, whose
  reference arithmetic is 128 bits wide. The package's elaboration-time
  arithmetic supports 256-bit constants.
* Very large transforms (n ≥ 2^20) would need a decomposition into smaller
  NTTs around a transpose memory. That decomposition is not included.
