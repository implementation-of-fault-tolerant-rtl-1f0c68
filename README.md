# Fault-tolerant parallel FIR filters with a Hamming code

A bank of K identical FIR filters, each working on its own input stream, is
protected against the failure of any one filter by adding only a few redundant
filters instead of triplicating everything. The idea is to treat each filter as one
"bit" of a Hamming codeword:

* the K data filters are the data bits d1..dK;
* R redundant ("check") filters play the parity bits. Check filter j is fed the
  **sum** of the inputs that parity equation j names, e.g. X5 = X1 + X2 + X3;
* because an FIR filter is linear, the check filter's output Zj must equal the sum
  of the matching data filters' outputs, e.g. Z1 = Y1 + Y2 + Y3;
* the pattern of checks that fail (the syndrome) is the Hamming-matrix column of
  the failed filter, so it says which one failed, and the failed output can be
  rebuilt from a check it belongs to.

Two sizes are built, and both sit side by side in the top level:

| bank | module | data filters | check filters | code | ES / syndrome width |
|---|---|---|---|---|---|
| four-filter | `parallelFiterECCcode743` | 4 | 3 | (7,4) | 3 |
| eleven-filter | `parallelECC15` | 11 | 4 | (15,11) | 4 |

Every filter is an 8-bit, 9-tap direct-form FIR filter. Any single faulty filter,
data or check, is tolerated: the outputs YC stay exactly the fault-free filter
outputs, every cycle.

## Arithmetic: why everything wraps modulo 256

The checks only work if filtering a sum gives exactly the sum of the filtered
values. With integer arithmetic of unlimited width that is true, but the check
inputs grow (X1+X2+X3 needs 10 bits) and any rounding or truncation of filter
outputs would break the equality. This design keeps **all** values at 8 bits and
lets every addition and multiplication wrap modulo 2^8. Modular arithmetic is still
a ring, so `fir(a + b) == fir(a) + fir(b) (mod 256)` holds exactly, the checks
never give false alarms, and a rebuilt output is bit-exact.

The price is that a filter output is the low 8 bits of the convolution, not a
scaled result. For a real signal chain you would widen `W` (all modules take it as
a parameter) until the full-precision result fits.

Coefficients (`ecc_fir_pkg::H_DEFAULT`) are `{1, 2, -3, 4, -5, 4, -3, 2, -1}`. They are
placeholders: they sum to 1, so a constant input comes out unchanged once the delay
line has filled, which makes waveforms easy to read. Replace them through the
`COEF` parameter of `parallel_fir_ecc` / `fir_filter`.

## The codes

Check j covers the data filters marked in its row (d1 leftmost).

(7,4):

| check | covers | check input |
|---|---|---|
| 1 | d1 d2 d3 | X5 = X1 + X2 + X3 |
| 2 | d1 d2 d4 | X6 = X1 + X2 + X4 |
| 3 | d1 d3 d4 | X7 = X1 + X3 + X4 |

(15,11):

| check | row (d1..d11, then p1..p4) | check input |
|---|---|---|
| 1 | `110110101011000` | X12 = X1+X2+X4+X5+X7+X9+X11 |
| 2 | `101101100110100` | X13 = X1+X3+X4+X6+X7+X10+X11 |
| 3 | `011100011110010` | X14 = X2+X3+X4+X8+X9+X10+X11 |
| 4 | `000011111110001` | X15 = X5+X6+X7+X8+X9+X10+X11 |

In RTL a code is a packed mask `logic [R-1:0][K-1:0] MASK`, where `MASK[j][i]` is 1
when data filter i+1 is in check j+1 (`MASK_7_4`, `MASK_15_11` in `ecc_fir_pkg`).
Any other mask whose columns are distinct, nonzero and not one-hot gives another
working bank through `parallel_fir_ecc`'s `K`, `R` and `MASK` parameters; the module
refuses to elaborate when `2^R < K + R + 1` or when two columns coincide or a column
has fewer than two checks.

## Syndrome, location and correction

For each check j, `single_fault_correction` forms the residue

    resid_j = Zj - (sum of the Yi that check j covers)      (mod 256)

and sets syndrome bit S_j when it is nonzero. Check 1 is the **most significant**
bit, so for the (7,4) code the syndrome reads S1 S2 S3:

| S1 S2 S3 | faulty filter | effect on YC |
|---|---|---|
| 000 | none | pass |
| 111 | data 1 | Y1 rebuilt |
| 110 | data 2 | Y2 rebuilt |
| 101 | data 3 | Y3 rebuilt |
| 011 | data 4 | Y4 rebuilt |
| 100, 010, 001 | check 1, 2, 3 | pass (data outputs are fine) |

A syndrome equal to the column of data filter i means Yi is wrong. It is rebuilt
from the first check j that covers it: `Yc_i = Zj - (other data outputs of check j)`,
which the RTL computes as `Yi + resid_j` (for data filter 1: Yc1 = Z1 - Y2 - Y3). Every
nonzero syndrome of these two codes is some filter's column, so there is no
"uncorrectable" state; two simultaneous faults are miscorrected, as with any
single-error-correcting Hamming code.

## Fault injection (ES)

Each bank has an `ES` input for fault-injection experiments. ES names the filter to
corrupt by the syndrome its failure produces: 0 injects nothing, the column value of
data filter i corrupts Yi, a one-hot value corrupts a check filter. For the (7,4)
bank: ES = 7, 6, 5, 3 hit data filters 1-4 and ES = 4, 2, 1 hit checks 1-3. The
selected filter's output gets `FAULT_MASK` (parameter of the bank, default `8'hFF`)
exclusive-ored into it, between the filters and the correction logic. So with
nothing else wrong, the `Syndrome` output always echoes ES (one cycle later), which
is an easy way to see the correction working. The generic `parallel_fir_ecc` takes
the mask as a port (`fault_mask`) so that tests can use random errors.

## Structure and timing

```
X1..XK ──────────────┬──> K x fir_filter ──> Y ─┐
                     │                          ├─> fault_injector ─> single_fault_correction ─> YC, Syndrome
                     └─> check_encoder ─> R x fir_filter ──> Z ─┘
```

| file | role |
|---|---|
| `rtl/ecc_fir_pkg.sv` | width, tap count, default coefficients, both code masks |
| `rtl/fir_filter.sv` | direct-form FIR: delay line, one multiplier per tap, adder tree, output register |
| `rtl/check_encoder.sv` | forms the check filters' inputs (combinational) |
| `rtl/fault_injector.sv` | ES decode and fault insertion (combinational) |
| `rtl/single_fault_correction.sv` | residues, syndrome, rebuild, output register |
| `rtl/parallel_fir_ecc.sv` | generic bank, parameters `W`, `TAPS`, `K`, `R`, `MASK`, `COEF` |
| `rtl/parallelFiterECCcode743.sv` | four-filter bank with named ports DataA..D, ES, YC1..4 |
| `rtl/parallelECC15.sv` | eleven-filter bank with named ports DataA..K, ES, YC1..11 |
| `rtl/fault_tolerant_parallel_fir.sv` | top: both banks, ports as packed arrays |

* One new sample per stream on every rising clock edge; no valid or stall signals.
* Latency is two edges: the filters register their output, the correction
  registers YC and Syndrome. YC after edge n+2 is the filter output for the samples
  applied before edge n+1. ES acts on the filter outputs present between those two
  edges, so it affects the Syndrome one edge after it is applied.
* `Reset` / `rst` is synchronous and active high; it clears the delay lines and the
  outputs.
* Size after generic synthesis: 539 flip-flop bits for the four-filter bank and
  1172 for the eleven-filter bank (each filter has 64 delay-line bits and 8 output
  bits). Each filter has a 9-input multiply-add; nothing is pipelined inside it.

## Where this design departs from, or goes beyond, its source

* **Coefficients** are this design's own (see above).
* **8-bit wrap-around arithmetic** is this design's reading of the 8-bit ports.
* **Correction formula**: the source also writes the rebuild of Y1 as
  Z1 - Z2 - Z3, which does not give Y1; the design follows the checking equations
  (Y1 = Z1 - Y2 - Y3).
* **Check filter faults**: in the reference simulation the outputs read 0 while a
  check filter is faulted (ES = 1, 2, 4). This design keeps driving the correct data
  outputs there, since nothing is wrong with them.
* **Meaning of ES and the fault model** (exclusive-or with `FAULT_MASK`) are this
  design's; only the ES pin and its values in a reference simulation are given.
* **Syndrome output**, `FAULT_MASK` and the `fault_mask` port are additions.
* **Flip-flop count**: the reference implementation reports 112 and 240
  flip-flops (16 per filter), which a 9-tap filter with an 8-bit delay line cannot
  have. This RTL follows the 9-tap filter equation instead.
* **Latency and reset** behaviour are this design's choice.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Reference values come from `tb/tb_ref_pkg.sv`,
which models the filter on integers and reads the codes from their matrix rows,
independent of the RTL.

| testbench | what it checks |
|---|---|
| `tb_fir_filter` | impulse response, random samples, 1-cycle latency, reset |
| `tb_check_encoder` | check sums of both codes |
| `tb_fault_injector` | every ES value of both codes, random masks |
| `tb_single_fault_correction` | every fault position of both codes, random error values |
| `tb_parallel_fir_ecc` | both bank sizes, random samples and faults each cycle, latency 2 |
| `tb_parallelFiterECCcode743`, `tb_parallelECC15` | constant samples 76, 34, 45, 54 (…) with every ES value, then random traffic |
| `tb_fault_tolerant_parallel_fir` | top at default size, 6000 cycles; counts each faulty filter of both banks, fault-free cycles and a mid-stream reset, and fails if any never occurred |

Run one with Verilator, e.g.:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fault_tolerant_parallel_fir \
    rtl/ecc_fir_pkg.sv tb/tb_ref_pkg.sv tb/tb_fault_tolerant_parallel_fir.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_fault_tolerant_parallel_fir
```

Every testbench finishes in well under a second.
