# Parallel FIR filters protected by an error correction code

When a system runs several filters with the same impulse response on
different signals (the channels of a receiver, a bank of acquisition
channels), the filters can protect each other. Filtering is linear, so
filtering a sum of inputs gives the same sum of outputs:

    h * (x1 + x2 + x3) = y1 + y2 + y3

This design treats each of the K parallel filters like one bit of a block
code. R extra *check* filters, identical to the data filters, process sums of
the data inputs chosen by the rows of the code's parity matrix. At every
sample each check filter output must equal the same sum of data filter
outputs. A fault inside one filter breaks exactly the checks that filter takes
part in; that pattern (the *syndrome*) names the filter, and its output is
rebuilt from a check output and the other data outputs. With a Hamming(7,4)
code, four filters are protected by three redundant ones, against six extra
copies for triple modular redundancy; with eleven filters a Hamming(15,11)
code needs only four.

The RTL is written for any K, R and parity matrix. Its defaults are four
32-bit channels and the Hamming(7,4) code.

## Structure

```
 x1..x4 ──┬──────────────────────────► 4 × H  (data filters) ── y1..y4 ──┐
          │                                                               ├─► fault_corrector ─► yc1..yc4
          └─► check_encoder ─ x5..x7 ─► 3 × H (check filters) ─ z1..z3 ──┘       syndrome, fault_loc
```

| Module | File | Role |
|---|---|---|
| `ecc_fir_pkg` | `rtl/ecc_fir_pkg.sv` | default sizes, Hamming(7,4) parity matrix, default coefficients |
| `fir_filter` | `rtl/fir_filter.sv` | the filter H, instantiated K + R times |
| `check_encoder` | `rtl/check_encoder.sv` | inputs of the check filters |
| `fault_corrector` | `rtl/fault_corrector.sv` | syndrome, fault location, reconstruction |
| `ecc_parallel_fir` | `rtl/ecc_parallel_fir.sv` | top level |

## The code

The parity matrix `PCHK` is a parameter of shape `[R][K]`; `PCHK[j][i] = 1`
when data channel i takes part in check j (both counted from 0). The default
is

| check | input of the check filter | must equal |
|---|---|---|
| z1 | x5 = x1 + x2 + x3 | y1 + y2 + y3 |
| z2 | x6 = x1 + x2 + x4 | y1 + y2 + y4 |
| z3 | x7 = x1 + x3 + x4 | y1 + y3 + y4 |

Syndrome bit s_j is 1 when check j fails, i.e. when the difference is nonzero
(in a binary Hamming code it would be the parity bit; here it is "this sum
does not add up"). The location table follows from the matrix columns
(written s1 s2 s3, `syndrome[0]` = s1):

| s1 s2 s3 | faulty filter | action |
|---|---|---|
| 000 | none | none |
| 111 | y1 | yc1 = z1 − y2 − y3 |
| 110 | y2 | yc2 = z1 − y1 − y3 |
| 101 | y3 | yc3 = z1 − y1 − y2 |
| 011 | y4 | yc4 = z2 − y1 − y2 |
| 100 | z1 | none, data outputs are correct |
| 010 | z2 | none |
| 001 | z3 | none |

For a general matrix the rules are: a syndrome equal to column i of `PCHK`
points at data filter i, which is rebuilt from the lowest-numbered check that
contains it; a syndrome with a single 1 points at a check filter and needs no
action; any other nonzero syndrome raises `uncorrectable` and the data pass
through unchanged. A perfect code such as Hamming(7,4) or Hamming(15,11) has
no such syndrome. At elaboration `fault_corrector` stops with an error unless
every column has at least two ones and all columns differ, since otherwise a
single fault cannot be located.

Two faults at once, or a wrong value that happens to leave every check intact,
are outside what a single-error-correcting code handles: the first can
miscorrect, exactly as in a binary Hamming code.

### Why the coder has no shared adders

Rows of the matrix overlap (z1 and z2 both contain x1 + x2). A shared adder
for the common term would make one fault corrupt two checks at once, giving a
two-bit syndrome that points at an innocent data filter (here y2). The
`check_encoder` therefore computes each row with its own adder chain, so a
fault in the coder breaks at most one check, which the table above treats as
a check-filter fault with no effect on the outputs. A synthesis tool may still
merge the common terms; keep the rows apart with the tool's
hierarchy or keep options if that matters for the target.

### Exact arithmetic

All comparisons must be exact, so every width carries full precision:

* check inputs: `XC_W = DATA_W + clog2(K)` (34 bits by default),
* all filter outputs: `Y_W = XC_W + COEF_W + clog2(TAPS)` (53 bits by default).

The data filters get a narrower input but produce the same `Y_W` outputs, and
the corrected outputs `yc` are `Y_W` bits wide. Sums and differences in the
corrector are taken modulo 2^Y_W; because filtering is linear, checks and
reconstructions stay correct even if a user narrows the widths and the
filters wrap, as long as all filters wrap the same way.

## Filter and timing

`fir_filter` is a direct-form FIR: y[n] = Σ_{l<TAPS} x[n−l]·h[l]. The default
has 8 taps of signed 16-bit coefficients (a symmetric low-pass:
−612, 1180, 5217, 9470, 9470, 5217, 1180, −612). The protection scheme does
not depend on these values, its length or its structure; only the 32-bit
sample width and the four-channel Hamming(7,4) arrangement are part of the
scheme itself, the rest is a choice of this implementation.

* One sample vector is taken per clock while `in_valid` is high; gaps are
  allowed.
* The filters register their result (1 clock), the corrector registers the
  corrected outputs and flags (1 clock): `out_valid`, `yc`, `syndrome`,
  `fault_loc` and `uncorrectable` appear **2 clocks after** the input.
* `rst_n` is an asynchronous active-low reset that clears all delay lines and
  outputs.
* `fault_loc` is one-hot: bits 0..K−1 are the data filters, bits K..K+R−1 the
  check filters. Assertions check that it is never more than one-hot and that
  all filters move in lock step.

## Parameters of the top (`ecc_parallel_fir`)

| Parameter | Default | Meaning |
|---|---|---|
| `K` | 4 | data filters |
| `R` | 3 | check filters |
| `PCHK` | Hamming(7,4) | `[R][K]` parity matrix |
| `DATA_W` | 32 | input sample width |
| `COEF_W` | 16 | coefficient width |
| `TAPS` | 8 | filter length |
| `COEFS` | low-pass above | `[TAPS][COEF_W]` coefficients, packed, index 0 = h[0] |

For eleven channels use `K = 11`, `R = 4` and a Hamming(15,11) matrix whose
columns are the eleven 4-bit values with at least two ones (3, 5, 6, 7, 9,
10, 11, 12, 13, 14, 15); `tb/tb_ecc_parallel_fir_k11.sv` shows how to build
it as a constant function.

## Testbenches

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|---|---|
| `tb_fir_filter` | outputs against a convolution computed in the test, 1-clock latency, reset |
| `tb_check_encoder` | the three Hamming sums, and an 11-input Hamming(15,11) coder |
| `tb_fault_corrector` | every row of the location table, exact reconstruction after random errors, the uncorrectable flag on an incomplete code |
| `tb_ecc_parallel_fir` | the whole bank at its default size with single-event upsets |
| `tb_ecc_parallel_fir_k11` | the same with 11 channels and four check filters |

The two system tests model single-event upsets by flipping one bit of a
register inside one filter (the output register or one word of the delay
line), reaching into the design by hierarchical name
(`dut.g_data[i].u_fir`, `dut.g_check[j].u_fir`). They also force one row sum
of the coder (`dut.u_coder.g_row[j].sum`) to a wrong value for one clock and
check that this shows up only as a fault of check filter j, with correct
data outputs. They compare every output
with the fault-free convolution, check the 2-clock latency, check that
`fault_loc` names the upset filter, and count the corrections of each data
filter, detections in each check filter and contained coder faults; a
filter or coder row that is never hit counts
as a failure. Because they use these internal names, they only build against
the real top, not against a stub.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ecc_parallel_fir \
    -y rtl -y tb +libext+.sv rtl/ecc_fir_pkg.sv tb/tb_ecc_parallel_fir.sv
./obj_dir/Vtb_ecc_parallel_fir
```

The package must be read first; `-y rtl` finds the other modules by name.

## Known departures and limits

* Filter length, coefficients and coefficient width are not part of the
  scheme and were chosen here; the resource figures of the FPGA case study
  that motivated the scheme (four filters, unprotected against TMR and the
  proposed protection) cannot be reproduced without them.
* The reconstruction of data filters 2..4 uses the first check that contains
  them; any check containing the filter would do.
* The corrector itself and the final subtractions are not protected; a fault
  there can corrupt an output. Only the coder was made fault-contained.
* IIR filters and banks with one input and different responses are not
  covered.
