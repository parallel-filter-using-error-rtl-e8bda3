# Parallel FIR filters protected by an error correction code

When several copies of the same linear filter run in parallel on different
signals, the copies themselves can serve as the data bits of an error
correction code. Add a few extra "check" filters, feed each one the *sum* of
some of the inputs, and, because the filter is linear, each check filter's
output must equal the same sum of the data filters' outputs. A soft error in
one filter breaks exactly those equalities that involve it. This is the same
way a flipped bit breaks parity checks in a Hamming code. So the faulty filter
can be located and its output rebuilt from the others, at the cost of a few
extra filters rather than a full duplicate or triplicate of every channel.

This RTL builds that idea for four parallel 8-tap FIR filters, in two
configurations placed side by side in one top level:

| bank | check filters | what it does on a single fault |
|---|---|---|
| Hamming bank (`hamming_filter_bank`) | 3: fed x1+x2+x3, x1+x2+x4, x1+x3+x4 | locates the faulty filter among all seven and corrects the output |
| Pair bank (`pair_filter_bank`) | 2: fed x1+x2, x3+x4 | detects the fault and names the pair it lies in; no correction |

The Hamming bank is the main design.

## The code

Data filters y1..y4 see inputs x1..x4. All filters are the same FIR H,
y[n] = Σ h[l]·x[n−l]. The Hamming bank's coder forms

    x5 = x1 + x2 + x3    →  z1 = H(x5) = y1 + y2 + y3
    x6 = x1 + x2 + x4    →  z2 = H(x6) = y1 + y2 + y4
    x7 = x1 + x3 + x4    →  z3 = H(x7) = y1 + y3 + y4

Syndrome bit s(i) is set when z(i) differs from its sum of y's:

| faulty filter | syndrome {s3,s2,s1} | corrected output |
|---|---|---|
| none | 000 | — |
| y1 | 111 | yc1 = z1 − y2 − y3 |
| y2 | 011 | yc2 = z1 − y1 − y3 |
| y3 | 101 | yc3 = z1 − y1 − y2 |
| y4 | 110 | yc4 = z2 − y1 − y2 |
| z1, z2 or z3 | 001, 010, 100 | none needed: data outputs are good |

Each data filter has its own syndrome pattern with two or three bits set.
Each check filter has a pattern with one bit set. So any single faulty filter
among the seven is identified. Two simultaneous faults are outside what the
code can handle: they are decoded as if they were a single fault, and the
result is wrong.

The equalities must hold exactly, so no stage may overflow or round. Check
inputs are two bits wider than a sample. Every filter output is
`Y_W = (DATA_W+2) + COEF_W + clog2(TAPS)` = 21 bits wide. This is enough for
the check filters' largest possible sum, and the data filters use the same
width. A fixed-point filter that truncates internally would break the checks
unless its truncation were also linear. Keep this in mind if H is replaced.

### The pair bank and why it cannot correct

With x5 = x1+x2 and x6 = x3+x4, a fault in y1 and a fault in y2 upset the same
single check (z1 ≠ y1+y2), and likewise for y3 and y4. The syndrome therefore
narrows a fault down to a pair but not to a filter. `pair_checker` reports
`pair_err` and passes the data outputs on uncorrected. Correcting in this
configuration would need information the two checks do not carry, such as a
third check or a comparison over time. Nothing of that kind is built here.

## Blocks

| module | role |
|---|---|
| `pfecc_pkg` | sizes, default coefficients, the check map `HMAP`, syndrome codes, `fault_loc_t` |
| `fir_filter` | the filter H: direct-form FIR, registered output |
| `hamming_encoder` | combinational coder x5, x6, x7 |
| `hamming_corrector` | syndrome, fault location, correction; registered |
| `hamming_filter_bank` | 4 data + 3 check filters + coder + corrector |
| `pair_encoder` | combinational coder x5, x6 for the pair bank |
| `pair_checker` | pair syndrome and flags; registered |
| `pair_filter_bank` | 4 data + 2 check filters + coder + checker |
| `ecc_parallel_filters` | top: both banks, independent ports (`h_*`, `p_*`), shared clock and reset |

## Interface and timing

- Clock `clk`. Reset `rst_n` is synchronous and active low, and clears every
  register.
- Each bank takes one sample per channel on every rising edge where its
  `in_valid` is high. When `in_valid` is low the filters' delay lines and
  outputs hold.
- There are two register stages: the filter's output register, then the
  corrector (or checker) register. A sample taken on edge k appears at the
  outputs after edge k+1, with `out_valid` high. The throughput is one sample
  per channel per clock.
- Hamming bank outputs:
  - `yc[0..3]`: the corrected y1..y4, signed, `Y_W` bits.
  - `syndrome`: bit i−1 is set when check z(i) failed.
  - `err_detected`: any syndrome bit is set.
  - `fault_loc`: `LOC_NONE`, `LOC_Y1`..`LOC_Y4`, or `LOC_ZCHK` (a check filter
    alone failed).
- Pair bank outputs: `y_out[0..3]`, `pair_err[1:0]` and `err_detected`.
- Array index 0 is channel 1 throughout.

### Fault injection

`fault_y[j]` and `fault_z[i]` are XORed onto the output of the matching filter
before the corrector sees it. This models a soft error that corrupts a filter
result. Tie these inputs to zero in normal use. They are a verification aid
and not part of the protection scheme, and synthesis keeps them as 21-bit XORs.

## Sizes and what is assumed

The scheme itself fixes only the structure above:

- four data filters and the check equations of both banks;
- the syndrome patterns;
- the correction formula, with yc1 = z1 − y2 − y3 as the worked case.

This design chose the rest:

- 8-bit signed samples and 8-bit signed coefficients (`DATA_W`, `COEF_W`).
- 8 taps (`TAPS`) with the symmetric low-pass example
  h = {−3, 0, 19, 40, 40, 19, 0, −3} (`DEF_COEFS`). Any coefficients work: the
  banks take a `COEFS` parameter.
- A direct-form filter with one registered output.
- The `in_valid`/`out_valid` handshake, synchronous reset, and the registered
  corrector.
- Rebuilding y2 and y3 from z1 and y4 from z2. Any check that contains the
  faulty filter would also work.
- The `fault_loc` report and the fault-injection inputs.

A published FPGA implementation of the scheme (size of H not stated) reported
384 flip-flops. That would match six filters × 8 taps × 8 bits. This is why
the example uses 8 taps, but it is a weak hint only.

## Verification

Every module has a self-checking testbench in `tb/`. The reference model is in
`tb/tb_ref_pkg.sv`. It keeps its own copy of the coefficients and computes the
FIR with 64-bit integers.

- `tb_fir_filter`: random and extreme samples with random idle cycles. It
  checks every output against the reference, the one-cycle latency, and that
  outputs hold while idle.
- `tb_hamming_encoder`, `tb_pair_encoder`: all extreme input corners plus
  random inputs.
- `tb_hamming_corrector`: consistent y/z words with none or one of the seven
  corrupted by a random nonzero pattern. It checks `yc`, `syndrome`,
  `err_detected` and `fault_loc`.
- `tb_pair_checker`: the same for six words. It checks pass-through and
  `pair_err`.
- `tb_hamming_filter_bank`, `tb_pair_filter_bank`: streaming through real
  filters with faults injected on most samples.
- `tb_ecc_parallel_filters`: both banks at once at the default sizes,
  20 000 cycles. Every event is counted and must occur: fault-free samples,
  correction of each of y1..y4, a fault in each check filter, detection in each
  pair, and idle cycles. In a typical run each case occurs about 2 000 times.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/pfecc_pkg.sv tb/tb_ref_pkg.sv tb/tb_ecc_parallel_filters.sv \
      --top-module tb_ecc_parallel_filters
    ./obj_dir/Vtb_ecc_parallel_filters

The two packages go first. Verilator finds the modules it needs in `rtl/`
through `-Irtl`. For another block, change the testbench file and
`--top-module`.

## Limits

- Only single faults per sample are handled. The Hamming bank decodes double
  faults wrongly without flagging them.
- The pair bank detects faults but does not correct them.
- The XOR model of a fault acts on filter outputs. A fault inside a filter's
  delay line corrupts several consecutive outputs of that filter. Each of those
  outputs is still a single-filter fault and is corrected. A fault in the
  coder or the corrector is not covered.
- There are four channels. Covering more filters with a longer Hamming code
  would need a new check map (`HMAP`) and a new syndrome decoder.
