# Bearing fault classifier: time-domain features + one-vs-one linear SVM

A rolling-element bearing that develops a fault changes how the machine
vibrates. This design classifies vibration windows from one or two
accelerometers into the ten classes of the CWRU bearing data set (healthy, or
a ball, inner-race or outer-race fault of three sizes). It needs no neural
network. Per window it computes three cheap time-domain features per channel:

- the **peak** magnitude,
- the **mean absolute value** (MAV),
- the **zero-crossing count** (ZC).

A linear support vector machine then runs 45 one-vs-one decisions on these
features, and the class with the most votes wins. The feature normalisation
is folded into the stored coefficients. So the whole classifier is one
18-bit multiplier, one 36-bit accumulator, a 8460-bit coefficient ROM and ten
vote counters. The whole design, with its 2 KB sample buffer, fits in a few
hundred flip-flops plus the buffer.

| class | meaning | class | meaning |
|---|---|---|---|
| 0 | ball 0.007" | 5 | inner race 0.021" |
| 1 | ball 0.014" | 6 | normal |
| 2 | ball 0.021" | 7 | outer race 0.007" |
| 3 | inner race 0.007" | 8 | outer race 0.014" |
| 4 | inner race 0.014" | 9 | outer race 0.021" |

## Data path at a glance

```
 host / ADC ──wr_en, wr_data──▶ sample_buffer (circular, 512 x 32 bit)
                                      │ one 16-bit word (2 samples) per cycle
                                      ▼
                     feature_extraction_unit ── peak_unit / mav_unit / zc_unit
                                      │ 3 features per channel pass
                                      ▼
                               feature_buffer (6 x 18 bit)
                                      │
               coeff_rom ──188-bit word per pair──▶ svm_classifier (1 multiplier)
                                      │ one vote per pair
                                      ▼
                                  ovo_voter ──▶ result_label[3:0]
           accel_controller sequences all of it (not drawn)
```

## Samples and the sliding window

Samples are signed 8-bit values, as from an 8-bit ADC. The host packs two
consecutive samples of a channel into a 16-bit word, with the earlier sample in
bits [7:0]. One write carries one word per channel: the drive-end (DE) word in
`wr_data[15:0]` and the fan-end (FE) word in `wr_data[31:16]`.

The buffer keeps the last 1024 samples of each channel, which is 512 addresses
and 2 KB for two channels. It is circular: each write replaces the oldest word.
The first window starts as soon as the buffer is full. After that, a new window
starts after every 16 new samples (8 writes), so consecutive windows overlap by
1008 samples. If the 16th new sample arrives while the previous window is still
being processed, the next window starts as soon as the hardware is idle.

**Write-rate rule.** Writes are never stalled. A window's feature pass reads
its oldest word last for the FE channel, about 515 cycles after the window
starts. The first write after a start must therefore come no earlier than
that, and each later write one cycle later than the one before it.
At 12 kHz sampling and a 50 MHz clock a word arrives about every 8300 cycles,
so a real sensor never comes close. A test bench that writes faster must
respect the rule, as the included ones do. An assertion in the controller
(`a_write_safe`) stops a simulation that breaks it.

## Feature extraction

One word, so two samples, is processed per cycle. A 1024-sample window
therefore takes 512 cycles per channel. The DE and FE windows go through the
same unit one after the other. The unit has three parts:

- **Peak** (`peak_unit`). It takes the magnitudes of both samples, keeps the
  larger one (one comparator and a multiplexer) and compares it with the
  running peak register. |−128| = 128, so the magnitude is 9 bits wide.
- **MAV** (`mav_unit`). Both magnitudes are added to an 18-bit accumulator. The
  mean is the sum shifted right by 10, because 1024 = 2^10; no divider is
  needed. The worst case, 1024 × 128 = 2^17, still fits when the accumulator
  is read as unsigned.
- **ZC** (`zc_unit`). The two samples of a word count as one crossing when
  both of these hold:
  - one sample is strictly positive and the other strictly negative;
  - their difference is at least `EPS` (1).

  The difference test rejects crossings caused by quantisation noise. Only the
  two samples *within* a word are compared, so the pair that straddles two
  words is not checked. A textbook ZC compares every consecutive pair; the
  count here covers at most 512 pairs per window, and the coefficients must be
  trained on this definition.

Each feature leaves as an 18-bit value. A clear with the first word of a window
restarts the three registers.

## The classifier and its coefficient format

This section matters most when you load your own model.

**Decision function.** Pair *p* compares classes (a, b) with a linear
decision:

    f_p = Σ_j w_p[j] · x[j] + b_p[DE] + b_p[FE]        vote a if f_p ≥ 0, else b

Here x[j] are the six raw features, at index `ch*3 + {0: peak, 1: MAV, 2: ZC}`.

**Folding the normalisation.** Training normalises each feature to zero mean
and unit deviation: x' = (x − μ)/σ. Since w·x' + b = (w/σ)·x + (b − w·μ/σ), the
stored weights are w/σ and the stored bias is b − Σ w·μ/σ. No normalisation
runs in hardware. The bias is split over two words, one per channel, and the
two are added. In a one-channel build only the DE half and the DE bias are
used. The weights and features need no common binary point: f is only tested
for its sign. The biases must use the same scale as the weight × feature
products.

**Coefficient word.** One 188-bit word per pair (`svm_pkg::coeff_word_t`), 45
words, 8460 bits:

| field | bits | content |
|---|---|---|
| `class_a` | 4 | class voted for when f ≥ 0 |
| `class_b` | 4 | class voted for when f < 0 |
| `w[5:0]` | 6 × 18, signed | weights, `w[ch*3+k]` |
| `b[1:0]` | 2 × 36, signed | bias per channel |

The pairs are stored in the order (0,1), (0,2) … (0,9), (1,2) … (8,9). You
supply them through the top's `COEFFS` parameter, of type
`svm_pkg::coeff_rom_t`, a packed array of 45 words. On an FPGA the ROM becomes
block RAM; in an ASIC flow it becomes constants.

**The default image is not a trained model.** No trained CWRU coefficients
are included. `svm_pkg::default_coeffs()` builds a placeholder so the design
does something meaningful out of the box: a nearest-centroid classifier over
made-up class centroids. With w = 2(c_a − c_b) and b = |c_b|² − |c_a|², f ≥ 0
means the feature vector is at least as close to c_a as to c_b. Replace it
with coefficients trained on real data.

**Schedule.** `svm_classifier` has one multiplier (18 × 18 → 36) and one
accumulator. Each pair takes 9 cycles:

1. one cycle to fetch its ROM word;
2. six multiply-accumulate cycles;
3. two bias cycles, the last of which also produces the vote.

All 45 pairs take 405 cycles. The accumulator is 36 bits and wraps on
overflow. Features are at most 512, so an 18-bit weight cannot overflow it,
but a bias near the 36-bit limit could.

**Voting.** `ovo_voter` counts votes per class (at most 9 each). It then scans
the ten counters with one comparator, one class per cycle. A later class wins
only with strictly more votes, so a tie goes to the lower class number.

## Timing

For the default two-channel build, the time from the cycle a window starts to
the `result_valid` pulse is **1447 cycles**:

| step | cycles |
|---|---|
| two feature passes (512 reads + 2 cycles to store each) | 1028 |
| classifier start | 1 |
| 45 pairs | 405 |
| argmax scan | 11 |
| pipeline stages between them | 2 |

That is 28.9 µs at 50 MHz or 14.5 µs at 100 MHz. A one-channel build
(`NUM_CH = 1`) takes 753 cycles. One window every 16 samples at 12 kHz leaves
66,667 cycles at 50 MHz, so the design idles well over 95 % of the time.

## Interfaces

Top module `bearing_fault_accel`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `wr_en` | in | 1 | write one word per channel |
| `wr_data` | in | 16·NUM_CH | DE word [15:0], FE word [31:16] |
| `result_valid` | out | 1 | one-cycle pulse per window |
| `result_label` | out | 4 | class 0..9, held until the next result |
| `busy` | out | 1 | a window is in progress |
| `features` | out | 6 × 18 | last stored feature vector |

| parameter | default | meaning |
|---|---|---|
| `NUM_CH` | 2 | 2 = DE and FE, 1 = DE only |
| `WINDOW` | 1024 | samples per window and channel (power of two) |
| `STRIDE` | 16 | new samples between windows (even) |
| `EPS` | 1 | zero-crossing threshold |
| `COEFFS` | `default_coeffs()` | 45 coefficient words |

Everything is synchronous to `clk`, with all flip-flops reset to zero. The
sample and coefficient memories are not reset: nothing reads them before they
are written or loaded.

## Where this design makes its own choices

The overall structure and the main numbers come from a published
FPGA/ASIC accelerator. These include:

- the three features and their datapath;
- the 8-bit samples, 18-bit features and weights, 36-bit decision values;
- the 1024-sample window and stride 16;
- one shared multiplier and one-vs-one voting;
- the 2 KB buffer and the 8460-bit coefficient store.

The following are choices made here:

- **Coefficient word.** The split into two 36-bit biases, one per channel, is
  inferred from the 8460-bit total.
- **Input byte order.** The earlier sample sits in the low byte.
- **Control.** The controller, its stride trigger, the deferred start and the
  handshakes are this design's own.
- **Voter.** The sequential argmax and the tie rule are this design's own.
- **Accumulator width.** The accumulator is 36 bits. The reference lists an
  18-bit adder.
- **Latency.** The total is 1447 cycles. The reference reports 1444 cycles for
  its own controller.
- **Interfaces.** Plain write and result ports replace the host processor and
  AXI links of the FPGA system. The ADC and pad ring of an ASIC are outside
  the design.
- **Default coefficients.** They are illustrative, as described above.

## Files

`rtl/` holds one module or package per file:

| file | block |
|---|---|
| `svm_pkg.sv` | types, widths, coefficient format, default image |
| `sample_buffer.sv` | circular 2 KB window buffer |
| `peak_unit.sv`, `mav_unit.sv`, `zc_unit.sv` | the three features |
| `feature_extraction_unit.sv` | word split, feature units |
| `feature_buffer.sv` | feature vector register |
| `coeff_rom.sv` | coefficient ROM |
| `svm_classifier.sv` | sequential one-vs-one SVM |
| `ovo_voter.sv` | vote counters and argmax |
| `accel_controller.sv` | window trigger and sequencing |
| `bearing_fault_accel.sv` | top |

`tb/` holds a self-checking test bench per module, `tb_<module>.sv`, plus
`tb_bearing_fault_accel_single.sv` for the one-channel build. Each test bench
prints `TB_RESULT checks=N failures=M`.

The end-to-end bench `tb_bearing_fault_accel` runs the default build. It writes
synthetic vibration segments of different amplitude and crossing rate, a bit
over 100 windows in all. Every label, feature vector and latency is checked
against a software model. The run must include each of these:

- the first window after the initial fill;
- stride-started windows;
- deferred windows;
- counted zero crossings;
- more than one reported class.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/svm_pkg.sv tb/tb_bearing_fault_accel.sv --top-module tb_bearing_fault_accel
./obj_dir/Vtb_bearing_fault_accel
```

Any other bench works the same way: replace the file and top name. The full
end-to-end run takes well under a second. Linting a module alone:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/svm_pkg.sv rtl/bearing_fault_accel.sv
```

To use trained coefficients, build a `svm_pkg::coeff_rom_t` value, for
example in a package function, and pass it as `COEFFS`. Follow the word
layout and pair order above. The weights must come from a model trained on the
features exactly as this hardware computes them, including the within-word
zero-crossing rule and the integer MAV.
