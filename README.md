# Fault tolerant parallel FIR filters with an arithmetic error-correcting code

Signal processing chips often run several identical filters side by side on
different signals. This design protects four such filters against a fault in
any one of them while adding only three extra filters, instead of the eight
that triplicating every filter would cost.

The idea is to apply a Hamming code to filter *outputs* rather than to bits.
All filters share one impulse response `h` and are linear, so filtering a sum of
inputs gives the sum of the individual outputs. Three check filters process
sums of the data inputs:

| check filter | input            | must equal (fault-free)  |
|--------------|------------------|--------------------------|
| z1           | x1 + x2 + x3     | y1 + y2 + y3             |
| z2           | x1 + x2 + x4     | y1 + y2 + y4             |
| z3           | x1 + x3 + x4     | y1 + y3 + y4             |

A wrong output makes a set of these relations fail, and that set identifies
the filter, just as a syndrome does in a Hamming(7,4) code. A wrong data
output is then rebuilt from a check output minus the other data outputs.

## Block structure

```
 x1..x4 ──┬──────────────────> 4 x fir_filter ── y1..y4 ──┐
          │                                                ├─> single_fault_correction ─> yc1..yc4, s1..s4
          └─> check_encoder ─> 3 x fir_filter ── z1..z3 ──┘      per output:
              (x1+x2+x3,                                         syndrome_unit
               x1+x2+x4,                                         3 x output_corrector
               x1+x3+x4)                                         tmr_voter
```

| file | role |
|------|------|
| `rtl/ftf_pkg.sv` | the code: which checks cover which data filter |
| `rtl/fir_filter.sv` | direct-form FIR filter with a registered output; used for all seven filters |
| `rtl/check_encoder.sv` | forms the check filter inputs; each sum has its own adders |
| `rtl/syndrome_unit.sv` | residues `z_i - sum(y)`, compared with a threshold, give the syndrome |
| `rtl/output_corrector.sv` | rebuilds one output when the syndrome points at its filter |
| `rtl/tmr_voter.sv` | bitwise 2-of-3 majority |
| `rtl/single_fault_correction.sv` | the decoder: per output, a syndrome unit, three correctors and a voter |
| `rtl/prop_top.sv` | the top: encoder, 4 + 3 filters, decoder |

## Syndrome and correction

The syndrome is `s1 s2 s3`. Bit `si` is set when the residue of check `i`
(`z_i` minus the data outputs of that check) has a magnitude above
`THRESHOLD`.

| s1 s2 s3 | filter in error | action |
|----------|-----------------|--------|
| 000 | none | none |
| 111 | data filter 1 | yc1 = z1 - y2 - y3 |
| 110 | data filter 2 | yc2 = z1 - y1 - y3 |
| 101 | data filter 3 | yc3 = z1 - y1 - y2 |
| 011 | data filter 4 | yc4 = z2 - y1 - y2 |
| 100, 010, 001 | check filter 1, 2, 3 | none: data outputs are right |

`ftf_pkg` generates these columns by a rule rather than a table: data filter
`j` gets the `j`-th value, counting down from `2^R-1`, that has at least two
bits set. Each output is rebuilt from the first check that covers it. The same
rule gives larger codes. With `R = 4` it protects up to 11 data filters, so
`prop_top #(.K(11), .R(4))` works without other changes. In general `K` may be
at most `2^R - 1 - R`, and an elaboration-time assertion enforces this.

### Why the threshold defaults to 0

Filters whose check path and data path round differently give small
non-zero residues even without a fault. A threshold lets such residues be
ignored, at the cost of leaving errors of that size uncorrected. In this RTL
every sum and product wraps modulo 2^32. The filter is therefore exactly
linear, and a fault-free bank has residues of exactly zero. `THRESHOLD = 0`
then flags every error. Raise it if you replace the filters with ones that
round, such as fixed-point filters that truncate their products.

The threshold is a strict inequality: a residue of magnitude `THRESHOLD`
still counts as zero.

## Faults in the encoder and decoder

The encoder and decoder are built so that a single fault in them does not
corrupt a data output:

- **Encoder.** The three check sums share no adders. A fault there corrupts one
  check input, so it looks like a check filter error (a one-bit syndrome),
  which changes no data output.
- **Syndrome.** Each residue has its own subtractors. A fault flips at most one
  syndrome bit, and a one-bit syndrome never selects a data correction. So the
  syndrome unit is not tripled. There is one per output.
- **Correction.** The corrector that drives each output is built three times,
  and `tmr_voter` merges the copies bit by bit. The 5 status bits go through
  the same voter.

**Keep the three corrector copies distinct in synthesis.** The copies are
identical, so a synthesis tool that merges equivalent logic (yosys `opt_merge`,
FPGA flows) will collapse them into one. That removes the protection. Keep
hierarchy or mark the copies keep/dont_touch.

## Interface and timing (`prop_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset that clears all filter state |
| `t[NTAPS]` | in | W | taps h[0..3], shared by all seven filters |
| `x[K]` | in | W | samples x1..x4 |
| `inj_filt[K+R]` | in | W | XOR fault masks for filter output registers (0..K-1 data, K.. check); tie to 0 |
| `inj_enc[R]` | in | W | XOR fault masks on the check filter inputs (encoder adder faults); tie to 0 |
| `inj_corr[K]` | in | W | XOR fault mask on one corrector copy per output; tie to 0 |
| `yc[K]` | out | W | corrected outputs yc1..yc4 |
| `s[K]` | out | R+2 | `{error detected, this output corrected, s1..sR}` |

Every filter registers its output. The encoder sits before those registers
and the decoder after them, both combinational. So `yc` and `s` show the
result for the samples taken at the last rising edge: one cycle of latency
and one new sample per clock on each channel. The registers split the path
into two parts: input to register (encoder, multiply-accumulate) and
register to output (syndrome, correction, vote).

Parameters: `K = 4` data filters, `R = 3` check filters, `W = 32` bits,
`NTAPS = 4`, `THRESHOLD = 0`.

## What follows the original scheme and what is this design's own

These come from the original scheme:

- four data filters and three check filters
- the coding sums
- the syndrome table
- the correction rule `yc1 = z1 - y2 - y3`
- the threshold on the residues
- computing each check and each syndrome bit separately
- tripling the final correction elements
- the port names and widths x, t, yc (32 bits), s (5 bits)

These are this design's own choices:

- **Filter structure.** A direct-form filter with 4 taps. The taps come in on
  the `t` ports.
- **Arithmetic.** 32-bit wrapping arithmetic with no growth of the output
  width. Outputs that overflow wrap. The code still corrects them exactly, but
  the filter response is only meaningful while the true output fits in 32
  bits.
- **Status word.** The meaning of the 5-bit `s` outputs.
- **Registering.** Filter outputs are registered; the encoder and decoder are
  not.
- **Reset.** Synchronous and active high.
- **Which parts are tripled.** Only the correctors. The syndrome is not.
- **Corrector for output 4.** It rebuilds from check 2 (`z2 - y1 - y2`). The
  original gives only the rule for output 1.
- **Fault-injection ports.** They are added for testing.
- **Default threshold.** It is 0.

One difference from the reference implementation has not been reconciled.
Its FPGA results report 249 flip-flops. With 4 taps, this design needs 896
flip-flops for the filter delay lines and output registers. The tap count of
the reference build is not known.

## Limits of the protection

- **One faulty filter at a time.** Two simultaneous filter errors can be
  miscorrected.
- **Errors below the threshold pass unflagged.** With a threshold above 0, such
  errors are neither reported nor corrected.
- **Injected faults are limited.** Faults are injected into filter output
  registers (`inj_filt`, one cycle), check filter inputs (`inj_enc`, one check
  filter wrong for `NTAPS` cycles) and one corrector copy (`inj_corr`).
  A fault inside a filter's delay line has the same effect as `inj_enc`: one
  filter is wrong for several cycles. The decoder handles that one cycle at a
  time, but the testbenches do not inject it.

## Simulation

Each testbench checks itself against a reference model and prints
`TB_RESULT checks=N failures=M`. Build and run one with plain Verilator, for
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ftf_pkg.sv tb/tb_prop_top.sv \
          --top-module tb_prop_top -Mdir obj_tb
./obj_tb/Vtb_prop_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_fir_filter` | impulse response, random data against a reference convolution, fault mask, reset |
| `tb_check_encoder` | coding sums for the 4/3 code and the 11/4 code; fault masks |
| `tb_syndrome_unit` | the syndrome table for an error on each of the 7 outputs; threshold 8, including errors near it |
| `tb_output_corrector` | all 8 syndromes for each of the 4 outputs; rebuilt values and status |
| `tb_tmr_voter` | majority against a per-bit count |
| `tb_single_fault_correction` | decoder with an error on each output, and with corrector-copy faults |
| `tb_prop_top` | end to end: a default bank, a bank with threshold 64, and an 11-filter bank with 4 checks. Each must correct every data filter, ignore check-filter errors, mask corrector faults, let sub-threshold errors through, and recover from a mid-stream reset. Encoder faults must show as check errors and never reach a data output. Each of these events is counted and must occur. |
| `tb_prop_top_full` | the default bank, unchanged parameters, 20000 samples with a fault in most cycles |
