# Multichannel wave-union TDC with automatic weighted-histogram calibration

A time-to-digital converter (TDC) built from an FPGA carry chain is cheap and
fine-grained, but its bins are very uneven. Some delay steps are nearly zero
wide and others are several times the average. This design has two parts:

* the front end of each channel measures every hit twice in one sampling
  period. A *wave union* of one rising and one falling transition runs through
  the same delay line, and the line is read through four interleaved
  *sub-delay-lines*. This gives a bin of about 10 ps without bubble errors.
* the back end of each channel corrects the unevenness in hardware. For every
  raw code, a *calibration table* says which ideal bins (up to three) that code
  covers and what fraction of the code's width lies in each. Three *histogram
  memories* then add those fractions at those addresses. The histogram they
  build is therefore already expressed in equal-width bins.

The table is filled automatically. A processor runs one code-density test
with an asynchronous clock, reads the raw histogram back over AXI4-Lite,
computes the factors and writes them into each channel's table. No
per-device calibration is needed on a PC.

The programmable-logic part is written as synthesizable SystemVerilog. The
exception is the delay line and the wave-union launcher: on the FPGA they are
placed primitives and routing delays, so here they are behavioural models.
The processor is modelled in the testbench.

## Block structure

```
            ext_hit ─┐
                      input_selector ─ wu_launcher ─ tdl_carry4 ─ sub_tdl ─┬─ rising_encoder  x4 ─┐
  cd_clk (from PS) ──┘       ▲                       (50 CARRY4,          └─ falling_encoder x4 ─┴─ fine_code_sum
                             │                       200 taps, SCSC)                               │ fine code (0..400)
                          cd_mode                                                                  ├──► stamp {coarse, fine}
                             │                       coarse_counter ───────────────────────────────┘
                             │                                                                     ▼
 AXI4-Lite ── axi_lite_regs ─┴── channel_selector ───────────────► weighted_histogram
                                  (one channel at a time)          calibration_bram + histogram_bram L, M, R
```

`tdc_system` holds `N_CH` copies of `tdc_channel` (default 16), one
`channel_selector` and one `axi_lite_regs`. `tdc_pkg` has the shared widths
and the two structs: `cal_word_t` (one factor word) and `hist_rd_t` (the
L/M/R values of one bin).

| parameter | default | meaning |
|---|---|---|
| `N_CH` | 16 | channels |
| `N_CARRY4` | 50 | CARRY4 cells per delay line (200 taps, 4 sub-lines of 50) |
| `FINE_W` | 9 | fine-code width; the largest code is 2·4·50 = 400 |
| `HIST_DEPTH` | 512 | entries in the calibration table and histograms |
| `COE_W`, `COE_FRAC` | 9, 8 | width factor: unsigned, 8 fraction bits (1.0 = 256) |
| `HIST_W` | 32 | histogram bin, same fixed point (16.7 M hits per bin) |
| `COARSE_W` | 32 | coarse counter |

## Delay line, sub-delay-lines and the wave-union fine code

**Launcher.** `wu_launcher` turns each rising hit edge into a short positive
pulse, `hit AND NOT delayed(hit)`. The pulse is `PULSE_PS` wide (300 ps). Its
leading 0→1 edge and its trailing 1→0 edge both enter the carry chain. At a
sampling edge the line therefore holds a run of ones. The position of the run's
upper end measures the rising transition, and the position of its lower end
measures the falling transition.

**Tuned tap pattern.** Each CARRY4 offers a sum (S) and a carry (C) output
for each of its four stages. The line takes S, C, S, C from stages 0–3
(pattern "SCSC"). The taps are sampled by flip-flops on the sampling clock
(`tdl_carry4`). They are then registered again and split (`sub_tdl`):
sub-line *k* takes taps 4·j + *k*. Neighbouring taps in a sub-line are a whole
CARRY4 apart (about four element delays). This is much more than the clock
skew between taps, so each sub-line gives a clean thermometer code. The four
sub-lines are offset from each other by one element, so interleaving them
keeps the full resolution.

**Encoders.** For each sub-line, `rising_encoder` gives the index of the
highest one plus one, and `falling_encoder` gives the index of the lowest one.
`fine_code_sum` adds all eight codes. Each code grows by one whenever its
transition passes another tap of its sub-line. The sum therefore counts
every tap either transition has passed, which gives a bin of about
T/(N_rise + N_fall).

**Hit detection.** This is this design's own choice. A hit is flagged on the
first sample in which any sub-line is non-empty, after a sample in which all
were empty. A wave union that is still inside the line at the next edge is
therefore not counted twice. Hits must be at least three sampling periods
apart.

**Time stamp.** `stamp = {coarse count, fine code}` is valid three clocks
after the sampling edge that captured the hit: delay-line flip-flops, sub-line
register, encoder register, sum register. The published design sends
histograms to the host. The stamp output is added here so that single
measurements can be seen.

## Weighted-histogram calibration (the hard part)

### What the factors mean

A code-density test feeds the channel hits that are uniform in time. The count
of code *k* is then proportional to the width W[k] of actual bin *k*. Put the
actual bins end to end. Cut the same total span into ideal bins of equal
width Q, the mean bin width, which is the LSB. Actual bin *k* then overlaps a
few consecutive ideal bins. For up to three of them, the table stores:

* `Addr X[k]`: the number of the ideal bin;
* `Coe X[k] = overlap / W[k]`: the fraction of code *k* that belongs to
  that ideal bin (X = L, M, R).

Every hit of code *k* adds `Coe L[k]` to bin `Addr L[k]` of histogram L. It
also adds `Coe M[k]` to histogram M and `Coe R[k]` to histogram R, at their
own addresses. The calibrated histogram is H[n] = L[n] + M[n] + R[n]. A
narrow actual bin adds only a fraction of a count. A wide one spreads its
hits over the ideal bins it covers. Both the address (bin compensation) and
the width (bin-width calibration) are corrected in one step, so one
code-density test gives all the factors.

An actual bin up to 1 LSB wide lies within at most two ideal bins. One of
1–2 LSB lies within at most three. One of 2–3 LSB also lies within at most
three if it is aligned suitably. The testbench counts these three cases
(A, B, C).

A bin wider than that covers more ideal bins than it has factor pairs. The
ideal bins at its ends are then filled from its neighbours:

* the left neighbour's R pair and the right neighbour's L pair point at the
  ideal bins next to the wide bin;
* a neighbour that already covers that ideal bin has its coefficient raised
  by the share it takes over.

This is why a width factor can exceed 1.0 (up to 511/256). In this way bins
up to about 5 LSB wide can be handled. A width factor of 0 marks an unused
pair.

### Hardware (`weighted_histogram`)

* `calibration_bram` stores 512 words of 54 bits. The fine code is the read
  address, and the read takes one clock.
* The three `histogram_bram` banks each do a read-modify-write: the bin is
  read in the clock after the factor word arrives, and written one clock
  later. One hit per clock is accepted.
* A hit that arrives right behind a hit to the same bin gets the value being
  written forwarded to it (`fwd`), so no count is lost.
* All three banks are updated for every hit, even with a zero weight, so they
  stay in step.
* The latency from `fine_valid` to the bins being written is three clocks. A
  histogram write finishes six clocks after the sampling edge.

The read port of each bank also serves processor read-out. A read-out request
waits while hits are being accumulated (a *stall*) and is answered with
`rd_valid` one clock after it is served. This lets histograms be read during
acquisition.

A clear command, and leaving reset, sweeps zero through all bins at one bin
per clock (`clr_busy`). Hits that arrive during the sweep are dropped.

### Fixed-point choices

These are this design's own choices:

* factors have 8 fraction bits;
* a bin is a 32-bit accumulator in the same format;
* the processor adds the three banks after read-out, and does not use a
  hardware adder tree.

Rounding the factors to 8 fraction bits is one source of the residual DNL
that remains after calibration.

## Automatic calibration flow and register map

The processor (`tb/ps_model.sv` in simulation) runs these steps:

1. Set code-density mode (`CTRL[8]`). Every channel's `input_selector` then
   takes the code-density clock instead of its input.
2. For each channel, load an identity table (`Addr L[k] = k`, `Coe L = 1.0`, other pairs unused).
   Clear the histograms.
3. Let the code-density clock run for a fixed time.
4. For each channel, read the raw histogram. Compute the factors as described
   above, write them, and clear the histograms.
5. Leave code-density mode. The channels now build calibrated histograms of
   their inputs.

`axi_lite_regs` is a 32-bit AXI4-Lite slave. A write is accepted when address
and data are both valid, and the response follows one clock later. A read
answers one clock after its address is taken.

| addr | name | access | bits |
|---|---|---|---|
| 0x00 | CTRL | rw | [7:0] selected channel, [8] code-density mode |
| 0x04 | CMD | wo | [0] clear selected channel's histograms |
| 0x08 | STATUS | ro | [0] clear busy, [1] read-out data valid |
| 0x0C | CAL_ADDR | rw | [8:0] fine code whose factors are written next |
| 0x10 | CAL_ADDRS | rw | [26:18] Addr L, [17:9] Addr M, [8:0] Addr R |
| 0x14 | CAL_COES | rw | same layout for Coe; writing it stores the word at CAL_ADDR |
| 0x18 | HIST_ADDR | rw | writing it starts a read-out of that bin |
| 0x1C/0x20/0x24 | HIST_L/M/R | ro | bank values of the bin read |

`channel_selector` routes the strobes (factor write, read-out, clear) only to
the selected channel and returns that channel's answers. The code-density
mode bit goes to all channels at once.

## Delay-line model used in simulation

`tdl_carry4` draws each element delay uniformly from 10–30 ps with a
per-instance seed. It also applies these choices:

* S taps switch half an element earlier than C taps;
* falling transitions are 10% slower;
* every tap flip-flop sees up to ±3 ps of clock skew.

The sampling clock used in the tests is 3.3 ns. The model line gives about
300 wave-union codes per channel, with raw DNL of 3–4 LSB and INL of
11–17 LSB peak-to-peak. These are the same order as a real Zynq-7000 line.
All these numbers are the model's; they are not measurements of hardware.

## Departures from the published design

* The delay line and the launcher are behavioural. Placement constraints
  (e.g. LOC/RLOC for the carry chain) are not part of this RTL.
* Per channel, the memories total 27.6 Kb (table) + 3·16 Kb (histograms). That
  is about 2.5 block RAMs, against the 2 reported for the published design,
  which does not give its bin width or factor format.
* The sampling clock frequency is not specified by the source. 3.3 ns is used
  in simulation and nothing in the RTL depends on it.
* The factor calculation is done from the actual and ideal bin edges, as
  described above, rather than from a particular program. The hand-over to
  neighbours for bins wider than three LSB follows the published idea.
* Time stamps `{coarse, fine}` and the clear, stall and read-out handshakes
  are additions that the source does not describe.
* The time-interval tests of the published evaluation use an on-chip
  programmable delay (IDELAY), which is not part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The system tests are:

* `tb_tdc_system` runs 2 channels and 40 000 code-density hits, in a few
  seconds.
* `tb_tdc_system_full` runs the default 16 channels and 60 000 hits per
  channel, in about 30–70 s.

Both run the whole automatic flow of `tb/tdc_system_flow.svh`. They check:

* histogram totals against time stamps;
* DNL and INL before and after calibration: calibrated pk-pk DNL < 0.8 and
  INL < 1.5 LSB per channel, with averages below 0.5 and 1.0;
* that external hits reach only their own channel.

They also count each mechanism and fail if one never happened: clears, mode
switches, factor words, cases A/B/C, read-out stalls, and channel selections.

In the full run the average calibrated pk-pk DNL was 0.32 LSB and the average
INL was 0.45 LSB. The raw values were 3.2–4.2 and 11–17 LSB.

`tb_tdc_time_interval` repeats the published precision test on one
calibrated channel. It makes 30 measurements, with the hit delay after the
sampling edge stepped across one clock period and 100 000 hits per
measurement. Each hit gets 5 ps of Gaussian jitter, because the delay-line
model itself has no noise. From each calibrated histogram the test takes the
mean and the standard deviation. It checks that:

* the mean moves by one ideal bin per LSB of delay (slope within 3 %);
* no mean departs from the fitted line by more than 1.5 LSB (0.67 LSB was
  seen);
* the average standard deviation stays below 13.86 ps (9.0 ps was seen).

This test also shows a property of the method. When all hits fall on a few
codes, the histogram total is the sum of those codes' width factors, not the
hit count. For a code that has taken over part of a wide neighbour, this sum
is above 1.0. Totals of 0.99–1.40 × the hit count were seen, and one
measurement's spread widened to 14 ps. Code-density histograms, which spread
the hits over all codes, are not affected.

To simulate with Verilator 5 (the `--timing` option is needed for the
behavioural delays):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/tdc_pkg.sv rtl/*.sv tb/ps_model.sv tb/tb_tdc_system.sv \
    --top-module tb_tdc_system
./obj_dir/Vtb_tdc_system
```

For a single block, list `rtl/tdc_pkg.sv`, the block's module and the modules
below it, then `tb/tb_<block>.sv`. All files use `timeunit 1ps;
timeprecision 1fs;`.
