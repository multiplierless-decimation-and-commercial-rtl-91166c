# Multiplierless decimation and postfiltering of a wrapping signal

This is RTL for a two-part signal processor. An analog front end delivers a
slowly wandering, unbounded signal at one of ten line rates, from 1.544 MHz to
622.08 MHz. Only the low B_x bits (8 to 16) of each sample are sent; the upper
bits are simply lost. The signal has two useful properties:

* it never moves by more than half the range of those B_x bits from one
  sample to the next;
* its history can always be rebuilt from the low bits alone.

The design works in two places:

* **On the chip** (`onchip_decimator`): a modified CIC decimator brings the
  rate down by M = 1 to 16, using only adders and registers. It sends 21 bits
  per output sample off chip.
* **In programmable logic** (`input_functions`, `filter_bank`): the decimator
  is finished there, and a bank of first-order IIR filters and a 16-tap FIR
  produce two outputs. The "lowpass" band is a 10 Hz or 100 Hz lowpass. The
  "bandpass" band is one of three highpasses, an optional 0.2 Hz highpass,
  then a lowpass.

No block has a general multiplier. Every IIR coefficient is a power of two
times a factor of the form 1 ± 2^−m ± 2^−n or (1 ± 2^−m)(1 ± 2^−n), which
two adders can apply.

`decimation_filter_system` is the top level and joins both halves.

## The key idea: arithmetic on wrapped numbers

Let x[n] be the true signal and x_w[n] its low B_x bits. If
|x[n] − x[n−1]| < 2^(B_x−1), the first difference taken modulo 2^B_x, read
as a signed number, is the true difference. Accumulating those differences
in a wider register gives the low bits of x[n] again, plus a constant offset.
This is *unwrapping*.

A filter built only from additions produces the low B bits of its output
correctly if its inputs are right in their low B bits. Carries only move
upward. So a filter and decimator can run on a B_y-bit register file and
give the exact low B_y bits of the ideal result, as long as B_y covers the
largest output step:

    B_y = ceil(B_x + 4 log2(M) + 1)      (K = 3, L = 1 modified CIC)

The design uses this rule twice:

* **On chip:** `unwrap_extender` takes the 14-bit first difference.
  - It sign-extends the difference from bit B_x−1 through a thermometer-coded
    multiplexor (UNWRAP EXTEND SELECT).
  - It accumulates the result at 27 bits, the largest B_y of any rate
    (51.84 MHz).
  - The bottom 8 accumulator bits would always equal the input register, so
    they are taken from it and only a 19-bit accumulator is built.
* **Off chip:** `input_functions` differences the decimated 21-bit stream
  again and accumulates it in a (21 + r)-bit register, with r = 12. The
  highpass filters then have room for their bounded outputs. The top
  b = 24 bits feed the filters. Every adder there is split into a 16-bit
  LSP and a 5-bit (accumulator: 5 + r bit) MSP. The MSP runs one strobe
  behind, with a registered carry between the parts, so no carry chain
  is longer than 17 bits.

Every adder and accumulator in the design wraps on purpose, and the testbench
compares results modulo 2^width. Read a "wrong-looking" sign bit with this in
mind.

## The modified CIC decimator

The decimating filter is

    H(z) = (1 + z^-1 + ... + z^-(M-1))^3 · (1 + z^-(M/2)),   DC gain 2·M^3

It is built as follows:

* three integrators at the input rate, on chip (`cic_accumulators`);
* an *intermediate stage* 1 + z^-(M/2);
* decimation by M;
* three combs (1 − z^-1) at the low rate, off chip, at the front of
  `input_functions`.

The extra factor (1 + z^-(M/2)) puts a zero at the first alias, for the cost
of one adder.

The intermediate stage is computed only once per output period. A holding
register captures the third integrator output v[n0] at the start of each
period. The adder forms v[n0] + v[n] every clock. The decimation register is
enabled (DECIMATOR ENABLE) M/2 clocks later, so it keeps v[n0] + v[n0+M/2].

The output multiplexor (`output_mux`) picks which 21 of the 27 bits reach
the pins:

| OUTPUT MUX SELECT | Bits on pins | Used for |
|---|---|---|
| 000 | 6..26 | B_y = 27 (51.84 MHz) |
| 001 | 5..25 | B_y = 26 (155.52 MHz) |
| 010 | 4..24 | B_y = 25 (622.08 MHz) |
| 011 | 0..20 | B_y ≤ 21 (8.448, 34.368 and 139.264 MHz) |
| 100 | input bits 15..0 on pins 20..5 | M = 1 rates: decimator bypassed |

The per-rate constants are in `decim_pkg::mode_cfg`:

| Rate (MHz) | M | B_x | B_y | UES (UES8 first) | OMS |
|---|---|---|---|---|---|
| 1.544 | 1 | 16 | 16 | – | 100 |
| 2.048 | 1 | 16 | 16 | – | 100 |
| 6.312 | 1 | 14 | 14 | – | 100 |
| 8.448 | 2 | 14 | 19 | 111111 | 011 |
| 34.368 | 4 | 12 | 21 | 111100 | 011 |
| 44.736 | 1 | 11 | 11 | – | 100 |
| 51.84 | 12 | 11 | 27 | 111000 | 000 |
| 139.264 | 4 | 10 | 19 | 110000 | 011 |
| 155.52 | 12 | 10 | 26 | 110000 | 001 |
| 622.08 | 16 | 8 | 25 | 000000 | 010 |

## Carry-chain slant: how the chip reaches 622 MHz

This is the hardest part to follow. At 622.08 MHz a 27-bit ripple carry
does not fit in one clock, so `slant_datapath` cuts every adder on the chip
into four slices: bits 0–6, 7–13, 14–20 and 21–26.

* Slice j of a sample is processed one clock after slice j−1.
* The carry out of each slice waits in a one-bit register for the next
  slice.
* In any clock, slice 3 holds a sample three clocks older than slice 0. This
  offset is the "slant".

Entering and leaving the slant:

* **In:** input bits 7..13 pass a 7-bit register before the unwrapper. The
  sign-extension decision made in slice 1 is carried to slices 2 and 3
  through two more registers.
* **In the intermediate stage:** each slice has its own holding register and
  its own strobe, `latch[j]`. The strobes are one clock apart, so each slice
  captures its part of the *same* sample.
* **Out:** slices 0, 1 and 2 of the sum are delayed by 3, 2 and 1 clocks so
  all four line up again (the "de-slant"). The top slice goes straight to the
  multiplexor and the decimation register.
* **Enable:** DECIMATOR ENABLE therefore comes M/2 clocks after `latch[3]`.

`decim_control` generates the strobes from a phase counter that runs
modulo M:

* `latch[j]` is high at phase j mod M.
* DECIMATOR ENABLE is high at phase (3 + M/2) mod M.
* For M = 16 the latches fire at phases 1–4 (counting from 1) and the enable
  at phase 12.
* For M = 2 the strobes of slices 0/2 and 1/3 fall in the same clocks.
* For M = 1 the enable is always high.

`decim_control` also drives:

* UNWRAP EXTEND SELECT and OUTPUT MULTIPLEXOR SELECT, which are constant per
  rate;
* REGISTER CLEAR, one clock after reset and after every change of `rate`.

`onchip_decimator` has a parameter `SLANT`. SLANT = 1 is the default and
builds the sliced path described above. SLANT = 0 builds the same filter
with whole 27-bit adders (`unwrap_extender`, `cic_accumulators`,
`intermediate_stage`). The unpipelined version is easier to read. The
chip testbench checks both against the same reference filter.

## Postfilters

### First-order IIR (`iir_filter`, `shift_add_mult`)

Each lowpass and highpass is the loop

    w[n] = x[n] − y[n],   y[n+1] = y[n] + ε · w[n−k]

* `y` is the lowpass output and `w` the highpass output.
* Multiplying the difference by ε, instead of the feedback by 1 − ε, keeps
  the wide fractional bits inside the accumulator only.
* ε = 2^−s · f, with f = 1 ± 2^−m ± 2^−n (form a) or
  f = (1 ± 2^−m)(1 ± 2^−n) (form b).
* `shift_add_mult` builds f with two adders. Products are exact unless the
  configuration asks to round 1 or 3 LSBs off the second adder, which
  shortens its carry chain.

At the faster rates the loop must be pipelined, so it holds k extra
registers (k = 3 or 4). A loop with extra delay behaves like the ideal
filter preceded by a short correction filter h_fix. Two cases:

* **Small ε:** the correction is negligible. The coefficient ε′ is chosen
  for the delayed loop and h_fix is dropped.
* **The 400 kHz lowpass at 44.736 MHz:** ε is too large. `hfix_filter`
  places an approximation in front of it:
  y[n] = x[n−5] − (25/512) · Σ_{m=1..4} x[n−5−m].
  Its overall gain factor ε/ε′ is left out.

### FIR (`fir_symmetric`)

Rates that need a third-order lowpass "D" use a 16-tap symmetric FIR with
8-bit coefficients. The FIR also undoes the passband droop of the CIC.

* The coefficient sets a0..a7, with a7 = 127, are held in
  `filt_pkg::fir_coef` for every decimated rate.
* An extra 622.08 MHz set is used while the 250 kHz highpass "C" is
  selected.
* The output is the exact sum in 1/128 units. Divide by 128 · Σa for unit DC
  gain.

### Filter bank (`filter_bank`) and configurations

The programmable logic holds one rate's filters at a time. `filt_pkg::bank_cfg`
returns the set for a rate, and the top's `PLD_RATE` parameter picks it. All
ten rates are entered, each with a 24-bit data path. Cutoffs per rate, in Hz
unless marked:

| Rate (MHz) | Decimated rate (MHz) | HPF A | HPF B | HPF C | LPF D | Loop delays k |
|---|---|---|---|---|---|---|
| 1.544 | 1.544 | 10 | 8 k | – | 40 k, first order | 0 |
| 2.048 | 2.048 | 20 | 700 | 18 k | 200 k, FIR | 0 |
| 6.312 | 6.312 | 10 | 3 k | – | 60 k, first order | 0 |
| 8.448 | 4.224 | 20 | 3 k | 80 k | 400 k, FIR | 0 |
| 34.368 | 8.592 | 100 | 10 k | – | 800 k, FIR | 0 |
| 44.736 | 44.736 | 10 | 30 k | – | 400 k, first order + h_fix | 4 |
| 51.84 | 4.32 | 10 | 500 | 20 k | 400 k, FIR | 0 |
| 139.264 | 34.816 | 200 | 10 k | – | 3.5 M, FIR | 3 or 4 |
| 155.52 | 12.96 | 10 | 1 k | 65 k | 1.3 M, FIR | 0 |
| 622.08 | 38.88 | 10 | 5 k | 250 k | 5 M, FIR | 4 (3 for HPF C) |

Every rate also has the 10 Hz and 100 Hz lowpasses and the 0.2 Hz highpass.
Each ε is a two-adder approximation of 1 − exp(−2π·fc/fs) at the decimated
rate, within 2 %. There are two exceptions. The 250 kHz highpass at
622.08 MHz and the 400 kHz lowpass at 44.736 MHz are wide filters with loop
delays, and their coefficients are chosen for the delayed loop. Two examples:

| Filter | 622.08 MHz (default) | 44.736 MHz |
|---|---|---|
| 10 Hz LPF, k = 4 | 2^−19 (1 − 2^−3)(1 − 2^−5) | 2^−20 (1 + 2^−1)(1 − 2^−6), round 1 |
| 100 Hz LPF, k = 4 | 2^−16 (1 + 2^−4) | 2^−16 (1 − 2^−4)(1 − 2^−5), round 3 |
| 0.2 Hz HPF, k = 4 | 2^−25 (1 + 2^−3)(1 − 2^−5) | 2^−25 (1 − 2^−4) |
| HPF B | 2^−10 (1 − 2^−3)(1 − 2^−4) | 2^−8 (1 + 2^−4) |
| HPF C | 2^−5 (1 + 2^−3 − 2^−8), k = 3 | none |
| LPF D | FIR (two coefficient sets) | 2^−5 (1 + 2^−2)(1 + 2^−3), with h_fix |

A first-order LPF "D" without loop delay (1.544 and 6.312 MHz) needs no
h_fix.

Selections:

* `hp_sel`: 0 = A, 1 = B, 2 = C. Unused codes give A.
* `hp02_on`: inserts the 0.2 Hz highpass after the selected highpass. It
  removes the offset a ramp leaves after a single highpass.
* `lp_sel`: 0 = 10 Hz, 1 = 100 Hz.

## Timing and interfaces

The design has one clock, the input sample clock.

* The programmable-logic side advances on `sample_valid`, which is high once
  per M clocks (every clock when M = 1).
* **Chip:** with the slant, the pins change 8 clocks after the second kept
  sample of a period enters. Without it the figure is 5.
* **End to end:** a change at `x_in` reaches the unwrapped filter input
  7 + 6M clocks later when decimating, and 3 clocks later when bypassed.
  The input functions account for 6 strobes of this (3 when bypassed): three
  combs, the unwrap differencer, the accumulator and one strobe that
  realigns the split carry chains (below).
  Each filter then adds its own strobes:
  - IIR lowpass: 1 + k;
  - FIR: 1;
  - h_fix: 5.
* **Reset:** `rst` is synchronous. Changing `rate` clears the unwrapper and
  the programmable-logic registers for one clock.
* **Mode changes:** no strobe is issued in the clock where `rate` changes.
  The first output period of the new mode is therefore full length.
* **Output offset:** outputs carry an arbitrary constant offset after a
  clear. This is inherent to unwrapping.

Top-level ports: `x_in[15:0]` (rates with M > 1 use bits 13..0), `rate`,
`hp_sel`, `hp02_on`, `lp_sel`, `pins[20:0]`, `sample_valid`,
`lowpass_out[23:0]` and `bandpass_out[35:0]`.

## Where this RTL departs from the reference design

* **Latches:** the intermediate-stage holding registers are enabled
  flip-flops. The reference uses transparent latches open in the first half
  of the clock. The kept sample is the same for every M ≥ 2.
* **Reconstructed pipeline:** the exact place of each slant and carry
  register is rebuilt from the register counts and the strobe timing. Only
  the totals and the slice boundaries were given.
* **Control logic:** the reference leaves it unspecified, describing only
  the signals. The phase counter here is one possible implementation.
* **IIR carry chains:** they are not split. The IIR loops use single
  full-width adders, and the k loop registers sit on the multiplier output
  rather than inside split adders. Transfer functions are unchanged; only
  the achievable clock rate differs. The input functions, by contrast, are
  split like the reference: a 16-bit LSP one strobe ahead of the MSP.
* **FIR structure:** a pre-adder and one constant multiply per tap pair,
  written behaviourally. The reference leaves the FIR to a vendor generator.
* **h_fix gain:** the correction omits the ε/ε′ gain, as the reference does.
* **Configurations:** all ten are entered, but the end-to-end testbench
  models only the default one (622.08 MHz). `tb_filter_bank_rates` runs all
  ten banks against a model.
* **Not modelled:** the analog front end and the programmable-logic device
  itself. The testbenches generate the wrapped input directly.

## Files

All files are in `rtl/`. Each opens with a description of its interface and
timing.

* **Packages**
  - `decim_pkg.sv`: widths, the `rate_e` modes and the per-rate constants.
  - `filt_pkg.sv`: `iir_cfg_t`, the FIR tables and `bank_cfg`.
* **Chip**
  - `decim_control.sv`
  - `onchip_decimator.sv`
  - `slant_datapath.sv`
  - `unwrap_extender.sv`
  - `cic_accumulators.sv`
  - `intermediate_stage.sv`
  - `output_mux.sv`
* **Programmable logic**
  - `input_functions.sv`
  - `filter_bank.sv`
  - `iir_filter.sv`
  - `shift_add_mult.sv`
  - `fir_symmetric.sv`
  - `hfix_filter.sv`
* **Top:** `decimation_filter_system.sv`

`tb/` holds one self-checking testbench per block, `tb_<module>.sv`. The
slant data path is tested through `tb_onchip_decimator`. Each testbench
compares against an independent model and prints
`TB_RESULT checks=N failures=M`. A watchdog ends any run that hangs.

`tb_filter_bank_rates` runs the filter banks of all ten rates side by side.
It also checks every coefficient against its cutoff and every bank's
structure against the filter list above.

`tb_decimation_filter_system` runs the top at its default parameters.

* It drives a random walk through all ten data rates.
* It checks the unwrapped decimator output against an ideal CIC computed
  from the true signal, including the exact pipeline delay and the output
  period.
* It checks both band outputs against a model of the filters on every clock.
* It counts each mechanism and fails if one never occurs: decimation by
  2/4/12/16, bypass, input and pin wrap-around, mode switches, every filter
  selection and the FIR set switch.

## Simulating

The testbenches need Verilator 5 with `--timing`. List the two packages
first and let `-y rtl` find the modules. For example:

    verilator --binary --timing -y rtl rtl/decim_pkg.sv rtl/filt_pkg.sv \
        tb/tb_decimation_filter_system.sv \
        --top-module tb_decimation_filter_system -o sim
    ./obj_dir/sim

Swap in any other `tb/tb_*.sv` and its name for a block test. Each
simulation finishes in well under a second.

To load another rate's filters, set `PLD_RATE`; to change a filter, edit its
`bank_cfg` entry. The testbenches start all registers from reset or clear
and do not depend on X propagation.
