# Digital SNR generator

A telemetry receiver is only as well characterised as the test signal it is
measured with. The classic way to set a signal-to-noise ratio for such a test is
to add analog noise to an analog signal and calibrate the result with power
meters (the Y-factor method). That calibration is accurate to a few tenths of a
dB at best.

This design takes a different approach. It builds the signal and the noise
**digitally**, sample by sample, at the system clock f_sys (2 to 20 MHz).
Because the ratio of two digital attenuator settings is exact, the SNR of the
sum is known by construction. The box then measures what it actually delivers:

- It demodulates its own output with an exact replica of the data it put
  there.
- It does the same for the output after digital-to-analog conversion, the
  analog output filter and conversion back to digital.

The accuracy of the measured SNR is then limited only by integration time
and quantisation, not by analog calibration.

The SystemVerilog here describes the whole signal box:

- the three generation channels;
- the output summer;
- two statistics monitors, one for the digital output and one for the analog
  output;
- a histogram accumulator;
- the CPU register interface;
- behavioural models of the DAC, the analog filter, the ADC and the 2-ns delay
  line.

The host CPU and the workstation that compute filter coefficients and SNR
figures are outside it. Everything is driven through a simple register bus.

```
            +-----------------------------+
 CPU bus -->| sgb_bus_regs (config, RAMs, |--> results, histogram, irq
            |  coefficients, status)      |
            +-----------------------------+
  channel 0: pattern_generator -> fir_filter (63) -> attenuator A1 --+
  channel 1: pattern_generator -> fir_filter (63) -> attenuator A2 --+--> output_summer --> S_T(n) (12 bit, digital output)
  channel 2: pattern_generator -> fir_filter (63) -> attenuator AN --+        |     \
             (noise: PN-addressed Gaussian table)                             |      replicas A1*D1f, A2*D2f + symbol marks
                                                                              |           |
                                 stats_monitor 0 <----------------------------+-----------+
                                                                              v           |
             dac_model -> butterworth3_model -> adc_model (clock via delay_line_model)    |
                                                      |                                   |
                                 stats_monitor 1 <----+-----------------------------------+
                    histogram_accumulator <-- raw noise / filtered noise / S_T / channel 0 D(n)
```

Everything runs at one sample per clock. The path from a data RAM address to
S_T(n) takes 5 clocks:

| Stage | Clocks |
|---|---|
| RAM read and product | 2 |
| Filter | 1 |
| Attenuator | 1 |
| Summer | 1 |

## Generation channels

The three channels are identical hardware. Software decides their roles:

- **Channels 0 and 1** normally carry data.
- **Channel 2** normally carries noise.

Each channel has the following parts (`pattern_generator`):

- a 64K x 8 **data RAM** (`pattern_ram`);
- a 64K x 8 **subcarrier RAM**;
- a **symbol timer** that counts I_S clocks per symbol, with 2 <= I_S <= 2^24;
- a 32-bit **phase accumulator**, whose top 16 bits address the subcarrier RAM;
- a **PN address generator** (`pn_generator`). This is a 63-bit
  maximal-length LFSR (x^63 + x^62 + 1) that leaps 16 steps per address, so
  successive addresses are disjoint windows of the sequence. Its period is
  2^63 - 1 addresses, which is millennia at 20 MHz.

The data RAM can be read in four ways (`mode`):

| mode | name | data RAM read | use |
|---|---|---|---|
| 0 | SEQ | next address once per symbol, wrap after `pat_len_m1` | frames, PN data patterns, sync words |
| 1 | RANDOM | PN address once per symbol | very long random data |
| 2 | NOISE | PN address every clock | Gaussian noise: the RAM holds a quantised normal table |
| 3 | EXT | none: +127/-127 from an external line, two-flop synchronised | symbols generated elsewhere, sampled asynchronously |

In NOISE mode the noise comes from the table, not from the LFSR bits. The
software fills the 65,536 RAM words so that each 8-bit value appears in
proportion to its Gaussian probability, keeping the standard deviation below
43 LSB so the tails fit in 8 bits. Reading the table at uniformly distributed
random addresses then gives Gaussian samples. How good the noise is depends on
how uniform the addresses are, not on the LFSR's autocorrelation.

With the subcarrier enabled (`sc_en`), the channel output is the exact 16-bit
product D(n) = d(n) x Sc(n); with it disabled, D(n) = d(n). The subcarrier
table holds any waveform:

- a square wave gives biphase;
- a sine or cosine gives a carrier or IF.

The frequency is `sc_inc` x f_sys / 2^32:

- an increment of 2^16 steps through the table one word per clock;
- 100 Hz at 20 MHz is an increment of 21,475;
- 5 MHz is 2^30.

All counters sit at their start values while `run` is low, so raising `run`
starts all channels in step. `sym_phase` makes a channel's first symbol
shorter by that many clocks. Setting it to I_S/2 on channel 1 gives offset
QPSK.

Typical configurations:

| signal | channel 0 | channel 1 | channel 2 |
|---|---|---|---|
| two data channels on subcarriers | data on subcarrier 1 | data on subcarrier 2 | noise |
| residual carrier | constant data on sin (carrier) | data on cos (modulation) | noise |
| QPSK / OQPSK | I data on sin | Q data on cos (`sym_phase` = I_S/2 for OQPSK) | noise |

## Filters, attenuators and the output word

Each channel has a 63-tap FIR filter (`fir_filter`).

- The coefficients are signed Q2.14, so 0x4000 = 1.0, and are loaded by the CPU.
- The filter is in transposed form. Each register holds a partial sum, so the
  critical path is one multiply and one add.
- The result is shifted back by 14 bits and saturated to 16 bits.
- A lowpass gives baseband and a bandpass gives IF. The noise and data paths
  can have different filters.

The attenuator (`attenuator`) multiplies by an unsigned Q1.15 factor.

- 0x8000 = 1.0, and larger settings are clamped, so A <= 1 always.

The summer (`output_summer`) forms S_T(n):

- It adds the three attenuated channels.
- It shifts the 18-bit sum right by 4 and saturates it to 12 bits, the DAC
  width.
- In the same register stage it delays the attenuated data channels A1·D1f(n)
  and A2·D2f(n) and their symbol marks. The monitors use these as replicas
  that line up exactly with S_T(n).

The set symbol SNR follows from A_D, A_N, the filter responses and the noise
table. That calculation is done in software. The 4-bit shift maps one full-scale 16-bit
channel onto the full 12-bit range; a subcarrier product of two 8-bit
samples (at most 127 x 127) at A = 1 uses about half of it, which leaves
headroom for noise. At high noise levels the output saturates, and the histogram shows when
it does.

## Statistics monitors

This is the part that makes the box a calibrator rather than a signal source.
It is also the hardest part to use correctly, so this section goes into
detail. There are two identical monitors (`stats_monitor`):

- monitor 0 watches the digital output S_T(n);
- monitor 1 watches the ADC code of the analog output.

### Demodulation by the exact replica

The monitor multiplies each output sample by the data it knows it sent:

    S(n) = x(n) · r(n),   with r(n) = A_D D_f(n)

Here r(n) is the attenuated, filtered data channel picked by `ref_sel`
(channel 0 or 1), taken from the summer so it is exactly aligned. Because the
filtered data spectrum is known exactly, this is the optimum (matched)
demodulation for subcarrier and data together. For QPSK, measure I and Q one
after the other by switching `ref_sel`.

### Symbol integration

`symbol_integrator` sums S(n) over each symbol:

    S_i = sum of S(n) over the I_S samples of symbol i

It does not count clocks itself. It dumps on the *symbol marks*: the pattern
generator flags the first sample of each symbol, and that flag travels with the
sample through the filter, the attenuator and the summer. So the window is
exactly I_S samples, for any I_S and any `sym_phase`. The partial window that
is open when the monitor is enabled is thrown away.

### Accumulation over K symbols

`symbol_accumulators` gathers three totals over K symbols (K up to 2^24 - 1):

| result | width | contents |
|---|---|---|
| sum | 80 bit | Σ S_i |
| sumsq | 96 bit | Σ q_i², where q_i = S_i >>> `sq_shift`, saturated to 32 bits |
| nerr | 32 bit | number of S_i < 0 (symbol errors: the replica carries the data sign, so every noise-free S_i is positive) |

After the K-th symbol:

- the totals are copied to result registers;
- the status bit is set and `irq` rises;
- accumulation restarts at once, so consecutive measurements leave no gap.

The pre-squaring shift keeps the squares in 64 bits. S_i can reach 51 bits
when I_S is large. Choose `sq_shift` so that |S_i| >> `sq_shift` stays below
2^31.

### From the results to an SNR

The CPU computes the SNR:

    m  = sum / K                              (mean symbol value)
    v  = sumsq / K − (m / 2^sq_shift)²        (variance, in the shifted scale)
    SNR_M = 10 log10( (m / 2^sq_shift)² / (2 v) )   dB
    SER   = nerr / K

The measurement's confidence grows with K. About one second of symbols gives a
few hundredths of a dB.

### Aligning the analog path

The analog output comes back through:

1. the DAC;
2. the three-pole filter;
3. the ADC.

Together they add an unknown delay T = k·T_sys + τ, with τ less than one
clock. The monitor removes each part separately:

- **Integer part k:** `kdly` (0–63) delays the replica and its marks by k
  clocks, through a 64-deep shift register.
- **Fraction τ:** the ADC's sampling clock goes through the delay line
  (`delay_line_model`, 2-ns steps, set by the DELAY register). The ADC then
  samples the analog waveform τ later. The residual error is below 2 ns, and
  its SNR penalty is 20·log10(1 − 2τ/T_S).
- **Window position:** `offset` (0–255) delays only the symbol marks, so the
  integration window can also be slid relative to the data. This helps when
  filtering spreads the symbols.

Procedure:

1. Scan `kdly` and maximise `sum`.
2. Step the delay line and maximise `sum` again.
3. Measure.

The end-to-end testbench does exactly this.

### Timing

- S(n) is registered (1 clock).
- The integrator dumps 1 clock after the mark.
- The results are latched 1 clock later.

Two results are K·I_S clocks apart, which is checked in simulation.

### Use rules learned in testing

- Stop the channels (`run` = 0) and **let the pipeline drain for a few tens of
  clocks** before reconfiguring a monitor. Then clear the status bits
  immediately before restarting.
- Otherwise a last result from the old configuration can land after the clear
  and be mistaken for the new one.

## Analog loop models

These four are behavioural models for simulation, not synthesizable logic.

- `dac_model`: an ideal 12-bit zero-order hold.
- `butterworth3_model`: a three-pole Butterworth lowpass, 1/((s+1)(s²+s+1)).
  - The cutoff is FC_NORM·f_sys, with a default of f_sys/4.
  - It is evaluated with the pre-warped bilinear transform on every clock, as a
    first-order and a second-order section.
  - Its DC gain is 1.
- `adc_model`: an ideal 12-bit rounding and clipping quantiser, clocked by
  the delayed clock.
- `delay_line_model`: a transport delay of `sel` x 2 ns.

The top output `analog_out` is a `real`. Three poles is the smallest
Butterworth order whose effect on the output SNR stays below 0.1 dB. Real
converters and filters replace these models in hardware. Their non-idealities
(ADC nonlinearity, waveform distortion) are not modelled.

## Histogram

`histogram_accumulator` confirms the noise distribution and serves as a
self-test of the data and subcarrier waveforms.

- It counts samples into 256 bins of 32-bit saturating counters.
- Each sample is shifted right by `shift`, saturated to −128..127 and offset
  by 128.
- The source is selected in HISTCFG:
  - 0: raw noise d(n) of channel 2;
  - 1: filtered noise;
  - 2: S_T(n);
  - 3: D(n) of channel 0.
- Each bin is read as two 16-bit halves.

## CPU register interface

`sgb_bus_regs` gives a synchronous bus:

- one write per clock (`bus_we`, `bus_addr`, `bus_wdata`);
- one read per clock (`bus_re`), with `bus_rdata` valid one clock later.

Bits [23:20] of the 24-bit word address select the region:

- global control;
- channel registers;
- monitor registers and results;
- histogram;
- data RAM;
- subcarrier RAM;
- FIR coefficients.

The full map is in the header of `rtl/sgb_bus_regs.sv`. Configuration registers
are write-only and reset to zero. Status bits are sticky and cleared by
writing 1. A measurement sequence:

1. Load the RAMs and coefficients.
2. Write the channel registers.
3. Write K, `kdly`, `offset` and `sq_shift`, then enable the monitor.
4. Clear the status.
5. Set `run`.
6. Wait for `irq`.
7. Read 13 result words per monitor (sum, sumsq and nerr, least significant
   word first).

## Sizes and rates

The defaults are the full-size design:

- three channels, each with two 64K x 8 RAMs and a 63-tap filter;
- I_S up to 2^24;
- a 12-bit output.

At f_sys = 20 MHz:

- **Data rate:** 4 S/s (I_S = 5,000,000) to 6.67 MS/s (I_S = 3). Both are
  simulated.
- **Subcarrier/IF:** 100 Hz to 5 MHz. Both are simulated.
- **Frame:** up to 65,536 symbols, including patterns of 2,048 or 16,384
  symbols plus a sync word of up to 64 symbols.
- **One-second measurements:** up to 6.7 M symbols, within K's 24 bits. The
  sum needs at most 51 bits of its 80, and the squared sum at most 87 of
  its 96.

The smallest noise bandwidth, about 0.1 MHz, needs a lower f_sys (around
2 MHz): a 63-tap filter's transition band is about f_sys/63.

## Departures from the original description

- The subcarrier resolution is always f_sys/2^32. The original varied it from
  f_sys/2^17 at 5 MHz to f_sys/2^32 at 100 Hz. A fixed 32-bit accumulator covers
  both ends.
- The register bus replaces the original backplane bus, whose protocol is not
  given. The address map is this design's own.
- The original speaks of a data and a noise path, each with its own filter and
  attenuator. This design gives all three channels (two data, one noise) the
  same filter and attenuator and adds them in one summer.
- The SNR equation, mean, variance and symbol error rate are computed by the
  host from the raw totals, not in hardware.
- Data patterns, sync words, transition densities and the Gaussian table are
  RAM contents written by software. No hardware generates them.
- The symbol error counter counts S_i < 0. S_i = 0 counts as no error.
- The analog parts are ideal behavioural models. The downconverter used for
  RF outputs is not modelled.
- Widths, number formats (Q2.14 coefficients, Q1.15 attenuators, 8-bit RAM
  samples), the output shift, the PN polynomial, the delay ranges (`kdly` 0–63,
  `offset` 0–255, delay line 0–63 steps) and reset behaviour are this design's
  choices.

## Verification and simulation

Every module has a self-checking testbench in `tb/` named `<module>_tb`. Each
ends with a line `TB_RESULT checks=N failures=M`. Two testbenches run the whole
box through the bus only:

- **`dsg_top_tb`** runs at full size. It covers:
  - clean BPSK checked bit for bit, including the K·I_S result period;
  - BPSK with Gaussian noise (SNR and error count against prediction);
  - the noise histogram;
  - the analog loop with the `kdly` and delay-line search;
  - RANDOM and EXT modes;
  - filter and output saturation.

  It counts each mechanism and fails if any never happened.
- **`dsg_modes_tb`** runs the signal types against a sample-exact model of the
  data path:
  - two subcarriers;
  - residual carrier;
  - QPSK at 6.67 MS/s on 5 MHz;
  - OQPSK;
  - I_S = 2;
  - 4 S/s on a 100 Hz subcarrier.

  All monitor results must match bit for bit.

To simulate with Verilator 5 (package first), for example:

```
verilator --binary --timing -Wall -Irtl rtl/dsg_pkg.sv \
    $(ls rtl/*.sv | grep -v dsg_pkg) tb/dsg_top_tb.sv --top-module dsg_top_tb
./obj_dir/Vdsg_top_tb
```

For a single block, list the package, the block's file and any sub-modules it
instantiates, then its testbench. All files carry `timescale 1ns/1ps`, which
the analog models need. The full-size runs take seconds to tens of seconds.

## Files

| file | contents |
|---|---|
| `rtl/dsg_pkg.sv` | widths, mode enum, channel and monitor configuration structs |
| `rtl/dsg_top.sv` | the whole box |
| `rtl/pattern_generator.sv`, `pattern_ram.sv`, `pn_generator.sv` | generation channel |
| `rtl/fir_filter.sv`, `attenuator.sv`, `output_summer.sv` | filtering, scaling, output |
| `rtl/stats_monitor.sv`, `symbol_integrator.sv`, `symbol_accumulators.sv` | statistics monitor |
| `rtl/histogram_accumulator.sv` | histogram |
| `rtl/sgb_bus_regs.sv` | CPU registers and address map |
| `rtl/dac_model.sv`, `butterworth3_model.sv`, `adc_model.sv`, `delay_line_model.sv` | behavioural analog models |
| `tb/*_tb.sv` | testbenches |
