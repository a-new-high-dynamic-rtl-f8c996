# Digital beam position monitor with built-in differential current monitor

This is the FPGA signal processing for a stripline beam position monitor (BPM)
at an electron linac. The linac runs in many beam modes: continuous bunch trains
from 26 MHz down to about 100 kHz, macro pulses and single bunches. Its bunch
charges range from single electrons to 1 nC. Each BPM measures the horizontal
and vertical beam position and the beam current. It also contains a
differential current monitor (DCM). The DCM compares its own beam current with
the current measured by the BPM upstream. It raises a machine-protection
interlock when the difference, integrated over about 100 ms, exceeds a
threshold, because such a difference means beam is being lost between the two
monitors.

The key idea is to make every measurement independent of the bunch pattern. The
four electrode signals are mixed down to an IF of 19.5 MHz and sampled at
52 MSPS, so the IF is exactly 3/8 of the sample rate. The FPGA then averages
I/Q-demodulated samples over fixed 512-sample windows (9.85 us). That window
is one period of the lowest continuous bunch rate (102 kHz). One result set is
produced per window, at 101.6 kHz, whatever the bunch pattern inside the window.

```
 adc_data[0..3] ─┬─> iq_demod_avg ─> amplitude_calc ─┬─> position_calc (L,R) ─> hpos ─┐
 (L, R, T, B)    │    (x4, 512-sample windows)       ├─> position_calc (T,B) ─> vpos ─┤
 debug_mem ──────┘                                   └─> current_sum ─> current ──────┤
 (playback)                                                 │                         │
                          link_rx ─> pof_link_rx ─> prev ─> dcm ─> fast/slow diff ────┤
                                                            │   └─> interlock         │
                          link_tx <─ pof_link_tx <──────────┘                         │
                                                                                      v
                              5 x (interp_filter 101.6 -> 406 kSPS ─> dac_serial 6.5 Mbit/s)
                              + 2 front-panel dac_serial repeating any two of the five
 timing_gen: windows, bunch-trigger alignment, result tick
 bpm_regs:   CPU bus, threshold, attenuators, result polling, debug-memory window
```

Everything runs on the 52 MHz ADC clock. The slower rates (101.6 kHz results,
406 kSPS DAC samples, 10 Mbit/s link bits) are carried by valid strobes, not by
clocks of their own.

## Demodulation at 3/8 of the sample rate

With the IF at 3/8 fs, the local oscillator advances 135 degrees per sample
and repeats every 8 samples. Its cosine and sine therefore take only the values
0, +-1 and +-sqrt(2)/2 (`iq_demod_avg`). Each sample is multiplied by the two
values for its phase, which needs one constant multiplier, and the products are
summed over the window. The window of 512 samples holds exactly 64 LO periods.
The sum is therefore an exact band-pass at the IF, with zeros at DC and at
every ADC harmonic up to the sixth; the seventh and ninth harmonics alias onto
the IF and are not suppressed. The LO phase counter runs freely, so a window
may start on any sample. A different start only rotates the I/Q phase and
leaves the amplitude unchanged.

Output scaling: `i_out = (2/512) * sum(x * cos)` with 8 fraction bits, so
`sqrt(i^2 + q^2)` equals the IF peak amplitude in ADC LSB x 256. A full-scale
tone gives about 8.4e6, which fits the 24-bit amplitude.

`amplitude_calc` takes `floor(sqrt(i^2 + q^2))` with a digit-by-digit square
root that resolves one bit per clock (27 clocks). This is a true RMS-type
measure: it does not depend on whether the window holds one bunch or many.

## Window timing and the bunch trigger

`timing_gen` counts 512-sample windows. In single-bunch modes an external
bunch trigger is synchronised with two flip-flops. Its rising edge restarts the
window, so that the bunch falls at the start of a fresh window. A window cut
short this way never reaches `win_last`, so it produces no result and its
partial sum is discarded. `win_abort` flags the restart. A separate
free-running counter gives `tick_res` every 512 clocks, which paces the output
filters. Trigger re-alignment therefore never disturbs the regular DAC sample
stream. Re-alignment can be turned off with the `trig_en` bit in `REG_CTRL`.

A result does not depend on the bunch pattern as long as each window holds a
whole number of bunch periods. That is the case for 26 MHz divided by a power
of two. Other rates need care. At 500 kHz (a bunch every 104 samples) a window
holds 4 or 5 bunches, so single results vary by up to 20 %, although their
mean is right. At 100 kHz (520 samples) there is less than one bunch per
window. Triggering each window on a bunch then makes every window hold
exactly one bunch.

## Positions and beam current

- Horizontal position: `(L - R) / (L + R)`. Vertical position:
  `(T - B) / (T + B)`. Both are computed by `position_calc` as signed Q1.15
  (+-32767 full scale) with a restoring divider (16 clocks). A zero sum gives 0.
  There is no scale factor to millimetres; apply the sensor's geometry factor in
  software.
- Beam current: `L + R + T + B` (`current_sum`), in the same units as the
  amplitudes (ADC LSB x 256). There is no calibration to mA.

Results are ready about 50 clocks after the last sample of a window.
`res_valid` pulses once per window, with the new positions; by then the current and the DCM outputs have also been updated.

## Differential current monitor

BPMs are chained along the beamline. Each one sends its beam current to the
next BPM over a plastic optical fibre, and takes the current of the previous one
from its own receiver. `dcm` computes, for every result:

- `fast_diff = own_current - preceding_current`
- `slow_diff`: `fast_diff` through a first-order integrator (`dcm_integrator`),
  `y += (x - y) / TAU_SAMPLES`, with `TAU_SAMPLES = 10156` results = 100 ms
- `interlock = |slow_diff| > threshold`

A step loss of height h reaches `h * (1 - exp(-n / tau))` after n results.
A loss just above the threshold therefore trips after several time constants,
and a large loss trips quickly: 100 times the threshold trips after about 102
results, roughly 1 ms. The magnitude is compared, so either sign of the
difference trips. The interlock is not latched: it falls when the integrated difference decays below the threshold again. Until the first frame arrives, the preceding current is 0, so any beam trips the interlock. If the link fails later, the last received value is held. The failure shows in the `link locked` status bit and in the sticky link-error bit. The threshold is set over the bus in current units; the 10 uA of the
original system must be converted with the BPM's current calibration.

## Current link (8b/10b, 10 Mbit/s)

`pof_link_tx` sends a continuous 8b/10b stream at 10 Mbit/s. A phase
accumulator gives a bit every 5.2 clocks. The idle line carries the comma
character K28.5. Each new current is sent as a K28.5 followed by four data
characters holding the 26-bit value, most significant byte first. That is
50 bits, or 5 us, so a frame fits easily into one 9.85 us result period. At
least one comma always separates frames.

`pof_link_rx` samples the line at 52 MHz. It re-centres its own phase
accumulator on every line transition and takes each bit at mid-bit. A K28.5 in
either disparity sets the character boundary and the `locked` flag. An invalid
character raises `code_err`, drops the lock and discards the frame; the next
comma restores the lock. The receiver assumes that both ends run at the same
nominal 52 MHz, as all BPMs are synchronised to the machine. `enc_8b10b` and
`dec_8b10b` implement the standard code tables (`code8b10b_pkg`). The decoder
checks sub-block validity but not running disparity.

## Output path: interpolation and DACs

Five results go to the five 16-bit DACs on the back panel: horizontal position, vertical position,
beam current, fast difference and slow difference. Each goes through an
`interp_filter` that raises the rate x4, from 101.6 kSPS to 406 kSPS, with two
half-band stages (`halfband_interp2`). In each stage, the even outputs are the
input samples. The odd outputs are the cubic midpoint
`(-x[n-3] + 9 x[n-2] + 9 x[n-1] - x[n]) / 16`, rounded and saturated. This
filter passes DC and straight ramps exactly and delays the signal by about 30 us.
`dac_serial` sends each 406 kSPS word MSB first at 8 clocks per bit, which is
6.5 Mbit/s. Words follow each other without gaps: `sclk` rises mid-bit, and
`fsync` is high during each word's MSB. The DAC's own x16 CIC interpolator
then reaches 6.5 MSPS. Currents are scaled to the DAC range by
`>> CUR_DAC_SHIFT` (10) and differences by `>> DIFF_DAC_SHIFT` (4), both with
saturation. DAC words are two's complement.

Two more DACs sit on the front panel for quick checks in service. Each
repeats one of the five interpolated streams. The `FRONT` register selects
which one; the reset selection is horizontal position and beam current. The
front DACs load in step with the back ones, so the two copies of a stream
carry identical words.

## Registers and debug memory

`bpm_regs` connects the soft CPU to the processing. The bus handles one
transfer at a time: `req` with `we`, a word address and write data, and `ack`
one clock later with `rdata` for reads. An assertion checks that `req` is never
held for two clocks. Word addresses:

| address | name | content |
|---|---|---|
| 0x00 | CTRL | [0] playback, [1] arm capture (pulse), [2] bunch-trigger enable (reset 1) |
| 0x01 | STATUS | [0] interlock, [1] capture done, [2] link locked, [3] link error (sticky, write clears) |
| 0x02 | THRESH | DCM threshold (reset 65536) |
| 0x03 | ATT_RF | 4 x 6-bit RF attenuator codes, channel 0 in bits 5:0 (reset 63) |
| 0x04 | ATT_IF | 4 x 6-bit IF attenuator codes (reset 63) |
| 0x05 | POS | {vpos, hpos} |
| 0x06 | CURRENT | beam current |
| 0x07 / 0x08 | FDIFF / SDIFF | fast / slow current difference |
| 0x09 | PREV | current received from the preceding BPM |
| 0x0A | COUNT | number of results since reset |
| 0x0B | FRONT | front DAC sources, 0-4 in the order above: [2:0] front 0 (reset 0), [6:4] front 1 (reset 2) |
| 0x0C-0x0F | AMP0-3 | electrode amplitudes |
| 0x20000 + ch * 16384 + i | debug memory | sample i of channel ch |

Each attenuator in the RF frontend spans 1.25 to 17 dB in 0.25 dB steps, which is 64 settings. This design reads a 6-bit code n as 1.25 dB + n x 0.25 dB. There are two attenuators per channel, one at RF and one at IF, and the codes are brought out as parallel ports. The attenuator chips' control interface is not modelled.

`debug_mem` holds 4 x 16384 raw samples. To capture, write the arm bit. The
memory then records 16384 consecutive ADC samples of every channel, starting
at the next window start, and sets `capture done`. For a hardware-in-the-loop
test, load stimulus samples through the bus window and set `playback`. The
memory then replays them cyclically into the processing in place of the ADCs,
and the results can be read back as usual. The stimulus should be a whole
number of IF periods (a multiple of 8 samples) for a seamless wrap.

## Timing summary (52 MHz clock)

| event | clocks |
|---|---|
| measurement window / result period | 512 (9.846 us, 101.6 kHz) |
| last window sample to `iq_valid` | 2 |
| amplitude | 27 after `iq_valid` |
| position | 16 after the amplitude; current 1 after; DCM difference 1 later, integrated 2 later |
| trigger sampled to new window start | 2 |
| link bit / frame | 5.2 / 260 |
| DAC word / bit | 128 / 8 |

## Where this RTL departs from the original system

- **Taken from the original design:** the sample rate, IF and 512-sample
  averaging; the difference-over-sum positions and sum current; the DCM chain
  of difference, 100 ms integrator and threshold comparator; 8b/10b at
  10 Mbit/s for the current link; x4 interpolation to 406 kSPS ahead of 16-bit
  DACs with 6.5 Mbit/s serial input; the 4 x 16 k debug memory and the
  stimulus-loading test; and a memory-mapped register bus.
- **Different filter:** the original reconstruction filter uses several
  raised-cosine half-band stages with coefficients such as 7/32 and 21/16. It
  reaches a 17.3 kHz bandwidth, 65 dB alias rejection and 204 us delay. Its
  coefficients are not available, so the simpler cubic-midpoint stages above
  are used instead. Their frequency response is different.
- **This design's own choices:** all number formats and scalings, the
  square-root method, the window restart on the bunch trigger, the integrator
  form, comparing the magnitude, what the front DACs show, the link framing and clock recovery, the DAC
  pin protocol, the bus protocol, the register map and reset values, and the
  debug arm/trigger/playback scheme.
- **Not included:** the analog RF frontends, circulators, the ADCs and their
  serial LVDS interface (the top takes parallel samples), and the DAC chips.
  Also left out: the soft CPU and its UART/SPI/I2C/GPIO peripherals, the
  debug controller and error-trace memory, and the software-driven interfaces
  (display, fieldbus, fast feedback, USB).
  The dump-current DCM variant is not part of this design.

## Files

| file | block |
|---|---|
| `rtl/bpm_pkg.sv` | widths, rates, register addresses |
| `rtl/code8b10b_pkg.sv` | 8b/10b code tables and encode function |
| `rtl/bpm_top.sv` | top level |
| `rtl/timing_gen.sv` | window and trigger timing |
| `rtl/iq_demod_avg.sv`, `rtl/amplitude_calc.sv` | per-channel demodulation, amplitude |
| `rtl/position_calc.sv`, `rtl/current_sum.sv` | positions, current |
| `rtl/dcm.sv`, `rtl/dcm_integrator.sv` | differential current monitor |
| `rtl/enc_8b10b.sv`, `rtl/dec_8b10b.sv`, `rtl/pof_link_tx.sv`, `rtl/pof_link_rx.sv` | current link |
| `rtl/halfband_interp2.sv`, `rtl/interp_filter.sv`, `rtl/dac_serial.sv` | DAC output path |
| `rtl/bpm_regs.sv`, `rtl/debug_mem.sv` | registers, debug memory |

Each `tb/tb_<block>.sv` is a self-checking testbench that ends by printing
`TB_RESULT checks=N failures=M`. `tb/tb_pof_link.sv` tests the transmitter and
receiver back to back. `tb/tb_bpm_top.sv` runs the whole design with all
parameters at their defaults. It uses four IF tones, a second link transmitter
standing in for the preceding BPM, and a receiver on the DUT's own link. It
checks positions, current, link data and DAC words. It also drives a bunch
trigger, trips and releases the interlock with a loss of 100 times the
threshold, captures raw samples, and replays loaded stimuli. It finishes in
well under a second of simulation time.

`tb/tb_bunch_modes.sv` runs the beam modes through the top, again at default
parameters. Each bunch is modelled as a Hann-shaped IF burst 64 samples long,
with the burst height scaled so that the mean current is the same in every
mode. The modes are:

- bunch trains at 26 MHz / N, for N = 1, 2, 4, ..., 256;
- single bunches 100 us apart, announced by the bunch trigger;
- 100 kHz bunches (520 samples apart), with and without the trigger.

The test checks that every complete window reports the same current within
0.3 % and the same positions within 40 LSB. With single bunches, only the
window after each trigger may see the bunch. Without the trigger, the windows
slip against the 100 kHz bunches, so single results vary while their mean
stays right.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_bpm_top \
    rtl/bpm_pkg.sv rtl/code8b10b_pkg.sv tb/tb_bpm_top.sv -Mdir obj -o sim
./obj/sim
```

Replace `tb_bpm_top` with any other testbench name. The packages must come
first on the command line. The other modules are found through `-Irtl`.
The testbenches initialise everything they read, so they also run on
two-state simulators.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `WIN_LEN` | 512 | samples per window; a power of two and a multiple of 8 |
| `TAU_SAMPLES` | 10156 | DCM time constant in results (100 ms) |
| `DEPTH` | 16384 | debug-memory samples per channel |
| `CUR_DAC_SHIFT` | 10 | current-to-DAC scaling |
| `DIFF_DAC_SHIFT` | 4 | difference-to-DAC scaling |
| `BUS_AW` | 18 | bus word-address width |

`WIN_LEN` also sets the output rates. The interpolator runs at 4 samples per
window, and each DAC bit is `WIN_LEN / 64` clocks long.
