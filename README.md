# GFSK transceiver digital core with a time-to-digital demodulator

This design is the digital part of a low-power 2.4 GHz GFSK transceiver for
1 Mb/s Bluetooth-style links. Its main idea is in the receiver. The receiver
does not sample the IF signal with an ADC. It hard-limits the signal at a 6 MHz
second IF and then measures the length of **every IF period** with a
time-to-digital converter (TDC).

GFSK moves the carrier by ±160 kHz. At 6 MHz that stretches or shrinks the
166.7 ns IF period by about 4.5 ns. The stream of period codes, one per IF
cycle, is therefore the baseband data signal sampled at about 6 MHz. A small
DSP chain turns that stream back into bits and a 1 MHz clock:

- a moving-average filter,
- an adaptive threshold,
- a slicer,
- a majority-vote filter,
- a 16-phase digital CDR.

The same design also holds the digital parts of the transmitter and
synthesizer:

- the table-based Gaussian pulse shaper for the open-loop-modulated VCO,
- the divide-by-8 quadrature LO generator,
- the integer-N feedback divider,
- the VCO band calibration.

Everything analog sits outside the top module and meets it at ports: LNA,
mixers, channel filter, limiter, DAC, VCO, charge pump and PA. The one
exception is the TDC delay line. It is analog, but it is included as a
behavioural (non-synthesizable) model so that the top's input is the limited
IF itself.

```
 if2 ──┐
 fref6 ┴─MUX─┬─ coarse dT1 ─ fine dT2 ─ fine dT2 ─ ... (63 cells)    tdc_delay_line
             │        C[0]      C[1]       C[2]          C[63]
             └─ D of 64 flops, flop k clocked by C[k] ── Q[63:0]     tdc_sampler
                     encoder ── S_period (6 bit, one per IF period)
   ── period_capture (into the 12 MHz clock) ── ma_lowpass ── threshold_generator
   ── data_slicer (12 decisions/bit) ── integrate_dump ── cdr (16 MHz, 16 phases)
   ── rx_data, rx_clock
 tdc_calibration: trims the delay cells while the MUX selects fref6

 tx_data ── gaussian_filter ── dac_code (8 bit, offset binary) → DAC → VCO
 vco_clk ── lo_div8_quad ── lo2_i / lo2_q ── pll_divider_n ── pll_fb → PFD
                           └─ vco_fll_calibration ── vco_band, pll_open
```

## The self-sampling TDC

A conventional TDC measures a time against a separate fast clock, and
aligning the two is the hard part. This TDC samples the signal with delayed
copies of **itself**:

- The limited IF passes through a coarse section (dT1 = 141 ns, four cells
  of 35.25 ns) and then 63 fine cells (dT2 = 1.15 ns). This gives 64 taps,
  C[k] = dT1 + k·dT2. Only the fine cells are tapped, so the coarse
  section saves cells without adding flip-flops.
- Flip-flop k is clocked by the rising edge of C[k] and samples the
  *undelayed* signal.
- A tap whose delay is shorter than one IF period T fires while the signal is
  still in the low half of the following cycle, so it stores 0.
- A tap longer than T fires after the next rising edge has arrived, so it
  stores 1.

Because dT1 is longer than half a period, the code is a clean thermometer:
Q = 1…10…0 from tap 63 down to tap 0. The position of the step measures the
period:

    S_period = floor((T − dT1) / dT2)        0 … 63

The encoder finds the lowest tap that holds a 1 and subtracts one. For 6 MHz
(166.7 ns) the code is 22. ±160 kHz gives codes of about 18 to 26. The full
6-bit range spans 141 ns to 213.5 ns, or 4.68 MHz to 7.09 MHz. That leaves
room for a large carrier offset.

The search runs from the bottom for a reason. The highest taps (past 1.5·T)
fire when the signal is already low again. Those taps, and any bubble above
the first 1, are ignored.

The code is registered on the rising edge of C[63]. By then all 64 flops hold
samples of the same IF period, so there is one code per IF period with no
dead time. `s_toggle` marks each new code. `period_capture` moves the code
into the 12 MHz DSP clock: it double-samples the code, accepts it only when
both samples agree, and synchronises the toggle.

### Delay-line calibration

The delays drift with process, voltage and temperature. Every delay cell has
a 6-bit bias trim `itrim`; more current gives a shorter delay. The
calibration runs before reception (`tdc_cal_start`):

1. The input multiplexer feeds a 6 MHz reference instead of IF2.
2. After a settling time (`SETTLE` = 16 DSP clocks), the TDC code is compared
   with S_TARGET = 22, from 1/6 MHz = 141 ns + 22.3 · 1.15 ns.
3. The trim is searched by successive approximation, MSB first. A trial bit
   is kept when the code is at most 22.
4. After six steps the multiplexer returns to IF2, and `tdc_cal_done` starts
   the demodulator.

The result is the largest trim whose code for the reference does not exceed
22.

The delay model (`tdc_delay_cell`) uses
delay = T_NOM · PROC · (96 − itrim)/64. Mid-scale trim gives the nominal
delay, and the trim range covers about −50 % to +50 %. The top's real
parameter `PROC` sets a process corner for simulation.

## From period codes to bits

All DSP blocks run on the 12 MHz clock and take one sample per clock, which
gives 12 decisions per bit. They are enabled only after calibration.

- **`ma_lowpass`**: a moving sum of the last 4 codes, 8 bits wide and not
  divided. The sum swings about ±16 around the carrier value (about 89).
  The filter removes noise above the data band, which the limiter and the
  wide channel filter let through.
- **`threshold_generator`**: works on the last eight filter outputs, M0
  (newest) to M7.
  - M2 is a *valley* when M7 ≥ M6 ≥ … ≥ M2 < M1 ≤ M0. It is a *peak* when
    M7 ≤ … ≤ M2 > M1 ≥ M0.
  - A run of 4 alternating extremes, each at most 18 samples (1.5 bits) after
    the previous one, sets the threshold half-way between the last peak and
    the last valley. The 1010 preamble is such a run.
  - Every later alternating run (any 1010 pattern in the data) updates the
    threshold. This cancels a fixed frequency offset and tracks the slow
    drift of the open-loop transmitter.
  - An extreme less than 10 LSB away from the previous opposite extreme is
    treated as noise ripple and ignored.
- **`data_slicer`**: a 1 raises the frequency and shortens the period, so the
  raw decision is 1 when the filtered code is *below* the threshold. Before a
  threshold exists the output is 0 and the CDR is held in restart.
- **`integrate_dump`**: counts the 1s among 3 consecutive decisions, outputs
  the majority, and dumps the count to 0. That makes four votes per bit. It
  removes isolated wrong decisions (glitches), whose number it reports.
- **`cdr`**: a digital PLL on 16 phases of a 1 MHz clock, produced by
  `cdr_divider16` from 16 MHz.
  - Each data transition is time-stamped with the phase counter, after a
    two-flop synchroniser.
  - The ideal sampling phase is 8 phases (half a bit) after the transition.
  - The first transition after restart sets the phase directly, for fast
    acquisition.
  - After that the selected phase moves by one step at a time. It steps when
    3 more transitions were late than early, or the reverse. This keeps the
    recovered clock's jitter to 1/16 bit.
  - `rx_data` is retimed at the rising edge of `rx_clock`.

## Transmitter and synthesizer

- **`gaussian_filter`**: the shaped frequency depends only on the previous,
  current and next bit and on the position within the bit. The filter is
  therefore a table with 8 × 16 entries (16 samples per bit at 16 MHz).
  - The table is computed at elaboration by a constant function from 24
    samples of the Gaussian frequency pulse, with BT = 0.5 and a span of
    three bits. The formula is in the file header.
  - Output is an 8-bit offset-binary DAC code, 128 ± 127.
  - The output lags the input by one bit, because the next bit must be known.
- **`lo_div8_quad`**: a four-stage Johnson counter divides the VCO by 8.
  Stages 0 and 2 are the quadrature I and Q of the second LO (342–354 MHz for
  LO1 = 2736–2832 MHz). The same VCO/8 clock feeds the feedback divider.
- **`pll_divider_n`**: a 12-bit programmable counter, N ≥ 2, whose output
  goes to the external phase/frequency detector.
- **`vco_fll_calibration`**: chooses one of 32 VCO sub-bands before the PLL
  locks.
  - The loop is opened with a fixed control voltage.
  - A counter on the VCO/8 clock counts for 16 reference periods.
  - A comparator checks the count against N · 16.
  - A successive-approximation state machine keeps a band bit when the count
    does not exceed the target.
  - The gate and clear signals cross clock domains through synchronisers.
  - One band bit takes 35 reference cycles, 175 in all.

## Clocks and reset

| clock | frequency | used by |
|---|---|---|
| IF taps C[k] | the IF itself | `tdc_sampler` |
| `clk_dsp` | 12 MHz | calibration, all DSP blocks |
| `clk16` | 16 MHz | CDR and Gaussian filter |
| `vco_clk` / `lo2_i` | VCO, VCO/8 | LO generator, divider, FLL counter |
| `fref_pll` | PLL reference | FLL state machine |

All flip-flops reset asynchronously on `rst_n` low. The lint warning about a
net used both as data and as an asynchronous clock comes from `mux_out`,
which is both the delay-line input and the data sampled by the TDC flops.
That is the self-sampling principle, not an error.

## What is this design's own choice

The block structure, the TDC law, the delay values, the 64 taps, the 6-bit
code, the 12 decisions per bit, the peak/valley rule, the threshold
generate/update behaviour, the 16-phase CDR, the divide-by-8 LO and the
32-band FLL calibration follow the transceiver this core is built for. The
following were chosen here:

- the number of coarse cells (4), the trim width and delay law, S_TARGET = 22 and the successive-approximation
  searches (TDC trim and VCO band);
- the filter length (4), the threshold-run rule (4 extremes, 18-sample gap),
  the ripple limit (10) and the 3-decision vote window;
- the CDR vote (3) and its synchroniser;
- the clock-domain crossing of the TDC code;
- the Gaussian BT = 0.5, 16-times oversampling and 8-bit DAC code;
- the 12-bit divider and the FLL window of 16 reference cycles.

The FLL assumes that a higher band code means a higher frequency.

Not modelled:

- analog performance: noise, sensitivity, co-channel rejection;
- the RSSI and its ADC;
- the channel-filter tuning loop;
- the PLL's analog loop.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv rtl/gfsk_pkg.sv tb/tb_gfsk_transceiver.sv \
    --top-module tb_gfsk_transceiver -o sim
obj_dir/sim
```

`tb_gfsk_transceiver` runs the whole core at its default parameters in about
20 s:

- Start-up: TDC calibration against 6 MHz and VCO band calibration on a VCO
  model.
- Loop-back: the transmitter's DAC code drives an IF model at
  6 MHz + offset + 160 kHz · (code − 128)/127. The offset drifts from +80 to
  +20 kHz, with ±1 ns edge jitter and a 0.05 % slow bit clock.
- It sends a 16-bit 1010 preamble plus random data, and checks every
  recovered bit.
- It counts each mechanism and fails if one never happens: both calibrations,
  reference multiplexing, peaks, valleys, threshold generation and update,
  glitch removal, CDR jump and CDR steps.

The block testbenches:

- `tb_tdc_delay_line`, `tb_tdc_sampler`, `tb_tdc_calibration`: tap delays,
  the code law at many periods, and calibration at three process corners.
- `tb_ma_lowpass`, `tb_threshold_generator`, `tb_data_slicer`,
  `tb_integrate_dump`: each DSP stage against a reference model.
- `tb_cdr_divider16`, `tb_cdr`: 600 bits with ±200 ns transition jitter and
  a 0.2 % rate step. They check lock, step size and the sampling point.
- `tb_offset_tolerance`: packets at carrier offsets of −1000, −500, 0,
  +500 and +850 kHz, near both ends of the TDC range. It checks error-free
  data and the threshold position.
- `tb_digital_demodulator`: the whole receiver on a Gaussian-shaped
  IF model whose offset drifts from +80 to +20 kHz.
- `tb_gaussian_filter`, `tb_lo_div8_quad`, `tb_pll_divider_n`,
  `tb_vco_fll_calibration`: the transmitter and synthesizer blocks.

To change a size, override the top's parameters, or the constants in
`rtl/gfsk_pkg.sv`. If dT1, dT2 or the IF change, S_TARGET must follow
(1/f_ref − dT1)/dT2.
