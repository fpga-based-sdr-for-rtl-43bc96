# DPLL FM demodulator for an FPGA software-defined radio (with a pixel-clock DPLL)

An FM receiver can be built with almost no analog parts. An ADC digitises the FM
wave, and a digital phase-locked loop (DPLL) makes a local oscillator follow the
incoming carrier. For the local oscillator to stay on the instantaneous frequency
of the input, its frequency-control word must equal the frequency deviation at
every moment. The control word is therefore the demodulated message. This
design implements such a DPLL as synchronous RTL:

```
 adc_in ──8──► phase detector ──8──► loop filter ──12 (d2)──► FIR filter ──8──► dac_out
 (digital FM)      ▲  (multiplier)        │ (leaky integrator)
                   │                      └──12 (d1)──► gain ──18──┐
                   └────────8──── DFG (phase accumulator + ◄───────┘
                       cosine      quarter-wave sine table)
```

The bus widths (8, 12, 18, 8 bits) and the block order come from the published
architecture. So do the DFG's shift-register/adder/latch/table structure and the
loop filter's ports.

Next to it is a second, independent design from the same source: a DPLL that
regenerates a video pixel clock from the horizontal sync (HSYNC). The two share
only the clock and reset in the top level `sdr_dpll_top`.

## Signal flow and numbers of the FM demodulator

Everything runs at one sample per clock. All data words are two's complement.

| Block | Module | What it does | Latency |
|---|---|---|---|
| Phase detector | `phase_detector` | `e = sat8((m * u) >>> 7)`: input sample times the DFG cosine | 1 clock |
| Loop filter | `loop_filter` | leaky integrator, outputs `d1` (full) and `d2` (`d1` with 4 LSBs cleared) | 1 clock |
| Gain | `loop_gain` | `ctrl = d1 * gain`, where `gain` is a 6-bit run-time input (0..63) and `ctrl` is 18 bits | 1 clock |
| DFG | `dfg` | 24-bit phase latch: `phase += fcw + ctrl`; table read of the 14 MSBs | latch + 1 clock |
| Sine table | `sine_rom` | 16384-sample period, stored as a 4096-entry quarter wave | 1 clock |
| FIR filter | `fir_filter` | 5-tap binomial low-pass `(1 4 6 4 1)/16`, then `/16` to 8 bits | 1 clock |

The product of `sin(wn+θ)` and `cos(wn+φ)` is
`½[sin(2wn+θ+φ) + sin(θ−φ)]`. The loop filter suppresses the double-frequency
term and keeps `sin(θ−φ)`. A positive error raises `d1`, which raises the DFG
frequency, so the loop is stable with the DFG cosine in quadrature with the
input sine.

**Reading the message.** In lock the DFG increment `fcw + ctrl` equals the
input's phase increment. Put in the units of the 24-bit phase word, a
deviation `dev` therefore gives

```
d1 = dev / gain        dac_out ≈ d1 / 16
```

For example, a carrier at `fcw = 2^20` (f_clk/16), `gain = 32` and a deviation
of ±16000 (±0.95 ‰ of f_clk) give `d1 = ±500` and `dac_out ≈ ±31`.
`tb_dfm_demodulator` measures exactly these numbers.

**Choosing the gain.** The loop is type 1: the DFG integrates, and the loop
filter has finite DC gain (32). Near crossover the open-loop gain is about
`63 · 32 · 2π·gain / 2^24 / ω` rad/sample. The loop filter adds a pole at about
0.06 rad/sample, and the loop has five clocks of delay. So `gain` values up to
about 32 keep a comfortable phase margin, and 63 is near the limit. The static
phase error for a deviation `dev` is
`2π·dev/2^24 / (63·32·2π·gain/2^24) = dev / (2016·gain)` rad. It must stay
well below 1 rad, which with 12-bit `d1` limits `|dev|` to about `2047·gain`.

### The loop filter

The source describes the loop filter only by its purpose. It also gives the
filter's ports and a simulation trace. The recurrence used here reproduces that
trace exactly:

```
d1[n+1] = d1[n] + 2·c[n] − (d1[n−1] >>> 4)          d2 = {d1[11:4], 4'b0000}
```

| input `c` | 16 | 16 | 16 | 16 | 16 | 1 | 1 | 1 | 1 | 1 | 1 | 1 | 1 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| `d1` | 32 | 64 | 94 | 122 | 149 | 144 | 137 | 130 | 124 | 118 | 113 | 108 | 103 |
| `d2` | 32 | 64 | 80 | 112 | 144 | 144 | 128 | 128 | 112 | 112 | 112 | 96 | 96 |

The leak uses the value from one clock earlier. That makes the filter exactly
two 12-bit registers (`d1`, `d1_prev`): 24 flip-flops and 8+12+12+2 = 34 I/O
bits. These match the resource figures published for the filter. The DC gain is
32, so a steady error `c` settles `d1` near `32·c`. Saturation at ±2047 is an
addition of this design; without it an error above 63 would wrap the register.
`d2` keeps the 8 significant bits that an 8-bit DAC can use. It feeds the FIR
filter, and `d1` feeds the gain.

### The digital frequency generator

The DFG follows the published structure:

- A shift register takes the free-running frequency word serially from a
  microcontroller. The word is shifted MSB first on `ser_shift`, and
  `ser_load` moves it to the adder in one step.
- An adder and a latch form a phase accumulator that grows by
  `fcw + ctrl` every clock.
- A waveform table (originally an EPROM) turns the latch's upper bits into
  amplitude.

With `ctrl = 0` (no input signal) the generator runs at the free-running
frequency `fcw · f_clk / 2^24`.

The table has 16384 samples per period, which is the source's 16 KB sine
table. By quarter-wave symmetry it stores only 4096 seven-bit magnitudes:

```
entry[k] = round(127 · sin(2π (k + 0.5) / 16384)),   k = 0 … 4095
```

Address bit 12 mirrors the index (second and fourth quarter), and bit 13
negates the result. The half-sample offset makes the mirrored quarters exact,
so the output is symmetric, ±127. The table is computed at elaboration from
that formula. The cosine that the phase detector needs is a second read,
offset by a quarter turn (address + 4096).

The source claims a dynamic range of more than 90 dB. An 8-bit output, the
width on the published block diagram, gives about 48 dB. A wider table
(`AMP_W`) is a parameter change in `sine_rom`, but the detector and the package
widths would have to follow.

## Pixel-clock DPLL

`pixel_clock_dpll` locks `CKOUT` to N times the HSYNC frequency, where N is a
12-bit ratio programmed from outside for the display standard.
`HSOUT = CKOUT / N` is compared with HSYNC:

```
HSYNC ─►┌─────┐ UP/DN ┌─────────────┐ dco_code(19) ┌─────┐(16) ┌─────┐ CKOUT
        │ PFD │──────►│ PLL         │─────────────►│ DSM │────►│ DCO │──┬──►
HSOUT ─►└─────┘       │ controller  │◄──┐          └─────┘     └─────┘  │
   ▲       │  ┌─────┐ │             │   │ avg_dco_code(19)              │
   │       └─►│ TDC │►│ tdc_code(7) │ ┌─┴──────────────┐                │
   │          └─────┘ └─────────────┘ │ digital filter │◄─ dco_code     │
   └──────────────── ÷N (12 bit) ◄────┴────────────────┴────────────────┘
```

The blocks, connections and widths are the published ones. The source only
names the blocks, so their insides here are this design's choices:

- **PFD**: a tri-state phase frequency detector made synchronous. HSYNC has a
  two-flop synchroniser. An HSYNC edge raises UP, an HSOUT edge raises DN, and
  both are cleared once both are set.
- **TDC**: counts the clocks of an UP or DN pulse. The count saturates at 127
  and is marked valid when the pulse ends; `lead` gives the sign. Its resolution
  is one system clock, not a delay line.
- **PLL controller**: a proportional-integral law on `e = ±tdc_code`:
  `integ += e<<4`, `dco_code = base + e<<8`. `base` is `integ` until the loop
  is locked and `avg_dco_code` afterwards. Lock means 8 comparisons in a row
  with `|e| ≤ 2`, and one larger error clears it. Using the average when
  locked keeps CKOUT steady against a jittery, low-rate HSYNC.
- **Digital filter**: `avg += (dco_code − avg) >>> 4`, once per comparison.
- **DSM**: first-order delta-sigma. The 3 fractional bits of the 19-bit code
  are accumulated, and the carry is added to the 16-bit integer part.
- **DCO**: a 17-bit phase accumulator stepped by the 16-bit code. `CKOUT` is
  its MSB, so `f = code · f_clk / 2^17` (at most f_clk/2). A `ck_rise` strobe
  lets the divider count CKOUT edges in the system clock domain.
- **÷N**: counts CKOUT edges. HSOUT rises every N edges and stays high for
  ⌈N/2⌉ of them.

With HSYNC every 240 clocks, the loop locks within 40–70 HSYNC periods for
N = 16, 12 and 20. After that, CKOUT gives exactly N edges per HSYNC period.
With these sizes the loop can reach pixel clocks up to f_clk/2 and
`N · f_hsync ≤ f_clk/2`. A real display clock needs a DCO outside the fabric,
or a much faster system clock.

## Departures from the source and limits

- The ADC and DAC are not included. `adc_in` and `dac_out` are their digital
  sides, both 8-bit two's complement; a DAC that expects offset binary needs
  the MSB inverted.
- The source does not give these, so they are chosen here:
  - the phase detector scaling (product/128);
  - the gain block (a 6-bit multiplier);
  - the 24-bit DFG latch;
  - the FIR order and coefficients;
  - the use of `d1` for the gain and `d2` for the FIR filter;
  - synchronous active-high reset throughout.
- The source mentions an area optimisation of the phase detector but does not
  describe it. A plain 8×8 signed multiplier is used.
- The loop filter recurrence is fitted to the published trace. It matches
  every value given, but a filter with different behaviour outside that trace
  cannot be excluded.
- The table's address offset in the original EPROM and the EPROM device are not
  modelled. Only its contents are.
- Everything in the pixel-clock DPLL beyond its block diagram is this design's
  own: the control law, gains, lock rule, average length, TDC resolution and
  DCO realisation.
- The source also shows a transmitter/receiver (DUC/DDC) block diagram of a
  different, earlier FPGA radio system. That system is not part of this design.

## Files

- `rtl/dfm_pkg.sv`: shared widths and types (`sample_t`, `lf_t`, `ctrl_t`,
  `gain_t`).
- FM demodulator: `rtl/phase_detector.sv`, `rtl/loop_filter.sv`,
  `rtl/loop_gain.sv`, `rtl/dfg.sv`, `rtl/sine_rom.sv`, `rtl/fir_filter.sv`, and
  `rtl/dfm_demodulator.sv` (the loop).
- Pixel-clock DPLL: `rtl/pfd.sv`, `rtl/tdc.sv`, `rtl/pll_controller.sv`,
  `rtl/dco_avg_filter.sv`, `rtl/dsm.sv`, `rtl/dco.sv`, `rtl/freq_divider.sv`,
  and `rtl/pixel_clock_dpll.sv`.
- `rtl/sdr_dpll_top.sv`: both designs side by side.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Each testbench compares the block with a model written independently in the
testbench. `tb_sdr_dpll_top` runs both designs end to end at their default
parameters. It counts the serial word load, free running at zero control,
positive and negative frequency tracking, UP and DN pulses, lock entry and
loss, control from the averaged code and delta-sigma dithering. It fails if any
of these never happens. It takes a few seconds.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dfm_pkg.sv tb/tb_sdr_dpll_top.sv --top-module tb_sdr_dpll_top
./obj_dir/Vtb_sdr_dpll_top
```

Replace `tb_sdr_dpll_top` with any other `tb_<module>` to test one block. All
state is reset, except the sine table's output register. That register is
reloaded every clock, so it holds a valid value from the first clock of reset
on. The results do not depend on power-up values.
