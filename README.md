# 12-lead EKG backend: record all twelve leads, show any of them at once

Ambulance heart monitors usually show one lead on screen and print the 12-lead
analysis on paper. This design is the digital backend of a monitor that shows
any set of the twelve leads live, side by side, on one 1024x768 screen. It also
shows the heart rate.

The main idea is that one 12-bit ADC serves all twelve leads. An analog front
end filters the ten electrode wires against 60 Hz mains noise. It then uses two
analog multiplexers to pick the two electrodes whose difference forms the
current lead, and an instrumentation amplifier amplifies that difference. The
FPGA steps the multiplexers round-robin through the twelve leads. It averages
each lead's readings down to about 1 kS/s and keeps the last 3 seconds of every
lead in a block of RAM. The screen logic draws straight from that RAM, pixel by
pixel, as the VGA beam scans.

Everything runs on one 65 MHz clock, the XVGA pixel clock, and uses a
synchronous active-high reset.

```
 electrodes ─ notch filters ─ 2 analog muxes ─ instr. amp ─ ADC          (modelled in ekg_system)
                                   ▲ mux_sel[7:0]             │ adc_data[11:0]
                                   │                          ▼
 ekg_main ──switch strobe──▶ recorder ──▶ lead_filter ──▶ ekg_memory (12 x 3000 x 12 bit)
   ▲  │ select, view_start                                   │ value bus     │ read port
   │  ▼                                                      ▼               │
   │ split_screen ◀────────────────────────────────────────────────────────┘
   │      │ pixel                              pulse_logic ◀┘
   └──────┴──────── OR ◀──────────────────────────── pixel
          ▼
       display ──▶ VGA (1024x768 @ 60 Hz)
```

## Files

| File | What it is |
|---|---|
| `rtl/ekg_pkg.sv` | types (`sample_t`, `pixel_t`, `lead_sample_t`, `mux_sel_t`), lead and electrode enums, the lead-to-electrode table, XVGA timing, pipeline latencies |
| `rtl/ekg_system.sv` | the whole instrument for simulation: analog front-end models around `ekg_top` |
| `rtl/ekg_top.sv` | the synthesizable FPGA backend |
| `rtl/ekg_main.sv` | system controller: switch register, pixel OR, recorder strobe, view position |
| `rtl/recorder.sv` | lead polling, mux selects, ADC handshake |
| `rtl/lead_filter.sv` | per-lead 64:1 averaging decimator |
| `rtl/ekg_memory.sv` | 3-second circular history of every lead |
| `rtl/split_screen.sv` | draws the selected leads in horizontal strips |
| `rtl/pulse_logic.sv` | beat detector, rate in beats per minute, seven-segment digits |
| `rtl/display.sv` | XVGA timing, sync alignment, 12-bit VGA output |
| `rtl/notch_filter.sv`, `rtl/analog_mux.sv`, `rtl/instrumentation_amp.sv` | behavioural (real-valued, not synthesizable) models of the analog parts |
| `tb/tb_*.sv` | one self-checking testbench per module, plus end-to-end and workload testbenches |
| `tb/adc_model.sv` | ideal stand-in for muxes, amplifier and ADC, on integer electrode levels |
| `tb/xadc_model.sv` | 12-bit ADC on a real 0..1 V input |

## Recording: from electrode pairs to stored samples

**Leads and electrodes.** The leads are numbered 0..11 as I, II, III, aVR, aVL,
aVF, V1..V6, and switch bit *i* shows lead *i*. The electrodes on the mux inputs
are numbered 0..9 as RA, LA, LL, V1..V6 and RL. RL is the grounded wire.
`ekg_pkg::lead_pair` gives the electrode pair for each lead:

| lead | + (mux_sel[3:0]) | − (mux_sel[7:4]) |
|---|---|---|
| I | LA | RA |
| II | LL | RA |
| III | LL | LA |
| aVR, aVL, aVF | RA, LA, LL | RL |
| V1..V6 | V1..V6 | RL |

The limb leads are true differences between two limbs. The augmented and chest
leads are taken against the grounded wire, not against the averaged Wilson
terminal of a clinical monitor. This is a simplification. If the front end
builds a better reference on one mux input, change the `neg` entries of the
table.

**Polling.** Every `SWITCH_CYCLES` clocks (85, so 765 kS/s), `ekg_main` pulses
the recorder's `switch_i` input. The recorder then:

1. moves to the next lead and drives its pair on `mux_sel_o`;
2. waits `SETTLE_CYCLES` (16) for the mux and amplifier to settle;
3. pulses `adc_convst_o`;
4. tags the reading that comes back with `adc_valid_i` with its lead.

The conversion start comes `SETTLE_CYCLES + 2` cycles after the strobe. The
ADC must answer before the next strobe. If it does not, the reading is
abandoned, `dropped_o` pulses, and the polling carries on.

**Filtering.** Polling each lead at about 64 kS/s adds high-frequency noise.
`lead_filter` sums 64 readings of each lead and emits their floor average:
65 MHz / 85 / 12 / 64 gives 996 samples per second per lead. The filter keeps a
separate sum and count for each lead, so a dropped reading delays only that
lead. This is a boxcar filter, the simplest low-pass that also decimates.
A longer FIR filter would need more RAM and multipliers.

**History.** `ekg_memory` is one array of 12 × 3000 samples, 3 seconds per
lead at about 1 kS/s. Lead *L* owns words `L*3000 .. L*3000+2999`. All leads
share one write position. It advances after lead 11 is written, so
`oldest_o` is the oldest sample of every lead. Each stored sample is also
copied, with its lead number, onto the value bus that feeds the pulse logic.
The read port is synchronous, with one cycle of latency, as a block RAM's is.
The RAM is not cleared at reset, so the screen shows whatever it powered up with
until 3 seconds have been recorded.

## Drawing the split screen

This is the most involved part of the design. `split_screen` draws every pixel
from scratch as the beam reaches it, with no frame buffer.

**Strips.** With *n* leads selected, the 768 visible rows are cut into *n*
strips of `h = floor(768/n)` rows. Strip *k* shows the *k*-th raised switch
bit, counting from bit 0 at the top. Rows left over at the bottom (for example
763..767 for *n* = 7) stay black. The strip index is found without a divider:
the row is compared against `j*h` for j = 1..11.

**Columns.** The trace is `DEPTH/3` = 1000 columns wide, centred in the line
(columns 12..1011). Column *x* shows history position
`(view_start + 3x) mod 3000`, so every third sample is shown. The oldest
sample is on the left and the newest on the right. `ekg_main` samples
`view_start` from the memory at each frame start, so one frame is drawn from
one position. The memory keeps writing during the ~16 ms frame, so the
leftmost ~6 columns may already show samples that are 3 s newer.

**Rows.** A sample *s* (0..4095) is drawn at row
`top + h − 1 − (s·h >> 12)`. Full scale fills the strip and mid-scale, 2048,
sits in the middle.

**Line.** A pixel is lit when its row lies between the rows of this column and
the previous column, widened by a half-thickness. The previous row is kept in a
register, because the beam visits the columns in order. This joins steep
slopes into a solid line instead of scattered dots. The half-thickness shrinks
as the strips get smaller:

| leads selected | strip height | line width |
|---|---|---|
| 1–4 | ≥ 192 rows | 5 rows |
| 5–8 | 96–153 rows | 3 rows |
| 9–12 | 64–85 rows | 1 row |

Traces are green (pixel `0x0000FF00`).

**Pipeline.** Both pixel sources produce their pixel two cycles after
hcount/vcount (`ekg_pkg::SOURCE_LATENCY`):

- In the first cycle, the strip, the lead and the memory address are worked out
  and the RAM is read.
- In the second cycle, the sample is scaled and compared with the row.

`ekg_main` adds one more cycle for the OR. `display` delays hsync, vsync and
blanking by the total (`PIXEL_LATENCY` = 3) so that they leave together with
the pixel. The VGA pins are registered once more. If you change a latency,
change the constant in the package, so that all three blocks stay aligned.

## Heart rate

`pulse_logic` watches the value bus for lead V1:

- A sample of 3072 or more (`THRESHOLD`) is *high*.
- The first high sample while the detector is armed is a beat. The detector
  then disarms.
- It re-arms only after 40 consecutive low samples (`LOW_RUN`, 40 ms), so one
  wide or ragged beat counts once.

A 3000-bit shift window records which of the last 3000 V1 samples were beats,
and a running count tracks the ones in it. Beats in 3 s × 20 is the rate in
beats per minute (`rate_o`). The rate is drawn in red in the top right corner
as up to three seven-segment digits, 24 × 40 pixels each, with leading zeros
blank. It saturates at 999. The rate is an average over 3 s, so it moves in
steps of 20 bpm.

## The display

`display` counts the standard 1024x768 at 60 Hz frame: 1344 × 806 clocks
(front porch 24/3, sync 136/6, back porch 160/29) with active-low syncs. It
gives `hcount`/`vcount` to the pixel sources and pulses `frame_start` at
(0,0). It cuts the 32-bit `0x00RRGGBB` pixel to the top four bits of each
colour for a 12-bit VGA port. Outside the picture it outputs black.

## Top-level interface (`ekg_top`)

`ekg_system` has the same parameters and digital ports, except that `mux_sel_o`
still leaves for observation while the muxes are modelled inside. It adds
`elec_i` (nine real electrode voltages, RA..V6) and `amp_o` (the real
amplifier output, to be wired to the ADC).


| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 65 MHz clock, synchronous active-high reset |
| `sw_i` | in | 12 | lead switches; bit *i* shows lead *i* (registered every clock, no debouncing) |
| `mux_sel_o` | out | 8 | [3:0] electrode on the amplifier's + input, [7:4] on its − input |
| `adc_convst_o` | out | 1 | start one conversion |
| `adc_data_i`, `adc_valid_i` | in | 12, 1 | conversion result and its one-cycle valid |
| `vga_r_o`, `vga_g_o`, `vga_b_o` | out | 4 each | colour |
| `vga_hs_o`, `vga_vs_o` | out | 1 | syncs, active low |
| `rate_o` | out | 16 | heart rate, beats per minute |
| `beats_o` | out | 12 | beats in the last 3 s |
| `beat_o`, `dropped_o` | out | 1 | pulse per beat, pulse per abandoned conversion |

| parameter | default | meaning |
|---|---|---|
| `SWITCH_CYCLES` | 85 | clocks per lead reading (765 kS/s) |
| `SETTLE_CYCLES` | 16 | clocks from mux switch to conversion start |
| `DECIM_LOG2` | 6 | readings averaged per stored sample = 2^6 |
| `DEPTH` | 3000 | stored samples per lead; the trace is DEPTH/3 columns |
| `THRESHOLD` | 3072 | "high" level for beat detection |
| `LOW_RUN` | 40 | low samples that separate two beats |
| `RATE_MULT` | 20 | 60 s / window length in seconds |

Keep `DEPTH` a multiple of 3 and at most 3072, so that the trace fits in the
line. If you change `SWITCH_CYCLES` or `DECIM_LOG2`, also change `DEPTH` and
`RATE_MULT` so that the window still spans the time they assume.

## Where this design fills in or departs from its description

The block structure follows the design it implements, and so do these numbers
and behaviours:

- 12 leads, 12-bit samples and 32-bit pixels;
- 3 s of history shown as 1000 columns of every third sample;
- beats counted over 3 s and multiplied by 20;
- the OR of the two pixel streams;
- 1024x768 at 65 MHz.

The following are choices made here:

- **Filter.** The description asks only for digital filtering against
  high-frequency noise. The 64:1 boxcar and the 85-cycle switch period are
  chosen here to land near 1 kS/s per lead.
- **Where the screen logic gets its data.** The description both has the
  split-screen block read the selected waveforms from memory and keep its own
  register copy of every waveform. Here it reads the memory. A second copy of
  432 kbit would buy nothing.
- **Lead order, electrode pairs and mux select encoding**, as given in the
  tables above.
- **The "where to find the waveforms" information** that `ekg_main` passes on
  is the memory's oldest-sample position, taken once per frame.
- **Strip order, sample scaling, column joining, line widths, colours, the
  digit font, the beat threshold and the re-arm length.**
- **Not included:** an FFT-based rate estimate, mentioned only as an optional
  extra, and any filtering beyond the boxcar, such as a baseline-wander
  high-pass.

The board's ADC is not modelled inside the design. Its start, data and valid
signals are ports of both `ekg_system` and `ekg_top`.

## Analog front-end models

`ekg_system` wraps the backend in models of the parts in front of it. These
models use `real` ports and timed loops, so they are for simulation only.

- **`notch_filter`**, one per signal electrode, is the passive twin-T notch
  (arms 2R–2R with C, and C–C with R and 2C) with f = 1/(4πRC) = 60 Hz. Its
  unloaded response, H(s) = (s² + ω₀²)/(s² + 4ω₀s + ω₀²), is evaluated with
  the bilinear transform every 10 µs. It passes DC with gain 1 and nulls
  60 Hz exactly. The slow pole at about 0.27·ω₀ means the filter takes a few
  tens of milliseconds to settle after power-up.
- **`analog_mux`** has ten inputs: the nine filtered electrodes, plus 0 V for
  the grounded RL wire. Switching is ideal.
- **`instrumentation_amp`** is the three-op-amp amplifier,
  gain (1 + 2·R1/RGAIN)·(R3/R2). With the default values (R1 = 24.9 k,
  RGAIN = 100 Ω, R2 = R3) the gain is 499 around a 0.5 V reference, clipped
  to 0..1 V. This maps ±1 mV of heart signal onto the 0..1 V input range of
  the board ADC. Change RGAIN to change the gain.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ekg_pkg.sv tb/tb_ekg_system.sv --top-module tb_ekg_system
./obj_dir/Vtb_ekg_system
```

| testbench | what it checks |
|---|---|
| `tb_recorder` | lead order and electrode pairs against a separate table, conversion start delay, lead tags, a deliberately unanswered conversion reported as dropped |
| `tb_lead_filter` | random readings with gaps, against a reference average, and the one-cycle output timing |
| `tb_ekg_memory` | value-bus echo, write position wrap, and read-back of every word with one-cycle latency |
| `tb_ekg_main` | registered selection and OR, strobe period, view position taken only at frame start |
| `tb_split_screen` | every visible pixel of three frames (1, 3 and 12 leads, shifted views) against a reference drawing |
| `tb_pulse_logic` | random beats with dips and noise on other leads, against a reference detector; digit segments for 60 bpm |
| `tb_display` | two full frames: counter wrap, frame start, sync positions and widths, colour and blanking |
| `tb_ekg_top` | the whole design at small sizes (24-cycle switch, 2:1 averaging, 60-sample history): every lead pair selected, a forced drop, stored values of all steady leads, beat count against a reference, and a screen column checked row by row with one lead and with twelve leads. It counts each mechanism and fails if one never happened. |
| `tb_ekg_top_full` | the backend at its defaults with the ideal ADC stand-in, through 3 s of recording and one frame (about 200 million cycles): every stored word of the steady leads, a 60-bpm heartbeat read as 3 beats and 60 bpm, the twelve-lead screen column. It takes about two minutes. |
| `tb_notch_filter`, `tb_analog_mux`, `tb_instrumentation_amp` | the analog models: notch magnitude at 60, 5 and 200 Hz and DC against the closed-form response; mux selection; amplifier gain, clipping and common-mode rejection |
| `tb_ekg_system` | the whole instrument with a 300-sample history. Electrodes carry DC levels, 60 Hz hum of 0.2–0.6 mV and a V1 heartbeat. Checks that the settled stored levels are within 3 codes of the ideal, with the hum gone; the beat count against a reference; the screen columns in one-lead and twelve-lead frames; a forced drop. It counts every mechanism. |
| `tb_ekg_system_full` | the whole instrument at every default through 3.2 s and one frame, with hum and a 60-bpm heartbeat: every stored sample, 3 beats and 60 bpm, the twelve-lead screen column (about two minutes) |
| `tb_workload_display` | twelve different 3000-sample waveforms (sines, triangles, squares, spike trains) written into the real memory and drawn by the split screen logic; every pixel of 12-, 6- and 1-lead frames against a reference drawing |
| `tb_workload_pulse` | EKG-like V1 traces with 1 to 10 peaks in 3 s (ragged R waves, sub-threshold T waves, noise) through the pulse logic at its defaults: count k and rate 20k each time |

The ADC stand-in, `tb/adc_model.sv`, outputs `2048 + level(+) − level(−)`,
clipped to 12 bits, a fixed number of cycles after each start.

## Limits

- The analog models are ideal apart from their transfer functions: no
  electrode offset, noise, mux charge injection or amplifier limits. The
  boxcar filter's effect on real noise has not been measured.
- The switch inputs are not synchronised or debounced. On hardware, add a
  two-flop synchroniser in front of `sw_i`.
- The 432-kbit history is written as a plain array with a registered read, so
  an FPGA tool can map it to block RAM. It has not been through an FPGA place
  and route, and 65 MHz timing is unverified. The strip search and the
  multiply in the split screen's first stage are the likely critical path.
