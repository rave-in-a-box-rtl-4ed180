# Rave in a Box: a laser show that follows the structure of a song

This FPGA design listens to music through an ADC and draws animated
vector figures with a laser on two galvanometer mirrors. The figure changes
when the *music* changes: at the boundary between verse and chorus, at a key
change, or when an instrument comes in. No beat or loudness detection is
used. The design keeps a short history of the song's harmony (its
*chromagram*) and measures how different the recent past is from the
slightly older past. This is a checkerboard-kernel novelty score. Each peak
of that score advances the scene.

A change can only be recognised once it sits in the middle of the history
window, about four seconds after it was heard. The design therefore also
delays the audio going to the speakers by four seconds, so that the new
figure appears together with the change you hear.

Everything runs in one 104 MHz system clock domain. The only exception is
a 1024 x 768 VGA debug screen on its own 65 MHz pixel clock, which shows the
spectrum or the chromagram as a bar graph.

```
 ADC 1 MSPS, 12 bit
   │
 oversampler ×64 ──► 15-bit samples, 15.625 kHz ─────────────► audio_buffer (65536-sample delay)
   │                                                              │
 sample_frame_buffer: 4096-slot ring, Hanning window              dac_spi ► speaker DAC
   │ frame_done every 4096 samples (0.262 s)
 frame_streamer ──AXI-Stream──► [FFT + magnitude core, vendor IP]
                                   │ (bin, |X|) stream
                     spectrum_ram ◄┤
                                   ▼
                          chroma_calculator ──► 12 × 16-bit chroma vector
                                   │
                             novelty_calc (32-chroma window, smoothing, peak)
                                   │ peak
                             scene counter (2 bits)
                                   │
   interpolator ◄─ instruction_rom (Bézier curves per scene/frame)
     │ x, y, laser_on
   dac_spi ► galvo DAC (MCP4822, x on B, y on A)
```

## From sound to a chromagram

**Oversampling.** The on-chip ADC converts at 1 MSPS. Each group of 64
conversions is summed and the 18-bit sum is rounded down to 15 bits. This
gives 15.625 kSPS with three more bits of resolution. The low rate is what
matters: a 4096-point FFT then has 3.8 Hz bins, fine enough to tell adjacent
semitones apart from C3 upwards, and a frame covers 0.262 s
(`oversampler`).

**Windowing and framing.** Every oversample is padded to 16 bits,
multiplied by the Hanning coefficient of its slot and written into a
4096-slot circular RAM (`sample_frame_buffer`, `hanning_rom`). The window
table, sin²(πn/N) in 0.16 fixed point, is computed during elaboration. A
`hanning_en` input switches the window off. Each time slot 4095 is written,
`frame_streamer` reads the 4096 samples oldest first and sends them to the
FFT core on an AXI-Stream port. Each sample goes out as a signed real part
with the 2^15 offset removed, and `tlast` marks the last one. The streamer
honours `tready` and abandons the frame if the core reports
`last_missing`.

**Chroma.** The FFT core (not part of this RTL) returns (bin index,
magnitude) pairs. `chroma_bins_rom` maps each of the first 1024 bins
(0–3.9 kHz) to a pitch class:

* 0 = C … 11 = B, for the nearest equal-tempered note (A4 = 440 Hz), if
  the bin lies within a quarter tone of a note between C3 and E7;
* 12 ("ignore") otherwise.

The ROM is built during elaboration in 32.32 fixed point. `chroma_calculator`
adds each magnitude into the accumulator of its class (18 bits,
saturating). On `tlast` it publishes the twelve sums shifted down to 16 bits
as the chroma vector and pulses `done`.

## Novelty detection

This is the heart of the design and its least obvious part.

**The score.** Keep the last K = 32 chroma vectors c₀ (oldest) … c₃₁
(newest) in a FIFO. Split them into an older half (positions 0–15) and a
newer half (16–31). The novelty score is

    S = Σ over unordered pairs i < j of  s(i,j) · (cᵢ · cⱼ)
        s = +1 if i and j are in the same half, −1 otherwise.

This is the checkerboard kernel applied to the self-similarity matrix of
the window. When both halves sound alike, the positive and negative terms
cancel. When the harmony changed exactly in the middle, the same-half terms
are large and the cross-half terms small, so S peaks.

**Updating instead of recomputing.** Recomputing S takes 496 dot products.
Instead, the design updates S when a new vector n arrives and the oldest
vector o drops out. The other 31 vectors shift by one position. Only three
kinds of term change:

1. Terms with o disappear. Each term o·c is undone: subtracted if c was in
   o's half, added if it was not.
2. Terms with n appear: + for partners in the newer half, − for the older
   half.
3. The vector m that crosses the middle (old position 16, new position 15)
   changes halves, so every term m·c flips sign. That adds or subtracts
   2·m·c.

So each update needs 3 × 31 = 93 dot products. Written with p = 0…30 as the
position of the remaining vectors after the shift, the signs are:

| pass | partner c_p | sign |
|------|-------------|------|
| newest n | p < 16 | − |
| | p ≥ 16 | + |
| oldest o | p < 15 | − |
| | p ≥ 15 | + |
| middle m (doubled) | p < 15 | + |
| | p = 15 (m itself) | skipped |
| | p ≥ 16 | − |

These rules were checked in simulation against a brute-force evaluation of
S after every update.

**Hardware.**

* `fifo_controller` wraps a 32 × 192-bit first-word-fall-through FIFO
  (`sync_fifo`). It has five modes: IDLE, LOAD, UNLOAD, CYCLE (read the
  head and write it back at the tail) and SHIFT.
* The FIFO behaves like the vendor FIFO of the original design: a write
  while full is refused even if a read happens in the same clock.
  `novelty_calc` is arranged so that this never matters:
  * It UNLOADs o into a register.
  * It keeps n in a register while CYCLE walks the 31 remaining entries
    three times. m is captured on the first walk.
  * It LOADs n only after the walks.
* `dot_engine` computes a 12-element dot product of 16-bit vectors in a
  4-stage pipeline: products, pair sums, and two adder levels. Its result
  is 36 bits.
* Add/subtract/double control bits travel alongside the pipeline into
  `delta_accumulator` (135-bit signed).
* The delta is then added to `total_accumulator`. This 200-bit register
  holds S in offset binary: 2^199 means zero. It saturates at both ends.
* The smoothed score is updated as avg ← (avg + S) / 2.
* `peak` is raised when all three hold: the previous smoothed value
  exceeds the current one, it exceeds the one before it, and it is more
  than 10⁸ above zero.
* `done` follows 3(K−1)+8 = 101 clocks after `chroma_done` is accepted.
  That is under 1 µs of the 0.262 s between chromagrams. A chroma vector
  that arrives while an update runs is ignored.

**Start-up.** After reset the FIFO is filled with 32 zero vectors. The
running score is then exactly S from the first chromagram on. The start of
the music counts as a change out of silence, so the first peak comes with
the 17th chromagram, about 4.5 s after the music starts.

**Timing of a scene change.** Suppose the harmony changes at the start of
frame b. S is largest when frame b is the oldest vector of the newer
half (position 16), i.e. after chromagram b+15 is added. The peak is recognised one update later,
after chromagram b+16. That is about (16+1) × 0.262 s ≈ 4.5 s after the
change. The 65536-sample audio delay is 4.19 s, so the figure changes
roughly a quarter of a second after the listener hears the change.

## Delayed audio

`audio_buffer` cuts each 15-bit oversample to 12 bits and pushes it into a
65536-entry FIFO, built from the same `fifo_controller`. Once the FIFO is
full, each new sample first UNLOADs the oldest sample, which becomes the
speaker output, and is LOADed one clock later. A sample therefore leaves
exactly 65536 samples (4.19 s) after it arrived. A single-channel `dac_spi`
sends it to channel A of an MCP4822 DAC at gain 1x.

## Laser graphics

**Program.** `instruction_rom` holds 4 scenes × 16 frames × 256
instructions. Each instruction is one cubic Bézier curve of 97 bits
(`bezier_instr_t` in `rave_pkg`): four 12-bit (x, y) control points, p0x
in the top bits, and a laser-on bit in bit 0. The read latency is two
clocks.

The artwork of the original show is not available. The default contents are
therefore computed test figures:

* scene 0: a square;
* scene 1: a diamond;
* scene 2: a four-pointed star;
* scene 3: a dashed octagon, drawn with the laser off on every other side.

Each figure is centred on (2048, 2048) and made of 256 straight pieces
written as Bézier curves. Its half-width pulses with the frame number f:
60·(6+f) for f < 8 and 60·(21−f) after. Real artwork can be loaded with the
`INIT_FILE` parameter (`GFX_INIT_FILE` on the top) (`$readmemh`, one 97-bit word per line, address
{scene, frame, instruction}).

**Interpolator.** On every `step` enable, `interpolator` advances the curve
parameter t (10 bits, 1024 points per curve):

* after 1024 steps it moves to the next instruction;
* after 256 instructions it either repeats the frame (each frame is drawn
  twice) or moves to the next frame;
* after 16 frames the animation loops;
* a change of `scene` restarts at frame 0, instruction 0, t = 0.

Two combinational `bezier_coordinate` units evaluate

    B(t) = ((T−t)³p0 + 3(T−t)²t·p1 + 3(T−t)t²·p2 + t³p3) / T³,   T = 1024

exactly in integers. t is delayed two clocks to match the ROM, and x, y and
laser_on are registered, so the outputs follow the counters by three
clocks. In the top, `step` comes every GFX_DIV = 17 system clocks, which is
6.1 M points/s.

**Galvo DAC.** The two-channel `dac_spi` alternates a y word (channel A)
and an x word (channel B), both at gain 2x, to an MCP4822. The word format
follows the MCP4822:

* bit 15: channel (B = 1);
* bit 14: unused;
* bit 13: GA, where 0 means 2x;
* bit 12: SHDN = 1 (output on);
* bits 11–0: the code, MSB first.

SCK is clk / (2·SCK_DIV) = 13 MHz. A word takes 33 half SCK periods (132
clocks), so each axis is refreshed at 394 kHz. That is far faster than
galvanometers follow.

## VGA debug display

* `xvga` generates standard 1024 x 768 @ 60 Hz timing: 1344 × 806 clocks
  at 65 MHz, active-low syncs.
* `histogram_display` draws white bars rising from the bottom line.
  * Spectrum mode: column h shows bin h >> `hist_range`, height
    magnitude >> 7.
  * Chroma mode: twelve 64-pixel-wide columns, height chroma >> 6.
* Magnitudes reach the pixel domain through the dual-clock `spectrum_ram`
  (1024 x 16). The chroma vector crosses without synchronisers: it changes
  four times a second, and a torn frame is harmless.
* The display pipeline is two pixel clocks deep, and the syncs are delayed
  to match.

## Board controls

* `debounce` filters the switch inputs `hanning_en`, `show_chroma` and
  `hist_range`. A new level must hold for `DEBOUNCE_DELAY` clocks
  (10⁶, about 10 ms) before the design sees it. Reset copies the switches
  straight through, so the design starts from their positions at once.
  The reset input itself is not debounced: drive it from a clean source.
* `peak_led` toggles on every novelty peak, so a song's sections show as
  the LED going on and off.
* `display_8hex` scans an eight-digit seven-segment display (`seg`, `an`,
  both active low; `seg[7]` is the decimal point, kept off). It shows the
  smoothed novelty in hex, saturated to `FFFFFFFF`. That makes it easy to
  read off values for setting `PEAK_THRESHOLD` for a given kind of music.
  Each digit is lit for 2048 system clocks.

## Top level: `rave_in_a_box`

| Group | Ports |
|-------|-------|
| clocks, reset | `clk` (system, 104 MHz), `rst` (synchronous, active high), `clk_pixel` (65 MHz) |
| ADC | `adc_sample[11:0]`, `adc_eoc` (one strobe per conversion), `hanning_en` |
| to FFT core | `fft_in_tdata[31:0]` (real in [15:0]), `fft_in_tvalid`, `fft_in_tready`, `fft_in_tlast`, `fft_last_missing` |
| from FFT core | `mag_tdata[23:0]` (saturated to 16 bits inside), `mag_tuser[11:0]` (bin), `mag_tvalid`, `mag_tlast` |
| analysis | `chroma` (12 × 16), `chroma_done`, `novelty[199:0]`, `novelty_smoothed[199:0]`, `novelty_done`, `novelty_busy`, `peak`, `scene[1:0]` |
| board | `peak_led`, `seg[7:0]`, `an[7:0]` |
| laser | `galvo_cs_n`, `galvo_sck`, `galvo_sdi`, `laser_on`, `laser_x[11:0]`, `laser_y[11:0]` |
| speaker | `audio_cs_n`, `audio_sck`, `audio_sdi`, `audio_valid` |
| VGA | `show_chroma`, `hist_range[1:0]`, `vga_r/g/b[3:0]`, `vga_hs`, `vga_vs` |

Parameters and their defaults:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `OS_LOG2` | 6 | oversampling ratio 2^6 |
| `NFFT` | 4096 | FFT length |
| `K` | 32 | novelty window |
| `AUDIO_DEPTH` | 65536 | audio delay in samples |
| `GFX_DIV` | 17 | clocks per laser point |
| `SCK_DIV` | 4 | DAC clock divider |
| `PEAK_THRESHOLD` | 10⁸ | minimum peak height |
| `T_BITS` | 10 | points per curve = 2^10 |
| `GFX_INIT_FILE` | "" | optional hex file with the laser artwork |
| `DEBOUNCE_DELAY` | 1000000 | clocks a switch must hold a new level |

Blocks outside this RTL:

* the FFT/magnitude core, the XADC and the clock generator (vendor IP);
* the DACs, galvanometers, laser and amplifier (hardware).

Their signals are ports of the top.

## Where this design departs from the original

* **Clocking.** The original drove the DACs and the interpolator from
  separate slower clocks. Here they run on clock enables in the system
  domain (`SCK_DIV`, `GFX_DIV`), chosen to give similar rates.
* **Dot product width.** It is 36 bits, not 35. Twelve full-scale 16 × 16
  products need 36. The delta input is 37 bits to hold the doubled
  middle-vector products.
* **Delta representation.** The delta accumulator uses two's complement
  rather than offset binary. The values are the same.
* **Novelty start-up.** The original waited for the FIFO to fill before
  scoring. Here the FIFO is primed with zero vectors.
* **Middle vector.** The original walked the FIFO a second time for it.
  Here one walk doubles each product, and the newest vector waits in a
  register so the FIFO is never full while cycling.
* **Bézier weights.** They use T − t (so t = 0 gives p0 exactly and the
  weights sum to T³) instead of T − 1 − t.
* **Chroma accumulators.** They saturate instead of wrapping.
* **Seven-segment display.** The original wired up a display for the
  novelty but never connected a value to it. Here it shows the smoothed
  novelty. It runs on the system clock rather than the pixel clock.
* **Debouncing.** The original debounced every switch and button and
  started from unknown levels. Here only the three switch inputs used are
  debounced, and reset loads them.
* **Instruction ROM contents.** Computed test figures replace the traced
  artwork.
* **Tables.** The Hanning and pitch-class tables are computed during
  elaboration instead of loaded from files.
* **Synthesis of the instruction ROM.** Building its 16384-word table
  during elaboration takes many constant-evaluation steps. Some synthesis
  front ends stop with a step limit on it (and on modules that contain it).
  Either raise the limit or load the table through `INIT_FILE`.

Not analysed: timing closure at 104 MHz. Two paths are the likely
concerns:

* The Bézier evaluators are one deep combinational path (products of about
  45 bits). Their inputs change only once every 17 clocks, so a multicycle
  constraint or an extra pipeline stage would be needed.
* The 200-bit saturating add and compares in the novelty path.

The design has not run on hardware.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against values computed independently (real-number models, brute-force
sums, decoded SPI words) and prints `TB_RESULT checks=N failures=M`.

Highlights:

* `tb_novelty_calc`: 120 chromagrams in sections of changing harmony, at
  full size. Compares the score after every update with the direct O(K²)
  kernel sum. Checks the 101-clock latency, the smoothing and the peak
  rule, and that vectors arriving while busy are dropped.
* `tb_rave_in_a_box`: the whole design end to end with a behavioural FFT
  (`fft_mag_model`, a direct DFT) and a sine whose pitch changes every six
  frames. Some sizes are reduced (8x oversampling, K = 8, 4096-sample audio
  delay, 16 points per curve). It checks:
  * the oversample and frame rates, and FFT back-pressure stalls;
  * a deliberately dropped frame;
  * that each chromagram's strongest class is the tone's pitch class;
  * that peaks fall exactly K/2 frames after every pitch change, and each
    one advances the scene;
  * the audio delay, sample for sample;
  * every SPI word on both DACs, against the value the DAC should latch;
  * laser blanking and VGA output;
  * every seven-segment digit against the smoothed novelty, the peak LED,
    and a switch change passing the debouncer.

  The test fails if any of these mechanisms never happened.
* `tb_rave_in_a_box_full`: the same checks with every parameter at its
  default. It runs 18 frames (9.4 M clocks), including the first peak and
  the first delayed audio. The switch change passes the debouncer at its
  full 10⁶-clock delay. It takes about 20 s.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
          rtl/rave_pkg.sv tb/tb_novelty_calc.sv --top-module tb_novelty_calc
obj_dir/Vtb_novelty_calc +verilator+rand+reset+2
```

`rave_pkg.sv` must come first. Everything else is found through `-y`.
Testbenches keep time by counting clocks, so no timescale is needed.

## Changing the design

* **Window length.** `K` must be even; only powers of two have been
  simulated. Peak timing
  scales with K/2 frames. `AUDIO_DEPTH` should be about K/2 × NFFT
  samples, to keep the audio in step.
* **Sampling.** `OS_LOG2` must be at least 3 (the oversampler keeps 15
  bits). The chroma table assumes the 15.625 kHz rate.
* **Artwork.** Load your own animation with the top's `GFX_INIT_FILE`
  parameter (passed down to `instruction_rom`).
* **Scene changes.** Make them more or less eager by changing
  `PEAK_THRESHOLD`, which is measured in units of squared chroma
  magnitude.
