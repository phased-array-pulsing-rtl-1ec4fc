# Phased-array sonar on one FPGA clock

This is a short-range sonar that finds objects in front of a row of
ultrasonic receivers and shows them on a 1024x768 screen. Thirty times a
second a transmitter sends a short 40 kHz burst. Twelve receivers in a line
hear the echoes. Each receiver is digitised by a one-bit delta-sigma
converter whose loop is closed through the FPGA. An object's **range** comes
from how long its echo took to return. Its **bearing** comes from how much
later the echo reaches one end of the array than the other: a phase
difference measured across the 12 channels. Range and bearing become an
(x, y) point that the display draws under a rotating radar-style sweep. The
design also has a proximity alarm, a sweep "ping", a mouse menu and a
one-button calibration of the range offset.

The whole design runs on a single 64.8 MHz clock. That is also the pixel
clock of 1024x768 at 60 Hz, so acquisition, processing and display share
one clock domain and need no clock crossings.

```
 adc_in[11:0] ─► data_acq ──rows──► echo_bram ──► signal_analysis ──x,y──► ui_top ─► pixel, syncs
 adc_out[11:0]◄─ (12 channels,      (32768 x 12)   (package search,          (grid, sweep, objects,
 pulse_out ◄──── 30 Hz trigger)                     range, bearing)            menu, sound) ─► sound
                      acq_done ─────────────────────► start      xvga_timing ─┘
```

`rtl/sonar_top.sv` is the top level. `rtl/sonar_pkg.sv` holds the shared
types: the colours, `rgb_t` and the menu mode enum `ui_mode_e`.

## Timing skeleton

Three timing signals drive the acquisition side:

| signal | source | period |
|---|---|---|
| system clock | board | 64.8 MHz |
| `mhz_tick` | `enable_divider`, /64 | 1.0125 MHz: one sample row per tick |
| `frame_tick` | `enable_divider`, /2,160,000 | 30 Hz: one ping per frame |

Each frame tick does three things at once:
- it fires the transmit burst (`pulse_gen_40khz`: 16 periods of 1620 clocks);
- it resets the threshold generator to its maximum;
- it rewinds the echo-buffer address.

The buffer address is therefore the time since the ping, in microseconds.
After 32768 rows (about 32.4 ms) the buffer is full. `acq_done` then pulses
one clock after the last write and starts the signal processing. Processing
one frame takes about 33,000 clocks (0.5 ms), well inside the 1.3 ms left
before the next ping.

The transmitter is driven differentially. `pulse_out = {out_p, out_m}` are
two square waves a third of a period apart, so their difference steps
through -1, -1, 0, +1, +1, 0 in sixths of the 25 µs period.

## Receive channel (`channel_pipeline`, 12 copies)

1. **Delta-sigma loop** (`ds_sync`, `ds_reconstruct`). The analog side is an
   amplifier, an integrator and a comparator outside the FPGA. Its
   comparator bit is synchronised through three flip-flops. The last one
   drives both the feedback output `adc_out` and the digital side. The
   waveform is rebuilt by integrating ±2^16 per bit. Two corrections keep
   the running sum centred:
   - a bias estimator, which measures ones minus zeros over 65536-cycle
     windows and subtracts a running average of that count;
   - a slow leak of sum/2^16 per clock.
2. **Filters at 64.8 MHz** (`bpf_65mhz`). A single-pole IIR low-pass
   (weight 2^-6) removes the sawtooth of the integrator. A single-pole IIR
   high-pass (2^-10) removes DC. An 8-tap "triangle" FIR with coefficients
   1-3-5-7-7-5-3-1 smooths the result and prevents aliasing.
3. **Down-sampling to 1 MHz** (`downsample_filter`). A second high-pass and
   a second triangle FIR run only on `mhz_tick`.
4. **Threshold and edge detection** (`threshold_gen`, `edge_detect`).
   Echo power falls roughly as 1/r^4, so a fixed threshold would either
   miss far objects or trigger on near clutter. The shared threshold is:
   - `MAX_THRESHOLD` (131072) for the first 512 + 4096 µs, which blinds the
     receivers to the direct transmitter field and to close reflections;
   - after that, `MAX * (4096/128)^2 / ((t-512)/128)^2`, never below 4096.

   A sequential divider (`udiv_seq`, 28 clocks) computes the new value
   between two ticks. The detector outputs 1 when the sample rises through
   the threshold. It then holds that 1 for 12 samples, about half a 40 kHz
   period. So a real echo is written as a train of 12-µs pulses repeating
   every 25 µs.
5. **Echo buffer** (`echo_addr_gen`, `echo_bram`). The twelve detector bits
   form one 12-bit row, written on every tick into a 32768 x 12 block RAM.
   The RAM has one synchronous read port, used by the signal processing.

## Signal processing (`signal_analysis`)

The processor scans one frame of the buffer and reports up to 10 objects.
`spu_controller` sequences it with one-cycle start/done handshakes:

```
IDLE ─start─► WPD ─package─► distance ─► phase ─► angle ─► coordinates ─► WPD …
               └─ end of buffer or 10 objects ─► IDLE (done, total_obj)
```

### Wave package detection (`wpd`, `wpd12`)

A real echo on one channel is a "wave package": a run of 12-sample pulses
repeating with the 25-sample period. Isolated noise pulses are not packages.
Each channel's `wpd` is a five-state machine:

1. wait for a rising edge;
2. confirm the edge if more than 9 of the next 12 rows (half a period) are
   ones, and take the edge time as `t1`; this rejects glitches;
3. wait for a zero;
4. confirm the end if the next 25 rows hold fewer than 3 ones, and take
   the time of that zero as `t2`; otherwise the zero was only the gap
   between two pulses, so go back to step 3;
5. hold `t1` and `t2`.

`wpd12` walks the buffer one row per clock and feeds all twelve detectors.
It stops when every channel has its package, so one object is reported at
a time. The next start resumes the walk from that row.

### Range (`distance_retriever`, `param_manager`)

`t` is the mean of `t1` over the four middle channels (4..7):

    r = (a * t) >> 14 + b      [cm],  a = 285

The value a = 285 matches sound at 343 m/s over the return path:
0.0172 cm per µs. The offset `b` starts at 0 and is the only value the
user calibrates. Selecting *Calibration* in the menu raises `reprogram`.
On the next frame, the first object sets `b = 300 - (a*t >> 14)`, which
places it at exactly 3 m; `param_manager` stores that `b`.

### Bearing (`phase_retriever`, `angle_retriever`, `cal_lut`, `cos2sin`)

The leading edges are too noisy to give an arrival-time difference: each
channel crosses the same threshold at a different strength. Instead, the
processor reads a 28-row window starting at the middle of the package. In
that window it takes each channel's phase: the offset of its first 0→1
transition, modulo 25 µs. These phases are ambiguous by whole periods, so
they are unwrapped by **linear prediction**. The procedure starts from the
end channel the wave reached first. There, neighbours differ by less than
half a period. Each further channel is moved by whole periods to within half
a period of `2·P(k-1) − P(k-2)`. One correction or one accepted channel is
processed per clock. The result is `dt = P(11) − P(0)` in µs.

From `dt`, the far-field cosine is `cos θ = 446·dt / 512`, in Q1.9. It is
then corrected through a 256-entry table (`cal_lut`) indexed by coarse cos
and coarse range. `cos2sin` then forms `sin θ = sqrt(1 − cos²)` with a
sequential integer square root (`isqrt_seq`).

### Coordinates (`polar2cart`)

The screen shows one pixel per centimetre, with the array at the screen
centre (512, 384):

    x = 512 + (r·cos θ) >>> 9,    y = 384 − (r·sin θ) >> 9

Both are saturated to the screen. Each result is stored into the 10-entry
object buffer that the display reads.

## Display and sound (`ui_top`)

`xvga_timing` produces 1024x768 at 60 Hz: 1344 x 806 totals and negative
syncs. Every layer is pipelined so that all pixels arrive together, 4 clocks
after `hcount/vcount`. The syncs are delayed by the same 4 clocks.

- **Grid** (`sonar_grid`). A 512x384 one-bit bitmap of the top-left
  quarter, mirrored into the other three quarters. It is drawn in sea green.
  The bitmap is loaded through `grid_we/waddr/wdata`.
- **Sweep** (`sweeper`, `atan_lut`). A 30° pie inside a 342-pixel radius
  that advances `rspeed` degrees every 2^19 clocks. Each pixel's angle
  comes from a 512x384 inverse-tangent table with the same quarter folding.
  That table is computed at elaboration time; it is not a data file.
- **Blending** (`alpha_blend`). Inside the pie, sweep and grid are mixed by
  the pixel's angular distance from the leading edge, so the sweep fades
  out behind itself.
- **Objects** (`object_rep`, 10 copies). A disc whose squared radius
  pulsates between 16 and 49 (a radius of 4 to 7 px). A six-state
  grow/hold/shrink machine drives it, one step per 2^22 clocks. It is green when far, yellow within 220 px
  and red within 110 px of the centre. A red object raises `warn`.
- **Menu** (`gui_menu`). Three stacked items at the right edge: calibration,
  hide menu and hide all. A left click selects an item; a right click
  returns to normal. Calibration mode shows only the grid and the menu.
- **Sound**:
  - when an object pixel and a sweep pixel coincide, `siren_gen` plays a
    540 Hz tone for 150 half periods;
  - while any object warns, `alarm_gen` alternates 400 Hz and 700 Hz, each
    for 300 half periods, and takes over the speaker.
- **Text values** (`distance_calc`, `speed_est`, `bin2ascii`).
  - distance: once per frame, object 0's distance from the centre is
    computed with an integer square root;
  - speed: the mean absolute change of that distance over the last 10
    samples (three samples a second);
  - both come out as three ASCII digits (`dist_ascii`, `speed_ascii`) for a
    character generator.

## What is not built, and departures

- **Analog and external parts are not built**: the transducer arrays, the
  transmit amplifier, the analog half of each delta-sigma converter, the
  PS/2 mouse controller, the audio codec and the character-string
  generator. The top brings their signals out as plain ports:
  - `adc_in/adc_out`;
  - `pulse_out`;
  - `mx`, `my`, `left_click` and `right_click`;
  - `sound` as a 1-bit square wave;
  - the ASCII outputs.

  The test benches contain a behavioural model of the analog front end
  (`tb/ds_frontend_model.sv`).
- **No text is drawn.** That covers the menu labels, the calibration
  prompt and the distance, speed and angle strings. The values exist only
  as ASCII codes.
- **Two tables are loaded, not built in.** The bearing-correction table is
  a RAM loaded through `cal_we/cal_waddr/cal_wdata`; it resets to zero,
  which means no correction. The grid bitmap is also a RAM and starts
  empty. Neither table's contents are published, and both came from
  measurements or an external generator.
- **Choices made where the description leaves a gap:**
  - the delta-sigma reconstruction constants;
  - the synchroniser depth;
  - the threshold divider, which is sequential rather than a vendor core;
  - the sound frequencies;
  - the menu's item height and colours;
  - the speed sample rate;
  - the 1023 − x form of the grid mirror, which keeps the mirrored address
    inside the stored quarter.

  Each module's header comment names its own choices.
- **No missed-channel or false-alarm handling.** The package detector
  waits for all twelve channels. The original design also marks channels
  as missed when 10 or more have a package and the rest have not risen,
  and drops lone detections on 2 or fewer channels as false alarms. That
  option was described as unused in the original system and is not built
  here. If a channel never sees an echo, that object is lost for the frame.
- **The sweep angle increases.** The sweep's bounds grow with time and wrap
  at 360°, following the written description of the rotation.
- **Exact divider period.** The divider periods are exactly 64 and
  2,160,000 clocks.

## Parameters

All defaults are the published numbers. The top's parameters exist so that
test benches can shorten long periods:

| parameter | default | meaning |
|---|---|---|
| `NUM_CH` | 12 | receiver channels |
| `NUM_OBJ` | 10 | objects per frame |
| `AW` | 15 | echo buffer address bits (32768 rows) |
| `MHZ_DIV` | 64 | clocks per sample row |
| `FRAME_DIV` | 2,160,000 | clocks per frame (30 Hz) |
| `OBJ_STEP` | 2^22 | object pulsation step, clocks |
| `SWEEP_STEP` | 2^19 | sweep step, clocks |
| `SIREN_HALF` | 60000 | siren half period (540 Hz) |
| `ALARM_HALF_A/B` | 81000 / 46286 | alarm half periods (400 / 700 Hz) |
| `SPEED_SAMPLE` | 21,600,000 | speed sample period (1/3 s) |

The buffer holds 32768 µs of echo. At 343 m/s that is a round trip of
11.2 m, so it reaches objects up to about 5.6 m away. The display's 342-px
sweep radius shows objects up to 3.4 m.

## Simulating

Every block has a self-checking bench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. To run
one with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/sonar_pkg.sv \
          tb/tb_sonar_top.sv --top-module tb_sonar_top -Mdir obj_dir -o sim
./obj_dir/sim
```

Helpers in `tb/`:
- `tb_util.svh`: check counters and macros;
- `ds_frontend_model.sv`: a real-valued integrator and comparator that
  closes each delta-sigma loop;
- `echo_source.sv`: twelve of those models, plus a 40 kHz echo injected a
  fixed time after every ping, skewed per channel;
- `filt_models.svh`: reference filter models.

The two system benches:
- **`tb_sonar_top`** runs the complete system. Acquisition and processing
  run at full rate; only the display and sound periods are shortened.
  Over about 20 M clocks it goes through three frames:
  - a near echo is found at about 52 px, drawn red and raises the alarm;
  - calibration is selected with the mouse, and the next frame learns `b`;
  - back in normal mode, the same echo appears green at 300 px, and the
    sweep crossing it starts the siren.

  It also checks the trigger and buffer timing to the clock, and counts
  that every mechanism happened: ping, detections, buffer full, analysis
  done, object found and drawn, grid, sweep step, calibration, alarm,
  siren, mode change, syncs and distance text.
- **`tb_sonar_full`** runs the same sequence with every parameter at its
  default. The siren is left out because one sweep revolution takes
  about 3 s.

Either bench takes well under a minute. The acquisition benches use
randomised noise from `$urandom`.

## Files

`rtl/` holds one module per file, plus:
- `sonar_pkg.sv`;
- `udiv_seq.sv`, a restoring divider;
- `isqrt_seq.sv`, a bit-serial square root.

Each file begins with a description of what it does, its interface and
timing, and which parts follow the published design and which are local
choices.
