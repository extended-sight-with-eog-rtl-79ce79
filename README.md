# EOG-controlled viewer

An electro-oculogram (EOG) measures the small voltage the eye makes as it turns: the eyeball is
an electric dipole, so electrodes placed left/right and above/below the eyes see a potential that
follows the gaze and jumps when the lids close. This RTL turns two such electrode signals into a
gaze state (Left, Right, Up, Down, Closed, Forward) and uses it to steer a 1024x768 VGA display:
a cartoon of the wearer's eyes, a scrollable panorama, or a live camera picture that pans with
the gaze and can drive a servo to turn the camera. A long eye closure opens a menu, and a gaze
held on a menu button for about a second picks the display.

The design follows an FPGA project proposal for a Nexys 4 board (Artix-7, on-chip XADC,
100 MHz oscillator). The block structure, clock rates, sample rates, memory sizes and the
behaviour of each block come from that proposal. Most numerical details (filter coefficients,
cutoffs, pulse widths, screen layout) were not given there. They are choices of this RTL, listed
below and in each file's header comment.

## Signal path

```
            104 MHz domain                                   65 MHz domain
 XADC ──► adc_sampler ──► eog_filter ──► feature_detect ──► eye_state_sync ──► eye_state
 (3 ch,     16:1, 8 MSB     LP, HP,        1 s delay line,                       │
  ~1 MS/s)  62.5 kS/s       notch, gain    blink removal                         ▼
                                                             xvga ──► hcount/vcount, syncs
                                                              │
                                  ┌─────────────┬─────────────┼─────────────┐
                               data_vis   virtual_world   real_world       menu ──► module_state
                                  │dpixel       │vpixel       │rpixel       │mpixel     │
                                  └─────────────┴──────► pixel_mux ◄────────┴───────────┘
                                                             │
                                                          monitor
 camera ──► camera_proc ──► frame_buffer (640x480x12) ──► real_world ──motor_on──► motor_control ──► servo
```

`eog_top` wires all of this. The clocks are inputs (`clk_104`, `clk_65`). On the board they come
from a PLL, which is not part of this RTL. `arst` is an asynchronous active-high reset that
`reset_sync` releases separately in each domain.

## The eye state word

Everything after the feature detector talks in one 6-bit one-hot word (`eog_pkg::eye_state_t`):

| bit | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|
| state | Left | Right | Up | Down | Closed | Forward |

Bits [5:4] are the left/right pair that the servo controller reads directly. The display mode
(`module_state_t`) is 0 = menu, 1 = eye view, 2 = virtual world, 3 = camera view.

## From electrodes to samples

The amplified electrode signals, plus the electrode ground, are converted by the FPGA's XADC.
That converter is outside this RTL; its conversions arrive on `xadc_valid/xadc_chan/xadc_data`
(12-bit two's complement, channel 0 = ground, 1 = left/right, 2 = up/down). `adc_sampler` keeps
one complete set in 16, which takes about 1 MS/s down to 62.5 kS/s, and keeps the top 8 bits of
each channel. A set counts as complete when its up/down conversion arrives.

## Filtering (`eog_filter`, `fir32`)

Each channel is first referenced to ground (channel minus ground, saturated). It then passes
through four stages in the order the proposal gives: low-pass, high-pass, notch and amplifier.

* **Low-pass**: 32-tap FIR over a 32 x 8-bit sample array (`fir32`), by default a moving average.
* **High-pass**: not a FIR. At 62.5 kS/s a 32-tap filter cannot have a corner below a few kHz,
  and the gaze information of an EOG is almost DC: a held gaze is a constant offset. A 32-tap
  high-pass would erase it. The stage instead removes slow electrode drift:
  `y = x − b; b += (x − b)/2^HPF_SHIFT`, with a time constant of 2^17 samples (about 2.1 s).
  A consequence you will see in simulation: after a gaze held for much longer than a second,
  returning to the centre briefly reads as a gaze the other way.
* **Notch**: `(x[n] + x[n−31])/2`, which has nulls at odd multiples of about 1 kHz. A mains
  (50/60 Hz) notch would need several hundred taps at this sample rate. The coefficients are a
  parameter.
* **Gain**: ×`GAIN` (2), saturated to 8 bits.

`fir32` has a single multiplier and works through the taps one per clock. A sample goes through
the whole chain in 68 cycles, against 1664 cycles between samples at 104 MHz.

## Feature detection: one second of look-ahead (`feature_detect`)

This is the least obvious block. The problem it solves: a blink (about 1/3 s) looks exactly like
deliberately closed eyes until it ends, and closing the eyes is the command that opens the menu.
The block therefore reports every sample late, by 2^16 samples (1.05 s). When a sample leaves
the delay line, the block already knows how long the closure it belongs to lasted.

* **Delay line.** Two 8-bit x 64k memories (left/right and up/down) form a circular buffer. Each
  new sample is written over the oldest one, which is read out in the same cycle.
* **Classification.** A sample is classified by fixed cutoffs, in this priority:
  up/down > `TH_CLOSED` (90) → Closed; > `TH_V` → Up; < −`TH_V` → Down;
  left/right < −`TH_H` → Left; > `TH_H` → Right; otherwise Forward. Taking a large positive
  vertical swing as closed eyes is this design's assumption.
* **Finding long closures.** The newest samples are classified as they arrive, and a counter
  measures the current run of Closed samples. When a run reaches `LONG_CLOSE` samples (0.5 s),
  the sample numbers of its first and latest samples are pushed onto a small queue (4 entries).
  The queue entry's end number keeps moving forward while the run continues.
* **Output.** A delayed Closed sample whose number lies inside the oldest queued interval is
  reported as Closed. Any other delayed Closed sample belongs to a blink and is replaced by the
  state reported just before it. Non-closed samples are reported as classified. Intervals are
  popped once the delayed stream has passed their end.

Before the delay line has been filled once, the output is Forward and `out_valid` stays low. The
queue holds intervals that start at least `LONG_CLOSE` samples apart, so 4 entries cover a 64k
window for any `LONG_CLOSE` above about 13,100 (the default is 31,250). Sample numbers are 32 bits, so a single closure
longer than 2^31 samples (about 9.5 hours) would be misjudged.

## Crossing into the graphics clock (`eye_state_sync`)

The 6-bit state cannot go through plain double flip-flops, because its bits could arrive in
different cycles. The source side holds the value in a register and flips a request bit. The
destination side synchronizes the request, captures the held value on the flip, and returns the
flip as an acknowledge. A new value is launched only after the acknowledge has returned. A value
that changes during a transfer is sent right after it, so the latest value always arrives. A
transfer takes about 4 destination cycles.

## The screens

`xvga` generates VESA 1024x768 @ 60 Hz timing from 65 MHz: 1344 clocks x 806 lines, active-low
syncs. Every pixel generator has the same 2-cycle pipeline from `(hcount, vcount)` to its pixel
(`PIXEL_LAT`). `pixel_mux` delays hsync/vsync/blank by the same 2 cycles, selects by
`module_state`, forces black during blanking and registers the result. The output pixel leaves 3
cycles after its position was generated.

* **Eye view (`data_vis`)**: two white circles (radius 120) with pupils (radius 40) shifted 60 px
  toward the gaze; closed eyes are drawn as lids with no pupils. Stage 1 computes distances to the
  centres, stage 2 squares and compares them.
* **Virtual world (`virtual_world`)**: a 2048 x 1536 panorama (four screens' worth of pixels) in
  on-chip memory, loaded through `vw_load_*`. At the start of vertical blanking, a held
  Left/Right/Up/Down gaze moves the window by `STEP` (8) px, so the longer you look, the further
  it scrolls. Both directions wrap around. The proposal speaks both of "4x as tall and 4x as wide"
  and of "4 x 1024x768 pixels"; this RTL follows the pixel count.
* **Camera view (`real_world`)**: the 640x480 camera frame is shown enlarged 2x (1280x960). The
  1024x768 window moves by `STEP` per frame under gaze control, clamped to 0..256 horizontally
  and 0..192 vertically. Looking further left or right while already at that limit raises
  `motor_on`.
* **Menu (`menu`)**: three buttons, at the left, top and right of the screen. Looking Left, Up or
  Right highlights the eye view, virtual world or camera view button. Holding the gaze on a button
  for 1024 x ceil(`DWELL_CYCLES`/1024) cycles (about 1 s) selects it, and a bar fills as the
  dwell progresses. Looking away restarts the count. A Closed state in any other mode returns to
  the menu. The buttons are drawn, not read from stored full-screen menu pictures.

## Camera and servo

`camera_proc` brings the camera's pixel clock, href, vsync and data into the 65 MHz domain
through two flip-flops and acts on rising pixel-clock edges. The camera pixel clock must
therefore be at most 16.25 MHz. Pixels are two bytes of RGB444 (`xxxxRRRR`, `GGGGBBBB`). They are
written in order into `frame_buffer` (640 x 480 x 12 bits, simple dual port); vsync restarts the
address, and writes past the last pixel are dropped. `motor_control` sends a pulse every 20 ms:
1.3 ms for left, 1.7 ms for right (only while `motor_on`), and 1.5 ms (stop) otherwise. The width
is latched at the start of each period. Which pulse turns the camera which way depends on the
mounting.

## Not included

* The PLL, the XADC, the SD-card controller, and the analog and external parts (electrodes,
  instrumentation amplifier, camera, monitor, servo, SD card).
* Taking photos. The proposal's stretch goal has the camera view write pictures to an SD card;
  neither the trigger nor the data path is defined, so `real_world` has no write output. Its pixel
  stream is brought out of the top as `rpixel` for such a controller.
* The six-frame anti-tearing camera buffer (described as an ideal). There is one frame buffer,
  written while it is displayed.
* Sizes, from general knowledge of the part: the default virtual-world memory (37.7 Mbit) is
  larger than the block RAM of the Artix-7 100T (about 4.9 Mbit). The camera frame (3.7 Mbit)
  plus the delay memories (1 Mbit) would also nearly fill it. The RTL keeps the proposal's sizes
  as parameters; reduce `VW_W`/`VW_H` for a real build.

## Simulation

All files are SystemVerilog-2017; `rtl/eog_pkg.sv` must be read first. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -Irtl rtl/eog_pkg.sv tb/tb_eog_top.sv --top-module tb_eog_top
obj_dir/Vtb_eog_top
```

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_adc_sampler` | every 16th set comes out, one cycle after its up/down conversion |
| `tb_eog_filter` | bit-exact against a model of all four stages, latency under 1664 cycles |
| `tb_feature_detect` | 64-deep delay, blinks hidden, long closures reported, against a model of generated gaze segments |
| `tb_eye_state_sync` | no torn values across 104/65 MHz, latest value wins, latency |
| `tb_xvga` | two complete frames of timing |
| `tb_data_vis`, `tb_virtual_world`, `tb_real_world`, `tb_menu`, `tb_pixel_mux` | pixels against integer models, panning, wrap and clamp, `motor_on`, dwell timing |
| `tb_camera_proc` | a full frame plus an extra line, then a second frame |
| `tb_motor_control` | period and pulse width for each setting |
| `tb_eog_top` | whole design with a 256-sample delay line and short dwell: every mode selected, blink ignored, menu re-entered, panorama wrap, camera pan to the limit and servo pulse (about 30 s) |
| `tb_eog_top_full` | whole design at default sizes: 64k-sample fill, a left gaze, one-second dwell, then one frame checked pixel by pixel (about 2 min) |

The end-to-end benches feed XADC sets faster than real time: one set every 8 clocks instead of
every 104. During long held gazes they pause the input, which holds the eye state. This keeps the
drift remover from acting over simulated seconds. The top's parameters (`DEPTH_LOG2`,
`LONG_CLOSE`, `DWELL_CYCLES`, `PAN_STEP`, `VW_W`/`VW_H`, `HPF_SHIFT`, ...) shrink the design for
faster runs.

## How far to trust it

All blocks pass their benches against models written separately from the RTL, and the whole
design runs end to end at its default sizes. The models come from the same reading of the
proposal as the RTL, so they cannot catch a misreading of it. The numbers most worth revisiting
on real hardware are all guesses:

* the classification cutoffs (30/30/90 after a gain of 2);
* the 0.5 s blink limit;
* the drift remover's 2 s time constant;
* the notch position.

Two rules are also written as assertions in the RTL and fire in any simulation run with
assertions on: the crossing's held value stays still while a transfer is open
(`eye_state_sync`), and the close-interval queue never overflows or pops when empty
(`feature_detect`).

The clock-domain crossing and the camera sampling are built to be safe by construction, but
they were checked only in two-state simulation, not with timing analysis.
