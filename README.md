# HOC pattern projector and camera synchroniser

A structured light 3D camera projects a sequence of known stripe patterns
onto a scene, photographs each one, and recovers depth by matching projector
columns to camera pixels. Driving the projector from a PC graphics card is
slow: the PC has little control over when a frame actually reaches the
projector, so each pattern has to stay up long enough to be safe, and the
camera cannot be told precisely when to expose.

This RTL puts the projector link and the camera trigger in one FPGA clock
domain. It draws the patterns itself, pixel by pixel, straight into a VGA
video stream. It shows one pattern per video frame and pulses the camera's
trigger input as soon as each pattern frame has been sent. At 1024x768 and
60 Hz, a pattern takes 16.66 ms. A full scan of 18 frames takes 0.30 s, so
the camera makes 3.3 scans per second. There is no frame memory: every
pattern is computed from four 1024-bit row registers.

The PC only sends a one-byte "start" or "stop" command over a serial line.
It then receives one camera image per trigger and knows which pattern each
image holds.

## The patterns: hierarchical orthogonal code

The patterns are vertical stripes, so every line of a frame is the same.
They come in four layers of four patterns each. In each layer the row is cut
into groups of four equal stripes. Pattern *p* of a layer (p = 0..3) lights
stripe *p* of every group and leaves the other three dark. So the four
patterns of a layer are mutually exclusive: at any column exactly one of them
is lit. Each layer divides the stripes of the layer above it by four:

| layer | stripe width (pixels) | group width | pattern p lights columns x with |
|-------|-----------------------|-------------|----------------------------------|
| 1     | 256                   | 1024        | (x / 256) mod 4 = p              |
| 2     | 64                    | 256         | (x / 64) mod 4 = p               |
| 3     | 16                    | 64          | (x / 16) mod 4 = p               |
| 4     | 4                     | 16          | (x / 4) mod 4 = p                |

Together the four layers give each 4-pixel column band a unique 4-digit
base-4 code. The decoder works down the hierarchy, and each layer refines the
boundaries found by the one above.

### How `hoc_pattern_gen` makes them without memory

Within a layer, pattern *p* is pattern 0 moved right by *p* stripe widths.
The block therefore keeps only:

* **R1..R4**: one 1024-bit register per layer, holding the row of pattern 0.
  The registers are loaded with constants at reset. Column 0 is the **top**
  bit, so a logical right shift (`>>`) moves the stripes to the right on
  screen, and the columns shifted in on the left are dark. Because the rows
  are periodic, a zero-filled shift gives exactly the shifted pattern.
* **Sixteen shifted copies**: `R_L >> (p * stripe_L)`, which are 0/256/512/768
  for layer 1, 0/64/128/192 for layer 2, 0/16/32/48 for layer 3 and 0/4/8/12
  for layer 4. A multiplexer selects one by `layer` and `pattern`. Every shift
  amount is a constant, so each copy is only wiring.
* **Rb**: the 1024-bit line register. While `hcount` is in horizontal
  blanking (`hcount >= 1024`), Rb is reloaded from the multiplexer on every
  clock. During active video it shifts left by one bit per pixel clock, and
  the output `pixel` is its top bit. `pixel` therefore belongs to column
  `hcount` in the same clock cycle. There is no latency to compensate.

The selection must stay steady from the start of horizontal blanking before a
line until the end of that line. `frame_counter` ensures this for every
line, including the first line of a frame (see below).

Two departures from the original description are worth knowing:

* The original block diagram lists shifts of 8, 12 and 16 for layer 4. That
  contradicts the 4-pixel stripe that the text and the pattern drawing give
  for layer 4, so this design uses 4, 8 and 12. A 16-pixel shift would
  repeat pattern 0.
* The drawing shows the first stripe of each layer lit. This design
  assumes the same. Swap the comparison in the `first_row` generate loop if
  your decoder expects the opposite.

## Video timing (`vga_controller`, `timing_counter`, `sync_gen`)

The horizontal counter counts pixel clocks. The vertical counter counts lines
and steps when the horizontal counter wraps. Each count goes to a
`sync_gen`, which places four regions in order: active, front porch, sync,
back porch. The sync is asserted from the end of the front porch until the
back porch begins. The original description says the pulse ends "at the end
of the back porch". Taken literally, that would stretch the pulse over the
back porch as well. This design follows standard VGA timing instead, where
the back porch comes after the pulse.

| quantity              | value                         | origin |
|-----------------------|-------------------------------|--------|
| active pixels per line | 1024                         | pattern width |
| clocks per line        | 1344 (20.67 us at 65 MHz)     | measured line period of the original system |
| lines per frame        | 806 (16.66 ms)                | measured frame period of the original system |
| active lines           | 768                           | standard 1024x768 60 Hz mode |
| H front / sync / back  | 24 / 136 / 160 clocks         | standard mode |
| V front / sync / back  | 3 / 6 / 29 lines              | standard mode |
| sync polarity          | both active low               | standard mode; parameters |
| pixel clock            | 65 MHz (15.38 ns)             | follows from 1344 clocks in 20670.72 ns |

The original work reports only the line and frame periods and the row width.
The rest is the standard 1024x768 60 Hz mode, which is the only common mode
that matches those periods. All values are parameters of `vga_controller`,
and their defaults are in `sl3d_pkg`.

## Scans and frame boundaries (`frame_counter`)

A scan is 18 frames:

| frame_idx | shows |
|-----------|-------|
| 0..15     | HOC layer `idx/4 + 1`, pattern `idx mod 4 + 1` |
| 16        | full white |
| 17        | full black |

The original system projects 18 patterns per scan, but only 16 of them are
HOC patterns. The content of the other two is this design's assumption: a
white and a black reference frame, as used to find shadows and to set
per-pixel thresholds. Scans repeat for as long as projection is enabled.

Everything changes at one instant per frame, the **frame boundary**. This is
the clock on which the counts are at the last active pixel (column 1023,
line 767). At that clock:

* `active` takes the current command level (enable or disable);
* if the frame that just ended was projected, `frame_idx` advances, wrapping
  after 17 with a one-clock `scan_done` pulse;
* if projection is just starting, `frame_idx` restarts at 0.

The boundary lies at the end of the active area, not at the end of the frame.
So the 38 blanking lines that follow already see the new selection, and the
Rb reload before line 0 picks up the right pattern. A command that arrives
in the middle of a frame never produces a partial frame. The first projected
frame is always layer 1, pattern 1.

## Camera trigger (`camera_trigger`)

At the frame boundary, if the frame that just ended was projected, the block
starts a pulse of `PULSE_CLKS` clocks. The default is one line, 20.7 us.
The trigger output is registered, so it rises on the same clock on which the
last active pixel appears on the video outputs. The result is exactly one
trigger per projected frame, 16.66 ms apart. Frames that carry no signal
produce no trigger. Gating the trigger by `active` is this design's choice;
without it, the camera would also fire while nothing is projected.

When the camera exposes relative to the projected image depends on the
projector's internal frame buffering and on the camera. Add delay on the
camera side if needed.

## Host commands (`uart_rx`, `command_decoder`)

The serial line is 8N1 at 115200 baud (`CLKS_PER_BIT = 564` at 65 MHz). It
passes through a two-flop synchroniser and each bit is sampled at its middle.
A frame with a low stop bit is dropped. The commands are single bytes,
defined in `sl3d_pkg`:

| byte          | effect |
|---------------|--------|
| `0x45` ('E')  | enable: scans start at the next frame boundary |
| `0x44` ('D')  | disable: after the current frame, RGB is black while the syncs keep running |
| anything else | ignored; pulses `bad_cmd` |

The protocol, the baud rate and the byte values are all this design's own.

## Output stage (`vga_interface`)

This stage chooses the colour and registers it together with HSync and
VSync, so all five signals change on the same edge, one clock after the
counts. The colour is three bits, one per channel: `111` for a lit pixel and
`000` otherwise. Outside the active area, and whenever projection is off,
the colour is `000`. An external video DAC, clocked by the same pixel
clock, turns these signals into the analog VGA levels.

## Top level (`sl3d_top`)

```
uart_rx_i -> uart_rx -> command_decoder --enable--> frame_counter --layer/pattern--> hoc_pattern_gen
                                                        ^     | active, kind           | pixel
            vga_controller --hcount/vcount--------------+     v                        v
                           --hsync/vsync/de--------------> vga_interface ------> vga_hsync/vsync/rgb
                           --hcount/vcount--> camera_trigger (enable = active) --> cam_trigger
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | pixel clock, 65 MHz (from the board's PLL, not part of this RTL) |
| `rst_n` | in | 1 | synchronous reset, active low |
| `uart_rx_i` | in | 1 | serial commands from the PC |
| `vga_hsync`, `vga_vsync` | out | 1 | to the video DAC / projector |
| `vga_rgb` | out | 3 | to the video DAC |
| `cam_trigger` | out | 1 | camera trigger, active high |
| `proj_active` | out | 1 | status: a pattern is on screen this frame |
| `frame_idx` | out | 5 | status: frame of the scan (0..17) |
| `scan_done` | out | 1 | status: one-clock pulse at the end of each scan |
| `bad_cmd` | out | 1 | status: unknown command byte received |

Shared constants and the `frame_kind_e` type are in `rtl/sl3d_pkg.sv`.
Each file begins with a comment that gives its interface and timing. After
synthesis the design has about 1100 flip-flops, 1024 of them in Rb. The R1..R4
registers reduce to constants.

Not part of this RTL: the PLL that makes the pixel clock, the video DAC, the
projector, the camera, and the PC software (frame grabbing, decoding,
triangulation).

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block's outputs with values worked out independently in the bench, and ends
with a `TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|-----------|----------------|
| `timing_counter_tb` | count and wrap against a reference, random enable |
| `sync_gen_tb` | every count of a small timing, both polarities |
| `vga_controller_tb` | two full frames at the default timing: every count, 20670.72 ns line period, 16660600.32 ns frame period, sync widths, 1024x768 active pixels |
| `hoc_pattern_gen_tb` | every pixel of all 16 patterns on the 1024-pixel row, plus random selections |
| `frame_counter_tb` | scan order, reference frames, restart on enable, wrap, no change inside a frame |
| `camera_trigger_tb` | pulse position and width, no pulse after disabled frames |
| `uart_rx_tb` | random bytes, a framing error, a glitch, valid latency |
| `command_decoder_tb` | random command stream |
| `vga_interface_tb` | colour selection and blanking, sync pass-through |
| `sl3d_top_tb` | the whole design at its default size (see below) |

`sl3d_top_tb` runs the unmodified top for 21 frames, about 23 million clocks.
In frame 0 the host sends an unknown byte and then the enable command. Frames
1 to 19 then show a complete scan followed by the first pattern of the next
scan. The disable command is sent during frame 19, so frame 20 is dark. On
every clock the bench compares every output bit with a model of the raster.
It also checks the 16.66 ms spacing of the triggers and the 299.89 ms length
of an 18-frame scan. It counts each mechanism: every pattern, both reference
frames, enable, disable, the unknown command, the scan wrap, the triggers
and the dark frames. The run takes under a minute.

To run a bench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -Irtl \
    rtl/sl3d_pkg.sv tb/sl3d_top_tb.sv --top-module sl3d_top_tb -o sim
./obj_dir/sim
```

Replace the testbench file and the top module name to run another bench. The
benches give each signal a defined value and do not depend on four-state
simulation. `--assert` enables the concurrent assertions in the RTL:
the timing counters stay in range, the frame selection changes only at a
frame boundary, and the receiver's `valid` lasts exactly one clock.

## Changing it

* **Another video mode:** change the timing constants in `sl3d_pkg` (or
  override the `vga_controller` parameters) and the pixel clock. The pattern
  row (`ROW_PIXELS`) should equal the active width. Stripe widths scale as
  `ROW / 4^L`, so the row must be a multiple of 256.
* **Another scan:** `SCAN_FRAMES` and the `kind` decode in `frame_counter`
  set what follows the 16 HOC frames. `frame_counter` assumes at least 16
  frames.
* **Trigger timing:** `PULSE_CLKS`, or move the `frame_done` comparison in
  `camera_trigger`, to change when the trigger fires and how long it lasts.
* **Baud rate:** set `CLKS_PER_BIT` on `sl3d_top`.
