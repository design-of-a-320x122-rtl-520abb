# Imaging radiometer with automatic integration-time control

This is synthesizable SystemVerilog for the digital part of an infrared camera used as a radiometer. The camera measures wafer temperatures from about 50 to 1000 °C. The detector is a 320 × 244 PtSi Schottky-barrier CCD, read non-interlaced as 320 × 122 pixels. One fixed exposure cannot cover that range of scene brightness. The camera therefore changes its optical integration time, frame by frame, over twelve steps from about 120 µs to about 130 ms. Each frame is classified by counting over-bright and over-dark pixels, and the exposure then steps up or down by one code.

Exposures shorter than a frame use a **dump-and-read** sequence on the CCD. Longer ones let charge build up over several frames. The integration time and a frame count are written into the video itself, so every stored frame can be interpreted later. A display path turns the variable-rate processed video into a steady 30 frame/s RS-170 picture.

The RTL covers:
- the camera head timing and line sequencer;
- the CCD clock generator;
- the video processor;
- the interface board towards the Datacube image processor;
- the Datacube display board.

The analog chain, the detector, the A/D converter chip and the Datacube itself are outside it. Their signals are ports of the top module `radiometer_top`.

## Signal flow

```
 ┌──────────── camera head ─────────────┐   ┌──────── video processor ─────────┐
 video_timing ─► integration_sequencer ─► ccd_clock_gen ─► B, C phases, TG (to CCD)
      │ HA, HSYNC, LOCK       │ VA, exposure code
      ▼                       ▼
 adc_interface / pattern_sim ─► pixel_compare ─► pixel_counter ─► inttime_control ─┐
                 │                                                 ▲ rotary_encoder│
                 │                          frame_counter          │ seg_display   │
                 ▼                               ▼                                  │
            smart_frame ◄──────── frame count, code ◄──────────────────────────────┘
                 │                                        (code back to the sequencer)
                 ▼
          dc_input_board ──► towards the Datacube (dc_bus)
                 │ LOCK
                 ▼
          display_board: roi_sync_select → async_fifo → scan_converter
                                                   (frame_memory A/B, display_sync_gen)
                 ◄── P4 syncs, P5 data coming back from the Datacube
```

There are three clocks:
- `clk` is the pixel clock, half of the camera's 12 MHz CLOCK.
- `clk_sam` is four times `clk` and runs the CCD clock generator.
- `dc_clk` is the Datacube's 10 MHz dot clock. It has no relation to `clk`.

Reset is synchronous and active high.

## Frame geometry and the exposure period

A line has 389 pixel clocks: 320 active and 69 blanking, which is 63.5 µs. HA is high over the active pixels. HSYNC is low for 29 pixels starting 10 pixels into blanking. LOCK is a single low pixel once every 525 lines, just after the VA rising edge. LOCK always runs at 30 Hz, whatever the exposure.

`integration_sequencer` divides time into **exposure periods**. A period starts with a TRANSFER line, which moves the detector charge into the CCD. The 122 readout lines under VA follow. The code is sampled only at the start of a period, so a running period is never cut short.

| Code | Exposure (lines) | Time | Period | Rate | Dump |
|---|---|---|---|---|---|
| 0–6 | 2, 4, 8, 16, 32, 64, 128 | 127 µs – 8.1 ms | 262/263 lines, alternating | 60/s | yes |
| 7 | 256 | 16 ms | 525 | 30/s | yes |
| 8 | 394 | 25 ms | 525 | 30/s | yes |
| 9 | 525 | 33 ms | 525 | 30/s | no |
| 10 | 1050 | 67 ms | 1050 | 15/s | no |
| 11 | 2100 | 133 ms | 2100 | 7.5/s | no |

Codes 12–15 act as 11.

### Dump and read (codes 0–8)

A pixel collects charge from the moment it was last emptied. For an exposure of N lines, the sequencer places a DUMP line N lines before the next TRANSFER. The DUMP line pulses the transfer gate, which empties the detectors into the vertical (B) registers, and starts a fast sweep of that unwanted charge. Up to four SWEEP lines follow (N−1 of them when N is smaller than 5). During these lines the B and C registers are clocked at full speed to clear the charge out through the output. The charge collected after the dump is the exposure.

### Long exposures (codes 9–11)

There is no dump. The detector integrates for one, two or four frames between transfers, and the frame rate drops to match.

### Mode pins

The three mode pins TRANS, DUMP and SWEEP are one-hot, or all low for READOUT. They change at the start of blanking, so they are stable while HSYNC is low, which is where the clock generator looks at them. An assertion checks that a DUMP line never falls inside the readout.

## CCD clock generation (`ccd_clock_gen`)

This block replaces a programmable sequencer chip. It runs on `clk_sam` (four ticks per pixel) and produces:
- four-phase B clocks for the vertical registers;
- four-phase C clocks for the horizontal register;
- the transfer gate pulse TG.

Each four-phase clock steps through the patterns 0011, 0110, 1100, 1001.

At high speed, the B phases advance every 8 ticks. One transfer therefore takes 32 ticks, which is about 766 k transfers/s.

The mode for a line is latched at the rising edge of HA (after a two-flop synchronizer). The four modes behave as follows:

| Mode | B clocks | TG | C clocks |
|---|---|---|---|
| READOUT | one transfer in horizontal blanking | none | one step per pixel for 320 pixels plus 8 overscan pixels |
| TRANSFER | 31 fast clears | then a 10 µs pulse (245 ticks) | running the whole line |
| DUMP | run fast after the pulse | 10 µs pulse at the start of the line | running the whole line |
| SWEEP | fast the whole line | none | fast the whole line |

## Video processor

### Bus
The processor bus `video_bus_t` carries a 12-bit pixel together with VA, HA, HSYNC and LOCK. It is a packed struct defined in `radiometer_pkg`.

### Sources
`adc_interface` latches the converter word and inverts its MSB, which turns offset binary into straight binary.

`pattern_sim` stands in for the A/D board and gives two test images:
- a ramp: an 8-bit counter that counts pixels, cleared at each line, placed in the top 8 bits, with the low nibble 0;
- bars: an 8-bit counter that counts active lines, with the low nibble 1111b.

### Pixel classification
`pixel_compare` classifies each pixel, using two 8-bit switch settings:
- **White**: bits D11..D4 are greater than the white setting.
- **Black**: D11 is 0 and the black setting is greater than bits D10..D3. Black therefore only covers the lower half of the range, at twice the resolution.

### Frame totals
`pixel_counter` counts white and black pixels over each frame, in 16-bit counters.

When VA falls, it compares the top byte of each total with an 8-bit threshold:
- white total above its threshold gives TOOLITE;
- black total above its threshold gives TOODARK.

It then pulses `decide`.

### Exposure control loop
`inttime_control` is the up/down counter of the automatic loop:
- On `decide` it counts up if only TOODARK is set, and down if only TOOLITE is set.
- If both flags or neither are set, it holds.
- It stops at 0 and 11.

The loop moves one code per exposure period, so a long climb through the slow codes takes several seconds of camera time.

A front-panel switch selects automatic or manual mode:
- In manual mode the code comes from an eleven-position rotary switch (`rotary_encoder`): position *i* gives code *i*, and no position gives code 0.
- The automatic counter keeps following the scene in manual mode. Switching back to automatic therefore resumes from where the scene is.

`seg_display` drives two seven-segment digits showing the code.

### Frame counter
`frame_counter` starts on an experiment START pulse (synchronized). It then counts frames (VA rising edges) in 16 bits. At 60 frames/s that is 18 minutes of unique time stamps; at 7.5 frames/s it is 2 h 25 min.

### Smart Frame
`smart_frame` replaces the third active line of every frame (line index 2) with an information pattern. The pattern repeats four words 80 times across the line:

| Word | Content |
|---|---|
| 0 | frame count bits 15..8, with the code in the low nibble |
| 1 | frame count bits 7..0, with the code in the low nibble |
| 2 | FFFh |
| 3 | 000h |

The FFF/000 pair gives software an unmistakable marker.

The code written is the one that *exposed* the frame being read, which is the code of the previous period, not the code currently running. The frame count is sampled at the first pixel of the frame.

## Datacube input board (`dc_input_board`)

Normally the board latches the camera bus for one clock and passes it on.

In test mode it sends a test pattern instead. The pattern comes from its own timing generator, which has the same geometry as the camera, and shows a grid:
- columns 1, 160 and 320 and lines 1, 61, 62 and 122 are C00h (the two MSBs set);
- every other pixel is 0.

## Display board: from any frame rate to 30 frames/s

This is the least obvious part of the design.

The processed image comes back from the Datacube on the 10 MHz dot clock:
- 8-bit data on P5;
- four pairs of HSYNC/VSYNC signals on P4, one pair per region of interest.

The monitor, however, needs 30 frames/s RS-170 with 488 active lines, locked to the camera. The board does this in three stages.

1. **Input window (dot clock).** `roi_sync_select` latches the four sync pairs and picks the pair chosen by two jumpers. After that pair's VSYNC, each of the next 122 HSYNC falling edges opens a window of 320 pixels, starting 4 dot clocks after the edge. The pixels go into `async_fifo`, which holds 512 words of 9 bits and uses Gray-code pointers. The first pixel of the frame is tagged with bit 8. A write into a full FIFO is dropped and sets a sticky `overflow` flag. A 320-pixel line arrives at 10 MHz and leaves at about 6 MHz, so at most about 125 words build up per line.

2. **Ping-pong frame store (pixel clock).** `scan_converter` drains the FIFO as fast as it can into the *back* one of two `frame_memory` arrays (A and B, 39040 × 8 each). The tagged word restarts the write address. The memories swap roles only at the start of a display frame, and only if the back memory holds a complete frame. Otherwise the front frame is shown again and `repeat_frame` pulses. This is how 15 and 7.5 frames/s display without flicker. A finished frame waiting in the back memory is kept until the swap, and frames that arrive in the meantime are dropped. This matters when the Datacube runs at almost the display rate: without it, the next frame would always be half-written at the moment of the swap. At the same rate the worst case is that every other frame is shown.

3. **4X scan conversion.** `display_sync_gen` is an RS-170 generator:
   - 525 lines, in fields of 263 and 262 lines;
   - 244 active lines per field, from field line 10;
   - a 3-line VSYNC.

   Each LOCK pulse sets its counters to the camera's position, so it never drifts from the camera. Each field reads source line `act_line / 2`, so every source line fills two lines of each field and four lines of the frame. The output goes to a video DAC as 8-bit data, blanking and composite sync (HSYNC AND VSYNC), one clock behind the sync generator.

## Departures from the source description, and choices made here

- **Exposure times.** The shortest four times, 120–960 µs, are rounded to 2, 4, 8 and 16 whole lines. Code 11 is four frames (133 ms) to match its stated 7.5 frames/s, although its nominal time is listed as 122 ms.
- **Black qualification.** Black pixels must also have D11 = 0.
- **Smart Frame.** The line is the third active line. The source's counter stops at count 2, but its text names both "line two" and "line three". The words cycle every four pixels.
- **Simulator bars.** One bar step per line, as the counter description gives, rather than a fixed count of wide bars.
- **Transfer pulse.** The 10 µs length is used for the DUMP pulse too. A millisecond-scale value would not fit in a line.
- **Scan conversion.** The original board shows each new line straight from the FIFO and repeats it from memory on the next line. Here every displayed line is read from the front memory, which gives the same picture with one read path. The start-of-frame tag, the input window offset and the swap/drop rule are this design's own.
- **Frame start on the display board.** The original board also takes VA from the camera bus to know when a new frame arrives. Here the start of a frame is taken from the selected VSYNC and carried through the FIFO as a tag bit.
- **Clocks.** The Datacube input board runs on the camera pixel clock instead of its own crystal.
- **Not built.**
  - Analog parts: detector, bias, analog and preprocessing boards, converter chip, DAC.
  - Line drivers and optical isolators.
  - The dot-clock restoring circuit.
  - The Datacube modules.

Their digital signals are top-level ports.

## Files

`rtl/` holds one module per file. The shared constants, types and the integration-time table functions are in `rtl/radiometer_pkg.sv`. The top is `rtl/radiometer_top.sv`. Every parameter default is the full-size value.

`tb/` holds one self-checking testbench per module. Each prints `TB_RESULT checks=N failures=M`.

`tb/tb_radiometer_top.sv` runs the whole design at full size, with no parameter overrides. It uses a scene/ADC model and a Datacube output model, and walks through:
- manual selection;
- both simulator patterns;
- the test grid;
- the automatic loop settling, climbing to code 11 and falling to code 0;
- the frame counter and Smart Frame line;
- display swaps and repeats;
- a FIFO overflow.

It checks:
- every exposure period's length, dump position, sweep count and transfer pulses;
- every frame's pixel totals and flags, recounted independently;
- the direction of every automatic code step;
- every displayed pixel.

It takes about 45 s with Verilator and runs every one of the twelve codes through at least one full period.

To simulate one testbench:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_radiometer_top \
  -y rtl -y tb +libext+.sv rtl/radiometer_pkg.sv tb/tb_radiometer_top.sv
./obj_dir/Vtb_radiometer_top
```

Replace the top-module and file names to run any other testbench.
