# FPGA read-out for a tactile sensing textile

A pressure-sensitive textile is woven from two sets of conductive wires, crossed
at right angles, with a piezoresistive layer between them. Each crossing is a
resistor whose value falls when it is pressed. This RTL scans a 16 x 16 grid of
such crossings through two analog multiplexers and a serial ADC, thousands of
times a second. It cleans up each frame and runs a 3x3 image filter over it.
It finds the centre of pressure and notices when a touch slides across the
fabric. The result is drawn as a live heat map on a 1024x768 VGA screen and is
also streamed to a host over a UART.

The design targets a Xilinx Artix-7 board with a 65 MHz pixel clock, an
AD7476A-class 12-bit SPI ADC and CD74HC4067-class 16:1 analog multiplexers.
Everything on the FPGA side is here, in synthesizable SystemVerilog. The clock
generator, the ADC, the multiplexers and the analog front end are outside it.

## The three parts at a glance

```
 ADC clock domain (65 MHz / ADC_CLK_DIVIDE)         65 MHz pixel-clock domain
 ------------------------------------------        --------------------------------------------------
 adc_clk_divider -> adc_sclk                        frame_scanner -> noise_filter -> convolution
 pulse_gen -> wire_counter x2 -> sw_sel, rd_sel           |               ^              |
 adc_reader  <- adc_sdata, -> adc_cs_n                    |         threshold_input      +--> conv RAM (VGA copy)
      |                                                   |         seven_seg            +--> conv RAM (UART copy)
      +--> raw frame RAM (write port) ---- read port -----+                              +--> center_of_mass
                                                                                                   |
 vga_timing -> vga_scale -> conv RAM (VGA) -> heatmap -> vga_mux -> vga_r/g/b, hs, vs   <-- motion_tracker
 uart_streamer -> conv RAM (UART) -> uart_tx -> uart_txd
```

* **Acquisition** runs on the ADC clock. It steps the two multiplexers over
  every crossing, takes one ADC conversion per crossing and writes each 12-bit
  sample into the raw frame RAM.
* **Analysis** runs on the 65 MHz clock and handles one pixel per clock. It
  reads the raw RAM over and over in raster order, applies the user's
  thresholds, convolves, and writes the result into two identical RAMs. It also
  works out the centroid.
* **Visualization** also runs at 65 MHz. The VGA path reads one copy of the
  convolved frame and the UART path reads the other, so neither has to share a
  read port.

The only link between the two clock domains is the raw frame RAM, which has a
write clock and a read clock of its own. Analysis never waits for acquisition.
At the defaults it scans the whole RAM about 1,000 times per acquired frame, so
a frame shown on screen can mix two acquisitions for at most one frame time
(0.3 ms). The design accepts this instead of adding a handshake.

## Acquisition timing

This is the part whose timing has to be exactly right. `pulse_gen` and
`adc_reader` count the same period independently, so they must stay in step.

One conversion of the ADC takes `16 + ADC_TQUIET` clocks of the ADC clock
(20 at the defaults):

```
adc_sclk   _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_ ... _|‾|_|‾|_
adc_cs_n   ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_________________ ... _______|‾‾‾‾
            quiet (TQUIET)  | 0  0  0  0 D11 D10 ... D1 D0 |
rd_pulse                                                 _|‾|_      (last clock)
```

* `adc_clk_divider` divides 65 MHz by the integer `ADC_CLK_DIVIDE` (4, so
  16.25 MHz). The divided clock clocks the acquisition logic and also goes to
  the ADC as its serial clock.
* `adc_reader` holds chip select high for `ADC_TQUIET` clocks and then low for
  16. On the 16 rising edges of the low phase it samples `adc_sdata`. The first
  four bits must be the ADC's leading zeros. If one of them is 1 the word is
  dropped and `error` pulses; otherwise the 12 data bits (MSB first) come out
  with `valid`. The ADC is taken to present bit k after the k-th falling edge,
  so every rising edge sees a settled bit.
* `pulse_gen` counts the same 20-clock period and raises `rd_pulse` on its last
  clock. Every `RD_WIRE_CNT`-th pulse it also raises `sw_pulse`.
* Two `wire_counter`s (0 .. N-1, wrapping) advance on those pulses and drive the
  4-bit select lines of the switching and reading multiplexers. The wires
  change just as a conversion ends, so the multiplexers settle during the next
  quiet time.

The crossing that a sample belongs to is latched from the counters at the
pulse that ends its conversion. The sample is written to address
`switching_wire * RD_WIRE_CNT + reading_wire`. The acquisition domain comes out
of reset through a two-flip-flop synchronizer. The reader and the pulse generator then start
from the same edge, and stay together with no handshake between them.

A full frame takes `ADC_CLK_DIVIDE * (16 + ADC_TQUIET) * SW_WIRE_CNT *
RD_WIRE_CNT` clocks of 65 MHz: 20,480 clocks, or 3,174 frames per second, at
the defaults. The testbenches check this count exactly.

## Analysis pipeline

Five stages, all at 65 MHz, one pixel per clock. Each stage carries the
pixel's row and column along with it:

1. **`frame_scanner`** walks row/column counters through the frame and reads
   the raw RAM, which has a one-clock read latency.
2. **`noise_filter`** applies the thresholds. A value below the lower
   threshold becomes 0 (noise), and a value above the upper threshold is
   clipped to it.
3. **`convolution`, window.** A delay line of `2*RD_WIRE_CNT + 3` pixels serves
   as a three-row line buffer. Its taps `0..2`, `W..W+2` and `2W..2W+2` form the
   3x3 window around the pixel that entered `W+1` clocks earlier. Frames follow
   each other without a gap, so the window never needs flushing.
4. **`convolution`, products.** The nine window pixels are multiplied by the
   coefficients of the selected kernel.
5. **`convolution`, sum.** The products are added, scaled, made positive where
   the kernel needs it, and clamped to 0..4095.

The kernel is picked with `sw_kernel` (`kernel_e` in `tactile_pkg`):

| `sw_kernel` | kernel   | coefficients                        | after the sum            |
|-------------|----------|-------------------------------------|--------------------------|
| 0           | identity | centre 1                            |                          |
| 1           | Gaussian | `[1 2 1; 2 4 2; 1 2 1]`             | arithmetic shift right 4 |
| 2           | sharpen  | `[0 -1 0; -1 5 -1; 0 -1 0]`         | clamp                    |
| 3           | ridge    | `[-1 -1 -1; -1 8 -1; -1 -1 -1]`     | clamp                    |
| 4           | Sobel X  | `[-1 0 1; -2 0 2; -1 0 1]`          | absolute value, clamp    |
| 5           | Sobel Y  | `[-1 -2 -1; 0 0 0; 1 2 1]`          | absolute value, clamp    |

Pixels on the outer wires have no complete window, so they pass through
unchanged. The result goes with its coordinates to both convolution RAMs and
to `center_of_mass`.

## Thresholds and the seven-segment display

`threshold_input` holds the lower threshold (reset value 0x100) and the upper
threshold (0xFFF). Each is kept as three 4-bit nibble counters. `sw_upper`
picks the threshold to edit. Left and right move between nibbles, and up and
down step the selected nibble, wrapping within 0..F. Every button goes through
a `debounce` counter (`DEBOUNCE_CYCLES`, 10 ms) and acts once per press.

`seven_seg` multiplexes an eight-digit, active-low display with a digit period
of `REFRESH_CYCLES` (1 ms). The left four digits show the upper threshold and
the right four the lower one, each as `0xyz`. The decimal point marks the
nibble being edited.

The lower threshold is used in three places: the noise filter, the centroid
and the black-out overlay.

## Centroid and motion

`center_of_mass` watches the convolved stream. Each pixel at or above the lower
threshold adds its column and row to two sums and one to a count. At the last
pixel of a frame the sums are latched. Two bit-serial dividers then compute
`sum * 16 / count`, giving the centroid in cell units with four fraction bits.
This takes about 20 clocks, well within the next frame. Every pixel that
passes counts once, whatever its value, so this is the centre of the pressed
area, not a pressure-weighted mean.

`motion_tracker` uses the integer cell of each new centroid. When the centroid
enters a different cell, it marks that cell in a trail bitmap (one bit per
crossing), counts the move and restarts a timer. Three cells crossed without a
gap of `TIMEOUT_CYCLES` (0.5 s) raise `motion`. If the centroid stays put, or
no pixel passes, for that long, then `motion` drops, the trail is cleared and
counting starts again from the current cell.

## VGA picture

`vga_timing` produces standard 1024x768 at 60 Hz from the 65 MHz clock: 1344
clocks per line, 806 lines, both syncs active low. The picture is built in a
five-stage pipeline, and the sync pulses are delayed to match:

| stage | block            | work                                                                  |
|-------|------------------|-----------------------------------------------------------------------|
| t0    | `vga_timing`     | hcount, vcount, blank, syncs                                          |
| t1    | `vga_scale`      | in-area test, cell row/column, RAM address (column reversed if mirrored) |
| t2    | conv RAM (VGA)   | value of that cell                                                    |
| t3    | `heatmap`        | value to colour                                                       |
| t4    | `vga_mux`        | overlays, final colour                                                |

Each cell is a `CELL_PX` x `CELL_PX` square, 32 pixels by default. This gives a
512 x 512 picture centred on the screen (`X0 = 256`, `Y0 = 128`). The top works
out the placement from `CELL_PX` and the wire counts, and asserts that the
picture fits on the screen.

`heatmap` scales the value to an index 0..767 (`value * 3 / 16`) and splits it
into thirds. Red ramps up first, then green with red full, then blue with both
full. The scale therefore runs black, red, yellow, white.

`vga_mux` then applies, in order of priority:

* black outside the sensor area and in blanking;
* a magenta crosshair through the centroid, when `sw_cross` is on and a
  centroid exists;
* blue on the trail cells, when `sw_motion` is on and `motion` is high;
* black on cells below the lower threshold, when `sw_black` is on;
* otherwise the heat-map colour.

The board has a 12-bit VGA connector, so the outputs are the top four bits of
each 8-bit channel.

## UART stream

`uart_streamer` walks the UART copy of the convolution RAM in raster order, on
its own counters. For each cell it sends the top 8 bits of the 12-bit value
(`value[11:4]`). After the last cell it sends the frame marker
`NEWFRAME_VALUE` (0x00). A data byte that would equal the marker goes out as
`marker ^ 1`, so the host can always find frame boundaries. `uart_tx` sends 8N1
at `BAUD` (115,200; divider 564 at 65 MHz). One frame is 257 bytes, about
22 ms, so the stream samples roughly every 70th frame the scan produces.

## Top-level ports

| port                                     | meaning                                                      |
|------------------------------------------|--------------------------------------------------------------|
| `clk_65mhz`, `rst`                       | pixel clock from the board's clock generator; synchronous active-high reset |
| `adc_cs_n`, `adc_sclk`, `adc_sdata`      | SPI ADC                                                      |
| `sw_sel[3:0]`, `rd_sel[3:0]`             | select lines of the switching and reading multiplexers       |
| `btn_up/down/left/right`, `sw_upper`     | threshold editing                                            |
| `sw_kernel[2:0]`                         | convolution kernel                                           |
| `sw_mirror`, `sw_cross`, `sw_motion`, `sw_black` | mirror, crosshair, motion trail, black-out           |
| `seg_n[6:0]`, `dp_n`, `an_n[7:0]`        | seven-segment display (active low)                           |
| `vga_r/g/b[3:0]`, `vga_hs`, `vga_vs`     | VGA                                                          |
| `uart_txd`                               | serial stream                                                |

Parameters of `tactile_top`: `SW_WIRE_CNT`, `RD_WIRE_CNT` (16), `ADC_CLK_DIVIDE`
(4), `ADC_TQUIET` (4), `BAUD` (115200), `NEWFRAME_VALUE` (0), `TIMEOUT_CYCLES`
(32,500,000), `DEBOUNCE_CYCLES` (650,000), `REFRESH_CYCLES` (65,000) and
`CELL_PX` (32). The select-bus widths follow from the wire counts. A 61 x 157
sensor, for example, elaborates with 6 + 8 select lines and three 9,577-word
RAMs, and scans at 84.8 frames/s.

## Files

`rtl/`, one module per file:

| file                    | role                                                    |
|-------------------------|---------------------------------------------------------|
| `tactile_pkg.sv`        | pixel width, `kernel_e`, `rgb_t`                        |
| `tactile_top.sv`        | top level                                               |
| `adc_clk_divider.sv`, `pulse_gen.sv`, `wire_counter.sv`, `adc_reader.sv` | acquisition |
| `dual_clock_bram.sv`    | raw RAM and both convolution RAMs                       |
| `frame_scanner.sv`, `noise_filter.sv`, `convolution.sv` | analysis pipeline       |
| `seq_divider.sv`, `center_of_mass.sv`, `motion_tracker.sv` | centroid and motion  |
| `debounce.sv`, `threshold_input.sv`, `seven_seg.sv` | user controls and display   |
| `vga_timing.sv`, `vga_scale.sv`, `heatmap.sv`, `vga_mux.sv`, `pipe_delay.sv` | VGA |
| `uart_tx.sv`, `uart_streamer.sv` | UART                                           |

`tb/` has one self-checking testbench per block (`tb_<module>.sv`), three
whole-design tests, and `sensor_adc_model.sv`. The model is a behavioural
stand-in for the multiplexers, the sensor grid and the ADC: it holds a pressure
value for each crossing and answers on the SPI pins the way the real ADC does.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends; a failure
also prints a message. Each has a watchdog. Verilator 5 is enough:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tactile_pkg.sv tb/tb_convolution.sv --top-module tb_convolution -o sim
./obj_dir/sim
```

Swap in any other testbench name. `-y rtl -y tb` lets Verilator find the other
modules by file name. The package has to come first because the modules import
it. To start from random register contents, add `--x-assign unique
--x-initial unique` to the build and `+verilator+rand+reset+2
+verilator+seed+<n>` to the run line. The testbenches are written to pass that
way.

The three whole-design tests:

* **`tb_tactile_top`** (about 10 s) runs the default 16 x 16 design with a
  shorter timeout, debounce, display refresh and a faster baud rate. It checks:
  * editing a threshold with the buttons;
  * the raw RAM against the model, and the exact frame time;
  * that words with a bad leading zero are dropped;
  * the convolution RAM against a reference filter and convolution (identity
    and Sobel X);
  * the centroid;
  * a UART frame and its marker;
  * motion over three cells, and its timeout;
  * every visible pixel of a plain and a mirrored VGA frame against a reference
    model of the heat map and overlays.

  It counts how often each mechanism occurred (scans, ADC errors, zeroed and
  clipped pixels, centroids, motion on and off, markers), and a mechanism that
  never occurs is a failure. It looks at some internal signals through
  hierarchical names.
* **`tb_tactile_top_full`** (about 4 s) instantiates the top with every
  parameter at its default. It checks the scan time, the centroid of a pressed
  blob, the VGA frame and a complete UART frame at 115,200 baud.
* **`tb_tactile_top_large`** (about 11 s) runs a 61 x 157 sensor with
  `CELL_PX = 4` through scanning, centroid, VGA and UART.

## How far it can be trusted

* Every block passes its own testbench. In each, the expected values are
  computed independently of the RTL: reference convolution and filter, integer
  centroid arithmetic, a VGA pixel model, a UART receiver.
* For each block, a deliberately broken copy was shown to fail its testbench.
* All files pass Verilator lint and the slang front end of Yosys. The
  remaining lint warnings are unused bits, such as the low bits of the value
  dropped by the UART path.
* Not verified:
  * nothing has been run on hardware;
  * the ADC model follows the part's data-sheet framing, not a measured device;
  * no timing closure has been attempted.
* The ADC clock is a divided, registered clock. On an FPGA it should be
  declared as a generated clock, or put on a global buffer. The raw RAM is the
  only place where data crosses between the two clocks.
* Resources: three 256 x 12 RAMs (1.5 block RAM tiles of 36 Kb), nine
  multipliers in the convolution, and counters elsewhere. This is in line with
  the 1.5 tiles and 10 DSPs expected for this design.

## Departures and choices

These points follow the source design only in part, or are this design's own
choices:

* **ADC clock divider.** The divider is an integer, so the fastest legal scan
  (a 20 MHz ADC clock, divider 3.25, 3,906 frames/s) cannot be reached. The
  choices are 3 (21.7 MHz, over the ADC's limit) or 4 (16.25 MHz, 3,174
  frames/s), and 4 is the default.
* **Wire hold times.** Measurements of the original board suggest much longer
  hold times per wire than one conversion: about 100 µs per switching wire and
  4.9 µs per reading wire. This design holds each reading wire for exactly one
  conversion, as the timing formula implies.
* **Own choices**, where the source is silent:
  * the threshold rule (zero below the lower threshold, clip above the upper);
  * the kernel coefficients, the Gaussian scaling and the absolute value for
    Sobel;
  * the unweighted centroid and its four fraction bits;
  * the motion timeout (0.5 s) and counting the starting cell;
  * the heat-map ramp and the overlay colours and priority;
  * the marker escape in the UART stream;
  * threshold reset values, debounce and refresh times;
  * picture size and placement;
  * the reset scheme;
  * the switch and button assignment.
* **Not built.** The 65 MHz clock generator (vendor IP), the ADC, the
  multiplexers with their analog front end, and the reference-voltage supply
  are board parts. The top brings out their signals as ports, and the test
  bench model stands in for them.
