# Image scaling processor: sharpen, anti-alias and bilinear resize with one line of memory

This is the RTL of a small image scaling processor. It takes a frame from a parallel camera
sensor and resizes it by any factor, larger or smaller, set separately for x and y. It sends
the result to a host over a serial line. The quality comes from filtering before interpolating.
Each source pixel first goes through a sharpening filter, which keeps edges crisp after
enlarging. It then goes through a clamp (smoothing) filter, which suppresses aliasing when
reducing. A bilinear interpolator produces the output pixels from the filtered values.

The cost is kept low by three ideas, all taken from the published design:

* **Filter combining.** The two 3x3-class filters are cut down to T-shaped kernels and merged
  into a single kernel that spans only two image rows. The scaler therefore needs only one line
  of pixel memory.
* **Hardware sharing.** The bilinear interpolation is evaluated one direction at a time. Three
  multipliers do the work of eight.
* **Reconfigurable calculation units (RCUs).** The small filter coefficients, which depend on the
  user's settings, are applied with shifts and adds instead of multipliers.

## Data flow

```
 sensor --> camera_if --> frame_store --> [ register_bank (10 regs + line_buffer) ]
 (VSYNC,HREF,PCLK,D)          ^                    |                   |
                              |            combined_filter (T)  combined_filter (inverse T)
 uart_rx --cmd--> scaler_controller                |                   |
                   (reads, shift/emit tokens)      +-- held column pair +
                              |                             |
                              +------------------> bilinear_interp
                                                            |
                                                 sync_fifo --> uart_tx --> host
```

A capture command arms the camera interface. The command is a pulse on `start`, or the byte
`0x43` (`'C'`) on the serial input. The camera interface waits for the next frame and writes it
into the frame store. The controller then produces the output image row by row:

1. It reads the needed source rows out of the frame store.
2. It shifts them through the register bank.
3. It tells the scaling pipeline when to produce each output pixel, and with which fractional
   position `dx`, `dy`.

Output pixels are 8-bit values. They are sent in row-major order, one byte per pixel (8N1,
115200 baud at 50 MHz by default). `done` pulses after the last stop bit.

## The combined filter

The sharpening kernel (weight S in the middle) and the clamp kernel (weight C in the middle) are
T-shaped:

```
 sharpen:  -1  S  -1   / (S-3)          clamp:   1  C  1   / (C+3)
               -1                                   1
```

Convolving them gives a 5x3 kernel with a single `-1` in its third row. That `-1` is moved into
the centre of the second row. The kernel then covers only rows n and n+1, and its sum, and so the
DC gain, is unchanged:

```
 row n   :  -1    S-C    S*C-2    S-C    -1
 row n+1 :        -2     S-C-1    -2            all divided by (S-3)(C+3)
```

This "T model" gives the filtered pixel p'(m,n). The mirror image, the "inverse T model", uses
row n+1 as the five-wide row and row n as the three-wide row. It gives p'(m,n+1). Both filters
work on the same ten registers at the same time, so both vertical neighbours that the
interpolator needs come out together.

S and C are picked by `s_sel` and `c_sel` from the sets S ∈ {7, 11, 19} and C ∈ {5, 13, 29}.
Code 3 acts as code 2. These values have a useful property: S-3 and C+3 are always powers of two
(4/8/16 and 8/16/32). The division is therefore a right shift by `s_sel + c_sel + 5`. The result
is rounded to nearest and clipped to 0..255. The rounding and clipping are choices made in this
RTL.

Each filter (`combined_filter.sv`) has two pipeline stages.

* **Stage 1:**
  * Three RCUs form (S-C)·p[m-1], (S-C)·p[m+1] and (S-C-1)·q[m].
  * One multiplier-adder forms (S·C-2)·p[m] - p[m-2].
  * An adder with a shift forms p[m+2] + 2·(q[m-1] + q[m+1]).
* **Stage 2:** sums these partial results, then rounds, shifts and clips.

### RCU

`rcu.sv` multiplies by (S-C) or by (S-C-1), chosen by `mode`. The sets above mean that
S = 2^a + 3 and C = 2^b - 3, with a = `s_sel`+2 and b = `c_sel`+3. The two coefficients
therefore split into powers of two:

```
 S-C   = 2^a - 2^b + 4 + 2
 S-C-1 = 2^a - 2^b + 4 + 1
```

The unit builds the product from four shifted copies of the operand:

* x<<a, with the shift amount chosen by a multiplexer on `s_sel`;
* x<<b, chosen by a multiplexer on `c_sel` and then negated by a sign stage;
* x<<2, a fixed shift;
* x<<1 or x, chosen by a multiplexer on `mode`.

Three adders sum the four terms. That is the four shifters, three multiplexers, three adders and
one sign circuit of the original unit. The original does not give the wiring, so this
decomposition is this design's own.

## Two rows through ten registers

`register_bank.sv` holds a window of five columns by two rows: `reg00..reg40` for row n and
`reg01..reg41` for row n+1. On a shift:

* The new pixel enters `reg41`.
* The row n+1 values move one place towards `reg01`. The value leaving `reg01` goes into the
  line buffer.
* `reg40` takes the oldest word of the line buffer, and the row n values move towards `reg00`.

The line buffer (`line_buffer.sv`) is a circular memory with a read-before-write, registered
read port. That port *is* `reg40`. Its depth is `LINE_LEN - 5`, which makes a pixel come back
into `reg40` exactly one streamed line after it entered `reg41`. Column by column, row n then
sits directly above row n+1.

**Border handling (a choice made in this RTL).** The controller streams every source row as
`IMG_W + 4` pixels: the first pixel three times, then the rest, with the last pixel three times.
The window therefore replicates edge pixels and never mixes two rows, and the filter needs no
edge multiplexers. After `sh` shifts of a row, the window is centred on column `sh-5`.

## Scheduling the output pixels (controller)

This is the least obvious part of the design. `scaler_controller.sv` sees the output image as a
grid of sample points in source coordinates. It uses unsigned fixed point with 8 fractional bits:

* x_k = k · `step_x`, so m = ⌊x_k⌋ and dx = frac(x_k)
* y_l = l · `step_y`, so n = ⌊y_l⌋ and dy = frac(y_l)

Row n is clipped to the last row, and n+1 to `IMG_H-1`. For a plain resize, set
`step = 256·source_size / output_size`.

**Row passes.** Output row l needs rows n and n+1 in the bank, which means the line buffer must
hold row n while row n+1 streams in. The line buffer always holds the row that was streamed last.
For each output row the controller therefore does the following:

* If that row is not n, it first streams row n without producing anything: a **priming pass**.
  This happens when enlarging vertically (the same n is used again) and when reducing (rows are
  skipped). Each priming pass is signalled on `ev_prime`.
* It then streams row n+1 in an **emitting pass**.

Consecutive output rows that step exactly one source row need no priming.

**Emits.** During an emitting pass the scaling module keeps the two most recent filtered columns
(m, m+1), for both rows. The column pair (sh-6, sh-5) is held after `sh` shifts. Output pixel k
is **emitted** as soon as its pair is held. Emits take priority over shifts. When enlarging, the
window therefore waits while several outputs are taken from one column pair. When reducing,
columns pass by with no output. Outputs at or beyond the last column set `edge_col`, and the last
column is then used for both horizontal neighbours.

**Tokens.** Each cycle the controller issues at most one token to `image_scaler`: `shift` (with a
frame-store read one cycle earlier, so the pixel arrives with the token) or `emit` (with dx, dy,
edge). Tokens travel through the pipeline next to the data. An emit therefore always uses the
pair formed by every shift issued before it, however the two kinds interleave.

**Back-pressure.** The pipeline itself never stalls. The controller counts the pixels still
inside the pipeline. It issues an emit only if that count plus the FIFO fill is below
`FIFO_DEPTH`. Otherwise it waits, which is signalled on `ev_stall`. The serial link is far slower
than the pipeline, so in practice the processor runs at the UART's pace, one byte every
`10·CLKS_PER_BIT` cycles.

## Pipeline timing

| stage | work                                                             |
|-------|------------------------------------------------------------------|
| –     | token + pixel arrive, register bank shifts                       |
| 1     | RCUs, multiplier-adder, side-row sum (both filters)              |
| 2     | sum, normalising shift, clip → p'(m,n), p'(m,n+1)                |
| 3     | b-a, d-c                                                         |
| 4     | top = a + dx(b-a), bottom = c + dx(d-c)                          |
| 5     | bottom - top                                                     |
| 6     | top + dy(bottom-top), round → output register                    |

The six stages follow the original design: two for the filters and four for the interpolator.
An output pixel leaves six cycles after its window is in the register bank, which is seven cycles
after its emit token. The pipeline accepts one token per cycle. The result matches the four-weight
form (1-dx)(1-dy)a + dx(1-dy)b + (1-dx)dy c + dx·dy·d exactly, before rounding.

## Camera interface and serial link

`camera_if.sv` samples the sensor's `PCLK`, `VSYNC`, `HREF` and data lines through two-flop
synchronisers, using the system clock. This clock must be at least three times `PCLK`. After a
capture command the module:

1. Waits for a VSYNC pulse (frame start).
2. Stores one 8-bit sample on every rising PCLK edge while HREF is high.
3. Ends a line at the falling edge of HREF.

The frame ends after `IMG_H` lines or at the next VSYNC. The sensor has to be configured for one
8-bit luminance value per PCLK, for example a Y-only mode. Sensor register setup over its control
bus is not part of this RTL.

`uart_tx.sv` and `uart_rx.sv` are plain 8N1 units with `CLKS_PER_BIT` cycles per bit. The
transmitter accepts the next byte in the last cycle of a stop bit, so bytes follow each other
without gaps.

## Parameters and ports of `image_scaler_top`

| parameter      | default | meaning                                             |
|----------------|---------|-----------------------------------------------------|
| `IMG_W`,`IMG_H`| 160,120 | captured frame size (QQVGA)                         |
| `CLKS_PER_BIT` | 434     | 115200 baud from a 50 MHz clock                     |
| `FIFO_DEPTH`   | 16      | output FIFO entries                                 |
| `CMD_CAPTURE`  | 8'h43   | serial byte that starts a capture                   |

Run-time inputs are `s_sel`, `c_sel`, `step_x`, `step_y` (Q8.8, from 1/256 to just under 256)
and `out_w`, `out_h` (up to 65535). Hold them steady while `busy` is high. The sensor pins are
`cam_pclk`, `cam_vsync`, `cam_href` and `cam_d`; the serial pins are `uart_rxd` and `uart_txd`.
`ev_prime` and `ev_stall` are one-cycle event outputs, meant for performance counters.

Shared types are in `rtl/scaler_pkg.sv`: the pixel and fraction types, the token struct, and the
S/C selection functions.

At the defaults the memory used is 155,000 bits: a 153,600-bit frame store, a 1,272-bit line
buffer and a 128-bit FIFO. This is well within a Cyclone II EP2C70 (1,152,000 bits). The
original implementation reported 406,784 memory bits on that device.

## How far this follows the original design

Taken from the original design:

* the block structure: camera interface, scaling module, controller and UART;
* the ten-register bank with one line buffer and its shift order;
* the T and inverse-T combined filter and its coefficients;
* the S/C value table and the use of RCUs;
* the bilinear formula, evaluated one direction at a time;
* the six-stage split of the pipeline.

Choices made in this RTL, where the original gives no detail:

* **Kernel reading.** The reduced two-row kernel is the one derived above, with the third-row
  `-1` folded into the second-row centre as `S-C-1`. This matches the coefficients the RCUs are
  said to produce.
* **Frame store.** The frame is captured into on-chip memory before scaling. The original has a
  camera-to-scaler path, but its serial output cannot keep up with a sensor, and its reported
  memory use is far larger than one line buffer needs.
* **Numbers.** 8-bit pixels, 8 fractional bits for dx/dy, rounding, clipping, border
  replication and the 160x120 frame size.
* **Controller.** The pass and token scheme and the FIFO with credit-based stalls.
* **RCU.** The power-of-two split of its coefficients described above.
* **Serial link.** The command byte, the UART format and rate, and the 50 MHz clock.
* **Output.** The interpolated values are sent as the finished scaled image. The original
  describes combining them with the source image on the host. That host-side step is not part of
  this hardware.
* **Size.** The run-time scale inputs give this design more ports than the 23 pins reported
  originally. Register counts are not comparable either, since the frame store addressing,
  counters and FIFO add flip-flops.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `scaler_ref_pkg.sv` is an independent golden model. It applies the filter with the full kernel
  coefficients and the four-weight bilinear form, and it clamps image borders.
* `cam_model.sv` is a behavioural sensor.
* `uart_monitor.sv` decodes the serial output.

What the testbenches cover:

* `tb_rcu`, `tb_combined_filter` and `tb_bilinear_interp` check all S/C settings, the filter
  latency of 2 cycles and the interpolator latency of 4 cycles.
* `tb_image_scaler` checks the 7-cycle latency from emit token to output.
* `tb_scaler_controller` checks read addresses, emit order, that no emit comes too early, and
  that the FIFO never overflows.
* `tb_image_scaler_top` runs a 16x12 frame through enlargement, reduction, 1:1 and mixed scaling.
  It compares every byte with the golden model and requires that priming passes, FIFO stalls,
  repeated column pairs and right-border outputs all occur.
* `tb_table1_settings` runs the whole processor once for each of the nine S/C pairs, on a 16x12
  frame enlarged 2x, and checks every byte.
* `tb_full_size` runs one full operation with every default parameter: a serial command, a
  160x120 capture, a reduction to 120x90, and 10,800 bytes at 115200 baud. It simulates about
  50 million cycles in well under a minute.

To simulate, for example the end-to-end test:

```
verilator --binary --timing -y rtl -y tb rtl/scaler_pkg.sv tb/scaler_ref_pkg.sv \
    tb/tb_image_scaler_top.sv --top-module tb_image_scaler_top
./obj_dir/Vtb_image_scaler_top
```

Replace the testbench name to run any other test. Verilator may print style warnings; add
`-Wno-fatal` if your version stops on them.
