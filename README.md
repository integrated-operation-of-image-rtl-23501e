# Image capture, 3x3 convolution and 3x3 rank filtering in one FPGA pipeline

A CMOS image sensor streams pixels into the FPGA. The FPGA filters them as they arrive and stores the result in external memory, where a PC reads it over the parallel port. Capture, convolution and 2-D sorting usually run one after another over a whole frame. Here they overlap pixel by pixel in a three-stage pipeline:

1. **Capture.** Take the sensor pixels that lie inside a programmable frame.
2. **Convolution.** Build a 3x3 window in a delay line and compute the convolution *b* with one multiplier and one adder.
3. **2-D sort.** Sort the same window with five 3-input sorters to get its maximum, median and minimum.

A multiplexer picks one of *b*, Max, Mid or Min as the processed pixel. So one datapath can act as an averaging, Gaussian, high-pass or other 3x3 linear filter, or as a maximum, median or minimum filter.

The architecture is the one published by C.-J. Chang, P.-Y. Hsiao and Z.-Y. Huang, "Integrated Operation of Image Capturing and Processing in FPGA". This RTL is an independent implementation of it. The publication leaves many details open: interfaces, encodings, number formats and border handling. The choices made here are listed in [What is taken from the architecture and what is not](#what-is-taken-from-the-architecture-and-what-is-not).

The main configuration has frames of up to 320 x 240 8-bit pixels. The original board ran at up to 57.8 MHz, and the target was 20 frames per second.

## System structure

```
            PC (parallel port, EPP)                CMOS sensor (pixels, pclk, hsync, vsync; I2C)
                  |                                     |                 ^
               +--v--+  start   +-----+   I2C ----------+-----------------+
               | DTU |--------->| INU |---------------------------+
               +--+--+          +--+--+  frame size, kernel,      |
    command words |     command    |     shift, output select,    v
                  v     words      |     ic_go            +---------------+
   +--------------------------+    |                      |      IPU      |
   | MMU  parameter module <--+----+                      | capture       |
   |      image module <------+---------------------------| convolver     |
   +----------+---------------+      processed pixels     | 2-D sorter    |
              |                                            | output MUX    |
        external memory                                    +---------------+
```

| Unit | Module | Job |
|---|---|---|
| Data transfer unit (DTU) | `dtu` | EPP peripheral. The PC loads command words, sends start and stop, reads status and reads the stored image. |
| Initialisation unit (INU) | `inu` (+ `i2c_master`) | On start, runs the command list. It writes sensor registers over I2C, sets up the IPU and then raises `ic_go`. |
| Memory management unit (MMU) | `mmu` = `param_module` + `image_module` | Command memory, plus storage and read-out of the object image in external SRAM. |
| Image processing unit (IPU) | `ipu` = `image_capture` (+ `position_counter`) + `conv2d` (+ 2x `line_buffer`) + `sorter2d` (5x `tri_sorter`) + MUX | The pipeline. |

`fpga_top` wires the four units together. It has plain ports for the PC, the sensor and the external memory. `ipu_pkg` holds the shared types, opcodes and register numbers.

## The convolver: one multiplier instead of nine

The usual FPGA 3x3 convolver uses nine multipliers and nine adders: nine multiply-add cells in a row, with two line-length delays between the row groups. `conv2d` keeps the *delay line* of that structure but only one *multiply-accumulate*:

```
pixel -> c0 -> c1 -> c2 -> [line buffer, W-3] -> c3 -> c4 -> c5 -> [line buffer, W-3] -> c6 -> c7 -> c8
         \_______________________________ 3x3 window ______________________________________/
```

Here W is the frame width. The line buffers hold W-3 pixels, because three pixels of each line already sit in the word registers. So after pixel o(x,y) has shifted in, the registers hold:

- c0, c1, c2 = o(x, y), o(x-1, y), o(x-2, y)
- c3, c4, c5 = the same three columns one line up
- c6, c7, c8 = the same three columns two lines up

The window centre is (x-1, y-1).

After each shift, a counter steps `tap` from 0 to 8 over nine clock cycles. A multiplexer feeds `c[tap]` and `coef[tap]` to the single multiplier, and the adder accumulates:

```
b(x-1, y-1) = ( sum_{k=0..8} coef[k] * c[k] ) >>> shift,  clamped to 0..255
```

Tap k carries the coefficient f(i, j) with i = 1 - k%3 (horizontal offset) and j = 1 - k/3 (vertical offset). That gives this order:

f(1,1), f(0,1), f(-1,1), f(1,0), f(0,0), f(-1,0), f(1,-1), f(0,-1), f(-1,-1)

With this order, b(m,n) = sum f(i,j) o(m+i, n+j). It only matters for kernels that are not symmetric.

**The cost is time.** A result needs nine cycles, so **sensor pixels must be at least nine system clock cycles apart**. An assertion in `conv2d` checks this. At 57.8 MHz, 320 x 240 frames at 20 frames/s leave about 37 cycles per pixel, so the limit has ample margin. The single-MAC datapath itself could sustain about 83 such frames per second.

**Timing.** A pixel is accepted in cycle t. The sort bus and `col_valid` follow at t+1. The result (`out_valid`) appears at t+10.

**Coefficients.** They are 12-bit signed integers with a common right shift of 0..15, chosen at run time. Examples with shift = 10:

| Kernel | Coefficients |
|---|---|
| 1/9 | 114 |
| 8/9 | 910 |
| original + high pass, centre 17/9 | 1934 |

The shifted sum is truncated, then clamped: negatives become 0 and values above 255 become 255. A high-pass result is mostly dark for this reason.

**Borders.** Only windows that lie wholly inside the frame produce a result. A W x H frame gives (W-2) x (H-2) object pixels, in raster order.

## The 2-D sorter: max, median and min from five 3-input sorters

`tri_sorter` orders three values with three compare-exchange steps, like a bubble sort of three. `sorter2d` combines five of them. The example window 4 2 1 / 6 3 7 / 8 5 9 works through as follows:

1. **Vertical.** Each new window column is sorted once, as it arrives. The column is the convolver's sort bus {c0, c3, c6}. Two buffer stages keep the previous two sorted columns. Result for the example: 8 5 9 / 6 3 7 / 4 2 1, with the column maxima on top.
2. **Horizontal.** Three sorters order the row of column maxima, the row of column middles and the row of column minima. Result: 5 8 9 / 3 6 7 / 1 2 4.
3. **Diagonal.** One sorter orders the main diagonal (5, 6, 4): the smallest of the maxima, the middle of the middles and the largest of the minima. Its middle output is the median of all nine pixels, here 5.
   - The maximum is the largest of the column maxima (9).
   - The minimum is the smallest of the column minima (1).
   - These two lie on the corners of the other diagonal.

Each step is registered, so results follow the column strobe by three cycles. They are always ready before the convolver's result for the same window, so one strobe serves all four outputs.

## Capture and frame control

`position_counter` brings the sensor's pclk, hsync and vsync into the system clock domain through two flip-flops each, then counts xpos and ypos:

- a vsync rising edge starts a frame;
- each pclk rising edge while hsync is high is one pixel;
- an hsync falling edge ends a line.

The sensor is taken to change data on the falling pclk edge. The system clock must be at least 4x pclk, and the convolver's rule above asks for at least 9x.

In `image_capture`:

- **Comparator.** Raises `valid` while xpos < width and ypos < height. Pixels outside the frame are dropped.
- **Control.** Waits for `ic_go` and starts at the next sensor frame, latching the frame size. It holds `ic_busy` until the last in-frame line has ended. While `ic_go` stays high, it captures every frame.
- **Output.** Only pixels where `valid` AND busy pass to the convolver.

## Command list (parameter memory)

The parameter memory holds 64 words of 24 bits: `{opcode[7:0], operand[15:0]}`. On start, the INU reads the words in order from word 0. It stops at `OP_END` or at the last word.

| Opcode | Name | Operand | Effect |
|---|---|---|---|
| 0x00 | `OP_END` | - | End of list: raise `ic_go` |
| 0x01 | `OP_I2C` | {register, value} | Write a sensor register over I2C, for example exposure. The INU waits until the write is done. |
| 0x02 | `OP_WIDTH` | width | Frame width, 4..320 |
| 0x03 | `OP_HEIGHT` | height | Frame height, 3..240 |
| 0x04 | `OP_SHIFT` | shift | Fraction bits of the coefficients |
| 0x05 | `OP_OUTSEL` | 0..3 | Stored result: 0 = b, 1 = Max, 2 = Mid, 3 = Min |
| 0x10+k | `OP_COEF0+k` | signed coefficient | Coefficient of tap k, k = 0..8 |

Unknown opcodes are skipped. The I2C master sends START, address+W, register, value and STOP, at clk/(4*`I2C_DIV`); that is 100 kHz at 57.8 MHz. A missing acknowledge sets `i2c_nack`. The sensor's 7-bit address is the `inu` parameter `SENSOR_ADDR` (default 0x21). Set it and the register numbers for the actual sensor.

## Parallel-port registers (EPP)

An EPP address cycle selects a register, and data cycles then access it. The strobes are synchronised inside the FPGA. nWait rises when a cycle is done and falls after the host releases the strobe.

| Number | Register | Access |
|---|---|---|
| 0 | `REG_PM_ADDR` | Write: command-word pointer |
| 1 | `REG_PM_DATA` | Write: three bytes, most significant first, make one word; the pointer then advances |
| 2 | `REG_CTRL` | Write: bit0 start (run the list, then capture), bit1 stop (capturing ends at the end of the current frame), bit2 rewind the image read pointer |
| 3 | `REG_STATUS` | Read: {frames stored [3:0], 0, ic_busy, init_busy, ic_go} |
| 4 | `REG_IMG_DATA` | Read: next byte of the stored image; nWait stays low until the byte is there |

A typical session:

1. Write the command list.
2. Send start.
3. Poll status until the frame count changes.
4. Send stop, and wait until `ic_busy` is low.
5. Rewind, then read (W-2) x (H-2) bytes.

## Image storage

`image_module` stores each processed pixel at the next address, starting at 0 at every frame start. The external memory is taken to be a synchronous SRAM: one access per cycle, read data one cycle after the address. `XM_AW` = 17 address bits covers 318 x 238 pixels.

Pixel writes have priority over PC reads. Pixels come at least nine cycles apart and a read takes the memory for one cycle, so no write is delayed by more than one cycle.

## What is taken from the architecture and what is not

**From the published architecture:**

- The four units and their connections.
- Capture with a position counter, a frame-size comparator, `ic_go`/`ic_busy` control and an AND gate.
- The convolver's delay line of word registers and (W-3)-long line buffers, and the order of its taps and coefficients.
- One time-shared multiplier and adder.
- The sort bus taken from the window's right-hand column.
- The five-sorter 2-D sort and its vertical, horizontal and diagonal order.
- The output MUX over b, Max, Mid and Min.
- The parameter module and the image module (address counter, data arbitrator).
- I2C to the sensor and IEEE 1284 to the PC.
- 8-bit pixels, 320 x 240 frames, and the 1/9, -1/9 and 8/9 kernels.

**This design's own choices:**

- The command word format and opcodes.
- The EPP mode and its register map.
- The stop bit.
- The coefficient format (12-bit signed plus a shift), truncation and clamping.
- No border output.
- Sensor timing (hsync high = active, vsync edge = frame start, data at the rising pclk edge) and two-flip-flop synchronisers.
- The synchronous external SRAM.
- The sensor I2C address.
- 64 command words.
- Reset values: a 320 x 240 frame, the identity kernel and output b.
- Capturing continues frame after frame while `ic_go` is high.

**Other departures:**

- The published text has `ic_go` come from the memory management unit. Here the INU raises it when it reaches the end of the command list, which it reads from that memory.
- The published Gaussian coefficients are not known here. The kernel is fully programmable, and the tests use 1 2 1 / 2 4 2 / 1 2 1 over 16.

**Not built:**

- Repeated filtering of the same image (a 2nd or 3rd median pass). The datapath takes pixels only from the sensor and has no path back from memory.
- Contrast enhancement of a result for display.
- The proposed later improvements: sorting each pixel as it arrives, and window sizes other than 3x3.
- The sensor, the external memory and the PC. These exist only as simulation models in `tb/`.

## Verification

Every module has a self-checking testbench. Each compares results with values computed independently in the testbench, and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_tri_sorter` | All orderings of edge values, plus random values |
| `tb_sorter2d` | The worked 3x3 example, windows with repeated values, random sliding windows, and the 3-cycle latency |
| `tb_line_buffer` | Exact delay for several lengths, with idle cycles between shifts |
| `tb_conv2d` | Averaging, high-pass, Gaussian, identity and random asymmetric kernels against a direct 3x3 sum. Also the exact 10-cycle latency, (W-2)(H-2) results per frame, the sort-bus contents, and two frame widths. |
| `tb_position_counter`, `tb_image_capture` | Positions and values of every pixel. The frame-size comparator, `ic_go` and stop behaviour. |
| `tb_ipu` | Whole frames in all four output selections and two kernels |
| `tb_param_module`, `tb_image_module`, `tb_mmu` | Memory behaviour, read-back order, frame counting, and read/write arbitration |
| `tb_i2c_master`, `tb_inu` | Register writes received by an I2C slave model, transfer time, NACK detection, and command decoding including unknown opcodes and lists without an end marker |
| `tb_dtu` | Command-word assembly, control pulses, status, and image reads from a slow memory |
| `tb_fpga_top` | End to end on 12 x 8 frames from a 14 x 10 sensor, seven runs. See below. |
| `tb_fpga_top_full` | The same end-to-end sequence at the full 320 x 240 frame, 75,684 pixels checked per run, seven runs. It simulates in seconds. |
| `tb_fpga_top_20fps` | The published operating point. The system clock runs at 57.8 MHz and a 600 ns sensor pixel clock delivers a 324 x 244 frame every 48.7 ms. Two consecutive 320 x 240 frames must be stored no more than 50 ms apart (20 frames/s); in simulation they are 48.0 ms apart. The last frame is read back and checked. |

The three `tb_fpga_top*` testbenches use `fpga_top_harness`, which instantiates `fpga_top` with its default parameters. Its own parameters set the sensor and frame sizes, the number of runs, the system and pixel clock periods, the frames captured per run and the longest allowed time between stored frames. In each run, a PC model writes a command list over EPP, starts the system, reads while a frame is being stored, stops, then reads the whole image and compares every pixel. The runs cover:

- averaging, Gaussian, high-pass and original-plus-high-pass kernels;
- the median, maximum and minimum outputs.

The harness also checks that each mechanism occurred: I2C writes, pixels dropped by the comparator, stops, and reads that waited for a pixel write.

The models in `tb/` are:

- `cmos_sensor_model`: frames of a deterministic pixel function, plus an I2C slave;
- `i2c_slave_model`;
- `ext_sram_model`.

Simulation uses the default parameters. The sensor's pixel clock is 1/12 of the system clock, except in `tb_fpga_top_20fps`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_fpga_top_full \
          -y rtl -y tb +libext+.sv rtl/ipu_pkg.sv tb/tb_fpga_top_full.sv
./obj_dir/Vtb_fpga_top_full
```

Replace the top module and file name to run any other testbench. All RTL files also lint cleanly with `verilator --lint-only -Wall`, apart from unused-signal notes. They elaborate in Yosys through the slang front end.

## Changing the design

- **Frame size.** Set the maximum with `MAX_W`/`MAX_H` on `fpga_top`. `MAX_W` sets the line-buffer depth, and `XM_AW` follows. The actual frame size is a run-time setting. Frame widths above 1023 or heights above 511 also need `XW`/`YW` in `ipu_pkg`.
- **Coefficient precision.** Set `COEF_W`, `SHIFT_W` and `ACC_W` in `ipu_pkg`.
- **Command memory size.** Set `PM_DEPTH`.
- **I2C speed.** Set `I2C_DIV`.
- **Faster pixel rates.** Copy the nine window registers into a holding register when the MAC starts, or use more multipliers. Either change relaxes the nine-cycle pixel spacing. The rest of the pipeline already runs once per pixel.
