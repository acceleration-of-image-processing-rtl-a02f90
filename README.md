# Strobe-clocked Prewitt edge-detection co-processor for a Raspberry Pi FPGA HAT

A Raspberry Pi captures 512x512 greyscale camera frames and hands them to a
small FPGA (Cyclone 10 LP class) on a HAT board, which returns the Prewitt edge
map of each frame. The two talk over 19 shared GPIO lines: 16 data lines, a
write enable (WE), a read enable (RE) and a read-write strobe. The host drives
the strobe as fast as its software can toggle it; there is no bus clock.

The central idea of this RTL is that the host strobe is the *only* clock of the
FPGA data path. Every strobe cycle moves one 16-bit word (two pixels) across
the bus and lets the edge detector process one pixel. The data path is:

```
 host bus --16--> gpio16_if --16--> fifo_16to8 --8--> prewitt_filter
                                                          |
 host bus <--16-- gpio16_if <--16-- fifo_8to16 <--8-------+
```

## The bus protocol

Each strobe cycle is a falling edge followed by a rising edge; the strobe idles
high.

| cycle  | falling edge                        | rising edge                                  |
|--------|-------------------------------------|----------------------------------------------|
| write (WE=1) | host changes the data lines   | FPGA samples the data lines                  |
| read (RE=1)  | FPGA drives the next output word | host samples; FPGA pops that word          |
| idle (neither) | –                           | data path advances, nothing moves on the bus |

`gpio16_if` holds each sampled word in a register and writes it into the input
FIFO at the following rising edge, so the last word of a write burst enters the
FIFO one strobe cycle later (during the next read or idle cycle). On the read
side the head word of the output FIFO is registered at the falling edge, and
`data_oe` (equal to RE) turns the data pads around. The bidirectional pad
itself is outside the RTL: the top exposes `data_in`, `data_out` and `data_oe`.

The bus has no flow control. The host is trusted to never write into a full
input FIFO and never read an empty output FIFO. Two sticky flags,
`rx_overrun` and `tx_underrun`, record a violation; they are cleared only by
reset.
Assertions in `gpio16_if` state the host's remaining obligations: WE and RE
are never high together, and neither changes while the strobe is low.

## Pixel budget: why half the filtering happens during reads

This is the part that needs care when writing host software.

A bus word carries two pixels but the filter takes one pixel per strobe cycle.
While the host writes, the input FIFO fills at two pixels per cycle and drains
at one; while it reads, the output FIFO drains at two and fills at one. Over a
whole frame the host spends W*H/2 cycles writing and W*H/2 cycles reading, so
the filter gets exactly W*H cycles: half of the frame is filtered during write
cycles and half during read cycles. This only works because the two 4096-byte
FIFOs absorb the difference within a burst.

Two consequences for the host:

* **Latency.** Output pixel *j* leaves the filter when input pixel
  *j + W + 1* arrives (W = 512). The host must therefore read back data with a
  lag. A schedule that works at the default size, and is the one the
  end-to-end testbench uses: write 1024 words (chunk *k*), then read 1024
  words (chunk *k-1*), repeat. The input FIFO then peaks at about 2048 bytes
  and the output FIFO never runs dry.
* **Frame boundaries and the end of a stream.** When a frame's last pixel
  goes in, W+1 of its outputs are still owed; they all lie on the bottom or
  right border and are zero. The filter pays them out one per cycle while it
  takes the first W+1 pixels of the next frame, which produce no output of
  their own. Back-to-back frames therefore cost exactly one cycle per pixel,
  W*H = 262 144 strobe cycles per 512x512 frame, with no gap. After the last
  frame of a stream there is no next frame: whenever the filter has no input,
  it pays out an owed zero anyway, so the host only needs to give W+1 strobe
  cycles of any kind (idle ones, or the reads of earlier data) before it reads
  the end of the last frame.

At a strobe rate *f*, the sustained frame rate is *f* / 262 144: 170 frames/s
needs a 44.6 MHz strobe. The design itself sets no lower limit than the
FPGA's achievable clock rate on the strobe net.

## The Prewitt filter (`prewitt_filter`)

Pixels arrive in raster order. Two line buffers of W bytes hold the two
previous rows. For each accepted pixel the column above it is read from the
buffers, giving a new 3-pixel column that is shifted into a 3x3 window; the
buffers are then updated in place (row above -> two rows above, new pixel ->
row above). The window is centred one row up and one column to the left of the
newest pixel. From the window:

```
Gx  = (right column sum) - (left column sum)
Gy  = (bottom row sum)   - (top row sum)
out = min(|Gx| + |Gy|, 255)
```

Gradients fit in 11 signed bits (|G| <= 765). Pixels in the first and last row
and column are output as 0; the line buffers are never cleared, because the
rows they hold before row 2 only ever feed border outputs. A counter `owed`
(0 to W+1) carries the zeros still due to the previous frame, as described
above. Each frame gives exactly W*H output bytes in raster order, so frames
can follow each other without any separator. The result is registered; the block takes a new pixel
whenever its output register is empty or being read (valid/ready on both
sides).

## The FIFOs

`fifo_16to8` (input side) stores 16-bit words and hands out bytes, low byte
first: a word `{p1, p0}` holds pixel p0 in bits 7:0 and the following pixel p1
in bits 15:8. `fifo_8to16` (output side) collects bytes into words in the same
order, using two byte-wide RAMs (even bytes, odd bytes). Both are 4096 bytes
deep, with show-ahead outputs and valid/ready handshakes, clocked by the strobe
on both sides. Their `level` outputs give the fill in bytes; the top leaves
them open.

## Reset and clocking

`rst_n` is the board's push button, asynchronous and active low. Everything is
clocked by `strobe`, on its rising edge, except the output word register and
its "launched" flag in `gpio16_if`, which use the falling edge. The board's
50 MHz oscillator is not used by this data path.

## How far this follows the original design

Taken from the original system description: the 16-bit strobed bus with WE,
RE and one strobe; the edge roles (host launches on falling edges, valid on
rising edges, in both directions); two 4096-byte FIFOs with 16-bit and 8-bit
sides and the Prewitt filter between them; 8-bit greyscale pixels and
512x512 frames; one pixel filtered per bus cycle, half during writes and half
during reads; the reset push button.

Choices made here where the description is silent:

* the strobe as the clock of the whole data path (rather than oversampling it
  with the 50 MHz board clock) and the idle strobe cycle;
* the byte order within a bus word (earlier pixel in the low byte);
* how the two gradients are combined (|Gx| + |Gy|, saturated), the zero
  border, and paying out a frame's last outputs during the next frame or
  while idle;
* the one-cycle sample register in the bus interface, the pop-on-rising-edge
  rule, and the two error flags;
* the FIFO internals.

Not in this RTL: the host computer and its software, the oscillator, PLL and
power regulators, the configuration flash and JTAG path, the optional UART,
I2C and SPI links (named on the board but with no FPGA logic described), the
I/O pad cells, and the debug logic analyser. An earlier test configuration
with a single FIFO looping received data straight back is also not included.

## Files

| file | contents |
|------|----------|
| `rtl/hat_pkg.sv` | shared constants and types (bus width, default frame size, FIFO size, gradient type) |
| `rtl/gpio16_if.sv` | strobed bus slave |
| `rtl/fifo_16to8.sv`, `rtl/fifo_8to16.sv` | width-converting FIFOs |
| `rtl/prewitt_filter.sv` | streaming edge detector |
| `rtl/fpga_hat_top.sv` | top level, parameters `IMG_W`, `IMG_H`, `FIFO_BYTES` |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself; a
watchdog ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl \
    rtl/hat_pkg.sv tb/tb_fpga_hat_top.sv --top-module tb_fpga_hat_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others (`tb_gpio16_if`, `tb_fifo_16to8`,
`tb_fifo_8to16`, `tb_prewitt_filter`).

* `tb_fpga_hat_top` runs the top at its default size: two back-to-back
  512x512 frames (a noisy ramp and a disc), about 530 000 strobe cycles, with
  the testbench playing the host at a 40 ns strobe period (50 MB/s). Every
  returned pixel is compared with an edge map the testbench computes itself.
  It also checks that write, read and idle cycles, filtering during writes and
  during reads, write/read turnarounds, frame ends, and a frame's last
  outputs paid out both during the next frame and while idle all occur, and
  that neither error flag is raised. It runs in about a second.
* `tb_prewitt_filter` uses 16x6 frames. It sends two frames back to back at
  full rate and checks that the input never stalls and that the first input
  to the last output takes exactly 2*W*H + W + 1 cycles; then it runs frames
  with random input gaps, output back-pressure and saturating edges.
* The FIFO testbenches run random traffic against a byte-queue model on
  32-byte instances and check the ready, valid and level outputs each cycle.
* `tb_gpio16_if` checks bursts of writes and reads, turnarounds and both
  error flags.

## Limits

The RTL has only been simulated; it has not been placed, timed or run on an
FPGA. In particular, clocking from a host-driven strobe requires the strobe pin
to reach a global clock network and the host to keep a clean duty cycle. The
data path was checked bit-exactly against a software reference, but the
reference uses the same magnitude and border conventions as the RTL, so it
cannot show whether those conventions match any other Prewitt
implementation.
