# 3x3 edge detection peripheral for an Avalon / Nios II system

Edge detection convolves two 3x3 masks (normally the Sobel pair) over a
grey-scale image. For every output pixel it adds the absolute values of both
results, scales the sum and clips it to a byte. In software this costs 18
multiplications and about 20 additions per pixel. This peripheral does it in an FPGA
at one pixel per enabled clock, so it is limited only by how fast it can read
memory.

The peripheral sits on an Avalon bus next to a Nios II processor. It has one slave port and two masters:

```
            Nios II  --Avalon-->  [slave_regs]   register map, start/done
                                      |
 memory port A --> [input_block] --> 3 x [word_to_byte] --> [edge_detector] --+
 (read master)     3 row streams       32 -> 8 bit          or                 |
                   3 word FIFOs                             [addition_unit]    |
                                                                               v
 memory port B <-- [output_block] <-- [byte_to_word] <-------------------------+
 (write master)    word FIFO           8 -> 32 bit
```

The processor writes the register map and sets the start bit. The peripheral
then reads the image from a dual-port memory and writes the edge image back
without further help. When it has finished, it sets a done bit and leaves the
run's clock-cycle count in a register.

This RTL is a reconstruction of a published FPGA design: a Stratix Nios II
development kit running at 50 MHz, fed 320x240 webcam frames over UDP. The
block structure, the register list, the six-state load sequencer and the
ten-stage pipeline follow that design. Many details were not specified there,
such as bit packing, handshakes, FIFO depths and the test-mode select. Those
are this design's own choices and are listed under "Design choices" below.

## How the image reaches the detector: three row streams

The image is stored row after row, one byte per pixel. The processor loads
three start addresses:

| register | value |
|---|---|
| input address 1 | start of row 0 |
| input address 2 | input address 1 + W |
| input address 3 | input address 1 + 2W |

Each of the three streams reads `load_bytes = W*(H-2)` bytes linearly from its
start address. Stream 1 therefore carries rows 0..H-3, stream 2 carries rows
1..H-2 and stream 3 carries rows 2..H-1. At every position the three streams
hold the same column of three adjacent rows. The read master does not need to
know about rows at all. It counts words, serves the three streams in turn, and
fetches a word only for a stream whose FIFO has room.

Each stream's FIFO feeds a 32-to-8 converter, which hands out the lowest byte
first. The three converters release their bytes only together. One transfer
therefore moves one **column**: three vertically adjacent pixels, with the top
row in byte 0.

Bus timing is plain non-pipelined Avalon. The address and `read` come from a
register, and the transfer ends on the first rising edge with `waitrequest`
low. `read` then drops for one cycle, so a read takes two clocks on a
zero-wait-state memory. One 32-bit word carries four columns of one row, so
four columns need three words, or six clocks. The read side is therefore the
bottleneck, at 1.5 clocks per column. Everything downstream can take one
column per clock.

Row starts must be word aligned, so the width must be a multiple of 4.

## The window and the load sequencer (`edge_detector`)

The detector keeps a 3x3 window of the last three columns. Once a band's
first three columns are in, every new column completes a new window. Each
output pixel therefore costs three new bytes and reuses six old ones. A band
of W columns gives W-2 output pixels, and an image of H rows gives H-2 bands.
The output image is (W-2) x (H-2), stored linearly.

Six states sequence the loads. `currwidthreg` counts the columns of the
current band, and `currheightreg` counts the bands.

| state | on a transfer | window issued into the pipeline |
|---|---|---|
| PRELOAD1, PRELOAD2, PRELOAD3 | load columns 0, 1, 2 of a band | none |
| NORMALLOAD | load column c (3 <= c < W) | the window of columns c-3..c-1 |
| POSTLOAD | no load, one enabled cycle | the last window, columns W-3..W-1 |
| DONE | none (entered after band H-3) | none, the pipeline drains |

After POSTLOAD the sequencer goes back to PRELOAD1 for the next band. A window
is issued while the next column is loaded, which is why the band's last window
needs the extra POSTLOAD cycle.

**Flow control is one general enable.** Every pipeline register, the window
and the sequencer move only when

    en = out_ready & (state loads a column ? in_valid : 1)

holds. There are no per-stage handshakes, and the whole pipeline stops as a
unit when the input runs dry or the output is full. A 10-bit shift register
moves with `en` and carries one valid bit per stage. Its last bit is the
output's `valid`. One corner case: the consumer may take the last pixel while
`en` is low because the input is starved. The last valid bit is then cleared
so the pixel is not delivered twice.

## The pipeline (`edge_pipeline`)

The same nine pixels go through two branches in parallel, one per mask, and
the branches then merge. There is one register per stage:

| stage | each branch (mask A and mask B) |
|---|---|
| 1 | 9 multipliers: pixel x magnitude of the coefficient (16-bit products) |
| 2 | 9 two's complement converters: negate where the coefficient is negative |
| 3 | 4 carry lookahead adders, 16 bits (the 9th term is carried along) |
| 4 | 2 adders |
| 5 | 1 adder |
| 6 | 1 adder, which adds the 9th term |
| 7 | absolute value |

| stage | both branches together |
|---|---|
| 8 | \|A\| + \|B\|, 17 bits |
| 9 | x scale, 33 bits |
| 10 | 0 if below the threshold, else min(value, 255) |

A window issued on one enabled edge reaches `pixel_out` on the tenth enabled
edge, counting its own, so the latency is 9 enabled cycles after the issuing
cycle.

Coefficients are signed bytes. The multiplier uses the magnitude, and stage 2
restores the sign. Sums inside a branch are 16-bit two's complement. They are
exact for any mask whose weighted sum stays within -32768..32767, which the
Sobel masks do by a wide margin. The final sum and the product keep their full
width, so no value can wrap before it is capped.

The adders are `cla_adder` instances: two-level carry lookahead over 4-bit
groups.

## Register map (slave port)

All registers are 32 bits wide. Register N is at word address N-1. Reads are
combinational (zero wait states), and writes take effect on the clock edge.

| reg | contents |
|---|---|
| 1 | control: bit 0 start (write 1), bit 1 clearing (high for one cycle after start), bit 2 done, bit 3 test mode, bits 15:8 addend byte |
| 2, 3, 4 | input addresses of rows 0, 1 and 2 (byte addresses, word aligned) |
| 5 | output address |
| 6..9 | mask A, nine signed bytes: coefficient k in register 6+k/4, bits 8(k%4)+7 .. 8(k%4) |
| 10..13 | mask B, packed the same way from register 10 |
| 14 | width [15:0], height [31:16] |
| 15 | threshold [15:0], scale [31:16] |
| 16 | load bytes: bytes per row stream, W*(H-2) |
| 17 | write bytes: (W-2)*(H-2), or W*(H-2) in test mode |
| 18..23 | read only: words read, words written, windows issued, {currheightreg, currwidthreg}, {streams done, detector done, state}, {read stalls, write stalls} (16 bits each) |
| 24 | read only: clock cycles from the start write to done |

Coefficient k sits at row k/3 and column k%3 of the window. Row 0 is the top
row, and column 0 is the leftmost (oldest) column.

**Running a frame:**

1. Write registers 2 to 17.
2. Write 1 to the control register. Include bit 3 and an addend in bits 15:8
   for test mode.
3. Poll until bit 2 of the control register is set.
4. Read register 24 for the cycle count.

Starts are ignored while a run is in progress. A new start clears the done
bit.

**Test mode** puts `addition_unit` in place of the edge detector. For every
column it writes `(row0 + row1 + row2 + addend) mod 256` to the output. This
checks the memory path without the convolution.

## Timing and performance

On a zero-wait-state memory a 320x240 frame takes **114 264 clocks** from the
start write to done:

- 3 x 76 160 / 4 = 57 120 word reads at 2 clocks each, which is 114 240 clocks.
- A tail of 24 clocks: the clear cycle, the first read issue, the converters,
  the 10 pipeline stages, packing and the final write.

The original design reports 114 249 clocks: the same 114 240 read cycles plus
its 9-cycle pipeline latency. At 50 MHz this design gives about 437 frames
per second. Timing closure at 50 MHz has not been checked here.

With `waitrequest` stalls the design slows down but stays correct. Nothing in
the design depends on a fixed memory latency.

## Design choices

These points were not specified by the original design and were chosen here:

- **Avalon polarity:** active-high `read` and `write` (current Avalon-MM),
  rather than the older active-low `read_n`.
- **Bus usage:** reads always use all four byte enables. Writes use byte enables
  so that a partial last word does not touch the bytes after the image.
- **Buffers:** FIFOs are 4 words deep (parameters `IN_FIFO_DEPTH`,
  `OUT_FIFO_DEPTH`). Byte order is little-endian throughout.
- **Register packing:** the packing of registers 6 to 15 (which half is width,
  threshold and so on) is this design's own.
- **Scale and threshold:** the order is scale first, then threshold and cap
  together in the last stage. A value below the threshold becomes 0. The scale
  is an integer.
- **Test mode:** the control bit that selects the addition unit and the place
  of the addend byte are this design's own.
- **Debug registers:** their contents are this design's own.
- **Done:** means the output block has written `write bytes` bytes. Register 24
  counts from the start write to done.
- **Adder widths:** the last adder keeps its carry and the scale product is 33
  bits. The original drew 16 and 32 bits.

The processor, the memory, the bus arbitration (generated by the vendor tool),
Ethernet, and the PC-side capture and packet software are outside this RTL.

## Files

| file | contents |
|---|---|
| `rtl/edge_pkg.sv` | register addresses, control bits, `cfg_t`, `mask_t`, sequencer states |
| `rtl/edge_detect_top.sv` | top level: slave port, two masters and the datapath wired together |
| `rtl/slave_regs.sv` | register map, start/clear/run/done sequence, cycle counter |
| `rtl/input_block.sv` | read master, round robin over three streams, three FIFOs |
| `rtl/word_to_byte.sv` | 32-to-8 converter |
| `rtl/edge_detector.sv` | window, six-state sequencer, general enable, valid shift register |
| `rtl/edge_pipeline.sv` | ten-stage datapath |
| `rtl/cla_adder.sv` | carry lookahead adder |
| `rtl/addition_unit.sv` | test-mode processing unit |
| `rtl/byte_to_word.sv` | 8-to-32 converter with partial last word |
| `rtl/output_block.sv` | write master with its FIFO |
| `rtl/sync_fifo.sv` | FIFO |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_edge_ref_pkg.sv` | integer reference for one output pixel |
| `tb/tb_avalon_mem.sv` | behavioural dual-port memory with optional random `waitrequest` |

## Simulation

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each
has a watchdog. Two-state simulation is fine: everything that is read is reset.
Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/edge_pkg.sv tb/tb_edge_detect_top.sv --top-module tb_edge_detect_top
./obj_dir/Vtb_edge_detect_top
```

`tb_edge_detect_top` drives the slave port like the firmware does, with the
top at its default parameters, and runs five frames:

1. 16x8, with the cycle count checked.
2. 20x9, with random `waitrequest` on both ports, threshold 200 and scale 3.
3. Test mode, with a partial last word.
4. Random signed masks.
5. A full 320x240 frame, with the cycle count checked against 1.5 clocks per
   column plus at most 30 clocks.

It compares every output byte with the integer reference. It also counts read
stalls, write stalls, partial words, test mode, zero and capped pixels,
negative coefficients and restarts, and fails if any of them never happened.
It runs in about 10 seconds.

The module testbenches check, among other things:

- the adder against integer addition;
- the pipeline's values and its exact ten-enable latency;
- every sequencer state and both kinds of stall, on several image sizes
  including 3x3;
- the two-clock read and write timing;
- the control sequence of the register block.
