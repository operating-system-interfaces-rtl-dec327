# Three ways to attach an accelerator to an embedded CPU

This RTL puts three hardware accelerators on a PowerPC-class system-on-FPGA. Each one is coupled to
the processor in a different way, so that the cost of the coupling itself can be compared:

* **Motion estimation on the on-chip memory bus (OCM).** The CPU and the accelerator share a
  2 KB dual-ported block RAM. The CPU writes a 16x16 macroblock and a 31x31 search area into it,
  sets a ready bit, and polls a done bit. The accelerator then reads the best motion vector and its
  sum of absolute differences (SAD) back from the same RAM.
* **Audio dithering as a slave on the processor local bus (PLB).** Three memory-mapped registers
  are read and written directly by the CPU: the left input, the right input and the packed output.
  Two dithering cores compute one result per 25 MHz cycle. That is faster than the CPU can turn a
  write around into a read, so there is no handshake at all.
* **A switchable accelerator framework for JPEG.** It holds an input buffer, an output buffer and a
  DMA engine on the PLB. Between the buffers sit three switch nodes in a chain, each with an
  accelerator *frame*: an 8x8 DCT, a quantiser, and an empty frame whose stream is brought out to
  ports. Control registers on the device control register bus (DCR) pick which frames are in the
  chain and start a block. A status bit toggles when the 64 results of the block are in the output
  buffer.

`osif_top` holds all three side by side. The CPU, the buses, the DDR controller and system memory
are not part of the design. Their connections are ports of the top.

## Files

| File | Contents |
|---|---|
| `rtl/osif_pkg.sv` | stream word type, DCR and DMA register offsets, DCT cosine table, default quantisation table, motion-estimation RAM layout |
| `rtl/osif_top.sv` | top level: the three attachments side by side |
| `rtl/me_bram.sv`, `rtl/me_accel.sv`, `rtl/sad_unit.sv` | motion estimation |
| `rtl/dither_accel.sv`, `rtl/dither_core.sv` | dithering |
| `rtl/acc_framework.sv`, `rtl/fw_ctrl.sv`, `rtl/dma_ctrl.sv`, `rtl/acc_in_buf.sv`, `rtl/acc_out_buf.sv`, `rtl/frame_switch.sv`, `rtl/dct_frame.sv`, `rtl/quant_frame.sv` | switchable framework and its two frames |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/osif_ref_pkg.sv` | reference models: dithering, floating-point DCT, quantiser, full-search SAD |
| `tb/sys_mem_model.sv` | system memory with random latency, the DMA engine's burst target |

Everything runs on one clock per attachment. The OCM side has `ocm_clk`. The PLB and DCR side has
`plb_clk`, which is 100 MHz in the system this models. There are no clock-domain crossings in the
RTL.

## Bus ports

The real buses (PLB, OCM, DCR) are not modelled. Every bus-facing port uses one of three simple
protocols. To attach the design to a real bus, write a small bridge for each port.

* **Register slave** (`dith_*`, `dma_*`, and `s_*` on the sub-blocks). The master holds `req`,
  `rnw`, `addr` (byte offset) and `wdata` until the slave returns `ack` for one cycle. Read data is
  valid in the `ack` cycle. Both slaves answer in the cycle after the request.
* **Burst master** (`m_*`). The DMA holds `m_req`, `m_rnw`, `m_addr` and `m_beats` (64-bit beats)
  until `m_addr_ack`. A read then returns `m_beats` beats, each marked by `m_rd_valid`. A write
  hands over `m_wdata`, and the memory takes it in every cycle where `m_wr_ack` is high. The memory
  may insert any number of idle cycles.
* **DCR slave** (`dcr_*`). `dcr_read` or `dcr_write` is held with `dcr_addr` until a one-cycle
  `dcr_ack`. An address outside the block's three registers gets no acknowledge, so another DCR
  device can answer it.

## Motion estimation

### Memory layout

The RAM holds 512 words of 32 bits. The CPU port has byte enables, and the accelerator writes whole
words. Pixels are 8 bits, four to a word, with the first pixel in bits 31:24 (big-endian, as on the
PowerPC).

| Words | Contents |
|---|---|
| 0..63 | current macroblock, 256 pixels, row-major |
| 64..304 | search area, 961 pixels, row-major 31x31, padded to whole words |
| 510 | control: bit 0 *ready* (CPU writes 1), bit 1 *done* (accelerator writes 2) |
| 511 | result: `{mv_x[7:0], mv_y[7:0], sad[15:0]}`, motion vector in two's complement |

A call goes like this:

1. The CPU writes the pixels.
2. The CPU writes 1 to word 510.
3. The CPU polls word 510 until it reads 2.
4. The CPU reads word 511.

### How the accelerator computes

`me_accel` polls word 510 through its own RAM port. When it sees *ready*, it takes three phases.

1. **Load.** It reads the 305 data words, one per cycle, into two shift arrays: 256 macroblock
   pixels and 964 search-area pixels.
2. **Compute.** There are 256 `sad_unit` instances, one for each candidate position (dx, dy) with
   0 <= dx, dy <= 15. Each unit adds one absolute difference per cycle. In cycle *c* every unit
   handles the macroblock pixel at row *r* = c / 16, column *k* = c mod 16. Unit (dx, dy) compares
   it with search-area pixel (r + dy, k + dx). Every unit needs a different pixel each cycle, so
   they do not share one. Instead, each unit reads through a 16-to-1 multiplexer indexed by *k* from
   a fixed window of the search-area array. After every macroblock row, the search-area array is
   rotated by one row of 31 pixels. That way the window always starts at row *r*. The whole
   compute phase takes 256 cycles.
3. **Scan.** The 256 sums are compared one per cycle to find the minimum. In a tie the lowest dy,
   then the lowest dx, wins: only a strictly smaller SAD replaces the current best.

It then writes the result to 511 and the value 2 to 510. After the done write, it skips two poll
reads. The write is registered, so without the skip it would read back its own stale *ready*.

**Motion vector convention.** Position (dx, dy) reports as (dx - 8, dy - 8). A 16-pixel block has
no exact centre in a 31-pixel area. The choice made here is that (0, 0) sits at search-area offset
(8, 8), and vectors run from -8 to +7.

**Timing.** From the CPU's *ready* write to the *done* write takes 822 `ocm_clk` cycles:
305 load, 256 compute, 256 scan, plus a few cycles of poll and write. The testbench checks this
number.

**Size.** The 256 parallel units and the 1220 pixel registers make this the largest module by far.
A build in `verilator` takes one to three minutes.

## Dithering

The job is to turn 32-bit decoder samples (28 fraction bits) into 16-bit audio without adding
correlated truncation noise. `dither_core` does this with the linear dither of the MAD MP3 decoder:

* An error-feedback filter adds `e0 - e1 + e2` of the previous quantisation errors to the sample.
* A linear congruential generator, `r' = r * 0x0019660D + 0x3C6EF35F`, supplies uniform noise.
  The difference of two successive values gives a triangular distribution.
* The sample is clipped to [-1.0, 1.0) in Q28, and the low 13 bits are dropped.
* The error of this sample is stored for the next one.

`dither_accel` holds two cores, one per stereo channel, and three registers:

| Offset | Access | Contents |
|---|---|---|
| 0x0 | write | left input sample |
| 0x4 | write | right input sample |
| 0x8 | read | `{left[15:0], right[15:0]}` |

A clock enable, one bus cycle in `CLK_DIV` = 4, makes the cores compute at 25 MHz from the
100 MHz bus clock. A core works on a sample at the first enable after the write. The result is
therefore ready within four bus cycles.

There is no busy flag or interlock. This is safe only because a CPU store followed by a load to
the same slave takes more bus cycles than that. The system this was built for needs about 20 CPU
cycles per PLB access, which at 300 MHz is about 7 bus cycles. If you attach this block to a
faster bus, add a valid bit to the output register.

## The switchable framework

### Stream between frames

All frames speak the same stream protocol, the struct `frame_fwd_t` plus a stall wire going
backwards:

```
frame_fwd_t = { valid, addr[5:0], data[15:0] }     stall: 1 bit, receiver -> sender
```

A word moves in a cycle where `valid` is 1 and the receiver's `stall` is 0. The sender must hold
the word until then. `addr` is the element's index, 0..63, in row-major order within the 8x8
block. Frames may reorder elements. Results are written at the address they carry, so the output
buffer is indifferent to order.

### Switch nodes

Each `frame_switch` is combinational.

* With its select bit set, it sends the upstream stream into its frame and the frame's output on
  downstream.
* With the bit clear, it passes upstream straight to downstream. The frame then sees no valid input
  and is stalled at its output.

`frame_sel[i]` controls node *i*:

| Node | Frame |
|---|---|
| 0 | DCT |
| 1 | quantiser |
| 2 | empty; its stream is on the top-level ports `x_o`/`x_stall_i` and `y_i`/`y_stall_o` |

Any subset of the frames can be chained. With all three bits clear, the input buffer is copied
unchanged into the output buffer.

### One block, step by step

1. **DMA in.** Program `SYS` (system byte address), `LOC` (byte offset in the buffer), `LEN`
   (bytes, multiple of 8, at most 128) and `CTRL` = 1. The DMA reads `LEN/8` beats in one burst
   into the input buffer. Wait until `CTRL` reads back `done` (bit 1) with `busy` (bit 0) clear.
2. **Configure and start.** Write the frame selection to DCR `CONFIG` (base + 0), then 1 to DCR
   `START` (base + 1). Both are ignored while a block is in flight.
3. **Stream.** The input buffer sends elements 0..63, one per cycle unless stalled, through the
   chain. The output buffer counts the writes. The 64th write raises `block_done`. That toggles
   bit 0 of DCR `STATUS` (base + 2) and clears `busy` (bit 1).
4. **DMA out.** Program the DMA with `CTRL` = 3 (bit 1: output buffer to memory). The 128 bytes
   are written back in one burst.

The default DCR base is 0x040. Elements are packed four to a 64-bit buffer word, element 0 in bits
63:48.

### DCT frame

`dct_frame` computes the orthonormal 2-D DCT-II of the 8x8 block, rounded to integers and
saturated to 16 bits:

    F(v,u) = 1/4 C(v) C(u) sum_{y,x} f(y,x) cos((2y+1)v pi/16) cos((2x+1)u pi/16),  C(0)=1/sqrt2

It works row by row, then column by column. The cosines are 13-bit fixed point, with
`cos(k pi/16)` taken from a 9-entry table in the package.

1. **Collect.** Incoming elements are written at their address into one of two input banks. When
   all 64 are in, that bank is handed to the row stage and collection moves to the other bank.
2. **Row pass.** Over 64 cycles, eight multipliers form one 1-D coefficient per cycle. The results
   are stored with 2 extra fraction bits.
   The intermediate block buffer also has two banks.
3. **Column pass.** This repeats over the intermediate block with 48-bit sums. The result is
   rounded (shift by 15), saturated, and sent in row-major order, holding under stall.

The first coefficient leaves 65 cycles after the last input. The last one leaves 63 cycles later if
not stalled. With both buffers doubled, the three stages work on three blocks at once. Blocks sent
back to back therefore flow at one element per cycle with no input stall. The input stalls only
when back-pressure at the output has filled both banks. The testbench compares every
coefficient with a floating-point DCT and allows an error of one.

### Quantiser frame

`quant_frame` divides each coefficient by the table entry for its address and rounds half away
from zero:

    q = sign(c) * floor((|c| + Q/2) / Q)

The table is a parameter. It defaults to the JPEG luminance table scaled to quality 75.

The datapath has three parts:

1. An operand stage forms |c| + Q/2.
2. A restoring divider follows, one quotient bit per stage over 17 stages.
3. An output register restores the sign.

The whole pipe advances only when its output is empty or not stalled, so a stall at the output
freezes it. It accepts one element per cycle. The latency is 19 cycles.

### Buffers and DMA

* `acc_in_buf` is 16 x 64 bits. It contains the state machine that streams a block out on `start`.
  Putting the streamer here means any frame, or none, can be first in the chain.
* `acc_out_buf` is 16 x 64 bits. It writes 16-bit lanes at the carried address and never stalls.
  It counts to 64 for `done`, and `start` clears the count.
* `dma_ctrl` has the register slave described above and one burst master. It moves one burst per
  transfer, between system memory and either buffer, selected by `CTRL` bit 1.

## Where this departs from the system it models

* **Frame handshake.** Frames there used an asynchronous handshake. Here one synchronous
  valid/stall handshake is used, because all frames share the bus clock.
* **Streamer location.** The state machine that starts the stream sat in the first accelerator
  there. Here it is in the input buffer.
* **DCT and divider.** Those were vendor IP cores taking one sample per cycle. The DCT here is a
  row-column design of its own with whole-block buffering, and its exact scaling is a choice made
  here. It keeps the one-sample-per-cycle rate.
* **Quantisation table.** It is fixed at elaboration. How the original loaded its table is not
  known.
* **Dithering arithmetic.** It follows the software it replaces (MAD's linear dither), as far as
  that is known here. The software's clipping statistics are not kept.
* **Motion estimation.** The RAM layout, the result format, the vector offset of -8 and the tie
  rule are choices made here. The accelerator's clock is the OCM clock.
* **Outside the design.** The processor, PLB/OCM/DCR/OPB buses, DDR controller and memory, and
  the operating-system drivers are not part of the RTL. The bus ports are the simplified protocols
  described above.
* **Not built.** Two ideas from the original system have no RTL here. One is a dithering frame
  resident in the framework next to the JPEG frames. It was only suggested there, and its 32-bit
  samples do not fit the 16-bit stream. The other is the accelerator reset issued when a driver
  opens the device; here reset is only the `rst_n` pin.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<m>` and stops on a
watchdog if it hangs. With plain `verilator` 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module osif_top_tb \
    rtl/osif_pkg.sv rtl/*.sv tb/osif_ref_pkg.sv tb/sys_mem_model.sv tb/osif_top_tb.sv
./obj_dir/Vosif_top_tb
```

Put `rtl/osif_pkg.sv` first, and `tb/osif_ref_pkg.sv` before any testbench that uses it.
Testbenches draw random stimulus with `$urandom` and do not depend on four-state values.

`osif_top_tb` runs the top at its default sizes. It contains four parts:

* Two motion searches through the OCM port, each against the reference model.
* 300 stereo dither pairs with modelled bus latency, each compared with the software algorithm.
* Several JPEG blocks through the framework, in different chain configurations. These include
  bypass, DCT only, DCT + quantiser, and a pass through the external frame, with random stalls on
  the external frame and random memory latency.
* Counters showing that each mechanism happened. These include bypasses, configuration switches,
  stalls, DMA bursts in each direction, and completed blocks.

It builds and runs in about three minutes, most of it spent compiling the motion estimator.
