# Reduced-precision 3x3 convolution engines (linear 8-bit and logarithmic 4-bit)

Convolving an image with a 3x3 kernel costs 9 multiplications and 8 additions
for every output pixel. On a small RISC-V core each of those is a separate
instruction, and every pixel is loaded from memory nine times. This RTL moves
the work into two DMA-driven accelerators that sit on the SoC's AXI crossbar:

* a **linear engine**. It works on ordinary 8-bit grey-scale pixels and has
  signed 8-bit coefficients.
* a **logarithmic engine**. It works on 4-bit base-2 logarithmic codes. An
  image in this form takes half the memory and half the bus traffic.
  Multiplication becomes addition of exponents, so its arithmetic units need
  no multipliers.

Both engines read each pixel from memory once. They keep the two previous image
rows in row buffers and the two previous columns in a shift buffer, and they
produce four result pixels per clock cycle with four arithmetic units (AUs).
The CPU only writes a few configuration registers and a start bit. It then
waits for an interrupt.

The design follows a published pair of engines that were built for the
PULPissimo RISC-V platform. That description gives the system structure: the
blocks, the handshakes, the buses and their widths, the two soft resets, the
four AUs and the three row buffers. It does not give the internals. The number
format, the register map, the AU arrangement and the output layout are
choices made here. They are marked as such below.

## The logarithmic number format

This is the part most worth understanding before reading the RTL.

| code `c` (4 bits) | value      |
|-------------------|------------|
| 0                 | 0          |
| 1 … 9             | 2^(c-1), i.e. 1, 2, 4 … 256 |
| 10 … 15           | not produced by the engine |

An 8-bit value `v` becomes a code in one of two ways:

* `v = 0` gives code 0.
* Otherwise `code = floor(log2 v) + 1`, plus one more if the bit just below
  the leading one is set. So 3 gives code 3 (value 4), 128 gives code 8, and
  192 and 255 give code 9 (value 256).

With this rounding four bits cover the full 0…255 range. Truncating instead
would only need codes up to 8, which is values up to 128. Converting images to
and from this form is the CPU's job (`conv_ref_pkg::lin2log` shows the rule). The
engine reads and writes codes only.

A kernel coefficient for the log engine is a byte of which bits [4:0] are used:
bit 4 is the sign, and bits 3:0 are a code of the same kind. Some examples:

* The edge-detection kernel (8 in the centre, -1 around it) is code 4 in the
  centre and `0x11` around it.
* The 1-2-1 / 2-4-2 / 1-2-1 gaussian kernel is codes 1-2-1 / 2-3-2 / 1-2-1.

Inside `au_log` each tap is handled like this:

* If the pixel or the coefficient is zero, the tap adds nothing.
* Otherwise it adds ±2^((p-1)+(c-1)). This is a 5-bit exponent adder followed
  by a one-hot shifter, with no multiplier.

The nine terms are added exactly in 28-bit two's complement. The sum is then
shifted right by `SHIFT` and clamped to 0…255. Finally it is turned back into a
code with the same rounding rule. The result is again a 4-bit image that
another log-domain stage can consume directly.

The linear AU (`au_linear`) computes the usual `Σ pixel × coef` in 20 bits. It
then applies the same arithmetic right shift and clamps to 0…255.

## Data flow through one engine (`conv_engine`)

```
 AXI4 R ──► in fifo ──► unpack ──► line buffer ──► MAC (shift buffer + 4 AUs) ──► pack ──► result fifo ──► AXI4 W
            (64-bit)    (4 px)     (3 rows x 4 px)   (4 results/cycle)            (64-bit)  (64-bit)
                                                       ▲
                                      kernel buffer ───┘
```

Every arrow is a valid/ready pair. A stall anywhere, such as slow memory, a
crossbar busy with the other engine or a full result fifo, ripples backwards
without losing data.

* **`conv_dma`** reads `W·H·PIX_W/64` words from `SRC`. It uses INCR bursts of
  `BURST` beats, and the last burst is shorter if needed.
  It writes `ceil((W-2)(H-2)·PIX_W/64)` words to `DST`. A write burst is only
  requested once the result fifo already holds all of its beats, so an engine
  never holds the shared write channel while it waits for its own pipeline.
  Each direction has one burst in flight, and the two directions run at the
  same time.
* **`conv_unpack`** turns a 64-bit word into groups of four adjacent pixels.
  Pixel `i` of a word is at bits `[i·PIX_W +: PIX_W]`. A linear word gives two
  groups and a log word gives four.
* **`line_buffer`** has three row buffers of `MAX_W/4` groups each, and they
  rotate. Row `r` is written into buffer `r mod 3`, and the other two hold rows
  `r-1` and `r-2`. From row 2 on, every arriving group leaves together with the
  same columns of the two rows above, as a 3 × 4 block. Rows are never copied
  between buffers. In the log engine each buffer is half as wide in bits.
* **`conv_mac`** appends the block to the two columns it kept from the
  previous block, which gives six columns. AU `k` takes the 3×3 window that
  starts at column `k`. The first block of a row has no valid left neighbours,
  so only AUs 2 and 3 produce results there. `out_n` then says 2 instead of 4,
  and those results are moved to the low slots.
* **`conv_pack`** collects 2 or 4 results per cycle into 64-bit words. The final
  word of an image is padded with zero pixels.
* **`kernel_buffer`** holds the nine coefficients. Coefficient `k = 3·row + col`
  multiplies window row `row` (0 = top) and column `col` (0 = left). No kernel
  flip is applied. `valid` rises once all nine are written, and the kernel is
  then locked until the kernel soft reset.

The output is the "valid" convolution. An H×W image gives (H-2)×(W-2)
results, stored contiguously in raster order from `DST`. There is no border
padding.

Throughput is one 4-pixel group per cycle, so a 64×64 image needs about 1024
cycles of compute. Memory traffic overlaps with it.

## Programming an engine (`conv_cfg_regs`)

The registers are 32 bits wide, on AXI4-Lite. Offsets are given within the
engine's 256-byte window.

| offset | name | access | meaning |
|--------|------|--------|---------|
| 0x00 | CTRL | W | bit0 start, bit1 engine soft reset, bit2 kernel soft reset (one-cycle pulses) |
| 0x04 | STATUS | R | bit0 busy, bit1 done, bit2 error, bit3 kernel valid |
| 0x08 | SRC | R/W | byte address of the source image (8-byte aligned) |
| 0x0C | DST | R/W | byte address for the result (8-byte aligned) |
| 0x10 | WIDTH | R/W | image width in pixels |
| 0x14 | HEIGHT | R/W | image height in pixels |
| 0x18 | BURST | R/W | AXI burst length in beats, 1…16 (the fifo depth) |
| 0x1C | SHIFT | R/W | arithmetic right shift applied to each sum (4 for the gaussian kernel) |
| 0x20+4i | KERNEL[i] | W | coefficient i, i = 0…8 |

Other offsets answer SLVERR.

To run an image:

1. Write the nine coefficients.
2. Write the addresses, the size, the burst length and the shift.
3. Write CTRL = 1.
4. Wait for the engine's interrupt (`irq_o = done | error`), then read STATUS.

A start is refused, with error set and nothing moved, in any of these cases:

* The width is not a multiple of 4 or is larger than `MAX_W`.
* The width or height is below 3.
* The image is not a whole number of 64-bit words.
* BURST is 0 or larger than the fifo depth.
* The kernel is not complete.

If any AXI response is not OKAY, the engine still finishes the transfer, so
that no burst is left open on the shared bus. It then reports error instead of
done.

The two soft resets are separate. The engine reset (CTRL bit 1) clears the
datapath and the status but keeps the kernel. The same kernel can therefore be
applied to many images without being reloaded. The kernel reset (CTRL bit 2)
clears only the kernel. The engine reset is meant for an idle or finished
engine. Applied in the middle of a run, it abandons the bursts in flight.

## The system: `conv_accel_top` and `conv_xbar`

`conv_accel_top` holds:

* engine 0, the linear engine
* engine 1, the logarithmic engine
* the crossbar, `conv_xbar`

Its ports are one AXI4-Lite slave port for the CPU (32-bit data), one AXI4
master port to memory (64-bit data) and two interrupt lines. The bundles are
packed structs from `conv_pkg`.

The crossbar works in two directions:

* **CPU to engines.** The crossbar routes by address bit 8: 0x000–0x0FF go to
  engine 0 and 0x100–0x1FF to engine 1. One read and one write are in flight
  at a time.
* **Engines to memory.** Read and write channels are arbitrated separately,
  round-robin. The winner keeps the read channel until RLAST, or the write
  channel until the B response. With one burst per direction in flight, no AXI
  IDs are needed.

Both engines can run at the same time, and their bursts interleave at the
memory port.

The CPU's own path to memory goes through the rest of the SoC and is not
modelled here. The same holds for the RISC-V core, the memory banks and the
platform peripherals. The testbenches use a bus-functional CPU
(`tb/axil_master_bfm.sv`) and an AXI4 memory model (`tb/axi_mem_model.sv`).

## Performance

The cycles below are counted from the start write to the interrupt, with a
zero-wait memory and one engine active (`tb_paper_workloads`). The reported
figures are the whole-run counts published for the original engines, including
60–90 cycles of CPU configuration.

| image | linear, this RTL | linear, reported | log, this RTL | log, reported |
|-------|-----------------:|-----------------:|--------------:|--------------:|
| 8×8   | 35   | 176–185 | –    | –    |
| 16×16 | 89   | 262–337 | 91   | 197  |
| 32×32 | 301  | 717–737 | 279  | 473  |
| 64×64 | 1115 | 2117–2568 | 1057 | 1578 |

This RTL is compute-bound at one 4-pixel group per cycle. The log engine's
advantage therefore shows mostly as halved memory traffic and bus occupancy,
not as fewer cycles. The original engines were reported to need about a
third fewer cycles in the log domain, which points to data movement as their
limit. When memory is the limit here too, the same picture appears. On a
memory that withholds each handshake 70 % of the time, a 64×64 image takes
2050 cycles on the linear engine and 1206 on the log engine, 42 % fewer
(part 3 of `tb_paper_workloads`).

## Parameters and limits

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `NUM_AU` | 4 | top, engine, MAC | arithmetic units = results per cycle (the width must be a multiple of it) |
| `MAX_W` | 64 | top, engine, line buffer | longest row the row buffers hold |
| `FIFO_DEPTH` | 16 | top, engine | depth of the in and result fifos, and the largest burst |
| `LOG_DOMAIN` | 0 | engine, MAC | 0 = linear 8-bit engine, 1 = logarithmic 4-bit engine |

Further limits:

* An image may have at most 65535 words.
* Addresses must be 8-byte aligned.
* Bursts are not split at 4 KB boundaries, so buffers must not cross one
  within a burst.
* Wider images, such as the 320-pixel-wide photographs used for the quality
  study of the number format, need `MAX_W` raised to their width.

## Departures and open points

* These are choices made here, not given by the original description:
  * the log code and its rounding
  * the coefficient formats
  * the shift-and-clamp output stage
  * the valid-only (unpadded) output
  * the pixel packing order
  * the register map and the error rules
  * the column-parallel use of the four AUs
  * the DMA burst policy
  * the crossbar's locking arbitration
  * the unpack and pack stages between the 64-bit fifos and the 4-pixel
    datapath
  * a full valid/ready pair between the line buffer and the MAC
* The original engines were attached through PULPissimo's hardware-processing
  -engine slot. Here they are plain AXI4/AXI4-Lite blocks. Wrapping them for a
  particular SoC is left to the integrator.
* The row buffers are part of `line_buffer`. The original kept them outside
  the engine's cell count, and `line_buffer` can likewise be hardened
  separately as a small memory.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/conv_ref_pkg.sv`, which does the arithmetic independently with plain
integer products and powers of two.

| testbench | covers |
|-----------|--------|
| `tb_sync_fifo` | random traffic against a queue, fill level, clear |
| `tb_kernel_buffer` | random load order, valid only after nine taps, lock, kernel reset |
| `tb_au_linear`, `tb_au_log` | random windows and the edge and gaussian kernels against the reference; code conversion points |
| `tb_line_buffer` | several image sizes under back-pressure, every 3-row block, first and last flags |
| `tb_conv_mac` | linear and log MACs on random strips, the 2-result first block, stall without a kernel |
| `tb_conv_cfg_regs` | every register, control pulses, kernel strobes, SLVERR |
| `tb_conv_dma` | bursts and short last bursts, data order, write-burst-only-when-buffered, bus error, on a stalling memory |
| `tb_conv_xbar` | CPU routing, two DMAs at once through one memory port, arbitration |
| `tb_conv_engine` | both engine types: several sizes and bursts, kernel reuse across engine resets, refused starts, stalling memory, 64×64 cycle bound |
| `tb_conv_accel_top` | whole design at default parameters: both engines on 64×64 images at once, kernel reuse, stalls, short bursts, partial last word, refused start, bus error and recovery; each mechanism is counted |
| `tb_paper_workloads` | all evaluated image sizes with cycle counts; the edge and gaussian kernels on a 64×48 scene in both domains; linear against log on a slow memory |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/conv_pkg.sv tb/conv_ref_pkg.sv tb/tb_conv_accel_top.sv \
  --top-module tb_conv_accel_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Substitute any other `tb_*.sv` file. Every testbench finishes in well under a
second. `--assert` switches on the assertions in the FIFO (no overflow), the
DMA (AXI address held until accepted) and the crossbar (responses only for the
master that owns a channel, forwarded address held). They are then checked in
every simulation.

To lint the design:

```
verilator --lint-only -Wall -Irtl rtl/conv_pkg.sv rtl/conv_accel_top.sv
```

The remaining lint warnings are stylistic:

* unused package constants
* intentionally open output pins (`count_o` of the in fifo, `ready_o` of the
  kernel buffer, `out_last` of the packer)
* `SYNCASYNCNET`, because the assertions in the FIFO and the DMA sample the
  asynchronous reset
