# DCTQ: an 8x8 DCT and quantization accelerator for a Wishbone SoC

JPEG compression spends most of its time on the forward discrete cosine
transform (DCT) of 8x8 pixel blocks and on quantizing the 64 coefficients. This
RTL moves that work off the CPU. The accelerator is a 32-bit Wishbone slave.
Software writes a block of 64 pixels, starts the unit, and 51 clocks later reads
back 64 quantized coefficients, ready for entropy coding.

It is built around one idea: a single 1-D eight-point DCT is used twice. First
it transforms the eight rows; a small transpose memory turns the row results
into columns; then the same DCT transforms the columns. A two-lane quantizer
(Q2) divides the results by the JPEG luminance table on their way to the output
memory.

Two smaller, independent designs sit beside the accelerator in the same top
level (`tsea44_top`):

* a 32-bit adder/subtractor;
* a clock-domain-crossing kit: a reset synchronizer per domain, an
  asynchronous FIFO, and a four-phase handshake link.

## Programming model

| byte address (bits [12:11]) | region | access |
|---|---|---|
| `0x0000`-`0x003C` | input RAM, 16 words | write |
| `0x0800`-`0x087C` | output RAM, 32 words | read |
| `0x1000` | csr | read/write |

* **Pixels.** Each pixel is 8 bits (0-255), four to a word, with the first
  pixel in bits [31:24]. Words go in row order: word `2r` holds pixels 0-3 of
  row `r`, and word `2r+1` holds pixels 4-7.
* **csr.** Writing 1 to bit 0 starts a block. While the block runs, bit 0 reads
  1 (busy). Bit 1 (done) is set at the end and cleared by the next start. A
  start written while busy is ignored.
* **Results.** Results are signed 16-bit values, two per word, stored column by
  column. Word `c*4+k` holds `Y[2k][c]` in bits [31:16] and `Y[2k+1][c]` in bits
  [15:0]. `u` (the row index of `Y`) is the vertical frequency and `v = c` the
  horizontal one. Software does the zig-zag reordering.
* **Bus timing.** Every bus access takes two clocks: ack comes one clock after
  the strobe and lasts exactly one clock (see *The ack rule*). Byte selects are
  ignored, so all writes are whole words.

A block therefore costs 16 writes, one start, one or more csr polls and 32
reads, plus 51 clocks of computation.

## Datapath

```
 wb data ─► input BRAM ─32─► word reg ─64─► −128 ─8x12─► ┐
            (sync R/W)                                    mux ─► 1-D DCT ─8x16─┬─► low 12 bits ─► transpose memory ─8x12─┐
                                   ┌──────────────────────┘      (registered)  │                  (sync write,          │
                                   └─────────────────────────────────────────────────────────────  async column read) ◄┘
                                                                               └─► pair select ─32─► Q2 ─32─► output BRAM ─► wb data
                                                                                                                   csr ─┘
```

* **Input RAM** (`bram_dp`, 16 x 32). The bus writes it through port A. The
  sequencer reads it through port B, one word per clock. A register keeps the
  previous word, so every second clock the two words give a full row of eight
  pixels. 128 is subtracted from each pixel, making the samples signed and
  centred on zero.
* **1-D DCT** (`dct_1d`). This is the Loeffler-Ligtenberg-Moschytz flow graph:
  a butterfly, an even half (a four-point DCT with one rotation) and an odd half
  (a rotation network). It costs 11 constant multiplications and 29 additions.
  * It takes eight 12-bit signed inputs and gives eight 16-bit outputs.
  * The outputs are registered when `en` is high.
  * It computes `y[k] = floor(sqrt(2) c(k) Σ x[n] cos((2n+1)kπ/16))` with
    `c(0) = 1/sqrt(2)`. That is the orthonormal DCT scaled by sqrt(8), so two
    passes give exactly 8x the 2-D DCT.
* **Transpose memory** (`transpose_mem`, 8 x 8 x 12 bits).
  * One full row is written per clock (synchronous write).
  * One full column is read combinationally (asynchronous read), like an
    FPGA distributed RAM.
  * 12 bits are enough for row results of 8-bit pixels: the largest is
    |8 x 128| = 1024.
* **Q2** (`q2`). Combinational; quantizes two coefficients per clock.
* **Output RAM** (`bram_dp`, 32 x 32). The quantizer writes it through port A
  and the bus reads it through port B. The read-data mux chooses between this
  RAM and the csr.
* **Control unit** (`dct2_ctrl`). Holds the csr and both memory counters and
  runs the schedule below.

## Schedule (51 clocks)

Clock 0 is the edge on which the start write is taken.

| clocks | what happens |
|---|---|
| 0-15 | input counter reads words 0..15 |
| 2,4,..,16 | row `r = clk/2 - 1` is complete: it is loaded into the DCT |
| 3,5,..,17 | the DCT result of row `r` is written to transpose row `r` |
| 18 | column 0 of the transpose memory is loaded into the DCT |
| 19-50 | for each column `c`: 4 clocks, each quantizing one pair `(2k, 2k+1)` and writing output word `c*4+k`; the 4th clock also loads column `c+1` |
| 51 | done = 1, busy = 0 |

The DCT output register holds a column for the four quantizer clocks. The next
column is loaded on the edge that ends the fourth clock, so the column pass has
no idle clocks.

## Numbers: scaling, truncation and rounding

* **Row pass.** Results are truncated toward minus infinity, and only the low
  12 bits go to the transpose memory.
* **Column pass.** Truncated the same way. This gives `B = 8 x DCT2(p - 128)`.
* **Quantization.** Q2 computes `Y = round(B / (4 Q[u][v]))`, with halves
  rounded away from zero. The factor 4 is 8 (from the two passes) times a
  quality factor of 1/2. `Q` is the standard JPEG luminance table, kept in
  `jpeg_pkg::QTAB`.
* **No divider.** Q2 evaluates `floor((2|B| + D) / (2D))`, with `D = 4Q`, as a
  multiplication by `R = ceil(2^27 / 2D)` followed by a 27-bit shift. A
  generate loop works out the 64 reciprocals at elaboration. With 27 bits the
  result is exact for every 16-bit `B` and every table entry.
* **Fixed-point error.** The DCT constants have 13 fractional bits
  (`CONST_BITS`). `y[0]` and `y[4]` are exact. The other outputs can land one
  below the exact floor when the true value is within about 10^-3 of an
  integer.
  * Over random 12-bit vectors, every output is within one of the
    real-arithmetic result.
  * Over 40 random and structured blocks, 2559 of 2560 quantized coefficients
    were bit-exact against a real-arithmetic model; the last was off by one.

Reference test block: pixels 1, 2, ..., 64 in row order.

* After the row pass, every row is `-988+64r, -19, 0, -2, 0, -1, 0, -1`.
* The final nonzero outputs are `Y[0][0] = -96`, `Y[0][1] = -3`,
  `Y[1][0] = -24` and `Y[3][0] = -2`.

The testbenches check this block exactly.

## The ack rule

`wb_ctrl` registers `ack <= stb & cyc & !ack`. Ack rises one clock after the
strobe and falls on the next clock, which is the clock on which the master
drops the strobe.

The obvious alternative, `ack <= stb & cyc`, leaves ack high for one clock
after the strobe ends. A master that starts a new cycle immediately would then
take that stale ack as the end of its next transfer. An assertion in `wb_ctrl`,
and one in the testbench interface `wishbone_if`, check that ack is never held
longer than one clock and never appears without a strobe.

## Clock-domain crossing parts

* **`reset_sync`.** Each clock domain needs its own reset, applied
  asynchronously and released on that domain's clock. The output rises as soon
  as the reset input does, and falls on the second rising clock edge after the
  input falls.
* **`async_fifo`** (16 x 32 by default).
  * A write counter in the write domain and a read counter in the read domain
    each carry one extra wrap bit.
  * They cross to the other side in Gray code through two-flop synchronizers
    (`sync_2ff`).
  * `full` and `empty` are pessimistic for a few clocks after the other side
    moves, but never wrong.
  * `data_out` shows the oldest word whenever `empty` is low (first-word
    fall-through).
* **`handshake_sync`.** A four-phase req/ack protocol for occasional single
  words. The source holds the word in a register and raises `req`. The
  destination sees the synchronized `req`, copies the stable word, pulses
  `valid` for one clock and raises `ack`. The source waits for `ack` to return
  and fall before it is ready again (`busy` low). Only `req` and `ack` are
  synchronized; the data bus is sampled only while it cannot change.

In `tsea44_top`, both crossing parts go from domain A (`cdc_aclk`) to domain B
(`cdc_bclk`). Both domains take their resets from one asynchronous input
through a `reset_sync` each.

## Adder/subtractor

`addsub32` computes `s = a + b` when `sub = 0`, and `s = a - b` when
`sub = 1`, modulo 2^32. One adder does both: it adds `b` XOR `sub`, with `sub`
as the carry-in.

## Files

| file | contents |
|---|---|
| `rtl/jpeg_pkg.sv` | widths, types, address map, csr bits, quantization table |
| `rtl/dctq_accel.sv` | accelerator: datapath and bus decode |
| `rtl/dct2_ctrl.sv` | csr and sequencer |
| `rtl/dct_1d.sv` | 1-D DCT |
| `rtl/transpose_mem.sv` | 8x8 transpose memory |
| `rtl/q2.sv` | two-lane quantizer |
| `rtl/bram_dp.sv` | dual-port synchronous RAM |
| `rtl/wb_ctrl.sv` | Wishbone ack generator |
| `rtl/addsub32.sv` | adder/subtractor |
| `rtl/reset_sync.sv`, `rtl/sync_2ff.sv`, `rtl/async_fifo.sv`, `rtl/handshake_sync.sv` | clock-domain crossing |
| `rtl/tsea44_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_tsea44_top` is the end-to-end test |
| `tb/wishbone_if.sv`, `tb/wb_master.sv` | bus interface and bus-functional master (single read/write transfers) |
| `tb/dct_ref.sv` | real-arithmetic reference model of row DCT, column DCT and quantization |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5, run from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/jpeg_pkg.sv tb/dct_ref.sv tb/tb_tsea44_top.sv --top-module tb_tsea44_top -o sim
./obj_dir/sim
```

* The same command works for any other testbench; replace both names.
* `tb/dct_ref.sv` is only needed by `tb_dctq_accel` and `tb_tsea44_top`.
* `tb_tsea44_top` runs the top at its default parameters. It transforms six
  blocks (including the reference block and a block started twice), runs 400
  add/sub operations, fills and drains the FIFO, streams about a thousand words
  through it and sends 50 words over the handshake.
* It counts every mechanism: row loads, column loads, quantized pairs, busy
  polls, ignored starts, add, sub, FIFO full, FIFO empty, FIFO words, handshake
  words and reset releases. It fails if any of them never happened.
* The whole run takes a few seconds.

## What follows the lab architecture and what is this design's own

**Follows the architecture.** The overall structure:

* input and output block RAMs with counters, read-synchronous as FPGA block
  RAMs are;
* one 12-bit-in/16-bit-out DCT used for rows and columns;
* a 12-bit transpose memory with synchronous row write and asynchronous column
  read;
* a quantizer on 32-bit (two-coefficient) words;
* a control unit with a csr;
* the single-clock ack;
* subtracting 128 from each pixel;
* the sqrt(8) scaling with truncation, and division by the luminance table with
  quality factor 1/2.

**Own choices.** The parts the architecture leaves open:

* the address map, csr bits, pixel byte order and column-major output order;
* the pass schedule and the 51-clock latency;
* the DCT's fixed-point precision and its output register with enable;
* the exact reciprocal quantizer;
* RAM depths and read-first behaviour;
* all reset behaviour;
* the whole inner design of the clock-crossing parts.

**Known departures and omissions.**

* The input RAM is read through one port, one word per clock, so a row takes
  two clocks. Reading eight pixels per clock through both ports would shorten
  the row pass to about 9 clocks; it is not done.
* The input RAM is an addressed memory, not a FIFO.
* The output is not in zig-zag order.
* Byte selects are ignored.
* Not included: the CPU, the bus interconnect and the memory system around the
  accelerator. There is also no DMA engine and no CPU instruction extension
  for moving blocks, so software (or a testbench) moves every word over the
  bus.
