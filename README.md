# JPEG decompression accelerator: 2D-IDCT and YCbCr-to-RGB peripherals

A baseline JPEG decoder spends most of its time in two loops:

- the inverse discrete cosine transform (IDCT) of every 8x8 coefficient block;
- the per-pixel conversion from YCbCr to RGB.

This design moves both loops out of the processor into two small
memory-mapped peripherals. Everything else stays in software on the
processor: file parsing, Huffman decoding, upsampling and output.

The software talks to the peripherals only through 32-bit registers. There
is no DMA and no shared buffer. The design packs as many values as possible
into each register, so one bus transfer carries two 16-bit coefficients or
four 8-bit samples.

- **IDCT peripheral** (`idct_2d`). The driver writes one row of the
  quantisation table and one row of quantised coefficients at a time. The
  peripheral then:
  - dequantises the row;
  - runs the 8-point 1D-IDCT on it;
  - once all 8 rows are in, transforms the 8 columns;
  - adds the +128 level shift and clamps to 0..255.

  The software polls a DONE register and reads the block back as 8 rows of
  8 bytes.
- **Colour converter** (`colour_converter`). The software writes 4 Y, 4 Cb
  and 4 Cr samples in three registers. It reads back 12 bytes of interleaved
  R,G,B, in the byte order of a decoded scanline, from three more registers.

`jpeg_accel_top` puts both peripherals behind one word-wide register port.
Each peripheral sits in its own 4 KiB page:

| Peripheral | Base address (parameter) |
|---|---|
| IDCT | `IDCT_BASE` = 0xA6E2_0000 |
| Colour converter | `CC_BASE` = 0xA6E3_0000 |

## Files

| File | Contents |
|---|---|
| `rtl/jpeg_pkg.sv` | widths, fixed-point constants, register offsets, `rgb_t`, clamp helpers |
| `rtl/reg_bus_if.sv` | the register-port interface with its handshake assertions |
| `rtl/idct_1d.sv` | 8-point 1D-IDCT, 4-stage pipeline |
| `rtl/dequantizer.sv` | 8 multipliers: coefficient x table entry |
| `rtl/idct_matrix.sv` | 8x8 transpose store (row write, column read/write, row read) |
| `rtl/idct_2d.sv` | IDCT peripheral: registers, sequencing, range limit |
| `rtl/ycc_rgb_pixel.sv` | one-pixel YCbCr-to-RGB conversion with clamping |
| `rtl/colour_converter.sv` | colour peripheral: registers and the 4-pixel sequence |
| `rtl/jpeg_accel_top.sv` | address decode and both peripherals |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## Register maps and the driver sequence

All offsets are 32-bit word offsets from the peripheral base (byte offset
= 4 x word). Packed values put element 0 in the least significant bits.

### IDCT peripheral (22 words)

| Word | Name | Access | Contents |
|---|---|---|---|
| 0..7 | QUANT0..7 | W/R | quantisation entry *i* of the current row, bits 15:0 |
| 8..10 | COEF0..2 | W/R | coefficient pairs {x[2k+1], x[2k]}, 16 bits each |
| 11 | COEF3 | W/R | {x7, x6}; **the write starts the row** |
| 13 | OUT0 | R | output bytes 0..3 of the current output row |
| 14 | OUT1 | R | output bytes 4..7; **the read advances to the next row** |
| 21 | DONE | R | bit 0: all 8 output rows are ready |

Other words inside the 22 read as zero and ignore writes.

For each block the driver does:

```
for r in 0..7:
    write QUANT0..7 with row r of the table    (8 writes; may be skipped if the
                                                 same table row is already loaded)
    write COEF0..3 with row r of coefficients  (4 writes; COEF3 starts the row)
poll DONE until 1
for r in 0..7:
    read OUT0, read OUT1                       (OUT1 moves to the next row)
```

The first row written after DONE starts a new block.

### Colour converter (6 words)

| Word | Name | Bytes 3..0 |
|---|---|---|
| 0 | Y | Y3 Y2 Y1 Y0 |
| 1 | CB | Cb3 Cb2 Cb1 Cb0 |
| 2 | CR | Cr3 Cr2 Cr1 Cr0 (writing it starts the conversion) |
| 3 | RGB0 | R1 B0 G0 R0 |
| 4 | RGB1 | G2 R2 B1 G1 |
| 5 | RGB2 | B3 G3 R3 B2 |

The driver writes Y, CB and CR, then reads RGB0..2. The three reads give
R0 G0 B0 R1 G1 B1 ... B3 in memory order on a little-endian view. There is
no control or status register.

## The IDCT datapath

This is the part that needs the most care. It has four pieces: the
Loeffler flow, the fixed-point scaling, the row/column schedule, and the
resulting accuracy.

### Loeffler 1D-IDCT in four stages (`idct_1d`)

The 8-point IDCT is a Loeffler-style flow graph. It uses butterflies
(a+b, a−b) and three rotators. Each rotator turns a pair (a, b) into
(a·k·cos θ + b·k·sin θ, −a·k·sin θ + b·k·cos θ). The constants carry 8
fraction bits:

| Constant | Value | Meaning |
|---|---|---|
| √2·cos(6π/16), √2·sin(6π/16) | 139, 335 | even-part rotator |
| 1/√2 | 181 | scales x1−x7 and x1+x7 |
| √2·cos(3π/16), √2·sin(3π/16) | 301, 201 | odd-part rotator |
| √2·cos(π/16), √2·sin(π/16) | 355, 71 | odd-part rotator |
| 1/√8 | 91 | output scaling |

Each stage is one register stage:

1. The even-part rotator runs on (x2, x6). The sum and difference of
   x1, x7 are scaled by 1/√2. x0, x4, x3 and x5 are shifted up by 8 bits so
   every term has the same scale.
2. Butterflies:
   - the even part gives e0..e3;
   - the odd part combines x3 and x5 with the scaled x1/x7 terms into
     o4..o7.
3. The two odd rotators, (o4, o7) by 3π/16 and (o5, o6) by π/16. The even
   terms are shifted up by another 8 bits to stay aligned.
4. Final butterflies y[n] = e[n] + o[n] and y[7−n] = e[n] − o[n]. Each
   result is multiplied by 91, shifted right by 24 (floor), and truncated to
   16 bits.

The stage-4 shift removes all 24 fraction bits: 8 from the stage-1
constants, 8 from the stage-3 rotators and 8 from the 1/√8 factor.
Internal words are 28 and 40 bits wide, so nothing wraps before that final
truncation.

The block accepts one vector per clock. The result appears 4 clocks later
(`out_valid`).

### Row pass, transpose, column pass (`idct_2d`)

```
bus ─► QUANT regs ─┐
bus ─► COEF regs ──┴► dequantizer ─► idct_1d ─► idct_matrix (row write)
                                        ▲            │
                                        └─ column ◄──┘  (column read, column write-back)
                                                     │
                               range limit (+128, clamp 0..255) ◄── row read ◄── OUT0/OUT1
```

- **Row phase.** Writing COEF3 feeds the dequantised row into the shared
  1D-IDCT. The last coefficient pair comes straight from the bus in that
  cycle. Four cycles later the row result is written into row *r* of the
  matrix. Rows can follow each other every cycle.
- **Column phase.** After the eighth row result is stored, the block reads
  one column per cycle from the matrix into the same 1D-IDCT. It writes each
  result back into the same column. After 8 + 4 cycles the matrix holds the
  2D result and DONE is set.
- **Output.** OUT0 and OUT1 show the range-limited bytes of the current
  output row. A read of OUT1 steps to the next row.

Intermediate row results are kept as 16-bit integers, with no extra
fraction bits.

### Accuracy

The scaling constant 91/256 is 0.3555, slightly above 1/√8 (0.3536). Add
the floor in each pass, and the output differs from an exact
floating-point IDCT by at most about 3 grey levels in the tests
(`tb_idct_2d` allows 9). For comparison, the reference system's images
scored about 99.4 % against the pure-software decoder's output, with
single bytes off by up to 9 levels.

The testbenches compare against a bit-exact integer model of this
datapath. They also compare against the exact IDCT with the tolerance
above.

### Timing

With one register transfer per clock, a whole block takes **113 cycles**
from its first write to DONE: 96 writes, then the 4-cycle row latency, then
8 + 4 column cycles. The reference system needed 186 clocks per block, bus
overhead included. `tb_idct_2d` checks that a block finishes within 186
cycles.

## The colour converter

The formula is the JFIF one in 16-bit fixed point. Rounding adds 2^15
before the arithmetic shift:

```
R = Y + ((91881·(Cr−128) + 32768) >>> 16)
G = Y + ((32768 − 46802·(Cr−128) − 22554·(Cb−128)) >>> 16)
B = Y + ((116130·(Cb−128) + 32768) >>> 16)
```

Each result is clamped to 0..255. The constants are 1.402, 0.71414,
0.34414 and 1.772 times 2^16.

One converter (`ycc_rgb_pixel`) is shared by the four pixels:

1. The CR write loads the registers.
2. A setup cycle loads pixel 0's operands.
3. Each of the next four cycles stores one pixel's result and loads the
   next.

With Y, CB and CR written on consecutive clocks, the results can be read
on the **9th clock** counted from the Y write. That is the 9-clock figure
of the reference design.

## Handshake and stalls

`reg_bus_if` is a simple request/acknowledge port:

- The master holds `wr` or `rd`, `addr` and `wdata` until `ack`.
- `ack` is combinational.
- A transfer completes on the clock edge where the request and `ack` are
  both high. On a read, `rdata` is valid in that cycle.

Assertions in the interface check two rules: `wr` and `rd` are never high
together, and a stalled request does not change.

Each peripheral stalls in one case:

- **IDCT.** A COEF3 write that would start a row during the column phase
  waits until the column phase is over. A driver may therefore write the
  next block without polling; a polling driver never sees the stall. Every
  other IDCT access is acknowledged at once.
- **Colour converter.** Any access while a conversion runs is stalled. A
  read can never return an old pixel, however fast the master is.

`jpeg_accel_top` adapts a plain byte-addressed port (`bus_wr`, `bus_rd`,
`bus_addr[31:0]`, `bus_wdata`, `bus_rdata`, `bus_ack`) to the two
interfaces:

- It selects a peripheral on `bus_addr[31:12]` and the word on
  `bus_addr[11:2]`.
- Addresses outside both register files are acknowledged at once and
  read zero.
- `bus_addr[1:0]` is unused, since all transfers are whole words.

## Departures from the reference design

- **Bus attachment.** The reference peripherals sat on a processor-local
  bus behind a vendor slave attachment. Here a request/acknowledge port with
  a page decode stands in for the bus. To attach to a real bus, map chip
  select, read/write strobes and acknowledge onto `bus_*`.
- **Pipelined 1D-IDCT.** The 1D-IDCT is a 4-stage pipeline that takes one
  row or column per clock. The reference sequenced one vector at a time
  through a 4-state machine. The arithmetic is the same.
- **Packing.** Packed registers use element 0 in the least significant
  bits. This is the layout of a little-endian C array cast to 32-bit words.
  On a big-endian processor the driver must swap the halves or bytes, or the
  packing must be mirrored.
- **Register count.** Quantisation entries use one register each (8
  registers) and coefficients use four registers. A denser 4 + 2 register
  layout can be described, but it cannot hold eight 16-bit values in two
  32-bit words.
- **Stalls.** Both stall rules above are additions. The reference relied
  on the driver's polling and on the processor being slower than the
  hardware.
- **Restart.** A new IDCT block starts when a row is written after DONE.
  No separate reset write is needed.
- **Not built.** The processor, the memory and its controller, and the
  vendor bus attachment are not part of this RTL. Huffman decoding stays in
  software.

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/jpeg_pkg.sv \
          tb/tb_idct_2d.sv --top-module tb_idct_2d
./obj_dir/Vtb_idct_2d
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each
has a watchdog that counts a failure if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_idct_1d` | random and extreme vectors against a bit-exact model and the exact IDCT; 4-cycle latency; one vector per clock |
| `tb_dequantizer` | products and 16-bit truncation |
| `tb_idct_matrix` | row writes, column reads and write-back, row reads against a reference array |
| `tb_idct_2d` | full register protocol; bit-exact and exact-IDCT comparison; clamping at both ends; readback of the input registers; ≤186 cycles per block; the COEF3 stall |
| `tb_ycc_rgb_pixel` | a large sweep of (Y, Cb, Cr) against the integer formula and against the real-valued formula (±1) |
| `tb_colour_converter` | 9-cycle latency; stalls while busy; clamping; byte order; register readback |
| `tb_jpeg_accel_top` | see below |
| `tb_image_stripes` | one full-width 8-row stripe at each of nine photo sizes (2503 to 5400 px wide, 5 to 20 megapixels); see below |

`tb_jpeg_accel_top` runs the top at its default parameters. It decodes a
16x16 three-channel image:

1. It sends 12 blocks through the IDCT, as the driver would.
2. It converts the result to RGB four pixels at a time.
3. It compares every byte with a software model.

It also counts each mechanism and fails if any count is zero:

- dequantisation;
- overlapped row processing;
- column write-back;
- IDCT clamping at 0 and 255;
- colour clamping at 0 and 255;
- colour-converter stalls;
- IDCT stalls;
- unmapped accesses.

`tb_image_stripes` also uses the top at its default parameters. It works
on widths up to 5400 pixels, as a decoder walks a photograph, with
generated coefficients and the last block column padded:

- It checks every RGB byte against the model.
- It checks that each block reaches DONE within 186 clocks (113 measured).
- It checks that every colour group is readable on the 9th clock.

From the measured clocks it prints the hardware-only time for the whole
image. For a 5400x3744 image (947,700 blocks) this is 0.86 s of IDCT and
0.36 s of colour conversion at 125 MHz. The bus overhead of a real
processor is not included. The testbench takes a few seconds.

To change the fixed-point precision or the constants, edit `jpeg_pkg.sv`.
`idct_1d` takes its shifts from `IDCT_CBITS`, and `ycc_rgb_pixel` takes its
shifts from `CC_FRAC`. The bit-exact models in the testbenches spell the
constants out, so they must be changed to match.
