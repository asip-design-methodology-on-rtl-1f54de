# JPEG encoder ASIP engine

A small 4-stage RISC processor spends about 200 clocks per pixel when it
encodes a JPEG picture in software. Nearly all of that time goes into four
kernels: RGB-to-YCbCr conversion with 4:2:0 chroma subsampling, the 8x8
forward DCT, quantization, and Huffman coding. This design moves those four
kernels into an engine that sits beside the ALU in the processor's execute
stage and is driven by custom instructions. Each kernel runs at roughly one
data item per clock:

| kernel | rate | where |
|---|---|---|
| colour conversion, 4:2:0 | 1 RGB pixel per clock | `jpg_color_conv` |
| 2-D 8x8 DCT | 16 clocks per block (one row or column per clock) | `jpg_dct_engine`, `jpg_dct8` |
| quantization | 1 clock per coefficient, more for rare large quotients | `jpg_quant` |
| Huffman coding | 1 clock per code word, byte-wide output | `jpg_huff` |

Encoding a 1600 x 1200 picture takes 5.92 million clocks (3.08 clocks per
pixel) in simulation of the engine alone. The original ASIP was reported at
3.356 clocks per pixel for the complete processor plus engine, against
199.65 clocks per pixel in software.

The design follows the JPEG encoder ASIP presented in "ASIP Design
Methodology on C2RTL Framework" (T. Isshiki, MPSoC 2016). That
presentation describes the engine's kernels, their rates and the processor
pipeline. It does not give the processor's instruction set. Everything here
is plain SystemVerilog, written from that description.

## Data flow

```
 pixels (RGB, raster order inside a 16x16 MCU)
   |
 in-FIFO (sync_fifo, 24 bit)
   |  CMD_COLOR_MCU: 256 pixels, 1 per clock
 jpg_color_conv --- Y: four 8x8 blocks, Cb/Cr: 2x2 sums (4:2:0)
   |  8 samples per clock, level-shifted by -128
 jpg_dct_engine --- one jpg_dct8 shared by rows and columns, 64 x 14-bit array
   |  coefficients read in zig-zag order
 jpg_quant      --- 1-clock small quotients / 3-bit-per-clock long division,
   |                zero-run counter
   |  events {DC | run+value | end-of-block}, valid/ready
 jpg_huff       --- DC prediction, run/size symbols, ZRL, bit packer,
   |                0xFF -> 0xFF 0x00 stuffing
 out-FIFO (sync_fifo, 8 bit) ---> bytes of the entropy-coded segment
```

The processor issues one command per custom instruction (`jpeg_asip`
command port). A command that takes several clocks holds `cmd_ready` low,
and that stalls the processor's fetch stage. This is how custom instructions
of different lengths fit into the pipeline. Software encodes one MCU as:

```
CMD_COLOR_MCU            ; 256 pixels -> YCbCr block memory
CMD_ENCODE 0 .. 5        ; Y0 Y1 Y2 Y3 Cb Cr: DCT + quantize + Huffman
...                      ; next MCU
CMD_FLUSH                ; after the last MCU: pad to a byte boundary
```

Tables are loaded first with `CMD_SET_QTAB` / `CMD_SET_HTAB`, and
`CMD_RESET_DC` starts a scan. The Huffman coder keeps draining into the
out-FIFO by itself. A full out-FIFO stops the bit packer. The bit packer then
stops taking code words, which stalls the quantizer and so the `ENCODE`
command.

### Command encoding (`jpg_pkg::jpg_cmd_e`)

| `cmd_op` | `cmd_arg` | clocks |
|---|---|---|
| `CMD_COLOR_MCU` (0) | unused | at least 256 (one pixel per clock), plus command overhead |
| `CMD_ENCODE` (1) | `[2:0]` block: 0-3 Y (TL, TR, BL, BR), 4 Cb, 5 Cr | 16 + 64 + long divisions + out-FIFO stalls + ~3 |
| `CMD_FLUSH` (2) | unused | until fewer than 8 bits remain |
| `CMD_SET_QTAB` (3) | `[14]` table (0 luma, 1 chroma), `[13:8]` zig-zag index, `[7:0]` divisor (1..255) | 1 |
| `CMD_SET_HTAB` (4) | `[30]` AC, `[29]` chroma, `[28:21]` symbol, `[20:16]` code length 1..16, `[15:0]` code, right-aligned | 1 |
| `CMD_RESET_DC` (5) | unused | 1 |

The output is the entropy-coded data only. JPEG markers and headers
(SOI, DQT, DHT, SOF0, SOS, EOI) are left to software, and so is a picture
whose size is not a multiple of 16 (the pixel source must replicate edges).

## The single-clock 8-point DCT (`jpg_dct8`)

The 2-D DCT is computed as rows, then columns, with a single 1-D unit.
Clocks 0-7 of a block transform rows, and clocks 8-15 transform columns. The
1-D unit is the well-known accurate integer factorisation of the 8-point DCT,
laid out as one combinational network:

* a first butterfly: sums `t0..t3` and differences `t4..t7` of mirrored
  inputs;
* even part: outputs 0 and 4 are sums and differences of `t0+t3` and
  `t1+t2`. Outputs 2 and 6 use one shared product,
  `(t12+t13)*0.541196100`, plus one further product each;
* odd part: nine products of the differences with the constants 0.298631336,
  2.053119869, 3.072711026, 1.501321110, -0.899976223, -2.562915447,
  -1.961570560, -0.390180644 and 1.175875602.

That makes twelve constant multiplies and 32 additions. Each constant is
scaled by 2^13 (`CONST_BITS`) and rounded. The multiplies are written as
`*` by constants, and synthesis reduces them to shift-and-add trees.

The horizontal and vertical passes need different scaling. They share the
hardware through the `dir` input:

| output | `dir = 0` (rows) | `dir = 1` (columns) |
|---|---|---|
| 0, 4 | `sum << 2` | `round(sum / 4)` |
| 1, 2, 3, 5, 6, 7 | `round(x / 2^11)` | `round(x / 2^15)` |

After both passes a coefficient equals 8 times the orthonormal 2-D DCT. The
quantizer's divisor is scaled by 8 to match. With 8-bit level-shifted
samples, the row results and the final coefficients both fit in 14 signed
bits. The engine therefore keeps a single 64 x 14-bit register array
(`jpg_dct_engine`):

* rows are written into it;
* columns are read back out, transformed and written back in place;
* the quantizer then reads the result through a zig-zag address map.

The zig-zag order is generated by a constant function in `jpg_pkg`, not
stored as a table.

## Quantization without a divider (`jpg_quant`)

Each coefficient `c` is divided by `qv = 8 * divisor` and rounded to
nearest: `qc = (|c| + 4*divisor) / qv`, then given the sign of `c`.

* **State 0, one clock.** `r = |c| + 4*divisor` is compared at once with
  `qv, 2qv, ..., 8qv`. If `r < 8qv` the quotient, 0 to 7, is the number of
  comparisons that pass. With typical tables about 98% of coefficients end
  here, most of them with a quotient of 0.
* **State 1, long division.** If `r >= 8qv`, a restoring division runs
  instead. Each step shifts one dividend bit into the partial remainder,
  subtracts `qv`, and keeps the difference if it is not negative. The step
  is replicated `DIV_ITR = 3` times in the combinational path, so three
  quotient bits are produced per clock. Before starting, the dividend (15
  bits) is shifted left past its leading zeros. Only its significant bits,
  at most 14, are iterated, so a large coefficient costs 1 + ceil(bits/3)
  clocks, at most 6.

A block therefore takes exactly `64 + sum ceil(bits/3)` clocks when the
Huffman coder keeps up. The test bench checks that count.

A 6-bit counter counts zero AC coefficients. Zeros produce no output. The
quantizer sends the Huffman coder only the DC value, each non-zero AC value
with its preceding zero run, and an end-of-block marker when coefficient 63
is zero. An event is held stable until it is accepted (an assertion checks
this).

## Entropy coding and bit packing (`jpg_huff`)

Per clock, one event becomes one baseline-JPEG code word:

* **DC:** the difference to the previous DC of the same component (three
  predictors, cleared by `CMD_RESET_DC`) is coded as its size category,
  followed by the value bits.
* **AC:** the symbol is `{run[3:0], size}`. A run of 16 or more first emits
  ZRL codes (symbol 0xF0), one per clock, while the event is held.
* **EOB:** symbol 0x00 of the AC table.

A size `s` value is sent as `v` if positive and as the low `s` bits of
`v - 1` if negative. Code lengths and codes come from writable tables: two
DC tables of 16 entries and two AC tables of 256 entries, for luma and
chroma. Any Huffman table can be loaded, including the standard ones.

The packer appends up to 27 bits per clock to a 64-bit shift buffer, and
emits its oldest byte whenever 8 bits are present and the out-FIFO has
room. After a 0xFF byte it inserts a 0x00. A new code word is accepted only
while the buffer holds 32 bits or fewer, so the buffer cannot overflow. A
stream of long code words stalls the quantizer until bytes have left.
`CMD_FLUSH` pads with 1 bits to the next byte boundary.

## Colour conversion (`jpg_color_conv`)

Pixels of one 16 x 16 MCU arrive in raster order, one per clock. Y, Cb and
Cr are computed with the JFIF matrix in 16-bit fixed point. Y rounds to
nearest. Cb and Cr use a bias of one half minus one LSB, so they never reach
256. Y goes into four 8x8 blocks. Cb and Cr go into 10-bit accumulators,
one per 2x2 pixel square: the top-left pixel of a square writes its
accumulator and the other three add to it. A chroma sample is read as the
rounded mean `(sum + 2) >> 2`. The read port returns a whole 8-sample row
of any of the six blocks in the same clock, minus 128, ready for the DCT.

## Base-processor parts

The engine belongs to a 4-stage (FE, DC, EX, WB) RISC core. The parts of
that core whose structure is known are included:

* `tct_fetch`, the fetch stage. The next pc is the branch target when a
  branch is taken, else `nxt_pc`. Program memory is read at `pc >> 2` with a
  registered read. `cur_pc` and `nxt_pc = pc + 4` load only while the stage
  is not stalled. In the DC stage, `ir` takes the new memory word if the
  previous clock was not stalled, else `ir_prev`, the instruction held from
  the clock before. The instruction in DC is therefore kept through a stall,
  while the memory already reads the next address.
* `tct_regfile`: 32 (or 16) registers of 32 bits, two read ports and one
  write port.
* `tct_dmem`: a 32-bit data memory with a registered read.

The decoder (which includes the zero-overhead-loop control and exception
detection), the ALU with its divider and I/O FSMs, the per-stage pipeline
control, forwarding and write-back selection are **not** included. Their
behaviour depends on an instruction set that is not available. In
`jpeg_asip` their connections are top-level ports: branch inputs,
`pipe_stall`, the fetched instruction, and the register-file, data-memory
and command ports.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `jpeg_asip` | `IN_FIFO_DEPTH`, `OUT_FIFO_DEPTH` | 16, 16 | FIFO depths (power of two) |
| | `DIV_ITR` | 3 | long-division bits per clock |
| | `PM_SIZE`, `DM_SIZE` | 4096, 4096 | program and data memory words |
| | `GPR_COUNT` | 32 | 32 or 16 registers |
| `jpg_pkg` | `COEF_W`, `CONST_BITS`, `PASS1_BITS` | 14, 13, 2 | DCT word width and scaling |

## What follows the original and what is this design's own

Taken from the original description:

* the four kernels and their rates;
* the DCT structure, with shared H/V hardware and merged scaling;
* the 64 x 14-bit coefficient array read in zig-zag order;
* the two-state quantizer: comparisons for quotients below 8, a bit-serial
  restoring division at three bits per clock, the rounding offset
  `4*divisor` and the divisor `8*divisor`;
* a Huffman bit packer with byte-wide FIFO output;
* the in-FIFO and out-FIFO;
* the fetch-stage datapath and the register-file sizes.

This design's own choices:

* the command port and its encoding, and the one-block-per-command
  sequencing;
* the MCU-based colour memory;
* the fixed-point colour weights and the 2x2 mean filter;
* the leading-zero normalisation before the long division;
* the quantizer-to-coder event format;
* writable Huffman tables, the 64-bit bit buffer and its 32-bit
  acceptance threshold;
* all FIFO and memory sizes and all handshakes.

The DCT scaling constants (`CONST_BITS = 13`, the two-bit intermediate
scaling) and the JPEG entropy-coding rules (DC prediction, ZRL, EOB,
stuffing, 1-padding) are the standard ones of JPEG baseline coding.

Known limits:

* Edge replication for pictures whose size is not a multiple of 16 is not
  in hardware.
* Restart markers are not supported.
* Colour conversion of the next MCU does not overlap with coding of the
  current one, because the engine runs one command at a time.

## Verification

Each module has a self-checking test bench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| test bench | what it checks |
|---|---|
| `tb_jpg_dct8` | 400 random vectors and extreme inputs, both directions, against a floating-point DCT (within 2) |
| `tb_jpg_dct_engine` | random, smooth and extreme blocks against a floating-point 2-D DCT read in zig-zag order; busy for exactly 16 clocks |
| `tb_jpg_quant` | every event against reference division; exact clock count per block including long divisions; random backpressure |
| `tb_jpg_huff` | byte stream against a reference packer (DC prediction, ZRL, EOB, stuffing, padding) with random output stalls; 64 short code words in 64 clocks |
| `tb_jpg_color_conv` | all six blocks of random and saturating MCUs against floating-point conversion (within 1); 256 pixels in 256 clocks |
| `tb_sync_fifo`, `tb_tct_regfile`, `tb_tct_dmem` | against queue and array models |
| `tb_tct_fetch` | `ir` is the word at `cur_pc` through random stalls and branches |
| `tb_jpeg_asip` | end to end at default parameters: 3 MCUs with random pixel gaps and out-FIFO stalls, byte-exact against a bit-exact reference encoder; counts that in-FIFO underrun, out-FIFO full, long division, ZRL, EOB, stuffing, coder stall, pipeline stall and a branch all occur |
| `tb_jpeg_workload` | a full 1600 x 1200 picture, byte-exact, and reports clocks per pixel (about 15 s) |

Run any of them with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/jpg_pkg.sv \
          tb/tb_jpeg_asip.sv --top-module tb_jpeg_asip
./obj_dir/Vtb_jpeg_asip
```

Replace `tb_jpeg_asip` with any test bench name. The package file must come
first. Every other file is found by module name through `-y`.
