# D-SWIM: a run-time programmable line buffer for multi-pixel image streams

A streaming image pipeline on an FPGA keeps the last few image lines in
on-chip line buffers. It then hands each operator a 2D window made of the
newest pixels and the pixels above them. At high pixel rates the stream
arrives as *blocks* of several pixels per clock (16 here). Once a block
carries more than one pixel, the image width rarely divides evenly by the
block size. The last block of a line then holds the first pixels of the
next line, and from that point every line starts at a different position
inside a block and inside the memory words. Fixed-width buffer designs
handle this by building the memory layout for one image width at
synthesis time. Changing the width then means new hardware.

D-SWIM instead stores each line at a position chosen per line by a small
*instruction*. The instructions for a width are computed on the host and
loaded into an instruction memory in a few cycles, so the same hardware
processes images of any width up to `NLINE_MAX` without resynthesis.
Because the carried pixels repeat with a short period, a handful of
instructions covers the whole image.

This repository holds the buffer and two image pipelines built on it: a
16-way parallel 3×3 convolution and a Harris corner detector. All of it is
synthesizable SystemVerilog with self-checking testbenches.

## The numbers behind the default build

| Symbol | Parameter | Default | Meaning |
|---|---|---|---|
| N_blk | `NBLK` | 16 | pixels per block, i.e. per clock |
| H | `H` | 3 | lines per output window (number of line buffers) |
| N_line_max | `NLINE_MAX` | 4096 | widest image line the buffer must hold |
| N_bram | `NBRAM` | 3 | BRAMs per line buffer (derived) |
| | `IDEPTH` | 16 | instruction memory depth (= N_blk, the longest possible list) |

Pixels are 8 bits. Every BRAM is 512 words × 64 bits (8 pixels per word),
used in simple dual-port mode with a per-byte write enable. The number of
BRAMs per line buffer is the larger of two bounds:

    N_bram = max( ceil((N_line_max + N_blk) / 4096),      -- capacity
                  ceil(((N_blk-1) % 8 + N_blk) / 8) )     -- one word per BRAM per clock

The second bound guarantees that a block never needs two words of the same
BRAM in one clock. For N_blk = 16 it gives 3, so a 3-line buffer uses 9
BRAMs. N_blk = 8 gives 2 BRAMs per line buffer, and N_blk = 32 gives 5.
N_blk must be a multiple of 8, which is checked at elaboration.

## How a line is laid out

Each line buffer (LB) treats its N_bram BRAMs as one long row of pixel
slots, interleaved word by word. Slot `p` is byte `p % 8` of word
`p / (8·N_bram)` in BRAM `(p / 8) % N_bram`. Pixel x of a line is stored
in slot x of its line buffer. A block therefore touches at most one word
in each BRAM, and the byte enables protect pixels of the neighbouring
block that share a word.

Lines rotate through the H line buffers. Line y goes to LB `y % H`,
replacing the line written H lines earlier.

If a line's last block runs past the end of the line, the extra `R`
pixels (the *carried* or remainder pixels) belong to the next line. They
are written twice in the same clock:

- past the end of the current line, in the current LB;
- into slots 0..R-1 of the next LB.

The next line then continues from slot R. Its first block starts in BRAM
`R / 8`, at byte `R % 8`, and every later block of that line has the same
byte offset.

Each BRAM has its own write-address counter. A counter advances when byte
7 of its BRAM is written and returns to zero after the last block of a
line. Reads never have their own addresses. In the clock a block is
written, the write addresses of the LB being written are sent, through a
multiplexer, as read addresses to all line buffers. The same slots of the
H-1 older lines are therefore read in the same clock: those are exactly
the pixels above the block. The BRAMs are read-first, so the LB being
written returns its old line, which is H lines back.

## Instructions

One instruction describes one line. It has five fields, packed from bit 0
of a 32-bit word:

| Field | Bits (N_blk = 16, N_line_max = 4096) | Meaning |
|---|---|---|
| START | 2 (`ceil(log2 N_bram)`) | BRAM holding the line's first pixel, R/8 |
| OFFSET | 6 (`log2 64`) | byte offset of that pixel, R%8 |
| REMAIN | 4 (`log2 N_blk`) | pixels of the *next* line in this line's last block |
| CYCLE | 9 (`ceil(log2(N_line_max/N_blk + 1))`) | number of blocks (clocks) for this line |
| RETURN | 1 | after this line, fetch instruction 0 again |

The host computes the list starting with no carried pixels (R = 0):

    START  = R / 8
    OFFSET = R % 8
    CYCLE  = ceil((N_line - R) / N_blk)
    R'     = (N_blk - (N_line - R) % N_blk) % N_blk      -> REMAIN
    RETURN = (R' == 0); stop after this instruction if set, else R = R'

For a 44-pixel line and 16-pixel blocks this gives four instructions,
written as (START, OFFSET, REMAIN, CYCLE, RETURN):

    (0,0,4,3,0)  (0,4,8,3,0)  (1,0,12,3,0)  (1,4,0,2,1)

The carry takes the values 4, 8, 12 and then 0, so every fourth line
repeats the layout of line 0. The list is never longer than N_blk entries.
A width that is a multiple of N_blk needs a single instruction.

## Programming protocol

1. While the buffer is idle (`in_ready` low), write the instructions over
   `inst_we/inst_addr/inst_data`, one per clock.
2. Write the image height with `cfg_we/cfg_height`. This arms the buffer:
   - it fetches instruction 0;
   - it resets every address counter;
   - it starts at line buffer 0;
   - it raises `in_ready`.
3. Stream the image as `in_valid`/`in_blk` blocks. `in_blk[0]` is the
   leftmost pixel. Lines are packed back to back with no padding, and a
   block may contain the end of one line and the start of the next. The
   source may insert idle clocks at any point. The last block of the image
   is padded to a full block.
4. After `cfg_height` lines, `in_ready` falls, and the next image can be
   programmed.

Programming a 431-pixel-wide image at N_blk = 16 takes 16 instruction
writes and one height write. That is 17 clocks, against about 10,560
clocks of streaming for a 431×392 image. The tests load the next list
once the previous image's last window has left, 7 clocks after its last
block. An assertion flags instruction writes while `in_ready` is high.

## The pipeline and its timing

The buffer accepts one block per clock. For each accepted block it emits
an H × N_blk window exactly **7 clocks** later, with these rows:

- `out_win[H-1]` is the block itself;
- `out_win[0]` is the oldest line;
- `out_line`, `out_x` and `out_last` give the line index of the block's
  first pixel, that pixel's x position, and whether the block ends a line.

The 7 clocks are:

| Clocks | Stage |
|---|---|
| 1 | input register, decoded instruction fields alongside |
| 1 | write stage 1: pad the block with placeholder bytes at the front (OFFSET bytes) and back, to the full width of a line buffer (N_bram words); build the matching byte mask |
| 1 | write stage 2: rotate right by whole BRAM words to the block's first BRAM; separately, move the REMAIN carried pixels to the front for the next LB |
| 1 | BRAM write, and read of the same slots in all LBs |
| 1 | read stage 1: reorder the H LB outputs into line order (oldest first) |
| 1 | read stage 2: rotate left by the same BRAM distance |
| 1 | read stage 3: drop the OFFSET placeholders, so the rows line up with the block; the block itself is added from a delay line |

The first BRAM of the n-th block of a line is `(START + n·N_blk/8) % N_bram`.
The controller keeps this as a running counter.

### What a line-end window contains

Take the columns of a window that lie past the end of a line, i.e. the
carried pixels that belong to line y+1. Their bottom row is always right.
Their upper rows are read from past the end of the older lines' storage.
Those slots hold correct data only where the older lines themselves
carried at least as many pixels into their next line. Otherwise they
hold stale data.

In practice an operator treats windows that straddle a line boundary as
invalid anyway. The first few output columns of each line should be
ignored, just like the top H-1 lines. The testbenches check those
columns exactly where the condition holds. The convolution and Harris
tests skip the first 17 or 18 columns of lines that start inside a
block.

## Conv2D pipeline (`conv2d`, `c_*` ports of `dswim_top`)

Sixteen 3×3 multiply-accumulate operators work in parallel, one per
window column. A window ending in column j needs columns j-2..j. The two
leftmost windows need the last two columns of the previous block, which
are kept in registers. Each operator multiplies 8-bit unsigned pixels by
signed 8-bit weights (the `c_weights` port) and adds them at full
precision (21 bits). It has one register stage, so results appear 8
clocks after the block is accepted.

`c_res[j]` is the convolution over lines `c_res_line-2 .. c_res_line` and
stream positions `c_res_x+j-2 .. c_res_x+j`. The raw buffer window is also
brought out (`c_win_*`).

## Harris corner pipeline (`harris`, `h_*` ports)

    input -> Buf1 -> dx, dy -> Buf2 (gx), Buf3 (gy) -> sx, sy, sxy -> rc -> corner flags

- Stage 1: `dx` and `dy` are 16-wide Sobel convolutions on the windows of
  Buf1. Their ±1020 results are divided by 8 (arithmetic shift), so the
  gradients fit the 8-bit pixel slots of Buf2 and Buf3.
- Stage 2: `harris_sum` forms sum gx², sum gy² and sum gx·gy over 3×3
  gradient windows.
- Stage 3: `harris_rc` computes R = det M − k·trace(M)², with k = 3/64,
  in two register stages, and compares R > `h_threshold`.

All three buffers receive the same instructions and height, since the
gradient images have the width of the input. The gradient of pixel
(Y, X) is placed one line and one pixel later in the gradient stream,
which keeps that stream block-aligned without any extra memory. The
result `h_out_r[j]` reported with (`h_out_line`, `h_out_x`) therefore
belongs to the input pixel at stream index
`(h_out_line-2)·N_line + h_out_x + j - 2`.

The total latency is 18 clocks. `h_busy` stays high from arming until the
last results have left; program the next image only when it is low.

## Where this design departs from, or adds to, the published D-SWIM

- **REMAIN of the last line of a period.** The published formula
  `REMAIN = N_blk − (N_line − R) % N_blk` gives N_blk, not 0, when a line
  ends exactly on a block boundary. The published worked example (width 44)
  shows 0 with RETURN set, and 0 is the only value that makes the period
  close. The formula here takes the result modulo N_blk.
- **CYCLE width.** The published width `ceil(log2 ceil(N_line_max/N_blk))`
  is 8 bits for 4096/16, which cannot hold 256 blocks. One more bit is
  used.
- **Field placement.** The instruction word is 32 bits. Field order and
  bit positions are this design's choice.
- **Own choices where the published design is silent:**
  - `NLINE_MAX` = 4096, the width of a common high-resolution sensor;
  - reset (asynchronous, active low; BRAM contents not reset);
  - the valid/ready handshake, and arming by the height write;
  - pixel-to-slot layout, counter increment rule and read-first BRAMs;
  - side-band outputs (`out_line`, `out_x`, `out_last`);
  - 7-clock register placement.
- **Harris:**
  - gradient scaling by 1/8 and k = 3/64;
  - the one-pixel/one-line alignment of the gradient streams;
  - programming broadcast to all three buffers.
- **Convolution:** weights are run-time ports.
- **Not included:**
  - the host software that computes instruction lists (the testbench
    package `dswim_tb_pkg::gen_instr` is an equivalent model);
  - the host-to-FPGA link.

## Files

| File | Contents |
|---|---|
| `rtl/dswim_pkg.sv` | constants, BRAM-count and field-width functions, instruction struct, encode/decode |
| `rtl/bram_sdp.sv` | 512×64 simple dual-port RAM with byte enables, read-first |
| `rtl/addr_counter.sv` | per-BRAM write address counter |
| `rtl/line_buffer.sv` | one LB: N_bram BRAMs with their counters |
| `rtl/addr_mux.sv` | selects the written LB's addresses as everyone's read addresses |
| `rtl/instr_mem.sv` | instruction memory |
| `rtl/dswim_wr_logic.sv` | write stages (padding, rotation, carried pixels, masks, counter controls) |
| `rtl/dswim_rd_logic.sv` | read stages (line reorder, rotation, placeholder removal) |
| `rtl/dswim_controller.sv` | instruction decode, block/line counters, line rotation; wraps the two logic blocks |
| `rtl/dswim_buffer.sv` | the complete buffer |
| `rtl/conv2d.sv` | 16 parallel 3×3 convolution operators |
| `rtl/harris_sum.sv`, `rtl/harris_rc.sv`, `rtl/harris.sv` | Harris operators and pipeline |
| `rtl/dswim_top.sv` | both pipelines side by side |
| `tb/dswim_tb_pkg.sv` | instruction-list generator used by the tests |
| `tb/tb_<module>.sv` | one self-checking test per module |
| `tb/tb_dswim_workloads.sv`, `tb/dswim_runner.sv` | buffer configurations with H = 3/5 and N_blk = 8/16/32, and full 431×392 and 1342×638 images |

## Simulating

Every test prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a test that hangs and counts it as a failure. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dswim_pkg.sv tb/dswim_tb_pkg.sv tb/tb_dswim_top.sv \
        --top-module tb_dswim_top -Mdir obj_top -o sim
    ./obj_top/sim

Replace `tb_dswim_top` with any other test name.

`tb_dswim_top` runs the top at its default parameters. It streams
convolution images of widths 44, 100, 4096 and 64 back to back, and a
Harris image. Every result is compared with a reference computed in the
testbench, and it counts each mechanism the design has:

- width switches;
- lines with carried pixels;
- counter wraps;
- line-buffer rotations;
- input gaps;
- image ends;
- detected corners.

It finishes in well under a minute. `tb_dswim_workloads` checks more
than 10 million window pixels across twelve buffer configurations in about
half a minute. It confirms that programming takes one clock per
instruction (4 to 32) and streaming one clock per block.

## Changing the design

- **Window height and block size.** `H` and `NBLK` are parameters of
  `dswim_buffer`, and `NBRAM` follows automatically.
- **Wider images.** Raise `NLINE_MAX`. Up to 12,272 pixels fit in 3 BRAMs
  per line buffer at N_blk = 16.
- **Instruction format.** The instruction field widths derive from the
  parameters. Software must pack the fields the way
  `dswim_pkg::encode_instr` does.
- **Other operators.** Replace `conv2d` with any operator that consumes the
  `out_win` stream. Keep in mind which columns of line-boundary windows
  are meaningful, as described above.
