# Binary quarter-pixel motion estimation for 16x16 blocks

Block-matching motion estimation normally compares 8-bit pixels with a sum of
absolute differences. It costs far less if both frames are first reduced to
one bit per pixel. Each pixel then says only whether it lies above or below a
locally filtered version of itself. Two blocks are compared by XOR-ing them
and counting the ones: the *number of non-matching points* (NNMP).

This design keeps the whole search in the one-bit domain, including the
sub-pixel steps:

* **Integer search.** A full search over a [-16, 15] x [-16, 15] range is done
  by a linear array of 16 processing elements (PEs). It takes 1039 cycles per
  16x16 block.
* **Half-pixel search.** Half pixels are interpolated directly from the
  one-bit pixels. Each interpolator is a 6-input, 1-output lookup table (LUT).
  The eight half-pixel neighbours of the integer winner are then searched.
* **Quarter-pixel search.** A quarter pixel is the average of two neighbouring
  samples. For one-bit samples that rounded average is simply a logical OR.
  The eight quarter-pixel neighbours of the half-pixel winner are searched
  with 8 two-input OR arrays.

The sub-pixel part takes 49 cycles. It reuses one array of eight PEs and one
comparator for both the half-pixel and the quarter-pixel search.

The one-bit transform that turns a video frame into a bit plane is not part
of this RTL. The engine takes bit planes as input.

```
            search area 53x53 bits          reference block 16x16 bits
                    |                                |
                    v                                v
        +-----------------------+   window    +--------------------------+
        | integer_me (SPBLA,    |   copy      | subpel_me                |
        | 16 spbla_pe, 1039 cy) |-----------> |  22x22 window, 16x16 ref |
        +-----------------------+  22 rows    |  half_pel_interp         |
                    |                         |  half_pel_memory         |
              int_valid, vector               |  quarter_pel_interp      |
                                              |  8 x subpel_pe + MUX     |
                                              |  subpel_comparator       |
                                              +--------------------------+
                                                    | res_valid, vectors
```

`binary_me_top` wires the two engines together as a two-stage pipeline. The
next block's integer search can start while the previous block's sub-pixel
search is still running.

## Conventions

* **Pixel rows.** A pixel row is a vector whose bit *j* is column *j*.
* **Integer vectors.** `int_mv_x` and `int_mv_y` count pixels, with x to the
  right and y downwards. Both are in -16..15.
* **Sub-pixel vectors.** `subvec_t` has x to the right and y **upwards**, each
  in {-1, 0, +1}. The eight sub-pixel locations around a centre are numbered:

  ```
  SL4 SL2 SL5        (-1,+1) (0,+1) (+1,+1)
  SL0  c  SL1        (-1, 0)   c    (+1, 0)
  SL6 SL3 SL7        (-1,-1) (0,-1) (+1,-1)
  ```

* **Combined vector.** It is reported in quarter pixels, with y downwards:
  `qmv_x = 4*int_x + 2*hp.x + qp.x` and `qmv_y = 4*int_y - 2*hp.y - qp.y`.
* **Winner selection.** Every search keeps the first strict minimum.
  * In the integer search, "first" is the candidate order, column by column.
  * In a sub-pixel search, the centre wins a tie, then the lower SL number.

## Integer search: the source-pixel-based linear array

The integer engine (`integer_me`, 16 × `spbla_pe`) is the least obvious part.

Each PE owns one row of the reference block. PE *k* latches reference row *k*
the first time that row appears on the reference bus. Reference row
`t mod 16` is on the bus in cycle *t*. In every cycle a PE:

1. XORs its reference row with a 16-pixel search-window row;
2. counts the mismatches with two 256-entry, 4-bit popcount LUTs;
3. adds the partial NNMP from the previous PE;
4. registers the result for the next PE.

A candidate's NNMP therefore builds up as it ripples down the chain, one
block row per PE. The NNMP of candidate *n* leaves PE 15 in cycle `n + 15`.

Candidate columns x = 0..31 are processed one after the other, one every 32
cycles. Each column needs 47 window rows, so column *x+1* starts before
column *x* has finished. Two search buses cover the overlap:

* even columns stream on `s1`, odd columns on `s2`, each in cycles
  `32x .. 32x+46`;
* in cycle *t*, PE *k* takes its row from the bus of column `(t-k) div 32`.

The running-minimum comparator reads PE 15's sum directly (combinationally),
without waiting for its register. The last candidate (n = 1023) leaves at
cycle 1038, and `done` pulses 1039 = 32·32 + 15 edges after the start edge.

The window memory is outside the engine. `integer_me` presents two row/column
addresses and expects the 16-pixel slices back in the same cycle.
`binary_me_top` answers them from its 53x53 search area.

## Binary half-pixel interpolation

The sub-pixel engine works on a 22x22 integer window: the 16x16 winner plus 3
pixels on each side, which the six-tap filter needs. The half pixels come in
three kinds:

| kind | position | how many | made from |
|------|----------|----------|-----------|
| A | between two columns of an integer row | 17 per row, window rows 2..19 (18 rows) | 6 integer pixels of the same row |
| B | between two rows of an integer column | 18 per row, columns 2..19 (17 rows) | 6 integer pixels of the same column |
| C | in the middle of four integer pixels | 17 per row (17 rows) | 6 A pixels of the same column |

Every LUT computes the same function, `half_tap6` in `binme_pkg`. It applies
the H.264 six-tap filter (1, -5, 20, 20, -5, 1) to the six one-bit inputs,
then rounds and clips the result to one bit. That is the same as
`weighted sum >= 16`. This filter is a choice of this design; change it in one
place if the bit planes come from a different transform.

`half_pel_interp` takes one 22-bit integer row per cycle:

* **A pixels.** 17 LUTs compute the A pixels of the row at once.
* **B pixels.** Each integer column 2..19 shifts into its own 6-bit shift
  register, so the six vertical taps of every column are always available.
* **C pixels.** Each A column shifts into another 6-bit register. This makes C
  from A pixels rather than from B pixels, because A pixels exist earlier.

As a result, A row *j* is ready one edge after integer row *j*, and B and C
row *j-5* are ready after the same edge. The 22 input rows take 22 cycles.
`half_pel_memory` stores all three kinds so that the quarter-pixel stage can
read them again.

## Quarter-pixel operands

Place the window on a half-pixel grid, with integer pixel (r, c) at (2r, 2c).
Then a sub-pixel location is a point on a quarter-pixel grid.

* **Half-pixel step.** The half-pixel winner `hp` is one of nine points
  around the block's integer position.
* **Quarter-pixel step.** Each quarter-pixel candidate lies one quarter step
  from `hp` in the direction of its SL.
* **Operands.** A quarter pixel is the OR of the two half-grid samples that
  are nearest to it:
  * **horizontal step (SL0, SL1):** the two samples left and right of it, in
    the same row;
  * **vertical step (SL2, SL3):** the two samples above and below it, in the
    same column;
  * **diagonal step (SL4..SL7):** the nearest A sample and the nearest B
    sample.

Which memory an operand comes from therefore depends on `hp`:

| example | operands come from |
|---------|--------------------|
| SL3 (a quarter step down) when `hp.x = 0` | an integer row and a B row |
| SL3 when `hp.x = ±1` | an A row and a C row, at a column chosen by the sign of `hp.x` |

`quarter_pel_interp` describes this selection once, as a function from grid
position to store, row and column. Synthesis folds it into the structure of
one datapath per location: a column select, an operand multiplexer and a
16-bit OR array. The table below lists what it produces for block pixel
(r, c). The names work as follows:

* `i`, `a`, `b`, `c` are the integer, A, B and C samples;
* the digits are a row and column index in a 3x3 neighbourhood whose centre
  is `11`, the integer pixel itself;
* `a10` is the A pixel left of `i11`, `b01` the B pixel above it, and `c00`
  the C pixel up and to the left.

| location | (-1,-1) | (0,-1) | (1,-1) | (-1,0) | (0,0) | (1,0) | (-1,1) | (0,1) | (1,1) |
|----------|---------|--------|--------|--------|-------|-------|--------|-------|-------|
| SL0 | b10 c10 | b11 c10 | b11 c11 | i10 a10 | i11 a10 | i11 a11 | b00 c00 | b01 c00 | b01 c01 |
| SL1 | b11 c10 | b11 c11 | b12 c11 | i11 a10 | i11 a11 | i12 a11 | b01 c00 | b01 c01 | b02 c01 |
| SL2 | a10 c10 | i11 b11 | a11 c11 | a10 c00 | i11 b01 | a11 c01 | a00 c00 | i01 b01 | a01 c01 |
| SL3 | a20 c10 | i21 b11 | a21 c11 | a10 c10 | i11 b11 | a11 c11 | a10 c00 | i11 b01 | a11 c01 |
| SL4 | a10 b10 | a10 b11 | a11 b11 | a10 b00 | a10 b01 | a11 b01 | a00 b00 | a00 b01 | a01 b01 |
| SL5 | a10 b11 | a11 b11 | a11 b12 | a10 b01 | a11 b01 | a11 b02 | a00 b01 | a01 b01 | a01 b02 |
| SL6 | a20 b10 | a20 b11 | a21 b11 | a10 b10 | a10 b11 | a11 b11 | a10 b00 | a10 b01 | a11 b01 |
| SL7 | a20 b11 | a21 b11 | a21 b12 | a10 b11 | a11 b11 | a11 b12 | a10 b01 | a11 b01 | a11 b02 |

The column heads are the half-pixel result (x right, y up). The testbench
reference model holds this table as text and checks the RTL against it.

## Sub-pixel engine schedule

`subpel_me` runs one block in 49 cycles. Edges are counted after the edge
that samples `start`.

| edges | work |
|-------|------|
| 1..22 | Read integer window rows 0..21 into the half-pixel interpolator. Write the A, B and C rows to the half-pixel memory. |
| 9..24 | Half-pixel search, overlapping the interpolation. Block row *r* is matched in all eight locations as soon as B and C row *r+1* exist. |
| 25..27 | Three-stage comparator tree, with the integer NNMP as the centre. `hp_valid` follows edge 27. |
| 28 | Latch the half-pixel vector. |
| 29..44 | Read one block row per cycle from the integer and half-pixel memories. |
| 30..45 | Form and register the eight quarter-pixel rows. |
| 31..46 | The PEs accumulate. |
| 47..49 | Compare against the half-pixel winner. `qp_valid` follows edge 49. |

The window and reference memories may only be written while `busy` is low;
an assertion checks this.

## Using `binary_me_top`

1. **Load the search area.** While `ready` is high, write the 53x53 search
   area row by row (`sa_we`, `sa_addr`, `sa_data`).
   * Search-area pixel (19+vy+i, 19+vx+j) is pixel (i, j) of the candidate
     block for integer vector (vx, vy).
   * That means a 47x47 integer search window plus a 3-pixel margin for the
     filter.
2. **Load the reference block.** Write the 16x16 reference block (`rb_*`).
3. **Start.** Pulse `start`.

Results for each block:

| output | when, after the start edge | carries |
|--------|----------------------------|---------|
| `int_valid` | 1039 edges | the integer vector and its NNMP |
| `ready` | rises after 1063 edges | — |
| `res_valid` | 1113 edges | the integer, half- and quarter-pixel parts, the combined vector, and the final NNMP |

What happens between `int_valid` and `ready`:

* **Hand-over (2 edges).** The engine records where the 22x22 window around
  the winner starts.
* **Window copy (22 edges).** It copies the window and the reference block
  into the sub-pixel engine, one row per cycle.
* **Next block.** The following block can be loaded and started at once. Its
  integer search then overlaps the sub-pixel search of this block.

The block rate depends on what is reloaded each time:

| reloaded per block | cycles per block |
|--------------------|------------------|
| search area and reference block | 1063 + 53 + 16 + 1 = 1133 |
| reference block only | 1063 + 16 + 1 = 1080 |

For 1280x720 video at 30 frames/s (3600 blocks per frame) with a new search
area per block, that is 122.4 MHz. The rate counts only integer search,
half-pixel search and quarter-pixel search. Frame borders and the bit-plane
transform are left to the host.

## Where this design departs from the published architecture

* **The binary half-pixel filter.** The LUT contents, a rounded and clipped
  H.264 six-tap filter on one-bit samples, are this design's own choice.
* **B interpolation columns.** The published architecture describes 16
  column shift registers for B pixels. Its B memory, however, holds 18 B
  pixels per row. This design has 18 column registers, so every stored B
  pixel is computed.
* **Sub-pixel comparison timing.** The comparison runs as a pipelined tree
  after the last NNMP of each phase. The published description starts the
  half-pixel comparison at cycle 21 and finishes quarter-pixel interpolation
  at cycle 47. Here the half-pixel NNMPs are complete at edge 24, the vectors
  appear at edges 27 and 49, and the quarter-pixel rows are formed at edges
  30..45.
* **Centre and tie rules.** The centre of the half-pixel search is the
  integer winner with its integer NNMP. The tie rules above are also this
  design's.
* **Top-level choices.** The 53x53 shared search area, the window loader, the
  host protocol and the combined-vector output are this design's.
* **Latency versus the published cycle count.** The published cycle budget of
  1039 + 49 per block does not count the window copy. This design needs 22
  cycles for it (plus 2 for hand-over), so a lone block takes 1113 cycles from
  start to final result.

Nothing has been synthesised for a specific FPGA or cell library, so clock
rate and area are not known. Generic synthesis of the top gives about 1100
flip-flops and 4.7 kbit of memory bits.

## Files

| file | contents |
|------|----------|
| `rtl/binme_pkg.sv` | sizes, `nnmp_t`, `subvec_t`, the half-pixel filter, popcount, SL offsets |
| `rtl/spbla_pe.sv`, `rtl/integer_me.sv` | integer PE and the SPBLA integer search |
| `rtl/half_pel_interp.sv`, `rtl/half_pel_memory.sv`, `rtl/bitplane_mem.sv` | half-pixel interpolation and storage |
| `rtl/quarter_pel_interp.sv` | the eight quarter-pixel OR datapaths |
| `rtl/subpel_pe.sv`, `rtl/subpel_comparator.sv`, `rtl/subpel_me.sv` | sub-pixel PE, comparator and the whole sub-pixel engine |
| `rtl/binary_me_top.sv` | the two engines, the search-area memory and the window loader |
| `tb/tb_binme_ref_pkg.sv` | reference model: filter, half-pixel grid, quarter-pixel table, winner selection |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each testbench:

* compares against exhaustive searches or the reference model;
* checks the cycle counts given above;
* has a watchdog;
* ends with a `TB_RESULT checks=… failures=…` line.

`tb_binary_me_top` runs 12 blocks through the full-size top and checks every
result field and latency. It also requires that each of these happens at
least once:

* a half-pixel move off the centre;
* a kept integer position;
* a quarter-pixel move;
* a block whose integer search overlaps the previous block's sub-pixel search.

`tb_frame_workload` runs one whole 352x288 frame, 396 blocks, through the
full-size top. It plays the host:

* it builds a synthetic one-bit frame with planted integer, half-pixel and
  quarter-pixel motion;
* it clamps search areas at the frame border;
* it checks every result.

It also checks the rate of one block every 1133 cycles. The frame takes
448,648 cycles.

## Simulating

With Verilator 5, for example for the top-level testbench:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/binme_pkg.sv tb/tb_binme_ref_pkg.sv tb/tb_binary_me_top.sv \
    --top-module tb_binary_me_top -o sim
./obj_dir/sim
```

Replace `tb_binary_me_top` with any other testbench name. The top-level run
takes about a minute, most of it compilation. The smaller testbenches finish
in seconds. The integer search range is the `RANGE` parameter of
`integer_me` and `binary_me_top`; only its default of 16 has been
simulated. The block size (16) is fixed by the package
and the PE count.
