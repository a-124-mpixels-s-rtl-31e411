# Histogram-based joint bilateral filter, 1 pixel per cycle

This is synthesizable SystemVerilog for a joint bilateral filter (JBF). The
design smooths a source image J and keeps the edges of a guidance image I.
For a target pixel c, every pixel q in the 31 x 31 window around c is weighted
by how close its guidance intensity I_q is to I_c:

    out(c) = sum_q g(|I_c - I_q|) * J_q  /  sum_q g(|I_c - I_q|)

If I and J are the same image, this is the ordinary bilateral filter (BF).
Computed directly, the filter costs 961 multiply-adds per pixel. Here each
window is reduced to two 64-bin histograms:

- hc(b): how many window pixels fall in guidance bin b (bin = I >> 2);
- hi(b): the sum of their source intensities J.

With these histograms the filter becomes a 64-term dot product:

    out(c) = sum_b G(b) * hi(b)  /  sum_b G(b) * hc(b)

The histograms come from *integral histograms*. They are maintained so that
each new window costs a constant amount of work, whatever the window size.
The whole frame's integral histograms would take hundreds of megabytes. This
design needs only one line of them per engine: 23,040 bytes in total. All 64
bins are computed in parallel, so the filter produces one pixel per clock
cycle. At the default sizes a 1920 x 1080 frame takes 3.36 M cycles, which
is 29.7 frames/s at 100 MHz or 59.5 frames/s at 200 MHz.

## How the one-line integral histogram works

The frame is cut into vertical **stripes** of `WS` = 60 target columns. To
filter the stripe's edge pixels, the processing also needs 15 support
columns on each side, so each stripe is processed over an **extended width**
of `SW + WS - 1` = 90 columns. Columns are numbered x = 0..89 from the left of
the extended stripe.

Within a stripe, rows are processed top to bottom and, in each row, columns
left to right. For the current row y, IH(x, y) is defined as the histogram of
a **band**:

- the last `SW` = 31 rows, y-30 .. y;
- columns 0 .. x.

The band's origin slides down by one row with every row. This is what keeps
the storage down to one line.

**Integration.** Four neighbours are used: D = IH(x-1, y), S' = IH(x, y-1)
and D' = IH(x-1, y-1). Then:

    IH(x, y) = D + (S' - D') - Bin(pixel at (x, y-31)) + Bin(pixel at (x, y))

(S' - D') is column x of the previous band. The correction removes the pixel
that leaves the band at the top and adds the pixel that enters at the bottom.
Bin(p) is 1 in the bin of I_p for hc. For hi it is J_p in that bin.

**Extraction.** The window whose lower-right corner is (x, y) is simply

    h = IH(x, y) - IH(x-31, y)        (IH(x-31, y) taken as 0 when x < 31)

That window is centred on the target at column x-15 of row y-15. Its
histograms leave the engine in the same cycle that IH(x, y) is made.

**Memory.** Each engine has a line memory, `ih_line_buffer`. It holds 90
entries, and each entry is one whole histogram (64 bins side by side). Entry
x holds IH(x, y-1) until column x of row y reads it as S' and overwrites it
with the new IH(x, y). IH(x-31, y) was written 31 cycles earlier in the same
row, and is read from the same memory. D and D' are the previous cycle's S
and S', so they come from two delay registers instead of the memory. Per
cycle, each engine therefore reads two histograms and writes one.

**Bin widths.** One band covers at most 31 x 90 = 2,790 pixels. A stored
pixel-count bin therefore needs 12 bits, and a stored intensity-sum bin 20
bits. The differences taken during extraction are exact modulo those widths.
The memory totals 90 x 64 x (12 + 20) bits = 23,040 bytes.

**Frame borders.** The first row of each stripe treats S' and D' as zero.
Pixels outside the frame are left out of both histograms, so a border window
is normalised over the pixels it actually holds. Each stripe runs 15 rows past
the bottom of the frame (1095 rows for 1080), so that the last rows of targets
are produced.

## Schedule

`stripe_scheduler` issues one column per cycle, in **tiles** of 8 columns,
because one 64-bit bus word holds 8 pixels. A stripe row is 90 columns in 12
tiles, which is 96 cycles; the last 6 cycles are bubbles. For every slot the
scheduler also reports:

- whether the entering pixel (x, y) and the leaving pixel (x, y-31) lie in
  the frame;
- whether the window centre is a target to output, and at which row and
  stripe index.

The frame size `img_w` x `img_h` is a run-time input. It can be up to the
`IMG_W` x `IMG_H` the design is built for (default 1920 x 1080). The stripe
width stays 60 for every frame size.

| frame | stripes | rows per stripe | cycles per frame |
|---|---|---|---|
| 640 x 480 | 11 | 495 | 522,720 |
| 1280 x 720 | 22 | 735 | 1,552,320 |
| 1920 x 1080 | 32 | 1095 | 3,363,840 |

Bus stalls add a few cycles: about 15 per frame in simulation with a memory that
never stalls.

## Datapath

```
 input FIFOs            histogram engines (2)             convolution engine
 I_S J_S I_Q J_Q I_c -> hc: count  (12-bit bins)  -> hc --> weights, 2x64 MAC -> divide -> packer -> output FIFO
                        hi: J sum  (20-bit bins)  -> hi -/
                        I_c delayed alongside --------------^
```

- **`histogram_engine`** (two instances). One engine counts pixels: its
  values are 1 and its bins are 12 bits wide. The other sums intensities: its
  values are J and its bins are 20 bits wide. The engine has two pipeline
  stages:
  1. read S' and R from the line memory;
  2. form D + S' - D', apply the two pixel corrections in `sba` (the
     selected-bin adder: one comparator and adder per bin), write back, and
     subtract R.
- **`convolution_engine`**. It works in two stages, or three with `PIPE = 1`:
  1. `table_selection` gives each bin its weight G(|bin(I_c) - b|), read
     from the single 32-entry `range_table`. Bins 32 or more apart get weight
     0. 128 multipliers and two adder trees form De = sum G*hc (28 bits) and
     Nu = sum G*hi (36 bits). With `PIPE = 1`, a register cuts both adder
     trees after partial sums over four groups of 16 bins.
  2. `quotient_divider` returns round(Nu / De) as 8 bits. The quotient
     saturates at 255, and De = 0 gives 0; De cannot be 0 while G(0) > 0.
- **Range table contents.** The weights are 10-bit integers (scale 1023).
  The intended kernel is `round(exp(-(4d)^2 / (2 sigma^2)) * 1023)` for a
  bin distance d, and you choose sigma when you write the table. A one-sided
  table is enough because the kernel is symmetric. It can stop at 32 entries
  because the kernel has fallen to nothing by then.
- **Latency.** From a column entering the engines to its result leaving the
  convolution engine is 4 + `CONV_PIPE` enabled cycles (5 by default). `output_packer` then gathers 8
  results into one word:
  - the words are aligned to the stripe's first target;
  - a 60-pixel stripe row is seven full words and one word with 4 byte enables.

## Interface and bus

- **FIFOs.** There are six `pixel_fifo`s of two 8-pixel words each (ping-pong).
  Five feed the core, one stream each:
  - I_S and J_S, the pixels entering the band;
  - I_Q and J_Q, the pixels leaving it, 31 rows up;
  - I_c, the target's guidance pixel, 15 rows up and 15 columns left. It is
    fetched only for tiles 3..11, the tiles that hold target columns.

  The sixth takes result words.
- **Core stalls.** At the start of each tile, the core takes one word from
  every input FIFO that has a word for that tile. The whole core stalls (`en` low) in two cases:
  - an input FIFO is empty at a tile start;
  - a finished output word finds the output FIFO full.
- **`access_controller`** is the bus master. Each read stream has its own
  address counter, which walks the same stripe, row and tile order as the
  core. A stream requests the bus only while its FIFO has room, counting the
  word already in flight. The output FIFO requests whenever it holds a word.
  A round-robin arbiter serves the six requesters in turn.
- **Bus protocol.** Each access has two phases, and the phases are pipelined:
  - *Address phase:* the master holds `bus_req`, `bus_we`, `bus_addr` and
    `bus_be` until the slave answers `bus_gnt`.
  - *Data phase:* the cycle after the grant. In that cycle the slave drives
    `bus_rdata` for a read, or the master drives `bus_wdata` for a write.
  - Addresses are byte addresses and need not be 8-byte aligned, because
    stripes start at arbitrary columns.
  - Rows above or below the frame are read from the nearest frame row, and
    those pixels are then ignored. Columns outside the frame are read from
    wherever the address falls, and are ignored too.
- **Bus load.** A stripe row needs 4 x 12 + 9 = 57 reads and 8 writes in
  96 cycles, which is 68 % of the bus.

## Using `jbf_top`

1. Reset with `rst_n` low (asynchronous).
2. Write the 32 range weights through `tbl_wr_en` / `tbl_wr_addr` /
   `tbl_wr_data`, one per cycle.
3. Store I and J row by row, one byte per pixel, `img_w` bytes per row. Set
   `base_i`, `base_j`, `base_o`, `img_w` and `img_h`. Keep them stable while
   `busy` is high.
4. Pulse `start`. `done` pulses once the last result word has been written.
   `busy` is high in between.

For plain bilateral filtering, set `base_j = base_i`.

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 1920, 1080 | largest frame; sizes the counters |
| `SW` | 31 | window width (odd) |
| `WS` | 60 | stripe width in target pixels |
| `CONV_PIPE` | 1 | extra adder-tree register in the convolution engine; 1 for a 200 MHz clock, 0 for 100 MHz |

Fixed in `jbf_pkg`: 64 bins, 8-bit pixels, 8-pixel tiles and a 64-bit bus,
10-bit weights, a 32-entry table and 32-bit addresses.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_jbf_top \
    rtl/jbf_pkg.sv tb/jbf_ref_pkg.sv tb/tb_jbf_top.sv
./obj_dir/Vtb_jbf_top
```

| testbench | what it shows |
|---|---|
| `tb_jbf_top` | A 100 x 40 frame on the default build. The memory grants in 80 % of the cycles, and now and then not at all for up to 40 cycles. Every output pixel is compared with a brute-force filter in `jbf_ref_pkg`. Every stripe row must take 96 slots. The test counts stalls on both FIFO sides, bubbles, first rows, border masking, partial words and grants to all six requesters, and each must occur. |
| `tb_jbf_top_full` | One 1920 x 1080 frame at default sizes, about 6 s. Checks the cycle count and 31k sampled pixels, including all border pixels and the stripe seams. |
| `tb_jbf_workloads` | A 640 x 480 frame, then a 1280 x 720 frame, on the same build. |
| `tb_histogram_engine` | Each extracted histogram against a 5 x 5 window summed directly, with random stalls. |
| `tb_convolution_engine` | Weighted sums and rounding against a model, for `PIPE` 0 and 1; latency 2 + `PIPE`. |
| `tb_access_controller` | Stream addresses, FIFO levels, write-back with byte enables, round-robin order. |
| other `tb_*` | One per block: `sba`, `ih_line_buffer`, `range_table`, `table_selection`, `quotient_divider`, `pixel_fifo`, `stripe_scheduler`, `output_packer`. |

`offchip_mem_model` (in `tb/`) is a behavioural byte-addressed memory with a
random grant delay. It is not part of the design.

## What follows the original architecture and what does not

These parts follow the published architecture:

- stripes of 60 over an extended width of 90;
- the sliding band origin, the one-line memories and the two delay buffers;
- range parallelism over 64 bins and two histogram engines;
- one shared 32-entry, 10-bit range table behind a table-selection stage;
- an 8-bit divider output;
- 8-pixel tiles with 96 cycles and 6 bubbles per stripe row;
- FIFOs of 2 x 8 pixels, round-robin bus access, and a bus with an address
  phase and a data phase.

These are this implementation's own choices:

- **Frame borders.** The out-of-frame masking, and the 15 extra rows per
  stripe, are this implementation's. The 15 extra rows make a frame 1.4 %
  longer than a count over the frame's own rows alone. HD1080p is therefore
  at 59.5 frames/s at 200 MHz, not 60.
- **Range table.** The table is indexed by distance in *bins*. It is a
  writable register file, not a ROM, because no sigma is fixed.
- **Pipeline.** There are two registers in each engine. With `CONV_PIPE`,
  the convolution engine gets one more, as the faster version of the
  architecture does, but where that register sits is this design's choice.
  The clock rate reached is unknown, since nothing here has been through
  synthesis to a process.
- **Rounding.** The final division rounds to nearest.
- **Interface details.** All of the following are this implementation's:
  - the bus grant handshake, unaligned addresses and byte enables;
  - five input FIFOs;
  - the global stall.

  Off-chip traffic is counted in whole 8-pixel words. It is therefore about
  9 % above a count of single pixels (68 % of the bus instead of 62 % at
  HD1080p and 100 MHz).
- **Memory.** The line memories are plain arrays with two read ports and one
  write port. A silicon build would map them onto SRAM macros.
- **Not built.** A reduced BF-only variant without the intensity engine is
  not provided.
