# Two-way parallel histogram unit for grey-level images

A grey-level histogram counts, for each of the 256 grey levels of an 8-bit image, how
many pixels have that level. In hardware the obvious unit keeps the image in one block
RAM and the 256 counts in another, and spends three clock cycles per pixel: read the
pixel, read the count it selects, write the count plus one. For a 128 x 128 image that
is 3 x 16384 = 49152 (C000h) cycles.

This unit halves that by using both ports of dual-ported block RAMs. Each access reads
two pixels at once, the one at an even address and its odd-numbered neighbour, and
updates two counts at once through the two ports of the histogram memory. Three cycles
still pass per access, but they now cover a pixel pair: 3 x 8192 = 24576 (6000h) cycles
for the same image, which is a speed-up of exactly 2. At 100 MHz that is 245.76 µs.

## The conflict case: two equal pixels

The two pixels of a pair often have the same grey level, since neighbouring pixels in a
natural image are alike. Both histogram ports would then read the same count n and both
write back n + 1 to the same word. That is a write collision on a dual-ported RAM, and
even if one write won, the pair would be counted once instead of twice.

A comparator therefore checks the pair before the counts are written:

| pair        | port A (even pixel X) | port B (odd pixel Y) |
|-------------|-----------------------|----------------------|
| X differs from Y | hist[X] <- hist[X] + 1 | hist[Y] <- hist[Y] + 1 |
| X equals Y  | no write              | hist[Y] <- hist[Y] + 2 |

The datapath has one +1 incrementer per lane and a +2 unit on lane Y. Multiplexers
selected by the comparator pick what each port writes. The two ports therefore never
write the same word in one cycle. `histogram_bram` asserts this.

A second hazard is a grey level shared by consecutive pairs. For example, pair k writes
hist[7] and pair k+1 reads it. The write happens in the last cycle of pair k. The read
of pair k+1 is issued two cycles later, so it always sees the updated count. No
forwarding logic is needed. This is a result of not pipelining the pairs, and it is why
the unit takes three cycles per pair rather than one.

## Cycle by cycle

After `start`, the controller first clears the histogram: two bins per cycle, one
through each port, for 128 cycles. It then handles pair k (pixels 2k and 2k+1) in three
states:

| state        | image memory                   | histogram memory                              |
|--------------|--------------------------------|-----------------------------------------------|
| `ST_RD_IMG`  | addresses 2k (A) and 2k+1 (B)  | idle                                          |
| `ST_RD_HIST` | X, Y valid                     | addresses X (A), Y (B); X, Y and X==Y registered |
| `ST_WR_HIST` | -                              | old counts valid; new counts written          |

After the last pair comes `ST_DONE`, which pulses `done` for one cycle, and the
controller returns to `ST_IDLE`. From the cycle `start` is sampled to the `done` pulse
takes 128 + 3·NPIX/2 + 1 cycles. `compute_cycles` counts only the three compute states,
so it reads 24576 after a 128 x 128 run, the figure quoted for this architecture's
computation alone.

Both memories have one cycle of read latency and are read-first, like FPGA block RAM.

## Blocks

| module                 | role |
|------------------------|------|
| `hist_pkg`             | default sizes, count-width function, controller state enum |
| `image_bram`           | 16384 x 8 image memory. Port A is read/write (loading, even pixels). Port B is read-only (odd pixels) |
| `pixel_comparator`     | X == Y flag |
| `histogram_update`     | +1 / +1 / +2 units and the selection of write values and enables |
| `histogram_bram`       | 256 x 15 true dual-port count memory, with the no-collision assertion |
| `histogram_controller` | clear, pair sequencing, cycle counter, sharing of port A with the load and read-out ports |
| `parallel_histogram_top` | wires the above together |

Sizes at the default parameters: 131072 bits of image memory, 3840 bits of histogram
memory and 72 flip-flops.

## Using the top

Ports of `parallel_histogram_top`:

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (hold low for at least one edge) |
| `load_we`, `load_addr`, `load_data` | in | 1, 14, 8 | write one pixel per cycle while `busy` is low |
| `start` | in | 1 | begin a run (ignored while `busy`) |
| `busy`, `done` | out | 1 | run in progress; one-cycle end pulse |
| `compute_cycles` | out | 32 | compute cycles of the last run |
| `rd_addr` | in | 8 | grey level to read while `busy` is low |
| `rd_count` | out | 15 | its count, one cycle after `rd_addr` |

Sequence: reset; load the image (any pixel order gives the same histogram); pulse
`start`; wait for `done`; read the 256 counts. The image stays in memory, so a second
`start` recomputes without reloading. Image writes and `start` pulses during a run are
ignored. The histogram memory is cleared at the start of every run, not by reset.

Parameters: `IMG_W`, `IMG_H` (128), `PIX_W` (8). `NPIX`, `BINS`, `CNT_W` and `IMG_AW`
follow from these by default. `CNT_W` defaults to ceil(log2(NPIX+1)) = 15, so even a
uniform image, with all 16384 pixels in one bin, cannot overflow. `NPIX` must be even.

## Relation to the published design

Taken from the published architecture:
- the even/odd split over two memory ports;
- the equality comparator;
- the +1/+1/+2 increment paths and their multiplexers;
- the single 256-entry histogram array;
- three cycles per pixel pair;
- the 128 x 128 x 8-bit image and 256-bin sizes;
- clearing the histogram before counting;
- 24576 cycles for the 128 x 128 image.

The published description is not consistent on two points:

- **One histogram array or two.** One passage builds separate even and odd histograms and
  merges them in a second phase. The datapath and flowchart instead use one shared array,
  with the +2 update for equal pixels. This RTL follows the single-array form. The
  quoted 24576 cycles leave no room for a 256-bin merge pass, and the +2 path is only
  needed if the two lanes share one array.
- **Which port writes the +2.** The two descriptions name different ports. Both address
  the same bin, so the result is the same. Here port B (odd pixel) writes and port A is
  idle.

Choices made here, where the published design is silent:
- the 15-bit counts;
- synchronous, read-first memories;
- the start/busy/done handshake and the synchronous reset;
- the two-bins-per-cycle clear;
- the load port. In the original, the image is placed in the FPGA memory by an
  initialisation file prepared off-line from a picture, and no load port is used;
- the read-out port;
- `compute_cycles`.

Not included:
- **The display.** The original drives a monitor that shows the image and its
  histogram. Its resolution, timing and interface are not described, so no display
  controller is provided. A display would read the counts through `rd_addr`/`rd_count`.
- **The single-port serial unit.** It is the baseline for comparison: three cycles per
  pixel, 49152 cycles for 128 x 128.

## Simulation

Every file in `rtl/` is a module or package named after its file. Verilator finds the
modules with `-y rtl`, but the package must be listed first. With Verilator 5:

```
verilator --binary --timing --assert -y rtl --top-module tb_parallel_histogram_top \
    rtl/hist_pkg.sv tb/tb_parallel_histogram_top.sv -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run any other testbench. Each
testbench checks its own results and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog that fails a run that hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_parallel_histogram_top` | The whole unit at the default 128 x 128 x 8-bit size. Five runs: a smooth picture-like image, a uniform image (every pair takes the +2 path and one bin reaches 16384), a ramp, random noise, and the same noise again without reloading. Checks all 256 bins, `compute_cycles = 6000h`, the start-to-done latency, and that a filled histogram is cleared. Also checks that starts and image writes during a run are ignored. Counts equal pairs, unequal pairs and bins reused by consecutive pairs, and fails if any of these never occurs. |
| `tb_histogram_controller` | The sequencer with memory, comparator and update models written in the testbench, at 64 pixels of 4 bits. Checks counts, cycle counts and latency, clearing of random leftover counts, the read-out and load sharing, and that no same-bin double writes occur. |
| `tb_histogram_update` | Update rule for random and wrap-around counts. |
| `tb_pixel_comparator` | All 65536 pixel pairs. |
| `tb_image_bram`, `tb_histogram_bram` | Memory contents, one-cycle latency and read-first behaviour, with random traffic on both ports. |

The full-size end-to-end test runs in well under a second of wall-clock time.

## Limits

- A single run needs NPIX/2 x 3 + 128 + 1 cycles, and the image must be loaded before
  it.
- The memories are plain arrays. FPGA tools map them to block RAM. An ASIC flow would
  replace them with dual-port SRAM macros that have the same one-cycle read latency.
- On the Spartan-3E class device used originally, a 128 x 128 x 8-bit image needs
  16 KiB of block RAM on its own.
- Larger images only need larger `IMG_W`/`IMG_H`, and `CNT_W` grows with them.
- Deeper pixels (`PIX_W` > 8) enlarge the histogram memory as 2^PIX_W words.
