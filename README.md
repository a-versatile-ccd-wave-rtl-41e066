# CCD wave front curvature sensor controller

A curvature wave front sensor looks at an out-of-focus image of a guide star and
measures how the light is spread over a ring pattern of *subapertures* (for example a
centre zone, a ring of 6 and a ring of 12: 19 subapertures). The normalised
brightness change of each subaperture is proportional to the local wave front
curvature. The sensor must run at hundreds of frames per second with very little read
noise, so nobody reads the CCD pixel by pixel. The charge of each subaperture's pixels
is summed *on the chip* instead: several lines are shifted into the serial register
together (parallel binning), and several serial-register pixels are shifted onto the
output node before the node is sampled (serial binning). What is read is a few
hundred *superpixels*, not 4096 pixels.

This RTL is the digital side of such a sensor for a 64×128 frame-transfer CCD. One
64×64 half is illuminated; the other half is storage. The serial register is split,
with one output amplifier at each end. The RTL:

* generates every CCD clock and every control line of the analog signal chain as one
  24-bit *clock word*, built from short, host-programmable *sequence fragments*;
* reads a frame by walking a host-loaded *superpixel list*, or a plain binned raster;
* matches the pipelined A/D results with the superpixels they belong to, and sums them
  per subaperture;
* keeps a dark frame and computes the curvature signal of every subaperture.

The analog parts are outside the RTL: clock drivers, bias references, preamplifiers,
dual-slope integrators and the two 16-bit A/D converters. `clk_word` drives them bit
by bit, and the converter results come back on `adc_*`.

## The clock word and sequence fragments

Every output line is one bit of `clk_word` (`rtl/wfs_pkg.sv`):

| bits | signals | meaning |
|------|---------|---------|
| 23–21 | P1AB P2AB P3AB | storage-area parallel clocks |
| 20–18 | P1CD P2CD P3CD | image-area parallel clocks |
| 17, 16 | TG, spare | transfer gate |
| 15–11 | S1L S3L S2 S1R S3R | split serial register. The L and R phases run in opposite order, so each half shifts toward its own amplifier |
| 10 | RG | reset gate of both output nodes |
| 9, 8 | SW, spare | summing well (unused: this CCD has none) |
| 7 | FRST_N | integrator reset, active low |
| 6 | FINT_N | integrate, active low |
| 5 | FPLTY | integrator input polarity |
| 4 | CONV_N | A/D convert start, active low |
| 3–1 | spare | |
| 0 | BUSY_N | low while a fragment runs |

An elementary operation is a fragment of 5 or 6 such words. Each word carries its own
*hold count*: the number of 50 ns cycles it stays in the clock register before the next
word overwrites it. The sequencer (`seq_engine`) takes a request {operation, count}.
It steps through the fragment `count` times, with no gap between repetitions and no gap
before the next request. Its fragment memory (64 words of `{hold[7:0], word[23:0]}`)
and its table {first address, length} per operation reset to these defaults. The host
can overwrite both:

| operation | words | default holds (cycles) | time |
|-----------|-------|------------------------|------|
| `OP_FT` frame transfer (image and storage together) | 6 | 5 each | 1.5 µs per line, 64 lines 96 µs |
| `OP_PREAD` parallel readout (storage only) | 6 | 8 8 8 8 9 9 | 2.5 µs |
| `OP_PFLUSH` parallel flush (both areas, serial register dumped) | 6 | 8 8 8 8 9 9 | 2.5 µs |
| `OP_INTP` INT+: reset node, integrate reset level | 5 | 20 10 **160** 4 4 | 9.9 µs |
| `OP_STRAN` serial transfer onto the output node | 6 | 4 each | 1.2 µs |
| `OP_INTM` INT−: integrate signal level, start conversion | 5 | **160** 6 4 4 4 | 8.9 µs |
| `OP_SFLUSH` serial transfer with the reset gate open | 6 | 4 each | 1.2 µs |
| `OP_PBACK` parallel shift backward (both areas) | 6 | 8 8 8 8 9 9 | 2.5 µs |

The bold words are the two 8 µs integration windows. The words themselves are the
standard three-phase patterns of this device. A forward line transfer steps the
phases 2, 2+3, 3, 3+1, 1. The backward shift is the same pattern in reverse order
(2, 2+1, 1, 1+3, 3), so charge moves away from the serial register. The hold times are this design's choice,
fitted to the known figures: 2.5 µs per parallel transfer, 1.2 µs per serial transfer,
8 µs integrations, a 20 µs pixel, and a frame transfer under 100 µs. Changing clock
rates needs only new hold counts. The end-to-end test does this with the serial
transfer.

## How one superpixel is read

The CCD has no summing well, so serial binning happens on the output node itself,
between the two halves of the correlated double sample:

1. **INT+**: RG resets the node, and FRST clears the integrator. The integrator then
   integrates the reset level for 8 µs (FPLTY = 0).
2. **STRAN × n**: n serial transfers move n pixels of each register half onto its
   node. The charge adds up there.
3. **INT−**: the integrator integrates the signal level for 8 µs with the opposite
   polarity. What remains is proportional to the charge alone. CONV_N then starts both
   A/D converters.

A read with one serial transfer takes 198 + 24 + 178 = 400 cycles (20 µs). Each extra
binned pixel adds 24 cycles. Both amplifiers are read together, so every read gives
two superpixels: one from the left half of the serial register, one from the mirrored
position in the right half.

Conversion is **pipelined**. A conversion takes 5.6 µs and is started at the end of
one read, so its result arrives while the next read is already integrating. The
readout controller therefore sends a *tag* along with each INT− request: the
subapertures of the two superpixels. The accumulator keeps tags in a 4-deep FIFO and
pairs each arriving sample with the oldest tag (`subap_accum`).

## The superpixel list

`readout_ctrl` reads a frame in two steps. First comes a frame transfer of `ft_rows`
lines, which also starts the next exposure. Then it walks the list (up to 128 entries
of 32 bits, `wfs_pkg::list_entry_t`):

| field | bits | meaning |
|-------|------|---------|
| kind | 31:30 | 0 read, 1 serial flush, 2 parallel flush, 3 backward shift |
| par | 29:23 | parallel operations first (readouts; flushes for kind 2; backward shifts for kind 3) |
| ser | 22:16 | serial transfers binned into this read, or serial flushes |
| sub_l, sub_r | 9:5, 4:0 | subapertures of the left and right superpixel; 31 = none |

A typical list for a 32×32 grid of 2×2 superpixels has these parts:

* One serial flush of 32, to empty the serial register after the frame transfer.
* Per line pair inside the pattern: an entry with `par = 2` and then one entry per run
  of columns that share their subapertures. These are binned reads, or serial flushes
  where neither half is in the pattern.
* Lines outside the pattern are shifted in with their neighbours and serially flushed.

Parallel flushes shift the image area as well. They are meant for clearing the whole
array, not for use during a readout. A backward shift moves both areas one line away
from the serial register: the last storage line enters the image area, and the far
image line is drained. Zero counts are skipped, and the next entry is fetched while
the current operation runs, so consecutive operations run without gaps. The readout
time of a list is therefore the sum of its operations, plus 2 cycles. A frame without
a frame transfer adds 2 more, because nothing hides the first list fetch.

**Raster mode** reads `rows` × `cols` superpixels per amplifier, with `pbin` parallel
readouts per row and `sbin` serial transfers per superpixel. Its reset values give a
16×16 image with 4×4 binning. The samples leave on the pixel stream with `pix_tag.raster`
set.

Frames start on a start write. With `run` set, a frame starts every `frame_period`
cycles, or back to back when the readout takes longer than the period.

## Dark frame and curvature

A frame taken with the *dark* mode bit set stores its subaperture sums as `I_B`. These
are the bias and dark level of every subaperture, read in exactly the same pattern. A
normal frame ends in the result array. Frame sums are double-buffered, so the next
frame can accumulate while the curvature is computed. `curvature_unit` then evaluates,
for every subaperture *i*:

    I_S   = Σ_i (I_i − I_B,i)
    ΔI/I  = (G_i (I_i − I_B,i) − I_S) / I_S  =  G_i (I_i − I_B,i) · (1/I_S) − 1

`G_i` scales a subaperture to the whole aperture: a subaperture with 1/20 of the area
has G = 20. It can also fold in the gain difference of the two amplifiers. With that
scaling, every subaperture uses the same normaliser. The unit therefore computes one
reciprocal per frame: a bit-serial restoring division of 2^48 by `I_S`, in 49 cycles.
It then needs one multiply per subaperture. For 19 subapertures this takes 90 cycles
(4.5 µs).

Formats:

* G is unsigned Q8.8 and resets to 1.0.
* Results are signed 24-bit with 16 fraction bits, saturated.
* If `I_S ≤ 0` (no light), all results are 0 and `no_signal` is set.

## Host interface

The host writes 32-bit words on `host_addr`/`host_wdata`/`host_we`.
`addr_decoder` splits the address space:

| address | contents |
|---------|----------|
| 0x0000–0x003F | fragment memory `{hold[7:0], word[23:0]}` |
| 0x0100–0x0107 | fragment table per operation `{start[5:0], len[3:0]}` |
| 0x0200–0x027F | superpixel list |
| 0x0400–0x041E | geometric factors G (Q8.8) |
| 0x0500–0x0509 | configuration: 0 mode {ft_en, dark, raster}; 1 list length; 2 frame period; 3 frame-transfer lines; 4 rows; 5 cols; 6 pbin; 7 sbin; 8 number of subapertures; 9 {start (write 1), run} |

Writes outside the map raise `bad_addr`. Writes inside a region but past the end of
its memory are ignored. Results come back on two streams:

* the pixel stream (`pix_*`): every read, with its tag;
* the curvature stream (`curv_*`, ending with `curv_done`).

The A/D results can also be read one byte at a time from the four-byte A/D buffer
(`adc_rd_sel`/`adc_rd_byte`).

The reset configuration:

* list mode with frame transfer
* 104 list entries
* 64 frame-transfer lines
* 2 ms frame period (40,000 cycles)
* 19 subapertures

## Timing summary (20 MHz clock)

| quantity | this RTL |
|----------|----------|
| parallel transfer | 2.5 µs |
| serial transfer | 1.2 µs |
| read with one serial transfer | 20 µs |
| frame transfer, 64 lines | 96 µs |
| curvatures, 19 subapertures | 4.5 µs |
| 19-subaperture pattern of the test (113 entries) | 3.03 ms |
| 16×16 raster, 4×4 binning, incl. frame transfer | 3.28 ms |
| full 64×64 frame, unbinned, incl. frame transfer | 41.2 ms |
| the same with hold counts for 10 µs reads | 20.7 ms |

The design target is about 2.0 ms for the 19-subaperture readout, about 2.5 ms for a
16×16 image, and about 500 frames/s. Those figures count each binned superpixel read
as one 20 µs pixel. Here a read costs 20 µs plus 1.2 µs for every extra binned pixel,
so the default holds give about 330 frames/s for the test pattern. Shorter hold counts
downloaded by the host close the gap; no RTL change is needed.

## Departures and limits

* Clock sequencing, list processing and the curvature arithmetic are dedicated logic
  here. In the original system, a general-purpose DSP does this work in software. The
  clock word, fragments, hold-time principle, list contents and equation are the same.
* The backward shift has no fragment in the original sequencing table; its words here
  are this design's own, built by reversing the frame-transfer phases. Which areas it
  moves is also this design's choice (both).
* Every read here uses both amplifiers. Reading the whole serial register through one
  amplifier needs serial fragments that move both halves the same way. Writing those
  needs the phase layout at the point where the register splits, which is not known
  here. The fragment memory can take such fragments, but none is provided or tested.
* Not included: the serial host link and the monitor channel (replaced by the plain bus
  and streams), the TE cooler control, and everything analog.
* Counts are limited to 127 per request (`par`, `ser`, `pbin`, `sbin`), 255 frame-transfer
  lines and raster rows, and 31 subapertures.

## Files and simulation

`rtl/`:

* `wfs_pkg.sv`: shared types and constants, default fragments, address map
* `wfs_controller.sv`: the top level
* `seq_engine.sv`, `readout_ctrl.sv`, `list_ram.sv`, `adc_buffer.sv`
* `subap_accum.sv`, `curvature_unit.sv`, `addr_decoder.sv`, `cfg_regs.sv`

`tb/` has a self-checking testbench `tb_<module>.sv` for every module except
`cfg_regs`, which is exercised through the top. It also holds `ccd_model.sv`, a
behavioural model of the CCD, integrators and converters, which the two top-level
tests use. `tb_wfs_controller.sv` runs the top at its default parameters through these
steps:

* array clearing
* a dark frame
* a star frame, checking every curvature against floating-point arithmetic
* continuous operation
* a 16×16 raster
* a hold-time rewrite
* a backward shift of 5 lines, followed by a read of the line that was nearest the
  serial register before the shift

`tb_wfs_fullframe.sv` reads whole frames without binning and checks every pixel:

* 64×64 with frame transfer: 2048 reads, 41.2 ms
* 64×128 without frame transfer: 4096 reads, 82.2 ms. The storage half comes out
  first, then the image half. For this the host replaces the `OP_PREAD` fragment with
  the frame-transfer words at the readout holds, so that the image area shifts too.
* 64×64 with frame transfer at 10 µs per read: 20.7 ms. Only hold counts change: INT+
  10 5 80 2 2, serial transfer 2 each, INT− 80 3 2 2 2. The integrations halve to 4 µs,
  and so does every converter code.

Every testbench prints `TB_RESULT checks=N failures=M`. Example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_wfs_controller \
      rtl/wfs_pkg.sv $(ls rtl/*.sv | grep -v wfs_pkg) tb/ccd_model.sv tb/tb_wfs_controller.sv
    ./obj_dir/Vtb_wfs_controller

The package goes first. `-Wno-fatal` keeps lint warnings (unused package constants, for
example) from stopping the build. Add `+verilator+rand+reset+2` to start registers at
random values. The top-level test simulates about 0.35 s of sensor time, and the
full-frame test about 0.15 s; each takes about a minute, build included.
