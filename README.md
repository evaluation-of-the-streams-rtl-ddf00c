# Four stream-processing accelerators for a multi-FPGA board

This is synthesizable SystemVerilog for four signal- and image-processing
applications. They were designed for an accelerator board with several FPGAs.
Each FPGA has one 32-bit x 65K-word SRAM bank. The FPGAs talk to the host and
to each other through data streams. All four designs share the same style:
data moves as a stream, each processing element (PE) keeps its working state
locally, and the parallel hardware is spent on the innermost, costly
computation. Everything else is left to the host.

| design | what the hardware does | top module |
|---|---|---|
| Pixel Purity Index (PPI) | dot products of hyperspectral pixels with random "skewer" vectors, plus the extreme pixel of each skewer | `ppi_unit` |
| K-means classification | assigns every pixel to its nearest class centre in a linear systolic array, one processor per class | `km_array` |
| Polyphase filter bank | a bank of four 4-tap FIR branches, each with separate even- and odd-sample chains | `pf_bank` |
| Contrast enhancement | histogram-projection grey-level stretching, split over two chips | `ce_pipeline` |

`streams_c_apps_top` places the four designs side by side. They share only
the clock and reset, and each design has its own ports with a prefix
(`ppi_`, `km_`, `pf_`, `ce_`). The SRAM banks are board parts. Their ports
are brought out of the top, and the testbenches attach a behavioural model
(`tb/sram_model.sv`) with one cycle of read latency.

All logic uses one clock and a synchronous, active-high reset `rst`. Streams
use a valid/ready handshake. An element moves on a cycle where both are high.

## Pixel Purity Index engine (`ppi_unit`, `ppi_array`, `ppi_dp`, `ppi_minmax`)

**Algorithm.** Each pixel of a hyperspectral image is a vector of D bands.
For each of K random skewer vectors, the algorithm projects every pixel onto
the skewer and notes the pixels at both ends of the projection. Pixels that
are often extreme are "pure". Almost all of the work is the N x K dot
products. They are all independent.

**Array.** The engine computes KS x NS dot products at once in a grid of
`ppi_dp` units. Row r works on skewer k+r and column c on pixel n+c. On each
cycle, every row receives one band of its skewer (signed 3-bit) and every
column receives the same band of its pixel (unsigned 8-bit). After D cycles
the grid holds KS x NS finished dot products. Each row then copies its NS
results, tagged with pixel indices, into a shift register. The shift
register feeds them one per cycle into the row's `ppi_minmax` unit. Meanwhile
the DP units already work on the next NS pixels. This overlap is why the
design requires D >= NS.

`ppi_minmax` keeps the largest and smallest dot product and their indices.
When two values are equal it keeps the smaller index. This gives the same
result as scanning the pixels in order with strict comparisons. The MinMax
units are chained into a column with zero entering at the bottom. After a
pass, `dump` loads every unit's result into the chain. The results then
leave at the top, one row per cycle: first skewer k, then k+1, and so on.

**Sequencing (`ppi_unit`).** For every set of KS skewers the unit goes
through four states:

1. `LOAD`: takes D stream beats. Each beat holds one band of all KS skewers
   (`skw_data`, KS x 3 bits). The skewers go into local registers.
2. `RUN`: reads the image from SRAM, one word per cycle, for `n_groups`
   groups of NS pixels.
3. `DRAIN`: waits until the last group has passed through the shift
   registers.
4. `DUMP`: sends KS results, one per cycle, on `res_valid`/`res`. Each
   result is `{max, idxmax, min, idxmin}`, with the widths
   `DP_W, IDX_W, DP_W, IDX_W` and DP_W = 8+3+clog2(D)+1.

The skewer stream is held off (`skw_ready` low) outside `LOAD`. The last
result of a set leaves D + n_groups·D + NS + KS + 3 cycles after the first
skewer beat is accepted.

Memory layout: word g·D + d holds band d of pixels g·NS … g·NS+NS-1. Pixel
g·NS+c is in byte c. With NS = 4, one 32-bit word carries one band of four
pixels. This is why NS defaults to 4.

Defaults: KS = 2 and NS = 4 give 8 parallel dot products, which is the
parallelism of the hand-optimised reference implementation. D = 16 and the
16-bit pixel index are choices of this design. Counting how often each pixel
was extreme (the PPI tally) stays on the host, which receives the indices.

## K-means classification array (`km_array`, `km_front`, `km_proc`, `km_filter`)

**What it does.** Classification needs the distance from every pixel to
every class centre. That is over 99% of the run time for 32 classes. The
array computes those distances. Updating the centres stays on the host.

**Dataflow.** A pixel flows through a line of NB_CLASS processors, one band
per cycle. Processor k stores the centre of class k (NB_BAND values) in a
small local memory. Each token carries `(flag, data, left_dist,
left_index)`. On a pixel token, the processor adds |data − centre[d]| to its
running L1 distance. If the running distance is below the incoming
`left_dist`, the processor replaces `left_dist` and `left_index` with its own
distance and number.

This comparison is made on every band, so on the intermediate bands the
fields hold partial values that mean nothing on their own. On the last band,
however, every processor compares its complete distance with the complete
minimum of all processors to its left. The token that leaves the array
therefore carries the nearest class and its distance. Ties go to the lower
class number.

**Centre loading without a second port.** Centres travel in the same stream
with `flag = KM_CENTER`. `km_front` puts the destination class number into
`left_index`. Only the processor whose number matches writes `data` into
`centre[d]`. The host can therefore replace centres between blocks of pixels
without stopping the stream. `km_front` starts every pixel token with
`left_dist` set to all ones, so processor 0 always takes it. `km_filter`
counts bands. When the last band of a pixel leaves, it emits
`res_class`/`res_dist`, and it drops everything else.

**Rules and timing.** Every vector must be exactly NB_BAND tokens, because
each processor counts the band position locally. The array never stalls
(`s_ready` is always 1). A result appears NB_CLASS + 2 cycles after the last
band of its pixel is accepted. Defaults: NB_CLASS = 32 and NB_BAND = 8, with
8-bit unsigned data. NB_BAND and the data width are this design's choices.
Processors are numbered from 0.

## Polyphase filter bank (`pf_bank`, `pf_fir`)

A polyphase filter bank splits a signal into frequency sub-bands. It derives
M short filters from one long low-pass prototype h0: branch k gets taps
h0[k], h0[k+M], h0[k+2M], …. An FFT after the bank, which is not part of
this RTL, shifts the channels in frequency.

`pf_fir` is one 4-tap branch. Each sample x is multiplied by the four
coefficients once. The products feed two transposed-form chains. Even
samples go to one chain and odd samples to the other, and each chain's
registers load only on their own samples:

```
y  = r0 + C0·x        r0 <= r1 + C1·x
                      r1 <= r2 + C2·x
                      r2 <=      C3·x
```

The even output is therefore C0·x(n) + C1·x(n−2) + C2·x(n−4) + C3·x(n−6),
and the odd output is the same over odd samples. The first sample after
reset is treated as even. The input is signed 8-bit and the coefficients are
signed 12-bit. The defaults are 3, 117, 1741 and 128. Sums use 22 bits. The
output is the low 16 bits, so large sums wrap. `out_odd` tells which chain
produced the output. An output appears one cycle after its sample.

`pf_bank` has M = 4 branches. A commutator sends sample n to branch
n mod M. Each branch has its own coefficients in
`COEFS[k][i]` (packed, tap 0 in the low bits). Only one set of four
coefficients was available, so every branch defaults to it. Set `COEFS` to
the real prototype taps. The full prototype bank (128 taps, M = 32) is
`pf_bank #(.M(32), .COEFS(...))`.

## Contrast enhancement (`ce_pipeline`, `ce_hist`, `sc_stream`, `ce_remap`)

Histogram projection gives every grey level that occurs in the image an
equal share of the output range. If N distinct levels occur, the darkest
gets rank 0 and the brightest gets rank N−1. A pixel whose level has rank n
becomes n·256/N. The work is split over two chips because each chip has only
one SRAM bank: one bank stores the image, and the other holds the division
table.

**`ce_hist` (phases 1 and 2).**

- `IN`: 32-bit words, four pixels each with pixel 0 in the low byte, arrive
  with `in_last` on the final word. Each word is written to SRAM. Its four
  pixels then update a 256-bin histogram in on-chip RAM, one per cycle, so
  one word is accepted every four cycles. Because the histogram has its own
  RAM, the image write and the histogram update never compete for the
  SRAM.
- `SCAN` (256 cycles): walks the bins from dark to bright. It gives each
  occupied level the next rank in a stretch table, counts N, and clears the
  bins for the next frame.
- `OUT`: reads the image back and sends one 16-bit packet `{N−1, rank}` per
  pixel. A one-word prefetch keeps this at one packet per cycle while the
  receiver is ready.

**`sc_stream` (the channel between the chips).** The packets reach the
remap chip through a small FIFO channel. It is 16 bits wide and 4 entries
deep by default, and it carries an end-of-stream flag with each element. The
channel decouples the two chips. When it is full, the histogram chip waits.
When it is empty, the remap chip waits.

**`ce_remap` (phase 3).** The remap chip uses the packet itself as the
16-bit SRAM address. The host must first fill that bank with the table
`mem[{a, n}] = n·256/(a+1)`, with the value in the low byte. Four results
are packed per output word, first in the low byte. `out_last` marks the
frame's final word. Packets are refused while a full word waits for the
host, and the one pixel still in flight then fits into the emptied packing
register.

A frame produces no output until all of it has been read in and scanned
(4 cycles per input word, then 256 cycles). After that, one pixel per cycle
flows out. With 16-bit SRAM addresses, a frame can hold up to 65,536 words,
which is 262,144 pixels.

## How far it can be trusted

Each module has a self-checking testbench in `tb/`. The testbench compares
the module with an independent software model: the L1 nearest-centre search,
the sequential PPI scan, the direct FIR convolution, and rank·256/N.
`tb_streams_c_apps_top` runs all four designs
at their default sizes at the same time. It also checks that every
mechanism occurs at least once: input stalls and output back-pressure in
contrast enhancement, a full inter-chip channel, both filter chains and all four branches, the skewer
stream being held off, and K-means centre reloads.

What is the design's own, rather than given:

- all stream handshakes, packet layouts and byte orders, and the channel depth;
- the SRAM read latency (one cycle);
- the PPI memory layout and the KS x NS split;
- D, NB_BAND and the K-means data width;
- the polyphase commutator and the per-branch coefficients;
- the exact output formula n·256/N.

Results do not wait for the host in `ppi_unit`, `km_array` or the filter
bank, because those outputs have no ready signal.

Not included:

- the FFT after the filter bank;
- the board crossbar and the control-chip process that forwards the host
  stream onto it;
- the SRAM chips;
- everything done by host software: loading the division table, the PPI
  tally, and recomputing K-means centres.

## Sizes and the workloads they hold

| design | default size | largest job tested |
|---|---|---|
| PPI | 2 skewers x 4 pixels = 8 dot products per cycle, D = 16 | `tb_ppi_full_image`: 16,384 pixels (a full 65,536-word bank at D = 16), two skewer sets, cycle count checked |
| K-means | 32 classes, 8 bands | `tb_streams_c_apps_top`: 32 classes, 150 pixels, centres reloaded between blocks |
| Polyphase | 4 branches of 4 taps | `tb_pf_bank32`: 32 branches of 4 taps (a 128-tap prototype), with a synthetic symmetric prototype |
| Contrast enhancement | 65,536-word banks | `tb_ce_full_frame`: two 262,144-pixel (512 x 512) frames, one of them flat so that a single bin counts every pixel |

The 8 parallel dot products and the 32 classes match the reference
configurations of these applications. The image sizes, band counts and
prototype taps are not given for any of them, so the tests use sizes of
their own.

## Simulating

Any testbench runs with plain Verilator 5, from the directory that holds
`rtl/` and `tb/`. Packages must come first:

```
verilator --binary --timing --assert -y rtl -y tb rtl/km_pkg.sv \
          tb/tb_streams_c_apps_top.sv --top-module tb_streams_c_apps_top
./obj_dir/Vtb_streams_c_apps_top
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`, and a
watchdog ends a run that hangs. The block testbenches use small parameters
(for example, 6 classes or D = 8) to stay short. The top-level testbench
uses the defaults and runs in a few seconds.
