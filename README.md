# SPAM feature extractor in SystemVerilog

This is a streaming hardware extractor for the first-order **Subtractive Pixel
Adjacency Model** (SPAM). SPAM is a steganalysis feature set: it models how
neighbouring pixel differences follow each other, and the features go to a
classifier that decides whether an image carries hidden data. For an 8-bit
grey image of ROWS × COLS pixels (512 × 512 by default), the design computes
162 features: 2 × (2T+1)² with T = 4. It reads four pixels per clock, so a
512 × 512 frame is scanned in exactly 2¹⁶ cycles.

The organisation follows the FPGA architecture of Rodriguez-Perez,
Morales-Reyes, Cumplido and Feregrino-Uribe, *An analysis of computational
models for accelerating the subtractive pixel adjacency model computation*
(2015). The data flow is: a block memory, eight difference filters, eight
address generators, eight register files with frequency calculators, eight
dividers and two feature calculators. The published architecture leaves out
the chain pairing across rows, the number formats and the control. This
design fills those in, and the section "Where this design goes beyond the
published architecture" lists each choice.

## What is computed

The eight directions are A east, B west, C north, D south, E north-east,
F south-west, G south-east and H north-west. Each direction X has a step s_X:
A = (0,+1), B = (0,−1), C = (−1,0), D = (+1,0), E = (−1,+1), F = (+1,−1),
G = (+1,+1), H = (−1,−1), given as (row, column).

* The difference of direction X at pixel p is `D_X(p) = I(p) − I(p + s_X)`.
* The Markov chain pair at p is `(y, x) = (D_X(p), D_X(p + s_X))`. It is
  taken for every p for which p + 2·s_X is still inside the image.
* `P_X[y]` counts the pairs whose y lies in [−T, T]. `F_X[y][x]` counts the
  pairs where both y and x lie in [−T, T].
* The transition probability is `M_X(x|y) = F_X[y][x] / P_X[y]`.
* Each of the two features at (y, x) is a mean of four probabilities:
  `f_hv = (M_A + M_B + M_C + M_D) / 4` and
  `f_diag = (M_E + M_F + M_G + M_H) / 4`.

Opposite directions (A and B, for instance) see the same differences with
opposite signs, but their chains run the opposite way. The hardware therefore
counts all eight directions separately. Each feature index
`(y+T)·(2T+1) + (x+T)` runs from 0 to 80.

## Data path

| Stage | Module | Role |
|---|---|---|
| differential filter | `spam_block_memory` | 32-bit image store, four pixels per word. Two read ports return the same word position of rows i and i+1. |
| | `spam_pixel_addr_gen` | Raster scan, one word per cycle. Issues both read addresses and a row/word tag. |
| | `spam_diff_filter` (×8) | Four subtractors per direction, plus a register holding the last pixel of the previous word. |
| | `spam_addr_gen` (×8) | Forms the chain pair for each lane, checks the range and produces the counter addresses ADDP = y+T and ADDF = (y+T)(2T+1)+(x+T). |
| transition probability | `spam_freq_calc` (×8) | P (9 counters) and F (81 counters), four increments per cycle. Afterwards reads out (P[y], F[y][x]) one pair per cycle. |
| | `spam_divider` (×8) | Pipelined F/P. 16 fraction bits, latency 18 cycles. |
| feature | `spam_features_calc` (×2) | Adds the four probabilities of a group and shifts the sum right by two. |
| | `spam_top` | Wiring, plus a small start/clear/scan/drain/read sequencer. |

`spam_pkg` holds the shared widths (8-bit pixels, 9-bit signed differences,
17-bit probabilities), `DIV_LAT = 18` and the direction enum.

## How a 2 × 4 window covers every chain pair

This is the least obvious part of the design. Each cycle the datapath sees
only four pixels of row r (`r1`) and the same four columns of row r+1 (`r2`).
The scan visits r = 0 … ROWS−1. On the last row `r2` does not exist, and
only the horizontal filters produce anything there.

**Lane positions.** For word w and lane k (column 4w+k), each filter outputs
the difference at the following position:

| Direction | Lane k computes | Position |
|---|---|---|
| A | I(r,4w+k−1) − I(r,4w+k) | (r, 4w+k−1) |
| B | I(r,4w+k) − I(r,4w+k−1) | (r, 4w+k) |
| C | I(r+1,4w+k) − I(r,4w+k) | (r+1, 4w+k) |
| D | I(r,4w+k) − I(r+1,4w+k) | (r, 4w+k) |
| E | I(r+1,4w+k−1) − I(r,4w+k) | (r+1, 4w+k−1) |
| F | I(r,4w+k) − I(r+1,4w+k−1) | (r, 4w+k) |
| G | I(r,4w+k−1) − I(r+1,4w+k) | (r, 4w+k−1) |
| H | I(r+1,4w+k) − I(r,4w+k−1) | (r+1, 4w+k) |

Column 4w−1 comes from a register that keeps lane 3 of the previous word.
This is the register drawn in the published east filter. A lane that would
reach outside the image drives `dvalid = 0`. That happens to lane 0 of word 0
for every direction except C and D, and to all non-horizontal lanes on the
last row.

**Horizontal chains (A, B).** The partner of lane k is lane k−1, and for
lane 0 it is the registered lane 3 of the previous word. A orders the pair
(left, right). B orders it (right, left).

**Vertical and diagonal chains (C…H).** The partner lies one row up, in the
differences produced during the previous scan row. Each address generator
keeps them in a line buffer of COLS/4 words. Each buffer entry holds only a
5-bit code per lane: exists, in range, and value + T. The diagonals need the
buffer shifted by one column:

* G and H use column c−1. For lane 0 that column sits in the previous word,
  which has already been overwritten. A register therefore saves lane 3 of
  that word just before the overwrite.
* E and F use column c+1. For lane 3 that column is lane 0 of the next word,
  which the generator reads ahead.

The pair is oriented by the chain. D, F and G take y from the buffer and x
from the current row. C, E and H take y from the current row and x from the
buffer. No pairs are formed on scan row 0, so nothing carries over from the
previous image.

**Counting.** Every P and F counter adds, each cycle, the number of lanes
(0 to 4) that address it. One counter can therefore absorb all four pixels of
a word in the same cycle.

## Number formats and the read-out

After the scan, the eight frequency calculators step together through
y = 0…8 and x = 0…8 and present `(P[y], F[y][x])` to their dividers.

The divider is a restoring divider unrolled into 17 quotient stages behind
an input register. It returns `floor(F · 2¹⁶ / P)`: unsigned, 16 fraction
bits, with 1.0 = 0x10000. A zero P gives 0. Its latency is 18 cycles, and
the feature calculators delay the enable and index by the same 18 cycles.

Each feature is `floor(sum / 4)` of four such probabilities, again 17 bits
with 16 fraction bits. Both truncations (the divider and the shift) make the
hardware result exactly reproducible in software. The testbench reference
model does exactly that.

The counters are 19 bits wide, `$clog2(ROWS·COLS+1)`, which holds a full
512 × 512 count.

## Timing

* Scan: ROWS·COLS/4 cycles. That is 65536 = 2¹⁶ for 512 × 512, one
  32-bit word per cycle.
* From the start edge to `done`: ROWS·COLS/4 + (2T+1)² + 18 + 6 cycles,
  which is 65641 at the defaults. The extra cycles are 81 read-out cycles,
  the divider, and 6 cycles of memory, register and sequencer latency.
* Output: one (`feat_hv`, `feat_diag`) pair per cycle for 81 cycles. `done`
  is high together with the last pair.
* The published figure is 1328 frames/s at 87.035 MHz, based on 2¹⁶ cycles
  per frame. Without overlapping the read-out with the next scan, this RTL
  would give 1325.9 frames/s at the same clock. Its achievable clock on an
  FPGA has not been measured.

## Using the top

```
spam_top #(.ROWS(512), .COLS(512), .T(4)) u (
  .clk, .rst_n,                                   // async active-low reset
  .img_we, .img_waddr, .img_wdata,                // load: word w of row r at r*COLS/4 + w,
                                                  //       column 4w+k in bits 8k+7:8k
  .start, .busy, .done,                           // pulse start; done marks the last feature
  .feat_valid, .feat_idx, .feat_hv, .feat_diag);  // idx = (y+T)*(2T+1) + (x+T)
```

Load the image before `start`. The memory is not written by the design
itself, so the image can also be reloaded between runs. Each run clears the
register files first. COLS must be a multiple of 4. ROWS·COLS/4 sets the
memory depth.

## Where this design goes beyond the published architecture

* **What P counts.** P counts the conditioning value y of every pair whose
  two differences lie inside the image, including pairs whose x falls outside
  [−T, T]. A row of F therefore sums to at most P[y], as in the published
  example counts. P does not count differences that have no successor.
* **Line buffers** for the vertical and diagonal chains, and the exact
  lane/column mapping above. The published text does not say how pairs across
  rows are formed.
* **Divider.** The published design uses a vendor divider core with an
  18-cycle latency. Here it is a plain restoring pipeline that keeps that
  latency, with a 16-bit fraction of this design's choosing.
* **Control and load port.** Start/busy/done, a one-cycle counter clear, and
  a write port into the image memory are this design's own.
* **Formats.** Byte order in the word, 19-bit counters, 17-bit probabilities
  and truncating division are this design's choices.
* **Only the first-order model** (T = 4) is built, as in the published
  hardware. The second-order model (T = 3, triplets) is not built. T is a
  parameter, but other values are untested.
* The published work also offers a GPU version of SPAM and feeds the
  features to an SVM classifier. Both are software outside this hardware and
  are not part of this RTL.

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/`. Each one
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
`tb/spam_ref_pkg.sv` is a pixel-by-pixel reference model written straight
from the definitions above. The address-generator and end-to-end tests
compare against it.

| Testbench | What it checks |
|---|---|
| `tb_spam_block_memory` | Random reads on both ports against a shadow copy, including read-during-write. |
| `tb_spam_pixel_addr_gen` | Address sequence, tag alignment, `scan_done`, and exactly ROWS·COLS/4 cycles. |
| `tb_spam_diff_filter` | All 8 directions. Every lane's value and valid flag against `D_X(p)`. |
| `tb_spam_addr_gen` | All 8 directions, over two images. Histograms of ADDP/ADDF against the reference P and F. |
| `tb_spam_freq_calc` | Random multi-lane increments, read-out order, values, `rd_last`, and clear. |
| `tb_spam_divider` | 2000 back-to-back divisions, including 1.0 and zero divisors, each exactly 18 cycles later. |
| `tb_spam_features_calc` | Average, index, delay and valid gaps. |
| `tb_spam_top` | 32 × 32: a textured image and a uniform image. All 162 features, cycle count, and one feature per cycle. |
| `tb_spam_top_full` | The same test at the default 512 × 512 with no parameter overrides. It takes about 2 s. |

The end-to-end tests also count how often each mechanism fires, and fail if
one never fires: out-of-range differences, lanes masked at the border, pairs
through the line buffer, several lanes hitting one counter, and divisions by
zero.

Run a test with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_spam_top rtl/spam_pkg.sv tb/spam_ref_pkg.sv tb/tb_spam_top.sv
./obj_dir/Vtb_spam_top
```

Change the top-module name for any other testbench. `spam_ref_pkg.sv` is only
needed by the testbenches that import it.
