# 2-D discrete wavelet transform with resource cycling

A multi-level 2-D DWT loses half of its data per direction at every octave:
an N x N image gives an (N/2) x (N/2) LL band to decompose next, so the line
storage a separable transform needs (a few image lines of the current octave)
halves every octave. At the same time the coefficients of a fixed-point
transform need more bits the deeper they are in the decomposition tree. A
design sized for the worst case on both counts (longest lines *and* widest
words) wastes most of either. This design reuses one set of resources
across octaves: one row filterbank and one column filterbank process all
octaves one after another, their word length grows by 4 bits per octave
(8/10, 12/14, 16/18 bits for the row/column filters with 8-bit pixels), and the
column unit's line memory keeps a fixed number of bits and re-packs its shorter
lines into wider samples.

Default configuration: 512 x 512 image, 8-bit pixels, three octaves, the
(13,7) integer wavelet filter pair.

## Dataflow

```
 pixels (2/clk) ---> EIU ----> row SIU ----> row filterbank ----> column SIU ----> column filterbank ---> EIU ---> memory
                      ^        delay line    PDA low+high pass    transpose mem    PDA low+high pass      align
                      |        even / odd    1 op / clock         L/H interleave   1 op / clock           2 coef / word
                      +------------------------- LL band read back from memory for the next octave ------------+
```

* The **row SIU** takes two samples (even, odd) per clock and presents one
  13-sample window per clock to the **row filterbank**, which returns one
  low-pass (L) and one high-pass (H) sample per clock. Like the column SIU, it
  delivers the window already cut into bit slices, i.e. as look-up table
  addresses, so the filterbank itself only looks up and adds.
* The **column SIU** stores these in its transpose memory (L and H side by side
  in a line) and, once enough rows are present, reads one line position of all
  lines per clock, so the **column filterbank** sees an L column, then an H
  column, then the next L column... at one operation per clock. Its low-pass
  output is LL (on L columns) or HL (on H columns), its high-pass output LH or
  HH.
* The **EIU** pairs up coefficients of the same sub-band from adjacent
  columns into memory words and writes them, one word per clock.
* Scheduling is **blocking**: octave k+1 starts only when octave k has been
  written out completely; it reads its input (the LL band) back from memory.
  The pixel port is not ready during octaves 2..K.

Both filter units run one operation per clock in every octave, so one octave of
side M takes about M*M/2 clocks, and a whole K-octave transform about
(2/3)(1 - 4^-K) N^2 clocks plus the drain at the end of each octave, when
the column side finishes the last rows (measured at 512 x 512: 175,183 clocks
against the ideal 172,032).

## The filter pair and its number format

The filters are the (13,7) integer wavelet pair in its lifting form

```
d[n] = x[2n+1] - (-x[2n-2] + 9 x[2n] + 9 x[2n+2] - x[2n+4]) / 16
s[n] = x[2n]   + (-d[n-2] + 9 d[n-1] + 9 d[n] - d[n+1]) / 32
```

expanded into FIR taps (units of 1/512) so that they can be evaluated by
distributed arithmetic:

| window offset | -6 | -5 | -4 | -3 | -2 | -1 | 0 | +1 | +2 | +3 | +4 | +5 | +6 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| low-pass  | -1 | 0 | 18 | -16 | -63 | 144 | 348 | 144 | -63 | -16 | 18 | 0 | -1 |
| high-pass |  0 | 0 | 0 | 0 | 32 | 0 | -288 | 512 | -288 | 0 | 32 | 0 | 0 |

A filter operation i works on the window of samples 2i-6 .. 2i+6; the
low-pass output is centred on sample 2i, the high-pass output on 2i+1. Samples
outside the row or column are folded back by whole-sample symmetric extension
(x[-1] = x[1], x[M] = x[M-2]).

Pixels are level-shifted to signed values (p - 128). Every filter output is
the exact sum (in units of 1/512) floored to an integer and kept 2 bits wider
than its input. The summed tap
magnitudes are 1.625 (low-pass) and 2.25 (high-pass), so the 2 extra bits
guarantee that no value ever overflows; no saturation logic exists.

| octave | image side | row filter input | column filter input | coefficient out |
|---|---|---|---|---|
| 1 | N   | 8 bits  | 10 bits | 12 bits |
| 2 | N/2 | 12 bits | 14 bits | 16 bits |
| 3 | N/4 | 16 bits | 18 bits | 20 bits |

## PDA filterbank (`pda_filterbank`)

Instead of multipliers, each filter is a set of look-up tables. For bit
position k of the inputs, the k-th bits of the samples that share a polyphase
branch form a table address; the table entry is the sum of the taps whose bit
is set. The per-bit results are added with weight 2^k, and the sign-bit slice
is subtracted (two's complement, the arithmetic of a Baugh-Wooley reduction
tree). The polyphase split keeps the tables small: the low-pass filter uses a
2^7-entry table for its even-position taps and a 2^6-entry table for its odd
ones (instead of 2^13), the high-pass filter 2^4 and 2^1 entries. The table
contents are generated at elaboration time from the tap list in `dwt_pkg`, so
changing the filter means changing that list (and the polyphase tap counts).

Word-length reconfiguration is the `act_w` input: the module is built for the
widest octave (`WMAX`) and uses only the lowest `act_w` bit slices, with bit
`act_w-1` as the sign. This corresponds to adding look-up tables and widening
the reduction tree per octave; on an FPGA that is partial reconfiguration,
here it is a run-time enable. Latency is one clock; the module never stalls.

## Row SIU (`row_siu`)

A 16-sample circular delay line, split into an even bank and an odd bank
(sample position mod 16). Operation i of a row may fire once the pair holding
sample min(2i+6, M-1) is present; a new pair is accepted only while it cannot
overwrite a sample some pending window still needs (pair index <= i+4). All
folded positions lie inside the current 13-sample span, so the delay line is
enough even at the row ends, and for M <= 16 a whole row fits. The delay line
exists twice, one copy per row parity: while the last four windows of a row
are formed, the first pairs of the next row already fill the other copy, so
the filterbank runs without a gap from row to row.

## Column SIU and transpose memory (`col_siu`, `transpose_mem`)

This is the part where the resource cycling is visible in the RTL.

The transpose memory is 16 line memories of N words x 10 bits (81,920 bits at
N = 512), fixed for all octaves. Row r of the row-filter output goes to line
r mod 16, with the L and H results of operation i at positions 2i and 2i+1. In
octave k the lines are N/2^k samples long, so each sample gets 2^k words:

| octave | samples per line | words per sample | bits available | sample width |
|---|---|---|---|---|
| 1 | 512 | 1 | 10 | 10 |
| 2 | 256 | 2 | 20 | 14 |
| 3 | 128 | 4 | 40 | 18 |

A sample is stored least significant word first and sign-extended on read.

Column pass j (output row j of all four sub-bands) needs rows 2j-6 .. 2j+6 and
starts when row min(2j+6, M-1) is complete. It then reads positions 0..M-1,
one per clock, from all 16 lines at once, and builds the 13-line window with
the same edge folding as the row side. The row side may write row r only while
r < max(0, 2j-6) + 16 (`wr_row_limit`), which guarantees that no line of a
pending window is overwritten. Since the column side consumes two rows in the
time the row side produces two rows, this limit is a safety net: in practice
the row side stays a few rows behind it.

## EIU and memory layout (`eiu`)

The memory port is a simple dual-port interface (one write and one read per
clock, read data one clock after the request). A word holds two horizontally
adjacent coefficients of one sub-band, `{column c+1, column c}`, each
IN_W + 4*OCTAVES = 20 bits, sign-extended. The EIU keeps the even-column
outputs of each band and emits the words when the odd column arrives; the
four words of a column pair leave through an 8-entry queue at one per clock.

Word addresses (N/2 words per image row):

* Sub-bands go into the usual pyramid arrangement of an N x N coefficient
  image: in octave k with sub-band side h, LL at rows 0..h-1 / columns
  0..h-1, HL to its right, LH below it, HH diagonally.
* The LL band of every octave but the last goes to a scratch area instead,
  packed row after row (h/2 words per row): octave 1 writes scratch area 0 at
  `N*N/2`, octave 2 scratch area 1 at `N*N/2 + N*N/8`, alternating, so an
  octave never reads the area it is writing. The last octave writes its LL
  into the pyramid.
* In octaves 2..K the EIU reads the previous scratch area in raster order,
  one word (two samples) per clock, through a 4-entry queue.

The memory therefore needs N*N/2 + N*N/8 + N*N/32 words (167,936 at N = 512)
and the address is 2*log2(N) bits wide.

## Octave scheduling (`dwt_ctrl`)

`go` starts octave 1 with side N. When the row SIU and column SIU are done and
the EIU output queue is empty, the controller either finishes (`done` pulse)
or halves the side, increments the octave, switches the filter widths and
pulses `start`, which clears the SIUs and the EIU input side. The switch is
immediate; no reconfiguration time is modelled.

## Departures and choices

What follows the architecture as described: the block chain, one row and one
column PDA filterbank shared by all octaves, polyphase look-up tables, even/odd
splitting in the SIUs, the transpose memory in the column SIU, L/H
interleaving into one column filterbank, blocking octave scheduling, LL
read-back through the EIU, 512 x 512 x 8-bit images, three levels and the
8/10, 12/14, 16/18-bit word lengths.

Choices of this design, where the architecture leaves the detail open:

* **Tap values.** Only the filter's name and tap lengths are fixed; the values
  above are the (13,7) lifting filter given earlier.
* **Radix point.** Outputs keep the input's integer scale and grow 2 bits per
  filter. This never overflows, but a different placement (keeping fraction
  bits in the bands whose range allows it) would give a more accurate
  transform. On a smooth 512 x 512 test image the rebuilt picture reaches
  about 50 dB PSNR: well above the roughly 39 dB of a datapath held to 8 bits
  throughout, but below the roughly 65 dB that a per-filter radix placement
  can reach with the same word lengths.
* **Resource cycling.** On an FPGA the freed line storage turns into logic by
  reconfiguration. Here the filterbanks are built for the widest octave with a
  run-time word-length select, and the cycling happens inside the transpose
  memory (shorter lines, wider samples, same bits).
* **Interfaces.** Valid/ready on the pixel port, the memory port above, the
  word format and the memory layout, the 16-line transpose memory (13 lines are
  the minimum for the 13-tap filter), symmetric extension at the edges, the
  pixel level shift, and an active-low asynchronous reset of control state.
* **Not built:** the off-chip memory (only modelled in the testbenches), the
  host processor and configuration port that reconfigure an FPGA, and a
  ping-pong buffer for streaming video.
* Limits: N a power of two with N / 2^(OCTAVES-1) >= 4; at most 4 octaves
  (2-bit octave index).

## Files

| file | content |
|---|---|
| `rtl/dwt_pkg.sv` | taps, window layout, edge folding, per-octave widths |
| `rtl/pda_filterbank.sv` | PDA low/high-pass pair |
| `rtl/row_siu.sv` | row delay line and window former |
| `rtl/transpose_mem.sv` | re-packing line memory |
| `rtl/col_siu.sv` | transpose memory control, column windows |
| `rtl/eiu.sv` | pixel input, LL read-back, word alignment |
| `rtl/dwt_ctrl.sv` | octave scheduler |
| `rtl/dwt2d_top.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_dwt2d_full` (default size) and `tb_dwt2d_psnr` (reconstruction quality) |

## Verification

Every testbench computes its expected values independently of the RTL and
ends with a line `TB_RESULT checks=<n> failures=<m>`.

* `tb_dwt2d_top` (N = 64, three octaves) and `tb_dwt2d_full` (the default
  512 x 512, no parameter overrides) stream a random image with flat and
  full-scale striped patches and random input gaps, keep a memory model, and
  compare every coefficient of the final pyramid with a direct convolution of
  the taps (plain multiply-accumulate, floor, symmetric extension). They check
  the clock count against the two-samples-per-clock rate and count pixel-port
  back-pressure (the next image is offered early and must wait while the
  higher octaves run), octave switches, LL read-back, edge folding and outputs that
  need the grown word length. The full-size run takes about 20 s to build and
  under a second to simulate with Verilator.
* `tb_pda_filterbank`: random and worst-case windows at 8..18 bits.
* `tb_row_siu`, `tb_col_siu`: every window for several image sides, with
  random gaps and blocking.
* `tb_transpose_mem`: fill and read back in each octave's packing.
* `tb_eiu`: level shift, word alignment and addresses of all four bands in
  three octaves, read-back under back-pressure.
* `tb_dwt_ctrl`: octave order, sides, widths, start and done pulses.
* `tb_dwt2d_psnr`: runs a smooth synthetic 512 x 512 image through the
  design, rebuilds it with a floating-point inverse of the lifting steps
  (adding back the half LSB that floor rounding removes on average), and
  reports the PSNR; it fails below 39.3 dB. The inverse is checked first
  against a floating-point forward transform.

Running one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/dwt_pkg.sv tb/tb_dwt2d_top.sv --top-module tb_dwt2d_top -o sim
./obj_dir/sim
```

Testbenches may override parameters (N, OCTAVES, IN_W at the top); the
defaults in `rtl/` are the configuration described above.
