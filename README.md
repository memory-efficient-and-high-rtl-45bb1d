# Line-based 9/7 lifting 2-D DWT: one pixel per clock, no multipliers

This RTL computes the 2-D biorthogonal 9/7 discrete wavelet transform, the
lossy transform of JPEG-2000. Frames are N x N images, 8 x 8 by default. It
follows a published line-based architecture whose idea is to rewrite the lifting
steps so that each one has the form

    out = K * centre + left + right

with a constant K. Each such step then takes one constant multiplication,
and that multiplication becomes four hardwired shifts feeding a 4:2
carry-save adder. Two lifting processing elements (PEs) filter the rows. Two
more filter the columns. The row and column filters use alternate clocks for
their two lifting equations. With frames streamed back to back, every PE does
useful work in every clock. The column filter needs only a few lines of
buffering, not a frame buffer. Further decomposition levels reuse the same
processor: the LL band is stored in a small memory and fed back in.

## The modified lifting

The textbook 9/7 lifting uses the constants alpha = -1.586134342,
beta = -0.05298011854, gamma = 0.8829110762, delta = 0.4435068522 and
zeta = 1.149604398 (written a, b, g, d below). The architecture divides each
intermediate signal by the product of the constants used so far. Then the
neighbour sums need no multiplication. Only the centre sample is multiplied:

| step | equation (row direction, j = column pair) | constant |
|------|---------------------------------------------|----------|
| predict 1 | H1(j) = A x(2j+1) + x(2j) + x(2j+2) | A = 1/a = -0.63046 |
| update 1  | L1(j) = B x(2j) + H1(j) + H1(j-1) | B = 1/(ab) = 11.90000 |
| predict 2 | H2(j) = C H1(j) + L1(j) + L1(j+1) | C = 1/(bg) = -21.37815 |
| update 2  | L2(j) = D L1(j) + H2(j) + H2(j-1) | D = 1/(gd) = 2.55378 |

The column direction applies the same four steps to every column of the H2
band and every column of the L2 band. That gives HH1, HL1, HH2, HL2 and LH1,
LL1, LH2, LL2. In a band name the first letter is the horizontal band and
the second the vertical one. Undoing the division, and applying the usual
zeta normalisation (low bands times zeta, high bands divided by zeta, in
each direction), leaves one scale factor per subband:

| subband | factor | value |
|---------|--------|-------|
| LL | T = (a b g d zeta)^2 | 0.001430992 |
| HL, LH | U = a^2 b^2 g^2 d | 0.002441406 |
| HH | R = (a b g / zeta)^2 | 0.004165267 |

The scaling normalisation block (`sn`) multiplies by these factors. Its output
is the standard 9/7 transform.

### Coefficients as signed digits

Every constant has at most four signed powers of two (`dwt_pkg.sv`):

| constant | digits | value used | error |
|----------|--------|-----------|-------|
| A | -(2^-1 + 2^-3 + 2^-8 + 2^-9) | -0.630859 | 0.06 % |
| B | 2^3 + 2^2 - 2^-3 + 2^-5 | 11.90625 | 0.05 % |
| C | -(2^4 + 2^2 + 2^0 + 2^-1) | -21.5 | 0.57 % |
| D | 2^1 + 2^-1 + 2^-4 - 2^-7 | 2.554688 | 0.04 % |
| T | 2^-10 + 2^-11 - 2^-15 - 2^-18 | 0.00143051 | 0.03 % |
| U | 2^-9 + 2^-11 | 0.00244141 | < 0.001 % |
| R | 2^-8 + 2^-12 + 2^-16 - 2^-21 | 0.00416565 | 0.01 % |

The digits of A and B are those of the original design. For C, D, T, U and R
this design chose its own four-digit approximations of the exact values,
because the published digit strings of those constants do not reproduce
their published values. C has the largest error, because no four digits get
closer to 21.378. This is the main source of the deviation from the exact
transform (see *Accuracy*).

Multiplying by a negative power of two is an arithmetic right shift, which
rounds toward minus infinity. The reference model in the testbenches
applies the same rounding, so the RTL is checked bit for bit.

## Datapath and schedule

    pixels --> [S1 mux] --> HF --> VF --> SN --> coefficients
                  ^                        |
                  +-------- MEM <----------+   (LL band, next level)

### Horizontal filter (`hf.sv`)

One sample enters per clock, in raster order. Three input registers supply
x(2j), x(2j+1) and x(2j+2). PE(A/B) alternates between H1 (coefficient A)
and L1 (coefficient B), so its output stream **Data-out 1** is
H1(i,0), L1(i,0), H1(i,1), .... PE(C/D) does the same for H2/L2 four clocks
later, giving **Data-out 2**. Three delays on Data-out 1 and two on Data-out 2
supply the neighbour terms. Counted from x(0,0) at clock 0:

| clock | input | Data-out 1 | Data-out 2 |
|-------|-------|------------|------------|
| 3 | x(0,3) | H1(0,0) | |
| 4 | x(0,4) | L1(0,0) | |
| 7 | x(0,7) | H1(0,2) | H2(0,0) |
| 8 | x(1,0) | L1(0,2) | L2(0,0) |
| 11 | x(1,3) | H1(1,0) | H2(0,2) |

### Vertical filter (`vf.sv`), the part that needs the most care

The input is Data-out 2, in which row r holds H2(r,0), L2(r,0), H2(r,1), ...
in N consecutive clocks. The filter computes column results for one pair of
rows in 2N clocks. First come the N/2 H columns (HH then HL, alternating).
Then come the N/2 L columns (LH then LL). So Data-out 3 of an 8 x 8 frame
starts like this:

| clock | 24 | 25 | 26 | ... | 32 | 33 | ... | 40 |
|-------|----|----|----|-----|----|----|-----|----|
| Data-out 3 | HH1(0,0) | HL1(0,0) | HH1(0,1) | ... | LH1(0,0) | LL1(0,0) | ... | HH1(1,0) |

Data-out 4 carries HH2, HL2, ..., LH2, LL2 in the same order, starting at
clock 42. The operands come from three tapped delay lines:

* the input, delayed up to 3N+1 clocks: three long delays of N samples plus
  one register;
* Data-out 3, delayed up to 2N+1 clocks;
* Data-out 4, delayed up to 2N clocks.

For the H columns, HH1(i) uses the input taps 0, N and 2N (rows 2i+2, 2i+1
and 2i), and HL1(i) takes H2(2i) from tap 2N+1. An L2 sample arrives one
clock after its H2 partner but is used N clocks later. So the L columns use
the taps N-1, 2N-1 and 3N-1, and LL1 uses tap 3N. HL1/LL1 take the previous
row pair's HH1/LH1 from Data-out 3 tap 2N. PE(C/D) reads Data-out 3 at taps
0, 2N and 2N+1, and its own output at tap 2N, for both column groups.
Together the line buffers hold 7N+2 words. The memory for a further level adds
N^2/4 words, which is the "N^2/4 + 7N + 11" buffer budget of the original
architecture.

Timing per frame (8 x 8): the first scaled coefficient leaves at clock 43 and
the last at clock 106. The next frame may start at clock 64, and its
coefficients then follow without a gap. These clock numbers match the
data-flow tables of the original design, and the testbenches check them.
The first output therefore leaves 4N+11 clocks after the first pixel. The
original summary quotes the output latency as "4N Ta + 8"; the tables, which
this design follows, give clock 43 for N = 8. A j-level transform of an
N x N image takes sum over levels of (side^2 + 4 side + 10) clocks plus 2 per
extra level, against 4 (1 - 2^-2j) N^2 / 3 clocks of pure pixel time.

### Borders

At every border the design uses symmetric extension, as JPEG-2000 does:
x(N) = x(N-2), H1(-1) = H1(0), L1(N/2) = L1(N/2-1), H2(-1) = H2(0). The same
holds for the row pairs in the vertical filter. The select logic substitutes
the mirrored tap in the first and last column pair and row pair. The
original architecture does not say how it handles borders.

### Frame side at run time

`hf` and `vf` take `log2n`, the log2 of the current frame side (1..3 for
MAXN = 8). The delay lines are sized for MAXN and read at taps that depend on
`log2n`. The side may change only when the filters are empty. `dwt_ctrl`
guarantees this by running the levels of a frame one after another.

## Multi-level system (`dwt_system.sv`, `dwt_ctrl.sv`, `ll_mem.sv`)

`num_levels` (1..3 for 8 x 8) sets the number of decomposition levels.
Level 0 processes the external frame. Its HL, LH and HH coefficients are
output; its scaled LL band goes into `ll_mem` at address row*(N/2)+col.
When the last LL coefficient is written, the sequencer streams the memory
back through the input select S1 as an (N/2) x (N/2) frame, and so on. Only
the last level's LL band is output. Because MEM holds the *scaled* LL band,
every level sees input of normal range.

Handshake: when `in_ready` is high, assert `pix_sof` with the first pixel,
then supply the other N*N-1 pixels in the following clocks without gaps. A
single-level frame may start right after the previous one. A multi-level
frame waits for the pipeline to empty. Each coefficient leaves with
`coef_level`, `coef_band`, `coef_row` and `coef_col`. `frame_done` marks the
last coefficient of a frame. The four internal streams Data-out 1 to 4 are
also brought out (`dout1_valid`/`dout1_data` ... `dout4_*`) for observation;
they carry unscaled values of whatever level is running.

## Number format

Pixels are 8-bit two's complement values. Apply any JPEG-2000 DC level shift
before the input. Inside, every word has DW = 40 bits, FRAC = 8 of them
fractional. The width covers the worst-case growth of the unnormalised
intermediate values, which reach about 225 times the input per dimension,
over three levels. The coefficients leave in the same format. `IN_W`, `DW`,
`FRAC` and `MAXN` are constants in `dwt_pkg.sv`. The source gives no word
length, so all four are this design's choices, apart from MAXN = 8, the
size of the original chip.

## Accuracy

The RTL matches the integer reference bit for bit. Against the exact
real-valued 9/7 transform with symmetric extension, the largest error found
over random 8-bit images was 3.4 % of the largest coefficient for one level
and 5.8 % after three levels (the final LL of side 2). Most of it comes from
the shortened coefficient C. If you need more accuracy, give C a fifth digit
(-(2^4+2^2+2^0+2^-1-2^-3) = -21.375); that changes the structure of the
multiplier.

## Where this RTL departs from or adds to the original

* The scale factors pair LL with T and HH with R. This pairing follows from
  the lifting equations and gives the standard transform. One set of the
  published equations pairs them the other way round.
* U = a^2 b^2 g^2 d = 0.0024414, as its defining formula gives. The
  published numeric value (0.0124) does not match that formula.
* The first-stage outputs (HH1, ..., LL1) appear on Data-out 3 and all final
  results on Data-out 4, as the published data-flow table shows. The
  published system drawing labels the two outputs differently.
* The original describes the row filter with five multiplexers and the
  column filter with eight. Here the operand selects are derived from the
  schedule and the border rule, so their number and wiring differ; the
  delays, the two PEs per filter and the PE equations are the same.
* The following are this design's own choices: symmetric borders, the word
  format, the handshake, the level sequencer, the run-time frame side, the
  mux wiring of the delay taps (derived from the schedule), and the use of a
  register array for MEM.
* Not built: the physical implementation (0.18 um layout, pads). Power and
  area figures cannot be reproduced from RTL.

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | word format, coefficient digits, band type |
| `rtl/csa42.sv` | 4:2 carry-save compressor |
| `rtl/sd_mult.sv` | shift-add constant multiplier |
| `rtl/lift_pe.sv` | lifting PE: coef*data2 + data1 + data3 |
| `rtl/delay_line.sv` | tapped delay (L and LD units) |
| `rtl/hf.sv`, `rtl/vf.sv`, `rtl/sn.sv` | horizontal filter, vertical filter, scaling |
| `rtl/dwt_core.sv` | one-level processor HF -> VF -> SN |
| `rtl/ll_mem.sv`, `rtl/dwt_ctrl.sv` | LL memory and level sequencer |
| `rtl/dwt_system.sv` | top level |
| `tb/dwt_ref_pkg.sv` | integer and floating-point reference models |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Example with Verilator 5:

    verilator --binary --timing --assert --top-module tb_dwt_system \
        -Irtl -Itb -y rtl -y tb +libext+.sv rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv \
        tb/tb_dwt_system.sv
    ./obj_dir/Vtb_dwt_system

`tb_dwt_system` runs the whole design at its default size (8 x 8). It sends
back-to-back single-level frames and 2- and 3-level frames, including some
that have to wait for `in_ready`. It counts each of these mechanisms, checks
every coefficient, and checks the 43/106 clock latency. `tb_hf`, `tb_vf` and
`tb_dwt_core` also run frames of side 4 and 2. To try other sizes, change
`MAXN` (a power of two) in `dwt_pkg.sv`. The scaled LL band grows by about one bit per
level, so `DW` leaves room for a few more levels.
