# Hardwired distributed arithmetic: multiplier-free DCT/IDCT and DWT

Transforms used in image compression (the 8-point DCT and its inverse, and
the Daubechies wavelet filter bank) multiply every sample by a small set of
*fixed* coefficients. This RTL never builds a multiplier or a ROM for them.
Each coefficient is recoded, when the design is elaborated, into a short
list of signed powers of two; each entry of the list becomes one wire
bundle, the data shifted by a constant amount and possibly inverted; and
all such partial products of an inner product are added in one fixed
carry-save compressor tree followed by a single carry-propagate adder.
Because the coefficients are known, the "distributed arithmetic" is
hardwired: there is no accumulator loop and no table lookup, only wiring
and adders.

Two datapaths are provided, side by side in `hda_top`:

| unit | function | throughput | latency |
|------|----------|------------|---------|
| `hda_dct8` | 8-point 1-D DCT or IDCT (Chen factorisation), mode per vector | one 8-sample vector per clock | result after the 2nd rising edge, counting the edge that takes the vector |
| `dwt_cu` | one level of the Daubechies N=6 (6-tap) analysis filter bank; N=4 by parameter | one sample per clock; alternately a low-pass and a high-pass result | result after the 3rd rising edge, counting the edge that takes the sample |

## Variable radix-2 multi-bit coding

`hda_pkg::vr2_encode(y, w)` is the heart of the design. It is a constant
function, so the recoding costs no hardware.

Modified Booth recoding cuts a two's complement number into 3-bit groups
that overlap by one bit. Each group gives a digit in {-2..2}. This coder
lets a group grow longer whenever its digit stays a plain signed power of
two. A longer group covers more bits with one partial product. A group
that starts at bit `p` (bit -1 is an appended 0) and has `m >= 3` bits ends
at bit `t = p+m-1`:

    D = y[p] + sum_{j=1..m-2} y[p+j]*2^(j-1) - y[t]*2^(m-2),   weight 2^(p+1)

The next group starts at `t`. Summed over all groups, the digits give back
`y` exactly, for any group lengths. Scanning from the LSB, each group
starts at three bits. It grows one bit at a time while its digit is 0 or
±2^a and its top bit does not go past the MSB. It stops at the first
length that fails. The last group may extend past the MSB into sign copies.
Every nonzero digit is one partial product `±(x << shift)`.

Examples (16 bits): 12345 gives `+2^0 -2^3 +2^6 -2^12 +2^14` (5 partial
products); 32767 gives `-2^0 +2^15` (2). A code never has more digits than
modified Booth recoding would produce.

A negative digit is implemented as `~(x << s)`. The missing `+1` of each
such digit is collected into one constant, which enters the tree once.

## Building blocks

* `comp42` is the 4:2 compressor: a four-operand carry-save adder made of
  two full adders per bit, with a sideways carry between bits. `comp52`
  is the 5:2 compressor, a 3:2 row (`csa32`) followed by a 4:2. All of them
  return the carry vector already shifted. Sums are exact modulo 2^W.
* `hda_coef_net` multiplies by one constant. It has a 16-bit input
  register, up to five partial-product slots, a 5:2 compressor, and a CPA
  that also adds the inversion corrections and a half-LSB for rounding.
  The result is `floor((x*C + 2^(FRAC-1)) / 2^FRAC)`, truncated to 16 bits.
  A constant that needs more than five digits is rejected at elaboration
  (`$error`).

## DCT/IDCT unit (`hda_dct8`, `hda_dct_cu`, `dct_input_ctrl`)

Chen's factorisation splits the 8×8 DCT matrix into two 4×4 matrices. The
even matrix acts on the sums `x[n]+x[7-n]` and gives X0, X2, X4 and X6.
The odd matrix acts on the differences `x[n]-x[7-n]` and gives X1, X3, X5
and X7. The entries are ±0.5·cos(kπ/16), the orthonormal DCT, held with
12 fraction bits. `dct_input_ctrl` forms the sums and differences.

There are eight computational units, `hda_dct_cu`, one per output. Each
unit has 20 partial-product slots, and a multiplexer in front of each slot
picks one of two hardwired coefficient sets:

* DCT mode: row `ROW` of the even or odd matrix;
* IDCT mode: column `ROW` of the same matrix. The inverse of an
  orthonormal matrix is its transpose. In this mode the input block only
  sorts the coefficients into even and odd ones, and an output butterfly
  forms `x[n] = e[n]+o[n]` and `x[7-n] = e[n]-o[n]`.

The mode travels down the pipeline with the data, so it can change from one
vector to the next. Inside a unit the summation network is:

    5 x (MUX -> 4:2)  ->  two 5:2 (the centre 4:2 feeds both)  -> F/F
    -> 4:2 -> 5:2 (+ correction constant)                      -> F/F
    -> rounding: CPA, + 2^11, drop 12 bits, keep 16

The compressors are 31 bits wide, so the sum is exact before the single
rounding step. The result is `floor((sum A_n x_n + 2^11) / 2^12)`, wrapping
at 16 bits. In IDCT mode the even and odd halves are rounded separately
before the butterfly, so an output can differ by one from rounding once.
With 12-bit samples, the DCT results are within 1.5 of the real-valued
DCT. A DCT followed by an IDCT returns each sample to within 2.5.

Partial products needed by the built coefficients: 136 over the eight
units in either mode. At most 20 fall in any one unit (18 in IDCT mode).

A 2-D 8×8 DCT needs a row pass, a transpose and a column pass. No transpose
memory is included. `tb_hda_top` shows the 2-D transform done with the
transpose in the testbench.

## DWT unit (`dwt_cu`)

The unit takes 13-bit samples (8-bit pixels times 2^4) into a six-stage
delay line. The taps are `t_k = x(s-k)`. The unit has six coefficient
nets, A..F: net `j` multiplies by |h(j)|, where h is the Daubechies N=6
low-pass filter with 10 fraction bits (341, 826, 471, -138, -87, 36 /
1024). The high-pass filter is `g(k) = (-1)^k h(5-k)`. It uses the same
magnitudes in reverse order, so the same six nets serve both filters. A
multiplexer in front of each net (control `mux_cont`) does two things. It
routes tap `j` (low-pass) or tap `5-j` (high-pass) to the net. It also
negates that tap in advance when the coefficient needed is negative.

Samples with even index give a low-pass result and odd samples a
high-pass result (`out_high`):

    s even: y = sum_k R(h(k) * x(s-k))      s odd: y = sum_k R(g(k) * x(s-k))

Here `R` is each net's own rounding to an integer. Two samples in give one
low/high pair out, so no net is ever idle. The high-pass window is one
sample later than the low-pass one. This is a valid polyphase
arrangement, but a synthesis filter bank must match it.

The six 16-bit products are summed without widening them. Each product's
MSB is inverted, which makes the product non-negative. The sign-extension
constant `-6·2^15` then goes into the 4:2 compressor next to net F:

    5:2 (nets A..E) -> 4:2 (its two outputs, net F, sign constant) -> CPA

The 17-bit result is registered. Results are within 6 of the real-valued
filter.

Setting the parameter `N = 4` builds the same unit for the 4-tap Daubechies
filter (495, 857, 230, -133 / 1024). It has four nets, and the slots of
nets E and F are zero. Coefficient rounding alone can then move a result by
about 7.

## Where this RTL departs from, or adds to, the published architecture

* **Coefficient values and precision.** These are standard values for
  Chen's DCT and Daubechies N=6. The DCT uses 12 fraction bits, so every
  unit fits 20 slots. The DWT uses 10 fraction bits, so every net needs at
  most five partial products. The published design has 14-bit DWT
  coefficients. Its partial-product counts are 120 (DCT), 144 (IDCT),
  30 (DWT N=6), 21 (DWT N=4). Here they are 136, 136, 23 and 15.
* **Datapath width.** The published compressors are 16 bits wide. Here
  they are as wide as the exact sum, and results are rounded once at the
  end.
* **DCT slot multiplexers** are used for the DCT/IDCT mode switch. One
  unit per output, each unit holding both coefficient sets, and the IDCT
  output butterfly are this design's choices.
* **Coefficient nets** use full-width partial products. Synthesis removes
  the constant bits; the hand-trimmed bit slices of a per-constant net are
  not reproduced.
* **DWT scheduling.** Low- and high-pass results alternate in time
  instead of being produced in the same cycle. The input width follows the
  13-bit bus.
* **Not built:** the orthogonal transpose memory for the 2-D DCT and the
  three-level DWT. The N=4 filter bank is a parameter option, modelled on
  the N=6 structure. The published design gives only the N=4 unit's
  operation counts.
* Reset (asynchronous, active low), the valid strobes and the register
  placement are this design's choices.

## Files

| file | contents |
|------|----------|
| `rtl/hda_pkg.sv` | coder, `sd_code_t`, `dct_mode_t`, coefficient tables |
| `rtl/csa32.sv`, `rtl/comp42.sv`, `rtl/comp52.sv` | 3:2, 4:2, 5:2 compressors |
| `rtl/hda_coef_net.sv` | hardwired constant multiplier (DWT net) |
| `rtl/dwt_cu.sv` | DWT computational unit |
| `rtl/dct_input_ctrl.sv` | DCT butterfly / IDCT sorting |
| `rtl/hda_dct_cu.sv` | DCT/IDCT computational unit |
| `rtl/hda_dct8.sv` | 8-point DCT/IDCT |
| `rtl/hda_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters: the DCT has `DIN_W` = 16, `OUT_W` = 16 and `FRAC` = 12. The
DWT has `IN_W` = 13, `NET_W` = 16, `OUT_W` = 17, `FRAC` = 10 and `N` = 6. Changing
`FRAC` rerounds the coefficients from 20-bit masters, and the recoding
adapts. If a coefficient no longer fits its slots, elaboration stops with
`$error`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/hda_pkg.sv tb/tb_hda_top.sv \
              --top-module tb_hda_top -Mdir obj_top && obj_top/Vtb_hda_top

Replace `tb_hda_top` with any other testbench. The package must come
first on the command line, and `-Irtl` lets Verilator find the modules.

What each testbench checks:

* `tb_hda_pkg` checks every 12-bit value and 20,000 random 16-bit values.
  Each one must rebuild exactly from its digits, within the Booth bound.
  It also checks the digit counts of known values and of the coefficient
  sets.
* `tb_comp42` and `tb_comp52` check all narrow operand combinations
  exhaustively, plus random 16-bit ones.
* `tb_hda_coef_net` checks four constants against ordinary multiplication
  with rounding.
* `tb_dct_input_ctrl` checks the butterfly and the sorting.
* `tb_hda_dct_cu` checks two units against a model built from the DCT
  definition with `$cos`, in both modes, with random mode switches and
  idle cycles. It also checks the latency.
* `tb_hda_dct8` checks 3000 vectors bit-exact against an integer model
  and against the real-valued transform, including DCT→IDCT round trips.
* `tb_dwt_cu` checks 4000 samples bit-exact for N=6 and N=4, plus the
  latency and the low/high alternation.
* `tb_hda_top` runs at the default parameters. It does a 2-D DCT and
  IDCT of an 8×8 block and a 512-sample DWT at the same time. It counts
  DCT and IDCT vectors, mode switches, back-to-back vectors, low- and
  high-pass results and idle cycles, and fails if any of them never
  happens.
