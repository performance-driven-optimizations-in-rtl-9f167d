# Parallel frequency-domain QAM transmitter

An FPGA fabric that closes timing at a few tens of MHz can still emit a
giga-sample-per-second waveform if every clock carries many samples at once.
This design is a QAM transmitter built that way: each clock it takes a frame
of N symbols (N = 16) and produces N samples of the modulated carrier, so at a
62.5 MHz clock it emits 16 × 62.5 MHz = 1 GS/s, i.e. 4 Gb/s with 16-QAM.

The difficulty in such a transmitter is the pulse-shaping filter. A
square-root raised cosine (SRRC) FIR is a convolution, and a convolution
across N parallel lanes needs each lane to see its neighbours' history. Here
the filter is applied in the frequency domain instead: a frame is transformed
with an N-point DFT, each bin is multiplied by the filter's response, and an
IDFT brings the frame back to the time domain, where multiplication needs no
communication between lanes.

```
        64 bits                 16 x 16-bit lanes (I, Q / re, im)               256 bits
 in ──► input reg ──► qam ──► dft ──► srrc_filter ──► idft ──► modulator ──► out
                                                                   tvalid_seq ──► tvalid
```

The architecture (the five blocks and their order, direct matrix DFT/IDFT,
2N real multipliers in the filter, 2N multipliers and N subtractors in the
modulator, the rescaling shifts, 16-bit precision, the parameters N and
FORMAT, the port list and the 17-cycle latency) follows a published master's
thesis on FPGA QAM transmitters. Number formats, pipelining, reset, the
validity logic and the handling of overflow are this implementation's own,
and are listed below.

## Files

| file | contents |
|---|---|
| `rtl/qam_tx_pkg.sv` | sample type, rescaling shifts, constant functions that compute every coefficient table, latency formula |
| `rtl/qam.sv` | combinational Gray-coded rectangular QAM mapper, 8/16/32/64-QAM |
| `rtl/dft.sv`, `rtl/idft.sv` | fully parallel N-point DFT and inverse DFT (matrix form) |
| `rtl/srrc_filter.sv` | per-bin multiplication by the SRRC frequency response |
| `rtl/modulator.sv` | I·cos − Q·sin up-conversion |
| `rtl/tvalid_seq.sv` | validity flag after pipeline fill |
| `rtl/transmitter.sv` | top level |
| `tb/tx_ref_pkg.sv` | independent bit-accurate model of the whole chain, used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per block, two end-to-end ones |

## Interface of `transmitter`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `reset` | in | 1 | synchronous, active high; clears every pipeline register and `tvalid` |
| `in` | in | FORMAT·N | N symbols; symbol i in `in[FORMAT*i +: FORMAT]`, symbol 0 earliest in time |
| `tvalid` | out | 1 | high from the edge on which the first frame applied after reset reaches `out` |
| `out` | out | 16·N | N output samples; sample n in `out[16*n +: 16]` |

Parameters: `N` (lanes, default 16) and `FORMAT` (bits per symbol, 3..6 for
8-, 16-, 32-, 64-QAM, default 4). There is no input strobe: a frame is taken
on every clock after reset. Every lane bus in the design packs lane i into
bits `[16*i +: 16]`, lane 0 least significant.

## The datapath, block by block

### QAM mapper (`qam`)

Each FORMAT-bit symbol is split into an I field (upper ⌈FORMAT/2⌉ bits) and a
Q field (lower ⌊FORMAT/2⌋ bits). On each axis the top bit is the sign (0 =
positive) and the rest is the Gray code of the magnitude index, so
neighbouring levels differ in one bit. For 16-QAM this is

| axis bits | 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| level | +d | +3d | −d | −3d |

with the I column chosen by the first two bits and the Q row by the last two
(`0101` is the corner point +3d + j3d). The outer level is tied to the SRRC
centre tap: 3d = c5 = 0.54099, i.e. 17726 in Q1.15, d = 5909. For 8-QAM
(4×2), 32-QAM (8×4) and 64-QAM (8×8) the same rule applies with the outer
level of each axis at c5; these three layouts are this implementation's
choice. Only the logic of the selected FORMAT is elaborated.

### DFT and IDFT (`dft`, `idft`)

Both compute the transform directly, as a matrix product: N² complex
multipliers (four real multiplications each) against a Q1.15 twiddle table,
then one balanced adder tree of N−1 adders per bin for the real part and one
for the imaginary part, 2N(N−1) adders in all. The IDFT uses the conjugate
twiddles. At N = 16 this is 1024 real multipliers per transform, which is why
the original design spends over half of a Virtex-7's DSP slices; an FFT would
need far fewer.

### Frequency-domain SRRC filter (`srrc_filter`)

The 11 taps c0..c10 (order 10, symmetric about c5) are

    0.022507907903927645, 0.028298439380057477, -0.076801948979409798,
    -0.037500771921555154, 0.3076724792547561, 0.54098593171027443,
    and the mirror image c6..c10 = c4..c0.

With only 2N real multipliers available, the per-bin coefficient must be
real. The filter therefore uses the zero-phase response

    H[k] = Σ_{m=0}^{10} c_m · cos(2π·k·(m−5)/N)

which is the DFT of the taps circularly centred on c5. The taps padded with
zeros to N would give the same magnitude with a linear phase, i.e. the same
output delayed by five samples circularly. At N = 16, H runs from 1.029 at
DC through 0.67 at bin 4 and 0.175 at bin 5 to below 0.03 in bins 6..10.

### Modulator (`modulator`)

`out[n] = (I[n]·cos φn − Q[n]·sin φn) >> 16` with φn = 2π·CARRIER_CYCLES·n/N.
The carrier is assumed to complete a whole number of periods per frame, so
each lane has one fixed cosine/sine pair. The default is one period per frame,
a carrier at fs/N. A carrier frequency that is not a multiple of fs/N would
need a phase accumulator instead of the fixed table.

### Validity flag (`tvalid_seq`)

A saturating counter of clock edges since reset. `tvalid` rises when the
count reaches the pipeline latency and stays high until the next reset.

## Fixed point and scaling

This is the least obvious part of the design. Every bus carries 16-bit two's
complement words. Each block rescales its products by a fixed shift so that
the result fits 16 bits again. The shifts are those of the original design.
The coefficient formats are this implementation's choice.

| block | coefficient format | shift | gain |
|---|---|---|---|
| QAM | levels in Q1.15, outer = 17726 | – | – |
| DFT | twiddles Q1.15 (×32767) | 2^17 | 1/4 |
| filter | H[k] in Q2.14 (×16384; H[0] = 1.029 does not fit Q1.15) | 2^16 | H[k]/4 |
| IDFT | twiddles Q1.15 | 2^17 | 1/4 |
| modulator | carriers Q1.15 | 2^16 | 1/2 |

At N = 16 a DFT followed by an IDFT thus scales by 1/16 = 1/N, the
normalisation of the inverse transform. End to end the pass band scales by about 1/128, so a
constellation point of magnitude 17726·√2 leaves as samples of a few hundred
LSB.

Coefficient tables are rounded to nearest and the shifts truncate (an
arithmetic right shift). Products and adder-tree sums are kept at full
precision, so the only rounding is in the tables and the final shift. The
DFT/IDFT outputs are **saturated** to 16 bits. This matters: with Q1.15
twiddles and the 2^17 shift, a bin can reach four times the largest
sample magnitude, and random full-scale 16-QAM frames push at least one bin past
±32767 in roughly a third of frames. A frame of 16 identical corner symbols
always does. The filter and modulator cannot overflow. If clipping matters
for an application, reduce the QAM amplitude or add a bit to the DFT shift.

## Timing

Everything is pipelined at one frame per clock:

| stage | cycles |
|---|---|
| input register | 1 |
| DFT: products, log2 N adder levels, rescale | log2 N + 2 = 6 |
| filter: product, rescale | 2 |
| IDFT | 6 |
| modulator: products, difference | 2 |
| **total** | 9 + 2·log2 N = **17** at N = 16 |

The total matches the 17 cycles of the original design; how it is split
between stages is this implementation's own. The mapper is combinational
between the input register and the DFT multipliers. `tvalid` rises on the
17th rising edge after reset is released. From then on, the output after
edge t belongs to the frame sampled at edge t−16, which is the frame applied
before edge t−16.

Frames are filtered independently. The filter is a circular convolution
within each 16-sample frame, and there is no overlap-add or overlap-save
between frames, exactly as in the original block diagram. The output
therefore has discontinuities at frame boundaries compared with a true
streaming FIR.

## Where this implementation differs from the original

* **Coefficient tables.** The original generates three Verilog tables with a
  desktop utility: DFT twiddles, filter coefficients and carrier samples.
  Here the same tables are computed by constant functions in `qam_tx_pkg`
  from the taps and N. Changing N or the taps therefore needs no generator.
* **One mapper for all formats.** The original keeps one source file per
  QAM format. Here a single parameterised `qam` elaborates only the selected
  format.
* **Product precision.** The original block diagram carries N² 16-bit words
  between the complex multipliers and the adders. Here the products and
  partial sums keep full width, and only the final sum is shifted by 2^17.
* **Real filter response.** The filter response is the zero-phase (real)
  response described above. It differs from the padded-tap DFT only by a
  circular five-sample delay.
* **Carrier.** The original was tested with a 100 Hz carrier at an
  unspecified sample rate. Here the carrier is fixed per lane, a whole
  number of periods per frame.
* **Overflow.** DFT and IDFT results are saturated. The original does not say
  how it treats overflow.
* **Adder count.** The original quotes 4N² − 2N adders in total. This design
  has 2·2N(N−1) adder-tree adders in the two transforms, N subtractors in
  the modulator, and the two adders inside each complex multiplier.
* **Amplitude source.** In the original block diagram the mapper reads one
  16-bit word from the filter-coefficient table, the tap that sets the
  amplitude (3d = c5). Here it is a package constant.

## Verification

`tb/tx_ref_pkg.sv` is a separate integer model of every stage. It computes
its own tables in floating point and does its arithmetic on 64-bit integers.
Every testbench compares the RTL with it bit for bit, checks the latency
cycle-exactly, stops itself with a watchdog, and prints
`TB_RESULT checks=… failures=…`.

| testbench | what it covers |
|---|---|
| `tb_qam` | 16-QAM: every symbol in every lane against the written-out constellation, random buses. 8/32/64-QAM: every symbol, level count, symmetry, Gray adjacency |
| `tb_dft`, `tb_idft` | 200 frames streamed back to back, exact compare after 6 cycles, floating-point cross-check, saturating frames, mid-stream reset |
| `tb_srrc_filter` | exact compare after 2 cycles, pass band near 1/4, stop band below 1/30 |
| `tb_modulator` | exact compare after 2 cycles, carrier shape traced with I-only and Q-only frames |
| `tb_tvalid_seq` | rise on exactly the 17th edge, three resets including one mid-fill |
| `tb_qam_tx_pkg` | every table entry against floating point, latency formula |
| `tb_transmitter` | full-size top at default parameters (N = 16, 16-QAM): 400 frames, exact compare after 17 cycles, `tvalid` on every edge. It counts pipeline fills, saturating frames and a mid-stream reset, and fails if any never happens |
| `tb_transmitter_formats` | top at N = 16 in 8-, 32- and 64-QAM, and 16-QAM at N = 8 (latency 15), side by side |

Not verified here: timing closure at 62.5 MHz, the resource figures, and
agreement with the original floating-point reference model, which is not
available.

## Simulating

With Verilator 5, from the repository root, for example the end-to-end test:

```
verilator --binary --timing -Wno-fatal --top-module tb_transmitter \
    -Irtl -Itb -y rtl rtl/qam_tx_pkg.sv tb/tx_ref_pkg.sv tb/tb_transmitter.sv
./obj_dir/Vtb_transmitter
```

Any other testbench builds the same way with its name in place of
`tb_transmitter`. The package files must come first. The full-size run
compiles in a few seconds and simulates in well under a second.

## Changing the design

* **N**: every block is generic in N. A power of two keeps the adder trees
  full; other sizes work, with zero-padded trees. The latency follows
  `qam_tx_pkg::tx_latency(N)`. DFT cost grows as N², so N = 32 needs four
  times the multipliers.
* **QAM format**: set `FORMAT` on `transmitter` (3..6).
* **Filter taps**: edit `srrc_tap()` in `qam_tx_pkg`. All the frequency
  responses are recomputed at elaboration. The reference model in
  `tb/tx_ref_pkg.sv` keeps its own copy (`C_TAPS`), which must be edited
  too.
* **Carrier**: the `CARRIER_CYCLES` parameter of `modulator` sets the
  periods per frame. The top instantiates it with the default of 1.
