# Stochastic-computing JPEG front end: colour conversion, DCT and quantization

The arithmetic-heavy front of a baseline JPEG encoder is RGB to YCbCr
conversion, the 8x8 two-dimensional DCT and quantization. All three are
built here from stochastic-computing (SC) logic instead of binary
multipliers. In SC a number in [0,1] is a bit-stream, and its value is the
fraction of ones in the stream. Multiplication then needs one AND gate and
scaled addition one multiplexer. The hardware is tiny and uses no DSP
blocks. The price is time and accuracy: each result is an estimate built
up over thousands of clock cycles.

The RTL implements the architecture of "Stochastic Computing for
Compute-Intensive Sections of JPEG Compression". That work evaluates these
stochastic circuits against deterministic DSP-based versions, which are not
part of this RTL. Details the description leaves open were filled in here;
they are listed under [Departures and choices](#departures-and-choices).

## Data path

```
 load port ──► pixel_bram (RGB, 4+4+4 bits) ◄── sync_counter (hcount, vcount, hsync, vsync)
                      │
                      ▼
               sc_rgb2ycbcr  ──► ycc_* output, pixel_bram (Y,Cb,Cr planes)
                                                   │  8x8 blocks, Y then Cb then Cr
                                                   ▼
                                             sc_dct_quant ──► coef_* output stream
```

`jpeg_sc_top` processes a stored frame in two passes:

1. **Colour pass.** The raster counters walk the image RAM one pixel at a
   time. Each pixel is converted by `sc_rgb2ycbcr`, and the 12-bit
   {Y,Cb,Cr} word is written to a second RAM at the same address. It also
   appears on `ycc_valid/ycc_addr/ycc_data`. `hsync_out` pulses when the
   last pixel of a line is written, and `vsync_out` when the last pixel of
   the frame is written.
2. **Transform pass.** For Y, then Cb, then Cr, each 8x8 block (blocks in
   raster order) is copied into the DCT unit's 64-word buffer. The block is
   transformed and quantized. Its 64 coefficients then leave on
   `coef_valid/coef_comp/coef_block/coef_index/coef_data`, one per cycle, in
   the order `u*8+v`.

`done` pulses once after the last Cr coefficient.

## Stochastic numbers in this design

**Encoding.** All streams are unipolar. A value x in [0,1] is a stream with
probability x of a 1 in any cycle. Pixels have 4 bits (0..15). A pixel is
widened to an 8-bit SNG input by repeating its bits (0xA becomes 0xAA), so
the stream's value is exactly pixel/15.

**Random source (`sc_lfsr`).** Maximal-length Fibonacci LFSRs are reseeded
at the start of every computation, so every result can be repeated
exactly.

**Stochastic number generator (`sc_sng`).** The SNG is a weighted binary
generator (WBG). Weight bit `w[i]` is 1 when bit i is the highest set bit
of the LFSR state. This is true for 2^i of the 255 non-zero states of an
8-bit LFSR. The output bit is `|(x & w)`. Over one full LFSR period the
stream therefore holds exactly x ones.

**Independence is what matters.** An AND gate multiplies only when its two
inputs are uncorrelated. Streams taken from the same LFSR are strongly
correlated, and so are streams from two LFSRs of equal period, because
each state of one is locked to a single state of the other. The random
numbers are therefore split as follows:

| Stream | Source |
|---|---|
| pixel data | 8-bit LFSR, x^8+x^6+x^5+x^4+1 (full period makes the streams exact) |
| colour coefficients, DCT row factors | top byte of a 16-bit LFSR, x^16+x^14+x^13+x^11+1 |
| DCT column factors | top byte of a 16-bit LFSR, x^16+x^12+x^3+x+1 |
| DCT 1/QF | top byte of a 16-bit LFSR, x^16+x^15+x^12+x^10+1 |
| MUX-adder selects | low bits of a 16-bit LFSR, x^16+x^15+x^13+x^4+1 |

The 16-bit sequences have period 65535. Each pixel-LFSR state therefore
meets 257 different partner states.

**Multiplication (`sc_mult`)** is an AND gate per lane.
**Scaled addition (`sc_mux_add`)** is a tree of 2-input MUXes with one
random select bit per level. Its output value is the mean of its inputs.
**Back to binary (`sc_accum`)** is a counter of the ones. It is signed: it
counts down when the bit came from a term with a negative coefficient.
This is how signed sums are formed from unsigned streams.

## Colour converter (`sc_rgb2ycbcr`)

```
Y  =  0.299 R + 0.587 G + 0.114 B
Cb = -0.169 R - 0.331 G + 0.500 B + 8
Cr =  0.500 R - 0.419 G - 0.081 B + 8
```

The offset of 8 is half scale for 4-bit pixels. It plays the role that 128
plays for 8-bit pixels.

The converter has three pixel SNGs and nine coefficient SNGs feeding nine
AND gates. Each output component has a 4-input MUX adder: three of its
inputs are the component's products, and the fourth is a half-scale stream
for Cb and Cr, or 0 for Y. Each component also has a signed counter. Over
L = 2^LEN_LOG2 cycles the count is C ≈ (L/4)·(value/15). The result is
`round(60·C/L)`, clamped to 0..15. For L = 1024 that is a multiply by 60
and a 10-bit shift.

Timing: `start` latches r, g, b. `done` pulses L+1 cycles after the start
edge, and the outputs hold until the next start.

Measured accuracy at L = 1024, over all 4096 possible colours: every
component is within 1.6 levels of the exact real value (worst case 1.58),
and the mean error is 0.39 levels. The LFSRs are reseeded for every pixel,
so a given colour always converts to the same result. Shorter streams are
faster but noisier. At L = 256 the largest error on a sample of colours
was 3 levels.

## DCT and quantization (`sc_dct_quant`)

```
X(u,v) = a(u) a(v) Σm Σn x(m,n) cos((2m+1)uπ/16) cos((2n+1)vπ/16),   a(0)=1/√2, a(k>0)=1
Q(u,v) = round(X(u,v) / QF)
```

This is the form the design uses. It has no 1/4 factor and no level shift
of the pixels, so X(0,0) of a flat full-scale block is 480.

This unit is the hardest part to follow. Three ideas keep it small:

1. **One MUX adder serves all 64 coefficients.** Each cycle, a 6-bit random
   select picks one term (m,n) of the double sum for every coefficient at
   once. All pixel streams would come from the same LFSR. So picking the
   pixel word first and feeding it to a single SNG gives the same bit as
   picking among 64 pixel streams. The unit therefore has one pixel SNG,
   not 64.
2. **Only eight distinct factors.** a(u)·|cos((2m+1)uπ/16)| is always one
   of cos(kπ/16) for k = 0..7 (a(0) = cos(4π/16)), or zero. So eight SNGs
   on a "row" LFSR and eight on a "column" LFSR supply every basis factor.
   A table built at elaboration (`sc_pkg::dct_basis`) maps (u,m) to
   {sign, k}.
3. **Quantization is a fourth AND input.** The product for coefficient
   (u,v) is `pixel & row[k(u,m)] & col[k(v,n)] & (1/QF stream)`. Its
   counter counts up or down by the XOR of the two cosine signs.

After L = 2^LEN_LOG2 cycles, C(u,v) ≈ (L/64)·X(u,v)/(15·QF). So
`Q = round(960·C/L)`, a constant multiply and a shift. `rd_idx` selects
which counter is rescaled onto `rd_coef`.

Interface: samples are loaded with `load/load_idx/load_data` (index m*8+n)
while the unit is idle. `quant_recip` is 1/QF, with 255 meaning 1.0.
`done` pulses L+1 cycles after `start`.

Accuracy: the error of one coefficient grows with S, the sum of |terms| of
its block, because that sum sets how many ones its counter sees. At the
default L = 2^16, all outputs of the test blocks are within 2 + 0.04·S of
the exact value. For a full-scale flat block, that bound is about ±21 on a
DC of 480. Over the 3072 blocks of a random 256x256 test frame, the
largest error was 87% of the bound. Shorter streams are noisier: the
random part of the error falls roughly as 1/sqrt(L). This noise floor
belongs to stochastic computing, not to the implementation.

## Timing of a frame

From the start edge to the done pulse, a frame takes exactly

```
IMG_W·IMG_H·(2^CC_LOG2 + 6) + 3·(IMG_W·IMG_H/64)·(2^DCT_LOG2 + 132) + 1
```

cycles. At the defaults (256x256, 2^10, 2^16) that is about 269 million
cycles: 67 M for colour and 202 M for the transforms.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| all | pixel width | 4 bits | described resolution of each colour |
| `sc_dct_quant` | block size | 8x8 | 64 products per coefficient |
| `sc_rgb2ycbcr`, `sc_dct_quant` | `SN_W` | 8 | chosen; tap masks exist for 8 only |
| `sc_rgb2ycbcr` / top `CC_LOG2` | stream length log2 | 10 | chosen for ≤1.6-level error |
| `sc_dct_quant` / top `DCT_LOG2` | stream length log2 | 16 | chosen for the accuracy above |
| `jpeg_sc_top` | `IMG_W`, `IMG_H` | 256 | chosen: a 256x256x12-bit frame fills 24 BRAM36 tiles |
| `pixel_bram` `INIT_FILE`, top `IMG_INIT` | image file | "" | optional hex image, one 12-bit {R,G,B} word per line |

## Departures and choices

- **Division stage.** The description follows quantization with a
  "stochastic division (XOR) and shifting" step. Only the shift is built:
  it is the final rescale. An XOR of two unipolar streams computes
  a+b−2ab, not a quotient, and no definition of that step was available.
  Quantization is done by multiplying with a 1/QF stream instead.
- **Signed terms.** Signed terms use up/down counters. The description
  names only AND multipliers, MUX adders and accumulators.
- **Chroma offset.** The chroma offset is 8, the 4-bit counterpart of 128.
  Results are clamped to 0..15.
- **DCT scaling.** The DCT is used without the JPEG 1/4 factor and without
  a level shift, as stated above.
- **Frame buffering.** The converted frame is stored in full before the
  DCT pass. That takes two 786,432-bit RAMs, which is more block RAM (48
  tiles) than the 24 tiles reported for the original circuit. There is no
  chroma subsampling.
- **Sync signals.** `hsync`/`vsync` are flags on the last pixel of a
  line or frame. They are not video-timing pulses with blanking.
- **Quantization factor.** QF is a single factor for all coefficients,
  supplied as its reciprocal, as in the quantization formula used here. A
  JPEG quantization table would need one 1/QF stream per coefficient,
  because all 64 coefficients are accumulated at the same time.
- **Not modelled.** The processor system of the FPGA SoC, the conversion
  of images into memory-initialisation files, and the area/power
  measurement flow are outside the RTL.

## Files

| File | Contents |
|---|---|
| `rtl/sc_pkg.sv` | tap masks, Q16 coefficients, cosine table, DCT basis sign/index function |
| `rtl/sc_lfsr.sv` | LFSR random source |
| `rtl/sc_sng.sv` | WBG stochastic number generator |
| `rtl/sc_mult.sv` | AND multiplier |
| `rtl/sc_mux_add.sv` | scaled MUX adder (2-input MUX tree) |
| `rtl/sc_accum.sv` | signed stream counter |
| `rtl/pixel_bram.sv` | block RAM for RGB and YCbCr frames |
| `rtl/sync_counter.sv` | raster counters with hsync/vsync |
| `rtl/sc_rgb2ycbcr.sv` | stochastic colour converter |
| `rtl/sc_dct_quant.sv` | stochastic 8x8 DCT and quantizer |
| `rtl/jpeg_sc_top.sv` | frame sequencer and top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_jpeg_sc_full.sv` | end-to-end run on a 256x256 frame at default parameters |
| `tb/pixel_init.hex` | 16-word image used to test RAM initialisation from a file |

Every testbench ends with `TB_RESULT checks=N failures=M`. The block
testbenches compare against independent models: exhaustive truth tables,
integer models, or the equations evaluated in real arithmetic with error
bounds. The top-level testbenches check every converted pixel and every
coefficient, the output order, the number of hsync and vsync pulses, and
the exact cycle count. They also require that clamping, negative
coefficients and all three component passes each occur at least once.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sc_pkg.sv tb/tb_jpeg_sc_top.sv \
          --top-module tb_jpeg_sc_top -Mdir obj_top
./obj_top/Vtb_jpeg_sc_top
```

Swap in any other `tb/tb_*.sv` and its module name. The 16x16 end-to-end
test takes about a second. The full 256x256 test (`tb_jpeg_sc_full`) runs
269 M cycles and takes several minutes. To trade accuracy for speed,
lower `CC_LOG2` and `DCT_LOG2`, and widen the testbench tolerances to
match.
