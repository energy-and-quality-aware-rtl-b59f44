# Energy- and quality-scalable multimedia kernels in SystemVerilog

Image and video codecs tolerate small numerical errors, and their data have
strong statistics: most pixel differences are small, most high-frequency
coefficients are near zero, and real detail forms connected edges. This RTL
uses that in three ways to save energy:

* **Compute less precisely**: truncate low-order bits, clip rare high-order
  values, or switch off DCT outputs. A precomputed mean of the truncation error
  is added back so that the error is unbiased.
* **Let hardware fail, then repair the data**: voltage-overscaled adders in
  JPEG and low-voltage SRAM in JPEG2000 produce bit errors. These are cleaned
  up with cheap logic that knows what valid data look like.
* **Protect only what matters**: SECDED codes of different strength share one
  encoder and decoder.

The kernels are independent datapaths that share a clock and reset. The top,
`emq_top`, places them side by side, each with its own ports.

| Path | Modules | What it does |
|---|---|---|
| Video motion estimation / intra prediction | `hoc_sad_unit`, `hoc_ad_unit`, `ha2_chain` | 4-lane SAD with high-order clipping and low-order truncation |
| JPEG DCT | `dct2d`, `dct1d_trunc`, `dct_level_ctrl` | 8x8 DCT with input truncation, output switch-off and error compensation; the level is picked from quality Q |
| JPEG datapath repair | `vos_compensator` | repairs voltage-overscaling errors in zig-zag coefficients |
| Filtering | `fir_mac_lpf` | MAC FIR filter with truncation and unbiased compensation |
| JPEG2000 tile memory | `uep_ecc_encoder`, `uep_ecc_decoder`, `ecc_pargen32` | nested (39,32)/(72,64)/(137,128) SECDED codes |
| JPEG2000 code blocks | `bitplane_corrector` | removes isolated error bits from the high bit planes |

The shared types and constants are in `emq_pkg`.

## High-order clipped SAD

An absolute difference (AD) is computed on truncated pixels:
- inter mode drops bit 0;
- intra mode drops bits 1..0.

The AD is then clipped at a threshold Thr: 32 for inter, 64 for intra. In
units of the kept LSB, Thr is always 16, so each AD fits in 5 bits (R1).

`hoc_ad_unit` splits the truncated pixels into a 4-bit low part and a 3-bit
high part and subtracts both in parallel:
- LOB1 computes `A_low - B_low`;
- LOB2 computes `B_low - A_low`;
- HOC computes the high-part difference and its carry.

The high-part result `{carry, diff}` decides the outcome:
- If the high parts are equal, the sign of a low difference picks LOB1 or LOB2.
- If the high parts differ by ±1, the low borrow decides whether the
  difference is still below Thr. Then the matching low result is the AD.
- Otherwise the AD is clipped to Thr.

The 3-bit high difference 111 can mean −1 or +7. The carry is needed to tell
them apart, which is why the select logic looks at all four bits.

`hoc_sad_unit` has four lanes and three pipeline stages: input registers, R1,
then the R2 accumulator. R2 is 13 bits, since a 16x16 block sums to at most
256 · 16 = 4096. The four R1 values and the low 7 bits of R2 go through full
adders. The upper 6 bits only have to absorb one carry, so they use
`ha2_chain`, an incrementer built from 2-bit half-adder cells.

Frame a block with `in_first` and `in_last`. `sad_valid` rises 3 cycles after
the `in_last` group. `sad_px` gives the result in pixel units.

## Scalable DCT

`dct1d_trunc` is an 8-point DCT in 14-bit fixed point with 2 fractional bits:
- It uses the usual even/odd butterfly.
- The constants are a..g = round(½·cos(kπ/16)·4096).
- The products are scaled back by 12 bits.

Three knobs reduce the work:

1. **Truncation**: AND gates clear 0, 2, 4 or 6 LSBs of the inputs.
2. **Deactivation**: any output Wk can be switched off. It reads as 0, and its
   multiplier inputs are gated.
3. **Compensation**: the mean truncation error is added back to W0 and W1.
   - W0 gets `floor(d(2^L−1)/2)`.
   - W1 gets `floor((a+c+e+g)(2^L−1)/8)`.
   - The other outputs have zero-mean error.

`dct_level_ctrl` turns quality Q (1..100) and a PSNR scheme (I, II, III) into
a level from 0 to 8. Each level adds one step to the level before it:

| Level | Step added |
|---|---|
| L1 | 2-bit truncation |
| L2 | W7 off |
| L3 | 4-bit truncation |
| L4 | W6 off |
| L5 | W5 off |
| L6 | 6-bit truncation |
| L7 | nothing (same as L6) |
| L8 | W3 off |

W4 shares its computation unit with W0, and the pair is only gated when both
are off. W4 is therefore kept at level 7, so L7 is equal to L6.

The level table has columns for Q = 75, 65, …, 5:

| Scheme | 75 | 65 | 55 | 45 | 35 | 25 | 15 | 5 |
|---|---|---|---|---|---|---|---|---|
| I | 2 | 2 | 3 | 3 | 3 | 3 | 4 | 6 |
| II | 3 | 3 | 3 | 3 | 4 | 4 | 5 | 8 |
| III | 4 | 4 | 4 | 4 | 5 | 5 | 6 | 8 |

- A Q between two columns uses the next higher column.
- A Q above 75 uses the 75 column.
- `override_en` forces a level directly.

`dct2d` builds the 2-D transform as row DCT, transpose buffer, column DCT:
- It loads 8 rows of pixels, one per cycle. Pixels are level-shifted by −128.
- It then outputs 8 columns of 8 coefficients, one column per cycle.
- One block takes 16 cycles.
- Both passes use the same configuration.
- A switched-off row output still gets the W0/W1 compensation constants in the
  column pass.

## Voltage-overscaling repair for JPEG (`vos_compensator`)

Timing errors in overscaled adders hit the MSBs first. Quantized AC
coefficients are small, so such errors show up in two ways:
- as broken sign-extension bits;
- as outliers much larger than their neighbours.

Coefficients arrive in zig-zag order, 64 per block, in four groups of 16.

**Step 1, majority voter.** For each group and Q there is a width k within
which a valid coefficient fits. Where k ≤ 7, bits 13, 12 and k are voted. All
bits from k upwards are set to the majority.

**Step 2, comparator and averager.** Coefficient j of block b is replaced by
the mean of its zig-zag neighbours j−1 and j+1 when both of these hold:
- it differs from that mean by more than the group threshold;
- it differs by more than the threshold from the mean of coefficient j in
  blocks b−1 and b+1.

The group thresholds are 64, 32, 16 and 8.

**Timing.**
- A block is output after the next block has arrived. A `flush` pulse between
  blocks releases the last block.
- Output takes 64 cycles, and `in_ready` is low during that time.
- Coefficients 1 and 63 are not tested, and neither are the first block and a
  flushed block, because they lack a neighbour.

## Truncated MAC filter (`fir_mac_lpf`)

A single multiply-accumulate unit computes an N-tap filter, one tap per cycle:
- AND gates clear the L low bits of both sample and coefficient.
- The final adder adds the expected truncation error back:
  `corr = ((2^L−1)·Σh + (2^(M+1)−2^L)·Σ(h mod 2^L)) / 2`, with M = 7 for 8-bit
  data.
- `corr` depends only on the coefficients and L. It is formed combinationally
  and is also an output.

With the 3x3 Gaussian kernel 19/32/52 at L = 4, `corr` is 3840, i.e. 15 pixel
LSBs.

## Unequal error protection for the tile memory

There are three SECDED codes:
- (39,32), the strongest;
- (72,64);
- (137,128), the cheapest.

They are nested, so one set of four 32-bit parity generators (`ecc_pargen32`)
serves all three:
- Each generator outputs a 6-bit Hamming part and the segment parity. Data bit
  i of a segment gets the i-th 6-bit value with at least two ones as its
  column.
- The (72,64) code XORs the Hamming parts of two segments. It adds the parity
  of segment 1 as check row 6.
- The (137,128) code XORs all four segments. Its rows 6 and 7 are
  p1⊕p3 and p2⊕p3.
- The last check bit of every code is overall parity.

Inputs a code does not use are gated to zero. The decoder re-encodes the data
and forms the syndrome. It corrects a single error, including one in a check
bit, and flags double errors.

## Bit-plane corrector for JPEG2000 high subbands

A code block is S×S coefficients, 32×32 by default. Each coefficient is a
W-bit sign-magnitude word, 16 bits by default, with magnitude planes 14..0.

In high subbands the top planes are almost empty. True ones in them belong to
connected edges, so isolated ones are probably memory errors. Four methods are
available:

1. **Method 1** clears the `n_erase` top planes.
2. **Method 2** goes down from the top plane. It counts the ones with a
   saturating 9-bit counter and clears the plane if the count is below `thr`.
   It stops at the first plane that reaches `thr`. `thr` should be about twice
   the expected number of errors per plane.
3. **Method 3** selects planes like Method 2 but clears only unsupported ones.
   A one is supported if any other one lies in its 3×3 window in planes i+1
   (already corrected), i, i−1 and i−2.
4. **Method 4** works like Method 3, but the four direct neighbours in the same
   plane give no support. This also removes short bursts of adjacent wrong
   bits.

Storage and timing:
- The block is stored as bit planes of S-bit rows.
- Counting and the neighbourhood check handle one row per cycle, using S
  all-zero detectors.
- Loading takes S² cycles and output takes S² cycles.
- Each examined plane takes S or 2S cycles, plus 1.
- `high_band = 0` passes the block through unchanged.

## Departures and open points

- The rules for selecting among the HOC sub-results, and the split of the R2
  adder, come from the arithmetic, not from a published schematic.
- These choices belong to this design:
  - the voted bits and the two middle thresholds in the VOS compensator;
  - replacement by the same-block mean;
  - the SECDED column assignment;
  - the four-neighbour burst pattern;
  - the sign-magnitude word format.
- Level L7 of the DCT controller equals L6, as explained above.
- Not built: the SRAM itself, the DWT, EBCOT/MQ coding, JPEG quantisation,
  zig-zag and entropy coding, the rest of the H.264 encoder, and an LL-subband
  filter. The signals that would connect to them are top-level ports.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=… failures=…`. For example:

    verilator --binary --timing --assert -y rtl -Irtl rtl/emq_pkg.sv tb/tb_emq_top.sv \
        --top-module tb_emq_top -Mdir obj_top -o sim && obj_top/sim

Modules are found in `rtl/` by name; only the package is listed.

`tb_emq_top` runs the whole design at its default parameters:
- a 16x16 SAD in each mode;
- two DCT blocks;
- three VOS blocks;
- FIR windows;
- all ECC codes;
- six 32x32 code blocks through the corrector.

It counts every mechanism (clipping, both SAD modes, truncation, deactivation,
compensation, both VOS steps, ECC correction and detection, the four methods,
burst removal, bypass) and fails if any count is zero. It runs in well under a
second.

Lint gives a few warnings, all understood:
- `hoc_ad_unit` does not use bit 0 of the pixels; it is truncated by design.
- The decoder ignores one bit of its internal re-encoder.
- `rst_n` is also used to disable an assertion.
