# Fully unrolled FFT beamformer with 4-bit twiddle factors

A satellite payload with a planar antenna array must form many fixed beams
at once. Doing that as a matrix-by-vector product costs N x N complex
multiplications per snapshot. For a uniform rectangular array the
beamforming matrix can be a DFT matrix, so a 2D FFT can form the beams
instead. This design makes that FFT cheap enough for on-board use in three
ways:

* **Fully unrolled.** All samples of a snapshot enter in the same clock and
  every butterfly and multiplier has its own hardware. A whole 2D transform
  therefore leaves every clock. The transposes between the row and column
  passes become plain wiring, and no twiddle memory is needed.
* **Constant twiddles, trivial ones removed.** Each twiddle multiplier
  multiplies by one fixed constant. Every multiplication by W^0 = 1 is left
  out, so the last stage contains adders only.
* **4-bit twiddles.** Each twiddle factor is quantised to 4 signed bits, in
  steps of 1/8. Each real multiplier then becomes a 16 x 4 product instead
  of 16 x 16. The transform stays linear, and the beams keep their shape
  (see *Accuracy* below).

The data path is 16 bits per real component, with no word growth.

## Structure

```
bf_beamformer_top            one beamformer per 500 MHz sub-band
 └─ bf2d_fft  (x NUM_SUBBANDS)
     zero padding  N_ELEM x N_ELEM  ->  N_FFT x N_FFT
     fft_r4_unrolled (x N_FFT)   row transforms
     transpose (wiring)
     fft_r4_unrolled (x N_FFT)   column transforms
     transpose (wiring)
      └─ fft_r4_unrolled
          r4_butterfly   (N/4 per stage, log4(N) stages)
          tf_cmult       (one per non-trivial twiddle)
bf_pkg                       sample/complex types, twiddle quantiser, helpers
```

| Module | Role | Latency |
|---|---|---|
| `bf_beamformer_top` | Bank of `NUM_SUBBANDS` 2D beamformers. All share `in_valid`. | 2·log4(N_FFT) |
| `bf2d_fft` | Zero padding, then row FFTs, transpose, column FFTs, transpose. | 2·log4(N_FFT) |
| `fft_r4_unrolled` | N-point radix-4 FFT; all N points in and out every clock. | log4(N) |
| `r4_butterfly` | 4-point DFT built from 8 complex adders, scaled by 1/4. | combinational |
| `tf_cmult` | Multiply by a constant twiddle using 3 real multipliers and 5 real adders. | combinational |

### Configurations

Three mission settings map onto the parameters of `bf_beamformer_top`:

| Setting | `N_ELEM` | `N_FFT` | `NUM_SUBBANDS` | Bandwidth |
|---|---|---|---|---|
| Low earth orbit (**default**) | 12 | 16 | 1 | 500 MHz |
| Medium earth orbit | 10 | 16 | 3 | 1500 MHz |
| Geostationary | 145 | 256 | 6 | 3000 MHz |

Sub-band splitting (channelisation) happens upstream and is not part of this
RTL. Each sub-band arrives as one complex sample per element per clock. The
geostationary setting is a legal parameter set but very large: it has 512
FFTs of 256 points per sub-band. It has not been simulated as a whole 2D
design. The 256-point 1D FFT is simulated on its own.

## The radix-4 FFT (`fft_r4_unrolled`)

This is the core of the design. It uses radix-4 decimation in frequency with
`S = log4(N)` stages. `N` must be a power of 4.

Stage `s` works on groups of `L = N / 4^s` points; let `Q = L/4`. For every
group base `g` and every `j < Q`, one butterfly reads the points

    g + j,  g + j + Q,  g + j + 2Q,  g + j + 3Q

It writes its output `k` (0..3) back to `g + j + kQ`, after multiplying it
by the twiddle `W_L^(j·k) = exp(-2πi·jk/L)`. When `j·k = 0` there is no
multiplier, only a wire. In the last stage `Q = 1`, so that stage has no
multipliers at all.

Hardware count per transform:

| N | Butterflies | Complex adders | Twiddle multipliers | Real multipliers (3 per complex) | Real adders (2 per complex adder + 5 per multiplier) |
|---|---|---|---|---|---|
| 16 | 8 | 64 | 9 | 27 | 173 |
| 64 | 48 | 384 | 81 | 243 | 1173 |
| 256 | 256 | 2048 | 513 | 1539 | 6661 |

A 2D FFT of size N x N uses 2N of these 1D transforms (N for the rows, N
for the columns).

Multiplications by −j (W_L^(L/4)) are kept as ordinary multipliers, which is
why N = 16 has 9 rather than fewer. With 4-bit twiddles, −j = (0, −8)/8 is
exact, so a synthesis tool reduces that multiplier to wiring.

The last stage leaves the bins in base-4 digit-reversed order. The output
port puts them back in natural order by wiring (`digit_rev4`).

### Using only part of the beams

If only half or a quarter of the beams are needed, `N_OUT` can be set to
`N/2` or `N/4`. Then only the first `N_OUT/4` butterflies of the last stage
are built. That stage has no multipliers, so the saving is in adders only.
The complex adder counts become:

| N | All outputs | `N_OUT = N/2` | `N_OUT = N/4` |
|---|---|---|---|
| 16 | 64 | 48 | 40 |
| 64 | 384 | 320 | 288 |
| 256 | 2048 | 1792 | 1664 |

The bins that remain are those whose digit-reversed index is below `N_OUT`:

* for `N/2`, the bins k with k mod 4 ∈ {0, 1};
* for `N/4`, the bins with k mod 4 = 0.

These are evenly spaced subsets of the beams, and the other outputs read
zero. The 2D wrapper always builds every output.

Each stage (butterfly, then twiddle) ends in a register. The latency is
therefore `log4(N)` clocks, and a new transform can start every clock. Only
the valid bits are reset. The data registers hold whatever they last
captured.

### Scaling and rounding

Words stay at 16 bits through every stage:

* **Butterflies.** The sums are formed exactly in 19 bits. They are then
  divided by 4, rounded to nearest (ties toward +∞), and saturated. Because
  of this, full-scale inputs cannot overflow a butterfly. Bin `k` of an
  N-point transform is `DFT(x)[k] / N`, and the 2D output is
  `DFT2(x) / N_FFT²`.
* **Twiddle multipliers.** A quantised twiddle can have magnitude slightly
  above 1; for example (6 − 6i)/8 has magnitude 1.06. The multiplier output
  is therefore rounded and saturated to 16 bits. Saturation can only happen
  for inputs close to full scale.

### Twiddle quantisation

`bf_pkg::tw_re` and `tw_im` compute each twiddle at elaboration time:

    C = round( 2^(TW_W-1) · cos(2π e / L) )
    S = round(−2^(TW_W-1) · sin(2π e / L) )

Each value is clipped to the signed `TW_W`-bit range. With `TW_W = 4`, the
twiddles of the 16-point FFT are:

| e | 1 | 2 | 3 | 4 | 6 | 9 |
|---|---|---|---|---|---|---|
| C | 7 | 6 | 3 | 0 | −6 | −7 |
| S | −3 | −6 | −7 | −8 | −6 | 3 |

+1.0 (the value 8) does not fit in 4 signed bits. It is never needed,
because W^0 is never multiplied, and no other exponent used produces +1.
Setting `TW_W = 16` turns the same RTL into a full-precision unrolled FFT.

## The twiddle multiplier (`tf_cmult`)

The twiddle is W = (C + iS) / 2^(TW_W−1). For an input X + iY:

    k1 = C·(X+Y)    k2 = Y·(C+S)    k3 = X·(S−C)
    re = k1 − k2    im = k1 + k3

This needs three real multipliers instead of four. The sums C+S and S−C are
constants, so they cost no hardware. The result is shifted right by
`TW_W−1`, rounded and saturated.

## Accuracy of 4-bit twiddles

`tb_ula64_beams` compares a 64-element uniform linear array beamformed with
4-bit twiddles against the same FFT with 16-bit twiddles. It sweeps a plane
wave across beams 3, 28 and 57 in steps of 1/8 beam. Results:

* The peak is always on the intended beam.
* The two main lobes agree within about 0.12 dB.
* For an on-beam input, every other beam output is 28 dB or more below the
  peak.

So the coarse twiddles cost little in beam shape. What they do add is a
low-level spread of energy into other beams, at roughly −28 to −30 dB for
this array.

## Interfaces and timing

All modules use the same types from `bf_pkg`:

* `cplx_t`: a packed struct `{re, im}` of two signed 16-bit values.
* Arrays of `cplx_t` carry the samples.

Top-level ports of `bf_beamformer_top`:

* `clk`, and `rst_n` (asynchronous, active low).
* `in_valid` and `elem[NUM_SUBBANDS][N_ELEM][N_ELEM]`, indexed
  `elem[b][row][col]`.
* `out_valid` and `beam[NUM_SUBBANDS][N_FFT][N_FFT]`, indexed
  `beam[b][ky][kx]`. `ky` is the spatial frequency along the row index and
  `kx` along the column index.

There is no back-pressure: the pipeline accepts a snapshot every clock.
`out_valid` follows `in_valid` exactly `2·log4(N_FFT)` clocks later; that is
4 clocks at the default size. Zero padding places the array in the low
corner of the `N_FFT × N_FFT` grid.

## Simulation

All testbenches check themselves. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. They
need only the files in `rtl/` and `tb/`. For example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/bf_pkg.sv tb/bf_ref_pkg.sv rtl/tf_cmult.sv rtl/r4_butterfly.sv \
  rtl/fft_r4_unrolled.sv rtl/bf2d_fft.sv rtl/bf_beamformer_top.sv \
  tb/tb_bf_beamformer_full.sv --top-module tb_bf_beamformer_full
./obj_dir/Vtb_bf_beamformer_full
```

| Testbench | What it checks |
|---|---|
| `tb_tf_cmult` | All 15 twiddles of W_16 at 4 bits, plus one 16-bit twiddle, on random and full-scale inputs. Compared bit-exactly with a four-multiplier reference; also checks the quantised values against a hand-made table. |
| `tb_r4_butterfly` | Compares bit-exactly with a term-by-term 4-point DFT, including saturation corners and an unscaled instance. |
| `tb_fft_r4_unrolled` | N = 4, 16, 64 and 256 with 4-bit twiddles, and N = 64 with 16-bit twiddles. Compares with a floating-point model within 8 LSB, and checks the 16-bit instance against an exact DFT. Also checks latency, bubbles and back-to-back throughput, and two pruned instances (N_OUT = N/2 and N/4). |
| `tb_bf2d_fft` | A 16 × 16 array with no padding: random snapshots and plane waves against a floating-point 2D model. |
| `tb_bf_beamformer_top` | The medium-earth-orbit setting (3 sub-bands, 10 × 10 array): padding, independent sub-bands, latency, bubbles, throughput, plane-wave direction finding. |
| `tb_bf_beamformer_full` | The same checks on the top at its default parameters. |
| `tb_ula64_beams` | The 64-element linear-array beam patterns described above. |

`tb/bf_ref_pkg.sv` holds the floating-point reference models:

* A radix-4 FFT with the same twiddle quantisation and saturation, but
  without intermediate rounding.
* A direct DFT.

Compile time grows quickly with size. A 16 × 16 2D FFT builds in under a
minute. A 64 × 64 one takes verilator more than ten minutes to compile.

## Departures and open points

* **Scaling and rounding rules.** The ÷4 per stage, round-to-nearest and
  saturation are this design's choice for keeping 16-bit words without
  overflow.
* **Pipeline registers.** One register per radix-4 stage is a choice too.
  Retime as the target clock needs.
* **Twiddle rounding rule.** Nearest, with clipping to the 4-bit range.
  Other rules (for example truncation, or a scale of 7) would give
  different beams.
* **No upstream or downstream logic.** Channelisation into sub-bands and the
  RF/ADC chains are outside this RTL.
* **Geostationary size not exercised.** The geostationary configuration is
  reachable through the parameters only. At that size the 2D design has
  been neither compiled nor simulated; the 256-point 1D FFT it is built
  from has been.
