// bf_pkg: shared types, constants and elaboration-time helpers of the
// FFT beamformer.
//
// Samples are complex, DATA_W-bit two's complement per component (16 bits,
// no word growth from stage to stage). Twiddle factors W_L^e =
// exp(-j*2*pi*e/L) are constants of the unrolled datapath; they are
// quantised here, at elaboration time, to TW_W-bit signed integers with
// the scale 2^(TW_W-1) (so 4-bit twiddles are multiples of 1/8).
// The value +1.0 does not fit that range and is clipped to 2^(TW_W-1)-1;
// the datapath never needs it, because multiplications by W^0 are removed.
// The 16-bit data width and the 4-bit twiddle width follow the design's
// area analysis; the rounding rule (nearest, halves away from zero) and the
// clipping are this design's choice.
package bf_pkg;

  // Word width of one real component (16 bits, no bit growth).
  localparam int DATA_W = 16;

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  localparam real PI = 3.14159265358979323846;

  // Round a real to the nearest integer, halves away from zero.
  function automatic int round_real(real x);
    if (x >= 0.0) return $rtoi(x + 0.5);
    else          return -$rtoi(-x + 0.5);
  endfunction

  // Clip an integer into a signed field of w bits.
  function automatic int clip_signed(int v, int w);
    int hi, lo;
    hi = (1 <<< (w - 1)) - 1;
    lo = -(1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Real part of the quantised twiddle W_L^e (cos term).
  function automatic int tw_re(int e, int l, int tw_w);
    real scale;
    scale = real'(1 <<< (tw_w - 1));
    return clip_signed(round_real(scale * $cos(2.0 * PI * real'(e) / real'(l))), tw_w);
  endfunction

  // Imaginary part of the quantised twiddle W_L^e (-sin term).
  function automatic int tw_im(int e, int l, int tw_w);
    real scale;
    scale = real'(1 <<< (tw_w - 1));
    return clip_signed(round_real(-scale * $sin(2.0 * PI * real'(e) / real'(l))), tw_w);
  endfunction

  // Number of radix-4 stages of an n-point FFT (n a power of 4).
  function automatic int log4(int n);
    int s;
    s = 0;
    while ((4 ** s) < n) s++;
    return s;
  endfunction

  // Base-4 digit reversal of idx over ndig digits.
  function automatic int digit_rev4(int idx, int ndig);
    int r, v;
    r = 0;
    v = idx;
    for (int d = 0; d < ndig; d++) begin
      r = (r << 2) | (v & 3);
      v = v >> 2;
    end
    return r;
  endfunction

  // Round (halves up) an arithmetic right shift by sh bits, then saturate
  // to a DATA_W-bit sample.
  function automatic sample_t round_sat(longint v, int sh);
    longint r, hi, lo;
    if (sh > 0) r = (v + (longint'(1) <<< (sh - 1))) >>> sh;
    else        r = v;
    hi = (longint'(1) <<< (DATA_W - 1)) - 1;
    lo = -(longint'(1) <<< (DATA_W - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return sample_t'(r);
  endfunction

endpackage
