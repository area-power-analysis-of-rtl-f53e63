// r4_butterfly: radix-4 butterfly, i.e. a 4-point DFT, built from eight
// complex adders and no multipliers.
//
//   t0 = a0 + a2   t1 = a0 - a2   t2 = a1 + a3   t3 = a1 - a3
//   y0 = t0 + t2   y2 = t0 - t2   y1 = t1 - j*t3 y3 = t1 + j*t3
//
// Multiplying by -j or +j only swaps real and imaginary parts and changes a
// sign, so it costs no multiplier. The sums are exact (DATA_W+3 bits); each
// output is then divided by 2^SHIFT, rounded to nearest (halves up) and
// saturated to DATA_W bits. With the default SHIFT = 2 a full-scale input
// cannot overflow, so every stage of the FFT keeps 16-bit words and the
// complete N-point transform returns DFT/N.
//
// Timing: purely combinational. The eight-adder structure follows the
// design's description; the per-stage scaling by 1/4 is this design's
// choice for keeping the word at 16 bits.
module r4_butterfly
  import bf_pkg::*;
#(
  parameter int SHIFT = 2    // right shift applied to every output
) (
  input  cplx_t a [4],
  output cplx_t y [4]
);

  localparam int W = DATA_W + 3;

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } wide_t;

  wide_t t0, t1, t2, t3;
  wide_t u [4];

  always_comb begin
    t0.re = W'(a[0].re) + W'(a[2].re);
    t0.im = W'(a[0].im) + W'(a[2].im);
    t1.re = W'(a[0].re) - W'(a[2].re);
    t1.im = W'(a[0].im) - W'(a[2].im);
    t2.re = W'(a[1].re) + W'(a[3].re);
    t2.im = W'(a[1].im) + W'(a[3].im);
    t3.re = W'(a[1].re) - W'(a[3].re);
    t3.im = W'(a[1].im) - W'(a[3].im);

    u[0].re = t0.re + t2.re;
    u[0].im = t0.im + t2.im;
    u[2].re = t0.re - t2.re;
    u[2].im = t0.im - t2.im;
    // -j * t3 = (t3.im, -t3.re)
    u[1].re = t1.re + t3.im;
    u[1].im = t1.im - t3.re;
    // +j * t3 = (-t3.im, t3.re)
    u[3].re = t1.re - t3.im;
    u[3].im = t1.im + t3.re;

    for (int k = 0; k < 4; k++) begin
      y[k].re = round_sat(longint'(u[k].re), SHIFT);
      y[k].im = round_sat(longint'(u[k].im), SHIFT);
    end
  end

endmodule
