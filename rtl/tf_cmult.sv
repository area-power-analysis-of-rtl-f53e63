// tf_cmult: multiplies a complex sample by one constant, quantised twiddle
// factor W = (C + iS) / 2^(TW_W-1).
//
// The product (C+iS)(X+iY) = (CX - SY) + i(CY + SX) is formed with three
// real multipliers and five real adders instead of four multipliers and
// two adders:
//   k1 = C*(X+Y),  k2 = Y*(C+S),  k3 = X*(S-C)
//   re = k1 - k2,  im = k1 + k3
// (C+S) and (S-C) are constants of the unrolled datapath, so the adders that
// form them cost nothing at run time. With TW_W = 4 each multiplier is a
// 16 x 4 bit product. The result is scaled back by 2^(TW_W-1), rounded to
// nearest (halves up) and saturated to 16 bits, so the word does not grow.
//
// Timing: purely combinational; the FFT stage that uses it registers its
// output. The three-multiplier form and the 4-bit twiddle width follow the
// design's area analysis; the rounding and saturation are this design's
// choice.
module tf_cmult
  import bf_pkg::*;
#(
  parameter int TW_W  = 4,   // twiddle word width (bits, signed)
  parameter int TW_RE = 6,   // C, quantised real part of the twiddle
  parameter int TW_IM = -6   // S, quantised imaginary part of the twiddle
) (
  input  cplx_t x,
  output cplx_t y
);

  localparam int SUM_W  = DATA_W + 1;
  localparam int CST_W  = TW_W + 1;
  localparam int PROD_W = SUM_W + CST_W;
  localparam int ACC_W  = PROD_W + 1;

  localparam logic signed [CST_W-1:0] C_K   = CST_W'(TW_RE);
  localparam logic signed [CST_W-1:0] CPS_K = CST_W'(TW_RE + TW_IM);
  localparam logic signed [CST_W-1:0] SMC_K = CST_W'(TW_IM - TW_RE);

  logic signed [SUM_W-1:0]  xpy;
  logic signed [PROD_W-1:0] k1, k2, k3;
  logic signed [ACC_W-1:0]  re_full, im_full;

  always_comb begin
    xpy     = SUM_W'(x.re) + SUM_W'(x.im);
    k1      = PROD_W'(xpy) * PROD_W'(C_K);
    k2      = PROD_W'(x.im) * PROD_W'(CPS_K);
    k3      = PROD_W'(x.re) * PROD_W'(SMC_K);
    re_full = ACC_W'(k1) - ACC_W'(k2);
    im_full = ACC_W'(k1) + ACC_W'(k3);
    y.re    = round_sat(longint'(re_full), TW_W - 1);
    y.im    = round_sat(longint'(im_full), TW_W - 1);
  end

endmodule
