// tb_tf_cmult: self-checking test of the constant-twiddle complex multiplier.
//
// Instantiates one multiplier per twiddle W_16^e, e = 1..15, with 4-bit
// twiddles, and one with 16-bit twiddles (W_16^3). The expected result is
// the four-multiplier product (C X - S Y) + i(C Y + S X), divided by
// 2^(TW_W-1), rounded to nearest with halves up and clipped to 16 bits,
// with C and S computed here from cos/sin. Inputs are random plus the
// full-scale corners. The quantised twiddle values of 4-bit W_16^e are also
// checked against a table worked out by hand.
module tb_tf_cmult;
  import bf_pkg::*;

  localparam int NTW = 15;
  localparam int L   = 16;

  int checks = 0;
  int failures = 0;

  cplx_t x;
  cplx_t y [NTW+1];

  function automatic int ref_q(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int clip(int v, int w);
    int hi = (1 <<< (w-1)) - 1;
    int lo = -(1 <<< (w-1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int exp_c(int e, int w);
    return clip(ref_q(real'(1 <<< (w-1)) * $cos(2.0*3.14159265358979*e/L)), w);
  endfunction
  function automatic int exp_s(int e, int w);
    return clip(ref_q(-real'(1 <<< (w-1)) * $sin(2.0*3.14159265358979*e/L)), w);
  endfunction

  // round(v / 2^sh) halves up, then 16-bit saturation
  function automatic int scale_sat(longint v, int sh);
    real r;
    longint q;
    r = real'(v) / real'(longint'(1) <<< sh);
    q = longint'($floor(r + 0.5));
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return int'(q);
  endfunction

  for (genvar e = 1; e <= NTW; e++) begin : g_dut
    tf_cmult #(.TW_W(4), .TW_RE(tw_re(e, L, 4)), .TW_IM(tw_im(e, L, 4)))
      u_dut (.x(x), .y(y[e-1]));
  end
  tf_cmult #(.TW_W(16), .TW_RE(tw_re(3, L, 16)), .TW_IM(tw_im(3, L, 16)))
    u_dut16 (.x(x), .y(y[NTW]));

  // Hand-worked 4-bit twiddles of W_16^1..W_16^4 (scale 8)
  int hand_c [4] = '{7, 6, 3, 0};
  int hand_s [4] = '{-3, -6, -7, -8};

  task automatic check_all();
    longint c, s, xr, xi;
    int er, ei, w, e;
    xr = longint'(x.re);
    xi = longint'(x.im);
    for (int i = 0; i <= NTW; i++) begin
      w = (i == NTW) ? 16 : 4;
      e = (i == NTW) ? 3 : i + 1;
      c = longint'(exp_c(e, w));
      s = longint'(exp_s(e, w));
      er = scale_sat(c*xr - s*xi, w-1);
      ei = scale_sat(c*xi + s*xr, w-1);
      checks++;
      if (int'(y[i].re) != er || int'(y[i].im) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL e=%0d w=%0d x=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                   e, w, xr, xi, y[i].re, y[i].im, er, ei);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (exp_c(i+1, 4) != hand_c[i] || exp_s(i+1, 4) != hand_s[i]) begin
        failures++;
        $display("FAIL twiddle table e=%0d", i+1);
      end
    end
    foreach (hand_c[i]) begin
      checks++;
      if (tw_re(i+1, L, 4) != hand_c[i] || tw_im(i+1, L, 4) != hand_s[i]) failures++;
    end
    // corners
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        static sample_t v [4] = '{16'sh7fff, -16'sh8000, 16'sd0, -16'sd1};
        x.re = v[a];
        x.im = v[b];
        #1 check_all();
      end
    repeat (2000) begin
      x.re = sample_t'($urandom);
      x.im = sample_t'($urandom);
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
