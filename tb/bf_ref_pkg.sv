// bf_ref_pkg: floating-point reference models used by the testbenches.
//
// ref_fft      radix-4 decimation-in-frequency FFT in real arithmetic, with
//              the same twiddle quantisation rule as the hardware
//              (round(2^(w-1)*cos), round(-2^(w-1)*sin), clipped to w bits)
//              a division by 4 per stage and saturation to the 16-bit
//              range, but without any rounding of intermediate values.
//              Output in natural order.
// ref_dft      direct DFT with exact twiddles, divided by n.
// Arrays are sized for the largest transform tested (MAXN points).
package bf_ref_pkg;

  localparam int  MAXN = 256;
  localparam real PI   = 3.14159265358979323846;

  typedef real vec_t [MAXN];

  function automatic real q_tw(real v, int w);
    real s, r;
    s = real'(1 << (w - 1));
    r = (v * s >= 0.0) ? $floor(v * s + 0.5) : -$floor(-v * s + 0.5);
    if (r > s - 1.0) r = s - 1.0;
    if (r < -s) r = -s;
    return r / s;
  endfunction

  // Saturation to the 16-bit range, as the hardware does.
  function automatic real clip16(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  function automatic void ref_fft(int n, int w, inout vec_t re, inout vec_t im);
    vec_t r2, i2;
    int   l, q, stages, idx, rev, v;
    real  ar [4], ai [4], br, bi, c, s, ang;
    stages = 0;
    while ((1 << (2 * stages)) < n) stages++;
    l = n;
    while (l >= 4) begin
      q = l / 4;
      for (int g = 0; g < n; g += l)
        for (int j = 0; j < q; j++) begin
          for (int m = 0; m < 4; m++) begin
            ar[m] = re[g + j + m*q];
            ai[m] = im[g + j + m*q];
          end
          for (int k = 0; k < 4; k++) begin
            br = 0.0;
            bi = 0.0;
            for (int m = 0; m < 4; m++) begin
              ang = -2.0 * PI * real'(m * k) / 4.0;
              br += ar[m] * $cos(ang) - ai[m] * $sin(ang);
              bi += ar[m] * $sin(ang) + ai[m] * $cos(ang);
            end
            br = clip16(br / 4.0);
            bi = clip16(bi / 4.0);
            if (j * k != 0) begin
              ang = 2.0 * PI * real'(j * k) / real'(l);
              c = q_tw($cos(ang), w);
              s = q_tw(-$sin(ang), w);
              re[g + j + k*q] = clip16(br * c - bi * s);
              im[g + j + k*q] = clip16(br * s + bi * c);
            end else begin
              re[g + j + k*q] = br;
              im[g + j + k*q] = bi;
            end
          end
        end
      l = l / 4;
    end
    // digit reversal to natural order
    for (int b = 0; b < n; b++) begin
      rev = 0;
      v = b;
      for (int d = 0; d < stages; d++) begin
        rev = rev * 4 + (v % 4);
        v = v / 4;
      end
      r2[b] = re[rev];
      i2[b] = im[rev];
    end
    for (int b = 0; b < n; b++) begin
      re[b] = r2[b];
      im[b] = i2[b];
    end
  endfunction

  function automatic void ref_dft(int n, inout vec_t re, inout vec_t im);
    vec_t r2, i2;
    real ang;
    for (int k = 0; k < n; k++) begin
      r2[k] = 0.0;
      i2[k] = 0.0;
      for (int t = 0; t < n; t++) begin
        ang = -2.0 * PI * real'((k * t) % n) / real'(n);
        r2[k] += re[t] * $cos(ang) - im[t] * $sin(ang);
        i2[k] += re[t] * $sin(ang) + im[t] * $cos(ang);
      end
    end
    for (int k = 0; k < n; k++) begin
      re[k] = r2[k] / real'(n);
      im[k] = i2[k] / real'(n);
    end
  endfunction

endpackage
