// tb_ula64_beams: beam patterns of a 64-element uniform linear array formed
// by the unrolled radix-4 FFT with 4-bit twiddles, against the same FFT with
// 16-bit twiddles (the conventional, full-precision reference).
//
// For each of the beams 3, 28 and 57 a plane wave is swept across arrival
// directions u = b - 2 ... b + 2 in steps of 1/8 of a beam spacing
// (x[n] = A*exp(j*2*pi*u*n/64)), and the output of beam b is recorded for
// both twiddle widths: that is the array factor of beam b. Checks:
//   - with u exactly on beam b, the strongest output of both FFTs is bin b;
//   - the two array factors agree within 1 dB over the main lobe
//     (|u - b| <= 0.5) and the 4-bit one stays within 3 dB of the
//     full-precision one down to -25 dB below the peak elsewhere;
//   - with u on beam b, every other 4-bit output is at least MIN_ISO_DB
//     below the peak (no strong leakage into neighbouring beams).
module tb_ula64_beams;
  import bf_pkg::*;

  localparam int  N          = 64;
  localparam real AMP        = 20000.0;
  localparam real MIN_ISO_DB = 20.0;
  localparam real PI_L       = 3.14159265358979323846;

  int checks = 0;
  int failures = 0;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  vin = 1'b0;
  cplx_t x [N];
  cplx_t y4 [N];
  cplx_t y16 [N];
  logic  v4, v16;

  always #5 clk = ~clk;

  fft_r4_unrolled #(.N(N), .TW_W(4))  u_q4  (.clk(clk), .rst_n(rst_n), .in_valid(vin), .x(x),
                                             .out_valid(v4), .xf(y4));
  fft_r4_unrolled #(.N(N), .TW_W(16)) u_q16 (.clk(clk), .rst_n(rst_n), .in_valid(vin), .x(x),
                                             .out_valid(v16), .xf(y16));

  function automatic real mag_db(cplx_t v);
    real p;
    p = real'(v.re) ** 2 + real'(v.im) ** 2;
    if (p < 1.0) p = 1.0;
    return 10.0 * $log10(p);
  endfunction

  // drive one plane wave and wait for its transform
  task automatic apply(real u);
    real ph;
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      ph = 2.0 * PI_L * u * real'(n) / real'(N);
      x[n].re = sample_t'($rtoi(AMP * $cos(ph)));
      x[n].im = sample_t'($rtoi(AMP * $sin(ph)));
    end
    vin = 1'b1;
    @(negedge clk);
    vin = 1'b0;
    repeat (log4(N) - 1) @(negedge clk);
    checks++;
    if (!v4 || !v16) begin
      failures++;
      $display("FAIL result not valid after %0d cycles", log4(N));
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
    static int beams [3] = '{3, 28, 57};
    int  b, arg4, arg16;
    real u, p4, p16, peak16, best4, best16, worst_iso, worst_dev;
    for (int n = 0; n < N; n++) x[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      b = beams[i];
      // on-beam input: peak location and isolation
      apply(real'(b));
      arg4 = 0;
      arg16 = 0;
      best4 = -1.0e9;
      best16 = -1.0e9;
      for (int k = 0; k < N; k++) begin
        if (mag_db(y4[k]) > best4) begin best4 = mag_db(y4[k]); arg4 = k; end
        if (mag_db(y16[k]) > best16) begin best16 = mag_db(y16[k]); arg16 = k; end
      end
      checks++;
      if (arg4 != b || arg16 != b) begin
        failures++;
        $display("FAIL beam %0d: peak at %0d (4-bit) / %0d (16-bit)", b, arg4, arg16);
      end
      worst_iso = 1.0e9;
      for (int k = 0; k < N; k++)
        if (k != b && best4 - mag_db(y4[k]) < worst_iso) worst_iso = best4 - mag_db(y4[k]);
      checks++;
      if (worst_iso < MIN_ISO_DB) begin
        failures++;
        $display("FAIL beam %0d: neighbour only %0.1f dB below the peak", b, worst_iso);
      end
      peak16 = best16;
      // array factor sweep
      worst_dev = 0.0;
      for (int s = -16; s <= 16; s++) begin
        u = real'(b) + real'(s) / 8.0;
        apply(u);
        p4 = mag_db(y4[b]);
        p16 = mag_db(y16[b]);
        if (s >= -4 && s <= 4) begin
          checks++;
          if (p4 - p16 > 1.0 || p16 - p4 > 1.0) begin
            failures++;
            $display("FAIL beam %0d u=%0.3f main lobe 4-bit %0.2f dB, 16-bit %0.2f dB", b, u, p4, p16);
          end
        end else if (p16 > peak16 - 25.0) begin
          checks++;
          if (p4 - p16 > 3.0 || p16 - p4 > 3.0) begin
            failures++;
            $display("FAIL beam %0d u=%0.3f side lobe 4-bit %0.2f dB, 16-bit %0.2f dB", b, u, p4, p16);
          end
        end
        if (s >= -4 && s <= 4 && (p4 - p16 > worst_dev || p16 - p4 > worst_dev))
          worst_dev = (p4 > p16) ? p4 - p16 : p16 - p4;
      end
      $display("beam %0d: peak %0.2f dB (4-bit) %0.2f dB (16-bit), isolation %0.1f dB, main-lobe deviation %0.2f dB",
               b, best4, best16, worst_iso, worst_dev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
