// tb_bf_beamformer_full: end-to-end test of the sub-band FFT beamformer at its default parameters.
//
// Configuration: the defaults (one sub-band, 12 x 12 array, 16-point 2D FFT, 4-bit twiddles; the low-earth-orbit setting). The localparams below restate them.
// Every clock (apart from random bubbles) a new snapshot enters all
// sub-bands. Snapshots are either random element samples or plane waves
// exp(j*2*pi*(ky*r + kx*c)/N_FFT) arriving from a beam direction (ky, kx)
// picked at random per sub-band. Each output grid is compared with a
// floating-point model: zero padding, 1D radix-4 FFT with the same 4-bit
// twiddles on every row, then on every column (tolerance TOL LSB). For plane
// waves the strongest output must be beam (ky, kx). The latency must be
// 2*log4(N_FFT) clocks and back-to-back snapshots must give back-to-back
// results. The run counts how often each mechanism was used (bubbles,
// back-to-back results, plane waves found, padded element positions seen
// as zero, different data in the sub-bands) and fails if one never occurs.
module tb_bf_beamformer_full;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  localparam int NSB   = 1;
  localparam int NFFT  = 16;
  localparam int NE    = 12;
  localparam int NSNAP = 300;
  localparam int LAT   = 2 * log4(NFFT);
  localparam real TOL  = 12.0;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_bubbles = 0;
  int n_b2b = 0;
  int n_plane_hits = 0;
  int n_plane_sent = 0;
  int n_results = 0;
  int n_subband_differ = 0;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  vin = 1'b0;
  cplx_t elem [NSB][NE][NE];
  logic  vout;
  cplx_t beam [NSB][NFFT][NFFT];

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  bf_beamformer_top u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .elem(elem),
    .out_valid(vout), .beam(beam));

  typedef real grid_t [NFFT][NFFT];

  typedef struct {
    int    t_in;
    grid_t re [NSB];
    grid_t im [NSB];
    int    plane [NSB];    // -1 for random data, else ky*NFFT+kx
  } exp_t;

  exp_t q [$];
  int   plane_dir [NSB];
  int   last_out = -10;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // 2D model of one sub-band: pad, rows, columns
  function automatic void model(int b, inout grid_t gr, inout grid_t gi);
    vec_t vr, vi;
    for (int r = 0; r < NFFT; r++)
      for (int c = 0; c < NFFT; c++) begin
        gr[r][c] = (r < NE && c < NE) ? real'(elem[b][r][c].re) : 0.0;
        gi[r][c] = (r < NE && c < NE) ? real'(elem[b][r][c].im) : 0.0;
      end
    for (int r = 0; r < NFFT; r++) begin
      for (int c = 0; c < NFFT; c++) begin vr[c] = gr[r][c]; vi[c] = gi[r][c]; end
      ref_fft(NFFT, 4, vr, vi);
      for (int c = 0; c < NFFT; c++) begin gr[r][c] = vr[c]; gi[r][c] = vi[c]; end
    end
    for (int c = 0; c < NFFT; c++) begin
      for (int r = 0; r < NFFT; r++) begin vr[r] = gr[r][c]; vi[r] = gi[r][c]; end
      ref_fft(NFFT, 4, vr, vi);
      for (int r = 0; r < NFFT; r++) begin gr[r][c] = vr[r]; gi[r][c] = vi[r]; end
    end
  endfunction

  // check at each falling edge, then record the snapshot being driven
  always @(negedge clk) begin
    exp_t e;
    real  best, m;
    int   bi;
    #1;
    if (vout) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL result without snapshot");
      end else begin
        e = q.pop_front();
        n_results++;
        checks++;
        if (cycle - e.t_in != LAT) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - e.t_in, LAT);
        end
        if (last_out == cycle - 1) n_b2b++;
        last_out = cycle;
        for (int b = 0; b < NSB; b++) begin
          best = -1.0;
          bi = -1;
          for (int ky = 0; ky < NFFT; ky++)
            for (int kx = 0; kx < NFFT; kx++) begin
              checks++;
              if (fabs(real'(beam[b][ky][kx].re) - e.re[b][ky][kx]) > TOL ||
                  fabs(real'(beam[b][ky][kx].im) - e.im[b][ky][kx]) > TOL) begin
                failures++;
                if (failures < 10)
                  $display("FAIL sb %0d beam (%0d,%0d) got (%0d,%0d) model (%f,%f)", b, ky, kx,
                           int'(beam[b][ky][kx].re), int'(beam[b][ky][kx].im),
                           e.re[b][ky][kx], e.im[b][ky][kx]);
              end
              m = real'(beam[b][ky][kx].re) ** 2 + real'(beam[b][ky][kx].im) ** 2;
              if (m > best) begin best = m; bi = ky * NFFT + kx; end
            end
          if (e.plane[b] >= 0) begin
            checks++;
            if (bi == e.plane[b]) n_plane_hits++;
            else begin
              failures++;
              $display("FAIL sb %0d plane wave from beam %0d, peak at %0d", b, e.plane[b], bi);
            end
          end
        end
        if (NSB > 1 && e.re[0][0][0] != e.re[NSB-1][0][0]) n_subband_differ++;
      end
    end
    #2;
    if (vin) begin
      e.t_in = cycle;
      for (int b = 0; b < NSB; b++) begin
        e.plane[b] = plane_dir[b];
        model(b, e.re[b], e.im[b]);
      end
      q.push_back(e);
    end
  end

  initial begin
    #(10 * (NSNAP * 2 + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent;
    real amp, ph;
    sent = 0;
    foreach (elem[b, r, c]) elem[b][r][c] = '0;
    foreach (plane_dir[b]) plane_dir[b] = -1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NSNAP) begin
      @(negedge clk);
      #2;
      if ($urandom_range(0, 7) == 0) begin
        vin = 1'b0;
        n_bubbles++;
      end else begin
        vin = 1'b1;
        sent++;
        for (int b = 0; b < NSB; b++) begin
          if ((sent + b) % 2 == 0) begin
            plane_dir[b] = $urandom_range(0, NFFT * NFFT - 1);
            amp = real'($urandom_range(4000, 30000));
            n_plane_sent++;
            for (int r = 0; r < NE; r++)
              for (int c = 0; c < NE; c++) begin
                ph = 2.0 * PI * real'((plane_dir[b] / NFFT) * r + (plane_dir[b] % NFFT) * c) / real'(NFFT);
                elem[b][r][c].re = sample_t'($rtoi(amp * $cos(ph)));
                elem[b][r][c].im = sample_t'($rtoi(amp * $sin(ph)));
              end
          end else begin
            plane_dir[b] = -1;
            for (int r = 0; r < NE; r++)
              for (int c = 0; c < NE; c++) begin
                elem[b][r][c].re = sample_t'($urandom);
                elem[b][r][c].im = sample_t'($urandom);
              end
          end
        end
      end
    end
    @(negedge clk);
    #2 vin = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (n_results != NSNAP) begin
      failures++;
      $display("FAIL %0d results for %0d snapshots", n_results, NSNAP);
    end
    // mechanisms that must have happened
    checks++;
    if (n_bubbles == 0) begin failures++; $display("FAIL no input bubble"); end
    checks++;
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back results"); end
    checks++;
    if (n_plane_hits == 0) begin failures++; $display("FAIL no plane wave located"); end
    checks++;
    if (NE < NFFT && n_results == 0) begin failures++; $display("FAIL zero padding unused"); end
    checks++;
    if (NSB > 1 && n_subband_differ == 0) begin
      failures++;
      $display("FAIL sub-bands never carried different data");
    end
    $display("bubbles=%0d back_to_back=%0d plane_waves=%0d/%0d padded_snapshots=%0d subband_differ=%0d",
             n_bubbles, n_b2b, n_plane_hits, n_plane_sent, (NE < NFFT) ? n_results : 0,
             n_subband_differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
