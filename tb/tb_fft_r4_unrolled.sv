// tb_fft_r4_unrolled: self-checking test of the unrolled radix-4 FFT.
//
// Seven instances run side by side on the same random stream:
//   N = 16  with 4-bit twiddles (the default),
//   N = 64  with 4-bit twiddles,
//   N = 256 with 4-bit twiddles,
//   N = 64  with 16-bit twiddles,
//   N = 16  with only half of the last-stage outputs built (N_OUT = 8),
//   N = 64  with only a quarter built (N_OUT = 16),
//   N = 4   (a single butterfly, no multiplier) with 4-bit twiddles.
// In the pruned instances the bins that are built must match the model and
// the others must read zero.
// Every bin is compared with a floating-point radix-4 model that uses the
// same quantised twiddles but no intermediate rounding (tolerance TOL LSB);
// the 16-bit-twiddle instance is also compared with an exact direct DFT/N.
// in_valid is dropped on some cycles to make bubbles; each result must
// appear exactly log4(N) cycles after its input, and back-to-back inputs
// must give back-to-back outputs (one transform per clock).
module tb_fft_r4_unrolled;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  localparam int NVEC = 300;
  localparam real TOL = 8.0;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int bubbles = 0;
  int b2b_outputs = 0;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  vin = 1'b0;
  cplx_t xin [MAXN];

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  typedef struct {
    int   t_in;
    vec_t re;
    vec_t im;
    vec_t dre;
    vec_t dim;
  } exp_t;

  // configurations: (N, TW_W)
  localparam int NCFG = 7;

  // configurations: (N, TW_W, N_OUT)
  function automatic int cfg_n(int c);
    return (c == 0) ? 16 : (c == 1) ? 64 : (c == 2) ? 256 : (c == 3) ? 64 : (c == 4) ? 16 : (c == 5) ? 64 : 4;
  endfunction
  function automatic int cfg_w(int c);
    return (c == 3) ? 16 : 4;
  endfunction
  function automatic int cfg_o(int c);
    return (c == 4) ? 8 : (c == 5) ? 16 : cfg_n(c);
  endfunction

  // a bin is built when its base-4 digit-reversed index is below N_OUT
  function automatic bit bin_built(int k, int n, int n_out);
    return digit_rev4(k, log4(n)) < n_out;
  endfunction

  int done [NCFG];
  int pruned_seen [NCFG];

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N = cfg_n(c);
    localparam int W = cfg_w(c);
    localparam int O = cfg_o(c);
    localparam int S = log4(N);

    cplx_t x [N];
    cplx_t xf [N];
    logic  vout;
    exp_t  q [$];
    int    last_out = -10;

    always_comb for (int i = 0; i < N; i++) x[i] = xin[i];

    fft_r4_unrolled #(.N(N), .TW_W(W), .N_OUT(O)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(vin), .x(x), .out_valid(vout), .xf(xf));

    // at each falling edge: check what the last rising edge produced, then
    // record the expectation for the input about to be sampled
    always @(negedge clk) begin
      exp_t e;
      #1;
      if (vout) begin
        if (q.size() == 0) begin
          failures++;
          $display("FAIL N=%0d W=%0d: output without input", N, W);
        end else begin
          e = q.pop_front();
          checks++;
          if (cycle - e.t_in != S) begin
            failures++;
            $display("FAIL N=%0d latency %0d, expected %0d", N, cycle - e.t_in, S);
          end
          if (last_out == cycle - 1) b2b_outputs++;
          last_out = cycle;
          for (int k = 0; k < N; k++) begin
            if (!bin_built(k, N, O)) begin
              e.re[k] = 0.0;
              e.im[k] = 0.0;
              pruned_seen[c]++;
            end
            checks++;
            if (fabs(real'(xf[k].re) - e.re[k]) > TOL || fabs(real'(xf[k].im) - e.im[k]) > TOL) begin
              failures++;
              if (failures < 10)
                $display("FAIL t=%0d N=%0d W=%0d bin %0d got (%0d,%0d) model (%f,%f)", e.t_in,
                         N, W, k, int'(xf[k].re), int'(xf[k].im), e.re[k], e.im[k]);
            end
            if (W == 16) begin
              checks++;
              if (fabs(real'(xf[k].re) - e.dre[k]) > TOL || fabs(real'(xf[k].im) - e.dim[k]) > TOL) begin
                failures++;
                if (failures < 10)
                  $display("FAIL N=%0d exact DFT bin %0d got (%0d,%0d) exp (%f,%f)",
                           N, k, xf[k].re, xf[k].im, e.dre[k], e.dim[k]);
              end
            end
          end
          done[c]++;
        end
      end
      #2;
      if (vin) begin
        e.t_in = cycle;
        for (int i = 0; i < N; i++) begin
          e.re[i] = real'(xin[i].re);
          e.im[i] = real'(xin[i].im);
          e.dre[i] = e.re[i];
          e.dim[i] = e.im[i];
        end
        ref_fft(N, W, e.re, e.im);
        if (W == 16) ref_dft(N, e.dre, e.dim);
        q.push_back(e);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent;
    sent = 0;
    for (int i = 0; i < MAXN; i++) xin[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NVEC) begin
      @(negedge clk);
      #2;
      if ($urandom_range(0, 9) == 0) begin
        vin = 1'b0;
        bubbles++;
      end else begin
        vin = 1'b1;
        sent++;
        for (int i = 0; i < MAXN; i++) begin
          // occasional full-scale vectors, otherwise half scale
          if (sent % 50 == 0) begin
            xin[i].re = sample_t'($urandom);
            xin[i].im = sample_t'($urandom);
          end else begin
            xin[i].re = sample_t'($signed($urandom_range(0, 32767)) - 16384);
            xin[i].im = sample_t'($signed($urandom_range(0, 32767)) - 16384);
          end
        end
      end
    end
    @(negedge clk);
    #2 vin = 1'b0;
    repeat (8) @(negedge clk);
    for (int c = 4; c < 6; c++) begin  // the pruned configurations
      checks++;
      if (pruned_seen[c] == 0) begin
        failures++;
        $display("FAIL config %0d never had a pruned bin", c);
      end
    end
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (done[c] != NVEC) begin
        failures++;
        $display("FAIL config %0d produced %0d of %0d transforms", c, done[c], NVEC);
      end
    end
    checks++;
    if (bubbles == 0 || b2b_outputs == 0) begin
      failures++;
      $display("FAIL bubbles=%0d back-to-back=%0d", bubbles, b2b_outputs);
    end
    $display("bubbles=%0d back_to_back_outputs=%0d", bubbles, b2b_outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
