// fft_r4_unrolled: fully unrolled, pipelined radix-4 FFT of N points
// (N a power of 4) with constant, quantised twiddle factors.
//
// All N samples enter in one clock and all N bins leave in one clock, so the
// throughput is one complete transform per cycle. The algorithm is radix-4
// decimation in frequency with log4(N) stages. In stage s the array is cut
// into groups of L = N/4^s points; for every group and every j < L/4 a
// radix-4 butterfly combines the points j, j+L/4, j+2L/4, j+3L/4, and its
// output k is multiplied by the twiddle W_L^(j*k). Twiddles with exponent 0
// (multiplication by one) are left out, which also leaves the last stage
// with adders only. For N = 16 this gives 8 butterflies (64 complex adders)
// and 9 complex multipliers; for N = 64, 81 multipliers; for N = 256, 513.
// The bins come out of the last stage in base-4 digit-reversed order and are
// put back in natural order by wiring.
//
// Each stage (butterfly, then twiddle multiplier) ends in a register, so
// the latency is LATENCY = log4(N) cycles from in_valid to out_valid.
// Every butterfly divides by 4, so bin k carries DFT(x)[k] / N.
// Twiddles are TW_W-bit (4 by default); with TW_W = 16 the same module is
// the full-precision unrolled FFT. Only the valid pipeline is reset.
//
// When only part of the beams is used, N_OUT < N builds only the first
// N_OUT/4 butterflies of the last stage (the last stage has no multipliers,
// so only adders are saved: for N = 16, 48 complex adders at N_OUT = 8 and
// 40 at N_OUT = 4). The bins kept are those whose digit-reversed index is
// below N_OUT: for N_OUT = N/2 the bins k with k mod 4 in {0, 1}, for
// N_OUT = N/4 the bins with k mod 4 = 0, i.e. an evenly spaced subset of the
// beams. The other bins read zero. Building the pruned outputs follows the
// design's complexity analysis; which bins are kept follows from the
// decimation-in-frequency ordering and is this design's choice.
module fft_r4_unrolled
  import bf_pkg::*;
#(
  parameter int N     = 16,  // transform size, a power of 4
  parameter int TW_W  = 4,   // twiddle word width
  parameter int SHIFT = 2,   // per-stage right shift of the butterflies
  parameter int N_OUT = N    // last-stage outputs built: N, N/2 or N/4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x [N],        // samples, natural order
  output logic  out_valid,
  output cplx_t xf [N]        // bins, natural order
);

  localparam int STAGES  = log4(N);

  if (N_OUT % 4 != 0 || N_OUT < 4 || N_OUT > N) begin : g_bad_n_out
    $error("fft_r4_unrolled: N_OUT must be a multiple of 4 between 4 and N");
  end

  // st[s] is the input of stage s; st[STAGES] holds the result.
  cplx_t st [STAGES+1][N];
  logic  vld [STAGES+1];

  always_comb begin
    for (int n = 0; n < N; n++) st[0][n] = x[n];
    vld[0] = in_valid;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int L = N / (4 ** s);   // group size in this stage
    localparam int Q = L / 4;          // butterfly span

    cplx_t nxt [N];

    for (genvar g = 0; g < N / L; g++) begin : g_group
      if (s == STAGES - 1 && g * 4 >= N_OUT) begin : g_pruned
        // unused outputs: no butterfly in the last stage
        for (genvar k = 0; k < 4; k++) begin : g_zero
          assign nxt[g*L + k] = '0;
        end
      end else begin : g_used
      for (genvar j = 0; j < Q; j++) begin : g_bfly
        cplx_t a [4];
        cplx_t b [4];

        always_comb
          for (int m = 0; m < 4; m++) a[m] = st[s][g*L + j + m*Q];

        r4_butterfly #(.SHIFT(SHIFT)) u_bfly (.a(a), .y(b));

        for (genvar k = 0; k < 4; k++) begin : g_tw
          if (j * k == 0) begin : g_trivial
            assign nxt[g*L + j + k*Q] = b[k];
          end else begin : g_mult
            tf_cmult #(
              .TW_W (TW_W),
              .TW_RE(tw_re(j * k, L, TW_W)),
              .TW_IM(tw_im(j * k, L, TW_W))
            ) u_mult (.x(b[k]), .y(nxt[g*L + j + k*Q]));
          end
        end
      end
      end
    end

    always_ff @(posedge clk) st[s+1] <= nxt;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld[s+1] <= 1'b0;
      else        vld[s+1] <= vld[s];
  end

  always_comb
    for (int kb = 0; kb < N; kb++) xf[kb] = st[STAGES][digit_rev4(kb, STAGES)];

  assign out_valid = vld[STAGES];

endmodule
