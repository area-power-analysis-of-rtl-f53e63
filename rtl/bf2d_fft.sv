// bf2d_fft: fixed-beam digital beamformer for one sub-band of a square
// planar array, computed as a fully unrolled two-dimensional FFT.
//
// One snapshot of N_ELEM x N_ELEM element samples enters per clock. It is
// zero-padded to N_FFT x N_FFT (a larger FFT than the array gives more,
// overlapping beams), transformed row by row with N_FFT one-dimensional
// FFTs, transposed, transformed again with N_FFT FFTs (the columns of the
// original grid), and transposed back. Every stage is unrolled, so the two
// transposes are only wiring and no memory is used. The result is the grid
// of N_FFT x N_FFT beams: beam[ky][kx] is the 2D DFT bin (ky, kx), divided
// by N_FFT^2, where ky is the row (first index) direction of the array.
//
// Interface: in_valid qualifies elem; out_valid qualifies beam exactly
// LATENCY = 2*log4(N_FFT) clocks later. A new snapshot may enter on every
// clock. The row/transpose/column/transpose order, the 2*N_FFT FFT
// instances and the zero padding of the array follow the design; placing
// the elements in the low corner of the padded grid is this design's choice.
module bf2d_fft
  import bf_pkg::*;
#(
  parameter int N_FFT  = 16,  // 2D FFT size per dimension (power of 4)
  parameter int N_ELEM = 12,  // array elements per dimension (<= N_FFT)
  parameter int TW_W   = 4    // twiddle word width
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t elem [N_ELEM][N_ELEM],  // elem[row][col]
  output logic  out_valid,
  output cplx_t beam [N_FFT][N_FFT]     // beam[ky][kx]
);

  cplx_t grid    [N_FFT][N_FFT];  // zero-padded input, grid[row][col]
  cplx_t row_f   [N_FFT][N_FFT];  // row_f[row][kx]
  cplx_t col_in  [N_FFT][N_FFT];  // col_in[kx][row], first transpose
  cplx_t col_f   [N_FFT][N_FFT];  // col_f[kx][ky]
  logic  row_vld [N_FFT];
  logic  col_vld [N_FFT];

  // Zero padding.
  always_comb
    for (int r = 0; r < N_FFT; r++)
      for (int c = 0; c < N_FFT; c++)
        grid[r][c] = (r < N_ELEM && c < N_ELEM) ? elem[r][c] : '0;

  // Row transforms.
  for (genvar r = 0; r < N_FFT; r++) begin : g_row
    fft_r4_unrolled #(.N(N_FFT), .TW_W(TW_W)) u_fft (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .x        (grid[r]),
      .out_valid(row_vld[r]),
      .xf       (row_f[r])
    );
  end

  // First transpose (wiring).
  always_comb
    for (int r = 0; r < N_FFT; r++)
      for (int k = 0; k < N_FFT; k++)
        col_in[k][r] = row_f[r][k];

  // Column transforms.
  for (genvar k = 0; k < N_FFT; k++) begin : g_col
    fft_r4_unrolled #(.N(N_FFT), .TW_W(TW_W)) u_fft (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (row_vld[0]),
      .x        (col_in[k]),
      .out_valid(col_vld[k]),
      .xf       (col_f[k])
    );
  end

  // Second transpose (wiring).
  always_comb
    for (int k = 0; k < N_FFT; k++)
      for (int q = 0; q < N_FFT; q++)
        beam[q][k] = col_f[k][q];

  assign out_valid = col_vld[0];

endmodule
