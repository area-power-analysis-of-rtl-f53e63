// bf_beamformer_top: on-board FFT beamformer for a multi-sub-band satellite
// payload.
//
// The payload bandwidth is split upstream (the channeliser is not part of
// this design) into NUM_SUBBANDS sub-bands of 500 MHz; each sub-band is one
// sample stream per array element at one snapshot per clock. Every sub-band
// has its own fully unrolled 2D FFT beamformer (bf2d_fft), so the top forms
// NUM_SUBBANDS x N_FFT x N_FFT beams every clock.
//
// The defaults are the low-earth-orbit case: a 12 x 12 element array, a
// 16-point 2D FFT and one 500 MHz sub-band, with 4-bit twiddles. The
// medium-earth-orbit case is N_ELEM = 10, NUM_SUBBANDS = 3; the
// geostationary case is N_ELEM = 145, N_FFT = 256, NUM_SUBBANDS = 6.
//
// Interface: in_valid qualifies all sub-bands' element samples together;
// out_valid qualifies beam exactly 2*log4(N_FFT) clocks later. Only the valid
// pipeline is reset (rst_n, asynchronous, active low).
module bf_beamformer_top
  import bf_pkg::*;
#(
  parameter int NUM_SUBBANDS = 1,   // 500 MHz sub-bands
  parameter int N_FFT        = 16,  // 2D FFT size per dimension
  parameter int N_ELEM       = 12,  // array elements per dimension
  parameter int TW_W         = 4    // twiddle word width
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t elem [NUM_SUBBANDS][N_ELEM][N_ELEM],
  output logic  out_valid,
  output cplx_t beam [NUM_SUBBANDS][N_FFT][N_FFT]
);

  logic sb_vld [NUM_SUBBANDS];

  for (genvar b = 0; b < NUM_SUBBANDS; b++) begin : g_sb
    bf2d_fft #(.N_FFT(N_FFT), .N_ELEM(N_ELEM), .TW_W(TW_W)) u_bf (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .elem     (elem[b]),
      .out_valid(sb_vld[b]),
      .beam     (beam[b])
    );
  end

  assign out_valid = sb_vld[0];

endmodule
