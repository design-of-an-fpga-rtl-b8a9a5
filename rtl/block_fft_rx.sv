// block_fft_rx: 512-point FFT of one receive antenna.
//
// Forward, unscaled transform X[k] = sum_n x[n] exp(-j*2*pi*k*n/N) of the
// received time-domain frame, so that a frame built by block_fft from QPSK
// symbols returns to the QPSK level (about +-2896, apart from the rounding
// of the IFFT's input scaling). It is the radix-8 core used directly.
// Interface and timing are those of fft_r8_core.
module block_fft_rx
  import ofdm_pkg::*;
#(
  parameter int unsigned LOG8N = 3
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  out_ready,
  output logic  out_valid,
  output logic  out_last,
  output cplx_t out_data
);
  fft_r8_core #(.LOG8N(LOG8N)) u_core (
    .clk, .reset, .in_valid, .in_ready, .in_data,
    .out_ready, .out_valid, .out_last, .out_data
  );
endmodule
