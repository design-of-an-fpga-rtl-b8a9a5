// block_fft: 512-point IFFT of one transmit antenna.
//
// The inverse transform is obtained from the forward FFT core as the design
// prescribes: the real and imaginary inputs are swapped, each is divided by
// N (an arithmetic shift right by log2(N) = 9 with round-half-up), the
// forward FFT is taken, and real and imaginary outputs are swapped back:
//   x[n] = swap( FFT( swap(X)/N ) )[n] = (1/N) sum_k X[k] exp(+j*2*pi*k*n/N).
// Dividing before the transform follows the design and keeps every value in
// 16 bits, at the cost of quantising each input to about 1/512 of full scale
// (a QPSK level of 2896 becomes 6).
//
// Interface and timing are those of fft_r8_core: N samples in while
// in_ready, N samples out in natural order on consecutive cycles after
// out_ready.
module block_fft
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
  localparam int unsigned SH = 3 * LOG8N;   // log2(N)

  function automatic logic signed [W-1:0] div_n(input logic signed [W-1:0] v);
    logic signed [W:0] t;
    t = (W+1)'(v) + (W+1)'(1 << (SH-1));
    return W'(t >>> SH);
  endfunction

  cplx_t core_in, core_out;

  // swap I and Q, then scale by 1/N
  assign core_in.re = div_n(in_data.im);
  assign core_in.im = div_n(in_data.re);

  fft_r8_core #(.LOG8N(LOG8N)) u_core (
    .clk, .reset, .in_valid, .in_ready, .in_data(core_in),
    .out_ready, .out_valid, .out_last, .out_data(core_out)
  );

  // swap back
  assign out_data.re = core_out.im;
  assign out_data.im = core_out.re;
endmodule
