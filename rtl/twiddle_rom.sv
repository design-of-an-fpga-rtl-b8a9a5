// twiddle_rom: twiddle factor ROM for an N-point FFT.
//
// Returns W_N^e = cos(2*pi*e/N) - j*sin(2*pi*e/N) for an exponent e in
// 0..N-1 as two Q2.14 words (1.0 = 16384), rounded to nearest. The table
// is computed at elaboration from $cos/$sin, so no data file is needed.
// Combinational read (a small distributed ROM).
module twiddle_rom #(
  parameter int unsigned N = 512
) (
  input  logic [$clog2(N)-1:0] e,
  output logic signed [15:0]   w_re,
  output logic signed [15:0]   w_im
);
  localparam real PI = 3.14159265358979323846;

  logic signed [15:0] cos_t [N];
  logic signed [15:0] sin_t [N];

  for (genvar i = 0; i < N; i++) begin : g_tab
    localparam real ANG = 2.0 * PI * real'(i) / real'(N);
    localparam int  C   = int'(16384.0 * $cos(ANG));
    localparam int  S   = int'(-16384.0 * $sin(ANG));
    assign cos_t[i] = 16'(C);
    assign sin_t[i] = 16'(S);
  end

  assign w_re = cos_t[e];
  assign w_im = sin_t[e];
endmodule
