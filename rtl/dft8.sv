// dft8: radix-8 butterfly, the 8-point DFT used by each FFT stage.
//
// X[m] = sum_k x[k] * exp(-j*2*pi*m*k/8), computed as three radix-2 layers
// (decimation in frequency). Only trivial rotations occur inside: by -j
// (swap and negate) and by (+-1-j)/sqrt(2), for which the factor
// 1/sqrt(2) = 11585/16384 is applied with rounding. The output has the same
// width DW as the input; the caller must leave three guard bits for the
// growth of up to 8x. Purely combinational.
module dft8 #(
  parameter int unsigned DW = 25
) (
  input  logic signed [DW-1:0] x_re [8],
  input  logic signed [DW-1:0] x_im [8],
  output logic signed [DW-1:0] y_re [8],
  output logic signed [DW-1:0] y_im [8]
);
  localparam logic signed [15:0] R2 = 16'sd11585;  // 1/sqrt(2) in Q2.14

  function automatic logic signed [DW-1:0] mulr2(input logic signed [DW-1:0] v);
    logic signed [DW+16:0] p;
    p = v * R2 + (DW+17)'(8192);
    return DW'(p >>> 14);
  endfunction

  logic signed [DW-1:0] a_re [4], a_im [4], b_re [4], b_im [4];
  logic signed [DW-1:0] t_re, t_im;

  // 4-point DFT, outputs in natural order
  task automatic dft4(input  logic signed [DW-1:0] i_re [4], input logic signed [DW-1:0] i_im [4],
                      output logic signed [DW-1:0] o_re [4], output logic signed [DW-1:0] o_im [4]);
    logic signed [DW-1:0] c0r, c0i, c1r, c1i, d0r, d0i, d1r, d1i;
    c0r = i_re[0] + i_re[2];  c0i = i_im[0] + i_im[2];
    c1r = i_re[1] + i_re[3];  c1i = i_im[1] + i_im[3];
    d0r = i_re[0] - i_re[2];  d0i = i_im[0] - i_im[2];
    // (i1 - i3) * (-j)
    d1r = i_im[1] - i_im[3];  d1i = i_re[3] - i_re[1];
    o_re[0] = c0r + c1r;  o_im[0] = c0i + c1i;
    o_re[1] = d0r + d1r;  o_im[1] = d0i + d1i;
    o_re[2] = c0r - c1r;  o_im[2] = c0i - c1i;
    o_re[3] = d0r - d1r;  o_im[3] = d0i - d1i;
  endtask

  always_comb begin
    logic signed [DW-1:0] e_re [4], e_im [4], o_re [4], o_im [4];
    for (int k = 0; k < 4; k++) begin
      a_re[k] = x_re[k] + x_re[k+4];
      a_im[k] = x_im[k] + x_im[k+4];
    end
    // b[k] = (x[k] - x[k+4]) * W8^k
    t_re = x_re[0] - x_re[4];  t_im = x_im[0] - x_im[4];
    b_re[0] = t_re;            b_im[0] = t_im;
    t_re = x_re[1] - x_re[5];  t_im = x_im[1] - x_im[5];
    b_re[1] = mulr2(t_re + t_im);   b_im[1] = mulr2(t_im - t_re);    // (1-j)/sqrt2
    t_re = x_re[2] - x_re[6];  t_im = x_im[2] - x_im[6];
    b_re[2] = t_im;            b_im[2] = -t_re;                      // -j
    t_re = x_re[3] - x_re[7];  t_im = x_im[3] - x_im[7];
    b_re[3] = mulr2(t_im - t_re);   b_im[3] = -mulr2(t_re + t_im);   // (-1-j)/sqrt2
    dft4(a_re, a_im, e_re, e_im);
    dft4(b_re, b_im, o_re, o_im);
    for (int r = 0; r < 4; r++) begin
      y_re[2*r]   = e_re[r];  y_im[2*r]   = e_im[r];
      y_re[2*r+1] = o_re[r];  y_im[2*r+1] = o_im[r];
    end
  end
endmodule
