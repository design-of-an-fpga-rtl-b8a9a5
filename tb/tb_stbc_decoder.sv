// tb_stbc_decoder: random QPSK pairs through a 2x2 channel modelled here in
// floating point, r_j0 = h0j*s0 + h1j*s1 and r_j1 = -h0j*s1* + h1j*s0*,
// then rounded to 16 bits. The decoder output must equal
// (|h00|^2+|h01|^2+|h10|^2+|h11|^2)/2 * s within 3 LSB. Channels: the ideal
// one (h00 = h11 = 1, h01 = h10 = 0), a swapped one (h01 = h10 = 1) and
// random gains of magnitude below 0.7. Pairs arrive back to back and with
// gaps; out_valid must come one cycle after the second sample of a pair.
module tb_stbc_decoder;
  import ofdm_pkg::*;
  logic clk = 0, reset = 1, in_valid = 0, out_valid;
  cplx_t h00, h01, h10, h11, rx1, rx2, s0, s1;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  stbc_decoder dut (.*);
  always #5 clk = ~clk;

  real hr [2][2], hi [2][2];   // [tx][rx], as real numbers

  function automatic cplx_t to_q14(real r, real i);
    return '{re: 16'(int'(r * 16384.0)), im: 16'(int'(i * 16384.0))};
  endfunction

  task automatic pair(real s0r, real s0i, real s1r, real s1i, int gap);
    real r0r [2], r0i [2], r1r [2], r1i [2], g, q;
    int o0r, o0i, o1r, o1i;
    q = 16384.0;
    // quantised gains, as the decoder sees them
    for (int j = 0; j < 2; j++) begin
      real a_r, a_i, b_r, b_i;
      a_r = real'(int'(hr[0][j] * q)) / q;  a_i = real'(int'(hi[0][j] * q)) / q;
      b_r = real'(int'(hr[1][j] * q)) / q;  b_i = real'(int'(hi[1][j] * q)) / q;
      r0r[j] = a_r * s0r - a_i * s0i + b_r * s1r - b_i * s1i;
      r0i[j] = a_r * s0i + a_i * s0r + b_r * s1i + b_i * s1r;
      // -h0j * conj(s1) + h1j * conj(s0)
      r1r[j] = -(a_r * s1r + a_i * s1i) + (b_r * s0r + b_i * s0i);
      r1i[j] = -(a_i * s1r - a_r * s1i) + (b_i * s0r - b_r * s0i);
    end
    g = 0;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++)
        begin
          real u, v;
          u = real'(int'(hr[a][b] * q)) / q;
          v = real'(int'(hi[a][b] * q)) / q;
          g += u * u + v * v;
        end
    g = g / 2.0;
    @(negedge clk);
    in_valid = 1;
    rx1 = '{re: 16'(int'(r0r[0])), im: 16'(int'(r0i[0]))};
    rx2 = '{re: 16'(int'(r0r[1])), im: 16'(int'(r0i[1]))};
    @(negedge clk);
    rx1 = '{re: 16'(int'(r1r[0])), im: 16'(int'(r1i[0]))};
    rx2 = '{re: 16'(int'(r1r[1])), im: 16'(int'(r1i[1]))};
    @(negedge clk);
    in_valid = 0;
    o0r = int'(s0.re);  o0i = int'(s0.im);  o1r = int'(s1.re);  o1i = int'(s1.im);
    checks++;
    if (!out_valid ||
        fabs(o0r - g * s0r) > 3.0 || fabs(o0i - g * s0i) > 3.0 ||
        fabs(o1r - g * s1r) > 3.0 || fabs(o1i - g * s1i) > 3.0) begin
      failures++;
      if (failures < 10)
        $display("got v=%b %0d %0d %0d %0d expected %f %f %f %f", out_valid,
                 o0r, o0i, o1r, o1i, g*s0r, g*s0i, g*s1r, g*s1i);
    end
    repeat (gap) @(negedge clk);
    // back to back: next pair starts on this cycle (handled by the caller)
  endtask

  task automatic set_h();
    h00 = to_q14(hr[0][0], hi[0][0]);  h01 = to_q14(hr[0][1], hi[0][1]);
    h10 = to_q14(hr[1][0], hi[1][0]);  h11 = to_q14(hr[1][1], hi[1][1]);
  endtask

  function automatic real qp();
    return $urandom_range(0, 1) ? 2896.0 : -2896.0;
  endfunction

  initial begin
    in_valid = 0;
    rx1 = '0; rx2 = '0;
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int c = 0; c < 12; c++) begin
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++) begin
          if (c == 0) begin hr[a][b] = (a == b) ? 1.0 : 0.0; hi[a][b] = 0.0; end
          else if (c == 1) begin hr[a][b] = (a != b) ? 1.0 : 0.0; hi[a][b] = 0.0; end
          else begin
            hr[a][b] = real'(int'($urandom_range(0, 1000)) - 500) / 1000.0;
            hi[a][b] = real'(int'($urandom_range(0, 1000)) - 500) / 1000.0;
          end
        end
      set_h();
      for (int p = 0; p < 10; p++) pair(qp(), qp(), qp(), qp(), p % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
