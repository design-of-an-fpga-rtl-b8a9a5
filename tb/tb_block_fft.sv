// tb_block_fft: 512-point IFFT of random QPSK frames (+-2896 per axis) and
// of one frame of random 16-bit values in +-20000. The expected output is
// computed independently: each input is divided by 512 with round-half-up
// (as the block's input scaling prescribes) and the unscaled inverse DFT
// sum_k q[k] exp(+j*2*pi*k*n/512) is taken in floating point. Every output
// must be within 2 LSB. The output must also be within 1% of full scale of
// the exact inverse DFT (1/N) sum_k X[k] exp(+j...) for the QPSK frames.
module tb_block_fft;
  import ofdm_pkg::*;
  localparam int N = 512;

  logic clk = 0, reset = 1, in_valid = 0, in_ready, out_ready = 1, out_valid, out_last;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction
  function automatic int div512(int v); return (v + 256) >>> 9; endfunction

  block_fft dut (.*);
  always #5 clk = ~clk;

  int xr [N], xi [N];

  task automatic run_frame(string name, bit qpsk);
    real ar, ai, er, ei, a;
    int n, gr, gi;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1;
      in_data = '{re: 16'(xr[k]), im: 16'(xi[k])};
    end
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    n = 0;
    while (n < N) begin
      ar = 0; ai = 0; er = 0; ei = 0;
      for (int k = 0; k < N; k++) begin
        a = 2.0 * 3.14159265358979 * real'((k * n) % N) / N;
        ar += div512(xr[k]) * $cos(a) - div512(xi[k]) * $sin(a);
        ai += div512(xr[k]) * $sin(a) + div512(xi[k]) * $cos(a);
        er += xr[k] * $cos(a) - xi[k] * $sin(a);
        ei += xr[k] * $sin(a) + xi[k] * $cos(a);
      end
      gr = int'(out_data.re);
      gi = int'(out_data.im);
      checks++;
      if (!out_valid || fabs(ar - gr) > 2.0 || fabs(ai - gi) > 2.0) begin
        failures++;
        if (failures < 10) $display("%s n=%0d: got %0d %0d expected %f %f", name, n,
                                    gr, gi, ar, ai);
      end
      if (qpsk) begin
        checks++;
        if (fabs(er / N - gr) > 328.0 || fabs(ei / N - gi) > 328.0) begin
          failures++;
          $display("%s n=%0d: far from exact IDFT", name, n);
        end
      end
      n++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < N; k++) begin
        xr[k] = $urandom_range(0, 1) ? 2896 : -2896;
        xi[k] = $urandom_range(0, 1) ? 2896 : -2896;
      end
      run_frame("qpsk", 1);
    end
    for (int k = 0; k < N; k++) begin
      xr[k] = $urandom_range(0, 40000) - 20000;
      xi[k] = $urandom_range(0, 40000) - 20000;
    end
    run_frame("random", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
