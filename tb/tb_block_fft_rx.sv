// tb_block_fft_rx: 512-point receive FFT. A frame built from random QPSK
// symbols by a floating-point inverse DFT (rounded to integers) must come
// back at the QPSK level, within 2 LSB of the floating-point DFT of the
// rounded frame and with the signs of the original symbols. A second frame
// of random values in +-60 is checked against the DFT alone. The compute
// latency (last input to first output) must be 3*(512/2+6)+3 cycles.
module tb_block_fft_rx;
  import ofdm_pkg::*;
  localparam int N = 512;
  localparam real PI = 3.14159265358979;

  logic clk = 0, reset = 1, in_valid = 0, in_ready, out_ready = 1, out_valid, out_last;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  block_fft_rx dut (.*);
  always #5 clk = ~clk;

  int sr [N], si [N], xr [N], xi [N];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic run_frame(string name, bit qpsk);
    real ar, ai, a;
    int n, t_last, gr, gi;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1;
      in_data = '{re: 16'(xr[k]), im: 16'(xi[k])};
    end
    @(negedge clk);
    in_valid = 0;
    t_last = cycle - 1;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cycle - t_last != 3 * (N / 2 + 6) + 3) begin
      failures++;
      $display("%s: latency %0d", name, cycle - t_last);
    end
    n = 0;
    while (n < N) begin
      ar = 0; ai = 0;
      for (int k = 0; k < N; k++) begin
        a = -2.0 * PI * real'((k * n) % N) / N;
        ar += xr[k] * $cos(a) - xi[k] * $sin(a);
        ai += xr[k] * $sin(a) + xi[k] * $cos(a);
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
        if ((sr[n] < 0) != out_data.re[15] || (si[n] < 0) != out_data.im[15]) begin
          failures++;
          $display("%s n=%0d: wrong sign", name, n);
        end
      end
      n++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int k = 0; k < N; k++) begin
      sr[k] = $urandom_range(0, 1) ? 2896 : -2896;
      si[k] = $urandom_range(0, 1) ? 2896 : -2896;
    end
    for (int n = 0; n < N; n++) begin
      real ar, ai, a;
      ar = 0; ai = 0;
      for (int k = 0; k < N; k++) begin
        a = 2.0 * PI * real'((k * n) % N) / N;
        ar += sr[k] * $cos(a) - si[k] * $sin(a);
        ai += sr[k] * $sin(a) + si[k] * $cos(a);
      end
      xr[n] = int'(ar / N);
      xi[n] = int'(ai / N);
    end
    run_frame("qpsk", 1);
    for (int k = 0; k < N; k++) begin
      xr[k] = $urandom_range(0, 120) - 60;
      xi[k] = $urandom_range(0, 120) - 60;
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
