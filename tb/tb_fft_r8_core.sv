// tb_fft_r8_core: 512-point radix-8 core against a floating-point DFT.
//
// Frames: a unit impulse scaled to 100, a complex tone on bin 5 (amplitude
// 50), random data in +-60, and a constant 100 whose DC bin (51200) must
// saturate to 32767. Every output bin must be within 4 LSB of the reference
// and leave in natural order on consecutive cycles. The compute time from
// the last input to the first output (with out_ready high) is checked
// against the documented 3*(N/2+6)+3 cycles, and one frame is held back with
// out_ready low for 200 cycles, during which nothing may come out.
module tb_fft_r8_core;
  import ofdm_pkg::*;
  localparam int N = 512;

  logic clk = 0, reset = 1, in_valid = 0, in_ready, out_ready = 1, out_valid, out_last;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  fft_r8_core dut (.*);
  always #5 clk = ~clk;

  int xr [N], xi [N];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic run_frame(string name, int hold);
    real ar, ai, a;
    int got_r, got_i, t_last_in, bin;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1;
      in_data = '{re: 16'(xr[n]), im: 16'(xi[n])};
    end
    @(negedge clk);
    in_valid = 0;
    t_last_in = cycle - 1;
    if (hold > 0) begin
      out_ready = 0;
      repeat (hold + 3 * (N + 10)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("%s: output while out_ready low", name); end
      end
      out_ready = 1;
    end
    while (!out_valid) @(negedge clk);
    if (hold == 0) begin
      checks++;
      if (cycle - t_last_in != 3 * (N / 2 + 6) + 3) begin
        failures++;
        $display("%s: compute latency %0d", name, cycle - t_last_in);
      end else $display("%s: %0d cycles from last input to first output", name, cycle - t_last_in);
    end
    bin = 0;
    while (bin < N) begin
      checks++;
      if (!out_valid) begin failures++; $display("%s: gap in output at %0d", name, bin); end
      ar = 0; ai = 0;
      for (int n = 0; n < N; n++) begin
        a = -2.0 * 3.14159265358979 * real'((bin * n) % N) / N;
        ar += xr[n] * $cos(a) - xi[n] * $sin(a);
        ai += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      if (ar > 32767) ar = 32767;
      if (ar < -32768) ar = -32768;
      if (ai > 32767) ai = 32767;
      if (ai < -32768) ai = -32768;
      got_r = int'(out_data.re);
      got_i = int'(out_data.im);
      checks++;
      if (fabs(ar - got_r) > 4.0 || fabs(ai - got_i) > 4.0) begin
        failures++;
        if (failures < 10) $display("%s bin %0d: got %0d %0d expected %f %f", name, bin, got_r, got_i, ar, ai);
      end
      checks++;
      if (out_last !== (bin == N - 1)) begin failures++; $display("%s: out_last at %0d", name, bin); end
      bin++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int n = 0; n < N; n++) begin xr[n] = (n == 0) ? 100 : 0; xi[n] = 0; end
    run_frame("impulse", 0);
    for (int n = 0; n < N; n++) begin
      xr[n] = int'(50.0 * $cos(2.0 * 3.14159265358979 * 5 * n / N));
      xi[n] = int'(50.0 * $sin(2.0 * 3.14159265358979 * 5 * n / N));
    end
    run_frame("tone", 200);
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 120) - 60;
      xi[n] = $urandom_range(0, 120) - 60;
    end
    run_frame("random", 0);
    for (int n = 0; n < N; n++) begin xr[n] = 100; xi[n] = -3; end
    run_frame("constant", 0);
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
