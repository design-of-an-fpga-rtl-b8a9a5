// tb_stbc_ifft512: end-to-end test of the OFDM-STBC transceiver at its
// default size (512 subcarriers, no parameter overrides).
//
// Runs three frames of 1024 bits through transmitter, ideal 2x2 channel and
// receiver, and checks every transmitted and received dibit against the
// 16-bit test pattern 1001 0001 1110 0001, regenerated here. On the first
// frame it also checks antenna 1 at two points of the chain:
//   - the IFFT output against a floating-point inverse DFT of the encoded
//     symbols S0, -S1*, S2, ... after the IFFT's input rounding (+-2896 ->
//     +-6), within 4 LSB;
//   - the receive FFT output, which must be +-3072 (6 * 512) within 4 LSB
//     with the signs of the encoded symbols; points 1..12 and 512 must also
//     have the signs of the published reference FFT values.
// It checks the frame latency (3120 cycles, and at most 3607 cycles for
// 1024 bits) and that the frame rate exceeds 4 Mbit/s at 100 MHz. It counts
// generator stalls, STBC pairs encoded and decoded and IFFT/FFT frames,
// and fails if one never happened; it also reports how often an IFFT had
// to wait for the FFTs.
module tb_stbc_ifft512;
  import ofdm_pkg::*;

  localparam int N      = 512;
  localparam int FRAMES = 3;
  localparam logic [15:0] PATTERN = 16'b1001_0001_1110_0001;

  logic clk = 0, reset = 1, run = 0;
  logic tx_valid, rx_valid, tx_frame_done, rx_frame_done;
  logic [1:0] tx_bits, rx_bits;

  stbc_ifft512 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected dibit number i of the stream
  function automatic logic [1:0] exp_dibit(int i);
    int p = (2 * i) % 16;
    return {PATTERN[15 - p], PATTERN[14 - p]};
  endfunction

  // ---- received bits ----
  int rx_cnt = 0, tx_cnt = 0;
  int last_frame_end = -1, frame_period = 0;
  int first_tx_cycle = -1, frame1_done_cycle = -1;
  always @(posedge clk) if (!reset) begin
    if (tx_valid) begin
      if (tx_cnt == 0) first_tx_cycle = cycle;
      checks++;
      if (tx_bits !== exp_dibit(tx_cnt)) begin
        failures++;
        $display("tx dibit %0d: got %b expected %b", tx_cnt, tx_bits, exp_dibit(tx_cnt));
      end
      tx_cnt++;
    end
    if (rx_valid) begin
      checks++;
      if (rx_bits !== exp_dibit(rx_cnt)) begin
        failures++;
        if (failures < 10) $display("rx dibit %0d: got %b expected %b", rx_cnt, rx_bits, exp_dibit(rx_cnt));
      end
      rx_cnt++;
      if (rx_cnt == N) frame1_done_cycle = cycle;
      if (rx_cnt % N == 0) begin
        if (last_frame_end >= 0) frame_period = cycle - last_frame_end;
        last_frame_end = cycle;
      end
    end
  end

  // ---- reference for antenna 1: encoded symbol k of frame 0 ----
  real qa = 2896.0;
  function automatic void enc_sym(int k, output real re, output real im);
    logic [1:0] b0, b1;
    real r0, i0, r1, i1;
    int pr = k / 2;
    b0 = exp_dibit(2 * pr);
    b1 = exp_dibit(2 * pr + 1);
    r0 = b0[1] ? -2896.0 : 2896.0;  i0 = b0[0] ? -2896.0 : 2896.0;
    r1 = b1[1] ? -2896.0 : 2896.0;  i1 = b1[0] ? -2896.0 : 2896.0;
    if (k % 2 == 0) begin re = r0; im = i0; end      // S0
    else begin re = -r1; im = i1; end                // -S1*
  endfunction

  // IFFT output of antenna 1, frame 0, against a direct inverse DFT
  int ifft_idx = 0;
  real max_err = 0.0;
  always @(posedge clk) if (!reset && dut.u_ifft1.out_valid && ifft_idx < N) begin
    real acc_re, acc_im, sr, si, ang, er;
    acc_re = 0; acc_im = 0;
    for (int k = 0; k < N; k++) begin
      enc_sym(k, sr, si);
      sr = (sr > 0) ? 6.0 : -6.0;
      si = (si > 0) ? 6.0 : -6.0;
      ang = 2.0 * 3.14159265358979 * k * ifft_idx / N;
      acc_re += sr * $cos(ang) - si * $sin(ang);
      acc_im += sr * $sin(ang) + si * $cos(ang);
    end
    // the IFFT divides its input by N before the transform (rounded):
    // +-2896 becomes +-6, so the expected output is the unscaled inverse
    // DFT of those quantised values
    er = (acc_re - dut.u_ifft1.out_data.re);
    if (er < 0) er = -er;
    if (er > max_err) max_err = er;
    er = (acc_im - dut.u_ifft1.out_data.im);
    if (er < 0) er = -er;
    if (er > max_err) max_err = er;
    ifft_idx++;
    if (ifft_idx == N) begin
      checks++;
      // only the twiddle rounding remains: allow 4 LSB
      if (max_err > 4.0) begin
        failures++;
        $display("IFFT max error %f", max_err);
      end else $display("IFFT vs direct inverse DFT: max error %0.2f LSB", max_err);
    end
  end

  // receive FFT output of antenna 1, frame 0: QPSK level and sign
  int fft_idx = 0;
  always @(posedge clk) if (!reset && dut.u_fft1.out_valid && fft_idx < N) begin
    real sr, si;
    int fr, fi;
    fr = int'(dut.rx1.re);
    fi = int'(dut.rx1.im);
    enc_sym(fft_idx, sr, si);
    checks++;
    // 6 * 512 = 3072 is the level after the IFFT's input rounding
    if ((sr > 0 ? fr - 3072 : fr + 3072) > 4 || (sr > 0 ? fr - 3072 : fr + 3072) < -4 ||
        (si > 0 ? fi - 3072 : fi + 3072) > 4 || (si > 0 ? fi - 3072 : fi + 3072) < -4) begin
      failures++;
      if (failures < 10) $display("FFT point %0d: %0d %0d, expected sign of %f %f",
                                  fft_idx, fr, fi, sr, si);
    end
    if (fft_idx < 4) $display("FFT point %0d: %0d %0d", fft_idx + 1, fr, fi);
    // signs of the published reference values for points 1..12 and 512
    // (-2896/+2896 per axis; 1 = negative)
    if (fft_idx < 12 || fft_idx == N - 1) begin
      logic [1:0] ref_sign [13];
      int r;
      ref_sign = '{2'b10, 2'b11, 2'b00, 2'b11, 2'b11, 2'b00, 2'b00, 2'b11,
                   2'b10, 2'b11, 2'b00, 2'b11, 2'b11};
      r = (fft_idx == N - 1) ? 12 : fft_idx;
      checks++;
      if ({fr < 0, fi < 0} != ref_sign[r]) begin
        failures++;
        $display("FFT point %0d: signs differ from the reference table", fft_idx + 1);
      end
    end
    fft_idx++;
  end

  // ---- mechanism counters ----
  int n_stall = 0, n_pairs = 0, n_dec = 0, n_tx_frames = 0, n_rx_frames = 0, n_unload_wait = 0;
  always @(posedge clk) if (!reset) begin
    if (run && !dut.gen_en) n_stall++;
    if (dut.pair_start) n_pairs++;
    if (dut.dec_valid) n_dec++;
    if (tx_frame_done) n_tx_frames++;
    if (rx_frame_done) n_rx_frames++;
    if (dut.u_ifft1.u_core.state == 2'd2 && !dut.u_ifft1.out_ready) n_unload_wait++;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else $display("%-28s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    run   <= 1;
    wait (rx_cnt >= FRAMES * N);
    @(posedge clk);
    run <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (rx_cnt != FRAMES * N) begin
      failures++;
      $display("received %0d dibits, expected %0d", rx_cnt, FRAMES * N);
    end
    // latency of one 1024-bit frame and the steady-state frame period; both
    // are fixed by the FFT schedule: 512 load + 789 compute + 513 unload
    // per transform, plus 9 cycles in the mapper/encoder/decoder registers.
    // The latency must stay within 3607 cycles per 1024 bits (28.3 Mbit/s).
    $display("cycles from first transmitted bit to last received bit of frame 1: %0d",
             frame1_done_cycle - first_tx_cycle + 1);
    $display("frame period %0d cycles: %0.1f Mbit/s at 100 MHz",
             frame_period, 1024.0 * 100.0 / frame_period);
    checks++;
    if (frame1_done_cycle - first_tx_cycle + 1 != 3120) begin
      failures++;
      $display("frame latency differs from 3120 cycles");
    end
    checks++;
    if (frame1_done_cycle - first_tx_cycle + 1 > 3607) begin
      failures++;
      $display("more than 3607 cycles for 1024 bits");
    end
    checks++;
    // at least the 4 Mbit/s that the 5 MHz WiMAX profile needs
    if (frame_period == 0 || 1024.0 * 100.0 / frame_period < 4.0) begin
      failures++;
      $display("throughput below 4 Mbit/s");
    end
    need("generator stall cycles", n_stall);
    need("STBC pairs encoded", n_pairs);
    need("STBC pairs decoded", n_dec);
    need("IFFT frames", n_tx_frames);
    need("FFT frames", n_rx_frames);
    $display("%-28s %0d", "IFFT waiting for FFT", n_unload_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
