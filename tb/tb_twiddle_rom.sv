// tb_twiddle_rom: every entry of the 512-entry ROM against
// round(16384*cos(2*pi*e/512)) and round(-16384*sin(2*pi*e/512)), +-1 LSB,
// plus the exact values at e = 0, 128, 256, 384.
module tb_twiddle_rom;
  localparam int N = 512;
  logic [8:0] e;
  logic signed [15:0] w_re, w_im;
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  twiddle_rom #(.N(N)) dut (.*);

  initial begin
    for (int i = 0; i < N; i++) begin
      real c, s;
      e = 9'(i);
      #1;
      c = 16384.0 * $cos(2.0 * 3.14159265358979 * i / N);
      s = -16384.0 * $sin(2.0 * 3.14159265358979 * i / N);
      checks++;
      if (fabs(c - real'(w_re)) > 1.0 || fabs(s - real'(w_im)) > 1.0) begin
        failures++;
        if (failures < 10) $display("e=%0d: %0d %0d expected %f %f", i, w_re, w_im, c, s);
      end
      checks++;
      if ((i == 0   && (w_re != 16384  || w_im != 0)) ||
          (i == 128 && (w_re != 0      || w_im != -16384)) ||
          (i == 256 && (w_re != -16384 || w_im != 0)) ||
          (i == 384 && (w_re != 0      || w_im != 16384))) begin
        failures++;
        $display("e=%0d: %0d %0d", i, w_re, w_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
