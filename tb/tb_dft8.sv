// tb_dft8: random complex inputs (up to +-2^20) against a floating-point
// 8-point DFT; the error may not exceed 2 LSB plus the relative error of
// the 16-bit constant for 1/sqrt(2).
module tb_dft8;
  localparam int DW = 25;
  logic signed [DW-1:0] x_re [8], x_im [8], y_re [8], y_im [8];
  int checks = 0, failures = 0;
  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction

  dft8 #(.DW(DW)) dut (.*);

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 8; k++) begin
        int lim;
        lim = (t < 100) ? 4000 : (1 << 20);
        x_re[k] = DW'($urandom_range(0, 2*lim) - lim);
        x_im[k] = DW'($urandom_range(0, 2*lim) - lim);
      end
      if (t == 0) for (int k = 0; k < 8; k++) begin x_re[k] = (k == 1) ? 1000 : 0; x_im[k] = 0; end
      #1;
      for (int m = 0; m < 8; m++) begin
        real er, ei, a, tol;
        er = 0; ei = 0;
        for (int k = 0; k < 8; k++) begin
          a = -2.0 * 3.14159265358979 * m * k / 8.0;
          er += real'(x_re[k]) * $cos(a) - real'(x_im[k]) * $sin(a);
          ei += real'(x_re[k]) * $sin(a) + real'(x_im[k]) * $cos(a);
        end
        // 2 LSB of rounding, plus the relative error of the Q2.14 constant
        // 11585/16384 for 1/sqrt(2) (2.1e-5) on inputs of up to 8 * 2^20
        tol = 2.0 + 2.5e-5 * 8.0 * (1 << 20) * ((t < 100) ? 0.004 : 1.0);
        checks++;
        if (fabs(er - real'(y_re[m])) > tol || fabs(ei - real'(y_im[m])) > tol) begin
          failures++;
          if (failures < 10) $display("t%0d m%0d: got %0d %0d expected %f %f", t, m, y_re[m], y_im[m], er, ei);
        end
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
