// tb_stbc_encoder: random symbol pairs, back to back and with gaps; checks
// the Alamouti code word (antenna 1: S0 then -S1*, antenna 2: S1 then S0*)
// in the two cycles after start, including the saturating negation of
// -32768.
module tb_stbc_encoder;
  import ofdm_pkg::*;
  logic clock_stbc = 0, reset = 1, start = 0, out_valid;
  logic signed [15:0] data1_in_re, data1_in_im, data2_in_re, data2_in_im;
  logic signed [15:0] div1_out_re, div1_out_im, div2_out_re, div2_out_im;
  int checks = 0, failures = 0;

  stbc_encoder dut (.*);
  always #5 clock_stbc = ~clock_stbc;

  function automatic int ng(int v);
    return (v == -32768) ? 32767 : -v;
  endfunction

  task automatic expect_out(int a_re, int a_im, int b_re, int b_im);
    checks++;
    if (!out_valid || div1_out_re != a_re || div1_out_im != a_im ||
        div2_out_re != b_re || div2_out_im != b_im) begin
      failures++;
      $display("got v=%b %0d %0d | %0d %0d, expected %0d %0d | %0d %0d", out_valid,
               div1_out_re, div1_out_im, div2_out_re, div2_out_im, a_re, a_im, b_re, b_im);
    end
  endtask

  initial begin
    repeat (2) @(posedge clock_stbc);
    reset <= 0;
    for (int i = 0; i < 60; i++) begin
      int r0, i0, r1, i1;
      bit b2b;
      r0 = int'($signed(16'($urandom)));  i0 = int'($signed(16'($urandom)));
      r1 = int'($signed(16'($urandom)));  i1 = int'($signed(16'($urandom)));
      if (i == 3) begin r1 = -32768; i0 = -32768; end
      b2b = (i % 2 == 1);
      if (!b2b) @(negedge clock_stbc);   // else start on the cycle of slot t+1
      start = 1;
      data1_in_re = 16'(r0); data1_in_im = 16'(i0);
      data2_in_re = 16'(r1); data2_in_im = 16'(i1);
      @(negedge clock_stbc);
      start = 0;
      expect_out(r0, i0, r1, i1);                    // slot t
      @(negedge clock_stbc);
      expect_out(ng(r1), i1, r0, ng(i0));            // slot t+1
      if (i % 2 == 0) begin
        @(negedge clock_stbc);
        checks++;
        if (out_valid) begin failures++; $display("valid after two slots"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clock_stbc);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
