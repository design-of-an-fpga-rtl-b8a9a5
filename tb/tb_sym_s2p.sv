// tb_sym_s2p: feeds a numbered symbol stream with random gaps and checks
// that consecutive symbols leave as pairs (data1 = first, data2 = second)
// with one start pulse per pair.
module tb_sym_s2p;
  import ofdm_pkg::*;
  logic clk = 0, reset = 1, in_valid = 0, start;
  cplx_t sym, data1, data2;
  int checks = 0, failures = 0;

  sym_s2p dut (.*);
  always #5 clk = ~clk;

  int sent = 0, pairs = 0;
  always @(posedge clk) if (!reset && start) begin
    checks++;
    if (data1.re !== 16'(2*pairs) || data1.im !== 16'(-2*pairs) ||
        data2.re !== 16'(2*pairs+1) || data2.im !== 16'(-2*pairs-1)) begin
      failures++;
      $display("pair %0d: %h %h", pairs, data1, data2);
    end
    pairs++;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    while (sent < 200) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      sym = '{re: 16'(sent), im: 16'(-sent)};
      if (in_valid) sent++;
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (pairs != 100) begin failures++; $display("pairs %0d", pairs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
