// tb_sym_p2s: sends numbered symbol pairs two to four cycles apart and
// checks that s0 and then s1 leave on the two following cycles.
module tb_sym_p2s;
  import ofdm_pkg::*;
  logic clk = 0, reset = 1, in_valid = 0, out_valid;
  cplx_t s0, s1, sym;
  int checks = 0, failures = 0;

  sym_p2s dut (.*);
  always #5 clk = ~clk;

  int got = 0;
  always @(posedge clk) if (!reset && out_valid) begin
    checks++;
    if (sym.re !== 16'(got) || sym.im !== 16'(got + 1000)) begin
      failures++;
      $display("symbol %0d: %h", got, sym);
    end
    got++;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    for (int p = 0; p < 80; p++) begin
      @(negedge clk);
      in_valid = 1;
      s0 = '{re: 16'(2*p),   im: 16'(2*p + 1000)};
      s1 = '{re: 16'(2*p+1), im: 16'(2*p + 1001)};
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (got != 160) begin failures++; $display("got %0d", got); end
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
