// tb_qpsk_demapper: checks the hard decision of the de-mapping table (the
// four rows with +-0x0B50) and random symbols, where the bits must equal the
// sign bits of the real and imaginary parts, with one cycle of latency.
module tb_qpsk_demapper;
  import ofdm_pkg::*;
  logic clk = 0, reset = 1, in_valid = 0, out_valid;
  cplx_t sym;
  logic [1:0] bits;
  int checks = 0, failures = 0;

  qpsk_demapper dut (.*);
  always #5 clk = ~clk;

  task automatic one(logic [15:0] re, logic [15:0] im, logic [1:0] exp_bits);
    @(negedge clk);
    in_valid = 1; sym = '{re: re, im: im};
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || bits !== exp_bits) begin
      failures++;
      $display("%h %h: got %b valid %b, expected %b", re, im, bits, out_valid, exp_bits);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    one(16'h0B50, 16'hF4B0, 2'b01);
    one(16'hF4B0, 16'hF4B0, 2'b11);
    one(16'hF4B0, 16'h0B50, 2'b10);
    one(16'h0B50, 16'h0B50, 2'b00);
    for (int i = 0; i < 60; i++) begin
      int r, q;
      r = $urandom_range(0, 6000) - 3000;
      q = $urandom_range(0, 6000) - 3000;
      one(16'(r), 16'(q), {r < 0, q < 0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
