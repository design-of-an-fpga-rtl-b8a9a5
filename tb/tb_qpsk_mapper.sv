// tb_qpsk_mapper: checks the four QPSK points of the mapping table
// (00 -> +0.707+0.707i ... 10 -> -0.707+0.707i, 0.707 = 0x0B50 and
// -0.707 = 0xF4B0) and the one-cycle latency.
module tb_qpsk_mapper;
  import ofdm_pkg::*;
  logic clk = 0, reset = 1, in_valid = 0, out_valid;
  logic [1:0] bits;
  cplx_t sym;
  int checks = 0, failures = 0;

  qpsk_mapper dut (.*);
  always #5 clk = ~clk;

  function automatic cplx_t table2(logic [1:0] b);
    case (b)
      2'b00: return '{re: 16'h0B50, im: 16'h0B50};
      2'b01: return '{re: 16'h0B50, im: 16'hF4B0};
      2'b11: return '{re: 16'hF4B0, im: 16'hF4B0};
      default: return '{re: 16'hF4B0, im: 16'h0B50};
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    for (int i = 0; i < 40; i++) begin
      logic [1:0] b;
      b = 2'($urandom);
      @(negedge clk);
      in_valid = 1; bits = b;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || sym !== table2(b)) begin
        failures++;
        $display("bits %b: valid %b sym %h", b, out_valid, sym);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("valid held"); end
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
