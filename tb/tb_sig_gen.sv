// tb_sig_gen: checks that the generator emits the 16-bit pattern
// 1001 0001 1110 0001 two bits per enabled cycle, holds while disabled,
// answers one cycle after en, and restarts the pattern on reset.
module tb_sig_gen;
  localparam logic [15:0] PAT = 16'b1001_0001_1110_0001;
  logic clk = 0, reset = 1, en = 0;
  logic bits_valid;
  logic [1:0] bits;
  int checks = 0, failures = 0;

  sig_gen dut (.*);
  always #5 clk = ~clk;

  int idx = 0;        // dibits expected so far
  logic en_d = 0;
  always @(posedge clk) begin
    en_d <= en && !reset;
    if (!reset) begin
      checks++;
      if (bits_valid !== en_d) begin failures++; $display("valid mismatch"); end
      if (bits_valid) begin
        checks++;
        if (bits !== {PAT[15 - (2*idx)%16], PAT[14 - (2*idx)%16]}) begin
          failures++;
          $display("dibit %0d: got %b", idx, bits);
        end
        idx++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;
    repeat (100) begin
      @(posedge clk);
      en <= ($urandom_range(0, 3) != 0);
    end
    en <= 0;
    @(posedge clk);
    reset <= 1;
    @(posedge clk);
    reset <= 0;
    idx = 0;
    en <= 1;
    repeat (20) @(posedge clk);
    en <= 0;
    repeat (3) @(posedge clk);
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
