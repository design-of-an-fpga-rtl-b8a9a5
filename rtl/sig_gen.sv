// sig_gen: test data generator.
//
// Emits a bit stream that repeats every 16 bits, two bits (one QPSK symbol)
// per enabled clock. The default pattern 1001 0001 1110 0001 is the
// transmitted sequence shown in the design's Tx/Rx bit trace; the first bit
// of the stream is PATTERN[15]. Emitting two bits per cycle (rather than one)
// is this design's choice so that the transmitter delivers one sample per
// clock to the IFFT.
//
// Interface: en requests the next dibit; bits_valid/bits follow one cycle
// later. bits[1] is the earlier bit of the pair. Reset is synchronous,
// active high, and restarts the pattern.
module sig_gen #(
  parameter logic [15:0] PATTERN = 16'b1001_0001_1110_0001
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       en,
  output logic       bits_valid,
  output logic [1:0] bits
);
  logic [15:0] shreg;

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg      <= PATTERN;
      bits_valid <= 1'b0;
      bits       <= '0;
    end else begin
      bits_valid <= en;
      if (en) begin
        bits  <= shreg[15:14];
        shreg <= {shreg[13:0], shreg[15:14]};
      end
    end
  end
endmodule
