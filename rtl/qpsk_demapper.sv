// qpsk_demapper: hard-decision QPSK de-mapping.
//
// Recovers the two data bits of a symbol from the sign bits alone: the MSB of
// the real part gives the first bit and the MSB of the imaginary part the
// second (sign 1 -> bit 1), as in the design's de-mapping table. No
// amplitude information is used, so small rounding errors from the FFTs do
// not change the decision.
//
// Timing: one symbol per clock, registered, one cycle of latency.
module qpsk_demapper
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       in_valid,
  input  cplx_t      sym,
  output logic       out_valid,
  output logic [1:0] bits
);
  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      bits      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bits <= {sym.re[W-1], sym.im[W-1]};
    end
  end
endmodule
