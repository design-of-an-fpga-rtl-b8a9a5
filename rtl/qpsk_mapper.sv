// qpsk_mapper: QPSK symbol mapping.
//
// Maps a dibit to a complex symbol of amplitude 0.707 per axis, following
// the mapping table of the design: 00 -> +0.707+0.707i, 01 -> +0.707-0.707i,
// 11 -> -0.707-0.707i, 10 -> -0.707+0.707i. The first bit (bits[1]) sets the
// sign of the real part and the second (bits[0]) that of the imaginary part;
// 0.707 is the 16-bit word 0x0B50 and -0.707 is 0xF4B0.
//
// Timing: one symbol per clock, registered, one cycle of latency.
// Reset (synchronous, active high) clears the output valid.
module qpsk_mapper
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       in_valid,
  input  logic [1:0] bits,
  output logic       out_valid,
  output cplx_t      sym
);
  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      sym       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sym.re <= bits[1] ? -QPSK_A : QPSK_A;
        sym.im <= bits[0] ? -QPSK_A : QPSK_A;
      end
    end
  end
endmodule
