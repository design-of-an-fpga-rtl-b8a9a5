// sym_s2p: serial-to-parallel converter for the STBC encoder.
//
// Collects two consecutive symbols of the serial stream into an Alamouti
// pair: the first becomes data1 (S0) and the second data2 (S1). A pair is
// presented for one cycle with start high, one cycle after its second
// symbol arrives. The pairing phase restarts at reset (synchronous, active
// high); frames are an even number of symbols long, so pairs never straddle
// two OFDM symbols.
module sym_s2p
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  in_valid,
  input  cplx_t sym,
  output logic  start,
  output cplx_t data1,
  output cplx_t data2
);
  logic  phase;   // 1: first symbol of the pair is held
  cplx_t first;

  always_ff @(posedge clk) begin
    if (reset) begin
      phase <= 1'b0;
      start <= 1'b0;
      first <= '0;
      data1 <= '0;
      data2 <= '0;
    end else begin
      start <= 1'b0;
      if (in_valid) begin
        if (!phase) begin
          first <= sym;
          phase <= 1'b1;
        end else begin
          data1 <= first;
          data2 <= sym;
          start <= 1'b1;
          phase <= 1'b0;
        end
      end
    end
  end
endmodule
