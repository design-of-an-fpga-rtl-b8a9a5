// stbc_encoder: Alamouti space-time block encoder for two transmit antennas.
//
// For each pair (S0, S1) presented with start, antenna 1 (div1) sends S0
// and then -S1*, antenna 2 (div2) sends S1 and then S0*, in the two cycles
// after start. The second slot is the adjacent sample of the same serial
// stream, so after the IFFT the pair occupies two adjacent subcarriers
// (space-frequency coding). Real and imaginary parts are handled as
// separate 16-bit words; negation saturates (-(-32768) gives 32767).
//
// Port names follow the encoder's symbol in the design's schematic
// (data1_in_*, data2_in_*, div1_out_*, div2_out_*, clock_stbc, reset,
// start); out_valid is added here. A new start is allowed every second
// cycle at most, which an assertion checks. Reset is synchronous, active
// high.
module stbc_encoder
  import ofdm_pkg::*;
(
  input  logic                clock_stbc,
  input  logic                reset,
  input  logic                start,
  input  logic signed [W-1:0] data1_in_re,
  input  logic signed [W-1:0] data1_in_im,
  input  logic signed [W-1:0] data2_in_re,
  input  logic signed [W-1:0] data2_in_im,
  output logic                out_valid,
  output logic signed [W-1:0] div1_out_re,
  output logic signed [W-1:0] div1_out_im,
  output logic signed [W-1:0] div2_out_re,
  output logic signed [W-1:0] div2_out_im
);
  function automatic logic signed [W-1:0] neg(input logic signed [W-1:0] a);
    return (a == 16'sh8000) ? 16'sh7FFF : -a;
  endfunction

  logic                second;               // second time slot pending
  logic signed [W-1:0] s0_re, s0_im, s1_re, s1_im;

  always_ff @(posedge clock_stbc) begin
    if (reset) begin
      second      <= 1'b0;
      out_valid   <= 1'b0;
      {s0_re, s0_im, s1_re, s1_im} <= '0;
      {div1_out_re, div1_out_im, div2_out_re, div2_out_im} <= '0;
    end else begin
      out_valid <= 1'b0;
      second    <= 1'b0;
      if (start) begin
        // time slot t: antenna 1 sends S0, antenna 2 sends S1
        s0_re <= data1_in_re;  s0_im <= data1_in_im;
        s1_re <= data2_in_re;  s1_im <= data2_in_im;
        div1_out_re <= data1_in_re;  div1_out_im <= data1_in_im;
        div2_out_re <= data2_in_re;  div2_out_im <= data2_in_im;
        out_valid   <= 1'b1;
        second      <= 1'b1;
      end else if (second) begin
        // time slot t+1: antenna 1 sends -S1*, antenna 2 sends S0*
        div1_out_re <= neg(s1_re);   div1_out_im <= s1_im;
        div2_out_re <= s0_re;        div2_out_im <= neg(s0_im);
        out_valid   <= 1'b1;
      end
    end
  end

  a_start_rate: assert property (@(posedge clock_stbc) disable iff (reset)
    start |=> !start)
    else $error("stbc_encoder: start asserted in the second time slot");
endmodule
