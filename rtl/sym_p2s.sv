// sym_p2s: parallel-to-serial converter after the STBC decoder.
//
// Takes a decoded symbol pair (s0, s1) and sends it on as two consecutive
// symbols, s0 first, in the two cycles after in_valid. Pairs may arrive at
// most every second cycle (the STBC decoder delivers them that way); an
// assertion checks it.
module sym_p2s
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  in_valid,
  input  cplx_t s0,
  input  cplx_t s1,
  output logic  out_valid,
  output cplx_t sym
);
  logic  pend;    // second symbol still to send
  cplx_t hold;

  always_ff @(posedge clk) begin
    if (reset) begin
      pend      <= 1'b0;
      out_valid <= 1'b0;
      sym       <= '0;
      hold      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sym       <= s0;
        hold      <= s1;
        out_valid <= 1'b1;
        pend      <= 1'b1;
      end else if (pend) begin
        sym       <= hold;
        out_valid <= 1'b1;
        pend      <= 1'b0;
      end
    end
  end

  a_pair_rate: assert property (@(posedge clk) disable iff (reset)
    in_valid |=> !in_valid)
    else $error("sym_p2s: pairs closer than two cycles");
endmodule
