// stbc_decoder: Alamouti combiner for two transmit and two receive antennas.
//
// The receive FFTs deliver, per antenna j, the subcarrier stream r_j; two
// adjacent subcarriers (r_j0, r_j1) carry one Alamouti pair. With h_ij the
// gain from transmit antenna i to receive antenna j (Q2.14, 1.0 = 16384),
//   s0 = sum_j conj(h_0j)*r_j0 + h_1j*conj(r_j1)
//   s1 = sum_j conj(h_1j)*r_j0 - h_0j*conj(r_j1)
// and both are halved (the sum of |h|^2 is 2 on an ideal 2x2 link) and
// saturated to 16 bits. The design only names this block; the maximum-ratio
// combining above is the standard Alamouti receiver, and supplying the gains
// as inputs (the top uses the ideal channel, h_00 = h_11 = 1,
// h_01 = h_10 = 0) is this design's choice.
//
// Timing: samples of both antennas arrive together on in_valid; the first
// of each pair is held, and s0/s1 appear together one cycle after the second
// (out_valid for one cycle). Reset is synchronous, active high, and
// restarts the pairing.
module stbc_decoder
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  cplx_t h00, h01, h10, h11,
  input  logic  in_valid,
  input  cplx_t rx1,
  input  cplx_t rx2,
  output logic  out_valid,
  output cplx_t s0,
  output cplx_t s1
);
  localparam int unsigned PW = 40;
  typedef logic signed [PW-1:0] wide_t;

  // complex product a*b with optional conjugation of a and b, full precision
  function automatic void cmul(input cplx_t a, input logic ca, input cplx_t b, input logic cb,
                               output wide_t pr, output wide_t pi);
    wide_t ar, ai, br, bi;
    ar = PW'(a.re);  ai = ca ? -PW'(a.im) : PW'(a.im);
    br = PW'(b.re);  bi = cb ? -PW'(b.im) : PW'(b.im);
    pr = ar * br - ai * bi;
    pi = ar * bi + ai * br;
  endfunction

  logic  phase;
  cplx_t r10, r20;      // first subcarrier of the pair, antennas 1 and 2

  wide_t s0r, s0i, s1r, s1i;
  always_comb begin
    wide_t pr, pi;
    s0r = '0; s0i = '0; s1r = '0; s1i = '0;
    // receive antenna 1
    cmul(h00, 1'b1, r10, 1'b0, pr, pi);  s0r += pr;  s0i += pi;
    cmul(h10, 1'b0, rx1, 1'b1, pr, pi);  s0r += pr;  s0i += pi;
    cmul(h10, 1'b1, r10, 1'b0, pr, pi);  s1r += pr;  s1i += pi;
    cmul(h00, 1'b0, rx1, 1'b1, pr, pi);  s1r -= pr;  s1i -= pi;
    // receive antenna 2
    cmul(h01, 1'b1, r20, 1'b0, pr, pi);  s0r += pr;  s0i += pi;
    cmul(h11, 1'b0, rx2, 1'b1, pr, pi);  s0r += pr;  s0i += pi;
    cmul(h11, 1'b1, r20, 1'b0, pr, pi);  s1r += pr;  s1i += pi;
    cmul(h01, 1'b0, rx2, 1'b1, pr, pi);  s1r -= pr;  s1i -= pi;
  end

  // scale: Q2.14 gains, then 1/2 for the two receive branches, rounded
  function automatic logic signed [W-1:0] scale(input wide_t v);
    wide_t t;
    t = (v + (PW'(1) <<< CFRAC)) >>> (CFRAC + 1);
    return sat16(48'(t));
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      r10 <= '0;  r20 <= '0;
      s0  <= '0;  s1  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!phase) begin
          r10   <= rx1;
          r20   <= rx2;
          phase <= 1'b1;
        end else begin
          s0.re <= scale(s0r);  s0.im <= scale(s0i);
          s1.re <= scale(s1r);  s1.im <= scale(s1i);
          out_valid <= 1'b1;
          phase     <= 1'b0;
        end
      end
    end
  end
endmodule
