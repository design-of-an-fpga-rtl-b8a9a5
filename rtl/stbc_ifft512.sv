// stbc_ifft512: 2x2 OFDM-STBC baseband transceiver (transmitter, ideal
// channel and receiver) with 512 subcarriers, QPSK and Alamouti coding.
//
// Transmitter: sig_gen emits the repeating 16-bit test pattern as one dibit
// per clock, qpsk_mapper turns it into a symbol, sym_s2p forms pairs
// (S0, S1), and stbc_encoder sends S0, -S1* on antenna 1 and S1, S0* on
// antenna 2. Each antenna stream fills one block_fft (512-point IFFT): one
// frame is 512 symbols = 1024 bits.
// Channel: ideal and noise-free; transmit antenna i feeds receive antenna i
// directly, and the decoder is given the matching gains (h00 = h11 = 1,
// h01 = h10 = 0).
// Receiver: two block_fft_rx (512-point FFT), stbc_decoder (Alamouti
// combining of adjacent subcarriers), sym_p2s and qpsk_demapper
// (sign-bit hard decision) give rx_bits, which equal tx_bits of the same
// frame.
//
// Control: while run is high the transmitter sends a whole frame each time
// the IFFTs are ready to load; in between the generator is held (stalled).
// An IFFT starts unloading only when the FFTs are ready, so every frame is
// handed over in 512 consecutive cycles. The clock is taken from a port
// (the board's clock generator is outside this RTL). All blocks use one
// clock and a synchronous, active-high reset.
module stbc_ifft512
  import ofdm_pkg::*;
#(
  parameter int unsigned LOG8N = 3
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       run,        // keep sending frames
  output logic       tx_valid,   // transmitted dibit (first bit in tx_bits[1])
  output logic [1:0] tx_bits,
  output logic       rx_valid,   // received dibit
  output logic [1:0] rx_bits,
  output logic       tx_frame_done,  // an IFFT frame has left the transmitter
  output logic       rx_frame_done   // an FFT frame has entered the decoder
);
  localparam int unsigned N  = 8 ** LOG8N;
  localparam int unsigned AW = 3 * LOG8N;

  // ---------------- transmit control ----------------
  logic          ifft_ready;
  logic          gen_en;
  logic [AW-1:0] sym_cnt;
  logic          frame_sent;      // this load window has got its frame

  assign gen_en = run && ifft_ready && !frame_sent;

  always_ff @(posedge clk) begin
    if (reset) begin
      sym_cnt    <= '0;
      frame_sent <= 1'b0;
    end else begin
      if (gen_en) begin
        sym_cnt <= sym_cnt + 1'b1;
        if (sym_cnt == AW'(N-1)) frame_sent <= 1'b1;
      end
      if (!ifft_ready) frame_sent <= 1'b0;
    end
  end

  // ---------------- transmitter ----------------
  logic  map_valid, pair_start, enc_valid;
  cplx_t map_sym, d1, d2, tx1, tx2;

  sig_gen u_gen (.clk, .reset, .en(gen_en), .bits_valid(tx_valid), .bits(tx_bits));

  qpsk_mapper u_map (.clk, .reset, .in_valid(tx_valid), .bits(tx_bits),
                     .out_valid(map_valid), .sym(map_sym));

  sym_s2p u_s2p (.clk, .reset, .in_valid(map_valid), .sym(map_sym),
                 .start(pair_start), .data1(d1), .data2(d2));

  stbc_encoder u_enc (
    .clock_stbc(clk), .reset, .start(pair_start),
    .data1_in_re(d1.re), .data1_in_im(d1.im),
    .data2_in_re(d2.re), .data2_in_im(d2.im),
    .out_valid(enc_valid),
    .div1_out_re(tx1.re), .div1_out_im(tx1.im),
    .div2_out_re(tx2.re), .div2_out_im(tx2.im)
  );

  logic  ifft2_ready, ifft1_ov, ifft2_ov, ifft1_last, ifft2_last;
  logic  fft1_ready, fft2_ready, fft1_ov, fft2_ov, fft1_last, fft2_last;
  cplx_t ch1, ch2, rx1, rx2;

  block_fft #(.LOG8N(LOG8N)) u_ifft1 (
    .clk, .reset, .in_valid(enc_valid), .in_ready(ifft_ready), .in_data(tx1),
    .out_ready(fft1_ready && fft2_ready), .out_valid(ifft1_ov), .out_last(ifft1_last),
    .out_data(ch1));

  block_fft #(.LOG8N(LOG8N)) u_ifft2 (
    .clk, .reset, .in_valid(enc_valid), .in_ready(ifft2_ready), .in_data(tx2),
    .out_ready(fft1_ready && fft2_ready), .out_valid(ifft2_ov), .out_last(ifft2_last),
    .out_data(ch2));

  assign tx_frame_done = ifft1_last;

  // ---------------- receiver (ideal channel: ch_i -> rx antenna i) ----------------
  block_fft_rx #(.LOG8N(LOG8N)) u_fft1 (
    .clk, .reset, .in_valid(ifft1_ov), .in_ready(fft1_ready), .in_data(ch1),
    .out_ready(1'b1), .out_valid(fft1_ov), .out_last(fft1_last), .out_data(rx1));

  block_fft_rx #(.LOG8N(LOG8N)) u_fft2 (
    .clk, .reset, .in_valid(ifft2_ov), .in_ready(fft2_ready), .in_data(ch2),
    .out_ready(1'b1), .out_valid(fft2_ov), .out_last(fft2_last), .out_data(rx2));

  assign rx_frame_done = fft1_last;

  localparam cplx_t H_ONE  = '{re: C_ONE, im: '0};
  localparam cplx_t H_ZERO = '{re: '0,    im: '0};

  logic  dec_valid, ser_valid;
  cplx_t s0, s1, ser_sym;

  stbc_decoder u_dec (
    .clk, .reset, .h00(H_ONE), .h01(H_ZERO), .h10(H_ZERO), .h11(H_ONE),
    .in_valid(fft1_ov), .rx1, .rx2, .out_valid(dec_valid), .s0, .s1);

  sym_p2s u_p2s (.clk, .reset, .in_valid(dec_valid), .s0, .s1,
                 .out_valid(ser_valid), .sym(ser_sym));

  qpsk_demapper u_demap (.clk, .reset, .in_valid(ser_valid), .sym(ser_sym),
                         .out_valid(rx_valid), .bits(rx_bits));

  // both antenna paths run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (reset)
    (ifft1_ov == ifft2_ov) && (fft1_ov == fft2_ov) && (ifft_ready == ifft2_ready)
    && (ifft1_last == ifft2_last) && (fft1_last == fft2_last))
    else $error("stbc_ifft512: antenna paths out of step");
endmodule
