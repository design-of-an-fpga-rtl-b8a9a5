// fft_r8_core: memory-based, in-place radix-8 FFT (512 points by default).
//
// Computes X[m] = sum_n x[n] * exp(-j*2*pi*m*n/N), N = 8**LOG8N, without
// scaling. The core holds one frame in a RAM and runs through four phases
// under a small controller:
//   LOAD   - in_ready is high; N samples are written in natural order.
//   CALC   - LOG8N decimation-in-frequency radix-8 stages. In each stage the
//            address generator reads the 8 points of one butterfly, two per
//            cycle, in 4 cycles; the 8-point DFT (dft8) is taken as the last
//            pair arrives, and the 8 results are multiplied by their twiddle
//            factors (two ROM reads and two complex multipliers) and written
//            back in place, two per cycle, in the following 4 cycles while
//            the next butterfly is being read.
//   WAIT   - the frame is ready; unloading starts when out_ready is high
//            (the consumer must then accept N samples on consecutive cycles).
//   UNLOAD - the RAM is read in base-8 digit-reversed order so that
//            X[0..N-1] leaves in natural order, one per cycle, on out_valid.
// In stage s the butterfly inputs are the addresses whose base-8 digit
// p = LOG8N-1-s runs over 0..7; the twiddle exponent of output m is
// j*m*8^s, j being the address digits below digit p.
//
// To move two words per cycle the RAM is split into two banks, each with
// one write and one registered read port. Address a lives in bank
// (XOR of bit 0 of every base-8 digit of a) at row a>>1. Points 2i and 2i+1
// of a butterfly differ only in bit 0 of digit p, so the two words read or
// written together are always in different banks.
//
// Data inside the core are IW = W+GUARD+FRAC bits wide: GUARD = log2(N)
// integer bits so that the unscaled transform cannot overflow, and FRAC
// fraction bits that keep the rounding of the twiddle products well below
// one output LSB. Outputs are rounded and saturated to W bits.
// Timing per frame: N load cycles; LOG8N*(N/2+6)+3 cycles from the last
// input to the first output when out_ready is high; N unload cycles.
// The radix-8 algorithm and the parts (controller, addressing, RAM, ROM,
// 8-point FFT) follow the design; the two-bank memory, the schedule, the
// guard bits and the handshake are this design's own choices.
module fft_r8_core
  import ofdm_pkg::*;
#(
  parameter int unsigned LOG8N = 3,
  parameter int unsigned GUARD = 3 * LOG8N,
  parameter int unsigned FRAC  = 4
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  out_ready,
  output logic  out_valid,
  output logic  out_last,
  output cplx_t out_data
);
  localparam int unsigned N  = 8 ** LOG8N;
  localparam int unsigned AW = 3 * LOG8N;
  localparam int unsigned IW = W + GUARD + FRAC;
  localparam int unsigned BW = (LOG8N > 1) ? AW - 3 : 1;   // butterfly index width

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_WAIT, S_UNLOAD} state_t;
  state_t state;

  typedef logic signed [IW-1:0] word_t;

  // ---------------- address helpers ----------------
  // butterfly b, point k, stage s -> address with k inserted at digit
  // position p = LOG8N-1-s
  function automatic logic [AW-1:0] bf_addr(input logic [BW-1:0] b, input logic [2:0] k,
                                            input logic [1:0] s);
    int unsigned p;
    logic [AW+2:0] bb, lo, hi;
    p  = LOG8N - 1 - int'(s);
    bb = (AW+3)'(b);
    lo = bb & ((1 << (3*p)) - 1);
    hi = bb >> (3*p);
    return AW'((hi << (3*p + 3)) | ((AW+3)'(k) << (3*p)) | lo);
  endfunction

  // twiddle exponent of output m of butterfly b in stage s
  function automatic logic [AW-1:0] tw_exp(input logic [BW-1:0] b, input logic [2:0] m,
                                           input logic [1:0] s);
    int unsigned p;
    logic [AW+2:0] lo;
    p  = LOG8N - 1 - int'(s);
    lo = (AW+3)'(b) & ((1 << (3*p)) - 1);
    return AW'(lo * m << (3*s));
  endfunction

  function automatic logic [AW-1:0] digit_rev(input logic [AW-1:0] a);
    logic [AW-1:0] r;
    for (int d = 0; d < LOG8N; d++) r[3*d +: 3] = a[3*(LOG8N-1-d) +: 3];
    return r;
  endfunction

  function automatic logic bank_of(input logic [AW-1:0] a);
    logic x;
    x = 1'b0;
    for (int d = 0; d < LOG8N; d++) x ^= a[3*d];
    return x;
  endfunction

  // ---------------- two RAM banks ----------------
  word_t           mem0_re [N/2], mem0_im [N/2], mem1_re [N/2], mem1_im [N/2];
  logic            we0, we1;
  logic [AW-2:0]   wa0, wa1, ra0, ra1;
  word_t           wd0_re, wd0_im, wd1_re, wd1_im;
  word_t           rd0_re, rd0_im, rd1_re, rd1_im;

  always_ff @(posedge clk) begin
    if (we0) begin
      mem0_re[wa0] <= wd0_re;
      mem0_im[wa0] <= wd0_im;
    end
    if (we1) begin
      mem1_re[wa1] <= wd1_re;
      mem1_im[wa1] <= wd1_im;
    end
    rd0_re <= mem0_re[ra0];
    rd0_im <= mem0_im[ra0];
    rd1_re <= mem1_re[ra1];
    rd1_im <= mem1_im[ra1];
  end

  // ---------------- controller state ----------------
  logic [AW-1:0]  ld_cnt;       // load / unload counter
  logic [AW-2:0]  rd_cnt;       // read-pair counter inside a stage
  logic           rd_on;        // stage reads in progress
  logic [1:0]     stg;          // current stage
  logic           rd_v1;        // RAM output valid (butterfly read)
  logic [1:0]     rd_q1;        // pair number 0..3 of that read
  logic           rd_sw1;       // point 2q is in bank 1
  logic [BW-1:0]  rd_b1;
  logic           ul_v1;        // RAM output valid (unload)
  logic           ul_last1;
  logic           ul_bank1;

  word_t xb_re [8], xb_im [8];    // collected butterfly inputs
  word_t xi_re [8], xi_im [8];
  word_t y_re  [8], y_im  [8];    // dft8 outputs (comb)
  word_t yr_re [8], yr_im [8];    // registered dft8 outputs
  logic            wr_on;
  logic [1:0]      wr_q;          // output pair being written
  logic [BW-1:0]   wr_b;

  logic [BW-1:0] cur_b;
  logic [1:0]    cur_q;
  logic [AW-1:0] ra_even, ra_odd;       // addresses of points 2q, 2q+1
  assign cur_b   = BW'(rd_cnt >> 2);
  assign cur_q   = rd_cnt[1:0];
  assign ra_even = bf_addr(cur_b, {cur_q, 1'b0}, stg);
  assign ra_odd  = bf_addr(cur_b, {cur_q, 1'b1}, stg);

  // the pair just read, put back in point order
  word_t pe_re, pe_im, po_re, po_im;
  assign pe_re = rd_sw1 ? rd1_re : rd0_re;
  assign pe_im = rd_sw1 ? rd1_im : rd0_im;
  assign po_re = rd_sw1 ? rd0_re : rd1_re;
  assign po_im = rd_sw1 ? rd0_im : rd1_im;

  always_comb begin
    for (int i = 0; i < 6; i++) begin
      xi_re[i] = xb_re[i];
      xi_im[i] = xb_im[i];
    end
    xi_re[6] = pe_re;  xi_im[6] = pe_im;
    xi_re[7] = po_re;  xi_im[7] = po_im;
  end

  dft8 #(.DW(IW)) u_dft8 (.x_re(xi_re), .x_im(xi_im), .y_re(y_re), .y_im(y_im));

  // twiddle multiply of the two results being written (outputs 2q, 2q+1)
  logic [2:0]            m_even, m_odd;
  logic signed [15:0]    twe_re, twe_im, two_re, two_im;
  logic signed [IW+16:0] pe_mre, pe_mim, po_mre, po_mim;
  logic [AW-1:0]         wa_even, wa_odd;

  assign m_even  = {wr_q, 1'b0};
  assign m_odd   = {wr_q, 1'b1};
  assign wa_even = bf_addr(wr_b, m_even, stg);
  assign wa_odd  = bf_addr(wr_b, m_odd, stg);

  twiddle_rom #(.N(N)) u_rom_e (.e(tw_exp(wr_b, m_even, stg)), .w_re(twe_re), .w_im(twe_im));
  twiddle_rom #(.N(N)) u_rom_o (.e(tw_exp(wr_b, m_odd,  stg)), .w_re(two_re), .w_im(two_im));

  localparam logic signed [IW+16:0] HALF = (IW+17)'(1 << (CFRAC-1));
  always_comb begin
    pe_mre = yr_re[m_even] * twe_re - yr_im[m_even] * twe_im + HALF;
    pe_mim = yr_re[m_even] * twe_im + yr_im[m_even] * twe_re + HALF;
    po_mre = yr_re[m_odd]  * two_re - yr_im[m_odd]  * two_im + HALF;
    po_mim = yr_re[m_odd]  * two_im + yr_im[m_odd]  * two_re + HALF;
  end

  logic [AW-1:0] ul_addr;
  logic [AW-2:0] ul_row;
  assign ul_addr = digit_rev(ld_cnt);
  assign ul_row  = ul_addr[AW-1:1];

  // RAM port multiplexing
  always_comb begin
    logic  ld_bank, we_sw;
    word_t ld_re, ld_im;
    ld_bank = bank_of(ld_cnt);
    we_sw   = bank_of(wa_even);          // even output goes to bank 1
    ld_re   = IW'(in_data.re) <<< FRAC;
    ld_im   = IW'(in_data.im) <<< FRAC;
    we0 = 1'b0;  wa0 = ld_cnt[AW-1:1];  wd0_re = ld_re;  wd0_im = ld_im;
    we1 = 1'b0;  wa1 = ld_cnt[AW-1:1];  wd1_re = ld_re;  wd1_im = ld_im;
    if (state == S_LOAD) begin
      we0 = in_valid && !ld_bank;
      we1 = in_valid &&  ld_bank;
    end else if (wr_on) begin
      we0 = 1'b1;
      we1 = 1'b1;
      wa0    = we_sw ? wa_odd[AW-1:1]  : wa_even[AW-1:1];
      wa1    = we_sw ? wa_even[AW-1:1] : wa_odd[AW-1:1];
      wd0_re = we_sw ? IW'(po_mre >>> CFRAC) : IW'(pe_mre >>> CFRAC);
      wd0_im = we_sw ? IW'(po_mim >>> CFRAC) : IW'(pe_mim >>> CFRAC);
      wd1_re = we_sw ? IW'(pe_mre >>> CFRAC) : IW'(po_mre >>> CFRAC);
      wd1_im = we_sw ? IW'(pe_mim >>> CFRAC) : IW'(po_mim >>> CFRAC);
    end
    ra0 = ra_even[AW-1:1];
    ra1 = ra_odd[AW-1:1];
    if (state == S_UNLOAD) begin
      ra0 = ul_row;
      ra1 = ul_row;
    end else if (bank_of(ra_even)) begin
      ra0 = ra_odd[AW-1:1];
      ra1 = ra_even[AW-1:1];
    end else begin
      ra0 = ra_even[AW-1:1];
      ra1 = ra_odd[AW-1:1];
    end
  end

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= S_LOAD;
      ld_cnt   <= '0;
      rd_cnt   <= '0;
      rd_on    <= 1'b0;
      stg      <= '0;
      rd_v1    <= 1'b0;
      rd_q1    <= '0;
      rd_sw1   <= 1'b0;
      rd_b1    <= '0;
      ul_v1    <= 1'b0;
      ul_last1 <= 1'b0;
      ul_bank1 <= 1'b0;
      wr_on    <= 1'b0;
      wr_q     <= '0;
      wr_b     <= '0;
      for (int i = 0; i < 8; i++) begin
        xb_re[i] <= '0;  xb_im[i] <= '0;
        yr_re[i] <= '0;  yr_im[i] <= '0;
      end
    end else begin
      // pipeline of the butterfly reads
      rd_v1  <= rd_on;
      rd_q1  <= cur_q;
      rd_sw1 <= bank_of(ra_even);
      rd_b1  <= cur_b;
      ul_v1    <= (state == S_UNLOAD);
      ul_last1 <= (state == S_UNLOAD) && (ld_cnt == AW'(N-1));
      ul_bank1 <= bank_of(ul_addr);

      if (rd_v1) begin
        xb_re[2*rd_q1]   <= pe_re;  xb_im[2*rd_q1]   <= pe_im;
        xb_re[2*rd_q1+1] <= po_re;  xb_im[2*rd_q1+1] <= po_im;
      end

      // write-back of the previous butterfly
      if (wr_on) begin
        wr_q <= wr_q + 2'd1;
        if (wr_q == 2'd3) wr_on <= 1'b0;
      end
      // the last input pair of a butterfly has arrived: take the DFT
      if (rd_v1 && rd_q1 == 2'd3) begin
        yr_re <= y_re;
        yr_im <= y_im;
        wr_b  <= rd_b1;
        wr_q  <= '0;
        wr_on <= 1'b1;
      end

      unique case (state)
        S_LOAD: if (in_valid) begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == AW'(N-1)) begin
            state  <= S_CALC;
            stg    <= '0;
            rd_cnt <= '0;
            rd_on  <= 1'b1;
          end
        end
        S_CALC: begin
          if (rd_on) begin
            rd_cnt <= rd_cnt + 1'b1;
            if (rd_cnt == (AW-1)'(N/2-1)) rd_on <= 1'b0;
          end else if (!rd_v1 && !wr_on) begin
            // stage drained
            if (stg == 2'(LOG8N-1)) begin
              state <= S_WAIT;
            end else begin
              stg    <= stg + 2'd1;
              rd_cnt <= '0;
              rd_on  <= 1'b1;
            end
          end
        end
        S_WAIT: if (out_ready) begin
          state  <= S_UNLOAD;
          ld_cnt <= '0;
        end
        S_UNLOAD: begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == AW'(N-1)) state <= S_LOAD;   // ld_cnt wraps to 0
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // unload: the word comes from the bank its address lives in; drop the
  // fraction bits with round-half-up, then saturate to W bits
  logic signed [IW:0] rnd_re, rnd_im;
  assign rnd_re = ((IW+1)'(ul_bank1 ? rd1_re : rd0_re) + (IW+1)'(1 << (FRAC-1))) >>> FRAC;
  assign rnd_im = ((IW+1)'(ul_bank1 ? rd1_im : rd0_im) + (IW+1)'(1 << (FRAC-1))) >>> FRAC;

  assign out_valid   = ul_v1;
  assign out_last    = ul_last1;
  assign out_data.re = sat16(48'(rnd_re));
  assign out_data.im = sat16(48'(rnd_im));

  // the producer may only send while in_ready is high
  a_in_handshake: assert property (@(posedge clk) disable iff (reset)
    in_valid |-> in_ready)
    else $error("fft_r8_core: sample offered while the core is busy");
  // the two words of a butterfly pair always sit in different banks
  a_bank_split: assert property (@(posedge clk) disable iff (reset)
    (rd_on |-> bank_of(ra_even) != bank_of(ra_odd)) and
    (wr_on |-> bank_of(wa_even) != bank_of(wa_odd)))
    else $error("fft_r8_core: bank conflict");
endmodule
