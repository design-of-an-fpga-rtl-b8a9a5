// ofdm_pkg: constants and types shared by the OFDM-STBC transceiver.
//
// All sample paths are 16-bit two's-complement fixed point. QPSK symbols
// use +-0.707 scaled so that 0.707 = 0x0B50 = 2896 (i.e. 1.0 = 4096,
// Q3.12), which is the level printed in the mapping table. Twiddle factors
// and channel gains use Q2.14 (1.0 = 16384). The FFT size (8**LOG8N, 512
// by default) is a parameter of the FFT modules.
package ofdm_pkg;
  localparam int unsigned W       = 16;          // sample width (both I and Q)
  localparam int unsigned CW      = 16;          // coefficient width (Q2.14)
  localparam int unsigned CFRAC   = 14;          // coefficient fraction bits
  localparam logic signed [W-1:0]  QPSK_A = 16'sh0B50;   // +0.707
  localparam logic signed [CW-1:0] C_ONE  = 16'sh4000;   // 1.0 in Q2.14

  // Complex sample at the 16-bit interfaces.
  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cplx_t;

  // Saturate a wide signed value to W bits.
  function automatic logic signed [W-1:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7FFF;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[W-1:0];
  endfunction
endpackage
