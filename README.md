# OFDM-STBC baseband transceiver (WiMAX 802.16e, 512 subcarriers, 2x2 Alamouti)

This RTL is a digital baseband for a WiMAX 802.16e style link. It combines
two ideas. OFDM spreads a frame of 512 QPSK symbols over 512 orthogonal
subcarriers with one inverse FFT. Alamouti space-time block coding (STBC)
sends every symbol pair from two antennas in a form that the receiver can
combine without knowing which antenna a signal came from. Transmitter, an
ideal 2x2 channel and receiver are in one design,
`stbc_ifft512`, clocked at 100 MHz. The data source is a fixed test
pattern, and the received bits must equal the sent ones.

The design follows a published FPGA implementation. It keeps that
design's block structure, module names, 16-bit interfaces, QPSK levels,
radix-8 FFT and the way it builds the IFFT from the FFT. Where the
publication gives only a block's name or purpose, the simplest
conventional choice was made. The section "Where this design departs" lists
those choices.

## Signal chain

```
 sig_gen -> qpsk_mapper -> sym_s2p -> stbc_encoder -+-> block_fft (IFFT, ant. 1) --+--> block_fft_rx (FFT, rx 1) -+
 (2 bits/clk)  (1 sym/clk)  (pairs)   (2 outputs)   +-> block_fft (IFFT, ant. 2) --+--> block_fft_rx (FFT, rx 2) -+
                                                                                                                 |
                               rx_bits <- qpsk_demapper <- sym_p2s <- stbc_decoder <-----------------------------+
```

* **sig_gen** repeats the 16-bit pattern `1001 0001 1110 0001`. It emits
  two bits per clock, the earlier bit in `bits[1]`.
* **qpsk_mapper** turns a bit pair into ±0.707 ± 0.707i. The value 0.707
  is the 16-bit word `0x0B50` (2896), and −0.707 is `0xF4B0`. The first bit
  sets the sign of the real part and the second bit the sign of the
  imaginary part: 00 → +,+ ; 01 → +,− ; 11 → −,− ; 10 → −,+.
* **sym_s2p** groups consecutive symbols into pairs (S0, S1).
* **stbc_encoder** is the Alamouti encoder. Its port names (`data1_in_re`,
  `div1_out_im`, `clock_stbc`, `start`, ...) are those of the reference
  design.
* **block_fft** is the 512-point IFFT of each transmit antenna.
* The **channel** is ideal: transmit antenna *i* is wired to receive
  antenna *i*.
* **block_fft_rx** is the 512-point FFT of each receive antenna.
* **stbc_decoder** combines the two receive streams back into S0 and S1.
* **sym_p2s** serializes the decoded pairs.
* **qpsk_demapper** makes the hard decision. The two bits are simply the
  sign bits (MSBs) of the real and imaginary parts.

One frame is 512 symbols, which is 1024 bits and one OFDM symbol per
antenna.

## Alamouti coding on adjacent subcarriers

The encoder gets a pair (S0, S1) and fills two consecutive slots:

| slot | antenna 1 (`div1_out`) | antenna 2 (`div2_out`) |
|------|------------------------|------------------------|
| t    | S0                     | S1                     |
| t+1  | −S1*                   | S0*                    |

The two slots are consecutive IFFT inputs, so a code word occupies two
adjacent **subcarriers** of one OFDM symbol, not two OFDM symbols in time.
This is space-frequency coding. As a result, subcarrier k of antenna 1
carries S0, −S1*, S2, −S3*, and so on. With the test pattern, the receive
FFT of antenna 1 therefore shows the sign sequence (−,+), (−,−), (+,+),
(−,−), (−,−), (+,+), (+,+), (−,−), which repeats every 8 subcarriers.

The decoder receives r\_j0 and r\_j1 for each receive antenna j. These are
the two subcarriers of one pair. It is given the channel gains h\_ij from
transmit antenna i to receive antenna j as Q2.14 inputs, and it forms

```
s0 = Σj conj(h0j)·r_j0 + h1j·conj(r_j1)
s1 = Σj conj(h1j)·r_j0 − h0j·conj(r_j1)
```

The result is halved, because the summed channel power is 2 on the ideal
link. The top ties the gains to the ideal channel: h00 = h11 = 1 and
h01 = h10 = 0. In that case the decoder reduces to s0 = (r1\_0 + conj(r2\_1))/2
and s1 = (r2\_0 − conj(r1\_1))/2. With the general inputs, the same
hardware decodes any flat 2x2 channel whose gains are known. The design
does not estimate the channel.

## The radix-8 FFT core (`fft_r8_core`)

Both directions use one core type: an in-place, memory-based FFT with
512 = 8³ points and three radix-8 decimation-in-frequency stages. Its
parts are:

* a controller (a four-state FSM: LOAD, CALC, WAIT, UNLOAD);
* an address generator;
* a RAM of 512 complex words in two banks, each with one write port and
  one registered read port;
* a twiddle ROM (`twiddle_rom`), read twice per cycle;
* an 8-point butterfly (`dft8`).

**Addressing.** Write a RAM address as three base-8 digits d2 d1 d0. Stage
s (s = 0, 1, 2) combines the 8 words that differ only in digit 2−s. The
other two digits form the butterfly number b (64 butterflies per stage).
Output m of a butterfly goes back to the address of input m. Before the
write, it is multiplied by the twiddle factor W512^(j·m·8^s), where j is
the value of the digits below digit 2−s. Stage 2 therefore needs no
twiddles. After the three stages, bin k sits at the base-8
digit reversal of k. UNLOAD reads the RAM in that order, so the output
leaves in natural order.

**Two banks.** To move two words per cycle, address a is stored in bank
(bit 0 of d2) XOR (bit 0 of d1) XOR (bit 0 of d0), at row a>>1. Points 2i
and 2i+1 of a butterfly differ only in bit 0 of the digit being combined.
They therefore always lie in different banks, both when they are read and
when they are written back. An assertion checks this.

**Schedule.** In CALC, each bank delivers one word per cycle. The 8 inputs
of butterfly b therefore arrive as four pairs in 4 cycles. When the last
pair arrives, the combinational `dft8` result is registered. In the next 4
cycles, two outputs per cycle are multiplied by their twiddle factors and
written back, one to each bank. Meanwhile, butterfly b+1 is being read.
Each stage also waits for its last writes to finish before the next stage
starts. A stage therefore takes N/2 + 6 = 262 cycles. The frame timing is:

| phase  | cycles |
|--------|--------|
| load   | 512, one sample per cycle |
| compute | 3·(256+6)+3 = 789 (last input to first output) |
| unload | 512, on consecutive cycles |

**Butterfly.** `dft8` computes the 8-point DFT as three radix-2 layers. The
only rotations inside it are by −j (a swap and a negation) and by
(±1−j)/√2. The factor 1/√2 is the constant 11585/16384.

**Word widths.** The interfaces are 16 bits. Inside, the core carries
16 + 9 + 4 = 29 bits:

* 9 guard bits (log2 512), so that the unscaled transform cannot overflow;
* 4 fraction bits, so that rounding each stage's twiddle products costs
  well under one output LSB.

Twiddle factors are 16-bit Q2.14 words. They are computed at elaboration
from `$cos`/`$sin`, so no table file is needed. Outputs are rounded and
saturated back to 16 bits.

**Handshake.** `in_ready` is high during LOAD, and the producer may only
assert `in_valid` then. An assertion checks this. When the transform is
done, the core waits until `out_ready` is high. It then sends all 512 bins
on consecutive cycles with `out_valid`, and marks the last with `out_last`.
The consumer must therefore be able to take a whole frame once it has
raised `out_ready`. In the top, `out_ready` is "both receive FFTs are
loading".

## The IFFT from the FFT (`block_fft`)

The inverse transform reuses the forward core with three changes:

1. the real and imaginary parts of the input are swapped;
2. each is divided by N = 512, by an arithmetic shift right by 9 with
   round-half-up;
3. the real and imaginary parts of the output are swapped back.

The swap conjugates the signal up to a factor j, so this gives
x[n] = (1/N) Σ X[k] e^{+j2πkn/N}.

Because the division comes before the transform, every value stays within
16 bits. The price is quantization: a QPSK level of 2896 becomes 6 before
the transform. The receive FFT (`block_fft_rx`) is the plain, unscaled
core. It therefore returns 6·512 = 3072 instead of 2896 on every
subcarrier, with the correct signs. The hard decision only looks at signs,
so this error never reaches the bits. An IFFT output is the unscaled inverse
DFT of the rounded inputs to within 2 LSB, and the receive FFT reproduces
±3072 to within 4 LSB.

A known answer for the test pattern: the pattern repeats every 8 symbols,
so each IFFT output is non-zero only at multiples of 64. The real part of
antenna 1's output is −768, −2304, 1086, 768, −768 and −1086 at samples 0,
128, 192, 256, 384 and 448, and 0 at 64 and 320.

## Frame flow and timing in the top

While `run` is high, the transmitter sends one frame of 512 symbols each
time the IFFTs enter LOAD, and holds the generator in between. An IFFT
starts its unload only when both FFTs are loading, so it hands a frame
over in 512 consecutive cycles. At the default size, the measured timing
is:

* **Latency:** 3120 clock cycles from the first bit transmitted to the
  last bit received. That is 31.2 µs at 100 MHz. It is made up of 512 + 789
  + 512 + 789 + 512 cycles in the FFTs, plus 6 cycles of registers.
* **Steady state:** one 1024-bit frame every 1816 cycles, which is
  56.4 Mbit/s at 100 MHz.

Both antenna paths run in lock step, which an assertion checks. Reset is
synchronous and active high everywhere.

## Where this design departs from the reference or fills gaps

* **Cycle count.** The reference reports 3607 cycles per 1024 bits
  (28.3 Mbit/s) but not its FFT schedule. The two-bank, two-words-per-cycle
  schedule used here was chosen to stay within that budget: 3120 cycles
  per frame. A single-port, one-word-per-cycle version of the same core
  would need 4680.
* **FFT accuracy.** The reference keeps 16 bits throughout. Its FFT outputs
  deviate from the ideal ±2896 by up to about 940. This core adds guard and
  fraction bits inside, so its only visible error is the input rounding of
  the IFFT described above.
* **Sign of −S1\*.** The code word is the standard Alamouti one. The minus
  sign of −S1\* is also what the reference's FFT output signs show.
* **Blocks with gaps.** The reference names the STBC decoder, the
  serial/parallel converters, the 8-point FFT and the ROM, but does not
  describe their insides. Their insides here are conventional choices:
  maximum-ratio combining for the decoder, a 1-to-2 and a 2-to-1 converter
  around the STBC blocks, and the butterfly and ROM described above.
* **Handshakes.** All handshakes, the frame control and the reset scheme
  belong to this design.
* **Test pattern.** The generator's pattern is the 16-bit Tx sequence of
  the reference's bit trace.
* **Not included.** Four blocks named `equal` that sit between the encoder
  and the IFFTs in the reference's schematic are left out, because their
  function is not described. The board's clock wizard and a clock divider
  are also left out. The clock enters as a port, and every block runs on
  it.
* **FFT size.** Only 512 points is exercised. The core's `LOG8N` parameter
  allows other powers of 8 (64, 4096). The other 802.16e sizes (128, 256,
  1024, 2048) would need mixed radix.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|------|----------|
| `ofdm_pkg.sv` | widths, QPSK level, Q2.14 one, complex type `cplx_t`, saturation |
| `sig_gen.sv`, `qpsk_mapper.sv`, `sym_s2p.sv`, `stbc_encoder.sv` | transmitter front |
| `dft8.sv`, `twiddle_rom.sv`, `fft_r8_core.sv` | radix-8 FFT core |
| `block_fft.sv`, `block_fft_rx.sv` | IFFT and FFT wrappers |
| `stbc_decoder.sv`, `sym_p2s.sv`, `qpsk_demapper.sv` | receiver back end |
| `stbc_ifft512.sv` | top |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
computes its expected values independently, often with a floating-point
DFT. Each ends by printing `TB_RESULT checks=N failures=M`.

`tb_stbc_ifft512` runs three frames through the whole transceiver at the
default size. It checks:

* every transmitted and received bit;
* the first IFFT frame against a floating-point inverse DFT;
* the first FFT frame against the expected ±3072;
* the latency and the frame rate;
* that stalls, STBC pairs and IFFT/FFT frames all occur.

It runs in well under a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/ofdm_pkg.sv tb/tb_stbc_ifft512.sv \
          --top-module tb_stbc_ifft512 -o sim && obj_dir/sim
```

Replace `stbc_ifft512` with any module name to run that module's test. The
package must come first on the command line. The other files are found
through `-Irtl`.

To change the design:

* **FFT size:** set `LOG8N` on the top. 2 gives 64 subcarriers. The
  testbenches assume 512.
* **Test pattern:** set `PATTERN` on `sig_gen`.
* **Internal FFT precision:** set `GUARD` and `FRAC` on `fft_r8_core`.
* **Channel:** drive the decoder's `h` inputs. A non-ideal channel also
  needs a channel model between the IFFT and FFT instances in the top.
