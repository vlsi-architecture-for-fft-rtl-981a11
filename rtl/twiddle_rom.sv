// twiddle_rom -- twiddle factor memory of the 16-point FFT.
//
// Returns W16^k = exp(-j*2*pi*k/16) for a 4-bit exponent k as two signed
// Q1.15 words (1.0 = 32768). The 16 entries are worked out at elaboration
// time by fft16_pkg::twiddle() from cos(k*pi/8) and sin(k*pi/8), and held
// as a constant table, so the block is a read-only memory with an
// asynchronous (combinational) read. +1.0 saturates to 32767 (entries k = 0
// real part and k = 12 imaginary part); the FFT bypasses the multiplier for
// W16^0 and never uses k = 12.
//
// A twiddle factor memory feeding the multiplier is part of the butterfly
// architecture; the word length, the table size of 16 and the combinational
// read are choices of this implementation.
module twiddle_rom
  import fft16_pkg::*;
(
  input  logic [3:0]           k,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);

  typedef twiddle_t [15:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int unsigned i = 0; i < 16; i++) t[i] = twiddle(i);
    return t;
  endfunction

  localparam table_t ROM = build_table();

  always_comb begin
    w_re = ROM[k].re;
    w_im = ROM[k].im;
  end

endmodule
