// fft16_pkg -- constants, types and helper functions shared by the 16-point
// radix-4 FFT.
//
// The twiddle factors are W16^k = exp(-j*2*pi*k/16) = cos(k*pi/8) - j*sin(k*pi/8),
// stored as signed Q1.15 numbers (TW = 16 bits, 1.0 = 32768). Only four
// distinct magnitudes occur, round(32768*cos(q*pi/8)) for q = 0..3; every
// other value follows from the quadrant symmetry of cosine and sine, so the
// table is computed here rather than listed. +1.0 cannot be held in Q1.15 and
// saturates to 32767; the FFT never sends a factor of +1 through a multiplier
// (those paths are bypassed), so this only shows when the table is read
// directly. The word length of the twiddle factors is this design's choice.
//
// digit_rev() gives the output ordering of the 16-point radix-4 decimation in
// time FFT: output position p = 4*a + b holds frequency bin b*4 + a, i.e. the
// two base-4 digits of the index are swapped.
package fft16_pkg;

  localparam int unsigned N  = 16;  // transform length
  localparam int unsigned TW = 16;  // twiddle word length, Q1.(TW-1)

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twiddle_t;

  // round(2^15 * cos(q*pi/8)) for q = 0..4
  function automatic int cos_base(input int unsigned q);
    case (q)
      0:       return 32768;
      1:       return 30274;
      2:       return 23170;
      3:       return 12540;
      default: return 0;
    endcase
  endfunction

  // 2^15 * cos(m*pi/8), any m, before saturation
  function automatic int cos_q15(input int unsigned m);
    int unsigned mm;
    mm = m % 16;
    if (mm <= 4)       return  cos_base(mm);
    else if (mm <= 8)  return -cos_base(8 - mm);
    else if (mm <= 12) return -cos_base(mm - 8);
    else               return  cos_base(16 - mm);
  endfunction

  function automatic logic signed [TW-1:0] sat_q15(input int v);
    if (v > 32767)       return 16'sd32767;
    else if (v < -32768) return -16'sd32768;
    else                 return v[TW-1:0];
  endfunction

  // W16^k = cos(k*pi/8) - j*sin(k*pi/8); sin(m*pi/8) = cos((m-4)*pi/8)
  function automatic twiddle_t twiddle(input int unsigned k);
    twiddle_t w;
    w.re = sat_q15(cos_q15(k % 16));
    w.im = sat_q15(-cos_q15((k + 12) % 16));
    return w;
  endfunction

  // output position -> frequency bin (swap the two base-4 digits)
  function automatic int unsigned digit_rev(input int unsigned p);
    return ((p % 4) * 4) + ((p / 4) % 4);
  endfunction

endpackage
