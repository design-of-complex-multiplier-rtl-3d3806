// vedic_fft_pkg: constants and elaboration-time helpers shared by the
// Vedic-multiplier FFT.
//
// The transform is the 8-point radix-2 FFT. Twiddle factors W8^k =
// exp(-j*2*pi*k/8) are held as signed fixed-point numbers with TW_FRAC
// fractional bits (Q10 by default, so 1.0 is 1024 and 1/sqrt(2) is 724).
// The Q10 format matches the magnitudes seen in reference FFT results for
// this design; the word widths are this design's own choice.
package vedic_fft_pkg;

  localparam int unsigned FFT_N      = 8;   // transform length
  localparam int unsigned FFT_STAGES = 3;   // log2(FFT_N)
  localparam int unsigned DATA_W     = 16;  // real / imaginary sample width
  localparam int unsigned TWID_W     = 12;  // twiddle component width
  localparam int unsigned TWID_FRAC  = 10;  // twiddle fractional bits
  localparam int unsigned MUL_W      = 8;   // stand-alone Vedic multiplier width

  // Integer square root (floor), used at elaboration time only.
  function automatic longint unsigned isqrt(input longint unsigned v);
    longint unsigned r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // round(2^frac / sqrt(2)): the magnitude of the components of W8^1.
  function automatic int unsigned inv_sqrt2_q(input int unsigned frac);
    longint unsigned one, sq, r;
    one = longint'(1) << frac;
    sq  = (one * one) / 2;            // (2^frac)^2 / 2
    r   = isqrt(sq);
    // round to nearest: compare against (r + 0.5)^2 = r^2 + r + 0.25
    if (sq - r * r > r) r++;
    return int'(r);
  endfunction

endpackage
