// fft_ref_pkg: reference models for the FFT testbenches, written
// independently of the RTL.
//
// * wrap()          : two's-complement wrap of an integer to dw bits.
// * twiddle()       : W8^k = exp(-j*2*pi*k/8) rounded to Q(frac), from $cos.
// * bf_ref()        : one radix-2 butterfly, DIT or DIF, with the product
//                     shifted right by frac and every result wrapped to dw.
// * fft8_ref()      : the full 8-point flow graph built from bf_ref(), lines
//                     in the same order as the hardware ports.
// * dft8()          : the exact DFT in real arithmetic, natural order.
// * bitrev3()       : 3-bit bit reversal.
package fft_ref_pkg;

  typedef longint cvec_t [8];

  function automatic longint wrap(input longint v, input int dw);
    longint m;
    m = v & ((longint'(1) << dw) - 1);
    if (m[dw-1]) m = m - (longint'(1) << dw);
    return m;
  endfunction

  function automatic int bitrev3(input int i);
    return {i[0], i[1], i[2]};
  endfunction

  function automatic void twiddle(input int k, input int frac,
                                  output longint wr, output longint wi);
    real ang, one;
    ang = 2.0 * 3.14159265358979323846 * real'(k) / 8.0;
    one = real'(longint'(1) << frac);
    wr = longint'($floor($cos(ang) * one + 0.5));
    wi = -longint'($floor($sin(ang) * one + 0.5));
  endfunction

  // Complex multiply then arithmetic shift right by frac, wrapped to dw.
  function automatic void cmul_q(input longint xr, input longint xi,
                                 input longint wr, input longint wi,
                                 input int frac, input int dw,
                                 output longint yr, output longint yi);
    yr = wrap((xr * wr - xi * wi) >>> frac, dw);
    yi = wrap((xr * wi + xi * wr) >>> frac, dw);
  endfunction

  function automatic void bf_ref(input bit dif, input int dw, input int frac,
                                 input longint ar, input longint ai,
                                 input longint br, input longint bi,
                                 input longint wr, input longint wi,
                                 output longint y0r, output longint y0i,
                                 output longint y1r, output longint y1i);
    longint tr, ti;
    if (dif) begin
      y0r = wrap(ar + br, dw);
      y0i = wrap(ai + bi, dw);
      cmul_q(wrap(ar - br, dw), wrap(ai - bi, dw), wr, wi, frac, dw, y1r, y1i);
    end else begin
      cmul_q(br, bi, wr, wi, frac, dw, tr, ti);
      y0r = wrap(ar + tr, dw);
      y0i = wrap(ai + ti, dw);
      y1r = wrap(ar - tr, dw);
      y1i = wrap(ai - ti, dw);
    end
  endfunction

  // Full flow graph. For DIF the input is natural order and the output is
  // bit-reversed; for DIT the input is bit-reversed and the output natural.
  function automatic void fft8_ref(input bit dif, input int dw, input int frac,
                                   input cvec_t xr, input cvec_t xi,
                                   output cvec_t yr, output cvec_t yi);
    cvec_t cr, ci;
    int span, i0, i1, k;
    longint wr, wi, y0r, y0i, y1r, y1i;
    cr = xr; ci = xi;
    for (int s = 0; s < 3; s++) begin
      span = dif ? (4 >> s) : (1 << s);
      for (int g = 0; g < 8; g += 2 * span) begin
        for (int j = 0; j < span; j++) begin
          i0 = g + j;
          i1 = i0 + span;
          k  = dif ? (j * (1 << s)) : (j * (4 / span));
          twiddle(k, frac, wr, wi);
          bf_ref(dif, dw, frac, cr[i0], ci[i0], cr[i1], ci[i1], wr, wi,
                 y0r, y0i, y1r, y1i);
          cr[i0] = y0r; ci[i0] = y0i;
          cr[i1] = y1r; ci[i1] = y1i;
        end
      end
    end
    yr = cr; yi = ci;
  endfunction

  function automatic void dft8(input cvec_t xr, input cvec_t xi,
                               output real yr [8], output real yi [8]);
    real ang;
    for (int k = 0; k < 8; k++) begin
      yr[k] = 0.0; yi[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        ang = -2.0 * 3.14159265358979323846 * real'(k * n) / 8.0;
        yr[k] += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        yi[k] += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
    end
  endfunction

endpackage
