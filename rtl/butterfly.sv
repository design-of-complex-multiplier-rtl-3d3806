// butterfly: radix-2 FFT butterfly with a Vedic complex multiplier.
//
// DIF = 0, decimation in time (multiply, then add and subtract):
//   t  = b * W,  y0 = a + t,  y1 = a - t
// DIF = 1, decimation in frequency (add and subtract, then multiply):
//   y0 = a + b,  y1 = (a - b) * W
// The complex product of a DW-bit sample and a Q(TW_FRAC) twiddle is made
// by cmplx_mul at width DW (the twiddle is sign-extended), then shifted
// right arithmetically by TW_FRAC (truncation toward minus infinity) and
// kept to DW bits. Sums and differences wrap in DW bits: no per-stage
// scaling is applied, so callers leave headroom in the input samples.
// The two butterfly forms are the standard ones; the fixed-point scaling
// and the wrap-around are this design's own choices.
//
// Interface: a, b (DW bits, signed, re/im), w (TW bits, signed, re/im)
// -> y0, y1 (DW bits, signed, re/im). Purely combinational.
// DW must be a power of two (it sizes the Vedic multiplier); TW <= DW.
module butterfly #(
  parameter int unsigned DW      = vedic_fft_pkg::DATA_W,
  parameter int unsigned TW      = vedic_fft_pkg::TWID_W,
  parameter int unsigned TW_FRAC = vedic_fft_pkg::TWID_FRAC,
  parameter bit          DIF     = 1'b1
) (
  input  logic signed [DW-1:0] a_re,
  input  logic signed [DW-1:0] a_im,
  input  logic signed [DW-1:0] b_re,
  input  logic signed [DW-1:0] b_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [DW-1:0] y0_re,
  output logic signed [DW-1:0] y0_im,
  output logic signed [DW-1:0] y1_re,
  output logic signed [DW-1:0] y1_im
);

  if (TW > DW) begin : g_bad_tw
    $error("butterfly: TW=%0d must not exceed DW=%0d", TW, DW);
  end

  logic signed [DW-1:0]   m_re, m_im;     // multiplier operand
  logic signed [2*DW:0]   p_re, p_im;     // full-precision product
  logic signed [DW-1:0]   t_re, t_im;     // scaled product

  cmplx_mul #(.W(DW)) u_cmul (
    .a (m_re),
    .b (m_im),
    .c (DW'(w_re)),
    .d (DW'(w_im)),
    .re(p_re),
    .im(p_im)
  );

  always_comb begin
    if (DIF) begin
      m_re = a_re - b_re;
      m_im = a_im - b_im;
    end else begin
      m_re = b_re;
      m_im = b_im;
    end
    // (p >>> TW_FRAC) kept to DW bits; the bits above wrap away, which is
    // why lint reports the top bits of p as unused.
    t_re = p_re[TW_FRAC +: DW];
    t_im = p_im[TW_FRAC +: DW];
    if (DIF) begin
      y0_re = a_re + b_re;
      y0_im = a_im + b_im;
      y1_re = t_re;
      y1_im = t_im;
    end else begin
      y0_re = a_re + t_re;
      y0_im = a_im + t_im;
      y1_re = a_re - t_re;
      y1_im = a_im - t_im;
    end
  end

endmodule
