// twiddle_rom: twiddle factors of the 8-point FFT, W8^k = exp(-j*2*pi*k/8)
// for k = 0..3, in signed fixed point with TW_FRAC fractional bits.
//
//   k | w_re   | w_im
//   0 |  1     |  0
//   1 |  1/r2  | -1/r2
//   2 |  0     | -1
//   3 | -1/r2  | -1/r2
//
// 1.0 is 2^TW_FRAC and 1/r2 is round(2^TW_FRAC / sqrt(2)), both computed at
// elaboration (1024 and 724 for the default Q10), so no table file is read.
// The table follows from the definition of W_N; the number format is this
// design's own choice. Combinational; with a constant k it reduces to wires.
//
// Interface: k (2 bits) -> w_re, w_im (TW bits, signed).
module twiddle_rom #(
  parameter int unsigned TW      = vedic_fft_pkg::TWID_W,
  parameter int unsigned TW_FRAC = vedic_fft_pkg::TWID_FRAC
) (
  input  logic [1:0]           k,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);

  if (TW_FRAC + 2 > TW) begin : g_bad_format
    $error("twiddle_rom: TW=%0d too narrow for TW_FRAC=%0d", TW, TW_FRAC);
  end

  localparam logic signed [TW-1:0] ONE  = TW'(1 << TW_FRAC);
  localparam logic signed [TW-1:0] HALF = TW'(vedic_fft_pkg::inv_sqrt2_q(TW_FRAC));

  always_comb begin
    unique case (k)
      2'd0: begin w_re = ONE;   w_im = '0;    end
      2'd1: begin w_re = HALF;  w_im = -HALF; end
      2'd2: begin w_re = '0;    w_im = -ONE;  end
      default: begin w_re = -HALF; w_im = -HALF; end
    endcase
  end

endmodule
