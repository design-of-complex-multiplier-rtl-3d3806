// vedic_smul: signed two's-complement W x W multiplier around the unsigned
// Vedic core.
//
// The magnitudes of both operands go into vedic_mul; the 2W-bit product is
// negated when the operand signs differ. The magnitude of the most negative
// W-bit number, 2^(W-1), still fits in W unsigned bits, and the largest
// signed product, (-2^(W-1))^2 = 2^(2W-2), fits in 2W signed bits, so the
// result is always exact. The sign-magnitude wrapper is this design's own
// way of letting the unsigned Vedic multiplier serve signed FFT data.
//
// Interface: a, b (W bits, signed) -> p (2W bits, signed). Combinational.
module vedic_smul #(
  parameter int unsigned W = vedic_fft_pkg::MUL_W
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  logic [W-1:0]   mag_a, mag_b;
  logic [2*W-1:0] mag_p;
  logic           neg;

  always_comb begin
    mag_a = a[W-1] ? W'(-a) : W'(a);
    mag_b = b[W-1] ? W'(-b) : W'(b);
    neg   = a[W-1] ^ b[W-1];
  end

  vedic_mul #(.W(W)) u_core (.a(mag_a), .b(mag_b), .p(mag_p));

  always_comb p = neg ? -signed'(mag_p) : signed'(mag_p);

endmodule
