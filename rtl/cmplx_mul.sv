// cmplx_mul: complex multiplier built from four Vedic multipliers, one
// subtractor and one adder.
//
//   (a + jb)(c + jd) = (ac - bd) + j(ad + bc)
//
// The four signed products ac, bd, ad and bc are formed in parallel by
// vedic_smul instances; the subtractor gives the real part and the adder the
// imaginary part. This is the structure of the reference block diagram.
// Results are 2W+1 bits wide so that neither sum can overflow; the operand
// width (default 8, the size of the stand-alone Vedic multiplier) and the
// purely combinational timing are this design's own choices.
//
// Interface: a, b, c, d (W bits, signed) -> re, im (2W+1 bits, signed).
module cmplx_mul #(
  parameter int unsigned W = vedic_fft_pkg::MUL_W
) (
  input  logic signed [W-1:0] a,   // Re of first operand
  input  logic signed [W-1:0] b,   // Im of first operand
  input  logic signed [W-1:0] c,   // Re of second operand
  input  logic signed [W-1:0] d,   // Im of second operand
  output logic signed [2*W:0] re,  // ac - bd
  output logic signed [2*W:0] im   // ad + bc
);

  logic signed [2*W-1:0] ac, bd, ad, bc;

  vedic_smul #(.W(W)) u_ac (.a(a), .b(c), .p(ac));
  vedic_smul #(.W(W)) u_bd (.a(b), .b(d), .p(bd));
  vedic_smul #(.W(W)) u_ad (.a(a), .b(d), .p(ad));
  vedic_smul #(.W(W)) u_bc (.a(b), .b(c), .p(bc));

  always_comb begin
    re = (2*W+1)'(ac) - (2*W+1)'(bd);   // subtractor
    im = (2*W+1)'(ad) + (2*W+1)'(bc);   // adder
  end

endmodule
