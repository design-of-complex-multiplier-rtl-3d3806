// vedic_mul2: 2x2-bit unsigned multiplier cell following the Urdhva
// Tiryagbhyam ("vertically and crosswise") sutra.
//
// The product is formed column by column:
//   column 0, vertical : a[0]*b[0]
//   column 1, crosswise: a[1]*b[0] + a[0]*b[1]   (half adder, carry c1)
//   column 2, vertical : a[1]*b[1] + c1          (half adder, carry = p[3])
// All four one-bit partial products are made at once and only two half
// adders follow, which is the property the sutra is valued for. The column
// scheme follows the sutra; the half-adder realisation is this design's own.
//
// Interface: a, b (2 bits, unsigned) -> p (4 bits). Purely combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic v0, x1, x2, v3;   // partial products
  logic c1;               // carry out of the crosswise column

  always_comb begin
    v0 = a[0] & b[0];
    x1 = a[1] & b[0];
    x2 = a[0] & b[1];
    v3 = a[1] & b[1];
    c1 = x1 & x2;
    p[0] = v0;
    p[1] = x1 ^ x2;
    p[2] = v3 ^ c1;
    p[3] = v3 & c1;
  end

endmodule
