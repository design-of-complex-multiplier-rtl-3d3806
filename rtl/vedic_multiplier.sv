// vedic_multiplier: stand-alone registered W x W unsigned Vedic multiplier
// (default 8 x 8 -> 16 bits).
//
// The operands x and y are captured in the registers xreg and yreg on each
// rising clock edge; the product p = xreg * yreg is formed combinationally
// by the divide-and-conquer Vedic multiplier. A product therefore appears
// one clock after its operands are presented and then holds as long as they
// do. The register names and the 8-bit size follow the reference
// simulation; the synchronous active-high reset that clears both registers
// is this design's own choice.
module vedic_multiplier #(
  parameter int unsigned W = vedic_fft_pkg::MUL_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] p
);

  logic [W-1:0] xreg, yreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      xreg <= '0;
      yreg <= '0;
    end else begin
      xreg <= x;
      yreg <= y;
    end
  end

  vedic_mul #(.W(W)) u_mul (.a(xreg), .b(yreg), .p(p));

endmodule
