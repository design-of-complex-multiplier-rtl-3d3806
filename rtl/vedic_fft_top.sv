// vedic_fft_top: the complete design. Three units stand side by side, each
// with its own ports:
//   * fft_*  : the pipelined 8-point radix-2 FFT (fft8), whose twelve
//              butterflies use the Vedic complex multiplier; DIF by default,
//              see fft8 for the line ordering and the 3-clock latency;
//   * mul_*  : the stand-alone registered MW x MW unsigned Vedic multiplier
//              (vedic_multiplier), product one clock after the operands;
//   * cm_*   : the stand-alone MW-bit signed complex multiplier (cmplx_mul),
//              combinational.
// The two stand-alone multipliers are the units that are characterised on
// their own; they share only the clock and reset with the FFT. Reset is
// synchronous and active high.
module vedic_fft_top #(
  parameter int unsigned DW      = vedic_fft_pkg::DATA_W,
  parameter int unsigned TW      = vedic_fft_pkg::TWID_W,
  parameter int unsigned TW_FRAC = vedic_fft_pkg::TWID_FRAC,
  parameter bit          FFT_DIF = 1'b1,
  parameter int unsigned MW      = vedic_fft_pkg::MUL_W
) (
  input  logic                 clk,
  input  logic                 rst,
  // FFT
  input  logic                 fft_in_valid,
  input  logic signed [DW-1:0] fft_x_re [8],
  input  logic signed [DW-1:0] fft_x_im [8],
  output logic                 fft_out_valid,
  output logic signed [DW-1:0] fft_y_re [8],
  output logic signed [DW-1:0] fft_y_im [8],
  // stand-alone Vedic multiplier
  input  logic [MW-1:0]        mul_x,
  input  logic [MW-1:0]        mul_y,
  output logic [2*MW-1:0]      mul_p,
  // stand-alone complex multiplier
  input  logic signed [MW-1:0] cm_a,
  input  logic signed [MW-1:0] cm_b,
  input  logic signed [MW-1:0] cm_c,
  input  logic signed [MW-1:0] cm_d,
  output logic signed [2*MW:0] cm_re,
  output logic signed [2*MW:0] cm_im
);

  fft8 #(.DW(DW), .TW(TW), .TW_FRAC(TW_FRAC), .DIF(FFT_DIF)) u_fft (
    .clk      (clk),
    .rst      (rst),
    .in_valid (fft_in_valid),
    .x_re     (fft_x_re),
    .x_im     (fft_x_im),
    .out_valid(fft_out_valid),
    .y_re     (fft_y_re),
    .y_im     (fft_y_im)
  );

  vedic_multiplier #(.W(MW)) u_mul (
    .clk(clk), .rst(rst), .x(mul_x), .y(mul_y), .p(mul_p)
  );

  cmplx_mul #(.W(MW)) u_cmul (
    .a(cm_a), .b(cm_b), .c(cm_c), .d(cm_d), .re(cm_re), .im(cm_im)
  );

endmodule
