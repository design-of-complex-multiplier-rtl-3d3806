// fft8: fully parallel, pipelined 8-point radix-2 FFT whose twelve
// butterflies all multiply through the Vedic complex multiplier.
//
// Three stages of four butterflies follow the radix-2 signal flow graph.
// Each stage is combinational and ends in a pipeline register, so a frame
// presented with in_valid appears on y with out_valid three clocks later,
// and a new frame can enter on every clock.
//
//   DIF = 1 (default), decimation in frequency: x holds x(0..7) in natural
//     order; stage s (s = 0,1,2) pairs lines i and i + 4>>s with twiddle
//     W8^(j*2^s), j being the position inside the group; y holds X(k) in
//     bit-reversed order: X0 X4 X2 X6 X1 X5 X3 X7.
//   DIF = 0, decimation in time: x holds x(n) in bit-reversed order
//     (x0 x4 x2 x6 x1 x5 x3 x7); stage s pairs lines i and i + 2^s with
//     twiddle W8^(j*4>>s); y holds X(0..7) in natural order.
//
// Data are DW-bit signed real and imaginary parts; twiddles are Q(TW_FRAC).
// No scaling is applied between stages, so the sum of the magnitudes of the
// inputs must stay below 2^(DW-1) / sqrt(2) to avoid wrap-around.
// The flow graphs are the standard radix-2 ones; the parallel pipelined
// organisation, the valid signal and the synchronous active-high reset are
// this design's own choices.
module fft8 #(
  parameter int unsigned DW      = vedic_fft_pkg::DATA_W,
  parameter int unsigned TW      = vedic_fft_pkg::TWID_W,
  parameter int unsigned TW_FRAC = vedic_fft_pkg::TWID_FRAC,
  parameter bit          DIF     = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_re [8],
  input  logic signed [DW-1:0] x_im [8],
  output logic                 out_valid,
  output logic signed [DW-1:0] y_re [8],
  output logic signed [DW-1:0] y_im [8]
);

  localparam int unsigned NS = vedic_fft_pkg::FFT_STAGES;

  // st_*[s]: input of stage s (st_*[0] = x, st_*[s>0] = pipeline register).
  // bf_*[s]: combinational output of stage s.
  logic signed [DW-1:0] st_re [NS+1][8];
  logic signed [DW-1:0] st_im [NS+1][8];
  logic signed [DW-1:0] bf_re [NS][8];
  logic signed [DW-1:0] bf_im [NS][8];
  logic [NS:1]          vld;

  assign st_re[0] = x_re;
  assign st_im[0] = x_im;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int unsigned SPAN = DIF ? (4 >> s) : (1 << s);
    for (genvar q = 0; q < 4; q++) begin : g_bf
      localparam int unsigned J  = q % SPAN;
      localparam int unsigned I0 = (q / SPAN) * 2 * SPAN + J;
      localparam int unsigned I1 = I0 + SPAN;
      localparam int unsigned K  = DIF ? (J << s) : (J * (4 / SPAN));

      logic signed [TW-1:0] w_re, w_im;

      twiddle_rom #(.TW(TW), .TW_FRAC(TW_FRAC)) u_tw (
        .k(2'(K)), .w_re(w_re), .w_im(w_im)
      );

      butterfly #(.DW(DW), .TW(TW), .TW_FRAC(TW_FRAC), .DIF(DIF)) u_bf (
        .a_re (st_re[s][I0]), .a_im (st_im[s][I0]),
        .b_re (st_re[s][I1]), .b_im (st_im[s][I1]),
        .w_re (w_re),         .w_im (w_im),
        .y0_re(bf_re[s][I0]), .y0_im(bf_im[s][I0]),
        .y1_re(bf_re[s][I1]), .y1_im(bf_im[s][I1])
      );
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        st_re[s+1] <= '{default: '0};
        st_im[s+1] <= '{default: '0};
      end else begin
        st_re[s+1] <= bf_re[s];
        st_im[s+1] <= bf_im[s];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[NS-1:1], in_valid};
  end

  assign out_valid = vld[NS];
  assign y_re      = st_re[NS];
  assign y_im      = st_im[NS];

endmodule
