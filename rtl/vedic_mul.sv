// vedic_mul: W x W unsigned Vedic multiplier, built by divide and conquer.
//
// A product of two S-bit numbers is made from four S/2 x S/2 products of
// their halves: the vertical ones (low*low, high*high) and the crosswise
// ones (low*high, high*low), added with their weights:
//   p = ll + ((lh + hl) << S/2) + (hh << S)
// Applied from S = W down to S = 2, this ends in (W/2)^2 vedic_mul2 Urdhva
// cells that make every partial product in parallel. The tree is written
// bottom-up: level 1 holds the 2x2 cells, block (i, j) of level v
// multiplies bits [2^v*i +: 2^v] of a by bits [2^v*j +: 2^v] of b, and
// level log2(W) is the whole product. The divide-and-conquer decomposition
// follows the reference design; the adders are plain word-level additions
// left to synthesis.
//
// Interface: a, b (W bits, unsigned) -> p (2W bits). Purely combinational.
// W must be a power of two and at least 2. Default W = 8.
module vedic_mul #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int unsigned LEVELS = $clog2(W);

  if (W < 2 || (W & (W - 1)) != 0) begin : g_bad_width
    $error("vedic_mul: W=%0d must be a power of two >= 2", W);
  end

  for (genvar v = 1; v <= LEVELS; v++) begin : g_lv
    localparam int unsigned S = 1 << v;     // operand width at this level
    localparam int unsigned H = S / 2;
    localparam int unsigned C = W / S;      // blocks per operand
    for (genvar i = 0; i < C; i++) begin : g_i
      for (genvar j = 0; j < C; j++) begin : g_j
        logic [2*S-1:0] prod;
        if (v == 1) begin : g_cell
          vedic_mul2 u_cell (.a(a[S*i +: S]), .b(b[S*j +: S]), .p(prod));
        end else begin : g_join
          logic [S-1:0] ll, lh, hl, hh;
          logic [S:0]   xsum;
          always_comb begin
            ll   = g_lv[v-1].g_i[2*i  ].g_j[2*j  ].prod;
            lh   = g_lv[v-1].g_i[2*i  ].g_j[2*j+1].prod;
            hl   = g_lv[v-1].g_i[2*i+1].g_j[2*j  ].prod;
            hh   = g_lv[v-1].g_i[2*i+1].g_j[2*j+1].prod;
            xsum = {1'b0, lh} + {1'b0, hl};
            prod = {hh, ll} + {{(H-1){1'b0}}, xsum, {H{1'b0}}};
          end
        end
      end
    end
  end

  assign p = g_lv[LEVELS].g_i[0].g_j[0].prod;

endmodule
