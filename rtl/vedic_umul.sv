// vedic_umul: unsigned W x W multiplier after the Urdhva-Tiryakbhyam
// ("vertically and crosswise") rule.
//
// Result bit k is formed from column k: the sum of all bit products
// a[i] & b[j] with i + j = k (the vertical product for k = 0, the crosswise
// products for the columns after it) plus the carry handed on by column
// k - 1. The column's least significant bit is result bit k and the rest is
// the carry into column k + 1. All bit products are generated at once and
// each column sum is a small adder tree, so no intermediate product is
// stored. Purely combinational; p = a * b exactly. The column rule follows
// the published description of the sutra; writing it as one loop for any
// width W is this design's choice.
module vedic_umul #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // A column holds at most W bit products plus a carry below 2W.
  localparam int unsigned CW = $clog2(4 * W) + 1;

  logic [CW-1:0] col   [2*W];
  logic [CW-1:0] carry [2*W+1];

  always_comb begin
    carry[0] = '0;
    for (int k = 0; k < 2 * W; k++) begin
      col[k] = carry[k];
      for (int i = 0; i < W; i++) begin
        if (k - i >= 0 && k - i < W) col[k] = col[k] + CW'(a[i] & b[k-i]);
      end
      p[k]       = col[k][0];
      carry[k+1] = col[k] >> 1;
    end
  end

endmodule
