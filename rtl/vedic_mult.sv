// vedic_mult: signed W x W multiplier built on the Vedic (Urdhva-Tiryakbhyam)
// unsigned core.
//
// The operands are two's complement. Their magnitudes are multiplied by
// vedic_umul and the product is negated when the signs differ. The most
// negative operand is handled because its magnitude still fits in W
// unsigned bits. Purely combinational; p = a * b exactly, 2W bits wide.
// The Vedic core follows the published design; the sign-magnitude wrapper
// is this design's choice, as the source does not say how signs are
// treated.
module vedic_mult #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  logic [W-1:0]   mag_a, mag_b;
  logic [2*W-1:0] mag_p;
  logic           neg;

  assign mag_a = a[W-1] ? W'(-a) : W'(a);
  assign mag_b = b[W-1] ? W'(-b) : W'(b);
  assign neg   = a[W-1] ^ b[W-1];

  vedic_umul #(.W(W)) u_core (.a(mag_a), .b(mag_b), .p(mag_p));

  assign p = neg ? -$signed(mag_p) : $signed(mag_p);

endmodule
