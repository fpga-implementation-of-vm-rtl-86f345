// Signed 8x8 multiplication on the unsigned 8x8 Vedic multiplier.
//
// Both operands are two's complement. Their magnitudes (0..128, which fit in
// eight unsigned bits) are multiplied by vedic_8x8, and the product is negated
// when the signs differ. Used for the coefficient taps of the sub-filters and
// masks, which carry signed samples and coefficients. This sign-magnitude
// wrapper is this design's way of reusing the unsigned Vedic multiplier.
// Combinational: p = a * b, 16-bit signed.
module signed_vedic_mult (
  input  logic signed [7:0]  a,
  input  logic signed [7:0]  b,
  output logic signed [15:0] p
);
  logic [7:0]  mag_a, mag_b;
  logic [15:0] mag_p;
  logic        neg;

  always_comb begin
    mag_a = a[7] ? 8'(-a) : 8'(a);
    mag_b = b[7] ? 8'(-b) : 8'(b);
    neg   = a[7] ^ b[7];
  end

  vedic_8x8 u_mul (.a(mag_a), .b(mag_b), .p(mag_p));

  assign p = neg ? -$signed(mag_p) : $signed(mag_p);
endmodule
