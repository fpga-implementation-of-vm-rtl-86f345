// 8x8 Vedic multiplier: the processing element (PE) of the FIR filter.
//
// Four 4x4 Vedic multipliers take the operand halves
//   p3 = a[7:4]*b[7:4], p2 = a[3:0]*b[7:4], p1 = a[7:4]*b[3:0], p0 = a[3:0]*b[3:0].
// p0[3:0] is the product's P[3:0] directly. Three adders in cascade form the
// rest: {p3, 0000} + {0000, p2} in the first, p1 + {0000, p0[7:4]} in the
// second, and their sum, P[15:4], in the third. The operand split, the padding
// of each adder input and the cascade follow the published 8x8 block diagram;
// building the three adders as carry skip adders (12, 8 and 12 bits wide) is
// this design's choice, in keeping with the filter's use of that adder.
// Combinational: p = a * b, 16 bits, unsigned.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0]  p0, p1, p2, p3;
  logic [11:0] sum_hi, sum_mid_w, sum_top;
  logic [7:0]  sum_mid;
  logic        co_hi, co_mid, co_top;

  vedic_4x4 u_m1 (.a(a[7:4]), .b(b[7:4]), .p(p3));
  vedic_4x4 u_m2 (.a(a[3:0]), .b(b[7:4]), .p(p2));
  vedic_4x4 u_m3 (.a(a[7:4]), .b(b[3:0]), .p(p1));
  vedic_4x4 u_m4 (.a(a[3:0]), .b(b[3:0]), .p(p0));

  csa_adder #(.WIDTH(12)) u_add_hi (
    .a({p3, 4'b0000}), .b({4'b0000, p2}), .cin(1'b0), .sum(sum_hi), .cout(co_hi));
  csa_adder #(.WIDTH(8)) u_add_mid (
    .a(p1), .b({4'b0000, p0[7:4]}), .cin(1'b0), .sum(sum_mid), .cout(co_mid));
  assign sum_mid_w = {3'b000, co_mid, sum_mid};
  csa_adder #(.WIDTH(12)) u_add_top (
    .a(sum_hi), .b(sum_mid_w), .cin(1'b0), .sum(sum_top), .cout(co_top));

  // co_hi and co_top are always 0 (225*16 + 225 and 65025 >> 4 fit in 12
  // bits) and are left unused; co_mid is also 0 (225 + 15 < 256) but is
  // wired into the last adder so the cascade stays exact.
  assign p = {sum_top, p0[3:0]};
endmodule
