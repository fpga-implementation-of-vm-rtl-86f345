// 4x4 Vedic multiplier built from four 2x2 Vedic multipliers.
//
// The operands split into halves: q3 = a[3:2]*b[3:2], q2 = a[1:0]*b[3:2],
// q1 = a[3:2]*b[1:0], q0 = a[1:0]*b[1:0]. The low two bits of q0 are the
// product's p[1:0]. Three carry skip adders then form
//   s1 = {q3, 00} + {00, q2},  s2 = q1 + {00, q0[3:2]},  p[7:2] = s1 + s2,
// which is the same arrangement the 8x8 multiplier uses one level up. That the
// 4x4 block is made from 2x2 blocks follows the published design; the adder
// widths are this design's. Combinational: p = a * b.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [5:0] s1, s2w, s3;
  logic [3:0] s2;
  logic       co1, co2, co3;

  vedic_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));
  vedic_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));

  csa_adder #(.WIDTH(6)) u_add1 (
    .a({q3, 2'b00}), .b({2'b00, q2}), .cin(1'b0), .sum(s1), .cout(co1));
  csa_adder #(.WIDTH(4)) u_add2 (
    .a(q1), .b({2'b00, q0[3:2]}), .cin(1'b0), .sum(s2), .cout(co2));
  assign s2w = {1'b0, co2, s2};
  csa_adder #(.WIDTH(6)) u_add3 (
    .a(s1), .b(s2w), .cin(1'b0), .sum(s3), .cout(co3));

  // The carries co1, co2 and co3 are always 0 for 4-bit operands
  // (9*4 + 9 < 64, 9 + 2 < 16, 225 >> 2 < 64); co2 is still wired into the
  // third adder so the cascade stays exact, co1 and co3 are left unused.
  assign p = {s3, q0[1:0]};
endmodule
