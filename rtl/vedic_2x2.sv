// 2x2 Vedic multiplier (vertical and crosswise, Urdhva-Tiryakbhyam).
//
// Step 1: the vertical product a0.b0 gives p[0].
// Step 2: the crosswise products a0.b1 and a1.b0 are added; the sum bit is
//         p[1] and its carry moves one position left.
// Step 3: the vertical product a1.b1 plus that carry gives p[2], and the
//         carry out of this addition is p[3].
// The three partial products and their one-bit shifts follow the published
// method; using a half adder for each of the two additions is this design's
// choice. Combinational: p = a * b.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  always_comb begin
    p[0]       = a[0] & b[0];
    {c1, p[1]} = 2'(a[0] & b[1]) + 2'(a[1] & b[0]);
    {p[3], p[2]} = 2'(a[1] & b[1]) + 2'(c1);
  end
endmodule
