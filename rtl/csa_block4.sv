// Four-bit carry skip (carry bypass) adder block.
//
// Four full adders form a ripple carry chain c0 -> c1 -> c2 -> c3 -> c4. Each
// full adder also gives its propagate bit p_i = a_i ^ b_i. When all four
// propagate bits are 1 the block would pass its incoming carry straight
// through, so an AND of p0..p3 steers a 2:1 multiplexer that takes c0 as the
// carry out (skip path); otherwise the carry out is c4 from the last full
// adder. This is the structure of the published 4-bit block: ripple adder,
// AND block and multiplexer. Combinational, no clock.
module csa_block4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       cout
);
  logic [4:0] c;
  logic [3:0] p;
  logic       skip;

  assign c[0] = c0;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .p   (p[i]),
      .cout(c[i+1])
    );
  end

  // Block propagate: AND of the four propagate bits selects the bypass.
  always_comb begin
    skip = &p;
    cout = skip ? c0 : c[4];
  end
endmodule
