// WIDTH-bit carry skip adder made of cascaded 4-bit carry skip blocks.
//
// The operands are zero-extended to a whole number of 4-bit blocks; the carry
// out of each block (chosen between its ripple carry and its bypassed carry
// in) feeds the next block. The sum is WIDTH bits and cout is the carry out
// of bit WIDTH-1. The 4-bit block follows the published carry skip adder; the
// way wider adders chain those blocks, and the handling of widths that are not
// a multiple of four, are this design's choice. Combinational.
module csa_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = (WIDTH + 3) / 4;
  localparam int unsigned PW   = NBLK * 4;

  logic [PW-1:0] a_pad, b_pad, s_pad;
  logic [NBLK:0] c;

  always_comb begin
    a_pad = PW'(a);
    b_pad = PW'(b);
  end

  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    csa_block4 u_blk (
      .a   (a_pad[4*k +: 4]),
      .b   (b_pad[4*k +: 4]),
      .c0  (c[k]),
      .s   (s_pad[4*k +: 4]),
      .cout(c[k+1])
    );
  end

  if (PW == WIDTH) begin : g_exact
    assign sum  = s_pad;
    assign cout = c[NBLK];
  end else begin : g_padded
    // Padding bits are zero, so the carry out of bit WIDTH-1 lands in
    // sum bit WIDTH of the padded result.
    assign sum  = s_pad[WIDTH-1:0];
    assign cout = s_pad[WIDTH];
  end
endmodule
