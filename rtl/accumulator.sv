// Accumulator of the FIR filter: a carry skip adder feeding a register.
//
// Each clock with en high the register takes acc + y, where y is the product
// from the processing element; clear (synchronous) loads 0 so that the first
// product of a run gives 0 + y = y. The adder is a WIDTH-bit carry skip adder
// and its carry out is dropped: the sum wraps modulo 2^WIDTH (with the
// default coefficients the largest sum, 255 * 159 = 40545, fits in 16 bits).
// Adder plus register with en and rst inputs follow the published block
// diagram; the synchronous clear and the wrap-around are this design's
// choices. rst_n is an asynchronous active-low reset.
module accumulator #(
  parameter int unsigned WIDTH = fir_pkg::ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] acc
);
  logic [WIDTH-1:0] sum;
  logic             carry_unused;

  csa_adder #(.WIDTH(WIDTH)) u_add (
    .a   (acc),
    .b   (y),
    .cin (1'b0),
    .sum (sum),
    .cout(carry_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clear) acc <= '0;
    else if (en)    acc <= sum;
  end
endmodule
